// tb_fault_inj - self-checking testbench of fault_inj.
//
// Applies every fault kind to random 10-bit words at random bit positions
// (including positions beyond the bus) and compares with the reference
// model; also checks that a disabled injector is transparent.
module tb_fault_inj;
  import an_pkg::*;
  import tb_model_pkg::*;

  localparam int W = 10;

  logic         en;
  fault_t       f;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;

  fault_inj #(.W(W)) dut (.en, .f, .d, .q);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      en      = ($urandom_range(0, 7) != 0);
      f.kind  = fault_kind_e'($urandom_range(0, 6));
      f.bit_a = 4'($urandom_range(0, 11));
      f.bit_b = 4'($urandom_range(0, 11));
      d       = W'($urandom);
      #1;
      checks++;
      if (64'(q) != fm_apply(en, f, W, 64'(d))) begin
        failures++;
        if (failures < 10)
          $display("mismatch en=%0b kind=%s a=%0d b=%0d d=%h q=%h", en,
                   f.kind.name(), f.bit_a, f.bit_b, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
