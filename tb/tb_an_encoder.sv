// tb_an_encoder - exhaustive self-checking testbench of an_encoder.
//
// Every 8-bit operand must give the codeword 3*N in ten bits, and every
// codeword must be divisible by 3.
module tb_an_encoder;
  logic [7:0] n;
  logic [9:0] code;
  int checks = 0, failures = 0;

  an_encoder #(.W(8)) dut (.n, .code);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      n = 8'(i);
      #1;
      checks++;
      if (int'(code) != 3 * i || int'(code) % 3 != 0) begin
        failures++;
        $display("mismatch n=%0d code=%0d", i, code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
