// tb_an_alu - self-checking testbench of one AN-coded ALU unit.
//
// Streams one random operand pair per cycle through the unit, first with no
// fault and then with random faults at each of the five fault sites, and
// checks quotient and error flag against the reference model exactly two
// clock edges after the operands were applied (the unit's latency). Also
// counts that errors were both flagged and missed under faults.
module tb_an_alu;
  import an_pkg::*;
  import tb_model_pkg::*;

  localparam int W = 8;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] a, b;
  alu_site_e    site;
  fault_t       f;
  logic [W+1:0] quot;
  logic         err;
  int checks = 0, failures = 0, n_err = 0;

  an_alu #(.W(W)) dut (.clk, .rst_n, .a, .b, .fault_site(site), .fault(f),
                       .quot, .err);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned exp_q [$];
  bit              exp_e [$];

  task automatic run(int cycles);
    longint unsigned q;
    bit e;
    exp_q.delete();
    exp_e.delete();
    for (int c = 0; c < cycles + 2; c++) begin
      @(negedge clk);
      if (c >= 2) begin
        checks++;
        if (64'(quot) != exp_q[0] || err != exp_e[0]) begin
          failures++;
          if (failures < 10)
            $display("mismatch site=%s kind=%s q=%0d/%0d e=%0b/%0b", site.name(),
                     f.kind.name(), quot, exp_q[0], err, exp_e[0]);
        end
        if (err) n_err++;
        void'(exp_q.pop_front());
        void'(exp_e.pop_front());
      end
      a = W'($urandom);
      b = W'($urandom);
      fm_alu(W, 64'(a), 64'(b), site, f, q, e);
      exp_q.push_back(q);
      exp_e.push_back(e);
    end
  endtask

  initial begin
    a = '0; b = '0; site = AS_OFF;
    f = '{kind: FK_NONE, bit_a: 4'd0, bit_b: 4'd0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(500);
    if (n_err != 0) begin
      failures++;
      $display("error flagged without a fault");
    end
    for (int s = 1; s <= 5; s++) begin
      for (int k = 0; k < 12; k++) begin
        site    = alu_site_e'(s);
        f.kind  = fault_kind_e'($urandom_range(1, 6));
        f.bit_a = 4'($urandom_range(0, 10));
        f.bit_b = 4'($urandom_range(0, 10));
        run(60);
      end
    end
    checks++;
    if (n_err == 0) begin
      failures++;
      $display("no fault was ever detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
