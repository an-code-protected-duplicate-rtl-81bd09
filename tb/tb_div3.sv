// tb_div3 - exhaustive self-checking testbench of div3.
//
// Every 11-bit value must give quotient x/3 and remainder x%3; in
// particular every valid codeword has remainder 0 and every single-bit
// corruption of a codeword has a non-zero remainder.
module tb_div3;
  logic [10:0] x;
  logic [9:0]  quot;
  logic [1:0]  rem;
  int checks = 0, failures = 0;

  div3 #(.XW(11)) dut (.x, .quot, .rem);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      x = 11'(i);
      #1;
      checks++;
      if (int'(quot) != i / 3 || int'(rem) != i % 3) begin
        failures++;
        if (failures < 10) $display("mismatch x=%0d q=%0d r=%0d", i, quot, rem);
      end
    end
    // single-bit errors on codewords are always caught
    for (int n = 0; n < 511; n += 13) begin
      for (int bitpos = 0; bitpos < 11; bitpos++) begin
        x = 11'(3 * n) ^ (11'd1 << bitpos);
        #1;
        checks++;
        if (rem == 2'd0) begin
          failures++;
          $display("undetected single-bit error n=%0d bit=%0d", n, bitpos);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
