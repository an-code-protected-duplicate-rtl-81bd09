// tb_an_adder - self-checking testbench of an_adder.
//
// Adds all pairs of valid 10-bit codewords 3*N + 3*M for a grid of N and M,
// plus random raw 10-bit pairs, and checks the 11-bit sum; for codewords
// the sum must also be the codeword of N + M.
module tb_an_adder;
  logic [9:0]  a, b;
  logic [10:0] sum;
  int checks = 0, failures = 0;

  an_adder #(.CW(10)) dut (.a, .b, .sum);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n += 5) begin
      for (int m = 0; m < 256; m += 3) begin
        a = 10'(3 * n);
        b = 10'(3 * m);
        #1;
        checks++;
        if (int'(sum) != 3 * (n + m)) begin
          failures++;
          if (failures < 10) $display("codeword mismatch %0d+%0d -> %0d", n, m, sum);
        end
      end
    end
    for (int k = 0; k < 2000; k++) begin
      a = 10'($urandom);
      b = 10'($urandom);
      #1;
      checks++;
      if (int'(sum) != int'(a) + int'(b)) begin
        failures++;
        if (failures < 10) $display("raw mismatch %0d+%0d -> %0d", a, b, sum);
      end
    end
    a = '1; b = '1;
    #1;
    checks++;
    if (sum != 11'd2046) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
