// tb_golden_adder - self-checking testbench of golden_adder.
//
// Streams random operand pairs, one per cycle, and checks that the sum of
// a pair applied before rising edge k is on the output right after edge
// k+1, i.e. after LAT = 2 edges (and after edge k+2 for a second instance
// with LAT = 3).
module tb_golden_adder;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] a, b;
  logic [8:0] sum2, sum3;
  int checks = 0, failures = 0;
  int hist [$];

  golden_adder #(.W(8), .LAT(2)) dut2 (.clk, .rst_n, .a, .b, .sum(sum2));
  golden_adder #(.W(8), .LAT(3)) dut3 (.clk, .rst_n, .a, .b, .sum(sum3));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (sum2 != 0 || sum3 != 0) failures++;
    rst_n = 1'b1;
    for (int c = 0; c < 500; c++) begin
      a = 8'($urandom);
      b = 8'($urandom);
      hist.push_front(int'(a) + int'(b));
      @(negedge clk);
      if (c >= 3) begin
        checks++;
        if (int'(sum2) != hist[1] || int'(sum3) != hist[2]) begin
          failures++;
          if (failures < 10) $display("mismatch c=%0d %0d %0d", c, sum2, sum3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
