// tb_case_counters - self-checking testbench of case_counters.
//
// Feeds random flag pairs with random valid, compares the four counters
// with a reference count each cycle, checks clear and, with a 4-bit
// counter, saturation at all ones.
module tb_case_counters;
  import an_pkg::*;

  localparam int CW = 4;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          clear, valid, data_corrupt, err_detected;
  logic [CW-1:0] cnt [4];
  int checks = 0, failures = 0, saturated = 0;
  int model [4];

  case_counters #(.CNT_W(CW)) dut (.clk, .rst_n, .clear, .valid, .data_corrupt,
                                   .err_detected, .cnt);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    clear = 0; valid = 0; data_corrupt = 0; err_detected = 0;
    model = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      clear        = ($urandom_range(0, 99) == 0);
      valid        = ($urandom_range(0, 3) != 0);
      data_corrupt = 1'($urandom);
      err_detected = 1'($urandom);
      // case numbering: DO,NE=0  DO,E=1  DNO,E=2  DNO,NE=3
      idx = data_corrupt ? (err_detected ? 2 : 3) : (err_detected ? 1 : 0);
      @(negedge clk);
      if (clear) model = '{0, 0, 0, 0};
      else if (valid && model[idx] < (1 << CW) - 1) model[idx]++;
      else if (valid) saturated++;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(cnt[i]) != model[i]) begin
          failures++;
          if (failures < 10) $display("c=%0d cnt[%0d]=%0d want %0d", c, i, cnt[i], model[i]);
        end
      end
    end
    checks++;
    if (saturated == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
