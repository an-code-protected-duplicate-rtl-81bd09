// tb_voter - self-checking testbench of the voter.
//
// For all four combinations of the two error flags and random quotients,
// checks which quotient is passed on and the error and select outputs.
module tb_voter;
  logic [9:0] q0, q1, q;
  logic       err0, err1, err_detected, sel1;
  int checks = 0, failures = 0;

  voter #(.QW(10)) dut (.q0, .err0, .q1, .err1, .q, .err_detected, .sel1);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] want;
    for (int n = 0; n < 400; n++) begin
      q0   = 10'($urandom);
      q1   = 10'($urandom);
      err0 = n[0];
      err1 = n[1];
      #1;
      // unit 1 is used only when unit 0 is flagged and unit 1 is not
      want = (n[1:0] == 2'b01) ? q1 : q0;
      checks++;
      if (q != want || err_detected != (n[1:0] != 2'b00) ||
          sel1 != (n[1:0] == 2'b01)) begin
        failures++;
        if (failures < 10)
          $display("mismatch e0=%0b e1=%0b q=%0d want=%0d", err0, err1, q, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
