// tb_an_dup_alu - end-to-end testbench of the duplicate ALU system.
//
// Runs the top level at its default parameters (8-bit operands, 17-bit
// counters) through fault-injection campaigns like the ones the design was
// evaluated with: for each fault, the counters are cleared and the 361
// operand pairs whose operands are both multiples of 7 (0, 7, ..., 126)
// are streamed back to back, one per cycle. 29 single faults are used, in
// the mix of the evaluation: 15 stuck-at, 7 gate substitutions (inverted
// wire), 5 bridges and 2 bit interchanges, spread over all fault sites.
// Two double faults (one per unit) make both units flag at once. Finally
// two complete sweeps of all 2^16 operand pairs without a fault fill the
// data-ok counter past its maximum.
//
// Every result is checked against the reference model in tb_model_pkg,
// and out_valid must rise exactly 4 clock edges after in_valid. After each
// run the four hardware counters must equal the model's counts. The test
// also counts how often each mechanism occurred (voter choosing unit 1,
// both units flagging, each of the four outcome cases, idle cycles in the
// input stream, counter clear, counter saturation) and fails for any that
// never occurred. Per fault family it prints the case totals and the
// share of inputs for which the system still delivered a correct or
// flagged result.
module tb_an_dup_alu;
  import an_pkg::*;
  import tb_model_pkg::*;

  localparam int W     = 8;
  localparam int CNT_W = 17;
  localparam int LAT   = 4;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              in_valid, cnt_clear;
  logic [W-1:0]      in_a, in_b;
  fault_site_e       fault_site [2];
  fault_t            fault [2];
  logic              out_valid, out_err0, out_err1, out_err_detected;
  logic              out_sel1, out_data_corrupt;
  logic [W+1:0]      out_quot;
  logic [W:0]        out_golden;
  logic [CNT_W-1:0]  cnt [4];

  an_dup_alu dut (
    .clk, .rst_n, .in_valid, .in_a, .in_b, .cnt_clear, .fault_site, .fault,
    .out_valid, .out_quot, .out_golden, .out_err0, .out_err1,
    .out_err_detected, .out_sel1, .out_data_corrupt, .cnt);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ scoreboard
  typedef struct {
    sys_result_t r;
    longint      issue;
  } exp_t;
  exp_t exp_q [$];
  int   model_cnt [4];
  int   n_case [4];
  int   n_sel1 = 0, n_both = 0, n_gap = 0, n_clear = 0, n_sat = 0;

  function automatic int case_of(bit corrupt, bit err);
    return corrupt ? (err ? 2 : 3) : (err ? 1 : 0);
  endfunction

  always @(negedge clk) begin : monitor
    exp_t e;
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected out_valid at cycle %0d", cyc);
        end else begin
          e = exp_q.pop_front();
          if (cyc - e.issue != longint'(LAT)) begin
            failures++;
            $display("latency %0d, expected %0d", cyc - e.issue, LAT);
          end
          if (64'(out_quot) != e.r.quot || 64'(out_golden) != e.r.gold ||
              out_err0 != e.r.e0 || out_err1 != e.r.e1 ||
              out_sel1 != e.r.sel1 || out_err_detected != e.r.err_det ||
              out_data_corrupt != e.r.corrupt) begin
            failures++;
            if (failures < 10)
              $display("result mismatch: q=%0d/%0d gold=%0d e=%0b%0b/%0b%0b corrupt=%0b/%0b",
                       out_quot, e.r.quot, out_golden, out_err1, out_err0,
                       e.r.e1, e.r.e0, out_data_corrupt, e.r.corrupt);
          end
          if (out_sel1) n_sel1++;
          if (out_err0 && out_err1) n_both++;
          n_case[case_of(out_data_corrupt, out_err_detected)]++;
        end
      end else if (exp_q.size() != 0 && cyc - exp_q[0].issue >= longint'(LAT)) begin
        failures++;
        $display("missing result at cycle %0d", cyc);
        void'(exp_q.pop_front());
      end
    end
  end

  // ---------------------------------------------------------------- driver
  task automatic issue(int a, int b);
    sys_result_t r;
    in_valid = 1'b1;
    in_a     = W'(a);
    in_b     = W'(b);
    r = fm_system(W, 64'(a), 64'(b), fault_site, fault);
    exp_q.push_back('{r: r, issue: cyc});
    model_cnt[case_of(r.corrupt, r.err_det)]++;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic clear_counters();
    cnt_clear = 1'b1;
    @(negedge clk);
    cnt_clear = 1'b0;
    model_cnt = '{0, 0, 0, 0};
    checks++;
    if (cnt[0] != 0 || cnt[1] != 0 || cnt[2] != 0 || cnt[3] != 0) begin
      failures++;
      $display("counters not cleared");
    end else n_clear++;
  endtask

  task automatic drain();
    repeat (LAT + 2) @(negedge clk);
  endtask

  task automatic compare_counters(string tag);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (int'(cnt[i]) != model_cnt[i]) begin
        failures++;
        $display("%s: counter %0d = %0d, expected %0d", tag, i, cnt[i], model_cnt[i]);
      end
    end
  endtask

  // One run: the 361 pairs of multiples of 7, optionally with idle cycles.
  localparam int NFAM = 6;
  string fam_names [NFAM] = '{"none", "SSA", "LGS", "BD", "BZ", "DBL"};
  int    fam_tot [NFAM][4];

  task automatic run_fault(string fam, fault_site_e s0, fault_t f0,
                           fault_site_e s1, fault_t f1, bit gaps);
    fault_site[0] = s0;
    fault[0]      = f0;
    fault_site[1] = s1;
    fault[1]      = f1;
    clear_counters();
    for (int a = 0; a <= 126; a += 7) begin
      for (int b = 0; b <= 126; b += 7) begin
        if (gaps && $urandom_range(0, 3) == 0) begin
          @(negedge clk);
          n_gap++;
        end
        issue(a, b);
      end
    end
    drain();
    compare_counters(fam);
    for (int k = 0; k < NFAM; k++)
      if (fam_names[k] == fam)
        for (int i = 0; i < 4; i++) fam_tot[k][i] += int'(cnt[i]);
    $display("%-4s site0=%-15s %-13s bits %0d,%0d  DO,NE=%0d DO,E=%0d DNO,E=%0d DNO,NE=%0d",
             fam, s0.name(), f0.kind.name(), f0.bit_a, f0.bit_b,
             cnt[0], cnt[1], cnt[2], cnt[3]);
  endtask

  function automatic fault_t mk(fault_kind_e k, int ba, int bb = 0);
    return '{kind: k, bit_a: 4'(ba), bit_b: 4'(bb)};
  endfunction

  initial begin
    fault_t none;
    none = mk(FK_NONE, 0);
    in_valid = 1'b0; in_a = '0; in_b = '0; cnt_clear = 1'b0;
    fault_site[0] = FS_OFF; fault_site[1] = FS_OFF;
    fault[0] = none; fault[1] = none;
    n_case = '{0, 0, 0, 0};
    for (int k = 0; k < NFAM; k++) fam_tot[k] = '{0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // fault-free reference run, with idle cycles in the stream
    run_fault("none", FS_OFF, none, FS_OFF, none, 1'b1);

    // stuck-at faults (15)
    run_fault("SSA", FS_IN_A,        mk(FK_SA1, 3), FS_OFF, none, 0);
    run_fault("SSA", FS_IN_B,        mk(FK_SA0, 5), FS_OFF, none, 0);
    run_fault("SSA", FS_ALU0_CODE_A, mk(FK_SA1, 0), FS_OFF, none, 0);
    run_fault("SSA", FS_ALU0_CODE_B, mk(FK_SA0, 4), FS_OFF, none, 0);
    run_fault("SSA", FS_ALU0_SUM,    mk(FK_SA1, 7), FS_OFF, none, 0);
    run_fault("SSA", FS_ALU0_SUM,    mk(FK_SA0, 10), FS_OFF, none, 0);
    run_fault("SSA", FS_ALU0_QUOT,   mk(FK_SA0, 2), FS_OFF, none, 0);
    run_fault("SSA", FS_ALU0_REM,    mk(FK_SA0, 0), FS_OFF, none, 0);
    run_fault("SSA", FS_ALU0_REM,    mk(FK_SA1, 1), FS_OFF, none, 0);
    run_fault("SSA", FS_ALU1_CODE_A, mk(FK_SA0, 6), FS_OFF, none, 0);
    run_fault("SSA", FS_ALU1_SUM,    mk(FK_SA0, 3), FS_OFF, none, 0);
    run_fault("SSA", FS_ALU1_QUOT,   mk(FK_SA1, 8), FS_OFF, none, 0);
    run_fault("SSA", FS_ALU1_REM,    mk(FK_SA1, 0), FS_OFF, none, 0);
    run_fault("SSA", FS_VOTE,        mk(FK_SA1, 1), FS_OFF, none, 0);
    run_fault("SSA", FS_VOTE,        mk(FK_SA0, 9), FS_OFF, none, 0);
    // logic gate substitution (7)
    run_fault("LGS", FS_ALU0_CODE_A, mk(FK_INVERT, 2), FS_OFF, none, 0);
    run_fault("LGS", FS_ALU0_SUM,    mk(FK_INVERT, 5), FS_OFF, none, 0);
    run_fault("LGS", FS_ALU0_QUOT,   mk(FK_INVERT, 0), FS_OFF, none, 0);
    run_fault("LGS", FS_ALU1_CODE_B, mk(FK_INVERT, 9), FS_OFF, none, 0);
    run_fault("LGS", FS_ALU1_REM,    mk(FK_INVERT, 1), FS_OFF, none, 0);
    run_fault("LGS", FS_IN_A,        mk(FK_INVERT, 6), FS_OFF, none, 0);
    run_fault("LGS", FS_VOTE,        mk(FK_INVERT, 4), FS_OFF, none, 0);
    // bridging (5)
    run_fault("BD",  FS_ALU0_SUM,    mk(FK_BRIDGE_AND, 2, 3), FS_OFF, none, 0);
    run_fault("BD",  FS_ALU1_CODE_A, mk(FK_BRIDGE_OR, 4, 5), FS_OFF, none, 0);
    run_fault("BD",  FS_IN_B,        mk(FK_BRIDGE_AND, 0, 1), FS_OFF, none, 0);
    run_fault("BD",  FS_ALU0_QUOT,   mk(FK_BRIDGE_OR, 6, 7), FS_OFF, none, 0);
    run_fault("BD",  FS_ALU1_SUM,    mk(FK_BRIDGE_AND, 8, 9), FS_OFF, none, 0);
    // bizarre: bits interchanged (2)
    run_fault("BZ",  FS_IN_A,        mk(FK_SWAP, 2, 5), FS_OFF, none, 0);
    run_fault("BZ",  FS_VOTE,        mk(FK_SWAP, 3, 7), FS_OFF, none, 0);
    // double faults: one in each unit, so that both units flag
    run_fault("DBL", FS_ALU0_SUM,    mk(FK_SA1, 4), FS_ALU1_SUM, mk(FK_SA1, 1), 0);
    run_fault("DBL", FS_ALU0_REM,    mk(FK_SA1, 0), FS_ALU1_CODE_B, mk(FK_INVERT, 3), 0);

    // summary per fault family
    for (int k = 0; k < NFAM; k++) begin
      int tot;
      tot = fam_tot[k][0] + fam_tot[k][1] + fam_tot[k][2] + fam_tot[k][3];
      $display("family %-4s DO,NE=%0d DO,E=%0d DNO,E=%0d DNO,NE=%0d  correct-or-flagged=%0d%%",
               fam_names[k], fam_tot[k][0], fam_tot[k][1], fam_tot[k][2], fam_tot[k][3],
               (100 * (tot - fam_tot[k][3])) / tot);
    end

    // exhaustive sweeps without faults: 2 x 2^16 results saturate a counter
    fault_site[0] = FS_OFF;
    fault_site[1] = FS_OFF;
    clear_counters();
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < 256; a++)
        for (int b = 0; b < 256; b++) issue(a, b);
      drain();
      checks++;
      if (pass == 0 && int'(cnt[0]) != 65536) begin
        failures++;
        $display("full sweep counted %0d", cnt[0]);
      end
    end
    checks++;
    if (cnt[0] != {CNT_W{1'b1}}) begin
      failures++;
      $display("counter did not saturate: %0d", cnt[0]);
    end else n_sat++;

    // every mechanism must have happened
    $display("mechanisms: sel1=%0d both_err=%0d gaps=%0d clears=%0d saturations=%0d",
             n_sel1, n_both, n_gap, n_clear, n_sat);
    $display("cases seen: DO,NE=%0d DO,E=%0d DNO,E=%0d DNO,NE=%0d",
             n_case[0], n_case[1], n_case[2], n_case[3]);
    checks += 10;
    if (n_sel1 == 0)  begin failures++; $display("voter never chose unit 1"); end
    if (n_both == 0)  begin failures++; $display("both units never flagged"); end
    if (n_gap == 0)   begin failures++; $display("no idle cycle"); end
    if (n_clear == 0) begin failures++; $display("no clear"); end
    if (n_sat == 0)   begin failures++; $display("no saturation"); end
    for (int i = 0; i < 4; i++)
      if (n_case[i] == 0) begin failures++; $display("case %0d never seen", i); end
    if (exp_q.size() != 0) begin failures++; $display("results left over"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
