// an_dup_alu - AN-code protected duplicate ALU system (top level).
//
// Two identical adder units work on the same operands in parallel. Each
// encodes its operands with the 3N code, adds the codewords and divides
// the coded sum by 3; a non-zero remainder tells that this unit is faulty.
// Since a faulty unit identifies itself, two units plus a voter are enough
// to deliver a correct result in the presence of a fault that a plain
// duplex system could only detect. A fault-free golden adder and four case
// counters measure how well this works under injected faults.
//
// Pipeline (one operation per cycle, no stalls, latency 4 cycles):
//   stage 1  input registers (shared by both units)         edge k
//   stage 2  coded operands, inside each ALU unit            edge k+1
//   stage 3  coded sum, inside each ALU unit                 edge k+2
//            then divide, check, vote, compare (combinational)
//   stage 4  output registers: voted quotient, flags         edge k+3
//   counters count the registered flags                      edge k+4
// in_valid marks an operand pair; out_valid marks its result.
//
// Interface: in_a/in_b are W-bit operands. out_quot is the voted sum
// (W+2 bits so that results of faulty units are not cut off), out_golden
// the true sum. out_err0/out_err1 are the units' error flags,
// out_err_detected their OR, out_sel1 tells that unit 1's result was
// chosen, out_data_corrupt that out_quot differs from out_golden. cnt[]
// holds the four case counts, indexed by an_pkg::case_e; cnt_clear zeroes
// them. fault_site[i]/fault[i] select a bus and a fault to inject (FS_OFF
// for none); they are meant to be held steady during a run. Slot 0 alone
// gives the single-fault experiments; slot 1 adds a second, independent
// fault, which is the only way to make both units flag an error at once.
// When both slots name the same bus or the same ALU unit, slot 0 wins.
//
// Following the original design: 8-bit operands, A = 3, N + 2N encoding,
// adder-only ALUs, pipeline stages 1 to 3, remainder check, voter, golden
// adder, the two flags and four counters. This design's own choices: the
// fourth (output) stage, the valid signal, asynchronous active-low reset,
// counter width and clear, the voter's priority and the fault-injection
// controls.
module an_dup_alu #(
  parameter int unsigned W     = 8,
  parameter int unsigned CNT_W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [W-1:0]        in_a,
  input  logic [W-1:0]        in_b,
  input  logic                cnt_clear,
  input  an_pkg::fault_site_e fault_site [2],
  input  an_pkg::fault_t      fault [2],
  output logic                out_valid,
  output logic [W+1:0]        out_quot,
  output logic [W:0]          out_golden,
  output logic                out_err0,
  output logic                out_err1,
  output logic                out_err_detected,
  output logic                out_sel1,
  output logic                out_data_corrupt,
  output logic [CNT_W-1:0]    cnt [4]
);
  import an_pkg::*;

  localparam int unsigned QW = W + 2;

  // ---------------------------------------------------------------- stage 1
  logic [W-1:0] a_q, b_q, a_f, b_f;
  logic         v1, v2, v3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      v1  <= 1'b0;
      v2  <= 1'b0;
      v3  <= 1'b0;
    end else begin
      a_q <= in_a;
      b_q <= in_b;
      v1  <= in_valid;
      v2  <= v1;
      v3  <= v2;
    end
  end

  // ------------------------------------------------------- fault site decode
  // Sites of the top level: enable and fault of the slot that names them.
  logic   en_in_a, en_in_b, en_vote;
  fault_t f_in_a, f_in_b, f_vote;

  always_comb begin
    en_in_a = (fault_site[0] == FS_IN_A) || (fault_site[1] == FS_IN_A);
    en_in_b = (fault_site[0] == FS_IN_B) || (fault_site[1] == FS_IN_B);
    en_vote = (fault_site[0] == FS_VOTE) || (fault_site[1] == FS_VOTE);
    f_in_a  = (fault_site[0] == FS_IN_A) ? fault[0] : fault[1];
    f_in_b  = (fault_site[0] == FS_IN_B) ? fault[0] : fault[1];
    f_vote  = (fault_site[0] == FS_VOTE) ? fault[0] : fault[1];
  end

  // Sites inside the two ALU units.
  alu_site_e site0, site1, slot_site0 [2], slot_site1 [2];
  fault_t    flt0, flt1;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      slot_site0[s] = AS_OFF;
      slot_site1[s] = AS_OFF;
      unique case (fault_site[s])
        FS_ALU0_CODE_A: slot_site0[s] = AS_CODE_A;
        FS_ALU0_CODE_B: slot_site0[s] = AS_CODE_B;
        FS_ALU0_SUM:    slot_site0[s] = AS_SUM;
        FS_ALU0_QUOT:   slot_site0[s] = AS_QUOT;
        FS_ALU0_REM:    slot_site0[s] = AS_REM;
        FS_ALU1_CODE_A: slot_site1[s] = AS_CODE_A;
        FS_ALU1_CODE_B: slot_site1[s] = AS_CODE_B;
        FS_ALU1_SUM:    slot_site1[s] = AS_SUM;
        FS_ALU1_QUOT:   slot_site1[s] = AS_QUOT;
        FS_ALU1_REM:    slot_site1[s] = AS_REM;
        default: ;
      endcase
    end
    site0 = (slot_site0[0] != AS_OFF) ? slot_site0[0] : slot_site0[1];
    flt0  = (slot_site0[0] != AS_OFF) ? fault[0]      : fault[1];
    site1 = (slot_site1[0] != AS_OFF) ? slot_site1[0] : slot_site1[1];
    flt1  = (slot_site1[0] != AS_OFF) ? fault[0]      : fault[1];
  end

  // Input faults reach both units but not the golden adder.
  fault_inj #(.W(W)) u_fi_in_a (.en(en_in_a), .f(f_in_a), .d(a_q), .q(a_f));
  fault_inj #(.W(W)) u_fi_in_b (.en(en_in_b), .f(f_in_b), .d(b_q), .q(b_f));

  // ------------------------------------------------------ stages 2 and 3
  logic [QW-1:0] q0, q1;
  logic          e0, e1;
  logic [W:0]    gold;

  an_alu #(.W(W)) u_alu0 (
    .clk, .rst_n, .a(a_f), .b(b_f), .fault_site(site0), .fault(flt0),
    .quot(q0), .err(e0));

  an_alu #(.W(W)) u_alu1 (
    .clk, .rst_n, .a(a_f), .b(b_f), .fault_site(site1), .fault(flt1),
    .quot(q1), .err(e1));

  golden_adder #(.W(W), .LAT(2)) u_gold (
    .clk, .rst_n, .a(a_q), .b(b_q), .sum(gold));

  // --------------------------------------------------------- voter, flags
  logic [QW-1:0] vq, vq_f;
  logic          err_det, sel1;

  voter #(.QW(QW)) u_voter (
    .q0, .err0(e0), .q1, .err1(e1),
    .q(vq), .err_detected(err_det), .sel1);

  fault_inj #(.W(QW)) u_fi_vote (.en(en_vote), .f(f_vote), .d(vq), .q(vq_f));

  // ---------------------------------------------------------------- stage 4
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid        <= 1'b0;
      out_quot         <= '0;
      out_golden       <= '0;
      out_err0         <= 1'b0;
      out_err1         <= 1'b0;
      out_err_detected <= 1'b0;
      out_sel1         <= 1'b0;
      out_data_corrupt <= 1'b0;
    end else begin
      out_valid        <= v3;
      out_quot         <= vq_f;
      out_golden       <= gold;
      out_err0         <= e0;
      out_err1         <= e1;
      out_err_detected <= err_det;
      out_sel1         <= sel1;
      out_data_corrupt <= (vq_f != {1'b0, gold});
    end
  end

  // ------------------------------------------------------------- counters
  case_counters #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .clear(cnt_clear), .valid(out_valid),
    .data_corrupt(out_data_corrupt), .err_detected(out_err_detected),
    .cnt);

  // Without an injected fault the units must never disagree with the
  // reference: the stage-3 results of a fault-free run are exact. (v3 is
  // held low during reset, so the check needs no reset qualifier.)
  assert property (@(posedge clk)
    (v3 && fault_site[0] == FS_OFF && fault_site[1] == FS_OFF) |->
      (!e0 && !e1 && vq == {1'b0, gold}))
    else $error("fault-free result mismatch");

endmodule
