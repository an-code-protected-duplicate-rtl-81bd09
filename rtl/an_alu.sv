// an_alu - one AN-code protected ALU unit (adder only).
//
// Takes two W-bit operands from the shared first-stage input register,
// turns each into a 3N codeword (an_encoder), stores the two codewords in
// the second pipeline stage, adds them (an_adder) and stores the coded sum
// in the third pipeline stage. The registered sum is divided by 3 (div3);
// the quotient is the data result and a non-zero remainder means the sum
// is not a valid codeword, which raises err.
//
// Timing: operands present before clock edge k give quot/err after edge
// k+1 (two register stages inside the unit); one result per cycle, no
// stalls. Reset is asynchronous and active low and clears both stages to
// zero, which is a valid codeword.
//
// Fault injection: fault_site selects one of five buses of this unit
// (codeword A, codeword B, adder output, quotient, remainder) where fault is
// applied; AS_OFF leaves the unit fault-free. The error flag is taken from
// the remainder after the injection point, so a remainder fault can fake or
// hide an error.
//
// The structure (encode, register, add, register, divide, check remainder)
// follows the original design; the reset behaviour and the fault sites are
// this design's own.
module an_alu #(
  parameter int unsigned W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      a,
  input  logic [W-1:0]      b,
  input  an_pkg::alu_site_e fault_site,
  input  an_pkg::fault_t    fault,
  output logic [W+1:0]      quot,
  output logic              err
);
  import an_pkg::*;

  localparam int unsigned CW = W + 2;  // codeword width
  localparam int unsigned SW = W + 3;  // coded sum width

  logic [CW-1:0] code_a, code_b, code_a_f, code_b_f, code_a_q, code_b_q;
  logic [SW-1:0] sum, sum_f, sum_q;
  logic [SW-2:0] quot_raw;
  logic [1:0]    rem_raw, rem;

  // Codeword generation
  an_encoder #(.W(W)) u_enc_a (.n(a), .code(code_a));
  an_encoder #(.W(W)) u_enc_b (.n(b), .code(code_b));

  fault_inj #(.W(CW)) u_fi_code_a (
    .en(fault_site == AS_CODE_A), .f(fault), .d(code_a), .q(code_a_f));
  fault_inj #(.W(CW)) u_fi_code_b (
    .en(fault_site == AS_CODE_B), .f(fault), .d(code_b), .q(code_b_f));

  // Second pipeline stage: coded operands
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_a_q <= '0;
      code_b_q <= '0;
    end else begin
      code_a_q <= code_a_f;
      code_b_q <= code_b_f;
    end
  end

  // Coded addition
  an_adder #(.CW(CW)) u_add (.a(code_a_q), .b(code_b_q), .sum(sum));

  fault_inj #(.W(SW)) u_fi_sum (
    .en(fault_site == AS_SUM), .f(fault), .d(sum), .q(sum_f));

  // Third pipeline stage: coded sum
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum_q <= '0;
    else        sum_q <= sum_f;
  end

  // Quotient and remainder, codeword check
  div3 #(.XW(SW)) u_div (.x(sum_q), .quot(quot_raw), .rem(rem_raw));

  fault_inj #(.W(SW-1)) u_fi_quot (
    .en(fault_site == AS_QUOT), .f(fault), .d(quot_raw), .q(quot));
  fault_inj #(.W(2)) u_fi_rem (
    .en(fault_site == AS_REM), .f(fault), .d(rem_raw), .q(rem));

  always_comb err = (rem != 2'd0);

endmodule
