// voter - picks the result of an ALU unit that reports no error.
//
// Each of the two ALU units delivers a quotient and an error flag (non-zero
// remainder of its coded sum). Because a faulty unit can identify itself
// through its own code check, the voter needs only two units: it passes
// unit 0's quotient when unit 0 reports no error, otherwise unit 1's
// quotient when unit 1 reports no error, and unit 0's quotient when both
// report errors. err_detected is high when either unit reports an error,
// sel1 when unit 1's quotient was chosen.
//
// Combinational. Selecting on the two error flags follows the original
// design; the priority (unit 0 first) and the choice when both units fail
// are this design's own.
module voter #(
  parameter int unsigned QW = 10
) (
  input  logic [QW-1:0] q0,
  input  logic          err0,
  input  logic [QW-1:0] q1,
  input  logic          err1,
  output logic [QW-1:0] q,
  output logic          err_detected,
  output logic          sel1
);

  always_comb begin
    sel1         = err0 && !err1;
    q            = sel1 ? q1 : q0;
    err_detected = err0 || err1;
  end

endmodule
