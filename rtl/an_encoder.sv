// an_encoder - 3N codeword generator.
//
// Multiplies a W-bit operand by the code constant A = 3 with one adder,
// code = N + 2N, where 2N is N shifted left by one wire position. The
// codeword is W+2 bits wide (ten bits for the eight-bit operands), which
// holds 3*(2^W - 1). The shift-and-add structure is the one the design
// calls for; it is combinational, the pipeline registers around it belong
// to the ALU unit.
module an_encoder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] n,
  output logic [W+1:0] code
);

  always_comb code = {2'b00, n} + {1'b0, n, 1'b0};

endmodule
