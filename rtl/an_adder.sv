// an_adder - adder of two AN codewords.
//
// The AN code is invariant under addition: 3*N + 3*M = 3*(N + M), so the
// sum of two valid codewords is the valid codeword of the sum of the data.
// The sum keeps the carry out and is CW+1 bits wide (eleven bits for two
// ten-bit codewords). Combinational; the ALU unit registers its output in
// the third pipeline stage. Only addition is implemented, as in the
// original design.
module an_adder #(
  parameter int unsigned CW = 10
) (
  input  logic [CW-1:0] a,
  input  logic [CW-1:0] b,
  output logic [CW:0]   sum
);

  always_comb sum = {1'b0, a} + {1'b0, b};

endmodule
