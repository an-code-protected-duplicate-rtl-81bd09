// div3 - divider by the code constant A = 3, with codeword check.
//
// Splits an XW-bit coded value into quotient and remainder by restoring
// long division, one bit per step from the most significant end: the
// two-bit partial remainder is shifted left with the next dividend bit
// appended; when the result is 3 or more, 3 is subtracted and the quotient
// bit is 1. The quotient needs only XW-1 bits because (2^XW - 1)/3 <
// 2^(XW-1). A non-zero remainder means the value is not a valid 3N
// codeword; the ALU unit turns it into its error flag.
//
// Combinational (the steps are unrolled). That a divider produces the
// quotient and remainder follows the original design; the choice of
// restoring long division is this design's own.
module div3 #(
  parameter int unsigned XW = 11
) (
  input  logic [XW-1:0] x,
  output logic [XW-2:0] quot,
  output logic [1:0]    rem
);

  import an_pkg::AN_A;

  logic [2:0] part;

  always_comb begin
    // The top dividend bit alone is always below 3: it starts the remainder.
    rem  = {1'b0, x[XW-1]};
    quot = '0;
    for (int i = XW - 2; i >= 0; i--) begin
      part = {rem, x[i]};
      if (part >= 3'(AN_A)) begin
        quot[i] = 1'b1;
        part    = part - 3'(AN_A);
      end
      rem = part[1:0];
    end
  end

endmodule
