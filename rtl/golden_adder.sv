// golden_adder - fault-free reference adder for the statistics.
//
// Adds the two true W-bit operands without any coding and delays the W+1
// bit sum by LAT register stages, so that it lines up with the quotient of
// the ALU units (LAT = 2 for the two pipeline stages inside an ALU unit).
// The system compares the voted quotient with this sum to tell whether the
// delivered data is correct. Reset is asynchronous, active low, to zero.
// A reference adder is part of the original design; its delay line is this
// design's way of aligning it with the pipeline.
module golden_adder #(
  parameter int unsigned W   = 8,
  parameter int unsigned LAT = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   sum
);

  logic [W:0] pipe [LAT+1];

  always_comb pipe[0] = {1'b0, a} + {1'b0, b};

  for (genvar s = 1; s <= LAT; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) pipe[s] <= '0;
      else        pipe[s] <= pipe[s-1];
    end
  end

  assign sum = pipe[LAT];

endmodule
