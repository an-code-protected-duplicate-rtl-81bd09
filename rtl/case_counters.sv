// case_counters - outcome statistics of a fault-injection run.
//
// For every valid result, the two flags data_corrupt (voted result differs
// from the reference sum) and err_detected (an ALU unit reported a
// non-zero remainder) select one of four cases, and that case's counter is
// incremented:
//   CASE_DO_NE  data ok,     no error detected  (fault had no effect)
//   CASE_DO_E   data ok,     error detected     (error flagged, data fine)
//   CASE_DNO_E  data not ok, error detected     (fault hit data, detected)
//   CASE_DNO_NE data not ok, no error detected  (fault hit data, missed)
// clear zeroes all four counters (it wins over a count in the same cycle).
// The counters saturate at all ones. Counting happens on the clock edge at
// which valid is high. The four cases are those of the original design;
// the counter width, saturation and the clear input are this design's own.
module case_counters #(
  parameter int unsigned CNT_W = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,
  input  logic             data_corrupt,
  input  logic             err_detected,
  output logic [CNT_W-1:0] cnt [4]
);
  import an_pkg::*;

  case_e cur;

  always_comb begin
    unique case ({data_corrupt, err_detected})
      2'b00:   cur = CASE_DO_NE;
      2'b01:   cur = CASE_DO_E;
      2'b11:   cur = CASE_DNO_E;
      default: cur = CASE_DNO_NE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) cnt[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < 4; i++) cnt[i] <= '0;
    end else if (valid && (cnt[cur] != '1)) begin
      cnt[cur] <= cnt[cur] + 1'b1;
    end
  end

endmodule
