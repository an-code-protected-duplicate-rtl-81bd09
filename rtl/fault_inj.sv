// fault_inj - fault injector for one bus.
//
// Sits in a bus and, when en is high, replaces the bus with a faulty copy
// according to f (see an_pkg::fault_kind_e): a stuck-at-0 or stuck-at-1 bit,
// an inverted bit (a logic gate replaced by its complement), two bits
// bridged as a wired-AND or wired-OR, or two bits interchanged. With en low,
// or f.kind = FK_NONE, q equals d. A bit index at or above W touches
// nothing; for bridging and swapping an out-of-range partner reads as 0.
//
// Purely combinational. The fault families are those used to evaluate the
// system (stuck-at, gate substitution, bridging, bit scrambling); how they
// are encoded and that gate substitution is modelled as an inversion are
// this design's own choices.
module fault_inj #(
  parameter int unsigned W = 8
) (
  input  logic           en,
  input  an_pkg::fault_t f,
  input  logic [W-1:0]   d,
  output logic [W-1:0]   q
);
  import an_pkg::FK_SA0, an_pkg::FK_SA1, an_pkg::FK_INVERT;
  import an_pkg::FK_BRIDGE_AND, an_pkg::FK_BRIDGE_OR, an_pkg::FK_SWAP;

  logic da, db;  // current values of the two selected bits

  always_comb begin
    da = 1'b0;
    db = 1'b0;
    for (int unsigned i = 0; i < W; i++) begin
      if (i == 32'(f.bit_a)) da = d[i];
      if (i == 32'(f.bit_b)) db = d[i];
    end
    q = d;
    if (en) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (i == 32'(f.bit_a)) begin
          case (f.kind)
            FK_SA0:        q[i] = 1'b0;
            FK_SA1:        q[i] = 1'b1;
            FK_INVERT:     q[i] = ~d[i];
            FK_BRIDGE_AND: q[i] = da & db;
            FK_BRIDGE_OR:  q[i] = da | db;
            FK_SWAP:       q[i] = db;
            default:       q[i] = d[i];
          endcase
        end else if (i == 32'(f.bit_b)) begin
          case (f.kind)
            FK_BRIDGE_AND: q[i] = da & db;
            FK_BRIDGE_OR:  q[i] = da | db;
            FK_SWAP:       q[i] = da;
            default:       q[i] = d[i];
          endcase
        end
      end
    end
  end

endmodule
