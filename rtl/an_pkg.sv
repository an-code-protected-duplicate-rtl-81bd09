// an_pkg - shared constants and types of the AN-code protected duplicate ALU.
//
// The code constant A = 3 is the value the design is built around (a 3N
// code: every operand N travels as 3*N, and a coded result is valid only
// when it divides evenly by 3). The fault-control types are this design's
// own encoding of the four fault families used to evaluate the system:
// single stuck-at (SA0/SA1), logic gate substitution (modelled as an
// inverted wire, as an AND turned NAND), bridging (two wires shorted,
// wired-AND or wired-OR) and "bizarre" faults (two wires interchanged).
package an_pkg;

  // Code constant of the AN code.
  localparam int unsigned AN_A = 3;

  // Kind of fault driven onto one bus.
  typedef enum logic [2:0] {
    FK_NONE       = 3'd0,  // no fault
    FK_SA0        = 3'd1,  // bit_a stuck at 0
    FK_SA1        = 3'd2,  // bit_a stuck at 1
    FK_INVERT     = 3'd3,  // bit_a inverted (gate substitution)
    FK_BRIDGE_AND = 3'd4,  // bit_a and bit_b shorted, wired-AND
    FK_BRIDGE_OR  = 3'd5,  // bit_a and bit_b shorted, wired-OR
    FK_SWAP       = 3'd6   // bit_a and bit_b interchanged
  } fault_kind_e;

  // One fault: its kind and the one or two bus bits it touches.
  typedef struct packed {
    fault_kind_e kind;
    logic [3:0]  bit_a;
    logic [3:0]  bit_b;
  } fault_t;

  // Fault sites inside one ALU unit.
  typedef enum logic [2:0] {
    AS_OFF    = 3'd0,  // no fault in this unit
    AS_CODE_A = 3'd1,  // codeword generator output, operand A
    AS_CODE_B = 3'd2,  // codeword generator output, operand B
    AS_SUM    = 3'd3,  // coded adder output
    AS_QUOT   = 3'd4,  // divider quotient
    AS_REM    = 3'd5   // divider remainder
  } alu_site_e;

  // Fault sites of the whole system.
  typedef enum logic [3:0] {
    FS_OFF         = 4'd0,
    FS_IN_A        = 4'd1,   // first-stage input register, operand A (both ALUs)
    FS_IN_B        = 4'd2,   // first-stage input register, operand B (both ALUs)
    FS_ALU0_CODE_A = 4'd3,
    FS_ALU0_CODE_B = 4'd4,
    FS_ALU0_SUM    = 4'd5,
    FS_ALU0_QUOT   = 4'd6,
    FS_ALU0_REM    = 4'd7,
    FS_ALU1_CODE_A = 4'd8,
    FS_ALU1_CODE_B = 4'd9,
    FS_ALU1_SUM    = 4'd10,
    FS_ALU1_QUOT   = 4'd11,
    FS_ALU1_REM    = 4'd12,
    FS_VOTE        = 4'd13   // voter output
  } fault_site_e;

  // The four outcome cases that are counted.
  typedef enum logic [1:0] {
    CASE_DO_NE  = 2'd0,  // data ok, no error detected
    CASE_DO_E   = 2'd1,  // data ok, error detected
    CASE_DNO_E  = 2'd2,  // data not ok, error detected
    CASE_DNO_NE = 2'd3   // data not ok, no error detected
  } case_e;

endpackage
