// au_pkg: constants and encodings shared by the gated 8-bit arithmetic unit.
//
// DATA_W is the width of the adder/subtractor, the output multiplexer and the
// AU operands (8 bits). MUL_N is the operand width of the Baugh-Wooley
// multiplier (4 bits), whose 2*MUL_N-bit product fills the 8-bit output.
// The two one-bit control encodings follow the arithmetic unit's pins:
// SELECT chooses the working module, M chooses add or subtract. The mapping
// of SELECT=0 to the adder/subtractor is this design's choice; the sense of M
// (low adds, high subtracts) is the one the AU is specified with.
package au_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned MUL_N  = 4;

  // SELECT pin: which module is powered, fed and routed to the output.
  typedef enum logic {
    SEL_ADDSUB = 1'b0,
    SEL_MUL    = 1'b1
  } au_sel_e;

  // M pin of the adder/subtractor.
  typedef enum logic {
    M_ADD = 1'b0,
    M_SUB = 1'b1
  } au_mode_e;

endpackage
