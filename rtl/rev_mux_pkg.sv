// Shared constants of the reversible multiplexers.
//
// The 4:1 reversible multiplexer is built from six reversible gates and
// needs four constant inputs (one logic 1 and three logic 0) and leaves ten
// garbage outputs. These counts are the published figures of the circuit;
// the constants here let the modules size their garbage buses from them and
// let testbenches check the counts.
package rev_mux_pkg;

  // Constant inputs of the 4:1 mux: Feynman B = 1, two Peres C = 0, BJN C = 0.
  localparam int unsigned MUX4_CONST_INPUTS   = 4;
  // Garbage outputs of the 4:1 mux, g1..g10.
  localparam int unsigned MUX4_GARBAGE        = 10;
  // Values tied to the constant inputs.
  localparam logic        FEYNMAN_CONST_B     = 1'b1;
  localparam logic        PERES_CONST_C       = 1'b0;
  localparam logic        BJN_CONST_C         = 1'b0;

endpackage
