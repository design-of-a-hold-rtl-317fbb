// holdoff_pkg: constants shared by the hold-off control circuit.
//
// The hold-off length is programmed as a binary code of HOLD_CODE_WIDTH bits
// (six in the reference design, so 1 to 63 Clk_in periods). The counter, the
// code comparison and the top level all take their default width from here.
package holdoff_pkg;
  localparam int unsigned HOLD_CODE_WIDTH = 6;
endpackage
