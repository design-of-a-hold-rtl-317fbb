// code_match: equality detector between the counter and the external code.
//
// Each counter bit is XNORed with the matching external input bit; the bit is 1
// where the two agree. All XNOR outputs are ANDed, so rn is 1 exactly when the
// counter equals the programmed code. Purely combinational.
// The XNOR-per-bit structure and the single wide gate producing Rn follow the
// reference circuit.
module code_match
  import holdoff_pkg::*;
#(
  parameter int unsigned WIDTH = HOLD_CODE_WIDTH
) (
  input  logic [WIDTH-1:0] count,
  input  logic [WIDTH-1:0] code,
  output logic             rn
);
  logic [WIDTH-1:0] bit_eq;

  always_comb begin
    bit_eq = ~(count ^ code);
    rn     = &bit_eq;
  end
endmodule
