// holdoff_top: hold-off time control circuit for a Geiger-mode avalanche
// photodiode (GM-APD), comparator included.
//
// The APD anode sits on a load resistor; an avalanche raises it above v_ref and
// the comparator output compo rises. The digital core then quenches the APD
// (qp low turns on a PMOS that ties the anode to Vdd) for hold_code periods of
// clk_in, after which it resets the APD (nmos_gate high turns on an NMOS that
// ties the anode to ground) until the comparator sees the anode low again. The
// hold-off time is therefore hold_code x T(clk_in), adjustable in steps of one
// clock period; e.g. code 30 with a 2 ns clock gives about 60 ns.
//
// Ports: v_anode and v_ref are analog voltages (real, volts) because the
// comparator is a behavioural model; the APD, load resistor and the two switch
// transistors are outside this module and are driven by qp and nmos_gate.
// compo_b is the inverted comparator output for photon counting, count the
// counter state for observation. Block structure follows the reference
// circuit; see holdoff_core for the timing.
module holdoff_top
  import holdoff_pkg::*;
#(
  parameter int unsigned CODE_WIDTH = HOLD_CODE_WIDTH
) (
  input  real                   v_anode,
  input  real                   v_ref,
  input  logic                  clk_in,
  input  logic [CODE_WIDTH-1:0] hold_code,
  output logic                  compo_b,
  output logic                  qp,
  output logic                  nmos_gate,
  output logic [CODE_WIDTH-1:0] count
);
  logic compo;

  comparator u_comp (
    .vin_p  (v_anode),
    .vin_n  (v_ref),
    .compo  (compo),
    .compo_b(compo_b)
  );

  holdoff_core #(.CODE_WIDTH(CODE_WIDTH)) u_core (
    .clk_in   (clk_in),
    .compo    (compo),
    .hold_code(hold_code),
    .qp       (qp),
    .nmos_gate(nmos_gate),
    .rn       (),
    .count    (count)
  );
endmodule
