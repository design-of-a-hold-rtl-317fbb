// quench_reset_logic: turns the comparator output and the match signal into the
// switch controls of the hold-off circuit.
//
//   compo rn | qp  node_a cnt_en cnt_rst_n nmos_gate | phase
//     0   0  |  1     1     0       0         0      | armed, waiting for a photon
//     1   0  |  0     1     1       1         0      | hold-off: APD quenched, counting
//     1   1  |  1     0     0       1         1      | reset: counter frozen, anode grounded
//     0   1  |  1     0     0       0         1      | (only while the counter clears)
//
// qp drives the PMOS gate (low = anode tied to Vdd, APD quenched). node_a is the
// inverse of rn; it stops the counter as soon as the code is reached so that rn
// stays high for the whole reset. cnt_en lets the counter advance only while
// compo is high and node_a is high; cnt_rst_n (= compo) clears the counter once
// the anode has fallen back below the comparator threshold. nmos_gate is rn as
// buffered toward the NMOS gate (high = anode tied to ground).
//
// All functions follow the reference circuit. Two differences in form: the
// counter is stopped with an enable instead of a gated clock, and the two
// delay buffers in front of the NMOS gate are zero-delay here, so the "quench
// off before reset on" ordering is guaranteed logically (qp low and nmos_gate
// high can never coincide) rather than by buffer delay. Purely combinational.
module quench_reset_logic (
  input  logic compo,
  input  logic rn,
  output logic qp,
  output logic node_a,
  output logic cnt_en,
  output logic cnt_rst_n,
  output logic nmos_gate
);
  always_comb begin
    node_a    = ~rn;
    qp        = ~(compo & node_a);
    cnt_en    = compo & node_a;
    cnt_rst_n = compo;
    nmos_gate = rn;
  end

  // The quench (PMOS) and reset (NMOS) switches must never be on together.
  always_comb begin
    assert (!(!qp && nmos_gate)) else $error("quench and reset switches both on");
  end
endmodule
