// apd_frontend_model: behavioural model (testbench only, not synthesizable) of
// the analog parts around the hold-off circuit: the Geiger-mode APD, its load
// resistor R_L and the PMOS quench and NMOS reset switches on the anode.
//
// The APD is the usual linear model: junction capacitance CD between the bias
// node and the anode, and, while an avalanche is running, a source of the
// breakdown voltage V_BREAK in series with RD. The anode voltage is integrated
// with a fixed step DT from the currents into the anode node:
//   avalanche (V_BIAS - V_BREAK - v)/RD, PMOS (VDD - v)/R_ON when qp is low,
//   NMOS -v/R_ON when nmos_gate is high, load -v/R_L.
// A pulse on photon starts an avalanche only if the APD is armed (excess bias
// above 0.5 V); an avalanche stops when the excess bias falls below the
// latching level V_LATCH. V_BREAK, V_BIAS, RD, CD and VDD are the reference
// simulation values; R_L, R_ON, V_LATCH and the arming level are this model's
// own choices.
`timescale 1ns/1ps
module apd_frontend_model #(
  parameter real V_BREAK = 27.0,
  parameter real V_BIAS  = 30.0,
  parameter real RD      = 250.0,
  parameter real CD      = 2.0e-12,
  parameter real VDD     = 3.3,
  parameter real R_L     = 50.0e3,
  parameter real R_ON    = 500.0,
  parameter real V_LATCH = 0.025,
  parameter real DT      = 0.01      // integration step, ns
) (
  input  logic photon,
  input  logic qp,
  input  logic nmos_gate,
  output real  v_anode,
  output logic avalanche,
  output int   n_absorbed,   // photons that started an avalanche
  output int   n_ignored     // photons that arrived while the APD was not armed
);
  real i_node;

  initial begin
    v_anode    = 0.0;
    avalanche  = 1'b0;
    n_absorbed = 0;
    n_ignored  = 0;
  end

  always @(posedge photon) begin
    if (!avalanche && (V_BIAS - V_BREAK - v_anode) > 0.5 && !nmos_gate) begin
      avalanche = 1'b1;
      n_absorbed++;
    end else begin
      n_ignored++;
    end
  end

  always begin
    #(DT);
    i_node = -v_anode / R_L;
    if (avalanche) i_node += (V_BIAS - V_BREAK - v_anode) / RD;
    if (!qp)       i_node += (VDD - v_anode) / R_ON;
    if (nmos_gate) i_node += (0.0 - v_anode) / R_ON;
    v_anode = v_anode + i_node * (DT * 1.0e-9) / CD;
    if (avalanche && (V_BIAS - V_BREAK - v_anode) < V_LATCH) avalanche = 1'b0;
  end
endmodule
