// holdoff_core: digital part of the GM-APD hold-off time control circuit.
//
// Operation, one avalanche at a time:
//   1. Armed: compo is low, the counter is held at 0, both switches are off.
//   2. An avalanche lifts the anode, compo goes high. qp falls at once (PMOS
//      quench on) and the counter starts counting rising edges of clk_in.
//   3. When the count equals hold_code, rn rises: qp returns high (quench off),
//      the counter stops, and nmos_gate rises (NMOS reset on) and stays high
//      because the frozen count keeps matching.
//   4. The NMOS pulls the anode to ground, compo falls, the counter clears,
//      the match disappears and nmos_gate falls. The APD is armed again.
//
// Timing: with hold_code = N (1..2**CODE_WIDTH-1) qp is low from the rise of
// compo until the N-th rising edge of clk_in after it, i.e. for between
// (N-1) and N clock periods, so the Clk_in period sets the step size and the
// code the number of steps. hold_code = 0 matches the cleared counter, which
// keeps the NMOS switch on permanently and disables quenching; it is not a
// usable setting. compo is asynchronous to clk_in, as in the reference circuit.
//
// The structure (counter, XNOR match, quench/reset control) follows the
// reference circuit; see the sub-modules for the choices made in each.
module holdoff_core
  import holdoff_pkg::*;
#(
  parameter int unsigned CODE_WIDTH = HOLD_CODE_WIDTH
) (
  input  logic                  clk_in,
  input  logic                  compo,
  input  logic [CODE_WIDTH-1:0] hold_code,
  output logic                  qp,
  output logic                  nmos_gate,
  output logic                  rn,
  output logic [CODE_WIDTH-1:0] count
);
  logic cnt_en;
  logic cnt_rst_n;

  sync_counter #(.WIDTH(CODE_WIDTH)) u_counter (
    .clk  (clk_in),
    .rst_n(cnt_rst_n),
    .en   (cnt_en),
    .q    (count)
  );

  code_match #(.WIDTH(CODE_WIDTH)) u_match (
    .count(count),
    .code (hold_code),
    .rn   (rn)
  );

  quench_reset_logic u_ctrl (
    .compo    (compo),
    .rn       (rn),
    .qp       (qp),
    .node_a   (),
    .cnt_en   (cnt_en),
    .cnt_rst_n(cnt_rst_n),
    .nmos_gate(nmos_gate)
  );
endmodule
