// tb_holdoff_top: end-to-end test of the hold-off circuit at its default
// parameters, with the APD, load resistor and switches modelled by
// apd_frontend_model and Vref = 0.3 V.
//
// Scenarios:
//   A. code 30, 2 ns clock: hold-off of about 60 ns.
//   B. code 54, 2 ns clock: about 108 ns.
//   C. every code 1..63 at a 2 ns clock: hold-off grows linearly by one step
//      per code.
//   D. code 63 at clock periods 2, 4, ... 20 ns: the setting range grows to
//      63 x 20 ns = 1260 ns.
//   E. extra photons during the hold-off are not counted as new avalanches.
// Hold-off is measured from the rise of compo (compo_b falling) to the rise of
// qp. For code N and clock period T it must lie in ((N-1)T, NT], since the
// avalanche lands at some point inside a clock period; the test places photons
// in the first 40 % of a period (see one_event), so the bound is tighter:
// [NT - 0.5T, NT]. After each
// event the anode must return below Vref, the reset switch must open and the
// counter must read 0 again.
//
// Mechanisms counted (each must occur): quench, count-to-match, clock blocked
// during reset, automatic reset, counter clear, photon ignored while quenched.
`timescale 1ns/1ps
module tb_holdoff_top;
  import holdoff_pkg::*;
  localparam int unsigned W = HOLD_CODE_WIDTH;
  localparam real V_REF = 0.3;

  realtime half_period = 1.0;
  logic clk_in = 1'b0;
  logic photon = 1'b0;
  logic [W-1:0] hold_code = W'(30);
  logic compo_b, qp, nmos_gate;
  logic [W-1:0] count;
  real v_anode;
  real v_ref = V_REF;
  logic avalanche;
  int n_absorbed, n_ignored;

  int checks = 0, failures = 0;
  int m_quench = 0, m_match = 0, m_blocked = 0, m_reset = 0, m_clear = 0;
  int n_compo_pulses = 0;
  realtime t_compo, t_qp_rise, t_reset_end;
  realtime hold_prev;
  realtime t_photon;

  holdoff_top dut (
    .v_anode(v_anode), .v_ref(v_ref), .clk_in(clk_in), .hold_code(hold_code),
    .compo_b(compo_b), .qp(qp), .nmos_gate(nmos_gate), .count(count));

  apd_frontend_model apd (
    .photon(photon), .qp(qp), .nmos_gate(nmos_gate), .v_anode(v_anode),
    .avalanche(avalanche), .n_absorbed(n_absorbed), .n_ignored(n_ignored));

  always #(half_period) clk_in = ~clk_in;

  // event timestamps and mechanism counters
  always @(negedge compo_b) begin t_compo = $realtime; n_compo_pulses++; end
  always @(negedge qp) m_quench++;
  always @(posedge qp) t_qp_rise = $realtime;
  always @(posedge nmos_gate) m_match++;
  always @(negedge nmos_gate) begin m_reset++; t_reset_end = $realtime; end
  always @(posedge compo_b) begin #0.01; if (count == 0 && !nmos_gate) m_clear++; end
  always @(posedge clk_in) begin
    logic [W-1:0] cnt_prev;
    if (nmos_gate) begin
      cnt_prev = count;
      #0.05;
      if (nmos_gate && count == cnt_prev) m_blocked++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (code=%0d T=%0.1f t=%0t)", what, hold_code, 2 * half_period, $realtime);
    end
  endtask

  task automatic fire_photon();
    t_photon = $realtime;
    photon = 1'b1; #0.1 photon = 1'b0;
  endtask

  // one avalanche with code n; returns the measured hold-off (ns)
  task automatic one_event(int unsigned n, output realtime hold, input bit extra_photon = 1'b0);
    realtime per = 2 * half_period;
    int before_abs = n_absorbed;
    hold_code = W'(n);
    check(qp && !nmos_gate && count == 0 && compo_b, "armed before the photon");
    fire_photon();
    wait (!compo_b);
    if (extra_photon) begin
      #(per * n / 2) fire_photon();
      check(!qp, "second photon arrives during hold-off");
    end
    wait (nmos_gate);
    check(qp, "quench ends when reset starts");
    check(count == W'(n), "counter stopped at the code");
    wait (!nmos_gate);
    #0.05;
    check(count == 0 && compo_b && v_anode < V_REF, "APD reset and counter cleared");
    hold = t_qp_rise - t_compo;
    check(hold >= n * per - 0.5 * per && hold <= n * per + 0.01, "hold-off in [NT-T/2, NT]");
    check(n_absorbed == before_abs + 1, "exactly one avalanche per event");
    #20.0;   // let the anode settle
  endtask

  initial begin
    realtime h;
    int ignored_before;
    repeat (2) @(posedge clk_in);

    // A: code 30, photon in the third clock period
    one_event(30, h);
    $display("code 30, T=2 ns: hold-off %0.2f ns", h);
    check(h > 58.0 && h <= 60.01, "about 60 ns for code 30");

    // B: code 54
    one_event(54, h);
    $display("code 54, T=2 ns: hold-off %0.2f ns", h);
    check(h > 106.0 && h <= 108.01, "about 108 ns for code 54");

    // C: code sweep 1..63
    hold_prev = 0.0;
    for (int unsigned n = 1; n < (1 << W); n++) begin
      one_event(n, h);
      if (n > 1) check(h - hold_prev > 0.0 && h - hold_prev < 4.0, "monotonic, one step per code");
      hold_prev = h;
    end
    $display("code 63, T=2 ns: hold-off %0.2f ns", hold_prev);

    // D: step resolution sweep at code 63
    for (int p = 2; p <= 20; p += 2) begin
      @(posedge clk_in);
      half_period = p / 2.0;
      repeat (3) @(posedge clk_in);
      one_event((1 << W) - 1, h);
      $display("code 63, T=%0d ns: hold-off %0.2f ns", p, h);
    end
    check(h > 1200.0, "range above a microsecond at 20 ns steps");

    // E: a photon during hold-off is not counted
    half_period = 1.0;
    repeat (3) @(posedge clk_in);
    ignored_before = n_ignored;
    one_event(20, h, 1'b1);
    check(n_ignored == ignored_before + 1, "photon during hold-off ignored");

    check(n_compo_pulses == n_absorbed, "one compo_b pulse per avalanche");
    $display("mechanisms: quench=%0d match=%0d clock_blocked=%0d reset=%0d clear=%0d ignored=%0d",
             m_quench, m_match, m_blocked, m_reset, m_clear, n_ignored);
    check(m_quench > 0, "quench happened");
    check(m_match > 0, "code match happened");
    check(m_blocked > 0, "clock blocked during reset happened");
    check(m_reset > 0, "automatic reset happened");
    check(m_clear > 0, "counter clear happened");
    check(n_ignored > 0, "photon ignored while quenched happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
