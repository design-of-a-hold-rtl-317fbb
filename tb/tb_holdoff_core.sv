// tb_holdoff_core: cycle-level test of the digital hold-off core at its
// default width, with compo driven directly.
// For each trial a code N is chosen, compo rises at a random point inside a
// clock period, and the test checks: qp falls at once; the counter follows the
// clock edges; nmos_gate and rn rise together with qp exactly at the N-th
// rising edge of clk_in after compo rose (hold-off between (N-1)T and NT);
// the counter stays frozen at N while compo stays high (clock blocked); and
// dropping compo clears the counter and turns the reset switch off.
`timescale 1ns/1ps
module tb_holdoff_core;
  import holdoff_pkg::*;
  localparam int unsigned W = HOLD_CODE_WIDTH;
  localparam realtime T = 2.0;

  logic clk_in = 1'b0, compo = 1'b0;
  logic [W-1:0] hold_code = W'(1);
  logic qp, nmos_gate, rn;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int n_blocked = 0;
  realtime t_rise, t_end;

  holdoff_core dut (.clk_in(clk_in), .compo(compo), .hold_code(hold_code),
                    .qp(qp), .nmos_gate(nmos_gate), .rn(rn), .count(count));

  always #(T/2) clk_in = ~clk_in;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (code=%0d count=%0d qp=%b nmos=%b rn=%b t=%0t)", what, hold_code,
               count, qp, nmos_gate, rn, $time);
    end
  endtask

  task automatic trial(int unsigned code);
    int unsigned extra;
    hold_code = W'(code);
    #0.05;
    check(count == 0 && qp && !nmos_gate, "armed state");
    // photon: compo rises somewhere inside the clock period
    #(0.1 + 0.1 * ($urandom % 18));
    compo = 1'b1;
    t_rise = $realtime;
    #0.01;
    check(!qp && !nmos_gate, "quench starts with compo");
    for (int unsigned e = 1; e <= code; e++) begin
      @(posedge clk_in); #0.05;
      check(count == W'(e), "counter follows clock");
      if (e < code) check(!qp && !nmos_gate && !rn, "still in hold-off");
    end
    t_end = $realtime - 0.05;
    check(rn && nmos_gate && qp, "code reached: quench off, reset on");
    check(t_end - t_rise > (code - 1) * T && t_end - t_rise <= code * T, "hold-off length");
    extra = $urandom % 4;
    repeat (extra) begin
      @(posedge clk_in); #0.05;
      check(count == W'(code) && nmos_gate && qp, "counter frozen while resetting");
      n_blocked++;
    end
    // anode back below threshold
    #0.3 compo = 1'b0;
    #0.01;
    check(count == 0 && !rn && !nmos_gate && qp, "reset releases");
    repeat (2) @(posedge clk_in);
    #0.05 check(count == 0, "counter held while armed");
  endtask

  initial begin
    repeat (2) @(posedge clk_in);
    trial(30);
    trial(54);
    trial(1);
    trial((1 << W) - 1);
    for (int i = 0; i < 60; i++) trial(1 + ($urandom % ((1 << W) - 1)));
    check(n_blocked > 0, "clock blocking exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_in);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
