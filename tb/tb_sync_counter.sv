// tb_sync_counter: self-checking test of the J-K synchronous binary counter at
// its default width. Counts through a full wrap, pauses with en low at random,
// applies asynchronous clears mid-cycle, and compares q after every edge with
// an integer model (q+1 modulo 2**WIDTH when enabled).
`timescale 1ns/1ps
module tb_sync_counter;
  import holdoff_pkg::*;
  localparam int unsigned W = HOLD_CODE_WIDTH;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] q;
  int unsigned model = 0;
  int checks = 0, failures = 0;
  int wraps = 0;

  sync_counter dut (.clk(clk), .rst_n(rst_n), .en(en), .q(q));

  always #1 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== W'(model)) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d", what, q, model);
    end
  endtask

  initial begin
    #0.5 check("reset");
    #0.2 rst_n = 1'b1; en = 1'b1;
    // straight count through one full wrap
    for (int n = 0; n < (1 << W) + 3; n++) begin
      @(posedge clk); #0.1;
      model = (model + 1) % (1 << W);
      if (model == 0) wraps++;
      check("count");
    end
    // random enable and occasional asynchronous clear
    for (int n = 0; n < 600; n++) begin
      @(negedge clk) en = (($urandom % 4) != 0);
      @(posedge clk); #0.1;
      if (en) model = (model + 1) % (1 << W);
      check("enable");
      if (($urandom % 50) == 0) begin
        #0.2 rst_n = 1'b0;
        #0.1 model = 0; check("async clear");
        #0.2 rst_n = 1'b1;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
