// tb_jk_ff: self-checking test of the J-K flip-flop.
// Drives random J/K sequences and occasional asynchronous clears, and compares
// q and q_b with a reference written from the J-K characteristic equation
// Q+ = J&~Q | ~K&Q.
`timescale 1ns/1ps
module tb_jk_ff;
  logic clk = 1'b0, rst_n = 1'b0, j = 1'b0, k = 1'b0;
  logic q, q_b;
  logic ref_q;
  int checks = 0, failures = 0;

  jk_ff dut (.clk(clk), .rst_n(rst_n), .j(j), .k(k), .q(q), .q_b(q_b));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== ref_q || q_b !== ~ref_q) begin
      failures++;
      $display("FAIL %s: j=%b k=%b q=%b q_b=%b expected %b", what, j, k, q, q_b, ref_q);
    end
  endtask

  initial begin
    #1 ref_q = 1'b0; check("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      j = 1'($urandom); k = 1'($urandom);
      @(posedge clk);
      ref_q = (j & ~ref_q) | (~k & ref_q);
      #1 check("edge");
      if (($urandom % 17) == 0) begin
        #1 rst_n = 1'b0;
        #1 ref_q = 1'b0; check("async clear");
        #1 rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
