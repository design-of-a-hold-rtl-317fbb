// tb_code_match: exhaustive test of the count/code equality detector over all
// 2**WIDTH x 2**WIDTH input pairs at the default width.
`timescale 1ns/1ps
module tb_code_match;
  import holdoff_pkg::*;
  localparam int unsigned W = HOLD_CODE_WIDTH;
  logic [W-1:0] count, code;
  logic rn;
  int checks = 0, failures = 0, n_match = 0;

  code_match dut (.count(count), .code(code), .rn(rn));

  initial begin
    for (int a = 0; a < (1 << W); a++) begin
      for (int b = 0; b < (1 << W); b++) begin
        count = W'(a); code = W'(b);
        #1;
        checks++;
        if (rn !== (a == b)) begin
          failures++;
          $display("FAIL count=%0d code=%0d rn=%b", a, b, rn);
        end
        if (rn) n_match++;
      end
    end
    checks++;
    if (n_match != (1 << W)) begin failures++; $display("FAIL n_match=%0d", n_match); end
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
