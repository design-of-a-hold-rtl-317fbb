// tb_comparator: sweeps the anode voltage across a few reference levels and
// checks that compo is high exactly when vin_p > vin_n and compo_b is its inverse.
`timescale 1ns/1ps
module tb_comparator;
  real vin_p, vin_n;
  logic compo, compo_b;
  int checks = 0, failures = 0;

  comparator dut (.vin_p(vin_p), .vin_n(vin_n), .compo(compo), .compo_b(compo_b));

  initial begin
    for (int r = 0; r < 4; r++) begin
      vin_n = 0.5 + 0.5 * r;
      for (int i = 0; i <= 70; i++) begin
        vin_p = 0.05 * i - 0.02;
        #1;
        checks++;
        if (compo !== (vin_p > vin_n) || compo_b !== ~compo) begin
          failures++;
          $display("FAIL vin_p=%f vin_n=%f compo=%b compo_b=%b", vin_p, vin_n, compo, compo_b);
        end
      end
    end
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
