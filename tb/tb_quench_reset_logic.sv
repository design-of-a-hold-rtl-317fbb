// tb_quench_reset_logic: checks the four compo/rn combinations against the
// control table: qp low only while compo is high and the code is not reached,
// counter enabled in the same phase, counter cleared while compo is low, NMOS
// gate equal to rn, node_a the inverse of rn.
`timescale 1ns/1ps
module tb_quench_reset_logic;
  logic compo, rn;
  logic qp, node_a, cnt_en, cnt_rst_n, nmos_gate;
  int checks = 0, failures = 0;

  quench_reset_logic dut (.compo(compo), .rn(rn), .qp(qp), .node_a(node_a),
                          .cnt_en(cnt_en), .cnt_rst_n(cnt_rst_n), .nmos_gate(nmos_gate));

  task automatic expect5(logic e_qp, logic e_na, logic e_en, logic e_rst, logic e_nm);
    checks++;
    if ({qp, node_a, cnt_en, cnt_rst_n, nmos_gate} !== {e_qp, e_na, e_en, e_rst, e_nm}) begin
      failures++;
      $display("FAIL compo=%b rn=%b got qp=%b node_a=%b en=%b rst_n=%b nmos=%b", compo, rn,
               qp, node_a, cnt_en, cnt_rst_n, nmos_gate);
    end
  endtask

  initial begin
    repeat (4) begin
      compo = 0; rn = 0; #1 expect5(1, 1, 0, 0, 0);   // armed
      compo = 1; rn = 0; #1 expect5(0, 1, 1, 1, 0);   // hold-off
      compo = 1; rn = 1; #1 expect5(1, 0, 0, 1, 1);   // reset
      compo = 0; rn = 1; #1 expect5(1, 0, 0, 0, 1);   // counter clearing
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
