// sync_counter: WIDTH-bit synchronous binary up-counter made of J-K flip-flops.
//
// Every stage is clocked by the same clk and has its J and K inputs tied
// together, so each stage is a toggle stage. Stage 0 toggles whenever counting
// is enabled; stage i toggles when counting is enabled and all lower outputs
// Q0..Q(i-1) are 1, which the toggle chain t[] forms one AND at a time. The
// count therefore runs 0, 1, 2, ... 2**WIDTH-1 and wraps to 0.
//
// Interface and timing: q changes on the rising edge of clk when en is high and
// holds otherwise. rst_n low clears q asynchronously (in the hold-off circuit it
// is the comparator output, so the counter sits at 0 between avalanches).
//
// The J-K toggle structure and the width follow the reference counter. There
// the first stage's J/K are tied high and counting is stopped by blocking the
// clock; here the clock runs freely and the same condition enters as en on the
// first stage and the chain, which counts identically without a gated clock.
module sync_counter
  import holdoff_pkg::*;
#(
  parameter int unsigned WIDTH = HOLD_CODE_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] t;      // J = K input of each stage

  assign t[0] = en;
  for (genvar i = 1; i < WIDTH; i++) begin : g_chain
    assign t[i] = t[i-1] & q[i-1];
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    jk_ff u_ff (
      .clk  (clk),
      .rst_n(rst_n),
      .j    (t[i]),
      .k    (t[i]),
      .q    (q[i]),
      .q_b  ()
    );
  end
endmodule
