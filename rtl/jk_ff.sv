// jk_ff: J-K flip-flop with asynchronous active-low clear.
//
// The synchronous counter is built from this cell. On the rising edge of clk the
// output holds (J=0,K=0), clears (J=0,K=1), sets (J=1,K=0) or toggles (J=1,K=1).
// While rst_n is low, q is forced to 0 at once, independent of the clock.
// The J-K cell and its use as a toggle stage follow the reference counter; the
// rising-edge polarity and the active-low clear are this design's choices.
module jk_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic j,
  input  logic k,
  output logic q,
  output logic q_b
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else begin
      unique case ({j, k})
        2'b00: q <= q;
        2'b01: q <= 1'b0;
        2'b10: q <= 1'b1;
        2'b11: q <= ~q;
      endcase
    end
  end

  assign q_b = ~q;
endmodule
