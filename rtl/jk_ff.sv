// jk_ff: JK flip-flop, used as a stochastic divider. With uncorrelated
// streams on J and K the output Q is 1 with probability P_J / (P_J + P_K):
// from Q=0 it rises whenever J is 1 (set or toggle) and from Q=1 it falls
// whenever K is 1 (reset or toggle), so the 0->1 chance P_J and the 1->0
// chance P_K balance at that ratio.
//
// Behaviour: J K = 00 hold, 10 set, 01 reset, 11 toggle, on each enabled
// clock edge. Q is registered, so the quotient bit of a cycle reflects the
// inputs of earlier cycles. The reset value 0 and the clear input are this
// design's choices.
module jk_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic j,
  input  logic k,
  output logic q
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) q <= 1'b0;
    else if (en) begin
      unique case ({j, k})
        2'b00: q <= q;
        2'b10: q <= 1'b1;
        2'b01: q <= 1'b0;
        2'b11: q <= ~q;
      endcase
    end
  end

endmodule
