// nsadd: nonscaled stochastic adder. For two uncorrelated unipolar streams
// with P_X + P_Y <= 1 the output stream encodes P_X + P_Y without the usual
// factor 0.5 of a multiplexer adder.
//
// Two states follow the method's state diagram. In S0 nothing is saved; in
// S1 one 1 is saved. When both inputs are 1, one 1 is output and the other
// is saved (go to S1). When both are 0, the saved 1 is output if there is
// one (go back to S0), otherwise 0 is output. When the inputs differ, 1 is
// output and the state is kept. Hence z = x | y | saved. Only one 1 can be
// held; a further 1-1 pair in S1 loses one 1, as in the diagram.
//
// Interface: Mealy output, z is combinational from the state and the current
// inputs. en gates the state update; clear and the synchronous active-low
// reset return to S0 (this design's choice, the method gives no reset).
module nsadd (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic x,
  input  logic y,
  output logic z
);

  typedef enum logic {S0 = 1'b0, S1 = 1'b1} nsadd_state_e;

  nsadd_state_e state, state_next;

  always_comb begin
    state_next = state;
    if (x && y)        state_next = S1;
    else if (!x && !y) state_next = S0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) state <= S0;
    else if (en)         state <= state_next;
  end

  assign z = x || y || (state == S1);

endmodule
