// udiv: UCASub-based unipolar divider, P_Z = P_Y / P_X for 0 <= P_Y <= P_X,
// P_X > 0 (Y is the dividend, X the divisor).
//
// A JK flip-flop gives P_J / (P_J + P_K). J is Y AND a 0.5 stream, so
// P_J = 0.5 P_Y; K is the UCASub of X and Y, so P_K = 0.5(P_X - P_Y) when
// P_Y <= P_X. Then P_J + P_K = 0.5 P_X and P_Z = P_Y / P_X. This structure
// is the method's. The 0.5 stream comes in on the half port and must be
// uncorrelated with x and y.
//
// Interface: clear before the first bit of a stream (it also clears the
// flip-flop, this design's choice); one bit per clock while en is high; z is
// the registered flip-flop output.
module udiv
  import sc_pkg::*;
#(
  parameter int unsigned  K        = DEFAULT_K,
  parameter logic [K-1:0] SEED     = K'(1),
  parameter bit           ALT_POLY = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic x,
  input  logic y,
  input  logic half,
  output logic z
);

  logic j, k;

  assign j = y & half;

  ucasub #(.K(K), .SEED(SEED), .ALT_POLY(ALT_POLY)) u_ucasub (
    .clk, .rst_n, .clear, .en, .x, .y, .z(k)
  );

  jk_ff u_jk (
    .clk, .rst_n, .clear, .en, .j, .k, .q(z)
  );

endmodule
