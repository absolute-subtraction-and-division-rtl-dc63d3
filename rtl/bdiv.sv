// bdiv: UCASub-based bipolar divider, 2P_Z-1 = (2P_Y-1) / (2P_X-1) for
// |2P_X-1| > 0 and |2P_Y-1| <= |2P_X-1| (Y is the dividend, X the divisor).
//
// A JK flip-flop gives P_J / (P_J + P_K).
//   J: a multiplexer with a 0.5 select averages Y and X, 0.5(P_X+P_Y); a
//      UCASub against a second 0.5 stream gives P_J = 0.5|0.5(P_X+P_Y)-0.5|.
//   K: a UCASub of X and Y gives 0.5|P_X-P_Y|; AND with a third 0.5 stream
//      halves it, P_K = 0.25|P_X-P_Y|.
// For P_X > 0.5 this is P_Z = (P_X+P_Y-1)/(2P_X-1), for P_X < 0.5 it is
// (1-P_X-P_Y)/(1-2P_X); in both cases 2P_Z-1 = (2P_Y-1)/(2P_X-1).
// This structure is the method's. Its own choices here: the multiplexer
// takes Y when the select is 0; the three 0.5 streams are separate inputs
// (half[0] select, half[1] UCASub input, half[2] AND input) because they
// must be uncorrelated with each other; the two UCASubs use the two LFSR
// polynomials so that their random numbers differ.
//
// Interface: clear before the first bit of a stream; one bit per clock while
// en is high; z is the registered flip-flop output.
module bdiv
  import sc_pkg::*;
#(
  parameter int unsigned  K    = DEFAULT_K,
  parameter logic [K-1:0] SEED = K'(1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic       x,
  input  logic       y,
  input  logic [2:0] half,
  output logic       z
);

  logic m;       // 0.5(P_X + P_Y)
  logic j;       // 0.5|0.5(P_X+P_Y) - 0.5|
  logic d;       // 0.5|P_X - P_Y|
  logic k;       // 0.25|P_X - P_Y|

  assign m = half[0] ? x : y;

  ucasub #(.K(K), .SEED(SEED), .ALT_POLY(1'b0)) u_ucasub_j (
    .clk, .rst_n, .clear, .en, .x(m), .y(half[1]), .z(j)
  );

  ucasub #(.K(K), .SEED(SEED), .ALT_POLY(1'b1)) u_ucasub_k (
    .clk, .rst_n, .clear, .en, .x, .y, .z(d)
  );

  assign k = d & half[2];

  jk_ff u_jk (
    .clk, .rst_n, .clear, .en, .j, .k, .q(z)
  );

endmodule
