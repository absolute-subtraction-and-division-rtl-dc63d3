// basub: UCASub-based bipolar scaled absolute subtractor. For bipolar
// streams (value 2P-1) it produces 2P_Z-1 = 0.5|(2P_X-1) - (2P_Y-1)|.
//
// The UCASub gives 0.5|P_X-P_Y|, which is at most 0.5, so adding a stream of
// probability 0.5 with the nonscaled adder gives P_Z = 0.5|P_X-P_Y| + 0.5,
// which in bipolar form is the scaled absolute difference. The structure
// (UCASub followed by NSAdd with a 0.5 input) is the method's; the 0.5
// stream comes in on the half port and must be uncorrelated with x, y and
// the UCASub's own LFSR (the top makes it with its own generator).
//
// Interface: clear before the first bit of a stream; one bit per clock while
// en is high; z is combinational in the same cycle.
module basub
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

  logic d;   // 0.5|P_X - P_Y|

  ucasub #(.K(K), .SEED(SEED), .ALT_POLY(ALT_POLY)) u_ucasub (
    .clk, .rst_n, .clear, .en, .x, .y, .z(d)
  );

  nsadd u_nsadd (
    .clk, .rst_n, .clear, .en, .x(d), .y(half), .z
  );

endmodule
