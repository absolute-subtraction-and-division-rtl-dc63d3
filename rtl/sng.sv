// sng: stochastic number generator. Turns a K-bit binary number n into a
// bitstream whose probability of a 1 is about n/2^K.
//
// Each cycle the number (comparator input A) is compared with the current
// value of a private K-bit LFSR (input B); the output bit is A > B. Over one
// full LFSR period of 2^K-1 cycles the LFSR visits 1..2^K-1 once each, so the
// stream holds exactly max(n-1, 0) ones in that period. This is the
// comparator-and-LFSR generator of the method; seed and polynomial are
// parameters of this design.
//
// Interface: bit_o is combinational from the registered LFSR state and n, one
// bit per clock; en advances the LFSR.
module sng
  import sc_pkg::*;
#(
  parameter int unsigned  K        = DEFAULT_K,
  parameter logic [K-1:0] SEED     = K'(1),
  parameter bit           ALT_POLY = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [K-1:0] n,
  output logic         bit_o
);

  logic [K-1:0] rnd;

  lfsr #(.K(K), .SEED(SEED), .ALT_POLY(ALT_POLY)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .q    (rnd)
  );

  assign bit_o = n > rnd;

endmodule
