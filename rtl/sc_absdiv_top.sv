// sc_absdiv_top: the four stochastic circuits side by side, fed from shared
// stochastic number generators, one stream of 2^K bits per start.
//
// Binary inputs px and py (value * 2^K) are turned into uncorrelated
// bitstreams X and Y by two generators (comparator against an LFSR). Three
// more generators with n = 2^(K-1) make the 0.5 streams the circuits need.
// Every LFSR in the design has its own seed or polynomial. The streams then
// drive, in parallel:
//   z_uasub  UCASub                      P_Z = 0.5|P_X - P_Y|
//   z_basub  bipolar scaled abs. sub.    2P_Z-1 = 0.5|(2P_X-1)-(2P_Y-1)|
//   z_udiv   unipolar divider            P_Z = P_Y / P_X
//   z_bdiv   bipolar divider             2P_Z-1 = (2P_Y-1)/(2P_X-1)
// The circuits and the generator are the method's; the sequencing below,
// the seeds and the sharing of the 0.5 streams are this design's choices.
//
// Timing: a start pulse while idle clears the counters and flip-flops of all
// circuits in that cycle (busy rises the next cycle). Then for 2^K cycles
// busy and bit_valid are high and every z output carries one stream bit per
// cycle; last marks the final bit. The user counts the 1s of each output
// over the bit_valid cycles to read the result back as a binary number.
// px and py should be held stable for the whole stream.
module sc_absdiv_top
  import sc_pkg::*;
#(
  parameter int unsigned K = DEFAULT_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] px,
  input  logic [K-1:0] py,
  output logic         busy,
  output logic         bit_valid,
  output logic         last,
  output logic         z_uasub,
  output logic         z_basub,
  output logic         z_udiv,
  output logic         z_bdiv
);

  localparam logic [K-1:0] HALF = K'(1) << (K-1);

  // Seeds: distinct odd constants cut to K bits (odd, hence non-zero).
  localparam logic [K-1:0] SEED_X  = K'(16'h0001);
  localparam logic [K-1:0] SEED_Y  = K'(16'h5A5B);
  localparam logic [K-1:0] SEED_H0 = K'(16'h3C3D);
  localparam logic [K-1:0] SEED_H1 = K'(16'h0F11);
  localparam logic [K-1:0] SEED_H2 = K'(16'h7E95);
  localparam logic [K-1:0] SEED_U0 = K'(16'h2B67);
  localparam logic [K-1:0] SEED_U1 = K'(16'h4D2F);
  localparam logic [K-1:0] SEED_U2 = K'(16'h6173);
  localparam logic [K-1:0] SEED_U3 = K'(16'h1ED9);

  // ---------------------------------------------------------------- sequencer
  logic         clear;
  logic [K-1:0] bit_cnt;

  assign clear     = start && !busy;
  assign bit_valid = busy;
  assign last      = busy && (bit_cnt == '1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      bit_cnt <= '0;
    end else if (clear) begin
      busy    <= 1'b1;
      bit_cnt <= '0;
    end else if (busy) begin
      bit_cnt <= bit_cnt + 1'b1;
      if (last) busy <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- generators
  logic       sx, sy;
  logic [2:0] half;

  sng #(.K(K), .SEED(SEED_X),  .ALT_POLY(1'b0)) u_sng_x  (.clk, .rst_n, .en(1'b1), .n(px),   .bit_o(sx));
  sng #(.K(K), .SEED(SEED_Y),  .ALT_POLY(1'b1)) u_sng_y  (.clk, .rst_n, .en(1'b1), .n(py),   .bit_o(sy));
  sng #(.K(K), .SEED(SEED_H0), .ALT_POLY(1'b1)) u_sng_h0 (.clk, .rst_n, .en(1'b1), .n(HALF), .bit_o(half[0]));
  sng #(.K(K), .SEED(SEED_H1), .ALT_POLY(1'b0)) u_sng_h1 (.clk, .rst_n, .en(1'b1), .n(HALF), .bit_o(half[1]));
  sng #(.K(K), .SEED(SEED_H2), .ALT_POLY(1'b1)) u_sng_h2 (.clk, .rst_n, .en(1'b1), .n(HALF), .bit_o(half[2]));

  // ---------------------------------------------------------------- circuits
  ucasub #(.K(K), .SEED(SEED_U0), .ALT_POLY(1'b1)) u_uasub (
    .clk, .rst_n, .clear, .en(busy), .x(sx), .y(sy), .z(z_uasub)
  );

  basub #(.K(K), .SEED(SEED_U1), .ALT_POLY(1'b1)) u_basub (
    .clk, .rst_n, .clear, .en(busy), .x(sx), .y(sy), .half(half[0]), .z(z_basub)
  );

  udiv #(.K(K), .SEED(SEED_U2), .ALT_POLY(1'b1)) u_udiv (
    .clk, .rst_n, .clear, .en(busy), .x(sx), .y(sy), .half(half[0]), .z(z_udiv)
  );

  bdiv #(.K(K), .SEED(SEED_U3)) u_bdiv (
    .clk, .rst_n, .clear, .en(busy), .x(sx), .y(sy), .half(half), .z(z_bdiv)
  );

  // A new start is ignored while a stream is running.
  a_no_clear_while_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !clear);

endmodule
