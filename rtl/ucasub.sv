// ucasub: counter-based unipolar scaled absolute subtractor (UCASub).
// From two uncorrelated unipolar bitstreams X and Y of length 2^K it
// produces a stream Z with P_Z = 0.5 |P_X - P_Y|.
//
// How it works: a (K+1)-bit up/down counter starts each stream at 2^K and
// counts up on X=1,Y=0 and down on X=0,Y=1, so after t bits it holds
// 2^K + d with d the running difference of the two streams. Its MSB says
// the sign of d; XNOR-ing the MSB with each of the K lower bits gives d when
// d >= 0 and -d-1 when d < 0, i.e. about |d|. A comparator emits a 1 when
// that K-bit magnitude is greater than a K-bit LFSR number, so the chance of
// a 1 at bit t is about |d_t| / 2^K. Since |d_t| grows like t|P_X-P_Y|, the
// average over the 2^K bits of the stream is 0.5|P_X-P_Y|.
//
// The counter, XNOR gates, comparator and LFSR, the counter width K+1 and its
// start value 2^K are those of the method. This design's own choices: the
// clear input that reloads 2^K at the start of each stream, the comparator
// reading the registered count (the value before this cycle's update), and
// saturation at both ends of the counter, which a single stream of 2^K bits
// never reaches but which keeps longer runs from wrapping.
//
// Interface: clear (one cycle, before the first bit) reloads the counter;
// while en is high one (x, y) pair is consumed per clock and z is valid in
// the same cycle (combinational from registered state and the LFSR).
module ucasub
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
  output logic z
);

  localparam logic [K:0] CNT_INIT = (K+1)'(1) << K;   // 2^K
  localparam logic [K:0] CNT_MAX  = '1;

  logic [K:0]   cnt;
  logic [K-1:0] mag;   // XNOR of the MSB with the K lower bits
  logic [K-1:0] rnd;

  lfsr #(.K(K), .SEED(SEED), .ALT_POLY(ALT_POLY)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .q    (rnd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cnt <= CNT_INIT;
    end else if (en) begin
      if (x && !y && cnt != CNT_MAX)  cnt <= cnt + 1'b1;
      else if (!x && y && cnt != '0)  cnt <= cnt - 1'b1;
    end
  end

  assign mag = ~({K{cnt[K]}} ^ cnt[K-1:0]);
  assign z   = mag > rnd;

endmodule
