// lfsr: K-bit maximal-length linear feedback shift register, the
// pseudo-random number source of every stochastic number generator and of
// the counter-based absolute subtractor.
//
// Fibonacci form: each shift moves the register towards the MSB and the new
// LSB is the XOR of the tapped bits (sc_pkg::lfsr_taps). ALT_POLY selects the
// reciprocal polynomial so that LFSRs in the same circuit need not run the
// same sequence.
//
// Leap-forward: each enabled clock applies STEPS shifts at once (an unrolled
// XOR network). With a single shift per clock consecutive numbers are
// nearly doubles of each other, so a comparator against them emits its 1s in
// runs; that bunching biases circuits that depend on the order of events,
// such as the JK flip-flop dividers. The default STEPS (sc_pkg::leap_steps,
// K for most widths) is coprime with 2^K-1, so the state still runs through
// every value 1..2^K-1 once per 2^K-1 clocks and is never zero. STEPS = 1
// gives the plain LFSR.
//
// Interface: q is the registered state, valid from the cycle after reset.
// A synchronous active-low reset loads SEED (which must be non-zero); en
// advances one leap per clock. The polynomial, seed, leap and reset are this
// design's choices; the method only asks for a k-bit LFSR giving one
// pseudo-random number per clock.
module lfsr
  import sc_pkg::*;
#(
  parameter int unsigned K        = DEFAULT_K,
  parameter logic [K-1:0] SEED    = K'(1),
  parameter bit          ALT_POLY = 1'b0,
  parameter int unsigned STEPS    = leap_steps(K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [K-1:0] q
);

  localparam logic [MAX_K-1:0] TAPS_FULL = lfsr_taps(K, ALT_POLY);
  localparam logic [K-1:0]     TAPS      = TAPS_FULL[K-1:0];

  initial begin
    assert (K >= MIN_K && K <= MAX_K) else $error("lfsr: K=%0d outside %0d..%0d", K, MIN_K, MAX_K);
    assert (SEED != '0) else $error("lfsr: SEED must be non-zero");
    assert (STEPS >= 1 && gcd(STEPS, (1 << K) - 1) == 1)
      else $error("lfsr: STEPS=%0d does not give the full period", STEPS);
  end

  // STEPS single shifts, unrolled.
  function automatic logic [K-1:0] leap(input logic [K-1:0] s);
    logic [K-1:0] v;
    v = s;
    for (int unsigned i = 0; i < STEPS; i++) v = {v[K-2:0], ^(v & TAPS)};
    return v;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= SEED;
    else if (en) q <= leap(q);
  end

endmodule
