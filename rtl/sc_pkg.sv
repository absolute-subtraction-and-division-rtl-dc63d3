// sc_pkg: constants and helper functions shared by the stochastic-computing
// (SC) circuits.
//
// A stochastic bitstream of length 2^K encodes a number by the fraction of
// 1s it holds. Every circuit here is sized by K, the width of its
// pseudo-random number source, so a stream is 2^K clock cycles long and each
// circuit emits one output bit per cycle.
//
// leap_steps() gives the default number of LFSR shifts per clock (see lfsr).
// lfsr_taps() gives the feedback mask of a maximal-length Fibonacci LFSR
// for widths 3..16. The tap sets are the usual published maximal-length
// polynomials; the alternate set is the reciprocal polynomial (tap t moved
// to n-t), which is maximal-length too and runs a different sequence. Which
// polynomial to use is not fixed by the method; this choice is the design's
// own. Bit i of the mask stands for tap i+1; bit K-1 (the MSB) is always set.
package sc_pkg;

  // Default stream-length exponent: 1024-bit streams.
  localparam int unsigned DEFAULT_K = 10;

  localparam int unsigned MIN_K = 3;
  localparam int unsigned MAX_K = 16;

  function automatic int unsigned gcd(input int unsigned a, input int unsigned b);
    int unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Number of LFSR shifts per clock for a leap-forward LFSR: the largest
  // s <= k that is coprime with the period 2^k-1, so that the sequence of
  // clock-to-clock states still visits every non-zero value once per period
  // (k itself except for k = 6 and 12). With about k shifts per clock,
  // consecutive k-bit random numbers share no bits.
  function automatic int unsigned leap_steps(input int unsigned k);
    for (int unsigned s = k; s > 1; s--)
      if (gcd(s, (1 << k) - 1) == 1) return s;
    return 1;
  endfunction

  // Feedback mask, bit (t-1) set for each tap t of the polynomial.
  function automatic logic [MAX_K-1:0] lfsr_taps(input int unsigned k, input bit alt);
    logic [MAX_K-1:0] m;
    logic [MAX_K-1:0] r;
    m = '0;
    unique case (k)
      3:  m = 16'b0000_0000_0000_0110; // 3,2
      4:  m = 16'b0000_0000_0000_1100; // 4,3
      5:  m = 16'b0000_0000_0001_0100; // 5,3
      6:  m = 16'b0000_0000_0011_0000; // 6,5
      7:  m = 16'b0000_0000_0110_0000; // 7,6
      8:  m = 16'b0000_0000_1011_1000; // 8,6,5,4
      9:  m = 16'b0000_0001_0001_0000; // 9,5
      10: m = 16'b0000_0010_0100_0000; // 10,7
      11: m = 16'b0000_0101_0000_0000; // 11,9
      12: m = 16'b0000_1000_0010_1001; // 12,6,4,1
      13: m = 16'b0001_0000_0000_1101; // 13,4,3,1
      14: m = 16'b0010_0000_0001_0101; // 14,5,3,1
      15: m = 16'b0110_0000_0000_0000; // 15,14
      16: m = 16'b1101_0000_0000_1000; // 16,15,13,4
      default: m = '0;
    endcase
    if (!alt) return m;
    // Reciprocal polynomial: tap t (t < k) becomes tap k-t; tap k stays.
    r = '0;
    r[k-1] = 1'b1;
    for (int unsigned t = 1; t < k; t++)
      if (m[t-1]) r[k-t-1] = 1'b1;
    return r;
  endfunction

endpackage
