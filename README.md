# Absolute subtraction and division on uncorrelated stochastic bitstreams

In stochastic computing (SC) a number in [0, 1] is carried by a bitstream:
the fraction of 1s in the stream is the value (unipolar format), or the
value is 2P-1 (bipolar format, range [-1, 1]). Multiplication is one AND
gate and scaled addition is one multiplexer, but two functions that image
processing needs, |x - y| and x / y, are awkward. The classic XOR trick for
|x - y| only works when the two streams are maximally correlated. The
classic divider (a counter in a feedback loop) is slow to settle. The
correlation is hard to keep through a larger system.

This RTL implements four circuits that work on *uncorrelated* streams. They
follow the method of "Absolute Subtraction and Division Circuits Using
Uncorrelated Random Bitstreams in Stochastic Computing". All four are built
around one new block, the counter-based unipolar scaled absolute
subtractor (UCASub):

| circuit | output | module |
|---|---|---|
| UCASub | P_Z = 0.5 \|P_X - P_Y\| | `ucasub` |
| bipolar scaled absolute subtractor | 2P_Z-1 = 0.5 \|(2P_X-1) - (2P_Y-1)\| | `basub` |
| unipolar divider | P_Z = P_Y / P_X (0 <= P_Y <= P_X) | `udiv` |
| bipolar divider | 2P_Z-1 = (2P_Y-1) / (2P_X-1) (\|2P_Y-1\| <= \|2P_X-1\|) | `bdiv` |

Every circuit takes one bit of each input stream per clock and gives one
output bit per clock. A stream is 2^K bits long. The default is K = 10, so
1024-bit streams.

## The UCASub: absolute difference from a running count

The UCASub has three parts: an up/down counter of K+1 bits, K XNOR gates
and a K-bit comparator fed by a K-bit LFSR.

1. **Running difference.** At the start of a stream the counter is loaded
   with 2^K. It counts up on a bit pair X=1, Y=0 and down on X=0, Y=1. It
   holds still when the bits are equal. After t bits it holds 2^K + d_t,
   where d_t is the number of 1s in X so far minus those in Y. Because
   P(X=1,Y=0) - P(X=0,Y=1) = P_X - P_Y for independent streams, d_t grows
   on average like t (P_X - P_Y).
2. **Magnitude.** The counter's MSB is the sign of d_t: it is 1 when
   d_t >= 0. XNOR-ing the MSB with each of the K lower bits passes the
   lower bits unchanged when d_t >= 0 and inverts them when d_t < 0. The
   result is d_t or -d_t - 1, which is |d_t| to within one count. No adder
   or negation is needed.
3. **Back to a stream.** The comparator outputs 1 when that magnitude is
   greater than the LFSR's number, so bit t is 1 with probability of about
   |d_t| / 2^K.

Averaged over the stream, the chance of a 1 is about (1/2^K) times the sum
of t|P_X - P_Y| / 2^K over t = 0..2^K-1. That is 0.5 |P_X - P_Y|. The factor
0.5 comes from the ramp: the output starts near 0 and ends near |P_X - P_Y|.
Two properties follow, and they matter for everything built on top of it.

* **Tied to the stream length.** The counter start value 2^K and the LFSR
  width fix the stream length at exactly 2^K bits. A longer or shorter
  stream gives a different scale factor. Changing the stream length means
  changing K.
* **Not stationary.** Within one stream the output's rate of 1s changes
  over time. Circuits downstream see a rising rate, not a Bernoulli
  stream.

Over a stream of 2^K bits the counter stays inside 0..2^(K+1)-1. The
comparator reads the count as it stood before the current bit. The counter
also saturates at both ends, so a stream that runs too long does not wrap.

## Circuits built on the UCASub

**Nonscaled adder (`nsadd`).** This is a two-state machine that adds two
streams without the factor 0.5 of a multiplexer adder. It assumes the sum is
at most 1. On a 1-1 input pair it outputs one 1 and saves the other (state
S1). On a 0-0 pair it outputs the saved 1 if there is one (back to S0), and
otherwise a 0. On unequal inputs it outputs 1 and keeps its state. The
output is `x | y | saved`. Only one 1 can be saved.

**Bipolar scaled absolute subtractor (`basub`).** The UCASub output is at
most 0.5. Adding a 0.5 stream with the NSAdd gives
P_Z = 0.5 |P_X - P_Y| + 0.5. In bipolar terms that is
0.5 |(2P_X-1) - (2P_Y-1)|.

**JK flip-flop as divider (`jk_ff`).** With J and K streams, Q rises at the
next J from 0 and falls at the next K from 1. So Q is 1 for a fraction
P_J / (P_J + P_K) of the time.

**Unipolar divider (`udiv`).** J = Y AND 0.5, so P_J = 0.5 P_Y. K is the
UCASub of X and Y, so P_K = 0.5 (P_X - P_Y) when P_Y <= P_X. Their sum is
0.5 P_X, which gives P_Z = P_Y / P_X.

**Bipolar divider (`bdiv`).** A multiplexer with a 0.5 select averages X
and Y. A UCASub compares that average with 0.5, giving
P_J = 0.5 |0.5 (P_X + P_Y) - 0.5|. A second UCASub of X and Y, ANDed with
0.5, gives P_K = 0.25 |P_X - P_Y|. For P_X > 0.5 the flip-flop gives
(P_X + P_Y - 1) / (2P_X - 1). For P_X < 0.5 it gives
(1 - P_X - P_Y) / (1 - 2P_X). In both cases
2P_Z - 1 = (2P_Y - 1) / (2P_X - 1). The input must satisfy
|2P_Y - 1| <= |2P_X - 1|: for P_X > 0.5 that is P_Y <= P_X and
P_X + P_Y >= 1, and mirrored for P_X < 0.5.

All the 0.5 streams are inputs of these modules. They must be uncorrelated
with X, Y and with each other. In the bipolar divider the multiplexer's
output depends on its select, so the select stream cannot also be the 0.5
stream the UCASub compares against. `bdiv` therefore takes three separate
0.5 streams: `half[0]` is the select, `half[1]` goes to the UCASub and
`half[2]` goes to the AND gate.

## Random numbers: SNG and leap-forward LFSR

A stochastic number generator (`sng`) compares a K-bit binary number n with
a K-bit LFSR each clock and outputs `n > lfsr`. Over one LFSR period of
2^K-1 clocks it gives exactly max(n-1, 0) ones.

The `lfsr` is a Fibonacci XOR LFSR with a maximal-length polynomial from a
table for K = 3..16 (`sc_pkg::lfsr_taps`). `ALT_POLY` selects the reciprocal
polynomial. **This design steps the LFSR STEPS times per clock**
(leap-forward; an unrolled XOR network). The default STEPS is K, or for
K = 6 and 12 the largest value below K that is coprime with 2^K-1
(`sc_pkg::leap_steps`). The state still visits every non-zero value once
per 2^K-1 clocks, but consecutive numbers share no bits.

With one shift per clock, each number is about double the previous one.
Comparator outputs then come in runs of 1s. The JK-flip-flop dividers are
sensitive to the order of J and K events, and this bunching made them
clearly less accurate: on the test grid of `tb_bdiv` the bipolar divider's
MSE was 0.070 with single steps and 0.029 with the leap. Set `STEPS = 1`
for the plain LFSR.

Every LFSR in a circuit must run a different sequence. The top gives each
one its own seed and alternates the two polynomials.

## Top level: `sc_absdiv_top`

The top holds two SNGs for X and Y (from the binary inputs `px`, `py`),
three SNGs with n = 2^(K-1) for the 0.5 streams, and the four circuits side
by side on the same X and Y streams.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | begin a stream (ignored while `busy`) |
| `px`, `py` | in | K | P_X·2^K and P_Y·2^K; hold them for the whole stream |
| `busy`, `bit_valid` | out | 1 | a stream is running; the z outputs are stream bits |
| `last` | out | 1 | last of the 2^K bits |
| `z_uasub`, `z_basub`, `z_udiv`, `z_bdiv` | out | 1 | output streams |

Timing: in the cycle where `start` is seen while idle, all counters, NSAdd
states and JK flip-flops are cleared. For the next 2^K cycles `bit_valid` is
high and each z output carries one bit per cycle. To read a result, count
the 1s over those cycles and divide by 2^K; for bipolar outputs, take
2·count/2^K - 1. The top does not convert the output streams back to binary.

## Accuracy measured with this RTL

`tb_accuracy` repeats the evaluation experiments. It uses 200 random pairs
per stream length where the original used 1000, and 60 random P_Y per P_X.
The numbers below are one run; the reported values are read from the
original figures and tables.

| MSE at 1024-bit streams | this RTL | reported |
|---|---|---|
| UCASub, per P_X with random P_Y, ×10^-2 | 0.009 – 0.021 | 0.005 – 0.008 |
| bipolar absolute subtractor | 0.0074 | about 0.002 |
| unipolar divider | 0.0043 | about 0.007 |
| bipolar divider | 0.022 | about 0.006 |

At 256 bits, the bipolar subtractor's per-P_X MSE is 0.008 – 0.033 here,
against 0.0014 – 0.0142 reported. All errors fall steadily with stream
length (0.21 / 0.12 / 1.08 at 8 bits).

`tb_sweeps` drives the top at its defaults along input sweeps in steps of
0.01, one stream per point. The mean squared error per curve is:

| curve | MSE |
|---|---|
| UCASub, P_Y = 0.3 / 0.5 / 0.7 / 1.0, P_X swept | 0.0001 or less each |
| bipolar absolute subtractor, same sweeps | 0.006 / 0.003 / 0.005 / 0.023 |
| unipolar divider, P_X = 0.3 / 0.5 / 0.7 / 1.0, P_Y swept | 0.003 / 0.003 / 0.002 / 0.002 |
| bipolar divider, P_X = 0 / 0.25 / 0.75 / 1.0, P_Y swept | 0.010 / 0.026 / 0.007 / 0.008 |

Known causes of the differences:

* **Bipolar subtractor.** The NSAdd can save only one 1. The UCASub output
  rises over the stream, so late in the stream 1-1 pairs are frequent and
  the extra 1s are lost. For large |P_X - P_Y| this biases the bipolar
  result low by about |P_X - P_Y|^2 / 3, up to -0.33 at |P_X - P_Y| = 1.
* **Dividers.** Both the J and K streams start near rate 0 (UCASub ramp).
  The flip-flop starts each stream at Q = 0, and with few events per stream
  the first part of the stream is biased toward 0.
* **Sources and sample sets.** The original experiments' random sources and
  sampled input ranges are not known. Here, the divider inputs are limited
  to P_X >= 0.1 (unipolar) and |2P_X - 1| >= 0.2 (bipolar).

## Design choices not fixed by the method

* LFSR polynomials, seeds, the leap-forward stepping, and how the 0.5
  streams are generated.
* The `clear` input: at each stream start it reloads the UCASub counter
  with 2^K, puts the NSAdd in S0 and sets the JK flip-flop to Q = 0.
* The UCASub counter saturates and reads the count before the current bit.
* Multiplexer input order in `bdiv` (Y on select 0). Either order gives the
  same average.
* The two UCASubs in `bdiv` use different LFSR polynomials.
* The stream sequencer of the top (`start`/`busy`/`bit_valid`/`last`).
* The NSAdd has only the two states of the original state diagram, although
  the prose there speaks of saving "1s".

The two comparison designs (an FSM-based bipolar absolute subtractor and
the counter-feedback "ADDIE" dividers) are not included. Nor is the area,
power and delay evaluation in a 40 nm library.

## Files

| file | contents |
|---|---|
| `rtl/sc_pkg.sv` | default K, LFSR tap table, leap-step function |
| `rtl/lfsr.sv` | leap-forward maximal-length LFSR |
| `rtl/sng.sv` | stochastic number generator |
| `rtl/ucasub.sv` | counter-based unipolar scaled absolute subtractor |
| `rtl/nsadd.sv` | nonscaled adder (two-state FSM) |
| `rtl/jk_ff.sv` | JK flip-flop |
| `rtl/basub.sv`, `rtl/udiv.sv`, `rtl/bdiv.sv` | the three derived circuits |
| `rtl/sc_absdiv_top.sv` | generators, sequencer and the four circuits |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_accuracy.sv`, `tb/acc_sweep.sv` | MSE sweeps over stream length and P_X |
| `tb/tb_sweeps.sv` | the top along input sweeps, per-curve error |

Parameters: `K` (stream length 2^K, 3..16, default 10) on every
stream-processing module; `SEED` and `ALT_POLY` for the internal LFSRs;
`STEPS` on `lfsr`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/sc_pkg.sv \
    tb/tb_sc_absdiv_top.sv --top-module tb_sc_absdiv_top -Mdir obj
./obj/Vtb_sc_absdiv_top
```

Replace the testbench name to run another one. `tb_sc_absdiv_top` runs the
top at its default parameters (K = 10). It sends twelve 1024-bit streams,
checks the stream length and each output against the ideal function, and
counts these mechanisms:

* counter reload;
* counter above and below its start value, i.e. both branches of the XNOR
  magnitude;
* the NSAdd saving a 1;
* the JK flip-flop toggling;
* an ignored start.

The block testbenches check `lfsr`, `sng`, `ucasub`, `nsadd` and `jk_ff`
cycle by cycle against reference models. They check the derived circuits by
the statistics of their output streams. The tolerances reflect one 2^K-bit
stream of these circuits, so they are loose for the dividers (±0.2 on the
unipolar and ±0.6 on the bipolar quotient per point, plus an MSE bound).
`tb_accuracy` runs in about ten seconds, `tb_sweeps` in a few.
