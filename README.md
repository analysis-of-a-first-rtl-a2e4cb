# First-order multilevel quantized DPLL

An all-digital phase-locked loop that locks a train of reference pulses to the
rising edges of a square-wave input. Its distinguishing idea is the detector:
instead of a phase comparator with a non-linear characteristic, it measures
the **time** between the input edge and the reference pulse by counting pulses
of a fast clock, so its output is proportional to the timing error. That
count, scaled by a constant, is subtracted directly from the length of the
oscillator's next period. The whole loop is then described by one linear
first-order difference equation. Whether it locks, how fast it locks, the
error it keeps under a frequency offset, and the range of input frequencies it
can follow can all be written in closed form.

The RTL is small: three blocks and a top level, about 200 lines of
synthesizable SystemVerilog.

```
           +---------------------+  a(k)  +-----------------+
 s(t) ---->| timing error        |------->| loop filter     |
           | detector (ted)      |        | c(k) = K a(k)   |
      +--->|  counts 2L*f0 pulses|        | (loop_filter)   |
      |    +---------------------+        +--------+--------+
      |            ^ ted_ce (2L*f0)                | c(k)
      |                                            v
      |                                   +-----------------+
      +-----------------------------------|  DCO (dco)      |<--- dco_ce (N*f0)
                 r(t)                     |  period N - c   |
                                          +-----------------+
```

## The loop equation

Three numbers define the loop:

| symbol | meaning | default |
|---|---|---|
| N | DCO input clock pulses per nominal period T0 (the DCO input clock runs at N*f0) | 100 |
| L | detector quantizing levels over half a nominal period, T0/2 (the detector counting clock runs at 2L*f0) | 50 |
| K | gain of the first-order loop filter | 1 |

Let the input have period Ti, the DCO nominal period be T0 = 1/f0, and
e(k) = (time of the k-th reference pulse) - (time of the k-th input edge).
Then, once per period:

* the detector returns a(k) = (2L/T0) e(k), rounded to an integer count;
* the filter returns c(k) = K a(k), in DCO input pulses (units of T0/N);
* the DCO makes its next period T(k+1) = T0 - c(k) (T0/N).

Eliminating a and c gives

    e(k+1) = (1 - 2LK/N) e(k) + (T0 - Ti)

Consequences, all reproduced by the end-to-end testbench:

* **Phase step** (Ti = T0): e(k) = (1 - 2LK/N)^k e(0). The loop locks for
  0 < LK/N < 1. For LK/N < 1/2 the error shrinks monotonically, for
  LK/N = 1/2 it is zero after one period (one-step locking), for
  1/2 < LK/N < 1 it changes sign every period while it shrinks, and for
  LK/N > 1 it grows.
* **Frequency step** (Ti != T0): the error settles at
  e_ss = N (T0 - Ti) / (2LK), a constant offset that lets the DCO run at the
  input frequency.
* **Lock range**: the loop can hold the input only while every error stays
  inside (-Ti/2, Ti/2), because the detector pairs each reference pulse with
  the nearest input edge. That gives
  1 - LK/N < fi/f0 < 1 + LK/N for LK/N <= 1/2 and
  LK/N < fi/f0 < 2 - LK/N for LK/N >= 1/2.
  The range is widest, 0.5 f0 to 1.5 f0, at LK/N = 1/2, the same setting
  that gives one-step locking. Outside it the loop slips cycles.

The defaults N = 100, L = 50, K = 1 are that optimum.

## The timing error detector (`rtl/ted.sv`)

This is the part worth understanding before changing anything.

A single flip-flop Q is toggled by every rising edge of the input and by
every reference pulse. Because the two kinds of event alternate while the loop
is locked, Q is high exactly between an input edge and its reference pulse,
whichever comes first. Two AND gates tell the two cases apart by the level of
the input during that interval:

* `LEAD = s & Q`: the input edge came first, so s is already high. The input
  leads the reference; e(k) > 0, and the DCO must shorten its period.
* `LAG = ~s & Q`: the reference pulse came first, so s is still low. The
  input lags; e(k) < 0, and the DCO must lengthen its period.

LEAD and LAG gate the counting clock (enable `ted_ce`, 2L*f0). Each gated
pulse is one quantizing level, T0/(2L). When Q falls, the block outputs
`a_k = LEAD count - LAG count` as a signed 16-bit word, with a one-cycle
`a_valid`, and clears both counters.

Details that matter:

* **Units.** The count is the error measured in counting-clock periods. So L
  is not a hardware constant of the detector: it is set by how fast `ted_ce`
  pulses relative to f0. The parameter `L` only sets the counter saturation
  (4L, twice the largest count inside the lock range).
* **Registered s.** The gates use the input as registered on the same edge
  as Q. Without this, the cycle in which the input rises and closes a lag
  interval would be lost, and lags would read one level short of leads.
* **Timing.** `a_valid` is high in the cycle after the event that closes the
  interval. When the input leads, that event is the reference pulse. When
  the input lags, it is the input edge, which comes *after* the DCO has
  already started its next period. The DCO is built for this (below).
* **Coincident events.** An input edge and a reference pulse in the same
  cycle give `a_k = 0`.
* **Out of lock.** If an error grows past half an input period, the input
  can fall while Q is high. Then both gates count in one interval and the
  pairing of edges and pulses breaks down. This is the cycle slipping that
  bounds the lock range; nothing in the block prevents it.

## Loop filter (`rtl/loop_filter.sv`)

First order means proportional: c(k) = K a(k), with one register stage.
Because a(k) counts levels of T0/(2L) and c(k) counts DCO pulses of T0/N,
this integer product is exactly the correction (2L/N) K e(k) of the theory.
The result saturates to 16 bits signed. K is an integer parameter.

## DCO (`rtl/dco.sv`)

A counter of DCO input pulses (`dco_ce`, N*f0). With no correction it emits a
one-cycle `r_pulse` every N pulses. It also keeps the sum of the corrections
received during the current period. The pulse fires on the input pulse at
which the count reaches N minus that sum, so a period is N - c(k) pulses
long.

Corrections may arrive at any time in the period:

* After a lead, c(k) arrives two clk cycles after the period started.
* After a lag, c(k) arrives in mid-period, as soon as the late input edge
  has been seen.

In both cases the end of the *running* period moves. This is what
T(k+1) = T0 - c(k) requires. If the count has already passed the new end,
the pulse fires on the next input pulse. A period is never shorter than one
input pulse. The first pulse after reset comes N input pulses after reset
is released.

## Clocking and ports (`rtl/dpll_top.sv`)

The loop needs two clocks, 2L*f0 for the detector and N*f0 for the DCO. Here
both are one-cycle clock enables on a single master clock `clk`, supplied from
outside as in the loop's block diagram. `clk` must be at least as fast as the
faster of the two. It need not be a multiple of either: a phase accumulator
(add the rate, subtract the master rate on overflow) makes suitable enables.
The input `s_in` must be synchronous to `clk`; add a synchronizer in front for
an asynchronous source. A synchronizer delays every input edge equally, so
it shifts e(k) by a constant and leaves the loop dynamics unchanged.

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | master clock |
| rst_n | in | 1 | asynchronous active-low reset |
| ted_ce | in | 1 | detector counting enable, 2L*f0 |
| dco_ce | in | 1 | DCO input enable, N*f0 |
| s_in | in | 1 | input square wave |
| r_pulse | out | 1 | reference pulse, one cycle wide |
| q, lead, lag | out | 1 | detector flip-flop and gates, for observation |
| a_valid, a_k | out | 1, 16 | a(k), signed, one-cycle strobe |
| c_valid, c_k | out | 1, 16 | c(k), signed, one-cycle strobe |

Parameters of `dpll_top`: `N` (100), `L` (50), `K` (1). Shared types and
defaults are in `rtl/dpll_pkg.sv`.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `ted_tb`: runs 200+ random lead and lag intervals with a random counting
  enable. The expected count is computed from the stimulus. It also checks
  zero-length intervals, saturation, the strobe timing and the Q/LEAD/LAG
  outputs.
* `loop_filter_tb`: checks K = 1 and K = 3 against a reference product,
  including saturation and latency.
* `dco_tb`: runs free periods and early, mid-period, double and late
  corrections against a cycle-level reference model, with a random DCO
  enable.
* `dpll_top_tb`: the closed loop at default parameters. The master clock
  runs at 2100 cycles per T0, and L is varied through the `ted_ce` rate.
  Every a(k) is checked against the counting pulses between the recorded
  events. Every DCO period is checked against N - K a(k). Every step is
  checked against the difference equation, to within one level and one DCO
  pulse. The test also checks the locking behaviour of each experiment, and
  fails if any behaviour (lead, lag, one-step, monotonous and oscillatory
  locking, frequency-step steady state, cycle slipping, divergence) never
  occurred.

* `dpll_lock_range_tb`: also runs the closed loop at default parameters.
  It covers LK/N = 0.2, 0.3, 0.5, 0.6 and 0.7. For each gain, the input
  frequency is placed 0.05 f0 inside each edge of the lock range, and the
  loop is started from initial errors of -0.4, -0.1, 0.1 and 0.4 input
  periods. In all 40 runs the loop locked to the predicted e_ss (the error
  at the lower edge approaches -0.82 T0 for LK/N = 1/2). At 0.05 f0 beyond
  1 +- LK/N, every run slipped cycles.

Measured phase-step response, e(0) = 0.2 T0, N = 100, K = 1 (e/T0):

| L | LK/N | e(1) | e(2) | e(3) | theory e(1) |
|---|---|---|---|---|---|
| 20 | 0.2 | 0.12 | 0.08 | 0.05 | 0.12 |
| 30 | 0.3 | 0.08 | 0.04 | 0.02 | 0.08 |
| 50 | 0.5 | 0.00 | 0.00 | 0.00 | 0 |
| 60 | 0.6 | -0.04 | 0.01 | 0.00 | -0.04 |
| 70 | 0.7 | -0.08 | 0.04 | -0.01 | -0.08 |

Measured steady-state error under a frequency step (e_ss/T0, measured vs
N (T0 - Ti)/(2LK)):

| L | fi/f0 = 0.6 | 0.75 | 0.8 | 0.9 | 1.1 | 1.2 | 1.25 | 1.4 |
|---|---|---|---|---|---|---|---|---|
| 30 | | -0.55 / -0.56 | | | | | 0.34 / 0.33 | |
| 50 | -0.67 / -0.67 | | | -0.11 / -0.11 | 0.09 / 0.09 | | | 0.28 / 0.29 |
| 70 | | | -0.18 / -0.18 | | | 0.12 / 0.12 | | |

With L = 30 and fi/f0 = 1.45, outside the lock range, the loop gave 31
reference pulses for 44 input edges. With L = 110 (LK/N = 1.1) the error grew
0.10, -0.12, 0.15, -0.18.

Residual deviations from the ideal equation are quantization. The error is
measured in levels of T0/(2L) and corrected in whole DCO pulses of T0/N. So a
locked loop may keep an error of one or two DCO pulses, or alternate between
neighbouring values.

To simulate with Verilator 5, for example the end-to-end test:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/dpll_pkg.sv tb/dpll_top_tb.sv --top-module dpll_top_tb
    ./obj_dir/Vdpll_top_tb

Use the same command for `ted_tb`, `loop_filter_tb`, `dco_tb` and
`dpll_lock_range_tb`. Every
testbench finishes in a few seconds at most.

## Design choices and limits

The loop structure, the flip-flop and AND-gate detector, the proportional
filter and the DCO control law are the published scheme. The following are
choices of this implementation:

* **Detector output.** The gated pulses are counted into a signed binary
  a(k), instead of being passed on as a pulse burst. Lead and lag counts use
  the registered input level. Counts saturate at 4L.
* **DCO.** It is a period counter with a correction accumulator, and a
  correction moves the end of the running period.
* **Clocking.** The design uses a single clock with clock enables, with a
  synchronous input and an asynchronous active-low reset. The loop's
  internal signals are brought out as ports. Word widths are 16 bits.
* **Not covered.** Noise and a higher-order (e.g. proportional-integral)
  loop filter are outside the scope of the first-order loop. Only integer K
  is supported.
* **Lock range, second case.** For LK/N >= 1/2 the range used here is
  LK/N < fi/f0 < 2 - LK/N. It is consistent with a range width of
  2 - 2LK/N, and it is what the simulations show.
