# Polynomial-approximation audio level compressor

A dynamic range compressor lowers the gain applied to an audio signal once its
level rises above a threshold, so that above the threshold every `p` dB of
input change produce only 1 dB of output change (ratio `p`; `p = ∞` is a
limiter). Done digitally, the gain is a multiplication and so adds no
distortion, but the ideal gain

    G = (v_t / A_i)^((p-1)/p)      for A_i >= v_t,   G = 1 below it

(`A_i = |v_i|` the input magnitude, `v_t` the threshold) is a fractional power,
which is expensive in hardware. This design replaces it with

    G_i = 1 - f_m(x) / A_i,        x = max(A_i - v_t, 0)
    f_m(x) = b1·x + b2·x² + … + bm·x^m

a polynomial in the distance above the threshold followed by one division.
`f_m` approximates `f = A_i - v_t^((p-1)/p)·A_i^(1/p)`, which is exactly what
makes `1 - f/A_i` equal to the ideal gain. Because `f_m(0) = 0` the gain is
exactly 1 at and below the threshold, and the shape of the curve (ratio,
knee) is set entirely by the coefficients `b1..bm`, which are run-time inputs.
`b1 = 1` with all others zero gives `G_i = v_t / A_i`, i.e. a limiter whose
output magnitude never exceeds `v_t`.

The raw gain is then smoothed with separate attack and release time constants
and applied to the sample: `v_o = G · v_i`.

All arithmetic is sequential (one bit per clock): a shift-and-add multiplier
and a restoring divider, reused by small state machines. This keeps the
circuit to a few adders and registers; an audio sample rate leaves thousands
of clocks per sample, of which the default design needs 145.

## Number format

Samples, gains, the threshold and the smoothing coefficients are N-bit two's
complement fractions `x0.x1…x(N-1)` with value `-x0 + Σ xi·2^-i`, range
[-1, 1). Default N = 16; the design is also exercised at 24 and 32 bits.

Two consequences run through the RTL:

* Unity gain is not representable. Wherever the gain would be 1 the value
  `1 - 2^-(N-1)` is used instead (an error of 0.0003 dB at 16 bits).
* The polynomial coefficients do not fit in [-1, 1). An interpolating
  degree-7 fit of a 2:1 curve at -40 dB has coefficients up to about ±8. The
  coefficients and the Horner accumulator therefore carry `CB_INT` extra
  integer bits (default 4, range [-16, 16)) with the same N-1 fraction bits.

Products are truncated (rounded toward minus infinity) to N-1 fraction bits;
sums and the few places that can overflow saturate.

## Datapath

```
            stage 1                                  stage 2
 vi ──► CMP ──► GAIN CALCULATION ──► REG-P (G_i) ──► ATTACK/RELEASE ──► G ──┐
  │     |vi|,x   Horner f_m(x) then                   one multiplier,       ×──► vo
  │              1 - f/|vi| (divider)                 two steps             │
  └──────────────────────────────────► REG-V (vi) ─────────────────────────┘
```

| module           | role |
|------------------|------|
| `compressor`     | top level: handshake, the two stage controllers, REG-P/REG-V, output multiplier |
| `level_cmp`      | CMP: `A_i = |v_i|`, `δ = (A_i > v_t)`, `x = δ·(A_i - v_t)` (combinational) |
| `gain_calc`      | `G_i = 1 - f_m(x)/A_i`: runs `poly_horner`, clamps, runs `restoring_div` |
| `poly_horner`    | `f_m(x)` by Horner's rule on one multiplier |
| `restoring_div`  | restoring divider, one quotient bit per clock |
| `attack_release` | gain smoother on one multiplier |
| `seq_mult`       | shift-accumulate fractional multiplier, one bit per clock |
| `comp_pkg`       | default sizes and the attack/release mode type |

The two stages overlap: while stage 2 smooths and applies the gain of sample
k, stage 1 already computes the raw gain of sample k+1. REG-P and REG-V are
the pipeline registers between them; they take a new gain/sample pair when
stage 1 has finished and stage 2 is free.

### Gain calculation

`poly_horner` evaluates the polynomial with the recurrence

    f_0 = b_m,   f_i = f_(i-1)·x + b_(m-i)   (i = 1..m, b_0 = 0)

so `f_m` is the polynomial after m multiply-adds on a single multiplier. A
lower degree needs no change of hardware: setting the top coefficients to
zero gives bit-for-bit the same result as a shorter polynomial.

`gain_calc` then clamps `f` to [0, A_i]. The exact `f` lies in [0, A_i), but a
fitted polynomial can stray slightly outside; a negative `f` would otherwise
give a gain above 1 and an `f >= A_i` a gain of zero or less. The quotient
`q = f/A_i` comes from `restoring_div` (saturating just below 1), and
`G_i = 1 - q`, so `2^-(N-1) <= G_i <= 1 - 2^-(N-1)`.

The polynomial and division run for every sample, also below the threshold
(where `x = 0` and the result is unity gain), so the timing is the same for
every sample.

### Attack and release

The smoother is a first-order recursive filter

    G(t) = C1·G(t-1) + C0·G_i(t),   C1 = exp(-1/(fs·T + 1)),  C0 = 1 - C1

which moves `G` towards `G_i` with time constant `T` (`fs·T` samples): after a step
of `G_i`, `G` has covered 63.2 % of the step after about `fs·T + 1` samples.
`(C0, C1) = (h0, h1)` with the attack time `T_a` when the gain is falling
(`G_i(t) < G(t-1)`, the signal got louder) and `(r0, r1)` with the release
time `T_r` otherwise. Typically `T_r` is much longer than `T_a`.

The two products share one multiplier: step 1 forms `C1·G(t-1)` into a
register, step 2 forms `C0·G_i(t)` and adds the register. Operand selectors
pick the pair for each step. `G` resets to unity.

The four coefficients are inputs; the host computes them from `fs`, `T_a` and
`T_r` with the formulas above. `h1 = r1 = 0`, `h0 = r0 = 1 - 2^-(N-1)` turns
smoothing off.

Note on the switching direction: a comparison written the other way round
(attack constants while the gain rises) would contradict the definition of
attack time used here; this design uses the attack pair for falling gain.

### Arithmetic units

`seq_mult` multiplies a WA-bit multiplicand by a WB-bit Q1.(WB-1) multiplier.
Per clock it looks at one multiplier bit (LSB first), adds the multiplicand to
the upper half of a double-length product register (subtracts it for the sign
bit, whose weight is -1) and shifts the register right arithmetically. After
WB clocks the register holds the exact product; the output is its MSB-side
WA bits, `floor(a·b / 2^(WB-1))`, saturated (only `-1 × -1` saturates when
WA = WB). `poly_horner` uses WA = N + CB_INT, WB = N; the others N × N.

`restoring_div` computes `floor(num·2^(N-1)/den)` for `0 <= num < den`: per
clock the remainder is doubled, the divisor subtracted, and the subtraction
kept (quotient bit 1) or undone (bit 0). `num = 0` gives 0, `num >= den`
saturates to `1 - 2^-(N-1)`.

## Interface and timing

`compressor` ports (W = N + CB_INT):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid`, `in_ready` | in / out | 1 | a sample is taken when both are high |
| `vi` | in | N | input sample |
| `vt` | in | N | threshold magnitude `v_t` (e.g. -40 dB = 0.01) |
| `b[1:M]` | in | W each | coefficients `b1..bM` |
| `h0`, `h1`, `r0`, `r1` | in | N | attack and release coefficients |
| `out_valid` | out | 1 | one-cycle pulse per output sample (no backpressure) |
| `vo` | out | N | output sample |
| `gain` | out | N | smoothed gain applied to `vo` |
| `ar_mode` | out | 1 | `comp_pkg::ar_mode_e`: attack or release pair used |
| `above` | out | 1 | the sample was above the threshold |

The configuration inputs must be stable while samples are in flight.
Samples leave in the order they arrived. Clock-edge counts, from the edge that
accepts a sample:

| quantity | formula | N = 16, M = 7 |
|----------|---------|---------------|
| `seq_mult`, start to done | WB | 16 |
| `restoring_div` | N - 1 | 15 |
| `poly_horner` | M·(N+2) | 126 |
| `gain_calc` | M·(N+2) + N + 1 | 143 |
| `attack_release` | 2·(N+2) | 36 |
| sample in to `out_valid` (empty pipeline) | M·(N+2) + 4N + 10 | 200 |
| stage 1 sample interval | M·(N+2) + N + 3 | 145 |
| stage 2 sample interval | 3N + 9 | 57 |

The throughput is the larger of the two intervals. For M >= 3 (at N = 16)
stage 1 sets it; for a degree-1 or degree-2 polynomial stage 2 is the longer
stage, stage 1 holds its finished gain (with `in_ready` low) until REG-P/REG-V
are free, and samples are accepted every 3N + 9 clocks.

## Programming a characteristic

For threshold `v_t` and ratio `p`, choose m points `α_j` in (0, 1 - v_t] and
solve the Vandermonde system

    Σ_k b_k·α_j^k = (α_j + v_t) - v_t^((p-1)/p) · (α_j + v_t)^(1/p),   j = 1..m

(a least-squares fit over more points works the same way), then write
`round(b_k · 2^(N-1))` into `b[k]`. `tb_characteristic` does this in
SystemVerilog with equally spaced points `α_j = j·(1 - v_t)/m`. Higher degree
fits the curve more closely; the steep part is just above the threshold.

## Accuracy

`tb_characteristic` applies DC levels from -60 dB to 0 dB in 1 dB steps and
compares the output level with the ideal curve; σ is the RMS of the 61
differences in dB (threshold -40 dB, p = 2, equally spaced interpolation
points):

| degree | 16 bit | 24 bit | 32 bit |
|--------|--------|--------|--------|
| m = 3  | 0.97   | 0.97   | 0.97   |
| m = 7  | 0.32   | 0.31   | 0.31   |

The error is dominated by the polynomial fit, not by the word length, at this
threshold. Degree 7 at 16 bits gives σ between 0.08 and 0.27 dB for
p = 1, 1.4, 4, 6 and 10. With a -50 dB threshold (σ about 0.93 dB with this
choice of points) the threshold is only about 100 LSBs of a 16-bit word, and
the longer words give a measurably smaller error. Another choice of fitting
points, denser near the threshold, changes these numbers; the hardware does
not depend on it.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench (integer or real arithmetic,
not the RTL's shift-and-add), checks the cycle counts above, prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog:

| testbench | what it covers |
|-----------|----------------|
| `tb_seq_mult` | corners and 800 random products, 16×16 and 20×16, latency |
| `tb_restoring_div` | 500 random quotients, zero and saturating cases, latency |
| `tb_level_cmp` | 4000 samples incl. -1, zero and samples exactly at the threshold |
| `tb_poly_horner` | random coefficient sets (degree 7 and 3), saturation, a real-valued cross-check |
| `tb_gain_calc` | limiter (`G_i = v_t/A_i`), 2:1 fit against the ideal gain, clamping |
| `tb_attack_release` | every step bit-exact, and the 63.2 % attack (11 samples) and release (101 samples) times |
| `tb_compressor` | default size end to end: sine bursts at -6…-60 dB, then a switch to limiter mode; bit-exact reference model, latency and rate; counts below/above threshold, attack, release, limiter and full-scale samples |
| `tb_compressor_stall` | degree 1 (limiter), where stage 1 must wait for stage 2 |
| `tb_characteristic` | the accuracy sweeps above, 16/24/32 bits, m = 3 and 7 |

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert --top-module tb_compressor \
    -y rtl -y tb +libext+.sv -Irtl rtl/comp_pkg.sv tb/tb_compressor.sv
./obj_dir/Vtb_compressor
```

Every testbench runs in well under a second.
`tb_compressor` runs the top level with all parameters at their defaults.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 16 | word length of samples, gains, coefficients' fraction (24 and 32 also tested) |
| `M` | 7 | polynomial degree (number of coefficient slots and Horner steps) |
| `CB_INT` | 4 | extra integer bits of the polynomial coefficients and accumulator |

## Where this design makes its own choices

The polynomial gain formula, Horner evaluation on one multiplier, the
restoring divider, the shift-accumulate multiplier that keeps the MSB half,
the two-step one-multiplier smoother, its coefficient formulas and the two
pipeline registers between gain calculation and gain application follow the
published architecture. The following are this design's own:

* the extra coefficient integer bits (`CB_INT`) and all saturation and
  clamping rules;
* unity gain represented as `1 - 2^-(N-1)`, and truncating rather than
  rounding products;
* what REG-P and REG-V hold (raw gain and sample), the valid/ready input
  handshake, the output pulse without backpressure and the stall rule between
  the stages;
* the attack/release switching direction (attack pair for falling gain);
* separate multipliers for the polynomial, the smoother and the output, so the
  two stages can overlap;
* configuration by input ports; no register file or host bus is defined;
* asynchronous active-low reset.

Not included: the original two-multiplier smoother (replaced by the
one-multiplier form), and the converters and host of a complete audio system.
Peak detection is the per-sample magnitude `|v_i|`; there is no separate
peak-hold or RMS detector.
