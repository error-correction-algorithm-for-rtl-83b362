# Digital error correction for a 6-bit folding/interpolation ADC

A folding/interpolation ADC is a two-step converter that still converts in a
single clock. Folding circuits act as the coarse converter: they give the top
Gray-code bits of the input. An interpolation circuit acts as the fine
converter: it splits each folding period into LSB steps. The analog path
from the folding circuits to the interpolation circuit has a small delay
`dt`. So the coarse bits describe the input at `nT` and the fine bits describe
it at `nT + dt`. On a moving input the two halves of the code then belong to
different samples, and codes near a coarse boundary come out wrong by a whole
coarse step.

This RTL is the digital back end that repairs this. It uses a few gates and
no memory of past samples. It reconstructs the coarse bits of the *late*
sample from two pieces of information:

* the coarse code of the early sample;
* the quadrant of the folding period seen by both samples.

The result is the exact Gray code of `Vin(nT + dt)` as long as the input
moves by less than `2**m` LSBs within `dt`. Here `m` is the number of
interpolation bits, so the bound is 8 LSB for the 6-bit converter. The same
logic also forces the output to full scale on overflow and to zero on
underflow.

## The converter around it

For the reference 6-bit converter (`k = 3` folding bits, `m = 3`
interpolation bits, output Gray code `g5..g0`), the analog front end gives
these comparator decisions. Each one is latched by a D flip-flop on `ck`.

| signal     | sampled at | meaning                                                              |
|------------|------------|----------------------------------------------------------------------|
| `gf5`      | nT         | Gray bit 5 (input in the upper half)                                 |
| `gf4`      | nT         | Gray bit 4                                                           |
| `qf`       | nT         | sign of the folding signal Q; equals Gray bit 3                      |
| `if`       | nT         | sign of the folding signal I (Q shifted by a quarter period)         |
| `out_rng`  | nT         | 1 while the input is inside the range                                |
| `zc[15:0]` | nT + dt    | interpolation comparators, one per LSB over half a folding period    |

Q and I are periodic in the input, with a period of 32 LSB, and are 90
degrees apart. Their two sign bits therefore split every period into four
8-LSB quadrants. On a rising input the quadrants follow the sequence
`(q,i) = (0,1) → (1,1) → (1,0) → (0,0) → (0,1) …`. From the interpolation
comparators the back end also gets the quadrant of the late sample, `(qi, ii)`.

## How the coarse bits are corrected

The quadrant pair `(qf, if, qi, ii)` says how the coarse code moved between
the two samples:

* **Same quadrant** (`qf = qi`, `if = ii`). Nothing moved, because the input
  moved less than 8 LSB. The coarse bits are kept.
* **One quadrant apart, differing in q.** The 3-bit coarse code moved by one
  step, and a one-step move of a Gray code changes exactly one bit. Here that
  bit is bit 3, which is q itself, so taking `g3 = qi` corrects the code.
* **One quadrant apart, differing in i.** Again a one-step move, but now q is
  unchanged. The bit that changes is then bit 4 when `q = 1` and bit 5 when
  `q = 0`. This follows from the Gray sequence
  `000 001 011 010 110 111 101 100`: between neighbouring codes with equal
  bit 0, the changing bit alternates between bit 1 and bit 2 in this way.
* **Opposite quadrants** (both q and i differ). The input moved 8 LSB or more.
  The move could have been one step up or one step down, and the two cannot
  be told apart. This is why the correction has the `2**m` LSB limit.

The first three rows reduce to three equations, implemented in
`fi_msb_correct`:

```
g5 = (~qf & (if ^ ii) & out_rng) ^ gf5
g4 = ( qf & (if ^ ii) & out_rng) ^ gf4
g3 =  qi & out_rng
```

In the undecidable fourth row these equations still flip a bit. That result
is outside the guaranteed range.

Sixteen patterns of `(qf, if, qi, ii)` are possible. They sort into
13 classes: one "no move" class (4 patterns), 8 single-move classes (one step
up or down, changing q or i, in each quadrant), and 4 undecidable classes.
`tb_fi_msb_correct` checks all 64 input combinations against that
class-by-class rule. It is an independent reference, not the equations
above. For every input the folding circuits can actually produce, it also
checks that the result is the coarse code one Gray step up or down.

## The fine encoder

`fi_interp_encoder` receives the 16 interpolation comparators. Comparator `k`
senses the sign of a sinusoid shifted by `k + 1` LSB within the 32-LSB
period. Within one period the 16 bits form a circular thermometer (Johnson)
code with 32 states, so position `s` has `zc[k] = 1` exactly when
`(s - 1 - k) mod 32 < 16`.

The encoder works in four steps:

1. It extends the code into a 32-bit ring, `{~zc, zc}`.
2. It finds the one place where a 1 is followed by a 0: the zero crossing.
3. It turns that position into the low three bits of the Gray code of `s`.
4. It ANDs `g3..g0` with `out_rng`.

The two quadrant bits of the late sample come straight from two
comparators: `qi = zc[7]` and `ii = ~zc[15]`. If bubbles produce several
crossings, the lowest one wins. `M` (the number of interpolation bits) is a
parameter, and the encoder uses `2**(M+1)` comparators.

## Overflow and underflow

Above the range, the folding circuits for bits 5 and 4 give `(1,0)` on
their own. Below the range they give `(0,0)`. The fine bits come from
periodic signals and cannot do this. So when the out-of-range comparator
reads 0, the four low bits are cleared and the coarse flip is disabled. The
output then reads Gray `100000` (code 63) on overflow and `000000` (code 0)
on underflow.

## Timing and interface of the top level, `fi_adc_digital`

```
fi_adc_digital #(.M(3)) (
  input  ck, rst_n,
  input  cmp_g5, cmp_g4, cmp_q, cmp_i, cmp_out_rng,   // folding comparators
  input  [2**(M+1)-1:0] cmp_zc,                       // interpolation comparators
  output [2+M:0] g                                    // {g5,g4,g3,g2,g1,g0}, Gray code
);
```

* **Throughput:** one conversion per clock.
* **Sampling:** all comparator inputs are sampled on the rising edge of `ck`.
* **Output timing:** `g` is combinational from the latches, so it is valid
  one clock after the sampling edge. The testbench checks that `g` does not
  change before that edge.
* **Reset:** `rst_n` is asynchronous and active low. It clears the latches,
  and `g` then reads 0.
* **Configuration:** only the 3-bit coarse configuration exists (`K_BITS` in
  `fi_adc_pkg`). `M` can be changed.

## Delay limit and input frequency

For a full-scale sine of frequency `fin`, the largest change in the input
within `dt` is `2·pi·fin·dt·A`, where `A` is half the range. Keeping this
below `2**m` LSB, which is `2**(1-k)·A`, gives

```
fin · dt ≤ 1 / (2**k · pi)
```

Take `fin = 17/1024` of the sample rate and `k = 3`. The limit is then
`dt ≈ 2.4` sample periods.

`tb_fi_snr_sweep` converts 1024 samples of such a sine for each `dt` from 0
to 4.0. It computes the S/N from the signal bin of a DFT. Results:

| dt   | corrected | uncorrected | wrong codes (corrected) |
|------|-----------|-------------|-------------------------|
| 0.0  | 37.7 dB   | 37.7 dB     | 0                       |
| 1.0  | 37.7 dB   | 24.2 dB     | 0                       |
| 2.4  | 37.7 dB   | 15.8 dB     | 0                       |
| 2.6  | 19.4 dB   | 15.5 dB     | 6                       |
| 4.0  | 5.6 dB    | 16.2 dB     | 132                     |

Up to the limit, the corrected output is exactly the Gray code of the late
sample, and its S/N stays at the ideal 6-bit figure of about 37.9 dB. Past
the limit, it falls quickly.

## Limits

* The correction is exact only while the input moves by less than `2**m`
  LSB between the two sampling instants. Beyond that the output can be off
  by a whole coarse step.
* The out-of-range decision belongs to the early sample. An input that is
  inside the range at `nT` but outside it at `nT + dt`, or the reverse, is
  not handled: the fine comparators then wrap into the next folding period
  and the code can be far off. The testbenches keep the late sample inside
  the range whenever the early one is.

## What is this design's own

These parts follow the published algorithm directly:

* the correction equations;
* the gating by `out_rng`;
* the full-scale and zero codes;
* one comparator latch per comparator, clocked by `ck`.

These are choices made here:

* **Fine resolution.** The interpolation circuit is described as making
  sinusoids 22.5 degrees apart. Three bits below a 32-LSB folding period,
  however, need one comparator per LSB, which is 11.25 degrees. The encoder
  follows the bit count: 16 comparators for `M = 3`.
* **Encoder structure and polarities.** The ring layout and polarity of the
  comparator code, and the edge detector plus priority encoder, are this
  design's own. So is the lowest-crossing rule for bubbles.
* **Sign of I.** The sign of I relative to the input is a choice. Here
  `i = 1` in the first half of each folding period, so a pattern such as
  `(qf, if, qi, ii) = (0,1,0,0)` means the early sample was the larger one.
  With the opposite sign the gates are unchanged and only `ii` becomes
  `zc[15]`.
* **Reset and output timing.** The asynchronous reset and the combinational
  output after the latches are choices too.
* **Analog front end.** It is not part of the RTL: the resistor ladders,
  folding amplifiers, interpolation network and comparators. Its decisions
  are the top level's inputs. `tb/fi_analog_model.sv` is an ideal,
  non-synthesizable model of them, used only by the testbenches. It takes
  two real-valued input voltages in LSB, one per sampling instant, and a
  full-scale input of exactly 64 LSB reads as code 63.

## Files and simulation

```
rtl/fi_adc_pkg.sv          K_BITS, M_BITS, Gray/binary helper functions
rtl/fi_msb_correct.sv      coarse-bit correction (g5, g4)
rtl/fi_interp_encoder.sv   fine encoder with out-of-range gating (g3..g0, ii)
rtl/fi_adc_digital.sv      top level: comparator latches + both blocks
tb/fi_analog_model.sv      ideal comparator model for the testbenches
tb/tb_fi_msb_correct.sv    exhaustive test of the correction rule
tb/tb_fi_interp_encoder.sv all comparator codes for M = 3 and M = 2, bubbles
tb/tb_fi_adc_digital.sv    end-to-end random test at the default size
tb/tb_fi_snr_sweep.sv      S/N versus dt sweep
```

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

`tb_fi_adc_digital` drives 20000 random samples, biased towards the coarse
boundaries, with these checks:

* **Within the limit:** every output is checked when `|Vin(nT+dt) − Vin(nT)|`
  is below 8 LSB.
* **Beyond the limit:** samples with a 8–16 LSB move must produce the
  undecidable patterns, and these patterns must never occur below 8 LSB.
* **Out of range:** inputs above and below the range give the full-scale and
  zero codes.
* **Coverage:** it counts every mechanism (no move, step up, step down,
  flip of bit 4, flip of bit 5, bit 3 from the interpolation, overflow,
  underflow, reset, undecidable) and fails if any one never happened.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fi_adc_pkg.sv tb/tb_fi_adc_digital.sv --top-module tb_fi_adc_digital
./obj_dir/Vtb_fi_adc_digital
```

Replace the testbench name to run another one. Each run takes well under a
second.
