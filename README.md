# Cochlear-implant speech front end: beamformer and filter banks

A cochlear implant replaces the mechanical frequency analysis of the inner ear.
Its speech processor splits the sound into frequency bands. The energy in each
band then drives one electrode in the cochlea. This RTL implements the digital
signal path that produces the bands, in three forms that can be compared. It
also includes the dual-microphone beamformer that comes before them:

```
 mic_front ──► ffd_fir (delay 1.427 samples) ─┐
                                              ├─► (a+b)/2 ──► bf_out ──┬─► da_filter_bank ──► fb_out[0..15]
 mic_rear ───► register ──────────────────────┘   ds_beamformer        ├─► gtf8            ──► gtf_out
                                                                       └─► gtf8_folded     ──► gtff_out
 mic_front ──► vfd_fir (delay set at run time by vfd_delay) ─────────────────────────────► vfd_out
```

* **Distributed-arithmetic FIR filter bank** (`da_filter_bank`). Sixteen
  band-pass FIR filters of order 877 (878 taps each) split the signal into the
  bands of the continuous interleaved sampling (CIS) strategy. They use no
  multiplier: every product is read from small tables.
* **Gammatone filter** (`gtf8`). An eighth-order IIR filter whose response
  matches one place of the cochlea. It is a cascade of four second-order
  sections with 20 multipliers and 12 ripple-carry adders.
* **Folded gammatone filter** (`gtf8_folded`). The same filter with each
  section folded onto one multiplier and one adder. That gives 4 multipliers
  and 4 adders in all, at five clocks per sample. Its output is bit-identical
  to `gtf8`.
* **Fractional delay filters** (`ffd_fir`, `vfd_fir`). Maximally flat FIR
  filters that delay a signal by a fraction of a sample, using canonical
  signed digit (CSD) multipliers. The fixed one is used by the delay-and-sum
  beamformer (`ds_beamformer`). The variable one has its delay set at run time.

Everything is synthesizable SystemVerilog-2017. The coefficients are computed
at elaboration from formulas in `rtl/ci_pkg.sv`. There are no coefficient
files.

## Number formats

| Signal | Format |
|---|---|
| samples, everywhere | 16-bit two's complement, Q1.15 (full scale ±1) |
| gammatone and fixed-delay coefficients | 18 bits, 15 fraction bits (range ±4) |
| Farrow sub-filter coefficients | 20 bits, 17 fraction bits |
| filter-bank coefficients | 18 bits, 19 fraction bits (range ±0.25) |
| variable delay `vfd_delay` / `d` | unsigned Q2.8, 0 to 3.996 samples |

Outputs are truncated towards minus infinity and then saturated to 16 bits.
The one exception is the VFD, which rounds. Inputs and outputs use a
sample-strobe protocol (`in_valid`, `out_valid`). Blocks that need several
clocks per sample also have `in_ready`. A sample is taken at a rising edge
where `in_valid && in_ready`. Reset is synchronous and active high.

The default sample rate is 44.1 kHz. That is the rate that matches the 22.7 µs
sample period for which the 1.427-sample delay is specified.

## The distributed-arithmetic filter bank

Each band output is `y = Σ h[k]·x[n−k]` over 878 taps. Write every 16-bit
sample as a sum of its bits, with the sign bit weighted negatively:
`x = −x₁₅·2¹⁵ + Σ_{b<15} x_b·2^b`. The sum of products then becomes

```
y = Σ_b ±2^b · ( Σ_k h[k]·x_b[n−k] )
```

The inner sum depends only on one bit of each stored sample. The taps are
therefore cut into groups of K = 4. Each group gets a 16-entry table holding
every possible sum of its four coefficients. The table for taps 4g…4g+3 is
`LUT_g[a] = Σ_{j: a_j=1} h[4g+j]`. One channel therefore has 220 tables; the
last one uses only two taps.

`da_filter_bank` keeps one delay line of the last 878 samples, shared by all
16 channels. After a sample is accepted, the controller steps through the 16
bit planes, least significant first, one per clock. Bit plane b is bit b of
every stored sample: 878 bits, i.e. 220 table addresses. In each channel
(`da_fir_channel`):

1. All 220 table outputs are added into one partial sum.
2. The partial sum is shifted left by b and added to the accumulator. For
   plane 15 it is subtracted instead.

After the sixteenth plane the accumulator holds the exact sum of products with
19 fraction bits. One more clock scales it to Q1.15 and saturates it. The bank
therefore takes a sample every 17 clocks. Outputs appear at the 18th rising
edge after acceptance. At 44.1 kHz that needs a clock of only 0.75 MHz.

**Band plan.** The band edges are logarithmically spaced from 200 Hz to 8 kHz:
200, 252, 317, 399, 503, 633, 798, 1004, 1265, 1593, 2006, 2526, 3181, 4006,
5045, 6353, 8000 Hz.

**Filter design.** Each filter is an ideal band-pass response
`2f₂·sinc(2f₂m) − 2f₁·sinc(2f₁m)`, where m = k − 438.5. It is multiplied by a
Hamming window `0.54 − 0.46·cos(2πk/877)`, rounded to 19 fraction bits, and
built into the tables at elaboration (`ci_pkg::fb_coef`).

The band plan, the window method and K = 4 are this implementation's choices.
The channel count and the filter order are those of the design being
implemented. To change the bank, set `NCH`, `NTAPS`, `FLO_HZ`, `FHI_HZ` or
`FS_HZ`. The tables follow.

## The gammatone filter and its folding

The fourth-order gammatone impulse response `t³·e^{−2πbt}·cos(2πf_c t)` is
realised in the usual efficient way. It is split into four second-order
sections that share one pole pair and differ in their zero. At centre
frequency f_c and sample period T:

```
ERB = f_c/9.26449 + 24.7 Hz,   b = 1.019·2π·ERB
a1 = −2·cos(2πf_cT)·e^{−bT},   a2 = e^{−2bT}
b0 = 0.5,   b1 = −0.5·(cos(2πf_cT) + s_k·sin(2πf_cT))·e^{−bT}
s_k = +√(3+2√2), −√(3+2√2), +√(3−2√2), −√(3−2√2)   for sections 0..3
g  = 1 / |H_k(e^{j2πf_cT})|   (section gain, unity at f_c)
```

Each section computes

```
s[n] = (b0·x[n] + b1·x[n−1]) >> 15
u[n] = sat((g·s[n] − a1·u[n−1] − a2·u[n−2]) >> 15)
y[n] = u[n] >> 4
```

That is five multiplications and three additions. The recursive state u is
20 bits wide: it keeps four fraction bits below the sample LSB. The feedback
loop has a DC gain of about 50. Truncating the state to 16 bits would
therefore add an offset and noise of around 60 LSB, which is a noise floor of
−42 dB for a quarter-scale tone. With the guard bits, the stop-band output
falls to a few LSB.

The additions are ripple-carry adders (`ripple_carry_adder`), because they use
the least area and switch the least. The subtractions are done by adding
negated coefficients.

At 1 kHz and 44.1 kHz the poles are at radius 0.981 (a1 = −1.942,
a2 = 0.962), and g ranges from 0.028 to 0.073. Because every section is
normalised at f_c, the cascade has unity gain at f_c. The test measures 8195
output for 8192 input at 1 kHz, and 4 at 4 kHz.

**Direct form** (`gtf_sos`, `gtf8`) processes one sample per clock, with one
clock of latency per section.

**Folded form** (`gtf_sos_folded`, `gtf8_folded`) reuses one multiplier and
one adder for the five operations of a section, with folding factor 5:

| step | multiplier | adder |
|---|---|---|
| 0 | b0 · x | acc = 0 + product |
| 1 | b1 · x[n−1] | acc = acc + product |
| 2 | g · (acc >> 15) | acc = 0 + (product << 4) |
| 3 | (−a1) · u[n−1] | acc = acc + product |
| 4 | (−a2) · u[n−2] | u = sat((acc + product) >> 15) |

Truncation happens at the same points as in the direct form, so the two forms
give identical outputs. The single multiplier is `csd_mult`: it recodes the
data and the coefficient into CSD at run time. A section accepts a new sample during
step 4, so one sample per five clocks is accepted. The result is seen at the
sixth edge after acceptance. The four sections work concurrently on
successive samples, so the cascade keeps the rate of one sample per five
clocks with 24 clocks of latency.

The gain placement (g as the fifth multiplier) and the schedule above are this
implementation's reading of the operator counts: five multipliers and three
adders per section, folded to one of each.

## CSD multipliers

In canonical signed digit form a number is written with digits −1, 0 and +1,
and no two neighbouring digits are non-zero. This leaves at most about half
the digits non-zero. A multiplication becomes a few shifted additions and
subtractions.

* `csd_const_mult` finds the digits of a constant at elaboration. It builds
  only the shift-add network, with no multiplier. The fixed taps of both delay
  filters use it.
* `csd_mult` recodes both of its run-time operands, the data sample and the
  coefficient, with Reitwiesner's rule in combinational logic (helper
  `csd_recode`). The non-zero digits of the data pick the partial-product
  rows, so there are about half as many rows as in a shift-and-add
  multiplier. Each row is the coefficient in CSD form, kept as a vector of +1
  digits P and a vector of −1 digits N, shifted to the row's weight and added
  or subtracted. The P rows and the N rows go into two separate sums, and
  one subtraction at the end gives a·c. Assertions check the
  no-adjacent-digits rule on both operands.

## Fractional delay and the beamformer

**Why the delay is needed.** With two microphones 1 cm apart, sound from the
front reaches the rear microphone about 29 µs after the front one. At a
22.7 µs sample period that is more than one sample but less than two. The
beamformer here uses the delay of 1.427 samples for which the filter was
specified.

**`ffd_fir`.** A four-tap Lagrange (maximally flat) interpolator,
`h[k] = Π_{i≠k}(D−i)/(k−i)`. For D = 1.427 the taps are −0.0641, 0.6431,
0.4792 and −0.0582. Each tap is a CSD shift-add network. In the test, a 500 Hz
sine comes out within 1 LSB of the ideally delayed sine.

**`ds_beamformer`.** Delays the front microphone through `ffd_fir` and
averages it with the rear one, which is registered once for alignment. A 7 kHz
wave from the front passes at 99 % amplitude; from the back it is reduced to
15 %.

**`vfd_fir`.** The same interpolator in Farrow form. The taps are
polynomials in d, so the filter splits into four fixed sub-filters
(coefficients of d⁰…d³) and Horner's rule `((v3·d + v2)·d + v1)·d + v0`. The
three multiplications by d are `csd_mult` instances, so d can change on every
sample. The Horner chain carries four guard bits, because coefficient errors
grow with d³. The output is within 2 LSB of the exact interpolator for
0.5 ≤ d ≤ 2.5. The delay has a resolution of 1/256 sample, so 1.4 samples is
realised as 358/256 = 1.398.

The interpolator order (3) and the Farrow structure are this implementation's
choices. The 1.427-sample delay and the microphone spacing follow the
specification.

## Top level and timing (`ci_top`)

| Output | Valid this many rising edges after the input pair is accepted |
|---|---|
| `bf_out`, `vfd_out` | 1 |
| `gtf_out` | 5 |
| `fb_out[0..15]` | 19 |
| `gtff_out` | 25 |

`in_ready` is low while the filter bank or the folded filter is busy. It is
also low in the clock in which the beamformer hands its result on. The top
therefore accepts at most one pair every 18 clocks. An assertion checks that
no beamformer sample is ever offered to a busy filter.

Parameters: `NCH` (16), `NTAPS` (878), `FC_HZ` (1000, gammatone centre),
`FS_HZ` (44100), `DELAY` (1.427).

Synthesised with yosys as a check, the top is about 19 400 word-level cells
and 1 700 flip-flop bits. The 878 × 16-bit delay line and the 3 520 DA tables
are counted as memories.

## What is not here

* **Envelope detection and pulse generation.** CIS extracts the band energies
  and turns them into interleaved stimulation pulses. This RTL ends at the
  band outputs.
* **Microphones, converters, electrodes.** These are analog; the top takes and
  gives 16-bit samples.
* **Gate-level figures.** Area, power and FPGA resource figures belong to
  particular technologies and tools. Nothing here is tuned to reproduce them.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ripple_carry_adder` | 34-bit sums and carry-out against `+`; full carry-ripple cases |
| `tb_csd_mult`, `tb_csd_const_mult` | products against `*`, including extreme values and long runs of ones |
| `tb_gtf_sos`, `tb_gtf8` | bit-exact against an integer model of the difference equation (`tb_gtf_ref_pkg`); latency; gain at and away from f_c |
| `tb_gtf_sos_folded`, `tb_gtf8_folded` | the same, with back-to-back and gapped handshakes |
| `tb_ffd_fir` | against the real-valued Lagrange filter; the delay is 1.427, not 1 or 2 |
| `tb_vfd_fir` | against the exact interpolator over 100 delay settings; d = 1.4 on a sine |
| `tb_ds_beamformer` | against real-valued delay-and-sum; front/back directivity at 7 kHz |
| `tb_da_fir_channel` | the DA accumulator against a direct sum of products |
| `tb_da_filter_bank` | full size: all 16 bands bit-exact against direct convolution; band selectivity; 17-clock rate |
| `tb_gtf_response` | gain of both gammatone forms from 250 Hz to 4 kHz against the analytic response (5 %) |
| `tb_fb_band_sweep` | full size: a tone at the centre of each of the 16 bands lands in that band |
| `tb_ci_top` | full size, all defaults: every output of the chain, latencies, back-pressure, full-rate input, VFD delay switching |

To run one with Verilator 5 (from the folder holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ci_pkg.sv tb/tb_gtf_ref_pkg.sv tb/tb_ci_top.sv --top-module tb_ci_top -o sim
./obj_dir/sim
```

Leave out `tb/tb_gtf_ref_pkg.sv` for testbenches that do not import it.
The full-size tests (`tb_da_filter_bank`, `tb_ci_top`) compile in under a
minute and run in seconds.

Known limits:

* The filter bank and the gammatone filter are tested with random data and
  sines, not with recorded speech.
* Overflow inside the gammatone sections is prevented by the unity-gain
  scaling, not by saturation of internal nodes. Only the recursive state
  saturates.
* The lowest filter-bank bands are 52 to 100 Hz wide. That is narrower than
  the resolution of an 878-tap window at 44.1 kHz. Their gain at the band
  centre is therefore below one: 0.52 for band 0, 0.63 for band 1, 0.75 for
  band 2, and 0.94 or more from band 4 upwards. Each tone still comes out
  strongest in its own band.
