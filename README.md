# Single-channel split-ADC background calibration for a pipelined ADC

A pipelined ADC is only as accurate as the inter-stage gain of its first
stages. Low-gain, fast amplifiers (here inverter-based amplifiers with about
24 dB of open-loop gain) and capacitor mismatch make a nominal gain of 2 come
out near 1.7, with some cubic compression on top, and the converter loses most
of its resolution. Digital correction can undo this if it knows each stage's
inverse transfer,

    Vin = D/2 + beta1 * Vres + beta3 * Vres^3

so the problem is to *measure* beta1 and beta3 while the converter runs.

A *split ADC* does this with two half-size converters whose stages use
different decision points: both must agree on every sample, so their
difference is an error signal that an LMS loop can drive to zero. This design
gets the same effect from **one** converter. Each calibrated stage has four
comparators instead of two, which gives it two transfer curves:

| curve     | decision points    | use                                 |
|-----------|--------------------|-------------------------------------|
| main      | -0.375, +0.125     | normal conversion                   |
| auxiliary | -0.125, +0.375     | one sample per calibration interval |

The two curves differ only in the **calibration regions** -0.375..-0.125 and
+0.125..+0.375. Once in a while a sample in such a region is converted with
the auxiliary curve. The missing "second channel", the main-curve result for
that same sample, comes from an FIR interpolator working on the converter's
own output, L samples before and L after. The difference between the two
results drives the LMS update of that stage's coefficients. So the virtual
second channel costs two comparators per stage and some digital logic.

The RTL here is the complete digital side: the comparator decoders, the
correction chain, the calibration counters, the interpolator and one LMS
machine per calibrated stage. The analog pipeline is outside. It is modelled
behaviourally only in the two end-to-end testbenches.

## Converter organisation

* 12 pipeline stages of 1.5 bits plus a 2-bit flash. Each stage's sub-DAC
  subtracts D * Vref/2 with D in {-1, 0, +1}, and the residue amplifier
  ideally has a gain of 2. All values are normalised to Vref = 1.
* Stages 1..5 are calibrated. Stages 1 and 2 get first- and third-order
  correction (beta1, beta3); stages 3..5 get first-order correction only.
* Stages 6..12 and the flash form the *backend*, assumed ideal. Their codes
  combine radix-2 into the residue of stage 5 (`backend_combiner`).
* The output `dout` is 14 bits, value = code / 2^13.

The correction runs from stage 5 back to stage 1. Each `stage_corrector`
computes `Din = D/2 + beta1*Dres + beta3*Dres^3`, and its `Din` is the `Dres`
of the stage before it. Stage 1's `Din`, rounded to 14 bits, is the output.

## One calibration interval

This is the part that needs the most care. Everything is paced by
`cal_controller`, one sample per clock, in intervals of N = 512 samples.

```
position:  0 ........ L-1 | L ... t0-1 | t0 | t0+1 ... t0+L | ... | N-1
phase:     FILL (ctr II)  | WAIT       |desired| POST (ctr III)| DONE| RESET
SEL:       0              | 0          | 1  | 1 ........ 1  | 0   | 0
k:         -              | -          | 0  | 1 ........ L  | -   | -
```

* **Counter I** counts the interval. On its last sample it raises **RESET**,
  which reads out the interpolator, starts the LMS update and begins the next
  interval.
* **Counter II** (FILL) lets the first L samples be converted normally, so the
  interpolator memories hold L valid past samples.
* **WAIT**: from position L on, the stage under calibration gets `cal_req`.
  Its decoder applies the auxiliary curve only if the sample is inside a
  calibration region (CR = 1). The first such sample is the *desired sample*
  t0. Until one arrives, every sample is converted normally and the next one
  is checked.
* **Counter III** (POST) counts k = 0..L over the desired sample and the L
  samples after it. This steps the interpolator through its taps.
* A desired sample is only accepted at positions L..N-2-L, so its L followers
  always finish before RESET. This needs N >= 2L+2. An interval without a
  CR = 1 sample in that window causes no update.
* By default only one stage is calibrated per interval. The stage rotates
  5, 4, 3, 2, 1, 5, ..., so every stage is updated once every five
  intervals.
* With the parameter `CONCURRENT = 1`, every stage is asked at once. The
  desired sample is the first one where any stage has CR = 1. Each stage
  with CR = 1 on that sample uses its auxiliary curve and is updated against
  the same interpolated output.

`cal_req` depends only on the controller state, not on CR. The decoder's
combinational choice (`cal_mode = cal_req & CR`) therefore cannot loop back
into the controller.

### Pipeline alignment

Decisions leave the top combinationally (`d_stage`) in the cycle their
comparator codes arrive: the sub-DACs need them at once. The correction chain
takes one registered cycle, and `dout` is registered again. The `sel`, `k`,
`reset` and `desired` signals are delayed by the same two cycles, so the
interpolator and the desired-sample capture see exactly the sample the
controller decided on.

## The interpolator

`fir_interpolator` computes

    D_out,i = sum_{d=1..L} C(d) * (x[t0-d] + x[t0+d])

with only two multipliers:

* L registers form a shift line, fed through multiplexer I. While SEL = 0 it
  loads `dout`. From the desired sample on (SEL = 1) it shifts in zeros, so it
  is empty again after L cycles.
* While SEL = 1, multiplexer II feeds the oldest stored sample to a multiplier
  with C(L-k). Multiplexer III feeds the live sample to a multiplier with
  C(k). Both multiplexers pass 0 when SEL = 0.
* At step k the stored path holds x[t0-(L-k)] and the live path holds
  x[t0+k]. Over k = 0..L every tap pair is visited once. The desired sample
  itself meets C(0) = 0, and the stored path reaches an emptied register at
  k = L.
* An integrator sums the products. On RESET the output multiplexer presents
  the sum, rounded to 14 bits, and the integrator is cleared. Otherwise the
  output is 0.

The coefficients are not taken from elsewhere. `interp_coef_rom` computes them
at elaboration as a Blackman-windowed band-limited interpolator (cutoff
0.6*pi, scaled to unity DC gain, 18-bit words with 17 fractional bits). For
sine inputs up to 0.4 of the Nyquist band this set reproduces a missing
sample to better than 1e-4 of full scale. This bandwidth limit is inherent to
the method: above it the interpolator cannot stand in for the missing
channel. Any symmetric coefficient set with C(0) = 0 can replace it by
changing `g_r`/`coef_i`.

## The LMS update

After RESET, `lms_engine` of the calibrated stage receives the desired
sample's output D_out (auxiliary curve), the interpolated D_out,i (main curve),
and, for that stage, its input estimate Din, backend residue Dres and
main-curve decision D1. It computes:

    e       = D_out - D_out,i                    (0 if no desired sample)
    x       = Din - e - D1/2
    Dres,i  = x/beta1 - (beta3/beta1^4) * x^3    (main-curve residue estimate)
    beta1  += mu1 * e * (Dres,i - Dres)
    beta3  += mu3 * e * (Dres,i^3 - Dres^3)

Step sizes are powers of two:

| stage | 1      | 2     | 3    | 4    | 5    |
|-------|--------|-------|------|------|------|
| mu1   | 1/512  | 1/128 | 1/64 | 1/32 | 1/16 |
| mu3   | 1/8192 | 1/512 | -    | -    | -    |

The error e is taken at the converter output for every stage. A later
stage's error reaches the output attenuated by roughly 2 per earlier stage,
and the growing mu1 compensates for that. The loop gain therefore comes out
nearly the same for all five stages.

1/beta1 comes from a bit-serial restoring divider (65 cycles). Four
multiply cycles and one update cycle follow, so `busy` is high for 71 cycles,
well inside the N - 2L - 2 cycles before the next possible update.
Coefficients have 40 fractional bits (48-bit words), so the smallest updates
(mu3 = 1/8192 times small errors, around 2^-29) still accumulate. beta1
resets to 0.5 (an ideal gain-2 stage) and beta3 to 0.

## How far it is verified

Every block has a self-checking testbench in `tb/`. Each compares against
values worked out independently: real-valued arithmetic, thresholds computed
from an analog input, or a position-based model of the controller.

`tb_split_cal_adc` runs the top at its default parameters (N = 512, L = 64)
against a behavioural model of the analog pipeline:

* The five calibrated stages have residue gains 1.70 to 1.80.
* Stages 1 and 2 have cubic coefficients of -0.04 and -0.03.
* Stages 6..12 and the flash are ideal.

Over 36,000 intervals of a 0.0371 fs sine:

* Every beta1 settles within 0.1 % of 1/gain.
* The SNDR estimated from the output error against the analog input rises
  from about 22 dB uncalibrated to about 59 dB.
* It then stays near 60 dB for 4,000 more intervals at 0.1713 fs (0.34 of
  Nyquist).
* The SFDR of `dout` goes from about 30 dB to about 65 dB at both
  frequencies. It is measured with a Blackman-Harris window at the
  fundamental and harmonics 2 to 25. The stage errors are static, so their
  spurs fall on harmonics.

The simulation takes about 35 s. The testbench also forces intervals with no
calibration sample (a DC input in the middle region) and counts intervals
where the wait was needed.

`tb_split_cal_adc_mc` repeats the calibration for four random sets of stage
errors, again at the default parameters:

* Each stage gain is 2(1+m)/(1+3/A), with open-loop gain A = 16 (about
  24 dB) spread by up to 5 % and capacitor mismatch m up to 0.1 %.
* The cubic coefficients of stages 1 and 2 are spread by up to 20 %.

After 30,000 intervals per draw, every beta1 has converged. The calibrated
SNDR is 54.0 dB on average, with a spread of 0.3 dB. This is lower than in
the first testbench because its stage-1 cubic error is larger and has had
fewer intervals to converge. The run takes about two minutes.

Limits worth knowing:

* beta3 of stage 1 converges very slowly with mu3 = 1/8192. Within the
  simulated 20 million samples it reaches only about a quarter of its target.
  This residual cubic error is what limits the SNDR and SFDR above. Stage 2's
  beta3 converges.
* The analog model has no comparator offsets, thermal noise or memory
  effects. The calibration regions shrink directly with comparator offset,
  and this design does nothing about it.
* Timing closure of the single-cycle correction chain (five stages of
  multipliers) at a 100 MHz sample clock has not been studied.

## Where this RTL departs from, or adds to, the method it implements

* **Sign of the gradient.** The update uses `e * (Dres,i - Dres)` with
  `e = D_out - D_out,i`. That is the sign convention of a two-channel split
  ADC (error A-B times residue difference B-A), and it converges. Pairing
  `e = D_out - D_out,i` with `(Dres - Dres,i)` instead drives the coefficients
  away from their targets.
* **D1 in the residue estimate** is the main-curve decision of the desired
  sample, because D_out,i estimates the main-curve output.
* **Stages 2..5** use the same formula with their own Din and the
  converter-level e. The error is not referred back through the earlier
  stages: referring it multiplies the interpolation noise left by
  not-yet-calibrated stages, and that noise biases beta1 downward (it drove
  stage 5 unstable in simulation).
* **Calibration order.** The method calls the calibration of the stages
  concurrent, and also says it starts at stage 5 and goes back to stage 1.
  The default does both by rotating the calibrated stage every interval,
  stage 5 first. `CONCURRENT = 1` takes the other reading and calibrates all
  stages in their calibration regions on the same sample. It gives every
  stage two to three times more updates, but each update error then holds
  the other stages' errors too. In `tb_split_cal_adc` that option converges
  to about 52 dB instead of 59 dB, so it is not the default. A strictly
  sequential scheme (stage 5 to convergence, then stage 4, ...) would need
  only a different rotation rule in `cal_controller`.
* **Update timing.** The interpolated value is read out, and the LMS started,
  at the end of the interval (RESET), not straight after the L post-samples.
  This changes latency only.
* **Own choices with no counterpart in the method:** interpolation
  coefficients, all internal word widths, the two-cycle pipeline, the
  accepted window for the desired sample, the divider, and reset values.

## Interface of the top, `split_cal_adc`

| port        | dir | width  | meaning |
|-------------|-----|--------|---------|
| `clk`, `rst_n` | in | 1 | sample clock, asynchronous active-low reset |
| `cmp[5]`    | in  | 4 each | comparators of stages 1..5: bit 0 = above -0.375, 1 = above -0.125, 2 = above +0.125, 3 = above +0.375 |
| `d_back[7]` | in  | 2 each | signed decisions of stages 6..12, same sample |
| `flash`     | in  | 2      | flash code 0..3 (levels -0.75, -0.25, +0.25, +0.75) |
| `d_stage[5]`| out | 2 each | decision for each stage's sub-DAC, combinational from `cmp` |
| `cal_mode`  | out | 5      | stage converting this sample on its auxiliary curve |
| `dout`      | out | 14     | corrected output, two cycles after its codes |
| `beta1[5]`, `beta3[5]` | out | 48 each | coefficients, 40 fractional bits |
| `cal_stage` | out | 3      | stage calibrated in the current interval (0 = stage 1) |
| `lms_busy`  | out | 5      | an LMS update is being computed |

All codes presented in one cycle must belong to the same sample. Aligning the
staggered outputs of the analog pipeline is left to the surrounding design.
Parameters: `N` (interval, default 512), `L` (interpolator half-length,
default 64), with N >= 2L+2, and `CONCURRENT` (default 0, see above). Word
widths, step sizes and stage counts live in `cal_pkg`.

## Files

`rtl/`: `cal_pkg` (types, formats, step sizes), `cr_gen`, `subadc_decoder`,
`backend_combiner`, `stage_corrector`, `cal_controller`, `interp_coef_rom`,
`fir_interpolator`, `lms_engine`, `split_cal_adc` (top).
`tb/`: one `tb_<module>.sv` per module, plus the Monte Carlo run
`tb_split_cal_adc_mc.sv`. Each prints
`TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv \
    --top-module tb_split_cal_adc rtl/cal_pkg.sv tb/tb_split_cal_adc.sv
obj_dir/Vtb_split_cal_adc
```

Replace `tb_split_cal_adc` with any other testbench name. The unit
testbenches finish in well under a second. To try other stage errors, edit
`a1`/`a3` in `tb_split_cal_adc.sv`. To change step sizes, edit
`STAGE_MU1_SH`/`STAGE_MU3_SH` in `cal_pkg.sv`.
