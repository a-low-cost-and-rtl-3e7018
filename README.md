# Low-latency gain and nonlinearity calibration for a 12-bit pipelined ADC

This is the digital back end of a 12-bit pipelined ADC. Its first residue
amplifier is open-loop. An open-loop amplifier saves power, but its gain is
not exact and it adds second- and third-order distortion (HD2, HD3). The back
end corrects the residue of the first stage as

    D_RES_cal = a1*D_RES + a2*f2(|a1*D_RES|) + sign(a1*D_RES)*a3*f3(|a1*D_RES|)

Here `a1` corrects the gain error (the inter-stage gain error, IGE). `a2` and
`a3` correct the HD2- and HD3-induced errors (the inter-stage nonlinearity
error, INE). A plain polynomial correction would need a squarer, a cuber and
several multipliers in the path of every sample. This design keeps all of
them off that path, using two ideas:

* **Averaged coefficients, precomputed products.** The coefficients are
  estimated in the background by LMS loops. Once they converge they barely
  move. The correction therefore uses their mean over a window of
  N = 1024 samples, refreshed once per window. All products of these means are
  computed once per window, in what is effectively a divided clock domain:
  * the stage gains are multiplied together and then with the stage bit
    weights;
  * the means are multiplied into table entries.

  Per sample, only adders and multiplexers remain.
* **Lookup tables instead of powers.** The nonlinear terms are only a few LSB
  in size, so a few MSBs of the residue magnitude are enough to compute them:
  * `f2` is `i^2`, with `i` the top 3 MSBs: an 8-entry table.
  * `f3` is `i^3`, with `i` the top 4 MSBs: a 16-entry table.

  Each table holds `mean(a) * i^p`. HD2 is even and HD3 is odd, so both tables
  are indexed by the magnitude, and only the HD3 term takes the sign.

The ADC has stage resolutions 3b-3b-3b-3b-4b. Each 3-bit stage has one bit of
redundancy and a gain of 4. The dither has a weight of 128 LSB. These numbers,
the table sizes and the LMS equations follow the published algorithm. Widths,
pipelining, reset values and interfaces are this implementation's own, and
are listed below.

## Data flow

```
 stage codes ─┬─> residue_sum (p-weights) ──> a1*D_RES ──> ine_correction ──> D_RES_cal ─┐
 (aligned)    │        ^  adders only              (abs/MSBs, 2 LUT muxes,                │
              │        │                             sign, 2 adders)                      v
              │  weight_precompute <── means ──┐        ^ tables                 + stage 1 weight
              │  (once per window)             │        │ (once per window)     - dither, round
              │                          coef_mean ─────┘                          ──> dout (12 b)
              └─> ine_estimator (q-weights, current a1..a3, real multipliers)
                    D_LMS = correction - D_d*128  ──> LMS: a1, a2, a3 ──> coef_mean
 dither_gen ──> dither_o (to the analogue dither DAC), delayed copy D_d for the estimator
```

`dout` is valid 3 clocks after its stage codes. The three registers are the
residue sum, the nonlinear correction and the output assembly. Every block
is clocked by the sample clock. The "divided clock domain" is the enable
`upd_o`, which is high on the last sample of each window.

## Scales and number formats (`rtl/calib_pkg.sv`)

Every sample value is in LSBs of the 12-bit output, signed around mid-scale.
Values carry 8 fraction bits in 22 bits (`data_t`).

| stage | code bits | step (LSB) | nominal weight of code c |
|-------|-----------|-----------|---------------------------|
| 1     | 3         | 512       | (c - 3.5) * 512 (reference, not calibrated) |
| 2     | 3         | 128       | (c - 3.5) * 128 |
| 3     | 3         | 32        | (c - 3.5) * 32  |
| 4     | 3         | 8         | (c - 3.5) * 8   |
| 5     | 4         | 1         | (c - 7.5)       |

Each stage's weight is stored as one weight per code bit plus an offset
weight. All of them are scaled together by the gain products. With an ideal
first stage, the first residue `D_RES` spans ±256 LSB, plus ±128 LSB of
dither. Stage 2 accepts ±512 LSB.

* Coefficients (`coef_t`) have 20 fraction bits in 24 bits, so the range is
  ±8.
* The LMS accumulators have 40 fraction bits in 48 bits.
* A step size `mu = 2^-mu_shift` is given per LSB of `D_LMS`.

**Table index.** The magnitude `|a1*D_RES|` is read over a 512-LSB range:
* `i4 = min(floor(|x| / 32 LSB), 15)` indexes the HD3 table;
* `i3 = floor(i4 / 2)` indexes the HD2 table.

The coefficients `a2` and `a3` are defined in this index basis. For an
amplifier `y = g*u + h2*u^2/512 + h3*u^3/512^2`, they converge near `-8*h2`
and `-h3/8`. The estimator uses the same basis as the tables, so the
averaged coefficients can be loaded into the tables without conversion.

## Precomputed weights (`weight_precompute`, `residue_sum`, `weight_adder`)

`weight_precompute` forms the chain `G2 = a2`, `G3 = G2*a3`, `G4 = G3*a4`,
`G5 = G4*a5` from the averaged stage gains. It then multiplies each stage's
nominal weights by the stage's `G`, which gives the p-weights. Here `a2..a5`
are the averaged `alpha1` of the amplifiers in front of stages 2..5. In
`residue_sum`, each stage's `weight_adder` adds the p-weights selected by the
code bits, and a chain of adders sums the four stages into `a1*D_RES`.

A second set of weights, the q-weights, leaves out the first amplifier's
gain. The estimator uses them, because it applies the current `alpha1` with
a real multiplier.

The weights and tables load on `upd`. Their inputs, the means, also change
only on `upd`. The multipliers therefore have a whole window to settle, and
can be given an N-cycle multicycle constraint. As a consequence, the weights
in use during a window come from the means of the window before.

Only the first amplifier's `alpha1` is estimated here. The `alpha1` of stages
3..5 arrive on the `a1_later` input, for example from a foreground
calibration or from loops not included here. Drive them with 1.0
(`1 << 20`) for an ideal back end.

## Nonlinearity correction (`ine_correction`, `ine_lut`)

`ine_lut` holds `round(coef * i^p)` for every index. The products with the
fixed integers `i^2` and `i^3` reduce to shift-and-add networks. They load
on `upd`, and in the sample path only the multiplexer remains.
`ine_correction` works on `x = a1*D_RES`:

1. It takes `|x|` and its MSBs.
2. It reads both tables.
3. It negates the HD3 entry when `x < 0`.
4. It adds both terms to `x`.

## Background estimation (`ine_estimator`, `dither_gen`)

The first stage injects a dither of ±128 LSB. Its sign `D_d` comes from a
31-bit LFSR in `dither_gen`. The estimation path rebuilds the residue with
the current, not averaged, coefficients:

    x     = alpha1 * D_RES(q-weights)
    corr  = x + alpha2*i3^2 + sign(x)*alpha3*i4^3
    D_LMS = corr - D_d*128
    alpha1 -= mu1 * D_d * D_LMS                      every sample
    alpha2 -= mu2 * D_d * |D_LMS|    if |D_LMS| > lms_th
    alpha3 -= mu3 * D_d * D_LMS      if |D_LMS| > lms_th

The gain error and HD3 are odd-symmetric, so they correlate with `D_d`
directly. HD2 is even-symmetric, and its correlation with `D_d` changes sign
with the sign of the residue. Using `|D_LMS|` folds the two signs together,
so that the HD2 loop converges. The nonlinear terms only matter when the
residue is large, so their loops run only above a threshold. The `alpha1`
loop and the gated `alpha3` loop both see the gain error and HD3. They see
them in different proportions, so together they separate the two.

The estimator has four register stages and acts on a delayed `D_LMS`. This
is harmless at the small step sizes used.

**Modes.** With `ige_en = 0`, `alpha1` is held at 1.0. With `ine_en = 0`,
`alpha2` and `alpha3` are held at 0. The three combinations give
"calibration off", "gain only" and "gain and nonlinearity".

**Threshold.** The reference value is 256 LSB. With an ideal 3-bit first
stage, however, the dither-free residue is itself limited to ±256 LSB, so
`|D_LMS|` rarely exceeds 256 and the nonlinear loops hardly update. The
threshold is therefore a run-time input, `lms_th`. The testbenches use
128 LSB, half the residue range.

**Step sizes** are run-time shifts. Useful values with the 1024-sample window
are:
* `mu1_shift` 24..26;
* `mu2_shift` 24..26;
* `mu3_shift` 28..30.

Larger shifts give less coefficient noise and slower convergence. The
reference behaviour converges within a few 10^7 samples.

## Top level (`adc_ine_calib`)

Parameters:
* `LOG2_N` (10): the averaging window is 2^LOG2_N samples.
* `ADC_LATENCY` (4): the number of samples between `dither_o` for a sample
  and the arrival of that sample's codes.

Inputs, one sample per clock while `en` is high:
* `code1`: the stage-1 code.
* `code_be[0..3]`: the codes of stages 2..5, right-aligned.

The codes must be time-aligned with each other.

Outputs:
* `dout`: the 12-bit corrected code.
* `dres_cal_o`: the corrected residue, at full precision.
* The current and averaged coefficients.
* `upd_o`, `gate_o` and `dlms_o`, for observation.

The output assembly is
`dout = clamp(round(512*code1 - 1792 + D_RES_cal - D_d*128 + 2048))`.
Stage 1 keeps its nominal weight as the reference of the conversion. Reset
is asynchronous and active low. After reset:
* gains are 1.0;
* nonlinear coefficients are 0;
* weights are nominal;
* tables are empty.

The very first output is therefore the uncalibrated conversion.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_weight_adder`, `tb_residue_sum`: exhaustive and random sums against
  integer arithmetic, and the one-clock latency.
* `tb_weight_precompute`: exact rounded products, within 0.5 LSB of a
  floating-point reference; weights change only on `upd`.
* `tb_coef_mean`: window timing with gaps in `en`, exact block means.
* `tb_ine_lut`, `tb_ine_correction`: every table entry, and the index and
  sign rules for random residues, including saturation.
* `tb_dither_gen`: the LFSR recurrence, balance, alignment delay and hold.
* `tb_ine_estimator`: a register-by-register reference model over 20 000
  random samples, convergence of `alpha1` to 1/g for a 2 % gain error, and
  the sign of `alpha2` and `alpha3` for a distorting amplifier.
* `tb_adc_ine_calib`: the end-to-end test with the top at its default
  parameters, driven by the behavioural ADC model in `tb/adc_model_pkg.sv`.
  * The model has a 1 % gain error and HD2 = HD3 = -50 dB.
  * The input is a near-full-scale sine.
  * The test runs the three modes for 7.5 M samples in all.
  * With calibration off, every output must match the ideal reconstruction
    exactly, 3 clocks after its codes.
  * It counts window updates, gated updates, both dither signs, the HD3 sign
    path and each mode.

  The rms conversion error, with the mean removed, is:

  | calibration       | rms error |
  |-------------------|-----------|
  | off               | 2.85 LSB  |
  | gain only         | 0.82 LSB  |
  | gain and INE      | 0.58 LSB  |

  The test takes about 10 s.
* `tb_workload_sweep`: the same set-up over nine amplifier cases, each run
  from reset. SER below is the ratio of a 2000-LSB sine to the rms error.
  * Distortion sweep, with a 1 % gain error:
    * HD2 at -60, -45 and -30 dB, with HD3 at -60 dB;
    * HD3 at -45 and -30 dB, with HD2 at -60 dB.
  * Four random amplifiers, drawn from normal distributions:
    * HD2 and HD3 around -50 dB, sigma 3 dB;
    * gain around 1, sigma 1 %;
    * amplifier and first-stage comparator offsets with a sigma of
      6.8 LSB, which is 2 mV for a 1.2 V peak-to-peak input.
  * Checks per case:
    * full calibration beats no calibration;
    * adding nonlinearity calibration never worsens the error by more
      than 5 %;
    * it lowers the error wherever HD2 or HD3 is -50 dB or stronger.

  | case       | off      | gain only | gain and INE |
  |------------|----------|-----------|--------------|
  | HD2 -60 dB | 55.9 dB  | 67.9 dB   | 68.4 dB      |
  | HD2 -45 dB | 55.3 dB  | 62.4 dB   | 68.7 dB      |
  | HD2 -30 dB | 47.9 dB  | 48.7 dB   | 60.6 dB      |
  | HD3 -45 dB | 52.3 dB  | 63.7 dB   | 67.0 dB      |
  | HD3 -30 dB | 42.5 dB  | 51.9 dB   | 59.0 dB      |
  | random 1-4 | 54-61 dB | 61-65 dB  | 65-68 dB     |

  At -30 dB the 3- and 4-MSB tables leave a visible residual error.
  With a large HD2 and a small gain error, gain-only calibration can end
  up worse than none. Its estimate is then pulled by the uncorrected
  square term. The test takes about 65 s.

To run a testbench with Verilator (5.x), from the project root:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/calib_pkg.sv tb/adc_model_pkg.sv \
          tb/tb_adc_ine_calib.sv --top-module tb_adc_ine_calib
./obj_dir/Vtb_adc_ine_calib
```

Replace the testbench name to run another one. `adc_model_pkg` is only
needed by `tb_ine_estimator`, `tb_adc_ine_calib` and `tb_workload_sweep`.

## Own choices and limits

* **Not included.** The analogue stages are not included: sub-ADCs, DACs,
  residue amplifiers and the dither DAC. They exist only as the behavioural
  model in `tb/`. The estimation of `alpha1` for stages 3..5 is not included
  either.
* **Own choices.** The following are this design's own:
  * the fixed-point formats;
  * the 1024-sample window;
  * the 512-LSB magnitude range of the table index;
  * the output assembly;
  * the pipeline registers;
  * the LFSR dither;
  * the mode inputs;
  * the use of the table index basis inside the estimator.
* **Threshold.** The reference threshold of 256 LSB is available, but with
  an ideal first stage it seldom fires (see above).
* **Table resolution.** The 3- and 4-MSB tables quantise the nonlinear
  terms. The correction is therefore slightly less exact than a full
  polynomial. The loss grows with the amplifier's distortion: for a given
  MSB count, it is larger at HD2 or HD3 near -30 dB than at -50 dB. In
  `tb_workload_sweep` the signal-to-error ratio after calibration is
  about 68 dB up to -45 dB. It drops to 59-61 dB at -30 dB.
* **Lint.** The fourth weight output of the 3-bit stages in
  `weight_precompute` is constant 0. It is there because all stages share
  one array shape.
