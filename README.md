# Background calibration of residue-amplifier gain and cubic error in a pipelined ADC

In a pipelined ADC, each stage's residue amplifier is the main source of
error. Its gain is never exactly the nominal 8. It also compresses large
residues, mostly through a third-order term:

    V_o = beta1 * V_r + beta3 * V_r^3          (beta1 ~ 7.6, beta3 ~ -15)

With these errors a nominally 12-bit converter gives only about 8 effective
bits. This design removes both errors in the digital domain while the
converter runs, without a test signal and without interrupting conversion.

The digital back end applies an inverse polynomial to the digitised stage
output D_o:

    D_res = alpha1 * D_o + alpha3 * D_o^3

It adjusts `alpha1` and `alpha3` continuously. The estimate comes only from
the *shape of the distribution* of `D_res`:

- A one-bit pseudo-random sequence (PN) shifts the residue up or down by half
  a comparator step.
- For the correct coefficients, each PN value places the residue on a known
  interval, with a known density.
- Each coefficient error distorts that distribution in its own way: it moves
  the centre points, or it squeezes the outer ends.
- Simple threshold comparisons on `D_res`, split by PN, detect the distortion.
- Two accumulators integrate the comparison results into the coefficients.

The calibration uses no multiplier: only comparisons and accumulators. The
two multiplications in the correction itself are the exception.

The RTL implements the 12-bit example converter:

- four 3-bit stages with a nominal gain of 8, then a 2-bit flash;
- gain and cubic calibration of stage 1;
- gain calibration of stage 2.

The analog stages are behavioural models, so the whole converter can be
simulated. The digital back end (`adc_cal_digital`) is synthesizable and can
be used alone.

## The converter

```
 vin ─► [stage 1] ─► [stage 2] ─► [stage 3] ─► [stage 4] ─► [2-bit flash]
          M=20 +PN     M=20 +PN     M=10         M=10          3 comparators
          │            │            │            │             │
          ▼ thermo1    ▼ thermo2    ▼ thermo3    ▼ thermo4     ▼ thermo_f
 ┌─────────────────────── adc_cal_digital ──────────────────────────────────┐
 │ decode → align → D_o3 = D4 + D5/8 → D_o2 = D3 + D_o3/8                   │
 │        → stage 2: D_o1 = D2 + alpha1_2 * D_o2                            │
 │        → stage 1: D_out = D1 + alpha1_1 * D_o1 + alpha3_1 * D_o1^3       │
 └──────────────────────────────────────────────────────────────────────────┘
```

All voltages and digital values are normalised to the reference, so full
scale is [-1, 1]. A stage with M comparators has step `Delta = 2/M`:

- stages 1 and 2: `Delta = 1/10`;
- stages 3 and 4: `Delta = 1/5`.

The comparator levels sit at `-1 + Delta/2 + j*Delta` for j = 0..M-1. The
sub-DAC subtracts the decided value `D_a`, which lies in {-1, ..., +1} in
steps of Delta. So the quantisation error `V_in - D_a` lies in
[-Delta/2, Delta/2].

Stages 1 and 2 have one more DAC element, driven by the PN bit. It subtracts
a further `(Delta/2) * PN`, and the stage's digital value includes the same
amount:

    D_i = D_a + (Delta/2) * PN,     PN in {-1, +1}, each with probability 1/2
    V_r = V_in - D_i

The residue `V_r` therefore lies in [-Delta, 0] when PN = +1 and in
[0, Delta] when PN = -1. Each half-range has the same shape as the
quantisation error. Redundancy keeps this from causing overrange: a 3-bit
stage with gain 8 and 20 comparators uses only 8 * Delta = 0.8 of the next
stage's range.

Stages 3 and 4 are not calibrated. Their errors are divided by the gain of
the stages in front, so the back end uses their nominal gain: `D_res = D_o/8`
is a 3-bit arithmetic shift.

## Reading amplifier errors from the residue distribution

This section is the core of the design.

Call the corrected, digitised residue of a calibrated stage `D = D_res`.
Write the combined analog-plus-digital path as:

    D ≈ (1 + e1) * V_r + e3 * V_r^3,     e1 = alpha1*beta1 - 1

Here `e3 = beta1^3*alpha3 + beta3*alpha1` is the leftover cubic coefficient.
Both errors vanish for `alpha1 = 1/beta1` and `alpha3 = -beta3/beta1^4`.

### Conditional comparisons

The only operation in the detector is the conditional comparison

    h(x | PN = m) = 2   if the current PN equals m and x >= 0
                    0   otherwise

Each `x` is a constant minus `D`, or `D` minus a constant. So each `h` is one
comparator against a fixed threshold, ANDed with the PN bit. Because PN is +1
or -1 with probability 1/2 each:

    E[h(c - D | m)] = P(D <= c | PN = m)

### Gain error: IGE

The gain error uses the two centre points `-Delta/2` and `+Delta/2` of the two
PN half-ranges:

    IGE = h(-Delta/2 - D | +1) - h(Delta/2 - D | -1)

For an exact gain (`e1 = 0`) and a uniform quantisation error, half of each
PN half-range lies on either side of its centre, so `E[IGE] = 0`.

A gain that is too large stretches both half-ranges outwards. More of the
PN = +1 samples then fall below `-Delta/2`, and fewer of the PN = -1 samples
fall below `+Delta/2`. To first order:

    P(D <= -Delta/2 | +1) ≈ 1/2 + e1/2
    P(D <= +Delta/2 | -1) ≈ 1/2 - e1/2
    E[IGE] ≈ e1

In simulation, the stage-1 coefficient right after reset gives
`e1 = 7.76/8 - 1 = -0.030`. The measured difference of the two probabilities
is -0.029. After calibration it is below 0.001.

The cubic term is odd and nearly cancels between the two centre points. This
keeps IGE almost insensitive to `e3`.

The gain loop is a plain integrator with negative feedback:

    alpha1(n+1) = alpha1(n) - mu1 * IGE(n)

### Cubic error: INE

The cubic term bends the residue only where `|V_r|` is large. That is near
the *outer* ends of the half-ranges (`-Delta` for PN = +1, `+Delta` for
PN = -1). Near the inner ends (around 0), the path is linear.

INE compares windows of width `W` at the outer ends with windows at the inner
ends of the opposite PN half-range:

    INE1 = h(-Delta + W - D | +1) - h(W - D | -1)          outer(+1) vs inner(-1)
    INE2 = h(D + W | +1)          - h(D - (Delta - W) | -1)  inner(+1) vs outer(-1)
    INE  = INE2 - INE1

Compression (`e3 < 0`) pulls the outermost samples inward, so fewer of them
pass the outer thresholds `-Delta + W` and `Delta - W`. Expansion pushes more
of them past. The inner thresholds `±W` act as the reference, because they
hardly move with `e3`.

The mean of INE has a small term proportional to `-e3`. It also has a much
larger term of about `-2*e1`, because a gain error moves the outer ends too:

    E[INE] ≈ -k3 * e3 - 2 * e1,     k3 > 0 and small

The `-2*e1` term is why the cubic loop must wait for the gain loop. Its update
is gated:

    alpha3(n+1) = alpha3(n) + mu3 * INE(n) * F

### The gain-error monitor and F

The monitor averages IGE over blocks of L samples, which estimates `e1`:

    e1_est = (1/L) * sum_{n = bL}^{(b+1)L - 1} IGE(n)
    F      = 1  if |e1_est| < e_th,  else 0

To avoid a division, the hardware compares the block sum with
`ceil(e_th * L)`, which is 125 for L = 10^4 and e_th = 0.0125. F keeps the
value of the last complete block and is 0 after reset. So the cubic loop
starts only once the gain is within about 1.25%. It freezes again if the gain
drifts away, for example when a large change in the signal statistics throws
the gain off.

### Conditions on the input

The statistics hold when the quantisation error of each calibrated stage is
spread continuously over [-Delta/2, Delta/2]. The input must also exercise
the whole residue range. These conditions hold for busy inputs such as:

- full-scale sines at non-commensurate frequencies;
- multi-tone signals;
- random signals;
- slow ramps over the full scale;
- Gaussian signals that reach a good part of the full scale.

They do not hold for a DC input or a very small signal.

## Number formats and step sizes

| quantity | format | range | notes |
|---|---|---|---|
| samples `D_i`, `D_o`, `D_res`, `dout` | signed 24 bit, 20 fractional | [-8, 8) | `Delta/2 = 1/20` is rounded to 2^-20 |
| `alpha1`, `alpha3` | signed 32 bit, 30 fractional | [-2, 2) | |
| IGE, INE | signed 3 bit | {-2, 0, 2} | |

In the correction, the products are formed at full width and then truncated
toward minus infinity. The result saturates to the sample range and is
registered.

**Step sizes.** The default step-size exponents are:

- stage 1: `mu1 = 2^-10`, `mu3 = 2^-9`;
- stage 2: `mu1 = 2^-9`.

An exponent is counted in least-significant bits of a 16-bit coefficient
word (sign, one integer bit, `MU_REF = 14` fractional bits). So the value
actually added to the accumulator is:

    delta_alpha = ± err * 2^-(MU_REF + MU)          (IGE * 2^-24 for stage-1 gain)

The update is a left shift of the 3-bit error into the 30-bit fraction.
Suppose the step were applied directly to a coefficient in full-scale units.
A step of 2^-10 times an error of ±2 would then move `alpha1` (about 0.13) by
1.5% on every update. In steady state it would wander by several percent, and
the converter would be worse than uncalibrated.

With `MU_REF = 14`, both stage-1 loops settle within about 5·10^6 samples.
The time constant of the gain loop is about `2^(MU_REF+MU1) / beta1`, which
is 2.2·10^6 samples. `MU_REF`
is a parameter at every level, so it trades convergence time against
coefficient jitter. The testbenches lower it to between 6 and 10, to converge in
10^5–10^6 samples.

**Output code.** `dout_code = clamp(floor((dout + 1) * 2^11), 0, 4095)` is
12-bit offset binary. `dout` itself carries 20 fractional bits, so the
residual error can be measured below the 12-bit quantisation.

## Pipeline timing

Each behavioural stage samples its input and registers its comparator word
and amplified residue on the rising edge. So stage i resolves a sample i−1
cycles after stage 1. The flash takes one cycle more.

The back end aligns the words of one sample with shift registers
(`delay_line`):

| word | delay (cycles) |
|---|---|
| stage 1 (with its PN bit) | 7 |
| stage 2 | 4 |
| stage 3 | 2 |
| stage 4 | 1 |

It then recombines from the back:

- `D_o2 = D3 + (D4 + D5/8)/8`, registered;
- stage 2 correction: 2 cycles;
- stage 1 correction: 2 cycles.

`dout` for the sample taken at rising edge n is valid after edge n + 9.
`dout_valid` rises once the pipeline has filled after reset.

The PN bits of stages 1 and 2 come from the back end. Each analog stage uses
the bit that is current when it samples. The back end keeps a copy of each
bit, registered on the same edge, and delays it with the word it belongs to.
This keeps PN and `D_i` consistent in the decoder and in the error detector.

Both PN generators are 10-bit Fibonacci LFSRs (period 1023):

- stage 1: `x^10 + x^7 + 1`, seed `0x2A5`;
- stage 2: `x^10 + x^3 + 1`, seed `0x13B`.

Because the polynomials differ, the two stages never get the same sequence,
even shifted in time.

The calibration loops update on every valid sample: one IGE and one INE
comparison set per cycle, one accumulator add per coefficient. Nothing in the
back end stalls.

## Modules

| module | role |
|---|---|
| `adc_cal_pkg` | sample/coefficient types, conversion functions for constants |
| `pn_gen` | LFSR PN source, one bit per enabled cycle |
| `stage_decoder` | `D_i = (2k - M + PN) * (1/M)`, k = number of comparators set |
| `residue_corrector` | `D_res = alpha1*D_o + alpha3*D_o^3`, registered, saturating; `CUBIC = 0` gives the gain-only form |
| `error_detector` | the six conditional comparisons; combinational IGE and INE |
| `gain_error_monitor` | block sum of IGE over L samples, flag F |
| `coeff_integrator` | saturating accumulator with a power-of-2 step and a selectable sign |
| `cal_estimator` | detector + monitor + two integrators (the monitor and the alpha3 integrator only when `CUBIC = 1`) |
| `calibrated_stage` | corrector + estimator + `D_i + D_res` with alignment |
| `delay_line` | shift register for time alignment |
| `adc_cal_digital` | the synthesizable back end of the whole converter |
| `mdac_stage_model` | behavioural analog stage: comparators with random offsets, DAC with PN element and element mismatch, thermal noise, cubic amplifier |
| `flash_adc_model` | behavioural 2-bit flash (levels -2/3, 0, 2/3, plus random offsets) |
| `pipelined_adc` | top: four stage models, the flash model and `adc_cal_digital` |

The top's defaults are the example converter's amplifiers:

| stage | beta1 | beta3 |
|---|---|---|
| 1 | 7.76 | -12.8 |
| 2 | 7.7 | -13.75 |
| 3 | 7.58 | -14.95 |
| 4 | 7.63 | -14.86 |

The other defaults are `W = 0.0125`, `L = 10^4`, `e_th = 0.0125` and 10-bit
PN generators.

The top also models one converter's analog imperfections. Each is Gaussian
and drawn once from `SEED`:

| imperfection | default |
|---|---|
| comparator offsets | rms 10% of the stage step (`OFS_SIGMA`) |
| flash comparator offsets | rms 25% of the flash step (`FLASH_OFS_SIGMA`) |
| DAC element mismatch, stages 1–4 | 0.1%, 0.2%, 0.3%, 0.4% rms (`MISMATCH_S1..4`) |
| input-referred thermal noise per stage | 6.5e-5 rms (`NOISE_RMS`), about 80 dB for a full-scale sine |

The stage-model defaults are all zero, so a stage instantiated on its own is
ideal apart from its amplifier.

The redundancy of one step absorbs the comparator offsets. Thermal noise and
DAC mismatch are not corrected and set the floor that remains after
calibration.

After convergence, the ideal stage-1 coefficients are:

    alpha1 = 1/beta1
    alpha3 = -beta3/beta1^4

The stage-2 gain coefficient settles close to `1/beta1`. It is not exactly
that value, because the stage's uncorrected cubic term also shifts the centre
points slightly.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_pn_gen` | LFSR sequence against an independent model, period 1023, balance |
| `tb_stage_decoder` | all comparator counts and both PN values against the formula |
| `tb_residue_corrector` | random operands against a real-number model, saturation, latency |
| `tb_error_detector` | every comparison around each threshold, random residues |
| `tb_gain_error_monitor` | block sums, F and the block-end pulse, sums inside, on and outside the limit |
| `tb_coeff_integrator` | step, sign, enable and saturation against a reference accumulator |
| `tb_cal_estimator` | closed loop on a modelled first stage: alpha1, alpha3, F gating, gain-only variant |
| `tb_calibrated_stage` | a calibrated stage with a cubic amplifier model: error drops from 2.1e-3 to 1.3e-4 rms |
| `tb_adc_cal_digital` | back end with ideal stages: output equals input within 2^-12 |
| `tb_mdac_stage_model`, `tb_flash_adc_model` | behavioural models against their equations; offset, mismatch and noise spreads measured through the ports |
| `tb_pipelined_adc` | end to end, faster loops, 6·10^5 samples (see below) |
| `tb_pipelined_adc_inputs` | random, four-tone, ramp and Gaussian inputs, 2·10^6 samples each; on the ramp no missing codes, code-density DNL 0.46 LSB and INL 0.75 LSB after calibration, and the stage-1 residue histogram balanced about its centre points; a second converter with 0.5% DAC mismatch |
| `tb_pipelined_adc_full` | end to end at every default, 5·10^7 samples; convergence within 5·10^6; harmonic distortion before and after |

`tb_pipelined_adc` checks the following:

- the 9-cycle latency, and that no other latency fits;
- the error before and after calibration, and that the final error is below
  one 12-bit LSB rms;
- that `alpha1` of stage 1 reaches `1/beta1` within 0.5%;
- that `alpha3` of stage 1 reaches `-beta3/beta1^4` within 50%;
- that `alpha1` of stage 2 reaches `1/beta1` within 3%.

It also counts each mechanism of the calibration and fails if one never
happens:

- both PN values in both stages;
- non-zero IGE and INE;
- blocks with F = 0 and with F = 1;
- `alpha3` moving while F = 1, and never while F = 0.

Results of `tb_pipelined_adc_full`, at the default parameters (all the
imperfections above) with a full-scale sine at 0.1091 of the sample rate:

| quantity | before calibration | after calibration |
|---|---|---|
| rms error of `dout` | 2.4e-3 | 2.1e-4 |
| signal-to-error ratio, before 12-bit truncation | 49.4 dB | 70.4 dB |
| worst of 2nd–9th harmonics of the 12-bit code, first and last 16384 samples | −66.3 dBc | −75.9 dBc |

Adding the 12-bit quantisation noise (1.41e-4 rms) gives about 69 dB for the
truncated output code. The harmonics are measured with a Blackman-Harris
windowed DFT at the nine harmonic frequencies; the test requires a gain of
more than 6 dB and a level below −72 dBc after calibration. The harmonics
left after calibration come mostly from the DAC mismatch, which this design
does not correct.

The error over each block of 10^6 samples falls as follows:

| samples | rms error |
|---|---|
| 0–10^6 | 1.9e-3 |
| 2–3·10^6 | 6.4e-4 |
| 4–5·10^6 | 2.7e-4 |
| end of run | 2.1e-4 |

After calibration `alpha1 = 0.12863`, against an ideal `1/7.76 = 0.12887`.
`alpha3` settles at 0.0042, against an ideal 0.0035. The cubic correction is
small, so this error costs little.

With ideal comparators, an ideal DAC and no noise, the same run reaches
1.0e-4 rms (76.8 dB). The difference is the uncorrected DAC mismatch and
the thermal noise.

### Running a test with Verilator

```
verilator --binary --timing -j 4 -y rtl rtl/adc_cal_pkg.sv \
          tb/tb_pipelined_adc.sv --top-module tb_pipelined_adc
./obj_dir/Vtb_pipelined_adc
```

Replace the testbench name to run another test. `tb_pipelined_adc` runs in
under a second. `tb_pipelined_adc_full` takes about a minute. The simulator is
2-state, so every register that is read has a reset or an initial value.

## Where this design makes its own choices

The method fixes:

- the comparisons;
- the error formulas;
- the gating by F;
- the correction polynomial;
- the parameter values above.

The following are this design's choices:

- **Sign of the gain update.** Because `E[IGE] ≈ +e1`, the gain integrator
  subtracts `mu1 * IGE`. The cubic integrator adds `mu3 * INE * F`. Both
  signs follow from the mean values of IGE and INE derived above, which
  were also checked by simulating the error statistics.
- **Step-size scale.** See `MU_REF` above. The default gives convergence in a
  few 10^6 samples and a residual error well below one LSB.
- **Window width.** `W = 0.0125`, which is `Delta/8` for `Delta = 0.1`.
  A width of `Delta/10` is also a natural choice; it is a parameter (`W`)
  but was not simulated here.
- **Number formats and reset values.** `alpha1` starts at 1/8 and `alpha3` at
  0. The alignment registers, the 12-bit code format, and the PN polynomials
  and seeds are also this design's choice.
- **Recombination of stages 3 and 4.** Their nominal gain is used, with no
  calibration.

DAC element mismatch is modelled but not corrected. A converter whose
resolution is limited by it needs a separate mismatch correction alongside
this calibration.

The size error of the PN element acts differently from the other elements:
it changes the reference that the gain loop locks to. With 0.5% mismatch in
every element, `alpha1` still lands within 1% of `1/beta1`.

## Changing the design

- **Other stage geometry.** Change `M1..M4`, `MF` in `adc_cal_digital` and
  the stage models. `stage_decoder` and `error_detector` take `M` and
  `DELTA = 2/M` as parameters. Keep `Delta/2` representable to well below
  one output LSB, or widen `FRAC` in the package.
- **Other amplifiers.** Set `BETA1_S*` and `BETA3_S*` on `pipelined_adc`.
  The cubic loop converges as long as the uncorrected residue stays inside
  the next stage's range, i.e. `|beta1*Delta + beta3*Delta^3| < 1`.
- **Faster or slower adaptation.** Lower or raise `MU_REF`, or the individual
  `MU*` exponents. Each step of 1 doubles or halves the convergence time;
  the coefficient jitter moves the opposite way.
- **Calibrating more stages.** Instantiate further `calibrated_stage`s with
  `CUBIC = 0` or `1`. Each calibrated stage needs its own PN generator and
  the extra DAC element in its analog part.
