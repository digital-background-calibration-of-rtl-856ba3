# Background calibration of capacitor mismatch in a pipelined ADC: digital back end

Capacitor mismatch in the multiplying DAC (MDAC) of a pipelined ADC stage
corrupts the stage's residue. The error depends on which digit the stage decided,
so it shows up as a nonlinearity that gain calibration cannot remove. This RTL
measures and removes the mismatch in the background, while the converter runs
on its normal input. It needs no calibration signal and no extra precise
analog circuit.

The idea in one paragraph: on every sample the stage flips a coin N = ±1. For
N = +1 the feedback capacitor C_F closes the amplifier loop, as usual. For
N = −1 the sampling capacitor under calibration takes its place, and C_F drives
the reference instead. Swapping two capacitors changes the sign of their mismatch
in the residue. If the digital correction uses the right mismatch value, the
corrected residue does not depend on N. Any remaining error makes the corrected
residue correlate with N times the stage's most significant digit D_1. A
one-line LMS loop drives that correlation to zero:

    dh_M(n+1) = dh_M(n) − ε · R_hat · N · D_1,   ε = 2^-22

The RTL implements this for the converter it was designed around:

* A 13-bit pipelined ADC.
* A 2.5-bit first stage (m = 2: six comparators, three sampling capacitors),
  followed by eleven 1.5-bit stages (m = 1).
* The first three stages calibrated, all at the same time.
* Update step ε = 2^-22.

The analog parts are not included. These are the MDACs, the comparators and the
two-phase clock. The testbenches supply a real-valued model of them.

## Block structure

```
             comp[k] (thermometer codes of all 12 stages)
                 │
      ┌──────────┴──────────┐
      │ digit_encoder ×12   │──► digits D_i of the sample now in each stage
      └──────────┬──────────┘
                 │                       prbs_gen (N)  prbs_gen (M, stage 1 only)
                 │                              │           │
                 ├──────────────► cap_shuffle ×3 ◄───────────┘──► sw_conn (to MDAC switches)
                 │
      ┌──────────┴──────────┐
      │ delay_line ×12      │  stage k delayed 12−k clocks, together with its N and M
      └──────────┬──────────┘
                 │ aligned digits, N, M of one sample
      ┌──────────┴───────────────────────────────────────────┐
      │ back-to-front rebuild:  R_k = (D_{k+1} + R_hat_{k+1}) / 2^m_{k+1}   │
      │ stages 1–3: cal_stage = residue_corrector + mismatch_estimator       │
      └──────────┬───────────────────────────────────────────┘
                 ▼
         dout, code (registered), dc_est
```

| File | Contents |
|---|---|
| `rtl/adc_cal_pkg.sv` | digit and switch-connection types; the digit-routing rule shared by switches and correction |
| `rtl/prbs_gen.sv` | maximal-length LFSR for N and M |
| `rtl/digit_encoder.sv` | comparator thermometer code → ternary digits D_1..D_K |
| `rtl/cap_shuffle.sv` | hold-phase switch selection of a calibrated MDAC |
| `rtl/residue_corrector.sv` | mismatch-corrected residue R_hat |
| `rtl/mismatch_estimator.sv` | LMS accumulators dh_k |
| `rtl/cal_stage.sv` | corrector and estimator of one stage |
| `rtl/delay_line.sv` | alignment shift register |
| `rtl/adc_cal_top.sv` | the whole back end |
| `tb/adc_model_pkg.sv`, `tb/analog_pipeline_model.sv` | real-valued model of comparators and mismatched MDACs (simulation only) |

## Where the switches go (cap_shuffle)

In phase 1, every capacitor of a stage samples the input x. In the hold phase,
`cap_shuffle` chooses a connection for each capacitor. The connection is one of
−Vref, 0, +Vref, or the residue output (that is, feedback). Take M as the
capacitor under calibration (`sel` = M−1):

| capacitor | N = +1 | N = −1 |
|---|---|---|
| C_F | feedback | reference of D_1 |
| C_S,M | reference of D_1 | feedback |
| C_S,1 (if M ≠ 1) | reference of D_M | reference of D_M |
| other C_S,k | reference of D_k | reference of D_k |

D_1 is the digit from the two centre comparators, which sit at ±Vref/2^(m+1).
It is zero only for small inputs. Routing it to the capacitor under calibration
therefore makes almost every sample useful. A sample with D_1 = 0 leaves the
estimate unchanged. In a 1.5-bit stage, K = 1 and the table reduces to a plain
C_F/C_S swap.

One choice here resolves an ambiguity in the scheme. It could be read as driving
C_F from D_M when N = −1. This design drives C_F from D_1 instead. Only D_1 is
consistent with the switch budget of the scheme, which has three extra switches
that connect C_F to D_1. It is also the only reading under which the C_F↔C_S,M
swap is a true exchange of roles. The sum of the applied digits is D in either
case.

## Correcting the residue (residue_corrector)

This is the least obvious part. The back end measures the residue as R. Normalise
the capacitors to C_F, so c_F = 1 and c_k = 1 + δ_k. Charge conservation then
gives

    Ctot·x = c_fb·r + Σ_(j not in feedback) c_j·d_j,     Ctot = 2^m + Σδ_k

Here d_j is the digit routed to capacitor j, and c_fb is the capacitor in
feedback. With the estimates dh in place of δ, and dropping only second-order
terms, the hardware computes:

    Y     = R + D + [N = −1]·dh_M·R + Σ_(j not in feedback) dh_j·d_j
    R_hat = Y·(1 − Σdh_k / 2^m) − D

* `R_hat + D` estimates 2^m·x. `R_hat` is the residue an ideal stage would have
  produced.
* The factor (1 − Σdh/2^m) removes the stage's gain change caused by mismatch.
  Without it, a mismatched later stage would act as an interstage gain error
  for the stage before it.
* Two multipliers are used: dh_M·R, needed only when N = −1, and Y·Σdh.
  Everything else is add or subtract, because digits are −1, 0 or +1.
* For a 1.5-bit stage the expression equals R_hat = R − N·dh·(R − D_1)/2. This
  is the first-order form of the corrected residue.
* What is left after correction is a gain term of order (Σδ/2^m)², which does
  not affect linearity.

Fixed-point formats:

| Quantity | Format |
|---|---|
| Residues (`W` = `FRAC`+4 = 20 bits) | signed, `FRAC` = 16 fraction bits, units of Vref |
| Estimates | `FRAC`+`DGUARD` = 20 fraction bits, range ±1/4 |

The corrected residue is rounded to the nearest LSB.

## Estimating the mismatch (mismatch_estimator)

Each capacitor has one accumulator, with `FRAC + EPS_SHIFT` fraction bits. The
accumulator of the capacitor used on a sample subtracts V = R_hat·N·D_1. V is
just ±R_hat or 0, so the update is one adder and no multiplier. With these
formats the step is exactly 2^-EPS_SHIFT. The accumulators reset to zero and
saturate at ±1/4. The correction uses their top `FRAC+DGUARD` fraction bits.

The step size sets a trade-off. A smaller ε averages away more of the input
signal's interference, but settles more slowly. Measured in simulation with a
uniform or sine input:

* A 1.5-bit stage settles with a time constant of about 4/ε samples.
* The 2.5-bit stage takes about twice as long, about 9/ε, because each
  capacitor is updated on only one sample in three.
* The steady-state jitter of an estimate scales with √ε. It is about 1·10^-3
  at ε = 2^-19.

At the default 2^-22, these time constants are about 19 M and 37 M samples.
The jitter is then a few 10^-4, which is small against 0.25 % mismatch.

## Timing, alignment and the output

* **Stage timing.** Each stage is taken to hold one sample per clock. Sample s is
  in stage k during clock s+k−1.
* **Comparator path.** The comparator outputs `comp` of each stage pass
  combinationally through `digit_encoder` and `cap_shuffle` to `sw_conn`. The
  comparators resolve, then the hold-phase switches are set from them.
* **N and M.** These are registers. They advance every clock and are stable for
  the whole clock.
* **Alignment.** Stage k's digits, together with the N and M used on that
  sample, are delayed 12−k clocks. All stages of one sample then meet.
* **Rebuild.** The sample is rebuilt from stage 12 forward:
  R_k = (D_{k+1} + R_hat_{k+1}) / 2^{m_{k+1}}. The last stage's residue is not
  digitised and counts as zero. This single combinational path includes the
  three correctors; pipeline it if timing requires.
* **Output.** `dout` is x with 16 fraction bits. `code` is round(x·2^12),
  saturated to 13-bit two's complement. Both are registered. The code of a
  sample taken at clock edge t appears after edge t+12.
* **Start-up.** `out_valid` rises 12 clocks after reset. Estimates update only
  while `out_valid` is high.
* **Modes.** `swap_en = 0` forces N = +1 and M = 1, which is a conventional
  MDAC. `cal_en = 0` applies no correction and freezes the estimates. These give
  the three operating modes the scheme is compared in: swap/cal off/off, on/off
  and on/on.

Top-level ports of `adc_cal_top`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `swap_en`, `cal_en` | in | 1 | mode inputs |
| `comp[12]` | in | 6 each | comparator outputs. Bit j is the j-th threshold counted from the most negative. 1.5-bit stages use bits 1:0 |
| `sw_conn[3][4]` | out | `conn_t` | hold-phase connection of C_F (index 0) and C_S,k (index k) of stages 1–3. Unused entries of the 1.5-bit stages are `CONN_ZERO` |
| `dout` | out | 20 | reconstructed sample, signed, 16 fraction bits |
| `code` | out | 13 | output code, two's complement |
| `out_valid` | out | 1 | a complete conversion is on the outputs |
| `dc_est[3][3]` | out | 19 each | current mismatch estimates, 20 fraction bits. Unused entries are 0 |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_STAGES` | 12 | pipeline stages |
| `STAGE1_BITS` | 2 | effective bits m of stage 1 (others are 1.5-bit) |
| `NUM_CAL` | 3 | leading stages with swapping and calibration |
| `EPS_SHIFT` | 22 | update step ε = 2^-EPS_SHIFT |
| `FRAC` | 16 | residue fraction bits (this design's choice) |
| `DGUARD` | 4 | extra fraction bits of the estimates (this design's choice) |
| `ADC_BITS` | 13 | output code width |

The stage count, the first-stage resolution, the number of calibrated stages,
the step size and the 13-bit resolution are those of the reference converter.

## What the simulations show

Each testbench checks its module against values computed independently. They
use the behavioural stage model where needed, and each prints
`TB_RESULT checks=N failures=M`.

**`tb_adc_cal_top`** runs the full pipeline with `EPS_SHIFT` = 19 so that it
settles within the run. The stage-1 mismatches are +1.2 %, −0.8 % and +0.6 %,
stage 2 is −1.0 % and stage 3 is +0.8 %. Stages 4–12 have ±0.05 %. Full-scale
sine input; errors are in 13-bit LSB against the ideal input:

| swapping / calibration | rms error | max error |
|---|---|---|
| off / off | 5.34 | 15.5 |
| on / off | 6.19 | 21.8 |
| on / on, after 18 M samples | 0.35 | 1.4 |

Swapping alone makes the error slightly worse: it turns the mismatch error into
noise rather than removing it. Correction removes it. The estimates end within
0.003 of the model's mismatches, which is the test's tolerance.

The same test checks several other things:

* With ideal capacitors, every code equals the rounded input.
* The latency is 12 clocks.
* Saturation at full scale.
* Each mechanism occurs at least once: swaps, the selection of each capacitor,
  D_1 = 0 samples, both off modes, and updates.

**`tb_adc_cal_top_full`** leaves every parameter at its default (ε = 2^-22) and
runs 40 M samples with the same mismatches. It checks:

* exact conversion with ideal capacitors;
* that every estimate has moved from zero towards its mismatch without
  overshooting;
* that the output error has dropped.

In that run the rms error falls from 5.35 to 1.95 LSB. The stage-2 and stage-3
estimates reach 88 % and 94 % of their mismatches, and the stage-1 estimates
about 66 %.

**`tb_cal_stage`** closes the loop around a 2.5-bit and a 1.5-bit stage model
(ε = 2^-19, 16 M samples), checks convergence, and checks that with
calibration off the residue passes through unchanged.

**`tb_cal_stage_dc`** drives the same two stage models with constant inputs.
Since the loop needs only D_1 ≠ 0, the estimates converge for x = +0.6 and
x = −0.45. For x = 0.05, inside the band where D_1 = 0, they stay exactly at
zero.

**`tb_cal_stage_gain`** repeats the loop test with a residue gain error of
+2 % in the 2.5-bit stage model and −2 % in the 1.5-bit one (ε = 2^-18, 10 M
samples). As the analysis predicts, a leftover gain error only scales each
estimate by about (1 + gain error). After 8 M samples the estimates were
0.0204, −0.0155 and 0.0082 (mismatches 0.02, −0.015 and 0.01), and −0.0139
(mismatch −0.012). All were within the 0.003 tolerance.

**`tb_residue_corrector`** feeds exact residues of randomly mismatched stages
(up to ±0.5 %) with the true mismatches as estimates. It requires R_hat + D =
2^m·x within 6 LSB of 2^-16.

The remaining testbenches check the LFSR against a reference polynomial, the
digit encoder against the thresholds, the switch table exhaustively, the
accumulators against an integer model including saturation, and the delay line.

## Departures and limits

* **Analog side.** The MDAC, the comparators and the non-overlapping clock
  generator are not part of the RTL. `sw_conn` must be gated with the hold
  phase by the switch drivers. During the sampling phase all capacitors connect
  to the input, as in any flip-around MDAC.
* **Gain error.** Amplifier gain error is assumed to be handled by a separate
  gain calibration, as the scheme assumes. With a gain error δg the estimates
  converge to (1+δg)·δ, and the resulting error is negligible.
* **Fully differential stages.** These need no other logic. The estimate then
  stands for the sum of the positive-side and negative-side mismatches.
* **Stage timing.** Stages are taken to operate one per clock. Real pipelines
  often run adjacent stages on opposite clock phases. In that case shorten
  the `delay_line` depths to match.
* **Random sources.** The LFSRs that produce N and M are this design's choice:
  x^32+x^22+x^2+x+1 with a different seed per stage for N, and a 16-bit
  maximal LFSR modulo 3 for M. Modulo 3 is exactly uniform over the period.
  Consecutive M values are correlated; the estimator needs only that each
  capacitor is chosen equally often. The modulo is exactly uniform only when
  2^m − 1 divides 2^16 − 1 (m = 1, 2, 4, 8). For other first-stage sizes,
  widen the M generator to a multiple of m bits.
* **Corrected-residue form.** The charge-conservation form above is this
  design's own. It matches the first-order corrected residue of the scheme.
* **Test mismatches.** The end-to-end tests use about 1 % mismatch instead of
  the 0.25 % σ of the reference converter. At the default step size, the
  ~30 M-sample convergence to better than 12 bits was not run to completion. The
  full-size test covers its first 40 M samples at larger mismatch and checks
  only the direction of convergence.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/adc_cal_pkg.sv tb/adc_model_pkg.sv tb/tb_adc_cal_top.sv --top-module tb_adc_cal_top
./obj_dir/Vtb_adc_cal_top
```

Replace `tb_adc_cal_top` with any other `tb_*` module to run that test.
`tb_adc_cal_top` takes about a minute and `tb_adc_cal_top_full` a few
minutes. To change the converter, override the top's parameters. The
testbenches assume the default stage structure.
