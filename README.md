# Finite-gain correction for a 2-1 cascade ΣΔ modulator

A cascade (MASH) ΣΔ modulator gets its high-order noise shaping by
*cancelling* the first stage's quantization noise in a digital
reconstruction filter. The cancellation works only if the digital filter
matches the analog loop. Amplifiers with finite DC gain make every
switched-capacitor integrator leaky: `z⁻¹/(1 − z⁻¹)` becomes
`z⁻¹/(1 − p·z⁻¹)`, with `p` a little below 1 (`1 − p ≈ 1/A` for gain `A`).
First-stage noise then leaks to the output with only first-order shaping, and
the SNR of a nominally third-order converter collapses. How far it collapses
depends on each chip's amplifier gains.

This RTL is the digital half of a 2-1 cascade modulator that fixes this.
There are two parts:

1. **A reconstruction filter with programmable poles.** It uses the real
   poles `p1`, `p2` of the first two integrators, where the ideal filter
   assumes `p = 1`.
2. **A foreground measurement of `p1` and `p2` that needs only digital logic.**
   It uses a recycling shift register, two AND gates, an up/down counter and a
   one-sample delay. The analog modulator is reused as its own test circuit;
   no extra analog hardware is needed.

The method follows G. Leger and A. Rueda, *"Cascade ΣΔ modulator with digital
correction for finite amplifier gain effects"*. Everything about word lengths,
control signals, sequencing and interfaces is this implementation's own (see
[Choices and departures](#choices-and-departures)).

## The modulator around it

The analog part is not in `rtl/`. A behavioural model of it is in
`tb/sd21_modulator_model.sv`:

- **Stage 1**: a second-order double-loop modulator. It has two integrators with
  input gains 1/2, a 1-bit comparator (`y1`) and a 1-bit feedback DAC.
  Ideally `Y1 = z⁻²X + (1 − z⁻¹)²E1`.
- **Stage 2**: a first-order modulator (third integrator, comparator `y2`). It
  digitizes stage 1's quantization error, formed as `4·v2 − y1` (inter-stage
  gain k = 4). Ideally `Y2 = z⁻¹E1 + (1 − z⁻¹)E2` (up to the sign convention
  of E1).

All bits are read as +1 (logic 1) and −1 (logic 0).

## Reconstruction filter (`recons_filter`)

The ideal combination `Y = z⁻¹Y1 + (1 − z⁻¹)²Y2` cancels E1 and leaves
`(1 − z⁻¹)³`-shaped E2. With leaky integrators, stage 1 shapes E1 by roughly
`(1 − p1z⁻¹)(1 − p2z⁻¹)`. The filter therefore computes

```
Y = z⁻¹Y1 + (1 − p1·z⁻¹)(1 − p2·z⁻¹)·Y2
  = z⁻¹Y1 + Y2 − (p1+p2)·z⁻¹Y2 + p1·p2·z⁻²Y2
```

This is a first-order (Taylor) correction: it cancels the main part of the
leak, but not every term. With `p1 = p2 = 1` it is exactly the ideal filter.

Y1 and Y2 are single bits, so the signal path has no multiplier. Each
term adds or subtracts 1.0, `c1 = p1+p2` or `c2 = p1·p2`. The one multiplier
(p1·p2) is on the coefficient path, and `c1`/`c2` are registered.

- **Formats.** `p1`, `p2` are unsigned Q1.16 (`sd_cal_pkg::COEF_F = 16`,
  1.0 = 65536). `y_out` is signed with 16 fraction bits, 21 bits wide; |Y| ≤ 5.
- **Timing.** One sample per clock. `y_out` is registered: after the edge that
  samples `y1[n]`, `y2[n]`, it holds `y1[n−1] + y2[n] − c1·y2[n−1] + c2·y2[n−2]`.
  A coefficient change takes effect one clock later. `c2` is truncated to
  16 fraction bits.
- **No decimation.** The output runs at the modulator rate. Decimation (the
  testbenches use a sinc⁴ filter, decimating by 128) is left to the following
  stage.

## Measuring the poles

This is the least obvious part. A periodic bit sequence replaces the signal.
If the loop's integrators were ideal, the mean of the output bit-stream would
equal the mean of the sequence. With a leak, the output mean falls short by an
amount proportional to `1 − p`. Summing the difference between sequence and
output over N samples measures that shortfall.

**The sequence** (`seq_register`) is a recycling L-bit shift register loaded
with L−1 ones and one zero: `1 1 1 1 1 0` for L = 6. Its mean as ±1 levels is
`Q = (L−2)/L = 2/3`. The modulator applies it through its own feedback DAC
during the sampling phase, so no extra analog source is needed.

**The two configurations** are driven by `mod_mode`:

| Step | Analog switches | Feedback DAC bit | Loop being measured |
|------|-----------------|------------------|---------------------|
| 1 (`MODE_STEP1`) | input X disconnected; sequence into integrator 1 | `y1` | stage 1 (both integrators) → `p1` |
| 2 (`MODE_STEP2`) | integrator 1 disconnected from integrator 2; sequence into integrator 2 | `y1` **delayed one sample** (`fb_delay`) | integrator 2 alone, with a delayed feedback → `p2` |

In both steps the first-stage comparator `y1` is the output compared with the
sequence.

**The counter** (`pole_counter`) has two AND terms:
`up = seq ∧ ¬y1` and `down = ¬seq ∧ y1`. It therefore holds half the sum of
`(seq − y1)` in ±1 units. Over N samples, that sum settles near

```
Step 1:  Σ(seq − y1) ≈ 2·N·Q·(1 − p1)
Step 2:  Σ(seq − y1) ≈ 2·N·(1 − p2) / ln((3L − 5)/(L − 5))      (L > 5)
```

The counter holds half of these values. The testbench model confirms the
factor of two: using it, the estimates land within a few per cent of the
model's poles.

**Offset cancellation.** An input-referred offset also shifts the output mean.
Each step is therefore run twice: once with the sequence and once with its
complement (`invert`). The second count is subtracted from the first by
reversing the counter's direction (`sub`). The offset terms cancel and the
pole terms add, so the count doubles. `OFFSET_COMP = 0` skips the second pass.

**The estimator** (`pole_estimator`) turns the count into `p = 1 − count·K`,
where

```
K1 = L / (N·(L−2)·(1+OFFSET_COMP))                 (Step 1)
K2 = ln((3L−5)/(L−5)) / (N·(1+OFFSET_COMP))        (Step 2)
```

Both are worked out at elaboration as integers with 16+20 fraction bits and
applied with one constant multiplier. With N, L chosen so that `N·Q` is a
power of two, this reduces to a shift. The defaults (N = 33000, L = 6) are not
such a choice. The result is clamped to `0 ≤ p ≤ 1`.

## Calibration sequence (`cal_controller`)

A pulse on `cal_start` (while idle) runs:

```
Step 1: settle SETTLE, count N (sequence) | settle SETTLE, count N (opposite) | latch p1
Step 2: settle SETTLE, count N (sequence) | settle SETTLE, count N (opposite) | latch p2
```

- **Settling.** During settling the modulator runs in the new configuration
  but the counter is stopped. This lets it forget its previous state.
- **Sequence restarts.** The sequence register restarts at the start of every
  pass.
- **Counter clear.** The counter is cleared only between steps, so the two
  passes of a step accumulate into one result.
- **Duration.** `cal_busy` is high for exactly
  `2·((1+OFFSET_COMP)·(SETTLE+N) + 1)` clocks: 133 026 at the defaults.
- **Filter during calibration.** The reconstruction filter is frozen, since its
  inputs are not a conversion then.
- **Results.** The estimates go straight into the filter's coefficient
  registers (`p1`, `p2`). The raw counts are kept in `cnt1`, `cnt2`.
- **After calibration.** The modulator returns to `MODE_NORMAL` and `cal_done`
  rises.
- **Reset.** Coefficients reset to 1.0, so an uncalibrated part behaves like
  the ideal filter.
- **Direct load.** `p_wr` loads both coefficients directly, for instance
  values saved from an earlier calibration. It is accepted only while idle.

## Top level (`sd21_cal_top`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | sample clock; asynchronous active-low reset |
| `y1`, `y2` | in | 1 | comparator outputs of stage 1 and 2 |
| `mod_mode` | out | 2 | `MODE_NORMAL`, `MODE_STEP1`, `MODE_STEP2`: which analog switches to open |
| `test_bit` | out | 1 | sequence bit for the DAC's sampling phase in Step 1 and 2 |
| `dac1_bit` | out | 1 | bit for stage 1's feedback DAC (combinational from `y1`, except in Step 2) |
| `cal_start` | in | 1 | start a calibration |
| `corr_en` | in | 1 | 1: filter with `p1`, `p2`; 0: ideal filter (p = 1) |
| `p_wr`, `p1_wdata`, `p2_wdata` | in | 1, 17, 17 | direct coefficient load (idle only) |
| `cal_busy`, `cal_done` | out | 1 | calibration running; last calibration finished |
| `p1`, `p2` | out | 17 | coefficients in use by calibration/load (Q1.16) |
| `cnt1`, `cnt2` | out | 18 | raw counter results of Step 1 and Step 2 |
| `y_out` | out | 21 | reconstructed output, signed, 16 fraction bits |

Parameters: `N` = 33000 samples per pass, `L` = 6, `SETTLE` = 256,
`OFFSET_COMP` = 1, `CNT_W` = `$clog2(2N+1)+1` (18). The coefficient width
`COEF_F` is in `sd_cal_pkg`.

**Timing caveat.** `y1` must be stable before the clock edge at which the
analog side samples `dac1_bit`, because the path from `y1` to `dac1_bit` is
combinational outside Step 2. In the model this holds because the comparators
decide on the state after one edge, ready for the next.

## How well it works, and its limits

The testbenches use a real-valued model of the modulator with the
integrator poles set to `1 − 1/A`. The model has no thermal noise, slew or
saturation.

- **Pole estimates.**
  - 30–40 dB amplifiers: both estimates land within about 5 % of the model's
    pole error.
  - Above about 60 dB: the pole error is 1e-3 or less, and the counts shrink
    to ten or twenty. The estimate is then good only to a few counts (Step 2
    is the coarser). A larger N is the remedy.
- **SNR** (sine at 70 % of full scale, decimated by 128, 1024 points).
  - Poles 0.97/0.98: 80 dB uncorrected, 107 dB corrected.
  - Over 32 gain sets spread from 30 to 70 dB: the corrected SNR stays within
    101–109 dB, while the uncorrected one spreads over 87–105 dB. The mean gain
    is about 1.3 bits (it depends on the gain distribution).
  - In a few sets the correction costs 3–4 dB. There p1 and p2 are nearly
    ideal and the third integrator leaks strongly. The filter corrects only the
    first two poles, so the uncorrected filter happens to suit the third
    integrator's leak slightly better.
- **Offset sensitivity** (observed in the model, not a property of the RTL).
  With the opposite-sequence pass, a 0.1 % offset does not disturb the
  estimates. At 0.3 % the Step 2 estimate is off by about 20 % at 40 dB gain:
  the first-order loop of Step 2 locks into patterns that the subtraction does
  not fully cancel.

## Choices and departures

These follow the method in substance, but the details are this
implementation's:

- **Estimator arithmetic.** The estimator multiplies by a constant instead of
  shifting, so that the default N and L can stay as they are.
- **Automatic update.** The filter is updated from the counter results
  automatically at the end of a calibration, started by `cal_start` (e.g. at
  power-up). The method itself only requires the corrected coefficients to
  reach the filter somehow.
- **Settling.** The settling interval (`SETTLE`), the order of the passes,
  the clearing and freezing rules and all reset values are choices.
- **Word lengths.** The word lengths (Q1.16 coefficients, 18-bit counter,
  21-bit output) are choices, sized for gains up to 70 dB.
- **Test sequence.** It is `1 1 1 1 1 0` (L = 6, Q = 2/3); L must be above 5
  for the Step 2 formula.
- **Not corrected.** The third integrator's pole is not corrected. Decimation
  is not part of the RTL.
- **Not implemented.** The analog modulator itself (integrators, comparators,
  DACs, switches) is not implemented; only its behavioural model exists, for
  simulation.

## Files

`rtl/`:
- `sd_cal_pkg.sv`: formats, `test_mode_e`
- `seq_register.sv`: test sequence register
- `fb_delay.sv`: feedback delay selector
- `pole_counter.sv`: AND gates and up/down counter
- `pole_estimator.sv`: count → pole
- `recons_filter.sv`: reconstruction filter
- `cal_controller.sv`: sequencer and coefficient registers
- `sd21_cal_top.sv`: top level

`tb/`:
- one self-checking testbench per block: `tb_<module>.sv`
- `sd21_modulator_model.sv`: real-valued analog model
- `tb_sd21_cal_top.sv`: end to end at the default sizes (calibration of a
  leaky modulator with offset, then corrected against uncorrected SNR)
- `tb_sd21_gain_spread.sv` with helper `mc_channel.sv`: 32 converters with
  gains spread over 30–70 dB

Each testbench prints `TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -y rtl -y tb \
  rtl/sd_cal_pkg.sv tb/tb_sd21_cal_top.sv --top-module tb_sd21_cal_top -o sim
./obj_dir/sim
```

Replace `tb_sd21_cal_top` with any other testbench name; `-y` lets Verilator
find the other modules by file name, and the package is listed first so that it
is compiled before the modules importing it. The end-to-end test takes under a second and the gain-spread
test about ten seconds. To try other amplifier gains, change `PM1..PM3` in
`tb_sd21_cal_top.sv` or the gain formula in `tb_sd21_gain_spread.sv`.
