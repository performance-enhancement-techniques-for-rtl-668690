# Low-power clock generation: four digital timing circuits

Ring oscillators are cheap, small and tunable over a wide range, but they
pick up noise from their supply and accumulate jitter. Digital PLLs
replace the charge pump and loop capacitor with logic, but a fine
time-to-digital converter (TDC) costs power. This RTL models four circuits
that attack those problems at low power:

| prefix | circuit | main idea |
|---|---|---|
| `snc_` | noise-cancelling ring DPLL | Does not regulate the oscillator supply. It injects a known test signal onto the supply, measures how much of it reaches the loop, and cancels the supply sensitivity in the background. |
| `reg_` | regulated DPLL | A replica regulator feeds the ring's supply, but only in the slow integral path. The regulator can therefore be slow, low power and have high supply rejection. |
| `mdl_` | digital multiplying DLL (DMDLL) | Every fourth oscillator edge is replaced by the reference edge, which wipes out accumulated jitter. A 1-bit TDC and a frequency-locking loop (FLL) are enough to tune it. |
| `tdc_` | switched-ring-oscillator TDC (SRO-TDC) | A ring oscillator switched between two frequencies integrates the time difference. Its phase wraps instead of saturating, which gives first-order noise shaping with a sampling clock unrelated to the input. |

`pll_techniques_top` instantiates all four side by side. They share no
signals.

Everything digital is synthesizable SystemVerilog clocked by the circuit's
own reference. Everything analog is a behavioural model that uses `real`
ports and `#` delays: the oscillators, the current DACs with their
low-pass filters, and the regulator. Each model file says so in its first
line.

## Shared building blocks

The three loops use the same digital pieces.

- **`pfd3`**: a three-state phase-frequency detector. Two flip-flops are set by
  the reference and feedback edges and cleared together once both are high.
  The asynchronous clear feeds back from the flip-flop outputs. That is the
  classic circuit, and synthesis reports it as a combinational loop.
- **`bbpd_ff`**: the bang-bang phase detector. A flip-flop samples the PFD's DN
  output on the rising reference edge. DN high means the feedback edge came
  first, so `early = ~DN`, and early means the oscillator should speed up.
- **`dlf_accum`**: the integral path.
  - A 1-to-4 demultiplexer collects four decisions.
  - Once every four reference cycles, an 18-bit accumulator adds
    `KI*(2*ups - 4)`: +KI per early decision and −KI per late one.
  - The 4 LSBs are dropped and the 14 MSBs form `D_I`.
  - `en4` is the F_REF/4 strobe that the rest of the integral path runs on.
  - The accumulator resets to mid-scale and saturates at both ends.
- **`dsm2_15`**: a second-order error-feedback delta-sigma modulator. Its noise
  transfer function is (1 − z⁻¹)². It truncates the 14-bit word to 15 levels
  (0..14) and outputs the thermometer code for the 15 unit current sources.
  The input is scaled by 7/8 so the 15-level quantiser never overloads. The
  stored error is clipped to ±3 steps.
- **`dac15_lpf_model`** (model): the 15 unit elements, the resistor and a
  second-order 500 kHz low-pass filter. The output is `ones/14`, normalised
  to 0..1.
- **`fb_divider`**: the divide-by-N feedback divider (N = 4).

## Noise-cancelling DPLL (`snc_dpll`)

### Loop

The loop has two paths:

- **Proportional path.** The PFD's UP/DN pulses drive the oscillator
  directly through a 3-level DAC, so this path has no TDC quantisation.
- **Integral path.** `bbpd_ff` → `dlf_accum` → `dsm2_15` → DAC and filter
  set the control voltage `v_i`.

With a 375 MHz reference and divide-by-4, the output is 1.5 GHz.

### Supply-noise cancellation

This is the part that takes the most explaining.

The oscillator frequency depends on its supply. The DCO has a cancellation
path whose gain is set by a 5-bit code `D_C`. The net supply sensitivity is
`KN − KC·D_C`. In the model, that is zero at `D_C = 4`.

The right code depends on process, voltage, temperature and frequency, so
the loop finds it itself:

1. `test_signal_gen` produces a slow 4-bit triangle `D_TEST` with a
   97.7 kHz period at a 375 MHz reference. It is well below the loop
   bandwidth.
2. A digitally controlled resistor injects the triangle onto the
   oscillator supply as a 10 mV peak-to-peak ripple.
3. If the supply sensitivity is not cancelled, the loop corrects the
   resulting frequency error through the integral path. `D_I` then carries
   a copy of the triangle.
4. `cancel_cal` correlates `D_I` with the triangle's slope. For each
   period it computes the change of `D_I` over the rising half minus its
   change over the falling half.
   - If that difference exceeds ±`THR`, `D_C` steps by one: once per
     period, and towards the code that makes the triangle disappear.
   - From reset it takes about four periods (40 µs) to reach code 4.
   - It then dithers by one or two codes around it.
5. The code that cancels the test signal cancels any other supply noise
   too, because both enter the oscillator the same way.

`cal_en` switches the calibration on and off. When it is off, `D_C` holds.
The same code also sets the proportional-path bandwidth code
`I_BW = 31 − D_C`. In the model, a higher `I_BW` gives more proportional
gain.

## Regulated DPLL (`reg_dpll`)

The phase detector is the same PFD with a flip-flop. Its single early/late
bit drives two paths:

- **Bang-bang proportional path.** It goes straight to the oscillator
  (`reg_dco_model`, ±`KBB`). Nothing slow sits in it, so the loop delay
  stays short and the limit cycle small.
- **Integral path.** The same accumulator and delta-sigma DAC produce a
  control voltage. `ldo_reg_model` buffers that voltage onto the ring's
  supply.
  - The regulator is only in this slow path, so its output pole (5 MHz in
    the model) does not limit the loop.
  - Its rejection of noise ahead of it (`REJ`, −26 dB) attenuates supply
    noise before it reaches the ring.

## Digital MDLL (`dmdll`)

### Reference injection

- A multiplexer sits in the ring's loop (`dxro_model`: a mux plus three
  delay cells).
- `mdll_select` counts output edges. In every fourth cycle it raises
  `SEL`, and the multiplexer passes the reference instead of the ring's
  own signal.
- The next rising output edge is therefore the reference edge plus the
  multiplexer delay (10 ps in the model).
- This resets the jitter the ring has accumulated. The loop behaves like a
  first-order system, and low-frequency oscillator noise is suppressed up
  to about a quarter of the reference frequency.

### Tuning loop (1-bit TDC)

The injected edge hides the ring's own timing, so the TDC looks at the
edge that was replaced:

- The model's `out_nat` output is the ring's own waveform. In an injected
  cycle, it rises when the ring's own edge would have.
- `tdc1b` samples `out_nat` with FF1 on the reference edge. FF2, clocked
  by the inverted reference, resamples it.
- `D_TDC = 1` means the ring's edge came first: the ring is fast, and the
  tuning word moves down.
- `dlf_accum` and a delta-sigma DAC drive `V_TUNE`, which sets the delay
  cells' output time constant.
- In lock, the ring's own edge sits within a few picoseconds of the
  reference, so injection moves it very little.

### Frequency-locking loop

`fll_freq_det` finds the frequency error:

- The output, divided by 64, clocks a 14-bit counter. The counter is
  Gray-coded and synchronised into the reference domain with two flops.
- The counter is sampled every 2048 reference cycles.
- The sample is differenced with the previous one, and 128 is subtracted:
  2048·4/64 = 128 counts per interval at exactly 4× the reference.

`fll_accum` integrates the error. Its 14 MSBs go through a second
delta-sigma DAC to the regulator, which sets the ring's supply. The
regulator sits in this very slow loop, so it can be slow too.

### Start-up order

While the reference is injected, the ring always delivers exactly four
edges per reference period. The counter therefore reads 128 whatever the
ring's natural frequency. For that reason:

1. With `inj_en` low, `SEL` is forced low and the ring runs free. The FLL
   acquires the frequency in roughly 100–300 µs. Meanwhile the tuning
   accumulator receives alternating decisions and holds mid-scale.
2. Raise `inj_en` once `ferr` has stayed within ±1 count. Injection starts
   and the 1-bit TDC loop takes over, locking in about 50 µs.

## SRO-TDC (`sro_tdc`)

### Structure

- `tdg` (a PFD plus XOR) turns the delay between the rising edges of
  `t_ref` and `t_in` into a pulse `v_td`.
- Two 16-stage rings (`sro_model`) run in complementary fashion:
  - the positive ring at F_H while `v_td` is high and at F_L otherwise;
  - the negative ring the other way round.
- F_H = 1/(32 × 156 ps) ≈ 200 MHz. F_L = 0.3719·F_H is chosen
  non-commensurate with F_H so that no input gives a dead zone.
- Neither ring ever stops, so no phase is lost when it switches.

### Phase processing

On each sampling edge, each `sro_phase_proc` does the following:

1. Samples the 16 stage outputs, twice for metastability.
2. Locates the transition between adjacent stages, giving one of 32 phase
   segments.
3. Expresses the segment as a 31-bit thermometer code and ROM-encodes it
   to 5 bits.
4. Outputs the segment advance since the previous sample, modulo 32.

`D_OUT = D_P − D_N` (6 bits, signed). It is a first-order noise-shaped
measurement: the quantisation error of one sample is carried into the
next, because the ring phase is never reset. Averaged over many samples:

    E[D_OUT] = 32 · T_S · (F_H − F_L) · (2·Δt / T_C − 1)

This gives −8…+8 LSB over Δt = 0…T_C. The sampling clock is independent
of the carrier, so raising it raises the oversampling ratio.

The latency from a sampling edge to the corresponding `D_OUT` is 3 clocks.

## Behavioural models and their numbers

The analog parts are modelled only as far as the loops need. Their
numbers are choices, not measured values. Change them with parameters.

| model | key parameters | behaviour |
|---|---|---|
| `snc_dco_model` | F = 0.4 + 2.6·v_i GHz; KN = 1 GHz/V; KC = 0.25 GHz/V per code; KP0 = 0.05 GHz | Integral control, supply term (test signal + `v_noise`) with cancellation, and an UP/DN phase kick scaled by `1 + I_BW/31`. |
| `reg_dco_model` | F = 0.8 + 1.0·v_dd GHz; KBB = 4 MHz | Supply-controlled ring with a bang-bang step. |
| `dxro_model` | F = 0.8 + 1.2·v_dd + 0.1·(v_tune − 0.5) GHz; T_MUX = 10 ps; optional period jitter ±JIT_PS per half period (0 by default) | Injection when SEL. The next reference edge is predicted from the measured reference period. |
| `ldo_reg_model` | 5 MHz pole, REJ = 0.05 | First-order follower. |
| `dac15_lpf_model` | 500 kHz | Two equal poles. |
| `sro_model` | 156 ps/stage, F_L/F_H = 0.3719 | Event-driven phase integration: an output changes exactly when the phase crosses a segment boundary. |

These are not modelled:

- thermal and flicker noise of the oscillators;
- DAC element mismatch;
- flip-flop offset;
- the 3-level proportional DAC and the bias circuit as separate circuits
  (their effect is inside the DCO model);
- the measurement aids of the test chips (supply-noise monitor, on-chip
  delay line).

## Where this RTL goes beyond or departs from the original design

The published design leaves a number of things unspecified. These are
this design's choices:

- **Loop gains** are picked so that each loop locks within a few hundred
  microseconds of simulated time:
  - integral gain `KI` (2 in the noise-cancelling DPLL, 1 elsewhere);
  - FLL gain `KF = 256`;
  - the calibration threshold `THR = 8`.
- **Modulator and correlator internals:**
  - the delta-sigma modulator's internal structure and its 7/8 input
    scaling;
  - the correlator of the calibration engine;
  - the 4-bit test-signal code and its prescaler.
- **Reset behaviour:** every register resets. Accumulators reset to
  mid-scale.
- **Clocking details:**
  - the Gray-code crossing in the frequency detector;
  - the two-rank sampling in the SRO phase processor;
  - the choice of PFD output sampled by the bang-bang flip-flop (DN).
- **MDLL start-up** uses the `inj_en` input, which the original does not
  describe.
- **MDLL TDC input:** the 1-bit TDC samples the ring's own edge, which the
  oscillator model provides as `out_nat`.
- **Regulated DPLL divide ratio:** 4, as in the other two loops. The
  original only says its ratio is fixed.

## Files

- `rtl/pll_pkg.sv`: shared widths (`ACC_W = 18`, `DI_W = 14`, `DAC_LEVELS = 15`,
  `DC_W = 5`) and the thermometer-code function.
- `rtl/<block>.sv`: one module per file. Each header describes the
  interface, the timing, and which parts follow the original design.
- `tb/tb_<block>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

The testbenches need Verilator 5 with timing support. From the directory
that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -y rtl rtl/pll_pkg.sv tb/tb_snc_dpll.sv \
              --top-module tb_snc_dpll -Mdir obj_snc
    ./obj_snc/Vtb_snc_dpll

Replace `snc_dpll` with any block name. Every testbench finishes within
seconds. The full-system testbench `tb_pll_techniques_top` simulates about
560 µs of all four circuits together, at the top's defaults, in roughly
ten seconds. It checks:

- the SRO-TDC mean output at two input delays;
- lock of both DPLLs at 1.5 GHz;
- frequency acquisition of the MDLL, then exactly four output edges and
  one injection per reference period;
- calibration of the noise-cancelling DPLL, then holding `D_C` with
  calibration off;
- that each mechanism occurred, counting each one:
  - bang-bang early and late decisions;
  - delta-sigma level changes;
  - test-signal turning points;
  - calibration steps up and down, and calibration frozen;
  - FLL updates, injections, and TDC early and late decisions;
  - positive and negative TDC outputs, and ring phase wraps.

What the closed-loop testbenches show:

- **`tb_snc_dpll`**: a 20 mV supply step moves `D_I` by about 120 codes
  with `D_C = 0` and by about 4 codes after calibration. The peak PFD
  pulse falls from about 550 ps to about 100 ps.
- **`tb_reg_dpll`**: the same step moves `D_I` by about 15 codes. The phase
  error stays at the locked limit cycle of about 8 ps.
- **`tb_dmdll`**:
  - FLL acquisition, then injection;
  - the ring's own edge within 5 ps of the reference;
  - injected edges exactly 10 ps after the reference;
  - lock kept through a supply step.
- **`tb_sro_tdc`**:
  - the mean output within 0.05 LSB of the formula above at five input
    delays;
  - a bounded accumulated error, which is the noise-shaping property;
  - a monotonic transfer.

## Limits

- The models carry no random noise, except an optional white period
  jitter in `dxro_model`. The simulations therefore cannot reproduce
  jitter figures or phase-noise plots. The testbenches check function,
  lock, calibration direction and averaged transfer characteristics.
- `tb_dxro_model` uses that jitter (±3 ps per half period) to show the
  MDLL's central property:
  - running free, the time of 400 cycles spreads by about 50 ps rms (a
    random walk);
  - injected, the injected edge carries no jitter at all;
  - the three free edges after it stay within about 20 ps.
- The DCOs and the DXRO are ideal within their tuning laws. Absolute
  frequencies come from the model parameters, not from a circuit.
- The SRO model is linear: it has no stage-delay mismatch or switching
  skew. The TDC's linearity therefore comes out perfect in simulation.
