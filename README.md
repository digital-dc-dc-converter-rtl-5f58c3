# Digital buck-converter controller with predictive and feedforward PID control

This is the digital core of an integrated buck converter that steps a
1.8–3.6 V supply down to about 1.2 V. It regulates with a PID compensator
that has two additions for fast load transients:

- a **predictive ("jerk") term**: a fourth gain on the second derivative of
  the output-voltage error. It adds a left-half-plane zero, which raises
  the crossover frequency and the phase margin.
- a **feedforward term**: it measures how much the inductor current changed
  over the last switching cycle and pushes the duty cycle against that
  change before the output voltage has moved much.

The converter runs in PWM (fixed 1 MHz) at heavy load and switches to
pulse-skipping PFM at light load, where switching loss dominates.

The core has three parts, all clocked at 32 MHz:

- a **window SAR ADC**: 5 bits, converting only a 100 mV window around the
  reference, one conversion every 8 clocks (4 MS/s);
- the **PFPID controller**: predictive PID + feedforward, with PWM/PFM mode
  selection;
- a **hybrid DPWM**: a 5-bit counter plus a 16-tap delay line, giving a
  9-bit duty cycle at a 1 MHz switching frequency.

The analog parts are outside the RTL and appear as ports of the top module:
the power transistors, gate drivers, LC filter and inductor-current sensor.
A stand-alone **hysteretic differentiator** also sits in the top. It belongs
to the same design family (hysteretic voltage-mode control) but is not part
of this loop.

```
             vout_uv                 i_sense (10 mA/LSB)
                │                        │
        ┌───────▼────────┐   e[n]   ┌────▼───────────────────────────┐ duty ┌──────────────┐
        │ window_sar_adc ├─────────►│ pfpid_controller               ├─────►│ hybrid_dpwm  ├──► pwm
        │  sar_logic     │ 6 bit    │  ppid_iir  (P+I+D+jerk, IIR)   │ 9 bit│  counter +   │
        │  sar_cdac_     │ 4 MS/s   │  feedforward_ctrl  (Δi_L)      │      │  delay line  │
        │  comparator    │          │  mode_select  (PWM / PFM)      │◄─────┤ on_end,      │
        └────────────────┘          └────────────────────────────────┘      │ period_start │
                                                                            └──────────────┘
        hysteretic_diff: hd_x ──► hd_s, hd_md, hd_vr   (stand-alone)
```

## Window SAR ADC (`window_sar_adc`, `sar_logic`, `sar_cdac_comparator`)

The output voltage is almost always within a few tens of millivolts of its
target, so the ADC covers only the window 1.15 V to 1.25 V. This keeps the
voltage on the capacitor array, and its switching energy, small.

- **Resolution.** 5 bits over 100 mV gives 3.125 mV per LSB. Code 16 is the
  1.2 V target.
- **Error output.** The ADC outputs `e = 16 − code`, a signed 6-bit error
  that is positive when the output is low.
- **Clipping.** Inputs outside the window clip to code 0 or 31.

A conversion takes eight clocks:

| clock | 1      | 2    | 3..7                         | 8                    |
|-------|--------|------|------------------------------|----------------------|
| phase | sample | hold | decide b1 (MSB) .. b5 (LSB)  | output, `valid` high |

`sar_logic` is the synthesisable sequencer. Each bit cycle, it puts the bits
already decided plus the bit under test on `trial`. It keeps that bit if the
comparator reports that the held input is at or above the DAC level.

`sar_cdac_comparator` is a behavioural model, not synthesisable, of the
capacitor DAC and the comparator:

- It models a comparator input offset of 7 mV.
- An auto-zero phase stores that offset while the input is sampled, and
  every later decision subtracts it.

A change in the window, resolution or reference takes only three
parameters: `VLOWER_UV`, `VUPPER_UV` and `REF_CODE`.

## The predictive PID compensator (`ppid_iir`)

This is the block that needs the most care.

### From four gains to one difference equation

The compensator is

    C(s) = KP + KI/s + KD·s + KJ·s²

The KJ·s² term is the jerk term. It is discretised with the bilinear
(Tustin) transform:

    s → (2/T)·(1 − z⁻¹)/(1 + z⁻¹)

Over the common denominator (1 − z⁻¹)(1 + z⁻¹)² this becomes a single
third-order IIR filter:

    y[n] = K1·u[n] + K2·u[n−1] + K3·u[n−2] + K4·u[n−3]
           − y[n−1] + y[n−2] + y[n−3]

Writing kd = KD·2/T, ki = KI·T/2 and kj = KJ·4/T², the coefficients are:

    K1 =  KP + kd +   ki +   kj
    K2 =  KP − kd + 3·ki − 3·kj
    K3 = −KP − kd + 3·ki + 3·kj
    K4 = −KP + kd +   ki −   kj

`pfpid_pkg::ppid_coefs()` computes these from the four scaled gains, so a
retune means changing only the four gains. They are parameters of the top
and of `pfpid_controller`, with defaults `KP_DEF`, `KD2T_DEF`, `KIT2_DEF`
and `KJ4T2_DEF` in the package.

### Arithmetic

- **Coefficients.** All coefficients are in Q8: 16-bit signed values with 8
  fraction bits.
- **No multipliers.** Each coefficient has a 64-entry look-up table holding
  K·u for every possible 6-bit error u. The tables are constants built at
  elaboration. The datapath is therefore four table reads, an adder tree
  and three history registers.
- **Output format.** `y` is in duty LSBs with 8 fraction bits, in a 26-bit
  accumulator.
- **Clamp and anti-windup.** `y` is clamped to the DPWM range [0, 511·256].
  The clamped value, not the raw one, goes into the history. This prevents
  windup of the integrator while the duty cycle is saturated.

The default gains, all in duty LSBs per error LSB, are:

| gain      | KP  | KD·2/T | KI·T/2 | KJ·4/T² |
|-----------|-----|--------|--------|---------|
| value     | 1.5 | 8      | 1/16   | 1/2     |
| Q8 value  | 384 | 2048   | 16     | 128     |

They give K1 = 2576, K2 = −2000, K3 = −2000 and K4 = 1552. The gains were
chosen for a 3.3 V to 1.2 V buck with L = 1.5 µH and C = 20 µF, first with
an averaged loop model and then in closed-loop simulation of the RTL. They
are a working point, not an optimum; see the limitations below.

### Why the compensator runs once per switching period

The Tustin denominator has a double pole at z = −1. At z = −1 the numerator
reduces to 8·kj, so the compensator has unbounded gain at half its own
update rate: the jerk term contributes the double pole and the derivative
term a single one.

The ADC delivers four samples per switching period. If the compensator
consumed every sample, that resonance would sit at 2 MHz. The DPWM takes
only one duty value per 1 µs period, so the loop cannot act at 2 MHz, and
the loop oscillated.

The controller therefore enables the IIR on only one of every four samples
(`DECIM = 4`). T in the formulas is then the 1 µs switching period, and the
resonance moves to 500 kHz, where the plant can damp it.

### Which sample, and the half-switching-frequency limit cycle

The ADC and the DPWM run freely from the same reset. The four conversions
of a period are therefore sampled in clocks 0, 8, 16 and 24 of the 32-clock
period, and the choice of sample matters (`UPDATE_PHASE`).

- **Default: the sample from clock 8** (`UPDATE_PHASE = 1`).
  - Its result is ready by clock 17.
  - The DPWM takes it when the counter wraps at clock 31.
  - In closed loop at 1.0 A, the duty command then stays within about
    ±15 LSB of its average.
- **Alternative: the mid-period sample** (`UPDATE_PHASE = 2`).
  - The poles at z = −1 were only lightly damped by the loop.
  - With the coarse 3.125 mV ADC step, a period-2 limit cycle remained at
    1.0 A: the duty alternated between about 100 and 275 every period,
    giving about 13 mV of extra ripple.
  - None of the gain sets tried removed it.
  - It sustained itself with the feedforward turned off too, so it
    belongs to the compensator, not the feedforward.

### Known limitation: large-signal recovery

When the output leaves the ±50 mV ADC window, the error clips at ±16. The
loop then behaves like a relay with a PID behind it, not like a linear
controller. The recovery from such excursions depends sensitively on the
gains:

- **Where it is hardest.** The worst case in the tests is leaving PFM into
  a 0.6 A load. The output has already sagged by about 200 mV before the
  mode changes, so the loop starts far outside the window. With the
  default gains it settles after roughly 150 µs of large duty swings.
- **Gain sensitivity.** Neighbouring gain sets each failed at least one
  closed-loop check: KP from 1.25 to 1.75 and KD·2/T from 7 to 10.

A designer adapting this design should re-verify transients for their own
plant. Two changes would make the large-signal behaviour more robust than
the plain Tustin form used here:

- a wider ADC window or a coarse out-of-window mode;
- moving the Tustin poles from z = −1 to z = −a with a < 1.

## Feedforward from the inductor current (`feedforward_ctrl`)

The DPWM emits two strobes per period:

- `on_end`, in the first clock after the pulse;
- `period_start`, at the end of the off-time.

The inductor current is sampled at each strobe, giving `i_on` and `i_off`.
Their differences are the rise during the on-time and the fall during the
off-time:

    di_on  = i_on[n]  − i_off[n−1]
    di_off = i_off[n] − i_on[n]
    ff     = −KF · (di_on + di_off)      (Q8 duty LSBs, KF = 64)

The sum di_on + di_off is the net change of inductor current over the
cycle. It is zero in steady state and large just after a load step. The
term is added to the PID output.

- **Limit.** It is clamped to ±4096 (±16 duty LSBs), so a current glitch
  cannot swing the duty far.
- **When it is zero.** In PFM, and until two full cycles of samples exist.

The current code is 8 bits at 10 mA per LSB, which covers 0–2.55 A.

## PWM / PFM mode selection (`mode_select`, inside `pfpid_controller`)

Mode selection uses the mean of `i_on` and `i_off` as the cycle's average
current. It is evaluated once per period, and every change needs `HOLD = 8`
periods in a row:

- **PWM → PFM** when the average current stays below `I_PFM_TH = 20`
  (200 mA).
- **PFM → PWM** when the average current stays above `I_PWM_TH = 30`
  (300 mA).
- **PFM → PWM** also when every period of the run fired a pulse. This
  means pulse skipping no longer keeps up with the load.

In PFM the PID and feedforward are frozen. Each period gets either a fixed
pulse of `PFM_DUTY = 96` (when `e > 0`) or no pulse. In a skipped period
there is no on-time sample, so the on-time current is taken as equal to the
off-time current.

Reset starts in PWM. On return to PWM the PID resumes from its frozen state.

## Hybrid DPWM (`hybrid_dpwm`, `dpwm_delay_line`)

The 9-bit duty word is split as d = {M[4:0], L[3:0]}:

- The 5-bit counter runs 0..31 at 32 MHz, giving a 1 µs period. The pulse
  is high for clock cycles 0..M−1.
- In cycle M, a one-clock extension pulse enters a 16-tap delay line with
  a tap spacing of 31.25 ns / 16 = 1.95 ns.
- The output is `coarse | (ext & ~tap[L])`. It therefore falls L/16 of a
  clock after cycle M starts. The pulse width is (16·M + L) · 1.953 ns.
- d = 0 gives no pulse at all.

The duty word is latched as the counter wraps, so a new duty applies from
the next period on.

`dpwm_delay_line` is a behavioural model with ideal `#` delays; in silicon
it is a calibrated chain of delay cells. It is the only part of the path
that is not cycle-based logic. The testbench checks pulse widths to
picosecond resolution.

## Hysteretic differentiator (`hysteretic_diff`)

This block is a building block of hysteretic voltage-mode control. It
places an integrator in the feedback path of a comparator with hysteresis
±β/2:

1. The integrator output vR ramps by +STEP per clock while S = 1 and by
   −STEP while S = 0.
2. S switches to 0 when vR − x reaches +β/2, and back to 1 when it reaches
   −β/2.
3. vR therefore tracks the input x within ±β/2.

The average of md = (2S − 1)·STEP equals the slope of x:

- **Constant input.** S is a 50 % square wave of period 2β/STEP clocks,
  which is 32 clocks at the defaults β = 64 and STEP = 4.
- **Ramp input.** A ramp of r LSB per clock moves the duty cycle of S to
  (1 + r/STEP)/2.

It is a discrete-time, one-step-per-clock form of the analog circuit. In the
top it has its own input `hd_x` and its own outputs, `hd_s`, `hd_md` and
`hd_vr`.

## Top module (`pfpid_converter`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 32 MHz clock, active-low reset |
| `vout_uv` | in | 32 | output voltage in µV, as seen by the ADC sampler (behavioural analog input) |
| `i_sense` | in | 8 | inductor-current code from the current sensor, 10 mA/LSB |
| `pwm` | out | 1 | gate-drive pulse to the power stage |
| `adc_code`, `e`, `e_valid` | out | 5, 6, 1 | ADC code, error and its strobe |
| `duty`, `mode`, `period_start` | out | 9, 1, 1 | duty command, PWM/PFM mode, period strobe |
| `pid_sat`, `ff_limited`, `ff`, `duty_clamped`, `pfm_skip` | out | 1, 1, 26, 1, 1 | monitor outputs |
| `hd_x` / `hd_s`, `hd_md`, `hd_vr` | in / out | 12 / 1, 12, 16 | hysteretic differentiator |

The top's parameters are the gains `KP`, `KD2T`, `KIT2`, `KJ4T2` and `KF`.
They are in Q8 duty LSBs per error LSB and default to the package values.
`KJ4T2 = 0` with `KF = 0` gives a conventional PID.

Shared widths, types and the coefficient function are in `rtl/pfpid_pkg.sv`.

## How this implementation relates to the published design

These parts follow the published architecture:

- ADC → dual-mode PFPID controller → hybrid DPWM → power stage;
- the eight-clock 4 MS/s window SAR conversion at 32 MHz, with a 5-bit
  result and an auto-zeroed comparator;
- the K1..K4 formulas and the look-up-table products;
- feedforward from the on-time and off-time inductor-current changes;
- 1 MHz switching;
- the hysteretic differentiator's thresholds and period relation.

These are this implementation's own choices or departures:

- **Update rate.** "T" in the coefficient formulas is the compensator
  update period. Here that is the switching period, not the 32 MHz clock,
  for the reason given above.
- **Gains and window.** None of the gains, the ADC window limits (±50 mV),
  the error sign or the current-code scale is published.
- **Jerk zero.** The published design places the zero added by the jerk
  term at about 1/50 of the switching frequency (20 kHz). Here the zero of
  KD + KJ·s sits at KD/KJ = 2·kd/(kj·T), about 5 MHz. A 20 kHz zero with
  the same KD would need kj ≈ 127 duty LSB per error LSB. In Q8 that does
  not fit the 16-bit coefficients (3·kj would overflow), and it is far
  above any gain found stable with this ADC and update scheme.
- **Feedforward.** KF, its clamp and its sign convention are chosen here.
- **Mode rules.** The PWM/PFM thresholds, the HOLD filter, the pulse-run
  exit from PFM, the fixed PFM pulse and freezing the PID in PFM are all
  chosen here.
- **Delay line.** It is a single uniform 16-tap line, not a segmented one.
  The 5 + 4 bit split of the duty word is chosen here.
- **Hysteretic differentiator.** The discrete-time form is an own
  construction.
- **Transient performance.** The published silicon reaches about 20 mV of
  overshoot and about 5 µs settling for a 500 mA load step. This RTL, in
  the simulated plant below, shows about 53 mV of undershoot and 52 mV of
  overshoot, which reach the edges of the ±50 mV ADC window. It is back
  within ±10 mV after about 33 µs (load up) and 32 µs (load down).
- **PFPID against conventional PID.** The published design reports about
  55 % shorter settling and a third of the overshoot against a
  conventional PID. `tb_pid_comparison` runs both on the same step: the
  conventional PID is the top with `KJ4T2 = 0` and `KF = 0`. Peak deviation
  and settling into ±10 mV, sampled every clock:

  | load step | PFPID              | conventional PID   |
  |-----------|--------------------|--------------------|
  | +500 mA   | −53.6 mV, 33.5 µs  | −54.1 mV, 30.5 µs  |
  | −500 mA   | +51.6 mV, 32.0 µs  | +50.9 mV, 29.0 µs  |

  - The ADC clips during the step, so in this plant the peak is set by the
    ±50 mV window, not by the compensator.
  - Feedforward without the jerk term is unstable with the default gains.
  - The published improvement is therefore not reproduced by this RTL as
    tuned.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block
with an independent reference written in the testbench, and ends with a
`TB_RESULT checks=N failures=M` line. A watchdog ends any run that hangs.

| testbench | what it checks |
|---|---|
| `tb_sar_logic` | phase sequence, 8-cycle latency, every code against a comparator stub |
| `tb_sar_cdac_comparator` | decisions at every trial code, with the offset cancelled |
| `tb_window_sar_adc` | codes and error across and beyond the window, conversion rate |
| `tb_ppid_iir` | the difference equation against a reference model, clamp flags |
| `tb_mode_select` | mode rules, HOLD count, pulse-run exit, sample forwarding |
| `tb_feedforward_ctrl` | ff value, clamp, enable and start-up behaviour |
| `tb_pfpid_controller` | full reference model: decimation, modes, PFM pulses, duty clamp |
| `tb_dpwm_delay_line` | every tap delay |
| `tb_hybrid_dpwm` | pulse width for duty words, period, strobes |
| `tb_hysteretic_diff` | period, ±β/2 band, duty versus input slope |
| `tb_pfpid_converter` | closed loop with a buck model, at default parameters |
| `tb_line_regulation` | closed loop, input swept 1.8 V to 3.6 V at 0.5 A |
| `tb_pid_comparison` | the 500 mA step on PFPID and on a conventional PID, side by side |

`tb_pfpid_converter` models the power stage in the testbench: Vin = 3.3 V,
L = 1.5 µH, C = 20 µF and 20 mΩ ESR. It integrates every 0.5 ns and lets the
inductor current stop at zero in PFM. The run has these phases:

1. start-up from 0 V;
2. settling at 0.5 A;
3. a load step to 1.0 A and back to 0.5 A;
4. light load at 50 mA, where the converter must go to PFM;
5. 0.6 A, where it must return to PWM.

In each phase the test checks the output voltage and the mode. It also
counts every mechanism and fails if one never occurs: ADC clipping, PID
clamp, duty clamp, feedforward action and limit, both mode changes, PFM
pulses and skips, and fine delay-line edges. The hysteretic differentiator
gets a triangle input, and the test checks that the mean of md equals the
slope.

`tb_line_regulation` sweeps the input from 1.8 V to 3.6 V at 0.5 A load.
The average output stays within about 7 mV over the sweep, and the duty
command follows Vout/Vin (169 of 512 at 3.6 V, 327 at 1.8 V).

## Simulating

Use Verilator 5 with timing support. Compile the package together with the
testbench, and let `-y rtl` find the modules. `-y tb` finds `buck_plant`,
the power-stage model that `tb_pid_comparison` uses:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/pfpid_pkg.sv tb/tb_pfpid_converter.sv \
          --top-module tb_pfpid_converter -o sim
./obj_dir/sim            # add +trace for one line per switching period
```

Any other testbench runs the same way. The closed-loop tests take about a
second each.

## Changing the design

- **Gains.** Set the top's gain parameters, or change the defaults
  `KP_DEF`, `KD2T_DEF`, `KIT2_DEF` and `KJ4T2_DEF` in `pfpid_pkg.sv`. The coefficient tables follow automatically.
  `tb_ppid_iir` and `tb_pfpid_controller` state the gains (and the update
  sample) explicitly, so update them to match.
- **Resolution.** `ADC_BITS`, `CNT_BITS` and `FINE_BITS` in the package set
  the ADC and DPWM resolution. A different switching frequency means a
  different `CNT_BITS` or clock; also adjust `DECIM` in `pfpid_controller`
  so that the compensator still runs once per period.
- **Delay line.** For synthesis, replace `dpwm_delay_line` with a chain of
  technology delay cells that has the same ports.
