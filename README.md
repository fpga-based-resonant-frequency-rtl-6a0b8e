# Resonant-frequency-tracking class-D drive for an ultrasonic transducer

Piezoelectric ultrasonic transducers are built with a high Q factor. They convert
power well only in a narrow band around their resonance, and that resonance moves
with temperature and load. This controller keeps a class-D amplifier on the
transducer's resonance. It measures whether the transducer current leads or lags
the driving voltage. It then nudges the drive frequency up or down by one small
step per drive period. For a high-Q transducer, voltage and current are in phase
at resonance, so the loop settles there and follows the resonance as it drifts.

The same logic also forms the drive waveform. It is a three-level "one-pulse" PWM:
one +Vdd pulse and one −Vdd pulse per period, with zero in between. The pulse
edges are placed to minimise the distortion left after the output filter. The
outputs are the four gate commands of an NMOS H-bridge.

The RTL is plain synthesizable SystemVerilog, about 72 flip-flops in total. It is
meant for a small FPGA clocked at 50 MHz.

## Signal flow

```
 v_cmp --+
         +--> phase_detector --(+1/-1)--> dx_updown_counter --dx--> toggle_counter
 i_cmp --+    (once per voltage period)   (dx +/- 1, clamped)             |
                                                                          | x (triangle)
                                                                          v
 gates <-- bridge_driver <--level-- one_pulse_pwm <-----------------------+
 (a_hi, a_lo,  (dead time)          (x > x3: +1, x < x1: -1, else 0;
  b_hi, b_lo)                        x1, x2, x3 fixed by tau)
```

Outside the FPGA are the analog parts:

- digital isolators and gate pre-drivers;
- the H-bridge;
- an LLCC band-pass filter (11 kHz to 80 kHz) and a 1:1 transformer;
- the transducer, with a shunt resistor for sensing its current;
- two sensing amplifiers and two comparators.

The comparators return the filtered driving voltage and the transducer current
as square waves, `v_cmp` and `i_cmp`. These are the only feedback the
controller gets.

## The oscillator and its numbers

`toggle_counter` is the loop's oscillator. A 24-bit register `x` counts up by
`dx` every clock. When the next step would pass XMAX = 2^24−1, it turns round and
counts down. When the next step would go below 0, it turns round again. The result
is a triangle wave. One period covers 2·XMAX, so

    f_drive = f_clk · dx / (2 · XMAX)        (f_clk = 50 MHz)

At a turn, the part of the step that overshoots is reflected back from the limit.
This keeps every sweep exactly 2·XMAX long. The average frequency then follows the
formula exactly, instead of running fast by up to one step per turn.

| quantity | value at the defaults |
|---|---|
| frequency step per dx LSB | 50e6 / (2·(2^24−1)) = 1.490 Hz |
| start word (35 kHz) | dx = 23488 (35 000.1 Hz) |
| tuning range (20–80 kHz) | dx = 13422 … 53687 |
| triangle period | 2500 clocks at 20 kHz, 1428 at 35 kHz, 625 at 80 kHz |

`rft_pkg::dx_from_hz()` turns the frequency parameters of the top into these
words at elaboration time. If you change `CLK_HZ`, the words follow. The
resolution and the 16-bit dx range (up to 97.7 kHz at 50 MHz) do not change,
because they depend only on `rft_pkg::X_W` and `rft_pkg::DX_W`.

## The tracking loop

`phase_detector` synchronises both comparator outputs with two flip-flops each.
It takes one decision at every rising edge of the voltage square wave. If the
current square wave is already high at that moment, the current crossed zero first
and leads the voltage, so the result is +1. Otherwise the current lags and the
result is −1. Below resonance the transducer looks capacitive and the current
leads. Above resonance it looks inductive and the current lags. So the rule
"+1 → dx+1, −1 → dx−1" in `dx_updown_counter` always moves the frequency towards
resonance.

Consequences worth knowing:

- **Slew rate.** There is one step per drive period, so the frequency can move by
  at most 1.49 Hz per period. At 35 kHz that is about 52 kHz/s. A 1 kHz drift is
  followed in about 20 ms.
- **Steady state.** This is a bang-bang loop, so it never sits still. Once locked,
  dx dithers over a few LSBs (2 to 5 in simulation) around the zero-phase
  frequency. The frequency
  error is set by the 1.49 Hz step. The phase error is that step times the phase
  slope of the transducer.
- **Phase detector range.** The rule is correct for phase differences within
  ±180°. Near a high-Q resonance the phase is small, so this is not a limit in
  practice. Far from resonance the sign is still right, which is all the loop
  needs.
- **Capture range.** The transducer's electrode capacitance makes it capacitive
  again above its parallel resonance, which typically lies 5 to 20 % above series
  resonance. There the current leads once more. The ±1 rule therefore pulls the
  drive towards resonance only from below resonance, or from between the series
  and parallel resonances. If the drive starts well above the parallel resonance,
  it runs off upwards to the band edge. This is why the loop starts at the
  nominal frequency. It also means a resonance that jumps far downwards is lost,
  while one that drifts is followed.
- **Limits.** dx saturates at the 20 kHz and 80 kHz words. A refused step is
  flagged on `dx_at_min` or `dx_at_max`. If the transducer's resonance lies outside
  the band, the drive parks at the nearest edge.
- **Enable.** With `en` low, all four switches are off and dx is frozen. The
  triangle keeps running, so the drive restarts at the same frequency.
- **Start-up.** After reset, dx holds the nominal-frequency word (35 kHz). The
  phase detector gives no decisions until the voltage comparator toggles, that is,
  until the bridge is driving.

`SAMPLE_DIV` makes the detector decide only every N-th voltage period, which slows
the loop. Its default is 1.

## One-pulse PWM

Normalise the drive period to 2π. The waveform is:

| interval | level |
|---|---|
| 0 to τ | 0 |
| τ to π−τ | +1 |
| π−τ to π+τ | 0 |
| π+τ to 2π−τ | −1 |
| 2π−τ to 2π | 0 |

The waveform has odd, quarter-wave symmetry. Its Fourier series has only odd
harmonics, with amplitudes

    a_n = 4/(nπ) · cos(nτ),    modulation index m = a_1 = 4/π · cos τ

Weighting the harmonics with the output filter's response and minimising the
resulting THD gives τ = 0.517 rad. That corresponds to m = 1.107 and about 2.4 %
THD at the transducer, against 15.3 % for a plain square wave (τ = 0). τ is the
`TAU_RAD` parameter of the top.

`one_pulse_pwm` forms this waveform by comparing the triangle with three fixed
levels. The rising midpoint of the triangle is taken as t = 0, so the peak falls
at π/2 and the trough at 3π/2. Then:

    x > x3 = XMAX·(1/2 + τ/π)   → +1   (pulse centred on the triangle peak)
    x < x1 = XMAX·(1/2 − τ/π)   → −1   (pulse centred on the trough)
    otherwise                   →  0
    x > x2 = XMAX/2             → fund_pos (positive half of the fundamental)

At the defaults, x1 = 5 627 645, x2 = 8 388 608 and x3 = 11 149 570. Because the
levels are fractions of the triangle's full swing, the pulse shape stays the same
at every frequency the loop chooses. The timing resolution is one clock: 0.0044 rad
at 35 kHz and 0.010 rad at 80 kHz. `rft_pkg::x_point()` computes the levels. With
τ = 0 they coincide and the output is a two-level square wave.

## Bridge commands

`bridge_driver` maps the levels onto the two legs of the H-bridge:

| level | leg A | leg B | bridge voltage |
|---|---|---|---|
| +1 | high | low | +Vdd |
| −1 | low | high | −Vdd |
| 0 | low | low | 0 |

In the zero state both low-side switches are on. When a leg changes over, both of
its switches stay off for `DEAD_CYC` clocks. The default is 10 clocks, or 200 ns.
After that the new switch turns on. An assertion checks that no leg ever has both
switches on. Dead time shortens each ±1 pulse by `DEAD_CYC` clocks. At 35 kHz that
is 0.7 % of the period.

## Parameters of `rft_amp_top`

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | clock frequency |
| `F_NOM_HZ` | 35 000 | start frequency after reset |
| `F_MIN_HZ`, `F_MAX_HZ` | 20 000, 80 000 | tuning range |
| `TAU_RAD` | 0.517 | switching time of the one-pulse PWM |
| `DEAD_CYC` | 10 | dead time in clocks |
| `SYNC_STAGES` | 2 | synchroniser depth on the comparator inputs |
| `SAMPLE_DIV` | 1 | voltage periods per tracking decision |

Ports of the top:

- **Inputs:** `clk`, `rst_n` (asynchronous, active low), `en`, `v_cmp`, `i_cmp`.
- **Drive output:** `gates` (struct `a_hi`, `a_lo`, `b_hi`, `b_lo`).
- **Observation outputs:**
  - `dx`, the frequency word;
  - `x`, the triangle;
  - `level` and `fund_pos`, from the PWM;
  - `pd_sample` and `pd_lead`, from the phase detector;
  - `dx_at_min` and `dx_at_max`, the tuning limits;
  - `x_down`, `x_top` and `x_bottom`, from the triangle counter;
  - `dead`, the dead-time flag.

## Files

| file | contents |
|---|---|
| `rtl/rft_pkg.sv` | widths, `level_t`, `gate_cmd_t`, frequency and switching-point functions |
| `rtl/phase_detector.sv` | synchronisers and bang-bang lead/lag decision |
| `rtl/dx_updown_counter.sv` | frequency word with saturation |
| `rtl/toggle_counter.sv` | triangle-wave oscillator |
| `rtl/one_pulse_pwm.sv` | comparison with x1, x2, x3 |
| `rtl/bridge_driver.sv` | gate commands with dead time |
| `rtl/rft_amp_top.sv` | the controller |
| `tb/transducer_model.sv` | behavioural model of power stage, filter, transducer and comparators (not synthesizable) |
| `tb/*_tb.sv` | self-checking testbenches: one per module, a waveform-spectrum test and two closed-loop tests |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog
ends a run that hangs. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rft_pkg.sv tb/rft_amp_top_tb.sv --top-module rft_amp_top_tb
./obj_dir/Vrft_amp_top_tb
```

| testbench | what it shows |
|---|---|
| `phase_detector_tb` | lead/lag sign for offsets of both signs, zero and near ±180°; one decision per period (every third with `SAMPLE_DIV` = 3); latency of 3 clocks |
| `dx_updown_counter_tb` | random ±1 requests against a reference model, both limits, freezing while disabled |
| `toggle_counter_tb` | x, mode and turn pulses against a reference model; measured period equals 2·XMAX/dx |
| `one_pulse_pwm_tb` | thresholds from τ; pulse widths (π−2τ)/2π; pulse centres on peak and trough; the τ = 0 square wave |
| `bridge_driver_tb` | gate commands against the dead-time rule; no shoot-through; all states reached |
| `rft_amp_top_tb` | closed loop, range narrowed to 34.0–35.8 kHz: lock to 34.97 kHz, follow drift to 34.5 kHz and 35.3 kHz, stop at both limits, enable/disable, period and pulse widths of the drive; about 3 s |
| `pwm_spectrum_tb` | Fourier coefficients of the generated waveform at 20, 35 and 80 kHz: a_1 = 1.107 (τ = 0.517) or 4/π (τ = 0), a_n up to n = 9 within 0.012 of 4/(nπ)·cos(nτ), no even or cosine terms |
| `rft_amp_full_tb` | closed loop at all default parameters: lock to 34.97 kHz, climb to the 80 kHz limit, follow a resonance stepping down in 5 % steps to the 20 kHz limit, re-lock at 35 kHz; about 50 s |

The closed-loop tests count every mechanism and fail if one never happens:

- lead and lag decisions;
- triangle turns at the top and at the bottom;
- both dx limits;
- dead times;
- the +1, −1 and 0 levels and the disabled state.

In both runs the mean drive frequency settles within about 1 Hz of the model's
zero-phase frequency. While locked, dx dithers over 2 to 5 steps.

The transducer model is a Butterworth–Van Dyke circuit: a series-RLC motional
branch (Q = 200) in parallel with an electrode capacitance of 4× the motional
capacitance. With this capacitance the zero-phase point sits f0·4/(2·Q²) above
series resonance, about 1.75 Hz at 35 kHz. That is below one tuning step, which
supports using zero phase as the resonance criterion. The voltage the model
returns is taken to be in phase with the fundamental of the bridge voltage.

The model leaves out three things:

- filter dynamics;
- the mechanical ring-up time of the transducer;
- comparator noise.

Its frequency estimate is averaged over about two periods. The loop has
therefore not been simulated against chattering comparators, or against the
slower phase response of a real high-Q transducer. That slower response would
widen the dither.

## Design choices and their limits

The loop structure, the ±1 tuning rule, the toggle-counter oscillator, the start
at the nominal frequency, the 20–80 kHz target band, the three-point triangle
comparison and τ = 0.517 rad define the method. The following are this
implementation's choices:

- **Widths and clock.** The 50 MHz clock and the 24-bit triangle set the
  1.49 Hz step. A finer step needs a wider `X_W`. dx must stay below 2^DX_W.
- **Sampling time.** The tracking decision is taken at the voltage rising edge,
  once per period.
- **Triangle phase.** Taking the triangle's rising midpoint as t = 0 places the
  +1 pulse around the peak. x2 is used only as the zero-crossing reference
  `fund_pos`; it does not switch the bridge. Any reading that compares the
  triangle with levels symmetric about its midpoint gives the same waveform.
- **Dead time.** The dead time is made in the FPGA, 200 ns by default. Set
  `DEAD_CYC` to 0 if the gate drivers already provide one.
- **Zero state.** The zero state always uses the two low-side switches. This
  loads the low-side devices more than the high-side ones. Alternating the zero
  state is not implemented.
- **Limits and enable.** Saturating dx at the band edges and the `en` input are
  additions.
- **Lock indication.** There is none. A user can derive one from the `pd_lead`
  pattern, for example from alternating decisions.
- **Synthesis.** `rft_pkg` uses `real` arithmetic only at elaboration time. The
  result is constants, and no floating point is synthesised.
