# Digital LLRF firmware for a 35.36 MHz buncher cavity

This is the FPGA part of a fully digital low-level RF (LLRF) controller for a single
buncher cavity driven by a generator at 35.36 MHz. It has three jobs:

1. **Lock to the accelerator reference.** The generator-driven system has no natural phase
   relation to the 35.36 MHz reference, so two digital phase-locked loops (Costas loops)
   lock an NCO to the reference. A *global phase* shifter sits between them. The second loop's
   frequency word then drives every output NCO.
2. **Regulate the cavity field.** The cavity pickup is demodulated to I/Q and converted to
   amplitude and phase by a CORDIC. Two PID loops, each with an open-loop bypass, set the
   amplitude and phase of the drive sent to the amplifier chain. A second output carries a
   phase- and amplitude-adjustable copy of the locked reference to another LLRF system
   (ISAC II).
3. **Drive the cavity tuner.** A step-motor controller makes step and direction signals at a
   programmable frequency and duty factor. It has three behaviours at the limit switches,
   programmable pin polarities and an up/down step counter. The tuning loop itself
   (detuning from drive and cavity phase) runs in PC software. The firmware only supplies
   the phases and moves the motor.

Everything runs on one sample clock. The CPU reaches the firmware through GPIO registers,
which are represented here by two packed structs: `llrf_cfg_t` in, `llrf_status_t` out.

```
 adc_ref ─► Costas PLL 1 ─cos,sin─► global phase shifter ─► Costas PLL 2 ──f──┐
                                         ▲ x (global_phase)                   │
                                                                              ▼
                                                   ┌── × ratio ──► NCO(P_Ref) ─► ×A_Ref ─► dac_ref
                                                   │
                                                   └── × ratio ──┬─► demod NCO ─┐
 adc_cav ─► I/Q mixer ◄─────────────────────────────────────────────────────────┘
              │ LPF, LPF                          │
              ▼                                   └─► drive NCO(P) ─► ×A ─► dac_cav
           CORDIC ─R─► (Aset−R) PID ─┬─ open/closed ─► RF on / pulse gate ─► A
                  ─Θ─► (Pset−Θ) PID ─┴─ open/closed ─► P

 limit pins ─► sync ─► polarity mux ─► motor_pulse_gen ─► en (polarity mux), dir, pulse
                                           └─► position_counter ─► status.motor.position
```

## How the outputs stay locked to the reference

This is the least obvious part of the design.

**Costas loop (`costas_pll`).** The input `x = A cos(ωc t)` is multiplied by the NCO's
`cos(ω0 t + φ)` and `sin(ω0 t + φ)`. After low-pass filtering this leaves
`I = A/2 cos Δθ` and `Q = A/2 sin Δθ`, where `Δθ = (ωc − ω0)t − φ`. The Q product is negated
so that the sign convention holds. The phase detector forms `Pe = I·Q = (A²/8) sin 2Δθ`.
A proportional-integral loop filter turns Pe into the NCO frequency word:

    f = ftw_center + kp·Pe/2^4 + Σ(ki·Pe)/2^12

In lock, Pe is zero and f is the input's frequency word. Because Pe depends on 2Δθ, the loop
can lock in phase or 180° out of phase, and cannot tell the two apart. Gains are run-time
inputs. Lowering them narrows the loop bandwidth and so reduces low-frequency phase noise
passed on from the reference.

**Global phase (`global_phase_shifter`).** PLL 1's NCO outputs cos θ and sin θ. A rotation
CORDIC makes cos x and sin x from the 32-bit global phase word x. The shifter outputs
`cos θ·cos x + sin θ·sin x = cos(θ − x)`. PLL 2 locks to this signal, so its NCO sits at the
reference phase minus x.

**Why the output NCOs follow PLL 2.** No phase is fed forward to the output NCOs, only
PLL 2's frequency word f (times the integer harmonic ratio). Every NCO accumulator is
cleared by the same reset and then adds its word every clock. So an NCO fed `N·f` holds
exactly N times PLL 2's accumulated phase, modulo one turn, plus a fixed offset from the
pipeline registers. Equal frequency words therefore mean locked phases. The practical
rules that follow:

- All NCOs must leave reset together.
- Changing the harmonic ratio while running keeps the outputs locked, but the phase
  offset is then arbitrary. Re-align it with the phase controls or a reset.

**Output phase.** The ISAC II reference output is an NCO with phase offset `p_ref`, followed
by a multiplier with amplitude `a_ref`. The cavity drive NCO's phase offset comes from the
phase loop.

## Cavity amplitude and phase loop (`amp_phase_ctrl`)

- The demodulating NCO and the drive NCO share one frequency word. With zero phase offset
  they are in phase, so the measured Θ is the cavity phase relative to the drive carrier,
  including cables and the amplifier.
- The mixer products pass through two cascaded first-order low-pass sections (`lowpass_iir`,
  coefficient 2^-4). These cut the sum-frequency term to about 0.2 %. At 100 MHz sampling,
  2 × 35.36 MHz folds to 29.28 MHz.
- `cordic_vector` gives `R = sqrt(I²+Q²)` (the cavity amplitude, half the pickup amplitude)
  and `Θ = atan2(Q, I)` as a 32-bit fraction of a turn. The phase loop uses its top 16 bits.
- `pid_ctrl` forms `e = set − measured` in 16-bit modular arithmetic, so phase errors wrap
  correctly at ±180°. It computes `(kp·e + I + kd·Δe)/2^8`, clamps the result to ±limit and
  holds the integrator while the output is clamped in the direction of the error. In open
  loop it outputs `open_val` and clears its state.
- The amplitude-loop output passes through `rf_pulse_gate` and then multiplies the drive
  NCO's cosine (`amp_modulator`). The gate offers RF off, CW, or pulse mode: on for `width`
  of every `period` clocks. The system starts in pulse mode and is then switched to CW. The
  phase-loop output becomes the drive NCO's phase offset P.
- Loop delay from `dac_cav` through a zero-delay cavity back to the PID is about 45 clocks,
  plus the filter time constants (about 16 clocks each).

## Tuner motor controller (`motor_controller`)

- The limit-switch pins are synchronised with two flops. Each then passes a polarity
  multiplexer that selects the pin or its inverse.
- `motor_pulse_gen` repeats a counter every `period` clocks. The step output is high for the
  first `high_time` clocks of each period.
- Modes:
  - `MOTOR_MANUAL` ignores the limits.
  - `MOTOR_SINGLE_HOLD` stops at an active limit in the present direction, but still runs
    in the opposite direction. This is the mode meant for operation.
  - `MOTOR_AUTO_REVERSE` reverses at a limit and keeps moving.
- Direction follows `dir_up` whenever that bit changes.
- The driver enable pin has its own polarity multiplexer.
- `position_counter` counts rising step edges while enabled: up in the up direction, down
  otherwise. It is a backup position reading when no potentiometer is fitted. `cnt_clear`
  zeroes it.
- `status.motor.up_limit` and `status.motor.down_limit` are the limit indicators.

## Number formats and timing

| Quantity | Format |
|---|---|
| ADC/DAC samples, I/Q, PID words | 16-bit signed |
| Cavity amplitude R | 17-bit unsigned, same scale as the samples |
| Phase, frequency words | 32-bit, 2^32 = one turn; f_out = ftw · f_clk / 2^32 |
| Nominal 35.36 MHz word | `FTW_35M36` = 1518700436, for a 100 MHz clock |
| PID gains | 16-bit unsigned, scale 2^-8 |
| Loop-filter gains | kp scale 2^-4, ki scale 2^-12 per clock |
| Harmonic ratio | 8-bit unsigned |
| Motor period, high time | 32-bit clock counts; step counter 32-bit signed |

| Block | Latency |
|---|---|
| `cordic_rotate`, `cordic_vector` | ITER + 2 clocks (ITER = 16), one sample per clock |
| NCO: phase offset to cos/sin | ITER + 3 clocks |
| Mixer, phase detector, loop filter, harmonic multiplier, modulator, gate | 1 clock each |
| PID | 2 clocks |

Parameters of `llrf_top`:

- `ITER`: CORDIC stages.
- `LPF_SHIFT`: filter coefficient.
- `KP_SHIFT`, `KI_SHIFT`: loop-filter scales.

Sample and phase widths come from `llrf_pkg` (`DW = 16`, `PH_W = 32`).

## Control and status

The `llrf_cfg_t` fields:

- `pll1` and `pll2`: start word and gains of each loop.
- `global_phase` and `harmonic`.
- `rf`: on/off, pulse mode, period, width.
- `amp` and `pha` (`pid_cfg_t`): set point, open-loop value, closed/open, kp, ki, kd, limit.
- `a_ref` and `p_ref`.
- `motor`: period, high time, mode, run, direction, three polarity bits, counter clear.

The `llrf_status_t` fields:

- Both loop-filter words and both phase-detector outputs.
- Cavity amplitude and phase.
- Drive amplitude and phase: the phase is what the tuning software compares with the
  cavity phase.
- The RF gate state.
- Motor position, limit indicators, moving and direction.

How these are packed into CPU registers is left to the integration.

## What is outside this RTL

- The ADCs and DACs: the sample buses are ports.
- The processor system: an ARM CPU running Linux, its GPIO register blocks, the USB HID
  command link to the local PC, Ethernet and DDR memory.
- The PC software: tuning loop, phase compensation of the amplifier chain, start-up
  sequencing.
- The cavity, amplifier and tuner mechanics.

## Design choices to be aware of

The block structure (the PLL chain with phase shifter, and the cavity loop with CORDIC,
PIDs, open-loop switches, amplitude multiplier and NCO phase input) follows the reference
design. So do the motor modes, polarity multiplexers and up/down counter. The following are
this implementation's own choices and may differ from the original firmware:

- All word widths, the 100 MHz sample clock, and every fixed-point scale.
- Sine generation by a CORDIC. The original used a vendor NCO core, with no amplitude input.
- First-order IIR low-pass filters, cascaded twice in the cavity loop.
- The PI form of the PLL loop filter, and separate gains for the second loop.
- The pairing of products in the phase shifter, which gives θ − x. The opposite sign would
  only invert the sense of `global_phase`.
- PID anti-windup, and clearing of the integrator in open loop.
- The pulse-mode timing (period and width in clocks). The reference design names pulse
  and CW modes without giving their timing.
- Synchronisers on the limit pins, and edge-detected counting. The original counter is
  clocked by the step pulse.
- The harmonic ratio applies to the cavity and ISAC II outputs alike.
- At a 100 MHz clock a ratio of 2 (70.72 MHz) is above Nyquist. The NCO phase is still
  correct, but the DAC would have to run faster or use an image. The simulation checks the
  phase relation only.

## Simulating

Any testbench in `tb/` runs with plain Verilator 5, for example the end-to-end one:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/llrf_pkg.sv tb/tb_llrf_top.sv --top-module tb_llrf_top
./obj_dir/Vtb_llrf_top
```

Each testbench prints `TB_RESULT checks=N failures=M`, and each has a watchdog. They
compare against values computed independently in floating point (sines, atan2, square
roots) or with 64-bit integer arithmetic.

What the testbenches check:

- **`tb_llrf_top`** (default parameters, a few seconds) runs the whole design against a
  reference source, a cavity model (gain ½, 7-sample delay) and a tuner model with
  active-low limit switches. It checks:
  - PLL lock.
  - Amplitude and steady phase of the ISAC II output.
  - A 45° global phase step: the output moves by −45°, modulo 180°.
  - A 30° P_Ref step.
  - Pulse-mode duty, then the switch to CW.
  - Open-loop and closed-loop cavity amplitude and phase.
  - The PID limit.
  - Single-side hold at the up limit, backing off, auto reverse and manual mode.
  - The step counter against the tuner model, and its clear.
  - Harmonic ratio 2.

  It counts each mechanism and fails if any never occurred.
- **`tb_costas_pll`** locks at +20 kHz and then −50 kHz offsets.
- **`tb_reference_pll_chain`** checks that PLL 2 follows global phase steps of +60° and −100°
  to within 1°.
- **`tb_amp_phase_ctrl`** closes both cavity loops through a delayed cavity model.
- The remaining block testbenches check their outputs, at the stated latencies, against a
  reference computation or the expected behaviour.
- Two assertions run in every simulation. One checks that single-side hold mode never
  issues a step into an active limit. The other checks that RF off silences the drive on
  the next clock.

## Files

- `rtl/llrf_pkg.sv`: widths, the nominal frequency word, the motor mode enum, and the
  config and status structs.
- `rtl/llrf_top.sv`: the top level.
- `rtl/reference_pll_chain.sv`, `costas_pll.sv`, `iq_mixer.sv`, `lowpass_iir.sv`,
  `phase_detector.sv`, `loop_filter.sv`, `nco.sv`, `cordic_rotate.sv`,
  `global_phase_shifter.sv`, `harmonic_ftw.sv`: reference locking.
- `rtl/amp_phase_ctrl.sv`, `cordic_vector.sv`, `pid_ctrl.sv`, `rf_pulse_gate.sv`,
  `amp_modulator.sv`: the cavity loop.
- `rtl/motor_controller.sv`, `motor_pulse_gen.sv`, `position_counter.sv`: the tuner.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
