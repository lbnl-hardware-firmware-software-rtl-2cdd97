# RF station controller with a digital self-excited loop

This is the low-level RF controller for one superconducting cavity. The
controller measures the cavity field, drives it back through a self-excited
loop (SEL), and reports what it sees about the cavity. It works on one IF
sample per clock. In the reference configuration the IF is 20 MHz, sampled at
95 MS/s, so the IF advances exactly 4/19 of a turn per sample.

The datapath in one line: four ADC streams (phase reference line, cavity
probe, forward wave, reverse wave) are mixed down to baseband I/Q. The cavity
I/Q goes through the SEL, a band-limit/notch filter and an up converter to the
drive DAC. Alongside this, a multi-channel decimator (the "conveyor belt")
feeds three consumers:

- a circular waveform buffer with fault capture,
- a frequency counter,
- a detune/quench calculator, whose result leaves on a fiber frame ("ChitChat")
  to the resonance controller.

Everything is SystemVerilog (IEEE 1800-2017) in `rtl/`, one module per file.
Each block has a self-checking testbench in `tb/`.

```
PRL ADC ──DDC──► phase_offset_loop ──► DDS ──LO──► every DDC and the DUC
cavity ADC ─DDC─► SEL (CORDIC → amp/phase PI, offset → CORDIC) ─► lp_notch ─► DUC ─► DAC
                   ▲ chirp: phase_parabola
cav, fwd, rev, drive, PRL I/Q ─► cic_conveyor ─┬► waveform_buffer
                                               ├► freq_counter
                                               └► detune_quench ─► chitchat_tx ─► fiber
fiber ─► chitchat_rx (fields, CRC faults, loop-back latency)
```

## The self-excited loop (`sel.sv`)

This is the hardest part to understand. A classic self-excited oscillator
feeds the cavity's own signal back as its drive. The drive therefore always
sits at the cavity's momentary resonance, even when the cavity detunes by
many bandwidths. The digital version does this in polar coordinates.

1. A vectoring CORDIC turns cavity I/Q into amplitude R and phase θ.
2. The **amplitude controller** (`pi_ctrl`, set point `amp_set`) produces
   the drive's in-phase magnitude X. While this loop is open, X is the fixed
   value `amp_ol`, and the controller's integrator is preloaded with it, so
   closing the loop causes no bump.
3. The **phase controller** (`pi_ctrl`, `WRAP=1`, set point `phase_set`)
   produces a quadrature term Y. It stays 0 while the phase loop is open.
4. The drive angle is θ + `phase_offset` when `ph_track` is set (the loop
   is self-excited). Otherwise the angle is `phase_offset` alone (a fixed,
   "pulsed" drive).
5. A rotation CORDIC turns (X, Y, angle) back into drive I/Q.

Both PI controllers share one structure:

1. The error (set point − measurement) is formed and registered. It is also
   brought out (`amp_err`, `phase_err`) for monitoring.
2. A proportional path and an integral path are scaled by 2^-12.
3. The integrator saturates at a programmable limit, and so does the sum.

The output limits double as drive limits. Before the rotation CORDIC, X is
clamped to ±`amp_out_lim` and Y to ±`ph_out_lim` in every mode. An
open-loop or chirp amplitude set too high is therefore cut to the same bound
as the closed amplitude loop.

All CORDICs use 22-bit x, y and angle with 20 stages. Angles are unsigned
fractions of a turn. The outputs carry half the CORDIC gain (0.8234).

The operating modes are just settings of these controls:

| mode | `chirp_mode` | `ph_track` | `amp_loop_en` | `phase_loop_en` |
|---|---|---|---|---|
| chirp | 1 | – | – | – |
| pulsed | 0 | 0 | 0 | 0 |
| SEL raw / SEL | 0 | 1 | 0 | 0 |
| SELA | 0 | 1 | 1 | 0 |
| SELAP | 0 | 1 | 1 | 1 |

`phase_offset` has to be calibrated: it must cancel the phase shift around
the whole loop, or the SEL settles off resonance. The end-to-end testbench
shows one way to do it:

1. Drive the cavity in pulsed mode at a known angle.
2. Read the cavity's phase response.
3. Correct for the phase the cavity's own detuning adds, atan(Δ/γ).

Only then switch to SEL. In SELAP the phase loop pulls the cavity phase to
`phase_set`, within the range allowed by `ph_out_lim`. That range must cover
the detuning, or the loop cannot lock.

The drive latency from cavity I/Q to drive I/Q is 2·(20+1)+3 = 45 clocks.
With the filter, the up converter and the DDC, the loop delay from ADC to
DAC is 45 + 1 + 3 + 2 = 51 clocks (about 0.54 µs at 95 MS/s).

In **chirp** mode, `phase_parabola` takes over the rotation CORDIC's
inputs. It supplies a constant amplitude and a phase that grows as a
parabola, so the frequency sweeps linearly from `chirp_f0` by `chirp_rate`
per sample, for `chirp_len` samples. The sweep is used to find the cavity's
resonances.

## Converters and the phase reference

- **`dds`**: a 32-bit phase accumulator with an exact rational step
  (step_h + step_l/modulo). For 4/19 of a turn the settings are
  904203641 + 5/19. A rotation CORDIC turns the phase into the LO. An offset
  input lets the phase reference loop move the LO phase.
- **`ddc`**: computes I = x·cos and Q = −x·sin, each summed over a sliding
  19-sample window. The window holds exactly four IF cycles, so the
  2·IF image and the near-IQ harmonic products cancel. Latency is 2 clocks.
- **`phase_offset_loop`**: an integrator on the PRL's quadrature component.
  It turns the DDS until the reference line reads zero phase. After that, a
  cavity signal in phase with the reference reads as zero.
- **`lp_notch`**: a one-pole low-pass minus a one-pole complex resonator.
  The resonator's pole P = r·e^{jω0} is placed on an unwanted passband
  mode, and its complex gain g is chosen so that the resonator cancels the
  low-pass output at ω0.
- **`duc`**: computes Re{(I+jQ)·LO}, shifts it and saturates it to 16 bits.
  The DAC runs at twice the ADC rate, so the DUC gives two samples per
  clock. `dac` is taken at the LO's sample time. `dac_mid` is taken half a
  sample later, using the LO rotated by H = e^{j·step/2}. H is a run-time
  Q1.17 constant (`dac_half_cos`, `dac_half_sin`), set to cos and sin of
  2/19 of a turn for the reference rates. The baseband is held over both
  halves. Latency is 3 clocks.

## Conveyor belt decimator (`cic_conveyor.sv`)

The top uses ten channels: cavity, forward, reverse, drive (after the
filters, i.e. what the DAC gets) and the phase reference line, each as I and
Q. The module's own default is eight.

- Each channel has its own two second-order CIC integrators running at full
  rate.
- Every `dec` clocks, all integrator values are copied onto a shift
  register (the belt). The belt moves them one per clock through a single
  shared datapath:
  1. a two-stage comb, whose delay memory is indexed by channel;
  2. `>>> shift` with saturation, which removes the CIC gain dec²;
  3. a 7-tap half-band filter (−1, 0, 9, 16, 9, 0, −1)/32 that keeps every
     second pass.
- Each channel therefore produces one output per 2·dec clocks.
- `chan_mask` selects which channels appear on the `out_valid` stream.
- `out_any` marks every channel, for the internal consumers.
- `pass_done` pulses after the last channel of a pass has left.
- `dec` must be at least NCH + 2 (12 in the top).

Downstream of the conveyor:

- **`waveform_buffer`**: writes {channel, sample} into a 2048-entry ring.
  A trigger (the `fault` input or a software edge) starts a countdown of
  `post_len` more samples. The ring then freezes until `rearm`. Once frozen,
  `wr_ptr` points at the oldest sample.
- **`freq_counter`**: counts the upward zero crossings of one baseband
  channel over a gate. This gives the cavity's offset frequency from the LO.

## Detune and quench calculator (`detune_quench.sv`)

Once per conveyor pass, the block takes the decimated cavity field V, the
forward wave K and the reverse wave R, and computes:

- a = (1/V)·[(V − V_prev) − b·K]
  - Re a is the decay per update period.
  - Im a is the detune phase per update period.
  - Both have 24 fractional bits.
- Pdiss = |K|² − |R|² − u_scale·(|V|² − |V_prev|²), the power not
  accounted for by the stored energy. A rise in Pdiss points to a quench.

The block is not a pipeline. It is a small sequencer with these parts:

- one 48×24 multiply-accumulate unit, shared by 16 program steps;
- two restoring divisions by |V|², one quotient bit per clock.

A result takes about 160 clocks. A `start` that arrives while the block is
busy is ignored, so the update period (2·`cic_dec` clocks) must be longer
than that. With `cic_dec = 532` the period is 1064 clocks, which is 11.2 µs
at 95 MS/s.

Flags on the result:

- `valid` is low for the first result after reset, because there is no
  V_prev yet.
- `v_zero` flags |V| = 0.

b (a complex coupling constant, Q1.17) and u_scale (Q6.17) are run-time
settings.

## ChitChat fiber frame (`chitchat_tx.sv`, `chitchat_rx.sv`)

A frame is 11 words of 16 bits, sent one per clock of a 125 MHz word clock.
That gives 125/11 = 11.36 MHz frames.

| word | content |
|---|---|
| 0 | PROTOCOL_CAT[3:0], PROTOCOL_VER[3:0], comma K28.5 (k-flagged low byte) |
| 1 | GATEWARE_TYPE[2:0], TX_LOCATION[2:0], 10 reserved bits |
| 2–3 | REVISION_ID |
| 4–5 | TX_DATA0 |
| 6–7 | TX_DATA1 |
| 8 | TX_FRAME_COUNT |
| 9 | TX_LOOPBACK_FRAME_COUNT (echo of the far end's frame count) |
| 10 | CRC-16-CCITT (0x1021, seed 0xFFFF, MSB first) over words 0–9 |

The receiver does the following:

- It aligns on the comma.
- It checks the CRC. A good frame updates all output fields.
- It counts bad frames and frames cut short by a new comma in `crc_faults`.
- It reports `loopback_latency` = own frame count − echoed count, that is,
  the round trip in frames.

In the top, TX_DATA0 carries Im a (the detune). TX_DATA1 carries
{detune valid, interlock_ok, Pdiss>>>17 saturated to 30 bits}. The detune
results cross from the sample clock to the fiber clock through `cdc_hold`,
a toggle-synchronised hold register.

## Top level (`rfs_controller.sv`) and configuration

- **Parameters:** `STAGES` (CORDIC stages, 20) and `BUF_AW` (log2 of the
  waveform depth, 11).
- **Ports:** the ADC samples and the two DAC samples per clock, the fault
  and interlock inputs, the waveform read port, the results (cavity
  amplitude/phase and their errors, PRL I/Q, frequency count, detune and
  Pdiss), and the
  ChitChat word streams with the far end's header (`cc_rx_hdr_t`).
- **Configuration:** all run-time settings arrive as one packed struct,
  `llrf_pkg::rfs_cfg_t`. In a real system that struct is the register file
  written over the network. Shared widths, the arctangent table, the CRC
  step and the channel map (`wave_chan_t`) are in `rtl/llrf_pkg.sv`.

Not included here:

- the ADC/DAC board;
- the network register interface;
- the board-management microcontroller links;
- the fiber transceiver.

The top's ports stand where these would connect.

## Where this design departs from its source description

The published description gives the block diagram, the CORDIC size
(22 bits × 20 stages), the IF and sample rates, the detune/quench formulas
and their 11.2 µs period, and the ChitChat word layout. Everything else is
this design's own choice:

- filter types and lengths;
- the PI scaling;
- the CIC order and the half-band taps;
- the frequency-counter method;
- the detune number formats and step program;
- the CRC polynomial and the comma value;
- the buffer depth;
- the conveyor channel map;
- the ChitChat payload packing.

Specific points:

- **CORDIC count.** The source speaks of two CORDIC blocks (DDS and SEL).
  Its diagram draws two CORDICs inside the SEL. This design follows the
  diagram and has three CORDICs. The chirp reuses the SEL's rotation CORDIC.
- **DDCs.** The diagram shows a separate cavity DDC feeding the conveyor.
  Here the SEL's cavity DDC feeds both.
- **Modes.** "SEL raw" and "SEL" use the same controls. No difference
  between them is defined.
- **DAC rate.** The doubled DAC rate comes from an LO rotated by half a
  step, with the baseband held. The two samples leave on two ports,
  `dac_drive` and `dac_drive_mid`; the converter's bus format is not
  modelled. Only one drive DAC is used.

## Simulating

Any testbench runs with plain Verilator 5. For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
    --top-module rfs_controller_tb \
    rtl/llrf_pkg.sv rtl/*.sv tb/rfs_controller_tb.sv
./obj_dir/Vrfs_controller_tb
```

`-Wno-fatal` is needed because Verilator reports a few unused parameters
and bits as warnings. They are explained in the file headers. The package
is listed first so that it compiles before the modules that import it.

For a block test, swap in the block's testbench and top module name, for
example `cordic_tb`. Every testbench:

- prints `TB_RESULT checks=N failures=M`;
- checks against independently computed values (real-number models,
  bit-exact CRC, and so on);
- has a watchdog.

`tb/rfs_controller_tb.sv` runs the top at its default parameters against a
behavioural cavity. The cavity model uses a first-order envelope with decay
γ and detune Δ, so forward, reverse and probe signals are related the way a
real cavity relates them. A 30-word fiber loop-back carries the ChitChat
link. The test runs these steps in order:

1. PRL lock and chirp
2. pulsed calibration of the SEL phase offset
3. SEL raw
4. SELA
5. frequency count
6. detune (checked against the model's (−γ + jΔ)·T)
7. SELAP, including a check that the mid-clock DAC samples continue the
   IF tone
8. a corrupted fiber word
9. a fault capture with full readout of the buffer

The test counts every mechanism and fails if any of them never happened. It
takes about 10 s. It uses `cic_dec = 96` (a 2 µs update period) rather than
532. The model cavity decays very fast (γ = 0.005 per sample, so that it
settles within a short simulation), and at 532 its coupling b·T would not
fit the Q1.17 range of `b_re`. A real cavity's bandwidth of some tens of Hz
gives γ·T in the low thousandths at 11.2 µs.

`tb/rfs_detune_period_tb.sv` runs the detune/quench path at its intended
11.2 µs period (`cic_dec = 532`), again at the default parameters. It uses a
slow, realistic cavity driven open loop at a fixed phase. It checks that
results come exactly 1064 clocks apart and that a = (−γ + jΔ)·T within 3 %
(the match is about 0.1 %). It also checks that Pdiss is positive and that
the detune word reaches the fiber link.

Each block test was also run against a copy of its block with one
deliberate bug (a flipped sign, a missing stage, a skipped CRC check, and so
on). Every such copy made its test fail.

## Changing it

- **Other IF/clock ratios:** change `dds_step_h`, `dds_step_l` and
  `dds_modulo`, and `NAVG` in `ddc`. Choose the DDC window so that it holds
  a whole number of IF cycles. Set `dac_half_cos`/`dac_half_sin` to half
  the new LO step.
- **Update period:** `cic_dec` sets both the waveform rate and the
  detune/quench period. It must exceed about 82, so that a conveyor pass
  (2·`cic_dec` clocks) is longer than a detune computation.
- **Widths:** `llrf_pkg` holds the shared widths. The CORDIC arctangent
  table is computed to 32 bits and truncated to the configured width.
