# Direct-sampling LLRF feedback loop for a 166.6 MHz cavity

This is the FPGA part of a digital low-level RF (LLRF) controller. It holds
the amplitude and phase of the field in a 166.6 MHz accelerating cavity, aiming
at ±0.1 % in amplitude and ±0.1° in phase, peak to peak. There is no analog
down-converter. The ADCs sample the 166.6 MHz pickup signal directly, and the
DAC synthesises the 166.6 MHz drive directly. Everything between them is
digital: I/Q demodulation, a vector rotation, a CIC low-pass filter, an I/Q
PI controller and a digital modulator. A post-mortem buffer records the loop.

## The sampling arithmetic that everything rests on

Two clocks are locked to the RF, f_RF = 166.6 MHz:

| clock | frequency | RF phase per sample |
|---|---|---|
| DAC sample clock, 8·f_RF | 1332.8 MHz | 45° |
| ADC sample and processing clock f_s, 8·f_RF/14 | 95.2 MHz | 1.75 turns ≡ 270° |

**ADC side (undersampling).** Each ADC sample is 270° of RF phase after
the previous one, so the phase steps through four positions 90° apart.
Write the input as x[n] = I·cos(nφ) − Q·sin(nφ). A sample at quarter-turn
index k = 3n mod 4 then equals +I, −Q, −I or +Q for k = 0, 1, 2 and 3.
`iq_demod` keeps the latest sample of each index and outputs, every clock,

    I = s0 − s2,   Q = s3 − s1

This is twice the true I and Q, and any ADC offset cancels. It is
non-IQ sampling with a 270° step. No multipliers and no LO table are needed.

**DAC side (direct modulation).** The DAC takes 8 samples per RF period and
f_DAC/f_s = 14 samples per processing clock. `dac_modulator` produces

    y[m] = I·cos(m·45°) − Q·sin(m·45°)

for the 14 lanes of each clock. The cosines and sines are 0, ±1 and ±1/√2,
so each clock needs only two products, I/√2 and Q/√2. The lanes pick from
I, Q, (I±Q)/√2 and their negatives. Lane 0's phase index advances by
14 mod 8 = 6 each clock and repeats every 4 clocks. `dac_lane0_phase`
reports it.

Both conventions count phase from reset. Any fixed phase between the DAC
output and the ADC input (cables, amplifier, cavity, pipeline delay) is part
of the loop phase. The loop removes it with one calibration angle (see
below).

## Signal chain

```
adc[0..9] ──iq_demod×10──┬─ ch 0 (ADC1, pickup) ─ cordic_rotate ─ cic_filter (I) ┐
                         │                          ▲ angle        cic_filter (Q) ┤
                         │                          │                             ▼
                         ├─ ch 7 (ADC8, reference) ─ cordic_vector ─ ref phase    cav_iq
                         └─ chan_iq (all channels, monitor)                        │
sp_amp, sp_phase ─ cordic_rotate ─ sp_iq ────────────────────────────── err = sp_iq − cav_iq
                                                                                   │
                       dac_lanes[0..13] ◄─ dac_modulator ◄─ drive ◄─ pi_controller ┘
cav_iq ─ cordic_vector ─ amplitude/phase monitors;   {cav_iq, drive} ─ pm_logger
```

| module | what it does |
|---|---|
| `llrf_pkg` | widths, I/Q and control/monitor structs, CORDIC constants |
| `iq_demod` | 4-sample non-IQ demodulator (above); 2 clocks latency |
| `cordic_rotate` | rotates a vector by an angle; 18-iteration pipelined CORDIC, gain corrected; 20 clocks |
| `cordic_vector` | vector → amplitude and phase; same structure; 20 clocks |
| `cic_filter` | 3-stage CIC, decimation 8, unity DC gain; one per component |
| `pi_controller` | PI control of I and Q, feed-forward, open/closed loop, clamping |
| `dac_modulator` | 14-lane direct digital modulation at 8·f_RF; 2 clocks |
| `pm_logger` | 4096 × 68-bit circular post-mortem buffer with trigger freeze |
| `llrf_top` | wires the above together |

The loop runs at f_s up to the CIC filter. From there on the error, the PI
controller and the monitors update at f_s/8 = 11.9 MHz. The DAC modulator
runs at f_s again and holds the latest drive. From an ADC sample to the DAC
lanes takes about 30 to 38 clocks, depending on where the sample falls in
the decimation cycle. That is roughly 0.35 µs.

## Number formats

* ADC and DAC words: signed 16 bit.
* I/Q inside the loop: signed 18 bit, in units of **twice** the ADC
  amplitude. A full-scale ADC sine reads 65534.
* Phase: 16 bit unsigned, 2^16 = 360° (about 182 counts per degree).
  The CORDICs work internally with 22-bit angles and 6 fractional guard bits.
* Set point `sp_amp`: 17 bit unsigned, same units as I/Q. 0.8 of full scale
  is 52427.
* Gains: `kp` is unsigned Q8.8, so 256 means a gain of 1. `ki` is unsigned.
  At each update (every 8 clocks) the integrator adds err·ki/2^12. It keeps
  those 12 fractional bits, so small errors still integrate.
* Drive: signed 16 bit I/Q. The DAC lanes saturate at ±32767, so the usable
  drive amplitude is 32767 in every direction.

## Operating the loop

All settings arrive as one struct, `ctrl` (type `llrf_ctrl_t`). A
slow-control processor would write them.

1. **Open loop.** With `loop_closed = 0` the PI controller clears its
   integrator and outputs the feed-forward drive `ff`. Use this to fill the
   cavity.
2. **Loop-phase calibration.** With `ff` pointing along I, the measured
   cavity phase `mon.cav_phase` is the loop phase. Writing its negative to
   `rot_offset` makes the rotated pickup line up with the drive. The feedback
   is then negative.
3. **Reference tracking.** With `ref_track_en = 1` the pickup is rotated by
   `rot_offset − (reference phase)`. The reference phase comes from ADC8. The
   loop therefore holds the cavity phase relative to the RF reference, and a
   drift of the reference moves the cavity with it.
4. **Closed loop.** With `loop_closed = 1`, each component's drive is
   `ff + kp·err + ∫ki·err`. Both the integrator and the sum are clamped to
   the DAC range, and `mon.pi_sat` shows when clipping happens. Because of
   the clamp, the loop recovers from an unreachable set point without
   wind-up.

The testbenches use `kp = 256`, `ki = 64` for a cavity with an 80 kHz
loaded bandwidth and unity DAC-to-ADC gain at resonance. That gives a loop
with a response time of about a microsecond.

Monitors (`mon`, type `llrf_mon_t`) update each time `mon.valid` is high.
They are: the filtered cavity vector and its amplitude and phase, the
amplitude error (cav − set point), the phase error, the reference amplitude
and phase, the drive, and the saturation flag.

**Post-mortem buffer.** The buffer writes one word per PI update:
{cavity I, cavity Q, drive I, drive Q}. A `pm_trigger` starts a count of
1024 more words, and then the buffer freezes. It then holds 3071 words
before the trigger and 1024 after. Read address 0 is the oldest word, and
data comes back one clock after the address. `pm_rearm` restarts recording.

## What follows the source design and what is this implementation's own

The system this RTL implements fixes the points that follow. It uses direct
sampling of 166.6 MHz with no down-converter. The ADC clock is
f_s = 8·f_RF/14, and a synthesizer runs at 8·f_RF (1.3328 GHz). The board
has ten 16-bit ADC channels and a 16-bit DAC of more than 1.3 GS/s. The
cavity pickup is on ADC1 and the RF reference on ADC8. The chain order is
demodulation, vector rotation of the pickup, CIC low-pass, set-point error,
separate PI control of I and Q, and direct generation of the RF in the DAC.
There is also fast data logging for post-mortem analysis.

The rest are choices made here:

* The demodulation algorithm, with its 4-sample window and 2× scale.
* A DAC rate of 8·f_RF, with 14 parallel lanes per clock.
* CORDIC for the rotation, for the set-point conversion and for the
  amplitude/phase monitors.
* How the reference channel is used: its phase is subtracted in the pickup
  rotation.
* The CIC order and decimation (3, 8), with differential delay 1.
* The PI number formats, clamping, feed-forward and open-loop mode.
* The logger's depth, word layout and trigger scheme.
* All word widths.
* The other eight ADC channels are only demodulated and brought out. Their
  role in the system is not defined here.

Not part of this RTL:

* The converters themselves, and the serial link to the DAC. The lanes are
  delivered in parallel, for one of the DAC's four channels.
* The frequency synthesizer and clock divider.
* The control processor and its software, including the register map. The
  settings are plain ports.
* The tuner and piezo control through the low-speed AD/DA board.
* The amplifier and the cavity.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | checks against |
|---|---|
| `tb_iq_demod` | real-valued tones of random amplitude, phase and offset; valid timing |
| `tb_cordic_rotate`, `tb_cordic_vector` | real `cos/sin/atan2/sqrt`, ≤ 4 counts; latency |
| `tb_cic_filter` | bit-exact N-fold moving-sum model, output count |
| `tb_pi_controller` | integer model incl. clamping, open loop, saturation |
| `tb_dac_modulator` | y[m] from real cos/sin for every lane, lane-0 phase sequence |
| `tb_pm_logger` | freeze after POST writes, read-back order, trigger position, re-arm |
| `tb_llrf_top` | closed loop around a behavioural cavity, at default sizes |
| `tb_warm_cavity` | field stability over a 0.68 ms window, at default sizes |

`tb_llrf_top` and `tb_warm_cavity` close the loop through a first-order
cavity model with an 80 kHz loaded bandwidth. The model demodulates the DAC
lanes in its own time base, adds a 30° drive-to-pickup phase, and feeds the
ADC pickup channel. It adds noise and clips to 16 bits as a real ADC would.
Separate channels carry the reference tone and an auxiliary tone.

`tb_llrf_top` runs the following sequence:

1. Open-loop amplitude check.
2. Calibration.
3. Closing the loop.
4. A 30° set-point phase step.
5. A 20° reference phase step, which the field follows.
6. An unreachable set point, to saturate the drive, then recovery.
7. A logger freeze and read-back.

At each stage it checks regulation against ±0.1 % / ±0.1°, both in the
monitors and in the model's own field.

`tb_warm_cavity` uses ±6 counts of ADC noise. Over 0.68 ms (64,736 clocks)
it measured a monitored error of −0.017…+0.019 % in amplitude (0.0055 %
rms) and ±0.011° in phase (0.0035° rms). These figures depend on the noise
model and say nothing about real hardware noise. A 60-minute run was not
simulated.

Running one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/llrf_pkg.sv \
  rtl/iq_demod.sv rtl/cordic_rotate.sv rtl/cordic_vector.sv rtl/cic_filter.sv \
  rtl/pi_controller.sv rtl/dac_modulator.sv rtl/pm_logger.sv rtl/llrf_top.sv \
  tb/tb_llrf_top.sv --top-module tb_llrf_top
./obj_dir/Vtb_llrf_top
```

For a unit test, list `rtl/llrf_pkg.sv`, the module and its testbench. Each
testbench runs in under a second of wall-clock time.

## Changing it

* **Another RF/sampling ratio.** `DEMOD_STEP_Q` in `llrf_pkg` is the RF
  phase step per ADC sample in quarter turns. 3 gives 270° and 1 gives 90°.
  `DAC_LANES` is f_DAC/f_s. The modulator assumes 8 DAC samples per RF
  period.
* **Filter bandwidth.** Set `CIC_N` and `CIC_R` on `llrf_top`. R must be a
  power of two. The PI update rate is f_s/R.
* **Logger.** Set `PM_DEPTH` and `PM_POST`.
* **Channel assignment.** Set `ADC_CH`, `PICKUP_CH` and `REF_CH`.
* **Precision.** Set `ITER` on the CORDICs. The angle table holds 20
  entries.
