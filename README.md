# A 16-voice, 6-operator FM synthesizer in the style of the Yamaha DX7

This is the sound-generating hardware of a DX7-like frequency-modulation synthesizer. It
is written as synthesizable SystemVerilog for a single 40 MHz clock and produces a 24-bit
stereo I2S stream at 52.08 kHz (40 MHz / 768).

In FM synthesis, each voice is built from six sine oscillators called *operators*. An
operator either feeds its output into the phase of another operator (a *modulator*) or
is heard directly (a *carrier*). One of 32 fixed wiring patterns, the *algorithms*,
decides which operator modulates which. One operator per algorithm may also modulate
itself (*feedback*). Each operator has its own envelope generator and frequency, and the
wiring and relative levels of the operators decide the timbre.

The hardware runs 16 voices, so 96 operators per sample. A processor sends patch
parameters and key events as 32-bit words over a FIFO link (a Xilinx FSL port), and the
hardware does the rest:

- envelopes, LFO, and pitch and amplitude modulation;
- the FM oscillators and the algorithm routing;
- volume;
- the serial DAC interface.

The processor, its software (MIDI decoding, patch storage, velocity and rate scaling) and
the DAC are not part of this RTL.

```
 FSL words ─► fsl_controller ─┬─► egs ──freq, amp, key_sync, sync──► ops ─sample─► mixer ─► i2s_ctrl ─► DAC
                              ├─ algorithm/feedback ────────────────────►│                    │
                              └─ volume / pan ──────────────────────────────────────► mixer   │
              sample tick ◄──────────────────────────────────────────────────────────────────┘
```

## The time-multiplexed sample

Every block computes one operator per clock, and the same hardware serves all 96
operators. A sample period is 768 clocks. It starts with the `frame_tick` of the I2S
controller.

| clock after tick | what happens |
|---|---|
| 1–16 | EGS *Globals* pass: one channel per clock. It steps the pitch envelope (PEG), the LFO phase, delay and waveform, and detects key presses. The result goes to the Global RAM. |
| 17–112 | EGS *Operator* pass: operator 6 of channels 1..16, then operator 5, …, then operator 1. Each clock steps one envelope and computes one frequency and amplitude, streamed to OPS. |
| ≈ 19 | `sync` to OPS: the first operator value is on the bus. |
| sync + 2 … | OPS starts one oscillator per clock in the same order. |
| sync + 114 | OPS presents the mono sample (sum of all carriers of all voices). |
| + 1 | the mixer registers the volume-scaled stereo sample. |
| next tick | the I2S controller latches it and shifts it out during the next frame. |

Only about 235 of the 768 clocks are used.

## The OPS modulation loop

This is the part that takes the most care. Operators are computed in the order 6, 5, …,
1, with 16 channels between two operators of the same voice. An operator's output
therefore appears on the output bus exactly 16 clocks after it was started, which is the
same clock in which the next operator of that voice is started. The pipeline is built so
that its loop is exactly 16 clocks:

| stage | clocks |
|---|---|
| phase accumulator, with its offset adder | 2 |
| cosine table | 12 |
| amplitude multiplier | 1 |
| output register | 1 |

Operator k+1's output can thus modulate operator k directly. For any other routing, three
small per-channel register files keep results until they are needed:

- **M-Reg** (18 bits): the modulation sum. A modulator's output is *loaded* into it or
  *added* to it.
- **F-Reg** (16 bits): the output of the operator that closes the feedback loop. It is
  also used to hold an output for a later operator.
- **O-Reg**: accumulates the carrier outputs of every channel into the final sample.

For each algorithm and operator, a 32 × 6-word control ROM (`ops_ctrl_rom`) gives four
things:

- **The phase-offset source (`mod_sel`)**, one of:
  - none;
  - the output arriving now;
  - the M-Reg;
  - M-Reg plus the output arriving now;
  - the raw F-Reg;
  - the F-Reg shifted for feedback.
- **The M-Reg action:** hold, load or accumulate.
- **Whether the output is stored in the F-Reg.**
- **Whether the output is a carrier.**

The ROM was derived from the DX7 algorithm graphs. `tb_ops_ctrl_rom` checks it
operator by operator against an independent description of those graphs (`tb_alg_pkg`).

Feedback is `F >>> (7 − level)` for levels 1..7; level 0 turns it off. Writing a
channel's algorithm clears its F-Reg. The phase offset maps a modulation input of ±1.0
(16-bit full scale) to ±½ cycle, i.e. ±π.

Carrier amplitudes are scaled by 1/(number of carriers), so that all algorithms peak at
the same level. With one carrier the scale factor is 65535/65536.

## Envelopes and modulation (EGS)

**Memories.** The EGS keeps everything in simple dual-port RAMs, which all read with one
clock of latency:

- The operator memory is addressed `{operator, channel}`. It is split into one RAM per
  parameter, so one read returns all of an operator's data. The channel-global
  parameters (pitch EG, LFO, PMS, key) sit at the "operator 7" rows.
- The Global RAM holds per-channel state that every operator of the channel needs:
  - pitch-EG value,
  - LFO phase, delay count, sample-and-hold value and output,
  - the computed pitch modulation,
  - key state.

**Pipeline.** The EGS reads, computes in one combinational stage, then writes back and
outputs. Stepping the envelope and LFO, and computing amplitude and frequency, all
happen in that one stage.

**Envelope** (`egs_env_gen`, shared by the operator EGs and the pitch EG):

- The state is a 12.20 fixed-point level and a stage. The stages are R1, R2, sustain
  and release.
- Each sample adds or subtracts the current rate until the stage's target level is
  reached.
- R1 and R2 then advance; sustain holds L3 while the key is down.
- Releasing the key moves to R4/L4.
- Pressing a key restarts R1 from the current level.
- Rates arrive as an 18-bit mantissa and a 4-bit exponent. They are stored as
  `mantissa << exponent`, saturated to 32 bits.

**Level and pitch representation.** Levels and pitch are logarithmic, and a 256-entry
table of 2^(i/256) turns them into linear values with a shift:

- Operator amplitude:
  - `lvl = EG + base_amplitude − 4095 − AMS·LFO`, clamped at 0;
  - `amp = table[lvl[7:0]] >> (15 − lvl[11:8])`.
  - 256 level steps are one octave (6 dB), and the full 12-bit range is 16 octaves.
  - An operator that is switched off gets amplitude 0.
- Pitch modulation, in 1/512 octave: `PEG − 2048 + LFO·PMS / 2^17`.
- Operator frequency: `base · table[pm[8:1]] · 2^(pm >> 9)`, saturated to 20 bits.

**LFO** (`egs_lfo`):

- A 22-bit phase accumulator advanced by the 12-bit speed each sample. At 52.08 kHz,
  speed 1..4095 gives 0.012 Hz to 50.8 Hz, which covers the usual 1–50 Hz LFO range.
- Six waves: triangle, saw down, saw up, square, sine, and sample-and-hold from a 16-bit
  LFSR.
- Optional restart on key press (LFO sync).
- A delay in samples after key press, during which the output is 0.

**Key sync.** A key press is detected in the Globals pass: the key bit is set where it was
clear one sample before. In the following Operator pass, this sends `key_sync` to OPS
for every operator whose *sync* flag is set. The phase accumulator then stores the
increment alone, so the oscillator starts from phase zero.

## Control protocol

Each 32-bit FSL word is decoded by `fsl_controller` in one clock and forwarded with a
one-clock strobe. Bits 27–25 select the destination:

| 27–25 | meaning | layout |
|---|---|---|
| 000–101 | operator 1–6 of channel [31:28] | rate: [24]=1, stage [23:22], exponent [21:18], mantissa [17:0]; parameter: [24]=0, id [23:21], value [20:0] |
| 110 | channel globals of channel [31:28] | same two forms |
| 111 | component [24:23]: 01 algorithm, 10 volume, 11 pan, 00 ignored | algorithm: channel [31:28], algorithm−1 [7:3], feedback [2:0]; volume/pan [7:0] |

Parameter ids:

| id | operator | channel globals |
|---|---|---|
| 0–3 | EG levels L1..L4 (12 bit) | PEG levels L1..L4 (12 bit, 2048 = no shift) |
| 4 | base frequency (20 bit, phase increment per sample on a 22-bit cycle) | LFO delay (20 bit, samples) |
| 5 | AMS (12 bit) | PMS (12 bit) |
| 6 | base amplitude [16:5], sync [4], operator on [0] | — |
| 7 | — | LFO speed [16:5], sync [4], wave [3:1], key on [0] |

The key on/off state is bit 0 of the global LFO word.

## Mixer and I2S

**Mixer.**

- Without panning: `left = right = sample · volume / 16` (8-bit volume, reset value 255).
- Panning (`PAN_EN = 1`): `sample · volume · (255 − pan) / 2048` on the left and
  `sample · volume · pan / 2048` on the right.
- Panning is off by default, because it costs more multipliers than the original FPGA
  had.

**I2S controller.**

- MCLK is clk/2 and SCLK is clk/12, giving 64 bit clocks per frame.
- LRCK is low for the left word.
- Each 24-bit word is sent MSB first, starting one bit clock after the LRCK edge.
- The frame start doubles as the synthesizer's sample tick.

## Number formats

| signal | format |
|---|---|
| phase | 22-bit unsigned, one cycle = 2^22; a 20-bit base frequency reaches 13.0 kHz in steps of 0.012 Hz |
| cosine table | 1024 entries of `round(32767·cos(2πi/1024))` |
| operator output | 16-bit signed |
| OPS sample | 20-bit signed |
| mixer output | 24-bit signed; holds any sample at any volume without panning (with panning, loud samples can wrap) |
| amplitude | 16-bit linear, 65359 at full level |
| exp2 table | 256 entries of `round(32768·2^(i/256))` |

Both tables are constants computed at elaboration. Integer Taylor series in 30-bit fixed
point reproduce the rounded values exactly, and synthesis turns them into ROMs. The
testbenches compare against independent copies, `tb/cos_table.hex` and
`tb/exp2_table.hex`.

## Where this design departs from, or adds to, the original

- **Cosine table.** The original used the vendor DDS core's SIN/COS table. Here it is a
  plain 1024-entry ROM, with a 12-stage delay to keep the 16-clock loop.
- **EGS pipeline depth.** The original EGS pipeline has five register stages. This one
  has three. Envelope and LFO stepping and the channel's pitch calculation share one
  combinational stage after the memory read. The operator's amplitude and frequency
  calculation forms the last stage. Its timing to OPS is the same (`sync`, then one operator per clock).
- **Choices made here.** Where the original gives only a block's name or function, the
  formulas are this design's own:
  - envelope arithmetic,
  - LFO wave shapes and delay,
  - AMS/PMS scaling,
  - the level-to-amplitude law,
  - feedback shift,
  - compensation factors,
  - mixer scaling.
- **Field widths.** In the operator-parameter and LFO-parameter words, the 12-bit
  amplitude or speed field sits at bits 16–5, directly above the flag bits. Bits 20–17
  are ignored.
- **FSL read.** `FSL_S_Read` equals `FSL_S_Exists`: a word is consumed in the clock it
  is offered. The control bit is ignored, and nothing is written back to the processor.
- **Reset.** Reset clears all EGS memories over 128 clocks. Until the processor writes
  them, every operator is off, every algorithm is 1, the volume is 255 and the pan is
  128.

## Files

| module | role |
|---|---|
| `dx7_pkg` | widths, message structs, enums |
| `dx7_top` | the whole synthesizer; ports are the FSL slave and the I2S pins |
| `fsl_controller` | word decoder |
| `egs`, `egs_fsm`, `egs_env_gen`, `egs_lfo`, `egs_mod_calc`, `exp2_lut`, `sdp_ram` | envelope/modulation generator |
| `ops`, `ops_osc_sm`, `ops_phase_acc`, `cos_lut`, `ops_alg_reg`, `ops_ctrl_rom` | FM operator engine |
| `mixer`, `i2s_ctrl` | output |

Each file begins with a description of its interface and timing.

## Testbenches and simulation

Every module except the small `exp2_lut` table (tested through `tb_egs_mod_calc`) has a
self-checking testbench `tb/tb_<module>.sv`, printing
`TB_RESULT checks=N failures=M`. The two large ones compare against reference models
written independently in the testbench:

- `tb_egs` has an integer model of the whole EGS: envelopes, LFO, modulation, key sync.
- `tb_ops` has a sample-accurate FM model driven through all 32 algorithms, with
  feedback, key sync, algorithm changes and the 114-clock latency.

`tb_dx7_top` runs the complete synthesizer at its default parameters:

- It sends real control words: two voices with different algorithms and feedback.
- It plays keys, changes the volume, changes one voice's algorithm and releases a key.
- It sends a pan message, which must not change the output while panning is disabled.
- It decodes the I2S pins like a DAC and compares every received word with an FM model of
  both voices.
- It also counts key syncs, envelope stages, LFO activity, feedback use and M-Reg
  accumulation, and fails if any of them never happened.

`tb_dx7_poly` is the full-polyphony case. All 16 channels get different algorithms
(1, 3, …, 31) and feedback levels, and all 16 keys are pressed in the same sample, so
every one of the 96 oscillators is sounding. Every I2S word is checked against the model.

Run from the repository root, because the table files are read by paths relative to it:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/dx7_pkg.sv tb/tb_alg_pkg.sv tb/tb_dx7_top.sv --top-module tb_dx7_top -o sim
./obj_dir/sim
```

Replace the testbench and top-module name to run any other one. `tb_alg_pkg.sv` is only
needed by `tb_ops`, `tb_ops_ctrl_rom`, `tb_dx7_top` and `tb_dx7_poly`.
