# Bitcrushing sine synthesizer: FPGA datapath

A monophonic synthesizer voice that plays a sine wave at the pitch of the key
held on a MIDI keyboard and degrades it with a *bitcrusher*: every sample is
snapped to a multiple of a divisor set by a knob, so that as the knob turns the
smooth sine becomes a coarser and coarser staircase and takes on a harsh,
"computer" timbre.

The work is split between a small microcontroller and an FPGA. The
microcontroller receives and decodes MIDI and runs the oscillator's phase
accumulator at 44.1 kHz. The FPGA, which is what this repository contains,
turns each phase value into a sine sample, crushes it and hands it to an 8-bit
parallel DAC (an AD558-class part) at the right moment.

```
 microcontroller                       FPGA (synth_fpga)                                  DAC
 --------------     +---------------+   +----------+   +------------------------+   +------------+
 theta[12:0] ------>| input_capture |-->| sine_gen |-->| bitcrush               |-->| dac_output |--> dac_data[7:0]
 crush[6:0]  ------>| (regs, EN =   |   | 13b->8b  |   |  divider -> multiplier |   | (reg, mux) |--> dac_ce_n
 ready       ------>|  ready; sync) |---------------------------------------------->|            |--> dac_cs_n
 note_on     ------>|               |---------------------------------------------->|            |
                    +---------------+                                                +------------+
```

## One sample, step by step

1. **Handshake.** Once per sample (every 22.68 us) the microcontroller drops
   `ready`, writes the new phase to `theta` and the knob value to `crush`, and
   raises `ready` again. The ports are only trusted while `ready` is high.
2. **Capture** (`input_capture`). `ready` and `note_on` go through two-flop
   synchronisers, because the microcontroller has its own clock. `theta` and
   `crush` are loaded into registers on every clock where the synchronised
   `ready` is high, and held while it is low.
3. **Sine** (`sine_gen`). `theta` is the position within one period, with
   8192 steps per period. The output is the signed 8-bit
   `round(127 * sin(2*pi*theta/8192))`. Only a quarter period is stored, as
   2048 seven-bit magnitudes computed when the design is elaborated. The top
   two phase bits mirror the index and negate the result. The peak value,
   which only the mirrored quarters reach, is supplied directly.
4. **Crush** (`bitcrush` = `divider` + `multiplier`). This step is described
   in the next section.
5. **Output** (`dac_output`). The DAC's CE bar and CS bar both follow the
   synchronised `ready`, one clock later. While they are high the DAC holds
   the previous sample; when `ready` falls they go low, the DAC becomes
   transparent, and it shows the new sample. The output register loads the
   crushed sample while `ready` is high, once the new phase has had time to
   pass through the pipeline. It then holds through the low phase, so the bus
   never moves while the DAC is listening. If `note_on` is low, a mux after
   the register forces the bus to 0 (silence).

The pitch is set entirely on the controller side, by how far the phase moves
per sample: `f = step * 44100 / 8192`. The FPGA only maps phase to amplitude.

## The bitcrusher arithmetic

For a signed sample `s` and divisor `d` (1..127):

```
q       = s / d          rounded toward zero, remainder dropped   (divider)
y       = q * d          low 8 bits; never exceeds |s|            (multiplier)
crushed = y + 128        signed -> unsigned DAC code              (bitcrush)
```

Dividing and then multiplying by the same number throws away the part of `s`
below `d`. The result keeps the full signal amplitude, but only about
`2*127/d + 1` distinct levels are left:

| divisor | levels of a full sine | effect |
|---|---|---|
| 1 | 255 | clean 8-bit sine |
| 3 | 85 | slight graininess |
| 16 | 15 (-112 ... +112) | clearly stepped |
| 127 | 3 (-127, 0, +127) | almost a square wave |

The other choices follow from this arithmetic:

* **Rounding toward zero.** Rounding the magnitude down means
  `|q*d| <= |s|`, so the multiplier's 8-bit output can never overflow, and the
  +128 offset can never wrap. Rounding toward minus infinity would push
  negative peaks below -127 for most divisors.
* **Full-scale sine with a half-scale offset.** The sample is in two's
  complement, and adding 128 turns it into offset binary for the DAC (the same
  as inverting the sign bit). The wave then spans the whole 0..255 range. The
  quietest setting, divisor 127, still swings between three levels.
* **Amplitude is uneven across the dial.** The peak that survives is
  `trunc(127/d)*d`. For example, d = 64 keeps only a peak of 64, and d = 127
  keeps the full 127. So loudness varies as the knob turns. This is inherent
  to the divide-and-multiply method, and the design keeps it.
* **Divisor alignment.** The divisor is delayed by one clock inside
  `bitcrush`, so the multiplier always scales a quotient by the divisor that
  produced it. This matters when the knob moves.
* **Divisor 0** is treated as 1 (no crushing). The controller never sends 0,
  but the registers hold 0 after reset, before the first sample arrives.

## Timing

All registers use the FPGA clock `clk`. Reset `rst_n` is synchronous and
active low. After reset the DAC is latched and the output register holds 0.

| event (FPGA clocks) | after `ready` rises | after `ready` falls |
|---|---|---|
| `ready_s` changes | 2 | 2 |
| `theta`/`crush` captured | 3 | (stops) |
| CE bar / CS bar | 3 (latch) | 3 (transparent) |
| crushed sample valid | 6 | - |
| output register loaded | 7 and every clock after | (stops) |

* `ready` must stay high for **at least 8 FPGA clocks** per sample. At 44.1 kHz
  any clock above about 0.4 MHz meets this; at 40 MHz a sample period is 907
  clocks.
* The `theta`/`crush` ports must not change during the first two clocks after
  `ready` falls, because the synchronisers are still reporting high. Writing
  the ports a few instructions after clearing `ready` meets this easily.
* A sample computed from the phase written at one interrupt reaches the DAC
  output when `ready` falls at the **next** interrupt. The delay is therefore
  one sample period (22.7 us), and it is the same for every sample.
* `note_on` acts on the bus two clocks after it changes, whatever the state
  of `ready`.

## Interface of `synth_fpga`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | FPGA clock, any frequency that meets the 8-clock rule |
| `rst_n` | in | 1 | synchronous reset, active low |
| `ready` | in | 1 | sample handshake from the controller; asynchronous |
| `note_on` | in | 1 | a key is held; asynchronous |
| `theta` | in | 13 | phase, 8192 steps per period |
| `crush` | in | 7 | bitcrusher divisor, 1..127 (0 acts as 1) |
| `dac_data` | out | 8 | DAC code DB7..DB0: 1..255 while playing, 0 when silent |
| `dac_ce_n` | out | 1 | DAC chip enable bar: high = hold, low = transparent |
| `dac_cs_n` | out | 1 | DAC chip select bar, same as `dac_ce_n` |

Parameters (all have defaults and are normally left alone): `THETA_W` = 13,
`SAMPLE_W` = 8, `CRUSH_W` = 7, `AMPLITUDE` = 127 and `OFFSET` = 128. The
defaults live in `synth_pkg`. `AMPLITUDE` must fit in `SAMPLE_W-1` bits, and
elaboration stops otherwise.

## What the controller has to do

The microcontroller is not part of this RTL. A behavioural model of it,
`tb/pic_model.sv`, drives the end-to-end testbench. To drive the FPGA, a
controller does the following:

* **Receive MIDI** at 31250 baud. Assemble three-byte messages. Keep the last
  status byte for *running status*: if a message starts with a data byte
  (< 0x80), reuse the last status byte. Drop Active Sensing bytes (0xFE),
  which can arrive even inside a message.
* **Note on** (status 0x9n) with velocity > 0: remember the previous note and
  play the new one; set `note_on`.
* **Note off** (0x8n, or note on with velocity 0): if an earlier key is still
  remembered, fall back to it, or just forget it if that key is the one
  released. Otherwise clear `note_on`.
* **Control change** (0xBn) from controller number 73 with a value > 0: that
  value becomes the divisor.
* **Phase step** of note `n` (51..108):
  `round(8192 * 440 * 2^((n-69)/12) / 44100)`. This gives steps from 29 to
  778; note 69 is 82, which plays 441.4 Hz.
* **Every 1/44100 s**: clear `ready`, write `theta` = phase and `crush`,
  advance the phase by the step (mod 8192), and set `ready`.

## Files

| file | contents |
|---|---|
| `rtl/synth_pkg.sv` | widths, amplitude, offset, sample types |
| `rtl/synth_fpga.sv` | top level: the chain above |
| `rtl/input_capture.sv` | synchronisers and ready-enabled input registers |
| `rtl/sine_gen.sv` | quarter-wave sine table, 1 clock |
| `rtl/divider.sv` | signed / unsigned divide, toward zero, 1 clock |
| `rtl/multiplier.sv` | signed x unsigned multiply, low 8 bits, 1 clock |
| `rtl/bitcrush.sv` | divider + multiplier + offset, 2 clocks |
| `rtl/dac_output.sv` | output register, note-on mux, DAC strobes |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/pic_model.sv` | behavioural model of the MIDI controller |
| `tb/ad558_model.sv` | behavioural model of the DAC (latch + 10 mV/LSB) |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`. A watchdog ends any
testbench that hangs and counts a failure.

* `tb_sine_gen`: all 8192 phases against a reference sine computed with
  real arithmetic, plus the latency.
* `tb_divider`, `tb_multiplier`: exhaustive over all 256 x 128 operand pairs.
* `tb_bitcrush`: a random stream with the 2-clock latency checked, plus a
  full sine period at divisor 16 (15 levels).
* `tb_input_capture`: random handshakes with garbage written while `ready`
  is low.
* `tb_dac_output`: random ready pulse lengths, including pulses too short to
  load; muting; strobe timing.
* `tb_synth_fpga`: the full design at default parameters, driven by the
  controller model from a MIDI script. Every sample is checked against a
  reference, along with the DAC latch behaviour, the sample spacing and the
  pitch of note 69. It exercises silence, crushing with divisors 3, 16 and
  127, ignored controls, running status, an Active Sensing byte inside a
  message, falling back to a held note, and note release, and it fails if any
  of them did not happen.
* `tb_workloads`: every note 51..108 played for three periods with its pitch
  checked, and every divisor 1..127 checked sample by sample.

Simulate any testbench with Verilator 5 from the repository root; `-y`
lets Verilator find every other module by its file name:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    --top-module tb_synth_fpga rtl/synth_pkg.sv tb/tb_synth_fpga.sv
./obj_dir/Vtb_synth_fpga
```

Replace `tb_synth_fpga` with any other testbench name. The end-to-end test
runs in under a second, and `tb_workloads` in about ten seconds. Everything
that is read is reset or initialised, so the results do not depend on
initial register contents.

## Choices made here, and departures from the original build

The original used vendor-generated sine, divider and multiplier cores, which
are specified only by their function and port widths. The modules here are
plain, portable equivalents with one register each. The rest of the structure
is kept from the original: ready-enabled input registers, the sine / divide /
multiply chain, an output register enabled by ready, a zero mux driven by
note-on, and CE/CS following ready. Beyond that:

* **Widths.** The phase is 13 bits. An earlier plan of the original used 8
  bits and was widened for pitch accuracy at low notes. The divisor is 7
  bits, matching the 7-bit value the controller sends, although one version
  of the original FPGA code declared it 6 bits wide.
* **Offset 128, amplitude 127.** The original FPGA code described the offset
  as undoing two's complement, but added 64. Here the offset is 128, paired
  with a full-scale sine, for the reasons given above. With 64 and a
  half-scale sine, every divisor of 64 or more would give a flat line.
* **Rounding toward zero**, not floor (see above).
* **Added here:** the synchronisers on `ready`/`note_on`; waiting until the
  pipeline has settled before loading the output register; the one-clock
  register on the DAC strobes, so the strobe rises before the data changes;
  the reset; and divisor 0 meaning 1.
* **Analog side.** The analog parts are not here: the MIDI opto-isolator
  input, the DAC itself, and the low-pass filter, LM386 amplifier and speaker.
  The original build reported some noise that coincided with the `ready`
  edges, that is, with the DAC switching between latched and transparent.
  That is a board-level issue this RTL does not address.
