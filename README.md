# Subtractive synthesizer in FPGA logic

This is a polyphonic digital synthesizer in which all tone generation happens
in programmable logic. A processor reads MIDI key events and sends one 32-bit
word per event. The logic gives each sounding key its own *note bank* (a
voice). A voice has an oscillator rich in harmonics, a resonant low-pass
filter whose cutoff follows an ADSR envelope, and a multiplier whose gain
follows a second ADSR envelope. The voices are summed and passed through a
tremolo. The result goes to a stereo audio codec over I2S. Twelve knobs and
sliders, read through three four-channel I2C ADC modules (PmodAD2), set the
envelopes, the pulse width and the tremolo rate.

The RTL follows a student synthesizer design for a Zynq-7020 board (ZedBoard,
ADAU1761 codec). It keeps that design's block structure, bus widths,
filter equations, clock rates and control scheme. Where the original left
something open, or used floating-point cores, this RTL makes its own choices.
These are listed in the file headers and in "Departures" below.

```
 host_word ──► note_router ──[32]──► note_bank × NUM_BANKS ──[24]──► mixer_accum ──► tremolo ──► i2s_transceiver ──► codec
                                      │ oscillator ─[24]─► biquad_df1 ─[24]─► amp_mult
                                      │ adsr (filter) ─[18]─► lpf_coeff ─► b0..a2
                                      │ adsr (amplitude) ─[18]──────────────► gain
 3 × PmodAD2 ◄─I2C─► pmod_ad2_ctrl ×3 ──► 12 control values (envelopes, duty, tremolo rate)
```

## Rates and clocking

Everything runs on one 48 MHz clock. Slower rates are clock *enables* made by
chained `clock_divider`s, never derived clocks:

| rate | how | used by |
|---|---|---|
| 24 MHz square (`mclk`) | 48 MHz / 2 | codec master clock (the codec's PLL makes its core clock from it) |
| 4.8 MHz enable | / `ARITH_DIV` = 10 | envelope and filter-coefficient arithmetic, one operation per enable |
| 600 kHz enable | / `SAMPLE_DIV` = 8 | voice sample rate (`Fs`) |
| 1 kHz enable | / `ENV_DIV` = 600 samples | envelope steps, so a length knob reads in ms |
| 400 kHz enable | / `I2C_QDIV` = 120 | quarter periods of the 100 kHz I2C clock |
| 100 Hz enable | / `SCAN_DIV` = 480000 | next ADC channel |

The codec is the I2S clock master. Its BCLK (3.072 MHz) and LRCLK (48 kHz) are
sampled by the 48 MHz clock, and their edges are detected. The voices run at
600 kHz and the codec takes the newest mixed sample at each 48 kHz frame.
There is no decimation filter.

## The note word

The word layout is this design's own:

| bits | field |
|---|---|
| 31 | note on (1) / note off (0) |
| 30:24 | bank index |
| 23:0 | oscillator phase increment per 600 kHz sample |

The processor does the MIDI-note-to-frequency conversion:
`incr = f · 2^24 / 600000`, so A4 (440 Hz) is 12303. `note_router` stores
each word in its bank's register and drops words for banks that do not exist.
A note-off word clears bit 31. That stops the oscillator and starts both
envelopes' release.

## One voice (`note_bank`)

**Oscillator.** A 24-bit phase accumulator. The pulse output is high while the
top 12 phase bits are below the 12-bit `duty` slider value (2048 gives a
square wave). The sawtooth is the phase re-centred on zero. Both are scaled to
half of full scale, which leaves headroom for the filter's resonant peak.

**Filter coefficients (`lpf_coeff`).** This is the least obvious part. The
filter is the digital form of the analog second-order low-pass

    H(s) = w0² / (s² + (w0/Q)·s + w0²),   Q = 4

It uses `K = tan(pi·f/Fs) ≈ pi·f/Fs`. With `p = 1 / (1 + K/Q + K²)`:

    b0 = K²·p    b1 = 2·b0    b2 = b0
    a1 = 2·(K² − 1)·p         a2 = (1 − K/Q + K²)·p

K is not computed from a frequency. It is the filter envelope's 18-bit level,
read as an unsigned Q0.18 number, so K runs from 0 to just under 1. That puts
the cutoff between 0 and `Fs/pi`, about 191 kHz. The envelope therefore sweeps
the cutoff directly, with finer steps at low frequencies. K/Q is a right shift
by 2.

The arithmetic is fixed point. Internally the values are unsigned with 30
fraction bits. The coefficients are signed 34-bit values with 30 fraction bits
(range ±8). A three-stage pipeline advances on each 4.8 MHz arithmetic
enable, so the wide divider has ten clocks and can be constrained as a
multicycle path. The stages are:

1. K², K/Q and the denominator.
2. The reciprocal `2^60 / den`.
3. The five products.

`valid` rises once K has held still for long enough. Coefficients change only
between samples, because the envelope moves at most once per millisecond.

**Filter (`biquad_df1`).** Direct form 1:

    y[n] = b0·x[n] + b1·x[n−1] + b2·x[n−2] − a1·y[n−1] − a2·y[n−2]

Two registers hold past inputs and two hold past outputs. The five products
are summed at 61 bits and shifted right by 30, which rounds toward minus
infinity. The result saturates to 24 bits, and the saturated value is the one
fed back. With Q = 4 the peak near cutoff is about 4× (12 dB). A full-scale
input near cutoff therefore clips; `sat` reports it.

**Envelopes (`adsr_envelope`).** Five settings:

- attack, decay and release lengths, in steps;
- peak level;
- sustain level.

On note on, the level moves in a straight line from where it is to `peak`,
then to `sustain`. It holds there, following the sustain slider, until note
off. It then falls to zero and goes idle. Each point on a ramp is computed
exactly as `start + (target − start)·t / len`. A small sequencer does this one
operation per 4.8 MHz arithmetic enable: subtract, multiply, divide, add. The
new level appears on the fourth enable after the step strobe. Strobes must be
at least five enables apart; an assertion checks this. A note on during release restarts the attack
from the current level. A length of zero jumps straight to the target.

**Amplitude (`amp_mult`).** Computes `y = x·g / 2^18`, keeping the high bits.
`x` is the 24-bit signed sample and `g` is the 18-bit unsigned envelope level.

Every stage registers on the same sample strobe. The voice output therefore
trails the oscillator by two samples.

## Mixing, tremolo and the codec link

`mixer_accum` sums the voices by accumulation instead of an adder tree. It
captures all bank outputs and then adds one per clock, so its size does not
grow with `NUM_BANKS`. The sum is ready `NUM_BANKS + 1` clocks after the
sample strobe. It saturates to 24 bits and flags `sat`. At 80 clocks per
sample, up to 77 banks fit.

`tremolo` multiplies the mix by a triangle LFO gain that swings between 1 and
0.5. The LFO phase advances by the 12-bit rate knob on each sample, which
gives about 0.036 Hz per knob step. A rate of 0 switches the effect off.

`i2s_transceiver` sends the mono result on both channels, MSB first, starting
one BCLK after each LRCLK edge (LRCLK low = left), in 32-bit slots. Both words
of a stereo pair are latched when the left word is loaded, and `frame` pulses
at that moment. The same module receives the codec's ADC words (`adc_left`,
`adc_right`). The synthesizer does not use them.

## Parameter control unit

Each `pmod_ad2_ctrl` drives one PmodAD2. The module's ADC is an AD7991 at
address 0x28. SCL is 100 kHz; SDA is open drain (`sda_oe` pulls the line
low). Every 10 ms the controller runs one exchange:

1. Write a configuration byte that selects the next channel.
2. Stop, then start a read.
3. Read two bytes, `0 0 CH1 CH0 D11..D8` and `D7..D0`.

Each reading is therefore refreshed every 40 ms. Missing acknowledges are
counted (`nack_cnt`), and the exchange continues. Readings reset to
mid-scale.

The twelve readings are mapped as follows (the mapping is this design's
choice):

| module | ch 0 | ch 1 | ch 2 | ch 3 |
|---|---|---|---|---|
| 0 | amp attack (ms) | amp decay (ms) | amp sustain | amp release (ms) |
| 1 | amp peak | pulse duty | tremolo rate (0 = off) | filter peak K |
| 2 | filter attack (ms) | filter decay (ms) | filter sustain K | filter release (ms) |

Level readings are shifted left by 6 to make 18-bit values.

## `synth_top` ports

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | 48 MHz clock; synchronous active-high reset |
| `host_valid`, `host_word[31:0]`, `host_ready` | in/in/out | note words; one accepted per clock, always ready |
| `wave_sel` | in | `WAVE_PULSE` or `WAVE_SAW` |
| `mclk` | out | 24 MHz codec master clock |
| `i2s_bclk`, `i2s_lrclk`, `i2s_adc_sdata` | in | from the codec |
| `i2s_dac_sdata` | out | to the codec |
| `adc_left`, `adc_right` | out | words received from the codec |
| `pmod_scl[2:0]`, `pmod_sda_oe[2:0]`, `pmod_sda_i[2:0]` | out/out/in | the three I2C buses |
| `audio_out` | out | the sample sent to the codec |
| `ctrl_values[12]` | out | the twelve control readings |

Parameters: `NUM_BANKS` (4), `ARITH_DIV` (10), `SAMPLE_DIV` (8), `ENV_DIV`
(600), `I2C_QDIV` (120), `SCAN_DIV` (480000).

## Departures from the original design

- The arithmetic is fixed point throughout. The original used floating-point
  IP cores for the envelopes and the filter, and never got them working in
  hardware.
- The design uses one clock domain with enables. The original used separate
  48 MHz and 4.8 MHz clocks, and ran the ADC readers from 100 MHz.
- The 4 voices, the note-word layout, the knob mapping, the half-scale
  oscillator level, the tremolo depth and shape, and the saturation in the
  filter and adder are all this design's own.
- The tremolo acts once, on the mix.
- The codec gets the same mono signal on both channels.
- Not included: the processor-side software (MIDI parsing and voice
  scheduling), the processor-to-logic link, the clock PLL (100 → 48 MHz), and
  the codec's start-up register programming over its own I2C bus.
  `synth_top` takes the 48 MHz clock and the note-word stream as inputs. The
  codec must be set up as I2S master with 24-bit data in 32-bit slots.

## Verification and simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- The oscillator, multiplier, mixer, tremolo and filter are checked sample by
  sample against independent integer models.
- The coefficients are checked against the formulas in double precision, to
  within 1e-7.
- The envelope is checked step by step against a reference ramp model.
- The I2C reader is checked against a behavioural ADC model (`ad7991_model`).
- The I2S link is checked against a codec model (`i2s_codec_model`).

`tb_synth_top` runs the complete design at its default parameters, about
120 ms of simulated time. It checks:

- the control readings;
- silence before, between and after notes;
- one and four simultaneous notes;
- adder clipping;
- a word for a bank that does not exist;
- the change of duty and tremolo knobs, and the sawtooth;
- every codec frame against the sample loaded for it;
- the rates, counted in clocks: 80 clocks per sample, a 24 MHz `mclk`, 480 clocks per SCL period and 480000 clocks between ADC exchanges.

It also counts each mechanism and fails if any never happened. It takes a few
seconds.

To simulate with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/synth_pkg.sv tb/tb_synth_top.sv --top-module tb_synth_top -Mdir obj
./obj/Vtb_synth_top
```

Replace `tb_synth_top` with any other `tb_*` to run a block's testbench. All
RTL passes `verilator --lint-only -Wall`, with warnings only for unused bits
of shared words and status outputs.

What has not been checked: the design has not been run on hardware or against
the real ADC or codec. The filter has only been tested at the K values listed
in the testbenches. Nothing limits how fast the filter envelope may sweep
against the sample rate.
