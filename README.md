# FMPGA: a four-voice wavetable synthesizer in SystemVerilog

FMPGA turns an FPGA into a polyphonic synthesizer. A MIDI keyboard plays it,
and it drives an audio DAC. Each of its four voices reads a single-cycle
waveform from a table and passes it through an S-curve distortion. The voice
then scales the result by an amplitude. Pitch, amplitude, distortion strength
and dry/wet mix can each be modulated. A setting is a base value plus the sum
of eight modulation sources, each multiplied by its own scalar:

- three ADSR envelopes per voice;
- three global LFOs;
- the key velocity;
- a second wavetable oscillator per voice.

Three rotary encoders edit about fifty settings, and a 128x64 monochrome LCD
shows them. The whole design runs from one 50 MHz clock and produces 44.1 kHz
audio.

```
 midi_rx ─► midi_sampler ─► midi_decoder ─► event_packager ─► event_dispatcher
                                              (pitch_lut)          │ one event per voice
                                                                   ▼
            lfo_bank (3 LFOs) ─────────────────────────►  apu 0   apu 1   apu 2   apu 3
            sample_clock (44.1 kHz strobe) ────────────►    │       │       │       │
                                                            └───────┴─► mixer ◄─┴───┘
                                                                           │ 16-bit
                                                                      dac_spi ─► DAC
 enc_a/enc_b ─► rotary_encoder x3 ─► config_settings ──► every apu, lfo_bank
                                              └───────► video_driver ─► LCD (SPI)
```

The top level is `fmpga_top`. Everything lives in the package `fmpga_pkg`, or
in one module per file under `rtl/`.

## Number formats

All datapath values are 27 bits wide. That is the widest operand a typical
FPGA DSP block multiplies in one piece. The binary point depends on the
quantity:

| quantity | format | range | used for |
|---|---|---|---|
| unit value | signed Q2.24 | ±2 | samples, envelopes, LFOs, amplitude, dry/wet, velocity |
| frequency | signed Q14.12 | ±8192 Hz | note frequency, pitch applicator |
| time | unsigned Q3.24 | 0..8 s | attack, decay, release |
| distortion k | signed Q4.22 | ±8 | distortion exponent (limited to 0..10 by clamping) |

`fmpga_pkg::mul_unit(src, scl)` is the only multiplication the modulation path
needs. It multiplies a Q2.24 source by a value in any format and shifts the
product right by 24. The result is therefore in the format of the second
operand. This lets one applicator design serve Hz, unit values and k alike.

The sample period 1/44100 s cannot be held exactly in Q3.24 (it is 380.4 LSB).
The envelope time step is 380 LSB, so stage times run about 0.1 % long. The
oscillator phase step per Hz is a separate constant, round(2^24·2048/44100),
with an error of about 1.5·10⁻⁷.

## MIDI path

**midi_sampler** oversamples nothing. It counts `SAMPLING_RATE` = 1600 clocks
per bit (31,250 baud at 50 MHz) and samples the synchronised line when the
count expires. Every edge on the line reloads the count with half a bit
period. The samples therefore land in the middle of each bit, and the receiver
re-aligns on every transition. The output is one strobe per bit, whether or not
a byte is in progress.

**midi_decoder** frames these bits as UART bytes: start 0, eight data bits LSB
first, stop 1. A byte with a bad stop bit is dropped and reported on
`frame_error`. A message state machine (IDLE → PITCH → VELOCITY → message)
recognises Note On (0x9n) and Note Off (0x8n) on any channel. Any other status
byte, or a framing error, sends it back to IDLE. Running status is not
supported.

**event_packager** turns a Note On with velocity 0 into a Note Off, as many
keyboards send it. It also looks up the note's frequency in **pitch_lut**. The
lookup holds the twelve notes of the top octave (equal temperament, A4 =
440 Hz) and shifts right by the octave. It then issues a packed `note_event_t`
with one-cycle `note_on`/`note_off` strobes. The event follows the message by
two cycles.

**event_dispatcher** owns the voice allocation. It keeps the four voices in
least-recently-used order:

- A Note On goes to the least recently used voice whose key is released. Such a
  voice may still be sounding its release tail, and reusing the oldest one
  leaves the freshest tails alone.
- If all four keys are held, the least recently used voice is stolen. The
  `stolen` output pulses when this happens.
- A Note Off goes to the voice holding that note. A Note Off for a note that no
  voice holds is ignored.

An assertion checks that at most one voice receives a Note On per event.

## The voice (`apu`)

Each voice holds the following blocks:

- three `envelope` generators;
- four `applicator`s (pitch, amplitude, distortion k, dry/wet);
- two `wavetable_oscillator`s;
- a `distortion` stage;
- an output multiplier.

The 44.1 kHz `sample_en` strobe starts each sample. The applicators run freely
in the background.

### Envelopes and the 1/x table

The four envelope stages are straight lines. With t the time since the stage
began:

```
attack   t / A
decay    1 - t (1 - S) / D
sustain  S
release  v_i - t v_i / R        (v_i = output when the key was released)
```

The divisions are multiplications by a reciprocal from `recip_rom`. This is a
32 KB table of 8192 × 32-bit entries, entry i = 2^31 / i. It is 1/x in UQ12.20
for x = i/2048 s, covering 0..4 s in steps of 1/2048 s. The table is addressed
by the current stage's length truncated to that resolution. t / stage is
clamped to 1 so that truncation cannot overshoot. Every envelope has its own
copy of the table, which makes the table the largest memory in the design
(see *Resources*). Times of 0 end the stage at the next sample.

### Applicators: the modulation matrix

Every modulated setting is

```
value = base + Σ_{i=0..7} source_i · scalar_i
```

The sources are, in order:

1. envelope 1, envelope 2, envelope 3;
2. LFO 1, LFO 2, LFO 3;
3. velocity/128;
4. the modulation oscillator.

An applicator uses one multiplier. A 3-bit counter selects a source and its
scalar, and the products are accumulated onto the base. The result is
saturated to 27 bits and published every eight cycles. Because 8 cycles are
tiny against the 1134 cycles of a sample, the value seen at each sample is
current.

The bases depend on the applicator:

| applicator | base | typical use |
|---|---|---|
| pitch (Hz) | the note's frequency | vibrato from an LFO, pitch envelope |
| amplitude | 0 | envelope 1 with scalar 1.0 gives a classic ADSR voice |
| distortion k | the k setting | k swept by an envelope |
| dry/wet | the dry/wet setting | |

### Oscillators

`wavetable_oscillator` keeps an 11-bit phase into a 2048-sample table and a
24-bit fractional error register. The phase step is f · 2048 / 44100, formed as
a product with a constant instead of a division:

- its integer part is added to the phase every sample;
- its fractional part is added to the error register;
- a carry out of the error register adds one more sample.

The average step is therefore exact to 24 fractional bits. Frequency error is
far below 0.01 % across 20 Hz to 4 kHz. `wavetable_rom` holds sine, square,
triangle and sawtooth tables of 16-bit samples. They are computed when the
design is elaborated:

- the sine by a Chebyshev recurrence over one quarter, then mirrored;
- the other three from their formulas.

In each voice one oscillator runs at the note's own frequency and feeds the
modulation source. The other one plays the pitch applicator's output and is
the voice's sound. `lfo_bank` is three more of these oscillators, shared by all
voices, with their rate clamped to 0..20 Hz.

### Distortion

The sample x in [-1, 1] is bent by an odd S-curve, then mixed with the dry
signal:

```
d = 1 - (1 - x)^k     (x ≥ 0)          y = x + wet · (d - x)
d = -1 + (1 + x)^k    (x < 0)
```

k = 1 leaves the sample unchanged, and large k approaches a square wave. k may
be fractional. The power unit multiplies by b = 1 - |x| repeatedly, keeping
b^floor(k) and b^ceil(k). It then interpolates linearly between them with the
fraction of k. All of this, plus the dry/wet mix, shares one multiplier, one
product per cycle. A sample therefore takes ceil(k) + 4 cycles, or 14 at the
limit k = 10. Inputs are clamped: x to [-1, 1], wet to [0, 1], k to [0, 10].

### Timing within one sample

| cycle after `sample_en` | event |
|---|---|
| 0 | envelopes and oscillators advance |
| 2 | oscillator sample valid, distortion starts |
| ceil(k) + 6 | distortion done |
| ceil(k) + 7 | voice output (distorted sample × amplitude) registered, `out_valid` |

`mixer` keeps the latest output of every voice. At the next `sample_en` it emits
the sum of the four, divided by four and saturated to 16 bits. Each voice
therefore reaches the DAC one sample period (22.7 µs) plus a few cycles after
its own computation. `sample_clock` makes the 44.1 kHz strobe with a
fractional accumulator: 1133 or 1134 clocks apart, 44.1 kHz exactly on
average.

## Audio output

`dac_spi` sends every mixer sample to a 10-bit serial DAC of the DAC101S101
kind. The 16-bit sample becomes offset binary, and its ten top bits form a
16-bit frame: `0000 d9..d0 00`, MSB first. `sync_n` is low during the frame,
`sclk` idles high at 12.5 MHz, and the DAC takes `din` on falling edges. A
frame takes 63 clocks. The mixer output itself stays 16 bits and is brought out
as `audio_sample`/`audio_valid`.

## Settings, encoders and display

`rotary_encoder` synchronises and debounces the two contacts of an encoder. The
debounce is 1 ms. Each rising edge of A is one step, clockwise when B is low.
The three encoders have fixed roles:

1. the first selects the page;
2. the second selects the setting on the page;
3. the third changes its value.

`config_settings` keeps every setting as an 8-bit code and decodes the codes
into the fixed-point `synth_cfg_t`:

| page | settings | code meaning |
|---|---|---|
| 0-2 ENV 1..3 | attack, decay, sustain, release | time code/64 s, level code/255 |
| 3 VOICE | wave, modulation wave, k, dry/wet | wave 0..3 = sine, square, triangle, saw; k code/16 |
| 4 LFO | rate 1..3, wave 1..3 | rate code·20/255 Hz |
| 5 AMP | amplitude scalar per source | signed, code/64 |
| 6 PITCH | pitch scalar per source | signed, code Hz |
| 7 DIST K | k scalar per source | signed, code/16 |
| 8 DRYWET | dry/wet scalar per source | signed, code/64 |

That makes 54 settings. After reset the synthesizer plays a sine wave. Envelope
1 (47 ms / 203 ms / 70 % / 297 ms) drives the amplitude, k is 1, the mix is
dry, and the LFOs run at 5, 2.5 and 1.25 Hz.

`video_driver` draws the current page on an ST7565-style 128x64 SPI LCD
without a frame buffer. It walks the display's eight 8-row pages and 128
columns, and computes each column byte from the coordinates:

- the page name at the top left and the selected setting's name at the top
  right, from small name ROMs and a 5x7 font;
- below these, a 32x24 cell per setting, holding an outline rectangle and a
  bar whose length is the code;
- a thicker outline for the selected setting.

The frame has these properties:

- The LCD clock is 16.7 MHz (one third of the system clock).
- A frame is about 25,000 clocks (0.5 ms).
- A new frame starts every 833,333 clocks (60 frames/s).
- The controller's initialisation commands are sent once after reset.

## Where this design departs from its source

- **Oscillator roles.** The source's block diagram numbers the two oscillators
  differently from its text. This design has one audible oscillator (at the
  pitch applicator's frequency) and one modulation oscillator (at the note's
  frequency).
- **Four wave shapes.** The source mentions three shapes in one place and four
  in another. All four are built.
- **Applicator arithmetic.** "Multiply the parameter by the envelope" is
  realised as base plus a sum of scaled sources. Amplitude modulation then
  means an amplitude scalar on an envelope, as in the reset settings.
- **DAC resolution.** Audio is 16 bits up to the mixer, but the named DAC has
  10 bits. Only the top ten bits reach the pin.
- **Display graphics.** The outline rectangles are computed from coordinates,
  not read from two ROMs.
- **Choices made here.** The setting pages, codes and ranges, the LCD
  controller commands and the MIDI details are this design's own. The MIDI
  details are: all channels accepted, no running status, and velocity as
  velocity/128.
- **Not included.** There are no high/low-pass filters and no preset storage.
  The source dropped both. There is no waveform view on the display.
- **Analog circuits.** The MIDI opto-isolator, the encoder pull-ups, the DAC's
  output amplifier and the LCD module are outside the RTL. Their signals are
  top-level ports.

## Resources

Per voice there are 17 multipliers, 27×27 or 27×32 bits:

- 4 in the applicators;
- 3 in each envelope;
- 1 in the distortion stage;
- 1 for the amplitude;
- 1 in each oscillator's step computation.

The LFOs add 3 more, giving 71 in all. Memory is dominated by the twelve
reciprocal tables (12 × 256 Kbit). The eleven copies of the wavetable ROM add
11 × 128 Kbit. The total is about 4.6 Mbit, which fits the block RAM of a
mid-size FPGA. Sharing one reciprocal table per voice, or one in total by
time-multiplexing, would cut this sharply. The parameter `RECIP_AW` (table
address width) shrinks it for experiments, at the cost of time resolution.

## Simulating

Every block has a self-checking testbench in `tb/`. Each compares against
values computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/fmpga_pkg.sv tb/tb_envelope.sv \
          --top-module tb_envelope -Mdir obj_env && ./obj_env/Vtb_envelope
```

Replace `tb_envelope` with any testbench name. Two of them cover the whole
design.

**`tb_fmpga_top`** runs at reduced sizes: 16 clocks per MIDI bit, 80 per
sample, short debounce and frame period. Everything is driven through the pins,
and it checks:

- polyphony and voice stealing;
- velocity-0 Note Off;
- recovery from a framing error;
- an encoder edit reaching the voices;
- release to silence;
- that every DAC frame carries the mixer's sample.

It counts every mechanism and fails if one never occurs. It runs in about 15 s.

**`tb_fmpga_full`** runs with every parameter at its default: real MIDI baud
rate, 44.1 kHz, 60 Hz display. It plays A4 through MIDI and measures:

- the key-to-DAC latency: 1.6 ms, required below 10 ms;
- the pitch from zero crossings: 439.99 Hz;
- the sample spacing;
- the LCD frame rate: one frame every 833,333 clocks (60 frames/s), each
  sent in about 26,000 clocks (0.53 ms).

It then releases the note and checks for silence. It simulates about 0.7 s of
real time in under a minute.

**`tb_intonation`** plays MIDI notes 16 to 107 (20.6 Hz to 3.95 kHz) through
`pitch_lut` and a `wavetable_oscillator`. For each note it measures the played
frequency from the phase advance over 0.1 s. The worst deviation from equal
temperament is 0.0009 %.

**`tb_apu`** also measures the voice pipeline at the distortion limit k = 10.
The result is 17 cycles, so one sample period plus the pipeline is 23.0 µs.

The other testbenches use short parameter values where the defaults would only
slow them down: `SAMPLING_RATE`, `DEBOUNCE`, `FRAME_CYCLES` and the sample
strobe spacing.
