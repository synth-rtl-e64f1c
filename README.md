# MIDI-controlled FM synthesizer and channel vocoder

A keyboard plays notes over MIDI. The FPGA turns each held key into a tone
from a small FM synthesizer with five voices. It can also impose the spectral
shape of a microphone signal (the *modulator*) on that tone (the *carrier*)
with a ten-band channel vocoder, which gives the familiar "robot voice". The
design targets a 50 MHz FPGA board with a 24-bit audio codec. The MIDI line
reaches the FPGA through an opto-isolator on a spare input pin.

Everything from the MIDI serial pin to the codec's serial data pins is
synthesizable SystemVerilog. The original system decoded MIDI in software on
a soft processor attached to the UART and to the synthesizer over a bus.
Here that program's job is done by a small state machine (`midi_decoder`), so
the design needs no processor. The I2C set-up of the codec is not included:
the codec must be configured for slave mode, 24-bit left-justified data, by
other means.

```
 midi_rx ─► midi_interface ─► midi_decoder ─► 5 × (freq, enable)
            (baud_tick,                         │
             midi_uart_rx,                      ▼
             byte_reg)              synthesizer: 5 × fm_patch ─► Σ ─► carrier ─┐
                                                                 │             │
 aud_adcdat ─► codec_serial ─► mic sample ─► vocoder ◄───────────┘             │
                    ▲                          │ vocoded                       │
                    └──────── selector (sw[0]) ◄───────────────────────────────┘
```

## Files

| File | Role |
|---|---|
| `rtl/synth_pkg.sv` | shared constants and types; functions that compute every table (note frequencies, sine, noise, filter coefficients) at elaboration |
| `rtl/baud_tick.sv` | one-clock tick every 100 clocks (16 × 31250 Hz) |
| `rtl/midi_uart_rx.sv` | 16× oversampling serial receiver |
| `rtl/byte_reg.sv` | received byte plus a "new byte" flag |
| `rtl/midi_interface.sv` | the three above, with registered data and status outputs |
| `rtl/midi_decoder.sv` | Note On / Note Off parser and voice allocator |
| `rtl/fm_operator.sv` | wavetable oscillator with a frequency-modulation input |
| `rtl/fm_patch.sv` | one voice: four operators and a patch selector |
| `rtl/bandpass_filter.sv` | second-order IIR band-pass section |
| `rtl/square_lowpass.sv` | envelope detector: square, then first-order low-pass |
| `rtl/vocoder.sv` | ten-band channel vocoder |
| `rtl/codec_serial.sv` | serial port to the audio codec (FPGA is master) |
| `rtl/synthesizer.sv` | five voices, sum, vocoder, output selector, codec port |
| `rtl/synth_top.sv` | the whole design with board-level ports |

Each file begins with a comment on its interface and timing.

## Top-level ports (`synth_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk` | in | 50 MHz system clock |
| `rst_n` | in | active-low reset (a push button); registered into a synchronous reset |
| `midi_rx` | in | MIDI serial data at TTL level, idle high |
| `sw[17:0]` | in | `sw[0]`: 0 plays the carrier, 1 plays the vocoded signal. `sw[17:13]`: patch number |
| `ledg[7:0]` | out | last received MIDI byte |
| `aud_xck` | out | codec master clock, 12.5 MHz |
| `aud_bclk`, `aud_daclrck`, `aud_adclrck` | out | bit clock and left/right frame clocks |
| `aud_dacdat` | out | serial data to the DAC |
| `aud_adcdat` | in | serial data from the ADC (microphone) |

## MIDI path

**Receiver.** MIDI runs at 31250 baud, 8 data bits, no parity, one stop bit.
`baud_tick` divides the 50 MHz clock by 100, giving 16 ticks per bit.
`midi_uart_rx` first passes the line through a two-flop synchroniser. On a low
level it counts 8 ticks to the middle of the start bit. It then samples each
data bit 16 ticks later, least significant bit first. It waits 16 more ticks
into the stop bit and pulses `data_ready`. The stop bit's level is not
checked. A byte therefore completes 152 ticks (15 200 clocks) after its start
edge. The receiver tolerates a baud-rate error of at least ±3 %.

**Byte register.** `byte_reg` stores the byte and raises a flag. A reader
clears the flag. If a new byte arrives in the same cycle as the clear, the
set wins, so no byte is lost. `midi_interface` registers the byte and the
flag once more. It shows the flag as bit 0 of an 8-bit status word.

**Decoder.** `midi_decoder` polls the flag, reads the byte and clears the
flag. It then waits until the flag has dropped, because the registered status
path lags by two cycles. A byte with bit 7 set is a status byte: its upper
nibble becomes the current status and the data count is reset. Data bytes are
collected in pairs, and the status is kept, so running status works: a
keyboard may send one status byte followed by many key/velocity pairs. For
each complete pair:

* `9n key vel` with `vel ≠ 0` starts a note if the key is in 21..105 (A0 to
  A7, 85 keys). The note goes to the next voice in round-robin order
  (0,1,2,3,4,0,…), replacing whatever that voice played. That voice's
  frequency output becomes the note's frequency in Hz.
* `9n key 0` and `8n key vel` stop a note. The lowest-numbered voice holding
  that key has its frequency set to 0. Only that one voice is stopped.
* Pairs under any other status are ignored.

The channel nibble is ignored: every channel plays. The frequency table holds
`floor(440 · 2^((i−48)/12))` Hz for `i = key − 21`. It is computed in
`synth_pkg::note_freq_hz`. The top level enables a voice whenever its
frequency is non-zero.

## Oscillator arithmetic (`fm_operator`)

One period of a sine is stored as 512 entries of
`trunc((2^20 − 1) · sin(2πi/512))`, as 24-bit two's complement. The oscillator
steps a 9-bit phase through the table. It holds each entry for a number of
system clocks set by the note:

```
step_len = CONV / (freq + (modulator >> mod_factor))      CONV = 97656 ≈ 50 MHz / 512
```

A step lasts `step_len + 1` clocks. So 440 Hz gives 222 clocks per entry and a
period of 113 664 clocks (439.9 Hz). A positive modulator raises the
instantaneous frequency; this is the FM. The modulator is read as an unsigned
24-bit number and shifted right by `mod_factor` to set the depth. The
division is combinational, and the step length is recomputed every clock. A
zero divisor (no note and no modulation) holds the phase.

`osc_select` picks the waveform:

| Code | Waveform |
|---|---|
| 0 | sine table |
| 1 | sawtooth: the phase placed at bits 20:12, so 0 to just under 2^21 over one period |
| 2 | square: +0x011111 for the first half of the period, 0 for the second half (taken from the phase MSB) |
| 3 | noise: the low 8 phase bits index a fixed 256-entry table of LFSR words, so the sequence repeats twice per note period and keeps a pitch |

`mute` forces the output to zero.

## Patches (`fm_patch`)

Each voice holds four operators running at once. A 5-bit `mode` picks which
one is heard; the output is registered.

| Mode | Sound |
|---|---|
| 0 | sine at the note's pitch |
| 1 | sawtooth at the note's pitch |
| 2 | FM: a sine at the note's pitch, modulated by operator 3 shifted right by 15 |
| 3 | operator 3 alone: a sine at three times the pitch |
| 4–31 | silence |

All five voices play the same patch. The carrier is the 24-bit wrap-around
sum of the five voice outputs. Five full-scale sines (±2^20) cannot overflow
it.

## Vocoder

The vocoder is the part that needs the most care. It is a bank of fixed-point
recursive filters whose rounding decides whether it works at all.

### Structure

The microphone signal and the carrier each go through ten band-pass filters
(centre / bandwidth in Hz):

```
111/40  250/50  354/60  500/70  707/80  1000/90  1414/150  2000/250  2828/500  5187/1000
```

For each band, the microphone component is squared and low-pass filtered at
440 Hz. This gives the band's short-time energy, its *envelope*. The envelope
multiplies the carrier component of the same band. The ten products are
summed. Bands where the voice has energy let the carrier through; silent
bands block it.

All 30 filters run once per audio sample, on the codec's frame strobe. There
is one strobe every 1024 clocks. The design sample rate is 48 kHz.

### Band-pass section (`bandpass_filter`)

The design equations are

```
H(z) = k (1 − z^−2) / (1 − β(1+α) z^−1 + α z^−2),     k = (1 − α)/2
β = cos(ωc),        ωc = 2π fc / fs
α = 1/cos(B) − sqrt(1/cos(B)^2 − 1),                  B = 2π bw / fs
```

Here α is the root in (0, 1) of `cos B = 2α / (1 + α²)`. The peak gain is
exactly 1 at `fc`, and the gain is −3 dB at about `fc ± bw/2`. The three
coefficients are scaled by 2^13 and rounded. This happens at elaboration from
the `FC_HZ`, `BW_HZ` and `FS_HZ` parameters (`synth_pkg::bpf_coef`):

```
a2 = round(−β(1+α)·8192)   a3 = round(α·8192)   b1 = round(k·8192)
y[n] = (b1·x[n] − b1·x[n−2] − a2·y[n−1] − a3·y[n−2] + 4096) >>> 13
```

Arithmetic is 64 bits wide and the state is 32 bits wide. The two narrowest
bands have poles very close to the unit circle: for 111 Hz, α = 8149/8192. A
bias in the division is fed back through `y[n−1]` and `y[n−2]` at nearly
unity gain. Truncating division (rounding towards −∞) biases every step by
−½ LSB, and that bias accumulates into an offset that can swamp a quiet band.
The section therefore rounds to nearest. With rounding, a bit-exact integer
model and the filter agree on every sample, and the measured gains match the
analytic `|H(e^jω)|` within a fraction of a percent (`tb_filter_response`).

For reference, band 10 (5187 Hz / 1000 Hz at 48 kHz) gives `a2 = −11966`,
`a3 = 7184` and `b1 = 504`.

### Envelope (`square_lowpass`)

Each band-pass output (up to about ±2^23) is squared to 64 bits. Bits 63:32
are kept, so a full-scale sine gives a mean square of about 2^13. The result
then passes through

```
H(z) = K (1 + z^−1) / (1 − α z^−1),   α = (1 − sin ωc)/cos ωc,  K = (1 − α)/2,  fc = 440 Hz
y[n] = (K·s[n] + K·s[n−1] + α·y[n−1]) >>> 13          K = 229, α = 7733 at 48 kHz
```

Here `s` is the squared input. This filter truncates on purpose. Its input is
never negative, and rounding to nearest leaves a dead band: once the input is
zero, an output of a few LSB multiplied by α/8192 rounds back to itself, so
the envelope never decays to zero. Truncation lets it reach exactly 0 when
the microphone goes quiet.

### Products and output scaling (`vocoder`)

For each band the product `envelope × carrier_band` is shifted right by
`OUT_SHIFT` (default 14). The ten results are summed. The sum is clipped to
24 bits, and the `saturated` output flags a clipped sample. With a full-scale
carrier tone and a full-scale microphone tone in the same band, the output is
about half scale. The original design describes the filter banks in
detail but not this scaling; it is this design's own choice.

**Latency.** A carrier sample reaches the output register 2 strobes later. A
microphone sample needs 3 strobes, one more for the envelope register.

## Codec port (`codec_serial`)

The FPGA drives all codec clocks:

* bit clock `aud_bclk` = 50 MHz / 16 = 3.125 MHz;
* 32 bit slots per channel and 64 per frame;
* `aud_daclrck` and `aud_adclrck` high for the left half.

Data is left-justified and MSB first. It changes while the bit clock is low
and is sampled on its rising edge. The 24-bit sample occupies the first 24
slots of each half; the remaining slots are zero. The same sample goes to
both DAC channels. The left ADC word is captured and presented as the
microphone sample. `sample_strobe` pulses once per frame, every 1024 clocks.
The DAC sample is latched at that moment.

The resulting rate is 48 828 Hz, 1.7 % above the 48 kHz the filters are
designed for. This moves every band centre up by 1.7 %. An exact 48 kHz needs
a 12.288 MHz codec master clock, which this design does not generate.
`aud_xck` is clk/4.

## Departures from the original design

* **No processor.** MIDI decoding and voice allocation are a state machine,
  not a program on a soft CPU. The decisions are the same: round-robin
  allocation, Note On with velocity 0 treated as Note Off, keys outside 21..105
  ignored, and running status kept.
* **Computed tables.** The sine, note and coefficient tables are computed
  from their formulas at elaboration rather than typed in.
  * The sine table and 29 of the 33 filter coefficients match the original
    integers exactly. Four coefficients differ by one LSB: band 1 `a2`, band 4
    `b1`, and band 7 `a2` and `b1`.
  * The note table follows the formula exactly. The original table rounded a
    few high entries up and listed some of its top entries out of order.
* **Sample rate 48 kHz.** The filter coefficients are designed for 48 kHz.
  Some of the original coefficient comments mention 32 kHz, but the
  coefficients themselves are the 48 kHz ones.
* **Filter rounding.** The band-pass sections round instead of truncating
  (see above). The envelope low-pass truncates, and it filters the *squared*
  signal at both taps.
* **Filters advance once per sample.** They advance on the codec frame
  strobe, not on every system clock.
* **Completed vocoder.** The carrier filter bank, the multipliers, the adder,
  the output scaling and the clipping complete the vocoder as its block
  diagram draws it.
* **Signed microphone input.** The microphone sample is sign-extended into
  the filters; zero extension would turn negative samples into large positive
  ones.
* **Square wave at the note's pitch.** The square wave is taken from the
  phase MSB, so it sounds at the note's pitch rather than toggling at every
  table step.
* **Noise table.** The noise table is a fixed 24-bit LFSR sequence
  (polynomial taps `0xE10000`, seed `0x5A5A5A`).
* **Codec configuration.** The I2C configuration of the codec is not part of
  this design.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
Expected values are worked out by models written inside the testbenches.

* Bit-exact integer models of the band-pass, envelope and vocoder datapaths.
* A reference model of the MIDI decoder run against random byte streams with
  running status.
* A serial-line driver with ±3 % baud error.
* A codec model that checks framing and both data directions.
* Period measurements of the oscillators.
* `tb_filter_response` measures the gain of two band-pass sections at six
  frequencies each against the analytic response. One is the 5187 Hz band;
  the other is a 2500 Hz / 200 Hz / 32 kHz section, whose coefficients
  0.01926, −1.73 and 0.9615 the testbench also checks.
* `tb_vocoder_saw` runs a 100 Hz sawtooth from `fm_operator` through the
  vocoder at the real clock and sample rates for 0.45 s. The modulator is a
  synthetic two-formant voice (500 Hz and 2000 Hz). The testbench checks
  the output harmonics against a real-valued model of the same vocoder:
  harmonics near the formants pass and the others are suppressed.
* `tb_synth_top` runs the complete design at its default parameters. It sends
  real MIDI serial frames, including:
  * Note On;
  * Note Off in both forms;
  * running status;
  * voice reuse after five notes;
  * an out-of-range key;
  * a patch change;
  * the vocoder path with a microphone tone fed through the codec's ADC line.

  It checks voice frequencies, the pitch of the serial DAC output and the
  vocoder output, and counts each of these events. It takes a few seconds.

Simulate a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/synth_pkg.sv tb/tb_synth_top.sv --top-module tb_synth_top
./obj_dir/Vtb_synth_top
```

Replace `tb_synth_top` with any other testbench name. The package must be
named first on the command line; every other module is found through `-y`.
The code also elaborates in Yosys with the slang front end
(`yosys -m slang -p 'read_slang rtl/*.sv --top synth_top; synth -top synth_top'`).

## Changing the design

* **Voices.** Change `NUM_VOICES` in `synth_pkg`. The decoder's round-robin
  counter and the synthesizer's generate loop follow it.
* **Bands.** Edit `BAND_FC` / `BAND_BW` and `NUM_BANDS` in `synth_pkg`. The
  coefficients are recomputed.
* **Sample rate.** If you change the codec timing (`BCLK_DIV` or
  `BITS_PER_CH` in `codec_serial`), set `FS_HZ` to the new frame rate so the
  filters stay on their bands.
* **Patches.** Add new patches as extra operators and mode cases in
  `fm_patch`.
