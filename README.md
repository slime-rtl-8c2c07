# SLIME — a one-person guitar and vocal effects rack in SystemVerilog

SLIME turns an FPGA board into a small pedalboard for a musician who plays
alone. A guitar and a microphone come in through a stereo audio codec: guitar
on the left channel, voice on the right. One of eight effects is picked with
the board switches: delay, distortion, overdrive, wah-wah, bass boost,
tremolo, overdrive after tremolo, or a harmonizer. The harmonizer adds a major
third, a perfect fourth and/or a perfect fifth above the input, so the player
can accompany themselves. Four rotary encoders set the volume and the
strength of the effects. A VGA monitor shows the live spectrum of the guitar
signal as green bars.

Everything here is synthesizable RTL except the clock synthesiser and the
codec chip. Those two are outside the design: the top level takes its two
clocks as inputs, and the testbenches include a behavioural codec.

## Signal flow

```
 codec ADC --I2S--> axis_i2s2 --stream--> audio_controller --stream--> axis_i2s2 --I2S--> codec DAC
                                         |  every pedal, in parallel:
 4 x rotary_decoder --vol,mag1..3------->|   delay_pedal, distortion_pedal x2,
 sw[15:0] --(2-flop sync)--------------->|   overdrive_pedal x2, wahwah_pedal,
                                         |   bass_boost_pedal, tremolo_pedal x2,
                                         |   overdrive x2 after the tremolos,
                                         |   harmonizer (6 x pitch_shifter)
                                         |  -> pick one -> volume -> send
                                         |
                                         +--> stft: fft_1024 -> square_and_sum -> axis_fifo
                                                    -> isqrt -> spectrum_ram ==> xvga / bars -> VGA
```

`slime_top` holds the four decoders, the I2S interface and the controller.
The controller holds all the pedals and the spectrum display. Shared types
and constants are in `slime_pkg`: 24-bit signed samples, the stereo pair
struct, the pedal enum, and the tap and pitch-rate functions.

## Frame timing: the part to understand first

The audio clock is 22.591 MHz, which gives exactly 512 clocks per 44.1 kHz
stereo frame. A free-running 9-bit counter inside `axis_i2s2` makes all the
codec clocks:

- MCLK is the audio clock itself.
- SCLK is counter bit 2, so one bit takes 8 clocks.
- LRCK is counter bit 8, so the left word is sent in the first half of the frame and the right word in the second.

Words are 24 bits, MSB first, one SCLK after each LRCK edge (standard I2S).

The stream side is built around one point in the frame, count 455, just
after the last bit of the right word:

- **Receive:** at count 455, the words of the frame just shifted in are presented as a two-word packet (left, then right with `last`). If the previous packet has not been taken by then, the new frame is dropped.
- **Transmit:** ready opens at count 455 and closes when the next frame starts. A packet accepted in that window is shifted out during the next frame. Nothing is accepted mid-frame, so an output word is never torn.

The controller is a six-state machine:

1. **S_RX:** take the left and right words.
2. **S_START:** send a one-clock start pulse to every pedal, and latch the pedal choice.
3. **S_WAIT:** wait for that pedal's valid.
4. **S_VOL:** multiply by the volume.
5. **S_TXL, S_TXR:** send the two words.

No new packet is accepted while one is in flight.

Every pedal runs on every packet, whether it is selected or not. The delay
memory, filter histories, tremolo wave and pitch buffers are therefore always
current, and switching pedals never plays stale audio. The pedal choice is
latched per packet, so one packet never mixes two pedals.

Pedal latencies, from the start pulse to valid:

| pedal | latency (clocks) |
|---|---|
| clipping, tremolo | 1 |
| overdrive after tremolo | 2 |
| harmonizer | 4 |
| delay | 13 |
| bass boost, wah-wah (127-tap serial FIRs) | 127 |

How many frames the output trails the input depends on where the controller is in the frame:

- **Fast pedals:** done a few clocks after count 455, still inside the transmit window. The output then trails the input by two frames: one to shift the word in, one to shift it out.
- **FIR pedals:** done about 130 clocks later, after the window has closed. They wait for the next window, which adds one frame.

Once the controller has slipped to the later window, it stays there (the
receive side holds the packet until the controller is free). The end-to-end
test sees this as a lag of 2 frames before the first FIR pedal and 3 after.

## Controls

| control | meaning |
|---|---|
| `sw[15]` | delay |
| `sw[14]` | distortion (soft clip) |
| `sw[13]` | overdrive (hard clip) |
| `sw[12]` | wah-wah |
| `sw[11]` | bass boost (low-pass) |
| `sw[10]` | tremolo |
| `sw[9]` | harmonizer |
| `sw[7]` | overdrive after tremolo |
| none, `sw[8]` alone, or two of the above | clean |
| `sw[2:0]` | harmonizer voices: [2] major third, [1] perfect fourth, [0] perfect fifth |
| `sw[7:4]` | spectrum scale: bar height = magnitude >> `sw[7:4]` |
| volume encoder | gain = vol / 255 |
| encoder 1 | overdrive threshold, tremolo rate |
| encoder 2 | distortion threshold, wah-wah filter, threshold of the overdrive after tremolo |
| encoder 3 | delay time |
| `btnd` | reset |

Each decoder counts every edge of A or B, up or down depending on which
channel leads. The count saturates at 0 and 255 and resets to 127.
Encoders 1 and 2 are wired with A and B swapped, as on the original board.

Volume gain is `(vol << 24) / 255` in 0.24 fixed point, so 255 is exactly unity.
The product is saturated to 24 bits.

## The pedals

All arithmetic is on signed 24-bit samples. Every sum that can overflow is
saturated.

- **Delay** (`delay_pedal`, `delay_ram`): one 24 x 65536 memory per channel,
  with a two-clock read latency. The first echo is D = 2000 + 20 * mag3
  samples back (2000 to 7100). The output is
  `x[n] + x[n-D]/2 + x[n-2D]/4 + x[n-3D]/8`, with the divisions as
  arithmetic shifts. Each packet takes a 13-clock schedule:
  - write the new sample;
  - read the three echoes, three clocks apart, since the memory needs two;
  - sum them.

  The memory powers up as zeros, as FPGA block RAM does, so the echoes start silent.
- **Overdrive** (`overdrive_pedal`): hard clip at +/-T, with T = 5000 * mag1.
- **Distortion** (`distortion_pedal`): soft clip at T = 5000 * mag2. Beyond
  the threshold the excess is divided by 4 instead of being cut off, for
  example y = T + (x - T)/4 above T.
- **Tremolo** (`tremolo_pedal`, `tri_wave`): y = x * w / 8192.
  - The triangle w steps once per packet.
  - It changes direction every 1048576 + 8192 * mag1 clocks.
  - Peak gain works out between 0.25 and 0.75.
- **Overdrive after tremolo:** a second overdrive per channel, fed from the
  tremolo output, with its threshold set by encoder 2.
- **Bass boost** (`bass_boost_pedal`) and **wah-wah** (`wahwah_pedal`) are
  127-tap FIRs (`fir_filter`) with 18-bit coefficients, 14 of them fraction
  bits. Each filter does one multiply-accumulate per tap per clock and
  handles both channels. The taps are computed during elaboration by
  functions in `slime_pkg`; there are no coefficient files.
  - Bass boost: a Hamming-windowed sinc low-pass at 500 Hz, scaled to unity gain at DC.
  - Wah-wah: eight peak filters, centres spaced geometrically from 400 Hz to 2200 Hz. Each is an impulse plus 7 times a windowed 800 Hz-wide band-pass, about +18 dB at the centre. All eight run at once, and the top three bits of encoder 2 pick which one is heard. Turning the encoder quickly sweeps the peak.
- **Harmonizer** (`harmonizer`, `pitch_shifter`, `pitch_buffer`): see below.

## How the harmonizer shifts pitch

Each of the six pitch shifters (three intervals x two channels) writes every
new sample into a 1024-entry circular buffer. It reads the buffer back faster
than it writes.

The read index is a fixed-point number: 10 integer bits and 29 fraction bits.
Once per sample it advances by the playback rate, and its integer part is the
read address. The rate is 2^(k/12), stored in unsigned 3.29 format and
computed during elaboration:

- major third: k = 4, rate 1.260
- perfect fourth: k = 5, rate 1.335
- perfect fifth: k = 7, rate 1.498

Reading a stored waveform r times faster raises its pitch by the factor r.

Each sample runs through a four-state machine (idle, write, step, read):

1. store the sample;
2. add the rate to the index;
3. read.

The harmonizer adds the enabled voices to the dry sample. It saturates the
sum and registers it, 4 clocks after the start pulse.

Because the read pointer laps the write pointer, each voice jumps back once
per lap: every 1024 / (r - 1) samples, roughly every 2 to 4 thousand samples.
The jump is audible as a faint periodic click. Nothing cross-fades at the
jump; that is a limit of this simple shifter.

## Spectrum display

`stft` takes the guitar sample as received: its top 16 bits, one per frame.
It runs the following chain:

1. `fft_1024` is a radix-2, in-place, decimation-in-time FFT.
   - Samples are written in bit-reversed order.
   - Ten stages run one butterfly per clock, 5120 clocks in all. Each stage halves its result, so the data cannot overflow 16 bits. The output is therefore the DFT divided by 1024.
   - The bins are streamed out in natural order, with `last` on bin 1023.
   - The 16-bit twiddles are computed during elaboration with `$sin`/`$cos`.

   Samples that arrive while the FFT computes or unloads are dropped. Those
   5120 + 1024 clocks are about 12 frames.
2. `square_and_sum` computes re² + im².
3. `axis_fifo` is a 16-deep buffer.
4. `isqrt` is a 16-clock digit-by-digit square root.
5. The first 512 magnitudes are written to `spectrum_ram`.

The pixel side runs on the pixel clock:

- `xvga` makes 1024 x 768 timing: 1344 x 806 totals, syncs 136 and 6, active low.
- Column h reads bin h/2, so each bin is two pixels wide.
- A pixel is lit green when `(magnitude >> scale) >= 768 - line`. The bars therefore grow up from the bottom.

The dual-clock spectrum memory is the only clock-domain crossing. A bar may
show half of an old frame and half of a new one for one screen refresh, which
is harmless on a display. The pixel side's reset passes through a two-flop
synchroniser.

## Where this RTL departs from the original design

The original was built with vendor IP cores and published without its filter
coefficients. This RTL replaces or fills those parts:

- **Clocks:** the clock synthesiser is not included. Supply the 22.591 MHz
  audio clock and the 65 MHz pixel clock from your own PLL.
- **Decoder clock:** the encoder decoders run on the audio clock rather than
  on a separate 100 MHz clock, so the audio side is a single clock domain.
- **FFT, square root, FIFO and FIR filters:** all are written here instead of
  using vendor cores.
  - The FFT is 16-bit with per-stage scaling.
  - The square root is digit-by-digit rather than CORDIC.
  - The filter taps are this design's own designs. Only the kind of filter (a
    bass low-pass, and mid-range peak filters for the wah) follows the
    original.
- **Numbers the original leaves open, chosen here:**
  - the clipping threshold factor (5000 per encoder step) and the soft-clip slope (1/4);
  - the tremolo gain scaling;
  - the wah filter centres, bandwidth and gain;
  - the reset value of the encoders (127).
- **Pedal names:** in the original, the headings of the two clipping
  sections are swapped against their text. Here distortion is the soft clip
  and overdrive is the hard clip, as the descriptions themselves say.
- **Controller timing:** the original sends the processed packet a fixed one
  clock after the received packet is complete. This controller waits for the
  selected pedal's valid signal instead. That is what makes the slow FIR
  pedals usable.
- **Spectrum source:** the spectrum shows the raw guitar input, as in the
  original wiring, although the original text speaks of showing the output.
- **Bar colour:** fixed green rather than set from the switches.
- **Not implemented:** the "overdelay" switch (`sw[8]`) of the original
  switch map, which the original never describes, plays clean. So does any
  pattern of two or more pedal switches.
- **I2S data width:** the interface carries 24-bit words, the codec's sample
  size, rather than 32-bit words.

## Verification

Each block has a self-checking testbench in `tb/`. It compares the block
with a model computed inside the bench, and ends by printing
`TB_RESULT checks=N failures=M`. Where the block has a defined latency or
rate, the bench checks the cycle count too.

- **End to end:** `tb_slime_top` drives the top level through its pins at full size. A behavioural codec serialises random stereo words; the bench turns the encoders through their quadrature pins and walks the switches through every pedal. It checks every returned frame against a model built from the input history:
  - exact for clean at two volumes, overdrive, distortion, bass boost, wah at two filter positions, harmonizer with no voices, invalid switch patterns, and delay over 6400 frames with all three echoes;
  - by bounds and change for tremolo, overdrive after tremolo, and the harmonizer voices.

  It also counts each mechanism and fails if one never happens: volume change, every encoder, wah filter change, receive stalls, transmit waits, FFT frames, display frames and lit pixels. It runs in well under a minute.
- **Controller:** `tb_audio_controller` checks the controller alone at the stream level:
  - packet format and hand-shaking under random ready;
  - the 4-clock clean latency;
  - volume at 255, 128 and 0;
  - clipping pedals and invalid switch patterns.
- **Other blocks:**
  - `tb_fft_1024` checks against a direct DFT, within 12 LSB, and the 5120-clock compute time.
  - `tb_stft` plays a tone and checks the bar on screen.
  - `tb_xvga` checks every sync and blanking pixel over two frames.
  - The pedal benches compare sample by sample. The FIR benches use a direct convolution and also check DC and Nyquist gain.
  - `tb_axis_i2s2` loops a codec model through the interface.
  - `tb_rotary_decoder` counts detents, including saturation.

Some benches shrink memory sizes or tremolo periods through parameters to
keep them short. The top-level bench uses no overrides.

### Running a testbench with Verilator

The package must come first. For example, for the full system:

```
verilator --binary -j 0 -Wno-fatal --top-module tb_slime_top \
    rtl/slime_pkg.sv $(ls rtl/*.sv | grep -v slime_pkg) tb/tb_slime_top.sv
./obj_dir/Vtb_slime_top
```

Swap `tb_slime_top` for any other bench in `tb/`. Every bench ends with
`$finish` and has a watchdog that fails it if it hangs.

## Limits worth knowing

- The design has been simulated only. It has not been run on a board or
  closed for timing.
- The FIR pedals use one multiplier per filter per channel, time-shared over
  127 taps. The wah-wah therefore instantiates eight filters, 16 multipliers
  plus coefficient tables. That is simple but not small. A single filter with
  switchable coefficient sets would be the obvious saving.
- The receive side drops a frame if the controller has not taken the
  previous packet by the frame end. With the latencies above this never happens, but a pedal
  slower than about 450 clocks would break that.
- The first packet after reset holds whatever the receiver shifted in during
  the partial first frame. Three delay echoes of it appear after 2000 or more
  samples.
