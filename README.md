# Continuous FFT tune measurement chain (BBQ) in SystemVerilog

A circular accelerator's betatron tune is the number of transverse
oscillations a particle makes per turn. Its fractional part shows up as a line
in the spectrum of the beam position seen turn after turn. A base-band tune
(BBQ) front end detects the position signal of both planes with diodes. The
signal is then digitised by a 24-bit audio codec at a multiple of the
revolution frequency. This RTL is the digital part, from the codec's serial
port onwards. It
turns the two sampled signals into a continuous stream of 32-bit horizontal
and vertical spectra. It also produces a chirp excitation that starts in step
with each acquisition, so that the phase of the beam response can be measured
as well as its amplitude (a beam transfer function).

The central idea is to use one complex FFT for two planes. The horizontal
samples form the real part and the vertical samples the imaginary part.
After the transform, the two real spectra are separated with sums and
differences. Two frame buffers alternate, so one frame can be transformed and
read while the next is being acquired. Frames can overlap by up to half their
length.

```
 codec serial port ─► bbq_codec_if ─► adc_h, adc_v (one strobe per sample)
 adc_h ─► FIR 32 taps ─► keep 1 of D ─┐ H (real)
 adc_v ─► FIR 32 taps ─► keep 1 of D ─┴ V (imag) ─► framer A (window) ─► buffer A ◄─┐
                                                └► framer B (window) ─► buffer B ◄─┤
 ms / turn / start-of-cycle ─► trigger ─► acquisition trigger (A, B alternately)   │
                                      └─► excitation trigger ─► DFS H, DFS V ─► dac_h, dac_v ─► codec
                           radix-4 FFT + H/V separation (in place) ◄───────────────┘
                           host read port: (buffer, plane, bin) ─► value
```

## Files

| file | content |
|---|---|
| `rtl/bbq_pkg.sv` | shared types (`cplx_t`, `win_e`, `trig_cfg_t`, `dfs_cfg_t`), window coefficients, saturation, base-4 digit reversal |
| `rtl/bbq_top.sv` | the whole chain |
| `rtl/bbq_codec_if.sv` | serial audio port to the codec (ADC in, DAC out) |
| `rtl/bbq_fir_decim.sv` | 32-tap FIR low-pass with programmable decimation (one per plane) |
| `rtl/bbq_framer.sv` | H+jV packing, windowing, zero padding, buffer writes (one per buffer) |
| `rtl/bbq_window_gen.sv` | window coefficient for sample n, computed on the fly |
| `rtl/bbq_buffers.sv` | the two frame buffers, their ownership, and the host read port |
| `rtl/bbq_ram.sv` | one buffer memory (1 write, 1 registered read port) |
| `rtl/bbq_fft_r4.sv` | in-place radix-4 FFT and H/V separation |
| `rtl/bbq_cordic.sv` | iterative CORDIC sine/cosine (windows, twiddles, synthesiser) |
| `rtl/bbq_trigger.sv` | acquisition and excitation triggers |
| `rtl/bbq_dfs.sv` | 40-bit phase chirp synthesiser (one per plane) |
| `tb/bbq_codec_model.sv` | behavioural codec for the testbenches (serial side only) |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_bbq_top` (reduced size) and `tb_bbq_top_full` (default size) |

## Codec port

`bbq_codec_if` is the FPGA side of the 24-bit stereo codec. The FPGA is the
clock master. It drives a bit clock (`codec_sclk`, one period every
`CODEC_BIT_CLKS = 4` clocks) and a word clock (`codec_lrck`). A stereo frame
has 64 bit clocks. The left slot carries the horizontal plane and the right
slot the vertical plane. The format is I2S: MSB first, starting one bit clock
after the word-clock edge, 24 data bits in a 32-bit slot. Outgoing data
changes while the bit clock falls; incoming data is sampled where it rises.

A sample therefore takes 256 clocks, with the system clock doubling as the
codec master clock (256 × Fs). At the end of every frame `adc_stb` pulses
with the two received words. The two synthesiser words present at that moment
are sent during the next frame. The sample rate is `clk / 256`. To sample at a
multiple of the revolution frequency, the clock must be locked to it. For
example, 16 × 11.245 kHz × 256 = 46.06 MHz.

The serial format, the master role, the channel assignment and the rate are
this design's choices. The codec's control register port is not built.

## Filtering and decimation

The codec may run at up to 16 times the revolution frequency. Only the band
up to half the revolution frequency is of interest. Each plane therefore goes
through a 32-tap FIR low-pass filter, and only every `cfg_decim`-th filtered
value is kept. The decimation factor is programmable because the oversampling
factor is not fixed.

The filter computes only the outputs it keeps: one multiply-accumulate per
clock over a circular delay line, which takes 34 clocks per output.
Coefficients are signed Q1.17. The host writes them through
`coef_we/coef_addr/coef_data`; after reset they form a moving average. A
full-scale 24-bit input at unity DC gain maps to a full-scale 32-bit output,
rounded and saturated.

## Framing and windows

A frame is `2^cfg_log2n` kept samples, for any `cfg_log2n` from 2 to 18. A
framer takes its frame on an acquisition trigger. Each word it writes is
`{re: w(n)·H(n), im: w(n)·V(n)}`, where `w` is the selected window.

There are eight windows (`win_e`): rectangular, triangular, Hann, Hamming,
Blackman, 4-term Blackman-Harris, Nuttall and Blackman-Nuttall. No window
table is stored. For each sample, `bbq_window_gen` evaluates
`a0 − a1·cos(2πn/N) + a2·cos(4πn/N) − a3·cos(6πn/N)` with three CORDIC units
in parallel; the triangular window is computed directly as `1 − |2n/N − 1|`.
The coefficient for index n+1 is computed (32 clocks) while the framer waits
for the next sample. A sample that arrives early is held in a one-word
register. If a further sample arrives while one is still held, the sticky
`frame_overflow` flag is set.

A radix-4 FFT needs a power of four. When `cfg_log2n` is odd, the framer
follows the N windowed samples with N zeros, and the FFT runs on 2N points.
The window is always computed over the N real samples, not over the padded
length.

## The two buffers and frame overlap

Each buffer holds `2^LMAX` complex words of 64 bits. It goes through this
cycle:

```
FREE ─trigger─► ACQ ─framer done─► FULL ─FFT start─► FFT ─FFT done─► READY ─host release─► FREE
```

Acquisition triggers go to A, B, A, … in turn. A trigger whose buffer is not
FREE is dropped and counted in `overruns`; the alternation does not change.
This is how the 50 % overlap limit arises. Take a trigger period T and a
frame length N. Buffer A receives frames at 0, 2T, 4T, …. So A must finish
acquiring, be transformed and be released by the host within 2T. Because the
FFT is far faster than the acquisition, that works for any T ≥ N/2.
Triggers that come faster show up as overruns. The FFT serves one buffer at a
time.

## FFT and spectrum separation

This is the least obvious part of the design.

**Transform.** `bbq_fft_r4` is a sequential, in-place, decimation-in-frequency
radix-4 FFT over M = log2(N)/2 stages. Butterfly b of stage s reads the four
words `i0 + {0,1,2,3}·q`. Here the span is `4^(M−s)`, `q = span/4`,
`j = b mod q` and `i0 = (b div q)·span + j`. It computes

```
a = x0+x2   b = x0−x2   c = x1+x3   d = x1−x3
y0 = (a+c)/4
y1 = ((b−jd)/4)·W^j     y2 = ((a−c)/4)·W^2j     y3 = ((b+jd)/4)·W^3j      W = e^(−2πi/span)
```

and writes the results back to the same four words. The twiddle factors come
from three CORDIC units, so there is no twiddle table, even at 2^18 points.
A butterfly takes about 37 clocks: 4 reads overlapping the 31-clock CORDIC,
1 compute clock and 4 writes.

**Scaling.** Every stage divides by 4, with rounding, before the twiddle
product. The result is therefore `X[k] = DFT[k] / N`, and a stage can never
overflow except by the √2 of a complex rotation, where the component
saturates. Each stage's rounding adds about 0.3 LSB rms of noise. In
simulation, through the whole chain, a line of about 2^29 and a line of 265
in the same 2^18-point spectrum both came out within 4 LSB of a
double-precision reference.

**Output order.** A DIF FFT leaves `X[k]` at address `digit_rev(k)`: the
base-4 digits of k in reverse order (`bbq_pkg::digit_rev`).

**Separation.** The input was `h + jv` with h and v real, so

```
H[k] = (X[k] + conj X[N−k]) / 2        V[k] = (X[k] − conj X[N−k]) / 2j
```

After the last stage, a pass over k = 1 … N/2−1 reads `X[k]` and `X[N−k]`. It
writes `H[k]` over `X[k]` and `V[k]` over `X[N−k]`. At k = 0 and k = N/2 both
spectra are real, and the stored word already is `{re: H[k], im: V[k]}`. The
buffer thus ends up holding both half spectra (bins 0 … N/2) in place of the
frame, with the same scale everywhere: `H[k] = DFT(h)[k]/N`.

**Reading.** The host gives `host_buf`, `host_plane` (0 = H, 1 = V) and
`host_bin`. `bbq_buffers` works out the address: `digit_rev(k)` for H,
`digit_rev(N−k)` for V, and the shared word at bins 0 and N/2.
`host_re/host_im` follow one clock later. `host_log2n` gives the transformed
size (the padded size for odd lengths). Bin k corresponds to
`k / N_fft × f_decimated`.

## Triggers

`bbq_trigger` counts events of the millisecond clock or of the turn clock
(`cfg_trig.src_turn`). It fires on the first event after the start, and then
on every `period`-th event. A millisecond-based trigger waits for the next
turn tick. Every trigger then waits for the next codec sample strobe, and
`acq_trig` pulses in the clock after it. So the acquisition, and any
excitation, always starts on a sample tied to a turn.

Generation starts on `cmd_start`. Alternatively, after `cmd_arm` it starts on
the next start-of-cycle pulse `soc`; `cmd_stop` ends it. On every
`exc_every`-th acquisition (0 = never), `exc_trig` follows after `exc_delay`
sample strobes (0 = in the same clock as `acq_trig`). The period,
`exc_every` and `exc_delay` are this design's choice of the "other
parameters" that link excitation to acquisition.

## Chirp synthesiser

Each plane has a `bbq_dfs`. On `exc_trig` it copies its configuration
(`dfs_cfg_t`), clears the 40-bit phase and loads `f_start`. At every codec
sample it outputs `amp·sin(phase)` (CORDIC on the top 32 phase bits, ready 33
clocks later). It adds the frequency to the phase, and adds `f_inc` (signed)
to the frequency until `f_end` is reached. Frequencies are phase steps per
sample: `f = word / 2^40 × f_sample`. After `length` samples the output
returns to zero; `length = 0` gives an endless tone, used as a test signal.
`cmd_stop` silences both synthesisers.

With `cfg_loopback = 1`, the two filters take the synthesiser words instead
of the codec samples. This measures the digital chain alone.

## Interfaces and timing assumptions

* One clock; asynchronous active-low reset. The clock frequency is not set
  by the design; the codec sample rate is `clk / (64 × CODEC_BIT_CLKS)`. Each
  sample needs at most 34 clocks of work (FIR: 34, window: 32, synthesiser:
  33), well inside the 256 clocks the codec port gives.
* All configuration ports can change at any time. The framer reads
  `cfg_log2n/cfg_wsel` at its trigger, the synthesiser reads its record at
  `exc_trig`, and the filter reads `cfg_decim` at each input sample.
* `ready[b]` says buffer b holds finished spectra. `host_release[b]` (one
  clock) hands it back. `frames` and `overruns` count frames transformed and
  triggers dropped.

## Sizes and throughput

With the defaults (`LMAX = 18`, `NTAPS = 32`), each buffer is 2^18 × 64 bits
(16 Mbit, two of them). That is more than the block RAM of most FPGAs, so an
implementation at full size would map `bbq_ram` to external memory. A 2^18
transform with separation takes 23.5 M clocks (measured): 0.51 s at 46 MHz.
Frames of 2^18 samples at a decimated rate of about 11.2 kHz take 23 s, so
the transform fits easily within the half frame that 50 % overlap allows.
The same holds for the smaller lengths 1024, 4096, 16k and 64k.

## Where this design departs from, or adds to, the description it follows

* The filter coefficients, the choice of the eight windows, the CORDIC
  method, the stage scaling of the FFT and the buffer handshake are this
  design's choices. The description gives only what these parts do.
* The FFT's output range is one 32-bit word scaled by 1/N. The largest line
  a full-scale real cosine can produce is 2^30. The ratio to a 1-LSB line is
  therefore about 181 dB, slightly less than the 186 dB reported for the
  original algorithm, whose internal precision measures are not described.
* The synthesiser advances once per codec sample. Its usable range is
  therefore up to half the sample rate, not to 13 times the revolution
  frequency as reported for the original. That range suggests the original
  runs its synthesiser faster, or uses the codec's interpolation, which is
  not described.
* Not built: the codec's control register port (no settings are given),
  the analogue front end, the VME host interface, and the
  transfer-function phase correction. The correction is host-side
  arithmetic: subtracting a reference phase measured with the excitation
  wired straight to the input.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
(watchdog included). With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bbq_pkg.sv tb/tb_bbq_top.sv \
          --top-module tb_bbq_top -Mdir obj_top -o sim && obj_top/sim
```

Replace `tb_bbq_top` with `tb_bbq_codec_if`, `tb_bbq_fft_r4`, `tb_bbq_framer`, `tb_bbq_fir_decim`,
`tb_bbq_buffers`, `tb_bbq_trigger`, `tb_bbq_dfs` or `tb_bbq_top_full`. Add
`-Wno-fatal` if your Verilator treats lint warnings as fatal.

* `tb_bbq_top` runs the chain at `LMAX = 6` in four phases:
  * turn-clock triggers with overlapping frames and a chirp;
  * millisecond triggers started by arm and start-of-cycle, with padded
    Blackman-Harris frames;
  * overruns;
  * internal loop back.

  Every bin of every frame is checked against a reference computed from the
  samples the codec model sent: serial port, filter, decimation, window,
  padding, DFT. Each mechanism
  is counted, and one that never happens fails the test. Under a second.
* `tb_bbq_top_full` runs the top with its default parameters. It acquires one
  2^18-sample frame, transforms it and checks chosen bins, including a line
  126 dB below a strong one. About three minutes.
* The block testbenches compare against independent reference calculations:
  a double-precision DFT, real-valued window formulas, an integer FIR, and
  event-list trigger timing.
