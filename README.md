# Dual-channel short-time spectral subtraction core

This core removes wideband background noise from speech. It is meant for hands-free
use. Two microphones feed it. The first hears the talker plus the room noise. The second
sits away from the talker and hears only the noise. The core works frame by frame in the
short-time Fourier domain. It estimates the noise power in every frequency bin from the
second microphone. It then scales each bin of the first microphone by a gain that removes
that power, and rebuilds a time signal by overlap-add.

For frame `m` and bin `n`:

```
X1, X2   = DFT of the Hamming-windowed 512-sample frames of x1, x2 (hop 256)
|D|^2    = beta * |X2|^2                       noise power, beta = 15
Q        = |X1|^2 / |D|^2                      relative signal level
Q        = 1  if Q < 1                         amplitude limiter
G        = sqrt(1 - 1/Q)                       power-subtraction gain, 0 <= G < 1
Y        = G * X1
y        = overlap-add of IDFT(Y), times 1/1.08
```

`beta` corrects for the two microphones having different sensitivities. Because the
noise is measured on its own channel, the estimate tracks noise whose level changes over
time. No speech pauses are needed to learn the noise floor.

The RTL is a SystemVerilog re-implementation of a published FPGA prototype of this
algorithm. That prototype was built from block-diagram DSP library parts and vendor IP
cores. This RTL keeps its block structure: an addressable delay-line buffer for framing, a
ROM window, the gain-estimator chain and a RAM-based overlap-add. Its frame size, overlap,
window, `beta` and sample format are the same. The transform, divider and square-root
cores are written here from scratch. The sections below say where the RTL departs from the
prototype.

## Signal flow and clocking

```
 x1 ─ buffer_overlap ─ ×w[n] ─ fft_stream ──┬────────────────────────► gain_apply ─┐
                          ▲                 │                            ▲ G        │ Y
                      window_rom            └─► gain_estimator ──────────┘          │
                          ▼                          ▲ |D|^2                        │
 x2 ─ buffer_overlap ─ ×w[n] ─ fft_stream ─ noise_estimation                        │
                                                                                    ▼
 y  ◄──────────────── overlap_add ◄──────────── fft_stream (inverse) ◄──────────────┘
```

The whole core runs from **one clock at twice the audio sample rate**. For 22.05 kHz
audio that is 44.1 kHz. The core has no clock-enable input, so on an FPGA the clock
must be divided or gated down to this rate. This ratio is what makes the design a pure
stream:

* Every second clock (`sample_tick` high), one new sample pair `x1`, `x2` is taken.
* Every clock, one sample of the current 512-sample frame leaves the framing buffer.
  So a frame takes 512 clocks, exactly the time in which its 256 new samples arrive.
* Frames follow each other without gaps. Every later block therefore handles one
  complex value per clock, with no stalls and no back-pressure.
* The overlap-add hands each frame's 256 finished samples back at one sample every second
  clock, so `y_valid` pulses at the input sample rate.

Validity is tracked by `valid` flags with an index (`idx`, the position in the frame).
Each block raises its flag at the first complete frame and keeps it high from then on.

## Framing: the addressable delay-line buffer (`buffer_overlap`)

This is the least obvious part of the design. A 50 %-overlap buffer normally needs room
for a whole frame, 512 samples. This one needs only 256 register stages:
8 `delay_line` cells of 32 taps, cascaded into a `delay_chain`.

* The chain shifts once per input sample. At the frame clock, each stage is a two-clock
  delay.
* A 9-bit frame counter `k` addresses the taps. Bits `k[5:1]` are the tap address, shared
  by all eight lines. A small control logic turns `k[8:6]` into the line select
  `7 - k[8:6]`, so the oldest line is read first.
* Two clocks in a row, `2i` and `2i+1`, read the **same** address. The chain shifts
  between them, so the two reads return two consecutive samples.
* While the frame is read, the read position moves toward newer taps at half the clock
  rate. The samples arriving during the frame supply its second half.

The frame delivered at index `k` is `x[F + k]`, where `F = (frame start clock)/2 - 257`.
The next frame starts 256 samples later. With samples counted from the release of reset
(the sample on the inputs at that edge is sample 0), the first valid frame covers samples
255 ... 766.

`window_rom` holds the 512 Hamming coefficients. Its address counter advances with the
frame's valid flag, so both channels share one ROM. The table is computed from the
formula when the design is elaborated:

```
w(n) = 0.54 - 0.46 cos(2πn/512),  unsigned Q0.16, limited to 65535
```

The products `x·w` are taken back to 16 bits.

## Transforms (`fft_stream`, `sdf_stage`, `cmul3`)

All three transforms (FFT1, FFT2 and the inverse) are the same module.

* It is a radix-2 decimation-in-frequency **single-path delay-feedback** (SDF) pipeline
  with 9 stages (`sdf_stage`). The stage delays are 256, 128, ..., 1 words, held in small
  memories.
* A two-bank **reorder memory** follows. It writes each frame at bit-reversed addresses
  and reads the previous one back in natural order. Both input and output are therefore
  in natural order.
* Twiddle products use the three-multiplier complex multiplication (`cmul3`) with 18-bit
  Q1.16 twiddles. The twiddles are computed at elaboration.
* Every butterfly halves its result, so the pipeline returns the DFT divided by 512.
  * The forward instances shift their 16-bit input left by 9 first, which gives the true
    DFT in 28-bit words.
  * The inverse instance takes the 28-bit spectrum unshifted, which gives the true
    inverse DFT, back in sample units.
* `INVERSE` only conjugates the twiddles.
* Latency: bin 0 of a frame leaves **2N + log2 N = 1033 clocks** after sample 0 entered.
* Each stage's block counter starts at `2L mod N` after reset. This lines it up with the
  stream delayed by the stages before it. No frame-start signal is needed, but the first
  valid input after reset must be sample 0 of a frame.

## Noise and gain estimation

`noise_estimation` forms `15·(Re² + Im²)` of the reference-channel bin at full precision.
The result is 65 bits, unsigned, and takes two clocks.

`gain_estimator` follows the gain-estimator diagram of the prototype, stage for stage. A
new bin may enter every clock, and the latency is `GAIN_LAT = 71` clocks.

| step | operation | format |
|---|---|---|
| squarers + adder | `|X1|^2` | 57-bit unsigned |
| divider (`udiv_pipe`, 32 stages) | `Q = |X1|^2 / |D|^2` | Q16.16, saturates at 65536 − 2⁻¹⁶ and when `|D|^2 = 0` |
| comparator `Q >= 1` + multiplexer | `Q := 1` if `Q < 1`; sets `limited` | |
| divider (17 stages) | `1/Q` | Q1.16 |
| subtractor | `1 − 1/Q` | Q0.16 |
| square root (`usqrt_pipe`, 16 stages) | `G` | Q0.16 |

The dividers are restoring dividers and the square root is digit by digit. Both are
truncating, with one result per clock. The prototype used CORDIC cores here. Note that `G`
is steep where `Q` is close to 1: one LSB of `1 − 1/Q` there moves `G` by up to 256 LSB.
This is why the tests compare `G²`, not `G`.

`gain_apply` delays `X1` by `GAIN_LAT` clocks to meet its gain. It then forms
`Y = ⌊G·X1 / 2^16⌋` for the real and imaginary parts.

## Overlap-add (`overlap_add`, `submatrix`, `ram_delay`, `ola_output`)

The inverse FFT delivers frame `m` as 512 samples `y_m[k]`, one per clock.

1. **`submatrix`** holds the previous frame's tail in a 256-word `ram_delay`. This is a
   dual-port RAM with a write and a read address counter, so it acts as a delay of 256
   samples. During `k < 256` it presents side by side:
   * `out1 = y_m[k]`, the head of the current frame;
   * `out2 = y_(m−1)[k+256]`, the tail of the previous frame.
2. **AddSub** adds the two.
3. **`ola_output`** writes the 256 sums into a 256-word RAM during that burst.
   * It reads them back at address `k/2` on the odd `k` of the whole frame. Each sample
     is read after it was written and before the next frame overwrites it. This turns the
     256-clock burst into one sample every second clock.
   * It then applies **normalization**: it multiplies by `NORM = round(2^16/1.08) = 60681`
     and saturates to 16 bits. The factor 1.08 is the constant sum of periodic Hamming
     windows at hop N/2.

`y_valid` starts with the second frame, the first whose overlapping partner is known.

## Timing at a glance

| path | latency |
|---|---|
| input sample `n` captured → output sample `n` on `y` | 2661 clocks (about 1330 samples, 60 ms at 22.05 kHz) |
| first output sample | core sample 511 |
| FFT (each) | 1033 clocks |
| gain estimator | 71 clocks |
| output rate | one sample every 2 clocks, exactly |

## Size

A generic netlist of `ss_top` (before mapping to a device) has these resources:

* about 11,000 flip-flop bits;
* 323 kbit of memory, almost all of it FFT delay and reorder memory;
* 102 multipliers. 81 of them are the 28 × 18-bit twiddle products of the three
  transforms.

On a device with 25 × 18 multiplier blocks, each twiddle product takes two blocks. The
transforms alone then need about 160 blocks. Narrower spectra (`SPEC_W`) or LUT-based
multipliers would be needed on a small device.

## Where this RTL departs from the prototype

* **Transforms, dividers and square root.** The prototype used vendor IP. This RTL uses
  its own SDF FFT, restoring dividers and digit-by-digit square root, in fixed-point
  formats of its own choosing (see `ss_pkg`).
* **No synthesis window.** The block diagram of the prototype's hardware has no window
  multiplier after the inverse FFT. This RTL follows that block diagram.
  * The textbook inverse STFT applies the window again before overlap-add.
  * Here the constant 1.08 overlap gain of the analysis window is removed by
    normalization instead.
* **Concatenate / second submatrix.** In the prototype's block-diagram model, a matrix
  concatenation circuit re-forms the 512-sample frame and feeds the tail back. It uses two
  delay chains, 256- and 512-sample delays and a multiplexer.
  * In this stream design, the tail is kept by the `submatrix` delay instead.
  * Only the output hand-over and normalization remain, in `ola_output`.
  * The concatenation circuit itself is not reproduced.
* **Delay-line registers in the overlap-add.** The `submatrix` of the prototype also
  contains addressable delay chains. In a sample stream the frame already arrives in the
  required order, so only its 256-sample delay is built.
* **Small input delays.** The prototype shows small delay blocks in front of the framing
  buffers and directly wires FFT1 to the gain multipliers. Here the branches are
  latency-balanced explicitly instead: `X1` waits 2 clocks for the noise estimator and
  71 for the gain.
* **Inverse-transform scaling.** The vendor transform of the prototype needed its input
  brought to unit scale first. The inverse `fft_stream` here takes the 28-bit spectrum
  as it is and returns the true inverse DFT. No rescaling is needed.
* **Status outputs.** `gain_valid`, `gain_limited` and `y_saturated` are additions for
  observation and test.
* **Reset.** There is an active-low asynchronous reset on counters and valid flags only.
  Delay lines and memories are not reset. Their first contents are never marked valid.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `delay_line_tb`, `delay_chain_tb` | random tap/line reads against the shift history |
| `buffer_overlap_tb` | every frame sample is `x[F+k]`, frames 256 apart, one input per two clocks |
| `window_rom_tb` | all 512 coefficients within 1 LSB, counter hold/advance/wrap |
| `fft_stream_tb` | forward and inverse against a direct double-precision DFT, bin order, 1033-clock latency |
| `noise_estimation_tb` | exact `15(Re²+Im²)`, 2-clock latency |
| `gain_estimator_tb` | `G²` within 5·2¹⁶ of `(1−1/Q)·2³²` for Q from 0.1 to 10⁴, zero noise, zero speech, limiter flag, 71-clock latency |
| `gain_apply_tb` | exact products, index alignment |
| `ram_delay_tb` | 256-sample delay under a random enable |
| `overlap_add_tb` | exact overlap-add, normalization, clipping, output spacing and latency |
| `ss_top_tb` | the whole core, at its default sizes (see below) |

`ss_top_tb` runs the noise scenario used to evaluate the prototype:

* The run is 2 s at 22.05 kHz.
* Independent Gaussian noise is added to each microphone. Its variance is 0.03, then 0.07
  from 0.5 s, then 0.05 from 1.5 s (full scale = 1).
* The speech is synthetic: voiced syllables, since no recording is included.
* The testbench computes the same algorithm in double precision. This includes the exact
  framing, the window, `beta = 15`, the limiter, the gain, the inverse DFT, the
  overlap-add and the division by 1.08.

A hop passes if all its 256 samples are within 2 % of full scale of the reference, or if
its RMS error is at least 30 dB below the reference's energy. The bench also checks:

* the output spacing;
* a constant latency;
* that noise in speech pauses drops by at least 10 dB;
* that the limiter, the pass path and overlap-add outputs in each noise period all occur.

It also checks that the largest error of any output sample stays under 0.90625 % of
full scale. That is the agreement reported between the original fixed-point prototype and
its floating-point model.

On this run all 170 compared hops pass. The largest error is 0.029 % of full scale. Noise
in the pauses is reduced by about 13.6 dB. Of 88,125 bin gains, 81,984 hit the limiter.
This is expected with `beta = 15`.

## Simulating

Only `verilator` is needed. The package must come first. The tools find the other modules
by file name:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ss_pkg.sv tb/ss_top_tb.sv --top-module ss_top_tb -o sim
./obj_dir/sim
```

Replace `ss_top_tb` with any other testbench name to run it. Most of the time goes into
compiling. The end-to-end testbench takes about 20 s in all, and each unit test less.

To use the core, tie `clk` to a clock at twice the sample rate and apply a sample pair
whenever `sample_tick` is high. Take `y` whenever `y_valid` is high.

## Changing it

* `ss_pkg` holds the shared sizes and formats: frame length, hop, widths, `BETA`, and the
  gain format that `GAIN_LAT` follows from.
* **Frame length.** The framing buffer delivers frames of `2·LINES·TAPS` samples.
  Changing the frame length takes two edits:
  * set `N_FFT` (a power of two) and `HOP = N_FFT/2` in `ss_pkg`;
  * set the `LINES` and `TAPS` defaults of `buffer_overlap` so that `LINES·TAPS = HOP`.

  The latencies above change with it. `NORM` stays, because the 1.08 overlap gain does
  not depend on the frame length. The hop is fixed at half a frame by the clock ratio.
* **Noise weight.** `BETA` in `ss_pkg` is the default of `noise_estimation`'s `BETA_V`.
* **Normalization.** `NORM` in `ola_output` sets the output scaling.
* **Headroom.** The spectra have 28 bits, and a full-scale 16-bit frame peaks near 2²⁴.
  Wider input words or a larger `N` need a larger `SPEC_W`.
