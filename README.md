# Dual-microphone delay-and-sum beamformer with one shared FFT

This design turns two microphone signals into one cleaner speech signal. It
is meant for in-car hands-free use and speech recognition. The target is a
low-cost FPGA, so the design is built to use few multipliers.

Delay-and-sum beamforming works like this. A talker's voice reaches the
microphones at slightly different times and with slightly different
strengths. Each channel is shifted and scaled so that the voice lines up in
both. Then the channels are added. The voice adds up coherently. Noise from
other directions does not line up, so it partly cancels.

The delays are fractions of a sample. A fractional delay is awkward as a
time-domain filter, but in the frequency domain it is only a linear phase
per bin. So the design works frame by frame on spectra:

```
 mic1 ─► frame buffer ─┐                          ┌──────────────────────────┐
                       ├─► Hamming ─► (load mux) ─►  shared 512-pt FFT/IFFT   │
 mic2 ─► frame buffer ─┘   window          ▲      │  (external core, ports)  │
                                           │      └────────────┬─────────────┘
                           spectrum sum ◄──┴── delay filter ◄──┤ forward results
                           buffer ───────────► (IFFT load)     │
                                                               ▼ inverse results
                                    output buffer ◄── overlap-add
                                          │
                                          ▼ out_sample (one per input sample)
```

Frames are 512 samples long with 50% overlap, so a new frame starts every
256 samples (the *hop*).

## The 1-FFT schedule

The most expensive part is the transform. A direct build would need three
transforms per frame: two forward FFTs (one per microphone) and one inverse
FFT. This design has **one** FFT/IFFT core and uses it three times per hop.
That is the central idea. It costs some buffering but saves about two
thirds of the transform multipliers.

`start_pulse_controller` runs the schedule. It counts input samples
(`in_valid` strobes). Once 512 samples have arrived, every 256th sample is a
*frame boundary*. The three start pulses of a frame come 10 sample periods
apart:

| start | when (sample periods after the boundary) | operation | what happens to the core's output |
|---|---|---|---|
| 1 | 0 (one clock after the boundary sample) | forward FFT, channel 1 | × channel-1 coefficients, stored |
| 2 | 10 | forward FFT, channel 2 | × channel-2 coefficients, added to the stored bins |
| 3 | 20 | inverse FFT of the sum | real part, overlap-added, queued for output |

Two rules have to hold:

1. **No overlap on the core.** A start may only come once the previous
   result has been fully read out.
2. **Real time.** All three operations must finish inside one hop.

The reference core is ready with its result 5210 clocks after the start.
Add 512 clocks to load and 512 to unload, and one operation takes about
5722 clocks. The 10-period gap meets rule 1 whenever a sample period is
longer than about 573 clocks:

* 16 kHz sampling on a 50 MHz clock gives 3125 clocks per period. This is
  the operating rate.
* 80 kHz gives 625 clocks per period. This rate was used to speed up
  simulation.

At either rate the third operation ends after 20 periods plus one
operation, well inside the 256-period hop, so rule 2 holds. The design has
no sample-rate parameter; it simply follows `in_valid`. If the rate is too
high, the sticky `timing_error` output is set, and an assertion fires in
simulation.

With every start pulse the controller also runs a *load sequence*:
`load_valid` stays high for 512 clocks while `load_idx` counts 0 to 511. The
datapath reads its buffers with `load_idx`. The registered `phase` output
(`PH_FFT1`, `PH_FFT2`, `PH_IFFT`) holds until the next start. It tells both
the load mux and the result path which operation is running.

## Keeping a frame still while it is read

Every buffer is an **addressable shift register** (`addr_shift_reg`): each
new word shifts in at stage 0, and any stage can be read by address. FPGA
SRL primitives work this way.

The input buffers have one complication. Channel 2 is read 10 sample periods
after the boundary, and by then 10 more samples have shifted in. So
`input_frame_buffer` has two features:

* It is `FRAME_LEN + GUARD` = 544 stages deep.
* Its read address is `511 − idx + since_boundary`, where `since_boundary`
  counts the samples that arrived after the boundary.

As a result, both channels see exactly the frame that existed at the
boundary, even when a sample arrives in the middle of a load. An assertion
catches a read that would reach past the guard.

`spectrum_sum_buffer` (512 complex words) uses the shift register's far end:

* Pass 1 shifts in the filtered channel-1 bins.
* In pass 2, the word at stage 511 is always the channel-1 value of the bin
  now arriving. That value is added to the channel-2 value and the sum is
  shifted in.
* After pass 2 the register holds Y(k) = C₁(k)X₁(k) + C₂(k)X₂(k) in bin
  order. The IFFT load reads it from stage `511 − k`.

`overlap_add` keeps the second half of the previous time frame (256 words).
As the first half of the next frame arrives, it adds the two and emits 256
samples in one burst at clock rate. `output_buffer` is a 512-word queue built
the same way: a write shifts in at stage 0, and the oldest waiting sample
sits at stage `count − 1`. It takes those bursts and releases one sample per
`in_valid`, so the output rate matches the input rate. While the queue is empty, as it is before
the first frame is done, nothing comes out. A write into a full queue sets
`out_overflow`.

## Delay filter with pre-emphasis folded in

Speech front ends usually start with a pre-emphasis filter:
`y(i) = x(i) − 0.97·x(i−1)`. Both the pre-emphasis and the delay filter are
linear filters applied to each channel, so they can be merged into one
frequency-domain coefficient. That saves two time-domain multipliers. For
microphone n and bin k (with ω = 2πk′/512, where k′ = k for k ≤ 256 and
k − 512 above):

```
C_n(k) = a_n·e^{+jωτ_n} / (a_1² + a_2²)   ·   (1 − 0.97·e^{−jω})   /   1.08
         steering weight, wᴴd = 1             pre-emphasis             window overlap gain
```

* τ_n is the delay of microphone n relative to the reference, in samples
  (`MICn_DELAY`).
* a_n is its relative gain (`MICn_GAIN`). For a near-field talker,
  a_n = d_ref/d_n and τ_n = (d_n − d_ref)/c·f_s, where d is the distance
  from the talker.
* The weights undo each channel's delay and satisfy wᴴd = 1, so the talker
  passes with unit gain.
* At the Nyquist bin only the real part is kept, so the spectrum stays
  conjugate-symmetric and the output stays real.
* The division by 1.08 cancels the gain of the periodic Hamming window at
  50% overlap (its overlapped copies add up to 1.08).

`delay_filter` holds both coefficient tables (2 × 512 complex values, Q2.16
in 18 bits). The tables are computed at elaboration from the real-valued
parameters, so a different microphone geometry only needs new parameter
values. Because the shared core delivers the two channels one after the
other, one complex multiplier (four real multipliers) serves both. The
default parameters give the *symmetrical* case: the talker is equally far
from both microphones, and both coefficients are (1/2)·pre-emphasis/1.08.

## Number formats and the transform core interface

| signal | format |
|---|---|
| microphone and output samples | 16-bit Q1.15 |
| Hamming window table | unsigned Q1.15 (`0.54 − 0.46·cos(2πn/512)`, periodic) |
| transform data, spectra, time frames | 24-bit Q1.23 |
| filter coefficients | 18-bit Q2.16 |

Products are rounded half-up and saturated. The 24-bit transform width
follows the reference, which ran its core at 24-bit accuracy. The other
widths are this design's choices.

The FFT/IFFT core is a vendor component. It is **not** part of this RTL;
`dasb_top` brings its signals out as ports. The expected behaviour:

* `fft_start` pulses for one clock. `fft_fwd` is 1 for forward, 0 for
  inverse.
* From the start pulse on, 512 input words arrive with `fft_xn_valid`:
  3 clocks later for forward loads (buffer read plus window), 1 clock later
  for the inverse load.
* The result comes back one bin per clock in natural order, with
  `fft_xk_valid` and `fft_xk_index`.
* The forward transform is scaled by 1/512 and the inverse is unscaled, so
  a full-scale input never overflows the 24-bit path.
* `fft_busy` is high from start to last output.

A behavioural model of this core, `tb/fft_core_model.sv`, is used by the
system testbenches. It computes a double-precision DFT and returns the
result exactly 5210 clocks after the start, the latency of the reference
core. Any real core with this handshake and scaling can replace it. A core
with a different load latency or a bit-reversed output order needs the
pipeline taps in `dasb_top` (`load_pipe`) or the bin-order handling changed.

## Timing summary

* Window path: input buffer read 1 clock, window multiply 2 clocks.
* Delay filter: 3 clocks, one bin per clock.
* Overlap-add: 1 clock. Output buffer: 1 clock after the `in_valid` tick.
* End-to-end delay: about one frame plus 21 sample periods. Output of
  frame f starts at the first input strobe after its inverse transform
  ends.
* Arithmetic resources outside the core: 6 multipliers (2 window,
  4 complex filter). Storage: 2 × 544 × 16 bits (input buffers), 512 × 48
  (spectrum), 256 × 24 (overlap-add), 512 × 16 (output queue), plus the
  constant tables.

## Files

| file | contents |
|---|---|
| `rtl/dasb_pkg.sv` | widths, `cplx_t`, `phase_t`, saturation and rounding helpers |
| `rtl/addr_shift_reg.sv` | addressable shift register |
| `rtl/input_frame_buffer.sv` | per-channel framing buffer |
| `rtl/hamming_window.sv` | window table and two multipliers |
| `rtl/delay_filter.sv` | coefficient tables (steering × pre-emphasis) and complex multiplier |
| `rtl/spectrum_sum_buffer.sv` | channel-1 store and channel sum |
| `rtl/overlap_add.sv` | 50% overlap-add reconstruction |
| `rtl/output_buffer.sv` | burst-to-uniform-rate queue |
| `rtl/start_pulse_controller.sv` | frame boundaries, three start pulses, load sequencing |
| `rtl/dasb_top.sv` | the whole beamformer |
| `tb/fft_core_model.sv` | behavioural FFT/IFFT core |
| `tb/dasb_ref_pkg.sv` | double-precision reference of the whole algorithm |
| `tb/tb_*.sv` | self-checking testbenches, one per block plus system tests |

## Verification

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`.

* **Block tests.** Each block is compared with a model written
  independently in the testbench. The expected results use exact integer
  arithmetic with the same rounding, so the comparisons are bit-exact.
  Where relevant the tests also check latency.
* **`tb_dasb_top`.** Runs at full size with default parameters, at the
  16 kHz rate (3125 clocks per sample). The inputs are two different
  sinusoid-plus-noise signals, for four compared frames. Every output
  sample must be within 3 LSB of the double-precision reference; the
  observed maximum is 1 LSB. The test also checks:
  * boundaries exactly 256 periods apart;
  * start pulses exactly 10 periods apart, in the right order and
    direction;
  * no start while the core is busy, and three core operations per frame;
  * each mechanism occurred: boundaries, each kind of start, the
    forward/inverse switch, accumulation, overlap-add with a stored half,
    bursts, ticks on an empty output buffer.
* **`tb_dasb_ramp`.** Symmetrical filters and opposite ramps on the two
  microphones, at the 80 kHz test rate. The ideal output is zero; every
  sample must be within 3 LSB of zero.
* **`tb_dasb_chirp`.** A chirp whose amplitude is modulated by a second
  chirp. Microphone 2 gets the signal delayed by 2.5 samples and scaled by
  0.8, and the design is built with those steering parameters. The test
  checks the frequency response across the whole band against the
  reference.

These tests compare the RTL with a floating-point model of the *same*
algorithm. They show the fixed-point implementation is faithful. They do
not measure speech enhancement or recognition accuracy.

To run one test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dasb_pkg.sv tb/dasb_ref_pkg.sv tb/tb_dasb_top.sv --top-module tb_dasb_top
./obj_dir/Vtb_dasb_top
```

Block testbenches need only `rtl/dasb_pkg.sv` and their own file. The
system tests each take a few seconds.

## Departures and open points

* **FFT/IFFT core not included.** It has to be supplied, with the
  handshake and scaling described above.
* **Chosen details.** The reference design does not specify the
  following, so they are this design's choices: the window form (periodic
  Hamming), the 1/1.08 normalisation, all widths except the 24-bit
  transform data, the rounding and saturation, the reset (asynchronous,
  active-low, control state only), the output-queue depth and its
  empty/full behaviour, and the framing guard.
* **Fixed steering.** The microphone geometry is set at build time
  through parameters. There is no run-time interface to load coefficients.
* **Frame lengths.** `FRAME_LEN`, `HOP` and `START_GAP` are parameters,
  but only the 512 / 256 / 10 configuration has been simulated at full
  size. `HOP` must be `FRAME_LEN/2`, because overlap-add assumes 50%
  overlap.
* **Pre-emphasis stays in the output.** It is part of the front end for a
  speech recogniser, so the output is pre-emphasised speech.
