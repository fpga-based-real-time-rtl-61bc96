# Real-time video 2D FFT accelerator

This design computes the two-dimensional Fourier transform of live camera
frames in hardware. It sits in an AXI4-Stream video path, between a camera
pipeline and a display or frame store. It takes in one frame of RGB video,
turns it to gray and transforms it with a 2D FFT. It then sends the
spectrum back out as a gray video frame: each pixel is the log magnitude of
one frequency bin, stretched to fill 0..255. The aim is to shrink images for
fast alignment work: the spectrum of a frame is a compact thing to filter or
compare. A second mode runs the inverse transform after the forward one and
sends out the rebuilt image. That mode shows the whole chain end to end.

The default frame is 64 x 32 pixels. One forward frame takes about 24,000
clocks from its last input pixel to its last output pixel. At 100 MHz that
is 0.24 ms, far inside the 33 ms of a 30 frame/s video stream.

A second, unrelated block stands beside the accelerator in the top level.
`led_flip` is the small bring-up circuit a processor calls to invert a
button level onto an LED, using HLS-style start/done handshaking.

## The frame cycle

`fft_ip_top` has three phases. All three share one memory, `frame_mem`,
which holds one complex word per pixel (address `row*WIDTH + col`):

| phase | unit | what happens | clocks at 64x32 |
|---|---|---|---|
| capture | `axis_frame_capture` | waits for start of frame, converts each RGB pixel to gray (`rgb2gray`), stores `{re = gray, im = 0}`; then holds `s_axis_tready` low | 2048 (one pixel per clock) |
| transform | `fft2d` + `fft1d` | 1D FFT of all 32 rows, then of all 64 columns, in place | 19,649 |
| output | `spectrum_out` + `mag_log` + `udiv_seq` | log magnitude of every word, min/max, scale, stream out | about 4,200 (output at one pixel per clock), more when the sink stalls |

When the output phase ends, the capture unit is re-armed and takes the next
frame that begins with `tuser`. Frames that arrive while the accelerator is
busy are not lost: `s_axis_tready` stays low and the source waits. In a
camera system a video DMA frame buffer sits upstream and absorbs this.
`frame_busy` is high outside the capture phase.
`flat_frame` goes high when the last spectrum sent had the same log
magnitude in every bin (a black or uniform frame): there is no range to
stretch, so that frame is sent as all zeros.

`inverse_mode` is sampled once per frame, when capture completes. It
selects:

* `0`: forward 2D FFT, then conversion of the spectrum to pixels.
* `1`: forward 2D FFT, then inverse 2D FFT (rows, then columns). The real
  part is sent out, clamped to 0..255. The output equals the gray input
  within a few levels.

## Number format: why 20-bit integers

Each sample is a complex pair of 20-bit signed numbers (`fft_pkg::cplx_t`),
with the binary point at the LSB. Twiddle factors are 16-bit Q2.14.

Here is why. An unscaled 2D FFT of an H x W image grows values by up to
H·W. For 8-bit pixels at 64 x 32, the largest possible value is
255 · 2048 = 522,240. That fits in 20 signed bits (limit 524,287). So the
forward transform never has to scale and can never overflow at the default
size. Every intermediate butterfly value is bounded by the same sum.

A 20-bit fixed-point format with only 6 integer bits, the kind an HLS
build picks by default, could not hold even a single pixel. Here the width
stays at 20 bits, but all of it is integer.

The butterfly still saturates rather than wraps, in case a larger image is
configured. That is the limit to watch:

* At 128 x 64 the worst-case DC term is 255 · 8192, which needs 22 bits.
* Images whose gray values stay at or below 63 still fit in 20 bits.
* For full-range images at 128 x 64, set `CPLX_W = 22` in `fft_pkg`. Every
  width in the design follows that constant.

The inverse transform halves its outputs in every stage (round half up).
Over log2(N) stages this gives the 1/N of the inverse DFT, so values stay
in range. The rounding bias leaves a round trip within about 4 LSB of the
input.

## The 1D FFT engine (`fft1d`)

This is a radix-2, decimation-in-time FFT that works in place on a line
buffer of NMAX complex registers. One engine serves both rows (64 points)
and columns (32 points): the length `2^len_log2` is chosen on each call.

1. **Load in bit-reversed order.** Samples arrive in natural order through
   `ld_en/ld_idx/ld_data`. `rader_bitrev` writes each one at the address
   whose low `len_log2` bits are reversed. `len_log2` must already be set
   during loading.
2. **Butterflies.** There are `len_log2` stages, with N/2 butterflies each,
   one butterfly per clock. Stage s has span m = 2^s. Butterfly c pairs
   `p = (c / (m/2))·m + c % (m/2)` with `q = p + m/2`. Its twiddle index is
   `(c % (m/2)) · NMAX/m`, so one table sized for NMAX serves every length.
   Both results are written back to p and q in the same clock.
3. **Read out** in natural order through the combinational `rd_idx/rd_data`
   port.

`butterfly` computes `t = b·W` (rounded to nearest), then `x = a + t` and
`y = a − t`. It halves both outputs in inverse mode and saturates to 20
bits.

`twiddle_rom` holds `round(2^14·cos(2πk/NMAX))` and
`−round(2^14·sin(2πk/NMAX))` for k < NMAX/2. The constant is computed during
elaboration from a Taylor series, so no data file is needed. For the
inverse transform the sine sign is flipped.

Timing: `done` pulses exactly `len_log2·N/2` clocks after the start clock
(192 for 64 points, 80 for 32 points).

## 2D sequencing (`fft2d`)

For every line, `fft2d` does the following:

1. Reads the line from `frame_mem`: N clocks, with one clock of read
   latency.
2. Loads the last word and starts the engine in the same clock.
3. Waits for `done`.
4. Writes the line back: N clocks.

One line of N points costs `2N + 2 + N/2·log2 N` clocks. Rows are
addressed as `r*WIDTH + c` and columns as `c + r*WIDTH` with r running. The
pass order is rows forward, columns forward, then, in round-trip mode,
rows inverse and columns inverse. `passes` reports how many passes ran. At
64 x 32 the forward transform takes 32·322 + 64·146 + 1 = 19,649 clocks.

## From spectrum to pixels (`spectrum_out`)

The image of a spectrum is `L = log(1 + |X|)`, scaled linearly so that the
smallest L becomes 0 and the largest becomes 255:

    pixel = (L − Lmin) / (Lmax − Lmin) · 255

In hardware this takes two passes over the memory, plus one division per
frame:

* **Pass 1** streams every word, one per clock, through `mag_log`, which
  has a 22-clock pipeline:
  * one clock for `re² + im²`;
  * 20 clocks of `isqrt_pipe`, a digit-by-digit square root that gives
    `floor(|X|)`;
  * one clock of `log2_fx`, which gives `log2(1 + floor|X|)` with 8
    fraction bits.

  `log2_fx` takes the leading-one position as the integer part. The eight
  bits after the leading one are used directly as the fraction, since
  log2(1+f) ≈ f; the error is below 0.087. The L values overwrite the real
  parts in `frame_mem`, and the running minimum and maximum are kept.
* **Scale.** `udiv_seq`, a 24-clock restoring divider, computes
  `R = round(255·2^16 / (Lmax − Lmin))` once.
* **Pass 2** reads each word and sends
  `min(255, ((L − Lmin)·R + 2^15) >> 16)` as one continuous stream, one
  pixel per clock. A read is issued whenever a two-entry output buffer,
  plus the read already in flight, leaves room. That hides the memory's
  one-clock latency, and back-pressure simply pauses the reads. The buffer
  head drives `tdata`, so data and `tvalid` hold while `tready` is low.

Base 2 is used instead of the natural log on purpose. The min-max
normalisation removes any constant factor, so the picture is the same,
and log2 is nearly free in hardware.

If every L in a frame is equal, the mapping is undefined. That happens,
for example, with a single bright pixel, whose spectrum is flat. In that
case every output pixel is 0 and `flat_frame` is set.

Be careful when comparing against floating-point results. The minimum
usually comes from the weakest frequency bin. Its log is sensitive to
rounding in the transform, so Lmin, and with it every pixel, can shift by a
few levels.

## Video interfaces

Both streams are AXI4-Stream video, 24-bit `tdata`, with R in [23:16], G in
[15:8] and B in [7:0]. `tuser` marks the first pixel of a frame and `tlast`
the last pixel of each line. The output copies the gray byte into all
three colour bytes.

On input, pixels before a `tuser` pixel are dropped. The line length comes
from `WIDTH`, and the input `tlast` is not checked.

Immediate assertions check the handshake rules:

* an input pixel that is held off must stay valid until it is taken;
* output data must not change while it waits for `tready`;
* `fft1d` must not be loaded while it is busy and needs a legal length;
* no unit may be busy during capture.

Clock and reset: one clock. `rst_n` is a synchronous, active-low reset for
the video path. `ap_rst` is a synchronous, active-high reset for
`led_flip`. Memory contents are not reset.

## LED flip block (`led_flip`)

Ports: `ap_start`, `ap_done`, `ap_idle`, `ap_ready`, `led_i`, `led_o`,
`led_o_ap_vld`. A call is `ap_start` while idle. One clock later, `led_o`
equals `!led_i`, and `ap_done`, `ap_ready` and `led_o_ap_vld` pulse for one
clock. `led_o` then holds until the next call.

## Parameters and sizes

| parameter | default | where |
|---|---|---|
| `WIDTH`, `HEIGHT` | 64, 32 (powers of two) | `fft_ip_top`, `axis_frame_capture`, `fft2d`, `spectrum_out` |
| `CPLX_W` | 20 bits per component | `fft_pkg` |
| `TW_W`, `TW_FRAC` | 16, 14 (Q2.14 twiddles) | `fft_pkg` |
| `LOG_FRAC` | 8 fraction bits of L | `fft_pkg` |
| `NMAX` | max(WIDTH, HEIGHT) | derived, `fft1d`, `twiddle_rom` |

Storage at the defaults:

* `frame_mem`: 2048 × 40 bits (81,920 bits), one block-RAM-style memory with
  one write port and one registered read port.
* The `fft1d` line buffer: 64 × 40 bits of registers, since it needs two
  reads and two writes per clock.

The 128 x 64 size has been simulated (`tb_workload_128x64`, with gray ≤ 63).
A forward frame then takes about 106,000 clocks. Sizes such as 1080 x 720
are out of reach: the radix-2 engine needs power-of-two sides, and the
frame store would need about 31 Mbit.

## Where this design makes its own choices

These points are this design's own; the transform it implements is the
standard one:

* RGB-to-gray weights 0.299, 0.587, 0.114 in Q15, with rounding.
* Integer 20-bit samples, rounding, saturation, and per-stage halving in the
  inverse.
* One butterfly per clock and a single engine reused for all lines.
* The twiddle table computed at elaboration.
* `floor(|X|)`, base-2 log with a linear mantissa, and normalisation by a
  reciprocal (±1 level against exact division).
* The flat-frame rule.
* One memory shared by all phases, with L written over the real parts.
* Stalling the input while busy.
* The meaning of `inverse_mode` as a round trip.
* The AXI4-Stream framing details and the RGB byte order.
* The one-clock latency of `led_flip`.

## Files

`rtl/`:

* `fft_pkg.sv`: sample types, widths, saturation helper, phase enum.
* `fft_ip_top.sv`: top level, phase controller, memory sharing, `led_flip`
  beside it.
* `axis_frame_capture.sv`, `rgb2gray.sv`: video in.
* `frame_mem.sv`: the frame store.
* `fft2d.sv`, `fft1d.sv`, `rader_bitrev.sv`, `twiddle_rom.sv`,
  `butterfly.sv`: the transform.
* `spectrum_out.sv`, `mag_log.sv`, `isqrt_pipe.sv`, `log2_fx.sv`,
  `udiv_seq.sv`: conversion and video out.
* `led_flip.sv`.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_workload_128x64.sv`. Each compares against values computed
independently in the testbench (real-arithmetic DFTs, luma formula, exact
integer square roots and divisions). Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_fft_ip_top` runs the whole design at its default size. It covers a
  forward frame against a real-valued 2D DFT, a round-trip frame, and a
  flat frame. Along the way it exercises input stalls, dropped pre-frame
  pixels, output back-pressure and LED calls, and checks the 30 frame/s
  time budget.
* `tb_fft1d` and `tb_fft2d` also check the exact clock counts given above.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        --top-module tb_fft_ip_top rtl/fft_pkg.sv tb/tb_fft_ip_top.sv -o sim
    ./obj_dir/sim

Replace `fft_ip_top` with any module name to run that module's testbench.
The package must be listed first; `-y rtl` finds the other modules by file
name. The full-size end-to-end run takes well under a minute to build and a
fraction of a second to simulate.
