# Streaming Canny-style edge detector with a per-frame adaptive threshold

This is a pixel-streaming edge detector for FPGAs. Gray frames of 256 × 256 pixels
are smoothed with a 3 × 3 Gaussian. A 3 × 3 gradient operator is applied, and the
gradient magnitude |Gx| + |Gy| is kept only where it reaches a threshold. That
threshold is not a fixed constant. It is computed from each frame itself:

    S = Σ A_i² / (8 N)        A_i = Gaussian-filtered pixels, N = 256 × 256

Every multiplication and division in the datapath is by a power of two, except the
one squaring in the threshold unit. So the pipeline is built from shifters, adders
and a single multiplier. It accepts one pixel per clock, with no back-pressure.

The design follows a published FPGA architecture: preprocessing, Gaussian filter,
delay, Gx/Gy, gradient magnitude and thresholding, plus an adaptive-threshold unit
beside them. Several details were not specified there: widths, borders, frame
boundaries and which threshold a frame is compared against. They are this design's
own choices and are marked as such below and in each file's header.

## Pipeline

```
 RGB raster ──► preprocess ──► gaussian_filter ──┬──► frame_delay ──► moving_window ──► gx_calc ─┐
 (in_rgb)       gray, resize    3x3 /16           │    (holds one       (3x3 window)     gy_calc ─┤
                                                  │     frame)                                    ▼
                                                  │                                       gradient_calc
                                                  │                                       |Gx|+|Gy|
                                                  └──► adaptive_threshold ── S ──┐             │
                                                       Σ A²/(8N)                 │             ▼
                                                       release frame ──► frame_delay    thresholding ──► out_edge
                                                                                  └───────► (G ≥ S ? G : 0)
```

| module | does | latency |
|---|---|---|
| `preprocess` | RGB → gray `(77R + 150G + 29B) >> 8`. Resizes by keeping every `DECIM`-th pixel of every `DECIM`-th row. | 1 cycle |
| `moving_window` | Two row FIFOs of `IMG_W-3` pixels and 3 × 3 shift registers. Presents the window around each pixel with the pixel's row, column and border flag. | centre = newest − (`IMG_W`+1) pixels, +1 cycle |
| `line_fifo` | Fixed-length circular-buffer delay line, used as a row FIFO. | `IMG_W-3` shifts |
| `gaussian_filter` | `(d0+2d1+d2+2d3+4d4+2d5+d6+2d7+d8) >> 4`. Border pixels are passed through. | window + 1 cycle |
| `adaptive_threshold` | Squares each filtered pixel and accumulates the squares. Shifts the sum right by `3 + log2 N` at the end of the frame. | `thr_valid` 1 cycle after the frame's last pixel |
| `frame_delay` | One-frame memory. Releases a frame when its threshold is known. | 1 cycle after release |
| `gx_calc`, `gy_calc` | Quarter-weighted gradient kernels, computed ×4 as integers. | combinational |
| `gradient_calc` | `(|4Gx| + |4Gy|) >> 2`. Border pixels give 0. | 1 cycle |
| `thresholding` | `G ≥ S ? G : 0`, using the S of the pixel's own frame. | 1 cycle |
| `canny_top` | Wires the blocks above together. | see below |

`canny_pkg` holds the default sizes and the border test. Window elements are named
`d0 … d8` row-major, with `d0` at the top left and `d4` at the centre. The kernels are:

```
Gaussian (1/16)·[1 2 1; 2 4 2; 1 2 1]
Gx = [-1/4 0 1/4; -1 0 1; -1/4 0 1/4]
Gy = [ 1/4 1 1/4;  0 0 0; -1/4 -1 -1/4]
```

## Why the gradient path waits one frame

The threshold of a frame depends on every filtered pixel of that frame. The design
compares each frame with its own threshold. So the filtered frame must wait somewhere
until its last pixel has been accumulated. This is the job of the delay stage in front
of the gradient operator. `frame_delay` is a circular buffer of `IMG_W·IMG_H + SLACK`
pixels:

* The Gaussian output is written into it continuously.
* `adaptive_threshold` pulses `thr_valid` one cycle after a frame's last pixel. That
  pulse releases the frame (`release_frame`).
* A released frame is read at one pixel per clock. Reading stops after exactly
  `IMG_W·IMG_H` pixels, until the next release.
* While frame *k* is being read, frame *k+1* is being written. So the buffer never
  needs more than one frame plus the few pixels that arrive between a frame's end and
  its release. `SLACK = 16` covers those pixels. A pixel that finds the buffer full is
  dropped and sets the sticky `delay_overflow`. This cannot happen at ≤ 1 pixel per
  clock.

The threshold of frame *k+1* arrives while frame *k* is still leaving the gradient
stage. `thresholding` therefore parks it in a second register and switches over at
the first pixel of the next frame. An assertion checks that a frame never starts
before its threshold is there.

Cost: the frame buffer is 65,536 × 8 bits (512 kbit) of block RAM. The published
resource figures (526 slice registers, 5,490 LUTs, one DSP block) list no block RAM.
The original may have synchronised differently, for example by applying the previous
frame's threshold to the current frame with only a short alignment delay. That variant
needs no frame memory. To get it, remove `frame_delay` and feed `thresholding` a
threshold one frame old.

### What the threshold formula does to real images

S is computed exactly as specified: the mean of the squared filtered pixels, divided
by 8. For a frame of mean brightness 100, S ≈ 100²/8 = 1250. That is above the largest
possible gradient, 765. Even a black-to-white step, after Gaussian smoothing, gives a
gradient of only about 290. So with this formula, edges survive only in dark scenes
with sparse bright detail. The testbenches use such scenes: a noisy dark background
with thin bright lines and dots. There S is roughly 30 at 256 × 256, and both passing
and suppressed gradients occur. A smaller threshold is a one-line change in
`adaptive_threshold` (the `SHIFT` constant, or a square root of the mean square).

## The moving window, frame borders and frame tails

`moving_window` follows the classic two-line-buffer arrangement. The newest pixel
enters the last register of the newest row. Three registers plus a FIFO of
`IMG_W − 3` pixels make one image row, so the three register rows always hold three
vertically adjacent rows. The window centre trails the newest pixel by `IMG_W + 1`
stream positions. Two problems follow from this, and the design solves them as
follows.

* **Borders.** A centre on row 0, row `IMG_H−1`, column 0 or column `IMG_W−1` has no
  complete neighbourhood. Its window wraps to the previous row or the previous frame.
  `ctr_border` marks these pixels. The Gaussian passes them through unchanged, and the
  gradient sets them to 0. The output therefore stays exactly `IMG_W × IMG_H` per frame.
* **Frame tails.** The last `IMG_W + 1` pixels of a frame reach the centre only when
  more samples are shifted in. Each stream position carries a tag bit: real pixel or
  padding. `win_valid` fires only for real centres. When a whole frame has been
  received and the input is idle, the window shifts in tagged padding samples until
  every real pixel has left (`padding` output). Padding is inserted only between
  frames, so rows inside a frame stay aligned. It costs nothing when frames arrive back
  to back, because the next frame pushes the tail out.

Because of this, each stage emits exactly one value per pixel, in raster order, with
`row`/`col` counters that restart every frame. No frame-start signal is needed.
Frames are delimited by counting pixels from reset.

## Numbers and widths

| quantity | range | bits |
|---|---|---|
| gray / filtered pixel | 0 … 255 | `DW` = 8 |
| 4·Gx, 4·Gy | ±1530 | `DW+4` signed |
| G = (|4Gx|+|4Gy|) >> 2 | 0 … 765 | `DW+2` = 10 |
| Σ A² over a frame | < 2³² | `2·DW + log2 N` = 32 |
| S = Σ A² >> (3 + log2 N) | 0 … 8128 | `2·DW−3` = 13 |

All divisions truncate. `IMG_W·IMG_H` must be a power of two, because the division by
8N is a shift. An elaboration-time assertion checks this.

## Interface and timing of `canny_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid`, `in_rgb` | in | 1, 24 | source pixel `{R,G,B}` in raster order, at most one per clock |
| `out_valid`, `out_edge` | out | 1, 10 | one value per working pixel in raster order: G if G ≥ S, else 0 |
| `out_pass` | out | 1 | the pixel passed the threshold |
| `thr`, `thr_valid` | out | 13, 1 | each frame's S when it is computed |
| `gauss_padding`, `grad_padding` | out | 1 | a window is flushing a frame tail |
| `delay_holding` | out | 1 | a frame is waiting for its threshold |
| `delay_overflow` | out | 1 | sticky: a pixel was dropped |

A frame's first edge value leaves exactly `IMG_W + 6` cycles after its `thr_valid`,
which comes one cycle after the frame's last filtered pixel. The values then leave at
one per clock without a gap. At the published clock of 158 MHz, that is about 2,400
frames of 256 × 256 per second. The end-to-end testbench checks this no-gap property.

Parameters (defaults in brackets): `DW` [8], `IMG_W` [256], `IMG_H` [256], `DECIM`
[1], `SLACK` [16]. The source frame is `(IMG_W·DECIM) × (IMG_H·DECIM)` pixels.

## Departures and own choices

* 8-bit gray and the luma weights 77/150/29 are this design's choices.
* Resizing is integer nearest-neighbour decimation only. Arbitrary source sizes are
  not supported. With `DECIM = 1` the source must already be 256 × 256.
* Border handling, frame-tail padding, the one-frame delay, the threshold hand-over
  and all widths are this design's choices (see above).
* The gradient is computed ×4 and scaled once at the end, so no precision is lost in
  the quarter weights.
* The threshold formula is kept as specified, even though it suppresses most edges in
  bright images (see above).
* No clock-frequency target is built in. Published figures: 158.295 MHz in the
  resource table, 213 MHz in the accompanying text.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come from a
separate behavioural model in `tb/canny_ref_pkg.sv`. That model uses plain loops over
integer images, with the kernels written out as matrices.

* `tb_moving_window`: every window tap, position and border flag over four frames,
  including idle gaps and a long pause. Checks the `IMG_W+1` latency and that padding
  happens.
* `tb_gaussian_filter`, `tb_gx_calc`, `tb_gy_calc`, `tb_gradient_calc`: the
  arithmetic against the reference, including extreme windows.
* `tb_adaptive_threshold`: S for random, all-0, all-255 and dark frames, and the
  one-cycle timing of `thr_valid`.
* `tb_frame_delay`: nothing leaves before release; one pixel per clock after it; a
  read stops at the frame end; overflow at capacity + 1.
* `tb_thresholding`: the ≥ comparison at the boundary, and thresholds delivered
  mid-frame.
* `tb_preprocess`: gray conversion and 2× decimation.
* `tb_canny_top`: the whole design at 16 × 16, resized from 32 × 32 sources. Runs four
  frames, one with random input gaps and one after a long pause. Every output value
  and threshold is checked. It counts each mechanism (both paddings, frame holding,
  pass, suppression, border, input gaps, resize drops) and fails if one never happens.
* `tb_canny_full`: `canny_top` with default parameters, two 256 × 256 frames (the
  second with gaps). All 131,072 outputs are checked. It takes about 15 s.

Both end-to-end benches use `tb/canny_env.sv` (driver and scoreboard) and
`tb/canny_ref_pkg.sv`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/canny_pkg.sv tb/canny_ref_pkg.sv tb/tb_canny_full.sv --top-module tb_canny_full
./obj_dir/Vtb_canny_full
```

Replace the testbench name to run any other. The design is plain synthesizable
SystemVerilog. The memories are arrays with one write port and one read port.
`line_fifo` reads asynchronously, which suits distributed RAM. `frame_delay` reads
synchronously and maps to block RAM.
