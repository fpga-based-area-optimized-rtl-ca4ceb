# Streaming Canny edge detector with block-adaptive hysteresis thresholds

This is a fully pipelined Canny edge detector in SystemVerilog. It takes an
8-bit grey image as a raster stream, one pixel per clock, and returns a 1-bit
edge map in the same order. The architecture it implements focuses on two
stages: directional non-maximum suppression (NMS) and hysteresis
thresholding.

- **NMS with interpolation.** A small arithmetic unit (one divider, two
  multipliers, one adder) interpolates the gradient magnitude along the true
  gradient direction. The direction is not rounded to one of four angles.
- **Thresholds that adapt to each block.** The high and low thresholds are not
  constants. They are derived for each block of the image from a coarse
  histogram of the NMS output: 8 bins of unequal width. That is far cheaper
  than a fine uniform histogram (64 bins or more), and it still follows the
  image content.

The smoothing and gradient stages in front are conventional window
operators: 3x3 for smoothing, and 3x3 up to 9x9 for the gradients (chosen at
build time).

```
 pixel ──► gaussian_smooth ──► gradient_unit ──► nms_unit ──┬──► threshold_calc ──(ThH,ThL)──┐
 stream     3x3, separable      Sobel Gx,Gy,|G|   interp.   │      8-bin histogram          │
                                                            └──► block_buffer ◄─────────────┘
                                                                  2 banks, replay
                                                                       │ pixel + ThH,ThL
                                                                       ▼
                                                                hysteresis_unit ──► edge stream
```

## Files

| file | role |
|---|---|
| `rtl/canny_pkg.sv` | widths (`PIX_W`=8, `G_W`=11, `MAG_W`=8, `NBINS`=8), pixel/gradient types, histogram bin function |
| `rtl/canny_top.sv` | the whole detector |
| `rtl/gaussian_smooth.sv` | 3x3 Gaussian as two 1-D [1 2 1] passes |
| `rtl/gradient_unit.sv` | Sobel-type Gx, Gy (3x3 to 9x9 kernel) and the magnitude, one result per clock |
| `rtl/grad_magnitude.sv` | exact integer sqrt(Gx²+Gy²), scaled to 8 bits |
| `rtl/nms_unit.sv` | NMS stage: window, selector, two arithmetic units, comparison |
| `rtl/nms_selector.sv` | picks the neighbours that bracket the gradient direction |
| `rtl/nms_arith.sv` | divider + 2 multipliers + adder interpolation |
| `rtl/threshold_calc.sv` | 8-bin non-uniform histogram → ThH, ThL per block |
| `rtl/block_buffer.sv` | two-bank store that holds a block until its thresholds exist |
| `rtl/hysteresis_unit.sv` | strong/weak classification and 8-neighbour linking |
| `rtl/window3x3.sv` | 3x3 neighbourhood generator built from two line FIFOs, with border handling and end-of-block drain |
| `rtl/window_kxk.sv` | the same for a KxK window (K-1 line FIFOs), used by the larger gradient kernels |
| `rtl/line_fifo.sv` | one-row delay line (circular RAM) |
| `rtl/pipe_reg.sv` | one registered valid/ready stage |
| `tb/canny_ref_pkg.sv` | reference model of every stage, used by all testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_canny_full` at the default size and `tb_canny_fullhd` at 1920 x 1080 |

## Stream protocol and block framing

Every stage has the same interface: `in_valid`/`in_ready` on the input and
`out_valid`/`out_ready` on the output. A beat moves when valid and ready are
both high. Pixels arrive in raster order, and a block is `IMG_W x IMG_H`
pixels (default 256 x 256 = 65536). Blocks follow each other back to back.
There are no frame or line markers: each stage counts pixels itself, so
upstream and downstream must agree on `IMG_W` and `IMG_H`.

A 3x3 window can only emit pixel (r, c) once pixel (r+1, c+1) has arrived.
The last row of a block would therefore be stuck until the next block comes
in. To avoid that, `window3x3` *drains* after the last pixel of a block. It
clocks `IMG_W+1` zero samples through its line FIFOs by itself, and holds
`in_ready` low during those cycles. As a result:

- each stage emits exactly `IMG_W*IMG_H` results per block, and the next block
  starts with clean state;
- each 3x3 stage has a latency of `IMG_W+1` accepted samples plus one cycle
  (the window register), plus one more cycle for its result register;
- a block of N pixels takes N + `IMG_W` + 1 input cycles at full rate, for
  example 65,793 cycles for 256 x 256. This is one pixel per clock, with a
  short stall between blocks.

Back-pressure (`out_ready` low) propagates upstream combinationally through
the ready chain. Every register stage loads when it is empty or when its
content is being taken.

The reset `rst` is synchronous and active high. It clears the control
state and the valid flags. Data RAMs and data registers are not reset. Stale
contents are never used: the window logic masks them, and the buffer only
reads words that have been written.

## Windows and image borders

`window3x3` keeps two `line_fifo`s (the previous two rows) and a 3x3 register
array. The first `line_fifo` delays the input by one row. The second delays
the output of the first. After each sample, `win[i][j]` holds the pixel at
(row+i-1, col+j-1) relative to a centre that lags the input by `IMG_W+1`
samples. The centre's row and column are tracked by counters, and from them
the window replaces every position that lies outside the image:

- `REPLICATE=1` (smoothing, gradients): the nearest in-image pixel is used.
  Rows are fixed first, then columns. An edge is therefore not invented at
  the border of the image.
- `REPLICATE=0` (NMS, hysteresis): zero is used. A missing neighbour has no
  magnitude and is not a strong edge.

## Smoothing and gradients

The smoothing kernel is [1 2 1]ᵀ[1 2 1]/16. The window columns are first
summed with weights 1-2-1, then the three column sums are combined with
weights 1-2-1. The result is rounded: `(sum + 8) >> 4`.

With the default `GRAD_K` = 3 the gradients use the 3x3 Sobel pair. Gx is
(right column − left column) and Gy is (bottom row − top row), each row or
column weighted 1-2-1. Gx is positive when brightness grows to the right, and
Gy when it grows downward. Both lie in ±1020 (11-bit signed).

Sharper or noisier images may call for a wider kernel, so `GRAD_K` (the
`KSIZE` parameter of `gradient_unit`) can also be 5, 7 or 9. The kernel is
separable. Across the gradient it is the derivative row
d[j] = C(K−2, j−1) − C(K−2, j), that is [−1 0 1] convolved K−3 times with
[1 1]. Along the edge it is the binomial smoothing row s[j] = C(K−1, j).
For K = 5 these are [−1 −2 0 2 1] and [1 4 6 4 1]. The raw sums grow with
K, so they are divided by 2^SH with rounding half up. SH is the smallest
shift that keeps the largest possible gradient at or below 1020: 4, 8 and 12
for K = 5, 7 and 9. Everything after the gradient stage therefore sees the
same 11-bit range whatever the kernel. A KxK window needs K−1 line FIFOs
(`window_kxk`) and drains for R·IMG_W + R cycles, R = (K−1)/2. So a wider
kernel costs line memory and a longer pause between blocks, but not
throughput within a block.

`grad_magnitude` computes ⌊√(Gx²+Gy²)⌋ exactly, with a digit-by-digit square
root (11 result bits). It then divides by 4, the Sobel gain, with rounding,
and saturates at 255. All later stages work on this 8-bit magnitude.

## Directional non-maximum suppression

The NMS stage needs three things at once: the centre's Gx and Gy, and the
magnitudes of its 8 neighbours. Gx, Gy and |G| are packed into one 30-bit
word, which travels through a single pair of line FIFOs. The centre's
gradient is therefore aligned with its magnitude window without any extra
delay line.

**Selecting neighbours.** Let sx and sy be the signs of Gx and Gy (zero
counts as positive). Offsets below are (row, column), with rows growing
downward.

| case | side 1: axial, diagonal | side 2: axial, diagonal | weight w |
|---|---|---|---|
| \|Gx\| ≥ \|Gy\| (mostly horizontal) | (0, sx), (sy, sx) | (0, −sx), (−sy, −sx) | \|Gy\|/\|Gx\| |
| \|Gx\| < \|Gy\| (mostly vertical) | (sy, 0), (sy, sx) | (−sy, 0), (−sy, −sx) | \|Gx\|/\|Gy\| |

The line through the centre along the gradient crosses the ring of 8
neighbours between an axial neighbour and a diagonal one. w is how far the
crossing is from the axial neighbour (tangent of the angle from the axis).

**Interpolation (`nms_arith`).**

```
w      = floor(256 * num / den)       // 0..256, den = 0 gives 0
interp = m_axial * (256 - w) + m_diag * w   // magnitude * 256
```

This is one divider, two multipliers and one adder per side. The stage uses
two of these units, one for each side of the centre. The divider is the same
on both sides, so a tighter design could share it.

**Decision.** The centre is kept if `256*M(centre) >= interp` on both sides.
Otherwise it becomes 0. A tie is kept, so a plateau of equal magnitudes can
give a ridge two pixels wide. At the image border the missing neighbours are
0.

The arithmetic is all combinational between the window register and the
stage's result register. The divider is the long path. For a high clock rate
it should be pipelined with a matching delay on the valid flag; the stage's
enable logic already allows that.

## Block thresholds from an 8-bin non-uniform histogram

`threshold_calc` sees every NMS output pixel of a block. Pixels that NMS set
to 0 are counted towards the block length but are not put in a bin. A
non-zero magnitude m goes into bin ⌊log₂ m⌋:

| bin | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| magnitudes | 1 | 2–3 | 4–7 | 8–15 | 16–31 | 32–63 | 64–127 | 128–255 |

Most surviving magnitudes are small, and octave bins keep resolution there.
Finding a pixel's bin only needs a leading-one detector.

When the last pixel of a block has been counted, the unit does three things.
It copies the 8 counters to a snapshot, clears the live counters so that the
next block can start in the very next cycle, and scans the snapshot one bin
per clock while accumulating the count. Let k be the first bin where

```
256 * cumulative_count >= P1_Q8 * binned_pixels      (P1_Q8 = 205, i.e. P1 = 0.8)
```

Then

```
ThH = 2^k                         (lower edge of the bin holding the P1 quantile)
ThL = max(1, round(0.4 * ThH))    computed as (ThH*102 + 128) >> 8
```

`thr_valid` pulses 9 cycles after the block's last pixel, carrying ThH and
ThL. The outputs keep those values until the next block's pulse. Before the
first block they hold 256 and 102. The threshold ports are `THR_W` = 10 bits
wide, so that values up to 256 fit.

The rule places ThH on a power of two. That is the price of an 8-bin
histogram: ThH can only take 8 values. The P1 fraction, the 0.4 ratio and the
choice of the lower bin edge are parameters of this implementation, not fixed
constants of the method. They are the first things to tune on real images.
Because the quantile is taken over every non-zero NMS pixel, weak texture
counts as much as real contours. On a 256 x 256 image of flat regions with
only ±1 grey-level noise, most surviving pixels have magnitude 1. The 0.8
quantile then falls into bin 0, ThH becomes 1, and every surviving pixel is
marked as an edge. The same shapes without noise give ThH = 64. Raising P1,
or leaving bin 0 out of the histogram, are the obvious knobs; neither is
applied here.

## Holding a block for its own thresholds

A block's thresholds exist only after its last pixel has passed NMS. The
block's pixels therefore wait in `block_buffer` before hysteresis. The buffer
has two banks of `NPIX` bytes, at words 0 and `NPIX` of one RAM with a
synchronous read. Block *n* is written into one bank while block *n−1* is
replayed from the other:

- A bank becomes **full** when its last pixel is written.
- It becomes **armed** when the next `thr_valid` arrives. Thresholds come in
  block order, and a third pointer tracks which bank they belong to.
- A full, armed bank is read in raster order at one pixel per clock. ThH and
  ThL ride along with every pixel. When its last pixel has been read, the
  bank is free again.

The writer stalls (`in_ready` low) only if the bank it needs is still
waiting or being read. With blocks back to back this does not happen at full
rate: the replay of block *n−1* ends before block *n+1* begins. An assertion
flags thresholds that arrive for a bank that already holds unread ones.

Memory cost: 2 x `IMG_W*IMG_H` bytes (128 KiB at the default size). The
alternative is to apply block *n−1*'s thresholds to block *n*, which removes
the buffer entirely. That is reasonable for video, but the thresholds then
lag by one block.

## Hysteresis in one pipelined pass

`hysteresis_unit` first classifies each pixel with its own block's
thresholds:

- *strong* if f ≥ ThH;
- *weak* if f ≥ ThL;
- zero pixels are neither.

Only these 2 bits per pixel go through the line FIFOs, not the 8-bit
magnitude. On the 3x3 window of classes:

```
edge = strong(centre) | (weak(centre) & any strong among the 8 neighbours)
```

A weak pixel is kept only if it touches a strong pixel directly. A chain of
weak pixels two or more steps away from a strong one is dropped. Full
connected-component hysteresis would need either repeated passes or a
label-merging structure; this single-pass rule is the hardware-friendly
approximation.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `IMG_W`, `IMG_H` | 256, 256 | top and all window stages | block size; the default follows the 65536-pixel block of the reference design |
| `P1_Q8` | 205 | top, `threshold_calc` | P1 = P1_Q8/256, fraction of edge candidates below ThH |
| `THR_W` | 10 | top, `threshold_calc`, `block_buffer`, `hysteresis_unit` | threshold width |
| `NPIX` | 65536 | `threshold_calc`, `block_buffer` | pixels per block (top passes `IMG_W*IMG_H`) |
| `GRAD_K` / `KSIZE` | 3 | top / `gradient_unit` | gradient kernel size: 3, 5, 7 or 9 |
| `FRAC` | 8 | `nms_arith` | fraction bits of the interpolation weight |
| `REPLICATE` | 0 | `window3x3` | border rule: replicate (1) or zero (0) |

Any `IMG_W`, `IMG_H` ≥ 2 works, including sizes that are not powers of two.
`threshold_calc` needs more than 8 pixels per block.

## Relation to the published architecture

These parts follow the published description:

- the five units and their order;
- separable 3x3 smoothing;
- a gradient-and-magnitude stage that produces one result per clock;
- NMS with two FIFO buffers, a selector steered by Gx/Gy, and a
  divider/multiplier/adder interpolator, compared against the centre;
- block thresholds from an 8-bin non-uniform histogram of the NMS output;
- hysteresis with a strong and a weak image in a pipelined unit;
- the 8-bit data path into the thresholding unit, 10-bit thresholds and
  65536-pixel blocks.

These are this implementation's own choices; the description leaves them
open:

- smoothing coefficients and the gradient kernels (Sobel and its binomial
  extension to 5x5–9x9), with their scaling, and a build-time kernel size;
- the magnitude scaling;
- border handling;
- the stream protocol and the drain;
- the octant rule, the fixed-point format and the tie rule of NMS;
- the bin edges, the P1 = 0.8 quantile rule (lower bin edge) and ThL = 0.4·ThH;
- leaving zeros out of the histogram;
- the two-bank block buffer;
- the direct-neighbour hysteresis rule;
- one arithmetic unit per NMS side.

The divider and multipliers are plain inferred logic, not vendor IP cores.

The published simulation of the thresholding unit ends a 65536-pixel block
with a high threshold of 1 and a low threshold of 2. A low threshold above the
high one cannot work as a hysteresis pair, so that result is not reproduced:
here ThL never exceeds ThH. For a noisy block the high threshold can also
fall to 1 here (see the threshold section).

Not built:

- **Splitting a large frame into blocks handled by parallel units.** At the
  default parameters one instance processes one 256 x 256 block. A
  1920 x 1080 frame needs either `IMG_W=1920`, `IMG_H=1080` and a 4 MiB
  buffer (this configuration is simulated by `tb_canny_fullhd`), or an outer
  tiling layer that is not part of this RTL. At one pixel per clock, a new
  frame can enter every 1920·1080 + 1921 cycles, so full HD at 30 frames/s
  needs a clock of about 63 MHz. The edge map of a frame leaves about two
  frame times after its first pixel: one to stream it in, one to replay it
  from the buffer.
- **Direction quantisation by a 2.5:1 ratio test on |Gx|, |Gy|.** This is the
  cheaper textbook NMS. It appears in the background of the method but is not
  the proposed hardware.

## Verification

Every module except the small `pipe_reg` helper has its own self-checking
testbench (`pipe_reg` is exercised inside every stage). Each one compares against
`tb/canny_ref_pkg.sv`, a whole-image reference model written independently of
the RTL: clamped or bounds-checked pixel access, a square root in real
arithmetic, and neighbour offsets along the gradient. Each testbench prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it exercises |
|---|---|
| `tb_line_fifo` | delay of exactly DEPTH enabled cycles under random enables |
| `tb_window3x3` | every window position, both border rules, drain length, full-rate timing |
| `tb_gaussian_smooth`, `tb_gradient_unit`, `tb_nms_unit` | every output against the model; one frame at full rate with cycle count N+W+2 (N+R·W+R+1 for the kernel sizes 3, 5, 7, 9 in `tb_gradient_unit`); frames with random gaps and back-pressure |
| `tb_grad_magnitude`, `tb_nms_arith`, `tb_nms_selector` | extremes and thousands of random operands; all 8 gradient octants |
| `tb_threshold_calc` | mixed, empty, saturated and narrow blocks; blocks back to back; `thr_valid` exactly 9 cycles after the last pixel |
| `tb_block_buffer` | order, thresholds attached to the right block, no pixel before its thresholds, writer stalls |
| `tb_hysteresis_unit` | four threshold sets; strong, promoted and rejected weak pixels all occur |
| `tb_canny_top` | 16x12 blocks end to end, with `GRAD_K` = 3 and 7 side by side. Full-rate input period N+W+1, then N+R·W+R for the wider kernel. Counts and requires input stalls, output back-pressure, drains, both buffer banks, NMS suppression, promoted and rejected weak pixels, and a change of ThH. |
| `tb_canny_full` | default 256 x 256 parameters, two blocks (noise-free shapes, then noise), all 131,072 edge bits and both threshold pairs; runs in well under a second |
| `tb_canny_fullhd` | one 1920 x 1080 frame as a single block: all 2,073,600 edge bits, the thresholds, and the frame latency (at most 2·N + 6·(W+1) + 64 cycles); a few seconds |

To run a testbench with Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/canny_pkg.sv tb/canny_ref_pkg.sv tb/tb_canny_top.sv --top-module tb_canny_top
./obj_dir/Vtb_canny_top
```

Replace `tb_canny_top` with any other testbench name. To lint the design:

```
verilator --lint-only -Wall -y rtl rtl/canny_pkg.sv rtl/canny_top.sv
```

`-Wall` reports a few unused-bit warnings. They come from intermediate
products that are wider than their results, and are expected.
