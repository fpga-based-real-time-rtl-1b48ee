# Streaming Sobel–Canny edge detector

This is a hardware edge detector for video. It combines the low cost of the Sobel
operator with the clean, thin edges of Canny refinement. It works on a raster pixel
stream at one pixel per clock and never stores a frame: every neighbourhood it needs
comes from a few line buffers. An RGB pixel goes in and a 0/255 edge pixel comes out.
A mode input selects one of two pipelines:

* **basic**: Sobel gradients, Gaussian smoothing of the gradient magnitude,
  non-maximum suppression, and a double threshold with hysteresis at the fixed
  thresholds [21 52].
* **improved**: the same chain, plus two additions. The thresholds adapt to the
  previous frame's gradient statistics, and a morphological clean-up removes
  isolated edge pixels.

The design follows the architecture of the paper "FPGA-Based Real-Time Image Edge
Detection using Pipelined Sobel and Canny Operations" (Zynq-7000 target, 800 × 532
test image). That paper describes the stages but mostly not their insides. Many
details here are therefore this design's own choices, and they are marked as such
below and in each file's header.

## The pixel path

```
 s_tdata (RGB888)
   │
 rgb2gray ──► median3x3 ──► sobel_grad ──► gauss_sep ──┬──► nms3x3 ──► double_thresh ──► hysteresis3x3 ──► morph_clean ──► m_tdata
   1 clk       3x3, 2 clk     3x3, 2 clk    5x5, 2 clk  │     3x3, 2 clk    1 clk   ▲          3x3, 2 clk        3x3, 2 clk
                                   │                   └──► adaptive_thresh ─────────┘ (pair for the next frame)
                                   └─► Sobel edge flag (counted: n_sobel)
```

| stage | what it does | neighbourhood | source |
|---|---|---|---|
| `rgb2gray` | Y = (77 R + 150 G + 29 B) >> 8 | – | grey conversion named in the paper, weights chosen here (BT.601) |
| `median3x3` | 3×3 median, removes impulse noise | 3×3 | named in the paper's system diagram only |
| `sobel_grad` | Gx, Gy (standard 3×3 Sobel masks); magnitude \|Gx\|+\|Gy\|; orientation in 4 classes; fixed-threshold Sobel flag | 3×3 | masks and magnitude from the paper |
| `gauss_sep` | smooths the *magnitude* with a separable [1 4 6 4 1]/16 kernel in each direction (σ = 1) | 5×5 | separable smoothing of the magnitude and σ = 1 from the paper, taps chosen here |
| `nms3x3` | keeps a magnitude only if it is ≥ both neighbours along its orientation | 3×3 | paper |
| `double_thresh` | strong / weak / none, with the fixed or the adaptive pair | – | paper (Eq. for the three classes); thresholds from the paper's table |
| `hysteresis3x3` | strong → edge; weak → edge only next to a strong pixel | 3×3 | paper (one-pass form chosen here) |
| `morph_clean` | improved mode: drops edge pixels that have no edge neighbour | 3×3 | "remove isolated noise edges" from the paper; rule chosen here |
| `adaptive_thresh` | mean smoothed magnitude of a frame → threshold pair for the next | – | adaptivity from the paper, rule chosen here |

All stages share one streaming convention: `valid`, `last` (the last pixel of a
frame) and data. There is no ready/backpressure signal. The detector accepts a pixel
on every clock where `s_tvalid` is high. Gaps in `s_tvalid` travel through as gaps
in `m_tvalid`, and every stage keeps up with one pixel per clock.

## Windows, borders and frame size

`line_window` is the building block behind every neighbourhood stage except the
Gaussian, which has its own separable structure. It works like this:

* K−1 line buffers, each one row long, hold the previous rows.
* For each incoming pixel, the buffers are read at the current column. That gives a
  K-tall column, which is shifted into a K×K register window.
* The column is written back moved up by one row.
* The buffers are plain arrays with an asynchronous read, so on an FPGA they map to
  distributed (LUT) RAM.

Borders are not padded. A stage emits a result only where its whole neighbourhood
lies inside its input frame, so every stage makes the frame smaller:

| stage | trimmed per side | output for an 800 × 532 input |
|---|---|---|
| median 3×3 | 1 | 798 × 530 |
| Sobel 3×3 | 1 | 796 × 528 |
| Gaussian 5×5 | 2 | 792 × 524 |
| suppression 3×3 | 1 | 790 × 522 |
| hysteresis 3×3 | 1 | 788 × 520 |
| clean-up 3×3 | 1 | **786 × 518 = 407 148** |

A W × H input frame therefore gives a (W−14) × (H−14) edge frame. Each stage counts
columns and rows itself, using its own `IMG_W`/`IMG_H`. The top computes these
sizes from its own `IMG_W`/`IMG_H`. `last` also resets a stage's counters, so a
short frame resynchronises the chain.

**Latency.** After the pixel that completes a window, each window stage needs two
clocks: one to shift the window, one to register the result. The point stages need
one clock. The last edge pixel of a frame therefore leaves 14 clocks after the last
input pixel. Any other edge pixel also waits for the rows below its neighbourhoods to
arrive: about seven input rows in total across the chain (one per 3×3 stage, two for
the 5×5 Gaussian).

## Gradient direction

The magnitude is |Gx| + |Gy| (11 bits, at most 2040). The orientation is reduced to
the four principal directions. The ratio |Gy|/|Gx| is compared against tan 22.5° and
tan 67.5° in fixed point:

* `128·|Gy| < 53·|Gx|` gives 0° (compare the left and right neighbours).
* `128·|Gy| > 309·|Gx|` gives 90° (compare the neighbours above and below).
* Otherwise the result is diagonal. Gx and Gy with the same sign give 45°
  (up-left/down-right). Opposite signs give 135° (up-right/down-left).

Here y grows downwards, Gx is right minus left and Gy is bottom minus top.

The paper also shows an "improved Sobel" set of eight directional masks. They come in
opposite pairs, and the text computes magnitude and direction from Gx and Gy only.
This design therefore convolves only Gx and Gy, and the diagonal masks are
represented by the 45°/135° classes.

The orientation then travels with its magnitude as a `grad_t` struct
`{dir, mag}`. `gauss_sep` reads the orientation of the centre pixel from the centre
row of its column and the centre of its horizontal register. This means that
`nms3x3` compares each smoothed magnitude along the orientation of that same pixel.

## Thresholds, modes and frame boundaries

Thresholds are 8-bit values, and a magnitude is compared after dropping its three low
bits (2040 >> 3 = 255). This scale matches the paper's hardware threshold pairs:
[21 52] for the basic and [56 119] for the improved pipeline. The paper's normalised
Sobel threshold 0.1569 becomes `T_SOBEL = 40`.

The timing is the most delicate part of the design, because several frames are in
flight at once. The first frame's pixels are still being classified while the next
frame is already entering the detector.

* `adaptive_thresh` sums the smoothed magnitude over a whole frame. It turns the sum
  into a mean by multiplying with a reciprocal of the fixed pixel count, computed at
  elaboration. It then sets `T_high = min(255, 3·mean)` and
  `T_low = 15·T_high/32`. The 15/32 ratio is that of the paper's improved pair. The
  new pair appears two clocks after the frame's last smoothed pixel. Until the first
  frame has been measured, the pair is [56 119].
* `double_thresh` latches the mode and the threshold pair at reset and on the last
  pixel of every frame. A whole frame is therefore classified with one pair. In the
  improved mode, frame *n* uses the pair measured on frame *n−1*. The suppression
  stage's last pixel reaches `double_thresh` two clocks after the last smoothed
  pixel, exactly when the new pair appears, so the handover is exact.
* `morph_clean` takes its mode from `double_thresh` and latches it when it evaluates
  its own last window of a frame. Both mode-dependent stages therefore switch at the
  same frame boundary of the data.

To switch modes, change `mode_improved` at any time after the last input pixel of a
frame and before that frame has left the suppression stage. The change then applies
from the next frame. Changing it right after `s_tlast` is always safe, because the
frame boundary reaches `double_thresh` only about seven rows later.

## Hysteresis and clean-up: what is and is not done

Hysteresis is a single streaming pass over a 3×3 neighbourhood. A weak pixel counts
as an edge only when one of its eight neighbours is strong. A chain of weak pixels
that reaches a strong pixel only through other weak pixels is cut after its first
pixel. Following such a chain would need the whole frame, which this architecture
avoids by design.

The clean-up removes an edge pixel that has fewer than `MIN_NB` (default 1) edge
neighbours, which means exactly the isolated pixels. It does not remove longer broken
fragments. In the basic mode it passes the edge map unchanged. It still trims the
border there, so the output size does not depend on the mode.

## Top-level interface (`edge_detect_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low synchronous reset |
| `s_tvalid`, `s_tlast` | in | 1 | input pixel valid; last pixel of the frame |
| `s_tdata` | in | 24 | RGB888, R in [23:16] |
| `mode_improved` | in | 1 | 1: adaptive thresholds and clean-up (applies from the next frame) |
| `m_tvalid`, `m_tlast` | out | 1 | edge pixel valid; last edge pixel of the frame |
| `m_tdata` | out | 8 | 0 or 255 |
| `in_count`, `out_count` | out | 32 | pixels of the current frame seen at the input / output |
| `n_sobel`, `n_canny`, `n_final` | out | 32 | last frame's count of Sobel-flag pixels, of edges after hysteresis, of edges after clean-up |
| `t_low`, `t_high` | out | 8 | threshold pair in use |
| `mean_mag` | out | 8 | last measured mean smoothed magnitude (8-bit scale) |

Parameters: `IMG_W = 800`, `IMG_H = 532` (the size of the paper's test frame) and
`T_SOBEL = 40`. Shared types (`grad_t`, `dir_t`, `cls_t`, widths) are in
`rtl/edge_pkg.sv`.

## Size

Yosys' coarse synthesis counts about 92 kbit of line-buffer memory at the default
800-pixel rows, about 830 flip-flops, and on the order of a thousand word-level
cells. The paper reports 964 LUTs and 169 registers for its improved design. That
design has fewer window stages; this one has more line buffers (median, 5×5
Gaussian, three 3×3 stages).

## Where this design departs from the paper

* **Smoothing.** The paper's Canny equations smooth the image before the gradient.
  Its description of the proposed hardware smooths the gradient magnitude after
  Sobel. This design follows the hardware description.
* **Kernel taps.** The Gaussian taps, the median's window size, the grey weights,
  the orientation boundaries and the adaptive-threshold rule are all choices made
  here. The paper gives none of them.
* **Adaptive thresholds.** The paper speaks of local statistics. This design uses a
  frame-level statistic (the previous frame's mean), the simplest one that follows
  illumination.
* **Sobel threshold.** The paper lists a slightly higher normalised Sobel threshold
  for the improved pipeline (0.1747, about 45). Here `T_SOBEL = 40` is used in both
  modes. The Sobel flag only feeds the `n_sobel` count.
* **Output size.** The paper's simulation shows 800 × 532 = 425 600 pixels in and
  796 × 528 = 420 288 out: a module with two trimmed 3×3 stages. This full chain
  trims 7 pixels per side and gives 786 × 518.
* **Interface.** The paper's waveform shows an 8-bit grey input. Here the top takes
  RGB because it includes the grey conversion. The paper's grey-input point
  corresponds to the input of `median3x3`.
* **Not included.** The camera-side blocks of the paper's system diagram are not
  part of this RTL: the OV5640 sensor, its I2C configuration, the PLL, pixel
  capture, the SDRAM frame store and the VGA output. The paper only names them. The
  top's input and output streams are where they would attach.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/edge_ref_pkg.sv` is a
frame-level reference model: plain loops over whole images, a sort for the median,
and a direct 5×5 convolution for the Gaussian. The testbenches compare the streaming
hardware against it pixel by pixel.

* `tb_edge_detect_top`: four 40 × 30 frames through the whole chain. Frames 0–1 run
  back to back without gaps and frames 2–3 have random gaps. The modes are basic,
  improved, improved, basic. It checks every edge pixel, `m_tlast`, the frame size,
  the per-frame counts, the threshold pair of each frame and the 14-clock latency.
  It also counts that every mechanism occurred: median changes, suppression, weak
  pixels kept and dropped, isolated pixels removed, threshold updates, input gaps and
  both mode switches.
* `tb_edge_detect_full`: the same checks at the default 800 × 532 over three frames
  (basic, improved, basic with gaps). That is 1.2 M edge pixels, in a few seconds of
  Verilator time.
* `tb_<stage>`: each stage on small random frames, including gaps, ties and
  extremes (saturating magnitudes, all-0/255 images), with its output count,
  `out_last` and latency.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/edge_pkg.sv tb/edge_ref_pkg.sv tb/tb_edge_detect_top.sv \
    --top-module tb_edge_detect_top -Mdir obj_top -o sim
./obj_top/sim
```

For any other testbench, replace the testbench file and the top-module name. To
lint the RTL:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/edge_pkg.sv rtl/edge_detect_top.sv
```

## Changing it

* **Frame size.** Set `IMG_W`/`IMG_H` on `edge_detect_top`. The line buffers,
  counters and the adaptive unit's reciprocal follow automatically.
* **Thresholds.** Change `T_LOW_FIX`/`T_HIGH_FIX` (basic pair) on `double_thresh`,
  and `KH_*`, `KL_*`, `TL_INIT`, `TH_INIT` on `adaptive_thresh`.
* **Clean-up strength.** `MIN_NB` on `morph_clean`.
* If you change the Gaussian taps, update `gauss` in `edge_ref_pkg` as well. The
  end-to-end testbenches compare against the model.
