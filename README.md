# Stereo vision pipeline: per-camera pre-processing and three parallel disparity metrics

Two cameras look at the same scene from side by side. To recover depth, every
small patch of the left image has to be found again in the right image, on
the same line, a few pixels further left; that shift (the disparity) gives the
distance (z = T·f / disparity, with T the camera spacing and f the focal
length). This RTL does that work as a set of streaming pipelines that take one
pixel per clock and never stall:

* each camera has its own **pre-processing unit** (gray conversion, median
  filter, Sobel edge magnitude, threshold, morphology), and the two units run
  side by side;
* both results go into an external SDRAM;
* the **disparity unit** reads both images back and, for every searched 3x3
  window of the left image and every candidate disparity d = 0..39, computes
  three similarity measures at once on the same pair of windows: sum of
  absolute differences (SAD), sum of squared differences (SSD) and
  cross-correlation.

The default size is 800x480 pixels, 8-bit gray, with a 40-pixel search range.

```
camera L ─► image_acquisition ─► preprocessing_unit ─┐              ┌─► SAD  ─►
camera R ─► image_acquisition ─► preprocessing_unit ─┤  disparity   ├─► SSD  ─►
                                                     │  unit        └─► corr ─►
                                   external SDRAM ◄──┴── memory_controller
                                   (2 write, 2 read ports)   ▲   │
                                                             └───┴─► 2 x neighborhood_loader
```

## The stream convention

Every pixel moves with two side-band flags, `valid` and `sof` (start of
frame); `stereo_pkg` defines them as `sb_t`. There is no handshake: every
stage registers its word each clock. A frame has to come in with its pixels
**back to back**: no blanking between lines. The reason is that window
building counts clocks, not pixels (see below). The camera bus may have
blanking between frames. It may also have blanking between lines at the
acquisition input, but the rest of the chain then sees those gaps, so a
camera feeding this design should deliver whole lines without gaps.

Because every stage runs every clock, the latencies simply add up. The
latencies (in clock cycles) are:

| stage | latency |
|---|---|
| `image_acquisition` | 6 |
| `rgb2gray` | 2 |
| `neighborhood_loader` (each) | 2W+3 = 1603 |
| `median_filter` | 9 |
| `conv3x3` (two in parallel) | 2 |
| `absolute_sum` | 1 |
| `threshold` | 0 (combinational) |
| `gray_dilation` → `gray_erosion` | 9 + 9 |
| **pre-processing total** | **6W+47 = 4847** |
| `sad_metric` / `correlation_metric` | 2 |
| `ssd_metric` | 18 |

An 800x480 frame therefore leaves a pre-processing unit 384,000 + 4,847 =
388,847 cycles after its first pixel went in. That is about 139 frames/s at a
54 MHz pixel clock.

## Windows: `neighborhood_loader`

Every 3x3 operation takes its window from a `neighborhood_loader`. It holds
two line buffers of W words each, as arrays addressed by one circular
pointer. At the pointer it reads the pixel that is one line old and the one
that is two lines old, and writes the new pixel and the one-line-old pixel
back in their place. These three taps are shifted into three 3-deep column
registers, and those registers are the window.

The window convention used everywhere: `win[r*3+c]` is row `r` (0 = oldest
line) and column `c` (0 = leftmost). The output window is labelled by its
**top-left** pixel, and it leaves 2W+3 cycles after that pixel entered. The
side-band of the top-left pixel travels with it. So each window stage moves
the image one pixel up and to the left. Output pixel *i* of a frame is the
result for the window whose top-left is input pixel *i*.

There is no border handling. Windows at the right end of a line continue into
the start of the next line. Windows below the last line see whatever follows
the frame, which is zeros when the stream is idle. The pre-processing unit
forces the data of invalid words to zero before each loader, so a frame's
result depends only on that frame. This holds as long as the stream stays
idle for 6W+47 clocks after the frame, or the next frame follows directly.
The line buffers are not reset. Until a buffer has been written all the way
round once, the side-band read from it is forced to zero, so no valid flag
can appear out of uninitialised memory.

## Rank filters: one sorting network for median, dilation and erosion

`sort9_pipe` is a 9-stage odd-even transposition network. Stage *k*
compare-exchanges the pairs (0,1),(2,3),… when *k* is even and (1,2),(3,4),…
when *k* is odd, and nine such stages sort nine values. With one register per
stage, each filter has a latency of 9 cycles:

* `median_filter` takes element 4;
* `gray_dilation` takes element 8 (the maximum: a flat 3x3 structuring element);
* `gray_erosion` takes element 0 (the minimum).

**Dilation and erosion share one window.** The morphology stage has a single
loader, which feeds the dilation block. The dilation block passes its input
window on, 9 cycles later, to the erosion block. Erosion therefore works on
the thresholded image, not on the dilated one, so this is not a morphological
closing: a closing would need a second loader, and 2W+3 more cycles, between
the two blocks. The input `morph_sel` selects which result leaves the unit.
The dilated pixel is delayed so that both choices have the same 18-cycle
latency.

## Edge stage

`conv3x3` multiplies the window by a mask given as a parameter (`K[r*3+c]`,
signed integers). It registers the nine products, then their sum. The
pre-processing unit runs two of them on the same window:

```
horizontal  -1 -2 -1      vertical  -1  0  1
             0  0  0                -2  0  2
             1  2  1                -1  0  1
```

`absolute_sum` gives |gx| + |gy| at full width (13 bits, no saturation).
`threshold` compares that against the run-time input `thr_level` and outputs
255 where magnitude ≥ level, and 0 elsewhere. So the morphology stage works on
a binary image coded as 0/255.

## The disparity search

This is the part that differs most from a textbook description.

**Store.** The `memory_controller` writes each pre-processed image through
its own SDRAM write port. A frame starts at the pixel flagged `sof`. Pixel
(x, y) goes to word address y·W + x. When both images are complete, the
search starts. A frame that begins during a search, or after its image is
already stored, is **dropped** and counted in `frames_dropped`. There is no
double buffering.

**Search order: one raster pass per disparity.** The loaders can only slide
along a stream, so the controller does not jump around the image. It replays
both images D times. In pass *d* it reads left pixel (x, y) through read
port 0, and right pixel (x−d, y) through read port 1. Where x < d it sends
zero instead, without reading. The two streams then go through two identical
loaders. The window whose top-left is left (x, y) therefore meets the right
window whose top-left is (x−d, y), in the same clock. The passes follow each
other without a gap. After the last one, the controller waits 2W+24 clocks
for the pipelines to drain, pulses `scan_done`, and goes back to storing.
One search takes D·W·H + 2W+25 clocks: 15,361,625 at the defaults.

**Three-line bands.** Only windows whose top row is a multiple of 3, and
which lie wholly inside the image height, produce results. The image is thus
searched in non-overlapping bands of three lines: 160 bands × 800 windows ×
40 disparities = 5,120,000 results per metric per search. The controller
marks these windows with a band bit in the tag, and the metric outputs are
valid only for them. During a search each metric output is therefore valid
in about one clock out of three: a whole line out of every three, and no
output on the other two lines.

**The metric blocks** all receive the same window pair in the same clock:

* `sad_metric`: Σ|L−R|. Nine absolute differences, then their sum: 2 cycles, 12 bits.
* `correlation_metric`: Σ L·R. Nine products, then their sum: 2 cycles, 20 bits. It is not normalised.
* `ssd_metric`: Σ(L−R)², 18 cycles, 20 bits, built as follows:
  * 1 stage of absolute difference;
  * 8 stages of shift-add squaring, one bit of the operand per stage;
  * a 4-stage adder tree;
  * 5 output registers, which bring the latency to 18.

Each result carries the x, y and d of its window pair (`sad_x/y/d` and so on).
For SAD and SSD a smaller value is a better match; for correlation a larger
one is. The three outputs of one window pair do not appear in the same clock:
SSD comes 16 clocks after the other two. The results come out in the order
d, then y, then x. **Choosing the best d per window is not done here.** That
needs either a one-line buffer of best scores per band or a reordered search,
and it belongs downstream of these outputs.

## The SDRAM interface

The top module exposes the external memory as two write ports
(`mem_we/waddr/wdata[k]`) and two read ports (`mem_re/raddr[k]` out,
`mem_rdata[k]` in), where port pair k holds image k (0 = left, 1 = right).
Read data must arrive **one clock after the request**. Each image needs W·H
bytes, which is 384,000 at the defaults. A real SDRAM with bursts, refresh
and its own clock needs a controller that turns this into that behaviour.
Such a controller is not included. `tb/sdram_model.sv` is the behavioural
model used in simulation.

## Top-level ports (`stereo_vision_top`)

| group | ports |
|---|---|
| cameras | `cam_l_fval/lval/rgb`, `cam_r_fval/lval/rgb`: frame valid, line valid and 24-bit RGB, in the system clock domain. A frame is taken only from a rising edge of frame valid, so a frame already running when reset ends is skipped. |
| settings | `thr_level` (13 bits), `morph_sel` (`MORPH_DILATE` / `MORPH_ERODE`) |
| memory | `mem_*`, see above |
| results | `sad_valid/val/x/y/d`, `ssd_…`, `corr_…` |
| status | `frame_start_l/r`, `busy`, `scan_done`, `frames_dropped` |

The parameters are `W` (800), `H` (480) and `D` (40). Every module has a
header comment that gives its interface and timing.

## Where this design makes its own choices

These points are not fixed by the system description this design follows,
and were chosen here:

* the camera bus format (RGB 8:8:8 with frame and line valid);
* the gray weights, Y = (77R + 150G + 29B) >> 8;
* the median, dilation and erosion built on a sorting network;
* the flat structuring element;
* the threshold coding (0/255, with `>=`);
* the border behaviour;
* the search order (one pass per disparity);
* the exact band rule;
* the frame-drop policy;
* the one-cycle memory read;
* the unnormalised correlation;
* the internal structure of the SSD pipeline.

The system description names both convolution masks as Sobel operators, and
the masks above are the standard Sobel pair. The latencies of every block
(6, 2, 1603, 9, 2, 1, 9, 9; 2, 18, 2) follow that description exactly. So
does the order of the pre-processing chain.

Not included:

* the cameras, both SDRAMs and the LCD, which are external parts;
* the best-match selection;
* the display path;
* any conversion of disparity to depth.

The throughput at a given clock follows from the search order above, so it is
D·W·H clocks per image pair: 15.3 searches/s with a 235 MHz clock. A search schedule
that searched fewer windows per line would be faster.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops on its own, or by a watchdog. They
use only Verilator's two-state simulation, and they compare against software
models in `tb/tb_ref_pkg.sv`, which are written from the definitions and not
from the RTL.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/stereo_pkg.sv tb/tb_ref_pkg.sv tb/tb_stereo_vision_top.sv \
  --top-module tb_stereo_vision_top && ./obj_dir/Vtb_stereo_vision_top
```

(`-Wno-fatal` keeps the width warnings of the testbench code from stopping the build.)

* One testbench per block (`tb/tb_<module>.sv`) checks each output against
  the model, including the exact latency.
* `tb_preprocessing_unit` runs two 12x8 frames through the whole chain, once
  with erosion selected and once with dilation.
* `tb_memory_controller` and `tb_disparity_unit` check every pixel pair,
  every tag and every metric value of a search. They also check that a frame
  sent during a search is dropped.
* `tb_stereo_vision_top` runs the whole design at 16x9 pixels with D = 4. It
  makes two searches and checks every stored pixel and every result. It
  checks the clock count from a frame's first pixel to its last stored pixel
  (W·H + 6W+47) and from the start of a search to `scan_done`. It also
  counts the mechanisms listed below, and fails if any of them never happened:
  * a frame skipped at reset;
  * erosion and dilation;
  * both threshold levels;
  * dropped frames;
  * zero fill for x < d;
  * rows outside bands;
  * completed searches.
* `tb_stereo_vision_full` runs the design at its default parameters. It makes
  one complete 800x480 search with D = 40: 15.4 million clocks and 15.36
  million checked results. It takes well under a minute in Verilator.

The scene in the end-to-end tests is a blocky random image. The right camera
sees it moved two columns, so the disparity of the scene is 2.
