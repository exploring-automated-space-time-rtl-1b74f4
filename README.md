# A streaming OpenVX Sobel accelerator with tunable tile width

This is synthesizable SystemVerilog for a computer-vision pipeline built from
OpenVX kernels. It runs the classic Sobel edge-detection graph:

```
rgb ─► ColorConvert ─► Gaussian3x3 ─► Sobel3x3 ─┬─► Magnitude ─► mag   (S16)
                                                 └─► Phase     ─► phase (U8)
```

The architecture follows the paper *Exploring Automated Space/Time Tradeoffs
for OpenVX Compute Graphs* (Omidian and Lemieux). That paper describes a tool
which picks, for each node of an OpenVX graph, an implementation with a
different area and throughput. This RTL is one such pipeline. It is written
so that the same knobs stay open as parameters:

* **Tile width `W_T`**: the number of pixels a node takes and gives per
  stream beat.
* **Function width `W_F`**: the number of kernel lanes that actually
  compute.
* **Replica count `NR`**: the number of copies of a node that share the
  work in round-robin order.

The hard part is keeping the pixel streams lined up when those three differ.
Most of this text covers that.

## 1. Node anatomy: stream width vs. function width

Every node has the same structure. There are four FIFO layers, two *stream
data adjusters* (SDAs) and `W_F` copies of the kernel function:

```
 s ─► FIFO ─► input SDA ─► FIFO ─► W_F kernel lanes ─► FIFO ─► output SDA ─► FIFO ─► m
   W_T px/beat   split into N = W_T/W_F groups              join N groups into a beat
```

The input SDA cuts each `W_T`-pixel beat into `N = W_T/W_F` groups. It sends
one group per cycle to the lanes. The output SDA collects `N` result groups
back into one beat, first group in the low lanes. A node therefore moves one
beat every `N` cycles: `W_F` pixels per clock. At the defaults (`W_T=4`,
`W_F=2`) that is 4 pixels every 2 cycles.

The FIFO layers decouple stages that run at different rates. Every link uses
valid/ready back-pressure, so nothing is ever dropped, whatever the FIFO
depth (`FIFO_DEPTH`, default 4). Each layer adds one cycle of latency.

Two node types exist:

* **`p2p_node`: Pixel2Pixel kernels** (ColorConvert, Magnitude, Phase). Each
  output pixel depends only on the input pixel at the same place. The groups
  do not overlap (`sda_split` with `OVERLAP=0`).
* **`w2p_node`: Window2Pixel kernels** (Gaussian3x3, Sobel3x3). Each output
  pixel depends on the 3x3 window around it.

### Window2Pixel: overlap and line buffers

A 3x3 kernel producing `W_T` outputs of one row needs `W_T+2` input columns,
each three pixels tall. `window_former` builds these columns. The input SDA
(`sda_split` with `OVERLAP=2` and 24-bit columns) then cuts them into `N`
groups of `W_F+2` columns. Neighbouring groups share two columns. Lane `l` of
a group uses columns `l..l+2`.

At `W_T=4`, `W_F=2` a firing takes 6 columns. It sends two groups of 4
columns, which overlap by 2, and produces 4 pixels.

`window_former` works in two stages:

1. **Vertical stage.** Two line buffers hold the previous two image rows,
   each stored as `IMG_W/W_T` words of `W_T` pixels.
   * A beat of input row `r` is stacked with the words of rows `r-1` and
     `r-2`. The result is the column beat of output row `r-1`.
   * Row 0 only fills the buffers.
   * After the last row, one more row is generated from the buffers alone,
     with the last row repeated below it.
   * In output row 0 the top pixel repeats the middle one.
2. **Horizontal stage.** This stage holds the current column beat and the
   last column of the previous beat.
   * A column beat leaves together with the first column of the next beat.
   * The last beat of a row cannot wait for a next beat, so it leaves alone
     one cycle later, with its last column repeated.

So borders are **replicated** on all four sides, and an `IMG_H x IMG_W`
frame in gives an `IMG_H x IMG_W` frame out. Output row `r` appears once
input row `r+1` (or the end of the frame) has arrived. Each window node
costs one extra cycle per row and one extra row per frame on top of the
nominal rate.

The line buffers are `2 x IMG_W x 8` bits per window node: 10,240 bits at
640 pixels. They are plain arrays that a synthesis tool can map to block
RAM.

## 2. Replication

`p2p_replicated` wraps `NR` copies of a `p2p_node`:

* `rr_split` deals whole beats to the copies in turn.
* `rr_join` reads the results back in the same turn, so pixel order is kept.

Two replicas of a `W_T=4, W_F=2` node move one beat per cycle instead of one
every two. A stream cannot carry more than one beat per cycle, so `NR` above
`W_T/W_F` adds nothing.

In the top, the Phase node is built with `NR_PHASE=2` replicas.
Phase is the largest kernel: about 200 word-level cells per lane for the
CORDIC (see below). Replicating it shows the mechanism; the rate of the
whole pipeline is still set by the other nodes.

Only Pixel2Pixel nodes are replicated here. For window kernels, widening
`W_T`/`W_F` gives the same effect, with the overlap handled by the input SDA.

## 3. Data alignment networks

The DMA side uses power-of-two words (`DMA_W`, default 64 bits). A node beat
is `W_T` pixels of the kernel's pixel size. For example, 4 RGB888 pixels are
96 bits.

`mixed_width_fifo` converts between any two widths:

* It is a bit accumulator of `2*(IN_W+OUT_W)` bits with a fill count.
* Input words are appended above the bits already held. The first data sits
  in the least significant bits.
* An output word leaves as soon as `OUT_W` bits are present.
* It accepts input whenever a whole word fits, so `s_ready` does not depend
  on `m_ready`.

The top uses three of these:

| Instance | Conversion |
|---|---|
| RGB input | 64 → 96 bits |
| Magnitude output | 64 → 64 bits (4 x S16) |
| Phase output | 32 → 64 bits (8 x U8) |

## 4. The top: `ovx_sobel_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `s_axis_tvalid/tready/tdata` | in | `DMA_W` | RGB888 pixels in raster order, packed with no gaps, first pixel in bits 23:0, R in the low byte |
| `m_axis_mag_tvalid/tready/tdata/tlast` | out | `DMA_W` | S16 magnitudes, 4 per word, first pixel low; `tlast` on a frame's last word |
| `m_axis_phase_tvalid/tready/tdata/tlast` | out | `DMA_W` | U8 phases, 8 per word; `tlast` as above |

All handshakes follow the AXI-Stream rule: a word moves in a cycle where
valid and ready are both high, and an offered word is held until taken. The
FIFOs check this rule on their inputs, and the window former on its output,
with concurrent assertions.

Frames follow one another with no gaps and no `tlast` on the input. Position
in the image comes from counters, so every frame must have exactly
`IMG_W x IMG_H` pixels.

The gradient pair `{grady, gradx}` (32 bits per pixel) feeds both Magnitude
and Phase through `stream_fork`. Each branch takes the beat when it can, and
the source beat is released once both branches have it.

| Parameter | Default | Meaning |
|---|---|---|
| `W_T` | 4 | pixels per beat at every node boundary |
| `W_F` | 2 | kernel lanes per node (`W_T` must be a multiple) |
| `IMG_W`, `IMG_H` | 640, 480 | frame size; `IMG_W` a multiple of `W_T`, `IMG_H` ≥ 2 |
| `DMA_W` | 64 | DMA word width; a frame must be a whole number of words on every stream |
| `FIFO_DEPTH` | 4 | depth of each node FIFO layer |
| `NR_PHASE` | 2 | Phase node replicas |

**Throughput and latency.** The pipeline sustains `W_F` pixels per clock. A
640x480 frame with no stalls takes 154,749 cycles from the first input word
to the last output word. The ideal is 153,600; the rest is the row and frame
overhead of the two window nodes plus fill latency. Output lags input by
about two image rows, one row for each window node.

**Size** (coarse synthesis at the defaults): about 2,000 word-level cells,
1,600 flip-flop bits and 26 kbit of memory. The memory is mostly the four
line buffers.

## 5. Kernel arithmetic

The OpenVX specification defines each kernel; the formulas chosen here are:

| Kernel | Module | Arithmetic |
|---|---|---|
| ColorConvert | `color_convert_core` | `Y = (54R + 183G + 19B + 128) >> 8` (BT.709 luma weights scaled to 256) |
| Gaussian3x3 | `gaussian3x3_core` | `[1 2 1; 2 4 2; 1 2 1] / 16`, truncated |
| Sobel3x3 | `sobel3x3_core` | `gx = [-1 0 1; -2 0 2; -1 0 1]`, `gy = [-1 -2 -1; 0 0 0; 1 2 1]`, S16 |
| Magnitude | `magnitude_core` | `round(sqrt(gx²+gy²))`, saturated to 32767. Uses a restoring integer square root of `4(gx²+gy²)`; adding 1 and halving rounds to nearest |
| Phase | `phase_core` | `atan2(gy,gx)` as 256 steps per turn (0 = +x, counter-clockwise), `(0,0) → 0`. Uses a ±90° quadrant pre-rotation, then 14 unrolled CORDIC steps with 8 fraction bits |

All cores are combinational, one pixel per lane.

The Phase result is within one step of the exactly rounded angle, and exact
for more than 99% of inputs. In a 640x480 random frame, 0.9% of phases were
one step off.

## 6. Files

`rtl/` holds one module or package per file:

| File | What it is |
|---|---|
| `ovx_pkg` | pixel widths, gradient types, the kernel enum |
| `stream_fifo` | the FIFO layers |
| `mixed_width_fifo` | the data alignment networks |
| `sda_split`, `sda_join` | the stream data adjusters |
| `window_former` | the line buffers |
| `*_core` | the kernel functions |
| `p2p_node`, `w2p_node`, `p2p_replicated` | the nodes |
| `rr_split`, `rr_join`, `stream_fork` | stream plumbing |
| `ovx_sobel_top` | the top |

`tb/` holds a self-checking testbench, `tb_<module>.sv`, for every module except the stream plumbing, which the node and top tests exercise. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog. Helpers:

* `ovx_ref_pkg`: a whole-image reference model of the graph.
* `mwf_case`, `sda_split_case`, `p2p_case`, `w2p_case`: parameterized sub-tests.

The testbenches cover:

* **Kernel cores:** 20,000 random and corner inputs each against real-number
  references.
* **Stream blocks:** random stalls on both sides with scoreboards, plus
  full-rate bursts that check the cycle counts:
  * one group per cycle through the SDAs;
  * one beat per two cycles through a node;
  * one beat per cycle with two replicas;
  * the row and frame overhead of the window former.
* **`tb_ovx_sobel_top`** runs three 32x16 frames through the whole design:
  random stalls, then heavy Phase back-pressure, then full rate. It checks
  every magnitude (exact), phase (±1), `tlast` and the full-rate cycle
  count. It fails if any of these mechanisms never occurs:
  * input stalls;
  * width conversion;
  * SDA groups;
  * row-end and frame-end window beats;
  * the fork waiting on one branch;
  * both Phase replicas;
  * output back-pressure.
* **`tb_ovx_sobel_top_wide`** runs the same three-frame test at `W_T = W_F = 8`
  with 256-bit DMA words. Every node then moves one beat per cycle: 8 pixels
  per clock, less one cycle per row in each window node.
* **`tb_ovx_sobel_top_full`** runs one 640x480 frame with the top at its
  default parameters, with random stalls. It simulates in a few seconds.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ovx_sobel_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/ovx_pkg.sv tb/ovx_ref_pkg.sv tb/tb_ovx_sobel_top.sv
./obj_dir/Vtb_ovx_sobel_top
```

Lint with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/ovx_pkg.sv
rtl/ovx_sobel_top.sv`. One `UNUSEDSIGNAL` warning remains: the Sobel
operators do not use the centre pixel of the window.

## 7. Where this departs from the source description, and what is missing

**Choices the source leaves open.** The paper gives the node structure, the
SDA behaviour and the worked example `W_T=4, W_F=2`. These were chosen here:

* image size;
* DMA width;
* FIFO depth;
* border handling (replicated);
* the exact kernel formulas, rounding and phase method;
* bit packing on the streams;
* the reset style;
* the Phase replica count.

**Line buffer size.** The paper states a minimum line-buffer depth of
`2N+1` pixels for a window node: 5 at `W_T=4, W_F=2`. That figure covers the
horizontal overlap inside a row. Here the horizontal overlap is held in
registers, and the line buffers store two full image rows. A 3x3 window over
a raster stream needs those two rows.

**Window2Pixel replication and node combining.** The paper describes
replicating window kernels with overlapped data to widen the tile, and
merging two nodes before replicating them. These are not separate blocks
here:

* widening `W_T` and `W_F` of a `w2p_node` gives the same overlapped-data
  arrangement;
* merging nodes is a matter of wiring existing nodes together.

**The design tool is not included.** It is software: the
implementation generator, the ILP and heuristic trade-off finders, and the
area model. The host processor, the AXI DMA engine and main memory are also
outside; the top's three streams are where the DMA connects.

**Other benchmarks.** Canny and Harris need kernels that are not built here:

* Canny: non-maximum suppression and hysteresis thresholding.
* Harris: structure tensor, windowed sums and the corner score.

**Throughput above `W_F` pixels per clock.** Targets beyond 2 pixels/clock
need larger `W_T`/`W_F` and a wider DMA word. For example, `W_T = W_F = 8`
with 256-bit words, which `tb_ovx_sobel_top_wide` exercises, gives 8
pixels/clock. The defaults do not meet the paper's high-throughput points.
