# Parallel block-based Canny edge detector with histogram equalization

The classic Canny edge detector chooses its high and low hysteresis
thresholds from statistics of the whole frame. That means it cannot emit an
edge until it has seen the whole image, and a single pair of thresholds is a
poor fit for an image that has both flat and busy regions. This design cuts the
image into overlapping 64 x 64 blocks and treats each block as a small image
of its own:

1. The block's contrast is boosted by histogram equalization.
2. The block is classified as *smooth*, *texture*, *hybrid*, *medium* or
   *strong* from the local variance of its pixels.
3. Sobel gradients, their L1 magnitude and interpolated non-maximum
   suppression are computed.
4. The high threshold is picked so that a class-dependent fraction P1 of the
   block's pixels lies above it. The low threshold is 40 % of the high one.
5. Single-pass hysteresis gives the block's edge map.

Blocks do not depend on each other, so several computation engines can work
on different blocks at once. The latency of a block depends only on the block
size, not on the frame size.

The RTL is synthesizable SystemVerilog-2017. It simulates with plain
Verilator, and every unit has a self-checking testbench against an
independent software model.

## Top-level structure

```
 pixels ──► block_divider ──► engine_array ─────────────────────► block_merger ──► edge_flag
 (raster)   frame buffer,     round-robin dispatch to              keeps block
            overlapping       NUM_ENGINES computation_engines,     interiors, edge
            BLK x BLK blocks  in-order collection                  frame buffer
```

| module | role |
|---|---|
| `edge_detector` | top: image stream in, edge-flag stream out |
| `block_divider` | stores a frame and sends it as overlapping blocks |
| `engine_array` | `NUM_ENGINES` engines, round-robin dispatcher and collector |
| `computation_engine` | one block through all six units |
| `hist_equalizer` | per-block histogram, CDF, mapping table, equalized stream |
| `pixel_classifier`, `block_classifier` | two stages of block classification |
| `gradient_magnitude` | Sobel Gx, Gy and \|Gx\|+\|Gy\| |
| `nms_unit` | interpolated directional non-maximum suppression |
| `adaptive_threshold` | min/max, reconstruction levels, level counters, TH/TL |
| `hysteresis` | strong/weak decision and neighbour test |
| `window_buffer` | block memory with a 3x3 raster scanner (helper) |
| `seq_divider` | restoring divider (helper) |
| `canny_pkg` | widths, types, block-class enum, P1 table |

Every port is a valid/ready stream. A word moves in a clock where both valid
and ready are high. Reset is synchronous and active high.

### Top-level ports (`edge_detector`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous reset |
| `in_valid`, `in_ready`, `in_pixel` | in/out/in | 1/1/8 | grey pixels of a frame, raster order |
| `out_valid`, `out_ready`, `edge_flag` | out/in/out | 1/1/1 | edge image, raster order |
| `frame_done` | out | 1 | marks the last edge flag of a frame |

## Blocks and overlap

The block stride is `S = BLK - 2*OV`, which is 60 with the defaults. Block
`(ty, tx)` covers image rows `ty*S-OV … ty*S-OV+BLK-1`, and the same for
columns. Coordinates outside the image are clamped to the nearest image
pixel. A 512 x 512 frame becomes 9 x 9 = 81 blocks.

`block_merger` keeps only the inner `S x S` pixels of each edge map. It drops
the `OV`-pixel border and anything past the image edge. The interiors of all
blocks tile the image exactly.

Each engine also treats its own block border by edge replication: every 3x3
window at the block edge repeats the outermost pixels. With `OV = 2`, the
gradient and suppression windows of every pixel that is kept lie inside the
block. Equalization, classification and thresholds still use the whole block,
border included. That is the whole point of the design: each block carries its
own statistics.

## Inside a computation engine

An engine stores the block between its units and runs over it in passes, one
pixel per clock per pass. Each pass uses a `window_buffer`, which is a
`BLK x BLK` memory plus a raster scanner. The scanner reads one three-pixel
column per clock and shifts it into a 3x3 register window. A pass takes
`BLK*(BLK+2)+2` clocks: two clocks per row prime the columns.

| pass | reads | does | writes |
|---|---|---|---|
| LOAD (equalizer) | input stream | stores the block, builds the 256-bin histogram | equalizer buffer |
| CDF / MAP (equalizer) | histogram | cumulative sum, then one division per bin for the mapping table | 256-entry table |
| EQ | equalizer buffer | maps each pixel through the table | pixel window buffer |
| GRAD | 3x3 pixel windows | Sobel gradients and magnitude; pixel class; uniform/edge counters; min/max magnitude | gradient buffer (Gx, Gy, magnitude: 33 bits) |
| NMS | 3x3 magnitude windows | non-maximum suppression; level counters of the threshold unit | suppressed-magnitude buffer |
| THR | counters | picks TH, TL (2 clocks) | registers |
| HYST | 3x3 suppressed windows | edge bit per pixel, stalls with `out_ready` | output stream |

The equalizer has its own block buffer. It takes the next block while the
engine is still in GRAD, NMS or HYST, so an engine holds two blocks at once.

### Timing

These counts are exact and independent of the image content. Let
`N = BLK²` and `NUM_W = clog2(N+1) + 8`; at 64 x 64, `NUM_W` is 21.

* The equalizer's first output comes `256*(NUM_W+4) + 1` clocks after the last
  input pixel. The mapping runs one division per bin, even for bins whose
  result is known, so that this time is fixed.
* If the engine is idle when a block's input finishes, the first edge bit
  follows `256 + 256*(NUM_W+3) + N + 2*BLK*(BLK+2) + 17` clocks later.
  That is 6225 clocks at 16 x 16 and 18 961 clocks at 64 x 64.
* An engine's equalizer needs `N + 256*(NUM_W+4) + N` clocks per block
  (load, map, hand-over): 14 592 at 64 x 64. The engine itself needs the
  hand-over plus three window passes, about `N + 3*BLK*(BLK+2)`: 16 774 at
  64 x 64. The second number sets the rate, and the load and map of the next
  block hide under it. Four engines therefore take about 4 x 4096 pixels every
  16 800 clocks, just under one pixel per clock.
* In the full-size test, a 512 x 512 frame fed with about 3 % idle input clocks
  shows its first edge flag 636 090 clocks after its first pixel, and its last
  flag 963 793 clocks after it. This includes loading the frame buffer, the 81
  blocks of 4096 pixels, and sending the edge image.

`block_divider` takes no new frame while it is sending blocks, and
`block_merger` takes no block while it is sending the edge image. Frames are
therefore not overlapped with each other. Double-buffering either frame store
would change that.

## The units

### Histogram equalization (`hist_equalizer`)

The unit computes `cdf(n) = Σ_{j≤n} hist(j)` over the block. The mapping is
`H(n) = floor((cdf(n) - cdf_min) * 255 / (N - cdf_min))`, where `cdf_min` is
the smallest non-zero CDF value. One restoring divider serves all 256 bins.

* Bins below the darkest pixel map to 0.
* A block of a single grey level (`N = cdf_min`) passes through unchanged.
* The histogram is cleared during the CDF pass, ready for the next block.

### Block classification (`pixel_classifier`, `block_classifier`)

The local variance is `var = (1/8) Σ (x_i - mean)²` over the 3x3
neighbourhood. The 1/8 is kept as given, even though there are nine samples.
With `S = Σx` and `Q = Σx²`, this equals `(9Q - S²)/72`. The unit compares
the integer `9Q - S²` with `72·TU` and `72·TE` (TU = 100, TE = 900), so there
is no rounding at all:

* `var ≤ TU` is a uniform pixel.
* `TU < var ≤ TE` is a texture pixel.
* `var > TE` is an edge pixel.

With `Nu` uniform and `Ne` edge pixels out of `N`, the block class is:

| class | rule |
|---|---|
| smooth | `Ne = 0` and `Nu ≥ 307N/1024` |
| texture | `Ne = 0` and `Nu < 307N/1024` |
| medium | `0 < Ne < 307N/1024` and `Nu ≥ 665(N-Ne)/1024` |
| hybrid | `0 < Ne < 307N/1024` and `Nu < 665(N-Ne)/1024` |
| strong | `Ne ≥ 307N/1024` |

The fractions are compared exactly, by multiplying the counts by 1024. The
strong rule is often stated with a second condition, `Nu ≤ 716N/1024`. That
condition always holds once `Ne ≥ 307N/1024`, up to one pixel of rounding, so
it is not tested.

### Gradient and magnitude (`gradient_magnitude`)

The unit uses 3x3 Sobel masks:

* Gx is the right column minus the left column.
* Gy is the lower row minus the upper row.

Both fit in 11 signed bits. The magnitude is `|Gx| + |Gy|` (at most 2040, 11
bits).

### Non-maximum suppression (`nms_unit`)

The unit interpolates two magnitudes along the gradient direction, one on each
side of the pixel. When `|Gx| ≥ |Gy|`, it interpolates between the horizontal
neighbour and the diagonal neighbour with weight `|Gy|/|Gx|`. Otherwise it
swaps the roles of rows and columns. The pixel survives if its magnitude is at
least as large as both interpolated values.

Instead of dividing Gy by Gx, the unit multiplies both sides by the larger
component:

    M·|Gx| ≥ (|Gx|-|Gy|)·M_near + |Gy|·M_diag

The test is exact in integers: four 11x11 multiplications, plus two for the
centre. Ties keep the pixel, and a zero magnitude is always suppressed.

### Adaptive thresholds (`adaptive_threshold`)

This is the least standard part of the design.

* **Pass 1 (GRAD):** the unit tracks the minimum and maximum gradient
  magnitude of the block.
* **Pass 2 (NMS):** it forms `NL = 8` reconstruction levels of a non-uniform
  quantizer, `R1 = (min+max)/2` and `R(i+1) = (min+Ri)/2`. In integers this is
  exactly `Ri = min + ((max-min) >> i)`: shifters and adders. Each level has a
  comparator and counter for the pixels with magnitude `≤ Ri`. These counts
  form a discrete CDF that is dense near the small magnitudes.
* **Decision (2 clocks):** the target number of strong pixels is
  `round(P1·N)`. The chosen level is the one whose count of pixels *above* it
  is closest to that target; ties go to the higher level. Then `TH = Ri` and
  `TL = floor(0.4·TH)`.
* **Smooth blocks** have P1 = 0 and are meant to have no edges. They get
  `TH = max`, so no pixel can be strong.

P1 depends on block size and class. It is stored in `canny_pkg::p1_q16` as a
Q0.16 fraction:

| block | texture | hybrid | medium | strong |
|---|---|---|---|---|
| 8x8 | 0.0312 | 0.1022 | 0.2183 | 0.482 |
| 16x16 | 0.0307 | 0.1016 | 0.2616 | 0.483 |
| 32x32 | 0.0305 | 0.1117 | 0.2079 | 0.485 |
| 64x64 | 0.0318 | 0.1060 | 0.2218 | 0.467 |
| 128x128 | 0.0302 | 0.0933 | 0.2375 | 0.484 |
| 256x256 | 0.0299 | 0.0911 | 0.2304 | 0.489 |

A rounder set of values (0.03, 0.1, 0.2, 0.4) is sometimes quoted for the same
classes. This design uses the per-size table.

### Hysteresis (`hysteresis`)

* A pixel above TH is strong (`f1`), and is an edge.
* A pixel above TL but not above TH is weak (`f2`). It is an edge only if one
  of its eight neighbours is strong.
* Everything else is not an edge.

This is one pass over the neighbourhood, not iterative edge tracing. A chain of
weak pixels therefore reaches only one pixel away from a strong one.

## Parameters

| parameter | default | where | note |
|---|---|---|---|
| `IMG_W`, `IMG_H` | 512 | top, divider, merger | frame size |
| `BLK` | 64 | all block-level modules | block side, a power of two ≥ 8 |
| `OV` | 2 | top, divider, merger | overlap border per side |
| `NUM_ENGINES` | 4 | top, `engine_array` | parallel engines |
| `NL` | 8 | threshold unit | reconstruction levels |
| `TU`, `TE` | 100, 900 | pixel classifier | variance limits |

At the defaults, synthesis without memory inference reports about 3.4 Mbit of
memory:

* 2 Mbit for the frame buffer.
* About 250 kbit per engine: the equalizer buffer, the pixel buffer, the
  33-bit gradient buffer and the suppressed-magnitude buffer.
* 256 kbit for the edge frame.

The frame buffers make up most of it. A system that already holds the frame in
memory could feed `engine_array` directly.

## Where this design makes its own choices

The reference description leaves the following open. The choices made here
are:

* **Sizes:** 64 x 64 blocks, a 2-pixel overlap, four engines and eight
  reconstruction levels.
* **Buffering:** the multi-pass engine structure and all buffering.
* **Borders:** edge replication at block borders and image borders.
* **Mask:** the Sobel mask.
* **Rounding:** floor rounding in the equalization mapping and in `TL`.
* **Level selection:** "closest in the number of pixels above the level" as
  the selection rule, and `TH = max` for smooth blocks.
* **Weak pixels:** they must also be above TL.
* **Interface:** the stream handshake and port list.

The description's own top level has far fewer pins. It shows only a clock, a
reset and an edge flag, with pixels presumably coming from on-chip storage.

Not modelled: how frames reach the chip, and any video timing.

## Verification

`tb/canny_ref_pkg.sv` is a software model of the whole algorithm. It is
written from the algorithm, not from the RTL:

* Arrays are indexed directly with clamping.
* Equalization, variance and interpolation use real arithmetic.
* The levels use their recursive form.
* P1 values are reals.

It also makes the test patterns.

| testbench | checks |
|---|---|
| `tb_gradient_magnitude` | random and extreme windows against mask tables |
| `tb_pixel_classifier` | random windows, windows exactly at var = 100 and 900 |
| `tb_block_classifier` | chosen counts at every class boundary, random counts |
| `tb_nms_unit` | all octants, axes, diagonals, ridges, ties |
| `tb_hysteresis` | strong, linked weak and isolated weak pixels, values at TH and TL |
| `tb_adaptive_threshold` | random, sparse, image-derived and flat magnitude sets for every class; done timing |
| `tb_hist_equalizer` | six blocks incl. constant and two-level; stalls; exact latency |
| `tb_computation_engine` | ten 16x16 blocks back to back, all five classes, stalls, exact latency |
| `tb_engine_array`, `tb_engine_array_full` | 16x16 and 64x64 blocks through four engines; parallelism, dispatcher wrap, input back-pressure, output stalls |
| `tb_block_divider`, `tb_block_merger` | block coordinates, clamping, overlap dropping, flags |
| `tb_edge_detector` | two 40x84 frames, 16x16 blocks, bit-exact edge image |
| `tb_edge_detector_full` | one 512x512 frame with every parameter at its default (81 blocks), bit-exact edge image |
| `tb_workload_sizes` | the other evaluated image sizes at 64x64 blocks: one 256x256 frame (25 blocks) and two 32x32 frames (one block, border repeated), each through its own top-level instance built for that size; uses the helper `image_run` |

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. To run one with Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/canny_pkg.sv tb/canny_ref_pkg.sv tb/tb_edge_detector_full.sv \
    --top-module tb_edge_detector_full -o sim
./obj_dir/sim
```

The full-size run takes a few seconds. Lint with
`verilator --lint-only -Wall -Irtl rtl/canny_pkg.sv rtl/<module>.sv --top-module <module> -y rtl`.
The remaining lint warnings are unused status outputs only.
