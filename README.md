# Streaming HoG descriptor engine

This is synthesizable SystemVerilog for a histogram-of-oriented-gradients (HoG)
feature extractor. It works on a region of interest 256 pixels wide that some
earlier stage, such as a motion detector or a coarse detector, has cut out of a
frame. Pixels enter one per clock in raster order. For **every** pixel position
the engine gives the complete unnormalized descriptor of a 128 x 64 detection
window: 16 x 8 cells of 8 x 8 pixels, each a 9-bin orientation histogram, so
1152 values. Nothing is computed twice. Each cell histogram is built once, and
a set of delay lines then holds the 128 histograms of the current window side
by side.

Three simplifications of the classic Dalal-Triggs algorithm keep the datapath
small:

* **Magnitude without a square root**: `m ~ max(0.875a + 0.5b, a)`, where
  `a` and `b` are the larger and smaller of `|gx|` and `|gy|`.
* **Orientation without atan2**: the angle is placed among 18 ten-degree
  sectors by constant multiplications and sign tests.
* **Voting without interpolation**: a pixel gives one vote to each of the two
  nearest bins, or a double vote to one bin when it is within 5 degrees of
  that bin's centre.

There is no block normalization. The consumer, typically a classifier,
receives the raw cell histograms.

## Data flow

```
in_pix ─► window3x3 ─► gradient_xy ─┬─► grad_magnitude ─┬─► vote_weighting ─► window8x8 ─► 9 x adder_tree ─► cell_hist
 (8 bit)  2 line bufs   gx, gy      └─► grad_direction ─┘   9 x 10-bit votes   7 line bufs   64 -> 1, 6 levels   (9 x 16 bit)
                                                                                                                   │
                                              ┌────────────────────────────────────────────────────────────────────┘
                                              ▼
                                   window_preparer (127 line buffers, 128 taps)
                                     every 8th tap: lines 7, 15, ..., 127
                                              │ each used tap
                                              ▼
                                   row_delay = register + 7 x cell_delay (8 ticks each)
                                              │
                                              ▼
                                   grid[16][8] of cell histograms
```

| module | what it does | latency |
|---|---|---|
| `window3x3` | 3x3 pixel window from two RAM line buffers and registers | 1 |
| `gradient_xy` | `gx = right - left`, `gy = bottom - top` | 1 |
| `grad_magnitude` | `max((7a + 4b) >> 3, a)` | 1 |
| `grad_direction` | sector count 0..18 | 1 (parallel with the magnitude) |
| `vote_weighting` | 9-bin vote vector | 1 |
| `window8x8` | 8x8 window of vote vectors, seven RAM line buffers | 1 |
| `adder_tree` (x9) | pipelined 64-input sum, one register per level | 6 |
| `cell_descriptor` | all of the above | 11 |
| `window_preparer` | 128-line column of cell histograms, one tap per line | 1 |
| `row_delay` | one grid row: 8 columns, 8 ticks apart | 1 |
| `cell_delay` | 8-tick shift register of one cell histogram | – |
| `hog_grid` | window preparer plus 16 row delays on every 8th tap | 2 |
| `hog_top` | `cell_descriptor` followed by `hog_grid` | 13 |

Shared widths and types are in `hog_pkg`. `ram_delay` is the line buffer, a
circular RAM delay line used by all the window blocks.

## Orientation: sectors instead of angles

This is the least obvious part of the design. Each bin is 20 degrees wide, and
bin `k` is centred at `20k + 10` degrees. A pixel whose angle lies within
±5 degrees of a bin centre gives that bin a double vote. Any other pixel gives
one vote to each of the two neighbouring centres. So what matters is which of
the 18 intervals cut at 5, 15, 25, ..., 175 degrees holds the angle.

`grad_direction` finds that interval without ever computing the angle:

1. Fold the vector into the upper half plane by negating both components when
   `gy < 0`, or when `gy == 0` and `gx < 0`. The angle then lies in
   [0, 180), which is the unsigned orientation.
2. For every boundary `phi_j = 5 + 10j`, test
   `gy*cos(phi_j) - gx*sin(phi_j) >= 0`. That expression equals
   `r*sin(theta - phi_j)`, so the test is true exactly when `theta >= phi_j`.
   All 18 tests run in parallel, using Q1.14 constants from `hog_pkg`
   (`BOUND_COS`, `BOUND_SIN`, each equal to `round(2^14 * cos or sin(phi_j))`).
3. The number of boundaries passed, `sector`, is a thermometer count from 0 to
   18.

`vote_weighting` then decodes the sector count:

| sector | angle | votes |
|---|---|---|
| 0 or 18 | below 5 or from 175 degrees | `mag` to bin 8 and `mag` to bin 0 (the 180-degree wrap) |
| 2k+1 | 20k+5 .. 20k+15 | `2*mag` to bin k |
| 2k+2 | 20k+15 .. 20k+25 | `mag` to bins k and k+1 |

Every pixel therefore adds `2*mag` to its cell. A zero vector falls in sector
18, but its votes are zero.

The constants are rounded, so an angle that lies within about 0.016
gradient units of a boundary may fall on either side. The 45 and 135 degree
boundaries are exact, because there the cosine and sine constants are equal.

## Sliding windows and stream timing

The interface is a single `in_valid` strobe, with no back-pressure. Each
accepted pixel moves every window in the design one step along the raster,
and `in_valid` may drop for any number of cycles. Stages after a window are
free-running pipelines that carry their own valid bit. Each accepted pixel
`p[k]` therefore produces exactly one `cell_valid`, 11 cycles later, and one
`grid_valid`, 13 cycles later. Without gaps the engine takes one pixel per
clock, so a 256 x 256 region takes 65,536 cycles. That is 0.22 ms at 300 MHz.

The windows are pure raster windows with no border handling. Both the 3x3 and
the 8x8 window wrap across line ends. Indexing the input stream as `p[k]`, the
outputs after pixel `p[k]` are:

* `cell_hist`: the cell made of the gradients centred at
  `p[k - IMG_W - 1 - r*IMG_W - c]`, for `r, c = 0..7`.
* `grid[r][c]`: the `cell_hist` that followed pixel
  `k - (15-r)*8*IMG_W - (7-c)*8`. Row 0 is the top of the detection window
  and column 0 its left edge.

A grid output is meaningful only when the whole 128 x 64 window, plus the
one-pixel gradient border, lies inside the region. Counting from 0, the column of the
newest pixel must be at least 65, and its line at least 129. Outputs for other
positions mix pixels from line ends, or from the previous region. The user
must track the position of each pixel and discard those outputs.

Line buffers are RAMs without reset. Until enough lines have passed, their
outputs are arbitrary. That is 2 lines for the pixel window, 9 lines for a
cell, and 129 lines for the grid. Reset (`rst_n`, asynchronous, active low)
clears only the valid flags and the RAM pointers.

Line-buffer chaining uses one detail. The first buffer of a column takes the
raw input and is `IMG_W` deep. Each later buffer takes the registered output
of the buffer before it, which is already one sample late, so it is
`IMG_W - 1` deep. The window preparer chains its 127 line buffers by the
same rule.

## Widths

| quantity | width | range |
|---|---|---|
| pixel | 8 | 0..255 |
| `gx`, `gy` | 9 signed | -255..255 |
| magnitude | 9 | 0..350 |
| one vote | 10 | 0..700 |
| histogram bin | 16 | 0..44,800 (64 double votes) |

The grid output carries 16 x 8 x 9 x 16 = 18,432 bits.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `IMG_W` | 256 | region width, i.e. line-buffer depth |
| `CELL` | 8 | cell size in pixels. The 9-bin, 16-bit types in `hog_pkg` are sized for 8 x 8 cells |
| `WIN_LINES` | 128 | detection window height in lines (must be a multiple of `CELL`) |
| `GRID_COLS` | 8 | detection window width in cells (64 pixels) |

The grid scales with only a change of parameters. Storage grows as
about `(WIN_LINES - 1) * IMG_W` cell histograms of 144 bits. At the
defaults that is 4.7 Mbit, by far the largest part of the design.

## How it relates to the published architecture

The following come from the published architecture:

* the stage order of the cell pipeline;
* the magnitude formula;
* the vote rule, including the double vote within ±5 degrees;
* nine separate 64-input adder trees;
* the 128-line window constructor feeding 16 chains of cell delays, with 8
  cells of 8 ticks (64 ticks) per row;
* the 256-pixel region, the 128 x 64 window, and the one-pixel-per-clock rate.

The following are choices made in this design:

* **Widths.** All the bit widths above. The 16-bit bins agree with the size of
  the published window constructor's output register.
* **Direction circuit.** The way the sector is found, and the Q1.14 precision
  of its constants.
* **Vote value.** Each single vote is worth `mag`, and a double vote `2*mag`.
* **Interface and timing.** The valid-strobe interface, the register placement
  and so the latencies, and the reset behaviour.
* **Gradient sign.** `gy` is bottom minus top. With unsigned orientations this
  only mirrors the angles.
* **Borders.** Windows wrap across line ends with no border treatment.
* **Output order.** The grid is indexed with row 0 at the top.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The shared reference model,
`tb/hog_ref_pkg.sv`, uses real arithmetic: `$atan2` for the angle, the
magnitude formula evaluated in floating point, and plain sums over the cell.
When a vector lies within rounding distance of a sector boundary, the model
skips the check for that pixel's cells.

```
# the whole engine at reduced size; packages first, then the modules
verilator --binary --timing --assert -Irtl -Itb \
    rtl/hog_pkg.sv tb/hog_ref_pkg.sv $(ls rtl/*.sv | grep -v hog_pkg) \
    tb/tb_hog_top.sv --top-module tb_hog_top
./obj_dir/Vtb_hog_top
```

Any other testbench runs the same way with its own file and top module name.

* **`tb_hog_top`** runs a 24-pixel-wide region with a 2 x 2-cell window
  through the whole engine, with random idle cycles. It checks every cell
  histogram, every filled grid and both latencies. It also counts that stalls,
  double votes, split votes and wrapped split votes all occurred.
* **`tb_hog_top_full`** runs the engine at its default parameters on one full
  256 x 256 region, in about 15 s with Verilator. It checks every cell histogram
  and every seventh filled grid (all 1152 bins), and reports the cycle count.
* **`tb_hog_regions`** streams 16 regions back to back at full size. This is
  the multi-region case the throughput figures are quoted for. It checks that
  the cycle count is 16 x 65,536 plus the pipeline latency, and spot-checks
  the descriptors.
* The remaining testbenches exercise one module each. Windows and delays are
  run at a reduced `IMG_W` so that their line buffers fill quickly.

## Limits

* There is no block normalization and no classifier. The output is the raw
  grid of cell histograms.
* There is no border handling, and no position tracking inside the engine.
* The design has no back-pressure. The consumer must accept the grid every
  cycle in which `grid_valid` is high.
* Only the default cell geometry is fully supported. `hog_pkg` sizes the bin
  width for 64 votes per cell.
