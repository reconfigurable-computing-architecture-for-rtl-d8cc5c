# Census + dynamic-programming stereo disparity core

This core computes a dense disparity map from a rectified stereo pair in a
single pass over the pixel stream, one left/right pixel pair per clock. Local
stereo matchers pick, for each pixel, the disparity with the lowest window
cost. This core instead optimises a whole image row at once: it finds the
disparity path along the scan line that minimises the total matching cost plus
a penalty for every disparity jump. That dynamic-programming (DP) step
normally needs a lot of storage and does not pipeline well. Here it is laid
out so that three rows are in flight at any time, each in a different phase:
accumulate, back-track and forward-track. The storage holds 2-bit steps
instead of full disparities, and each buffer is a bidirectional "piston" shift
register that empties one row while it fills with the next.

The matching cost is the Hamming distance between census-transformed windows.
This cost does not change when the two cameras differ in gain or offset. Both a
left-referenced and a right-referenced disparity map are computed, and a
left/right cross check marks each output pixel as consistent or not.

Default configuration: 640×480 images, 8-bit grey pixels, 3×3 census window,
5×5 aggregation window, disparity range 30, jump penalty λ = 7. The same RTL
runs with a disparity range of 50, or any other size, by changing parameters.

## The algorithm, as the hardware computes it

Pixels are handled as one raster stream: index `u = y·NC + x`.

1. **Census transform** (3×3). Bit `k = j·WC + i` of `CV(u)` is 1 when window
   pixel `(j,i)` is darker than the centre pixel. The centre bit is always 0.
2. **Aggregated Hamming cost** (5×5 of census vectors). For disparity `z`:
   - left-referenced: `C_L(u,z) = Σ popcount(CV_L(u+w) ^ CV_R(u−z+w))`
   - right-referenced: `C_R(u,z) = Σ popcount(CV_R(u+w) ^ CV_L(u+z+w))`

   Here `w` runs over the 25 window offsets. At the defaults a cost is at most
   225 (8 bits).
3. **Energy recursion**, per row and per disparity:
   - at the first column of the row: `E(0,z) = C(0,z)`
   - afterwards: `E(x,z) = C(x,z) + min{E(x−1,z−1)+λ, E(x−1,z), E(x−1,z+1)+λ}`

   The winning neighbour is kept as a step `s(x,z) ∈ {−1,0,+1}`. Ties go to
   `z` first, then `z−1`, then `z+1`.
4. **Path extraction.** The last disparity of the row is the arg-min of
   `E(NC−1,·)`, with ties going to the lowest `z`. The earlier disparities
   follow from `D(x−1) = D(x) + s(x, D(x))`.
5. **Cross check.** A right disparity `Dr(x)` is accepted when
   `Dl(x + Dr(x)) == Dr(x)`.

Windows and match candidates are not clipped at the image borders. They run on
along the raster stream into the neighbouring row, which is what a plain
shift-register line buffer does. The pixels before the first pixel after reset
count as 0.

## Pipeline

```
pix_l ─► pixel_window_buffer ─► census_transform ─► census_buffer ─┐
                                                                    ├─► 2·R × hamming_distance
pix_r ─► pixel_window_buffer ─► census_transform ─► census_buffer ─┘        │
                               (matching_cost)                   cost_l[R]   │   cost_r[R]
                                                                  ▼          ▼
                                      dynamic_programming (left)   dynamic_programming (right)
                                                         Dl │                 │ Dr
                                                            └─► consistency_check ─► out_disp, out_ok
```

All registers in the core advance on the same pixel strobe (`pix_valid`). A
cycle with `pix_valid` low freezes the whole pipeline. For that reason every
latency below is counted in strobes (accepted pixel pairs), not in clocks.

### Matching cost: sharing two census buffers between two flows

Each image has one line buffer of `NC·(WC−1)+WC` pixels and one census buffer
of `NC·(WH−1)+R+WH−1` census vectors. The census buffer presents `R`
aggregation windows, at offsets of 0 to R−1 pixels into the past.

- The left-referenced flow uses left window 0 as its reference and right
  windows `z` as its candidates (right pixel `u−z`).
- The right-referenced flow uses right window `R−1` as its reference and left
  windows `R−1−z` as its candidates (left pixel `u−(R−1)+z`).

As a result, the right-referenced flow works on pixel `u−(R−1)` while the
left-referenced flow works on pixel `u`. This fixed offset of R−1 pixels lets
both flows fit in the two buffers as specified. It also lines the two disparity
streams up for the cross check with no extra delay (see below). Each of the
`2·R` Hamming units is an XOR bank followed by a pipelined adder tree:

- The first level counts the 9 bits of one census vector.
- Each higher level adds pairs of partial sums, one bit wider than the level
  below.

A Hamming unit takes `1 + clog2(WH²)` = 6 strobes.

### Dynamic programming: three rows at once

`dynamic_programming` takes one cost vector per strobe. Its column counter
marks the row boundaries. During the strobes of row `y`:

| unit | works on | what it does |
|------|----------|--------------|
| `ef_block` | row y | `R` accumulators update `E`. Each Min block emits the 2-bit step of its path. |
| `path_storage` | rows y and y−1 | It pushes row y's step vectors and pops row y−1's, last column first, in the same strobe. |
| `min_tree` | row y−1 | At column 0 of row y, the energy registers still hold `E(NC−1,·)` of row y−1. The combinational tree gives its arg-min. |
| `bt_block` | row y−1 | The counter is loaded with that arg-min. A multiplexer picks the popped step of the path the counter is on, and the counter moves by that step. The chosen steps go to `disparity_storage`. `D(0)` is latched at the last column. |
| `disparity_storage` | rows y−1 and y−2 | One stack line. It reverses the back-tracked steps. |
| `ft_block` | row y−2 | Starts from the latched `D(0)` and applies the popped steps (`D(x) = D(x−1) − s`). Outputs disparities in raster order. |

Disparity output therefore trails the cost input by `2·NC + 1` strobes.

**Piston stacks** (`piston_stack`). A stack line is `NC` registers, each
preceded by a 2:1 multiplexer, so the line can shift either way.

- Direction 0: push at register 0, pop from register NC−1.
- Direction 1: push at register NC−1, pop from register 0.

The direction flips at the first column of every row. A row pushed in one
direction therefore comes out last-in-first-out during the next row, while the
next row goes in through the other end in the same strobes. No second buffer
and no stall is needed. The path storage is `R` such lines of 2-bit steps; the
disparity storage is one line.

Step encoding: `00` = 0, `01` = +1, `11` = −1 (`stereo_pkg::step_t`).

### Consistency check

The left disparities pass through `R` registers that shift towards index 0.
The right stream trails by R−1 pixels, so when `Dr(x)` is in its input
register, register `i` holds `Dl(x+i)`. A multiplexer indexed by `Dr(x)` picks
the partner, and an XNOR bank compares the two. The check adds two strobes of
latency.

## Interface (`stereo_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `pix_valid` | in | 1 | strobe: `pix_l`/`pix_r` are taken on this clock edge |
| `pix_l`, `pix_r` | in | PW | rectified left/right pixels, raster order |
| `out_valid` | out | 1 | pulses for one clock after each strobe once the pipeline is full |
| `out_disp` | out | clog2(R) | right-referenced disparity `Dr` of pixel (`out_x`,`out_y`) |
| `out_ok` | out | 1 | 1 when the pixel passed the cross check |
| `out_x`, `out_y` | out | clog2(NC), clog2(NR) | right-image coordinates of the result |

Stream rules:

- After reset, the first strobe carries pixel (0,0) of a frame.
- Frames follow back to back. There is no frame or line marker.
- The row phase is fixed by counting strobes from reset.
- The results of the last two rows of a frame come out while the next frame,
  or filler pixels, is being fed.
- Rejected pixels keep their disparity value. `out_ok` tells them apart.

Latency, from presenting right pixel `u` to its result:

```
total = mc + (2·NC + 1) + R + 1
mc    = 3 + ((WC−1)/2 + (WH−1)/2)·(NC+1) + 1 + clog2(WH²)
```

At the defaults, `mc` = 1932 and `total` = 3244 strobes. The functions are in
`stereo_pkg`.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NC`, `NR` | 640, 480 | image width and height |
| `WC` | 3 | census window (odd) |
| `WH` | 5 | Hamming aggregation window (odd) |
| `R` | 30 | disparity range, 0..R−1 |
| `PW` | 8 | bits per pixel |
| `LAMBDA` | 7 | disparity-jump penalty |

The following widths are derived from the parameters:

- cost: `clog2(WH²·WC²+1)`, 8 bits at the defaults
- energy: `clog2(NC·WH²·WC²+λ+1)`, 18 bits at the defaults; energies are never
  normalised
- disparity: `clog2(R)`

Storage at the defaults:

| buffer | bits |
|--------|------|
| pixel line buffers, 2 × 1283 × 8 | 20,528 |
| census buffers, 2 × 2594 × 9 | 46,692 |
| path storage, 2 × 30 × 640 × 2 | 76,800 |
| disparity storage, 2 × 640 × 2 | 2,560 |

All of these are plain shift registers. On an FPGA the long fixed-tap line
buffers would normally be mapped to RAM-based shift registers.

## Choices not fixed by the underlying description

- **Energy recursion.** It uses the accumulated energies of the previous
  column. A printed form of the recursion uses the previous column's costs, but
  the accumulator structure only makes sense with energies.
- **Window roles.** The census window is 3×3 and the Hamming aggregation
  window is 5×5. One passage swaps the names of the two windows; the
  configuration used for the reported results is followed.
- **Comparisons.** The census polarity, the tie rules, the step encoding and
  the left-referenced mirror of the cost are this design's choices.
- **Timing and control.** The strobe-based flow control, the R−1 offset
  between the two flows, the exact overlap of the three DP row phases, and the
  registers around the census stage, the Hamming tree, the forward-tracker and
  the cross check are this design's choices.
- **Reset and borders.** Reset clears every register, including the line
  buffers. No special handling is done at image borders.
- **Not included.** The board, the host link that feeds images, and image
  rectification. The core expects rectified pixels on its ports.

The original implementation's resource figures (about 102 k registers and
494 k block-memory bits for R = 30) cover a complete FPGA build with its
infrastructure. They are not directly comparable with the storage list above.

## Verification

Every testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- Each block has its own testbench, `tb_<block>.sv`. These compare the block
  with an independent model (history queues, direct formulas) under random
  stalls.
- `tb_stereo_top` runs the whole core end to end on 40×6 images with R = 8,
  two frames back to back.
- `tb_stereo_r50` does the same with R = 50 on 96×6 images.
- `tb_stereo_full` runs the core at its default parameters: one full 640×480
  frame, R = 30, about 308 k checked pixels. It simulates in roughly four
  minutes.

The three end-to-end tests generate the stereo pair themselves:

- a pseudo-random texture, shifted by a known disparity field;
- a little noise;
- a flat strip at the start of each row, where only the optimisation decides
  the result.

They recompute the whole algorithm in SystemVerilog and compare every output
(disparity, flag and coordinates) and the latency. They also count the
mechanisms they exercised and fail if any count is zero:

- input stalls
- upward and downward path steps
- accepted and rejected pixels
- row wrap-around
- frame wrap-around

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal rtl/stereo_pkg.sv -y rtl -y tb \
          tb/tb_stereo_top.sv --top-module tb_stereo_top -o sim
./obj_dir/sim
```

The package must come first on the command line. The other files are found
through `-y`.

## Limitations

- Row length and frame size are parameters, not run-time settings. A smaller
  image needs a rebuild with its own `NC`/`NR`.
- There is no start-of-frame input. The frame phase is fixed by reset.
- The Min Tree is combinational (clog2(R) compare levels) and feeds the
  back-tracker directly. The energy update is a three-way min plus an add in one
  cycle. These are the likely critical paths, and no timing closure has been
  done.
