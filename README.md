# Voltage-scalable Bayer colour interpolation

A single-sensor camera records only one colour per pixel, through a Bayer
colour filter array (CFA). A demosaicking filter has to estimate the two
missing colours at every pixel. This RTL implements such a filter so that
**a lower supply voltage, or a slow process corner, degrades image quality a
little instead of producing wrong pixels.**

The idea is to split every estimate into two parts of unequal importance:

* a **bilinear** part, the average of the nearest samples of the wanted
  colour. This part carries most of the image. On its own it is a usable,
  if soft, result.
* a **gradient correction** built from samples of the known colour. It
  sharpens edges and gains a few dB of PSNR. Its coefficients always sum to
  zero, so in a flat region it adds nothing.

The adder chains are ordered so that the bilinear part is computed first
and each later adder adds a less important correction. When the supply is
lowered, the late adders are the ones that miss the clock edge. The
output multiplexers then take the result from an earlier point of the
chain, which has already settled. The filter kernel for each supply level
is chosen so that the earlier tap is still a correct, zero-sum filter,
only with less correction.

The design follows the scalable colour-interpolation architecture of
Karakonstantis, Banerjee, Roy and Chakrabarti ("Design Methodology to trade
off Power, Output Quality and Error Resiliency: Application to Color
Interpolation Filtering"). The filter structure is theirs. The stream
interface, window storage, border policy, rounding and several details
noted below are this implementation's own.

## Quality levels and kernels

Two control signals, `V1` and `V2`, select one of three quality levels:

| level | supply (nominal 1 V) | V1 V2 | what is computed |
|---|---|---|---|
| 0, nominal | 1.0 x | 0 0 | full 5x5 gradient-corrected filter |
| 1 | 0.8 x | 1 0 | shortened filter: 7 taps instead of 9 or 11 |
| 2 | 0.6 x | 1 1 | bilinear only at R/B sites; bilinear + one small gradient pair at G sites |

All kernels are integer weights divided by 8. The CFA is RGGB:
`R G R G` on even rows and `G B G B` on odd rows.

**At an R site** (G and B are missing; a B site is the same with R and B
interchanged). "Far R" means the R samples two pixels away:

| estimate | nominal | level 1 | level 2 |
|---|---|---|---|
| G | 2 x each of 4 orthogonal G, +4 R(i,j), -1 x each of 4 far R | 2 x 4 orthogonal G, +2 R(i,j), -1 x R(i,j±2) | sum of 4 orthogonal G / 4 |
| B | 2 x each of 4 diagonal B, +6 R(i,j), -3/2 x each of 4 far R | 2 x 4 diagonal B, +2 R(i,j), -1 x R(i,j±2) | sum of 4 diagonal B / 4 |

**At a G site on an R-G row** (R is left/right, B is above/below). On a
G-B row the same circuit runs with the R and B inputs interchanged:

| estimate | nominal | level 1 | level 2 |
|---|---|---|---|
| R | 5 G(i,j), +4 x R(i,j±1), -1 x 4 diagonal G, -1 x G(i,j±2), +1/2 x G(i±2,j) | 4 G(i,j), +4 x R(i,j±1), -1 x 4 diagonal G | 1 G(i,j), +4 x R(i,j±1), -1 x G(i-1,j-1) |
| B | 5 G(i,j), +4 x B(i±1,j), -1 x 4 diagonal G, -1 x G(i±2,j), +1/2 x G(i,j±2) | 4 G(i,j), +4 x B(i±1,j), -1 x 4 diagonal G | 1 G(i,j), +4 x B(i±1,j), -1 x G(i-1,j-1) |

The nominal kernels are the well-known high-quality linear demosaicking
kernels of Malvar, He and Cutler.

## The two filter kernels and their adder chains

Only two circuits are needed, because the four pixel types reduce to two
(see the next section). Each circuit computes two estimates. Each estimate
is produced at three taps of its adder chain, and a 3-input 8-bit
multiplexer (`quality_mux`) picks the tap for the current level. Instead of
dividing the result by 8, every input group is shifted right before it
enters the adders. This keeps the adders narrow.

### `rb_kernel`: the chroma site

Inputs: the centre X (R or B), four orthogonal G, four diagonal Y (the
other chroma colour), and the far pairs `x_h` = X(i,j±2) and
`x_v` = X(i±2,j).

```
G'1 = (G_n + G_w + G_e + G_s) >> 2                     bilinear (ab1, ab2)
Y'1 = (sum of 4 diagonal Y) >> 2                       bilinear
M1  = V1 ? X >> 2 : X >> 1                             input mux
s   = M1 - (x_h0 + x_h1) >> 3                          shared by G and Y
G'2 = G'1 + s          Y'2 = Y'1 + s                   level 1
G'3 = G'2 - (x_v0 + x_v1) >> 3                         nominal
Y'3 = Y'2 + X >> 2 - (x_h + x_v) >> 4 - x_v >> 3       nominal: 6/8 X, -3/16 far
```

The shared term `s` is what lets both estimates use one set of adders. The
G and B kernels at an R site differ only in the weights they give the R
samples.

### `g_kernel`: the green site, and the critical path

Inputs: the centre G, the horizontal chroma pair H, the vertical chroma
pair V, the four diagonal G (`g_diag[0]` is G(i-1,j-1)) and the far G pairs.

```
bil_H = (H_l + H_r) >> 1          bil_V = (V_u + V_d) >> 1     (abil2)
M1    = V2 ? G >> 3 : G >> 1                                   input mux
a1    = M1 - G(i-1,j-1) >> 3                                   shared
H'1   = bil_H + a1                                  (a2)       level 2
H'2   = H'1 - [G(i+1,j-1) >> 3 + (G(i-1,j+1) + G(i+1,j+1)) >> 3]   (a3)  level 1
H'3   = H'2 - [G_h2 >> 3 - G_v2 >> 4 - G >> 3]     (a4)       nominal
```

V is computed the same way, with the roles of the two far-G pairs
exchanged. The longest path in the design is
M1 → a1 → a2 → a3 → a4 → M. At a lower supply, a4 and then a3 miss the
clock edge first.

**A detail that departs from the published description.** The nominal
kernel needs the centre G at weight 5/8, level 1 needs 4/8 and level 2
needs 1/8. A 2-input M1 can provide only two of these. The published block
diagram gives M1 the inputs G>>1 and G>>3, but its text says M1 picks
between 1/2 and 1/4. Here M1 gives 1/2 or 1/8, and the missing 1/8 of the
nominal weight is added in the a4 bracket. Only the nominal output uses
that bracket. With this, every level's gradient still sums to zero, so a
flat region comes back unchanged at every level.

## From the Bayer stream to two kernels: the 5x6 window

A 5x5 window covers one pixel. `window_5x6` keeps one more column, so it
holds the full neighbourhoods of two adjacent pixels. On any row, one of
these is always a chroma site and the other a G site. One `rb_kernel` and
one `g_kernel` therefore produce two complete RGB pixels per clock, which
doubles throughput for the cost of one extra column of registers.

`pair_datapath` does the routing:

* **R-G row.** The left centre pixel is R and goes to `rb_kernel`, whose
  outputs are G and B. The right centre pixel is G; its H inputs are R and
  its V inputs are B.
* **G-B row.** The left centre pixel is G; its H inputs are B and its V
  inputs are R. The right centre pixel is B; `rb_kernel` gives G and R.

No arithmetic changes between rows; only the inputs are interchanged.

Pixels arrive as pairs (even column, odd column), two per cycle, in raster
order. Four `line_buffer`s (each a circular memory holding one line, as
`IMG_W/2` words of 16 bits) supply the four older rows. On every valid
input the window shifts left by two columns.

## Control: supply level and process corner

`vdd_ctrl` maps the supply operating point (`vdd_level`: nominal, 0.8x,
0.6x) and a `slow_corner` flag to `V1`/`V2`. The flag is meant to come from
an on-die process sensor. A slow corner moves the design down one level,
because at a slow corner the last adder of the current level is the one
that fails:

| vdd_level | slow_corner = 0 | slow_corner = 1 |
|---|---|---|
| nominal | level 0 (V1 V2 = 00) | level 1 (10) |
| 0.8x | level 1 (10) | level 2 (11) |
| 0.6x | level 2 (11) | level 2 (11) |

The process sensor and the supply itself are analog parts outside this RTL.
Their outputs are top-level inputs.

## Top level: `cfa_interp_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `vdd_level` | in | 2 (`vdd_level_e`) | supply operating point |
| `slow_corner` | in | 1 | process sensor reports a slow corner |
| `in_valid`, `in_pair` | in | 1, 2x8 | Bayer sample pair, `[0]` = even column |
| `out_valid`, `out_pix` | out | 1, 2x`rgb_t` | two RGB pixels |
| `out_row`, `out_col` | out | 16, 16 | image position of `out_pix[0]` (always an even column) |
| `v1`, `v2` | out | 1 | control signals in use |

Parameters: `IMG_W = 768`, `IMG_H = 512`. These are the size of the
standard Kodak photo test set.

Timing:

* A pair presented with `in_valid` at clock edge k completes a window at
  edge k. Its centre pixels are registered at edge k+1, so latency is
  2 cycles.
* Throughput is two output pixels per input cycle.
* There is no back-pressure. Idle cycles in the input are allowed.
* Frames follow back to back. Row and column counters wrap at the frame
  end.

Pixels within two rows or columns of the border are **not produced**. Each
frame yields `(IMG_H-4)` rows of `(IMG_W/2-2)` pairs. Hold `vdd_level` and
`slow_corner` steady during a frame, or accept that a level change takes
effect on the window being processed in that cycle.

## Arithmetic details (own choices)

* Samples are 8-bit unsigned. Internal sums use a 12-bit signed
  accumulator.
* Every shift truncates (floor). Where the block diagram shifts a pair
  after its adder, this RTL does the same: the pair is summed, then
  shifted. As a result, the filters are exact on flat regions whose value
  is a multiple of 16. Other flat values can be off by one or two codes.
* Each multiplexer candidate is saturated to 0..255. The multiplexers are
  then 8 bits wide.
* The published block diagram of the chroma-site kernel names, in one
  panel, the horizontal far-R pair for the shared level-1 term and, in
  the other panel, the vertical pair. This RTL uses the horizontal pair
  for both, which agrees with the level-1 kernel drawing.
* Each kernel stays a single combinational stage. The graceful-degradation
  scheme relies on the whole chain sitting in one clock period, so adding
  pipeline registers inside it would defeat it.

## What this RTL does not model

* **Timing failure itself.** In silicon, lowering Vdd makes the late taps
  wrong. In this RTL every tap is always computed correctly, and V1/V2
  only choose the tap. The power figures reported for the architecture
  (about 13.2 / 7.8 / 3.7 mW at 1 / 0.8 / 0.6 V in a 70 nm process) cannot
  be reproduced from RTL.
* **The process sensor and the voltage supply** (see above).
* **Adder count.** The published design counts 31 additions for the four
  estimates. This RTL uses about 36 add/subtract operations, because of
  the extra G/8 term and the way the nominal chroma-site terms are split.

## Files

| file | content |
|---|---|
| `rtl/cfa_pkg.sv` | pixel, accumulator and RGB types; `vdd_level_e`; `sat8` |
| `rtl/quality_mux.sv` | 3-input output multiplexer M |
| `rtl/rb_kernel.sv` | chroma-site filter (G and the opposite chroma) |
| `rtl/g_kernel.sv` | green-site filter (both chroma colours) |
| `rtl/vdd_ctrl.sv` | V1/V2 from supply level and process corner |
| `rtl/line_buffer.sv` | one-line circular delay |
| `rtl/window_5x6.sv` | 5x6 sliding window, two columns per cycle |
| `rtl/pair_datapath.sv` | routing by row type, both kernels, RGB assembly |
| `rtl/cfa_interp_top.sv` | streaming top |
| `tb/cfa_ref_pkg.sv` | integer reference model, written per kernel, and a test-image generator |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the tests listed below |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each also has a watchdog. For example, to build and run the end-to-end
test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cfa_pkg.sv tb/cfa_ref_pkg.sv tb/tb_cfa_interp_top.sv \
    --top-module tb_cfa_interp_top -o sim
./obj_dir/sim
```

For any other testbench, substitute its name. The include paths let
verilator find the modules it uses.

* `tb_rb_kernel`, `tb_g_kernel`: 12,000 random windows per kernel over all
  V1/V2 combinations against the reference; flat windows at every level;
  saturation at both ends.
* `tb_pair_datapath`: random windows from both row types at all levels,
  all three colours of both pixels.
* `tb_window_5x6`, `tb_line_buffer`: storage and shifting, with random idle
  cycles.
* `tb_cfa_interp_top`: a 16x12 image streamed as six back-to-back frames,
  one per (supply level, slow corner) pair. It checks every pixel, its
  position, the 2-cycle latency and the pixel count per frame. It also
  counts that each level, the slow-corner demotion, both row types,
  saturation, idle cycles and back-to-back frames all occur.
* `tb_cfa_interp_full`: the same test at the default 768x512 size. It runs
  in a few seconds.
* `tb_cfa_psnr`: a synthetic full-colour 768x512 scene is mosaicked,
  interpolated at each level, and scored against the original. Observed
  PSNR: 38.3 dB nominal, 36.5 dB level 1, 35.0 dB level 2, against
  34.7 dB for plain bilinear interpolation. The test checks that quality
  never increases as the level drops. The published results on real
  photographs show the same ordering, with level 2 still above bilinear.

The reference model in `tb/cfa_ref_pkg.sv` is written from the kernel
weights. It uses the same truncation points as the hardware, so a
kernel-level mismatch is caught exactly.
