# Tiled squarers for FPGAs

A squarer computes `X*X`. You could build one as a general multiplier with
both inputs tied together, but that wastes about half the work. The partial
product `x_i*x_j` shows up twice (once as `x_j*x_i`), and the diagonal
products `x_i*x_i` are just `x_i`. On an FPGA the partial products are not
made with AND gates. They come from small sub-multipliers that fit in LUTs,
and from the embedded DSP multipliers. So designing a squarer comes down to
choosing which of these pieces ("tiles") cover which part of the
partial-product board.

This RTL implements such a tiled squarer. It takes any valid tiling as a
parameter. A tiling is a list of tiles, each with a position on the board
and a signed weight. From that list the squarer builds the tiles, places
their products in a bit heap, adds the constant that the subtracted tiles
need, and sums everything in a compressor tree. The default configuration
is a 53-bit squarer (the significand of a double) that uses four 24x17 DSP
tiles.

## The squarer board

Think of the input bits `x_0 .. x_{WX-1}` along both edges of a square
board. Cell `(i, j)` holds the product `x_i*x_j`, which has weight
`2^(i+j)`. So a cell's weight is its Manhattan distance from the corner
where bit 0 meets bit 0. `X*X` is the sum of all cells. Because the board is
symmetric, only the cells with `i >= j` need to be counted:

* each diagonal cell `(i, i)` must be counted **once**;
* each cell above the diagonal (`i > j`) must be counted **twice**, once for
  itself and once for its mirror `(j, i)`.

Here is the 8-bit case. Rows are `j = 0..7` from the top. Columns are
`i = 7..0` from left to right:

```
 i:  7 6 5 4 3 2 1 0
j=0  2 2 2 2 2 2 2 1
j=1  2 2 2 2 2 2 1 .
j=2  2 2 2 2 2 1 . .
 ...
j=7  1 . . . . . . .
```

A **tile** multiplies two slices of the input, `A = X[x +: wa]` and
`B = X[y +: wb]`. Its product covers a `wa x wb` rectangle of cells. A tile
cell that falls below the diagonal counts toward its mirror above the
diagonal. A tile cell that falls off the board reads input bits that are
zero. That lets a DSP hang over the edge of the board, at the cost of using
only part of it. Every tile has a weight `w`:

| weight | meaning | how it is built |
|--------|---------|-----------------|
| `+1` | product added once | placed at bit `x+y` |
| `+2` | product counted for a block and its mirror | placed at bit `x+y+1` (a shift, no logic) |
| `-1`, `-2` | product subtracted, to undo double coverage | one's complement of the product, plus a constant (see below) |

A tiling is **valid** when the weights it puts on each cell add up to
exactly 1 on the diagonal and exactly 2 above it. A valid tiling always
produces `X*X`, whatever its tiles are. `tiled_squarer` checks this rule at
elaboration and stops with an error if the tiling breaks it.

### Why negative weights

Take a multiplier tile that crosses the diagonal, for example a 24x17 DSP
at columns 29..52 and rows 17..33. Its 5x5 corner on the diagonal (columns
and rows 29..33) holds both `x_i*x_j` and `x_j*x_i`. It therefore already
covers that small triangle the way a squarer would. If the DSP also has
weight 2, so that it counts its off-diagonal rectangle twice, the corner
gets counted four times (twice on the diagonal). Subtracting a 5-bit
squarer tile with weight -1 fixes the count. A big, efficient DSP can be
worth placing across the diagonal in return for a small correction tile.
The default tiling uses exactly this arrangement.

### The sign-extension constant

For a subtracted product `P` with `p` bits at shift `s`, the identity is

```
-P * 2^s  ==  (~P over bits [s, s+p)) + 2^s - 2^(s+p)     (mod 2^(2*WX))
```

The inverted product goes into the bit heap as an ordinary row. The
constants `2^s - 2^(s+p)` of all subtracted tiles are summed at elaboration
time into one constant row, the *sign-extension vector*. This keeps the
correction down to one extra row, whatever the number of negative tiles.

## Tiles

| module | shapes | notes |
|--------|--------|-------|
| `sq_tile` | N x N on the diagonal, N = 1..6 | Both operands are the same slice, so the tile depends on only N inputs. This makes squarer tiles much cheaper per cell than multiplier tiles. A 6-bit squarer needs about 7 six-input LUTs, against about 5 for a 3x3 multiplier that covers only a quarter of the area. It is written as the reduced squarer matrix: diagonal terms `x_i` and merged pairs `x_i&x_j` at weight `2^(i+j+1)`. |
| `lut_mult_tile` | 1x1, 1x2, 2x3, 3x3, 2xk, and their transposes | Small LUT multipliers. 2xk multiplies a k-bit slice by a 2-bit digit (radix 4). It is written as a behavioural product and synthesis does the LUT mapping. Other shapes are rejected. |
| `dsp_mult_tile` | up to 24x17 | One DSP block. Its signed 25x18 multiplier, used unsigned, gives 24x17. Smaller operands are zero-extended. Written as a product for synthesis to infer the DSP. It has no internal registers. |

The LUT cost of each tile, including its share of the compressor tree, is
roughly the tile's own LUTs plus 0.65 LUT per output bit. That estimate is
what one uses to rank tilings. The RTL does not depend on it.

## Compressor tree

`compressor_tree` adds `NROWS` rows of `W` bits, modulo `2^W`. Its layers
of bitwise 3:2 counters (full adders) turn every three rows into a sum row
and a carry row shifted one bit left. The layers repeat until two rows are
left, and a final adder combines them. Rows are full width. Bits outside a
tile's product are constant zero and disappear in synthesis, so the ragged
bit heap costs only its real bits. Optimized FPGA compressor trees, with
generalized parallel counters mapped onto LUTs and carry chains, would do
better. The function is the same.

## Tilings shipped in `sq_pkg`

All of these come from one simple greedy procedure, **not** from the
integer-linear-programming optimization that would find a tiling of minimum
LUT cost for a given DSP budget:

1. Place the DSP tiles by hand.
2. Walk down the diagonal. At each point, place the largest squarer tile
   (6 bits down to 1) whose triangle still needs exactly the squarer
   pattern (+1 on the diagonal, +2 above it) or exactly its negative.
3. Cover the remaining off-diagonal cells with 2xk tiles on column pairs
   (k at most 24), giving each tile the weight the cells still need.
4. Cover any cells still left with 1x1 tiles.

| name | WX | tiles | DSP | content |
|------|----|-------|-----|---------|
| `T53_4D` (default) | 53 | 38 | 4 | A DSP used as a 17x17 squarer at the origin. Two 24x17 DSPs with weight 2 next to it; one hangs over the board edge. One 24x17 DSP with weight 2 crosses the diagonal, with a 5-bit squarer tile of weight -1 to correct it. The rest is 6-bit squarer tiles and 2xk tiles. |
| `T8_NEG` | 8 | 6 | 0 | A 2x3 multiplier over columns 5..6 and rows 5..7 that crosses the diagonal with weight 2. The doubly counted 2x2 square is subtracted. |
| `T8_R2` | 8 | 36 | 0 | 1x1 tiles only: the classic AND-array (radix-2) squarer |

### Tilings for any width: `greedy_tiling`

`sq_pkg::greedy_tiling(wx, ndsp)` runs the same greedy procedure as an
elaboration-time function. It works for any `wx` up to 64, either logic
only (`ndsp = 0`) or with one DSP (`ndsp = 1`, a `min(wx,17)`-bit DSP
squarer at the origin). The matching tile count comes from
`greedy_count(wx, ndsp)`. The function returns a fixed 256-entry array, of
which you pass the low entries:

```systemverilog
localparam int                    NT = sq_pkg::greedy_count(24, 1);
localparam sq_pkg::tile_t [255:0] G  = sq_pkg::greedy_tiling(24, 1);
tiled_squarer #(.WX(24), .NT(NT), .TILES(G[NT-1:0])) u_sq (...);
```

With one DSP, every width up to 17 bits becomes a single DSP tile with no
LUT tiles at all. `sq_pkg::tile_cost_x100` gives a rough LUT estimate for
each tile: its own LUTs plus 0.65 LUT per output bit for compression. With
that estimate the greedy tilings come out as follows:

| wx | logic only: tiles / est. LUTs | one DSP: tiles / est. LUTs |
|----|-------------------------------|----------------------------|
| 8  | 9 / 40.5   | 1 / 26.65 (all compression) |
| 16 | 20 / 138.4 | 1 / 26.65 |
| 24 | 31 / 287.8 | 7 / 173.4 |
| 32 | 50 / 505.8 | 14 / 378.9 |

Beyond 17 bits the one-DSP tilings are clearly worse than an optimal one.
A 17x17 DSP squarer covers only the small corner triangle. An optimizer
would put the 24x17 DSP where it covers the most weight.

To use a different tiling, pass it as `TILES` with matching `WX` and `NT`.
Each entry is `'{kind, wa, wb, x, y, w}`. If the tiling is not valid,
elaboration fails with an error, so it cannot produce wrong results without
warning. Rules for each entry:

* squarer tiles must be square, sit on the diagonal and have weight ±1;
* DSP tiles must fit 24x17 in either orientation;
* weights must be -2, -1, 1 or 2.

A square LUT multiplier tile (up to 6x6) placed on the diagonal sees equal
operands, so it is built as the squarer tile of the same size.

## Top level: `tiled_squarer`

| port | dir | width | |
|------|-----|-------|-|
| `clk`, `rst_n` | in | 1 | Clock and synchronous active-low reset. `rst_n` clears only the valid bits. Both are unused when `PIPE_STAGES = 0`. |
| `in_valid` | in | 1 | `x` is valid |
| `x` | in | `WX` | Unsigned input |
| `out_valid` | out | 1 | `sq` is valid |
| `sq` | out | `2*WX` | `x*x` |

Parameters: `WX`, `NT`, `TILES` (see above) and `PIPE_STAGES`:

* `PIPE_STAGES = 0`: purely combinational (the default).
* `PIPE_STAGES = 1`: a register after the tiles, latency 1.
* `PIPE_STAGES = 2`: one more register on the result, latency 2.

A new input can be accepted every cycle. The register positions are fixed
here. A generator driven by a target frequency would place them by delay
instead.

## Where this departs from the method it implements

* **Tilings are not optimal.** The coverage rule, tile library, weights and
  sign-extension handling are those of the optimal-squarer method. The
  tilings themselves come from the greedy procedure above. They are correct,
  but they use more LUTs than an ILP-optimal tiling would. In particular,
  the default 53-bit/4-DSP tiling is this design's own and is not the
  published optimum.
* Tiles are written behaviourally (`*`, or a summed bit matrix). They do not
  instantiate LUTs, so the LUT counts per tile depend on the synthesis tool.
* The compressor tree is a plain 3:2 Wallace tree, not an FPGA-optimized
  compressor tree.
* Operands are unsigned. Pipeline register placement and reset behaviour
  are choices made here.

## Verification

Every testbench checks itself, compares against `x*x` (or `a*b`, or a sum)
computed inside the testbench, and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_sq_tile` | All inputs, tile sizes 1..6 |
| `tb_lut_mult_tile` | All inputs of 1x1, 1x2, 2x3, 3x3, 3x2, 2x8 and 8x2 |
| `tb_dsp_mult_tile` | Corner and random operands, 24x17 and 17x17 |
| `tb_compressor_tree` | 1, 2, 3, 8 and 39 rows; zero, all-ones and random rows |
| `tb_tiled_squarer` | All 8-bit inputs for the radix-2, logic-only and negative-weight tilings, and all 4-bit inputs for a tiling with a 3x3 multiplier on the diagonal. Random inputs at the default 53 bits, and at 17 and 32 bits with greedy tilings (with and without a DSP). Streaming with random bubbles through the 1- and 2-stage pipelines, with the latency checked. It counts how often each mechanism was exercised (negative-weight tile, weight-2 tile, DSP tile, squarer tile, edge-overhanging tile, diagonal multiplier, pipelined results) and fails if any count is zero. |
| `tb_squarer_sizes` | Every width 2..32, logic only and with one DSP, built from `greedy_tiling`: all inputs up to 10 bits, random inputs above that. Checks the DSP budget, and checks that one DSP alone covers widths up to 17 bits. Prints tile counts and cost estimates. |
| `tb_tiled_squarer_full` | The default configuration with no parameter changes: directed bit patterns, each 6-bit group alone and in pairs, and 5000 random inputs |

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/sq_pkg.sv tb/tb_tiled_squarer.sv \
          --top-module tb_tiled_squarer -Mdir obj && ./obj/Vtb_tiled_squarer
```

Each finishes in seconds; `tb_squarer_sizes` elaborates 62 squarers and takes about half a minute to build.
