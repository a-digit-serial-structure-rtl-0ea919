# DigiFAB: a multiplier of any size from a fixed cluster of 4 x 4 array blocks

An array multiplier for 4M x 4N bits can be built from M x N copies of a
4 x 4-bit building block, the flexible array block (FAB). If the chip has fewer
blocks than that, the parallel multiplier simply does not fit. DigiFAB removes
that limit by trading blocks for clock cycles. It keeps only a K x L cluster of
blocks. It cuts the full M x N array into K x L tiles and computes one tile per
clock cycle. Registers around the cluster hold every signal that would have
crossed a tile boundary in the full array. One 4 x 4 cluster (16 blocks)
computes a 32 x 32-bit product in 6 cycles. The same cluster handles any size
from 4 x 4 to 32 x 32 bits, signed or unsigned, chosen at run time.

This repository holds synthesizable SystemVerilog for the whole structure:
- the reduced array block (`rfab`);
- the cluster (`fab_cluster`);
- the top, right and mux registers;
- the edge multiplexers, the final adder and the sequencer;
- the top level `digifab`.

Each module has a self-checking testbench.

## The array inside a block

A block is a 4 x 4 grid of cells. Each cell is an AND gate (the partial
product) followed by a full adder. Cell (s,t) is in column s (0 = left) and
row t (0 = top). It multiplies multiplicand bit `a[s]` by multiplier bit
`b[3-t]`. The multiplicand's least significant bit is on the left and the
multiplier's most significant bit is on the top row.

- **Carries** ripple to the right along a row. The right neighbour weighs
  twice as much.
- **Sums** move diagonally, one column right and one row down. That cell has
  the same weight.

Tiled into a large array, cell (u,v) of the whole array has weight
`u + 4N - 1 - v`. Every diagonal holds one weight. The low product bits
therefore leave through the bottom edge, one bit per column. The high half
leaves through the right edge in carry-save form: one carry and one sum per
row.

Because of this orientation, the edges of a block have fixed widths. The top
and bottom edges carry 4 sum bits. The left and right edges carry 4 carries
and 3 sums. The fourth diagonal sum of the right column leaves through the
bottom-right corner and is counted with the bottom edge. A K x L cluster of
blocks has the same shape scaled up: 4K bits on the top and bottom, and
4L + (4L - 1) = 8L - 1 bits on the left and right.

The original FAB has an extra adder in each block of the right-most column.
It turns the right edge's carry-save pair into plain product bits. The
*reduced* block used here leaves that adder out. DigiFAB does that addition
once, in a separate step (see "The extra pass").

## Walking the tiles, and what the registers hold

With M* = ceil(M/K)·K and N* = ceil(N/L)·L, the array is padded to M* x N*
blocks. The operands are zero-extended, or sign-extended in signed mode. The
padded array is a grid of ceil(M/K) tile columns by ceil(N/L) tile rows. The
sequencer visits the tiles **column first**: down the left-most tile column,
then down the next one. Three register groups replace the wires between
tiles:

| register        | width  | levels  | holds                                                        |
|-----------------|--------|---------|--------------------------------------------------------------|
| top register    | 4K     | 1       | bottom-edge sums of the tile just computed, for the tile below |
| right registers | 8L - 1 | N*/L    | right-edge carries and sums of each tile row, for the next tile column |
| mux registers   | 1      | N*/L    | the corner sum of each tile row, for the tile one row down and one column right |

Column-first order is what keeps the top register at one level. The tile
below is always computed on the very next clock. The right registers have to
keep a whole tile column's right edges, one entry per tile row. Entry r is
read and rewritten in the same cycle: the cluster reads the values of tile
(c-1,r) and at the clock edge they are replaced by those of tile (c,r).

### The corner bit

The hardest part of the walk is the single diagonal sum that leaves a tile
through its bottom-right cell. In the full array it goes to the top-left cell
of the tile one row *down* and one column *right*. With column-first order,
that tile is computed almost a whole tile column later. The bit moves in two
steps:

1. While tile (c,r) is computed, its corner sum is captured with the rest of
   its bottom edge in the top register (bit 4K-1).
2. On the next cycle the cluster computes tile (c,r+1). Mux-register entry
   r+1 is read (it holds the corner of tile (c-1,r), needed now by the
   top-left cell) and rewritten with the corner of tile (c,r) from the top
   register.

Each entry is used once per tile column, so one bit per tile row is enough.

### Array boundary

On the first tile row the top edge lies on the array boundary. On the first
tile column the left edge does. There the edge multiplexers (`edge_mux`)
feed constants instead of register contents: zero in unsigned mode, the
correction bits in signed mode (next section).

## Signed operands

Two's complement uses the Baugh-Wooley form. Let n = 4M* and m = 4N*.

- A partial product is inverted (NAND) when exactly one of its two bits is a
  sign bit. For the multiplicand that is the last column of the last tile
  column. For the multiplier it is the top row of the first tile row. The
  blocks take this as configuration inputs (`signed_mode`, `sign_col`,
  `sign_row`) that change from tile to tile.
- The constant 2^(m-1) enters as the carry into cell (0,0).
- The constant 2^(n-1) enters on the top edge at column n - m when n ≥ m, and
  on the left edge at row m - n otherwise.
- The constant 2^(n+m-1) is applied by inverting the top product bit.

## The extra pass

After the last tile column, the right and mux registers hold the high half
of the product in carry-save form. Tile row r owns 4L product bits. Its
carries are the 4L carries of entry r, and its sums are the 4L-1 sums of
entry r plus mux bit r as the top bit. Both vectors run from high weight at
the top of the tile row to low weight at the bottom, so `final_adder`
bit-reverses them.

The extra pass visits the tile rows **bottom up**. Each cycle one shared
4L-bit adder adds one tile row's pair plus the carry kept from the row below.
The result goes straight into the product register. This pass takes
ceil(N/L) cycles. The total time of a multiplication is therefore

    cycles = (ceil(M/K) + 1) · ceil(N/L)

For 32 x 32 bits these are the counts measured in simulation:

| cluster K x L | 1x1 | 2x3 | 3x3 | 5x2 | 3x4 | 1x16 | 2x8 | 4x4 | 8x2 | 16x1 |
|---------------|-----|-----|-----|-----|-----|------|-----|-----|-----|------|
| cycles        | 72  | 15  | 12  | 12  | 8   | 9    | 5   | 6   | 8   | 16   |

Few columns (small K) mean many tile columns, so many passes. Few rows
(small L) mean many tile rows, so every pass is long, the extra one
included. The cycle count alone can favour a tall cluster: 2x8 needs 5
cycles, against 6 for 4x4. The clock period, however, grows with the cluster's
longest ripple, about 4K + 4L cells. Counting both, near-square clusters do
best. The 1 x W and W x 1 shapes do worst.

On one 4 x 4 cluster, an N x N multiplier takes (ceil(N/16)+1)·ceil(N/16)
cycles. The time rises in steps, not smoothly: 2 cycles up to 16 bits, 6 up
to 32, 12 up to 48 and 20 up to 64. The cluster itself does not grow with
N. Only the right and mux registers gain a level for every 16 bits of the
multiplier.

## Interface and timing (`digifab`)

| port          | dir | width            | meaning |
|---------------|-----|------------------|---------|
| `clk`, `rst_n`| in  | 1                | clock; asynchronous active-low reset |
| `start`       | in  | 1                | begin a multiplication; taken only while idle |
| `signed_mode` | in  | 1                | two's-complement operands |
| `m_digits`    | in  | clog2(MMAX+1)    | M, multiplicand width in 4-bit digits (1..MMAX) |
| `n_digits`    | in  | clog2(NMAX+1)    | N, multiplier width in 4-bit digits (1..NMAX) |
| `a`           | in  | 4·MMAX           | multiplicand, in the low 4M bits |
| `b`           | in  | 4·NMAX           | multiplier, in the low 4N bits |
| `busy`        | out | 1                | high for exactly the cycle count above |
| `done`        | out | 1                | one-cycle pulse after the last busy cycle |
| `product`     | out | 4·(MMAX+NMAX)    | a·b, zero- or sign-extended; valid from `done` until the next start |

On the clock edge where `start` is seen, the operands, sizes and mode are
latched. After that the inputs may change freely. An assertion flags a start
with a size outside 1..MMAX / 1..NMAX; in hardware such sizes are clamped.

Parameters: `K`, `L` (cluster shape, default 4 x 4) and `MMAX`, `NMAX`
(largest operand size in digits, default 8, i.e. 32 x 32 bits). The right
and mux registers have ceil(NMAX/L) levels.

At the default size, coarse synthesis with Yosys gives about 2,660 word-level
cells (2,080 of them in the 16-block cluster), 157 flip-flops and 62 bits of
register-file storage. The cluster dominates, and the cluster does not grow
with the largest operand size.

One clock cycle must cover the combinational path through the cluster. In
the worst case that is a ripple of about 4K + 4L cells, plus the edge
multiplexers, or the 4L-bit final adder. This path is much shorter than the
one through a full parallel array. That shortness is where the digit-serial
form gains back time.

## What is fixed and what was chosen here

The published DigiFAB design fixes:
- the reduced 4 x 4 block without the right-column adder;
- the K x L cluster reused over tiles;
- the padding to M* x N*;
- the three register groups with the widths and levels in the table above;
- the one extra pass and the cycle formula.

These parts are this implementation's own choices:
- the cell-level structure of the block (ripple carries, diagonal sums, and
  the orientation that gives the 4 / 8L-1 edge widths);
- the Baugh-Wooley signed scheme and where its constants enter;
- column-first order, chosen from the two orders the design allows because
  only it matches the register levels;
- the use of the mux registers for the corner bit. The published design only
  sizes them;
- how the extra pass works: a dedicated 4L-bit adder reading the registers
  bottom up, not the cluster itself;
- the operand/product registers and the start/busy/done handshake.

The fully parallel array the design is compared against is not provided as a
separate module. It is `fab_cluster` with K = M and L = N, plus an adder on
its right edge. Area and delay figures (transistor counts, clock periods in a
standard-cell library) are outside what RTL can reproduce. They are not
modelled.

## Simulating

Every testbench ends with a line `TB_RESULT checks=<n> failures=<n>`. With
Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb rtl/digifab_pkg.sv tb/tb_digifab.sv \
              --top-module tb_digifab -o sim && ./obj_dir/sim

Replace `tb_digifab` with any other testbench:

| testbench            | what it checks |
|----------------------|----------------|
| `tb_rfab`            | all digit pairs, all modes: value conservation across the block, plain products |
| `tb_fab_cluster`     | 4x4, 2x3 and 3x1 clusters: conservation, unsigned and signed products |
| `tb_top_registers`, `tb_right_registers`, `tb_mux_registers` | register behaviour, including read-before-write |
| `tb_edge_mux`        | register forwarding inside the array, correction constants on its boundary |
| `tb_final_adder`     | chained slices against integer sums |
| `tb_digifab_ctrl`    | tile order, extra-pass order, busy length, done pulse, start ignored while busy |
| `tb_digifab`         | default build end to end: every size 1..8 x 1..8 digits, both modes, extreme operands, random operands, exact cycle counts |
| `tb_digifab_shapes`  | 32 x 32 multiplies on ten cluster shapes with their cycle counts |
| `tb_digifab_nxn`     | N x N multiplies, N = 4..64 bits, on one 4 x 4 cluster built for 64 x 64 bits, with cycle counts |

`tb_digifab` runs at the default parameters, and counts and requires each
mechanism: signed and unsigned runs, padded sizes, several tile columns and
rows, the corner transfer, single-tile runs and an ignored start.
