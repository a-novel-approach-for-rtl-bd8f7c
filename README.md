# Smith-Waterman matrix fill with Recursive Variable Expansion (b = 2)

Smith-Waterman local alignment scores two sequences S and T by filling a
matrix H, one cell per character pair:

    H(i,j) = max( 0,
                  H(i-1,j-1) + s(S(i),T(j)),     diagonal: match / mismatch
                  H(i-1,j)   - d,                gap
                  H(i,j-1)   - d )               gap

with H(0,j) = H(i,0) = 0. Every cell needs its upper, left and upper-left
neighbours, so the usual hardware (a systolic array) can only compute one
anti-diagonal of cells per step: an m x n matrix takes m + n - 1 steps.

Recursive Variable Expansion (RVE) removes dependencies inside a block of
cells by substituting, for every neighbour that lies inside the block, that
neighbour's own expression, repeatedly, until each cell is written in terms
of the block's inputs only. All cells of the block can then be evaluated at
the same time, at the price of duplicated arithmetic. This RTL implements
the RVE block with blocking factor b = 2, which produces a 2 x 2 tile of H
in one step, and an array that tiles a larger matrix with such blocks.

## The 2 x 2 block (`rve_b2`)

Name the five cells bordering the tile and the four scores as follows
(rows run along S, columns along T):

    H00 H01 H02          a = s(S(i-1),T(j-1))   b = s(S(i-1),T(j))
    H10 o1  o2           c = s(S(i),  T(j-1))   e = s(S(i),  T(j))
    H20 o3  o4

where H00 = H(i-2,j-2), H01 = H(i-2,j-1), H02 = H(i-2,j), H10 = H(i-1,j-2),
H20 = H(i,j-2) and the outputs are o1 = H(i-1,j-1), o2 = H(i-1,j),
o3 = H(i,j-1), o4 = H(i,j).

Applied directly, the recurrence makes o2 and o3 wait for o1, and o4 wait
for all three: three max-plus stages in series. Substituting o1 into o2, o3
and o4, and o2, o3 into o4, and using max(x,y) + k = max(x+k, y+k), gives
four independent flat maxima:

    o1 = max(0, H00+a, H01-d, H10-d)
    o2 = max(0, H01+b, H02-d, H00+a-d, H01-2d, H10-2d)
    o3 = max(0, H10+c, H20-d, H00+a-d, H01-2d, H10-2d)
    o4 = max(0, e, H00+a+e, H01+e-d, H10+e-d, H01+b-d, H10+c-d,
             H02-2d, H20-2d, H00+a-2d, H01-3d, H10-3d)

Each term is one alignment path from a boundary cell (or from the zero
restart) to the output cell. Terms that are just -d or -2d are left out:
the gap penalty is unsigned, so the zero term always beats them. Every
other term is kept, because with a negative mismatch score or a zero gap
penalty any of them can be the maximum.

In hardware, four equality comparators (`score_lut`) give a, b, c and e;
the 28 terms are sums of at most three operands formed in parallel; and
each output is a balanced binary tree of two-input max operators
(`max_tree`) over its 4, 6, 6 or 12 terms. The longest path is therefore
compare, two additions and four max levels, with no output waiting for
another. The block is purely combinational.

Terms are formed in a signed word three bits wider than a score, which
holds a score minus 3d and a score plus two match scores without overflow.
Because every maximum includes 0, the outputs are non-negative and are
returned as unsigned SCORE_W-bit values. A score that exceeds
2^SCORE_W - 1 wraps, so SCORE_W must hold the largest score expected
(16 bits covers 32,767 consecutive matches at match score 2).

## Tiling larger matrices (`rve_array`, the top)

`rve_array` fills a (2·BR) x (2·BC) matrix with one `rve_b2` per tile,
BR x BC blocks in all. Block (p,q) takes its boundary cells from the
registered outputs of blocks (p-1,q-1), (p-1,q) and (p,q-1), the same
neighbour wiring a systolic array of single cells uses. Blocks on the top
row or left column get zeros instead, which implements the
initialisation step without storing a zero row and column.

A tile depends only on tiles on earlier tile anti-diagonals. The
controller therefore loads all tiles with p + q = k in step k, and the
matrix is complete after BR + BC - 1 steps, where a cell-per-step
wavefront over the same matrix needs 2·BR + 2·BC - 1 steps. For example,
the 5 x 5 matrix of GATTA against GACTC, padded to 6 x 6, takes 5 steps
instead of 9 anti-diagonals. The price is area: each tile evaluates 28
terms, where four single cells would evaluate 16 (four each).

With the defaults (BR = BC = 1) the array is exactly one b = 2 block
computing a 2 x 2 matrix in a single clock. This is the reference
configuration.

### Interface and timing

| port          | dir | width                  | meaning |
|---------------|-----|------------------------|---------|
| `clk`         | in  | 1                      | clock |
| `rst_n`       | in  | 1                      | synchronous reset, active low; clears the controller and `h` |
| `start`       | in  | 1                      | sampled while idle: latches `s_seq`, `t_seq`, `gap_penalty` and starts a fill |
| `s_seq`       | in  | `CHAR_W` x 2·BR        | row sequence, `s_seq[r]` = S(r+1) |
| `t_seq`       | in  | `CHAR_W` x 2·BC        | column sequence, `t_seq[c]` = T(c+1) |
| `gap_penalty` | in  | `SCORE_W`              | gap penalty d (unsigned) |
| `busy`        | out | 1                      | high for exactly BR+BC-1 cycles after the start edge |
| `done`        | out | 1                      | one-cycle pulse in the first cycle in which `h` is complete |
| `h`           | out | `SCORE_W` x 2·BR x 2·BC | filled matrix, `h[r][c]` = H(r+1,c+1) |

The inputs matter only on the clock edge that samples `start`. `h` stays
valid until the next `start`. A `start` while `busy` is ignored. A new fill
may start in the cycle `done` is high. Tiles of later anti-diagonals keep
their old values until their step, so read `h` only after `done`.

### Parameters

| parameter        | default | notes |
|------------------|---------|-------|
| `BR`, `BC`       | 1, 1    | block rows and columns; matrix dimensions must be even (pad with a character that never matches) |
| `CHAR_W`         | 8       | character width; only equality is used, so ASCII letters or 2-bit codes both work |
| `SCORE_W`        | 16      | width of H and of the gap penalty |
| `MATCH_SCORE`    | 2       | score of equal characters |
| `MISMATCH_SCORE` | 0       | score of different characters; may be negative |

The default scores (2 and 0) and d = 0 are the scoring of the reference
2 x 2 case study. For rows GG against columns AG that case study fills
the matrix 0 2 / 0 2.

## Files

| file | contents |
|------|----------|
| `rtl/sw_pkg.sv`      | default widths and scores, controller state type |
| `rtl/score_lut.sv`   | match/mismatch score of a character pair |
| `rtl/max_tree.sv`    | binary max tree |
| `rtl/rve_b2.sv`      | the expanded 2 x 2 block |
| `rtl/rve_array.sv`   | top: block array and fill controller |
| `tb/sw_ref_pkg.sv`   | reference: the recurrence evaluated one cell at a time |
| `tb/tb_score_lut.sv`, `tb/tb_max_tree.sv`, `tb/tb_rve_b2.sv` | unit tests |
| `tb/tb_rve_array.sv` | 3 x 4 blocks, random sequences, per-step wavefront and latency checks |
| `tb/tb_rve_array_full.sv` | default configuration: the 2 x 2 case study and all 2-letter DNA pairs |
| `tb/tb_fig1_matrix.sv` | GATTA vs GACTC 5 x 5 example on a 3 x 3 block array |

## Verification

The block and array testbenches compare against the plain recurrence,
evaluated cell by cell, and never against the expanded formulas. Each
testbench prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

- `tb_score_lut`, `tb_max_tree`: all 4-bit character pairs plus pairs that
  differ in one bit; max trees of 1, 4, 5, 6 and 12 random signed terms
  against a linear scan.
- `tb_rve_b2`: 5,000 random tiles, with boundary values from small (ties
  likely) to large, gap penalties from 0 up, and two scorings (2/0 and
  1/-1).
- `tb_rve_array`: 300 fills of a 6 x 8 matrix with match 1 and mismatch -1.
  After every step it checks that all tiles up to the current anti-diagonal
  are already final. It also checks that `busy` lasts exactly 6 cycles,
  that `done` pulses once, that `start` during a fill is ignored, that
  back-to-back fills work, and that the matrix holds while idle.
- `tb_rve_array_full`: the unmodified top. It runs the case study plus 1,024
  exhaustive 2-letter cases, and each fill must take one cycle.
- `tb_fig1_matrix`: reproduces the 25 values of the 5 x 5 example. The
  values imply match 1, mismatch -1 and gap penalty 2; those scores were
  read back from the published matrix, not stated with it.

To run one with Verilator (the packages first):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/sw_pkg.sv tb/sw_ref_pkg.sv rtl/score_lut.sv rtl/max_tree.sv \
        rtl/rve_b2.sv rtl/rve_array.sv tb/tb_rve_array.sv \
        --top-module tb_rve_array
    ./obj_dir/Vtb_rve_array

The simulations are two-state, so everything the design reads is reset or
driven.

## Choices made here, and limits

These points follow the reference design:

- the recurrence and its zero initialisation;
- a combinational b = 2 block with the inputs and four outputs of the
  published block symbol;
- each output depending only on its listed boundary cells;
- the default scoring.

These are this implementation's own choices:

- The complete term lists. The reference states only which boundary
  cells each output depends on.
- Which output is which cell: o1 to o4 in row-major order.
- Rows along S and columns along T.
- All widths, the signed term arithmetic and wrap-around on overflow.
- The array of blocks, its anti-diagonal schedule and its
  start/busy/done handshake. The reference design only says the b = 2 block
  can serve as a macro for larger arrays.

Not included:

- **Trace back** and the search for the highest-scoring cell. The array
  returns the whole matrix for whatever logic or software follows.
- **Larger blocking factors.** Only b = 2 is built. A b = 3 block would
  follow the same substitution, but with many more terms per cell.
- **The single-cell systolic array.** It is the usual approach that RVE is
  measured against, not part of this design.
- **FPGA timing and area.** The reference reports 13 ns per b = 2 block at
  a 30 ns clock and 95 Virtex-II Pro slices, against 49.8 ns and 70 slices
  for a 2 x 2 systolic array. These numbers belong to a different
  implementation and were not reproduced.
