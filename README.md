# 8x8 2D DCT without multipliers: distributed arithmetic, two or four ROMs per coefficient

This core computes the two-dimensional 8x8 discrete cosine transform of blocks
of 8-bit samples, as used in JPEG, MPEG and H.26x encoders, without a single
multiplier. Every multiplication by a cosine constant is replaced by
*distributed arithmetic* (DA): each output coefficient is an inner product of
four butterfly outputs with four fixed integer weights, and that inner product
is built bit plane by bit plane from a 16-entry table of precomputed weight
sums. Speed comes from reading several bit planes per clock: two (one ROM for
even planes, one for odd planes) or four (four ROM copies), selected by the
parameter `NUM_ROMS`.

The 2D transform uses row-column decomposition: a 1D DCT over each of the
eight rows, a transpose register, then the same 1D DCT over each of the eight
columns.

```
 in_row (64 b) ──► row 1D DCT ──► transpose register ──► column 1D DCT ──► out_col (112 b)
                   8 b in, 12 b out   8 x 96-bit regs      12 b in, 14 b out
                                      + 8 x 8:1 muxes
```

## The arithmetic

### Even/odd split

An 8-point DCT splits into two independent 4x4 products after one butterfly
stage. With `s[i] = x[i] + x[7-i]` and `d[i] = x[i] - x[7-i]` (i = 0..3):

```
 X0 = [ A  A  A  A ] s        X1 = [ D  E  F  G ] d
 X2 = [ B  C -C -B ] s        X3 = [ E -G -D -F ] d
 X4 = [ A -A -A  A ] s        X5 = [ F -D  G  E ] d
 X6 = [ C -B  B -C ] s        X7 = [ G -F  E -D ] d
```

The constants are `64 * sqrt(2) * cos(k*pi/16)` rounded to the integers of the
8-point integer cosine transform:

| name | angle   | value |
|------|---------|-------|
| A    | pi/4    | 64    |
| B    | pi/8    | 83    |
| C    | 3pi/8   | 36    |
| D    | pi/16   | 89    |
| E    | 3pi/16  | 75    |
| F    | 5pi/16  | 50    |
| G    | 7pi/16  | 18    |

They are defined once, in `rtl/dct_pkg.sv` (function `coef`).

### Distributed arithmetic

For one output, `X = sum_i w_i * v_i` where `v_i` are four two's-complement
words of B bits and `w_i` are fixed. Writing each `v_i` as its bits,

```
 X = - 2^(B-1) * T(b_{B-1}) + sum_{j<B-1} 2^j * T(b_j)
```

where `b_j` is the 4-bit address formed by bit j of the four words and `T(a)`
is the sum of the weights whose address bit is set. `T` is a 16-word ROM per
coefficient (`dct_rom`); its largest entry is 4 x 64 = 256, so a word is 10
bits signed. Word 0 is zero.

The RAC (ROM and accumulator, `dct_rac`) consumes the planes MSB first, P at a
time. Each cycle it reads P copies of the ROM, weights plane j of the slice by
`2^j`, adds them into a partial sum, and updates `acc = (acc << P) + partial`.
In the first slice the most significant plane is the sign plane, so its ROM
word is negated. With P = 2 the two ROMs serve the even and the odd plane of
each pair; with P = 4 four ROMs serve four consecutive planes. P = 1 is also
accepted and gives the plain bit-serial RAC.

The parallel-in serial-out registers (`dct_piso`) produce the addresses: one
serialiser holds the four sums (it feeds X0, X2, X4, X6), and another holds the
four differences (it feeds X1, X3, X5, X7).

### Widths and scaling through the datapath

| point                        | width | note |
|------------------------------|-------|------|
| input sample                 | 8     | two's complement (level-shifted pixel) |
| row butterfly                | 9     | full precision |
| row DA word                  | 10    | a zero bit appended below the 9 bits. This gives an even number of planes, and it is free because ROM word 0 is zero. With 4 ROMs it is sign-extended to 12. |
| RAC accumulator              | 20    | both passes |
| row result (transpose word)  | 12    | `(acc + 32) >>> 6` |
| column butterfly / DA word   | 12    | the 13-bit sum or difference is halved (floor) |
| column result (output)       | 14    | `(acc + 32) >>> 6` |

Combining the scale factors: the output is `Z = H x H^T / 4096`, where `H` is
the 8x8 integer cosine matrix. H equals `128*sqrt(2)` times the orthonormal DCT
matrix, so `Z` is **8 times the orthonormal 2D DCT**, up to rounding. The
extreme DC values -8192 (all samples -128) and 8128 (all +127) fill the 14-bit
output exactly. No intermediate value can overflow for any 8-bit input. The
shift of 6 in both passes was chosen because it is the largest scale at which
that holds. Against the exact real-valued DCT (times 8), the test blocks
deviate by at most about 30 LSB of 8192. Most of that error comes from the
integer weights themselves; for example, C = 36 where `64*sqrt(2)*cos(3pi/8)`
is 34.6.

Coefficient order: `Z[k][p]`, where k is the vertical frequency (the column
pass) and p the horizontal frequency (the row pass).

## Cycle budget

A 1D pass takes one vector every R cycles, where R = ceil(DA word / P):

| configuration | row RAC period R | column RAC period S | block latency | block period |
|---------------|------------------|---------------------|---------------|--------------|
| `NUM_ROMS=2` (default) | 5 | 6 | 101 | 90 |
| `NUM_ROMS=4`           | 3 | 3 | 61  | 53 |

* **Block latency** is `8R + 8S + 13`. It counts the cycles from the cycle in
  which the first row is taken to the cycle in which the last output column
  is on `out_col`.
* **Block period** is `8R + 7S + 8`. It is the spacing of blocks when the
  source never waits.

The reference architecture this design follows quotes 105 cycles per block
for two ROMs and 65 for four. Both are `8R + 8S + 17`, the same structure with
4 more cycles of fixed pipeline overhead than this implementation has. The RAC
periods (5/6 and 3/3 cycles) are identical.

The transpose register holds one block at a time (768 flip-flops). Row
results of the next block are accepted as soon as the last column of the
current block has been read out of it. This lets row processing of block n+1
overlap the tail of the column pass of block n. There is no second
(ping-pong) bank.

Inside each 1D pass a vector goes through these registers:

1. input register
2. butterfly register
3. serialiser load
4. R or S slices, each through ROM-output register → partial-sum register → accumulator
5. rounding and output register

A vector therefore appears its pass period (R or S) plus 6 cycles after the
cycle in which it was taken.

## Interface of `dct_2d`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset (control state only; data registers are not reset) |
| `in_valid` | in | 1 | `in_row` holds the next row of the current block |
| `in_ready` | out | 1 | the row is taken at this edge if `in_valid` is high |
| `in_row` | in | 64 | samples x0..x7, x0 in bits 63:56, two's complement |
| `out_valid` | out | 1 | one output column, for one cycle |
| `out_idx` | out | 3 | column index p (0..7, in order) |
| `out_col` | out | 112 | Z[0][p] in bits 111:98 down to Z[7][p] in bits 13:0, 14-bit two's complement |

Rows are sent in order, eight per block. `in_ready` drops for R-1 cycles after
each row. It also stays low after the eighth row until the transpose register
has been read. The output has no back-pressure: the consumer must take every
column.

Parameter: `NUM_ROMS`, 2 (default) or 4. The value 1, the bit-serial RAC, is accepted too (10 and 12 cycles per row and column) but is not exercised by the top-level tests.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/dct_pkg.sv` | package | widths, integer weights `coef(k,i)`, ROM contents `rom_word`, `slices` |
| `rtl/dct_2d.sv` | `dct_2d` | top: row pass, transpose register, column pass, block sequencing |
| `rtl/dct_1d.sv` | `dct_1d` | one 1D pass: input register, butterfly, two serialisers, eight RACs, rounding |
| `rtl/dct_butterfly.sv` | `dct_butterfly` | registered sums and differences, optional halving |
| `rtl/dct_piso.sv` | `dct_piso` | four words to P 4-bit addresses per cycle, MSB first |
| `rtl/dct_rac.sv` | `dct_rac` | P ROM copies, partial-sum adder, scaling accumulator |
| `rtl/dct_rom.sv` | `dct_rom` | 16 x 10-bit weight-sum table of one coefficient |
| `rtl/dct_transpose.sv` | `dct_transpose` | 8 x 96-bit row-serial registers, 8 column multiplexers |

`dct_1d` is parameterised so that the same module serves both passes:

* row pass: `IN_W=8, BF_SHIFT=0, APPEND_ZERO=1, OUT_W=12`
* column pass: `IN_W=12, BF_SHIFT=1, APPEND_ZERO=0, OUT_W=14`

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. `tb/dct_ref_pkg.sv`
is an integer model of the two passes, written from the equations above
rather than from the RTL. It uses the full 8x8 integer matrix, not the
even/odd ROM form. It also provides the real-valued orthonormal DCT.

| testbench | what it checks |
|-----------|----------------|
| `tb_dct_2d` | Both `NUM_ROMS=2` and `NUM_ROMS=4` run on 12 blocks: constant extremes, a full-scale checkerboard, a ramp, and random blocks. Some blocks come back to back, some with random source gaps. Every coefficient is checked bit-exactly against the model and within 40 of 8x the real DCT. Latency and block period are checked. The test also counts row pacing, holds due to a full transpose register, and source gaps, and requires each to occur. |
| `tb_dct_2d_full` | One random block at default parameters. Checks all 64 coefficients and the 101-cycle latency. |
| `tb_dct_1d` | Row and column configurations, each with 2 and 4 ROMs, 200 vectors. Checks bit-exact output, vector spacing R, and latency R+6. |
| `tb_dct_rac` | P = 1, 2, 4 with all eight coefficients on random 12-bit words. Checks the exact inner product, plus result timing. |
| `tb_dct_rom` | All 16 words of all 8 ROMs. |
| `tb_dct_butterfly` | Full-precision and halving butterflies, including hold when `en` is low. |
| `tb_dct_piso` | Every slice for P = 2 and P = 4, with stalls. |
| `tb_dct_transpose` | Four blocks, with columns read in scrambled order. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct_2d.sv --top-module tb_dct_2d
./obj_dir/Vtb_dct_2d
```

Every file in `rtl/` passes `verilator --lint-only -Wall`. The remaining
warnings are:

* `UNUSEDPARAM`, for package constants a module does not need;
* `SYNCASYNCNET` in `dct_2d`, because the reset is asynchronous in the
  registers and also appears in the assertions' `disable iff`.

## Where this design makes its own choices

The reference architecture fixes the block structure, the widths (8 / 9 / 10
/ 20 / 12 and 12 / 14 bits), the ROM width, the RAC organisation for two and
four ROMs, the cycles per row and column, and the transpose register. The
following are this design's own choices:

* **Signed input.** Samples are taken as signed 8-bit. That is the only
  reading under which a 9-bit butterfly is full precision.
* **Rounding.** Both passes round half up with a shift of 6.
* **Column butterfly.** It halves its 13-bit result (floor) to stay at 12
  bits.
* **4-ROM row pass.** The 10-bit DA word is sign-extended to 12 bits, giving
  3 cycles per row.
* **Partial-sum adder.** It is wider than 10 bits. In the X0 RAC, three ROM
  words of 256 can add up to 768.
* **Pipelining.** A register after the ROMs and one after the partial-sum
  adder. This is why the fixed overhead is 13 cycles where the reference
  figures imply 17.
* **Sequencing and interface.** The handshake, reset scheme and block
  sequencing are not taken from any source. Neither are the port bit order
  and the column-by-column output order.
* **Transpose loading.** The transpose register loads one whole row per
  shift, with all eight coefficients already in ascending order. All eight
  RACs of a pass finish together, so no reordering stage is needed.
* **Single transpose bank.** There is one transpose register, not a
  ping-pong pair.

Not covered: clock frequency and FPGA resource use cannot be judged from this
RTL. The quoted rates (about 206 and 252 Msamples/s at 338.5 and 256 MHz)
depend on an FPGA implementation that this code does not reproduce.
