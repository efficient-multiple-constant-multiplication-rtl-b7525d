# Packing several constant multiplications into one FPGA DSP slice, applied to the HEVC 2D DCT

A DSP slice of a Xilinx 7-series/Virtex-6 FPGA (DSP48E1) multiplies a signed
25-bit operand by a signed 18-bit operand and adds a 48-bit operand:
`P = A*B + C`. When one input `V` has to be multiplied by several constants
(multiple constant multiplication, MCM), the usual mapping spends one slice per
constant, although most of the 25 x 18 multiplier stays unused.

This RTL implements a way to compute several products `V*M1, V*M2, ...` with a
single slice, following the method of the article *Efficient Multiple Constant
Multiplication Using DSP Blocks in FPGA*. It then uses it in a complete
forward 2D DCT for HEVC (4x4 to 32x32 transform units), where the 27 distinct
constant multiplications of each 1D pass need 14 slices in the column pass and
21 in the row pass instead of one slice each. The whole transform instantiates
380 slices.

## The constant manipulation

Any positive constant can be written as

    M = 2^s * (1 + 2^n * MM)

with `s` the number of trailing zeros of `M` and `n` the number of trailing
zeros of `(M >> s) - 1`. This choice gives the smallest `MM`. Splitting a
`v`-bit signed input as `V = 2^n * (V >>> n) + V[n-1:0]` gives

    V * M = { MM*V + (V >>> n) , V[n-1:0] } << s

So the multiplier only has to produce `Q = MM*V + (V >>> n)`. The low `n` bits
of the product are bits of `V` itself, and `s` is only a wire shift. `MM` is
`s + n` bits shorter than `M`, and the addition of `V >>> n` is free because
it uses the slice's C input.

Example: `78913 = 1 + 2^6 * 1233` (s = 0, n = 6). A 17-bit constant becomes an
11-bit one. `100663360 = 2^6 * (1 + 2^19 * 3)` (s = 6, n = 19). A 27-bit
constant, which could not even enter the 25-bit port, becomes the 2-bit `3`.

## Packing several constants into one slice

`Q_i` needs `W_i = v + bitlen(M_i >> s_i) - n_i` bits. The slice computes all
of them at once:

| slice port | value |
|---|---|
| A (25 bits) | `sum_i MM_i << O_i`, a constant, with `O_i = W_1 + ... + W_(i-1)` |
| B (18 bits) | `V`, sign-extended |
| C (48 bits) | `sum_i field_i(V >>> n_i) << O_i` |
| P | field `i` (bits `O_i .. O_i+W_i-1`) is exactly `Q_i` |

`field_i(x)` is `x` in two's complement on `W_i` bits. The product
`V*M_i` is then `{P[O_i +: W_i], V[n_i-1:0]} << s_i`. Outside the slice this
is only wiring.

For the two constants above and `v = 9`, the fields are 20 and 11
bits wide and `A = 3 << 20 | 1233`.

**Why the fields come out clean for negative inputs.** This is the subtle part.
With a negative `V`, every `Q_i` is negative. In the plain sum
`sum_i Q_i * 2^O_i`, each field would read one less than its `Q_i`, because of
the borrow that the negative field below it takes. The C operand puts the sign
bits of `V >>> n_i` above each field, from bit `v - n_i` up to `W_i`. That adds
exactly `2^O_(i+1)` for a negative input, which cancels the borrow. The
published form of this correction is
`signext = V[v-1] * (2^(m-s) - M/2^s)` on `m - s` bits, above `V[v-1:n]`. It
describes the same `P` when `V` enters the multiplier zero-extended (unsigned).
This design keeps `B` signed and uses the plain sign extension, for two
reasons:

* an 18-bit input (used in the row pass) fits the signed 18-bit port only that
  way;
* for `n >= v` (the second constant of the example) the plain sign extension
  stays correct.

**When a group fits.** A group of constants fits one slice when

    cost = sum_i (bitlen(M_i >> s_i) - n_i) + v * (k - 1) <= 24

This rule is the same as requiring the packed constant to stay a positive
25-bit signed number. The whole result then needs at most `v + 24 <= 42` of
the 48 bits of P. `mcm_pkg::group_cost` implements this rule.
`mcm_dsp_group` refuses at elaboration a group that breaks it. Every
manipulated constant costs at least one bit, so at most 8 constants fit one
slice (`v = 2`). The design allows 8 (`mcm_pkg::MAX_K`). A tabulation of
`24/(v-1)`, up to 24 constants at `v = 2`, is an upper bound that ignores the
constants' own widths.

**Inputs wider than 18 bits.** A single constant with a 19- or 20-bit input
(row pass) cannot have `V` on the 18-bit port. The module then swaps the
operands: `V` goes on A and `MM` on B.

## Multiple constant multiplier (`mcm_block`)

A multiplier block takes one input and a list of constants:

* powers of two are shifts of the input;
* a constant that is a power-of-two multiple of a constant already on a slice
  is a shift of that product (88 = 22 << 2 in the 32-point DCT);
* every other constant must appear in one row of the `GROUPS` table, and each
  row is one slice (`mcm_dsp_group`).

All products of a block appear two clock cycles after the input: the slice's
input and output registers. Shifted products are delayed to match.

## Finding a grouping (`mcm_map_pkg`, `mcm_auto`)

Which constants should share a slice? `mcm_map_pkg::map_constants(v, consts)`
answers this with a search, and it runs while the design elaborates:

1. Drop the constants that need no slice: zeros, powers of two, duplicates,
   and power-of-two multiples of another constant in the list.
2. Sort the rest in ascending order. Pick a combination size `K` from the
   input width: 24, 12, 8, 6, 4, 3 and 2 for `v` up to 2, 3, 4, 6, 8, 12 and
   18 bits. Above 18 bits `K` is 1. `K` is capped at `MAX_K = 8`.
3. Split the list into combinations of `K`, level by level. At each level,
   try the combinations of the unused constants in lexicographic order and
   take the first one that passes the cost rule. If a level has no such
   combination, undo the previous level's choice and go on with the
   combination after it.
4. If no split exists, append a zero "constant" and search again. Repeat
   until a split is found. A zero is an empty slot, so each zero lets one
   slice hold fewer than `K` constants. Each combination becomes one slice.

The search is exhaustive, so it finds the fewest slices the cost rule allows
for a given number of zeros. Three shortcuts make it fast enough to run at
elaboration time, and none of them changes the grouping it finds:

* every combination contains the first unused constant, and equal entries
  (the zeros) are taken in order, so no split is tried twice;
* a branch is abandoned when the constants left cannot fit in the slices
  left, even at the most constants per slice that the cost rule allows;
* zero counts that do not make the list a multiple of `K` are skipped.

`mcm_auto` takes a constant list and an input width, calls
`map_constants`, and builds an `mcm_block` from the result. It is the
complete path from a constant list to hardware.

Run on the HEVC lists, the search needs the same number of slices as the
published groupings: 1, 2, 4 and 7 in the column pass, and 2, 4, 5 and 10 in
the row pass. It does not always pair the same constants. At 12 bits, for
example, it finds (18,50),(75,89) where the published grouping is
(18,75),(50,89). The 4-point cores use `mcm_auto`, because there the two
groupings are identical. The odd datapaths pass the published groupings,
which are in `dct_pkg`, to `mcm_block`:

| datapath (multiplier input) | column pass | slices | row pass | slices |
|---|---|---|---|---|
| 4-point core {64, 83, 36} | 13 bit: (36,83) | 1 | 20 bit: (36),(83) | 2 |
| 8-point odd {89,75,50,18} | 12 bit: (18,75),(50,89) | 2 | 19 bit: each alone | 4 |
| 16-point odd {90,87,...,9} | 11 bit: (9,87),(80,70),(25,43),(57,90) | 4 | 18 bit: (25,90),(80,43),(9,70),(57),(87) | 5 |
| 32-point odd {90,90,88,...,4} | 10 bit: (13,67),(22,85),(82,78),(31,90),(38,73),(46,61),(54) | 7 | 17 bit: (82,73),(22,90),(13,85),(31),(38),(46),(54),(61),(78),(67) | 10 |

## The HEVC 2D DCT

### 1D transform (`dct1d`)

The HEVC N-point DCT matrices are nested, so a 32-point transform splits by
butterflies:

* `E[k] = x[k] + x[31-k]` feeds a 16-point DCT, which gives the even
  outputs;
* `O[k] = x[k] - x[31-k]` feeds a 16 x 16 "odd" matrix, which gives the odd
  outputs.

The 16-point DCT splits the same way, and so on down to the 4-point core. This
gives four datapaths:

| datapath | module | what it computes |
|---|---|---|
| first 4x4 | `dct4_datapath` | the 4-point core |
| second 4x4 | `dct_odd_datapath` with N = 4 | odd part of the 8-point DCT |
| 8x8 | `dct_odd_datapath` with N = 8 | odd part of the 16-point DCT |
| 16x16 | `dct_odd_datapath` with N = 16 | odd part of the 32-point DCT |

A 4x4 TU uses only the core. 8x8 adds the second 4x4 datapath, 16x16 adds the
8x8 datapath, and 32x32 uses all four. The TU size selects where the input
enters the butterfly chain.

Each column of an odd matrix holds every odd constant once, up to sign. So each
input of an N x N datapath gets one `mcm_block` with the N constants, and each
output is a signed sum of N products. Each butterfly level adds one bit, so the
multipliers see 10/11/12/13-bit inputs in the column pass (9-bit residuals) and
17/18/19/20-bit inputs in the row pass (16-bit intermediate values). This is
why the two passes use different groupings.

After the sums, each output is rounded and shifted right as in the HEVC
reference encoder, then saturated to 16 bits and registered:

* column pass: shift by `log2(N) - 1`, for 8-bit video (`SHIFT_ADD = BIT_DEPTH - 9`);
* row pass: shift by `log2(N) + 6`.

Latency is 3 cycles, and one vector is accepted every cycle.

### Transpose memory and control (`transpose_mem`, `dct2d_top`)

The column unit writes each transformed column into a 32 x 32 x 16-bit
register array. After the last column, the array is read one row per cycle into
the row unit, which outputs the final coefficients one row per cycle. The array
must write a whole column and read a whole row in one cycle, so it is made of
flip-flops rather than block RAM.

Interface of `dct2d_top`:

* Input: `in_valid`/`in_ready` handshake. `in_col[r]` is the residual in row
  `r` of the current column. `in_size` (0..3 = 4x4..32x32) is sampled with the
  first column. Lanes at `N` and above are ignored.
* Output: `out_valid`, `out_size` and `out_row`. `out_coef[c]` is coefficient
  (`out_row`, `c`). Lanes at `N` and above are zero. There is no output
  back-pressure.

Timing:

* The first row comes out 7 cycles after the last column is accepted: 3 cycles
  for the column unit, 1 for the memory and 3 for the row unit. The rows then
  follow on consecutive cycles.
* There is one buffer, so `in_ready` is low for `3 + N` cycles after each TU's
  last column.
* A 32x32 TU therefore occupies the input for 68 cycles.

### Resources

The design instantiates 380 DSP slices:

* column pass: 4x1 + 4x2 + 8x4 + 16x7 = 156;
* row pass: 4x2 + 4x4 + 8x5 + 16x10 = 224.

Six of these are in the even half of the two 4-point cores. They form 83x and
36x products that no output uses, so synthesis removes them and 374 remain.

The 16384-bit transpose buffer is the largest single storage element. No
timing or LUT figures are claimed for this RTL.

## Design choices beyond the method

These are this design's own choices:

* **Pipelining.** The slice has one input register stage and one output
  register (latency 2). The 1D units add one output register.
* **Datapath internals.** The partial-butterfly structure, the scaling shifts
  and the 16-bit saturation follow the HEVC reference transform.
* **Control.** The valid/ready handshake and the single-buffer schedule, which
  stalls the input while rows are read.
* **Multiplier blocks in the core.** One multiplier block per butterfly output
  in the 4-point core, rather than only on the two odd values.
* **Mapping at elaboration.** The grouping search is written as SystemVerilog
  functions that feed a parameter, rather than as a separate program that
  writes Verilog source. Its cost check counts only the nonzero constants of
  a combination. If the zeros counted too, (13,67) could not share a slice at
  10 bits, and the published 10-bit grouping has exactly that pair.
* **Signed B port.** The signed-B form of the sign correction (see above).
* **Port swap** for inputs wider than 18 bits.

The slice model (`dsp48_mac`) has only the multiply-add path. The pre-adder,
the pattern detector, the cascade ports and the run-time opcode selection are
left out.

## Files

| file | contents |
|---|---|
| `rtl/mcm_pkg.sv` | constant manipulation, field widths, cost rule, table types |
| `rtl/dct_pkg.sv` | HEVC coefficient table, matrix entry function, groupings |
| `rtl/dsp48_mac.sv` | the slice: registered `P = A*B + C` |
| `rtl/mcm_dsp_group.sv` | several constants on one slice |
| `rtl/mcm_block.sv` | multiple constant multiplier (groups + shifts) |
| `rtl/mcm_map_pkg.sv` | the grouping search (`map_constants`) |
| `rtl/mcm_auto.sv` | multiplier that computes its own grouping |
| `rtl/dct4_datapath.sv`, `rtl/dct_odd_datapath.sv` | the four DCT datapaths |
| `rtl/dct1d.sv` | multi-size 1D DCT |
| `rtl/transpose_mem.sv` | transpose buffer |
| `rtl/dct2d_top.sv` | top: column DCT, buffer, row DCT, controller |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_ref_pkg.sv` is the reference DCT |

## Verification

Each testbench compares the outputs, cycle by cycle, with values computed
independently in 64-bit integer arithmetic. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_mcm_dsp_group` covers five groups:
  * the example above, for all 512 inputs;
  * four constants on a 4-bit input;
  * eight constants on a 2-bit input;
  * a cost-24 pair on an 18-bit input;
  * a single constant on a 20-bit input.
* `tb_mcm_block` runs all inputs of the 10-bit 32-point block, plus random
  inputs for the 17-bit row grouping and the 4-point block.
* `tb_mcm_auto` runs the grouping search on the eight HEVC lists and on two
  small examples. It checks the slice counts, checks that every slice passes
  the cost rule, and checks that each constant is placed exactly once. It
  also checks the products of two `mcm_auto` blocks.
* The DCT testbenches use a reference matrix that is rebuilt from
  `cos(pi*r*(2k+1)/64)` rather than from the design's tables.
* `tb_dct2d_top` sends 40 TUs of random sizes at the default parameters. The
  input has gaps, and stalls are provoked. It checks:
  * every coefficient;
  * the row index;
  * the 7-cycle latency;
  * the `3 + N`-cycle stall;
  * that every TU size, size change, stall and input gap occurred.
  * that the groupings in use add up to 380 slices.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/mcm_pkg.sv rtl/mcm_map_pkg.sv rtl/dct_pkg.sv tb/tb_ref_pkg.sv \
      tb/tb_dct2d_top.sv \
      --top-module tb_dct2d_top -o sim && ./obj_dir/sim

Each testbench runs in a few seconds once built. `tb_mcm_auto` is the
slowest, because its searches run in the simulator.

To change the design:

* **Another constant set or input width.** Give `mcm_auto` a new
  `OUT_CONSTS` and `V_W`, or give `mcm_block` a hand-made `GROUPS`. Elaboration stops with an error if a group
  exceeds the cost limit, or if a constant has neither a slice nor a shift.
* **Another video bit depth.** Change `BIT_DEPTH` and `RES_W` in `dct_pkg`.
