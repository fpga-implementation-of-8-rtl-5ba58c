# 8-bit multiplier with multiplexer adders

A combinational unsigned 8 × 8 multiplier. It is built so that no addition
waits on a long carry chain. The usual array multiplier adds its partial
products row after row, and each row waits on the carries of the row before.
This design does two things differently:

1. The eight partial-product rows are summed as a balanced tree: four
   additions in parallel, then two, then one. That is seven 8-bit additions
   in three levels instead of seven in series.
2. Each 8-bit addition is done without a ripple carry. Its two 4-bit halves
   are looked up in a truth table, implemented as multiplexers, at the same
   time. The low half's carry then only has to increment the high half.

The product is 17 bits wide. Bit 16 is the carry out of the last incrementer
and is always 0 for 8-bit operands. It is kept so that the port matches the
17 product pins of the FPGA implementation this design follows.

## Partial products

`and_row` ANDs the multiplier operand `mlr` with one multiplicand bit:
`pp[i] = mlr & {8{mnd[i]}}`. Row `pp[i]` has weight 2^i. All eight rows are
formed at once.

## The addition tree

Write `pij` for bit j of row i; it sits in product column i + j. The tree
works on these columns.

**Level 1: pairs of rows (four adders).** Row 2k covers columns 2k … 2k+7
and row 2k+1 covers 2k+1 … 2k+8. Bit 0 of the even row (column 2k) is alone
in its column, so it passes straight through. The rest is one 8-bit addition:

    r[k] = {0, pp[2k][7:1]} + pp[2k+1]          9-bit result, weight 2^(2k+1)

**Level 2: pairs of pairs (two adders).** `r[0]` starts at column 1 and
`r[1]` at column 3, with `pp[2][0]` in column 2. Bit `r[0][0]` is alone in
column 1 and is product bit 1. The 8-bit adder covers columns 2 … 9:

    x1 = r[0][8:1] + {r[1][6:0], pp[2][0]}      columns 2..9, carry into column 10
    x2 = r[2][8:1] + {r[3][6:0], pp[6][0]}      columns 6..13, carry into column 14

Above the adder, column 10 still holds `r[1][7]` and column 11 holds
`r[1][8]`. Group 2 has the same at columns 14 and 15.

**Level 3: the final adder.** Product bits 0 to 3 are already final:
`pp[0][0]`, `r[0][0]`, `x1[0]` and `x1[1]`. One 8-bit adder covers columns
4 … 11:

    f = {g1[11], g1[10], x1[7:2]} + {x2[5:0], r[2][0], pp[4][0]}

Its carry enters column 12. A 4-bit incrementer adds that carry to group 2's
columns 12 … 15, `{g2[15], g2[14], x2[7:6]}`, and its carry out is product
bit 16.

Where each product bit comes from:

| product bits | source |
|--------------|--------|
| 16           | carry out of the 4-bit top incrementer (always 0) |
| 15 … 12      | top incrementer: group 2's columns 12–15 plus the final adder's carry |
| 11 … 4       | final adder `f` |
| 3, 2         | `x1[1]`, `x1[0]` |
| 1            | `r[0][0]` |
| 0            | `pp[0][0]` |

### Absorbing a carry above an 8-bit adder

Column 10 holds three bits of the same group: `r[1][7]`, the carry of `x1`
and, one column up, `r[1][8]`. They are merged by the same increment-and-OR
trick that the 8-bit adder uses (a 1-bit `incrementer`). The OR is exact
because a level-1 sum is at most 127 + 255 = 382 = 1_0111_1110₂. So
whenever `r[8]` is 1, `r[7]` is 0, and `r[7] + carry` cannot carry into the
column that `r[8]` already holds. Group 2 is merged the same way, from `x2`'s
carry, `r[3][7]` and `r[3][8]`.

The number of 8-bit adders is exactly seven. The only other logic in the
tree is two 1-bit incrementers and one 4-bit incrementer.

## The multiplexer adder

`mux_adder8` adds two 8-bit numbers in three steps:

1. `mux_adder4` adds the low nibbles. A second `mux_adder4` adds the high
   nibbles at the same time.
2. A 4-bit `incrementer` adds the low carry to the high sum.
3. The incrementer's carry is ORed with the high nibble's own carry. The two
   can never both be 1, because a 4-bit sum whose value is 15 did not carry.

`mux_adder4` is a 4-bit adder with no carry chain. Its 8 input bits index a
256-row truth table of `{carry, sum}`. Each of the five output bits is a
64:1 multiplexer:

- The select lines are six inputs, the upper three bits of each operand.
- Each of the 64 data inputs is a small function of the two remaining
  inputs, bit 0 of each operand.

The table and its regrouping into multiplexer columns are computed at
elaboration from the definition `{carry, sum} = A + B`, so no data file is
needed. Its input port packs both operands as `a = {B, A}`.

`incrementer` computes `is8 = its + itc` as a prefix-AND chain, and
`icout = (carry of that increment) | itc1`. `WIDTH` defaults to 4.

## Interface and timing

| module        | ports |
|---------------|-------|
| `multiply`    | `mlr[7:0]`, `mnd[7:0]` in; `p[16:0]` out |
| `mux_adder8`  | `a8[7:0]`, `b8[7:0]` in; `s8[7:0]`, `cout` out |
| `mux_adder4`  | `a[7:0]` = {B, A} in; `s[3:0]`, `cout` out |
| `incrementer` | `its[WIDTH-1:0]`, `itc`, `itc1` in; `is8[WIDTH-1:0]`, `icout` out |
| `and_row`     | `mlr[WIDTH-1:0]`, `mndcheck` in; `tp[WIDTH-1:0]` out |

Everything is combinational. There is no clock, no reset and no handshake.
The product is valid one propagation delay after the operands change. If the
multiplier sits between registers, the whole tree is one timing path:

- in the 8-bit adder: one 4-bit table lookup, one 4-bit increment and an OR;
- in the multiplier: three levels of 8-bit adders, then a 4-bit increment.

The widths live in `mult_pkg` (`MUL_W = 8`, `NIB_W = 4`, `PROD_W = 17`). The
tree itself is written for 8-bit operands. Changing `MUL_W` is not supported.

## What is taken from the reference design and what is not

Taken from the reference design:

- the partial-product grouping and the labels r1–r4, x1, x2;
- the count of seven 8-bit additions in three levels;
- the two-nibble adder with incrementer and OR;
- the 64:1-multiplexer form of the 4-bit adder;
- the port names and the 17-bit product.

Choices of this design:

- **Carries above an adder.** The reference sketch does not show how the
  carry of `x1`/`x2` and the bits left above each adder are absorbed.
  The 1-bit and 4-bit incrementers described above are this design's own.
- **Incrementer input.** One description of the 8-bit adder has the
  incrementer add the *low* sum and the *high* carry. That does not add
  correctly. This design follows the adder diagram instead: the high sum is
  incremented by the low carry.
- **Select lines.** Which six inputs select the 64:1 multiplexers is not
  specified. The upper three bits of each operand are used.
- **Incrementer form.** Only the incrementer's function is specified; the
  prefix-AND form is the simplest that does it.
- **FPGA results not reproduced.** The reference reports LUT counts and delay
  (about 12.3 ns on a Virtex-5, 3.7 ns of it logic). This RTL does not
  reproduce them: how the multiplexers map onto LUTs is left to the
  synthesis tool, which may restructure them.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

| testbench         | what it checks |
|-------------------|----------------|
| `tb_and_row`      | all 512 input combinations |
| `tb_mux_adder4`   | the truth-table rows published with the reference design, then all 256 operand pairs |
| `tb_incrementer`  | all 64 input combinations, including the wrap and the OR path |
| `tb_mux_adder8`   | all 65,536 operand pairs; counts low-carry increments, increments that carry out, and high-nibble carries |
| `tb_multiply`     | see below |

`tb_multiply` runs at the default sizes:

- the sample products 0d × 15 = 00111, 8d × 55 = 02ed1 and ff × ff = 0fe01,
  with all eight partial-product rows;
- then all 65,536 operand pairs against an integer product.

It also counts every carry-merging event and fails if one never occurs:
`x1` and `x2` carries, the OR paths of both merges, the final adder's carry,
and that carry rippling on into the top incrementer.

All testbenches pass, and each one fails when a relevant fault is put into its
module.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl rtl/mult_pkg.sv tb/tb_multiply.sv \
          --top-module tb_multiply -o sim && ./obj_dir/sim
```

Replace `tb_multiply` with another testbench to test a single block. The
whole exhaustive run takes under a second.
