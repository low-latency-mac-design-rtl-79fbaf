# Two-cycle Baugh-Wooley MAC with 4:2 compressors

A multiply-accumulate (MAC) unit for DSP work such as FIR filters and
transforms. Its speed comes from three ideas:

- **The multiplier never finishes its own addition.** It hands its product on
  in carry-save form: a pair of vectors whose sum is the product. The
  accumulate stage adds that pair and the accumulator in one 4:2 compressor
  row and one carry-propagate adder. The multiplier's final adder and the
  accumulator's adder become one adder.
- **Baugh-Wooley partial products.** Two's complement operands are multiplied
  on an array of plain adders. A few partial-product bits are inverted and a
  constant is added, so every partial product is a positive bit and no
  sign-extension logic is needed.
- **Decomposition.** The 8 x 8 multiplier is four 4 x 4 Baugh-Wooley
  multipliers working in parallel. Their shifted outputs are merged by a row
  of 4:2 compressors.

The default unit takes 8-bit operands, signed or unsigned. It accepts one
operation per clock and has a 20-bit accumulator. The sum includes a product
two clock edges after its operands are presented.

## Module hierarchy

```
bw_mac                       two-stage MAC (top)
├── bw_decomp_mult           8x8 multiplier, carry-save output
│   ├── baugh_wooley  x4     4x4 Baugh-Wooley arrays
│   │   └── full_adder       carry-save rows and the final ripple row
│   └── compressor_row_4_2   merges the four sub-products
│       └── compressor_4_2   one per bit
│           └── full_adder x2
└── compressor_row_4_2       merges the product pair with the accumulator
bw_mac_pkg                   number-format enum, Baugh-Wooley constant function
```

Everything is in `rtl/`, with one module or package per file. All modules are
combinational except `bw_mac`.

## Baugh-Wooley with selectable operand formats (`baugh_wooley`)

In an n-bit two's complement number the top bit has weight -2^(n-1). A
partial product `a_i & b_j` therefore has negative weight when exactly one of
its two bits is a sign bit. Baugh-Wooley uses the identity

    -x * 2^k = (~x) * 2^k - 2^k

to rewrite each such term. The bit is inverted, and all the `-2^k` pieces
are gathered into one constant, reduced modulo 2^(2n). After that, every row
of the array is an ordinary non-negative number.

This design gives the array two mode inputs, `a_signed` and `b_signed`. The
set of inverted bits follows from them, and the constant is chosen among four
values that are computed at elaboration by `bw_mac_pkg::bw_correction()`.
For the default n = 4:

| a_signed | b_signed | inverted bits                    | constant (8 bits) |
|----------|----------|----------------------------------|-------------------|
| 0        | 0        | none                             | `0000_0000`       |
| 0        | 1        | row b3, columns a0..a2           | `1000_1000`       |
| 1        | 0        | column a3, rows b0..b2           | `1000_1000`       |
| 1        | 1        | a3·b0..b2 and a0..a2·b3          | `1001_0000`       |

The signed x signed row is the classic form, with ones in columns n and
2n-1. The other rows let the same cells compute the unsigned and mixed-sign
sub-products that decomposition needs.

The n rows of partial products and the constant row are summed by a
carry-save array, one row of full adders per partial-product row. A final
ripple-carry row of full adders produces the 2n-bit product `o`. Every
format's product fits exactly in 2n bits. The module works for any n ≥ 2,
and the default is 4.

## Decomposition multiplier (`bw_decomp_mult`)

The operands are cut into K = N/SUB slices. Slice pair (p, q) is multiplied
by its own sub-multiplier, and the result is shifted left by SUB·(p+q). For
the default 8 x 8 unit:

```
a*b = aH*bH << 8  +  aH*bL << 4  +  aL*bH << 4  +  aL*bL
```

**Signedness of the slices.** This is the subtle part. In a signed operand
only the top slice carries the sign; the lower slices are plain unsigned
numbers. So for signed operands `aH*bH` is signed x signed, `aH*bL` and
`aL*bH` are signed x unsigned, and `aL*bL` is unsigned x unsigned. Each
sub-multiplier gets its own `a_signed`/`b_signed`. A sub-product is
sign-extended to the output width if either slice is signed, and zero-extended
otherwise.

**Carry-save output.** The aligned sub-products are summed by a tree of 4:2
compressor rows. Four operands need one row. With more operands, each tree
level turns every group of four into two: a group of three gets a zero
fourth input, and one or two left-over operands pass down unchanged. No
carry-propagate adder is used, and the module outputs `ps` and `pc` with
`ps + pc == a*b (mod 2^OUT_W)`.

Sign extension cannot be applied to a carry-save pair after the fact, because
each vector would have to be extended separately, which is wrong. This is why
`OUT_W` is a parameter: the MAC sets it to the accumulator width, so the
extension is built in before compression.

**Nesting.** With `LEAF < SUB`, each sub-multiplier is itself a
`bw_decomp_mult` of LEAF x LEAF Baugh-Wooley blocks, instantiated
recursively. The nested unit passes its carry-save pair up at full width, and
both vectors go into the outer compressor rows. There is no adder between
levels.

The default and the three ways of building a 16 x 16 multiplier are all
parameter settings:

| structure                              | parameters               | blocks      | outer tree operands       |
|----------------------------------------|--------------------------|-------------|---------------------------|
| 8 x 8 from 4 x 4 (default)             | N=8, SUB=4               | 4 of 4x4    | 4 (one 4:2 row)           |
| 16 x 16 from 4 x 4 Baugh-Wooley        | N=16, SUB=4              | 16 of 4x4   | 16 (4+2+1 rows, 3 levels) |
| 16 x 16 from 8 x 8 Baugh-Wooley        | N=16, SUB=8              | 4 of 8x8    | 4 (one row)               |
| 16 x 16 from 8 x 8 decomposition units | N=16, SUB=8, LEAF=4      | 16 of 4x4   | 8 (2+1 rows, 2 levels)    |


## 4:2 compressor and compressor rows

`compressor_4_2` adds four bits of one column, `x[3:0]`, and a carry `cin`
from the column below. It is two full adders. The first adds x0, x1 and x2;
its carry leaves as `cout`, and its sum goes to the second adder with x3 and
`cin`. The second adder gives `sum` and `carry`. In every case

    x0 + x1 + x2 + x3 + cin = sum + 2·(carry + cout)

Because `cout` does not depend on `cin`, a row of compressors has no carry
that ripples along the row.

`compressor_row_4_2` places W compressors side by side. It links each `cout`
to the next column's `cin` and returns the vertical carries shifted one place
left. The row works modulo 2^W, so anything carried out of the top column is
dropped.

## The MAC pipeline (`bw_mac`)

| stage | work                                                                                  | registers                 |
|-------|---------------------------------------------------------------------------------------|---------------------------|
| 1     | `bw_decomp_mult` forms (ps, pc) at ACC_W bits                                         | `s1` = {valid, clr, ps, pc} |
| 2     | 4:2 row on (ps, pc, acc or 0, 0), then one adder `acc_next = sum + carry`             | `acc`, `out_valid`        |

Timing, with operands presented in cycle t:

```
cycle      t          t+1              t+2
in_valid   1
s1.valid              1
out_valid                              1   (acc now includes a*b)
```

- **Throughput.** One operation per cycle, with no stalls. The accumulator
  feeds back inside stage 2, so a product that follows directly after another
  still sees the updated sum.
- **`clr`.** Starts a new sum: the product replaces the accumulator instead of
  being added to it.
- **`tc`.** Selects two's complement (1) or unsigned (0) for both operands of
  that operation.
- **Width.** The accumulator is `ACC_W = 2N + GUARD` bits, 20 by default, and
  wraps around on overflow. With four guard bits, 31 worst-case signed
  products (-128 · -128) or 16 worst-case unsigned products (255 · 255) can
  be summed before a wrap.
- **Reset.** `rst_n` is an asynchronous, active-low reset. It clears the
  pipeline and the accumulator.

Ports:

| port        | dir | width | meaning                                         |
|-------------|-----|-------|-------------------------------------------------|
| `clk`       | in  | 1     | clock                                           |
| `rst_n`     | in  | 1     | asynchronous active-low reset                   |
| `in_valid`  | in  | 1     | a, b, tc, clr carry an operation this cycle     |
| `tc`        | in  | 1     | 1: signed operands, 0: unsigned                 |
| `clr`       | in  | 1     | start a new sum with this product               |
| `a`, `b`    | in  | N     | operands                                        |
| `acc`       | out | ACC_W | accumulator                                     |
| `out_valid` | out | 1     | acc has just taken in a product                 |

Parameters: `N` (8), `SUB` (4), `LEAF` (= SUB), `GUARD` (4), and
`ACC_W` (2N+GUARD).

## What follows the architecture and what is this design's own

These parts follow the architecture:
- the full-adder 4:2 compressor;
- the Baugh-Wooley array for 4 x 4 signed multiplication;
- the 8 x 8 multiplier made of four 4 x 4 Baugh-Wooley blocks whose outputs
  are combined by compressors;
- the three 16 x 16 structures;
- merging the multiplier's carry-propagate stage into the accumulate adder;
- a two-cycle MAC;
- support for signed and unsigned operands.

These are choices made here:
- the `a_signed`/`b_signed` mode inputs of the Baugh-Wooley array and the
  per-slice signedness in the decomposition;
- the shape of the compressor tree for more than four operands;
- the carry-save hand-over between nesting levels;
- the 4 guard bits, wrap-around overflow, `clr`, the valid handshake and the
  reset;
- the final adder, written as a plain `+`;
- the fourth input of the accumulate compressor row, tied to zero.

The Baugh-Wooley array is a word-level carry-save array of full adders. It
does not reproduce a particular cell-for-cell layout. The design makes no
low-power circuit claims: power and delay depend on the cell library and are
outside the RTL.

Lint reports, by design:
- unused top-column carries in the compressor row and the Baugh-Wooley array;
- `rst_n` used both as an asynchronous reset and as the disable condition of
  the assertion in `bw_mac`.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench               | what it checks                                                                                  |
|-------------------------|-------------------------------------------------------------------------------------------------|
| `tb_compressor_4_2`     | all 32 input combinations; `cout` independent of `cin`                                          |
| `tb_compressor_row_4_2` | 5000 random operand sets plus corner cases, 16 bits wide                                        |
| `tb_baugh_wooley`       | 4x4 and 8x8, every operand pair in all four formats                                             |
| `tb_bw_decomp_mult`     | 8x8 exhaustively in all four formats (16- and 20-bit outputs); the three 16x16 structures on random operands |
| `tb_bw_mac`             | default MAC against a reference model, exact two-cycle latency, and each mechanism counted (see below) |
| `tb_bw_mac_16x16`       | the three 16x16 MAC structures side by side on one random stream                                |

`tb_bw_mac` starts with a 4-tap signed FIR sum and extreme operands, then runs
20,000 random cycles. It counts each mechanism and fails if any of them never
happens:
- signed and unsigned operations;
- clears and accumulations;
- back-to-back inputs and idle cycles;
- format switches;
- accumulator wrap-around.

Running one with Verilator 5:

```
verilator --binary --timing -y rtl -y tb +libext+.sv \
    rtl/bw_mac_pkg.sv tb/tb_bw_mac.sv --top-module tb_bw_mac -o sim
./obj_dir/sim
```

Replace `tb_bw_mac` with any other testbench name. The package file must come
first, because `-y` finds the other modules by file name. Each testbench runs
in a second or less.

To change the design, set `N`, `SUB`, `LEAF` and `GUARD` on `bw_mac`. `N`
must be a multiple of `SUB`, and `SUB` a multiple of `LEAF`. The Baugh-Wooley
constant function supports products of up to 64 bits.
