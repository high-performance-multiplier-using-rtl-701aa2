# Radix-8 Booth multiplier with Wallace-tree accumulation

This is a parallel multiplier for signed (two's complement) numbers up to
126 x 126 bits. It makes the product in one combinational pass, in three steps:

1. **Radix-8 Booth recoding.** The multiplier operand is recoded into
   radix-8 digits. This leaves a third as many partial products as there are
   multiplier bits: 42 for 126 bits.
2. **Wallace-tree reduction.** A Wallace tree of compressors adds the
   partial products in carry-save form, so no carry has to travel along a
   row. The tree ends with two rows.
3. **Carry look-ahead addition.** A carry look-ahead adder adds those two
   rows into the product.

The multiplier comes in two variants that differ only in the tree. One uses
3:2 compressors (full adders). The other uses 4:2 compressors, each made of
two 3:2 compressors. The 4:2 tree needs fewer levels and is the default.

An 8-tap FIR filter is included as an application. It has 8-bit samples, a
19-bit output, and one Booth multiplier per tap.

```
 multiplier Y ──► booth_encoder x ceil(N/3) ──► digits d_i ∈ {0,±1,±2,±3,±4}
                                                   │
 multiplicand X ──► X, 2X, 4X (shifts), 3X (CLA) ──► booth_pp_gen: rows d_i·X·8^i
                                                   │  + 1 correction row
                                                   ▼
                          wallace_tree_4_2  or  wallace_tree_3_2
                                                   │ sum_row, carry_row
                                                   ▼
                                   cla_adder ──► product (M+N bits)
```

## Radix-8 recoding and the partial products

The multiplier Y is read in overlapping *quartets*
`{y[3i+2], y[3i+1], y[3i], y[3i-1]}`, where `y[-1] = 0`. Each quartet shares
its lowest bit with the quartet below it. A quartet stands for the digit

    d_i = -4·y[3i+2] + 2·y[3i+1] + y[3i] + y[3i-1]

and `Y = Σ d_i · 8^i`. The full table:

| quartet | digit | quartet | digit |
|---------|-------|---------|-------|
| 0000 | 0  | 1000 | −4 |
| 0001, 0010 | +1 | 1001, 1010 | −3 |
| 0011, 0100 | +2 | 1011, 1100 | −2 |
| 0101, 0110 | +3 | 1101, 1110 | −1 |
| 0111 | +4 | 1111 | 0 |

`booth_encoder` gives each digit as a sign flag and a magnitude from 0 to 4
(`booth_pkg::booth_digit_t`). Y is sign-extended to `3·ceil(N/3)` bits, so
an N-bit multiplier gives `ceil(N/3)` digits.

`booth_pp_gen` turns each digit into a row, d_i · X · 8^i:

- **Multiples.** X, 2X and 4X are shifts of X. The "hard" multiple 3X needs
  a real addition, X + 2X. One `cla_adder` computes it, and all rows share it.
- **Negation.** A negative digit inverts its row. The +1 that completes the
  two's complement is not added to the row. It goes into bit 3i of one
  extra *correction row*, which the tree adds with the others. The tree
  therefore adds `ceil(N/3) + 1` rows: 43 at full size.
- **Sign extension.** Every row is sign-extended to the full product width
  M+N and shifted left by 3i. All arithmetic is modulo 2^(M+N). The signed
  product always fits, so the carries dropped off the top are never needed.

Full-width sign extension is the simplest correct choice, but it costs area.
Many rows' top bits are copies of the sign. The usual sign-extension
encodings (a few constant 1 bits per row) are not used here.

## The compressor trees

Both trees take K rows of W bits and return two rows, `sum_row` and
`carry_row`. Their sum is the sum of the K rows modulo 2^W.

**3:2 tree (`wallace_tree_3_2`).** At each level the rows are taken in
threes. Each group goes through `csa_row`, a row of `compressor_3_2` cells
(full adders). The group becomes a sum row and a carry row, with the carry
row moved one place left. One or two rows left over pass to the next level
unchanged. r rows become 2·⌊r/3⌋ + r mod 3, which takes about
log(K/2)/log(1.5) levels. For 43 rows that is 9 levels:
43 → 29 → 20 → 14 → 10 → 7 → 5 → 4 → 3 → 2.

**4:2 tree (`wallace_tree_4_2`).** At each level the rows are taken in fours.
Each group goes through `compressor_4_2_row`. One or two leftover rows pass
unchanged, and three leftover rows go through a 3:2 row. For 43 rows this
takes 5 levels: 43 → 22 → 12 → 6 → 4 → 2.

**The 4:2 cell (`compressor_4_2`).** It is two 3:2 compressors in series.
The first adds x0, x1 and x2. Its carry leaves the cell as `cout`. The
second adds the first one's sum, x3 and `cin`, and gives `sum` and `carry`:

    x0 + x1 + x2 + x3 + cin = sum + 2·(carry + cout)

In a row, each cell's `cout` is the `cin` of the cell one bit higher. This
looks like a carry chain, but it is not one: `cout` does not depend on
`cin`, so the delay of a row is two full adders at any width. The
testbench checks this property.

Both trees build their levels with `generate` loops. The row count at each
level comes from the constant functions in `booth_pkg`
(`rows_after_*`, `rows_at_level_*`, `levels_*`), so any K and W work.

## Final adder

`cla_adder` adds the two rows from the tree. Each bit makes a generate
signal `g = a & b` and a propagate signal `p = a ^ b`. From these it works
out every carry directly, without a ripple through the bits below. The
(generate, propagate) pairs are merged over spans of 1, 2, 4, … bits. This
takes ⌈log2 W⌉ levels, which is a Kogge-Stone parallel-prefix network, so
all carries arrive after the same logarithmic delay. `cin` enters at bit 0.

## FIR filter

`fir_filter` computes `y[n] = Σ_k COEFFS[k] · x[n−k]` in direct form:

- **Samples.** A register chain holds the last TAPS−1 samples. The current
  sample `x` feeds tap 0 directly.
- **Multipliers.** Each tap has a `booth_multiplier`. The sample is the
  Booth-recoded operand, so the recoding sees changing data, and the
  coefficient is the multiplicand.
- **Output.** The products are summed and registered into `y`. The clock
  edge that samples x[n] also loads y[n]: the latency is one cycle.
- **Reset.** `rst` is synchronous and active high. It clears the history
  and `y`.

The default coefficients are a symmetric low-pass set,
`{−4, 6, 27, 47, 47, 27, 6, −4}`, with 8-bit signed values. With 8-bit
samples the sum cannot overflow the 19-bit output.

## Top level: `booth_mult_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `multiplicand` | in | M (126) | X, two's complement |
| `multiplier` | in | N (126) | Y, two's complement |
| `product_3_2` | out | M+N | X·Y from the 3:2-tree multiplier |
| `product_4_2` | out | M+N | X·Y from the 4:2-tree multiplier |
| `clk`, `rst` | in | 1 | filter clock and synchronous reset |
| `fir_x` | in | 8 | filter sample |
| `fir_y` | out | 19 | filter output, one cycle after its sample |

The two multipliers share their operands. Their outputs are always equal,
so the pair can be used to compare the two tree styles after synthesis.
Both multipliers are purely combinational. Put registers around them as
your timing needs: there is no pipelining inside.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `booth_multiplier` | `M`, `N` | 126, 126 | operand widths, any ≥ 2 |
| `booth_multiplier` | `TREE` | `TREE_4_2` | `TREE_3_2` selects the 3:2 tree |
| `fir_filter` | `XW`, `YW` | 8, 19 | sample and output width |
| `fir_filter` | `TAPS`, `CW`, `COEFFS` | 8, 8, low-pass set | filter length (≥ 2), coefficient width, coefficients |
| `fir_filter` | `TREE` | `TREE_4_2` | multiplier variant used at the taps |
| `wallace_tree_*` | `K`, `W` | 43, 252 | rows and row width |
| `cla_adder` | `WIDTH` | 252 | adder width |

## Which parts are given and which are chosen here

These parts follow the described architecture:

- the stage structure;
- the radix-8 recoding table;
- two variants, with 3:2 and 4:2 Wallace trees;
- the 4:2 cell built from two 3:2 cells;
- a carry look-ahead final adder built on generate/propagate signals;
- operand size up to 126 bits;
- the FIR filter's 8-bit input and 19-bit output.

These are this design's own choices:

- the sign/magnitude digit format;
- full-width sign extension and the separate correction row;
- one shared 3X adder;
- the order in which rows are grouped at each tree level, and how three
  leftover rows are handled in the 4:2 tree;
- the Kogge-Stone form of the look-ahead;
- the FIR filter's structure, length, coefficients and reset behaviour.

The multiplier was characterised on a small FPGA in a configuration with
31 input and 31 output pins. The operand widths of that configuration are
not known, so the defaults are set to the 126-bit maximum instead. Any
smaller signed operands can be sign-extended onto the ports, or set by
parameter.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F`. The reference values are computed in the
testbench itself, mostly with the simulator's own wide arithmetic.

| testbench | what it covers |
|-----------|----------------|
| `booth_encoder_tb` | all 16 quartets |
| `compressor_3_2_tb`, `compressor_4_2_tb` | all input combinations; `cout` independent of `cin` |
| `cla_adder_tb` | an 8-bit instance exhaustively; a 252-bit instance with random and all-propagate operands |
| `booth_pp_gen_tb` | 126 x 126: each row equals d_i·X·8^i; all rows sum to X·Y; all nine digit values occur |
| `wallace_tree_3_2_tb`, `wallace_tree_4_2_tb` | 43 x 252 trees and trees of 3, 4, 5, 7 and 12 rows |
| `booth_multiplier_tb` | both trees: 6 x 7 exhaustively; 16 x 15 and 126 x 126 with corner cases and random operands |
| `fir_filter_tb` | both trees: impulse, extreme steps, random stream, reset in mid-stream, one-cycle latency |
| `booth_mult_top_tb` | whole design at its default size; counts every Booth digit value, signs of products, filter resets and a clean impulse response |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module booth_mult_top_tb \
    -Irtl -y rtl -y tb +libext+.sv rtl/booth_pkg.sv tb/booth_mult_top_tb.sv
./obj_dir/Vbooth_mult_top_tb
```

The full-size top-level test runs in well under a second of simulation.
Lint (`verilator --lint-only -Wall`) reports only unused bits: the carries
dropped off the top of each row, the unused `cout` of the final adder, and
the last level's group-propagate vector in `cla_adder`. All of these are
intentional.
