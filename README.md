# Parameterised parallel prefix adders: Sklansky, Han-Carlson, Kogge-Stone

A ripple-carry adder waits for the carry to travel through every bit. A
parallel prefix adder computes all carries at once, in a tree of logic
whose depth grows with log2 N. This RTL provides three such trees, Sklansky,
Han-Carlson and Kogge-Stone. One parameter sets the width, and the same
source elaborates to a correct adder at any width. Nothing in it depends on
a technology or a vendor library. The adders are small structural netlists
of five kinds of cell, and `generate` loops place the cells. All three
compute

    {cout, s} = a + b + cin        (a, b, s: N bits)

and are purely combinational. There is no clock or reset. The result is
valid one propagation delay after the inputs settle.

## Structure of every adder

Each adder is made of three blocks in a row:

```
 a, b, cin ──► precondition_block ──p,g──► <arch>_carry_gen ──c──► final_summation ──► s, cout
                       │                                              ▲
                       └──────────── p (half sum a^b) ────────────────┘
```

* **precondition_block**: row 0 of the prefix array. Bits 1..N-1 each get a
  `prefix_pre` cell: p = a ^ b, g = a & b. Bit 0 gets a `prefix_cpre` cell,
  which also takes the carry in: g0 = a0 b0 + (a0 ^ b0) cin.
* **carry generator**: turns the per-bit (p, g) pairs into the carry out of
  every bit, c[i]. The three architectures differ only in this block.
* **final_summation**: one `prefix_xr2` (XOR) cell per bit.
  s[0] = p[0] ^ cin, s[i] = p[i] ^ c[i-1], cout = c[N-1].

### The carry in is folded into bit 0

The CPRE cell puts the carry in into the generate of bit 0. After that, a
prefix group that covers bits i..0 gives the finished carry out of bit i
from its generate alone. Two things follow:

* no extra row or extra cell is needed for the carry in;
* wherever a merge produces a group that reaches bit 0, the group propagate
  will never be read again. A cheaper cell is used there.

### The two prefix cells

| cell        | equations                           | used where                                   |
|-------------|-------------------------------------|----------------------------------------------|
| `prefix_gp` | gout = ga \| pa·gb, pout = pa·pb    | the merged group does not yet reach bit 0    |
| `prefix_g`  | gout = ga \| pa·gb                  | the merged group reaches bit 0 (final carry) |

`a` is the upper (more significant) group and `b` the adjacent lower group.
At the output of a G cell the propagate of that column is tied to 0. Nothing
reads it.

## The Sklansky array (`sklansky_carry_gen`)

This is the array the models were originally built around. It is the hardest
part to read, because its shape comes from a rule on the binary digits of the
column number.

Rows are numbered j = 0..M-1 and columns i = 0..N-1. Row 0 is the output of
the precondition block.

* **Placement.** Column i has a cell on row j exactly when bit j-1 of i is 1.
  The package function `prefix_pkg::bit_is_one(i, j-1)` tests this. Column 5
  (binary 101) therefore has cells on rows 1 and 3. Column 4 (100) has one
  cell, on row 3. Column 0 never has a cell.
* **Partner.** The cell on row j of column i merges with column
  k = i - (i mod 2^(j-1)) - 1 of row j-1. Column k is the top bit of the
  lower half of the 2^j-bit block that i belongs to. It already holds the
  prefix of that whole lower half. Example: column 5, row 3 merges with
  column 3.
* **Cell type.** If j > floor(log2 i), the merged group reaches bit 0 and a
  G cell is used. Otherwise a GP cell is used. `prefix_pkg::floor_log2`
  computes floor(log2 i).
* **No cell.** Where there is no cell, the row passes (p, g) straight down.
* **Output.** c[i] = cg[M-1][i].

For N = 8 this gives the following array. Columns run from 7 on the left to
0 on the right.

```
row 1:  GP  .  GP  .  GP  .  G   .
row 2:  GP  GP .   .  G   G  .   .
row 3:  G   G  G   G  .   .  .   .
```

That is 5 GP and 7 G cells, with a depth of 3 cells. Sklansky reaches the
minimum depth, log2 N, with few cells. The cost is fan-out. On the last row,
one column drives up to N/2 cells.

**Parameter M.** M is the number of rows, row 0 included. Its default is
`$clog2(N)+1`, which is 4 for N = 8. M may be set larger, for example to
`$clog2(N)+2`. No column below N has a 1 at bit position log2 N or above, so
extra rows are pure pass-throughs and the circuit does not change. A value
below `$clog2(N)+1` stops elaboration with an error. You normally set only N.

## Kogge-Stone and Han-Carlson

Both use the same cells, the same precondition and summation blocks, and the
same rule: a G cell wherever the merged group reaches bit 0.

* **`kogge_stone_carry_gen`** has L = `$clog2(N)` rows. On row k, every
  column i >= d = 2^(k-1) merges with column i-d. Columns below d are already
  complete. The array has minimum depth and fan-out 2, but the most cells and
  wires of the three.
* **`han_carlson_carry_gen`** runs the Kogge-Stone rows on the odd columns
  only. It then adds one last row, where each even column i >= 2 takes the
  finished carry of column i-1 in a G cell. The result is one row deeper
  than Kogge-Stone and has far fewer cells: 192 against 321 at 64 bits.

Prefix-cell counts worked out from the placement rules above (G / GP):

| N  | Sklansky (depth)  | Han-Carlson (depth) | Kogge-Stone (depth) |
|----|-------------------|---------------------|---------------------|
| 8  | 7 / 5 (3)         | 7 / 5 (4)           | 7 / 10 (3)          |
| 16 | 15 / 17 (4)       | 15 / 17 (5)         | 15 / 34 (4)         |
| 32 | 31 / 49 (5)       | 31 / 49 (6)         | 31 / 98 (5)         |
| 64 | 63 / 129 (6)      | 63 / 129 (7)        | 63 / 258 (6)        |

Kogge-Stone has about twice as many GP cells as the other two at every
width. This matches the reported area results, where Kogge-Stone is clearly
the largest adder at 32 and 64 bits. Sklansky and Han-Carlson have the same
number of prefix cells. Where their area or delay differs after synthesis,
the cause lies outside the cell count: wiring, and the buffers that the
Sklansky fan-out needs. Delay depends on the library and on how fan-out is
buffered. At large N, the bounded fan-out of Kogge-Stone and Han-Carlson
helps them.

## Top level: `prefix_adder_top`

The top holds all three adders side by side. Each has its own ports:
`skl_*`, `hc_*` and `ks_*`, each with `a`, `b`, `cin`, `s` and `cout`. One
parameter, N, sets the width of all three. Its default is 64, the widest
width the adders were evaluated at. Narrower operands can be zero-extended.
To use one architecture on its own, instantiate `sklansky_adder`,
`han_carlson_adder` or `kogge_stone_adder` directly. Their default width is
8, the width of the reference schematic.

| module                 | parameters                         | ports                          |
|------------------------|------------------------------------|--------------------------------|
| `sklansky_adder`       | `N` = 8, `M` = `$clog2(N)+1`       | a, b, cin → cout, s            |
| `han_carlson_adder`    | `N` = 8                            | a, b, cin → cout, s            |
| `kogge_stone_adder`    | `N` = 8                            | a, b, cin → cout, s            |
| `prefix_adder_top`     | `N` = 64                           | three sets of the above        |

Any N >= 1 works, including widths that are not powers of two. The
testbenches cover widths 1 to 8, 13, 16, 32 and 64.

## Files

* `rtl/prefix_pkg.sv`: elaboration-time placement functions (`bit_is_one`,
  `floor_log2`).
* `rtl/prefix_pre.sv`, `prefix_cpre.sv`, `prefix_gp.sv`, `prefix_g.sv`,
  `prefix_xr2.sv`: the five cells.
* `rtl/precondition_block.sv`, `final_summation.sv`: the shared first and
  last blocks.
* `rtl/sklansky_carry_gen.sv`, `han_carlson_carry_gen.sv`,
  `kogge_stone_carry_gen.sv`: the three carry generators.
* `rtl/sklansky_adder.sv`, `han_carlson_adder.sv`, `kogge_stone_adder.sv`:
  the complete adders.
* `rtl/prefix_adder_top.sv`: the top level.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
  `tb/tb_adder_widths.sv` runs all three adders at 8, 16, 32 and 64 bits.

## Verification

Each testbench compares the outputs with values it computes itself, never
with another instance of the design:

* The adder testbenches compare {cout, s} with the integer sum a + b + cin.
* The carry-generator testbenches compare against a bit-serial carry chain.
  They use arbitrary (p, g) inputs, including p and g both set on one bit.
* The cell testbenches use truth tables.

Coverage is exhaustive at 8 bits and at every width from 1 to 7. At 13 and
64 bits, the testbenches use random and directed vectors: full-width carry
ripple, all-ones operands, and a single generate or kill bit.

`tb_prefix_adder_top` runs the top at its default width of 64 with no
parameter overridden. It drives the same operands into all three adders and
counts how often each of these happens: carry in used, carry out, carry
rippling across the full width, carry killed, and a sum with no carry at
all. A case that never happens counts as a failure. Each testbench ends by
printing `TB_RESULT checks=<n> failures=<n>`. Each has a watchdog.

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/prefix_pkg.sv \
          tb/tb_prefix_adder_top.sv --top-module tb_prefix_adder_top
./obj_dir/Vtb_prefix_adder_top
```

Replace the testbench name to run another one. Every test runs in seconds.

## What is taken from the reference and what is not

Taken from the reference description of the Sklansky model:

* the three-block structure;
* the port and generic names (`a`, `b`, `cin`, `cout`, `s`, `N`, `M`);
* the cell names PRE, CPRE, GP, G and XR2, and the GP/G pin names;
* the `bit_is_one` placement rule;
* the partner-column formula;
* the G-versus-GP condition (j > log2 i).

This design's own choices:

* **Gate equations of every cell.** These are the textbook ones.
* **The CPRE function.** The reference shows the carry in entering bit 0
  but gives no equation.
* **The default row count M.** The reference uses both log2(N)+1, in its
  8-bit array, and log2(N)+2, in an instantiation example. The RTL defaults
  to the first. The second gives the identical circuit with one idle row.
* **The Kogge-Stone and Han-Carlson arrays.** The reference only names these
  architectures. The arrays here are the standard networks, built with the
  same cells and carry-in convention.
* **The top.** Putting the three adders side by side, with a default width
  of 64, is this design's choice.

The reference also compared its adders with a commercial adder generator.
That generator is not part of this design.
