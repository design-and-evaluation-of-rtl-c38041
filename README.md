# Fixed-point sum-of-squares units: radix-2 folding, radix-4 Booth folding, radix-4 dual recoding

The units compute `x² + y²` for two fixed-point operands in one combinational pass. The
squares are never formed on their own. Each operand's square is built as an array of partial
squares and compressed to two words (sum and carry). The four words of `x²` and `y²` are then
merged by one row of 4:2 compressors, and a carry-lookahead adder turns the pair into a binary
result.

Squaring is cheaper than general multiplication because the partial-product array of `x·x` is
symmetric. The three units differ only in how they exploit that symmetry to build the array:

| unit | module | operands | array height (N = 24) |
|---|---|---|---|
| radix-2 folding | `sos_radix2` | unsigned, N bits | 12 rows |
| radix-4 Booth folding | `sos_radix4_folding` | two's complement, N bits | 7 rows |
| radix-4 dual recoding | `sos_radix4_dual` | two's complement, N bits | 8 rows |

The radix-4 arrays are about half as tall as the radix-2 array. That is the main argument for
them: fewer reduction levels and fewer compressor cells.

`sos_top` places all three side by side so they can be compared. Each has its own operands and
results. The default operand width is N = 24. The schemes were compared at 16, 24 and 32 bits,
and all three sizes work through the parameter.

## Dataflow shared by all three units

```
 x ─► [array generator] ─► rows ─► [RA: reduce_tree] ─► sum_x, carry_x ─┐
                                                                      ├─► [CMPRS: csa42_row] ─► cs_sum, cs_carry ─► [FAs: final_adder] ─► sos
 y ─► [array generator] ─► rows ─► [RA: reduce_tree] ─► sum_y, carry_y ─┘
```

* **Array generator.** This is the only part that differs between the units (sections below).
  Its output is a set of W-bit words whose sum is the square, modulo 2^W.
* **RA** (`reduce_tree`) takes the rows four at a time through rows of 4:2 compressors. If
  three rows are left over, they go through a row of 3:2 counters. This repeats until two
  words remain: 12 rows → 6 → 4 → 2, or 7 → 4 → 2.
* **CMPRS** (`csa42_row`) is one row of 4:2 compressors (`comp42`). It merges the x pair with
  the y pair. Each compressor's lateral carry `cout` does not depend on its `cin`, so the row
  has no ripple path.
* **FAs** (`final_adder`) split the word into a low half and a high half. Each half has its own
  parallel-prefix adder. The low half's carry out is the high half's carry in.
* The carry-save pair before the final adder is also an output (`cs_sum`, `cs_carry`). A
  following unit that accepts redundant operands, such as a square-root stage, can skip the
  carry-propagate addition.

All words are as wide as the result: W = 2N+1 bits for the unsigned unit and 2N bits for the
signed ones. Carries that leave the top bit are dropped. Everything is therefore exact modulo
2^W, and the true sum always fits in W bits.

## Bit arrays without sign extension

In the two radix-4 arrays, each signed partial square is a two's complement field of k bits at
some column offset o.
Sign-extending it to the top of the word would make every upper column as tall as the number of
partial squares. Instead, the generators invert the field's sign bit s and add −2^(o+k−1). This
works because

```
sext(v) = v[k-2:0] + (1 − s)·2^(k−1) − 2^(k−1)
```

The constants of all fields add up to one word, fixed at elaboration time
(`sos_pkg::r4_const`). Its one-bits are injected into the array as constant ones. The
generators then write each bit into the next free row of its column. The number of rows is
therefore the tallest column, computed by `sos_pkg::r4_rows`, and that count is the array
height in the table above.

## Radix-2 folding array (`r2_gen_ps`)

The bit array of `x·x` has the diagonal `x_i·x_i = x_i` in column 2i. The terms above and below
the diagonal are equal in pairs, so one triangle is kept, moved one column left:
`x_i·x_j` (i < j) goes into column i+j+1. Column 2i then holds the diagonal bit `x_i` and the
pair term `x_{i-1}·x_i`. The identity `x_i + x_{i-1}x_i = 2·x_{i-1}x_i + x'_{i-1}x_i` replaces
these two bits with `x'_{i-1}x_i` in column 2i and `x_{i-1}x_i` in column 2i+1, which lowers
the array further.

The generator writes every bit into its column, one per row. Row r holds the r-th bit of each
column, so the number of rows equals the tallest column. `sos_pkg::r2_rows(N)` computes that
count at elaboration time (3 rows for N = 6, 12 for N = 24).

## Radix-4 Booth folding array (`booth_r4_recoder`, `r4f_gen_p`, `r4f_shf_cmp`)

The operand is recoded into M = N/2 radix-4 Booth digits, `X_i = -2b_{2i+1} + b_{2i} + b_{2i-1}`
with `b_{-1} = 0`. Each digit is carried as `{n, d1, d2}`: sign, magnitude 2, magnitude 1. The
all-ones triplet is the digit 0 with n = 0. Expanding the square and grouping by digit gives

```
x² = Σ_i (8·P_i + C_i)·16^i,   C_i = X_i² ∈ {0, 1, 4},   P_i = X_i·(W_i + b_{2i+1}),
W_i = x >>> (2i+2)            (the bits above digit i, arithmetic shift)
```

`W_i + b_{2i+1}` is the value of all digits above digit i, divided by 4^{i+1}. The `+ b_{2i+1}`
looks like it needs an adder, but it does not:

* If b_{2i+1} = 0, the digit is 0, 1 or 2, and P_i = |X_i|·W_i.
* If b_{2i+1} = 1, the digit is 0, −1 or −2, and X_i·(W_i + 1) = |X_i|·(−W_i − 1) = |X_i|·~W_i.

So SHF-CMP (`r4f_shf_cmp`) only shifts `W_i` by one place for |X_i| = 2 and complements it
bitwise when the digit is negative. No +1 has to be injected.

P_i (i < M−1) is a (2M−2i−1)-bit field at column 4i+3. P_{M−1} is always zero. C_i puts one
bit in column 4i (C_i = 1) or column 4i+2 (C_i = 4).

## Radix-4 dual recoding array (`r4d_gen_array`, `r4d_wx210`)

Here each Booth digit is multiplied by a "squarand" built from the digits below it:

```
x² = Σ_i X_i·q_i·4^i,   q_i = X_i·4^i + 2·L_i,   L_i = Σ_{j<i} X_j·4^j   (the recoded tail)
```

The dual encoder (DE) forms q_i by wiring alone. L_i is the low 2i bits of x read as a two's
complement number. Substituting the Booth digit gives

```
q_i = two's complement value of { b_{2i+1}, b_{2i}, b_{2i-2}, …, b_1, b_0, 0 }
```

That is the low part of x moved up one place, with bit b_{2i−1} dropped. Its value equals that
of the 1's-complemented tail string of the original left-to-right formulation.

The wired multiplication cells (Wx210) select `Q_j` (|X_i| = 1) or `Q_{j−1}` (|X_i| = 2, with
`Q_{−1} = 0`) and XOR the result with the sign n. Partial square i is then a (2i+3)-bit field
at column 2i. The +1 that completes each negative partial square is the inversion bit (IB),
the digit's n bit, placed in column 2i. The original scheme has the shortest array of the
three. Here it is one row taller than the folding array (8 against 7 at N = 24), because the
inversion bits and the sign constant fall into its tallest columns.

## Final adder and prefix networks (`final_adder`, `prefix_adder`)

`prefix_adder` computes `a + b + cin`. The bit generate and propagate signals are combined by
the usual (G, P) operator, and `cin` is folded into bit 0's generate. The parameter `TOPO`
selects the network:

| `TOPO` | levels | character |
|---|---|---|
| `KOGGE_STONE` (default) | log2 W | every bit combined at every level, lowest depth, most wiring |
| `SKLANSKY` | log2 W | divide and conquer, high fan-out |
| `BRENT_KUNG` | 2·log2 W − 1 | up-sweep/down-sweep tree, fewest operators |

Each level is a generate loop. A constant function, `src()`, says which lower bit each bit
combines with. To try another network, add a case there. The units pass their `TOPO` down to
both halves of the final adder.

## Interfaces and timing

| module | parameters (default) | ports |
|---|---|---|
| `sos_top` | `N` (24), `TOPO` (`KOGGE_STONE`) | `r2_x, r2_y` → `r2_sos, r2_cs_sum, r2_cs_carry` (2N+1 bits); `r4f_x, r4f_y` → `r4f_*` (2N bits); `r4d_x, r4d_y` → `r4d_*` (2N bits) |
| `sos_radix2` | `N`, `TOPO` | `x, y` (N, unsigned) → `sos, cs_sum, cs_carry` (2N+1) |
| `sos_radix4_folding`, `sos_radix4_dual` | `N`, `TOPO` | `x, y` (N, two's complement) → `sos, cs_sum, cs_carry` (2N) |

`cs_sum + cs_carry == sos` modulo the output width.

Every unit is purely combinational: there is no clock, no reset and no handshake. The result
is valid one propagation delay after the operands settle. To pipeline a unit, put registers
at the natural cut points: after the array generators, between reduction levels, and between
CMPRS and the final adder. N may be odd: the Booth recoder sign-extends by one bit. The units
have been simulated at 16, 24 and 32 bits, and the arrays at 7 and 8 bits as well.

Shared types live in `sos_pkg`: `adder_topo_e`, `booth_digit_t`, and the size functions
`booth_digits`, `r2_rows`, `r4_rows` and `r4_const`. The small helpers `counter32` (3:2 counter), `csa32_row` and
`comp42` are the cells of the reduction arrays.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench compares against
arithmetic done directly in SystemVerilog and ends with a `TB_RESULT checks=… failures=…` line:

* `tb_comp42`: exhaustive, including the rule that `cout` does not depend on `cin`.
* `tb_csa42_row`, `tb_reduce_tree`: random and all-ones words, trees of 1, 2, 3, 5, 12 and
  13 rows.
* `tb_prefix_adder`, `tb_final_adder`: all three networks. The adders are tested at 13, 24, 48
  and 64 bits, and the split final adder at 49 and 32 bits, including full carry propagation.
* `tb_r2_gen_ps`, `tb_booth_r4_recoder`, `tb_r4f_gen_p`, `tb_r4d_gen_array`: exhaustive at
  8 bits (7 bits for the odd case) and random at 24 bits. The array heights are also checked
  against hand-computed values.
* `tb_sos_radix2`, `tb_sos_radix4_folding`, `tb_sos_radix4_dual`: N = 24 (Kogge-Stone),
  N = 16 (Brent-Kung) and N = 32 (Sklansky), random plus extreme operands.
* `tb_sos_workloads`: `sos_top` at 16 bits (Brent-Kung) and at 32 bits (Sklansky and
  Kogge-Stone), for all three units.
* `tb_sos_top`: the three units at their default size, about 2000 vectors. Five hundred of
  them give the same non-negative operands to all three units, which must agree. The test
  also counts how often each mechanism is exercised and fails if one never is: negative
  digits, magnitude-2 digits, the zero digit from an all-ones triplet, a carry between the
  final-adder halves in each unit, and the most negative operand.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sos_pkg.sv tb/tb_sos_top.sv --top-module tb_sos_top
./obj_dir/Vtb_sos_top
```

Each testbench finishes in well under a second.

## How far this follows the published schemes

These parts follow the published schemes:

* the three array constructions and their identities;
* the Booth truth table (n, d1, d2);
* the dual-recoding decomposition and the wired multiplication cell;
* the block structure: array generator, RA, CMPRS, final adder in two halves;
* the choice of Kogge-Stone for the final adder;
* the operand widths.

These are this design's own choices:

* **Operand types.** The radix-2 unit squares magnitudes; the radix-4 units take two's
  complement numbers.
* **Word widths and overflow.** All words are result-width and arithmetic is modular, with no
  overflow logic.
* **Sign handling.** Sign extension is replaced by inverted sign bits and one injected
  constant word. The original names injected constants but not the exact technique.
* **Array packing.** Bits are packed column by column in a fixed order. The original's
  hand-drawn array layouts are not reproduced bit for bit.
* **Reduction order.** Row-wise 4:2-then-3:2 is used, not hand-drawn column trees. Positions
  where a counter input is constant zero become half adders (2:2 counters) only through
  logic optimisation.
* **The folding trick.** The complement form of `X_i·(W_i + b_{2i+1})` is derived here.
* **The DE wiring.** The plain-wiring form of the dual encoder is also derived here. It has
  the same value as the complemented-tail form.
* **Final-adder halves.** The low half's carry goes straight into the high half; no
  carry-select is used.

The original evaluation gives delay, area and power from standard-cell synthesis at 45, 90 and
180 nm. None of that is reproduced here: the RTL is functionally verified, not characterised.
Floating-point variants and pipelining are only suggested as extensions and are not built.
