# Six 8-bit multiply-accumulate datapaths

A multiply-accumulator (MAC) repeats one operation, `Z <= Z + X*Y`. It is the
core of FIR filters, inner products and transforms such as the DCT. Its speed,
area and power depend on three choices:

- how the partial products of `X*Y` are generated;
- how they are reduced to two rows (sum and carry);
- which fast adder does the final addition and the accumulation.

This RTL builds six MACs that make these choices in different ways. All six
take 8-bit operands and keep a 16-bit running sum. They are alternatives and
can be synthesized and compared side by side. The top module
`mac_compare_top` holds all six. Each MAC has its own ports. Only the clock and
the reset are shared.

| MAC | operands | partial products | reduction | final / accumulate adder | latency | rate |
|---|---|---|---|---|---|---|
| `booth_mac` | signed | radix-2 Booth, 8 rows | linear carry-save array | conditional sum (product), conditional sum (accumulate) | 2 | 1 per cycle |
| `wallace_mac` | unsigned | AND array, 8 rows | Wallace tree | conditional sum, conditional sum | 2 | 1 per cycle |
| `parallel_booth_mac` | signed | radix-4 (modified) Booth, 4 rows | carry-save array that also holds the running sum | 2-bit CLAs (low byte), 8-bit CLA (high byte) | 3 | 1 per cycle |
| `low_power_mac` | signed | Baugh-Wooley, 8 rows | carry-save tree to 15-bit sum/carry | 15-bit Kogge-Stone, conditional sum | 3 | 1 per cycle |
| `vedic_mac` | unsigned | Vedic 2x2 -> 4x4 -> 8x8 | adders between Vedic levels | conditional sum | 2 | 1 per cycle |
| `abacus_mac` | unsigned | bit array (flags) | iterative "bead" compression and carry | conditional sum | 17 | 1 per 17 cycles |

Latency counts clock edges from the edge that accepts `x`/`y` to the edge at
which `out_valid` and the new `acc` are seen. The accumulator wraps modulo 2^16.
For the signed MACs, `acc` is the two's-complement sum. For the unsigned ones
it is the unsigned sum.

## Common interface

Every MAC has the same ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all flip-flops act on the rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low; clears the pipeline and `acc` |
| `in_valid` | in | 1 | `x` and `y` hold an operand pair this cycle |
| `clr` | in | 1 | sampled with `in_valid`: the sum restarts from this product |
| `x`, `y` | in | 8 | multiplicand and multiplier |
| `out_valid` | out | 1 | one-cycle pulse: `acc` has just taken a new value |
| `acc` | out | 16 | the running sum Z |

`abacus_mac` also has a `busy` output. While `busy` is high it ignores
`in_valid`. The five pipelined MACs have no back-pressure: each accepts a pair
on every cycle that `in_valid` is high.

The `in_valid`/`out_valid` handshake, `clr` and the reset are choices of this
implementation. The arithmetic does not depend on them.

## Shared adders

- **`cond_sum_adder`** is the conditional sum adder (Sklansky). Every bit
  computes its sum and carry twice, once for a carry-in of 0 and once for 1.
  Over log2(W) levels, neighbouring blocks are merged. The lower block's carry
  out picks which of the upper block's two results survives. At the end the
  real carry-in picks the final sum. Default width: 16 bits.
- **`kogge_stone_adder`** is a radix-2 parallel-prefix adder. It combines
  generate/propagate pairs at distances 1, 2, 4, 8 and so on. The carry-in
  enters as the generate of a virtual bit -1. Default width: 16 bits; the Low
  Power MAC uses 15.
- **`cla_adder`** is a one-level carry-lookahead adder. Each carry is written
  out in full from the generate and propagate terms below it. Default width:
  8 bits; the Parallel Booth MAC also uses 2-bit instances.
- **`mac_pkg::csa3`** is one row of full adders acting on three 16-bit rows.
  It returns a sum row and a carry row, the carry row already shifted one
  place left.

## Booth MAC (`booth_mac`, `booth_multiplier`)

Radix-2 Booth recoding looks at each multiplier bit together with the bit
below it:

- `01` adds `+X·2^i`;
- `10` adds `-X·2^i`;
- `00` and `11` add nothing.

This gives eight partial products, each sign extended to 16 bits. A negative
partial product is stored as the one's complement of `X`. The missing `+1` is
a correction bit `N_i` at bit `i`. The eight correction bits form a ninth row.

A linear carry-save array folds the nine rows into a sum and a carry row. A
conditional sum adder turns these into the product, which is registered.
In the next cycle, a second conditional sum adder adds the product to `Z`.

## Wallace Tree MAC (`wallace_mac`, `wallace_multiplier`)

The partial products are the plain AND of `x` with each bit of `y`. Wallace's
scheme takes the rows in groups of three and turns each group into two rows
with one row of full adders. Rows left over pass to the next level unchanged.
Eight rows need four levels: 8 -> 6 -> 4 -> 3 -> 2. The stages are the same as
in the Booth MAC: the product is registered, then accumulated.

## Parallel Booth MAC (`parallel_booth_mac`)

This is the most involved datapath. It does not form the product on its own.
Instead, the running sum goes back into the partial-product carry-save adder,
so multiplication and accumulation share one adder array.

**Stage 1: recoding.** `y` is read in four overlapping 3-bit groups
`(y[2i+1], y[2i], y[2i-1])`, with `y[-1] = 0`. Each group gives a digit from
-2 to +2, encoded as the flags `neg`, `one` and `two`. The digit selects 0, `X`
or `2X`. For a negative digit, the selected value is inverted. The result is
sign extended and shifted left by `2i`. The correction bits `N_i`, which turn
the one's complement into a two's complement, collect in one byte (bit `2i`).
The four partial products and `N` are registered.

**Stage 2: merged accumulation.** The running sum is not kept as one 16-bit
number. It is kept in three parts:

- `z_lo`: the low byte, fully resolved;
- `s_hi`, `c_hi`: the high byte, as an unresolved sum/carry pair;
- `k`: the carry out of the low byte, still owed to bit 8.

Four rows of full adders reduce six rows to two:

```
r1 = csa(PP0, PP1, PP2)
r2 = csa(r1.s, r1.c, PP3)
r3 = csa(r2.s, r2.c, {s_hi, z_lo})
r4 = csa(r3.s, r3.c, {c_hi, N})   // N fills the empty low byte of this row
```

A short extra row over the high byte adds in `k`. The low byte of `r4` is
resolved at once by a chain of four 2-bit CLAs. Their carry out becomes the
new `k`. The high byte stays in carry-save form, so the loop holds only
carry-save rows and an 8-bit CLA chain. A new operand pair can therefore enter
every cycle.

**Stage 3: read-out.** An 8-bit CLA computes `s_hi + c_hi + k` and the result
`{hi, z_lo}` is registered. `clr` does not empty the array. It only zeroes the
fed-back rows for the next pair.

## Low Power MAC (`low_power_mac`, `bw_hpm_multiplier`)

The Baugh-Wooley method handles signed operands without sign-extending rows.
It uses these identities:

- a partial product with exactly one sign bit (`x7·y_j` or `x_i·y7`) is
  inverted;
- `x7·y7` is kept as it is;
- the constant `2^8 + 2^15` (mod 2^16) makes up for the inversions.

The `2^8` sits in the empty bit 8 of row 0. Bit 15 receives only the constant
and the carries that leave bit 14. So the tree is 15 bits wide: a balanced
carry-save tree of four full-adder levels (8 -> 6 -> 4 -> 3 -> 2 rows) gives a
15-bit sum row and a 15-bit carry row. The parity of everything that lands in
bit 15 comes out as `msb_part`.

The MAC has three steps:

1. tree to registered rows;
2. a 15-bit Kogge-Stone adder, with `msb_part` XOR carry out giving bit 15, to
   a registered product;
3. conditional sum accumulation.

## Vedic MAC (`vedic_mac`, `vedic_multiplier`, `vedic_mult4`, `vedic_mult2`)

"Vertically and crosswise" multiplication splits each operand in halves. It
forms the two vertical products (low·low and high·high) and the two crosswise
products (low·high and high·low). Then it adds them with the right alignment:
`p = LL + (LH + HL)·2^h + HH·2^(2h)`.

- The 2x2 block needs only AND gates and two half adders.
- A 4x4 block is made of four 2x2 blocks.
- The 8x8 multiplier is made of four 4x4 blocks.

The product is registered and then accumulated by a conditional sum adder.

## ABACUS MAC (`abacus_mac`, `abacus_multiplier`)

The ABACUS multiplier uses no adder cells. It holds the partial-product bits as
flags in a 16-column by 8-row array. Row `r` holds `x & y[r]`, placed in
columns `r..r+7`. Every clock cycle, all columns do two things at once:

1. **Compression.** The flags fall to the bottom, like beads on a rod. A
   column with `n` flags becomes a thermometer code of `n`.
2. **Carry.** In a column `c` with `n >= 2` flags, `2^i` flags are removed,
   where `i = floor(log2 n)`. One flag is added to column `c+i`. The value
   stays the same, since `2^i·2^c = 2^(c+i)`.

The array stops changing once no column holds more than one flag (`settled`).
The bottom row is then the product.

How many cycles this takes depends on the operands:

- 8 carry cycles for `0xFF × 0xFF`;
- at most 13 for any 8-bit pair;
- no column ever holds more than 8 flags, so 8 rows are enough.

These bounds were found by exhaustive simulation. The worst pair is not
`0xFF × 0xFF`, because the time is set by the longest carry ripple. If
compression and carry took separate cycles, `0xFF × 0xFF` would need
1 + 2·8 = 17 cycles, but the worst pair would need 27. Doing both in one cycle
keeps every pair within the 17-cycle budget. Even so, the multiplier
raises `done` at a fixed time. It comes 16 edges after the start edge. The MAC
adds the product in the 17th cycle, so one operation always takes 17 cycles.
An assertion checks that the array has settled whenever `done` is raised.

## Where this RTL makes its own choices

These points are not fixed by the architecture descriptions this design
follows. The RTL settles them as listed:

- **Accumulator width.** It is 16 bits for every MAC, the Booth MAC
  included, so that a full 16-bit product always fits in the adder.
- **Final adders.** The Booth and Wallace multipliers use a conditional sum
  adder to add their two rows. The adders between the Vedic levels are plain
  RTL additions.
- **Reduction trees.** The Low Power MAC's tree is a balanced carry-save tree
  of logarithmic depth. The published HPM tree wires its cells in a specific
  regular pattern that is not reproduced here.
- **Booth recoding in the Parallel Booth MAC.** Four partial products for an
  8-bit operand means radix-4 recoding (overlapping 3-bit groups), and that is
  what is built.
- **Corrections `N` in the Parallel Booth MAC.** They enter the carry-save
  rows through the empty low byte of the fed-back carry row. The alternative
  would be a third input to the 2-bit CLAs. Both give the same sum.
- **Low-byte carry `k` in the Parallel Booth MAC.** It re-enters through a
  short extra row of full adders over the high byte. The "four rows of full
  adders" count covers only the six main rows.
- **Sign extension.** Partial products are sign extended in full, not with the
  constant-row trick.
- **ABACUS carry rule.** It moves the largest power of two each cycle. The
  17-cycle timing is fixed, not data dependent.
- **Control.** Handshake, clear and reset behaviour are listed under
  *Common interface*.

## Files

- `rtl/` holds one module or package per file, named after it:
  - `mac_pkg.sv` is the package and must be compiled first;
  - `mac_compare_top.sv` is the top.
- `tb/tb_<module>.sv` is the self-checking testbench of each module. Each
  prints `TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

## Verification

- **Multipliers:** all 65536 operand pairs are checked. Those are
  `booth_multiplier`, `wallace_multiplier`, `vedic_multiplier`,
  `bw_hpm_multiplier` and `abacus_multiplier`; the last one is also checked for
  its timing.
- **Adders:** checked at 16 and 15 bits (corner cases plus random operands),
  and the CLA exhaustively at 8 and 2 bits.
- **Pipelined MACs:** a random stream of 20000 cycles with gaps, clears,
  extreme operands and wrap-around. Every result is checked for its value and
  its latency.
- **`tb_mac_compare_top`:** runs all six MACs at once at default parameters. It
  counts each mechanism and fails if one never occurs:
  - clears;
  - back-to-back pairs;
  - accumulator wrap;
  - negative products;
  - the Parallel Booth low-byte carry;
  - ABACUS requests ignored while busy;
  - the ABACUS worst case `0xFF × 0xFF`.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mac_pkg.sv tb/tb_mac_compare_top.sv \
          --top-module tb_mac_compare_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The other modules are found
through `-Irtl`. Every testbench finishes in seconds.
