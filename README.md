# 32-bit Wallace tree multiplier

This is a synchronous unsigned 32 x 32 -> 64-bit multiplier. It is built so that almost no carry has
to ripple. The 32 partial products are summed in a tree of carry-save adders. Every adder in one
level of the tree works in parallel, and none of them passes a carry sideways. The tree reduces the
32 rows to two, and a single look-ahead carry adder adds those two rows. The product is captured in
a register on the rising clock edge. The multiplier accepts a new pair of operands every cycle, and
each product appears one cycle after its operands. The design targets 200 MHz (5 ns per product)
on an FPGA.

```
 a[31:0] ─┐
          ├─ pp_gen ── 32 rows ── wallace_tree ── sum row ──┐
 b[31:0] ─┘             (64 b)    (8 CSA levels)  carry row ─┴─ lca (64 b) ── reg ── p[63:0]
                                                                              clk ─┘
```

| file | what it is |
|------|------------|
| `rtl/wallace_mult32.sv` | top: the datapath above plus the product register |
| `rtl/pp_gen.sv` | AND array producing the shifted partial products |
| `rtl/wallace_tree.sv` | tree of word-level carry-save adders, 32 rows -> 2 |
| `rtl/csa.sv` | one carry-save adder: three words in, a sum word and a carry word out |
| `rtl/csa_cell.sv` | one bit of it: a full adder |
| `rtl/lca.sv` | final look-ahead carry adder (parallel-prefix) |
| `rtl/wallace_pkg.sv` | constant functions that size the tree |

## Partial products

Row `i` is `a` if `b[i]` is 1 and zero otherwise, shifted left by `i`. That is one AND gate per bit.
`pp_gen` hands each row out already shifted into a 64-bit word, so the rows can be added as whole
words. For the 6-bit example `a = 011010`, `b = 110101`, the rows are `011010`, `000000`,
`011010`, `000000`, `011010` and `011010`, each shifted by its index. They sum to `10101100010`
(26 x 53 = 1378).

## Carry-save addition

A carry-save adder (`csa`) takes three numbers and returns two: a sum word `s` and a carry word `c`,
with `s + c = x + y + z`. Bit `i` is an ordinary full adder (`csa_cell`) with inputs `x[i]`,
`y[i]` and `z[i]`. Its sum bit goes to `s[i]` and its carry bit to `c[i+1]`. `c[0]` is always 0.
No bit depends on any other, so the delay is one full adder however wide the words are. The
module's `c` output is one bit wider than its inputs so that nothing is lost.

## The Wallace tree

This is the heart of the design. `wallace_tree` repeats one step until only two rows are left:
take the rows in order, three at a time, and pass each group of three through a `csa`. A group
of three gives one sum row and one carry row. One or two rows left over at the end of a level pass
on unchanged. The row count therefore goes from `n` to `2*floor(n/3) + n mod 3` at each level.

| operand width | rows per level | CSA levels | CSAs |
|---|---|---|---|
| 32 | 32, 22, 15, 10, 7, 5, 4, 3, 2 | 8 | 30 |
| 6  | 6, 4, 3, 2 | 3 | 4 |

The 6-bit case is the classic picture. There are two CSAs at the top, then one CSA plus one row
passed on, then a last CSA.

The tree has no fixed shape in the source. The functions in `wallace_pkg` (`rows_after`, `rows_at`,
`tree_levels`, `row_offset`) work out the count for every level while the design elaborates. All
levels' rows sit one after another in a single array `r`. Level `l` reads its rows from
`r[row_offset(l) ...]` and writes the next level's rows from `r[row_offset(l+1) ...]`. Sum `g` of a
level goes to slot `2g`, carry `g` to slot `2g+1`, and the leftovers follow. So the same code
builds the tree for any number of rows.

All rows are 64 bits wide (the product width), including the carry rows. A carry row's bit 64
would be pushed out of the word. It is dropped, and this is exact: all the rows add up to
`a*b < 2^64`, so arithmetic modulo `2^64` loses nothing. A narrower tree could save adders on the
empty low and high ends of the rows. This design does not trim them: synthesis removes the cells
whose inputs are constant zero.

## Final adder

`lca` adds the sum row and the carry row. Each bit forms generate `g = x & y` and propagate
`p = x ^ y`. Then `log2(64) = 6` prefix levels merge neighbouring `(g, p)` pairs over spans of
1, 2, 4, 8, 16 and 32 bits, using `(g, p) o (g', p') = (g | p & g', p & p')`. This is the
Kogge-Stone pattern. After the last level, `g[i]` is the carry out of bit `i`, and
`sum[i] = p[i] ^ g[i-1]`. The delay grows as the logarithm of the width rather than linearly.
The requirement is only a look-ahead adder with logarithmic delay; the prefix network is this
design's choice. The adder's `cout` is always 0 for a product and is unconnected in the top.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; the product is captured on the rising edge |
| `a`, `b` | in | `WIDTH` | unsigned operands |
| `p` | out | `2*WIDTH` | product of the operands present before the last rising edge |

Apply `a` and `b`, and after the next rising edge `p = a * b`. Operands can change every cycle.
There is no reset, no valid flag and no start/done handshake. That gives 129 pins for `WIDTH = 32`
(32 + 32 + 64 + clk). Until the first clock edge, `p` holds whatever the register powered up with.

The only register is on the product. Registering the operands instead would hold the same 64 bits
and give the same one-cycle latency; the choice is this design's. Everything from `a` and `b` to
the register is one combinational path: the AND gates, eight full-adder delays through the tree,
and the six-level adder. That path has to fit in one clock period. The 200 MHz figure is an FPGA
result for a Virtex-5 part. It has not been reproduced here; the testbench clocks at 5 ns, but in
simulation only.

## Parameters

`wallace_mult32` has a single parameter, `WIDTH` (default 32). Every other size follows from it:
the rows and the tree are `2*WIDTH` bits wide, the tree takes `WIDTH` rows and the adder is
`2*WIDTH` bits. Any `WIDTH >= 2` works, and `tb_example6` uses `WIDTH = 6`. The sub-blocks have
their own defaults, set for the 32-bit instance: `wallace_tree` has `ROWS = 32` and `W = 64`, and
`csa` and `lca` have `WIDTH = 64`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_csa_cell`: all 8 input combinations.
- `tb_csa`: `s + c == x + y + z`, `c[0] == 0` and `s == x ^ y ^ z`, on 64-bit corner cases and
  random values.
- `tb_pp_gen`: every row is compared bit by bit, and the sum of the rows against `a * b`.
- `tb_wallace_tree`: the two outputs must sum to the sum of 32 random, all-ones, one-hot and
  partial-product-shaped rows, modulo `2^64`.
- `tb_lca`: compared against `+`, including carries that run the full width.
- `tb_wallace_mult32`: the full-size design end to end at a 5 ns clock. It runs
  0x0, 1x7, 7x7, 26x53, corner cases, one-hot operands and 5000 random pairs back to back. Each
  product is checked right after its edge, and the previous product is checked just before the
  edge, which pins the latency to exactly one cycle. It also counts back-to-back operations,
  zero operands, full-width products and one-cycle deliveries, and fails if any of them never
  happened.
- `tb_example6`: the 6-bit example (`011010 x 110101 = 10101100010`), then all 4096 operand pairs
  of a 6-bit multiplier, one per clock.

The testbenches use only two-state values and `$urandom`, so they run under plain Verilator.

## Simulating

```
verilator --binary --timing -Wall -Wno-fatal -y rtl +libext+.sv \
    rtl/wallace_pkg.sv tb/tb_wallace_mult32.sv --top-module tb_wallace_mult32 -o sim
./obj_dir/sim
```

Replace the testbench and top module name to run another test. `wallace_pkg.sv` must be given
first because `wallace_tree` imports it. Lint a module on its own with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/wallace_pkg.sv rtl/<module>.sv`.

## Departures and limits

- Only unsigned multiplication is supported. Signed operands would need sign extension of the
  rows or Baugh-Wooley/Booth recoding, and neither is present.
- The tree groups rows in the order they arrive and does not trim the row widths.
- The final adder is one particular log-depth look-ahead adder, Kogge-Stone.
- The clocking choices are this design's own: a product register, no reset, no handshake.
- FPGA figures (200 MHz, 2044 LUTs, 14,720 equivalent gates) are not reproduced. They depend on
  the FPGA tools and device.
