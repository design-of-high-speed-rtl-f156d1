# Pipelined merged multiply-accumulate unit (radix-4 Booth, CBL carry select adder)

A multiply-accumulate unit computes `P = A*B + Z`, where `Z` is the sum of
all earlier products. The simple way to build one is a multiplier followed by
an accumulator adder. Both end in a carry-propagating adder, and the
accumulator's adder sits in the feedback loop, so it sets the clock period.

This design removes that adder from the loop. The running sum is fed back
into the multiplier's carry-save tree as extra rows, next to the partial
products, and it is fed back in the tree's own intermediate form, not as a
finished binary number. The only carry-propagating adder left is the final
adder. It sits in its own pipeline stage, outside the feedback loop.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, parameterised by
the operand width `N` (default 16: 16 x 16-bit operands, 32-bit result).
It follows the architecture of the published "Design of High Speed Pipelined
Merged MAC Using Radix-4 MBA and Carry Select Adder". Where that description
leaves details open, this implementation makes its own choices. They are
listed under [Choices made here](#choices-made-here).

## The accumulator state: half binary, half carry-save

This is the key to the design. The accumulated value is held in four
registers, and its value is

    acc = Z + 2^N * (S + C + cy)      (modulo 2^(2N))

| register | width | form | meaning |
|---|---|---|---|
| `z_q`  | N | binary | low N bits of the accumulated value, final |
| `s_q`  | N | carry-save sum word | high N bits, part 1 |
| `c_q`  | N | carry-save carry word | high N bits, part 2 |
| `cy_q` | 1 | single bit | carry out of the low half, still owed to the high half |

Every accumulation step feeds all four back into the tree. The tree adds them
to the new partial products, and the result is again in this form. The low
N bits come out as final binary because the tree resolves its low columns
"in advance", with a short chain of 2-bit carry look-ahead adders. Those
columns take their inputs early: the Booth rows start at staggered columns,
so the low columns have few bits to add. The high N bits never get resolved
inside the loop. Only the output path resolves them: `P = {S + C + cy, Z}`.
That is an N-bit addition, half the width of the result.

## Stage 1: radix-4 Booth partial products

The multiplier `b` is recoded into N/2 digits in {-2, -1, 0, +1, +2}. Digit j
comes from the overlapping triplet `(b[2j+1], b[2j], b[2j-1])`, with
`b[-1] = 0`. So a 16-bit multiply has 8 partial product rows instead of 16.

`booth_encoder` turns each triplet into four lines:

| triplet | digit | x1_b | x2_b | neg | z |
|---|---|---|---|---|---|
| 000 |  0 | 1 | 0 | 0 | 1 |
| 001 | +1 | 0 | 1 | 0 | 1 |
| 010 | +1 | 0 | 1 | 0 | 0 |
| 011 | +2 | 1 | 0 | 0 | 0 |
| 100 | -2 | 1 | 0 | 1 | 0 |
| 101 | -1 | 0 | 1 | 1 | 0 |
| 110 | -1 | 0 | 1 | 1 | 1 |
| 111 |  0 | 1 | 0 | 1 | 1 |

In equations: `x1_b = ~(y[i]^y[i-1])`, `x2_b = ~x1_b`, `neg = y[i+1]` and
`z = ~(y[i+1]^y[i])`. `x1_b` and `x2_b` are active low. The zero digit is the
case `x1_b = 1` and `z = 1`.

`booth_decoder` forms one (N+1)-bit row, one gate per bit:

    pp[i] = ~( (x1_b | ~(a[i]^neg)) & (x2_b | z | ~(a[i-1]^neg)) )

A negative digit gives the bitwise inverse (1's complement) of `|d|*a`. The
missing +1 is added as a separate bit `N_j` at the row's lowest column 2j.
`N_j = neg & ~(x1_b & z)`, which is 1 only for a negative, non-zero digit.

### Sign handling without sign extension

Every row is signed, and extending every sign bit to column 2N-1 would add
many bits to the tree. `booth_pp_gen` uses the usual substitution instead.
Row j has its sign bit `s_j` at column 2j+N. The identity
`-s_j*2^(2j+N) = (~s_j)*2^(2j+N) - 2^(2j+N)` lets each row keep just one
inverted sign bit. All the `-2^(2j+N)` terms then add up to a single constant:

    K = -(sum over j of 2^(2j+N))  mod 2^(2N)      (0xAAAB0000 for N = 16)

K has no bits below column N, and the `N_j` bits all sit below column N. So K
and the `N_j` bits share one correction word `corr`. The block's contract is
`sum(rows) + corr == a*b (mod 2^(2N))`.

## Stage 1: the hybrid carry-save tree

`hybrid_csa_tree` takes N/2 + 4 rows, each 2N bits wide. That is 12 rows at
N = 16:

* the N/2 Booth rows, and `corr`;
* `{S', Z'}`, the fed-back state with `S'` at column N and `Z'` at column 0;
* `{C', 0}`, the fed-back carry word at column N;
* `cy'`, a single bit at column N.

Levels of word-wide 3:2 carry-save adders (rows of full adders) reduce three
rows to two. This is a Wallace-style reduction, in the order
12 -> 8 -> 6 -> 4 -> 3 -> 2, which is five full-adder delays at N = 16. All
arithmetic is modulo 2^(2N), so carries out of the top column are dropped.

The two rows that remain are split in the middle:

* **Low N columns:** added by a chain of N/2 `cla2` blocks (2-bit carry
  look-ahead adders with carry in). This gives the final `Z` and the carry
  `cy`.
* **High N columns:** kept as they are, as `S` and `C`.

## Stage 2: the final adder, a square-root carry select adder on Common Boolean Logic

`sqrt_csla_cbl` adds `S + C + cy`. It is a carry select adder. The 16 bits
are split into groups of 2, 2, 3, 4 and 5 bits. Each group is one bit wider
than the one before it, so its two candidate results are ready about when the
carry from the groups below arrives. The delay grows with about the square
root of the width, not with the width.

Common Boolean Logic means the two candidates share their gates (`cbl_group`).
For each bit:

* with carry in 0, the sum is `a^b` and the carry out is `a&b`;
* with carry in 1, the sum is `~(a^b)` and the carry out is `a|b`.

So one XOR plus an inverter gives both sum candidates, and one AND plus one
OR gives both carry candidates. Inside a group, the carry passes through one
2:1 mux per bit, which picks either the AND term or the OR term. Every group
except the first runs this chain twice, once assuming a group carry in of 0
and once of 1. The real incoming carry then selects the group's sum and carry
out. The first group's carry in is known from the start, so it has a single
chain.

The final adder is not in the feedback loop. The accumulation never waits
for it.

## Pipeline, interface and timing

```
           a, b ─► booth_pp_gen ─► hybrid_csa_tree ─► [S C Z cy] ─► sqrt_csla_cbl ─► [P]
                                      ▲                  │ (stage-1 regs)            (stage-2 reg)
                                      └── S' C' Z' cy' ──┘  (zero when acc_clr)
```

`merged_mac` ports (N = 16):

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous active-low reset, clears the accumulator |
| `in_valid` | in | 1 | take `a` and `b` at this edge |
| `acc_clr` | in | 1 | with `in_valid`: start a new sum, `P = a*b` |
| `a`, `b` | in | N | signed (two's complement) operands |
| `out_valid` | out | 1 | `p` holds a new result |
| `p` | out | 2N | accumulated result, modulo 2^(2N) |

* **Timing:** operands taken at clock edge k produce their result in `p`
  after edge k+1, and `out_valid` is high in that cycle. A new operand pair
  can be taken every cycle, so results also leave every cycle.
* **Idle cycles:** when `in_valid` is low, the state holds.
* **Overflow:** the 2N-bit result wraps. There is no overflow flag and there
  are no guard bits.
* **Low half of `p`:** `Z` is registered in stage 2 next to the adder
  output, so both halves of `p` come from the same operation.

Parameter `PIPELINED` (default 1) selects the two-stage version. With
`PIPELINED = 0` the stage-2 register is left out. `p` then follows the
stage-1 registers through the final adder combinationally, and the result of
the operands taken at edge k is visible right after edge k.

## Choices made here

These details are not fixed by the published description. They are this
implementation's own:

* **Signedness and width:** operands are signed, and the result is exactly
  2N bits and wraps.
* **Control signals:** the valid/clear handshake and the reset.
* **Pending carry:** the low-to-high carry is kept as a separate register bit
  `cy`. It enters the next tree pass at column N and the final adder as its
  carry in.
* **Tree shape:** the tree is a row-wise Wallace reduction built from
  word-wide 3:2 adders. The published tree places individual half and full
  adders per column for the 8 x 8 case. The values are the same, but the
  gate count and exact delay differ.
* **Sign handling:** one inverted sign bit per row plus one constant `K`.
* **Booth decoder:** the one-gate-per-bit form above.
* **Final adder:** groups of 2, 2, 3, 4 and 5 bits; a single chain in the
  first group; a per-bit mux chain inside each group. For widths other than
  16 the grouping rule continues as 2, 2, 3, 4, 5, 6, ... and the last group
  is cut short.
* **Even N:** N must be even.

Not modelled: the delay, power and gate-count figures of the published
design, which come from a 45 nm standard-cell synthesis (5.4 ns for the
16-bit MAC, 1.54 ns for the 16-bit adder). The two other carry select adders
it was compared with (dual ripple-carry and binary-to-excess-1) are not part
of this design.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_booth_encoder` | all 8 triplets against the digit they encode |
| `tb_booth_decoder` | every digit x random and extreme multiplicands, against d*a in 1's complement |
| `tb_booth_pp_gen` | `sum(rows)+corr == a*b` for corner cases and random pairs; row alignment; the N_j bits |
| `tb_cla2` | all 32 input combinations |
| `tb_sqrt_csla_cbl` | random operands and carry chains across every group boundary at W = 16, plus W = 7 |
| `tb_hybrid_csa_tree` | arbitrary input rows: the value identity, and that `Z` is already the low half of the total |
| `tb_merged_mac` | the full unit at its default size, against a reference sum; value and latency of every result |
| `tb_merged_mac_nopipe` | `PIPELINED = 0`: the result after one edge |
| `tb_merged_mac_8x8` | N = 8, the size at which the tree is usually drawn |

`tb_merged_mac` is the main testbench. It runs about 20,000 operations: a
short worked example (3*4, then -5*7, then 100*100), repeated
(-2^15)*(-2^15) products that wrap the 32-bit sum, and random traffic. It
counts, and requires at least once:

* back-to-back inputs;
* restarts;
* idle cycles;
* accumulator wraps;
* a carry out of the low half;
* negative products;
* the extreme product.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/mac_pkg.sv \
          tb/tb_merged_mac.sv --top-module tb_merged_mac -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_merged_mac` with its name. The
testbenches are written for a two-state simulator and use only
`$urandom`, so any IEEE 1800 simulator should also work.

To change the size, set `N` on `merged_mac` (even values only). The tree
depth and the adder grouping follow N automatically.

## Files

| file | contents |
|---|---|
| `rtl/mac_pkg.sv` | `booth_sel_t` (encoder-to-decoder bundle), default width |
| `rtl/merged_mac.sv` | top: pipeline registers, feedback, clear |
| `rtl/booth_pp_gen.sv` | N/2 encoder/decoder pairs, sign constant, N_j bits |
| `rtl/booth_encoder.sv`, `rtl/booth_decoder.sv` | one Booth digit |
| `rtl/hybrid_csa_tree.sv` | merged carry-save tree, low half resolved in advance |
| `rtl/cla2.sv` | 2-bit carry look-ahead adder |
| `rtl/sqrt_csla_cbl.sv`, `rtl/cbl_group.sv` | final adder and one of its groups |
