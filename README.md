# OBA multiplier: an 8×8 array multiplier that skips idle rows and columns

An array multiplier adds one partial-product row per multiplier bit. When a
multiplier bit `x[i]` is 0, that whole row adds nothing. When a multiplicand bit
`y[j]` is 0, every cell in column `j` adds a zero partial product. A
*bypassing* multiplier routes the incoming sum and carry around such cells. The
cells' logic then does not switch, which saves dynamic power.

Bypassing rows and columns at the same time is cheap per cell, but it can lose
a carry. The *optimized bypassing architecture* (OBA) keeps the cheap
two-way cell only where that cannot happen. Elsewhere it uses a row-only
bypassing cell. This repository is a synthesizable SystemVerilog model of that
multiplier: an unsigned `N`×`N` product, with `N = 8` by default. The logic
function matches the silicon design. Its power-saving circuit techniques are
described, and their logic effect is modelled, but they are not reproduced at
transistor level.

```
p[2N-1:0] = x[N-1:0] * y[N-1:0]     (unsigned, purely combinational)
```

## The array

The array is a Braun-style carry-save array. Row 0 holds the partial products
`x[0] & y[j]`. Rows `i = 1 .. N-1` each hold `N-1` adder cells, columns
`j = 0 .. N-2`. Column 0 is on the right, at the least significant end. Cell
`(i, j)` adds three bits:

- the partial product `x[i] & y[j]`;
- the sum `S(i-1, j+1)` from the upper-left cell;
- the carry `C(i-1, j)` from the cell directly above.

It produces `S(i, j)`, weight `2^(i+j)`, and `C(i, j)`, weight `2^(i+j+1)`.
The leftmost sum input of row `i` is the partial product `x[i-1] & y[N-1]`.

When row `i` is bypassed (`x[i] = 0`), the cell passes `S(i-1, j+1)` through as
its sum. It also passes the upper-left carry `C(i-1, j+1)` through as its
carry. Both signals have exactly the weights the cell would have produced, so
the row simply disappears. Each cell therefore has a fourth input, `c`, that is
used only for this bypass.

```
         c = C(i-1,j+1)   s_in = S(i-1,j+1)
                 |          |
   c_in = C(i-1,j) ---> [ cell (i,j), x[i], y[j] ]
                 |          |
          c_out = C(i,j)   s_out = S(i,j)
```

## The two cells and the carry problem

| x | y | TDBA `c_out` | TDBA `s_out` | MRBA `c_out` | MRBA `s_out` |
|---|---|---|---|---|---|
| 0 | – | `c` | `s_in` | `c` | `s_in` |
| 1 | 0 | `0` | `s_in` | `c_in & s_in` | `c_in ^ s_in` |
| 1 | 1 | `c_in \| s_in` | `~(c_in ^ s_in)` | `c_in \| s_in` | `~(c_in ^ s_in)` |

**TDBA** (two-dimensional bypassing adder, `rtl/tdba.sv`) also skips the cell
when `y[j] = 0`. In that case it passes the sum through and outputs carry 0.
This is correct only if `c_in` is 0 whenever `y[j]` is 0. In a column without
bypassing that always holds, because every cell above in the same column also
has `y[j] = 0`. Row bypassing breaks it. A carry `C(i-1, j+1)` from column
`j+1` can pass through a bypassed row into column `j`. There it arrives as
`c_in` at a column-bypassed TDBA, which drops it.

**MRBA** (modified row-bypassing adder, `rtl/mrba.sv`) bypasses by row only.
With `x = 1` it is a full adder of `(x & y) + s_in + c_in`. It never drops a
carry.

**Placement** (`oba_pkg::cell_kind`): TDBAs go where the carry problem cannot
occur:

- **Rows 1 and 2.** Row 0 has no carries. Row 1 can only create a carry in a
  column whose `y[j]` is 1.
- **The last column, `j = N-2`.** No carry can enter it from the left.
- **The first column, `j = 0`.** Here a carry can be dropped. It is recovered
  on the right edge (next section).

`oba_array` carries a deferred assertion on every TDBA outside column 0. It
fails the simulation if such a cell is ever column-bypassed while its `c_in`
is 1. The exhaustive tests never trigger it; an all-TDBA array triggers it
almost at once.

MRBAs fill the rest. For `N = 8` that is 24 TDBAs on the outside and 25 MRBAs
inside (rows 3–7, columns 1–5).

## The right edge and the final adder

The first-column cell of row `i` absorbs its incoming carry `C(i-1, 0)` only
when it evaluates, that is when `x[i] & y[0] = 1`. Otherwise that carry, of
weight `2^i`, leaves the array. `oba_edge_chain` recovers it for rows
`2 .. N-1`:

```
lost(i)                  = C(i-1, 0) & ~(x[i] & y[0])
{chain(i), p[i]}         = S(i, 0) + lost(i) + chain(i-1)      chain(1) = 0
```

`oba_final_adder` is a ripple adder. It forms
`p[N+k] = S(N-1, k+1) + C(N-1, k) + carry` for `k = 0 .. N-2`, with the edge
chain's last carry as its carry in. Its final carry is `p[2N-1]`. Bits
`p[0] = x[0] & y[0]` and `p[1] = S(1, 0)` need no adder.

The gate function `lost(i)` is this design's reading of a gate that is drawn
but not specified. A gate that looked only at `~x[i]` would give wrong
products for 7480 of the 65536 operand pairs. The testbenches check every
operand pair.

## Power techniques that are described but not modelled

- **Internal tri-state buffers.** In silicon, the cells float the internal
  nodes of their evaluation logic while bypassed, so those nodes do not
  switch. The floated nodes also let one multiplexer per cell be dropped. In
  RTL a floating node has no value, so the equivalent logic effect is written
  as operand isolation: the evaluation logic sees `s_in` and `c_in` only while
  it is enabled (`x & y` for TDBA, `x` for MRBA). This is a choice of this
  model. A synthesis tool may optimize the isolation away, because it does not
  change the outputs.
- **Transistor-level gates.** The silicon cells use 4-transistor XOR/XNOR
  gates with an output inverter. Here they are plain `^` and `~^`.
- **Silicon figures not modelled.** The reference chip, in 0.13 µm CMOS at
  1.2 V, reports about 145 µW at a 50 MHz input rate with random operands,
  about 3 ns delay, and a 150 µm × 65 µm core. None of this is modelled. The
  RTL has no registers, clock or reset; register the operands and product
  outside it if needed.

## Files

| File | Contents |
|---|---|
| `rtl/oba_pkg.sv` | cell-kind enum and the placement rule |
| `rtl/tdba.sv`, `rtl/mrba.sv` | the two adder cells |
| `rtl/oba_array.sv` | the `(N-1)×(N-1)` cell array |
| `rtl/oba_edge_chain.sv` | right-edge carry recovery, product bits `2..N-1` |
| `rtl/oba_final_adder.sv` | bottom ripple adder, product bits `N..2N-1` |
| `rtl/oba_fa.sv` | one-bit full adder used by the two adder chains |
| `rtl/oba_multiplier.sv` | top level, parameter `N` (default 8) |
| `tb/oba_ref_pkg.sv` | independent bit-level model of the array that counts mechanism events |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two system tests |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog.

- `tb_tdba`, `tb_mrba`, `tb_oba_fa`: all input combinations against the truth
  tables.
- `tb_oba_final_adder` (2^15 cases), `tb_oba_edge_chain` (2^19 cases): every
  input combination against integer sums.
- `tb_oba_array`: all 65536 operand pairs. Every array output is compared bit
  for bit with the reference model. The outputs plus the recovered carries must
  also sum to `x*y`.
- `tb_oba_multiplier`: all 65536 products at the default `N = 8`. The test
  fails if any of these mechanisms never fired: row bypass, TDBA column
  bypass, TDBA evaluation, MRBA evaluation, an MRBA keeping a carry that a TDBA
  would have dropped, and edge recovery.
- `tb_oba_random_workload`: 20000 random operand pairs with 50 % bit
  probability, one every 20 ns (the power-measurement condition). It checks
  the products and reports the share of cells with evaluation switched off:
  about 50 % by row alone and about 62 % in total.
- `tb_oba_multiplier_sizes`: the placement rule at `N = 4, 5, 6` (exhaustive)
  and `N = 12` (random).

To run one with Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/oba_pkg.sv tb/oba_ref_pkg.sv tb/tb_oba_multiplier.sv \
    --top-module tb_oba_multiplier -o sim
./obj_dir/sim
```

## Where this model departs from, or goes beyond, the reference design

- The right-edge gate function, the use of full adders for the drawn `+`
  boxes, and the zero carries at the array boundary are this design's own
  reading. They are checked exhaustively.
- Operands are unsigned, as in a Braun array. No signed mode is described.
- `N` other than 8 is a generalisation of the placement rule. It has been
  verified for 4, 5, 6 and 12. `N` must be at least 4.
- Tri-state buffers and transistor-level gates are replaced by logic of the
  same function (see above). The power numbers cannot be reproduced in RTL
  simulation. The baseline multipliers that the power results are compared
  against (Braun, row-bypassing, column-bypassing, 2-D bypassing with bypass
  logic) are not included.
