# Array multiplier built from one-bit incrementers

An unsigned N x N array multiplier (N = 4 by default) in which no cell
contains a three-input full adder. Every adder of a classic Braun array is
replaced by a cell that holds only a 1-bit "A+1" incrementer and two 2-to-1
multiplexers. The cell's other inputs never enter the adder. They only drive
the multiplexer selects, and they decide whether the cell passes its operand
through, increments it, or adds two to it.

The aim is to do less work per product. A cell whose partial product and
incoming carry are both zero does not compute at all. It forwards the sum it
receives from the row above, and this happens often: with AND partial
products, three out of four partial-product bits are zero on average. Over
all 256 products of the 4 x 4 array, 2261 of the 3072 cell evaluations are
bypasses, 732 are increments and 79 are add-twos.

## The key observation: a full adder seen from one operand

Take a full adder with inputs `a`, `b` and `ci`. Treat `a` as the operand.
The other two inputs can only add 0, 1 or 2 to it:

| b | ci | result | sum | carry |
|---|----|--------|-----|-------|
| 0 | 0  | a      | a   | 0     |
| 0 | 1  | a + 1  | ~a  | a     |
| 1 | 0  | a + 1  | ~a  | a     |
| 1 | 1  | a + 2  | a   | 1     |

So the sum is either `a` or the sum bit of `a + 1`. The carry is either the
carry of `a + 1` or the AND of `b` and `ci`. Both choices are made by the same
select, `b != ci`. When the select is 0, `b` equals `ci`, so `b & ci` is the
right carry for both the bypass row and the add-two row. This is
`inc_fa_cell`:

```
sel    = b ^ ci
s      = sel ? sum(a+1)   : a
co     = sel ? carry(a+1) : b & ci
```

The half adder is the same idea with no carry input (`inc_ha_cell`). The
select is `b`. The sum is `a` or `~a`, and the carry is `a` or the constant 0.

The incrementer (`inc_adder`) computes `{co, s} = a + 1`, with width W = 1 in
the cells. In front of it sits a buffer. Here that buffer is an
operand-isolation gate: the incrementer sees `a & sel`, so its input stays
still while the cell is bypassed. That gate never changes an output. It only
reflects the intent that a bypassed cell does not switch.

## The array

`inc_multiplier` arranges these cells in a Braun array:

* `N*N` AND gates make the partial products `pp[j][i] = a[i] & b[j]`. `p[0]`
  is `pp[0][0]`.
* There are N-1 carry-save rows, j = 1 .. N-1, each with N-1 cells,
  i = 0 .. N-2. Row 1 uses half-adder cells. Rows 2 and up use full-adder
  cells. Cell (i, j) increments the sum coming down from cell (i+1, j-1).
  At the left edge it increments the partial product `pp[j-1][N-1]`; in
  row 1 it increments `pp[0][i+1]`. Its select inputs are `pp[j][i]` and the
  carry of cell (i, j-1). The rightmost cell of row j gives `p[j]`.
* A final row of N-1 cells ripples the remaining sums and carries. Its low
  end is a half-adder cell, since nothing carries into it, and the rest are
  full-adder cells. It gives `p[N] .. p[2N-2]`. Its last carry is
  `p[2N-1]`.

For N = 4 this comes to 12 cells: three rows of three, then a final row of
three. The whole multiplier is combinational, with no clock, register or
reset. Its critical path runs down the carry-save rows and along the ripple
row. Each cell adds one multiplexer delay after its select settles.

Interface of the top, `inc_multiplier #(int unsigned N = 4)`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`  | in  | N     | multiplicand, unsigned |
| `b`  | in  | N     | multiplier, unsigned |
| `p`  | out | 2N    | product `a * b` |

The cell input nets `row_a/row_b/row_ci` and `fin_a/fin_b/fin_ci` are named
arrays inside the top, so a testbench can watch which case each cell is in.
`row_ci` of row 1 and `fin_ci[0]` are tied to 0 for the same reason, which is
why a linter reports them as unused.

## Where this RTL follows its source and where it chooses

Taken from the published design:

* the Braun structure of N-1 carry-save rows plus a ripple row;
* replacing every adder by an A+1 cell with one buffer and two 2-to-1 muxes;
* the rules for the full-adder cell. It increments when the partial product
  differs from the carry. It adds two when both are 1. The non-incrementing
  carry is their AND;
* in the cell drawing, the multiplexer input order, and the constant 0 on
  the half-adder cell's carry multiplexer;
* the 4 x 4 size.

Choices made here:

* The select of the full-adder cell is written as XOR, from the
  "not equal" rule. The original drawing shows a gate there without naming
  its type. An OR gate there would give a wrong result for b = ci = 1, so
  the rule was followed.
* The buffer is an AND operand-isolation gate. The original does not say
  what controls it.
* The incrementer is a plain `a + 1`, because no gate-level form is given.
* N is a parameter (N >= 2). The source works through the 4 x 4 case only.
* No registers are added.

Not included: the comparison multipliers the design is measured against.
These are the Braun, row-bypassing, column-bypassing, two-dimensional
bypassing, and row-and-column bypassing arrays. The power and path-delay
figures also cannot be checked at RTL. The source reports 11.635 ns for
the 4 x 4 array on an FPGA, against 11.45 ns for a plain Braun array.

## Files

| file | contents |
|------|----------|
| `rtl/inc_adder.sv` | W-bit incrementer, `{co, s} = a + 1` |
| `rtl/inc_ha_cell.sv` | half-adder cell: incrementer, isolation gate, two muxes |
| `rtl/inc_fa_cell.sv` | full-adder cell: as above, plus the `b ^ ci` select and the `b & ci` carry |
| `rtl/inc_multiplier.sv` | the N x N array (top) |
| `tb/tb_inc_adder.sv` | every operand value, W = 1 and W = 4 |
| `tb/tb_inc_ha_cell.sv`, `tb/tb_inc_fa_cell.sv` | every input combination against integer addition |
| `tb/tb_inc_multiplier.sv` | default 4 x 4 array: all 256 products, and per-cell coverage of bypass / increment / add-two |
| `tb/tb_inc_multiplier_sizes.sv` | N = 2, 3, 5, 8 with every operand pair; N = 16, 32 with corner and 3000 random operand pairs |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends a hung run with a failure. The coverage part of
`tb_inc_multiplier` fails if any cell never saw one of its cases. Each cell
must see bypass and increment. Full-adder cells must also see add-two.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    --top-module tb_inc_multiplier tb/tb_inc_multiplier.sv
./obj_dir/Vtb_inc_multiplier
```

Use the same command for any other testbench, changing the top module and
the file. To lint the RTL:
`verilator --lint-only -Wall -Irtl rtl/inc_multiplier.sv`.

To change the size, set `N` when you instantiate `inc_multiplier`. The cell
count is N*(N-1), and the product width is 2N.
