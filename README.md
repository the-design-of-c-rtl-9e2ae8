# C-testable array multipliers and dividers

An array multiplier or divider is a grid of identical cells. The textbook way to test it for
arbitrary cell faults needs a number of patterns that grows with the grid. This design
changes each array slightly so that a **fixed, small set of patterns tests every cell in
every possible input combination, whatever the operand width**: 16 patterns for every
multiplier, 20 for the non-restoring divider and 40 for the restoring divider. The usual term
for this property is *C-testability*, "C" as in constant.

The changes are cheap. There is one altered carry rule in the multiplier cell, a handful of
XOR gates with test-control pins, and the array's tied-off inputs brought out as pins. In
normal mode the control pins are held at a fixed value and each array is an ordinary
multiplier or divider.

The RTL holds seven arrays and their cells. All of it is purely combinational: there is no
clock and no reset.

| Array | Computes | Default size | Test patterns |
|---|---|---|---|
| `mcpm`   | unsigned product, carry-propagate rows         | 4 x 4 | 16 |
| `mcsm`   | unsigned product, carry-save rows              | 4 x 4 | 16 |
| `mcsm_b` | unsigned product, carry-save, cheaper edge     | 5 x 5 | 16 |
| `mcsm_c` | `mcsm_b` plus XORs in the last row             | 5 x 5 | 16 |
| `mbwm`   | two's-complement product (Baugh-Wooley)        | 5 x 5 | 16 |
| `mnrd`   | quotient, non-restoring                        | 4 x 4 | 20 |
| `mrsd`   | quotient and remainder, restoring              | 4 x 4 | 40 |

## The fault model, and why a constant test set is possible

Faults are assumed to live inside single cells. A faulty cell may change its truth table in
any way, as long as it stays combinational. To catch every such fault, a test set must:

1. apply each of the cell's input combinations to every cell, and
2. carry any wrong output to a primary output where it can be seen.

A full-adder-based cell passes any single wrong input through to its sum output. So
requirement 2 follows from the arithmetic. The difficulty is requirement 1.

The trick is to make the signals inside the array **periodic**. Take one test pattern.
Suppose that, when cell (i, j) receives input combination *c*, its outputs make its
neighbours receive combinations that repeat with a small period along rows and columns. Then
a pattern that is periodic at the array's edges keeps the whole interior periodic, for any
array size.

The labelling method used to find the patterns works like this:

- Each input combination of a cell gets a label.
- A cell's outputs are written as labels of the next cells.
- The design then looks for small closed groups of labels: four cells in a 2 x 2 block, or
  eight for the restoring divider.
- Each such group turns into one test pattern, and the groups together cover every
  combination.

An unmodified array does not allow this. Some input combinations cannot be set up in a
closed, repeating way, or cannot be reached at all from the edges. Every modification below
exists to remove one of those obstacles.

## The multiplier cell and its forced carry

All multipliers use `and_fa_cell`. It adds the partial product `a & b` to a sum input and a
carry input. It differs from the textbook cell in one input combination only:

    a = 0, b = 0, sum_in = 0, carry_in = 1  ->  carry_out = 1  (a full adder gives 0)

In normal multiplication this combination never reaches a cell, so the product is unchanged.
In test mode the extra 1 lets a cell pass a carry to its neighbour that an ordinary cell
would absorb. That is what lets the repeating patterns reach the last input combinations of
the neighbouring cells.

`fa_cell` is a plain full adder. The arrays use it where no partial product is formed: the
left-boundary cells of `mcpm`, the final ripple rows, and the extra Baugh-Wooley cell.

The cell also has an `a_inv` input, which XORs `a` before the AND. It implements the S4 gates
of `mcsm_c` and `mbwm`. The forced-carry decode still looks at the raw `a`. That reading
reproduces the published test responses and keeps the Baugh-Wooley product exact.

## The multipliers

### `mcpm`: carry-propagate multiplier

- **Layout.** There are N rows of N cells. Row j adds `a & b_j` to the row above, shifted by
  one place, and ripples its carries to the left.
- **Extra inputs.** The textbook array's constant-0 inputs are brought out as pins: `c` is the
  top of the first row and `d` is the rightmost carry-in of each row.
- **Left boundary.** The leftmost cell of every row after the first is a plain full adder.
  Its partial product is formed outside it and passed through an XOR.
  - Rows 1, 3, 5, ... use the XOR with `test1`.
  - Rows 2, 4, ... use the XOR with `test2`.
- **Speed.** The XORs sit on the partial-product inputs, not on the carry chain, so they do
  not slow the multiplier.
- **Normal mode:** `c = d = 0`, `test1 = test2 = 0`.

### `mcsm`: carry-save multiplier

- **Layout.** There are N rows of `and_fa_cell`s. Each cell passes its carry diagonally into
  the row below. A final ripple row of full adders resolves the remaining sums and carries.
- **Test inputs.** The inputs that the textbook ties off are pins:
  - `c` is the top of the first row;
  - `cp` feeds the leftmost top input of each row;
  - `d` is the first row's diagonal carries;
  - `e` is the final row's carry-in.
- **Outputs.** `cout` is the final carry, always 0 in normal use.
- **Normal mode:** `c`, `cp`, `d` and `e` all 0.

### `mcsm_b`: carry-save multiplier with fewer pins

This version replaces `mcsm`'s row of `c`/`cp` pins with XOR gates. It saves a whole row of
cells by feeding two sets of partial products in from the edges:

- The `b_0` partial products `a_{i+1} & b_0` enter the top of the first row through XORs:
  `s1` for odd i+1 and `s2` for even i+1.
- The `a_{N-1}` partial products enter down the left edge as
  `Z_k = a_{N-1} & (b_k ^ s3)`.

That leaves N-1 rows of N-1 cells (`csmb_rows`) and a ripple row of N-1 full adders.
`p_0 = a_0 & b_0` is a bare AND gate. In test mode `e` is driven with `a_0 & b_1`.

**Normal mode:** `d = 0`, `s1 = s2 = s3 = 0`, `e = 0`.

### `mcsm_c`: last row with XOR-controlled operands

Same as `mcsm_b`, except that the last carry-save row forms `(a_k ^ s4) & b_{N-1}`. It is the
step between the unsigned carry-save array and the Baugh-Wooley array. With `s4 = 0` it is
`mcsm_b`. With only `s4 = 1`, the result is

    p = a*b + b_{N-1} * 2^{N-1} * ((2^{N-1} - 1) - 2*a[N-2:0])

The testbenches use this identity to check the S4 gates.

### `mbwm`: Baugh-Wooley two's-complement multiplier

The Baugh-Wooley form rewrites the negatively weighted partial products of a signed product
as complemented bits plus constants. Every cell can then be an adder of positive bits.
`mbwm` reuses the `mcsm_c` rows:

- `s3 = 1` makes the left edge carry `a_{N-1} & ~b_k`.
- `s4 = 1` makes the last row carry `~a_k & b_{N-1}`.

A ripple row of N+1 full adders then adds:

- the correction bits `a_{N-1} ^ s5` and `b_{N-1} ^ s6` at weight 2^{N-1};
- one extra cell summing `~a_{N-1}`, `~b_{N-1}` and `a_{N-1} & b_{N-1}`;
- a constant 1 at the top.

The six control lines are packed as `s[5:0]`, with `s[0] = S1`. The whole multiplier is
tested with 16 patterns.

**Normal mode:** `d = 0`, `s = 6'b001100` (S3 = S4 = 1, the rest 0). The published
description asks for S3 = 0. With the left-edge gate as drawn, that gives the wrong signed
product, so this design uses S3 = 1. The published test responses are the same either way.

## The dividers

Bit 0 is the most significant bit in both dividers, so the buses are declared `[0:...]`.
Operands are positive fixed-point values: the dividend `n` has 2N-1 bits and the divisor `d`
has N bits. For the quotient to fit in N bits, `n_0..n_{N-1}` must be less than `d`, and the
sign bits `n_0 = d_0 = 0`.

### `mnrd`: non-restoring divider

- **Cell.** Each cell is a controllable add/subtract cell, `cas_cell`: `s, p = x + (y ^ D) + z`.
- **Rows.** Row k adds or subtracts the divisor according to its line `D_k`. The carry out of
  its leftmost cell is the quotient bit `q_k`, and `q_k` decides the next row's operation.
- **Test hooks.** Each row has two XOR gates:
  - `D_k = q_{k-1} ^ (test1 or test2)` for k >= 1;
  - the row's end-around carry-in is `D_k ^ (test2 or test1)`. Test1 and Test2 alternate
    from row to row.

  With these the tester can set every row to add or to subtract, and pick its carry-in, on
  its own. `dctl` drives `D_0`.
- **Normal mode:** `dctl = 1`, `test1 = test2 = 0`. `q` is the quotient.
- **Remainder.** `r_{N-1}..r_{2N-2}` is the raw last-row result. It is negative when
  `q_{N-1} = 0`, and then `d` must be added back. That correction step is not part of the
  array.

### `mrsd`: restoring divider

This one is harder. A restoring row subtracts the divisor and, when the result is negative,
passes its input through unchanged (the *restore*). The restore line of a row is driven by
that row's own borrow. This feedback stops a row from being set up freely, so the row's
difference output is hidden whenever it restores.

Its cell, `mcs_cell`, has three outputs:

- `p`: the borrow of `x - y - z`.
- `s`: the difference, or `x` itself when the restore line is 1.
- `b = a ^ y ^ z`: an extra output. A separate chain of `a`/`b` signals, wired like the
  dividend path, carries it to the array edge.

The extra output makes the cell's `y` and `z` inputs observable even while the row restores.
The rest of the test access is:

- the borrow-in of each row's rightmost cell is a pin, `z_k`;
- each restore line has an XOR, `D_k = q_k ^ (test1 for even k, test2 for odd k)`.

40 patterns then exercise every cell with every combination in both restore states.

**Normal mode:** `test1 = test2 = 0`, `z = 0`, `a` don't-care.

- `q_k` is the borrow, so the quotient is `~q`.
- `r_{N-1}..r_{2N-2}` is the remainder. No correction step is needed.

## Top level

`ctest_arith_top` places all seven arrays side by side and brings out every pin. Each array's
pins carry its prefix: `mcpm_`, `mcsm_`, `mcsmb_`, `mcsmc_`, `mbwm_`, `mnrd_`, `mrsd_`. The
arrays are independent of each other.

| Parameter | Default | Sets |
|---|---|---|
| `MUL_N` | 4 | size of `mcpm` and `mcsm` |
| `CS_N`  | 5 | size of `mcsm_b`, `mcsm_c` and `mbwm` |
| `DIV_N` | 4 | size of both dividers |

Each array module is parameterised by `N` as well. Outputs settle one ripple delay after the
inputs change. There is no pipelining.

## Files

    rtl/ctest_pkg.sv        sum (XOR3) and carry (majority) functions shared by the cells
    rtl/fa_cell.sv          full adder
    rtl/and_fa_cell.sv      multiplier cell with the forced carry (and optional a inversion)
    rtl/cas_cell.sv         add/subtract cell of the non-restoring divider
    rtl/mcs_cell.sv         subtract/restore cell with the extra observation output
    rtl/csmb_rows.sv        carry-save rows shared by mcsm_b, mcsm_c and mbwm
    rtl/mcpm.sv ... rtl/mrsd.sv   the seven arrays
    rtl/ctest_arith_top.sv  all arrays side by side
    tb/ctest_vectors_pkg.sv the published test sets with their fault-free responses
    tb/<block>_tb.sv        one self-checking testbench per cell and array
    tb/ctest_arith_top_tb.sv end-to-end testbench of the top
    tb/ctest_coverage_tb.sv  per-cell test coverage at the default sizes
    tb/ctest_scaling_tb.sv   per-cell test coverage at larger sizes
    tb/ctest_scaling_check.sv one size of that test

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. A watchdog ends a hung
run. For example:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        rtl/ctest_pkg.sv tb/ctest_vectors_pkg.sv tb/mcpm_tb.sv --top-module mcpm_tb
    ./obj_dir/Vmcpm_tb

To run the whole design, use `tb/ctest_arith_top_tb.sv` with `--top-module ctest_arith_top_tb`.

**Cell testbenches** check all input combinations exhaustively against arithmetic computed in
the testbench.

**Array testbenches:**

- apply the published test set and compare every output bit with the published fault-free
  response;
- check normal-mode arithmetic:
  - all operand pairs of the multipliers (signed for `mbwm`) at the default size;
  - one or two extra sizes (N = 4, 5 or 6) to exercise the parameterisation;
- check every valid positive division for the dividers.

**End-to-end testbench.** It runs the top at its default sizes: every test set plus 300
random normal operations per array. It counts each mechanism and fails if any count is zero:

- each test set;
- each array's normal operation;
- every test control line asserted;
- a negative signed product;
- the non-restoring add step;
- the restoring divider's restore step.

**Coverage testbench.** `tb/ctest_coverage_tb.sv` checks the property the whole design is
for. It applies each published test set and reads every cell's inputs through hierarchical
references. It then requires each cell to have seen every input combination, apart from a
few listed exceptions.

Most exceptions are combinations that cannot reach a cell in normal operation, so a fault on
them is harmless:

- `1001` (`a, b, sum_in, carry_in`) in the carry-propagate array;
- `0101` in the carry-save arrays;
- two combinations of one Baugh-Wooley final cell;
- the `x = 0` half of the cell whose top input is the constant 1.

The remaining exceptions are gaps of this implementation, listed below. The testbench also
requires the forced carry to fire in every multiplier.

**Scaling testbench.** `tb/ctest_scaling_tb.sv` checks that the test length does not grow
with the array. The published patterns are regular: each word is a two-bit unit repeated
along the array. The 5 x 5 words also keep their own bit 0 and top bit. The testbench widens
the 16 patterns by repeating that unit. It applies them to `mcpm` and `mcsm` at 4, 6, 8
and 16 bits, and to `mcsm_b`, `mcsm_c` and `mbwm` at 5, 7, 9 and 15 bits. It makes the
same per-cell check as the coverage testbench, with the same exceptions. Every cell at
every size passes. The widening rule is my own reading of the pattern structure. The
testbench checks coverage only, not responses. The dividers are not widened: their
patterns have no such simple unit.

## Where this RTL departs from, or reads into, the published design

- **Test-line assignment.**
  - `mcpm`: TEST1 drives the odd-numbered rows' boundary XORs and TEST2 the even ones.
  - `mnrd`: Test1 and Test2 alternate between the two XORs of each row.
  - `mcsm_b`: S1 and S2 alternate as described above.

  These are the readings that reproduce the published responses.
- **`mrsd` wiring.** The cell and the observation chain follow the published description.
  The array wiring, including where the restore-line XORs sit, is rebuilt from the plain
  restoring divider and the non-restoring design. It reproduces all 40 published responses.
- **S3 in `mbwm` normal mode** is 1, not 0 (see above).
- **Published test data used as reference.** A few published entries disagree with the rest
  of their own row or with another published test set. In those cases the consistent value
  is used, and each is marked in `tb/ctest_vectors_pkg.sv`:
  - one `mcsm_b` response;
  - one `mbwm` operand;
  - three `mnrd` divisors.
- **Unchecked `mcsm_c` patterns.** The responses of `mcsm_c` patterns 5 and 8 do not match
  this array, or any variant of its wiring that was considered, so the testbenches apply
  those two patterns without comparing them. The other 14 match, and the S4 gates are
  checked arithmetically instead.
- **Non-restoring divider coverage gap.** With the pattern set used here, each `mnrd` cell
  sees 14 of its 16 (`x, y, z, D`) combinations.
  - Cells in even columns miss `0010` and `0111`.
  - Cells in odd columns miss `1001` and `1100`.

  The design intends all 16. The three patterns whose divisors had to be changed to match
  the published responses are the ones that would supply those combinations. With the
  divisors as published, the array gives other responses and even less coverage, for every
  placement of Test1/Test2 that was tried. The exact intended wiring of this array is
  therefore not fully recovered.
- **`mcsm_c` final row.** Its last final-row cell misses one combination (`010`). Patterns 5
  and 8 would supply it, and they are the two this array does not reproduce.
- **Test-pattern generation is not hardware here.** The design gives algorithms that build
  the test sets from the cell labels for any N. It only suggests generating them on chip
  (built-in self-test). The test sets are therefore constants in the testbench package,
  for the published sizes only. At other sizes, the scaling testbench widens them for the
  five multipliers and checks per-cell coverage, not responses. For the dividers, only
  normal-mode arithmetic is simulated at other sizes.
- **Lint messages.** Two kinds of lint message remain, and both are intentional:
  - the dividers' ascending `[0:...]` ranges;
  - `mbwm`'s top final carry (weight 2^{2N}), left unconnected as in any 2N-bit signed
    product.
