// and_fa_cell -- basic cell of the C-testable array multipliers.
//
// The cell adds the partial product a & b to a sum input and a carry input
// with a full adder. Its one change from a textbook multiplier cell is what
// makes the arrays C-testable: when a = b = 0, sum_in = 0 and carry_in = 1
// the carry output is forced to 1 instead of 0. That input combination can
// never reach a cell during normal multiplication (with b = 0 or a = 0 the
// carry chain feeding the cell cannot carry a 1 into it while the sum input
// is 0), so the product is unchanged, but in test mode the extra carry lets
// the tester set up the combinations (0,0,1,1) and (0,1,1,1) in the
// neighbouring cells, so all 16 input combinations of every cell are applied.
//
// The same cell serves the carry-propagate array (sum_in = y from the row
// above, carry_in = z from the right) and the carry-save arrays (sum_in = c
// from above, carry_in = d, the diagonal carry of the row above).
//
// a_inv XORs a in front of the AND only; it models the S4 gate of the
// Baugh-Wooley variants (partial product b & (a ^ S4)). The forced-carry
// decode looks at the raw a, which is this design's reading of those
// figures: it is the one that reproduces the published test responses and
// keeps the Baugh-Wooley product exact. Tie a_inv to 0 everywhere else.
// Combinational.
module and_fa_cell
  import ctest_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic a_inv,
  input  logic sum_in,
  input  logic carry_in,
  output logic sum_out,
  output logic carry_out
);
  logic pp;
  logic force_carry;

  assign pp          = (a ^ a_inv) & b;
  assign force_carry = ~a & ~b & ~sum_in & carry_in;
  assign sum_out     = g(pp, sum_in, carry_in);
  assign carry_out   = f(pp, sum_in, carry_in) | force_carry;
endmodule
