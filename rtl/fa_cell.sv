// fa_cell -- plain full adder.
//
// s = x ^ y ^ z, c = majority(x, y, z). Used where the arrays need an adder
// without the partial-product AND: the left-boundary cells of the MCPM (whose
// AND term is formed outside so that a test XOR can sit in front of it), the
// carry-propagate rows of the carry-save multipliers and the extra
// Baugh-Wooley cells. Combinational, no timing of its own.
module fa_cell
  import ctest_pkg::*;
(
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);
  assign s = g(x, y, z);
  assign c = f(x, y, z);
endmodule
