// mcs_cell -- modified controlled subtractor of the C-testable restoring
// divider.
//
// The plain cell computes x - y - z: borrow p = y&z | ~x&z | ~x&y, and the
// result bit s is either the difference x^y^z (dc = 0) or, when the row has
// to restore because the subtraction went negative, x itself (dc = 1).
// With dc = 1 a fault on y or z would be invisible at s, so the cell gets an
// extra input a and an extra output b = a ^ y ^ z that carries any change
// of y or z to an observable pin in test mode. In normal operation a is
// don't-care and b is unused. Combinational.
module mcs_cell
  import ctest_pkg::*;
(
  input  logic x,
  input  logic y,
  input  logic z,
  input  logic a,
  input  logic dc,
  output logic s,
  output logic p,
  output logic b
);
  assign p = f(~x, y, z);
  assign s = dc ? x : g(x, y, z);
  assign b = g(a, y, z);
endmodule
