// cas_cell -- controllable adder/subtractor of the non-restoring divider.
//
// With dc = 0 the cell is a full adder of x, y and z; with dc = 1 it adds
// x, z and the complement of y, so a row of these cells with the row's
// carry-in tied to dc adds or subtracts the divisor:
//   s = x ^ y ^ z ^ dc,  p = (y^dc)&x | (y^dc)&z | x&z.
// The divisor bit y and the control dc also pass straight through the cell
// to its neighbours; in this library that is wiring in the array.
// Combinational.
module cas_cell
  import ctest_pkg::*;
(
  input  logic x,
  input  logic y,
  input  logic z,
  input  logic dc,
  output logic s,
  output logic p
);
  logic yd;
  assign yd = y ^ dc;
  assign s  = g(x, yd, z);
  assign p  = f(x, yd, z);
endmodule
