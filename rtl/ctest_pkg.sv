// ctest_pkg -- bit functions shared by the cells of the C-testable arrays.
//
// g() is the three-input sum over GF(2) and f() the three-input majority
// (the carry of that sum). Every cell in this library is one of these two
// functions applied to its inputs, sometimes with an inverted operand, so the
// cells spell out their equations with them. Purely combinational.
package ctest_pkg;

  // Sum bit of a full adder: x XOR y XOR z.
  function automatic logic g(input logic x, input logic y, input logic z);
    return x ^ y ^ z;
  endfunction

  // Carry bit of a full adder: majority of x, y, z.
  function automatic logic f(input logic x, input logic y, input logic z);
    return (x & y) | (x & z) | (y & z);
  endfunction

endpackage
