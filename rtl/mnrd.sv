// mnrd -- C-testable (modified) non-restoring array divider, N rows of N
// controllable add/subtract (CAS) cells.
//
// Divides a (2N-1)-bit dividend n_0..n_{2N-2} by an N-bit divisor
// d_0..d_{N-1} (index 0 is the most significant bit, the sign bit). Row k
// adds or subtracts the divisor from the partial remainder according to its
// control line D_k, the carry ripples from the rightmost cell to the
// leftmost, whose carry is the quotient bit q_k, and q_k becomes the next
// row's control: subtract after a positive result, add after a negative
// one. Cell (k, j), j = 0 leftmost:
//   X = n_j in row 0; the sum of cell (k-1, j+1); n_{N-1+k} for j = N-1
//   Y = d_j,  Z = carry of cell (k, j+1), or the row's end-around input
//   r_k = sum of cell (k, 0) for k < N-1 (not used in division, observed in
//   test), r_{N-1+j} = sums of the last row (the remainder).
//
// Test hooks: two XOR gates per row. D_0 = dctl (a pin; 1 for division),
// D_k = q_{k-1} ^ (Test1 for odd k, Test2 for even k), and the end-around
// carry into the rightmost cell is D_k ^ (Test1 for even k, Test2 for odd
// k). With Test1 = Test2 = 0 it is the textbook divider; in test mode 20
// patterns apply all combinations to every cell.
//
// Normal use: dctl = 1, Test1 = Test2 = 0, positive operands (n_0 = d_0 = 0)
// with n_0..n_{N-1} < d; q is then the quotient. Combinational.
// The cell and array follow the published design; the assignment of Test1
// and Test2 to the XORs is this design's reading of the schematic, chosen
// because it reproduces the published test responses. N is a parameter.
// Buses are declared [0:...] on purpose so that bit 0 is the most
// significant, matching the published bit numbering.
module mnrd #(
  parameter int unsigned N = 4
) (
  input  logic             dctl,
  input  logic [0:2*N-2]   n,
  input  logic [0:N-1]     d,
  input  logic             test1,
  input  logic             test2,
  output logic [0:N-1]     q,
  output logic [0:2*N-2]   r
);
  logic [0:N-1] s  [N];
  logic [0:N-1] p  [N];
  logic [0:N-1] dk;

  for (genvar k = 0; k < N; k++) begin : g_row
    if (k == 0) begin : g_dk_a assign dk[k] = dctl; end
    else        begin : g_dk_b assign dk[k] = p[k-1][0] ^ ((k % 2 == 1) ? test1 : test2); end

    for (genvar j = 0; j < N; j++) begin : g_col
      logic x, z;
      if (k == 0)         begin : g_x_a assign x = n[j]; end
      else if (j < N - 1) begin : g_x_b assign x = s[k-1][j+1]; end
      else                begin : g_x_c assign x = n[N-1+k]; end

      if (j == N - 1) begin : g_z_a assign z = dk[k] ^ ((k % 2 == 0) ? test1 : test2); end
      else            begin : g_z_b assign z = p[k][j+1]; end

      cas_cell u_cas (.x(x), .y(d[j]), .z(z), .dc(dk[k]), .s(s[k][j]), .p(p[k][j]));
    end
    assign q[k] = p[k][0];
  end

  for (genvar k = 0; k < N - 1; k++) begin : g_rlo
    assign r[k] = s[k][0];
  end
  for (genvar j = 0; j < N; j++) begin : g_rhi
    assign r[N-1+j] = s[N-1][j];
  end
endmodule
