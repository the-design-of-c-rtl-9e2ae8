// mcpm -- C-testable (modified) carry-propagate array multiplier, N by N.
//
// An N x N array of AND/full-adder cells multiplies two unsigned N-bit
// numbers. Row j adds the partial products a_i & b_j to the sums of the row
// above; its carries ripple from right to left and the leftmost carry drops
// into the leftmost cell of the next row. Cell (i,j) has weight 2^(i+j):
//   y input = sum of cell (i+1, j-1), or the leftmost carry of row j-1 for
//             the leftmost cell; c_i for the first row
//   z input = carry of cell (i-1, j), or d_j for the rightmost cell
//   p_j     = sum of the rightmost cell of row j (j < N-1),
//   p_{N-1+i} = sums of the last row, p_{2N-1} = its leftmost carry.
//
// Test hooks. The inputs that a textbook multiplier ties to 0 (c and d) are
// pins, every cell except the left-boundary ones uses the forced-carry cell
// (and_fa_cell), and the left-boundary cells of rows 1..N-1 are plain
// adders whose partial product a_{N-1} & b_j passes an XOR with TEST1
// (rows 1, 3, ...) or TEST2 (rows 2, 4, ...). With c = d = 0 and
// TEST1 = TEST2 = 0 the array is an ordinary multiplier, p = a * b. In test
// mode 16 patterns apply all 16 input combinations to every cell whatever N
// is, and the XORs sit beside, not on, the carry-propagation path.
//
// Purely combinational; the delay is that of the ripple through the array.
// The structure, the cell rule and the TEST1/TEST2 assignment follow the
// published design; N is a parameter here (the worked example is 4 x 4).
module mcpm #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   c,
  input  logic [N-1:0]   d,
  input  logic           test1,
  input  logic           test2,
  output logic [2*N-1:0] p
);
  // sum[j][i], carry[j][i] belong to cell (i, j)
  logic [N-1:0] sum   [N];
  logic [N-1:0] carry [N];

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic y, z;
      if (j == 0)          begin : g_y_a assign y = c[i]; end
      else if (i < N - 1)  begin : g_y_b assign y = sum[j-1][i+1]; end
      else                 begin : g_y_c assign y = carry[j-1][N-1]; end

      if (i == 0) begin : g_z_a assign z = d[j]; end
      else        begin : g_z_b assign z = carry[j][i-1]; end

      if (i == N - 1 && j >= 1) begin : g_boundary
        logic x;
        assign x = (a[i] & b[j]) ^ ((j % 2 == 1) ? test1 : test2);
        fa_cell u_fa (.x(x), .y(y), .z(z), .s(sum[j][i]), .c(carry[j][i]));
      end else begin : g_inner
        and_fa_cell u_cell (
          .a(a[i]), .b(b[j]), .a_inv(1'b0), .sum_in(y), .carry_in(z),
          .sum_out(sum[j][i]), .carry_out(carry[j][i])
        );
      end
    end
  end

  for (genvar j = 0; j < N - 1; j++) begin : g_plo
    assign p[j] = sum[j][0];
  end
  for (genvar i = 0; i < N; i++) begin : g_phi
    assign p[N-1+i] = sum[N-1][i];
  end
  assign p[2*N-1] = carry[N-1][N-1];
endmodule
