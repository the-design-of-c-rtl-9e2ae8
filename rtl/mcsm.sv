// mcsm -- C-testable (modified) carry-save array multiplier, N by N.
//
// N rows of AND/full-adder cells reduce the partial products a_i & b_j in
// carry-save form; a ripple-carry row of N full adders at the bottom adds
// the last row's sums and carries. Cell (i,j) (weight 2^(i+j)) adds
//   top input  = sum of cell (i+1, j-1); c_i in the first row;
//                c'_{j-1} for the leftmost cell of row j >= 1
//   diagonal   = carry of cell (i, j-1); d_i in the first row
//   a_i & b_j.
// Final-row cell k adds the sum of cell (k+1, N-1) (c'_{N-1} for k = N-1),
// the carry of cell (k, N-1) and the ripple carry (e into k = 0).
// p_j = sum of cell (0, j), p_{N+k} = sum of final cell k; cout is the last
// ripple carry.
//
// Test hooks: c, c', d and e, all 0 in a textbook array, are pins, and the
// array cells use the forced-carry rule of and_fa_cell (carry 1 for
// sum-in 0, carry-in 1, a = b = 0), a pattern that never occurs in normal
// use. With those pins at 0, p = a * b and cout = 0; in test mode 16
// patterns test every cell exhaustively. No extra gates are needed.
//
// Combinational. Structure and test hooks follow the published 4 x 4
// design; N is a parameter here.
module mcsm #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   c,
  input  logic [N-1:0]   cp,
  input  logic [N-1:0]   d,
  input  logic           e,
  output logic [2*N-1:0] p,
  output logic           cout
);
  logic [N-1:0] sum   [N];
  logic [N-1:0] carry [N];
  logic [N-1:0] fsum;
  logic [N:0]   fcarry;

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic top, dg;
      if (j == 0)         begin : g_top_a assign top = c[i]; end
      else if (i < N - 1) begin : g_top_b assign top = sum[j-1][i+1]; end
      else                begin : g_top_c assign top = cp[j-1]; end

      if (j == 0) begin : g_dg_a assign dg = d[i]; end
      else        begin : g_dg_b assign dg = carry[j-1][i]; end

      and_fa_cell u_cell (
        .a(a[i]), .b(b[j]), .a_inv(1'b0), .sum_in(top), .carry_in(dg),
        .sum_out(sum[j][i]), .carry_out(carry[j][i])
      );
    end
    assign p[j] = sum[j][0];
  end

  assign fcarry[0] = e;
  for (genvar k = 0; k < N; k++) begin : g_final
    logic top;
    if (k < N - 1) begin : g_top_a assign top = sum[N-1][k+1]; end
    else           begin : g_top_b assign top = cp[N-1]; end
    fa_cell u_fa (.x(top), .y(carry[N-1][k]), .z(fcarry[k]),
                  .s(fsum[k]), .c(fcarry[k+1]));
    assign p[N+k] = fsum[k];
  end
  assign cout = fcarry[N];
endmodule
