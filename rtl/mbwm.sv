// mbwm -- C-testable (modified) Baugh-Wooley multiplier, N by N.
//
// Two's-complement N x N multiplier. The Baugh-Wooley form turns the
// negative-weight partial products into positive ones:
//   a*b = sum_{i,j<N-1} a_i b_j 2^(i+j) + a_{N-1} b_{N-1} 2^(2N-2)
//       + sum_{k<N-1} (a_{N-1} ~b_k + ~a_k b_{N-1}) 2^(N-1+k)
//       + (~a_{N-1} + ~b_{N-1}) 2^(2N-2) + (a_{N-1} + b_{N-1}) 2^(N-1)
//       + 2^(2N-1)            (mod 2^(2N))
// The N-1 carry-save rows are those of MCSM_C (csmb_rows): their left edge
// receives Z_k = a_{N-1} & (b_k ^ s3) and their last row the terms
// W_k = (a_k ^ s4) & b_{N-1}. Below them a ripple row of N+1 full adders:
//   cell 0      : sum of cell (0, N-1), e1 = a_{N-1} ^ s5, e2 = b_{N-1} ^ s6
//   cell k      : sum of cell (k, N-1), carry of cell (k-1, N-1), ripple
//   cell N-1    : extra cell X = full adder of ~a_{N-1}, ~b_{N-1},
//                 a_{N-1} & b_{N-1}: its sum, carry of cell (N-2, N-1), ripple
//   cell N      : constant 1, carry of X, ripple
// Product: P_0 = a_0 & b_0, P_1..P_{N-2} = rightmost carry-save sums,
// P_{N-1}..P_{2N-1} = final-row sums.
//
// Control pins s[5:0] = S6..S1 and d. Normal multiplication (P = a*b, signed):
// d = 0, S1 = S2 = S5 = S6 = 0, S3 = S4 = 1 (so Z_k = a_{N-1} & ~b_k and
// W_k = ~a_k & b_{N-1}). In test mode 16 patterns of d and S1..S6 apply all
// input combinations to every cell. The published text asks for S3 = 0 in
// normal operation, but the printed Z gate then forms a_{N-1} & b_k and the
// product is wrong; S3 = 1 is this design's choice, and it leaves the
// published test responses unchanged.
// The carry out of the constant-1 cell (fcarry[N+1]) has weight 2^(2N) and
// Z_{N-1} of the shared rows is replaced by the extra cell X: both are
// left unconnected, as in any 2N-bit two's-complement product.
// Combinational. Follows the published 5 x 5 design; N is a parameter.
module mbwm #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-2:0]   d,
  input  logic [5:0]     s,
  output logic [2*N-1:0] p
);
  localparam int unsigned M = N - 1;

  logic [M-2:0] right_sum;
  logic [M-1:0] last_sum, last_carry;
  logic         z_last_unused;
  logic         x_sum, x_carry;
  logic [N+1:1] fcarry;   // fcarry[k] is the ripple carry into final cell k

  csmb_rows #(.N(N)) u_rows (
    .a, .b, .d, .s1(s[0]), .s2(s[1]), .s3(s[2]), .s4(s[3]),
    .right_sum, .last_sum, .last_carry, .z_last(z_last_unused)
  );

  // Extra Baugh-Wooley cell at weight 2^(2N-2).
  fa_cell u_xcell (.x(~a[N-1]), .y(~b[N-1]), .z(a[N-1] & b[N-1]),
                   .s(x_sum), .c(x_carry));

  assign p[0]     = a[0] & b[0];
  assign p[M-1:1] = right_sum;

  for (genvar k = 0; k <= N; k++) begin : g_final
    logic top, dg, cin;
    if (k == 0) begin : g_first
      assign top = last_sum[0];
      assign dg  = a[N-1] ^ s[4];
      assign cin = b[N-1] ^ s[5];
    end else begin : g_rest
      if (k < M)       begin : g_top_a assign top = last_sum[k]; end
      else if (k == M) begin : g_top_b assign top = x_sum; end
      else             begin : g_top_c assign top = 1'b1; end
      if (k <= M) begin : g_dg_a assign dg = last_carry[k-1]; end
      else        begin : g_dg_b assign dg = x_carry; end
      assign cin = fcarry[k];
    end
    fa_cell u_fa (.x(top), .y(dg), .z(cin), .s(p[M+k]), .c(fcarry[k+1]));
  end
endmodule
