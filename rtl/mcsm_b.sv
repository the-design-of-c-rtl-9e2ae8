// mcsm_b -- alternative C-testable carry-save multiplier (MCSM_B), N by N.
//
// Unsigned N x N multiplier in which the b_0 and a_{N-1} partial products
// enter the edges of N-1 carry-save rows (see csmb_rows) and a ripple row
// of N-1 full adders finishes the sum. Product bits: p_0 = a_0 & b_0,
// p_1..p_{N-1} from the rightmost carry-save cells, p_N..p_{2N-2} from the
// final row, p_{2N-1} its last carry. Final cell k adds the sum of cell
// (k+1, N-1) (Z_{N-1} = a_{N-1} & (b_{N-1} ^ s3) for the leftmost), the
// carry of cell (k, N-1) and the ripple carry (e into the first).
//
// Test hooks: d (diagonal inputs of the first row) and e are pins; s1/s2
// XOR the top-row terms a_i & b_0 (odd / even i), s3 XORs b_k in the
// a_{N-1} column terms. All 0 for multiplication (p = a * b); in test mode
// 16 patterns apply all 16 combinations to every cell.
// Combinational. Follows the published 5 x 5 design; N is a parameter.
module mcsm_b #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-2:0]   d,
  input  logic           s1,
  input  logic           s2,
  input  logic           s3,
  input  logic           e,
  output logic [2*N-1:0] p
);
  localparam int unsigned M = N - 1;

  logic [M-2:0] right_sum;
  logic [M-1:0] last_sum, last_carry;
  logic         z_last;
  logic [M:0]   fcarry;

  csmb_rows #(.N(N)) u_rows (
    .a, .b, .d, .s1, .s2, .s3, .s4(1'b0),
    .right_sum, .last_sum, .last_carry, .z_last
  );

  assign p[0]   = a[0] & b[0];
  assign p[M:1] = {last_sum[0], right_sum};

  assign fcarry[0] = e;
  for (genvar k = 0; k < M; k++) begin : g_final
    logic top;
    if (k < M - 1) begin : g_top_a assign top = last_sum[k+1]; end
    else           begin : g_top_b assign top = z_last; end
    fa_cell u_fa (.x(top), .y(last_carry[k]), .z(fcarry[k]),
                  .s(p[N+k]), .c(fcarry[k+1]));
  end
  assign p[2*N-1] = fcarry[M];
endmodule
