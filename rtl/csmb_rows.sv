// csmb_rows -- carry-save rows shared by MCSM_B, MCSM_C and MBWM.
//
// The N-bit operands are reduced by N-1 rows of N-1 AND/full-adder cells
// (rows r = 1..N-1, cells i = 0..N-2; cell (i,r) has weight 2^(i+r) and
// adds a_i & b_r). The terms of b_0 and of a_{N-1} enter from the top and
// the left edge instead of forming rows and columns of their own:
//   top of cell (i,1), i < N-2 : X/Y term (a_{i+1} & b_0) ^ S, where S is
//                                s1 for odd i+1 and s2 for even i+1
//   top of the leftmost cell of row r : Z_{r-1} = a_{N-1} & (b_{r-1} ^ s3)
//   top of other cells          : sum of cell (i+1, r-1)
//   diagonal of cell (i,1)      : d_i;  of cell (i,r>1): carry of (i, r-1)
// The last row (r = N-1) forms its partial product as (a_i ^ s4) & b_{N-1}
// (the W_k gates); the forced-carry rule of the cell still looks at a_i.
// Outputs: the sums of the rightmost cells of rows 1..N-2, the sums
// and carries of the last row and Z_{N-1}, for the wrapper to finish with
// its own final adder row.
//
// With s1 = s2 = s3 = s4 = 0 and d = 0 these are the rows of a plain
// unsigned carry-save multiplier. Combinational.
module csmb_rows #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-2:0] d,
  input  logic         s1,
  input  logic         s2,
  input  logic         s3,
  input  logic         s4,
  output logic [N-3:0] right_sum,   // right_sum[r-1] = sum of cell (0, r), r < N-1
  output logic [N-2:0] last_sum,    // sums of row N-1 (last_sum[0] is cell (0, N-1))
  output logic [N-2:0] last_carry,  // carries of row N-1
  output logic         z_last       // Z_{N-1}
);
  localparam int unsigned M = N - 1;  // cells per row

  logic [M-1:0] sum   [1:N-1];
  logic [M-1:0] carry [1:N-1];
  logic [N-1:0] zt;

  for (genvar k = 0; k < N; k++) begin : g_z
    assign zt[k] = a[N-1] & (b[k] ^ s3);
  end
  assign z_last = zt[N-1];

  for (genvar r = 1; r < N; r++) begin : g_row
    for (genvar i = 0; i < M; i++) begin : g_col
      logic top, dg;
      if (i == M - 1)     begin : g_top_a assign top = zt[r-1]; end
      else if (r == 1)    begin : g_top_b assign top = (a[i+1] & b[0]) ^ (((i + 1) % 2 == 1) ? s1 : s2); end
      else                begin : g_top_c assign top = sum[r-1][i+1]; end

      if (r == 1) begin : g_dg_a assign dg = d[i]; end
      else        begin : g_dg_b assign dg = carry[r-1][i]; end

      and_fa_cell u_cell (
        .a(a[i]), .b(b[r]), .a_inv((r == N - 1) ? s4 : 1'b0),
        .sum_in(top), .carry_in(dg),
        .sum_out(sum[r][i]), .carry_out(carry[r][i])
      );
    end
  end

  for (genvar r = 1; r < N - 1; r++) begin : g_right
    assign right_sum[r-1] = sum[r][0];
  end

  assign last_sum   = sum[N-1];
  assign last_carry = carry[N-1];
endmodule
