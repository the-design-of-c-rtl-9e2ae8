// mrsd -- C-testable (modified) restoring array divider, N rows of N
// modified controlled-subtractor (MCS) cells.
//
// Divides a (2N-1)-bit dividend n_0..n_{2N-2} by an N-bit divisor
// d_0..d_{N-1} (index 0 most significant). Each row subtracts the divisor
// from the partial remainder; the borrow ripples from right to left and the
// leftmost borrow q_k tells whether the result went negative. That borrow is
// fed back along the row as its restore line D_k: when it is 1 every cell
// passes its X input instead of the difference. Cell (k, j), j = 0 leftmost:
//   X = n_j in row 0; the result of cell (k-1, j+1); n_{N-1+k} for j = N-1
//   Y = d_j,  Z = borrow of cell (k, j+1), z_k for the rightmost cell
//   A / B: the extra test chain, wired like X / S (a enters where n enters,
//   b leaves where r leaves).
//   q_k = borrow out of row k, r_k = result of cell (k, 0) for k < N-1,
//   r_{N-1+j} = results of the last row.
//
// Test hooks: z (borrow-ins, 0 in normal use), the A/B chain, and one XOR on
// each row's restore line, D_k = q_k ^ (Test1 for even k, Test2 for odd k),
// which lets the tester hold every row at D = 0 or D = 1. 40 patterns then
// apply all combinations to every cell.
//
// Normal use: Test1 = Test2 = 0, z = 0, a don't-care, b unused. With
// positive operands (n_0 = d_0 = 0) and n_0..n_{N-1} < d, ~q is the quotient
// and r_{N-1}..r_{2N-2} the remainder. Note q is the borrow, the complement
// of the quotient bit, as in the published test responses.
// Combinational. The cell and the A/B chain follow the published design. The array
// wiring is the standard restoring divider built from that cell, with the
// restore-line XORs placed as in the non-restoring design; this is this
// design's reading, chosen because it reproduces all 40 published test
// responses. N is a parameter. Buses are declared [0:...] on purpose so that
// bit 0 is the most significant, matching the published bit numbering.
module mrsd #(
  parameter int unsigned N = 4
) (
  input  logic [0:2*N-2]   n,
  input  logic [0:N-1]     d,
  input  logic [0:2*N-2]   a,
  input  logic [0:N-1]     z,
  input  logic             test1,
  input  logic             test2,
  output logic [0:N-1]     q,
  output logic [0:2*N-2]   r,
  output logic [0:2*N-2]   b
);
  logic [0:N-1] s  [N];
  logic [0:N-1] p  [N];
  logic [0:N-1] bo [N];
  logic [0:N-1] dk;

  for (genvar k = 0; k < N; k++) begin : g_row
    assign dk[k] = p[k][0] ^ ((k % 2 == 0) ? test1 : test2);

    for (genvar j = 0; j < N; j++) begin : g_col
      logic x, ai, zi;
      if (k == 0) begin : g_top
        assign x  = n[j];
        assign ai = a[j];
      end else if (j < N - 1) begin : g_inner
        assign x  = s[k-1][j+1];
        assign ai = bo[k-1][j+1];
      end else begin : g_edge
        assign x  = n[N-1+k];
        assign ai = a[N-1+k];
      end

      if (j == N - 1) begin : g_zi_a assign zi = z[k]; end
      else            begin : g_zi_b assign zi = p[k][j+1]; end

      mcs_cell u_mcs (.x(x), .y(d[j]), .z(zi), .a(ai), .dc(dk[k]),
                      .s(s[k][j]), .p(p[k][j]), .b(bo[k][j]));
    end
    assign q[k] = p[k][0];
  end

  for (genvar k = 0; k < N - 1; k++) begin : g_lo
    assign r[k] = s[k][0];
    assign b[k] = bo[k][0];
  end
  for (genvar j = 0; j < N; j++) begin : g_hi
    assign r[N-1+j] = s[N-1][j];
    assign b[N-1+j] = bo[N-1][j];
  end
endmodule
