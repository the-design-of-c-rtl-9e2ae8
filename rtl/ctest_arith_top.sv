// ctest_arith_top -- the family of C-testable arithmetic arrays, side by side.
//
// The design is a set of iterative arithmetic arrays, each modified so that
// a fixed, small number of test patterns exercises every cell with every
// input combination, however large the array grows (C-testability). The
// arrays are independent designs of the same idea, so the top places them
// next to each other and brings out every pin of each under its own prefix:
//   mcpm_*   carry-propagate multiplier, 4 x 4, TEST1/TEST2 lines
//   mcsm_*   carry-save multiplier, 4 x 4
//   mcsmb_*  carry-save multiplier with S1..S3 lines, 5 x 5
//   mcsmc_*  carry-save multiplier with S1..S4 lines, 5 x 5
//   mbwm_*   Baugh-Wooley two's-complement multiplier, S1..S6 lines, 5 x 5
//   mnrd_*   non-restoring array divider, 4 x 4, Test1/Test2 lines
//   mrsd_*   restoring array divider with observation chain, 4 x 4
// Each array's normal-mode settings are given in its own module header.
// The divider buses are declared [0:...] so that bit 0 is the most
// significant, as in the dividers themselves.
// Purely combinational: there is no clock and no reset, and every output
// settles one array-propagation delay after its inputs.
// The array sizes are those of the worked examples of the design; the
// grouping into one top is this design's own.
module ctest_arith_top #(
  parameter int unsigned MUL_N = 4,  // MCPM and MCSM operand width
  parameter int unsigned CS_N  = 5,  // MCSM_B, MCSM_C and MBWM operand width
  parameter int unsigned DIV_N = 4   // MNRD and MRSD divisor width
) (
  // carry-propagate multiplier
  input  logic [MUL_N-1:0]   mcpm_a,
  input  logic [MUL_N-1:0]   mcpm_b,
  input  logic [MUL_N-1:0]   mcpm_c,
  input  logic [MUL_N-1:0]   mcpm_d,
  input  logic               mcpm_test1,
  input  logic               mcpm_test2,
  output logic [2*MUL_N-1:0] mcpm_p,
  // carry-save multiplier
  input  logic [MUL_N-1:0]   mcsm_a,
  input  logic [MUL_N-1:0]   mcsm_b,
  input  logic [MUL_N-1:0]   mcsm_c,
  input  logic [MUL_N-1:0]   mcsm_cp,
  input  logic [MUL_N-1:0]   mcsm_d,
  input  logic               mcsm_e,
  output logic [2*MUL_N-1:0] mcsm_p,
  output logic               mcsm_cout,
  // carry-save multiplier, S1..S3 variant
  input  logic [CS_N-1:0]    mcsmb_a,
  input  logic [CS_N-1:0]    mcsmb_b,
  input  logic [CS_N-2:0]    mcsmb_d,
  input  logic               mcsmb_s1,
  input  logic               mcsmb_s2,
  input  logic               mcsmb_s3,
  input  logic               mcsmb_e,
  output logic [2*CS_N-1:0]  mcsmb_p,
  // carry-save multiplier, S1..S4 variant
  input  logic [CS_N-1:0]    mcsmc_a,
  input  logic [CS_N-1:0]    mcsmc_b,
  input  logic [CS_N-2:0]    mcsmc_d,
  input  logic               mcsmc_s1,
  input  logic               mcsmc_s2,
  input  logic               mcsmc_s3,
  input  logic               mcsmc_s4,
  input  logic               mcsmc_e,
  output logic [2*CS_N-1:0]  mcsmc_p,
  // Baugh-Wooley multiplier
  input  logic [CS_N-1:0]    mbwm_a,
  input  logic [CS_N-1:0]    mbwm_b,
  input  logic [CS_N-2:0]    mbwm_d,
  input  logic [5:0]         mbwm_s,
  output logic [2*CS_N-1:0]  mbwm_p,
  // non-restoring divider
  input  logic               mnrd_dctl,
  input  logic [0:2*DIV_N-2] mnrd_n,
  input  logic [0:DIV_N-1]   mnrd_d,
  input  logic               mnrd_test1,
  input  logic               mnrd_test2,
  output logic [0:DIV_N-1]   mnrd_q,
  output logic [0:2*DIV_N-2] mnrd_r,
  // restoring divider
  input  logic [0:2*DIV_N-2] mrsd_n,
  input  logic [0:DIV_N-1]   mrsd_d,
  input  logic [0:2*DIV_N-2] mrsd_a,
  input  logic [0:DIV_N-1]   mrsd_z,
  input  logic               mrsd_test1,
  input  logic               mrsd_test2,
  output logic [0:DIV_N-1]   mrsd_q,
  output logic [0:2*DIV_N-2] mrsd_r,
  output logic [0:2*DIV_N-2] mrsd_b
);

  mcpm #(.N(MUL_N)) u_mcpm (
    .a(mcpm_a), .b(mcpm_b), .c(mcpm_c), .d(mcpm_d),
    .test1(mcpm_test1), .test2(mcpm_test2), .p(mcpm_p)
  );

  mcsm #(.N(MUL_N)) u_mcsm (
    .a(mcsm_a), .b(mcsm_b), .c(mcsm_c), .cp(mcsm_cp), .d(mcsm_d),
    .e(mcsm_e), .p(mcsm_p), .cout(mcsm_cout)
  );

  mcsm_b #(.N(CS_N)) u_mcsm_b (
    .a(mcsmb_a), .b(mcsmb_b), .d(mcsmb_d),
    .s1(mcsmb_s1), .s2(mcsmb_s2), .s3(mcsmb_s3), .e(mcsmb_e), .p(mcsmb_p)
  );

  mcsm_c #(.N(CS_N)) u_mcsm_c (
    .a(mcsmc_a), .b(mcsmc_b), .d(mcsmc_d),
    .s1(mcsmc_s1), .s2(mcsmc_s2), .s3(mcsmc_s3), .s4(mcsmc_s4), .e(mcsmc_e),
    .p(mcsmc_p)
  );

  mbwm #(.N(CS_N)) u_mbwm (
    .a(mbwm_a), .b(mbwm_b), .d(mbwm_d), .s(mbwm_s), .p(mbwm_p)
  );

  mnrd #(.N(DIV_N)) u_mnrd (
    .dctl(mnrd_dctl), .n(mnrd_n), .d(mnrd_d),
    .test1(mnrd_test1), .test2(mnrd_test2), .q(mnrd_q), .r(mnrd_r)
  );

  mrsd #(.N(DIV_N)) u_mrsd (
    .n(mrsd_n), .d(mrsd_d), .a(mrsd_a), .z(mrsd_z),
    .test1(mrsd_test1), .test2(mrsd_test2), .q(mrsd_q), .r(mrsd_r), .b(mrsd_b)
  );

endmodule
