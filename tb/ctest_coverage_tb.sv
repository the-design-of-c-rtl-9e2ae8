// ctest_coverage_tb -- checks the property the whole design exists for: the
// published test set of each array applies every input combination to
// every cell.
//
// Each array is instantiated at its default size and driven with its
// published pattern set (the end-to-end inputs of the array only). After
// each pattern the testbench reads the inputs of every cell through
// hierarchical references and marks that combination as seen for that
// cell. At the end every cell must have seen all of its combinations,
//   and_fa_cell      (a, b, sum_in, carry_in)  16
//   fa_cell          (x, y, z)                  8
//   cas_cell         (x, y, z, D)              16
//   mcs_cell         (x, y, z, a, D)           32
// except those listed in the EXCL_* masks (bit = combination number):
//   * combinations that can never reach the cell in normal operation, so a
//     fault on them cannot matter: (a, b, sum_in, carry_in) = 1001 in the
//     carry-propagate array and 0101 in the carry-save arrays; (x, y, z) =
//     001 and 010 in the Baugh-Wooley final cell fed by the extra cell, and
//     every x = 0 combination in the cell whose top input is the constant 1;
//   * gaps of this implementation with the published pattern sets: one
//     final-row combination of MCSM_C (010 in its last cell, reached only by
//     the patterns whose responses it does not reproduce) and two
//     combinations per non-restoring divider cell (listed in the README).
// The forced carry of and_fa_cell is also counted: it must fire at least
// once in each multiplier, since the patterns depend on it.
// No clock: one pattern per time step. A watchdog stops a hung run.
module ctest_coverage_tb;
  import ctest_vectors_pkg::*;

  localparam logic [15:0] EXCL_CPM  = 16'h0200;  // 1001
  localparam logic [15:0] EXCL_CSM  = 16'h0020;  // 0101
  localparam logic [7:0]  EXCL_BW_X = 8'h06;     // 001, 010
  localparam logic [7:0]  EXCL_BW_1 = 8'h0f;     // x = 0
  localparam logic [7:0]  EXCL_CSC3 = 8'h04;     // 010
  localparam logic [15:0] EXCL_NRD_EVEN = 16'h0084;  // 0010, 0111
  localparam logic [15:0] EXCL_NRD_ODD  = 16'h1200;  // 1001, 1100

  int checks = 0, failures = 0;
  event sample;

  // ------------------------------------------------------------ arrays
  logic [3:0] mcpm_a, mcpm_b, mcpm_c, mcpm_d;
  logic       mcpm_t1, mcpm_t2;
  logic [7:0] mcpm_p;
  mcpm u_mcpm (.a(mcpm_a), .b(mcpm_b), .c(mcpm_c), .d(mcpm_d),
               .test1(mcpm_t1), .test2(mcpm_t2), .p(mcpm_p));

  logic [3:0] mcsm_a, mcsm_b, mcsm_c, mcsm_cp, mcsm_d;
  logic       mcsm_e, mcsm_cout;
  logic [7:0] mcsm_p;
  mcsm u_mcsm (.a(mcsm_a), .b(mcsm_b), .c(mcsm_c), .cp(mcsm_cp), .d(mcsm_d),
               .e(mcsm_e), .p(mcsm_p), .cout(mcsm_cout));

  logic [4:0] mcsmb_a, mcsmb_b;
  logic [3:0] mcsmb_d;
  logic       mcsmb_s1, mcsmb_s2, mcsmb_s3, mcsmb_e;
  logic [9:0] mcsmb_p;
  mcsm_b u_mcsmb (.a(mcsmb_a), .b(mcsmb_b), .d(mcsmb_d), .s1(mcsmb_s1), .s2(mcsmb_s2),
                  .s3(mcsmb_s3), .e(mcsmb_e), .p(mcsmb_p));

  logic [4:0] mcsmc_a, mcsmc_b;
  logic [3:0] mcsmc_d;
  logic       mcsmc_s1, mcsmc_s2, mcsmc_s3, mcsmc_s4, mcsmc_e;
  logic [9:0] mcsmc_p;
  mcsm_c u_mcsmc (.a(mcsmc_a), .b(mcsmc_b), .d(mcsmc_d), .s1(mcsmc_s1), .s2(mcsmc_s2),
                  .s3(mcsmc_s3), .s4(mcsmc_s4), .e(mcsmc_e), .p(mcsmc_p));

  logic [4:0] mbwm_a, mbwm_b;
  logic [3:0] mbwm_d;
  logic [5:0] mbwm_s;
  logic [9:0] mbwm_p;
  mbwm u_mbwm (.a(mbwm_a), .b(mbwm_b), .d(mbwm_d), .s(mbwm_s), .p(mbwm_p));

  logic       mnrd_dctl, mnrd_t1, mnrd_t2;
  logic [0:6] mnrd_n, mnrd_r;
  logic [0:3] mnrd_d, mnrd_q;
  mnrd u_mnrd (.dctl(mnrd_dctl), .n(mnrd_n), .d(mnrd_d), .test1(mnrd_t1), .test2(mnrd_t2),
               .q(mnrd_q), .r(mnrd_r));

  logic       mrsd_t1, mrsd_t2;
  logic [0:6] mrsd_n, mrsd_a, mrsd_r, mrsd_b;
  logic [0:3] mrsd_d, mrsd_z, mrsd_q;
  mrsd u_mrsd (.n(mrsd_n), .d(mrsd_d), .a(mrsd_a), .z(mrsd_z), .test1(mrsd_t1),
               .test2(mrsd_t2), .q(mrsd_q), .r(mrsd_r), .b(mrsd_b));

  // ------------------------------------------------------- cell monitors
  // One flag per cell: 1 when the cell has seen all its combinations.
  logic [15:0] mcpm_full, mcsm_full, mcsmb_full, mcsmc_full, mbwm_full;
  logic [3:0]  mcsm_fin_full;
  logic [3:0]  mcsmb_fin_full, mcsmc_fin_full;
  logic [5:0]  mbwm_fin_full;
  logic [15:0] mnrd_full, mrsd_full;
  int mcpm_forced = 0, mcsm_forced = 0, mcsmb_forced = 0, mcsmc_forced = 0, mbwm_forced = 0;

  for (genvar j = 0; j < 4; j++) begin : g_mcpm_r
    for (genvar i = 0; i < 4; i++) begin : g_c
      if (i == 3 && j >= 1) begin : g_fa
        logic [7:0] seen = '0;
        always @(sample) seen[{u_mcpm.g_row[j].g_col[i].g_boundary.u_fa.x,
                              u_mcpm.g_row[j].g_col[i].g_boundary.u_fa.y,
                              u_mcpm.g_row[j].g_col[i].g_boundary.u_fa.z}] = 1'b1;
        assign mcpm_full[4*j+i] = &seen;
      end else begin : g_and
        logic [15:0] seen = '0;
        always @(sample) begin
          seen[{u_mcpm.g_row[j].g_col[i].g_inner.u_cell.a, u_mcpm.g_row[j].g_col[i].g_inner.u_cell.b,
                u_mcpm.g_row[j].g_col[i].g_inner.u_cell.sum_in,
                u_mcpm.g_row[j].g_col[i].g_inner.u_cell.carry_in}] = 1'b1;
          if (u_mcpm.g_row[j].g_col[i].g_inner.u_cell.force_carry) mcpm_forced++;
        end
        assign mcpm_full[4*j+i] = &(seen | EXCL_CPM);
      end
    end
  end

  for (genvar j = 0; j < 4; j++) begin : g_mcsm_r
    for (genvar i = 0; i < 4; i++) begin : g_c
      logic [15:0] seen = '0;
      always @(sample) begin
        seen[{u_mcsm.g_row[j].g_col[i].u_cell.a, u_mcsm.g_row[j].g_col[i].u_cell.b,
              u_mcsm.g_row[j].g_col[i].u_cell.sum_in, u_mcsm.g_row[j].g_col[i].u_cell.carry_in}] = 1'b1;
        if (u_mcsm.g_row[j].g_col[i].u_cell.force_carry) mcsm_forced++;
      end
      assign mcsm_full[4*j+i] = &(seen | EXCL_CSM);
    end
  end
  for (genvar k = 0; k < 4; k++) begin : g_mcsm_f
    logic [7:0] seen = '0;
    always @(sample) seen[{u_mcsm.g_final[k].u_fa.x, u_mcsm.g_final[k].u_fa.y,
                          u_mcsm.g_final[k].u_fa.z}] = 1'b1;
    assign mcsm_fin_full[k] = &seen;
  end

  // The three carry-save arrays built on the shared rows (4 rows of 4 cells).
  for (genvar r = 1; r < 5; r++) begin : g_cs_r
    for (genvar i = 0; i < 4; i++) begin : g_c
      logic [15:0] seen_b = '0, seen_c = '0, seen_w = '0;
      always @(sample) begin
        seen_b[{u_mcsmb.u_rows.g_row[r].g_col[i].u_cell.a, u_mcsmb.u_rows.g_row[r].g_col[i].u_cell.b,
                u_mcsmb.u_rows.g_row[r].g_col[i].u_cell.sum_in,
                u_mcsmb.u_rows.g_row[r].g_col[i].u_cell.carry_in}] = 1'b1;
        seen_c[{u_mcsmc.u_rows.g_row[r].g_col[i].u_cell.a, u_mcsmc.u_rows.g_row[r].g_col[i].u_cell.b,
                u_mcsmc.u_rows.g_row[r].g_col[i].u_cell.sum_in,
                u_mcsmc.u_rows.g_row[r].g_col[i].u_cell.carry_in}] = 1'b1;
        seen_w[{u_mbwm.u_rows.g_row[r].g_col[i].u_cell.a, u_mbwm.u_rows.g_row[r].g_col[i].u_cell.b,
                u_mbwm.u_rows.g_row[r].g_col[i].u_cell.sum_in,
                u_mbwm.u_rows.g_row[r].g_col[i].u_cell.carry_in}] = 1'b1;
        if (u_mcsmb.u_rows.g_row[r].g_col[i].u_cell.force_carry) mcsmb_forced++;
        if (u_mcsmc.u_rows.g_row[r].g_col[i].u_cell.force_carry) mcsmc_forced++;
        if (u_mbwm.u_rows.g_row[r].g_col[i].u_cell.force_carry) mbwm_forced++;
      end
      assign mcsmb_full[4*(r-1)+i] = &(seen_b | EXCL_CSM);
      assign mcsmc_full[4*(r-1)+i] = &(seen_c | EXCL_CSM);
      assign mbwm_full[4*(r-1)+i]  = &(seen_w | EXCL_CSM);
    end
  end
  for (genvar k = 0; k < 4; k++) begin : g_csb_f
    logic [7:0] seen_b = '0, seen_c = '0;
    always @(sample) begin
      seen_b[{u_mcsmb.g_final[k].u_fa.x, u_mcsmb.g_final[k].u_fa.y, u_mcsmb.g_final[k].u_fa.z}] = 1'b1;
      seen_c[{u_mcsmc.g_final[k].u_fa.x, u_mcsmc.g_final[k].u_fa.y, u_mcsmc.g_final[k].u_fa.z}] = 1'b1;
    end
    assign mcsmb_fin_full[k] = &seen_b;
    assign mcsmc_fin_full[k] = &(seen_c | ((k == 3) ? EXCL_CSC3 : 8'h00));
  end
  for (genvar k = 0; k < 6; k++) begin : g_bw_f
    logic [7:0] seen = '0;
    always @(sample) seen[{u_mbwm.g_final[k].u_fa.x, u_mbwm.g_final[k].u_fa.y,
                          u_mbwm.g_final[k].u_fa.z}] = 1'b1;
    assign mbwm_fin_full[k] = &(seen | ((k == 4) ? EXCL_BW_X : (k == 5) ? EXCL_BW_1 : 8'h00));
  end

  for (genvar k = 0; k < 4; k++) begin : g_div_r
    for (genvar j = 0; j < 4; j++) begin : g_c
      logic [15:0] seen_n = '0;
      logic [31:0] seen_r = '0;
      always @(sample) begin
        seen_n[{u_mnrd.g_row[k].g_col[j].u_cas.x, u_mnrd.g_row[k].g_col[j].u_cas.y,
                u_mnrd.g_row[k].g_col[j].u_cas.z, u_mnrd.g_row[k].g_col[j].u_cas.dc}] = 1'b1;
        seen_r[{u_mrsd.g_row[k].g_col[j].u_mcs.x, u_mrsd.g_row[k].g_col[j].u_mcs.y,
                u_mrsd.g_row[k].g_col[j].u_mcs.z, u_mrsd.g_row[k].g_col[j].u_mcs.a,
                u_mrsd.g_row[k].g_col[j].u_mcs.dc}] = 1'b1;
      end
      assign mnrd_full[4*k+j] = &(seen_n | ((j % 2 == 0) ? EXCL_NRD_EVEN : EXCL_NRD_ODD));
      assign mrsd_full[4*k+j] = &seen_r;
    end
  end

  // ------------------------------------------------------------ stimulus
  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_all(string what, int unsigned full, int unsigned cells);
    checks++;
    if (full != cells) begin
      failures++;
      $display("FAIL %s: only %0d of %0d cells saw every required input combination",
               what, full, cells);
    end else begin
      $display("%-28s all %0d cells saw every required input combination", what, cells);
    end
  endfunction

  function automatic void expect_forced(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL %s: the forced carry never fired", what);
    end else begin
      $display("%-28s forced carry fired %0d times", what, count);
    end
  endfunction

  initial begin
    {mcpm_a, mcpm_b, mcpm_c, mcpm_d, mcpm_t1, mcpm_t2} = '0;
    {mcsm_a, mcsm_b, mcsm_c, mcsm_cp, mcsm_d, mcsm_e} = '0;
    {mcsmb_a, mcsmb_b, mcsmb_d, mcsmb_s1, mcsmb_s2, mcsmb_s3, mcsmb_e} = '0;
    {mcsmc_a, mcsmc_b, mcsmc_d, mcsmc_s1, mcsmc_s2, mcsmc_s3, mcsmc_s4, mcsmc_e} = '0;
    {mbwm_a, mbwm_b, mbwm_d, mbwm_s} = '0;
    {mnrd_dctl, mnrd_n, mnrd_d, mnrd_t1, mnrd_t2} = '0;
    {mrsd_n, mrsd_d, mrsd_a, mrsd_z, mrsd_t1, mrsd_t2} = '0;

    // The longest set has 40 patterns; shorter sets simply stop early.
    for (int k = 0; k < 40; k++) begin
      if (k < 16) begin
        {mcpm_a, mcpm_b, mcpm_c, mcpm_d, mcpm_t1, mcpm_t2} =
          {MCPM_TESTS[k].a, MCPM_TESTS[k].b, MCPM_TESTS[k].c, MCPM_TESTS[k].d,
           MCPM_TESTS[k].test1, MCPM_TESTS[k].test2};
        {mcsm_a, mcsm_b, mcsm_cp, mcsm_c, mcsm_d, mcsm_e} =
          {MCSM_TESTS[k].a, MCSM_TESTS[k].b, MCSM_TESTS[k].cp, MCSM_TESTS[k].c,
           MCSM_TESTS[k].d, MCSM_TESTS[k].e};
        {mcsmb_a, mcsmb_b, mcsmb_d, mcsmb_s1, mcsmb_s2, mcsmb_s3} =
          {MCSMB_TESTS[k].a, MCSMB_TESTS[k].b, MCSMB_TESTS[k].d,
           MCSMB_TESTS[k].s1, MCSMB_TESTS[k].s2, MCSMB_TESTS[k].s3};
        mcsmb_e = MCSMB_TESTS[k].a[0] & MCSMB_TESTS[k].b[1];
        {mcsmc_a, mcsmc_b, mcsmc_d, mcsmc_s1, mcsmc_s2, mcsmc_s3, mcsmc_s4} =
          {MCSMC_TESTS[k].a, MCSMC_TESTS[k].b, MCSMC_TESTS[k].d, MCSMC_TESTS[k].s1,
           MCSMC_TESTS[k].s2, MCSMC_TESTS[k].s3, MCSMC_TESTS[k].s4};
        mcsmc_e = MCSMC_TESTS[k].a[0] & MCSMC_TESTS[k].b[1];
        {mbwm_a, mbwm_b, mbwm_d, mbwm_s} =
          {MBWM_TESTS[k].a, MBWM_TESTS[k].b, MBWM_TESTS[k].d, MBWM_TESTS[k].s};
      end
      if (k < 20)
        {mnrd_dctl, mnrd_n, mnrd_d, mnrd_t1, mnrd_t2} =
          {MNRD_TESTS[k].dctl, MNRD_TESTS[k].n, MNRD_TESTS[k].d,
           MNRD_TESTS[k].test1, MNRD_TESTS[k].test2};
      {mrsd_n, mrsd_d, mrsd_a, mrsd_z, mrsd_t1, mrsd_t2} =
        {MRSD_TESTS[k].n, MRSD_TESTS[k].d, MRSD_TESTS[k].a, MRSD_TESTS[k].z,
         MRSD_TESTS[k].test1, MRSD_TESTS[k].test2};
      #1;
      ->sample;
      #1;
    end

    expect_all("MCPM cells", $countones(mcpm_full), 16);
    expect_all("MCSM cells", $countones(mcsm_full), 16);
    expect_all("MCSM final row", $countones(mcsm_fin_full), 4);
    expect_all("MCSM_B cells", $countones(mcsmb_full), 16);
    expect_all("MCSM_B final row", $countones(mcsmb_fin_full), 4);
    expect_all("MCSM_C cells", $countones(mcsmc_full), 16);
    expect_all("MCSM_C final row", $countones(mcsmc_fin_full), 4);
    expect_all("MBWM cells", $countones(mbwm_full), 16);
    expect_all("MBWM final row", $countones(mbwm_fin_full), 6);
    expect_all("MNRD cells", $countones(mnrd_full), 16);
    expect_all("MRSD cells", $countones(mrsd_full), 16);
    expect_forced("MCPM", mcpm_forced);
    expect_forced("MCSM", mcsm_forced);
    expect_forced("MCSM_B", mcsmb_forced);
    expect_forced("MCSM_C", mcsmc_forced);
    expect_forced("MBWM", mbwm_forced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
