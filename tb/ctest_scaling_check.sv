// ctest_scaling_check -- one size of the scaling test.
//
// Instantiates MCPM and MCSM at size NP and MCSM_B, MCSM_C and MBWM at
// size NB, applies the 16 widened test patterns, and records through
// hierarchical references the input combinations each cell receives.
//
// The published pattern sets are regular: every operand and control word
// is a two-bit unit repeated along the array. The words of the 5 x 5
// arrays also keep their own bit 0 and top bit, with bits 2:1 repeated
// between them. Widening the patterns in the same way gives patterns for
// larger arrays; this widening rule is this design's reading of the
// pattern structure, not a printed pattern set. Every cell must see all of
// its input combinations except those that cannot occur in normal
// operation: 1001 in the carry-propagate array, 0101 in the carry-save
// arrays, 001 and 010 in the Baugh-Wooley final cell next to the extra
// cell, and x = 0 in the extra cell whose top input is the constant 1.
// MCSM_C's last final-row cell is also let off 010: the published set
// misses it at the default size too, and the widened set keeps that gap.
// Products are not checked here; the block testbenches do that.
// Interface: outputs only. done rises after the last pattern and the
// checks; checks and failures count the per-array coverage checks (9 per
// instance). One pattern per time step, no clock.
module ctest_scaling_check #(
  parameter int unsigned NP = 8,  // MCPM / MCSM size, even, 4..16
  parameter int unsigned NB = 7   // MCSM_B / MCSM_C / MBWM size, odd, 5..15
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import ctest_vectors_pkg::*;

  localparam logic [15:0] EXCL_CPM  = 16'h0200;  // 1001
  localparam logic [15:0] EXCL_CSM  = 16'h0020;  // 0101
  localparam logic [7:0]  EXCL_CSC3 = 8'h04;     // 010, see below
  localparam logic [7:0]  EXCL_BW_X = 8'h06;     // 001, 010
  localparam logic [7:0]  EXCL_BW_1 = 8'h0f;     // x = 0

  event sample;

  // Repeat bits 1:0 of v over w bits.
  function automatic logic [15:0] rep2(logic [15:0] v, int w);
    logic [15:0] r = '0;
    for (int i = 0; i < w; i++) r[i] = v[i % 2];
    return r;
  endfunction

  // Widen a 5-bit word of the 5 x 5 arrays: bit 0 and the top bit keep
  // their values, the middle bits repeat bits 2:1.
  function automatic logic [15:0] rep2_mid(logic [4:0] v, int w);
    logic [15:0] r = '0;
    r[0] = v[0];
    for (int i = 1; i < w - 1; i++) r[i] = v[1 + (i - 1) % 2];
    r[w-1] = v[4];
    return r;
  endfunction

  logic [NP-1:0]   mcpm_a, mcpm_b, mcpm_c, mcpm_d;
  logic            mcpm_t1, mcpm_t2;
  logic [2*NP-1:0] mcpm_p;
  mcpm #(.N(NP)) u_mcpm (.a(mcpm_a), .b(mcpm_b), .c(mcpm_c), .d(mcpm_d),
                         .test1(mcpm_t1), .test2(mcpm_t2), .p(mcpm_p));

  logic [NP-1:0]   mcsm_a, mcsm_b, mcsm_c, mcsm_cp, mcsm_d;
  logic            mcsm_e, mcsm_cout;
  logic [2*NP-1:0] mcsm_p;
  mcsm #(.N(NP)) u_mcsm (.a(mcsm_a), .b(mcsm_b), .c(mcsm_c), .cp(mcsm_cp), .d(mcsm_d),
                         .e(mcsm_e), .p(mcsm_p), .cout(mcsm_cout));

  logic [NB-1:0]   mcsmb_a, mcsmb_b;
  logic [NB-2:0]   mcsmb_d;
  logic            mcsmb_s1, mcsmb_s2, mcsmb_s3, mcsmb_e;
  logic [2*NB-1:0] mcsmb_p;
  mcsm_b #(.N(NB)) u_mcsmb (.a(mcsmb_a), .b(mcsmb_b), .d(mcsmb_d), .s1(mcsmb_s1),
                            .s2(mcsmb_s2), .s3(mcsmb_s3), .e(mcsmb_e), .p(mcsmb_p));

  logic [NB-1:0]   mcsmc_a, mcsmc_b;
  logic [NB-2:0]   mcsmc_d;
  logic            mcsmc_s1, mcsmc_s2, mcsmc_s3, mcsmc_s4, mcsmc_e;
  logic [2*NB-1:0] mcsmc_p;
  mcsm_c #(.N(NB)) u_mcsmc (.a(mcsmc_a), .b(mcsmc_b), .d(mcsmc_d), .s1(mcsmc_s1),
                            .s2(mcsmc_s2), .s3(mcsmc_s3), .s4(mcsmc_s4), .e(mcsmc_e),
                            .p(mcsmc_p));

  logic [NB-1:0]   mbwm_a, mbwm_b;
  logic [NB-2:0]   mbwm_d;
  logic [5:0]      mbwm_s;
  logic [2*NB-1:0] mbwm_p;
  mbwm #(.N(NB)) u_mbwm (.a(mbwm_a), .b(mbwm_b), .d(mbwm_d), .s(mbwm_s), .p(mbwm_p));

  logic [NP*NP-1:0]         mcpm_full, mcsm_full;
  logic [(NB-1)*(NB-1)-1:0] mcsmb_full, mcsmc_full, mbwm_full;
  logic [NP-1:0]            mcsm_fin_full;
  logic [NB-2:0]            mcsmb_fin_full, mcsmc_fin_full;
  logic [NB:0]              mbwm_fin_full;

  for (genvar j = 0; j < NP; j++) begin : g_p_r
    for (genvar i = 0; i < NP; i++) begin : g_c
      if (i == NP - 1 && j >= 1) begin : g_fa
        logic [7:0] seen = '0;
        always @(sample) seen[{u_mcpm.g_row[j].g_col[i].g_boundary.u_fa.x,
                              u_mcpm.g_row[j].g_col[i].g_boundary.u_fa.y,
                              u_mcpm.g_row[j].g_col[i].g_boundary.u_fa.z}] = 1'b1;
        assign mcpm_full[NP*j+i] = &seen;
      end else begin : g_and
        logic [15:0] seen = '0;
        always @(sample)
          seen[{u_mcpm.g_row[j].g_col[i].g_inner.u_cell.a, u_mcpm.g_row[j].g_col[i].g_inner.u_cell.b,
                u_mcpm.g_row[j].g_col[i].g_inner.u_cell.sum_in,
                u_mcpm.g_row[j].g_col[i].g_inner.u_cell.carry_in}] = 1'b1;
        assign mcpm_full[NP*j+i] = &(seen | EXCL_CPM);
      end
      logic [15:0] seen_s = '0;
      always @(sample)
        seen_s[{u_mcsm.g_row[j].g_col[i].u_cell.a, u_mcsm.g_row[j].g_col[i].u_cell.b,
                u_mcsm.g_row[j].g_col[i].u_cell.sum_in, u_mcsm.g_row[j].g_col[i].u_cell.carry_in}] = 1'b1;
      assign mcsm_full[NP*j+i] = &(seen_s | EXCL_CSM);
    end
  end
  for (genvar k = 0; k < NP; k++) begin : g_p_f
    logic [7:0] seen = '0;
    always @(sample) seen[{u_mcsm.g_final[k].u_fa.x, u_mcsm.g_final[k].u_fa.y,
                          u_mcsm.g_final[k].u_fa.z}] = 1'b1;
    assign mcsm_fin_full[k] = &seen;
  end

  for (genvar r = 1; r < NB; r++) begin : g_b_r
    for (genvar i = 0; i < NB - 1; i++) begin : g_c
      logic [15:0] seen_b = '0, seen_c = '0, seen_w = '0;
      always @(sample) begin
        seen_c[{u_mcsmc.u_rows.g_row[r].g_col[i].u_cell.a, u_mcsmc.u_rows.g_row[r].g_col[i].u_cell.b,
                u_mcsmc.u_rows.g_row[r].g_col[i].u_cell.sum_in,
                u_mcsmc.u_rows.g_row[r].g_col[i].u_cell.carry_in}] = 1'b1;
        seen_b[{u_mcsmb.u_rows.g_row[r].g_col[i].u_cell.a, u_mcsmb.u_rows.g_row[r].g_col[i].u_cell.b,
                u_mcsmb.u_rows.g_row[r].g_col[i].u_cell.sum_in,
                u_mcsmb.u_rows.g_row[r].g_col[i].u_cell.carry_in}] = 1'b1;
        seen_w[{u_mbwm.u_rows.g_row[r].g_col[i].u_cell.a, u_mbwm.u_rows.g_row[r].g_col[i].u_cell.b,
                u_mbwm.u_rows.g_row[r].g_col[i].u_cell.sum_in,
                u_mbwm.u_rows.g_row[r].g_col[i].u_cell.carry_in}] = 1'b1;
      end
      assign mcsmb_full[(NB-1)*(r-1)+i] = &(seen_b | EXCL_CSM);
      assign mcsmc_full[(NB-1)*(r-1)+i] = &(seen_c | EXCL_CSM);
      assign mbwm_full[(NB-1)*(r-1)+i]  = &(seen_w | EXCL_CSM);
    end
  end
  for (genvar k = 0; k < NB - 1; k++) begin : g_b_f
    logic [7:0] seen = '0;
    always @(sample) seen[{u_mcsmb.g_final[k].u_fa.x, u_mcsmb.g_final[k].u_fa.y,
                          u_mcsmb.g_final[k].u_fa.z}] = 1'b1;
    assign mcsmb_fin_full[k] = &seen;
    logic [7:0] seen_c = '0;
    always @(sample) seen_c[{u_mcsmc.g_final[k].u_fa.x, u_mcsmc.g_final[k].u_fa.y,
                            u_mcsmc.g_final[k].u_fa.z}] = 1'b1;
    assign mcsmc_fin_full[k] = &(seen_c | ((k == NB - 2) ? EXCL_CSC3 : 8'h00));
  end
  for (genvar k = 0; k <= NB; k++) begin : g_w_f
    logic [7:0] seen = '0;
    always @(sample) seen[{u_mbwm.g_final[k].u_fa.x, u_mbwm.g_final[k].u_fa.y,
                          u_mbwm.g_final[k].u_fa.z}] = 1'b1;
    assign mbwm_fin_full[k] = &(seen | ((k == NB - 1) ? EXCL_BW_X : (k == NB) ? EXCL_BW_1 : 8'h00));
  end

  function automatic void expect_all(string what, int n, int unsigned full, int unsigned cells);
    checks++;
    if (full != cells) begin
      failures++;
      $display("FAIL %s %0dx%0d: only %0d of %0d cells saw every required input combination",
               what, n, n, full, cells);
    end else begin
      $display("%-8s %s all %0d cells saw every required input combination",
               what, $sformatf("%0dx%0d", n, n), cells);
    end
  endfunction

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int k = 0; k < 16; k++) begin
      mcpm_a  = NP'(rep2(16'(MCPM_TESTS[k].a), NP));
      mcpm_b  = NP'(rep2(16'(MCPM_TESTS[k].b), NP));
      mcpm_c  = NP'(rep2(16'(MCPM_TESTS[k].c), NP));
      mcpm_d  = NP'(rep2(16'(MCPM_TESTS[k].d), NP));
      mcpm_t1 = MCPM_TESTS[k].test1;
      mcpm_t2 = MCPM_TESTS[k].test2;

      mcsm_a  = NP'(rep2(16'(MCSM_TESTS[k].a), NP));
      mcsm_b  = NP'(rep2(16'(MCSM_TESTS[k].b), NP));
      mcsm_c  = NP'(rep2(16'(MCSM_TESTS[k].c), NP));
      mcsm_cp = NP'(rep2(16'(MCSM_TESTS[k].cp), NP));
      mcsm_d  = NP'(rep2(16'(MCSM_TESTS[k].d), NP));
      mcsm_e  = MCSM_TESTS[k].e;

      mcsmb_a  = NB'(rep2_mid(MCSMB_TESTS[k].a, NB));
      mcsmb_b  = NB'(rep2_mid(MCSMB_TESTS[k].b, NB));
      mcsmb_d  = (NB-1)'(rep2(16'(MCSMB_TESTS[k].d), NB - 1));
      {mcsmb_s1, mcsmb_s2, mcsmb_s3} = {MCSMB_TESTS[k].s1, MCSMB_TESTS[k].s2, MCSMB_TESTS[k].s3};
      mcsmb_e  = mcsmb_a[0] & mcsmb_b[1];

      mcsmc_a  = NB'(rep2_mid(MCSMC_TESTS[k].a, NB));
      mcsmc_b  = NB'(rep2_mid(MCSMC_TESTS[k].b, NB));
      mcsmc_d  = (NB-1)'(rep2(16'(MCSMC_TESTS[k].d), NB - 1));
      {mcsmc_s1, mcsmc_s2, mcsmc_s3, mcsmc_s4} =
          {MCSMC_TESTS[k].s1, MCSMC_TESTS[k].s2, MCSMC_TESTS[k].s3, MCSMC_TESTS[k].s4};
      mcsmc_e  = mcsmc_a[0] & mcsmc_b[1];

      mbwm_a = NB'(rep2_mid(MBWM_TESTS[k].a, NB));
      mbwm_b = NB'(rep2_mid(MBWM_TESTS[k].b, NB));
      mbwm_d = (NB-1)'(rep2(16'(MBWM_TESTS[k].d), NB - 1));
      mbwm_s = MBWM_TESTS[k].s;
      #1;
      ->sample;
      #1;
    end

    expect_all("MCPM", NP, $countones(mcpm_full), NP * NP);
    expect_all("MCSM", NP, $countones(mcsm_full), NP * NP);
    expect_all("MCSM fin", NP, $countones(mcsm_fin_full), NP);
    expect_all("MCSM_B", NB, $countones(mcsmb_full), (NB - 1) * (NB - 1));
    expect_all("MCSM_B f", NB, $countones(mcsmb_fin_full), NB - 1);
    expect_all("MCSM_C", NB, $countones(mcsmc_full), (NB - 1) * (NB - 1));
    expect_all("MCSM_C f", NB, $countones(mcsmc_fin_full), NB - 1);
    expect_all("MBWM", NB, $countones(mbwm_full), (NB - 1) * (NB - 1));
    expect_all("MBWM fin", NB, $countones(mbwm_fin_full), NB + 1);
    done = 1'b1;
  end
endmodule
