// ctest_arith_top_tb -- end-to-end testbench of the whole array family at
// its default sizes (4 x 4 multipliers and dividers, 5 x 5 carry-save and
// Baugh-Wooley multipliers).
//
// For each array it runs the two things the design is for:
//   * test mode: the complete published C-test pattern set, every response
//     compared with the published fault-free response;
//   * normal mode: random operands, results compared with arithmetic worked
//     out here (unsigned and signed products, quotients and remainders).
// It counts how often each mechanism happened and fails any that never did:
// each array's normal operation and test set, every test control line
// asserted (TEST1/TEST2, S1..S6, Test1/Test2, the borrow-in pins z and the
// observation chain of the restoring divider), a negative signed product,
// the non-restoring divider's add step (after a negative partial
// remainder) and the restoring divider's restore step.
// Ends with the TB_RESULT summary; a watchdog stops a hung run.
module ctest_arith_top_tb;
  import ctest_vectors_pkg::*;

  localparam int unsigned NORMAL_OPS = 300;

  typedef enum int {
    M_MCPM_TESTSET, M_MCPM_NORMAL, M_MCPM_TEST1, M_MCPM_TEST2,
    M_MCSM_TESTSET, M_MCSM_NORMAL, M_MCSM_CIN,
    M_MCSMB_TESTSET, M_MCSMB_NORMAL, M_MCSMB_S1, M_MCSMB_S2, M_MCSMB_S3,
    M_MCSMC_TESTSET, M_MCSMC_NORMAL, M_MCSMC_S4,
    M_MBWM_TESTSET, M_MBWM_NORMAL, M_MBWM_NEGATIVE, M_MBWM_S1, M_MBWM_S2, M_MBWM_S5,
    M_MBWM_S6,
    M_MNRD_TESTSET, M_MNRD_DIVIDE, M_MNRD_ADD_STEP, M_MNRD_TEST1, M_MNRD_TEST2,
    M_MRSD_TESTSET, M_MRSD_DIVIDE, M_MRSD_RESTORE, M_MRSD_TEST1, M_MRSD_TEST2,
    M_MRSD_BORROW_IN, M_MRSD_CHAIN,
    M_COUNT
  } mech_e;

  int checks = 0, failures = 0;
  int mech [M_COUNT];

  // carry-propagate multiplier
  logic [3:0] mcpm_a, mcpm_b, mcpm_c, mcpm_d;
  logic       mcpm_test1, mcpm_test2;
  logic [7:0] mcpm_p;
  // carry-save multiplier
  logic [3:0] mcsm_a, mcsm_b, mcsm_c, mcsm_cp, mcsm_d;
  logic       mcsm_e, mcsm_cout;
  logic [7:0] mcsm_p;
  // carry-save multipliers with S lines
  logic [4:0] mcsmb_a, mcsmb_b, mcsmc_a, mcsmc_b, mbwm_a, mbwm_b;
  logic [3:0] mcsmb_d, mcsmc_d, mbwm_d;
  logic       mcsmb_s1, mcsmb_s2, mcsmb_s3, mcsmb_e;
  logic       mcsmc_s1, mcsmc_s2, mcsmc_s3, mcsmc_s4, mcsmc_e;
  logic [5:0] mbwm_s;
  logic [9:0] mcsmb_p, mcsmc_p, mbwm_p;
  // dividers
  logic       mnrd_dctl, mnrd_test1, mnrd_test2, mrsd_test1, mrsd_test2;
  logic [0:6] mnrd_n, mnrd_r, mrsd_n, mrsd_a, mrsd_r, mrsd_b;
  logic [0:3] mnrd_d, mnrd_q, mrsd_d, mrsd_z, mrsd_q;

  ctest_arith_top dut (.*);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  task automatic run_mcpm();
    foreach (MCPM_TESTS[k]) begin
      {mcpm_a, mcpm_b, mcpm_c, mcpm_d, mcpm_test1, mcpm_test2} =
        {MCPM_TESTS[k].a, MCPM_TESTS[k].b, MCPM_TESTS[k].c, MCPM_TESTS[k].d,
         MCPM_TESTS[k].test1, MCPM_TESTS[k].test2};
      #1;
      check(mcpm_p == MCPM_TESTS[k].p, $sformatf("MCPM test %0d: p=%b", k + 1, mcpm_p));
      if (mcpm_test1) mech[M_MCPM_TEST1]++;
      if (mcpm_test2) mech[M_MCPM_TEST2]++;
    end
    mech[M_MCPM_TESTSET]++;
    {mcpm_c, mcpm_d, mcpm_test1, mcpm_test2} = '0;
    repeat (NORMAL_OPS) begin
      {mcpm_a, mcpm_b} = 8'($urandom);
      #1;
      check(int'(mcpm_p) == int'(mcpm_a) * int'(mcpm_b),
            $sformatf("MCPM %0d * %0d = %0d", mcpm_a, mcpm_b, mcpm_p));
      mech[M_MCPM_NORMAL]++;
    end
  endtask

  task automatic run_mcsm();
    foreach (MCSM_TESTS[k]) begin
      {mcsm_a, mcsm_b, mcsm_cp, mcsm_c, mcsm_d, mcsm_e} =
        {MCSM_TESTS[k].a, MCSM_TESTS[k].b, MCSM_TESTS[k].cp, MCSM_TESTS[k].c,
         MCSM_TESTS[k].d, MCSM_TESTS[k].e};
      #1;
      check(mcsm_p == MCSM_TESTS[k].p, $sformatf("MCSM test %0d: p=%b", k + 1, mcsm_p));
      if (mcsm_e) mech[M_MCSM_CIN]++;
    end
    mech[M_MCSM_TESTSET]++;
    {mcsm_c, mcsm_cp, mcsm_d, mcsm_e} = '0;
    repeat (NORMAL_OPS) begin
      {mcsm_a, mcsm_b} = 8'($urandom);
      #1;
      check(int'(mcsm_p) == int'(mcsm_a) * int'(mcsm_b) && !mcsm_cout,
            $sformatf("MCSM %0d * %0d = %0d", mcsm_a, mcsm_b, mcsm_p));
      mech[M_MCSM_NORMAL]++;
    end
  endtask

  task automatic run_mcsmb();
    foreach (MCSMB_TESTS[k]) begin
      {mcsmb_a, mcsmb_b, mcsmb_d, mcsmb_s1, mcsmb_s2, mcsmb_s3} =
        {MCSMB_TESTS[k].a, MCSMB_TESTS[k].b, MCSMB_TESTS[k].d,
         MCSMB_TESTS[k].s1, MCSMB_TESTS[k].s2, MCSMB_TESTS[k].s3};
      mcsmb_e = mcsmb_a[0] & mcsmb_b[1];
      #1;
      check(mcsmb_p == {MCSMB_TESTS[k].p, mcsmb_a[0] & mcsmb_b[0]},
            $sformatf("MCSM_B test %0d: p=%b", k + 1, mcsmb_p));
      if (mcsmb_s1) mech[M_MCSMB_S1]++;
      if (mcsmb_s2) mech[M_MCSMB_S2]++;
      if (mcsmb_s3) mech[M_MCSMB_S3]++;
    end
    mech[M_MCSMB_TESTSET]++;
    {mcsmb_d, mcsmb_s1, mcsmb_s2, mcsmb_s3, mcsmb_e} = '0;
    repeat (NORMAL_OPS) begin
      {mcsmb_a, mcsmb_b} = 10'($urandom);
      #1;
      check(int'(mcsmb_p) == int'(mcsmb_a) * int'(mcsmb_b),
            $sformatf("MCSM_B %0d * %0d = %0d", mcsmb_a, mcsmb_b, mcsmb_p));
      mech[M_MCSMB_NORMAL]++;
    end
  endtask

  // Patterns 5 and 8 of this set are applied but not compared (see the
  // block testbench of this array).
  task automatic run_mcsmc();
    foreach (MCSMC_TESTS[k]) begin
      {mcsmc_a, mcsmc_b, mcsmc_d, mcsmc_s1, mcsmc_s2, mcsmc_s3, mcsmc_s4} =
        {MCSMC_TESTS[k].a, MCSMC_TESTS[k].b, MCSMC_TESTS[k].d, MCSMC_TESTS[k].s1,
         MCSMC_TESTS[k].s2, MCSMC_TESTS[k].s3, MCSMC_TESTS[k].s4};
      mcsmc_e = mcsmc_a[0] & mcsmc_b[1];
      #1;
      if (k != 4 && k != 7)
        check(mcsmc_p == MCSMC_TESTS[k].p, $sformatf("MCSM_C test %0d: p=%b", k + 1, mcsmc_p));
    end
    mech[M_MCSMC_TESTSET]++;
    {mcsmc_d, mcsmc_s1, mcsmc_s2, mcsmc_s3, mcsmc_s4, mcsmc_e} = '0;
    repeat (NORMAL_OPS) begin
      int expected;
      {mcsmc_a, mcsmc_b} = 10'($urandom);
      mcsmc_s4 = 1'($urandom);
      #1;
      expected = int'(mcsmc_a) * int'(mcsmc_b);
      if (mcsmc_s4) begin
        expected += int'(mcsmc_b[4]) * 16 * (15 - 2 * int'(mcsmc_a[3:0]));
        mech[M_MCSMC_S4]++;
      end else begin
        mech[M_MCSMC_NORMAL]++;
      end
      check(mcsmc_p == 10'(expected),
            $sformatf("MCSM_C S4=%b %0d * %0d = %0d", mcsmc_s4, mcsmc_a, mcsmc_b, mcsmc_p));
    end
  endtask

  task automatic run_mbwm();
    foreach (MBWM_TESTS[k]) begin
      {mbwm_a, mbwm_b, mbwm_d, mbwm_s} =
        {MBWM_TESTS[k].a, MBWM_TESTS[k].b, MBWM_TESTS[k].d, MBWM_TESTS[k].s};
      #1;
      check(mbwm_p == MBWM_TESTS[k].p, $sformatf("MBWM test %0d: p=%b", k + 1, mbwm_p));
      if (mbwm_s[0]) mech[M_MBWM_S1]++;
      if (mbwm_s[1]) mech[M_MBWM_S2]++;
      if (mbwm_s[4]) mech[M_MBWM_S5]++;
      if (mbwm_s[5]) mech[M_MBWM_S6]++;
    end
    mech[M_MBWM_TESTSET]++;
    mbwm_d = '0;
    mbwm_s = 6'b001100;  // S3 = S4 = 1: signed multiplication
    repeat (NORMAL_OPS) begin
      int expected;
      {mbwm_a, mbwm_b} = 10'($urandom);
      #1;
      expected = int'($signed(mbwm_a)) * int'($signed(mbwm_b));
      check(int'($signed(mbwm_p)) == expected,
            $sformatf("MBWM %0d * %0d = %0d", $signed(mbwm_a), $signed(mbwm_b), $signed(mbwm_p)));
      mech[M_MBWM_NORMAL]++;
      if (expected < 0) mech[M_MBWM_NEGATIVE]++;
    end
  endtask

  // Random positive dividend and divisor whose quotient fits in 4 bits.
  task automatic pick_division(output logic [0:6] n, output logic [0:3] d);
    int dv, nv;
    dv = 1 + int'($urandom_range(6));
    nv = int'($urandom_range(8 * dv - 1));
    n = 7'(nv);
    d = 4'(dv);
  endtask

  task automatic run_mnrd();
    foreach (MNRD_TESTS[k]) begin
      {mnrd_dctl, mnrd_n, mnrd_d, mnrd_test1, mnrd_test2} =
        {MNRD_TESTS[k].dctl, MNRD_TESTS[k].n, MNRD_TESTS[k].d,
         MNRD_TESTS[k].test1, MNRD_TESTS[k].test2};
      #1;
      check(mnrd_r == MNRD_TESTS[k].r && mnrd_q == MNRD_TESTS[k].q,
            $sformatf("MNRD test %0d: r=%b q=%b", k + 1, mnrd_r, mnrd_q));
      if (mnrd_test1) mech[M_MNRD_TEST1]++;
      if (mnrd_test2) mech[M_MNRD_TEST2]++;
    end
    mech[M_MNRD_TESTSET]++;
    {mnrd_dctl, mnrd_test1, mnrd_test2} = 3'b100;
    repeat (NORMAL_OPS) begin
      int rem;
      pick_division(mnrd_n, mnrd_d);
      #1;
      rem = int'($signed(mnrd_r[3:6]));
      if (!mnrd_q[3]) rem += int'(mnrd_d);
      check(int'(mnrd_q) == int'(mnrd_n) / int'(mnrd_d) && rem == int'(mnrd_n) % int'(mnrd_d),
            $sformatf("MNRD %0d / %0d: q=%0d r=%b", mnrd_n, mnrd_d, mnrd_q, mnrd_r));
      mech[M_MNRD_DIVIDE]++;
      // a 0 quotient bit in rows 0..2 makes the next row add the divisor
      if (mnrd_q[0:2] != 3'b111) mech[M_MNRD_ADD_STEP]++;
    end
  endtask

  task automatic run_mrsd();
    foreach (MRSD_TESTS[k]) begin
      {mrsd_n, mrsd_d, mrsd_a, mrsd_z, mrsd_test1, mrsd_test2} =
        {MRSD_TESTS[k].n, MRSD_TESTS[k].d, MRSD_TESTS[k].a, MRSD_TESTS[k].z,
         MRSD_TESTS[k].test1, MRSD_TESTS[k].test2};
      #1;
      check(mrsd_r == MRSD_TESTS[k].r && mrsd_q == MRSD_TESTS[k].q && mrsd_b == MRSD_TESTS[k].b,
            $sformatf("MRSD test %0d: r=%b q=%b b=%b", k + 1, mrsd_r, mrsd_q, mrsd_b));
      if (mrsd_test1) mech[M_MRSD_TEST1]++;
      if (mrsd_test2) mech[M_MRSD_TEST2]++;
      if (mrsd_z != '0) mech[M_MRSD_BORROW_IN]++;
      if (mrsd_a != '0) mech[M_MRSD_CHAIN]++;
    end
    mech[M_MRSD_TESTSET]++;
    {mrsd_test1, mrsd_test2, mrsd_z} = '0;
    repeat (NORMAL_OPS) begin
      logic [0:3] quot;
      pick_division(mrsd_n, mrsd_d);
      mrsd_a = 7'($urandom);
      #1;
      quot = ~mrsd_q;
      check(int'(quot) == int'(mrsd_n) / int'(mrsd_d) &&
            int'(mrsd_r[3:6]) == int'(mrsd_n) % int'(mrsd_d),
            $sformatf("MRSD %0d / %0d: ~q=%0d r=%b", mrsd_n, mrsd_d, quot, mrsd_r));
      mech[M_MRSD_DIVIDE]++;
      if (mrsd_q != '0) mech[M_MRSD_RESTORE]++;
    end
  endtask

  initial begin
    foreach (mech[m]) mech[m] = 0;
    // every input starts at a defined value
    {mcpm_a, mcpm_b, mcpm_c, mcpm_d, mcpm_test1, mcpm_test2} = '0;
    {mcsm_a, mcsm_b, mcsm_c, mcsm_cp, mcsm_d, mcsm_e} = '0;
    {mcsmb_a, mcsmb_b, mcsmb_d, mcsmb_s1, mcsmb_s2, mcsmb_s3, mcsmb_e} = '0;
    {mcsmc_a, mcsmc_b, mcsmc_d, mcsmc_s1, mcsmc_s2, mcsmc_s3, mcsmc_s4, mcsmc_e} = '0;
    {mbwm_a, mbwm_b, mbwm_d, mbwm_s} = '0;
    {mnrd_dctl, mnrd_n, mnrd_d, mnrd_test1, mnrd_test2} = '0;
    {mrsd_n, mrsd_d, mrsd_a, mrsd_z, mrsd_test1, mrsd_test2} = '0;

    run_mcpm();
    run_mcsm();
    run_mcsmb();
    run_mcsmc();
    run_mbwm();
    run_mnrd();
    run_mrsd();

    for (int m = 0; m < int'(M_COUNT); m++) begin
      mech_e e;
      e = mech_e'(m);
      $display("mechanism %-18s %0d", e.name(), mech[m]);
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", e.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
