// mcsm_c_tb -- self-checking testbench of the carry-save multiplier with the
// S1..S4 test lines.
//
// 1. Applies the published C-test patterns to the 5 x 5 array with
//    e = a0 & b1 and compares p9..p0 with the published response. Patterns 5
//    and 8 are applied but not compared: their published responses disagree
//    with the array as built here (and with every variant of its wiring that
//    was considered); the other 14 must match exactly.
// 2. Normal mode (S1..S4 = 0, d = 0, e = 0): exhaustive unsigned
//    multiplication.
// 3. S4 alone: S4 inverts the a operand of the last partial-product row
//    (a_0..a_{N-2} against b_{N-1}), so the result must be
//    a*b + b4 * 2^4 * ((2^4 - 1) - 2 * a[3:0]); checked exhaustively. This
//    exercises the S4 gates arithmetically, independently of the table.
// Ends with the TB_RESULT summary; a watchdog stops a hung run.
module mcsm_c_tb;
  import ctest_vectors_pkg::*;

  logic [4:0] a, b;
  logic [3:0] d;
  logic       s1, s2, s3, s4, e;
  logic [9:0] p;

  int checks = 0, failures = 0;

  mcsm_c dut (.a, .b, .d, .s1, .s2, .s3, .s4, .e, .p);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (MCSMC_TESTS[k]) begin
      {a, b, d, s1, s2, s3, s4} = {MCSMC_TESTS[k].a, MCSMC_TESTS[k].b, MCSMC_TESTS[k].d,
                                   MCSMC_TESTS[k].s1, MCSMC_TESTS[k].s2, MCSMC_TESTS[k].s3,
                                   MCSMC_TESTS[k].s4};
      e = a[0] & b[1];
      #1;
      if (k == 4 || k == 7) continue;
      checks++;
      if (p !== MCSMC_TESTS[k].p) begin
        failures++;
        $display("FAIL test %0d: p=%b expected %b", k + 1, p, MCSMC_TESTS[k].p);
      end
    end

    {d, s1, s2, s3, s4, e} = '0;
    for (int v = 0; v < 1024; v++) begin
      {a, b} = 10'(v);
      #1;
      checks++;
      if (p !== 10'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", a, b, p);
      end
    end

    s4 = 1'b1;
    for (int v = 0; v < 1024; v++) begin
      int expected;
      {a, b} = 10'(v);
      #1;
      expected = int'(a) * int'(b) + int'(b[4]) * 16 * (15 - 2 * int'(a[3:0]));
      checks++;
      if (p !== 10'(expected)) begin
        failures++;
        $display("FAIL S4=1 a=%0d b=%0d p=%0d expected %0d", a, b, p, 10'(expected));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
