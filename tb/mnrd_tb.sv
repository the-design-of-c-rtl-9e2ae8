// mnrd_tb -- self-checking testbench of the C-testable non-restoring array
// divider.
//
// 1. Applies the 20 published C-test patterns to the 4 x 4 array and
//    compares r0..r6 and q0..q3 with the published response.
// 2. Normal mode (D = 1, Test1 = Test2 = 0): every positive dividend and
//    divisor (n0 = d0 = 0) whose quotient fits (n0..n3 < d). The quotient
//    must equal n / d, and the remainder r3..r6, after the usual final
//    correction (add d back when the last quotient bit is 0), n % d.
// Ends with the TB_RESULT summary; a watchdog stops a hung run.
module mnrd_tb;
  import ctest_vectors_pkg::*;

  logic       dctl, test1, test2;
  logic [0:6] n, r;
  logic [0:3] d, q;

  int checks = 0, failures = 0;

  mnrd dut (.dctl, .n, .d, .test1, .test2, .q, .r);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (MNRD_TESTS[k]) begin
      {dctl, n, d, test1, test2} = {MNRD_TESTS[k].dctl, MNRD_TESTS[k].n, MNRD_TESTS[k].d,
                                    MNRD_TESTS[k].test1, MNRD_TESTS[k].test2};
      #1;
      checks++;
      if (r !== MNRD_TESTS[k].r || q !== MNRD_TESTS[k].q) begin
        failures++;
        $display("FAIL test %0d: r=%b q=%b expected %b %b", k + 1, r, q,
                 MNRD_TESTS[k].r, MNRD_TESTS[k].q);
      end
    end

    {dctl, test1, test2} = 3'b100;
    for (int dv = 1; dv < 8; dv++) begin
      for (int nv = 0; nv < 64; nv++) begin
        int rem;
        if ((nv >> 3) >= dv) continue;
        n = 7'(nv);
        d = 4'(dv);
        #1;
        rem = int'($signed(r[3:6]));
        if (!q[3]) rem += dv;
        checks++;
        if (int'(q) != nv / dv || rem != nv % dv) begin
          failures++;
          $display("FAIL %0d / %0d: q=%0d r=%b", nv, dv, q, r);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
