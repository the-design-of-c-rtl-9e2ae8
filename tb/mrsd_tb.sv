// mrsd_tb -- self-checking testbench of the C-testable restoring array
// divider.
//
// 1. Applies the 40 published C-test patterns to the 4 x 4 array and
//    compares r0..r6, q0..q3 and the observation outputs b0..b6 with the
//    published response.
// 2. Normal mode (Test1 = Test2 = 0, z = 0): every positive dividend and
//    divisor (n0 = d0 = 0) whose quotient fits (n0..n3 < d). The inverted
//    borrows ~q must equal n / d and r3..r6 must equal n % d. The A inputs
//    are driven with random values, which must not disturb the division.
// Ends with the TB_RESULT summary; a watchdog stops a hung run.
module mrsd_tb;
  import ctest_vectors_pkg::*;

  logic       test1, test2;
  logic [0:6] n, a, r, b;
  logic [0:3] d, z, q;

  int checks = 0, failures = 0;

  mrsd dut (.n, .d, .a, .z, .test1, .test2, .q, .r, .b);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (MRSD_TESTS[k]) begin
      {n, d, a, z, test1, test2} = {MRSD_TESTS[k].n, MRSD_TESTS[k].d, MRSD_TESTS[k].a,
                                    MRSD_TESTS[k].z, MRSD_TESTS[k].test1, MRSD_TESTS[k].test2};
      #1;
      checks++;
      if (r !== MRSD_TESTS[k].r || q !== MRSD_TESTS[k].q || b !== MRSD_TESTS[k].b) begin
        failures++;
        $display("FAIL test %0d: r=%b q=%b b=%b expected %b %b %b", k + 1, r, q, b,
                 MRSD_TESTS[k].r, MRSD_TESTS[k].q, MRSD_TESTS[k].b);
      end
    end

    {test1, test2, z} = '0;
    for (int dv = 1; dv < 8; dv++) begin
      for (int nv = 0; nv < 64; nv++) begin
        logic [0:3] quot;
        if ((nv >> 3) >= dv) continue;
        n = 7'(nv);
        d = 4'(dv);
        a = 7'($urandom);
        #1;
        quot = ~q;
        checks++;
        if (int'(quot) != nv / dv || int'(r[3:6]) != nv % dv) begin
          failures++;
          $display("FAIL %0d / %0d: ~q=%0d r=%b", nv, dv, quot, r);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
