// mcsm_b_tb -- self-checking testbench of the carry-save multiplier with the
// S1/S2/S3 test lines.
//
// 1. Applies the 16 published C-test patterns to the 5 x 5 array with
//    e = a0 & b1 (the value the pattern set gives the extra carry input) and
//    compares p9..p1 with the published response and p0 with a0 & b0.
// 2. Normal mode (S1 = S2 = S3 = 0, d = 0, e = 0): exhaustive unsigned
//    multiplication of the 5 x 5 array and of a second 4 x 4 instance.
// Ends with the TB_RESULT summary; a watchdog stops a hung run.
module mcsm_b_tb;
  import ctest_vectors_pkg::*;

  logic [4:0] a, b;
  logic [3:0] d;
  logic       s1, s2, s3, e;
  logic [9:0] p;

  logic [3:0] a4, b4;
  logic [7:0] p4;

  int checks = 0, failures = 0;

  mcsm_b dut (.a, .b, .d, .s1, .s2, .s3, .e, .p);
  mcsm_b #(.N(4)) dut4 (.a(a4), .b(b4), .d(3'd0), .s1(1'b0), .s2(1'b0), .s3(1'b0), .e(1'b0), .p(p4));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = '0;
    b4 = '0;
    foreach (MCSMB_TESTS[k]) begin
      {a, b, d, s1, s2, s3} = {MCSMB_TESTS[k].a, MCSMB_TESTS[k].b, MCSMB_TESTS[k].d,
                               MCSMB_TESTS[k].s1, MCSMB_TESTS[k].s2, MCSMB_TESTS[k].s3};
      e = a[0] & b[1];
      #1;
      checks++;
      if (p[9:1] !== MCSMB_TESTS[k].p || p[0] !== (a[0] & b[0])) begin
        failures++;
        $display("FAIL test %0d: p=%b expected %b_%b", k + 1, p, MCSMB_TESTS[k].p, a[0] & b[0]);
      end
    end

    {d, s1, s2, s3, e} = '0;
    for (int v = 0; v < 1024; v++) begin
      {a, b} = 10'(v);
      #1;
      checks++;
      if (p !== 10'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL 5x5 %0d * %0d = %0d", a, b, p);
      end
    end
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (p4 !== 8'(int'(a4) * int'(b4))) begin
        failures++;
        $display("FAIL 4x4 %0d * %0d = %0d", a4, b4, p4);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
