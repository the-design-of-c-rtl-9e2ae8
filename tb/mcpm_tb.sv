// mcpm_tb -- self-checking testbench of the C-testable carry-propagate
// multiplier.
//
// 1. Applies the 16 published C-test patterns to the 4 x 4 array and
//    compares every product bit with the published fault-free response.
// 2. Normal mode (c = d = 0, TEST1 = TEST2 = 0): exhaustive unsigned
//    multiplication of the 4 x 4 array, and of a second 5 x 5 instance to
//    exercise an odd size and the parameterised wiring.
// Ends with the TB_RESULT summary; a watchdog stops a hung run.
module mcpm_tb;
  import ctest_vectors_pkg::*;

  logic [3:0] a, b, c, d;
  logic       test1, test2;
  logic [7:0] p;

  logic [4:0] a5, b5;
  logic [9:0] p5;

  int checks = 0, failures = 0;

  mcpm dut (.a, .b, .c, .d, .test1, .test2, .p);
  mcpm #(.N(5)) dut5 (.a(a5), .b(b5), .c(5'd0), .d(5'd0), .test1(1'b0), .test2(1'b0), .p(p5));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a5 = '0;
    b5 = '0;
    foreach (MCPM_TESTS[k]) begin
      {a, b, c, d, test1, test2} = {MCPM_TESTS[k].a, MCPM_TESTS[k].b, MCPM_TESTS[k].c,
                                    MCPM_TESTS[k].d, MCPM_TESTS[k].test1, MCPM_TESTS[k].test2};
      #1;
      checks++;
      if (p !== MCPM_TESTS[k].p) begin
        failures++;
        $display("FAIL test %0d: p=%b expected %b", k + 1, p, MCPM_TESTS[k].p);
      end
    end

    {c, d, test1, test2} = '0;
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if (p !== 8'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL 4x4 %0d * %0d = %0d", a, b, p);
      end
    end
    for (int v = 0; v < 1024; v++) begin
      {a5, b5} = 10'(v);
      #1;
      checks++;
      if (p5 !== 10'(int'(a5) * int'(b5))) begin
        failures++;
        $display("FAIL 5x5 %0d * %0d = %0d", a5, b5, p5);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
