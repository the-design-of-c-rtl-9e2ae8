// mcsm_tb -- self-checking testbench of the C-testable carry-save
// multiplier.
//
// 1. Applies the 16 published C-test patterns to the 4 x 4 array and
//    compares p7..p0 with the published fault-free response.
// 2. Normal mode (c = c' = d = 0, e = 0): exhaustive unsigned multiplication
//    of the 4 x 4 array (cout must stay 0) and of a second 5 x 5 instance.
// Ends with the TB_RESULT summary; a watchdog stops a hung run.
module mcsm_tb;
  import ctest_vectors_pkg::*;

  logic [3:0] a, b, c, cp, d;
  logic       e, cout;
  logic [7:0] p;

  logic [4:0] a5, b5;
  logic [9:0] p5;
  logic       cout5;

  int checks = 0, failures = 0;

  mcsm dut (.a, .b, .c, .cp, .d, .e, .p, .cout);
  mcsm #(.N(5)) dut5 (.a(a5), .b(b5), .c(5'd0), .cp(5'd0), .d(5'd0), .e(1'b0), .p(p5), .cout(cout5));

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
    foreach (MCSM_TESTS[k]) begin
      {a, b, cp, c, d, e} = {MCSM_TESTS[k].a, MCSM_TESTS[k].b, MCSM_TESTS[k].cp,
                             MCSM_TESTS[k].c, MCSM_TESTS[k].d, MCSM_TESTS[k].e};
      #1;
      checks++;
      if (p !== MCSM_TESTS[k].p) begin
        failures++;
        $display("FAIL test %0d: p=%b expected %b", k + 1, p, MCSM_TESTS[k].p);
      end
    end

    {c, cp, d, e} = '0;
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if (p !== 8'(int'(a) * int'(b)) || cout !== 1'b0) begin
        failures++;
        $display("FAIL 4x4 %0d * %0d = %0d cout=%b", a, b, p, cout);
      end
    end
    for (int v = 0; v < 1024; v++) begin
      {a5, b5} = 10'(v);
      #1;
      checks++;
      if (p5 !== 10'(int'(a5) * int'(b5)) || cout5 !== 1'b0) begin
        failures++;
        $display("FAIL 5x5 %0d * %0d = %0d cout=%b", a5, b5, p5, cout5);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
