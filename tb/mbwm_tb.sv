// mbwm_tb -- self-checking testbench of the C-testable Baugh-Wooley
// two's-complement multiplier.
//
// 1. Applies the 16 published C-test patterns to the 5 x 5 array and
//    compares P9..P0 with the published response.
// 2. Normal mode (S3 = S4 = 1, all other S lines and d at 0): exhaustive
//    signed 5 x 5 multiplication, and exhaustive signed 4 x 4 and random
//    signed 6 x 6 multiplication on two more instances.
// Ends with the TB_RESULT summary; a watchdog stops a hung run.
module mbwm_tb;
  import ctest_vectors_pkg::*;

  localparam logic [5:0] NORMAL = 6'b001100;  // S4 = S3 = 1

  logic [4:0] a, b;
  logic [3:0] d;
  logic [5:0] s;
  logic [9:0] p;

  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [5:0]  a6, b6;
  logic [11:0] p6;

  int checks = 0, failures = 0;

  mbwm dut (.a, .b, .d, .s, .p);
  mbwm #(.N(4)) dut4 (.a(a4), .b(b4), .d(3'd0), .s(NORMAL), .p(p4));
  mbwm #(.N(6)) dut6 (.a(a6), .b(b6), .d(5'd0), .s(NORMAL), .p(p6));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = '0; b4 = '0; a6 = '0; b6 = '0;
    foreach (MBWM_TESTS[k]) begin
      {a, b, d, s} = {MBWM_TESTS[k].a, MBWM_TESTS[k].b, MBWM_TESTS[k].d, MBWM_TESTS[k].s};
      #1;
      checks++;
      if (p !== MBWM_TESTS[k].p) begin
        failures++;
        $display("FAIL test %0d: p=%b expected %b", k + 1, p, MBWM_TESTS[k].p);
      end
    end

    d = '0;
    s = NORMAL;
    for (int v = 0; v < 1024; v++) begin
      {a, b} = 10'(v);
      #1;
      checks++;
      if (int'($signed(p)) != int'($signed(a)) * int'($signed(b))) begin
        failures++;
        $display("FAIL 5x5 %0d * %0d = %0d", $signed(a), $signed(b), $signed(p));
      end
    end
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (int'($signed(p4)) != int'($signed(a4)) * int'($signed(b4))) begin
        failures++;
        $display("FAIL 4x4 %0d * %0d = %0d", $signed(a4), $signed(b4), $signed(p4));
      end
    end
    for (int v = 0; v < 2000; v++) begin
      a6 = 6'($urandom);
      b6 = 6'($urandom);
      #1;
      checks++;
      if (int'($signed(p6)) != int'($signed(a6)) * int'($signed(b6))) begin
        failures++;
        $display("FAIL 6x6 %0d * %0d = %0d", $signed(a6), $signed(b6), $signed(p6));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
