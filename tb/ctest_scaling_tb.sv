// ctest_scaling_tb -- checks that the test length stays constant when the
// arrays grow: the same 16 patterns test larger multipliers.
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
// Sizes: MCPM and MCSM 4, 6, 8 and 16 bits; MCSM_B, MCSM_C and MBWM 5, 7,
// 9 and 15 bits. Products are not checked here; the block testbenches do that.
// The per-size work is in ctest_scaling_check; this module instantiates it
// at four sizes, waits for all of them and adds up the results.
// No clock: one pattern per time step. A watchdog stops a hung run.
module ctest_scaling_tb;
  localparam int NSIZES = 4;
  localparam int NP_OF [NSIZES] = '{4, 6, 8, 16};
  localparam int NB_OF [NSIZES] = '{5, 7, 9, 15};

  logic [NSIZES-1:0] done;
  int                checks_of [NSIZES];
  int                failures_of [NSIZES];

  for (genvar g = 0; g < NSIZES; g++) begin : g_size
    ctest_scaling_check #(.NP(NP_OF[g]), .NB(NB_OF[g])) u_check (
      .done(done[g]), .checks(checks_of[g]), .failures(failures_of[g]));
  end

  initial begin : watchdog
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int checks, failures;
    wait (&done);
    checks = 0;
    failures = 0;
    for (int g = 0; g < NSIZES; g++) begin
      checks += checks_of[g];
      failures += failures_of[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
