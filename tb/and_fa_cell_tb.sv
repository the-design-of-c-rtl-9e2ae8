// and_fa_cell_tb -- exhaustive check of the multiplier cell: all 32
// combinations of a, b, a_inv, sum_in, carry_in. The expected outputs are
// the arithmetic sum of the partial product and the two inputs, with the
// carry forced to 1 for a = b = 0, sum_in = 0, carry_in = 1.
module and_fa_cell_tb;
  logic a, b, a_inv, sum_in, carry_in, sum_out, carry_out;
  int checks = 0, failures = 0;
  int forced = 0;

  and_fa_cell dut (.a, .b, .a_inv, .sum_in, .carry_in, .sum_out, .carry_out);

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int total;
      logic exp_s, exp_c;
      {a, b, a_inv, sum_in, carry_in} = 5'(v);
      #1;
      total = int'((a ^ a_inv) && b) + int'(sum_in) + int'(carry_in);
      exp_s = total[0];
      exp_c = total[1];
      if (!a && !b && !sum_in && carry_in) begin
        exp_c = 1'b1;
        forced++;
      end
      checks++;
      if (sum_out !== exp_s || carry_out !== exp_c) begin
        failures++;
        $display("FAIL a=%b b=%b a_inv=%b y=%b z=%b -> s=%b c=%b (exp %b %b)",
                 a, b, a_inv, sum_in, carry_in, sum_out, carry_out, exp_s, exp_c);
      end
    end
    if (forced != 2) begin
      failures++;
      $display("FAIL forced-carry combination applied %0d times", forced);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
