// mcs_cell_tb -- exhaustive check of the modified controlled subtractor:
// borrow and difference of x - y - z, restore (s = x) when dc = 1, and the
// observation output b = a ^ y ^ z, over all 32 input combinations.
module mcs_cell_tb;
  logic x, y, z, a, dc, s, p, b;
  int checks = 0, failures = 0;

  mcs_cell dut (.x, .y, .z, .a, .dc, .s, .p, .b);

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int diff;
      logic exp_s, exp_p, exp_b;
      {x, y, z, a, dc} = 5'(v);
      #1;
      diff  = int'(x) - int'(y) - int'(z);
      exp_p = diff < 0;
      exp_s = dc ? x : diff[0];
      exp_b = (int'(a) + int'(y) + int'(z)) % 2 == 1;
      checks++;
      if (s !== exp_s || p !== exp_p || b !== exp_b) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b a=%b D=%b -> s=%b p=%b b=%b", x, y, z, a, dc, s, p, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
