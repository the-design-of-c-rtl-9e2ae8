// fa_cell_tb -- exhaustive check of the full adder: all 8 input
// combinations, sum and carry compared with the arithmetic x + y + z.
module fa_cell_tb;
  logic x, y, z, s, c;
  int checks = 0, failures = 0;

  fa_cell dut (.x, .y, .z, .s, .c);

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if ({c, s} !== 2'(int'(x) + int'(y) + int'(z))) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b -> c=%b s=%b", x, y, z, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
