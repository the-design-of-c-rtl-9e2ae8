// cas_cell_tb -- exhaustive check of the controllable adder/subtractor:
// for dc = 0 the outputs must be x + y + z, for dc = 1 x + ~y + z.
module cas_cell_tb;
  logic x, y, z, dc, s, p;
  int checks = 0, failures = 0;

  cas_cell dut (.x, .y, .z, .dc, .s, .p);

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int total;
      {x, y, z, dc} = 4'(v);
      #1;
      total = int'(x) + (dc ? int'(!y) : int'(y)) + int'(z);
      checks++;
      if ({p, s} !== 2'(total)) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b D=%b -> p=%b s=%b", x, y, z, dc, p, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
