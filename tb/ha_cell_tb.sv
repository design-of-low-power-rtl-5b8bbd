// ha_cell_tb: exhaustive check of the half adder: 2*co + s = a + b.
module ha_cell_tb;
  logic a, b, s, co;
  int checks = 0, failures = 0;
  ha_cell dut (.a(a), .b(b), .s(s), .co(co));
  initial begin : watchdog
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (2 * int'(co) + int'(s) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> co=%b s=%b", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
