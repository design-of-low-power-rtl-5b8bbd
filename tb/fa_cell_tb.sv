// fa_cell_tb: exhaustive check of the full adder: 2*co + s = a + b + ci.
module fa_cell_tb;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;
  fa_cell dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  initial begin : watchdog
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if (2 * int'(co) + int'(s) != int'(a) + int'(b) + int'(ci)) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b -> co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
