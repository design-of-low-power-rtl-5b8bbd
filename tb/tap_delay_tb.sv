// tap_delay_tb: self-check of the 7-stage, 8-bit delay line. After reset all
// taps are zero; with shift_en high each clock moves the line by one, so
// taps[i] equals the sample given i+1 enabled clocks earlier; with shift_en
// low the taps hold. A model queue in the testbench gives the expected taps.
module tap_delay_tb;
  localparam int DW = 8, ST = 7;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [DW-1:0] x = '0;
  logic [ST-1:0][DW-1:0] taps;
  logic [DW-1:0] model [ST];
  int checks = 0, failures = 0, n_hold = 0;

  tap_delay dut (.clk(clk), .rst_n(rst_n), .shift_en(en), .x_in(x), .taps(taps));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < ST; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 3) != 0);
      x = DW'($urandom);
      @(posedge clk);
      if (en) begin
        for (int i = ST - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = x;
      end else begin
        n_hold++;
      end
      #1;
      for (int i = 0; i < ST; i++) begin
        checks++;
        if (taps[i] != model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d tap %0d = %h, expected %h", t, i, taps[i], model[i]);
        end
      end
    end
    checks++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
