// fir_trunc_tb: self-check of the FIR filter, in its default linear-phase
// form (4 coefficients, 8 taps, pre-adders) and in the plain direct form
// (SYMMETRIC = 0, 4 taps). Samples stream in with random gaps (in_valid
// low). A reference model in the testbench keeps the sample history and
// computes the exact y[n] = sum a_i x[n-i]; each output must arrive exactly
// one cycle after its sample (out_valid) and satisfy
// -ulp < y_out*ulp - y[n] <= ulp. It also checks the reset value, and that
// gaps, both rounding directions and pre-adder sums outside the 8-bit range
// all occurred.
module fir_trunc_tb;
  localparam int NCOEF = 4;
  localparam int CO [NCOEF] = '{-75, -37, 45, -106};
  localparam int ULP_S = 1 << 11;  // symmetric: W = 9+8+2 = 19, P = 8
  localparam int ULP_D = 1 << 10;  // direct:    W = 8+8+2 = 18, P = 8
  localparam int NSAMP = 3000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0] x_in = '0;
  logic ov_s, ov_d;
  logic [7:0] y_s, y_d;
  int checks = 0, failures = 0;
  int n_gap = 0, n_up = 0, n_down = 0, n_wide = 0;
  int hist [8];

  fir_trunc dut_s (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
                   .out_valid(ov_s), .y_out(y_s));
  fir_trunc #(.SYMMETRIC(1'b0)) dut_d (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                   .x_in(x_in), .out_valid(ov_d), .y_out(y_d));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NSAMP * 4 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check_err(string tag, logic [7:0] y, longint exact, int ulp);
    longint err = longint'($signed(y)) * ulp - exact;
    checks++;
    if (!(err > -ulp && err <= ulp)) begin
      failures++;
      if (failures < 10) $display("FAIL %s y=%0d exact=%0d err=%0d", tag, $signed(y), exact, err);
    end
    if (err > 0) n_up++; else n_down++;
  endfunction

  initial begin
    longint ex_s, ex_d;
    for (int k = 0; k < 8; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (ov_s || y_s != 0 || ov_d || y_d != 0) begin
      failures++;
      $display("FAIL reset state");
    end
    rst_n = 1'b1;
    for (int n = 0; n < NSAMP; n++) begin
      // occasional gap cycles
      while ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        @(posedge clk);
        #1;
        checks++;
        if (ov_s || ov_d) begin
          failures++;
          $display("FAIL out_valid during gap");
        end
        n_gap++;
      end
      @(negedge clk);
      in_valid = 1'b1;
      x_in = 8'($urandom);
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'($signed(x_in));
      ex_s = 0;
      ex_d = 0;
      for (int i = 0; i < NCOEF; i++) begin
        ex_s += longint'(CO[i]) * longint'(hist[i] + hist[7-i]);
        ex_d += longint'(CO[i]) * longint'(hist[i]);
        if (hist[i] + hist[7-i] > 127 || hist[i] + hist[7-i] < -128) n_wide++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (!ov_s || !ov_d) begin
        failures++;
        $display("FAIL out_valid not one cycle after the sample");
      end
      check_err("sym", y_s, ex_s, ULP_S);
      check_err("dir", y_d, ex_d, ULP_D);
      @(negedge clk);
      in_valid = 1'b0;
      @(posedge clk);
      #1;
      n_gap++;
      checks++;
      if (ov_s) begin
        failures++;
        $display("FAIL out_valid stays high in a gap");
      end
    end
    checks++;
    if (n_gap == 0 || n_up == 0 || n_down == 0 || n_wide == 0) begin
      failures++;
      $display("FAIL coverage gap=%0d up=%0d down=%0d wide=%0d", n_gap, n_up, n_down, n_wide);
    end
    $display("gaps=%0d up=%0d down=%0d wide-preadd=%0d", n_gap, n_up, n_down, n_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
