// trunc_fir_top_tb: end-to-end test of the top level with every parameter
// at its default (8-bit samples, coefficients 10110101, 11011011, 00101101,
// 10010110, eight symmetric taps, 8-bit outputs; 8x8 multiplier with an
// 8-bit result).
// FIR side: the stream starts with the samples 01001010, 00100110,
// 01101001, 11000011, 10100101, then continues with random samples and
// random idle cycles. A reference model computes the exact output; every
// output must come one cycle after its sample and lie within one ulp
// (2^11) of the exact value. Multiplier side: all 65536 operand pairs, each
// result within one ulp (2^8) of the exact product.
// Mechanism counters, each of which must be non-zero: idle (stall) cycles,
// FIR outputs rounded up and rounded down, pre-adder sums outside the 8-bit
// range, products by negative coefficients, deleted partial-product bits in
// both datapaths, multiplier results rounded up and rounded down.
module trunc_fir_top_tb;
  localparam int NCOEF = 4;
  localparam int CO [NCOEF] = '{-75, -37, 45, -106};
  localparam int ULP_F = 1 << 11;
  localparam int ULP_M = 1 << 8;
  localparam int NSAMP = 4000;
  localparam logic [7:0] FIRST [5] = '{8'b01001010, 8'b00100110, 8'b01101001,
                                       8'b11000011, 8'b10100101};

  logic clk = 1'b0, rst_n = 1'b0;
  logic fir_in_valid = 1'b0, fir_out_valid;
  logic [7:0] fir_x = '0, fir_y;
  logic [7:0] mult_x = '0, mult_y = '0, mult_p;
  int checks = 0, failures = 0;
  int n_stall = 0, n_fir_up = 0, n_fir_down = 0, n_wide = 0, n_negco = 0;
  int n_mul_up = 0, n_mul_down = 0;
  int hist [8];

  trunc_fir_top dut (
    .clk(clk), .rst_n(rst_n),
    .fir_in_valid(fir_in_valid), .fir_x(fir_x),
    .fir_out_valid(fir_out_valid), .fir_y(fir_y),
    .mult_x(mult_x), .mult_y(mult_y), .mult_p(mult_p)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NSAMP * 6 + 70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    longint ex, err;
    for (int k = 0; k < 8; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // FIR stream
    for (int n = 0; n < NSAMP; n++) begin
      while (n >= 5 && $urandom_range(0, 4) == 0) begin
        @(negedge clk);
        fir_in_valid = 1'b0;
        @(posedge clk);
        #1;
        checks++;
        if (fir_out_valid) begin
          failures++;
          $display("FAIL out_valid during an idle cycle");
        end
        n_stall++;
      end
      @(negedge clk);
      fir_in_valid = 1'b1;
      fir_x = (n < 5) ? FIRST[n] : 8'($urandom);
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'($signed(fir_x));
      ex = 0;
      for (int i = 0; i < NCOEF; i++) begin
        ex += longint'(CO[i]) * longint'(hist[i] + hist[7-i]);
        if (hist[i] + hist[7-i] > 127 || hist[i] + hist[7-i] < -128) n_wide++;
        if (CO[i] < 0 && hist[i] + hist[7-i] != 0) n_negco++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (!fir_out_valid) begin
        failures++;
        $display("FAIL no output one cycle after sample %0d", n);
      end
      err = longint'($signed(fir_y)) * ULP_F - ex;
      checks++;
      if (!(err > -ULP_F && err <= ULP_F)) begin
        failures++;
        if (failures < 10) $display("FAIL fir n=%0d y=%0d exact=%0d", n, $signed(fir_y), ex);
      end
      if (err > 0) n_fir_up++; else n_fir_down++;
    end
    @(negedge clk);
    fir_in_valid = 1'b0;

    // multiplier, all operand pairs
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        mult_x = 8'(a);
        mult_y = 8'(b);
        #1;
        ex = longint'(a) * longint'(b);
        err = longint'(mult_p) * ULP_M - ex;
        checks++;
        if (!(err > -ULP_M && err <= ULP_M)) begin
          failures++;
          if (failures < 10) $display("FAIL mult %0d*%0d -> %0d", a, b, mult_p);
        end
        if (err > 0) n_mul_up++; else n_mul_down++;
      end
    end

    expect_count("idle cycle (stall)", n_stall);
    expect_count("FIR output rounded up", n_fir_up);
    expect_count("FIR output rounded down", n_fir_down);
    expect_count("pre-adder sum beyond 8 bits", n_wide);
    expect_count("product by a negative coefficient", n_negco);
    expect_count("deleted PP bits in the MCMA", dut.u_fir.u_mcma.DELETED);
    expect_count("deleted PP bits in the multiplier", dut.u_mult.DELETED);
    expect_count("multiplier result rounded up", n_mul_up);
    expect_count("multiplier result rounded down", n_mul_down);
    $display("stalls=%0d fir_up=%0d fir_down=%0d wide=%0d negco=%0d del_mcma=%0d del_mult=%0d mul_up=%0d mul_down=%0d",
             n_stall, n_fir_up, n_fir_down, n_wide, n_negco, dut.u_fir.u_mcma.DELETED,
             dut.u_mult.DELETED, n_mul_up, n_mul_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
