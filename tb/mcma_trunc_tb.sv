// mcma_trunc_tb: self-check of the truncated MCMA with its default
// coefficients (-75, -37, 45, -106 as 8-bit two's complement), four 9-bit
// signed inputs, a 19-bit accumulator and an 8-bit result (ulp = 2^11).
// For corner inputs (all extremes) and random inputs the exact sum
// sum_i COEFS[i]*s[i] is formed in the testbench, and the result y (signed)
// must satisfy -ulp < y*ulp - exact <= ulp. Both rounding directions, and
// negative as well as positive results, must occur.
module mcma_trunc_tb;
  localparam int NCOEF = 4;
  localparam int SW = 9;
  localparam int P = 8;
  localparam int W = 19;
  localparam int ULP = 1 << (W - P);
  localparam int CO [NCOEF] = '{-75, -37, 45, -106};

  logic [NCOEF-1:0][SW-1:0] s;
  logic [P-1:0] y;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_neg = 0, n_pos = 0;

  mcma_trunc dut (.s(s), .y(y));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint exact, err, yv;
    exact = 0;
    for (int i = 0; i < NCOEF; i++) exact += longint'(CO[i]) * longint'($signed(s[i]));
    #1;
    yv = longint'($signed(y));
    err = yv * ULP - exact;
    checks++;
    if (!(err > -ULP && err <= ULP)) begin
      failures++;
      if (failures < 10) $display("FAIL s=%h y=%0d exact=%0d err=%0d", s, yv, exact, err);
    end
    if (err > 0) n_up++; else n_down++;
    if (exact < 0) n_neg++; else n_pos++;
  endtask

  initial begin
    // every combination of the extreme values -256, -1, 0, 255
    for (int m = 0; m < 256; m++) begin
      for (int i = 0; i < NCOEF; i++) begin
        case ((m >> (2 * i)) & 3)
          0: s[i] = 9'h100;
          1: s[i] = 9'h1ff;
          2: s[i] = 9'h000;
          default: s[i] = 9'h0ff;
        endcase
      end
      check_one();
    end
    for (int t = 0; t < 50000; t++) begin
      for (int i = 0; i < NCOEF; i++) s[i] = SW'($urandom);
      check_one();
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_neg == 0 || n_pos == 0 || dut.DELETED == 0) begin
      failures++;
      $display("FAIL coverage up=%0d down=%0d neg=%0d pos=%0d deleted=%0d", n_up, n_down, n_neg, n_pos, dut.DELETED);
    end
    $display("deleted=%0d up=%0d down=%0d neg=%0d pos=%0d", dut.DELETED, n_up, n_down, n_neg, n_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
