// trunc_mult_tb: exhaustive self-check of the 8x8 truncated multiplier that
// keeps 8 product bits. For every operand pair the exact product X = x*y is
// formed in the testbench and the result r must satisfy
//   -ulp < r*ulp - X <= ulp   (ulp = 256),
// i.e. r is floor(X/ulp) or floor(X/ulp)+1. The testbench also counts how
// often each of the two roundings occurs and requires both to appear, and
// requires that the design deleted some partial-product bits.
module trunc_mult_tb;
  localparam int N = 8;
  localparam int P = 8;
  localparam int ULP = 1 << (2 * N - P);

  logic [N-1:0] x, y;
  logic [P-1:0] p;
  int checks = 0, failures = 0;
  int n_floor = 0, n_ceil = 0;

  trunc_mult #(.N(N), .P(P)) dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exact, err;
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        x = N'(a);
        y = N'(b);
        #1;
        exact = longint'(a) * longint'(b);
        err = longint'(p) * ULP - exact;
        checks++;
        if (!(err > -ULP && err <= ULP)) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%0d y=%0d p=%0d exact/ulp=%0d err=%0d", a, b, p, exact / ULP, err);
        end
        if (longint'(p) == exact / ULP) n_floor++;
        else n_ceil++;
      end
    end
    checks++;
    if (n_floor == 0 || n_ceil == 0) begin
      failures++;
      $display("FAIL rounding mix floor=%0d ceil=%0d", n_floor, n_ceil);
    end
    checks++;
    if (dut.DELETED == 0) begin
      failures++;
      $display("FAIL no partial-product bits deleted");
    end
    $display("deleted PP bits=%0d floor results=%0d ceil results=%0d", dut.DELETED, n_floor, n_ceil);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
