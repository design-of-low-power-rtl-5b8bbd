// pp_reduce_tb: self-check of the reduction tree on the default matrix shape
// (the 8x8 multiplication matrix, 16 columns). Random bits are placed in the
// occupied slots and the weighted sum of the matrix is computed in the
// testbench. For three instances, with the ulp column U = 8 (default), 16 and
// 0, the two output rows must add up to that sum modulo 2^16, and
// (row_a >> U) + (row_b >> U) + carry_u must equal sum >> U, i.e. carry_u is
// the carry out of the columns below U. The 8x8 tree must also use the known
// cell counts of a Dadda reduction to two rows: 35 full and 7 half adders.
module pp_reduce_tb;
  localparam int W = 16;
  localparam int MAXH = 8;
  localparam logic [W-1:0][7:0] H0 = {8'd0, 8'd1, 8'd2, 8'd3, 8'd4, 8'd5, 8'd6, 8'd7,
                                      8'd8, 8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd1};
  logic [W-1:0][MAXH-1:0] bits;
  logic [W-1:0] ra, rb, ra1, rb1, ra0, rb0;
  logic cu, cu1, cu0;
  int checks = 0, failures = 0;

  pp_reduce dut (.bits_in(bits), .row_a(ra), .row_b(rb), .carry_u(cu));
  pp_reduce #(.W(W), .U(16), .MAXH(MAXH), .H0(H0)) dut1 (.bits_in(bits), .row_a(ra1), .row_b(rb1), .carry_u(cu1));
  pp_reduce #(.W(W), .U(0), .MAXH(MAXH), .H0(H0)) dut0 (.bits_in(bits), .row_a(ra0), .row_b(rb0), .carry_u(cu0));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rows(int u, logic [W-1:0] ref_sum, logic [W-1:0] a,
                            logic [W-1:0] b, logic cy);
    logic [W:0] hi;
    checks++;
    if (W'(a + b) != ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL U=%0d rows: sum=%h a=%h b=%h", u, ref_sum, a, b);
    end
    hi = (W+1)'(a >> u) + (W+1)'(b >> u) + (W+1)'(cy);
    checks++;
    if (W'(hi) != (ref_sum >> u)) begin
      failures++;
      if (failures < 10) $display("FAIL U=%0d upper part with carry: sum=%h a=%h b=%h c=%b", u, ref_sum, a, b, cy);
    end
  endtask

  initial begin
    logic [W-1:0] ref_sum;
    for (int t = 0; t < 20000; t++) begin
      bits = '0;
      for (int c = 0; c < W; c++)
        for (int k = 0; k < int'(H0[c]); k++)
          bits[c][k] = (t < 2) ? t[0] : 1'($urandom);
      ref_sum = '0;
      for (int c = 0; c < W; c++)
        for (int k = 0; k < int'(H0[c]); k++)
          ref_sum += W'(bits[c][k]) << c;
      #1;
      check_rows(8, ref_sum, ra, rb, cu);
      check_rows(16, ref_sum, ra1, rb1, cu1);
      check_rows(0, ref_sum, ra0, rb0, cu0);
    end
    checks++;
    if (dut.N_FA != 35 || dut.N_HA != 7) begin
      failures++;
      $display("FAIL cell count FA=%0d HA=%0d", dut.N_FA, dut.N_HA);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
