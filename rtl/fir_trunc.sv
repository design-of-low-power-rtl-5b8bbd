// fir_trunc: direct-form FIR filter whose multiply-accumulate is one
// truncated MCMA (multiple-constant multiplication/accumulation) block.
//
//   y[n] = sum_{i=0}^{NT-1} a_i * x[n-i]
//
// With SYMMETRIC = 1 (linear phase, the structure this design is built for)
// the filter has NT = 2*NCOEF taps with a_i = a_{NT-1-i}. The pair of samples
// that share a coefficient is summed first by a pre-adder,
//   s_i = x[n-i] + x[n-(NT-1-i)],  i = 0 .. NCOEF-1,
// so only NCOEF products remain. With SYMMETRIC = 0 the filter has
// NT = NCOEF taps and s_i = x[n-i].
//
// The samples move through a chain of NT-1 delay registers (tap_delay). The
// pre-adders and mcma_trunc, which sums all products in one partial-product
// matrix and returns the P most significant bits of the sum within one ulp,
// are combinational, so a whole output is computed in one clock cycle.
//
// Timing: a sample x_in presented with in_valid high at a rising clock edge
// enters the delay line at that edge, and at the same edge y_out is loaded
// with the output for that sample, y[n] / 2^U (U = W - P), and out_valid
// rises: latency one cycle, one sample per cycle. With in_valid low the
// filter holds its state and out_valid falls. Asynchronous active-low reset
// clears the delay line and the output.
// Design choices of this implementation: the output register, the
// in_valid/out_valid handshake, the reset, the pre-adder one bit wider than
// a sample (no wrap-around) and, for SYMMETRIC = 1, an even tap count.
// Default coefficients: 10110101, 11011011, 00101101, 10010110 (a_0..a_3).
module fir_trunc #(
  parameter int unsigned NCOEF     = 4,
  parameter int unsigned DW        = 8,   // input sample width (signed)
  parameter int unsigned CW        = 8,   // coefficient width (signed)
  parameter logic [NCOEF-1:0][CW-1:0] COEFS = {8'b10010110, 8'b00101101,
                                              8'b11011011, 8'b10110101},
  parameter int unsigned P         = 8,   // output width (signed)
  parameter bit          SYMMETRIC = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] x_in,
  output logic          out_valid,
  output logic [P-1:0]  y_out
);

  localparam int unsigned NT = SYMMETRIC ? 2 * NCOEF : NCOEF;  // taps
  localparam int unsigned SW = SYMMETRIC ? DW + 1 : DW;        // MCMA input width
  localparam int unsigned W  = SW + CW + $clog2(NCOEF);        // accumulator width

  logic [NT-2:0][DW-1:0]    taps;   // taps[k] = x[n-1-k]
  logic [NT-1:0][DW-1:0]    xs;     // xs[k]   = x[n-k]
  logic [NCOEF-1:0][SW-1:0] s;
  logic [P-1:0]             y_comb;

  tap_delay #(.DW(DW), .STAGES(NT - 1)) u_delay (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(in_valid),
    .x_in    (x_in),
    .taps    (taps)
  );

  // Pre-adders (sign-extended to SW bits).
  always_comb begin
    xs = {taps, x_in};
    for (int i = 0; i < int'(NCOEF); i++) begin
      if (SYMMETRIC)
        s[i] = SW'($signed(xs[i])) + SW'($signed(xs[NT-1-i]));
      else
        s[i] = SW'($signed(xs[i]));
    end
  end

  mcma_trunc #(
    .NCOEF(NCOEF),
    .SW   (SW),
    .CW   (CW),
    .COEFS(COEFS),
    .P    (P),
    .W    (W)
  ) u_mcma (
    .s(s),
    .y(y_comb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y_out <= y_comb;
    end
  end

  // Handshake rule: every accepted sample yields exactly one output, one
  // clock later.
  a_one_cycle : assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid == $past(in_valid))
    else $error("fir_trunc: out_valid does not follow in_valid by one clock");

endmodule
