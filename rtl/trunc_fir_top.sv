// trunc_fir_top: the two datapaths built from faithfully rounded truncated
// arithmetic, side by side with their own ports.
//   - fir_*  : the direct-form linear-phase FIR filter (fir_trunc) whose
//              products and their sum are one truncated MCMA block. Clocked,
//              one sample per cycle, output one cycle after the input.
//   - mult_* : the stand-alone unsigned 8x8 truncated multiplier
//              (trunc_mult) returning the 8 most significant product bits
//              within one ulp. Combinational.
// The two share no logic, only the adder cells and the reduction-tree
// generator they are built from. All parameters are the defaults of the two
// blocks (8-bit samples, four 8-bit coefficients, eight taps, 8-bit results).
module trunc_fir_top (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fir_in_valid,
  input  logic [7:0] fir_x,
  output logic       fir_out_valid,
  output logic [7:0] fir_y,
  input  logic [7:0] mult_x,
  input  logic [7:0] mult_y,
  output logic [7:0] mult_p
);

  fir_trunc u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (fir_in_valid),
    .x_in     (fir_x),
    .out_valid(fir_out_valid),
    .y_out    (fir_y)
  );

  trunc_mult u_mult (
    .x(mult_x),
    .y(mult_y),
    .p(mult_p)
  );

endmodule
