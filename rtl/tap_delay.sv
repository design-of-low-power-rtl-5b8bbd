// tap_delay: the chain of D elements of a direct-form FIR filter.
// On every rising clock edge with shift_en high, the input sample enters
// stage 0 and every stage moves one place down the line, so that
// taps[i] holds x[n-1-i] while x_in holds x[n]. With shift_en low the line
// holds its contents. Asynchronous active-low reset clears all stages to
// zero (the reset and the enable are choices of this design; the filter
// structure only shows plain delay elements).
module tap_delay #(
  parameter int unsigned DW     = 8,  // sample width
  parameter int unsigned STAGES = 7   // number of delay elements
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          shift_en,
  input  logic [DW-1:0]                 x_in,
  output logic [STAGES-1:0][DW-1:0]     taps
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taps <= '0;
    end else if (shift_en) begin
      taps[0] <= x_in;
      for (int i = 1; i < int'(STAGES); i++) taps[i] <= taps[i-1];
    end
  end
endmodule
