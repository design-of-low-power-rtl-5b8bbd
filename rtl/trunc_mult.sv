// trunc_mult: unsigned N x N truncated multiplier that returns only the P most
// significant bits of the 2N-bit product, with a total error of at most one
// unit in the last place (ulp = 2^(2N-P) in product units).
//
// How it works. The N rows of partial-product bits (row j is x AND y[j],
// shifted left by j) form one bit matrix. Row 0 is kept whole; from the other
// rows the least significant bits are deleted, column by column from
// column 0 upward, as long as the largest value the deleted bits can take
// stays within one ulp (deletion error between -1 ulp and 0). A constant of
// one ulp is added to the matrix: half an ulp centres the deletion error and
// half an ulp centres the rounding error. pp_reduce compresses the remaining
// matrix to two rows. Below the ulp only the carry of those two rows is
// formed (a chain of carry-only cells), and their sum bits are dropped
// (rounding error between -1 ulp and 0). A carry-propagate adder sums the two
// rows at and above the ulp, with that carry as carry-in.
// The result r therefore satisfies  -ulp < r*ulp - x*y <= ulp.
//
// Which bits are deleted, how the tree is scheduled and the bias constant all
// follow from N and P at elaboration time. Keeping one row whole, removing
// bits only by deletion and rounding (no separate truncation step) and the
// one-ulp error budget follow the published scheme; the choice of which rows
// lose their bits inside a column (the highest rows first) is this design's
// own.
//
// Interface: x, y in, p out; purely combinational (no clock, no latency).
module trunc_mult #(
  parameter int unsigned N = 8,  // operand width
  parameter int unsigned P = 8   // result width (most significant product bits)
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [P-1:0] p
);

  localparam int W    = 2 * N;      // product columns
  localparam int U    = W - int'(P); // ulp column
  localparam int MAXH = int'(N) + 1; // tallest column, bias bit included

  // The result must drop at least one product bit.
  if (P < 1 || P >= 2 * N) begin : g_bad_p
    $error("trunc_mult: P must be between 1 and 2N-1");
  end

  // Rows j >= 1 that have a bit in column c.
  function automatic int jlo(int c);
    return (c - int'(N) + 1 > 1) ? c - int'(N) + 1 : 1;
  endfunction
  function automatic int jhi(int c);
    return (c < int'(N) - 1) ? c : int'(N) - 1;
  endfunction
  function automatic int n_deletable(int c);
    return (jhi(c) >= jlo(c)) ? jhi(c) - jlo(c) + 1 : 0;
  endfunction

  // Bits deleted from each column: greedy from column 0 upward within a
  // budget of one ulp (2^U) of deleted weight.
  function automatic logic [W-1:0][7:0] deletions();
    logic [W-1:0][7:0] nd = '0;
    longint budget = longint'(1) << U;
    int d;
    for (int c = 0; c < W; c++) begin
      d = n_deletable(c);
      if (longint'(d) > (budget >> c)) d = int'(budget >> c);
      budget -= longint'(d) << c;
      nd[c] = 8'(d);
    end
    return nd;
  endfunction
  localparam logic [W-1:0][7:0] NDEL = deletions();

  // KEEP[j][c]: row j keeps its bit in column c (the highest rows are
  // deleted first; row 0 is never deleted).
  function automatic logic [N-1:0][W-1:0] keep_mask();
    logic [N-1:0][W-1:0] km = '0;
    for (int j = 0; j < int'(N); j++)
      for (int c = j; c < j + int'(N); c++)
        km[j][c] = (j == 0) || (j <= jhi(c) - int'(NDEL[c]));
    return km;
  endfunction
  localparam logic [N-1:0][W-1:0] KEEP = keep_mask();

  function automatic logic [W-1:0][7:0] heights();
    logic [W-1:0][7:0] h = '0;
    for (int c = 0; c < W; c++) begin
      int n = 0;
      for (int j = 0; j < int'(N); j++) if (KEEP[j][c]) n++;
      if (c == U) n++;
      h[c] = 8'(n);
    end
    return h;
  endfunction

  localparam logic [W-1:0][7:0] H0 = heights();

  // Total number of deleted partial-product bits (for reports).
  function automatic int total_deleted();
    int t = 0;
    for (int c = 0; c < W; c++) t += int'(NDEL[c]);
    return t;
  endfunction
  localparam int DELETED = total_deleted();

  logic [W-1:0][MAXH-1:0] bits;
  logic [W-1:0]           row_a, row_b;
  logic                   carry_u;

  // Place the kept partial-product bits and the bias bit into the columns.
  always_comb begin
    int slot [W];
    bits = '0;
    for (int c = 0; c < W; c++) slot[c] = 0;
    for (int j = 0; j < int'(N); j++) begin
      for (int k = 0; k < int'(N); k++) begin
        if (KEEP[j][j + k]) begin
          bits[j+k][slot[j+k]] = x[k] & y[j];
          slot[j+k]++;
        end
      end
    end
    bits[U][slot[U]] = 1'b1;  // one-ulp bias
  end

  pp_reduce #(
    .W   (W),
    .U   (U),
    .MAXH(MAXH),
    .H0  (H0)
  ) u_reduce (
    .bits_in(bits),
    .row_a  (row_a),
    .row_b  (row_b),
    .carry_u(carry_u)
  );

  // Final carry-propagate addition of the two rows at and above the ulp,
  // with the carry out of the dropped columns as carry-in.
  always_comb begin
    p = row_a[W-1:U] + row_b[W-1:U] + P'(carry_u);
  end

endmodule
