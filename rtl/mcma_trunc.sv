// mcma_trunc: truncated multiple-constant multiplication/accumulation (MCMA).
// Computes  y ~= (sum_i COEFS[i] * s[i]) / 2^U  with the P most significant
// bits of a W-bit two's-complement accumulator, where U = W - P, and with a
// total error of at most one ulp: -ulp < y*2^U - exact <= ulp.
//
// How it works. Rather than forming each product and adding the products,
// all partial-product bits (PPBs) of all products go into one bit matrix:
//   - Coefficient i, bit j set, contributes a row holding s[i] shifted by j.
//     The coefficient's sign bit (weight -2^(CW-1)) contributes the negated
//     row -s[i] = ~s[i] + 1 instead.
//   - Sign extension is avoided: the sign bit b of each row (weight
//     -2^(SW-1) within the row) is replaced by its complement using
//     -b = (1-b) - 1, so the row holds only plain bits and the "-1" moves
//     into a constant. The +1 of each negated row goes there too.
//   - All constants, plus a one-ulp bias (half an ulp for the deletion, half
//     an ulp for the rounding), are summed at elaboration time into one
//     constant row at the bottom of the matrix.
//   - The first row of the matrix is undeletable. From the other rows the
//     lowest bits are deleted, column by column from column 0 upward, as long
//     as the largest value of all deleted bits stays within one ulp.
//   - pp_reduce compresses the matrix to two rows. Below the ulp only their
//     carry into the ulp column is formed and their sum bits are dropped; a
//     carry-propagate adder sums the two rows above, with that carry as
//     carry-in.
// The arithmetic wraps modulo 2^W, so W must cover the full range of the
// exact sum plus one ulp; the default W = SW + CW + clog2(NCOEF) does.
// The single matrix, the sign handling, the deletion and the bias follow the
// published truncated-MCMA scheme;
// the order in which rows lose bits inside a column (highest row first) and
// the placement of the undeletable row (the first coefficient's lowest set
// bit) are this design's choices.
//
// Interface: s (NCOEF signed samples of SW bits, packed) in, y (signed, P
// bits) out; purely combinational.
module mcma_trunc #(
  parameter int unsigned NCOEF = 4,   // number of constant coefficients
  parameter int unsigned SW    = 9,   // width of each signed input
  parameter int unsigned CW    = 8,   // coefficient width (signed)
  parameter logic [NCOEF-1:0][CW-1:0] COEFS = {8'b10010110, 8'b00101101,
                                              8'b11011011, 8'b10110101},
  parameter int unsigned P     = 8,   // output width
  parameter int unsigned W     = SW + CW + $clog2(NCOEF)  // accumulator width
) (
  input  logic [NCOEF-1:0][SW-1:0] s,
  output logic [P-1:0]             y
);

  localparam int U    = int'(W) - int'(P);  // ulp column
  localparam int NROW = int'(NCOEF) * int'(CW);  // row r = i*CW + j

  // The result must drop at least one accumulator bit, and the accumulator
  // must hold every row.
  if (P < 1 || P >= W || W < SW + CW) begin : g_bad_w
    $error("mcma_trunc: need 1 <= P < W and W >= SW + CW");
  end

  function automatic bit row_on(int r);
    return COEFS[r / int'(CW)][r % int'(CW)];
  endfunction
  function automatic int row_sh(int r);
    return r % int'(CW);
  endfunction

  // First present row: it stays whole.
  function automatic int first_row();
    for (int r = 0; r < NROW; r++) if (row_on(r)) return r;
    return -1;
  endfunction
  localparam int R0 = first_row();

  // Row r has a (non-constant) bit in column c.
  function automatic bit has_bit(int r, int c);
    return row_on(r) && c >= row_sh(r) && c < row_sh(r) + int'(SW);
  endfunction

  function automatic int n_deletable(int c);
    int n = 0;
    for (int r = 0; r < NROW; r++) if (r != R0 && has_bit(r, c)) n++;
    return n;
  endfunction

  // Number of bits deleted from each column: greedy within a one-ulp budget
  // of deleted weight, from column 0 upward.
  function automatic logic [W-1:0][7:0] deletions();
    logic [W-1:0][7:0] nd = '0;
    longint budget = longint'(1) << U;
    int d;
    for (int c = 0; c < int'(W); c++) begin
      d = n_deletable(c);
      if (longint'(d) > (budget >> c)) d = int'(budget >> c);
      budget -= longint'(d) << c;
      nd[c] = 8'(d);
    end
    return nd;
  endfunction
  localparam logic [W-1:0][7:0] NDEL = deletions();

  // KEEP[r][c]: row r keeps its bit in column c. Within a column the highest
  // rows lose their bits first; row R0 keeps all of its bits.
  function automatic logic [NROW-1:0][W-1:0] keep_mask();
    logic [NROW-1:0][W-1:0] km = '0;
    int left;
    for (int c = 0; c < int'(W); c++) begin
      left = int'(NDEL[c]);
      for (int r = NROW - 1; r >= 0; r--) begin
        if (has_bit(r, c)) begin
          if (r != R0 && left > 0) left--;
          else km[r][c] = 1'b1;
        end
      end
    end
    return km;
  endfunction
  localparam logic [NROW-1:0][W-1:0] KEEP = keep_mask();

  // Sum of all constants: sign-bit corrections, the +1 of negated rows and
  // the one-ulp bias, modulo 2^W.
  function automatic logic [W-1:0] bias_const();
    logic [W-1:0] k = W'(1) << U;
    for (int r = 0; r < NROW; r++) begin
      if (row_on(r)) begin
        k -= W'(1) << (row_sh(r) + int'(SW) - 1);
        if (row_sh(r) == int'(CW) - 1) k += W'(1) << row_sh(r);
      end
    end
    return k;
  endfunction
  localparam logic [W-1:0] K = bias_const();

  function automatic logic [W-1:0][7:0] heights();
    logic [W-1:0][7:0] h = '0;
    for (int c = 0; c < int'(W); c++) begin
      int n = 0;
      for (int r = 0; r < NROW; r++) if (KEEP[r][c]) n++;
      if (K[c]) n++;
      h[c] = 8'(n);
    end
    return h;
  endfunction
  localparam logic [W-1:0][7:0] H0 = heights();

  function automatic int max_h();
    int m = 1;
    for (int c = 0; c < int'(W); c++) if (int'(H0[c]) > m) m = int'(H0[c]);
    return m;
  endfunction
  localparam int MAXH = max_h();

  function automatic int total_deleted();
    int t = 0;
    for (int c = 0; c < int'(W); c++) t += int'(NDEL[c]);
    return t;
  endfunction
  localparam int DELETED = total_deleted();

  logic [W-1:0][MAXH-1:0] bits;
  logic [W-1:0]           row_a, row_b;
  logic                   carry_u;

  // Partial-product bit generation with sign-bit complement (positive rows:
  // plain bits, inverted sign bit; negated rows: inverted bits, plain sign
  // bit), then the constant row.
  always_comb begin
    int slot [W];
    logic b;
    bits = '0;
    b = 1'b0;
    for (int c = 0; c < int'(W); c++) slot[c] = 0;
    for (int r = 0; r < NROW; r++) begin
      for (int k = 0; k < int'(SW); k++) begin
        if (KEEP[r][row_sh(r) + k]) begin
          b = s[r / int'(CW)][k];
          if (row_sh(r) == int'(CW) - 1) b = ~b;  // negated row
          if (k == int'(SW) - 1) b = ~b;          // complemented sign bit
          bits[row_sh(r)+k][slot[row_sh(r)+k]] = b;
          slot[row_sh(r)+k]++;
        end
      end
    end
    for (int c = 0; c < int'(W); c++) begin
      if (K[c]) begin
        bits[c][slot[c]] = 1'b1;
        slot[c]++;
      end
    end
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

  // Final carry-propagate addition with the carry out of the dropped columns.
  always_comb begin
    y = row_a[W-1:U] + row_b[W-1:U] + P'(carry_u);
  end

endmodule
