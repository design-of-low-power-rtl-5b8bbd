// pp_reduce: column-by-column carry-save reduction of a partial-product-bit
// (PPB) matrix made of full and half adders, followed by the carry-only chain
// that rounds away the columns below the ulp.
//
// The matrix has W columns; column c carries weight 2^c and holds H0[c] bits
// in bits_in[c][H0[c]-1:0] (higher slots are ignored). Column U is the unit
// in the last place (ulp) of the truncated result.
//
// Tree. Every column is reduced to at most two bits, giving two rows row_a
// and row_b with row_a + row_b = matrix sum (mod 2^W). Stage targets follow
// the Dadda sequence 2, 3, 4, 6, 9, 13, ... (each term 3/2 of the one before,
// rounded down), so compression happens only when needed and the number of
// carry-save levels is the minimum. In each stage and column the excess
// e = (bits + incoming carries - target) is removed with floor(e/2) full
// adders and (e mod 2) half adders: at most one half adder per column and
// stage, since a full adder compresses better. For the full 8x8 matrix this
// gives 35 full and 7 half adders in 4 stages.
//
// Rounding chain. The caller keeps only columns U and up. The two bits of
// each column below U are not added; only the carry they produce is needed.
// A chain of carry-only cells (a half adder in column 0, full adders above,
// all with their sum outputs unused, i.e. AND and majority gates) computes
// carry_u, the carry from column U-1 into column U. The caller adds it as the
// carry-in of its final adder, and the dropped low sum is below one ulp.
//
// The schedule is computed from the parameters at elaboration time. The
// carry out of column W-1 is discarded.
//
// Interface: bits_in (packed, [column][slot]) in; row_a, row_b and carry_u
// out. The whole block is combinational.
module pp_reduce #(
  parameter int unsigned W    = 16,  // number of columns
  parameter int unsigned U    = 8,   // ulp column: carry_u is the carry into it
  parameter int unsigned MAXH = 8,   // slots per column in bits_in
  // initial column heights, column W-1 first; the default is the full
  // matrix of an unsigned 8x8 multiplication
  parameter logic [W-1:0][7:0] H0 = {8'd0, 8'd1, 8'd2, 8'd3, 8'd4, 8'd5, 8'd6, 8'd7,
                                     8'd8, 8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd1}
) (
  input  logic [W-1:0][MAXH-1:0] bits_in,
  output logic [W-1:0]           row_a,
  output logic [W-1:0]           row_b,
  output logic                   carry_u
);

  // Upper bound on the number of stages (Dadda levels, plus slack for
  // carries that arrive late in a column).
  localparam int MS = 24;

  function automatic int h0_max();
    int m = 0;
    for (int c = 0; c < int'(W); c++) if (int'(H0[c]) > m) m = int'(H0[c]);
    return m;
  endfunction

  // Replays the whole schedule once. For every stage st (0..MS) and column
  // c it records: what=0 the height at the start of the stage, what=1 the
  // full adders and what=2 the half adders used in the stage.
  function automatic logic [MS:0][W-1:0][7:0] schedule(int what);
    logic [MS:0][W-1:0][7:0] res;
    logic [W-1:0][7:0] h, hn;
    int dseq [32];
    int nd, cin, t, e, avail, f, a;
    int hmax = h0_max();
    // Dadda sequence 2, 3, 4, 6, 9, ... and the number of levels needed to
    // bring the tallest column down to two
    dseq[0] = 2;
    for (int i = 1; i < 32; i++) dseq[i] = (dseq[i-1] * 3) / 2;
    nd = 0;
    while (nd < 31 && dseq[nd] < hmax) nd++;
    res = '0;
    h = H0;
    for (int st = 0; st <= MS; st++) begin
      cin = 0;
      for (int cc = 0; cc < int'(W); cc++) begin
        t = (st < nd - 1) ? dseq[nd - 1 - st] : 2;
        avail = int'(h[cc]);
        e = int'(h[cc]) + cin - t;
        f = 0;
        a = 0;
        while (e > 0 && avail >= 2) begin
          if (e >= 2 && avail >= 3) begin
            f++; avail -= 3; e -= 2;
          end else begin
            a++; avail -= 2; e -= 1;
          end
        end
        if (what == 0) res[st][cc] = h[cc];
        if (what == 1) res[st][cc] = 8'(f);
        if (what == 2) res[st][cc] = 8'(a);
        hn[cc] = 8'(int'(h[cc]) - 2 * f - a + cin);
        cin = f + a;
      end
      h = hn;
    end
    return res;
  endfunction

  localparam logic [MS:0][W-1:0][7:0] HT  = schedule(0);
  localparam logic [MS:0][W-1:0][7:0] NFT = schedule(1);
  localparam logic [MS:0][W-1:0][7:0] NHT = schedule(2);

  // First stage at which every column holds at most two bits.
  function automatic int num_stages();
    for (int st = 0; st <= MS; st++) begin
      bit done = 1'b1;
      for (int c = 0; c < int'(W); c++)
        if (int'(HT[st][c]) > 2) done = 1'b0;
      if (done) return st;
    end
    return MS;
  endfunction

  localparam int NS = num_stages();

  function automatic int max_height();
    int m = 2;
    for (int st = 0; st <= NS; st++)
      for (int c = 0; c < int'(W); c++) if (int'(HT[st][c]) > m) m = int'(HT[st][c]);
    return m;
  endfunction

  localparam int HM = max_height();

  // Cell counts of the tree (for reports): full and half adders in all stages.
  function automatic int cell_total(bit full);
    int t = 0;
    for (int st = 0; st < NS; st++)
      for (int c = 0; c < int'(W); c++) t += full ? int'(NFT[st][c]) : int'(NHT[st][c]);
    return t;
  endfunction
  localparam int N_FA = cell_total(1'b1);
  localparam int N_HA = cell_total(1'b0);

  // g_st[s].v[c][k]: slot k of column c at the start of stage s.
  // g_st[s].cy[c][k]: carry k produced by column c in stage s-1; it lands in
  // column c+1 at stage s. Each stage has its own arrays so that no array
  // feeds itself.
  for (genvar s = 0; s <= NS; s++) begin : g_st
    logic v  [W][HM];
    logic cy [W][HM];

    if (s == 0) begin : g_load
      for (genvar c = 0; c < int'(W); c++) begin : g_col
        for (genvar k = 0; k < HM; k++) begin : g_slot
          if (k < int'(H0[c]) && k < int'(MAXH)) begin : g_bit
            assign v[c][k] = bits_in[c][k];
          end else begin : g_zero
            assign v[c][k] = 1'b0;
          end
          assign cy[c][k] = 1'b0;
        end
      end
    end else begin : g_red
      for (genvar c = 0; c < int'(W); c++) begin : g_col
        localparam int H    = int'(HT[s-1][c]);
        localparam int NF   = int'(NFT[s-1][c]);
        localparam int NH   = int'(NHT[s-1][c]);
        localparam int PASS = H - 3 * NF - 2 * NH;
        localparam int CIN  = (c > 0) ? int'(NFT[s-1][c-1]) + int'(NHT[s-1][c-1]) : 0;
        localparam int HN   = NF + NH + PASS + CIN;

        for (genvar f = 0; f < NF; f++) begin : g_fa
          fa_cell u_fa (
            .a (g_st[s-1].v[c][3*f]),
            .b (g_st[s-1].v[c][3*f+1]),
            .ci(g_st[s-1].v[c][3*f+2]),
            .s (v[c][f]),
            .co(cy[c][f])
          );
        end
        for (genvar g = 0; g < NH; g++) begin : g_ha
          ha_cell u_ha (
            .a (g_st[s-1].v[c][3*NF+2*g]),
            .b (g_st[s-1].v[c][3*NF+2*g+1]),
            .s (v[c][NF+g]),
            .co(cy[c][NF+g])
          );
        end
        for (genvar p = 0; p < PASS; p++) begin : g_pass
          assign v[c][NF+NH+p] = g_st[s-1].v[c][3*NF+2*NH+p];
        end
        for (genvar j = 0; j < CIN; j++) begin : g_cin
          assign v[c][NF+NH+PASS+j] = cy[c-1][j];
        end
        for (genvar k = HN; k < HM; k++) begin : g_fill
          assign v[c][k] = 1'b0;
        end
        for (genvar k = NF + NH; k < HM; k++) begin : g_nocy
          assign cy[c][k] = 1'b0;
        end
      end
    end
  end

  for (genvar c = 0; c < int'(W); c++) begin : g_out
    assign row_a[c] = g_st[NS].v[c][0];
    assign row_b[c] = g_st[NS].v[c][1];
  end

  // Carry-only chain over the columns below U: ch[c] is the carry into
  // column c; the sums (lo_sum) are the bits that rounding drops.
  if (U == 0) begin : g_no_chain
    assign carry_u = 1'b0;
  end else begin : g_chain
    logic [U:0]   ch;
    logic [U-1:0] lo_sum;
    assign ch[0] = 1'b0;
    for (genvar c = 0; c < int'(U); c++) begin : g_fc
      if (c == 0) begin : g_hc
        ha_cell u_hc (.a(row_a[c]), .b(row_b[c]), .s(lo_sum[c]), .co(ch[c+1]));
      end else begin : g_fc
        fa_cell u_fc (.a(row_a[c]), .b(row_b[c]), .ci(ch[c]), .s(lo_sum[c]), .co(ch[c+1]));
      end
    end
    assign carry_u = ch[U];
  end

endmodule
