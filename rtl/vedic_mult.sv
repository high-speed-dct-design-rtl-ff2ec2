// vedic_mult: unsigned W x W multiplier following the Urdhva-Tiryak
// ("vertically and crosswise") method.
//
// How it works. Product column c collects every bit product a[i] & b[j] with
// i + j == c: the vertical product at the ends of the operands and the
// crosswise products in between, exactly the column sums of the sutra
// (for W = 4: P0 = a0b0, P1 = a1b0 + a0b1, ..., P6 = a3b3). Instead of
// resolving each column sum with a multi-bit carry in turn, all columns are
// compressed at once in a carry-save tree:
//   * a column with five or more bits feeds groups of five into compressor42
//     cells (one sum kept in the column, two carries to the next column);
//   * three or four remaining bits feed one fa_fast cell;
//   * at most two bits pass down unchanged.
// Levels repeat until every column holds at most two bits. Carries produced
// in column n are placed so that they drive the fast inputs (cin) of the
// cells of column n+1 at the next level ("horizontal optimisation"), and in
// the compressor the first sum drives the second adder's fast input
// ("vertical optimisation"). A ripple chain of fa_fast cells, carry into the
// fast input, adds the last two rows.
//
// The shape of the tree (heights per level and column) is worked out at
// elaboration by constant functions, so W may be any size >= 1; the
// document's multiplier is W = 8 (its worked 4-bit example is W = 4).
// Carries leaving column 2W-1 are dropped: the product of two W-bit numbers
// fits in 2W bits, so they are always zero.
//
// Interface: a, b (unsigned, W bits) -> p (unsigned, 2W bits).
// Timing: purely combinational, no clock.
//
// Follows the document: column sums of the sutra, compressor and fast full
// adder cells, carries to fast inputs of the next column, final carry adder.
// This design's own choices: the grouping rule above (five, then three) and
// the ripple final adder; the document does not give the tree's exact shape
// or the final adder's type.
module vedic_mult #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int NC = 2 * W;

  // Cell counts for a column of height h at one level.
  function automatic int n5(input int h);
    return h / 5;
  endfunction
  function automatic int n3(input int h);
    return (h % 5) / 3;
  endfunction
  function automatic int npass(input int h);
    return (h % 5) % 3;
  endfunction
  // Carries a column of height h sends to the next column.
  function automatic int ncarry(input int h);
    return 2 * n5(h) + n3(h);
  endfunction

  // Number of bit products in column c (the sutra's column sum terms).
  function automatic int init_h(input int c);
    if (c > 2 * int'(W) - 2) return 0;
    return ((c < 2 * int'(W) - 2 - c) ? c : 2 * int'(W) - 2 - c) + 1;
  endfunction

  // Upper bound on the number of compression levels (each level shrinks
  // the tallest column by about a third).
  localparam int MAXL = int'(W) + 2;

  // Height of every column before every level, computed once:
  // htab[l][c] = number of bits column c holds entering level l.
  typedef logic [MAXL:0][NC-1:0][15:0] htab_t;

  function automatic htab_t build_htab();
    htab_t t;
    int    h  [NC];
    int    nh [NC];
    t = '0;
    for (int k = 0; k < NC; k++) h[k] = init_h(k);
    for (int l = 0; l <= MAXL; l++) begin
      for (int k = 0; k < NC; k++) t[l][k] = 16'(h[k]);
      for (int k = 0; k < NC; k++)
        nh[k] = n5(h[k]) + n3(h[k]) + npass(h[k]) + ((k > 0) ? ncarry(h[k-1]) : 0);
      for (int k = 0; k < NC; k++) h[k] = nh[k];
    end
    return t;
  endfunction

  localparam htab_t HTAB = build_htab();

  function automatic int col_h(input int lvl, input int c);
    return int'(HTAB[lvl][c]);
  endfunction

  // Levels needed until no column holds more than two bits.
  function automatic int num_levels();
    for (int l = 0; l <= MAXL; l++) begin
      int mx;
      mx = 0;
      for (int k = 0; k < NC; k++) if (col_h(l, k) > mx) mx = col_h(l, k);
      if (mx <= 2) return l;
    end
    return MAXL;
  endfunction

  localparam int NLEV = num_levels();

  // Largest column height met anywhere in the tree (at least 2).
  function automatic int max_h();
    int mx;
    mx = 2;
    for (int l = 0; l <= NLEV; l++)
      for (int k = 0; k < NC; k++) if (col_h(l, k) > mx) mx = col_h(l, k);
    return mx;
  endfunction

  localparam int HMAX = max_h();

  // Stage l holds bits[c][j], bit j of column c entering level l, and
  // cy[c][k], carry k produced by column c at level l (weight of c+1).
  // Stage NLEV holds the two rows left for the final adder.
  for (genvar l = 0; l <= NLEV; l++) begin : g_stage
    logic bits [NC][HMAX];
    logic cy   [NC][HMAX];
  end

  // Level 0: vertical and crosswise bit products.
  for (genvar c = 0; c < NC; c++) begin : g_pp
    localparam int ILO = (c - int'(W) + 1 > 0) ? c - int'(W) + 1 : 0;
    for (genvar j = 0; j < HMAX; j++) begin : g_bit
      if (j < init_h(c)) begin : g_prod
        assign g_stage[0].bits[c][j] = a[ILO + j] & b[c - ILO - j];
      end else begin : g_zero
        assign g_stage[0].bits[c][j] = 1'b0;
      end
    end
  end

  // Compression levels.
  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    for (genvar c = 0; c < NC; c++) begin : g_col
      localparam int H   = col_h(l, c);
      localparam int N5  = n5(H);
      localparam int N3  = n3(H);
      localparam int NP  = npass(H);
      localparam int NCY = ncarry(H);
      localparam int HP  = (c > 0) ? col_h(l, c - 1) : 0;
      localparam int NCI = ncarry(HP);
      localparam int HN  = N5 + N3 + NP + NCI;

      // Slow inputs are taken from the bottom of the column, fast inputs
      // from the top, where the previous column's carries were placed.
      for (genvar k = 0; k < N5; k++) begin : g_c42
        logic s1_unused;
        compressor42 u_c42 (
          .a    (g_stage[l].bits[c][4*k]),
          .b    (g_stage[l].bits[c][4*k+1]),
          .cin  (g_stage[l].bits[c][H-1-k]),
          .d    (g_stage[l].bits[c][4*k+2]),
          .e    (g_stage[l].bits[c][4*k+3]),
          .sum1 (s1_unused),
          .sum  (g_stage[l+1].bits[c][k]),
          .cout1(g_stage[l].cy[c][2*k]),
          .cout2(g_stage[l].cy[c][2*k+1])
        );
      end
      for (genvar k = 0; k < N3; k++) begin : g_fa
        fa_fast u_fa (
          .a   (g_stage[l].bits[c][4*N5 + 2*k]),
          .b   (g_stage[l].bits[c][4*N5 + 2*k + 1]),
          .cin (g_stage[l].bits[c][H-1-N5-k]),
          .sum (g_stage[l+1].bits[c][N5 + k]),
          .cout(g_stage[l].cy[c][2*N5 + k])
        );
      end
      for (genvar k = 0; k < NP; k++) begin : g_pass
        assign g_stage[l+1].bits[c][N5 + N3 + k] = g_stage[l].bits[c][4*N5 + 2*N3 + k];
      end
      // Carries from column c-1 go on top, toward the next fast inputs.
      for (genvar k = 0; k < NCI; k++) begin : g_cin
        assign g_stage[l+1].bits[c][N5 + N3 + NP + k] = g_stage[l].cy[c-1][k];
      end
      for (genvar j = HN; j < HMAX; j++) begin : g_fill
        assign g_stage[l+1].bits[c][j] = 1'b0;
      end
      for (genvar k = NCY; k < HMAX; k++) begin : g_cfill
        assign g_stage[l].cy[c][k] = 1'b0;
      end
    end
  end

  // Unused carry slots of the last stage.
  for (genvar c = 0; c < NC; c++) begin : g_clast
    for (genvar k = 0; k < HMAX; k++) begin : g_k
      assign g_stage[NLEV].cy[c][k] = 1'b0;
    end
  end

  // Final carry-propagate adder on the two remaining rows.
  logic [NC:0] rc;
  assign rc[0] = 1'b0;
  for (genvar c = 0; c < NC; c++) begin : g_cpa
    fa_fast u_fa (
      .a   (g_stage[NLEV].bits[c][0]),
      .b   (g_stage[NLEV].bits[c][1]),
      .cin (rc[c]),
      .sum (p[c]),
      .cout(rc[c+1])
    );
  end
endmodule
