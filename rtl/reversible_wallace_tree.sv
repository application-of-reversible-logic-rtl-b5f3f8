// reversible_wallace_tree: 8x8 unsigned multiplier built from reversible gates.
// It works in the three Wallace-tree steps:
//   1. 64 Peres gates (C = 0) form the partial products a[j] & b[i] on their R
//      outputs; bit a[j] & b[i] has weight 2**(i+j) and goes to column i+j.
//   2. Layers of full and half adders reduce every column to at most two bits.
//      In each layer a column of height h is cut into h/3 groups of three,
//      each summed by a TSG gate used as a full adder (C = 0); a leftover pair
//      goes to a Peres half adder and a leftover single bit passes on. Sums
//      stay in the column, carries move to the next one. For 8x8 the column
//      heights go from at most 8 to 6, 4, 3 and 2 in four layers.
//   3. A 16-bit ripple adder (a Peres half adder for bit 0, TSG full adders
//      above it) adds the two remaining rows.
// product = a * b, purely combinational. Carries out of column 15 are dropped:
// they are always 0 because the product fits in 16 bits.
// The three steps, the TSG and Peres cells and the 8x8 size follow the paper;
// the use of Peres gates as the AND gates and the column bookkeeping below
// (classic Wallace grouping, computed at elaboration) are this design's.
module reversible_wallace_tree (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] product
);
  localparam int unsigned N      = 8;       // operand width
  localparam int unsigned COLS   = 2 * N;   // product columns
  localparam int unsigned MAXL   = 6;       // upper bound on reduction layers
  localparam int unsigned MAXH   = N;       // tallest column

  // column heights of one layer, packed four bits per column
  typedef logic [4*COLS-1:0] heights_t;

  // bits each column keeps for itself (full-adder sums, half-adder sum, pass)
  function automatic int kept(input int h);
    return h / 3 + ((h % 3) != 0 ? 1 : 0);
  endfunction

  // carries a column of height h sends to the next column
  function automatic int sent(input int h);
    return h / 3 + ((h % 3) == 2 ? 1 : 0);
  endfunction

  // column heights entering layer l; layer 0 holds the partial products
  function automatic heights_t layer_heights(input int l);
    heights_t hh, nn;
    hh = '0;
    for (int c = 0; c < COLS; c++) begin
      int lo, hi;
      lo = (c > N - 1) ? c - (N - 1) : 0;
      hi = (c < N - 1) ? c : N - 1;
      hh[4*c +: 4] = 4'((hi >= lo) ? hi - lo + 1 : 0);
    end
    for (int k = 0; k < l; k++) begin
      nn = '0;
      for (int c = 0; c < COLS; c++)
        nn[4*c +: 4] = 4'(kept(int'(hh[4*c +: 4])) + ((c > 0) ? sent(int'(hh[4*(c-1) +: 4])) : 0));
      hh = nn;
    end
    return hh;
  endfunction

  function automatic int height(input int l, input int c);
    heights_t hh;
    hh = layer_heights(l);
    return int'(hh[4*c +: 4]);
  endfunction

  // number of layers until no column is taller than two
  function automatic int layer_count();
    for (int l = 0; l < MAXL; l++) begin
      int tallest;
      tallest = 0;
      for (int c = 0; c < COLS; c++) if (height(l, c) > tallest) tallest = height(l, c);
      if (tallest <= 2) return l;
    end
    return MAXL;
  endfunction

  localparam int unsigned LAYERS = layer_count();

  // g_stage[l].col[c][k]: k-th bit of column c entering reduction layer l.
  // Each stage has its own array and the gates that fill it, so no array is
  // both read and written by the same layer.
  for (genvar l = 0; l <= LAYERS; l++) begin : g_stage
    logic [MAXH-1:0] col [COLS];

    if (l == 0) begin : g_pp
      // step 1: partial products; column c holds a[c-i] & b[i] at index i - LO
      for (genvar c = 0; c < COLS; c++) begin : g_col
        localparam int LO = (c > N - 1) ? c - (N - 1) : 0;
        localparam int HI = (c < N - 1) ? c : N - 1;
        for (genvar i = LO; i <= HI; i++) begin : g_and
          logic garbage_p, garbage_q;
          peres_gate u_and (
            .a(a[c-i]), .b(b[i]), .c(1'b0),
            .p(garbage_p), .q(garbage_q), .r(col[c][i-LO])
          );
        end
        if (height(0, c) < MAXH) begin : g_pad
          assign col[c][MAXH-1:height(0, c)] = '0;
        end
      end
    end else begin : g_reduce
      // step 2: one Wallace layer, reading the previous stage
      for (genvar c = 0; c < COLS; c++) begin : g_col
        localparam int HT   = height(l - 1, c);
        localparam int NFA  = HT / 3;
        localparam int NHA  = ((HT % 3) == 2) ? 1 : 0;
        localparam int PASS = ((HT % 3) == 1) ? 1 : 0;

        logic [MAXH-1:0]  prev;
        logic [NFA+NHA:0] carry;                // one spare bit keeps it sized
        assign prev = g_stage[l-1].col[c];
        assign carry[NFA+NHA] = 1'b0;

        for (genvar k = 0; k < NFA; k++) begin : g_fa
          logic garbage_p, garbage_q;
          tsg_gate u_fa (
            .a(prev[3*k]), .b(prev[3*k+1]), .c(1'b0), .d(prev[3*k+2]),
            .p(garbage_p), .q(garbage_q), .r(col[c][k]), .s(carry[k])
          );
        end
        if (NHA == 1) begin : g_ha
          logic garbage_p;
          peres_gate u_ha (
            .a(prev[3*NFA]), .b(prev[3*NFA+1]), .c(1'b0),
            .p(garbage_p), .q(col[c][NFA]), .r(carry[NFA])
          );
        end
        if (PASS == 1) begin : g_pass
          assign col[c][NFA] = prev[3*NFA];
        end
        // carries go to the next column, after that column's own kept bits
        if (c + 1 < COLS) begin : g_carry
          localparam int NEXT_KEPT = kept(height(l - 1, c + 1));
          for (genvar k = 0; k < NFA + NHA; k++) begin : g_move
            assign col[c+1][NEXT_KEPT+k] = carry[k];
          end
        end
        // unused positions of this stage's column are constant 0
        if (height(l, c) < MAXH) begin : g_pad
          assign col[c][MAXH-1:height(l, c)] = '0;
        end
      end
    end
  end

  // step 3: final carry-propagate adder on the two remaining rows
  logic [COLS-1:0] row0, row1;
  for (genvar c = 0; c < COLS; c++) begin : g_rows
    assign row0[c] = g_stage[LAYERS].col[c][0];
    assign row1[c] = g_stage[LAYERS].col[c][1];
  end

  logic [COLS:0] cpa_carry;
  logic          ha_garbage;
  assign cpa_carry[0] = 1'b0;
  peres_gate u_cpa0 (
    .a(row0[0]), .b(row1[0]), .c(1'b0),
    .p(ha_garbage), .q(product[0]), .r(cpa_carry[1])
  );
  for (genvar k = 1; k < COLS; k++) begin : g_cpa
    logic garbage_p, garbage_q;
    tsg_gate u_fa (
      .a(row0[k]), .b(row1[k]), .c(1'b0), .d(cpa_carry[k]),
      .p(garbage_p), .q(garbage_q), .r(product[k]), .s(cpa_carry[k+1])
    );
  end
endmodule
