// N x N unsigned approximate multiplier with significance-driven 5:2
// compression (N = 16 by default, 32-bit product).
//
// Four steps, all combinational:
//   1. Partial products: an AND gate per bit pair, a[i] & b[j] in column i+j.
//   2. 5:2 compression stages. In each stage every column is cut into
//      groups of five bits. Each group goes to one 5:2 compressor whose kind
//      depends on the column's significance:
//        columns 0 .. LOW_COLS-1                 OR-tree approximate (compressor_5_2_or)
//        next MID_COLS columns                   two-stage approximate (compressor_5_2_approx)
//        remaining high columns                  exact, chained (compressor_5_2)
//      Stages repeat until no column holds more than four bits; for N = 16
//      that takes two stages (16 -> 7 -> 4 bits in the tallest column).
//   3. One row of exact 4:2 compressors takes every column to two bits.
//   4. A ripple-carry adder of XOR-MUX full adders adds the two rows.
// The three-region split, the exact/two-stage/OR-tree compressor choice per
// region, the 5:2 reduction down to two bits per column and the final
// carry-propagate adder follow the design. The region borders (8 OR-tree
// columns, 8 two-stage columns), the number of 5:2 stages, the 4:2 row and
// how bits are assigned to groups are this implementation's own choices.
//
// Grouping rules. In an approximate column, bits that do not fill a group of
// five pass to the next stage unchanged. In an exact column the last group
// is padded with zeros, and a column has at least as many groups as the
// exact column below it, so every carry-out pair of the column below has a
// compressor to enter. Next-stage column c then holds, in this order: the
// sums of column c's groups, column c's pass-through bits, and the carries
// of column c-1's groups. Every approximate compressor gives a result no
// larger than its true count, so the approximate product never exceeds a*b;
// bits carried past column 2N-1 are therefore zero in value and are dropped.
//
// Setting LOW_COLS = MID_COLS = 0 gives an exact multiplier.
module approx_multiplier
  import approx_pkg::*;
#(
  parameter int unsigned N        = 16,
  parameter int unsigned LOW_COLS = 8,
  parameter int unsigned MID_COLS = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int W     = 2 * N;          // product columns
  localparam int MAXG  = (N + 4) / 5;    // most groups in one column
  localparam int BH    = 5 * MAXG;       // bits stored per column (>= N)
  localparam int NSMAX = 8;              // bound on the number of 5:2 stages

  // Table of one small number per stage and column, packed so that it can
  // be a localparam computed by a constant function.
  typedef logic [NSMAX:0][W-1:0][7:0] tab_t;

  function automatic cmp_mode_e mode_of(int c);
    return col_mode(c, int'(LOW_COLS), int'(MID_COLS));
  endfunction

  // Number of partial-product bits in column c.
  function automatic int pp_height(int c);
    if (c < N)          return c + 1;
    else if (c < W - 1) return W - 1 - c;
    else                return 0;
  endfunction

  // Heights (sel = 0) or group counts (sel = 1) of every stage.
  function automatic tab_t calc_tab(bit sel);
    tab_t h, g;
    int   gc, maxh;
    h = '0;
    g = '0;
    for (int c = 0; c < W; c++) h[0][c] = 8'(pp_height(c));
    for (int s = 0; s < NSMAX; s++) begin
      maxh = 0;
      for (int c = 0; c < W; c++) if (int'(h[s][c]) > maxh) maxh = int'(h[s][c]);
      if (maxh > 4) begin
        for (int c = 0; c < W; c++) begin
          if (mode_of(c) == CMP_EXACT) begin
            gc = (int'(h[s][c]) + 4) / 5;
            if (c > 0 && mode_of(c - 1) == CMP_EXACT && int'(g[s][c-1]) > gc)
              gc = int'(g[s][c-1]);
          end else begin
            gc = int'(h[s][c]) / 5;
          end
          g[s][c] = 8'(gc);
        end
        for (int c = 0; c < W; c++) begin
          gc = int'(g[s][c]);
          if (mode_of(c) == CMP_EXACT) h[s+1][c] = 8'(gc);
          else                         h[s+1][c] = 8'(int'(h[s][c]) - 4 * gc);
          if (c > 0) h[s+1][c] = h[s+1][c] + g[s][c-1];
        end
      end else begin
        h[s+1] = h[s];
      end
    end
    return sel ? g : h;
  endfunction

  // Number of 5:2 stages: the first stage whose tallest column is <= 4.
  function automatic int calc_stages();
    tab_t h;
    int   maxh;
    h = calc_tab(1'b0);
    for (int s = 0; s <= NSMAX; s++) begin
      maxh = 0;
      for (int c = 0; c < W; c++) if (int'(h[s][c]) > maxh) maxh = int'(h[s][c]);
      if (maxh <= 4) return s;
    end
    return NSMAX + 1;
  endfunction

  localparam tab_t HT  = calc_tab(1'b0);
  localparam tab_t GT  = calc_tab(1'b1);
  localparam int   NS5 = calc_stages();

  if (NS5 > NSMAX) begin : g_too_deep
    $error("approx_multiplier: reduction needs more than NSMAX stages");
  end

  // ---------------------------------------------------------------------
  // Stage blocks. st[s].bits holds the bits of stage s, column-major; bits at
  // and above the column's height are zero. For s < NS5, st[s] also holds
  // the 5:2 compressors that produce stage s+1.
  // ---------------------------------------------------------------------
  for (genvar s = 0; s <= NS5; s++) begin : st
    logic [W-1:0][BH-1:0] bits;

    for (genvar c = 0; c < W; c++) begin : col
      localparam int H = int'(HT[s][c]);

      // ---- the bits of this stage and column ----
      for (genvar i = 0; i < BH; i++) begin : bit_src
        if (i >= H) begin : g_zero
          assign bits[c][i] = 1'b0;
        end else if (s == 0) begin : g_pp
          // i-th partial product of column c: a[c-j] & b[j]
          localparam int J = (c < N) ? i : (c - N + 1 + i);
          assign bits[c][i] = a[c-J] & b[J];
        end else begin : g_next
          localparam int GS = int'(GT[s-1][c]);
          localparam int HP = int'(HT[s-1][c]);
          localparam int LP = (mode_of(c) == CMP_EXACT) ? 0 : HP - 5 * GS;
          if (i < GS) begin : g_sum
            assign bits[c][i] = st[s-1].col[c].g_cmp.sm[i];
          end else if (i < GS + LP) begin : g_pass
            assign bits[c][i] = st[s-1].bits[c][5*GS + (i - GS)];
          end else begin : g_carry
            assign bits[c][i] = st[s-1].col[c-1].g_cmp.cy[i - GS - LP];
          end
        end
      end

      // ---- 5:2 compressors producing stage s+1 ----
      if (s < NS5) begin : g_cmp
        logic [MAXG-1:0] sm, cy, co1, co2;

        for (genvar g = 0; g < MAXG; g++) begin : grp
          if (g < int'(GT[s][c])) begin : g_used
            logic [4:0] x;
            assign x = bits[c][5*g +: 5];
            if (mode_of(c) == CMP_EXACT) begin : g_exact
              logic ci1, ci2;
              if (c > 0 && mode_of(c - 1) == CMP_EXACT && g < int'(GT[s][c-1])) begin : g_chain
                assign ci1 = col[c-1].g_cmp.co1[g];
                assign ci2 = col[c-1].g_cmp.co2[g];
              end else begin : g_nochain
                assign ci1 = 1'b0;
                assign ci2 = 1'b0;
              end
              compressor_5_2 u_c (
                .x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .x5(x[4]),
                .cin1(ci1), .cin2(ci2),
                .sum(sm[g]), .carry(cy[g]), .cout1(co1[g]), .cout2(co2[g])
              );
            end else if (mode_of(c) == CMP_APPROX) begin : g_approx
              compressor_5_2_approx u_c (
                .x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .x5(x[4]),
                .sum(sm[g]), .carry(cy[g])
              );
              assign co1[g] = 1'b0;
              assign co2[g] = 1'b0;
            end else begin : g_or
              compressor_5_2_or u_c (
                .x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .x5(x[4]),
                .sum(sm[g]), .carry(cy[g])
              );
              assign co1[g] = 1'b0;
              assign co2[g] = 1'b0;
            end
          end else begin : g_unused
            assign sm[g]  = 1'b0;
            assign cy[g]  = 1'b0;
            assign co1[g] = 1'b0;
            assign co2[g] = 1'b0;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------------
  // Final row of exact 4:2 compressors: every column to one sum bit and one
  // carry bit into the column above.
  // ---------------------------------------------------------------------
  logic [W-1:0] row_s, row_c;

  for (genvar c = 0; c < W; c++) begin : fin
    logic ci, co, cy;
    if (c == 0) begin : g_first
      assign ci = 1'b0;
    end else begin : g_next
      assign ci = fin[c-1].co;
    end
    compressor_4_2 u_c (
      .x1(st[NS5].bits[c][0]), .x2(st[NS5].bits[c][1]),
      .x3(st[NS5].bits[c][2]), .x4(st[NS5].bits[c][3]),
      .cin(ci), .sum(row_s[c]), .carry(cy), .cout(co)
    );
    if (c == 0) begin : g_c0
      assign row_c[0] = 1'b0;
    end else begin : g_cn
      assign row_c[c] = fin[c-1].cy;
    end
  end

  // Final carry-propagate adder; its carry-out is zero in value (see above).
  logic unused_cout;

  rca_adder #(.W(W)) u_cpa (
    .a(row_s), .b(row_c), .cin(1'b0), .s(p), .cout(unused_cout)
  );

endmodule
