// mac_pkg - shared constants and elaboration-time helpers of the two-product MAC.
//
// The MAC adds two unsigned products, A*B + C*D. Both partial-product arrays are
// merged column by column into one dot matrix (column c holds every bit of weight
// 2^c) and the matrix is compressed by stages of full adders (3 bits -> sum + carry)
// and half adders (2 bits -> sum + carry) until no column holds more than two bits;
// a carry-propagate adder then produces the result.
//
// sched() plans that compression at elaboration time. For every stage s and
// column c it returns the column height before the stage and the number of full
// and half adders the stage places in that column, and it returns the number of
// stages. Three plans exist:
//   * design 1 at N = 4: the hand-drawn reduction of the 4-bit design-1 dot diagram,
//     four compression stages, copied column by column (table in fig4_*()).
//   * design 1 at other N: Dadda-style, which only reduces a column as far as the
//     next Dadda height (2, 3, 4, 6, 9, 13, ...) requires; like the 4-bit diagram it
//     leaves bits alone where it can, which keeps the adder count low.
//   * design 2: Wallace-style, which compresses every group of three bits with a
//     full adder and a leftover pair with a half adder in every stage. It spends
//     more adders, as the second design does.
// The generalisation to other widths and the Wallace/Dadda labels are this design's
// own choice; only the 4-bit design-1 plan is taken cell for cell.
package mac_pkg;

  localparam int unsigned MAX_COLS   = 72;  // supports N up to 32
  localparam int unsigned MAX_STAGES = 16;

  typedef enum int unsigned {
    Q_NFA,     // full adders in (stage, column)
    Q_NHA,     // half adders in (stage, column)
    Q_HEIGHT,  // bits in column before the stage
    Q_STAGES   // number of compression stages
  } sched_query_e;

  // Number of partial-product bits of weight 2^c in the merged A*B + C*D matrix.
  function automatic int init_height(input int n, input int c);
    if (c < 0 || c > 2*n - 2) return 0;
    return 2 * ((c < n) ? (c + 1) : (2*n - 1 - c));
  endfunction

  // Design 1, N = 4: full adders per stage (rows) and column (index = column).
  function automatic int fig4_nfa(input int s, input int c);
    case (s)
      0: case (c) 1: return 1; 2: return 2; 3: return 2; 4: return 2; 5: return 1; default: return 0; endcase
      1: case (c) 1, 2, 3, 4, 5: return 1; default: return 0; endcase
      2: case (c) 3, 4, 5, 6: return 1; default: return 0; endcase
      3: case (c) 4, 5: return 1; default: return 0; endcase
      default: return 0;
    endcase
  endfunction

  // Design 1, N = 4: half adders per stage and column.
  function automatic int fig4_nha(input int s, input int c);
    case (s)
      0: case (c) 0, 3, 6: return 1; default: return 0; endcase
      1: case (c) 3, 4: return 1; default: return 0; endcase
      2: case (c) 2: return 1; default: return 0; endcase
      3: case (c) 3, 6, 7: return 1; default: return 0; endcase
      default: return 0;
    endcase
  endfunction

  // Largest Dadda height (2, 3, 4, 6, 9, 13, ...) below maxh.
  function automatic int dadda_target(input int maxh);
    int d;
    d = 2;
    while ((d * 3) / 2 < maxh) d = (d * 3) / 2;
    return d;
  endfunction

  // Compression plan of the merged matrix; ncols = columns kept (weights 0..ncols-1).
  function automatic int sched(input int n, input int method, input int ncols,
                               input sched_query_e q, input int s, input int c);
    int h   [MAX_COLS];
    int nx  [MAX_COLS];
    int fa  [MAX_COLS];
    int ha  [MAX_COLS];
    int maxh, d, cin, excess;
    if (c < 0 || c >= MAX_COLS) return 0;
    for (int k = 0; k < MAX_COLS; k++) h[k] = (k < ncols) ? init_height(n, k) : 0;
    for (int st = 0; st < MAX_STAGES; st++) begin
      maxh = 0;
      for (int k = 0; k < ncols; k++) if (h[k] > maxh) maxh = h[k];
      if (st == s && q == Q_HEIGHT) return h[c];
      if (maxh <= 2) return (q == Q_STAGES) ? st : 0;
      // adders of this stage
      if (method == 1 && n == 4) begin
        for (int k = 0; k < ncols; k++) begin
          fa[k] = fig4_nfa(st, k);
          ha[k] = fig4_nha(st, k);
        end
      end else if (method == 1) begin
        d   = dadda_target(maxh);
        cin = 0;
        for (int k = 0; k < ncols; k++) begin
          excess = h[k] + cin - d;
          fa[k]  = (excess > 0) ? excess / 2 : 0;
          ha[k]  = (excess > 0) ? excess % 2 : 0;
          cin    = fa[k] + ha[k];
        end
      end else begin
        for (int k = 0; k < ncols; k++) begin
          fa[k] = h[k] / 3;
          ha[k] = (h[k] % 3 == 2) ? 1 : 0;
        end
      end
      if (st == s && q == Q_NFA) return fa[c];
      if (st == s && q == Q_NHA) return ha[c];
      // heights after the stage: leftovers + sums here + carries from the column below
      for (int k = 0; k < ncols; k++)
        nx[k] = h[k] - 2*fa[k] - ha[k] + ((k > 0) ? fa[k-1] + ha[k-1] : 0);
      for (int k = 0; k < ncols; k++) h[k] = nx[k];
    end
    return 0;
  endfunction

endpackage
