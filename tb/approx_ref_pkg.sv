// Reference model of the approximate multiplier, for testbenches.
//
// The approximation lives only in the OR-tree and two-stage columns, and
// those columns only receive carries from columns below them. So the model
// replays the reduction stages bit by bit for the approximate columns,
// tracks only the heights of the exact columns (they decide how many 5:2
// stages run), and adds up what each approximate compressor loses:
//   loss = (number of ones in) - (sum + 2 * carry), weighted by 2^column.
// The result is a*b minus the total loss. The compressors are modelled
// arithmetically from their equations, independently of the gate netlists.
package approx_ref_pkg;

  function automatic int pp_height(int c, int n);
    if (c < n)              return c + 1;
    else if (c < 2 * n - 1) return 2 * n - 1 - c;
    else                    return 0;
  endfunction

  function automatic longint unsigned approx_ref(longint unsigned a, longint unsigned b,
                                                 int n, int low_cols, int mid_cols);
    bit             q  [64][$];
    bit             nq [64][$];
    bit             sums [64][$];
    bit             cars [64][$];
    int             hx [64];
    int             nh [64];
    int             g  [64];
    int             w, lim, maxh, j, cnt, s1, c1, t, sm, cy;
    bit             x [5];
    longint unsigned loss;

    w    = 2 * n;
    lim  = low_cols + mid_cols;
    loss = 0;
    for (int c = 0; c < w; c++) begin
      q[c].delete();
      hx[c] = pp_height(c, n);
      for (int i = 0; i < hx[c]; i++) begin
        j = (c < n) ? i : (c - n + 1 + i);
        if (c < lim) q[c].push_back(a[c-j] & b[j]);
      end
    end

    forever begin
      maxh = 0;
      for (int c = 0; c < w; c++) if (hx[c] > maxh) maxh = hx[c];
      if (maxh <= 4) break;
      for (int c = 0; c < w; c++) begin
        if (c >= lim) begin
          g[c] = (hx[c] + 4) / 5;
          if (c > 0 && c - 1 >= lim && g[c-1] > g[c]) g[c] = g[c-1];
        end else begin
          g[c] = hx[c] / 5;
        end
      end
      for (int c = 0; c < lim; c++) begin
        sums[c].delete();
        cars[c].delete();
        for (int k = 0; k < g[c]; k++) begin
          cnt = 0;
          for (int m = 0; m < 5; m++) begin
            x[m] = q[c][5*k+m];
            cnt += int'(x[m]);
          end
          if (c < low_cols) begin
            sm = ((x[0] ^ x[1]) | (x[2] ^ x[3]) | x[4]) ? 1 : 0;
            cy = ((x[0] & x[1]) | (x[2] & x[3])) ? 1 : 0;
          end else begin
            t  = int'(x[0]) + int'(x[1]) + int'(x[2]);
            s1 = t % 2;
            c1 = t / 2;
            t  = s1 + int'(x[3]) + int'(x[4]);
            sm = t % 2;
            cy = ((c1 + t / 2) > 0) ? 1 : 0;
          end
          loss += longint'(cnt - sm - 2 * cy) << c;
          sums[c].push_back(bit'(sm));
          cars[c].push_back(bit'(cy));
        end
      end
      for (int c = 0; c < w; c++) begin
        nh[c] = (c >= lim) ? g[c] : hx[c] - 4 * g[c];
        if (c > 0) nh[c] += g[c-1];
        if (c < lim) begin
          nq[c] = sums[c];
          for (int i = 5 * g[c]; i < hx[c]; i++) nq[c].push_back(q[c][i]);
          if (c > 0) foreach (cars[c-1][i]) nq[c].push_back(cars[c-1][i]);
        end
      end
      for (int c = 0; c < w; c++) begin
        hx[c] = nh[c];
        if (c < lim) q[c] = nq[c];
      end
    end
    return (a * b - loss) & ((64'd1 << w) - 1);
  endfunction

endpackage
