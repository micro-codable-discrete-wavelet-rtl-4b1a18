// dwt_ref_pkg -- reference model of the integer polynomial lifting transform
// used by the testbenches.
//
// It performs the same arithmetic as the hardware, but as the plain
// sequential algorithm: on each line first every gamma is predicted from the
// original lambdas, then every gamma updates its lambdas (forward), or the
// reverse with opposite signs (inverse).  Coefficients carry SCALE = 14
// fractional bits; products are summed at full precision, scaled back by
// adding 2^13 and shifting right arithmetically (round to nearest) and the
// result wraps to 16 bits.
// The predict filter rows are computed here from their definition, the
// weights of polynomial interpolation through N equally spaced lambdas:
// row r predicts the gamma that has r lambdas on its left, i.e. the value
// at x = 2r-1 of the polynomial through the lambdas at x = 0, 2, .., 2N-2,
//     F[r][j] = prod_{m != j} (x - 2m) / (2j - 2m).
// The lifting (update) coefficients are computed from moments, the way the
// update step is defined: every sample k starts with moments k^i
// (i < NT).  At each level the coarse lambdas first take over the moments
// of the gammas predicted from them, m'(lambda_j) = m(lambda_j) +
// sum_g F[g][j] m(gamma_g); then for every gamma g the NT coefficients
// L[g][j] of its update window solve sum_j L[g][j] m'_i(lambda_(s+j)) =
// m_i(gamma_g) for i < NT, which gives the wavelet NT vanishing moments.
// For a 16-sample line this reproduces the published lifting tables for
// NT = 2 and NT = 4.  make_lifting() fills the table (rounded to 14
// fraction bits and saturated to the 18-bit coefficient range) and a
// real-valued copy, which rtransform() uses for an unrounded reference
// transform with exact coefficients.
package dwt_ref_pkg;

  localparam int SCALE = 14;

  function automatic int wrap16(longint v);
    return int'(signed'(v[15:0]));
  endfunction

  function automatic real pred_weight(int n, int r, int j);
    real w, x;
    x = 2.0 * r - 1.0;
    w = 1.0;
    for (int m = 0; m < n; m++)
      if (m != j) w = w * (x - 2.0 * m) / (2.0 * j - 2.0 * m);
    return w;
  endfunction

  function automatic int to_fixed(real w);
    int v = int'($rtoi(w * (1 << SCALE) + ((w >= 0.0) ? 0.5 : -0.5)));
    if (v > 131071) v = 131071;
    if (v < -131072) v = -131072;
    return v;
  endfunction

  function automatic int pred_coef(int n, int r, int j);
    return to_fixed(pred_weight(n, r, j));
  endfunction

  // solves a x = b (n x n) by Gaussian elimination with partial pivoting
  function automatic void lin_solve(int n, real a[][], real b[], ref real x[]);
    real t;
    int p;
    for (int c = 0; c < n; c++) begin
      p = c;
      for (int r = c + 1; r < n; r++) if ((a[r][c] < 0 ? -a[r][c] : a[r][c]) > (a[p][c] < 0 ? -a[p][c] : a[p][c])) p = r;
      for (int k = 0; k < n; k++) begin t = a[c][k]; a[c][k] = a[p][k]; a[p][k] = t; end
      t = b[c]; b[c] = b[p]; b[p] = t;
      for (int r = c + 1; r < n; r++) begin
        t = a[r][c] / a[c][c];
        for (int k = c; k < n; k++) a[r][k] -= t * a[c][k];
        b[r] -= t * b[c];
      end
    end
    x = new[n];
    for (int r = n - 1; r >= 0; r--) begin
      t = b[r];
      for (int k = r + 1; k < n; k++) t -= a[r][k] * x[k];
      x[r] = t / a[r][r];
    end
  endfunction

  function automatic int ceil_div(int a, int b);
    return (a + b - 1) / b;
  endfunction

  function automatic int levels(int len, int nmax);
    int n = 0;
    while (((1 << (n + 1)) * (nmax - 1)) <= (len - 1)) n++;
    return n;
  endfunction

  class dwt_model;
    int w, h, n, nt;
    int pic[];
    int lift[][];           // [address][bank]
    real rlift[][];         // exact values of the same table
    real rpic[];            // unrounded reference picture
    int nx, ny;

    function new(int w_, int h_, int n_, int nt_);
      int nmax;
      w = w_; h = h_; n = n_; nt = nt_;
      pic = new[w * h];
      nmax = (n > nt) ? n : nt;
      nx = levels(w, nmax);
      ny = levels(h, nmax);
      lift = new[lift_depth()];
      foreach (lift[a]) lift[a] = new[nt];
      rlift = new[lift_depth()];
      foreach (rlift[a]) rlift[a] = new[nt];
      rpic = new[w * h];
    endfunction

    function int gammas(int len, int lv);
      int t = 0;
      for (int l = 0; l < lv; l++) t += ceil_div(len, 1 << l) / 2;
      return t;
    endfunction

    function int lift_depth();
      return gammas(w, nx) + gammas(h, ny);
    endfunction

    function int lift_base(bit cols, int lv);
      return cols ? gammas(w, nx) + gammas(h, lv) : gammas(w, lv);
    endfunction

    // window start s and (for predict) filter row r of gamma g
    function void place(int g, int ng, int len, int taps, output int s, output int r);
      int nleft = taps / 2 - 1;
      int nmid  = ng - taps + 1 + (len % 2);
      if (g < nleft) begin
        s = 0; r = g + 1;
      end else if (g < nleft + nmid) begin
        s = g - nleft; r = taps / 2;
      end else begin
        s = nmid - 1; r = taps / 2 + 1 + (g - nleft - nmid);
      end
    endfunction

    function void predict_line(int base, int stride, int len, bit fw);
      int ng = len / 2;
      for (int g = 0; g < ng; g++) begin
        int s, r, ga;
        longint acc = 0;
        place(g, ng, len, n, s, r);
        for (int j = 0; j < n; j++)
          acc += longint'(pic[base + 2 * (s + j) * stride]) * pred_coef(n, r, j);
        ga = base + (2 * g + 1) * stride;
        acc = (acc + (1 << (SCALE - 1))) >>> SCALE;
        pic[ga] = fw ? wrap16(pic[ga] - acc) : wrap16(pic[ga] + acc);
      end
    endfunction

    function void update_line(int base, int stride, int len, int lb, bit fw);
      int ng = len / 2;
      for (int g = 0; g < ng; g++) begin
        int s, r, la;
        int gv = pic[base + (2 * g + 1) * stride];
        place(g, ng, len, nt, s, r);
        for (int j = 0; j < nt; j++) begin
          longint u = (longint'(gv) * lift[lb + g][j] + (1 << (SCALE - 1))) >>> SCALE;
          la = base + 2 * (s + j) * stride;
          pic[la] = fw ? wrap16(pic[la] + u) : wrap16(pic[la] - u);
        end
      end
    endfunction

    function void line(bit cols, int idx, int lv, bit fw);
      int step = 1 << lv;
      int base, stride, len;
      if (cols) begin base = idx; stride = w * step; len = ceil_div(h, step); end
      else      begin base = idx * w; stride = step; len = ceil_div(w, step); end
      if (fw) begin
        predict_line(base, stride, len, 1);
        update_line(base, stride, len, lift_base(cols, lv), 1);
      end else begin
        update_line(base, stride, len, lift_base(cols, lv), 0);
        predict_line(base, stride, len, 0);
      end
    endfunction

    function void pass(bit cols, int lv, bit fw);
      int step = 1 << lv;
      for (int i = 0; i < (cols ? w : h); i += step) line(cols, i, lv, fw);
    endfunction

    // lifting coefficients of all levels of one direction, from moments
    function void make_lifting_dir(bit cols);
      int len = cols ? h : w;
      int nl  = cols ? ny : nx;
      real m[][];
      int idx[$], nidx[$];
      m = new[len];
      foreach (m[k]) begin
        m[k] = new[nt];
        for (int i = 0; i < nt; i++) m[k][i] = real'(k) ** i;
      end
      for (int k = 0; k < len; k++) idx.push_back(k);
      for (int lv = 0; lv < nl; lv++) begin
        int c = idx.size(), ng = idx.size() / 2, nlam = idx.size() - idx.size() / 2;
        real mp[][];
        mp = new[nlam];
        foreach (mp[j]) mp[j] = new[nt](m[idx[2 * j]]);
        for (int g = 0; g < ng; g++) begin
          int s, r;
          place(g, ng, c, n, s, r);
          for (int j = 0; j < n; j++)
            for (int i = 0; i < nt; i++) mp[s + j][i] += pred_weight(n, r, j) * m[idx[2 * g + 1]][i];
        end
        for (int g = 0; g < ng; g++) begin
          int s, r;
          real a[][], b[], x[];
          place(g, ng, c, nt, s, r);
          a = new[nt];
          b = new[nt];
          for (int i = 0; i < nt; i++) begin
            a[i] = new[nt];
            for (int j = 0; j < nt; j++) a[i][j] = mp[s + j][i];
            b[i] = m[idx[2 * g + 1]][i];
          end
          lin_solve(nt, a, b, x);
          for (int j = 0; j < nt; j++) begin
            rlift[lift_base(cols, lv) + g][j] = x[j];
            lift[lift_base(cols, lv) + g][j] = to_fixed(x[j]);
          end
        end
        nidx.delete();
        for (int j = 0; j < nlam; j++) begin
          m[idx[2 * j]] = mp[j];
          nidx.push_back(idx[2 * j]);
        end
        idx = nidx;
      end
    endfunction

    function void make_lifting();
      make_lifting_dir(0);
      make_lifting_dir(1);
    endfunction

    // unrounded forward transform of rpic with the exact coefficients
    function void rline(bit cols, int idx, int lv);
      int step = 1 << lv;
      int base, stride, len, ng, lb;
      if (cols) begin base = idx; stride = w * step; len = ceil_div(h, step); end
      else      begin base = idx * w; stride = step; len = ceil_div(w, step); end
      ng = len / 2;
      lb = lift_base(cols, lv);
      for (int g = 0; g < ng; g++) begin
        int s, r;
        real acc = 0.0;
        place(g, ng, len, n, s, r);
        for (int j = 0; j < n; j++) acc += rpic[base + 2 * (s + j) * stride] * pred_weight(n, r, j);
        rpic[base + (2 * g + 1) * stride] -= acc;
      end
      for (int g = 0; g < ng; g++) begin
        int s, r;
        real gv = rpic[base + (2 * g + 1) * stride];
        place(g, ng, len, nt, s, r);
        for (int j = 0; j < nt; j++) rpic[base + 2 * (s + j) * stride] += gv * rlift[lb + g][j];
      end
    endfunction

    function void rtransform();
      int nl = (nx > ny) ? nx : ny;
      for (int lv = 0; lv < nl; lv++) begin
        if (lv < nx) for (int y = 0; y < h; y += (1 << lv)) rline(0, y, lv);
        if (lv < ny) for (int x = 0; x < w; x += (1 << lv)) rline(1, x, lv);
      end
    endfunction

    function void transform(bit fw);
      int nl = (nx > ny) ? nx : ny;
      if (fw) begin
        for (int lv = 0; lv < nl; lv++) begin
          if (lv < nx) pass(0, lv, 1);
          if (lv < ny) pass(1, lv, 1);
        end
      end else begin
        for (int lv = nl - 1; lv >= 0; lv--) begin
          if (lv < ny) pass(1, lv, 0);
          if (lv < nx) pass(0, lv, 0);
        end
      end
    endfunction
  endclass

endpackage
