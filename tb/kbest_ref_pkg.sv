// kbest_ref_pkg: bit-true reference model of the K-Best detector for the
// testbenches, written directly from the algorithm with 64-bit integers.
//
// Fixed point as in the RTL: z_bar, r_bar, e and centres L carry FRAC
// fractional bits; symbols are odd integers. A layer is modelled as a full
// candidate enumeration (every point of every admitted row of every parent)
// followed by an exact sort, so it checks the RTL's on-demand selection
// against the set it must be equivalent to.
package kbest_ref_pkg;

  localparam int MAXNT = 8;

  typedef struct {
    int     re [MAXNT];
    int     im [MAXNT];
    longint ped;
  } node_t;

  // nearest odd integer to x / 2^frac inside the constellation; an exact
  // midpoint goes to the larger coordinate
  function automatic int slice(longint x, int frac, int sqrtm);
    int     best = -(sqrtm - 1);
    longint bd   = -1;
    for (int c = -(sqrtm - 1); c <= sqrtm - 1; c += 2) begin
      longint d = x - (longint'(c) << frac);
      if (d < 0) d = -d;
      if (bd < 0 || d <= bd) begin
        bd   = d;
        best = c;
      end
    end
    return best;
  endfunction

  function automatic longint ped(longint pin, longint e, longint lre, longint lim,
                                 int sre, int sim, int frac, int pw);
    longint dr = lre - (longint'(sre) << frac);
    longint di = lim - (longint'(sim) << frac);
    longint d2 = (dr * dr + di * di) >>> frac;
    longint inc = (e * d2) >>> frac;
    longint mx = (longint'(1) << pw) - 1;
    longint s  = pin + inc;
    return (s > mx) ? mx : s;
  endfunction

  // L = z - sum_{j>lvl} r[j] * s[j]
  function automatic void centre(longint z_re, longint z_im, input longint r_re[MAXNT],
                                 input longint r_im[MAXNT], input node_t p, input int lvl, int nt,
                                 output longint l_re, output longint l_im);
    l_re = z_re;
    l_im = z_im;
    for (int j = lvl + 1; j < nt; j++) begin
      l_re -= r_re[j] * p.re[j] - r_im[j] * p.im[j];
      l_im -= r_re[j] * p.im[j] + r_im[j] * p.re[j];
    end
  endfunction

  // the nrows constellation rows nearest to the centre, starting from the
  // sliced row and growing the visited run one row at a time
  function automatic void near_rows(longint lim, int nrows, int sqrtm, int frac,
                                    ref int q[$]);
    int lo, hi;
    q.delete();
    lo = slice(lim, frac, sqrtm);
    hi = lo;
    q.push_back(lo);
    for (int k = 1; k < nrows; k++) begin
      bit     lo_ok = (lo - 2) >= -(sqrtm - 1);
      bit     hi_ok = (hi + 2) <= (sqrtm - 1);
      longint dl = lim - (longint'(lo - 2) << frac);
      longint dh = (longint'(hi + 2) << frac) - lim;
      if (dl < 0) dl = -dl;
      if (dh < 0) dh = -dh;
      if (!lo_ok && !hi_ok) break;
      if (lo_ok && (!hi_ok || dl <= dh)) begin
        lo -= 2;
        q.push_back(lo);
      end else begin
        hi += 2;
        q.push_back(hi);
      end
    end
  endfunction

  // insertion sort by PED (stable)
  function automatic void sort_nodes(ref node_t q[$]);
    for (int i = 1; i < q.size(); i++) begin
      node_t t = q[i];
      int    j = i - 1;
      while (j >= 0 && q[j].ped > t.ped) begin
        q[j+1] = q[j];
        j--;
      end
      q[j+1] = t;
    end
  endfunction

  // all candidates of one layer: for every parent, every point of its
  // nrows nearest rows (nrows = sqrtm admits every point); sorted by PED
  function automatic void layer_cands(const ref node_t parents[$], input int lvl, int nt,
                                      longint z_re, longint z_im,
                                      input longint r_re[MAXNT], input longint r_im[MAXNT],
                                      longint e, int nrows, int sqrtm, int frac, int pw,
                                      ref node_t cands[$]);
    int rows_q[$];
    cands.delete();
    foreach (parents[p]) begin
      longint lre, lim;
      centre(z_re, z_im, r_re, r_im, parents[p], lvl, nt, lre, lim);
      near_rows(lim, nrows, sqrtm, frac, rows_q);
      foreach (rows_q[k]) begin
        for (int c = -(sqrtm - 1); c <= sqrtm - 1; c += 2) begin
          node_t n = parents[p];
          n.re[lvl] = c;
          n.im[lvl] = rows_q[k];
          n.ped = ped(parents[p].ped, e, lre, lim, c, rows_q[k], frac, pw);
          cands.push_back(n);
        end
      end
    end
    sort_nodes(cands);
  endfunction

  // first child of each parent at level 0, sorted by PED
  function automatic void last_cands(const ref node_t parents[$], input int nt,
                                     longint z_re, longint z_im,
                                     input longint r_re[MAXNT], input longint r_im[MAXNT],
                                     longint e, int sqrtm, int frac, int pw,
                                     ref node_t cands[$]);
    cands.delete();
    foreach (parents[p]) begin
      longint lre, lim;
      node_t  n = parents[p];
      centre(z_re, z_im, r_re, r_im, parents[p], 0, nt, lre, lim);
      n.re[0] = slice(lre, frac, sqrtm);
      n.im[0] = slice(lim, frac, sqrtm);
      n.ped = ped(parents[p].ped, e, lre, lim, n.re[0], n.im[0], frac, pw);
      cands.push_back(n);
    end
    sort_nodes(cands);
  endfunction

  // does q hold a node with this path (levels lvl..nt-1) and this PED?
  function automatic bit has_node(const ref node_t q[$], input node_t n, input int lvl, int nt);
    foreach (q[i]) begin
      bit same = (q[i].ped == n.ped);
      for (int j = lvl; j < nt; j++)
        if (q[i].re[j] != n.re[j] || q[i].im[j] != n.im[j]) same = 0;
      if (same) return 1;
    end
    return 0;
  endfunction

  // one received vector: z_bar = R_bar s + noise with a unit-diagonal
  // R_bar (off-diagonal entries uniform in +-0.5), per-level weights
  // e = r_ii^2 uniform in [0.25, 4] and noise uniform in +-noise/2^frac
  typedef struct {
    longint z_re [MAXNT];
    longint z_im [MAXNT];
    longint r_re [MAXNT][MAXNT];
    longint r_im [MAXNT][MAXNT];
    longint e    [MAXNT];
    int     s_re [MAXNT];
    int     s_im [MAXNT];
  } chan_t;

  function automatic int rand_sym(int sqrtm);
    return 2 * int'($urandom_range(0, sqrtm - 1)) - (sqrtm - 1);
  endfunction

  function automatic longint rand_pm(longint a);
    return longint'($urandom_range(0, 32'(2 * a))) - a;
  endfunction

  function automatic chan_t gen_vector(int nt, int sqrtm, int frac, longint noise);
    chan_t c;
    for (int i = 0; i < MAXNT; i++) begin
      c.z_re[i] = 0; c.z_im[i] = 0; c.e[i] = 0; c.s_re[i] = 0; c.s_im[i] = 0;
      for (int j = 0; j < MAXNT; j++) begin
        c.r_re[i][j] = 0;
        c.r_im[i][j] = 0;
      end
    end
    for (int i = 0; i < nt; i++) begin
      c.s_re[i] = rand_sym(sqrtm);
      c.s_im[i] = rand_sym(sqrtm);
      c.e[i]    = longint'($urandom_range(32'(1 << (frac - 2)), 32'(4 << frac)));
      c.r_re[i][i] = longint'(1) << frac;
      for (int j = i + 1; j < nt; j++) begin
        c.r_re[i][j] = rand_pm(longint'(1) << (frac - 1));
        c.r_im[i][j] = rand_pm(longint'(1) << (frac - 1));
      end
    end
    for (int i = 0; i < nt; i++) begin
      c.z_re[i] = rand_pm(noise);
      c.z_im[i] = rand_pm(noise);
      for (int j = i; j < nt; j++) begin
        c.z_re[i] += c.r_re[i][j] * c.s_re[j] - c.r_im[i][j] * c.s_im[j];
        c.z_im[i] += c.r_re[i][j] * c.s_im[j] + c.r_im[i][j] * c.s_re[j];
      end
    end
    return c;
  endfunction

  // the whole detector: root layer over all points, inner layers over
  // nrows rows per parent, last layer first children only
  function automatic void detect(const ref chan_t c, input int nt, int sqrtm, int k, int nrows,
                                 int frac, int pw, output node_t best);
    node_t par[$], cands[$];
    node_t root;
    for (int j = 0; j < MAXNT; j++) begin
      root.re[j] = 0;
      root.im[j] = 0;
    end
    root.ped = 0;
    par.push_back(root);
    for (int lvl = nt - 1; lvl >= 1; lvl--) begin
      layer_cands(par, lvl, nt, c.z_re[lvl], c.z_im[lvl], c.r_re[lvl], c.r_im[lvl], c.e[lvl],
                  (lvl == nt - 1) ? sqrtm : nrows, sqrtm, frac, pw, cands);
      par.delete();
      for (int i = 0; i < k && i < cands.size(); i++) par.push_back(cands[i]);
    end
    last_cands(par, nt, c.z_re[0], c.z_im[0], c.r_re[0], c.r_im[0], c.e[0], sqrtm, frac, pw, cands);
    best = cands[0];
  endfunction

endpackage
