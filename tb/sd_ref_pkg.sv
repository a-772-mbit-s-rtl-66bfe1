// Reference model for the testbenches: exhaustive max-log detection of one symbol vector with
// the same number formats as the decoder (integer interference cancellation, M_C = |e|^2 >> SH
// saturated to WM bits, partial metrics saturated after each level), followed by LLR clipping
// and extrinsic-LLR computation. It enumerates every leaf, so it is independent of the tree
// search, enumeration and pruning of the hardware. Sizes: up to 4 antennas and 6 bits/symbol.
package sd_ref_pkg;
  localparam int MT = 4;
  localparam int QM = 6;

  typedef struct {
    int y_re[MT], y_im[MT];
    int r_re[MT][MT], r_im[MT][MT];
    int la[MT][QM];
    int mt, q, clip;
  } vec_t;

  typedef struct {
    int le[MT][QM];
    int xmap[MT];
    longint lam_map;
    int ties;
  } res_t;

  function automatic int gray1(int n); return n ^ (n >> 1); endfunction

  function automatic longint mc_ref(longint b_re, longint b_im, longint rii, int re, int im,
                                    int p, int sh, int wm);
    longint e_re, e_im, m, mx;
    mx = (longint'(1) << wm) - 1;
    e_re = b_re - rii * (2 * re - (p - 1));
    e_im = b_im - rii * (2 * im - (p - 1));
    m = (e_re * e_re + e_im * e_im) >>> sh;
    return (m > mx) ? mx : m;
  endfunction

  // Symbol value index s = im*(2^(QM/2)) + re is not used here: symbols are (re, im) pairs.
  function automatic res_t detect(vec_t v, int sh, int wm, int wl);
    res_t r;
    int qh, p, ns, total, re[MT], im[MT], bits[MT];
    longint mx, lam_bar[MT][QM], lam_map, m, b_re, b_im, ma, lim, le_l, e, d;
    int nmin;
    int xm[MT];
    qh = v.q / 2; p = 1 << qh; ns = p * p;
    mx = (longint'(1) << wm) - 1;
    total = 1;
    for (int j = 0; j < v.mt; j++) total *= ns;
    lam_map = mx + 1; nmin = 0;
    for (int j = 0; j < MT; j++) begin
      xm[j] = 0;
      for (int b = 0; b < QM; b++) lam_bar[j][b] = mx;
    end
    // first pass: map solution
    for (int pass = 0; pass < 2; pass++) begin
      for (int n = 0; n < total; n++) begin
        int t;
        t = n;
        for (int j = 0; j < v.mt; j++) begin
          re[j] = (t % ns) % p; im[j] = (t % ns) / p; t = t / ns;
          bits[j] = gray1(re[j]) | (gray1(im[j]) << qh);
        end
        m = 0;
        for (int j = v.mt - 1; j >= 0; j--) begin
          b_re = v.y_re[j]; b_im = v.y_im[j];
          for (int i = j + 1; i < v.mt; i++) begin
            longint sr, si;
            sr = 2 * re[i] - (p - 1); si = 2 * im[i] - (p - 1);
            b_re = b_re - v.r_re[j][i] * sr + v.r_im[j][i] * si;
            b_im = b_im - v.r_re[j][i] * si - v.r_im[j][i] * sr;
          end
          ma = 0;
          for (int b = 0; b < v.q; b++)
            if ((((bits[j] >> b) & 1) == 1) != (v.la[j][b] > 0))
              ma += (v.la[j][b] < 0) ? -v.la[j][b] : v.la[j][b];
          m = m + mc_ref(b_re, b_im, v.r_re[j][j], re[j], im[j], p, sh, wm) + ma;
          if (m > mx) m = mx;
        end
        if (pass == 0) begin
          if (m < lam_map) begin
            lam_map = m; nmin = 1;
            for (int j = 0; j < MT; j++) xm[j] = (j < v.mt) ? bits[j] : 0;
          end else if (m == lam_map) nmin++;
        end else begin
          for (int j = 0; j < v.mt; j++)
            for (int b = 0; b < v.q; b++)
              if (((bits[j] ^ xm[j]) >> b) & 1)
                if (m < lam_bar[j][b]) lam_bar[j][b] = m;
        end
      end
    end
    lim = lam_map + v.clip;
    for (int j = 0; j < MT; j++) begin
      r.xmap[j] = xm[j];
      for (int b = 0; b < QM; b++) begin
        if (j >= v.mt || b >= v.q) r.le[j][b] = 0;
        else begin
          d = (lam_bar[j][b] < lim) ? lam_bar[j][b] : lim;
          d = d - lam_map;
          if (((xm[j] >> b) & 1) == 0) d = -d;
          e = d - v.la[j][b];
          le_l = (longint'(1) << (wl - 1)) - 1;
          if (e > le_l) e = le_l;
          if (e < -le_l) e = -le_l;
          r.le[j][b] = int'(e);
        end
      end
    end
    r.lam_map = lam_map;
    r.ties = nmin;
    return r;
  endfunction

  // Metric of one full candidate vector given by its axis indices.
  function automatic longint leaf_metric(vec_t v, int re[MT], int im[MT], int sh, int wm);
    int qh, p, bits;
    longint mx, m, b_re, b_im, ma;
    qh = v.q / 2; p = 1 << qh;
    mx = (longint'(1) << wm) - 1;
    m = 0;
    for (int j = v.mt - 1; j >= 0; j--) begin
      b_re = v.y_re[j]; b_im = v.y_im[j];
      for (int i = j + 1; i < v.mt; i++) begin
        longint sr, si;
        sr = 2 * re[i] - (p - 1); si = 2 * im[i] - (p - 1);
        b_re = b_re - v.r_re[j][i] * sr + v.r_im[j][i] * si;
        b_im = b_im - v.r_re[j][i] * si - v.r_im[j][i] * sr;
      end
      bits = gray1(re[j]) | (gray1(im[j]) << qh);
      ma = 0;
      for (int b = 0; b < v.q; b++)
        if ((((bits >> b) & 1) == 1) != (v.la[j][b] > 0))
          ma += (v.la[j][b] < 0) ? -v.la[j][b] : v.la[j][b];
      m = m + mc_ref(b_re, b_im, v.r_re[j][j], re[j], im[j], p, sh, wm) + ma;
      if (m > mx) m = mx;
    end
    return m;
  endfunction

  // Axis index from its Gray code.
  function automatic int gray_dec(int g);
    int n;
    n = g;
    for (int s = 1; s < 8; s++) n = n ^ (g >> s);
    return n & 255;
  endfunction

  // Random test vector: y = R s + noise for random s, random upper-triangular R with positive
  // diagonal, a-priori LLRs that mostly agree with the transmitted bits.
  function automatic vec_t random_vec(int mt, int q, int noise, int la_mag, int clip,
                                      int rdiag, int roff);
    vec_t v;
    int qh, p, s_re[MT], s_im[MT], bits;
    qh = q / 2; p = 1 << qh;
    v.mt = mt; v.q = q; v.clip = clip;
    for (int j = 0; j < MT; j++) begin
      s_re[j] = 2 * int'($urandom_range(p - 1, 0)) - (p - 1);
      s_im[j] = 2 * int'($urandom_range(p - 1, 0)) - (p - 1);
    end
    for (int j = 0; j < MT; j++)
      for (int i = 0; i < MT; i++) begin
        if (i == j) begin
          v.r_re[j][i] = rdiag / 2 + int'($urandom_range(rdiag, 0)); v.r_im[j][i] = 0;
        end else if (i > j) begin
          v.r_re[j][i] = int'($urandom_range(2 * roff, 0)) - roff;
          v.r_im[j][i] = int'($urandom_range(2 * roff, 0)) - roff;
        end else begin
          v.r_re[j][i] = 0; v.r_im[j][i] = 0;
        end
      end
    for (int j = 0; j < MT; j++) begin
      int ar, ai;
      ar = 0; ai = 0;
      for (int i = j; i < mt; i++) begin
        ar += v.r_re[j][i] * s_re[i] - v.r_im[j][i] * s_im[i];
        ai += v.r_re[j][i] * s_im[i] + v.r_im[j][i] * s_re[i];
      end
      v.y_re[j] = ar + int'($urandom_range(2 * noise, 0)) - noise;
      v.y_im[j] = ai + int'($urandom_range(2 * noise, 0)) - noise;
      if (v.y_re[j] > 2047) v.y_re[j] = 2047;
      if (v.y_re[j] < -2047) v.y_re[j] = -2047;
      if (v.y_im[j] > 2047) v.y_im[j] = 2047;
      if (v.y_im[j] < -2047) v.y_im[j] = -2047;
      bits = gray1((s_re[j] + p - 1) / 2) | (gray1((s_im[j] + p - 1) / 2) << qh);
      for (int b = 0; b < QM; b++) begin
        int mag;
        mag = int'($urandom_range(la_mag, 0));
        if ($urandom_range(7, 0) == 0) mag = -mag;   // occasionally wrong prior
        v.la[j][b] = (((bits >> b) & 1) == 1) ? mag : -mag;
      end
    end
    return v;
  endfunction
endpackage
