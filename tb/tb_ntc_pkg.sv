// tb_ntc_pkg: reference arithmetic for the testbenches, written directly from
// the equations of the classifier (not from the RTL's step schedule):
// Manhattan distance, the boundary decision, the CF update and the record of
// a new cluster. Also random helpers for features and cluster records.
package tb_ntc_pkg;
  import ntc_pkg::*;

  function automatic dist_t ref_distance(feat_vec_t x, feat_vec_t mu);
    longint s = 0;
    for (int i = 0; i < D; i++)
      s += (x[i] > mu[i]) ? longint'(x[i]) - longint'(mu[i]) : longint'(mu[i]) - longint'(x[i]);
    return dist_t'(s);
  endfunction

  // Inside the cluster: D <= sum(R)/N for N > 1, D <= 2 for N <= 1.
  function automatic bit ref_in_boundary(count_t n, dist_t d, rad_vec_t r);
    longint s = 0;
    if (n <= 1) return longint'(d) <= (longint'(2) << FRAC_BITS);
    for (int i = 0; i < D; i++) s += longint'(r[i]);
    return longint'(d) <= s / longint'(n);
  endfunction

  function automatic cluster_t ref_new_cluster(feat_vec_t x, label_t y);
    cluster_t c;
    c.a.valid = 1'b1;
    c.a.y     = y;
    c.a.mu    = x;
    c.b       = '0;
    for (int i = 0; i < D; i++) c.c.u[i] = U_W'(1 << U_FRAC);
    c.c.n     = 1;
    c.c.t     = 1;
    return c;
  endfunction

  // q = |x-mu|/N, mu' = (mu*N + x)/(N+1), R' = R + u*q + |x-mu'|,
  // N' = N+1, T' = T+1 (saturating).
  function automatic cluster_t ref_update(cluster_t c, feat_vec_t x);
    cluster_t o = c;
    longint n  = longint'(c.c.n);
    longint nn = (c.c.n == '1) ? n : n + 1;
    for (int i = 0; i < D; i++) begin
      longint xf = longint'(x[i]);
      longint m  = longint'(c.a.mu[i]);
      longint diff = (xf > m) ? xf - m : m - xf;
      longint q  = (diff / n) & ((longint'(1) << FEAT_W) - 1);
      longint mn = ((m * n + xf) / nn) & ((longint'(1) << FEAT_W) - 1);
      longint w  = (longint'(c.c.u[i]) * q) >> U_FRAC;
      longint d2 = (xf > mn) ? xf - mn : mn - xf;
      longint r  = longint'(c.b[i]) + w + d2;
      if (r > 64'hFFFF_FFFF) r = 64'hFFFF_FFFF;
      o.a.mu[i] = FEAT_W'(mn);
      o.b[i]    = R_W'(r);
    end
    o.a.valid = 1'b1;
    o.c.n = count_t'(nn);
    o.c.t = (c.c.t == '1) ? c.c.t : c.c.t + 1'b1;
    return o;
  endfunction

  // Feature value in [0, range) feature units (fixed point).
  function automatic feat_t rand_feat(int unsigned range_units);
    return feat_t'($urandom_range(0, (range_units << FRAC_BITS) - 1));
  endfunction

  function automatic feat_vec_t rand_vec(int unsigned range_units);
    feat_vec_t v;
    for (int i = 0; i < D; i++) v[i] = rand_feat(range_units);
    return v;
  endfunction

  function automatic cluster_t rand_cluster(int unsigned range_units);
    cluster_t c;
    c.a.valid = 1'b1;
    c.a.y     = label_t'($urandom_range(0, 4));
    c.a.mu    = rand_vec(range_units);
    for (int i = 0; i < D; i++) begin
      c.b[i]   = R_W'($urandom_range(0, 3 << FRAC_BITS));
      c.c.u[i] = U_W'($urandom_range(0, (1 << U_W) - 1));
    end
    c.c.n = count_t'($urandom_range(1, 40));
    c.c.t = tstamp_t'($urandom_range(0, 6));
    return c;
  endfunction

endpackage
