// tb_gf_pkg: reference Galois-field arithmetic for the testbenches, built
// independently of the design: field elements are generated one by one as
// successive powers of alpha into an antilog table, and products are taken
// through log/antilog lookup. Call tb_gf_init(m, poly) once before use.
package tb_gf_pkg;

  int unsigned gf_m;
  int unsigned gf_q;            // 2^m - 1
  int unsigned exp_tab [];      // exp_tab[k] = alpha^k
  int          log_tab [];      // log_tab[x] = k with alpha^k = x, -1 for 0

  function automatic void tb_gf_init(int unsigned m, int unsigned poly);
    int unsigned x;
    gf_m = m;
    gf_q = (1 << m) - 1;
    exp_tab = new[gf_q];
    log_tab = new[gf_q + 1];
    foreach (log_tab[k]) log_tab[k] = -1;
    x = 1;
    for (int unsigned k = 0; k < gf_q; k++) begin
      exp_tab[k] = x;
      log_tab[x] = int'(k);
      x = x << 1;
      if (x & (1 << m)) x = x ^ poly;
    end
  endfunction

  function automatic int unsigned tb_pow(longint e);
    longint r;
    r = e % longint'(gf_q);
    if (r < 0) r = r + gf_q;
    return exp_tab[r];
  endfunction

  function automatic int unsigned tb_mul(int unsigned a, int unsigned b);
    if (a == 0 || b == 0) return 0;
    return exp_tab[(log_tab[a] + log_tab[b]) % gf_q];
  endfunction

  function automatic int unsigned tb_inv(int unsigned a);
    return exp_tab[(gf_q - log_tab[a]) % gf_q];
  endfunction

  // Y(alpha^k) = sum_{j=1..t} lam[j-1] * alpha^(j*k)
  function automatic int unsigned tb_eval_y(int unsigned lam [], longint k);
    int unsigned acc;
    acc = 0;
    foreach (lam[j]) acc = acc ^ tb_mul(lam[j], tb_pow(longint'(j + 1) * k));
    return acc;
  endfunction

endpackage
