// rs_ref_pkg -- reference Reed-Solomon arithmetic for the testbenches.
//
// Independent of the RTL: GF(2^m) multiplication uses log/antilog tables
// built here, not the shift-and-add multiplier of the design. Provides a
// systematic encoder (parity = m(x) x^(n-k) mod g(x), g(x) = prod_(i<n-k)
// (x - alpha^(b+i))), syndrome evaluation by direct summation, and error
// injection. Codewords are stored in stream order: index s holds the
// coefficient of x^(n-1-s).
package rs_ref_pkg;

  int m_f, ord_f;
  int exp_t [int];
  int log_t [int];

  function automatic void ref_init(int m, int poly);
    int x;
    m_f   = m;
    ord_f = (1 << m) - 1;
    exp_t.delete();
    log_t.delete();
    x = 1;
    for (int i = 0; i < 2 * ord_f; i++) begin
      exp_t[i] = x;
      if (i < ord_f) log_t[x] = i;
      x = x << 1;
      if (x >= (1 << m)) x = x ^ poly;
    end
  endfunction

  function automatic int ref_mul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int ref_apow(int e);
    int ee;
    ee = e % ord_f;
    if (ee < 0) ee += ord_f;
    return exp_t[ee];
  endfunction

  // Encode k message symbols (stream order) into an n-symbol codeword.
  function automatic void ref_encode(int n, int k, int b, const ref int msg[$], ref int cw[$]);
    int ns;
    int g[$];
    int par[$];
    int fb;
    ns = n - k;
    g = {1};
    for (int i = 0; i < ns; i++) begin
      int ng[$];
      int r;
      r = ref_apow(b + i);
      ng = {};
      for (int j = 0; j <= g.size(); j++) ng.push_back(0);
      for (int j = 0; j < g.size(); j++) begin
        ng[j + 1] ^= g[j];
        ng[j]     ^= ref_mul(g[j], r);
      end
      g = ng;
    end
    par = {};
    for (int j = 0; j < ns; j++) par.push_back(0);   // par[j] = coeff of x^j
    for (int s = 0; s < k; s++) begin
      fb = msg[s] ^ par[ns - 1];
      for (int j = ns - 1; j >= 1; j--) par[j] = par[j - 1] ^ ref_mul(fb, g[j]);
      par[0] = ref_mul(fb, g[0]);
    end
    cw = {};
    for (int s = 0; s < k; s++) cw.push_back(msg[s]);
    for (int j = ns - 1; j >= 0; j--) cw.push_back(par[j]);
  endfunction

  // Syndrome S_i = sum_s cw[s] alpha^((b+i)(n-1-s)).
  function automatic int ref_synd(int n, int b, int i, const ref int cw[$]);
    int acc;
    acc = 0;
    for (int s = 0; s < n; s++) acc ^= ref_mul(cw[s], ref_apow((b + i) * (n - 1 - s)));
    return acc;
  endfunction

  // Add nerr nonzero errors at distinct random stream indices.
  function automatic void ref_corrupt(int n, int nerr, ref int rx[$]);
    int used[int];
    int s;
    for (int e = 0; e < nerr; e++) begin
      do s = $urandom_range(n - 1); while (used.exists(s));
      used[s] = 1;
      rx[s] ^= $urandom_range(ord_f, 1);
    end
  endfunction

endpackage
