// rs_tb_pkg: reference models for the testbenches.
//
// GF(2^8) arithmetic here uses exponent/logarithm tables (x^8+x^4+x^3+x^2+1),
// a different method from the shift-and-add multiplier of the RTL, so the
// two check each other. Also: a systematic RS(255, 255-2t) encoder with
// generator roots alpha^0..alpha^(2t-1), syndrome evaluation, error locator
// construction from known error positions and error injection.
// Codewords are arrays in stream order: cw[i] is the coefficient of x^(254-i).
package rs_tb_pkg;

  typedef logic [7:0] sym_t;
  typedef sym_t cw_t [255];

  sym_t exp_t [512];
  int   log_t [256];
  bit   tables_ready = 0;

  function automatic void build_tables();
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = sym_t'(x);
      exp_t[i + 255] = sym_t'(x);
      log_t[x] = i;
      x = x << 1;
      if (x & 'h100) x = x ^ 'h11D;
    end
    exp_t[510] = exp_t[0];
    exp_t[511] = exp_t[1];
    log_t[0] = -1;
    tables_ready = 1;
  endfunction

  function automatic sym_t tmul(sym_t a, sym_t b);
    if (!tables_ready) build_tables();
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic sym_t tinv(sym_t a);
    if (!tables_ready) build_tables();
    if (a == 0) return 0;
    return exp_t[(255 - log_t[a]) % 255];
  endfunction

  function automatic sym_t talpha(int k);
    if (!tables_ready) build_tables();
    return exp_t[((k % 255) + 255) % 255];
  endfunction

  function automatic int tlog(sym_t a);
    if (!tables_ready) build_tables();
    return log_t[a];
  endfunction

  // Systematic encoder: message symbols (255-2t of them) first, parity last.
  function automatic void encode(int t, ref cw_t cw);
    sym_t g [9];
    sym_t p [8];
    sym_t fb;
    int nk;
    nk = 2 * t;
    for (int i = 0; i < 9; i++) g[i] = 0;
    g[0] = 1;
    for (int r = 0; r < nk; r++) begin   // g(x) *= (x + alpha^r)
      for (int i = nk; i > 0; i--) g[i] = g[i - 1] ^ tmul(g[i], talpha(r));
      g[0] = tmul(g[0], talpha(r));
    end
    for (int i = 0; i < 8; i++) p[i] = 0;
    for (int i = 0; i < 255 - nk; i++) begin
      fb = cw[i] ^ p[nk - 1];
      for (int j = nk - 1; j > 0; j--) p[j] = p[j - 1] ^ tmul(g[j], fb);
      p[0] = tmul(g[0], fb);
    end
    for (int j = 0; j < nk; j++) cw[255 - nk + j] = p[nk - 1 - j];
  endfunction

  function automatic void random_codeword(int t, ref cw_t cw);
    for (int i = 0; i < 255; i++) cw[i] = sym_t'($urandom);
    encode(t, cw);
  endfunction

  // s_i = r(alpha^i)
  function automatic sym_t syndrome(const ref cw_t r, int i);
    sym_t s;
    s = 0;
    for (int n = 0; n < 255; n++) s ^= tmul(r[n], talpha(i * (254 - n)));
    return s;
  endfunction

  // Add `ne` errors at distinct random positions (degrees) with random
  // non-zero values; positions are returned in pos[0..ne-1].
  function automatic void inject(int ne, ref cw_t r, ref int pos [8], ref sym_t val [8]);
    int p;
    bit dup;
    for (int e = 0; e < ne; e++) begin
      do begin
        p = $urandom_range(0, 254);
        dup = 0;
        for (int q = 0; q < e; q++) if (pos[q] == p) dup = 1;
      end while (dup);
      pos[e] = p;
      val[e] = sym_t'($urandom_range(1, 255));
      r[254 - p] ^= val[e];
    end
  endfunction

endpackage
