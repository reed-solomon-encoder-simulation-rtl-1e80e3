// rs_ref_pkg: reference model of the G.709 RS(255,239) code for the
// testbenches, written independently of the RTL.
//
// Field arithmetic uses exponent/logarithm tables built by repeated
// doubling modulo x^8+x^4+x^3+x^2+1. Encoding is long division of
// m(x)*x^16 by g(x) = prod_{i=0}^{15}(x + alpha^i); syndromes are direct
// evaluations sum_p r_p * alpha^(i*(254-p)); error locator and evaluator
// polynomials are built from known error positions and values, so the
// decoder blocks can be checked against the answer they should find.
// Codeword arrays are indexed in transmission order: index 0 is sent first
// and has degree 254.
package rs_ref_pkg;

  typedef logic [7:0] sym_t;
  typedef sym_t cw_t [255];
  typedef sym_t par_t [16];

  sym_t exp_t [512];
  int   log_t [256];
  bit   ready = 0;

  function automatic void init();
    int v = 1;
    if (ready) return;
    for (int i = 0; i < 512; i++) begin
      exp_t[i] = sym_t'(v);
      if (i < 255) log_t[v] = i;
      v = v << 1;
      if ((v & 'h100) != 0) v = v ^ 'h11D;
    end
    log_t[0] = -1;
    ready = 1;
  endfunction

  function automatic sym_t mul(sym_t a, sym_t b);
    init();
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic sym_t apow(int e);
    init();
    e = e % 255;
    if (e < 0) e += 255;
    return exp_t[e];
  endfunction

  function automatic sym_t inv(sym_t a);
    init();
    return exp_t[255 - log_t[a]];
  endfunction

  // generator coefficients, gen[k] = coefficient of x^k, gen[16] = 1
  function automatic void gen_poly(output sym_t gen [17]);
    for (int k = 0; k < 17; k++) gen[k] = 0;
    gen[0] = 1;
    for (int i = 0; i < 16; i++) begin
      sym_t nx [17];
      for (int k = 0; k < 17; k++) nx[k] = 0;
      for (int k = 0; k <= i; k++) begin
        nx[k+1] ^= gen[k];
        nx[k]   ^= mul(gen[k], apow(i));
      end
      gen = nx;
    end
  endfunction

  // parity of 239 message symbols msg[0..238] (msg[0] sent first)
  function automatic par_t encode(const ref sym_t msg [239]);
    sym_t gen [17];
    sym_t rem [255];
    par_t p;
    gen_poly(gen);
    // rem holds the dividend in transmission order
    for (int i = 0; i < 255; i++) rem[i] = (i < 239) ? msg[i] : 0;
    for (int i = 0; i < 239; i++) begin
      sym_t q = rem[i];
      if (q != 0)
        for (int k = 0; k <= 16; k++) rem[i+k] ^= mul(q, gen[16-k]);
    end
    for (int k = 0; k < 16; k++) p[k] = rem[239+k];
    return p;
  endfunction

  function automatic void make_cw(const ref sym_t msg [239], output cw_t cw);
    par_t p = encode(msg);
    for (int i = 0; i < 239; i++) cw[i] = msg[i];
    for (int k = 0; k < 16; k++) cw[239+k] = p[k];
  endfunction

  function automatic sym_t syndrome(const ref cw_t r, int i);
    sym_t s = 0;
    for (int p = 0; p < 255; p++) s ^= mul(r[p], apow(i * (254 - p)));
    return s;
  endfunction

  // evaluate polynomial c[0..n-1] (c[k] = coefficient of x^k) at x
  function automatic sym_t peval(const ref sym_t c [], sym_t x);
    sym_t acc = 0;
    for (int k = c.size() - 1; k >= 0; k--) acc = mul(acc, x) ^ c[k];
    return acc;
  endfunction

  // Lambda(x) = prod (1 + X_k x), X_k = alpha^(254 - pos_k); 9 coefficients
  function automatic void locator(const ref int pos [$], output sym_t lam [9]);
    for (int k = 0; k < 9; k++) lam[k] = 0;
    lam[0] = 1;
    foreach (pos[j]) begin
      sym_t x = apow(254 - pos[j]);
      for (int k = 8; k >= 1; k--) lam[k] ^= mul(lam[k-1], x);
    end
  endfunction

endpackage
