// gf256_pkg: Galois-field GF(2^8) arithmetic and Reed-Solomon code constants
// shared by the G.709 RS(255,239) encoder and decoder.
//
// The field is built on the primitive polynomial x^8 + x^4 + x^3 + x^2 + 1
// (0x11D) with primitive element alpha = 0x02, as G.709 uses. The code is
// RS(255,239): 239 information symbols, 16 parity symbols, t = 8 correctable
// symbol errors. The generator polynomial has the 16 consecutive roots
// alpha^0 .. alpha^15 (first root exponent b = 0, as G.709 specifies).
//
// Everything here is a constant or a pure function. The generator
// coefficients and the exponent table are computed by constant functions at
// elaboration, so no numeric table has to be typed in by hand:
//   g(x) = prod_{i=0}^{15} (x + alpha^i)
//        = x^16 + 59x^15 + 13x^14 + 104x^13 + 189x^12 + 68x^11 + 209x^10
//          + 30x^9 + 8x^8 + 163x^7 + 65x^6 + 41x^5 + 229x^4 + 98x^3
//          + 50x^2 + 36x + 59
package gf256_pkg;

  typedef logic [7:0] gf_t;

  localparam logic [8:0] GF_POLY = 9'h11D;   // field polynomial
  localparam int RS_N    = 255;              // codeword length (symbols)
  localparam int RS_K    = 239;              // information symbols
  localparam int RS_NPAR = RS_N - RS_K;      // 16 parity symbols = 2t
  localparam int RS_T    = RS_NPAR / 2;      // 8 correctable errors
  localparam int RS_B    = 0;                // first consecutive root exponent

  typedef gf_t gf_vec_par_t [RS_NPAR];       // 16 field elements
  typedef gf_t gf_tab_t [256];
  typedef gf_t gf_loc_t [RS_T+1];            // error locator Lambda_0..Lambda_8
  typedef gf_t gf_eval_t [RS_T];             // error evaluator Omega_0..Omega_7

  // Multiply by alpha (x) modulo the field polynomial.
  function automatic gf_t gf_xtime(gf_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? GF_POLY[7:0] : 8'h00);
  endfunction

  // General multiplier: shift-and-add over the 8 bits of b.
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t r = '0;
    gf_t s = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= s;
      s = gf_xtime(s);
    end
    return r;
  endfunction

  // alpha^e for any non-negative e (reduced modulo 255).
  function automatic gf_t gf_alpha_pow(int e);
    gf_t r = 8'h01;
    for (int i = 0; i < (e % 255); i++) r = gf_xtime(r);
    return r;
  endfunction

  // Multiplicative inverse table, inv[0] = 0 by convention.
  function automatic gf_tab_t gf_gen_inv();
    gf_tab_t t;
    gf_t a = 8'h01;
    t[0] = '0;
    // alpha^i * alpha^(255-i) = 1
    for (int i = 0; i < 255; i++) begin
      t[a] = gf_alpha_pow(255 - i);
      a = gf_xtime(a);
    end
    return t;
  endfunction

  // Coefficients g_0..g_15 of the monic generator polynomial (g_16 = 1).
  function automatic gf_vec_par_t rs_gen_poly();
    gf_t g [RS_NPAR+1];
    gf_vec_par_t r;
    for (int k = 0; k <= RS_NPAR; k++) g[k] = '0;
    g[0] = 8'h01;
    for (int i = 0; i < RS_NPAR; i++) begin
      gf_t root = gf_alpha_pow(RS_B + i);
      // multiply current polynomial by (x + root), degree grows to i+1
      for (int k = i + 1; k >= 1; k--) g[k] = g[k-1] ^ gf_mul(g[k], root);
      g[0] = gf_mul(g[0], root);
    end
    for (int k = 0; k < RS_NPAR; k++) r[k] = g[k];
    return r;
  endfunction

  localparam gf_vec_par_t RS_GEN = rs_gen_poly();
  localparam gf_tab_t     GF_INV = gf_gen_inv();

endpackage
