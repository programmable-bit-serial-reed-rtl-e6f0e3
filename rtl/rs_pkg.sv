// rs_pkg: types, constants and elaboration-time Galois-field helpers shared by
// the programmable bit-serial Reed-Solomon encoder.
//
// The encoder works over GF(2^4), GF(2^5) or GF(2^8). The field is chosen by
// two select lines {m1, m0}: 00 -> m = 4, 01 -> m = 5, 11 -> m = 8 (10 is
// unused). The error-correcting ability t is chosen by four lines T[3:0],
// encoded here as t = T + 1, so that T = 0..7 selects t = 1..8 and T = 15
// selects t = 16.
//
// Field polynomials are a design choice (the usual primitive trinomials and
// pentanomial): x^4+x+1, x^5+x^2+1 and x^8+x^4+x^3+x^2+1. Each is stored
// without its leading x^m term, as the feedback taps f_0..f_(m-1) of the
// multiplier LFSR.
//
// The functions below are used only to build constant tables at elaboration
// (the generator polynomial look-up table); they are not instantiated as
// run-time logic.
package rs_pkg;

  localparam int unsigned MMAX    = 8;   // widest symbol
  localparam int unsigned TMAX    = 16;  // largest error-correcting ability
  localparam int unsigned NPAR    = 2 * TMAX;  // 32 check symbols at most

  typedef logic [MMAX-1:0] sym_t;

  // {m1, m0} field select
  typedef enum logic [1:0] {
    FIELD_M4 = 2'b00,
    FIELD_M5 = 2'b01,
    FIELD_BAD = 2'b10,
    FIELD_M8 = 2'b11
  } field_e;

  // Feedback taps f_0..f_(m-1) (x^m term omitted)
  localparam logic [MMAX-1:0] FPOLY4 = 8'h03;  // x^4 + x + 1
  localparam logic [MMAX-1:0] FPOLY5 = 8'h05;  // x^5 + x^2 + 1
  localparam logic [MMAX-1:0] FPOLY8 = 8'h1D;  // x^8 + x^4 + x^3 + x^2 + 1

  // Configuration of one codeword, latched at the codeword boundary.
  typedef struct packed {
    field_e     field;
    logic [3:0] tsel;   // t = tsel + 1
  } rs_cfg_t;

  function automatic int unsigned field_m(field_e f);
    case (f)
      FIELD_M4: return 4;
      FIELD_M5: return 5;
      default:  return 8;
    endcase
  endfunction

  function automatic logic [MMAX-1:0] field_taps(int unsigned m);
    case (m)
      4:       return FPOLY4;
      5:       return FPOLY5;
      default: return FPOLY8;
    endcase
  endfunction

  // The 18 codes: m and t of table row r.
  //   n = 15 : t = 1..7          (k = 13, 11, 9, 7, 5, 3, 1)
  //   n = 31 : t = 1, 2, 3, 4, 8 (k = 29, 27, 25, 23, 15)
  //   n = 255: t = 1, 2, 3, 4, 8, 16 (k = 253 ... 239, 223)
  function automatic int unsigned code_m(int unsigned r);
    if (r < 7)       return 4;
    else if (r < 12) return 5;
    else             return 8;
  endfunction

  function automatic int unsigned code_t(int unsigned r);
    if (r < 7) return r + 1;
    case (r)
      7, 12:   return 1;
      8, 13:   return 2;
      9, 14:   return 3;
      10, 15:  return 4;
      11, 16:  return 8;
      default: return 16;
    endcase
  endfunction

  // Polynomial-basis product in GF(2^m) with the taps above.
  function automatic logic [MMAX-1:0] gf_mul(logic [MMAX-1:0] a, logic [MMAX-1:0] b,
                                             int unsigned m);
    logic [MMAX-1:0] p, aa, taps, top;
    p    = '0;
    aa   = a;
    taps = field_taps(m);
    top  = MMAX'(1) << (m - 1);
    for (int unsigned i = 0; i < m; i++) begin
      if (b[i]) p ^= aa;
      if ((aa & top) != 0) aa = ((aa << 1) & ((top << 1) - 1)) ^ taps;
      else                 aa = (aa << 1) & ((top << 1) - 1);
    end
    return p;
  endfunction

  function automatic logic [MMAX-1:0] gf_alpha_pow(int unsigned e, int unsigned m);
    logic [MMAX-1:0] r;
    r = 1;
    for (int unsigned i = 0; i < e; i++) r = gf_mul(r, MMAX'(2), m);
    return r;
  endfunction

  // Coefficients g_0..g_(2t-1) of g(x) = prod_{i=0}^{2t-1} (x + alpha^(b+i)),
  // placed at the top of a 32-entry vector: entry NPAR-2t+j holds g_j and the
  // entries below are zero. With SYMMETRIC set, b = 2^(m-1) - t, which makes
  // g(x) self-reciprocal; otherwise b = 1.
  typedef logic [NPAR-1:0][MMAX-1:0] gvec_t;

  function automatic gvec_t gen_poly(int unsigned m, int unsigned t, bit symmetric);
    logic [NPAR:0][MMAX-1:0] g;
    gvec_t out;
    int unsigned b;
    sym_t  root;
    b = symmetric ? ((1 << (m - 1)) - t) : 1;
    g = '0;
    g[0] = 1;
    for (int unsigned i = 0; i < 2 * t; i++) begin
      root = gf_alpha_pow(b + i, m);
      // g(x) <- g(x) * (x + root)
      for (int j = NPAR; j >= 1; j--) g[j] = g[j-1] ^ gf_mul(g[j], root, m);
      g[0] = gf_mul(g[0], root, m);
    end
    out = '0;
    for (int unsigned j = 0; j < 2 * t; j++) out[NPAR - 2*t + j] = g[j];
    return out;
  endfunction

endpackage
