// gf_pkg: arithmetic in GF(2^8) shared by every encoder and decoder of the
// parity-sharing (PS) Reed-Solomon codec.
//
// Symbols are bytes. The field is built on the primitive polynomial
// x^8 + x^4 + x^3 + x^2 + 1 (0x11D) with primitive element alpha = 0x02; this
// polynomial is a choice of this design, the codec only needs some GF(2^8).
// The generator polynomial of an RS code with P check symbols has the
// consecutive roots alpha^0 .. alpha^(P-1).
//
// All functions are pure combinational logic: multiplication is the usual
// shift-and-reduce, powers of alpha are products of the eight constants
// alpha^(2^b), and the inverse is a^254 by square-and-multiply.
package gf_pkg;

  localparam int unsigned GF_M    = 8;
  localparam int unsigned GF_Q    = 255;        // multiplicative group order
  localparam logic [8:0]  GF_POLY = 9'h11D;

  typedef logic [GF_M-1:0] sym_t;

  function automatic sym_t gf_mul(sym_t a, sym_t b);
    logic [GF_M-1:0] acc;
    logic [GF_M-1:0] x;
    acc = '0;
    x   = a;
    for (int i = 0; i < GF_M; i++) begin
      if (b[i]) acc = acc ^ x;
      x = x[GF_M-1] ? ((x << 1) ^ GF_POLY[GF_M-1:0]) : (x << 1);
    end
    return acc;
  endfunction

  // alpha^(2^b) for b = 0..7
  function automatic sym_t gf_alpha_pow2(int unsigned b);
    sym_t x;
    x = 8'h02;
    for (int unsigned i = 0; i < b; i++) x = gf_mul(x, x);
    return x;
  endfunction

  // alpha^e for any integer e (reduced modulo 255, negatives allowed)
  function automatic sym_t gf_exp(int e);
    int   r;
    sym_t acc;
    r = e % int'(GF_Q);
    if (r < 0) r = r + int'(GF_Q);
    acc = 8'h01;
    for (int unsigned b = 0; b < GF_M; b++)
      if (r[b]) acc = gf_mul(acc, gf_alpha_pow2(b));
    return acc;
  endfunction

  // multiplicative inverse, a^254; gf_inv(0) returns 0
  function automatic sym_t gf_inv(sym_t a);
    sym_t r;
    sym_t sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // exponent 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  // Table of alpha^(step*i), i = 0..32, packed: bits [8*i +: 8] hold entry i.
  // Used to give constant multipliers their constants at elaboration time.
  function automatic logic [8*33-1:0] gf_pow_table(int step);
    logic [8*33-1:0] t;
    sym_t x;
    sym_t s;
    s = gf_exp(step);
    x = 8'h01;
    for (int i = 0; i < 33; i++) begin
      t[8*i +: 8] = x;
      x = gf_mul(x, s);
    end
    return t;
  endfunction

  // Generator polynomial g(x) = prod_{j=0}^{P-1} (x + alpha^j), monic.
  // Returned packed: bits [8*i +: 8] hold the coefficient of x^i, i = 0..P-1
  // (the leading 1 of x^P is implicit).
  function automatic logic [8*32-1:0] gen_poly(int unsigned P);
    sym_t g [0:32];
    logic [8*32-1:0] out;
    for (int i = 0; i <= 32; i++) g[i] = '0;
    g[0] = 8'h01;
    for (int unsigned j = 0; j < P; j++) begin
      // multiply by (x + alpha^j)
      for (int i = 32; i > 0; i--) g[i] = g[i-1] ^ gf_mul(g[i], gf_exp(int'(j)));
      g[0] = gf_mul(g[0], gf_exp(int'(j)));
    end
    out = '0;
    for (int i = 0; i < 32; i++) out[8*i +: 8] = g[i];
    return out;
  endfunction

endpackage
