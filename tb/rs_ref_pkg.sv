// rs_ref_pkg: reference Reed-Solomon arithmetic for the testbenches, written
// independently of the RTL: multiplication is a carry-less product followed
// by reduction modulo x^8+x^4+x^3+x^2+1, and encoding is plain polynomial long
// division of m(x) x^(n-k) by g(x) = prod_{j<n-k} (x + alpha^j).
// Codewords are queues, highest degree (first transmitted) symbol first.
package rs_ref_pkg;
  typedef logic [7:0] b8_t;
  typedef b8_t bq_t[$];

  function automatic b8_t ref_mul(b8_t a, b8_t b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (a[i]) p = p ^ (15'(b) << i);
    for (int i = 14; i >= 8; i--) if (p[i]) p = p ^ (15'h11D << (i - 8));
    return p[7:0];
  endfunction

  function automatic b8_t ref_pow(b8_t a, int e);
    b8_t r;
    r = 8'h01;
    for (int i = 0; i < e; i++) r = ref_mul(r, a);
    return r;
  endfunction

  // coefficients of g, index = degree, g[np] = 1
  function automatic bq_t ref_gen(int np);
    bq_t g;
    b8_t root;
    g = {8'h01};
    for (int j = 0; j < np; j++) begin
      root = ref_pow(8'h02, j);
      g.push_front(8'h00);              // multiply by x
      for (int i = 0; i < g.size() - 1; i++) g[i] = g[i] ^ ref_mul(root, g[i+1]);
    end
    return g;
  endfunction

  // systematic codeword of msg (msg[0] first transmitted)
  function automatic bq_t ref_encode(bq_t msg, int n, int k);
    bq_t g, rem, cw;
    b8_t f;
    int  np;
    np  = n - k;
    g   = ref_gen(np);
    rem = {};
    for (int i = 0; i < np; i++) rem.push_back(8'h00);   // rem[0] = highest degree
    foreach (msg[i]) begin
      f = msg[i] ^ rem[0];
      for (int j = 0; j < np - 1; j++) rem[j] = rem[j+1] ^ ref_mul(f, g[np-1-j]);
      rem[np-1] = ref_mul(f, g[0]);
    end
    cw = msg;
    foreach (rem[i]) cw.push_back(rem[i]);
    return cw;
  endfunction

  // true when cw(alpha^j) = 0 for j < np
  function automatic bit ref_is_codeword(bq_t cw, int np);
    b8_t s;
    for (int j = 0; j < np; j++) begin
      s = 8'h00;
      foreach (cw[i]) s = ref_mul(s, ref_pow(8'h02, j)) ^ cw[i];
      if (s != 8'h00) return 1'b0;
    end
    return 1'b1;
  endfunction
endpackage
