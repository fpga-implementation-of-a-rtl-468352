// ec_ref_pkg: reference arithmetic for the elliptic-curve testbenches.
//
// Field elements are held in 256-bit vectors with the field degree m and the
// reduction polynomial passed at run time, so one model serves every field
// size tested. Multiplication is schoolbook multiplication followed by long
// division; inversion uses Fermat's little theorem, a^-1 = a^(2^m - 2).
// Points use the full group law of y^2 + xy = x^3 + ax^2 + b (including the
// point at infinity and -P = (x, x + y)), and scalar multiplication scans the
// scalar from its least significant bit, unlike the hardware.
package ec_ref_pkg;

  typedef logic [255:0] fe_t;
  typedef struct packed {
    logic inf;
    fe_t  x;
    fe_t  y;
  } pt_t;

  function automatic fe_t fmul(input fe_t x, input fe_t y, input int m, input logic [256:0] poly);
    logic [511:0] p;
    p = '0;
    for (int i = 0; i < m; i++) if (y[i]) p ^= 512'(x) << i;
    for (int i = 2*m - 2; i >= m; i--) if (p[i]) p ^= 512'(poly) << (i - m);
    return p[255:0];
  endfunction

  function automatic fe_t finv(input fe_t x, input int m, input logic [256:0] poly);
    fe_t r, s;
    r = 256'd1;
    s = x;
    for (int i = 1; i < m; i++) begin
      s = fmul(s, s, m, poly);
      r = fmul(r, s, m, poly);
    end
    return r;
  endfunction

  function automatic pt_t pdbl(input pt_t p, input fe_t a, input int m, input logic [256:0] poly);
    pt_t  r;
    fe_t  lam;
    if (p.inf || p.x == '0) begin
      r.inf = 1'b1; r.x = '0; r.y = '0;
      return r;
    end
    lam   = p.x ^ fmul(p.y, finv(p.x, m, poly), m, poly);
    r.inf = 1'b0;
    r.x   = fmul(lam, lam, m, poly) ^ lam ^ a;
    r.y   = fmul(p.x, p.x, m, poly) ^ fmul(lam ^ 256'd1, r.x, m, poly);
    return r;
  endfunction

  function automatic pt_t padd(input pt_t p, input pt_t q, input fe_t a, input int m, input logic [256:0] poly);
    pt_t  r;
    fe_t  lam;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (q.y == (p.x ^ p.y)) begin
        r.inf = 1'b1; r.x = '0; r.y = '0;
        return r;
      end
      return pdbl(p, a, m, poly);
    end
    lam   = fmul(p.y ^ q.y, finv(p.x ^ q.x, m, poly), m, poly);
    r.inf = 1'b0;
    r.x   = fmul(lam, lam, m, poly) ^ lam ^ p.x ^ q.x ^ a;
    r.y   = fmul(lam, p.x ^ r.x, m, poly) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t pmul(input fe_t k, input pt_t p, input fe_t a, input int m, input logic [256:0] poly);
    pt_t r, s;
    r.inf = 1'b1; r.x = '0; r.y = '0;
    s = p;
    for (int i = 0; i < m; i++) begin
      if (k[i]) r = padd(r, s, a, m, poly);
      s = pdbl(s, a, m, poly);
    end
    return r;
  endfunction

  // b that puts (x, y) on the curve with coefficient a.
  function automatic fe_t curve_b(input fe_t x, input fe_t y, input fe_t a, input int m, input logic [256:0] poly);
    fe_t x2;
    x2 = fmul(x, x, m, poly);
    return fmul(y, y, m, poly) ^ fmul(x, y, m, poly) ^ fmul(x2, x, m, poly) ^ fmul(a, x2, m, poly);
  endfunction

  function automatic fe_t rnd_fe(input int m);
    fe_t v;
    v = '0;
    for (int i = 0; i < m; i++) v[i] = 1'($urandom_range(1, 0));
    return v;
  endfunction

endpackage
