// Reference arithmetic for the testbenches, written independently of the RTL.
//
// Field GF(2^233) with f(x) = x^233 + x^74 + 1. Multiplication is the textbook
// right-to-left shift-and-add with the reduction interleaved bit by bit (no
// product wider than m bits ever exists), inversion is by Fermat's little
// theorem a^(2^m - 2) with square-and-multiply, and the point multiplication uses
// the unified addition law of the binary Huff curve exactly as printed
// (m1..m12, X3, Y3, Z3) inside a plain double-and-add loop.
package tb_gf_ref;

  localparam int unsigned RM = 233;
  typedef logic [RM-1:0]   rfe_t;
  typedef logic [2*RM-2:0] rprod_t;

  typedef struct packed { rfe_t x, y, z; } rpt_t;

  // carry-less product, no reduction
  function automatic rprod_t clmul(rfe_t a, rfe_t b);
    rprod_t r;
    r = '0;
    for (int i = 0; i < RM; i++)
      if (b[i]) r ^= rprod_t'(a) << i;
    return r;
  endfunction

  // bit-by-bit long division remainder
  function automatic rfe_t mod_f(rprod_t c);
    for (int i = 2*RM-2; i >= RM; i--)
      if (c[i]) begin
        c[i]          = 1'b0;
        c[i-RM]       = ~c[i-RM];
        c[i-RM+74]    = ~c[i-RM+74];
      end
    return c[RM-1:0];
  endfunction

  // a * x mod f
  function automatic rfe_t mulx(rfe_t a);
    logic top;
    top = a[RM-1];
    a = a << 1;
    if (top) begin a[0] ^= 1'b1; a[74] ^= 1'b1; end
    return a;
  endfunction

  function automatic rfe_t fmul(rfe_t a, rfe_t b);
    rfe_t r;
    r = '0;
    for (int i = 0; i < RM; i++) begin
      if (b[i]) r ^= a;
      a = mulx(a);
    end
    return r;
  endfunction

  function automatic rfe_t fsqr(rfe_t a);
    return fmul(a, a);
  endfunction

  function automatic rfe_t finv(rfe_t a);
    // a^(2^m - 2) = prod_{i=1}^{m-1} a^(2^i)
    rfe_t r, s;
    r = rfe_t'(1);
    s = a;
    for (int i = 1; i < RM; i++) begin
      s = fsqr(s);
      r = fmul(r, s);
    end
    return r;
  endfunction

  // unified addition law (2018 form)
  function automatic rpt_t ual(rpt_t p1, rpt_t p2, rfe_t alpha, rfe_t beta);
    rfe_t m1, m2, m3, m4, m5, m6, m7, m8, m9, m10, m11, m12;
    rpt_t q;
    m1  = fmul(p1.x, p2.x);
    m2  = fmul(p1.y, p2.y);
    m3  = fmul(p1.z, p2.z);
    m4  = fmul(p1.x ^ p1.z, p2.x ^ p2.z);
    m5  = fmul(p1.y ^ p1.z, p2.y ^ p2.z);
    m6  = fmul(m1, m3);
    m7  = fmul(m2, m3);
    m8  = fmul(m1, m2) ^ fsqr(m3);
    m9  = fmul(m6, fsqr(m2 ^ m3));
    m10 = fmul(m7, fsqr(m1 ^ m3));
    m11 = fmul(m8, m2 ^ m3);
    m12 = fmul(m8, m1 ^ m3);
    q.z = fmul(m11, m1 ^ m3);
    q.x = fmul(alpha, m9) ^ fmul(m4 ^ m11, m11) ^ fsqr(m11) ^ q.z;
    q.y = fmul(beta, m10) ^ fmul(m5 ^ m12, m12) ^ fsqr(m12) ^ q.z;
    return q;
  endfunction

  // k.P in affine coordinates, k[RM-1] assumed 1
  function automatic void pm(rfe_t k, rfe_t xp, rfe_t yp, rfe_t alpha, rfe_t beta,
                             output rfe_t xq, output rfe_t yq);
    rpt_t p, q;
    rfe_t zi;
    p.x = xp; p.y = yp; p.z = rfe_t'(1);
    q = p;
    for (int i = RM - 2; i >= 0; i--) begin
      q = ual(q, q, alpha, beta);
      if (k[i]) q = ual(p, q, alpha, beta);
    end
    zi = finv(q.z);
    xq = fmul(q.x, zi);
    yq = fmul(q.y, zi);
  endfunction

  function automatic rfe_t rand_fe();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r[RM-1:0];
  endfunction

  function automatic rprod_t rand_prod();
    logic [479:0] r;
    for (int i = 0; i < 15; i++) r[i*32 +: 32] = $urandom;
    return r[2*RM-2:0];
  endfunction

  function automatic int unsigned popcount(rfe_t v, int unsigned hi);
    int unsigned n = 0;
    for (int i = 0; i <= int'(hi); i++) n += v[i];
    return n;
  endfunction

endpackage
