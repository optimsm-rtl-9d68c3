// tb_ec_pkg: reference arithmetic for the testbenches.
//
// Field operations use the simulator's wide % operator, and curve arithmetic
// uses textbook Jacobian formulas (x = X/Z^2, y = Y/Z^3) with explicit case
// splits, so the references share no formulas with the RTL, which uses
// homogeneous projective coordinates and the complete addition law.
package tb_ec_pkg;
  import msm_pkg::*;

  typedef struct packed { fq_t x; fq_t y; fq_t z; } jac_t;

  localparam fq_t GX = 381'h17f1d3a73197d7942695638c4fa9ac0fc3688c4f9774b905a14e3a3f171bac586c55e83ff97a1aeffb3af00adb22c6bb;
  localparam fq_t GY = 381'h08b3f481e3aaa0f1a09e30ed741d8ae4fcf5e095d5d00af600db18cb2c04b3edd03cc744a2888ae40caa232946c5e7e1;
  localparam logic [254:0] R_ORDER = 255'h73eda753299d7d483339d80809a1d80553bda402fffe5bfeffffffff00000001;

  function automatic fq_t fm(fq_t a, fq_t b);
    logic [2*FQ_W-1:0] p;
    p = (2*FQ_W)'(a) * (2*FQ_W)'(b);
    return fq_t'(p % (2*FQ_W)'(Q));
  endfunction
  function automatic fq_t fa(fq_t a, fq_t b);
    logic [FQ_W:0] s;
    s = ({1'b0, a} + {1'b0, b}) % {1'b0, Q};
    return s[FQ_W-1:0];
  endfunction
  function automatic fq_t fs(fq_t a, fq_t b);
    return fa(a, fq_t'(Q - b));
  endfunction
  function automatic fq_t finv(fq_t a);
    fq_t r, e, bse;
    r = 1; bse = a; e = Q - 2;
    for (int i = 0; i < FQ_W; i++) begin
      if (e[i]) r = fm(r, bse);
      bse = fm(bse, bse);
    end
    return r;
  endfunction

  function automatic fq_t rand_fq();
    logic [415:0] v;
    for (int i = 0; i < 13; i++) v[i*32 +: 32] = $urandom;
    return fq_t'(v % 416'(Q));
  endfunction

  localparam jac_t JINF = '{x: fq_t'(1), y: fq_t'(1), z: '0};

  function automatic jac_t jdbl(jac_t p);
    fq_t a, b, c, d, e, f;
    jac_t r;
    if (p.z == 0 || p.y == 0) return JINF;
    a = fm(p.x, p.x); b = fm(p.y, p.y); c = fm(b, b);
    d = fs(fs(fm(fa(p.x, b), fa(p.x, b)), a), c); d = fa(d, d);
    e = fa(fa(a, a), a); f = fm(e, e);
    r.x = fs(f, fa(d, d));
    r.y = fs(fm(e, fs(d, r.x)), fa(fa(fa(c, c), fa(c, c)), fa(fa(c, c), fa(c, c))));
    r.z = fm(fa(p.y, p.y), p.z);
    return r;
  endfunction

  function automatic jac_t jadd(jac_t p, jac_t q);
    fq_t z1z1, z2z2, u1, u2, s1, s2, h, rr, h2, h3;
    jac_t r;
    if (p.z == 0) return q;
    if (q.z == 0) return p;
    z1z1 = fm(p.z, p.z); z2z2 = fm(q.z, q.z);
    u1 = fm(p.x, z2z2); u2 = fm(q.x, z1z1);
    s1 = fm(fm(p.y, q.z), z2z2); s2 = fm(fm(q.y, p.z), z1z1);
    h = fs(u2, u1); rr = fs(s2, s1);
    if (h == 0) return (rr == 0) ? jdbl(p) : JINF;
    h2 = fm(h, h); h3 = fm(h2, h);
    r.x = fs(fs(fm(rr, rr), h3), fa(fm(u1, h2), fm(u1, h2)));
    r.y = fs(fm(rr, fs(fm(u1, h2), r.x)), fm(s1, h3));
    r.z = fm(fm(p.z, q.z), h);
    return r;
  endfunction

  function automatic jac_t from_aff(aff_t a);
    jac_t r;
    r.x = a.x; r.y = a.y; r.z = 1;
    return r;
  endfunction

  function automatic jac_t jneg(jac_t p);
    jac_t r;
    r = p; r.y = fq_neg(p.y);
    return r;
  endfunction

  function automatic jac_t jmul(logic [511:0] k, jac_t p);
    jac_t r;
    r = JINF;
    for (int i = 511; i >= 0; i--) begin
      r = jdbl(r);
      if (k[i]) r = jadd(r, p);
    end
    return r;
  endfunction

  function automatic jac_t jmul_short(logic [63:0] k, jac_t p);
    jac_t r;
    r = JINF;
    for (int i = 63; i >= 0; i--) begin
      r = jdbl(r);
      if (k[i]) r = jadd(r, p);
    end
    return r;
  endfunction

  function automatic aff_t to_aff(jac_t p);
    fq_t zi, zi2;
    aff_t a;
    zi = finv(p.z); zi2 = fm(zi, zi);
    a.x = fm(p.x, zi2); a.y = fm(fm(p.y, zi2), zi);
    return a;
  endfunction

  // Homogeneous projective (RTL) point from a Jacobian point, with a random
  // scale factor so that Z != 1.
  function automatic proj_t to_proj(jac_t p);
    proj_t r;
    fq_t s;
    if (p.z == 0) return PROJ_INF;
    s = rand_fq(); if (s == 0) s = 1;
    // x = X/Z^2 -> X' = X*Z*s, Z' = Z^3*s; y = Y/Z^3 -> Y' = Y*s
    r.x = fm(fm(p.x, p.z), s);
    r.y = fm(p.y, s);
    r.z = fm(fm(fm(p.z, p.z), p.z), s);
    return r;
  endfunction

  // Does the RTL point h equal the reference point j?
  function automatic bit same_point(proj_t h, jac_t j);
    fq_t zj2;
    if (h.z == 0 || j.z == 0) return (h.z == 0) && (j.z == 0);
    zj2 = fm(j.z, j.z);
    return (fm(h.x, zj2) == fm(j.x, h.z)) && (fm(h.y, fm(zj2, j.z)) == fm(j.y, h.z));
  endfunction

  function automatic jac_t gen();
    jac_t g;
    g.x = GX; g.y = GY; g.z = 1;
    return g;
  endfunction
endpackage
