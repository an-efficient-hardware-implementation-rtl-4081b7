// gf_ref_pkg: reference arithmetic for the testbenches, written independently of the RTL.
//
// Digits are converted to integers 0..2 and all arithmetic is plain modular integer
// arithmetic: schoolbook polynomial products reduced by x^97 = -x^16 - 2, cubing as a
// product a*a*a, GF(3^2m) and GF(3^6m) products by the schoolbook formula with s^2 = -1 and
// r^3 = r + 1, and the modified Duursma-Lee loop step by step. The field is fixed to the
// accelerator's default, GF(3^97) with x^97 + x^16 + 2.
package gf_ref_pkg;

  localparam int M  = 97;
  localparam int T  = 16;
  localparam int PT = 1;
  localparam int P0 = 2;

  typedef logic [M-1:0][1:0]           fm_t;
  typedef logic [1:0][M-1:0][1:0]      f2_t;
  typedef logic [2:0][1:0][M-1:0][1:0] f6_t;

  function automatic int dv(logic [1:0] d);
    return (d == 2'b01) ? 1 : (d == 2'b10) ? 2 : 0;
  endfunction

  function automatic logic [1:0] enc(int v);
    int r;
    r = ((v % 3) + 3) % 3;
    return (r == 1) ? 2'b01 : (r == 2) ? 2'b10 : 2'b00;
  endfunction

  function automatic fm_t rnd_fm();
    fm_t r;
    for (int i = 0; i < M; i++) r[i] = enc(int'($urandom_range(0, 2)));
    return r;
  endfunction

  function automatic f6_t rnd_f6();
    f6_t r;
    for (int k = 0; k < 3; k++) for (int j = 0; j < 2; j++) r[k][j] = rnd_fm();
    return r;
  endfunction

  function automatic fm_t r_add(fm_t a, fm_t b);
    fm_t r;
    for (int i = 0; i < M; i++) r[i] = enc(dv(a[i]) + dv(b[i]));
    return r;
  endfunction

  function automatic fm_t r_sub(fm_t a, fm_t b);
    fm_t r;
    for (int i = 0; i < M; i++) r[i] = enc(dv(a[i]) - dv(b[i]));
    return r;
  endfunction

  function automatic fm_t r_neg(fm_t a);
    return r_sub('0, a);
  endfunction

  function automatic fm_t r_mul(fm_t a, fm_t b);
    int p [2*M-1];
    fm_t r;
    for (int k = 0; k < 2*M-1; k++) p[k] = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        p[i+j] = (p[i+j] + dv(a[i]) * dv(b[j])) % 3;
    for (int k = 2*M-2; k >= M; k--) begin
      p[k-M+T] = p[k-M+T] - PT * p[k];
      p[k-M]   = p[k-M]   - P0 * p[k];
      p[k-M+T] = ((p[k-M+T] % 3) + 3) % 3;
      p[k-M]   = ((p[k-M] % 3) + 3) % 3;
      p[k] = 0;
    end
    for (int i = 0; i < M; i++) r[i] = enc(p[i]);
    return r;
  endfunction

  function automatic fm_t r_cube(fm_t a);
    return r_mul(r_mul(a, a), a);
  endfunction

  function automatic f2_t r_add2(f2_t a, f2_t b);
    f2_t r;
    r[0] = r_add(a[0], b[0]);
    r[1] = r_add(a[1], b[1]);
    return r;
  endfunction

  // (a0 + a1 s)(b0 + b1 s) = (a0 b0 - a1 b1) + (a0 b1 + a1 b0) s
  function automatic f2_t r_mul2(f2_t a, f2_t b);
    f2_t r;
    r[0] = r_sub(r_mul(a[0], b[0]), r_mul(a[1], b[1]));
    r[1] = r_add(r_mul(a[0], b[1]), r_mul(a[1], b[0]));
    return r;
  endfunction

  // schoolbook in r, then r^4 -> r^2 + r and r^3 -> r + 1
  function automatic f6_t r_mul6(f6_t a, f6_t b);
    f2_t d [5];
    f6_t r;
    for (int k = 0; k < 5; k++) d[k] = '0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        d[i+j] = r_add2(d[i+j], r_mul2(a[i], b[j]));
    d[2] = r_add2(d[2], d[4]);
    d[1] = r_add2(d[1], d[4]);
    d[1] = r_add2(d[1], d[3]);
    d[0] = r_add2(d[0], d[3]);
    for (int k = 0; k < 3; k++) r[k] = d[k];
    return r;
  endfunction

  function automatic f6_t r_cube6(f6_t a);
    return r_mul6(r_mul6(a, a), a);
  endfunction

  // modified Duursma-Lee loop, curve y^2 = x^3 - x + 1
  function automatic f6_t r_pairing(fm_t xp, fm_t yp, fm_t xr, fm_t yr);
    fm_t alpha, beta, x, y, mu, dvec;
    int  d;
    f6_t t, g;
    alpha = xp; beta = yp; x = r_cube(xr); y = r_cube(yr);
    t = '0; t[0][0][0] = 2'b01;
    d = M % 3;
    for (int i = 0; i < M; i++) begin
      alpha = r_cube(r_cube(alpha));
      beta  = r_cube(r_cube(beta));
      dvec = '0; dvec[0] = enc(d);
      mu = r_add(r_add(alpha, x), dvec);
      g = '0;
      g[0][0] = r_neg(r_mul(mu, mu));
      g[0][1] = r_neg(r_mul(beta, y));
      g[1][0] = r_neg(mu);
      g[2][0][0] = enc(-1);
      t = r_mul6(r_cube6(t), g);
      y = r_neg(y);
      d = (d + 2) % 3;
    end
    return t;
  endfunction

endpackage
