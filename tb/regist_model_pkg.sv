// regist_model_pkg: reference model of the depth-to-color registration for
// the testbenches.
//
// The functions compute what the pipeline must produce with plain wide
// integer arithmetic (128-bit, the language's own signed division and
// truncation) instead of the hardware's bit-serial division, so that they
// are an independent check of the fixed-point datapath.  real_project()
// computes the same mapping in double precision, to bound the error of the
// fixed-point formats against the floating-point algorithm.
package regist_model_pkg;
  import regist_pkg::*;

  typedef logic signed [127:0] big_t;

  // Signed division with the pipeline's overflow rule: the divisor must be
  // positive and the quotient magnitude must stay below 2^31.
  function automatic logic mdiv(input big_t n, input big_t d, output fix_t q);
    big_t qq, an;
    q = '0;
    if (d <= 0) return 1'b0;
    an = (n < 0) ? -n : n;
    if (an >= (d <<< 31)) return 1'b0;
    qq = n / d;
    q  = fix_t'(qq);
    return 1'b1;
  endfunction

  // Eq. 1 in fixed point.
  function automatic logic m_deproject(input int u, input int v, input int d,
                                       input intrinsics_t in, input scale_t sc,
                                       output fix_t x, output fix_t y, output fix_t z);
    big_t zf, du, dv;
    logic okx, oky;
    zf = (big_t'(d) * big_t'({1'b0, sc})) / 65536;
    if (zf > 64'sd2147483647) zf = 64'sd2147483647;
    z  = fix_t'(zf);
    du = big_t'(fix_t'(u * 65536 - in.px));
    dv = big_t'(fix_t'(v * 65536 - in.py));
    okx = mdiv(du * big_t'(z), big_t'(in.fx), x);
    oky = mdiv(dv * big_t'(z), big_t'(in.fy), y);
    return okx && oky;
  endfunction

  // Eq. 2 in fixed point (floor of the Q32.32 sum, kept to 32 bits).
  function automatic void m_rigid(input fix_t e [12], input fix_t x, input fix_t y, input fix_t z,
                                  output fix_t xc, output fix_t yc, output fix_t zc);
    big_t s [3];
    for (int r = 0; r < 3; r++) begin
      s[r] = big_t'(e[4*r]) * x + big_t'(e[4*r+1]) * y + big_t'(e[4*r+2]) * z
           + big_t'(e[4*r+3]) * 65536;
      // floor division by 2^16
      if (s[r] < 0 && (s[r] % 65536) != 0) s[r] = s[r] / 65536 - 1;
      else                                 s[r] = s[r] / 65536;
    end
    xc = fix_t'(s[0]); yc = fix_t'(s[1]); zc = fix_t'(s[2]);
  endfunction

  // trunc toward zero of a Q16.16 value given as a wide integer
  function automatic logic m_index(input big_t f, input int lim, output int idx);
    big_t t;
    t   = f / 65536;          // the language truncates toward zero
    idx = int'(t);
    return (f > -65536) && (t < lim);
  endfunction

  // Eq. 3 and the range check.  Returns 1 when the point writes.
  function automatic logic m_project(input fix_t xc, input fix_t yc, input fix_t zc,
                                     input intrinsics_t in, input int w, input int h,
                                     output int addr);
    fix_t qx, qy;
    int ui, vi;
    logic okx, oky, inu, inv;
    okx = mdiv(big_t'(in.fx) * xc, big_t'(zc), qx);
    oky = mdiv(big_t'(in.fy) * yc, big_t'(zc), qy);
    inu = m_index(big_t'(qx) + big_t'(in.px), w, ui);
    inv = m_index(big_t'(qy) + big_t'(in.py), h, vi);
    addr = vi * w + ui;
    return okx && oky && inu && inv;
  endfunction

  // The whole mapping of one depth pixel.
  function automatic logic m_pixel(input int u, input int v, input int d, input cam_params_t p,
                                   input int w, input int h, output int addr, output fix_t zd);
    fix_t x, y, xc, yc, zc;
    fix_t e [12];
    logic ok;
    for (int k = 0; k < 12; k++) e[k] = p.extr[k];
    ok = m_deproject(u, v, d, p.depth, p.depth_scale, x, y, zd);
    m_rigid(e, x, y, zd, xc, yc, zc);
    return m_project(xc, yc, zc, p.color, w, h, addr) && ok;
  endfunction

  function automatic real fx2r(fix_t f);
    return real'(f) / 65536.0;
  endfunction

  // The same mapping in double precision.  Returns 1 when it writes.
  function automatic logic real_pixel(input int u, input int v, input int d, input cam_params_t p,
                                      input int w, input int h, output int addr);
    real z, x, y, xc, yc, zc, uc, vc, s;
    int ui, vi;
    s  = real'(p.depth_scale) / 4294967296.0;
    z  = d * s;
    x  = (u - fx2r(p.depth.px)) * z / fx2r(p.depth.fx);
    y  = (v - fx2r(p.depth.py)) * z / fx2r(p.depth.fy);
    xc = fx2r(p.extr[0]) * x + fx2r(p.extr[1]) * y + fx2r(p.extr[2])  * z + fx2r(p.extr[3]);
    yc = fx2r(p.extr[4]) * x + fx2r(p.extr[5]) * y + fx2r(p.extr[6])  * z + fx2r(p.extr[7]);
    zc = fx2r(p.extr[8]) * x + fx2r(p.extr[9]) * y + fx2r(p.extr[10]) * z + fx2r(p.extr[11]);
    addr = -1;
    if (zc <= 0.0) return 1'b0;
    uc = fx2r(p.color.fx) * xc / zc + fx2r(p.color.px);
    vc = fx2r(p.color.fy) * yc / zc + fx2r(p.color.py);
    if (uc <= -1.0 || vc <= -1.0) return 1'b0;
    ui = int'($rtoi(uc));
    vi = int'($rtoi(vc));
    addr = vi * w + ui;
    return (ui < w) && (vi < h);
  endfunction

  // Q16.16 encoding of a real value (round to nearest).
  function automatic fix_t r2fx(real r);
    return fix_t'($rtoi(r * 65536.0 + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

endpackage
