// warp_ref_pkg - reference arithmetic for the warping engine testbenches.
//
// Works on 64-bit integers and reals, independently of the RTL's bit-level
// structure: the interpolation floor is taken on a real quotient, the
// perspective division uses the integer '/' operator, and rounding is
// floor(q + 1/2) on the magnitude.  Formats as in warp_pkg (fraction bits
// 15 / 5 / 24 for groups A / B / C).
package warp_ref_pkg;
  import warp_pkg::*;

  // sign-extend the low w bits of v
  function automatic longint sext(longint v, int w);
    longint m = longint'(1) << w;
    longint r = v & (m - 1);
    if (r >= (m >> 1)) r -= m;
    return r;
  endfunction

  // entry of H(Z) = base + floor(inc * zloc / 2^zl_w), wrapped to w bits
  function automatic longint ref_lerp(longint base, longint inc, int zloc, int zl_w, int w);
    real    f = real'(inc) * real'(zloc) / real'(longint'(1) << zl_w);
    longint s = longint'($floor(f));
    return sext(base + s, w);
  endfunction

  function automatic hmat_t ref_interp(hmat_t b, hmat_t i, int zloc, int zl_w);
    hmat_t h;
    h.xx = W_A'(ref_lerp(longint'(b.xx), longint'(i.xx), zloc, zl_w, W_A));
    h.xy = W_A'(ref_lerp(longint'(b.xy), longint'(i.xy), zloc, zl_w, W_A));
    h.xi = W_B'(ref_lerp(longint'(b.xi), longint'(i.xi), zloc, zl_w, W_B));
    h.yx = W_A'(ref_lerp(longint'(b.yx), longint'(i.yx), zloc, zl_w, W_A));
    h.yy = W_A'(ref_lerp(longint'(b.yy), longint'(i.yy), zloc, zl_w, W_A));
    h.yi = W_B'(ref_lerp(longint'(b.yi), longint'(i.yi), zloc, zl_w, W_B));
    h.ix = W_C'(ref_lerp(longint'(b.ix), longint'(i.ix), zloc, zl_w, W_C));
    h.iy = W_C'(ref_lerp(longint'(b.iy), longint'(i.iy), zloc, zl_w, W_C));
    return h;
  endfunction

  function automatic hvec_t ref_matvec(hmat_t h, int x1, int y1);
    hvec_t v;
    longint xp, yp, wp;
    xp = longint'(h.xx) * x1 + longint'(h.xy) * y1 + longint'(h.xi) * (longint'(1) << (FRAC_A_DEF - FRAC_B_DEF));
    yp = longint'(h.yx) * x1 + longint'(h.yy) * y1 + longint'(h.yi) * (longint'(1) << (FRAC_A_DEF - FRAC_B_DEF));
    wp = longint'(h.ix) * x1 + longint'(h.iy) * y1 + (longint'(1) << FRAC_C_DEF);
    v.xp = XP_W'(xp);
    v.yp = XP_W'(yp);
    v.wp = WP_W'(wp);
    return v;
  endfunction

  // one coordinate of the division: returns the value, sets sat
  function automatic longint ref_div1(longint num, longint den, int out_w, int out_frac,
                                      output bit sat);
    longint mag, maxmag, scaled;
    bit     neg = (num < 0);
    maxmag = (longint'(1) << (out_w - 1)) - 1;
    scaled = (neg ? -num : num) * (longint'(1) << (FRAC_C_DEF - FRAC_A_DEF + out_frac));
    mag    = (2 * scaled + den) / (2 * den);
    sat    = (mag > maxmag);
    if (sat) mag = maxmag;
    return neg ? -mag : mag;
  endfunction

  typedef struct {
    longint x2;
    longint y2;
    bit     ovf;
    bit     behind;
  } ref_out_t;

  function automatic ref_out_t ref_divide(hvec_t v, int out_w, int out_frac);
    ref_out_t o;
    bit sx, sy;
    longint den = longint'(v.wp);
    if (den <= 0) begin
      o.x2 = 0; o.y2 = 0; o.ovf = 0; o.behind = 1;
    end else begin
      o.x2 = ref_div1(longint'(v.xp), den, out_w, out_frac, sx);
      o.y2 = ref_div1(longint'(v.yp), den, out_w, out_frac, sy);
      o.ovf = sx | sy;
      o.behind = 0;
    end
    return o;
  endfunction

endpackage
