// warp_scene_pkg - exact homographies of a two-camera rig, for accuracy tests.
//
// Both cameras share the intrinsics K (focal length 1900 pixels, principal
// point (512, 384)); the virtual camera is panned by 2 degrees (R) and
// displaced by t = (-20, 0.5, 0.3).  A pixel u of the source view on the depth
// plane d maps to K (R K^-1 u + t / d), so for a fixed d
//     H(d) = K R K^-1 + (K t / d) e3^T,
// normalised so that its bottom-right entry is 1.  Depth levels Z = 0..255
// are spaced uniformly in 1/d between z_far = 130 (Z = 0) and z_near = 42
// (Z = 255).  Also gives the LIA parameters of an interval and quantisation of
// an entry to a number of fraction bits.
package warp_scene_pkg;

  localparam real F = 1900.0, CX = 512.0, CY = 384.0;
  localparam real ZNEAR = 42.0, ZFAR = 130.0;
  localparam real PAN = 2.0 * 3.14159265358979 / 180.0;
  localparam real TX = -20.0, TY = 0.5, TZ = 0.3;

  // entry e (0..7 = xx, xy, xi, yx, yy, yi, ix, iy) of the exact H at depth z
  function automatic real h_exact(int e, real z);
    real k [3][3], kinv [3][3], r [3][3], m [3][3], h [3][3];
    real tk [3];
    real inv_d;
    k    = '{'{F, 0.0, CX}, '{0.0, F, CY}, '{0.0, 0.0, 1.0}};
    kinv = '{'{1.0 / F, 0.0, -CX / F}, '{0.0, 1.0 / F, -CY / F}, '{0.0, 0.0, 1.0}};
    r    = '{'{$cos(PAN), 0.0, $sin(PAN)}, '{0.0, 1.0, 0.0}, '{-$sin(PAN), 0.0, $cos(PAN)}};
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        m[i][j] = 0.0;
        for (int l = 0; l < 3; l++) m[i][j] += r[i][l] * kinv[l][j];
      end
    for (int i = 0; i < 3; i++) begin
      tk[i] = k[i][0] * TX + k[i][1] * TY + k[i][2] * TZ;
      for (int j = 0; j < 3; j++) begin
        h[i][j] = 0.0;
        for (int l = 0; l < 3; l++) h[i][j] += k[i][l] * m[l][j];
      end
    end
    inv_d = z / 255.0 * (1.0 / ZNEAR - 1.0 / ZFAR) + 1.0 / ZFAR;
    for (int i = 0; i < 3; i++) h[i][2] += tk[i] * inv_d;
    return h[e / 3][e % 3] / h[2][2];
  endfunction

  // exact warped position of pixel (x, y) at depth z
  function automatic void warp_exact(int z, int x, int y, output real tx, output real ty);
    real xp, yp, wp, zr;
    zr = real'(z);
    xp = h_exact(0, zr) * x + h_exact(1, zr) * y + h_exact(2, zr);
    yp = h_exact(3, zr) * x + h_exact(4, zr) * y + h_exact(5, zr);
    wp = h_exact(6, zr) * x + h_exact(7, zr) * y + 1.0;
    tx = xp / wp;
    ty = yp / wp;
  endfunction

  // LIA-n head (is_inc = 0) or increment (is_inc = 1) value of entry e for
  // interval k of length len: H(k*len) and len/(len-1) * (H(k*len+len-1) - H(k*len))
  function automatic real lia_value(int e, int k, int len, bit is_inc);
    real hb = h_exact(e, real'(k * len));
    real ht = h_exact(e, real'(k * len + len - 1));
    return is_inc ? (ht - hb) * real'(len) / real'(len - 1) : hb;
  endfunction

  // round v to frac fraction bits, as an integer
  function automatic longint quant(real v, int frac);
    return longint'($floor(v * real'(longint'(1) << frac) + 0.5));
  endfunction

endpackage
