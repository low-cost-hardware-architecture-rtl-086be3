// warp_pkg - number formats and types shared by the 3D warping engine.
//
// The engine warps a pixel (x1, y1) with depth Z of the original view to
// (x2, y2) on the synthesized view by a homographic transform H(Z).  H has
// eight non-constant entries (the bottom-right entry is always 1).  The entries
// fall into three precision groups, each with its own signed fixed-point
// format:
//   group A: hxx, hxy, hyx, hyy   15 fraction bits
//   group B: hxi, hyi              5 fraction bits
//   group C: hix, hiy             24 fraction bits
// The fraction widths are the fitted ones of the design; the integer widths
// (sign included) are this implementation's choice, sized for images up to
// 2048 pixels wide: group A covers [-8, 8), group B [-4096, 4096) pixels and
// group C [-2, 2).  The increment matrices H_inc use the same formats.
// The fraction widths are also parameters of every module (FRAC_A, FRAC_B,
// FRAC_C, defaulting to the values here); the types below have the default
// widths, and warp_types.svh declares the same types for a module's own.
package warp_pkg;

  // depth and pixel coordinates
  localparam int unsigned Z_W     = 8;   // 8-bit depth value, 0..255
  localparam int unsigned COORD_W = 11;  // unsigned x1 / y1, 0..2047

  // fraction bits of the three precision groups
  localparam int unsigned FRAC_A_DEF = 15;
  localparam int unsigned FRAC_B_DEF = 5;
  localparam int unsigned FRAC_C_DEF = 24;

  // integer bits of the three groups, sign bit included
  localparam int unsigned INT_A = 4;
  localparam int unsigned INT_B = 13;
  localparam int unsigned INT_C = 2;

  localparam int unsigned W_A = INT_A + FRAC_A_DEF;  // 19
  localparam int unsigned W_B = INT_B + FRAC_B_DEF;  // 18
  localparam int unsigned W_C = INT_C + FRAC_C_DEF;  // 26

  // widest entry, width of the configuration data bus
  localparam int unsigned W_MAX = (W_A > W_B) ? ((W_A > W_C) ? W_A : W_C)
                                              : ((W_B > W_C) ? W_B : W_C);

  // homogeneous vector: x2', y2' carry FRAC_A_DEF fraction bits, w2' FRAC_C_DEF
  localparam int unsigned XP_W = W_A + COORD_W + 3;  // 33
  localparam int unsigned WP_W = W_C + COORD_W + 3;  // 40

  // widths for other fraction widths (fa, fb, fc of groups A, B, C):
  // one entry, a whole matrix (8 entries) and a homogeneous vector
  function automatic int unsigned entry_w_max(int unsigned fa, int unsigned fb, int unsigned fc);
    int unsigned wa = INT_A + fa, wb = INT_B + fb, wc = INT_C + fc;
    return (wa > wb) ? ((wa > wc) ? wa : wc) : ((wb > wc) ? wb : wc);
  endfunction

  function automatic int unsigned hmat_w(int unsigned fa, int unsigned fb, int unsigned fc);
    return 4 * (INT_A + fa) + 2 * (INT_B + fb) + 2 * (INT_C + fc);
  endfunction

  function automatic int unsigned hvec_w(int unsigned fa, int unsigned fc);
    return 2 * (INT_A + fa + COORD_W + 3) + (INT_C + fc + COORD_W + 3);
  endfunction

  // index of each entry on the configuration port
  typedef enum logic [2:0] {
    E_XX = 3'd0, E_XY = 3'd1, E_XI = 3'd2,
    E_YX = 3'd3, E_YY = 3'd4, E_YI = 3'd5,
    E_IX = 3'd6, E_IY = 3'd7
  } entry_e;

  // the eight non-constant entries of H (or of H_base / H_inc), default widths;
  // modules built for other fraction widths use warp_types.svh
  typedef struct packed {
    logic signed [W_A-1:0] xx;
    logic signed [W_A-1:0] xy;
    logic signed [W_B-1:0] xi;
    logic signed [W_A-1:0] yx;
    logic signed [W_A-1:0] yy;
    logic signed [W_B-1:0] yi;
    logic signed [W_C-1:0] ix;
    logic signed [W_C-1:0] iy;
  } hmat_t;

  // homogeneous result of H * (x1, y1, 1)
  typedef struct packed {
    logic signed [XP_W-1:0] xp;  // x2' (FRAC_A_DEF fraction bits)
    logic signed [XP_W-1:0] yp;  // y2' (FRAC_A_DEF fraction bits)
    logic signed [WP_W-1:0] wp;  // w2' (FRAC_C_DEF fraction bits)
  } hvec_t;

endpackage
