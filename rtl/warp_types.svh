// warp_types.svh - fixed-point types of the warping engine, declared inside a
// module for that module's fraction widths.  The including module must have
// the parameters FRAC_A, FRAC_B and FRAC_C (fraction bits of groups A, B, C)
// and import warp_pkg.  Declares the entry widths LW_A, LW_B, LW_C, the
// homogeneous-vector widths LXP_W, LWP_W, the matrix type hm_t (eight entries
// in the order xx, xy, xi, yx, yy, yi, ix, iy) and the vector type hv_t
// (x2', y2' with FRAC_A fraction bits, w2' with FRAC_C).  Their packed layout
// equals warp_pkg's hmat_t and hvec_t at the default widths.
localparam int unsigned LW_A  = INT_A + FRAC_A;
localparam int unsigned LW_B  = INT_B + FRAC_B;
localparam int unsigned LW_C  = INT_C + FRAC_C;
localparam int unsigned LXP_W = LW_A + COORD_W + 3;
localparam int unsigned LWP_W = LW_C + COORD_W + 3;

typedef struct packed {
  logic signed [LW_A-1:0] xx;
  logic signed [LW_A-1:0] xy;
  logic signed [LW_B-1:0] xi;
  logic signed [LW_A-1:0] yx;
  logic signed [LW_A-1:0] yy;
  logic signed [LW_B-1:0] yi;
  logic signed [LW_C-1:0] ix;
  logic signed [LW_C-1:0] iy;
} hm_t;

typedef struct packed {
  logic signed [LXP_W-1:0] xp;
  logic signed [LXP_W-1:0] yp;
  logic signed [LWP_W-1:0] wp;
} hv_t;
