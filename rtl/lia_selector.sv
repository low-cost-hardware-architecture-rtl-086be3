// lia_selector - picks the LIA-n interval of a depth value.
//
// With N_INT (a power of two) equal intervals over the 8-bit depth Z, the
// interval index k is the top log2(N_INT) bits of Z and the position inside
// the interval is the remaining ZL_W = 8 - log2(N_INT) bits.  The block routes
// H_base,k and H_inc,k of that interval to the linear interpolator together
// with the in-interval offset z_loc = Z - k * 2^ZL_W.  For LIA-2 that is
// Z < 128 -> interval 0 with offset Z, Z >= 128 -> interval 1 with offset
// Z - 128, as in the two-branch LIA-2 formula.
//
// Matrices are packed hm_t values of HM_W bits (warp_types.svh); the block
// only routes them.  Purely combinational; the power-of-two interval count is the design's, the
// bit-slicing realisation is this implementation's.
module lia_selector
  import warp_pkg::*;
#(
  parameter int unsigned N_INT = 2,
  parameter int unsigned LOG2N = $clog2(N_INT),
  parameter int unsigned ZL_W  = Z_W - LOG2N,
  parameter int unsigned HM_W  = hmat_w(FRAC_A_DEF, FRAC_B_DEF, FRAC_C_DEF)  // matrix width
) (
  input  logic [Z_W-1:0]  z,
  input  logic [HM_W-1:0] hbase [N_INT],
  input  logic [HM_W-1:0] hinc  [N_INT],
  output logic [HM_W-1:0] sel_base,
  output logic [HM_W-1:0] sel_inc,
  output logic [ZL_W-1:0] z_loc
);

  // N_INT must be a power of two between 1 and 128
  if ((1 << LOG2N) != N_INT || LOG2N >= Z_W) begin : g_bad_n
    $error("lia_selector: N_INT must be a power of two from 1 to 128");
  end

  if (LOG2N == 0) begin : g_one
    assign sel_base = hbase[0];
    assign sel_inc  = hinc[0];
  end else begin : g_many
    logic [LOG2N-1:0] k;
    assign k        = z[Z_W-1 -: LOG2N];
    assign sel_base = hbase[k];
    assign sel_inc  = hinc[k];
  end

  assign z_loc = z[ZL_W-1:0];

endmodule
