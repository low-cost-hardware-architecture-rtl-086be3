// ht_matvec - matrix-vector product of the vector transform stage.
//
// Multiplies the homography H(Z) by the homogeneous source pixel (x1, y1, 1):
//     x2' = hxx*x1 + hxy*y1 + hxi
//     y2' = hyx*x1 + hyy*y1 + hyi
//     w2' = hix*x1 + hiy*y1 + 1
// six multipliers and six adders.  Because x1 and y1 are integers, the
// products keep their entry's fraction bits: x2' and y2' come out with the 15
// fraction bits of group A (hxi / hyi, with 5, are shifted left by 10 to line
// up) and w2' with the 24 fraction bits of group C (the constant 1 is 2^24).
// No bit is dropped, so the result is exact for the given entries.  h and v
// are packed hm_t / hv_t values (warp_types.svh) for the fraction widths
// FRAC_A/B/C (15 / 5 / 24 by default; FRAC_B may not exceed FRAC_A).
//
// Timing: one clock, fully pipelined, a new pixel every clock; in_valid and the
// inputs are sampled at a rising edge, out_valid and v follow it.  The single
// output register is this implementation's choice.
module ht_matvec
  import warp_pkg::*;
#(
  parameter int unsigned FRAC_A = warp_pkg::FRAC_A_DEF,
  parameter int unsigned FRAC_B = warp_pkg::FRAC_B_DEF,
  parameter int unsigned FRAC_C = warp_pkg::FRAC_C_DEF
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     in_valid,
  input  logic [hmat_w(FRAC_A, FRAC_B, FRAC_C)-1:0] h,
  input  logic [COORD_W-1:0]                       x1,
  input  logic [COORD_W-1:0]                       y1,
  output logic                                     out_valid,
  output logic [hvec_w(FRAC_A, FRAC_C)-1:0]        v
);

  `include "warp_types.svh"

  localparam int unsigned ALIGN_B = FRAC_A - FRAC_B;  // 10 by default

  if (FRAC_B > FRAC_A) begin : g_bad_frac
    $error("ht_matvec: FRAC_B must not exceed FRAC_A");
  end

  logic signed [COORD_W:0] sx, sy;  // coordinates as non-negative signed
  hm_t m;
  hv_t v_d;

  assign m = hm_t'(h);

  always_comb begin
    sx = $signed({1'b0, x1});
    sy = $signed({1'b0, y1});
    v_d.xp = LXP_W'(m.xx * sx) + LXP_W'(m.xy * sy) + (LXP_W'(m.xi) <<< ALIGN_B);
    v_d.yp = LXP_W'(m.yx * sx) + LXP_W'(m.yy * sy) + (LXP_W'(m.yi) <<< ALIGN_B);
    v_d.wp = LWP_W'(m.ix * sx) + LWP_W'(m.iy * sy) + (LWP_W'(1) <<< FRAC_C);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      v         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) v <= v_d;
    end
  end

endmodule
