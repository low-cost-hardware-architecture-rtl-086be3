// lia_interp - linear interpolation block of the H matrix rendering stage.
//
// Given the head matrix H_base,k and increment matrix H_inc,k of the depth
// interval that Z falls in, and the offset z_loc of Z inside that interval,
// it renders the approximate homography
//     H(Z) = H_base,k + z_loc / 2^ZL_W * H_inc,k
// for all eight non-constant entries (one lia_lerp_entry, i.e. one small
// multiplier and one adder, per entry).  For LIA-2, ZL_W = 7 and the division
// by 128 is a shift.  Base-plus-scaled-increment rather than a weighted sum of
// head and tail matrices saves one multiplier per entry.
//
// Timing: one clock.  in_valid/z_loc/base/inc are sampled at a rising edge,
// h and out_valid show the result after it.  Matrices are packed hm_t values
// (warp_types.svh) for the fraction widths FRAC_A/B/C.  No back-pressure: a new input may
// come every clock.  The register at the output is this implementation's.
module lia_interp
  import warp_pkg::*;
#(
  parameter int unsigned ZL_W   = 7,
  parameter int unsigned FRAC_A = warp_pkg::FRAC_A_DEF,
  parameter int unsigned FRAC_B = warp_pkg::FRAC_B_DEF,
  parameter int unsigned FRAC_C = warp_pkg::FRAC_C_DEF
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     in_valid,
  input  logic [hmat_w(FRAC_A, FRAC_B, FRAC_C)-1:0] base,
  input  logic [hmat_w(FRAC_A, FRAC_B, FRAC_C)-1:0] inc,
  input  logic [ZL_W-1:0]                          z_loc,
  output logic                                     out_valid,
  output logic [hmat_w(FRAC_A, FRAC_B, FRAC_C)-1:0] h
);

  `include "warp_types.svh"

  hm_t b, i, h_d;

  assign b = hm_t'(base);
  assign i = hm_t'(inc);

  lia_lerp_entry #(.W(LW_A), .ZL_W(ZL_W)) u_xx (.base(b.xx), .inc(i.xx), .z_loc, .h(h_d.xx));
  lia_lerp_entry #(.W(LW_A), .ZL_W(ZL_W)) u_xy (.base(b.xy), .inc(i.xy), .z_loc, .h(h_d.xy));
  lia_lerp_entry #(.W(LW_B), .ZL_W(ZL_W)) u_xi (.base(b.xi), .inc(i.xi), .z_loc, .h(h_d.xi));
  lia_lerp_entry #(.W(LW_A), .ZL_W(ZL_W)) u_yx (.base(b.yx), .inc(i.yx), .z_loc, .h(h_d.yx));
  lia_lerp_entry #(.W(LW_A), .ZL_W(ZL_W)) u_yy (.base(b.yy), .inc(i.yy), .z_loc, .h(h_d.yy));
  lia_lerp_entry #(.W(LW_B), .ZL_W(ZL_W)) u_yi (.base(b.yi), .inc(i.yi), .z_loc, .h(h_d.yi));
  lia_lerp_entry #(.W(LW_C), .ZL_W(ZL_W)) u_ix (.base(b.ix), .inc(i.ix), .z_loc, .h(h_d.ix));
  lia_lerp_entry #(.W(LW_C), .ZL_W(ZL_W)) u_iy (.base(b.iy), .inc(i.iy), .z_loc, .h(h_d.iy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      h         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) h <= h_d;
    end
  end

endmodule
