// vector_division - perspective division of the vector transform stage.
//
// Turns the homogeneous vector (x2', y2', w2') into the warped pixel position
//     x2 = x2' / w2',  y2 = y2' / w2'
// with two pipelined dividers sharing the divisor w2'.  x2' and y2' carry
// FRAC_A (15) fraction bits and w2' FRAC_C (24) (v is a packed hv_t value,
// warp_types.svh), so each numerator magnitude
// is scaled by 2^(FRAC_C - FRAC_A + OUT_FRAC + 1) to give a quotient with
// OUT_FRAC fraction bits plus one rounding bit.  The result is rounded to the
// nearest (halves away from zero) and given the numerator's sign.
//
// Results that do not fit the OUT_W-bit signed output saturate and raise
// out_ovf.  A divisor w2' <= 0 (the point lies at or behind the virtual
// camera's plane) raises out_behind; x2 and y2 are then forced to 0.
//
// Timing: fully pipelined, one pixel per clock, LAT = OUT_W + 3 clocks from
// in_valid to out_valid (16 by default): one input stage (magnitudes), OUT_W + 1 divider
// stages (QB = OUT_W quotient bits: OUT_W - 1 magnitude bits and the rounding
// bit) and one output stage (rounding, sign, saturation).  The division is the
// design's; the divider structure, rounding, saturation and the two flags are
// this implementation's choices.  An assertion checks that both dividers
// run in lockstep; it is disabled during reset, which is why lint tools see
// rst_n used both asynchronously and synchronously here.
module vector_division
  import warp_pkg::*;
#(
  parameter int unsigned OUT_W    = 13,  // signed output, OUT_FRAC fraction bits
  parameter int unsigned OUT_FRAC = 0,
  parameter int unsigned FRAC_A   = warp_pkg::FRAC_A_DEF,
  parameter int unsigned FRAC_B   = warp_pkg::FRAC_B_DEF,
  parameter int unsigned FRAC_C   = warp_pkg::FRAC_C_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [hvec_w(FRAC_A, FRAC_C)-1:0] v,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] x2,
  output logic signed [OUT_W-1:0] y2,
  output logic                    out_ovf,
  output logic                    out_behind
);

  `include "warp_types.svh"

  if (FRAC_A > FRAC_C + OUT_FRAC + 1) begin : g_bad_frac
    $error("vector_division: FRAC_A too large for FRAC_C and OUT_FRAC");
  end

  localparam int unsigned SH = FRAC_C - FRAC_A + OUT_FRAC + 1;  // numerator scale
  localparam int unsigned NW = LXP_W - 1 + SH;                  // |x2'| * 2^SH
  localparam int unsigned DW = LWP_W - 1;                       // w2' > 0
  localparam int unsigned QB = OUT_W;                           // quotient bits
  localparam logic [OUT_W-1:0] MAXMAG = {1'b0, {(OUT_W-1){1'b1}}};

  // ---- input stage: magnitudes and signs --------------------------------
  logic          s0_valid, s0_behind, s0_negx, s0_negy;
  logic [NW-1:0] s0_nx, s0_ny;
  logic [DW-1:0] s0_d;

  hv_t hv;
  assign hv = hv_t'(v);

  function automatic logic [NW-1:0] scaled_mag(logic signed [LXP_W-1:0] a);
    logic [LXP_W-1:0] m;
    m = a[LXP_W-1] ? LXP_W'(-a) : LXP_W'(a);
    return NW'(m) << SH;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_valid  <= 1'b0;
      s0_behind <= 1'b0;
      s0_negx   <= 1'b0;
      s0_negy   <= 1'b0;
      s0_nx     <= '0;
      s0_ny     <= '0;
      s0_d      <= '0;
    end else begin
      s0_valid  <= in_valid;
      s0_behind <= (hv.wp <= 0);
      s0_negx   <= hv.xp[LXP_W-1];
      s0_negy   <= hv.yp[LXP_W-1];
      s0_nx     <= scaled_mag(hv.xp);
      s0_ny     <= scaled_mag(hv.yp);
      // a non-positive divisor is replaced by 1 to keep the divider defined
      s0_d      <= (hv.wp <= 0) ? DW'(1) : hv.wp[DW-1:0];
    end
  end

  // ---- dividers -----------------------------------------------------------
  logic          dx_valid, dy_valid, dx_ovf, dy_ovf;
  logic [QB-1:0] qx, qy;
  logic [2:0]    tag_out, tag_unused;

  pipe_div #(.NW(NW), .DW(DW), .QB(QB), .TAG_W(3)) u_div_x (
    .clk, .rst_n,
    .in_valid(s0_valid), .n(s0_nx), .d(s0_d),
    .in_tag({s0_behind, s0_negx, s0_negy}),
    .out_valid(dx_valid), .q(qx), .ovf(dx_ovf), .out_tag(tag_out)
  );

  pipe_div #(.NW(NW), .DW(DW), .QB(QB), .TAG_W(3)) u_div_y (
    .clk, .rst_n,
    .in_valid(s0_valid), .n(s0_ny), .d(s0_d),
    .in_tag(3'b000),
    .out_valid(dy_valid), .q(qy), .ovf(dy_ovf), .out_tag(tag_unused)
  );

  // both dividers see the same valid stream
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) dx_valid == dy_valid);

  // ---- output stage: round, saturate, sign --------------------------------
  function automatic logic signed [OUT_W-1:0] finish(logic [QB-1:0] q, logic ovf, logic neg,
                                                     output logic sat);
    logic [QB:0]      rounded;
    logic [OUT_W-1:0] mag;
    rounded = ({1'b0, q} + 1'b1) >> 1;
    sat     = ovf || (rounded > (QB+1)'(MAXMAG));
    mag     = sat ? MAXMAG : rounded[OUT_W-1:0];
    return neg ? -$signed(mag) : $signed(mag);
  endfunction

  logic signed [OUT_W-1:0] fx, fy;
  logic                    satx, saty;

  always_comb begin
    fx = finish(qx, dx_ovf, tag_out[1], satx);
    fy = finish(qy, dy_ovf, tag_out[0], saty);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      x2         <= '0;
      y2         <= '0;
      out_ovf    <= 1'b0;
      out_behind <= 1'b0;
    end else begin
      out_valid  <= dx_valid;
      out_behind <= dx_valid & tag_out[2];
      out_ovf    <= dx_valid & ~tag_out[2] & (satx | saty);
      x2         <= tag_out[2] ? '0 : fx;
      y2         <= tag_out[2] ? '0 : fy;
    end
  end

endmodule
