// warp_engine - low-cost pixel-to-pixel 3D warping engine (homographic DIBR).
//
// For every pixel (x1, y1) of the original view with depth Z, the engine finds
// its position (x2, y2) on a synthesized view as
//     (x2', y2', w2') = H(Z) * (x1, y1, 1),   x2 = x2'/w2',  y2 = y2'/w2'.
// Instead of a 256-entry lookup table of homographies, the H matrix rendering
// stage keeps only a head and an increment matrix per depth interval (LIA-n,
// N_INT intervals, LIA-2 by default) and rebuilds H(Z) by linear interpolation:
//     lia_param_bank -> lia_selector -> lia_interp
// The vector transform stage then applies it:
//     ht_matvec (6 multipliers, 6 adders) -> vector_division (2 dividers).
// Entries use the fitted fraction widths (FRAC_A / FRAC_B / FRAC_C = 15 / 5 /
// 24 bits for groups A / B / C); other widths can be set for precision studies
// (FRAC_B <= FRAC_A <= FRAC_C + OUT_FRAC + 1).
//
// Interface: the cfg_* port writes one entry of H_base,k or H_inc,k per clock
// (see lia_param_bank).  Pixels stream in on in_valid / in_z / in_x1 / in_y1,
// one per clock with no back-pressure, and come out in order on out_valid /
// out_x2 / out_y2 (signed, OUT_FRAC fraction bits) with out_ovf (position
// saturated to the output range) and out_behind (w2' <= 0, position forced to
// 0).  Latency 2 + OUT_W + 3 clocks (18 by default).  A parameter write
// affects pixels entering on the following clocks.
//
// The two-stage structure, LIA-2 and the fraction widths follow the design;
// integer widths, coordinate width, the output format, rounding, the flags, the
// configuration port and the pipeline registers are this implementation's.
module warp_engine
  import warp_pkg::*;
#(
  parameter int unsigned N_INT    = 2,   // LIA-n interval count
  parameter int unsigned OUT_W    = 13,  // signed output coordinate width
  parameter int unsigned OUT_FRAC = 0,   // output fraction bits
  parameter int unsigned IDX_W    = (N_INT > 1) ? $clog2(N_INT) : 1,
  parameter int unsigned FRAC_A   = warp_pkg::FRAC_A_DEF,  // fraction bits, group A
  parameter int unsigned FRAC_B   = warp_pkg::FRAC_B_DEF,  // group B
  parameter int unsigned FRAC_C   = warp_pkg::FRAC_C_DEF   // group C
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // parameter loading
  input  logic                    cfg_we,
  input  logic [IDX_W-1:0]        cfg_int,
  input  logic                    cfg_inc,
  input  entry_e                  cfg_entry,
  input  logic [entry_w_max(FRAC_A, FRAC_B, FRAC_C)-1:0] cfg_data,
  // pixel stream in
  input  logic                    in_valid,
  input  logic [Z_W-1:0]          in_z,
  input  logic [COORD_W-1:0]      in_x1,
  input  logic [COORD_W-1:0]      in_y1,
  // warped position out
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_x2,
  output logic signed [OUT_W-1:0] out_y2,
  output logic                    out_ovf,
  output logic                    out_behind
);

  localparam int unsigned ZL_W = Z_W - $clog2(N_INT);
  localparam int unsigned HM_W = hmat_w(FRAC_A, FRAC_B, FRAC_C);
  localparam int unsigned HV_W = hvec_w(FRAC_A, FRAC_C);

  // ---- H matrix rendering stage -------------------------------------------
  logic [HM_W-1:0] hbase [N_INT];
  logic [HM_W-1:0] hinc  [N_INT];
  logic [HM_W-1:0] sel_base, sel_inc;
  logic [ZL_W-1:0] z_loc;
  logic            h_valid;
  logic [HM_W-1:0] h;
  logic [COORD_W-1:0] x1_q, y1_q;

  lia_param_bank #(
    .N_INT(N_INT), .IDX_W(IDX_W), .FRAC_A(FRAC_A), .FRAC_B(FRAC_B), .FRAC_C(FRAC_C)
  ) u_bank (
    .clk, .rst_n,
    .cfg_we, .cfg_int, .cfg_inc, .cfg_entry, .cfg_data,
    .hbase, .hinc
  );

  lia_selector #(.N_INT(N_INT), .HM_W(HM_W)) u_sel (
    .z(in_z), .hbase, .hinc, .sel_base, .sel_inc, .z_loc
  );

  lia_interp #(
    .ZL_W(ZL_W), .FRAC_A(FRAC_A), .FRAC_B(FRAC_B), .FRAC_C(FRAC_C)
  ) u_interp (
    .clk, .rst_n,
    .in_valid, .base(sel_base), .inc(sel_inc), .z_loc,
    .out_valid(h_valid), .h
  );

  // pixel coordinates wait one clock alongside the interpolation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1_q <= '0;
      y1_q <= '0;
    end else if (in_valid) begin
      x1_q <= in_x1;
      y1_q <= in_y1;
    end
  end

  // ---- vector transform stage ----------------------------------------------
  logic            v_valid;
  logic [HV_W-1:0] v;

  ht_matvec #(.FRAC_A(FRAC_A), .FRAC_B(FRAC_B), .FRAC_C(FRAC_C)) u_matvec (
    .clk, .rst_n,
    .in_valid(h_valid), .h, .x1(x1_q), .y1(y1_q),
    .out_valid(v_valid), .v
  );

  vector_division #(
    .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC), .FRAC_A(FRAC_A), .FRAC_B(FRAC_B), .FRAC_C(FRAC_C)
  ) u_div (
    .clk, .rst_n,
    .in_valid(v_valid), .v,
    .out_valid, .x2(out_x2), .y2(out_y2), .out_ovf, .out_behind
  );

endmodule
