// lia_param_bank - storage of the LIA-n interpolation parameters.
//
// Linear-interpolated approximation (LIA-n) cuts the 8-bit depth range into
// N_INT equal intervals and keeps, for each interval k, only a head matrix
// H_base,k (= H at the first depth of the interval) and an increment matrix
// H_inc,k (the change of H across the whole interval).  This block holds those
// 2*N_INT matrices of eight entries each in flip-flops, so that every one is
// available to the interval selector at once; the design's choice of LIA-2
// (N_INT = 2) needs 32 entries instead of the 256 full matrices a lookup table
// would hold.
//
// Interface: one entry is written per clock through the configuration port:
// cfg_we, the interval index cfg_int, cfg_inc (0 = H_base, 1 = H_inc), the
// entry index cfg_entry (warp_pkg::entry_e) and cfg_data, whose low bits (the
// entry's width: 19, 18 or 26 bits at the default fraction widths) are the new
// value in that group's fixed-point format.  Writes to an interval index of
// N_INT or more are ignored.  hbase[k] / hinc[k] are the matrices as packed
// hm_t values (see warp_types.svh).  A write shows on the outputs one clock
// later.  The write port, its timing and reset to all-zero matrices are this
// implementation's choices; the set of stored matrices follows the LIA model.
module lia_param_bank
  import warp_pkg::*;
#(
  parameter int unsigned N_INT  = 2,                          // LIA-n intervals
  parameter int unsigned IDX_W  = (N_INT > 1) ? $clog2(N_INT) : 1,
  parameter int unsigned FRAC_A = warp_pkg::FRAC_A_DEF,           // fraction bits
  parameter int unsigned FRAC_B = warp_pkg::FRAC_B_DEF,
  parameter int unsigned FRAC_C = warp_pkg::FRAC_C_DEF
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic                                          cfg_we,
  input  logic [IDX_W-1:0]                              cfg_int,
  input  logic                                          cfg_inc,
  input  entry_e                                        cfg_entry,
  input  logic [entry_w_max(FRAC_A, FRAC_B, FRAC_C)-1:0] cfg_data,
  output logic [hmat_w(FRAC_A, FRAC_B, FRAC_C)-1:0]      hbase [N_INT],
  output logic [hmat_w(FRAC_A, FRAC_B, FRAC_C)-1:0]      hinc  [N_INT]
);

  `include "warp_types.svh"

  localparam int unsigned DW = entry_w_max(FRAC_A, FRAC_B, FRAC_C);

  hm_t base_q [N_INT];
  hm_t inc_q  [N_INT];

  // writes one entry of one matrix, keeping the rest
  function automatic hm_t put_entry(hm_t m, entry_e e, logic [DW-1:0] d);
    hm_t r = m;
    unique case (e)
      E_XX: r.xx = d[LW_A-1:0];
      E_XY: r.xy = d[LW_A-1:0];
      E_XI: r.xi = d[LW_B-1:0];
      E_YX: r.yx = d[LW_A-1:0];
      E_YY: r.yy = d[LW_A-1:0];
      E_YI: r.yi = d[LW_B-1:0];
      E_IX: r.ix = d[LW_C-1:0];
      E_IY: r.iy = d[LW_C-1:0];
      default: r = m;
    endcase
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_INT; k++) begin
        base_q[k] <= '0;
        inc_q[k]  <= '0;
      end
    end else if (cfg_we && (int'(cfg_int) < N_INT)) begin
      if (cfg_inc) inc_q[cfg_int]  <= put_entry(inc_q[cfg_int],  cfg_entry, cfg_data);
      else         base_q[cfg_int] <= put_entry(base_q[cfg_int], cfg_entry, cfg_data);
    end
  end

  always_comb begin
    for (int k = 0; k < N_INT; k++) begin
      hbase[k] = base_q[k];
      hinc[k]  = inc_q[k];
    end
  end

endmodule
