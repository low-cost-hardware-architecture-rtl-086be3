// lia_lerp_entry - linear interpolation of one matrix entry.
//
// h = base + floor(inc * z_loc / 2^ZL_W), with base and inc signed fixed-point
// numbers of W bits in the same format and z_loc an unsigned ZL_W-bit offset
// inside the depth interval.  The product keeps all its bits until the single
// arithmetic right shift, so the only rounding is that final truncation toward
// minus infinity; the sum wraps at W bits, so the parameters must be chosen so
// that H(Z) stays inside the entry's range.  Combinational; used eight times
// by lia_interp.  The form base + fraction * increment (one multiplier per
// entry) is the design's; the truncation is this implementation's choice.
module lia_lerp_entry #(
  parameter int unsigned W    = 19,
  parameter int unsigned ZL_W = 7
) (
  input  logic signed [W-1:0]  base,
  input  logic signed [W-1:0]  inc,
  input  logic [ZL_W-1:0]      z_loc,
  output logic signed [W-1:0]  h
);

  logic signed [W+ZL_W:0] prod;
  logic signed [W+ZL_W:0] step;
  logic signed [W+ZL_W:0] sum;

  always_comb begin
    prod = inc * $signed({1'b0, z_loc});
    step = prod >>> ZL_W;
    sum  = step + (W+ZL_W+1)'(base);
    h    = sum[W-1:0];
  end

endmodule
