// tb_vector_division - self-checking test of the perspective division.
//
// Streams homogeneous vectors through the two dividers: ordinary ones (w2'
// near 1, results inside the 13-bit output), exact halves (rounding away from
// zero), ones whose quotient overflows (saturation, out_ovf) and ones with
// w2' <= 0 (out_behind).  A scoreboard compares every result with integer
// division done in the testbench and checks that each one leaves exactly
// LAT = OUT_W + 3 clocks after it entered, with inputs on every clock in a
// burst and with random gaps afterwards.
module tb_vector_division;
  import warp_pkg::*;
  import warp_ref_pkg::*;

  localparam int unsigned OUT_W    = 13;
  localparam int unsigned OUT_FRAC = 0;
  localparam int unsigned LAT      = OUT_W + 3;

  logic                    clk = 0, rst_n = 0;
  logic                    in_valid = 0;
  hvec_t                   v = '0;
  logic                    out_valid;
  logic signed [OUT_W-1:0] x2, y2;
  logic                    out_ovf, out_behind;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_behind = 0, n_tie = 0;
  longint cycle = 0;

  vector_division #(.OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    ref_out_t o;
    longint   t_in;
  } item_t;
  item_t sb[$];

  function automatic longint srand(longint lim);   // uniform in [-lim, lim]
    longint r = longint'({$urandom, $urandom} & 64'h7fff_ffff_ffff_ffff);
    return (r % (2 * lim + 1)) - lim;
  endfunction

  function automatic hvec_t make_vec(int kind);
    hvec_t  r;
    longint wp, xp, yp;
    case (kind)
      0: begin  // ordinary: w2' in [0.5, 2), |x2| below the output range
        wp = (longint'(1) << 23) + longint'($urandom_range(0, 3 * (1 << 23)));
        xp = srand((longint'(4000) * wp) >>> 9);
        yp = srand((longint'(4000) * wp) >>> 9);
      end
      1: begin  // exact halves: w2' = 1, x2' = (k + 1/2)
        wp = longint'(1) << FRAC_C_DEF;
        xp = (2 * srand(2000) + 1) * (longint'(1) << (FRAC_A_DEF - 1));
        yp = (2 * srand(2000) + 1) * (longint'(1) << (FRAC_A_DEF - 1));
      end
      2: begin  // quotient out of range
        wp = longint'($urandom_range(1, 1 << 20));
        xp = srand(longint'(1) << 31);
        yp = srand(longint'(1) << 20);
      end
      default: begin  // behind the camera plane
        wp = -longint'($urandom_range(0, 1 << 24));
        xp = srand(longint'(1) << 28);
        yp = srand(longint'(1) << 28);
      end
    endcase
    r.xp = XP_W'(xp);
    r.yp = XP_W'(yp);
    r.wp = WP_W'(wp);
    return r;
  endfunction

  // scoreboard: compare on every clock
  always @(negedge clk) if (rst_n && out_valid) begin
    item_t it;
    checks++;
    if (sb.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      it = sb.pop_front();
      if (cycle - it.t_in != longint'(LAT)) begin
        failures++;
        if (failures < 10) $display("latency %0d, expected %0d", cycle - it.t_in, LAT);
      end
      if (longint'(x2) != it.o.x2 || longint'(y2) != it.o.y2 ||
          out_ovf != it.o.ovf || out_behind != it.o.behind) begin
        failures++;
        if (failures < 10)
          $display("got (%0d,%0d,ovf=%0b,behind=%0b) expected (%0d,%0d,%0b,%0b)",
                   x2, y2, out_ovf, out_behind, it.o.x2, it.o.y2, it.o.ovf, it.o.behind);
      end
      if (out_ovf) n_ovf++;
      if (out_behind) n_behind++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      int kind;
      @(negedge clk);
      in_valid = (n < 2000) ? 1'b1 : ($urandom_range(0, 2) != 0);
      kind = $urandom_range(0, 9);
      kind = (kind < 6) ? 0 : (kind < 8) ? 1 : (kind < 9) ? 2 : 3;
      if (kind == 1) n_tie++;
      v = make_vec(kind);
      if (in_valid) begin
        item_t it;
        it.o    = ref_divide(v, OUT_W, OUT_FRAC);
        it.t_in = cycle;
        sb.push_back(it);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("%0d results missing", sb.size());
    end
    checks++;
    if (n_ovf == 0 || n_behind == 0 || n_tie == 0) begin
      failures++;
      $display("a case never occurred: ovf=%0d behind=%0d ties=%0d", n_ovf, n_behind, n_tie);
    end
    $display("saturated %0d, behind %0d, exact halves %0d", n_ovf, n_behind, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
