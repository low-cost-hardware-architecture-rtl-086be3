// tb_precision_fit - fraction-width sweep of the LIA-2 engine (precision fitting).
//
// Eight LIA-2 engines run side by side, engine i with fraction widths
//     group A = 10 + i,  group B = i,  group C = 19 + i      (i = 0..7),
// i.e. from 10/0/19 to 17/7/26 bits, the default 15/5/24 being i = 5.  Each is
// loaded with the LIA-2 parameters of the warp_scene_pkg camera rig, quantised
// to its own widths, and all warp the same 512 x 384 grid of pixels of a
// 1024 x 768 view (every second row and column) with a smooth synthetic depth
// map, one pixel per clock, sub-pixel output with 4 fraction bits.  Every
// output is compared bit-exactly with a width-generic integer reference, and
// the average distance to the exact warp is reported per width set.  Checks:
// the error does not grow with wider fractions (beyond 0.01 pixel of noise),
// the narrowest set is clearly worse than the default, and the default is
// within 0.01 pixel of the widest set, i.e. past the point where more
// fraction bits stop paying off.
module tb_precision_fit;
  import warp_pkg::*;
  import warp_scene_pkg::*;

  localparam int unsigned OUT_W    = 17;
  localparam int unsigned OUT_FRAC = 4;
  localparam int unsigned LAT      = 2 + OUT_W + 3;
  localparam int          NS       = 8;   // width sets
  localparam int          DEF_SET  = 5;   // 15 / 5 / 24
  localparam int          IMG_W    = 1024;
  localparam int          IMG_H    = 768;

  logic               clk = 0, rst_n = 0;
  logic               cfg_we [NS];
  logic               cfg_int = 0;
  logic               cfg_inc = 0;
  entry_e             cfg_entry = E_XX;
  logic [63:0]        cfg_data = '0;
  logic               in_valid = 0;
  logic [Z_W-1:0]     in_z = '0;
  logic [COORD_W-1:0] in_x1 = '0, in_y1 = '0;
  logic                    out_valid [NS];
  logic signed [OUT_W-1:0] out_x2 [NS], out_y2 [NS];
  logic                    out_ovf [NS], out_behind [NS];

  for (genvar i = 0; i < NS; i++) begin : g_eng
    localparam int unsigned FA = 10 + i, FB = i, FC = 19 + i;
    localparam int unsigned DW = entry_w_max(FA, FB, FC);
    warp_engine #(.N_INT(2), .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC),
                  .FRAC_A(FA), .FRAC_B(FB), .FRAC_C(FC)) u_eng (
      .clk, .rst_n,
      .cfg_we(cfg_we[i]), .cfg_int, .cfg_inc, .cfg_entry, .cfg_data(cfg_data[DW-1:0]),
      .in_valid, .in_z, .in_x1, .in_y1,
      .out_valid(out_valid[i]), .out_x2(out_x2[i]), .out_y2(out_y2[i]),
      .out_ovf(out_ovf[i]), .out_behind(out_behind[i])
    );
  end

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  real    err_sum [NS];
  longint err_n = 0;

  always @(posedge clk) cycle++;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- width-generic reference ------------------------------------------------
  function automatic int frac_of(int s, int e);
    return (e == 2 || e == 5) ? s : (e >= 6) ? 19 + s : 10 + s;
  endfunction

  function automatic int width_of(int s, int e);
    return frac_of(s, e) + ((e == 2 || e == 5) ? INT_B : (e >= 6) ? INT_C : INT_A);
  endfunction

  function automatic longint sext(longint v, int w);
    longint m = longint'(1) << w;
    longint r = v & (m - 1);
    if (r >= (m >> 1)) r -= m;
    return r;
  endfunction

  longint mbase [NS][2][8];
  longint minc  [NS][2][8];

  typedef struct {
    longint x2, y2;
    bit     ovf, behind;
  } res_t;

  function automatic res_t ref_engine(int s, int z, int x, int y);
    res_t   o;
    longint h [8];
    longint xp, yp, wp, maxmag;
    int     k = z >> 7, zl = z & 127;
    int     fa = 10 + s, fb = s, fc = 19 + s;
    for (int e = 0; e < 8; e++)
      h[e] = sext(mbase[s][k][e] +
                  longint'($floor(real'(minc[s][k][e]) * real'(zl) / 128.0)), width_of(s, e));
    xp = h[0] * x + h[1] * y + h[2] * (longint'(1) << (fa - fb));
    yp = h[3] * x + h[4] * y + h[5] * (longint'(1) << (fa - fb));
    wp = h[6] * x + h[7] * y + (longint'(1) << fc);
    maxmag = (longint'(1) << (OUT_W - 1)) - 1;
    o.ovf = 0;
    o.behind = (wp <= 0);
    o.x2 = 0;
    o.y2 = 0;
    if (!o.behind) begin
      longint num [2];
      longint q [2];
      num[0] = xp; num[1] = yp;
      for (int c = 0; c < 2; c++) begin
        longint a = (num[c] < 0) ? -num[c] : num[c];
        a = a * (longint'(1) << (fc - fa + OUT_FRAC));
        q[c] = (2 * a + wp) / (2 * wp);
        if (q[c] > maxmag) begin q[c] = maxmag; o.ovf = 1; end
        if (num[c] < 0) q[c] = -q[c];
      end
      o.x2 = q[0]; o.y2 = q[1];
    end
    return o;
  endfunction

  // ---- scoreboard ---------------------------------------------------------------
  typedef struct {
    res_t   o [NS];
    longint t_in;
    real    tx, ty;
  } item_t;
  item_t sb[$];

  always @(negedge clk) if (rst_n && out_valid[0]) begin
    item_t it;
    if (sb.size() == 0) begin
      checks++;
      failures++;
      $display("unexpected output");
    end else begin
      it = sb.pop_front();
      for (int s = 0; s < NS; s++) begin
        real dx, dy;
        checks++;
        if (!out_valid[s] || cycle - it.t_in != longint'(LAT) ||
            longint'(out_x2[s]) != it.o[s].x2 || longint'(out_y2[s]) != it.o[s].y2 ||
            out_ovf[s] != it.o[s].ovf || out_behind[s] != it.o[s].behind) begin
          failures++;
          if (failures < 10)
            $display("set %0d: got (%0d,%0d) expected (%0d,%0d)", s,
                     out_x2[s], out_y2[s], it.o[s].x2, it.o[s].y2);
        end
        dx = real'(out_x2[s]) / 16.0 - it.tx;
        dy = real'(out_y2[s]) / 16.0 - it.ty;
        err_sum[s] += $sqrt(dx * dx + dy * dy);
      end
      err_n++;
    end
  end

  initial begin
    real avg [NS];
    for (int s = 0; s < NS; s++) begin
      cfg_we[s] = 0;
      err_sum[s] = 0.0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- LIA-2 parameters, quantised per width set ----
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < 2; k++)
        for (int inc = 0; inc < 2; inc++)
          for (int e = 0; e < 8; e++) begin
            longint v;
            v = quant(lia_value(e, k, 128, inc[0]), frac_of(s, e));
            @(negedge clk);
            cfg_we[s] = 1; cfg_int = k[0]; cfg_inc = inc[0]; cfg_entry = entry_e'(e);
            cfg_data = 64'(v);
            @(posedge clk);
            if (inc != 0) minc[s][k][e] = sext(v, width_of(s, e));
            else          mbase[s][k][e] = sext(v, width_of(s, e));
            @(negedge clk);
            cfg_we[s] = 0;
          end

    // ---- pixel grid ----
    for (int y = 0; y < IMG_H; y += 2)
      for (int x = 0; x < IMG_W; x += 2) begin
        item_t it;
        int    z;
        z = int'($floor(127.5 + 127.0 * $sin(real'(x) / 97.0) * $cos(real'(y) / 73.0)));
        @(negedge clk);
        in_valid = 1; in_z = Z_W'(z); in_x1 = COORD_W'(x); in_y1 = COORD_W'(y);
        for (int s = 0; s < NS; s++) it.o[s] = ref_engine(s, z, x, y);
        warp_exact(z, x, y, it.tx, it.ty);
        it.t_in = cycle;
        sb.push_back(it);
      end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("%0d results missing", sb.size());
    end

    for (int s = 0; s < NS; s++) begin
      avg[s] = err_sum[s] / real'(err_n);
      $display("fraction bits A/B/C = %0d/%0d/%0d: average pixel location error %f",
               10 + s, s, 19 + s, avg[s]);
    end
    for (int s = 1; s < NS; s++) begin
      checks++;
      if (avg[s] > avg[s-1] + 0.01) begin
        failures++;
        $display("error grows from set %0d to set %0d", s - 1, s);
      end
    end
    checks++;
    if (!(avg[0] > avg[DEF_SET] + 0.05)) begin
      failures++;
      $display("narrowest widths not worse than the default");
    end
    checks++;
    if (avg[DEF_SET] > avg[NS-1] + 0.01) begin
      failures++;
      $display("default widths not converged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
