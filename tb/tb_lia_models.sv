// tb_lia_models - LIA-1/2/4/8 accuracy comparison on a camera-model scene.
//
// Takes the exact per-depth homographies of the two-camera rig of
// warp_scene_pkg (1900-pixel focal length, 2 degree pan, 20-unit baseline,
// depth planes between 42 and 130 units).  For every interval k of
// LIA-n (length L = 256/n) it loads
//     H_base,k = H(kL),  H_inc,k = L/(L-1) * (H(kL + L - 1) - H(kL)).
// Four engines (n = 1, 2, 4, 8, sub-pixel output with 4 fraction bits) warp
// the same 1024 x 768 frame with a smooth synthetic depth map, one pixel per
// clock.  Every output of every engine is compared bit-exactly with the
// reference arithmetic, and the average distance to the position given by the
// exact H(Z) is reported per model; it must not grow as n grows, and LIA-2
// must stay below half a pixel.
module tb_lia_models;
  import warp_pkg::*;
  import warp_ref_pkg::*;
  import warp_scene_pkg::*;

  localparam int unsigned OUT_W    = 17;
  localparam int unsigned OUT_FRAC = 4;
  localparam int unsigned LAT      = 2 + OUT_W + 3;
  localparam int          IMG_W    = 1024;
  localparam int          IMG_H    = 768;
  localparam int          NM       = 4;             // models: n = 1, 2, 4, 8

  logic               clk = 0, rst_n = 0;
  logic               cfg_we [NM];
  logic [2:0]         cfg_int = '0;
  logic               cfg_inc = 0;
  entry_e             cfg_entry = E_XX;
  logic [W_MAX-1:0]   cfg_data = '0;
  logic               in_valid = 0;
  logic [Z_W-1:0]     in_z = '0;
  logic [COORD_W-1:0] in_x1 = '0, in_y1 = '0;
  logic                    out_valid [NM];
  logic signed [OUT_W-1:0] out_x2 [NM], out_y2 [NM];
  logic                    out_ovf [NM], out_behind [NM];

  for (genvar m = 0; m < NM; m++) begin : g_eng
    localparam int unsigned N   = 1 << m;
    localparam int unsigned IDW = (N > 1) ? $clog2(N) : 1;
    warp_engine #(.N_INT(N), .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)) u_eng (
      .clk, .rst_n,
      .cfg_we(cfg_we[m]), .cfg_int(cfg_int[IDW-1:0]), .cfg_inc, .cfg_entry, .cfg_data,
      .in_valid, .in_z, .in_x1, .in_y1,
      .out_valid(out_valid[m]), .out_x2(out_x2[m]), .out_y2(out_y2[m]),
      .out_ovf(out_ovf[m]), .out_behind(out_behind[m])
    );
  end

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  real    err_sum [NM];
  longint err_n = 0;
  int     int_used [8];

  always @(posedge clk) cycle++;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int frac_of(int e);
    return (e == 2 || e == 5) ? FRAC_B_DEF : (e >= 6) ? FRAC_C_DEF : FRAC_A_DEF;
  endfunction


  function automatic hmat_t set_e(hmat_t m, int e, longint v);
    hmat_t r = m;
    case (e)
      0: r.xx = W_A'(v);  1: r.xy = W_A'(v);  2: r.xi = W_B'(v);
      3: r.yx = W_A'(v);  4: r.yy = W_A'(v);  5: r.yi = W_B'(v);
      6: r.ix = W_C'(v);  default: r.iy = W_C'(v);
    endcase
    return r;
  endfunction

  // parameter model per engine
  hmat_t mbase [NM][8];
  hmat_t minc  [NM][8];

  task automatic cfg_write(int m, int k, bit is_inc, int e, longint v);
    @(negedge clk);
    for (int i = 0; i < NM; i++) cfg_we[i] = (i == m);
    cfg_int = 3'(k); cfg_inc = is_inc; cfg_entry = entry_e'(e); cfg_data = W_MAX'(v);
    @(posedge clk);
    if (is_inc) minc[m][k] = set_e(minc[m][k], e, v); else mbase[m][k] = set_e(mbase[m][k], e, v);
    @(negedge clk);
    for (int i = 0; i < NM; i++) cfg_we[i] = 0;
  endtask

  // ---- scoreboard ---------------------------------------------------------------
  typedef struct {
    ref_out_t o [NM];
    longint   t_in;
    real      tx, ty;
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
      for (int m = 0; m < NM; m++) begin
        real dx, dy;
        checks++;
        if (!out_valid[m] || cycle - it.t_in != longint'(LAT) ||
            longint'(out_x2[m]) != it.o[m].x2 || longint'(out_y2[m]) != it.o[m].y2 ||
            out_ovf[m] != it.o[m].ovf || out_behind[m] != it.o[m].behind) begin
          failures++;
          if (failures < 10)
            $display("LIA-%0d: got (%0d,%0d) expected (%0d,%0d)", 1 << m,
                     out_x2[m], out_y2[m], it.o[m].x2, it.o[m].y2);
        end
        dx = real'(out_x2[m]) / 16.0 - it.tx;
        dy = real'(out_y2[m]) / 16.0 - it.ty;
        err_sum[m] += $sqrt(dx * dx + dy * dy);
      end
      err_n++;
    end
  end

  initial begin
    real avg [NM];
    for (int m = 0; m < NM; m++) begin
      cfg_we[m] = 0;
      err_sum[m] = 0.0;
      for (int k = 0; k < 8; k++) begin mbase[m][k] = '0; minc[m][k] = '0; end
    end
    for (int k = 0; k < 8; k++) int_used[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- load LIA-n parameters into each engine ----
    for (int m = 0; m < NM; m++) begin
      int n, len;
      n = 1 << m;
      len = 256 / n;
      for (int k = 0; k < n; k++)
        for (int e = 0; e < 8; e++) begin
          cfg_write(m, k, 0, e, quant(lia_value(e, k, len, 0), frac_of(e)));
          cfg_write(m, k, 1, e, quant(lia_value(e, k, len, 1), frac_of(e)));
        end
    end

    // ---- one frame ----
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        item_t it;
        int    z;
        z = int'($floor(127.5 + 127.0 * $sin(real'(x) / 97.0) * $cos(real'(y) / 73.0)));
        @(negedge clk);
        in_valid = 1; in_z = Z_W'(z); in_x1 = COORD_W'(x); in_y1 = COORD_W'(y);
        for (int m = 0; m < NM; m++) begin
          int    zl_w, k;
          hmat_t h;
          zl_w = 8 - m;
          k    = z >> zl_w;
          h    = ref_interp(mbase[m][k], minc[m][k], z & ((1 << zl_w) - 1), zl_w);
          it.o[m] = ref_divide(ref_matvec(h, x, y), OUT_W, OUT_FRAC);
        end
        int_used[z >> 5]++;
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

    for (int m = 0; m < NM; m++) begin
      avg[m] = err_sum[m] / real'(err_n);
      $display("LIA-%0d: average pixel location error %f over %0d pixels", 1 << m, avg[m], err_n);
    end
    for (int m = 1; m < NM; m++) begin
      checks++;
      if (avg[m] > avg[m-1] + 0.005) begin
        failures++;
        $display("error grows from LIA-%0d to LIA-%0d", 1 << (m - 1), 1 << m);
      end
    end
    checks++;
    if (avg[1] >= 0.5) begin
      failures++;
      $display("LIA-2 error too large");
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (int_used[k] == 0) begin
        failures++;
        $display("LIA-8 interval %0d never used", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
