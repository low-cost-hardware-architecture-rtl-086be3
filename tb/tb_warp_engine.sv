// tb_warp_engine - end-to-end test of the warping engine at its default size.
//
// 1. Builds a smooth, slightly non-linear family of homographies H_true(Z)
//    (a horizontal camera shift whose disparity and perspective terms change
//    with depth), turns it into LIA-2 head/increment matrices
//      H_base,0 = H(0),   H_inc,0 = H(128) - H(0)
//      H_base,1 = H(128), H_inc,1 = 128/127 * (H(255) - H(128))
//    quantised to the engine's fixed-point formats, and loads them through the
//    configuration port.
// 2. Warps one whole 1024 x 768 frame, one pixel per clock, with a synthetic
//    depth map covering both depth intervals.  Every output is compared with a
//    bit-exact reference and must leave LAT clocks after its input; the frame
//    must take pixels - 1 + LAT clocks from first input to last output.  The
//    average distance between the engine's position and the one from the
//    exact H_true(Z) (the approximation error of LIA-2 plus fixed-point
//    rounding) is reported and must stay below 1 pixel.
// 3. Rewrites entries while pixels stream (the change must apply from the next
//    pixel on), then loads extreme parameters that make positions overflow the
//    output range and push points behind the camera plane.
// Each mechanism (both LIA intervals, a parameter write mid-stream, output
// saturation, w2' <= 0) is counted and must happen at least once.
module tb_warp_engine;
  import warp_pkg::*;
  import warp_ref_pkg::*;

  localparam int unsigned N_INT = 2;
  localparam int unsigned ZL_W  = 7;
  localparam int unsigned OUT_W = 13;
  localparam int unsigned LAT   = 18;
  localparam int          IMG_W = 1024;
  localparam int          IMG_H = 768;
  localparam longint      FRAME_CLKS = longint'(IMG_W * IMG_H - 1) + longint'(LAT);  // first input to last output

  logic                    clk = 0, rst_n = 0;
  logic                    cfg_we = 0;
  logic [0:0]              cfg_int = '0;
  logic                    cfg_inc = 0;
  entry_e                  cfg_entry = E_XX;
  logic [W_MAX-1:0]        cfg_data = '0;
  logic                    in_valid = 0;
  logic [Z_W-1:0]          in_z = '0;
  logic [COORD_W-1:0]      in_x1 = '0, in_y1 = '0;
  logic                    out_valid;
  logic signed [OUT_W-1:0] out_x2, out_y2;
  logic                    out_ovf, out_behind;

  warp_engine dut (.*);

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  int     n_int0 = 0, n_int1 = 0, n_midcfg = 0, n_ovf = 0, n_behind = 0;
  real    err_sum = 0.0;
  longint err_n = 0;

  always @(posedge clk) cycle++;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- model of the stored parameters -------------------------------------
  hmat_t mbase [N_INT];
  hmat_t minc  [N_INT];

  // ---- scene: exact homography as reals, entries in order xx..iy ----------
  function automatic real h_true(int e, real z);
    case (e)
      0: return 1.002 - 0.00001 * z;
      1: return 0.003;
      2: return -40.0 + 0.25 * z + 0.0002 * z * z;
      3: return -0.002;
      4: return 0.999 + 0.000004 * z;
      5: return 1.5 - 0.005 * z;
      6: return 0.000002 + 0.000000002 * z;
      default: return -0.000001;
    endcase
  endfunction

  function automatic int frac_of(int e);
    return (e == 2 || e == 5) ? FRAC_B_DEF : (e >= 6) ? FRAC_C_DEF : FRAC_A_DEF;
  endfunction

  function automatic longint quant(int e, real v);
    return longint'($floor(v * real'(longint'(1) << frac_of(e)) + 0.5));
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

  // one configuration write, mirrored in the model after the clock edge
  task automatic cfg_write(int k, bit is_inc, int e, longint v);
    @(negedge clk);
    cfg_we = 1; cfg_int = 1'(k); cfg_inc = is_inc; cfg_entry = entry_e'(e);
    cfg_data = W_MAX'(v);
    @(posedge clk);
    if (is_inc) minc[k] = set_e(minc[k], e, v); else mbase[k] = set_e(mbase[k], e, v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  // ---- bit-exact reference of the whole engine ------------------------------
  function automatic ref_out_t ref_engine(int z, int x1, int y1);
    int    k = z >> ZL_W;
    hmat_t h = ref_interp(mbase[k], minc[k], z & ((1 << ZL_W) - 1), ZL_W);
    return ref_divide(ref_matvec(h, x1, y1), OUT_W, 0);
  endfunction

  // ---- scoreboard ---------------------------------------------------------------
  typedef struct {
    ref_out_t o;
    longint   t_in;
    real      tx, ty;     // exact position from H_true, when track_err
    bit       track_err;
  } item_t;
  item_t sb[$];

  always @(negedge clk) if (rst_n && out_valid) begin
    item_t it;
    checks++;
    if (sb.size() == 0) begin
      failures++;
      $display("unexpected output at cycle %0d", cycle);
    end else begin
      it = sb.pop_front();
      if (cycle - it.t_in != longint'(LAT)) begin
        failures++;
        if (failures < 10) $display("latency %0d, expected %0d", cycle - it.t_in, LAT);
      end
      if (longint'(out_x2) != it.o.x2 || longint'(out_y2) != it.o.y2 ||
          out_ovf != it.o.ovf || out_behind != it.o.behind) begin
        failures++;
        if (failures < 10)
          $display("got (%0d,%0d,%0b,%0b) expected (%0d,%0d,%0b,%0b)", out_x2, out_y2,
                   out_ovf, out_behind, it.o.x2, it.o.y2, it.o.ovf, it.o.behind);
      end
      if (out_ovf) n_ovf++;
      if (out_behind) n_behind++;
      if (it.track_err) begin
        real dx, dy;
        dx = real'(out_x2) - it.tx;
        dy = real'(out_y2) - it.ty;
        err_sum += $sqrt(dx * dx + dy * dy);
        err_n++;
      end
    end
  end

  // drive one pixel on this clock; expected result from the current model
  task automatic send_pixel(int z, int x1, int y1, bit track);
    item_t it;
    in_valid = 1; in_z = Z_W'(z); in_x1 = COORD_W'(x1); in_y1 = COORD_W'(y1);
    it.o = ref_engine(z, x1, y1);
    it.t_in = cycle;
    it.track_err = track;
    it.tx = 0.0; it.ty = 0.0;
    if (track) begin
      real xp = h_true(0, z) * x1 + h_true(1, z) * y1 + h_true(2, z);
      real yp = h_true(3, z) * x1 + h_true(4, z) * y1 + h_true(5, z);
      real wp = h_true(6, z) * x1 + h_true(7, z) * y1 + 1.0;
      it.tx = xp / wp; it.ty = yp / wp;
    end
    sb.push_back(it);
    if ((z >> ZL_W) == 0) n_int0++; else n_int1++;
  endtask

  task automatic drain();
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("%0d results missing", sb.size());
    end
  endtask

  initial begin
    longint t0, t1;
    for (int k = 0; k < N_INT; k++) begin mbase[k] = '0; minc[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1. load LIA-2 parameters ----
    for (int e = 0; e < 8; e++) begin
      cfg_write(0, 0, e, quant(e, h_true(e, 0.0)));
      cfg_write(0, 1, e, quant(e, h_true(e, 128.0) - h_true(e, 0.0)));
      cfg_write(1, 0, e, quant(e, h_true(e, 128.0)));
      cfg_write(1, 1, e, quant(e, (h_true(e, 255.0) - h_true(e, 128.0)) * 128.0 / 127.0));
    end

    // ---- 2. one full frame, one pixel per clock ----
    @(negedge clk);
    t0 = cycle;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        int z;
        z = ((x >> 2) + (y >> 1) + ((x * y) >> 12)) & 255;
        send_pixel(z, x, y, 1'b1);
        @(negedge clk);
      end
    in_valid = 0;
    wait (sb.size() == 0);
    t1 = cycle;
    checks++;
    if (t1 - t0 != FRAME_CLKS) begin
      failures++;
      $display("frame took %0d clocks, expected %0d", t1 - t0, FRAME_CLKS);
    end
    checks++;
    if (err_sum / real'(err_n) >= 1.0) failures++;
    $display("frame %0dx%0d: %0d clocks, average location error vs exact H: %f pixel",
             IMG_W, IMG_H, t1 - t0, err_sum / real'(err_n));

    // ---- 3a. parameter writes while pixels stream ----
    for (int n = 0; n < 2000; n++) begin
      int z;
      z = $urandom_range(0, 255);
      @(negedge clk);
      if (n % 97 == 5) begin
        // write and pixel share this clock: the pixel still sees the old value
        int e, k;
        longint v;
        e = $urandom_range(0, 7);
        k = $urandom_range(0, 1);
        v = quant(e, h_true(e, real'(k * 128)) * (1.0 + 0.01 * real'($urandom_range(0, 4))));
        cfg_we = 1; cfg_int = 1'(k); cfg_inc = 0; cfg_entry = entry_e'(e); cfg_data = W_MAX'(v);
        send_pixel(z, $urandom_range(0, IMG_W - 1), $urandom_range(0, IMG_H - 1), 1'b0);
        @(posedge clk);
        mbase[k] = set_e(mbase[k], e, v);
        n_midcfg++;
        #1 cfg_we = 0;
      end else begin
        send_pixel(z, $urandom_range(0, IMG_W - 1), $urandom_range(0, IMG_H - 1), 1'b0);
      end
    end
    drain();

    // ---- 3b. extreme parameters: saturation and points behind the camera ----
    cfg_write(0, 0, 2, quant(2, 3000.0));     // large horizontal shift
    cfg_write(0, 0, 6, quant(6, -0.0012));    // w2' falls below 0 for large x1
    cfg_write(1, 0, 6, quant(6, -0.00095));   // w2' small near x1 = 1024
    cfg_write(1, 1, 6, quant(6, 0.0));
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      send_pixel($urandom_range(0, 255), $urandom_range(0, 2047), $urandom_range(0, 2047), 1'b0);
    end
    drain();

    $display("LIA interval 0: %0d pixels, interval 1: %0d, writes mid-stream: %0d, saturated: %0d, behind: %0d",
             n_int0, n_int1, n_midcfg, n_ovf, n_behind);
    checks++;
    if (n_int0 == 0 || n_int1 == 0 || n_midcfg == 0 || n_ovf == 0 || n_behind == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
