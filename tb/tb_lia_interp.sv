// tb_lia_interp - self-checking test of the LIA linear interpolator.
//
// Feeds random head/increment matrices and offsets, one per clock with random
// gaps, into the LIA-2 interpolator (7-bit offset) and compares each result
// with base + floor(inc * z_loc / 128) computed on reals.  Checks that every
// result appears exactly one clock after its input.
module tb_lia_interp;
  import warp_pkg::*;
  import warp_ref_pkg::*;

  localparam int unsigned ZL_W = 7;

  logic            clk = 0, rst_n = 0;
  logic            in_valid = 0;
  hmat_t           base = '0, inc = '0;
  logic [ZL_W-1:0] z_loc = '0;
  logic            out_valid;
  hmat_t           h;

  int checks = 0, failures = 0;

  lia_interp #(.ZL_W(ZL_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic hmat_t rnd_mat();
    logic [$bits(hmat_t)-1:0] r;
    for (int b = 0; b < $bits(hmat_t); b += 32) r = {r[$bits(hmat_t)-33:0], $urandom};
    return hmat_t'(r);
  endfunction

  hmat_t exp_h;
  bit    exp_v;

  initial begin
    exp_v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // result of the input given at the previous edge
      checks++;
      if (out_valid !== exp_v) begin
        failures++;
        if (failures < 10) $display("valid mismatch at %0d", n);
      end
      if (exp_v) begin
        checks++;
        if (h !== exp_h) begin
          failures++;
          if (failures < 10) $display("h mismatch at %0d: %h vs %h", n, h, exp_h);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      base     = rnd_mat();
      inc      = rnd_mat();
      z_loc    = ZL_W'($urandom);
      if (n % 50 == 0) z_loc = '1;        // top of the interval
      if (n % 50 == 1) z_loc = '0;        // head matrix itself
      exp_v    = in_valid;
      if (in_valid) exp_h = ref_interp(base, inc, int'(z_loc), ZL_W);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
