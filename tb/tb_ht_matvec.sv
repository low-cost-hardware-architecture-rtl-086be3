// tb_ht_matvec - self-checking test of the H * (x1, y1, 1) product.
//
// Random matrices over the full entry ranges and random 11-bit coordinates,
// with random input gaps; each (x2', y2', w2') is compared with a 64-bit
// integer product one clock after its input.
module tb_ht_matvec;
  import warp_pkg::*;
  import warp_ref_pkg::*;

  logic               clk = 0, rst_n = 0;
  logic               in_valid = 0;
  hmat_t              h = '0;
  logic [COORD_W-1:0] x1 = '0, y1 = '0;
  logic               out_valid;
  hvec_t              v;

  int checks = 0, failures = 0;

  ht_matvec dut (.*);

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

  hvec_t exp_v;
  bit    exp_valid;

  initial begin
    exp_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        if (failures < 10) $display("valid mismatch at %0d", n);
      end
      if (exp_valid) begin
        checks++;
        if (v !== exp_v) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: %h vs %h", n, v, exp_v);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      h  = rnd_mat();
      x1 = COORD_W'($urandom);
      y1 = COORD_W'($urandom);
      if (n % 40 == 0) begin x1 = '1; y1 = '1; end   // largest coordinates
      exp_valid = in_valid;
      if (in_valid) exp_v = ref_matvec(h, int'(x1), int'(y1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
