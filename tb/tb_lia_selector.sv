// tb_lia_selector - self-checking test of the LIA interval selector.
//
// Drives random matrices and every depth value 0..255 into an LIA-2 selector
// and an LIA-4 selector and checks the selected head/increment matrices and
// the in-interval offset against k = floor(Z / (256/n)), z_loc = Z mod (256/n).
module tb_lia_selector;
  import warp_pkg::*;

  int checks = 0, failures = 0;

  logic [Z_W-1:0] z;
  hmat_t b2 [2], i2 [2], sb2, si2;
  hmat_t b4 [4], i4 [4], sb4, si4;
  logic [6:0] zl2;
  logic [5:0] zl4;

  lia_selector #(.N_INT(2)) dut2 (.z, .hbase(b2), .hinc(i2), .sel_base(sb2), .sel_inc(si2), .z_loc(zl2));
  lia_selector #(.N_INT(4)) dut4 (.z, .hbase(b4), .hinc(i4), .sel_base(sb4), .sel_inc(si4), .z_loc(zl4));

  function automatic hmat_t rnd_mat();
    logic [$bits(hmat_t)-1:0] r;
    for (int b = 0; b < $bits(hmat_t); b += 32) r = {r[$bits(hmat_t)-33:0], $urandom};
    return hmat_t'(r);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int k = 0; k < 2; k++) begin b2[k] = rnd_mat(); i2[k] = rnd_mat(); end
      for (int k = 0; k < 4; k++) begin b4[k] = rnd_mat(); i4[k] = rnd_mat(); end
      for (int zv = 0; zv < 256; zv++) begin
        z = Z_W'(zv);
        #1;
        checks++;
        if (sb2 !== b2[zv / 128] || si2 !== i2[zv / 128] || int'(zl2) != zv % 128) begin
          failures++;
          if (failures < 10) $display("LIA-2 mismatch at Z=%0d", zv);
        end
        checks++;
        if (sb4 !== b4[zv / 64] || si4 !== i4[zv / 64] || int'(zl4) != zv % 64) begin
          failures++;
          if (failures < 10) $display("LIA-4 mismatch at Z=%0d", zv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
