// tb_lia_param_bank - self-checking test of the LIA parameter storage.
//
// Checks reset to zero, then writes 400 random entries (random interval,
// base/increment and entry, random data) and after each write compares all
// 2*N_INT stored matrices with a model kept in the testbench.  Also checks the
// one-clock write latency (value not visible before the clock edge).
module tb_lia_param_bank;
  import warp_pkg::*;

  localparam int unsigned N_INT = 2;
  localparam int unsigned IDX_W = 1;

  logic             clk = 0;
  logic             rst_n = 0;
  logic             cfg_we = 0;
  logic [IDX_W-1:0] cfg_int = '0;
  logic             cfg_inc = 0;
  entry_e           cfg_entry = E_XX;
  logic [W_MAX-1:0] cfg_data = '0;
  hmat_t            hbase [N_INT];
  hmat_t            hinc  [N_INT];

  int checks = 0, failures = 0;
  hmat_t mb [N_INT];
  hmat_t mi [N_INT];

  lia_param_bank #(.N_INT(N_INT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(string what);
    for (int k = 0; k < N_INT; k++) begin
      checks++;
      if (hbase[k] !== mb[k] || hinc[k] !== mi[k]) begin
        failures++;
        if (failures < 10) $display("mismatch %s interval %0d", what, k);
      end
    end
  endtask

  // model of one entry write
  function automatic hmat_t model_put(hmat_t m, entry_e e, logic [W_MAX-1:0] d);
    hmat_t r = m;
    case (e)
      E_XX: r.xx = d[W_A-1:0];
      E_XY: r.xy = d[W_A-1:0];
      E_XI: r.xi = d[W_B-1:0];
      E_YX: r.yx = d[W_A-1:0];
      E_YY: r.yy = d[W_A-1:0];
      E_YI: r.yi = d[W_B-1:0];
      E_IX: r.ix = d[W_C-1:0];
      E_IY: r.iy = d[W_C-1:0];
      default: ;
    endcase
    return r;
  endfunction

  initial begin
    for (int k = 0; k < N_INT; k++) begin mb[k] = '0; mi[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all("after reset");
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      cfg_we    = ($urandom_range(0, 7) != 0);
      cfg_int   = IDX_W'($urandom_range(0, N_INT - 1));
      cfg_inc   = 1'($urandom_range(0, 1));
      cfg_entry = entry_e'($urandom_range(0, 7));
      cfg_data  = W_MAX'({$urandom, $urandom});
      #1 check_all("before edge");   // nothing changes before the clock
      @(posedge clk);
      if (cfg_we) begin
        if (cfg_inc) mi[cfg_int] = model_put(mi[cfg_int], cfg_entry, cfg_data);
        else         mb[cfg_int] = model_put(mb[cfg_int], cfg_entry, cfg_data);
      end
      #1 check_all("after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
