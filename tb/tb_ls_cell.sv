// tb_ls_cell: drives an LS cell with random step patterns under several
// port settings and checks the CRAM port enables, write enable, write data
// and both AGU address streams against a model.
module tb_ls_cell;
  import fega_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, a_step = 0, b_step = 0;
  ls_cfg_t cfg;
  logic [15:0] b_wdata_in, b_wdata;
  logic a_en, b_en, b_we;
  logic [CRAM_AW-1:0] a_addr, b_addr;
  int checks = 0, failures = 0;

  ls_cell dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(bit ae, bit be, bit bw, int am, int ac, int an, int bm, int bc, int bn);
    int ta = 0, tb = 0;
    cfg.a_en = ae; cfg.b_en = be; cfg.b_we = bw;
    cfg.a.m = MW'(am); cfg.a.c = CRAM_AW'(ac); cfg.a.iters = NW'(an);
    cfg.b.m = MW'(bm); cfg.b.c = CRAM_AW'(bc); cfg.b.iters = NW'(bn);
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int i = 0; i < 100; i++) begin
      a_step = $urandom % 2; b_step = $urandom % 2; b_wdata_in = 16'($urandom);
      #1;
      chk(a_en == (a_step && ae), "a_en");
      chk(b_en == (b_step && be), "b_en");
      chk(b_we == (b_step && be && bw), "b_we");
      chk(b_wdata == b_wdata_in, "b_wdata");
      chk(int'(a_addr) == ((ac + am * (ta % an)) & 2047), $sformatf("a_addr %0d", a_addr));
      chk(int'(b_addr) == ((bc + bm * (tb % bn)) & 2047), $sformatf("b_addr %0d", b_addr));
      @(negedge clk);
      if (a_step && ae) ta++;
      if (b_step && be) tb++;
    end
    a_step = 0; b_step = 0;
  endtask

  initial begin
    cfg = '0; b_wdata_in = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(1, 1, 1, 1, 0, 24, 4, 128, 24);    // phase 1 re-allocation
    run(1, 1, 0, 1, 176, 32, 1, 224, 32);  // SAD: two loads
    run(0, 1, 1, 1, 0, 1, 1, 17, 1);       // SAD write-back only
    run(1, 0, 0, 2, 3, 5, 1, 0, 4);        // port B off
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
