// tb_cfgm: writes all 256 contexts (the block-matching program followed by
// random contexts) and reads them back in random order, one cycle after the
// index is presented.
module tb_cfgm;
  import fega_pkg::*;
  import bm_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [7:0] wr_idx, rd_idx;
  ctx_t wr_ctx, rd_ctx;
  ctx_t model [256];
  int checks = 0, failures = 0;
  cfgm dut (.*);
  initial begin
    rd_idx = 0;
    for (int i = 0; i < 256; i++) begin
      ctx_t x;
      if (i < N_RE_CTX + N_CAND) x = prog_ctx(i);
      else for (int w = 0; w < $bits(ctx_t); w += 32) x[w +: 32] = $urandom;
      model[i] = x;
      @(negedge clk); wr_en = 1; wr_idx = 8'(i); wr_ctx = x;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk); rd_idx = 8'($urandom);
      @(negedge clk);
      checks++;
      if (rd_ctx != model[rd_idx]) begin failures++; $display("FAIL ctx %0d", rd_idx); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
