// tb_bm_pair: one CPU/FE-GA pair processes two reference blocks in a row.
// For each block the testbench (in the CPU's role) writes the five stride
// commands, starts the DTU, starts the FE-GA program (6 re-allocation and
// 81 SAD sequences), reads the 81 SADs back, compares them with the reference
// model and checks that the minimum lies at the known motion. The first
// block's SADs come back by a DTU read-back command into the URAM, the
// second block's by direct reads of CRAM 8. The contexts
// are written once and reused for the second block.
module tb_bm_pair;
  import fega_pkg::*;
  import bm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic uram_we = 0, uram_rd_en = 0, dtu_start = 0, cfg_we = 0, fe_start = 0, host_rd_en = 0;
  logic [9:0] uram_addr, uram_rd_addr, dtu_cmd_ptr;
  logic [31:0] uram_wdata, uram_rdata, src_addr;
  logic dtu_busy, dtu_done, src_req, src_gnt, src_rvalid, fe_busy, fe_done;
  logic [7:0] src_rdata, cfg_idx, fe_start_idx;
  ctx_t cfg_ctx;
  logic [GAW-1:0] host_rd_addr;
  logic [15:0] host_rdata;
  int stalls, checks = 0, failures = 0;

  bm_pair dut (.*);
  ddr_model #(.LAT(6), .STALL_PCT(15), .SEED(9)) u_ddr (
    .clk, .req(src_req), .addr(src_addr), .gnt(src_gnt), .rvalid(src_rvalid), .rdata(src_rdata), .stalls
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic block(int sy, int sx, int base, bit by_dtu);
    int best = 1 << 30, best_n = -1;
    for (int n = 0; n < 5; n++)
      for (int w = 0; w < 8; w++) begin
        @(negedge clk); uram_we = 1; uram_addr = 10'(base + 8 * n + w); uram_wdata = dtu_cmd_word(n, w, sy, sx, base);
      end
    @(negedge clk); uram_we = 0; dtu_start = 1; dtu_cmd_ptr = 10'(base);
    @(negedge clk); dtu_start = 0;
    while (!dtu_done) @(negedge clk);
    @(negedge clk); fe_start = 1; fe_start_idx = 0;
    @(negedge clk); fe_start = 0;
    chk(fe_busy, "FE-GA busy");
    while (!fe_done) @(negedge clk);
    if (by_dtu) begin
      // DTU read-back of the SADs into the URAM, then local reads
      for (int w = 0; w < 8; w++) begin
        @(negedge clk); uram_we = 1; uram_addr = 10'(base + 40 + w); uram_wdata = readback_cmd_word(w);
      end
      @(negedge clk); uram_we = 0; dtu_start = 1; dtu_cmd_ptr = 10'(base + 40);
      @(negedge clk); dtu_start = 0;
      while (!dtu_done) @(negedge clk);
      @(negedge clk);
    end
    for (int n = 0; n < N_CAND; n++) begin
      int got;
      @(negedge clk);
      if (by_dtu) begin uram_rd_en = 1; uram_rd_addr = 10'(SAD_URAM + n); end
      else begin host_rd_en = 1; host_rd_addr = GAW'(SAD_CRAM * CRAM_WORDS + n); end
      @(negedge clk); host_rd_en = 0; uram_rd_en = 0;
      got = by_dtu ? int'(uram_rdata) : int'(host_rdata);
      chk(got == ref_sad(sy, sx, n / 9, n % 9), $sformatf("(%0d,%0d) SAD[%0d] = %0d", sy, sx, n, got));
      if (got < best) begin best = got; best_n = n; end
    end
    chk(best_n == 9 * (4 + MOT_Y) + 4 + MOT_X, $sformatf("minimum at %0d", best_n));
  endtask

  initial begin
    uram_addr = 0; uram_wdata = 0; uram_rd_addr = 0; dtu_cmd_ptr = 0; cfg_idx = 0; cfg_ctx = '0; fe_start_idx = 0; host_rd_addr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < N_RE_CTX + N_CAND; i++) begin
      @(negedge clk); cfg_we = 1; cfg_idx = 8'(i); cfg_ctx = prog_ctx(i);
    end
    @(negedge clk); cfg_we = 0;
    block(16, 16, 0, 1);
    block(456, 616, 64, 0);   // last search area of the frame
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (30000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
