// tb_fega: loads CRAM 0..7 with one search area and reference block in the
// packed layout the DTU produces (written here directly, two pixels per
// word), runs the six re-allocation sequences and checks every re-allocated
// word against the target layout (rows k, k+8 and k+8, k+16 of the search
// area interleaved; reference rows k+4 and k+12 interleaved), then runs the
// 81 SAD sequences and checks every SAD in CRAM 8 and the cycle counts.
module tb_fega;
  import fega_pkg::*;
  import bm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0, start = 0, dtu_we = 0, host_rd_en = 0;
  logic [7:0] cfg_idx, start_idx;
  ctx_t cfg_ctx;
  logic busy, done;
  logic [GAW-1:0] dtu_addr, host_rd_addr;
  logic [15:0] dtu_wdata, host_rdata;
  int checks = 0, failures = 0;
  localparam int SY = 200, SX = 300;

  fega dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] src_pix(int k, int w, bit second);
    int row, col;
    if (w < 36) begin row = SY + k + 8 * (w / 12); col = SX + 2 * (w % 12) + second; return cand_pix(row, col); end
    row = SY + k + ((w < 44) ? 12 : 4); col = SX + 4 + 2 * ((w - 36) % 8) + second;
    return ref_pix(row, col);
  endfunction

  function automatic logic [7:0] dst_pix(int k, int o);
    if (o < 48)  return cand_pix(SY + k + 8 * (o % 2), SX + o / 2);
    if (o < 96)  return cand_pix(SY + k + 8 + 8 * (o % 2), SX + (o - 48) / 2);
    return ref_pix(SY + k + 4 + 8 * (o % 2), SX + 4 + (o - 96) / 2);
  endfunction

  task automatic rd(int cram_i, int w, output logic [15:0] d);
    @(negedge clk); host_rd_en = 1; host_rd_addr = GAW'(cram_i * CRAM_WORDS + w);
    @(negedge clk); host_rd_en = 0; d = host_rdata;
  endtask

  task automatic run(int first, output int cyc);
    int t0;
    @(negedge clk); start = 1; start_idx = 8'(first); t0 = $time;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cyc = ($time - t0) / 10;
  endtask

  initial begin
    int cyc, exp_c;
    logic [15:0] d;
    cfg_idx = 0; cfg_ctx = '0; start_idx = 0; dtu_addr = 0; dtu_wdata = 0; host_rd_addr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // DTU-side writes: Fig. 16 layout
    for (int k = 0; k < 8; k++)
      for (int w = 0; w < 52; w++) begin
        @(negedge clk); dtu_we = 1; dtu_addr = GAW'(k * CRAM_WORDS + w);
        dtu_wdata = {src_pix(k, w, 0), src_pix(k, w, 1)};
      end
    @(negedge clk); dtu_we = 0;
    // contexts: re-allocation at 200..205 (last on 205), program at 0..86
    for (int i = 0; i < N_RE_CTX + N_CAND; i++) begin
      @(negedge clk); cfg_we = 1; cfg_idx = 8'(i); cfg_ctx = prog_ctx(i);
    end
    for (int i = 0; i < N_RE_CTX; i++) begin
      @(negedge clk); cfg_we = 1; cfg_idx = 8'(200 + i); cfg_ctx = prog_ctx(i);
      cfg_ctx.last = (i == N_RE_CTX - 1);
    end
    @(negedge clk); cfg_we = 0;
    // re-allocation
    run(200, cyc);
    exp_c = 1 + 6 * 6 + 2 * (24 + 32 + 8);
    chk(cyc == exp_c, $sformatf("re-allocation took %0d cycles, expected %0d", cyc, exp_c));
    for (int k = 0; k < 8; k++)
      for (int o = 0; o < 128; o++) begin
        rd(k, ALPHA + o, d);
        chk(d == {8'h00, dst_pix(k, o)}, $sformatf("CRAM %0d alpha+%0d = %h expected %h", k, o, d, dst_pix(k, o)));
      end
    for (int k = 0; k < 8; k += 7) begin
      rd(k, 51, d);
      chk(d == {src_pix(k, 51, 0), src_pix(k, 51, 1)}, "source words kept");
    end
    // SADs
    run(N_RE_CTX, cyc);
    exp_c = 1 + N_CAND * (3 + 32 + 3 + 1);
    chk(cyc == exp_c, $sformatf("SAD took %0d cycles, expected %0d", cyc, exp_c));
    for (int n = 0; n < N_CAND; n++) begin
      rd(SAD_CRAM, n, d);
      chk(int'(d) == ref_sad(SY, SX, n / 9, n % 9), $sformatf("SAD[%0d] = %0d expected %0d", n, d, ref_sad(SY, SX, n / 9, n % 9)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (30000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
