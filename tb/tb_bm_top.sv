// tb_bm_top: end-to-end test of the block-matching system at full size.
//
// Each of the four pairs processes one reference block of a VGA frame pair:
// the CPU side (this testbench) writes the five stride commands into the
// pair's URAM and the 87 sequence contexts into its FE-GA, starts the DTU,
// which copies the 24x24 search area and the 16x16 reference block from the
// external memory model into CRAM 0..7, then starts the FE-GA, which
// re-allocates the packed pixels (6 sequences) and computes 81 SADs into
// CRAM 8, then starts the DTU again to copy the SADs into the URAM (the
// CPU's local memory). The testbench reads them there, compares each with an
// independently computed value, and searches the minimum, which must lie at
// the known image motion. It also checks the FE-GA cycle count against the
// sequence timing and counts the mechanisms exercised: command-list
// chaining, stride gaps, memory stalls, upper and lower byte re-allocation,
// crossbar rotation, SAD write-back and SAD read-back.
module tb_bm_top;
  import fega_pkg::*;
  import bm_tb_pkg::*;

  localparam int NP = 4;
  localparam int UAW = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               uram_we [NP];
  logic [UAW-1:0]     uram_addr [NP];
  logic [31:0]        uram_wdata [NP];
  logic               uram_rd_en [NP];
  logic [UAW-1:0]     uram_rd_addr [NP];
  logic [31:0]        uram_rdata [NP];
  logic               dtu_start [NP];
  logic [UAW-1:0]     dtu_cmd_ptr [NP];
  logic               dtu_busy [NP], dtu_done [NP];
  logic               src_req [NP];
  logic [31:0]        src_addr [NP];
  logic               src_gnt [NP], src_rvalid [NP];
  logic [7:0]         src_rdata [NP];
  logic               cfg_we [NP];
  logic [CTX_IW-1:0]  cfg_idx [NP];
  ctx_t               cfg_ctx [NP];
  logic               fe_start [NP];
  logic [CTX_IW-1:0]  fe_start_idx [NP];
  logic               fe_busy [NP], fe_done [NP];
  logic               host_rd_en [NP];
  logic [GAW-1:0]     host_rd_addr [NP];
  logic [DW-1:0]      host_rdata [NP];
  int                 stalls [NP];

  bm_top dut (.*);

  for (genvar p = 0; p < NP; p++) begin : g_mem
    ddr_model #(.LAT(3 + p), .STALL_PCT(25), .SEED(p + 11)) u_ddr (
      .clk, .req(src_req[p]), .addr(src_addr[p]), .gnt(src_gnt[p]),
      .rvalid(src_rvalid[p]), .rdata(src_rdata[p]), .stalls(stalls[p])
    );
  end

  int checks = 0, failures = 0;
  int n_readback = 0, n_cmd_fetch = 0, n_re_hi = 0, n_re_lo = 0, n_xb_rot = 0, n_sad_wb = 0, n_gap = 0;
  int pair_ok = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters, observed inside pair 0..3
  for (genvar p = 0; p < NP; p++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_pair[p].u_pair.u_dtu.state == 2'd1 && dut.g_pair[p].u_pair.u_dtu.fcnt == 0) n_cmd_fetch++;
      if (src_req[p] && src_gnt[p] && dut.g_pair[p].u_pair.u_dtu.i_bcnt == 0 && dut.g_pair[p].u_pair.u_dtu.i_scnt != 0) n_gap++;
      if (dut.g_pair[p].u_pair.u_fega.ls_init) begin
        ctx_t c;
        c = dut.g_pair[p].u_pair.u_fega.ctx;
        if (c.mode == MODE_REALLOC && !c.sel_lo) n_re_hi++;
        if (c.mode == MODE_REALLOC &&  c.sel_lo) n_re_lo++;
        if (c.mode == MODE_SAD && c.xb_sel[0] != 0) n_xb_rot++;
      end
      if (dut.g_pair[p].u_pair.u_fega.store_sad) n_sad_wb++;
      if (dut.g_pair[p].u_pair.u_dtu.uram_wr_en) n_readback++;
    end
  end

  function automatic int org_y(int p); return 48 + 96 * p; endfunction
  function automatic int org_x(int p); return 32 + 144 * p; endfunction

  // expected FE-GA cycles: start, then per sequence FETCH, LOAD, INIT, steps, DRAIN (+STORE)
  function automatic int fe_cycles();
    int c = 1;   // the cycle in which 'start' is taken
    for (int i = 0; i < N_RE_CTX + N_CAND; i++) begin
      ctx_t x = prog_ctx(i);
      c += 3 + int'(x.steps) + 3 + (x.mode == MODE_SAD ? 1 : 0);
    end
    return c;
  endfunction

  task automatic run_pair(int p);
    int sy = org_y(p), sx = org_x(p);
    longint t0;
    int dtu_cyc, fe_cyc, best, best_n;
    // command list
    for (int n = 0; n < 5; n++)
      for (int w = 0; w < 8; w++) begin
        @(negedge clk);
        uram_we[p] = 1; uram_addr[p] = UAW'(8 * n + w); uram_wdata[p] = dtu_cmd_word(n, w, sy, sx, 0);
      end
    // contexts
    for (int i = 0; i < N_RE_CTX + N_CAND; i++) begin
      @(negedge clk);
      uram_we[p] = 0;
      cfg_we[p] = 1; cfg_idx[p] = CTX_IW'(i); cfg_ctx[p] = prog_ctx(i);
    end
    @(negedge clk);
    cfg_we[p] = 0; uram_we[p] = 0;
    // DTU transfer
    dtu_start[p] = 1; dtu_cmd_ptr[p] = '0; t0 = $time;
    @(negedge clk); dtu_start[p] = 0;
    while (!dtu_done[p]) @(negedge clk);
    dtu_cyc = int'(($time - t0) / 10);
    check(dtu_cyc >= 832 + 5 * 9, $sformatf("pair %0d DTU faster than one byte per cycle (%0d)", p, dtu_cyc));
    @(negedge clk);
    // FE-GA sequences
    fe_start[p] = 1; fe_start_idx[p] = '0; t0 = $time;
    @(negedge clk); fe_start[p] = 0;
    while (!fe_done[p]) @(negedge clk);
    fe_cyc = int'(($time - t0) / 10);
    check(fe_cyc == fe_cycles(), $sformatf("pair %0d FE-GA cycles %0d, expected %0d", p, fe_cyc, fe_cycles()));
    // DTU brings the SADs back into the URAM
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      uram_we[p] = 1; uram_addr[p] = UAW'(64 + w); uram_wdata[p] = readback_cmd_word(w);
    end
    @(negedge clk);
    uram_we[p] = 0; dtu_start[p] = 1; dtu_cmd_ptr[p] = UAW'(64);
    @(negedge clk); dtu_start[p] = 0;
    while (!dtu_done[p]) @(negedge clk);
    @(negedge clk);
    // read the SADs locally and search the minimum (CPU side)
    best = 1 << 30; best_n = -1;
    for (int n = 0; n < N_CAND; n++) begin
      int exp_sad, got;
      @(negedge clk);
      uram_rd_en[p] = 1; uram_rd_addr[p] = UAW'(SAD_URAM + n);
      @(negedge clk);
      uram_rd_en[p] = 0;
      got = int'(uram_rdata[p]);
      exp_sad = ref_sad(sy, sx, n / 9, n % 9);
      check(got == exp_sad, $sformatf("pair %0d SAD[%0d] = %0d, expected %0d", p, n, got, exp_sad));
      if (got < best) begin best = got; best_n = n; end
    end
    check(best_n == 9 * (4 + MOT_Y) + (4 + MOT_X) && best == 0,
          $sformatf("pair %0d minimum at %0d (SAD %0d)", p, best_n, best));
    $display("pair %0d: search area (%0d,%0d) DTU %0d cycles, FE-GA %0d cycles, best candidate %0d",
             p, sy, sx, dtu_cyc, fe_cyc, best_n);
    pair_ok++;
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin
      uram_we[p] = 0; uram_addr[p] = 0; uram_wdata[p] = 0; uram_rd_en[p] = 0; uram_rd_addr[p] = 0;
      dtu_start[p] = 0; dtu_cmd_ptr[p] = 0;
      cfg_we[p] = 0; cfg_idx[p] = 0; cfg_ctx[p] = '0;
      fe_start[p] = 0; fe_start_idx[p] = 0;
      host_rd_en[p] = 0; host_rd_addr[p] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      run_pair(0);
      run_pair(1);
      run_pair(2);
      run_pair(3);
    join
    check(pair_ok == NP, "all pairs finished");
    $display("mechanisms: command fetches %0d, stride gaps %0d, memory stalls %0d/%0d/%0d/%0d, upper-byte seq %0d, lower-byte seq %0d, rotated crossbar seq %0d, SAD write-backs %0d, words read back %0d",
             n_cmd_fetch, n_gap, stalls[0], stalls[1], stalls[2], stalls[3], n_re_hi, n_re_lo, n_xb_rot, n_sad_wb, n_readback);
    check(n_cmd_fetch == 6 * NP, "command-list chaining");
    check(n_readback == N_CAND * NP, "SAD read-back by the DTU");
    check(n_gap > 0, "stride gap");
    check(stalls[0] > 0 && stalls[3] > 0, "memory stall");
    check(n_re_hi == 3 * NP && n_re_lo == 3 * NP, "upper and lower byte re-allocation");
    check(n_xb_rot > 0, "crossbar rotation");
    check(n_sad_wb == N_CAND * NP, "SAD write-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
