// tb_seqm: runs two chains of contexts (re-allocation, SAD and NOP modes,
// one with zero steps) from a model configuration memory and checks, per
// sequence, the number of 'run' cycles, the run_d1 delay, the SAD store
// strobe, AGU initialisation, the context presented, the 'done' pulse and the
// total cycle count.
module tb_seqm;
  import fega_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [7:0] start_idx, cfg_rd_idx;
  ctx_t cfg_rd_ctx, ctx;
  logic ls_init, run, run_d1, store_sad, busy, done;
  ctx_t mem [256];
  int checks = 0, failures = 0;

  seqm dut (.*);

  always_ff @(posedge clk) cfg_rd_ctx <= mem[cfg_rd_idx];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // per-sequence observation
  int seq_no, runs, stores, inits, cyc;
  logic prev_run;
  always @(posedge clk) if (rst_n) begin
    if (busy) cyc++;
    if (run) runs++;
    if (store_sad) stores++;
    if (ls_init) inits++;
    chk(run_d1 == prev_run, "run_d1 is run delayed");
    prev_run = run;
  end

  task automatic chain(int first, int n);
    int exp_cyc = 0, exp_runs = 0, exp_st = 0;
    for (int i = first; i < first + n; i++) begin
      exp_cyc  += 3 + int'(mem[i].steps) + 3 + (mem[i].mode == MODE_SAD ? 1 : 0);
      exp_runs += int'(mem[i].steps);
      exp_st   += (mem[i].mode == MODE_SAD) ? 1 : 0;
    end
    cyc = 0; runs = 0; stores = 0; inits = 0;
    @(negedge clk); start = 1; start_idx = 8'(first);
    @(negedge clk); start = 0;
    while (!done) begin
      @(negedge clk);
      if (ls_init) chk(ctx == mem[cfg_rd_idx], "context of the running sequence");
    end
    chk(cyc == exp_cyc, $sformatf("busy cycles %0d expected %0d", cyc, exp_cyc));
    chk(runs == exp_runs, $sformatf("run cycles %0d expected %0d", runs, exp_runs));
    chk(stores == exp_st, $sformatf("SAD stores %0d expected %0d", stores, exp_st));
    chk(inits == n, "one init per sequence");
    @(negedge clk);
    chk(!done && !busy, "done is one pulse");
  endtask

  initial begin
    prev_run = 0;
    for (int i = 0; i < 256; i++) mem[i] = '0;
    for (int i = 10; i < 20; i++) begin
      mem[i].mode  = (i % 3 == 0) ? MODE_SAD : (i % 3 == 1) ? MODE_REALLOC : MODE_NOP;
      mem[i].steps = 12'((i == 12) ? 0 : 5 + i);
      mem[i].last  = (i == 15 || i == 19);
      mem[i].ls[i % 10].a.c = 11'(i);
    end
    start_idx = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    chain(10, 6);
    chain(16, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
