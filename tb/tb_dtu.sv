// tb_dtu: runs a linked list of four commands, one of each type (continuous,
// stride with the paper's command-1 fields, gather, scatter), against the
// external memory model with random stalls, then a single command started at
// another pointer. Every destination word written is compared with a model
// that walks the same byte pattern; the number of writes, the done pulse and
// the lower bound of one byte per cycle are checked. Two read-back commands
// (CRAM space to URAM, continuous then stride) are checked the same way.
module tb_dtu;
  import dtu_pkg::*;
  import bm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [9:0] cmd_ptr;
  logic busy, done;
  logic uram_rd_en;
  logic [9:0] uram_rd_addr;
  logic [31:0] uram_rd_data;
  logic src_req, src_gnt, src_rvalid;
  logic [31:0] src_addr;
  logic [7:0] src_rdata;
  logic dst_we;
  logic [31:0] dst_addr;
  logic [15:0] dst_wdata;
  int stalls;
  logic cram_rd_en, uram_wr_en;
  logic [31:0] cram_rd_addr, uram_wr_data;
  logic [15:0] cram_rd_data;
  logic [9:0] uram_wr_addr;
  logic [31:0] ugot [int];
  logic [31:0] umem [1024];
  logic [15:0] got [int];
  logic [15:0] exp_w [int];
  int writes = 0, checks = 0, failures = 0;

  dtu dut (.*);
  ddr_model #(.LAT(5), .STALL_PCT(30), .SEED(3)) u_ddr (
    .clk, .req(src_req), .addr(src_addr), .gnt(src_gnt), .rvalid(src_rvalid), .rdata(src_rdata), .stalls
  );

  always_ff @(posedge clk) if (uram_rd_en) uram_rd_data <= umem[uram_rd_addr];
  always @(posedge clk) if (dst_we) begin got[int'(dst_addr)] = dst_wdata; writes++; end
  // CRAM space model for read-back: word value derived from its address
  function automatic logic [15:0] cram_word(int a); return 16'(a * 40503 + 17); endfunction
  always_ff @(posedge clk) if (cram_rd_en) cram_rd_data <= cram_word(int'(cram_rd_addr));
  always @(posedge clk) if (uram_wr_en) begin ugot[int'(uram_wr_addr)] = uram_wr_data; writes++; end
  logic [31:0] uexp [int];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // place a command and add its expected words to the model
  task automatic put(int at, int ty, bit last, int src, int dst, int width, int n, int sg, int dg, int nxt);
    int s = src, d = dst;
    umem[at+0] = {last, 29'd0, 2'(ty)}; umem[at+1] = src; umem[at+2] = dst; umem[at+3] = width;
    umem[at+4] = n; umem[at+5] = sg; umem[at+6] = dg; umem[at+7] = nxt;
    if (ty >= 4) begin   // read-back command, type (ty - 4)
      umem[at+0][30] = 1'b1; umem[at+0][1:0] = 2'(ty - 4);
      for (int i = 0; i < n; i++) begin
        for (int b = 0; b < width; b++) begin
          uexp[d] = {16'h0, cram_word(s)};
          s += 1; d += 1;
        end
        if (ty == 5 || ty == 6) s += sg;
        if (ty == 5 || ty == 7) d += dg;
      end
      return;
    end
    for (int i = 0; i < n; i++) begin
      for (int b = 0; b < width; b += 2) begin
        exp_w[d] = {ddr_byte(s), ddr_byte(s + 1)};
        s += 2; d += 1;
      end
      if (ty == 1 || ty == 2) s += sg;
      if (ty == 1 || ty == 3) d += dg;
    end
  endtask

  task automatic go(int ptr, int bytes, int nwr);
    longint t0;
    int cyc;
    got.delete(); ugot.delete(); writes = 0;
    @(negedge clk); start = 1; cmd_ptr = 10'(ptr); t0 = $time;
    @(negedge clk); start = 0;
    chk(busy, "busy after start");
    while (!done) @(negedge clk);
    cyc = int'(($time - t0) / 10);
    @(negedge clk);
    chk(!busy && !done, "done is one pulse and ends busy");
    chk(writes == nwr, $sformatf("writes %0d expected %0d", writes, nwr));
    chk(cyc >= bytes, $sformatf("%0d cycles for %0d bytes", cyc, bytes));
    foreach (exp_w[a]) begin
      chk(got.exists(a) && got[a] == exp_w[a], $sformatf("word %0d", a));
    end
    foreach (uexp[a]) begin
      chk(ugot.exists(a) && ugot[a] == uexp[a], $sformatf("URAM word %0d", a));
    end
    exp_w.delete(); uexp.delete();
  endtask

  initial begin
    cmd_ptr = 0;
    for (int i = 0; i < 1024; i++) umem[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    put(0,   0, 0, 1000, 5000, 10, 3, 0, 0, 40);                       // continuous
    put(40,  1, 0, 0, 0, 24, 8, IMG_W - 24, 2048 - 12, 16);            // stride, command 1
    put(16,  2, 0, REF_BASE + 7, 9000, 6, 4, 100, 0, 100);              // gather
    put(100, 3, 1, 2000, 12000, 4, 5, 0, 30, 0);                       // scatter
    go(0, 30 + 192 + 24 + 20, (30 + 192 + 24 + 20) / 2);
    put(200, 1, 1, REF_BASE + 4 * IMG_W + 4, 44, 16, 8, IMG_W - 16, 2048 - 8, 0);   // command 5
    go(200, 128, 64);
    // read-back: continuous (the 81 SADs) chained to a strided one
    put(300, 4, 0, 8 * 2048, 512, 81, 1, 0, 0, 320);
    put(320, 5, 1, 3 * 2048 + 5, 700, 3, 4, 9, 2, 0);
    go(300, 81 + 12, 81 + 12);
    $display("memory stalls seen: %0d", stalls);
    chk(stalls > 0, "memory stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
