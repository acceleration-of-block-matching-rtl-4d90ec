// tb_cram: random reads and writes on both CRAM ports against a model array;
// checks the one-cycle read latency and that both ports see each other's
// writes.
module tb_cram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [10:0] a_addr, b_addr;
  logic [15:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [15:0] model [2048];
  int checks = 0, failures = 0;

  cram dut (.*);

  initial begin
    logic [15:0] ea, eb;
    bit ra, rb;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through both ports
    for (int i = 0; i < 2048; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 11'(i);     a_wdata = 16'($urandom);
      b_en = 1; b_we = 1; b_addr = 11'(i + 1); b_wdata = 16'($urandom);
      model[i] = a_wdata; model[i+1] = b_wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a_en = $urandom % 4 != 0; a_we = $urandom % 3 == 0; a_addr = 11'($urandom % 64);
      b_en = $urandom % 4 != 0; b_we = $urandom % 3 == 0; b_addr = 11'($urandom % 64 + 32);
      if (a_we && b_we && a_addr == b_addr) b_we = 0;
      a_wdata = 16'($urandom); b_wdata = 16'($urandom);
      ra = a_en && !a_we; rb = b_en && !b_we;
      ea = model[a_addr]; eb = model[b_addr];
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      a_en = 0; b_en = 0;
      if (ra) begin checks++; if (a_rdata != ea) begin failures++; $display("FAIL A %0d", a_addr); end end
      if (rb) begin checks++; if (b_rdata != eb) begin failures++; $display("FAIL B %0d", b_addr); end end
    end
    // read all back
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk); a_en = 1; a_we = 0; a_addr = 11'(i);
      @(negedge clk); a_en = 0;
      checks++; if (a_rdata != model[i]) begin failures++; $display("FAIL final %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
