// tb_uram: writes random command words and reads them back with one cycle of
// latency, including a read of a word written in the same cycle (old data).
module tb_uram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [9:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;
  uram dut (.*);
  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 10'(i); wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] e;
      @(negedge clk);
      rd_en = 1; rd_addr = 10'($urandom);
      e = model[rd_addr];
      wr_en = $urandom % 2; wr_addr = ($urandom % 2) ? rd_addr : 10'($urandom); wr_data = $urandom;
      @(negedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data != e) begin failures++; $display("FAIL %0d", rd_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
