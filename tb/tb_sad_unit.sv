// tb_sad_unit: feeds 32 random lane vectors (one 16x16 block) with gaps in
// in_valid and checks the accumulated SAD against a model, the two-cycle
// latency from in_valid to the accumulator, clearing, and saturation.
module tb_sad_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, in_valid = 0;
  logic [7:0][15:0] cand, refp;
  logic [15:0] sad;
  int checks = 0, failures = 0;

  sad_unit dut (.*);

  task automatic chk(int exp_v, string what);
    checks++;
    if (int'(sad) != exp_v) begin failures++; $display("FAIL %s: %0d expected %0d", what, sad, exp_v); end
  endtask

  initial begin
    int model, part;
    cand = '0; refp = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      model = 0;
      for (int v = 0; v < 32; v++) begin
        part = 0;
        for (int k = 0; k < 8; k++) begin
          int a = $urandom % 256, b = $urandom % 256;
          cand[k] = 16'(a); refp[k] = 16'(b);
          part += (a > b) ? a - b : b - a;
        end
        in_valid = 1;
        @(negedge clk); in_valid = 0;
        chk(model, "before latency");
        @(negedge clk);
        model += part;
        chk(model, "after two cycles");
        if ($urandom % 2) @(negedge clk);
      end
    end
    // saturation: 40 vectors of all-255 differences exceed 16 bits
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int k = 0; k < 8; k++) begin cand[k] = 16'd255; refp[k] = 16'd0; end
    in_valid = 1; repeat (40) @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    chk(65535, "saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
