// tb_agu: checks the AGU's addressing function Address = m * t + c with
// wrap-around after the number of iterations, for the increments the
// re-allocation uses (1 and 4), a negative increment, irregular step enables
// and re-initialisation; and that each address appears one cycle after the
// step that produced it.
module tb_agu;
  import fega_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, step = 0;
  agu_cfg_t cfg;
  logic [CRAM_AW-1:0] addr;
  int checks = 0, failures = 0;

  agu dut (.*);

  task automatic run(int m, int c, int n, int nsteps);
    int t = 0;
    cfg.m = MW'(m); cfg.c = CRAM_AW'(c); cfg.iters = NW'(n);
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    for (int i = 0; i < nsteps; i++) begin
      int exp_a = (c + m * (t % n)) & ((1 << CRAM_AW) - 1);
      checks++;
      if (int'(addr) != exp_a) begin
        failures++;
        $display("FAIL m=%0d c=%0d n=%0d t=%0d: addr %0d expected %0d", m, c, n, t, addr, exp_a);
      end
      step = ($urandom % 3) != 0;
      @(negedge clk);
      if (step) t++;
      step = 0;
    end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(4, 128, 24, 80);       // Eq. (4): 4t + alpha
    run(4, 130, 24, 40);       // Eq. (6): 4t + alpha + 2
    run(1, 12, 32, 100);       // linear read, 32 iterations
    run(-3, 2000, 7, 50);      // negative increment
    run(1, 5, 1, 10);          // one iteration: stays on the base
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
