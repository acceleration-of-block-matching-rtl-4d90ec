// tb_xbar: random inputs and selects, including the rotations the SAD mapping
// uses; each output must equal the selected input.
module tb_xbar;
  logic [7:0][2:0] sel;
  logic [7:0][15:0] din, dout;
  int checks = 0, failures = 0;
  xbar dut (.*);
  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < 8; k++) begin
        din[k] = 16'($urandom);
        sel[k] = (n < 9) ? 3'((k - n + 16) % 8) : 3'($urandom);
      end
      #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (dout[k] !== din[sel[k]]) begin failures++; $display("FAIL out %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
