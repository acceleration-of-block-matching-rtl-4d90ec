// tb_realloc_unit: random packed words; checks that each lane returns the
// upper pixel (sel_lo = 0) or the lower pixel (sel_lo = 1) widened with zeros.
module tb_realloc_unit;
  logic sel_lo;
  logic [7:0][15:0] din, dout;
  int checks = 0, failures = 0;
  realloc_unit dut (.*);
  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < 8; k++) din[k] = 16'($urandom);
      sel_lo = n[0];
      #1;
      for (int k = 0; k < 8; k++) begin
        logic [15:0] e;
        e = sel_lo ? (din[k] & 16'h00ff) : (din[k] >> 8);
        checks++;
        if (dout[k] !== e) begin failures++; $display("FAIL lane %0d %h -> %h", k, din[k], dout[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
