// agu: address generation unit of an FE-GA load/store cell.
//
// Generates the linear addressing function Address = m * t + c, where t is
// the control step, m the address increment and c the base address. After
// 'iters' steps the address returns to c and counting starts again, as the
// document describes for its AGUs. It is built from one adder and one counter
// (no multiplier), in line with the paper's statement that AGUs hold only
// adders and counters.
//
// Interface: 'init' loads c and clears t; 'step' advances t by one. 'addr' is
// the address for the current step and is valid in the cycle it is used.
// Timing: addr changes in the cycle after init or step. Advancing on 'step'
// rather than on every clock is this design's choice, so that a port that is
// accessed only now and then keeps its own count.
module agu
  import fega_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init,
  input  logic               step,
  input  agu_cfg_t           cfg,
  output logic [CRAM_AW-1:0] addr
);

  logic [NW-1:0] t_cnt;
  logic          wrap;

  assign wrap = (t_cnt + NW'(1) >= cfg.iters);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr  <= '0;
      t_cnt <= '0;
    end else if (init) begin
      addr  <= cfg.c;
      t_cnt <= '0;
    end else if (step) begin
      if (wrap) begin
        addr  <= cfg.c;
        t_cnt <= '0;
      end else begin
        addr  <= addr + CRAM_AW'(cfg.m);
        t_cnt <= t_cnt + NW'(1);
      end
    end
  end

endmodule
