// cfgm: configuration manager of the FE-GA, the store of sequence contexts.
//
// Holds up to DEPTH contexts (the paper's FE-GA keeps 256 sequences).
// A context (fega_pkg::ctx_t) fixes, for one sequence, the datapath mode, the
// number of control steps, the crossbar selects and the AGU settings of all
// LS cells, so changing sequence reconfigures the array. Contexts are written
// through a plain write port (this design's choice: the paper does not say
// how they are loaded) and read synchronously: rd_ctx is valid the cycle after
// rd_idx is presented.
module cfgm
  import fega_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned IW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  ctx_t          wr_ctx,
  input  logic [IW-1:0] rd_idx,
  output ctx_t          rd_ctx
);

  ctx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_ctx;
    rd_ctx <= mem[rd_idx];
  end

endmodule
