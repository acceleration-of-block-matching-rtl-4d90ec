// bm_top: block-matching system of N_PAIRS CPU/FE-GA pairs.
//
// Block matching for optical flow: for every 16x16 reference block of the
// image at time t, the 81 candidate blocks of a 24x24 search area in the
// image at time t + dt are compared by their sum of absolute differences
// (SAD). In the paper's main configuration four pairs work in parallel,
// each taking a quarter of the reference blocks, so the pairs share nothing
// but the external memory. Here each pair (bm_pair) keeps its own ports,
// brought out as arrays indexed by pair; the shared system bus and the
// external memory controller are outside this module. The CPU side of each
// pair (command lists, starts, SAD read-back and the minimum search) drives
// those ports.
module bm_top
  import fega_pkg::*;
#(
  parameter int unsigned N_PAIRS    = 4,
  parameter int unsigned URAM_WORDS = 1024,
  parameter int unsigned URAM_AW    = $clog2(URAM_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               uram_we      [N_PAIRS],
  input  logic [URAM_AW-1:0] uram_addr    [N_PAIRS],
  input  logic [31:0]        uram_wdata   [N_PAIRS],
  input  logic               uram_rd_en   [N_PAIRS],
  input  logic [URAM_AW-1:0] uram_rd_addr [N_PAIRS],
  output logic [31:0]        uram_rdata   [N_PAIRS],
  input  logic               dtu_start    [N_PAIRS],
  input  logic [URAM_AW-1:0] dtu_cmd_ptr  [N_PAIRS],
  output logic               dtu_busy     [N_PAIRS],
  output logic               dtu_done     [N_PAIRS],
  output logic               src_req      [N_PAIRS],
  output logic [31:0]        src_addr     [N_PAIRS],
  input  logic               src_gnt      [N_PAIRS],
  input  logic               src_rvalid   [N_PAIRS],
  input  logic [7:0]         src_rdata    [N_PAIRS],
  input  logic               cfg_we       [N_PAIRS],
  input  logic [CTX_IW-1:0]  cfg_idx      [N_PAIRS],
  input  ctx_t               cfg_ctx      [N_PAIRS],
  input  logic               fe_start     [N_PAIRS],
  input  logic [CTX_IW-1:0]  fe_start_idx [N_PAIRS],
  output logic               fe_busy      [N_PAIRS],
  output logic               fe_done      [N_PAIRS],
  input  logic               host_rd_en   [N_PAIRS],
  input  logic [GAW-1:0]     host_rd_addr [N_PAIRS],
  output logic [DW-1:0]      host_rdata   [N_PAIRS]
);

  for (genvar p = 0; p < N_PAIRS; p++) begin : g_pair
    bm_pair #(.URAM_WORDS(URAM_WORDS)) u_pair (
      .clk, .rst_n,
      .uram_we(uram_we[p]), .uram_addr(uram_addr[p]), .uram_wdata(uram_wdata[p]),
      .uram_rd_en(uram_rd_en[p]), .uram_rd_addr(uram_rd_addr[p]), .uram_rdata(uram_rdata[p]),
      .dtu_start(dtu_start[p]), .dtu_cmd_ptr(dtu_cmd_ptr[p]),
      .dtu_busy(dtu_busy[p]), .dtu_done(dtu_done[p]),
      .src_req(src_req[p]), .src_addr(src_addr[p]), .src_gnt(src_gnt[p]),
      .src_rvalid(src_rvalid[p]), .src_rdata(src_rdata[p]),
      .cfg_we(cfg_we[p]), .cfg_idx(cfg_idx[p]), .cfg_ctx(cfg_ctx[p]),
      .fe_start(fe_start[p]), .fe_start_idx(fe_start_idx[p]),
      .fe_busy(fe_busy[p]), .fe_done(fe_done[p]),
      .host_rd_en(host_rd_en[p]), .host_rd_addr(host_rd_addr[p]),
      .host_rdata(host_rdata[p])
    );
  end

endmodule
