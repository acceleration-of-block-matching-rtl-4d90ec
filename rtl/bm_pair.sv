// bm_pair: one processing pair of the block-matching system, without its CPU.
//
// The paper pairs a CPU core with an FE-GA: the CPU places a command list
// in its local memory (URAM), the DTU copies a reference block and its search
// area from external memory into the FE-GA's CRAMs, the FE-GA re-allocates the
// data and computes the SADs of all candidate blocks, and the CPU reads the
// SADs back and searches the minimum. This module wires the URAM, the DTU and
// the FE-GA together; every step the CPU performs is a port: command-list
// writes and local-memory reads (uram_*), DTU start (dtu_start/dtu_cmd_ptr),
// context writes and sequence start (cfg_*, fe_start), and direct reads of the
// CRAM space (host_rd_*). The external memory is reached through the DTU's
// byte read port (src_*). The SADs reach the CPU either by a DTU read-back
// command (CRAM 8 to URAM, as in the paper) or by direct CRAM reads.
// While the DTU runs it owns the URAM ports and the FE-GA's read port; the
// CPU-side ports must then stay idle (checked by an assertion).
module bm_pair
  import fega_pkg::*;
#(
  parameter int unsigned URAM_WORDS = 1024,
  parameter int unsigned URAM_AW    = $clog2(URAM_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // command list
  input  logic               uram_we,
  input  logic [URAM_AW-1:0] uram_addr,
  input  logic [31:0]        uram_wdata,
  input  logic               uram_rd_en,
  input  logic [URAM_AW-1:0] uram_rd_addr,
  output logic [31:0]        uram_rdata,
  // DTU
  input  logic               dtu_start,
  input  logic [URAM_AW-1:0] dtu_cmd_ptr,
  output logic               dtu_busy,
  output logic               dtu_done,
  output logic               src_req,
  output logic [31:0]        src_addr,
  input  logic               src_gnt,
  input  logic               src_rvalid,
  input  logic [7:0]         src_rdata,
  // FE-GA
  input  logic               cfg_we,
  input  logic [CTX_IW-1:0]  cfg_idx,
  input  ctx_t               cfg_ctx,
  input  logic               fe_start,
  input  logic [CTX_IW-1:0]  fe_start_idx,
  output logic               fe_busy,
  output logic               fe_done,
  input  logic               host_rd_en,
  input  logic [GAW-1:0]     host_rd_addr,
  output logic [DW-1:0]      host_rdata
);

  logic               u_rd_en;
  logic [URAM_AW-1:0] u_rd_addr;
  logic [31:0]        u_rd_data;
  logic               d_we;
  logic [31:0]        d_addr;
  logic [15:0]        d_wdata;
  logic               c_rd_en;
  logic [31:0]        c_rd_addr;
  logic               d_uram_we;
  logic [URAM_AW-1:0] d_uram_waddr;
  logic [31:0]        d_uram_wdata;
  logic [DW-1:0]      fe_rdata;

  uram #(.WORDS(URAM_WORDS)) u_uram (
    .clk,
    .wr_en(d_uram_we | uram_we),
    .wr_addr(d_uram_we ? d_uram_waddr : uram_addr),
    .wr_data(d_uram_we ? d_uram_wdata : uram_wdata),
    .rd_en(dtu_busy ? u_rd_en : uram_rd_en),
    .rd_addr(dtu_busy ? u_rd_addr : uram_rd_addr),
    .rd_data(u_rd_data)
  );

  assign uram_rdata = u_rd_data;
  assign host_rdata = fe_rdata;

  dtu #(.URAM_AW(URAM_AW)) u_dtu (
    .clk, .rst_n, .start(dtu_start), .cmd_ptr(dtu_cmd_ptr),
    .busy(dtu_busy), .done(dtu_done),
    .uram_rd_en(u_rd_en), .uram_rd_addr(u_rd_addr), .uram_rd_data(u_rd_data),
    .src_req, .src_addr, .src_gnt, .src_rvalid, .src_rdata,
    .dst_we(d_we), .dst_addr(d_addr), .dst_wdata(d_wdata),
    .cram_rd_en(c_rd_en), .cram_rd_addr(c_rd_addr), .cram_rd_data(fe_rdata),
    .uram_wr_en(d_uram_we), .uram_wr_addr(d_uram_waddr), .uram_wr_data(d_uram_wdata)
  );

  fega u_fega (
    .clk, .rst_n,
    .cfg_we, .cfg_idx, .cfg_ctx, .start(fe_start), .start_idx(fe_start_idx),
    .busy(fe_busy), .done(fe_done),
    .dtu_we(d_we), .dtu_addr(d_addr[GAW-1:0]), .dtu_wdata(d_wdata),
    .host_rd_en(dtu_busy ? c_rd_en : host_rd_en),
    .host_rd_addr(dtu_busy ? c_rd_addr[GAW-1:0] : host_rd_addr),
    .host_rdata(fe_rdata)
  );

  assert property (@(posedge clk) disable iff (!rst_n)
    (dtu_busy || d_uram_we) |-> !(uram_we || uram_rd_en || host_rd_en))
    else $error("CPU-side access while the DTU runs");

endmodule
