// ls_cell: FE-GA load/store cell with one AGU per CRAM port.
//
// The cell owns both ports of its CRAM for the duration of a sequence.
// Port A only loads; port B loads or stores as the context says (b_we).
// Each port's address comes from its own AGU, which advances every time the
// port is accessed. 'init' (at the start of a sequence) reloads both AGUs
// with their base addresses. The paper places AGUs inside the LS cells;
// giving each cell two of them is this design's choice.
//
// Timing: a_step/b_step in cycle n produce the CRAM access in cycle n
// (combinational enables, registered addresses); load data appear on the
// CRAM's rdata in cycle n+1.
module ls_cell
  import fega_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init,
  input  ls_cfg_t            cfg,
  input  logic               a_step,
  input  logic               b_step,
  input  logic [DW-1:0]      b_wdata_in,
  output logic               a_en,
  output logic [CRAM_AW-1:0] a_addr,
  output logic               b_en,
  output logic               b_we,
  output logic [CRAM_AW-1:0] b_addr,
  output logic [DW-1:0]      b_wdata
);

  logic a_go, b_go;

  assign a_go = a_step & cfg.a_en;
  assign b_go = b_step & cfg.b_en;

  agu u_agu_a (
    .clk, .rst_n, .init, .step(a_go), .cfg(cfg.a), .addr(a_addr)
  );

  agu u_agu_b (
    .clk, .rst_n, .init, .step(b_go), .cfg(cfg.b), .addr(b_addr)
  );

  assign a_en    = a_go;
  assign b_en    = b_go;
  assign b_we    = b_go & cfg.b_we;
  assign b_wdata = b_wdata_in;

endmodule
