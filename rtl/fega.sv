// fega: the FE-GA accelerator core as used for block matching.
//
// Ten CRAMs (4 KB, 16-bit words), each owned by one LS cell with an AGU on
// each of its two ports; a configuration manager (CFGM) with 256 contexts and
// a sequence manager (SEQM) that runs them; a crossbar (XB); and the two PE
// array mappings the block matching uses:
//   MODE_REALLOC  lane k reads CRAM k on port A, takes the upper or lower
//                 pixel of the word and stores it, widened, on port B of the
//                 same CRAM one step later (data re-allocation)
//   MODE_SAD      lane k reads a candidate pixel on port A and a reference
//                 pixel on port B of CRAM k; the crossbar pairs each
//                 candidate lane with a reference lane; the SAD datapath
//                 accumulates over all steps and the result is stored by every
//                 LS cell whose port B is set to store (CRAM 8 in the
//                 paper's mapping)
// The 24 ALU and 8 MLT cells of the paper's FE-GA are not modelled one by
// one: their instruction set is not known, so the two mappings are fixed
// datapaths chosen by the context mode.
//
// Outside access, only while no sequence runs (checked by assertions): the
// DTU writes words on port A through a global word address (CRAM index in
// the upper CRAM_IW bits, word in the lower CRAM_AW bits), and the host reads
// words on port B with the same addressing (data one cycle after the request).
// Contexts are written through cfg_*; 'start' runs contexts from start_idx
// until one marked last, then 'done' pulses.
module fega
  import fega_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // context load and sequence control
  input  logic              cfg_we,
  input  logic [CTX_IW-1:0] cfg_idx,
  input  ctx_t              cfg_ctx,
  input  logic              start,
  input  logic [CTX_IW-1:0] start_idx,
  output logic              busy,
  output logic              done,
  // DTU write into the CRAM space
  input  logic              dtu_we,
  input  logic [GAW-1:0]    dtu_addr,
  input  logic [DW-1:0]     dtu_wdata,
  // host read of the CRAM space
  input  logic              host_rd_en,
  input  logic [GAW-1:0]    host_rd_addr,
  output logic [DW-1:0]     host_rdata
);

  ctx_t              ctx, cfg_rd_ctx;
  logic [CTX_IW-1:0] cfg_rd_idx;
  logic              ls_init, run, run_d1, store_sad;
  logic              store_strobe;

  logic [N_CRAM-1:0]              ls_a_en, ls_b_en, ls_b_we;
  logic [N_CRAM-1:0][CRAM_AW-1:0] ls_a_addr, ls_b_addr;
  logic [N_CRAM-1:0][DW-1:0]      ls_b_wdata, ls_b_wdata_in;
  logic [N_CRAM-1:0]              b_step;

  logic [N_CRAM-1:0]              c_a_en, c_a_we, c_b_en, c_b_we;
  logic [N_CRAM-1:0][CRAM_AW-1:0] c_a_addr, c_b_addr;
  logic [N_CRAM-1:0][DW-1:0]      c_a_wdata, c_b_wdata, c_a_rdata, c_b_rdata;

  logic [LANES-1:0][DW-1:0] lane_a, lane_b, ref_x, re_out;
  logic [DW-1:0]            sad;
  logic [CRAM_IW-1:0]       host_idx_q;

  cfgm #(.DEPTH(N_CTX)) u_cfgm (
    .clk, .wr_en(cfg_we), .wr_idx(cfg_idx), .wr_ctx(cfg_ctx),
    .rd_idx(cfg_rd_idx), .rd_ctx(cfg_rd_ctx)
  );

  seqm u_seqm (
    .clk, .rst_n, .start, .start_idx, .cfg_rd_idx, .cfg_rd_ctx, .ctx,
    .ls_init, .run, .run_d1, .store_sad, .busy, .done
  );

  // stores: one step after the load in re-allocation, once at the end in SAD
  always_comb begin
    unique case (ctx.mode)
      MODE_REALLOC: store_strobe = run_d1;
      MODE_SAD:     store_strobe = store_sad;
      default:      store_strobe = 1'b0;
    endcase
  end

  for (genvar k = 0; k < N_CRAM; k++) begin : g_cell
    assign b_step[k] = ctx.ls[k].b_we ? store_strobe : run;

    if (k < LANES) begin : g_lane
      assign ls_b_wdata_in[k] = (ctx.mode == MODE_SAD) ? sad : re_out[k];
      assign lane_a[k]        = c_a_rdata[k];
      assign lane_b[k]        = c_b_rdata[k];
    end else begin : g_extra
      assign ls_b_wdata_in[k] = sad;
    end

    ls_cell u_ls (
      .clk, .rst_n, .init(ls_init), .cfg(ctx.ls[k]),
      .a_step(run), .b_step(b_step[k]), .b_wdata_in(ls_b_wdata_in[k]),
      .a_en(ls_a_en[k]), .a_addr(ls_a_addr[k]),
      .b_en(ls_b_en[k]), .b_we(ls_b_we[k]), .b_addr(ls_b_addr[k]),
      .b_wdata(ls_b_wdata[k])
    );

    // port A: LS cell while busy, otherwise DTU writes
    assign c_a_en[k]    = busy ? ls_a_en[k] : (dtu_we && dtu_addr[GAW-1:CRAM_AW] == CRAM_IW'(k));
    assign c_a_we[k]    = busy ? 1'b0 : 1'b1;
    assign c_a_addr[k]  = busy ? ls_a_addr[k] : dtu_addr[CRAM_AW-1:0];
    assign c_a_wdata[k] = dtu_wdata;
    // port B: LS cell while busy, otherwise host reads
    assign c_b_en[k]    = busy ? ls_b_en[k] : (host_rd_en && host_rd_addr[GAW-1:CRAM_AW] == CRAM_IW'(k));
    assign c_b_we[k]    = busy ? ls_b_we[k] : 1'b0;
    assign c_b_addr[k]  = busy ? ls_b_addr[k] : host_rd_addr[CRAM_AW-1:0];
    assign c_b_wdata[k] = ls_b_wdata[k];

    cram #(.WORDS(CRAM_WORDS), .DW(DW)) u_cram (
      .clk,
      .a_en(c_a_en[k]), .a_we(c_a_we[k]), .a_addr(c_a_addr[k]),
      .a_wdata(c_a_wdata[k]), .a_rdata(c_a_rdata[k]),
      .b_en(c_b_en[k]), .b_we(c_b_we[k]), .b_addr(c_b_addr[k]),
      .b_wdata(c_b_wdata[k]), .b_rdata(c_b_rdata[k])
    );
  end

  realloc_unit #(.LANES(LANES)) u_realloc (
    .sel_lo(ctx.sel_lo), .din(lane_a), .dout(re_out)
  );

  xbar #(.LANES(LANES), .DW(DW)) u_xbar (
    .sel(ctx.xb_sel), .din(lane_b), .dout(ref_x)
  );

  sad_unit #(.LANES(LANES), .PW(8), .SW(DW)) u_sad (
    .clk, .rst_n, .clr(ls_init), .in_valid(run_d1 && ctx.mode == MODE_SAD),
    .cand(lane_a), .refp(ref_x), .sad
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_idx_q <= '0;
    else if (host_rd_en) host_idx_q <= host_rd_addr[GAW-1:CRAM_AW];
  end

  assign host_rdata = (host_idx_q < CRAM_IW'(N_CRAM)) ? c_b_rdata[host_idx_q] : '0;

  assert property (@(posedge clk) disable iff (!rst_n) !(busy && dtu_we))
    else $error("DTU write while the FE-GA runs a sequence");
  assert property (@(posedge clk) disable iff (!rst_n) !(busy && host_rd_en))
    else $error("host read while the FE-GA runs a sequence");

endmodule
