// dtu: data transfer unit between external byte memory and the CRAM space.
//
// Started with the URAM address of a command, it fetches the command (eight
// words, see dtu_pkg), executes it, and follows the command's next pointer
// until a command with 'last' set has completed; then it pulses 'done'.
// A command moves nstrides strides of 'width' bytes. After each stride the
// source address skips src_gap bytes and the destination skips dst_gap words
// (stride mode), only the source skips (gather), only the destination skips
// (scatter) or neither does (continuous). Two consecutive source bytes are
// packed into one 16-bit destination word, the first in the upper half.
//
// Read side: one byte request per cycle (src_req/src_addr, accepted when
// src_gnt is high), any number outstanding, data back in order on
// src_rvalid/src_rdata, which is always accepted. Write side: dst_we with a
// word address and data, one word per two bytes received. The command fetch
// reads the URAM with one cycle of latency.
//
// A command with the 'to_uram' bit set runs the other way, as used to bring
// the SAD results back to the CPU: it reads 16-bit words from the CRAM space
// (cram_rd_*, one word per cycle, data one cycle later) and writes each,
// zero-extended, to a URAM word (uram_wr_*). Width and gaps then count words.
//
// The paper gives the four command types, the command-list (linked list)
// execution and the stride command's fields; the field layout, the handshake
// and a rate of one byte per cycle are this design's choices.
module dtu
  import dtu_pkg::*;
#(
  parameter int unsigned URAM_AW = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [URAM_AW-1:0] cmd_ptr,
  output logic               busy,
  output logic               done,
  // command fetch
  output logic               uram_rd_en,
  output logic [URAM_AW-1:0] uram_rd_addr,
  input  logic [31:0]        uram_rd_data,
  // source read
  output logic               src_req,
  output logic [31:0]        src_addr,
  input  logic               src_gnt,
  input  logic               src_rvalid,
  input  logic [7:0]         src_rdata,
  // destination write
  output logic               dst_we,
  output logic [31:0]        dst_addr,
  output logic [15:0]        dst_wdata,
  // read-back: CRAM space to URAM
  output logic               cram_rd_en,
  output logic [31:0]        cram_rd_addr,
  input  logic [15:0]        cram_rd_data,
  output logic               uram_wr_en,
  output logic [URAM_AW-1:0] uram_wr_addr,
  output logic [31:0]        uram_wr_data
);

  typedef enum logic [1:0] {D_IDLE, D_FETCH, D_XFER} dstate_e;

  dstate_e            state;
  logic [URAM_AW-1:0] ptr;
  logic [3:0]         fcnt;
  logic [31:0]        w [CMD_WORDS];
  dtu_cmd_t           cmd;
  logic [31:0]        sgap, dgap;

  // issue side
  logic        i_active;
  logic [31:0] i_addr;
  logic [15:0] i_bcnt, i_scnt;
  // receive side
  logic [31:0] r_addr;
  logic [15:0] r_bcnt, r_scnt;
  logic [7:0]  hi_byte;
  logic        r_last_byte;
  logic        i_go, r_go, back_rvalid;

  always_comb begin
    cmd.last     = w[0][31];
    cmd.to_uram  = w[0][30];
    cmd.ctype    = cmd_type_e'(w[0][1:0]);
    cmd.src      = w[1];
    cmd.dst      = w[2];
    cmd.width    = w[3][15:0];
    cmd.nstrides = w[4][15:0];
    cmd.src_gap  = w[5];
    cmd.dst_gap  = w[6];
    cmd.next     = w[7];
  end

  assign sgap = (cmd.ctype == CMD_STRIDE || cmd.ctype == CMD_GATHER)  ? cmd.src_gap : '0;
  assign dgap = (cmd.ctype == CMD_STRIDE || cmd.ctype == CMD_SCATTER) ? cmd.dst_gap : '0;

  assign busy         = (state != D_IDLE);
  assign uram_rd_en   = (state == D_FETCH) && (fcnt < 4'(CMD_WORDS));
  assign uram_rd_addr = ptr + URAM_AW'(fcnt);

  assign src_req      = (state == D_XFER) && i_active && !cmd.to_uram;
  assign src_addr     = i_addr;
  assign cram_rd_en   = (state == D_XFER) && i_active && cmd.to_uram;
  assign cram_rd_addr = i_addr;
  assign i_go         = cmd.to_uram ? cram_rd_en : (src_req && src_gnt);
  assign r_go         = cmd.to_uram ? back_rvalid : src_rvalid;

  assign r_last_byte = (r_bcnt + 16'd1 == cmd.width) && (r_scnt + 16'd1 == cmd.nstrides);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_IDLE;
      ptr       <= '0;
      fcnt      <= '0;
      for (int i = 0; i < CMD_WORDS; i++) w[i] <= '0;
      i_active  <= 1'b0;
      i_addr    <= '0;
      i_bcnt    <= '0;
      i_scnt    <= '0;
      r_addr    <= '0;
      r_bcnt    <= '0;
      r_scnt    <= '0;
      hi_byte   <= '0;
      dst_we    <= 1'b0;
      dst_addr  <= '0;
      dst_wdata <= '0;
      uram_wr_en   <= 1'b0;
      uram_wr_addr <= '0;
      uram_wr_data <= '0;
      back_rvalid  <= 1'b0;
      done      <= 1'b0;
    end else begin
      done        <= 1'b0;
      dst_we      <= 1'b0;
      uram_wr_en  <= 1'b0;
      back_rvalid <= cram_rd_en;
      unique case (state)
        D_IDLE: if (start) begin
          ptr   <= cmd_ptr;
          fcnt  <= '0;
          state <= D_FETCH;
        end
        D_FETCH: begin
          fcnt <= fcnt + 4'd1;
          if (fcnt != 0) w[fcnt-1] <= uram_rd_data;
          if (fcnt == 4'(CMD_WORDS)) begin
            state    <= D_XFER;
            i_active <= 1'b1;
            i_addr   <= w[1];
            i_bcnt   <= '0;
            i_scnt   <= '0;
            r_addr   <= w[2];
            r_bcnt   <= '0;
            r_scnt   <= '0;
          end
        end
        D_XFER: begin
          // issue byte requests (words when reading back)
          if (i_go) begin
            if (i_bcnt + 16'd1 == cmd.width) begin
              i_bcnt <= '0;
              i_scnt <= i_scnt + 16'd1;
              i_addr <= i_addr + 32'd1 + sgap;
              if (i_scnt + 16'd1 == cmd.nstrides) i_active <= 1'b0;
            end else begin
              i_bcnt <= i_bcnt + 16'd1;
              i_addr <= i_addr + 32'd1;
            end
          end
          // receive bytes and pack pairs into words, or write back words
          if (r_go) begin
            if (cmd.to_uram) begin
              uram_wr_en   <= 1'b1;
              uram_wr_addr <= URAM_AW'(r_addr);
              uram_wr_data <= {16'h0000, cram_rd_data};
              r_addr       <= (r_bcnt + 16'd1 == cmd.width) ? r_addr + 32'd1 + dgap
                                                            : r_addr + 32'd1;
            end else if (!r_bcnt[0]) begin
              hi_byte <= src_rdata;
            end else begin
              dst_we    <= 1'b1;
              dst_addr  <= r_addr;
              dst_wdata <= {hi_byte, src_rdata};
              r_addr    <= (r_bcnt + 16'd1 == cmd.width) ? r_addr + 32'd1 + dgap
                                                         : r_addr + 32'd1;
            end
            if (r_bcnt + 16'd1 == cmd.width) begin
              r_bcnt <= '0;
              r_scnt <= r_scnt + 16'd1;
            end else begin
              r_bcnt <= r_bcnt + 16'd1;
            end
            if (r_last_byte) begin
              if (cmd.last) begin
                state <= D_IDLE;
                done  <= 1'b1;
              end else begin
                ptr   <= URAM_AW'(cmd.next);
                fcnt  <= '0;
                state <= D_FETCH;
              end
            end
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // a command must move at least one stride of a whole number of words
  assert property (@(posedge clk) disable iff (!rst_n)
    (state == D_XFER) |-> (cmd.width != 0 && (cmd.to_uram || !cmd.width[0]) && cmd.nstrides != 0));
  // no data may arrive that was not requested
  assert property (@(posedge clk) disable iff (!rst_n) src_rvalid |-> (state == D_XFER && !cmd.to_uram));

endmodule
