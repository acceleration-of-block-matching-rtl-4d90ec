// seqm: sequence manager of the FE-GA.
//
// Started with the index of a first context, it runs contexts one after
// another until it has run one whose 'last' bit is set, then pulses 'done'.
// Each sequence goes through:
//   FETCH  present the index to the CFGM (1 cycle)
//   LOAD   register the context (1 cycle)
//   INIT   reload every AGU with its base address, clear the SAD accumulator
//   RUN    'steps' control steps; 'run' is high and each enabled load port
//          accesses its CRAM once per step
//   DRAIN  DRAIN cycles for CRAM read latency and the SAD pipeline; 'run_d1'
//          (run delayed by the CRAM read latency) is the store strobe of the
//          re-allocation and the valid of the SAD datapath
//   STORE  SAD sequences only: one cycle in which the SAD result is written
// Autonomous sequence control is the paper's; these states and their
// lengths are this design's choice.
module seqm
  import fega_pkg::*;
#(
  parameter int unsigned DRAIN = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CTX_IW-1:0] start_idx,
  output logic [CTX_IW-1:0] cfg_rd_idx,
  input  ctx_t              cfg_rd_ctx,
  output ctx_t              ctx,
  output logic              ls_init,
  output logic              run,
  output logic              run_d1,
  output logic              store_sad,
  output logic              busy,
  output logic              done
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_LOAD, S_INIT, S_RUN, S_DRAIN, S_STORE} state_e;

  state_e            state;
  logic [CTX_IW-1:0] idx;
  logic [11:0]       t;
  logic [3:0]        dcnt;

  assign cfg_rd_idx = idx;
  assign ls_init    = (state == S_INIT);
  assign run        = (state == S_RUN);
  assign store_sad  = (state == S_STORE);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      idx    <= '0;
      t      <= '0;
      dcnt   <= '0;
      ctx    <= '0;
      run_d1 <= 1'b0;
      done   <= 1'b0;
    end else begin
      run_d1 <= run;
      done   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          idx   <= start_idx;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_LOAD;
        S_LOAD: begin
          ctx   <= cfg_rd_ctx;
          state <= S_INIT;
        end
        S_INIT: begin
          t     <= '0;
          dcnt  <= '0;
          state <= (ctx.steps == '0) ? S_DRAIN : S_RUN;
        end
        S_RUN: begin
          t <= t + 12'd1;
          if (t + 12'd1 >= ctx.steps) state <= S_DRAIN;
        end
        S_DRAIN: begin
          dcnt <= dcnt + 4'd1;
          if (dcnt + 4'd1 >= 4'(DRAIN)) begin
            if (ctx.mode == MODE_SAD) state <= S_STORE;
            else if (ctx.last) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              idx   <= idx + 1'b1;
              state <= S_FETCH;
            end
          end
        end
        S_STORE: begin
          if (ctx.last) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
