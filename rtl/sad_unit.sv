// sad_unit: sum-of-absolute-differences datapath of the FE-GA.
//
// Each cycle with in_valid, LANES absolute differences |cand[k] - refp[k]|
// are formed (one ALU pair per lane) and summed by a tree of LANES-1 adders;
// the sum is registered, and one cycle later added to the accumulator. So
// 'sad' includes a lane vector two cycles after it is presented. 'clr'
// empties both the pipeline register and the accumulator. Only the low
// PW bits of each word are used as the pixel. Eight lanes, seven adders and
// accumulation over the block follow the paper; the two-stage pipeline is
// this design's choice. With 8-bit pixels a 16x16 block's SAD is at most
// 65280 and fits 16 bits; the accumulator saturates at its maximum.
module sad_unit #(
  parameter int unsigned LANES = 8,
  parameter int unsigned PW    = 8,
  parameter int unsigned SW    = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   in_valid,
  input  logic [LANES-1:0][15:0] cand,
  input  logic [LANES-1:0][15:0] refp,
  output logic [SW-1:0]          sad
);

  localparam int unsigned TW = PW + $clog2(LANES) + 1;

  logic [TW-1:0] tree_sum, sum_q;
  logic          sum_v;
  logic [SW:0]   acc_next;

  always_comb begin
    tree_sum = '0;
    for (int k = 0; k < LANES; k++) begin
      logic [PW-1:0] a, b;
      a = cand[k][PW-1:0];
      b = refp[k][PW-1:0];
      tree_sum = tree_sum + ((a > b) ? (TW'(a) - TW'(b)) : (TW'(b) - TW'(a)));
    end
  end

  assign acc_next = {1'b0, sad} + (SW+1)'(sum_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0;
      sum_v <= 1'b0;
      sad   <= '0;
    end else if (clr) begin
      sum_q <= '0;
      sum_v <= 1'b0;
      sad   <= '0;
    end else begin
      sum_q <= tree_sum;
      sum_v <= in_valid;
      if (sum_v) sad <= acc_next[SW] ? '1 : acc_next[SW-1:0];
    end
  end

endmodule
