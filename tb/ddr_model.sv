// ddr_model: behavioural stand-in for the external DDR3 memory and system bus.
//
// Accepts byte read requests (req/addr) when gnt is high, stalling on a
// pseudo-random STALL_PCT percent of cycles, and returns each byte LAT
// cycles after acceptance, in order, on rvalid/rdata. Contents come from
// bm_tb_pkg::ddr_byte (two 640x480 images). Counts stalls seen.
module ddr_model #(
  parameter int LAT       = 4,
  parameter int STALL_PCT = 20,
  parameter int SEED      = 1
) (
  input  logic        clk,
  input  logic        req,
  input  logic [31:0] addr,
  output logic        gnt,
  output logic        rvalid,
  output logic [7:0]  rdata,
  output int          stalls
);
  logic       v_pipe [LAT];
  logic [7:0] d_pipe [LAT];
  int unsigned rnd;

  initial begin
    rnd = 32'(SEED);
    stalls = 0;
    for (int i = 0; i < LAT; i++) begin v_pipe[i] = 0; d_pipe[i] = 0; end
  end

  always_ff @(posedge clk) rnd <= rnd * 1103515245 + 12345;
  assign gnt    = ((rnd >> 16) % 100) >= STALL_PCT;
  assign rvalid = v_pipe[LAT-1];
  assign rdata  = d_pipe[LAT-1];

  always_ff @(posedge clk) begin
    v_pipe[0] <= req && gnt;
    d_pipe[0] <= bm_tb_pkg::ddr_byte(addr);
    for (int i = 1; i < LAT; i++) begin
      v_pipe[i] <= v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
    if (req && !gnt) stalls <= stalls + 1;
  end
endmodule
