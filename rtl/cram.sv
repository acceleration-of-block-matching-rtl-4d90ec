// cram: one FE-GA local memory cell, 4 KB organised as 2048 words of 16 bits.
//
// Two independent ports, each able to read or write one word per cycle.
// Reads are synchronous: rdata holds the word addressed in the previous cycle
// in which the port was enabled. A write on a port does not update that
// port's rdata. Contents are not reset. The 4 KB size and the 16-bit word
// are the paper's; the two ports are this design's choice, needed so that
// data re-allocation can read and write a CRAM in the same control step and
// the SAD datapath can read a candidate and a reference pixel together.
module cram #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned DW    = 16,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [WORDS];

  // Both ports in one process; on a same-address double write port B wins.
  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end

endmodule
