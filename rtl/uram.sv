// uram: the part of the CPU-side local memory that holds DTU command lists.
//
// A WORDS x 32-bit RAM with one write port (used by the CPU to place command
// lists) and one synchronous read port (used by the DTU to fetch them); read
// data appear one cycle after rd_en. A write and a read of the same word in
// one cycle return the old word. The size is this design's choice.
module uram #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
