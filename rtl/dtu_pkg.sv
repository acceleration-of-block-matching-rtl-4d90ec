// dtu_pkg: command format of the data transfer unit (DTU).
//
// A command occupies CMD_WORDS consecutive 32-bit words of the command memory:
//   +0  {last[31], to_uram[30], 28'b0, type[1:0]}
//   +1  source byte address (to_uram: CRAM-space word address)
//   +2  destination word address in the 16-bit CRAM space (to_uram: URAM word)
//   +3  stride width in bytes (even; to_uram: in words)
//   +4  number of strides
//   +5  source gap in bytes (to_uram: words), end of one stride to the next
//   +6  destination gap in words
//   +7  URAM word address of the next command (ignored when last = 1)
// The units follow the paper's stride command, whose source gap 616 is
// 640 - 24 bytes and whose destination gap 2036 is 2048 - 12 words. The word
// layout, the 'last' and 'to_uram' flags are this design's own.
package dtu_pkg;

  localparam int unsigned CMD_WORDS = 8;

  typedef enum logic [1:0] {
    CMD_CONT    = 2'd0,   // contiguous source and destination
    CMD_STRIDE  = 2'd1,   // both sides strided
    CMD_GATHER  = 2'd2,   // strided source, contiguous destination
    CMD_SCATTER = 2'd3    // contiguous source, strided destination
  } cmd_type_e;

  typedef struct packed {
    logic        last;
    logic        to_uram;
    cmd_type_e   ctype;
    logic [31:0] src;
    logic [31:0] dst;
    logic [15:0] width;
    logic [15:0] nstrides;
    logic [31:0] src_gap;
    logic [31:0] dst_gap;
    logic [31:0] next;
  } dtu_cmd_t;

endpackage
