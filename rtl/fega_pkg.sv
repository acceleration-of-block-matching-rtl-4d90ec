// fega_pkg: types and constants shared by the block-matching accelerator.
//
// The FE-GA accelerator has ten 4 KB local memories (CRAMs) of 16-bit words,
// ten load/store (LS) cells that address them through AGUs, and a sequence
// manager that runs up to 256 reconfigurable sequences. A sequence here is
// described by a context (ctx_t): a datapath mode, a number of control steps,
// crossbar selects and the AGU settings of both ports of every LS cell.
// The sizes are the paper's; the context layout is this design's own.
package fega_pkg;

  localparam int unsigned N_CRAM     = 10;    // CRAM / LS cells in one FE-GA
  localparam int unsigned CRAM_WORDS = 2048;  // 4 KB of 16-bit words
  localparam int unsigned CRAM_AW    = 11;    // word address inside one CRAM
  localparam int unsigned CRAM_IW    = 4;     // CRAM index in the global space
  localparam int unsigned GAW        = CRAM_IW + CRAM_AW;  // global word address
  localparam int unsigned DW         = 16;    // CRAM word
  localparam int unsigned LANES      = 8;     // PE lanes used (CRAM 0..7)
  localparam int unsigned N_CTX      = 256;   // sequences held by the CFGM
  localparam int unsigned CTX_IW     = 8;
  localparam int unsigned SAD_CRAM   = 8;     // SAD results go to CRAM 8

  localparam int unsigned MW = 12;            // AGU increment m (signed)
  localparam int unsigned NW = 12;            // AGU number of iterations

  // AGU settings: Address = m * t + c, back to c after iters steps
  typedef struct packed {
    logic signed [MW-1:0] m;
    logic [CRAM_AW-1:0]   c;
    logic [NW-1:0]        iters;
  } agu_cfg_t;

  // Per LS cell: port A always loads, port B loads or stores
  typedef struct packed {
    logic     a_en;
    logic     b_en;
    logic     b_we;
    agu_cfg_t a;
    agu_cfg_t b;
  } ls_cfg_t;

  typedef enum logic [1:0] {
    MODE_NOP     = 2'd0,   // AGUs step, nothing is written
    MODE_REALLOC = 2'd1,   // Fig. 19: byte extract + widen, store to same CRAM
    MODE_SAD     = 2'd2    // Fig. 23: 8 abs-diff, adder tree, accumulate
  } mode_e;

  typedef struct packed {
    logic                      last;     // stop after this sequence
    mode_e                     mode;
    logic                      sel_lo;   // REALLOC: 0 upper byte, 1 lower byte
    logic [11:0]               steps;    // control steps of this sequence
    logic [LANES-1:0][2:0]     xb_sel;   // SAD: reference lane for each lane
    ls_cfg_t [N_CRAM-1:0]      ls;
  } ctx_t;

endpackage
