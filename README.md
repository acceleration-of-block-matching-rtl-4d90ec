# Block matching with DTU transfers and in-memory data re-allocation

This is synthesizable SystemVerilog for the accelerator side of a block-matching
system. It follows the paper "Acceleration of Block Matching on a Low-Power
Heterogeneous Multi-Core Processor Based on DTU Data-Transfer with Data
Re-Allocation". The CPU cores, the external DRAM and the system bus are not
included.

Block matching finds motion between two frames. Take every 16x16 *reference
block* of the frame at time t. Compare it with each 16x16 *candidate block*
inside a 24x24 *search area* of the frame at time t + dt. That gives
9 x 9 = 81 candidates per block. The candidate with the smallest sum of
absolute differences (SAD) is the match.

The accelerator is a coarse-grained reconfigurable array. Its load/store cells
can only generate linear addresses of the form

    address = m * t + c        (wrapping back to c after N steps)

With addresses this simple, the pixels must sit in local memory in one special
interleaved layout. Only then can eight memories deliver one block column per
cycle with no random addressing. A DMA engine cannot write that layout in one
go, because the pieces are too small. Copying pixel by pixel with the CPU is
slow.

The design therefore does it in two steps:

1. **Bulk copy.** A data transfer unit (DTU) copies whole image rows into the
   local memories with five stride commands. Each 16-bit word then holds two
   pixels.
2. **Re-allocation.** The array itself spreads those pixels to their final
   addresses. It uses six short sequences in which all eight memories work in
   parallel, and each sequence is a pair of linear address streams.

After that, 81 SAD sequences run on the re-allocated data.

## Hierarchy

```
bm_top                 N_PAIRS (=4) independent pairs, ports as arrays
└─ bm_pair             one pair without its CPU: URAM + DTU + FE-GA
   ├─ uram             CPU-side local memory holding DTU command lists (1024 x 32)
   ├─ dtu              command-list DMA: external bytes -> CRAM words, CRAM -> URAM
   └─ fega             the reconfigurable accelerator
      ├─ cfgm          256 sequence contexts
      ├─ seqm          runs contexts back to back
      ├─ ls_cell x10   one per CRAM, two AGU-addressed ports each
      │  └─ agu x2     address = m*t + c with wrap after N steps
      ├─ cram x10      4 KB each, 2048 x 16 bit, two ports
      ├─ realloc_unit  byte select + zero extension, 8 lanes
      ├─ xbar          8x8 crossbar (reference-lane routing)
      └─ sad_unit      8 |a-b|, 7-adder tree, accumulator
```

`fega_pkg` holds the sizes and the context type `ctx_t`. `dtu_pkg` holds the
command format.

## One reference block, step by step

The external memory holds the candidate frame at bytes 0..307199 and the
reference frame at bytes 307200..614399, both stored row by row (640 x 480,
8-bit pixels). Let (sy, sx) be the top-left corner of a search area. Its
reference block is the 16x16 block at (sy+4, sx+4) of the reference frame.

### (a) DTU: five stride commands

In the CRAM space the 10 CRAMs appear as one array of 16-bit words. The global
word address is `cram_index * 2048 + word`. Each stride command moves 8
strides, so CRAM k receives row k of each group:

| cmd | source (bytes)                   | dest word | width | src gap | dst gap | CRAM k, words, contents          |
|-----|----------------------------------|-----------|-------|---------|---------|----------------------------------|
| 1   | sy*640 + sx                      | 0         | 24 B  | 616     | 2036    | 0..11: search row k              |
| 2   | (sy+8)*640 + sx                  | 12        | 24 B  | 616     | 2036    | 12..23: search row k+8           |
| 3   | (sy+16)*640 + sx                 | 24        | 24 B  | 616     | 2036    | 24..35: search row k+16          |
| 4   | 307200 + (sy+12)*640 + sx+4      | 36        | 16 B  | 624     | 2040    | 36..43: reference row 12+k       |
| 5   | 307200 + (sy+4)*640 + sx+4       | 44        | 16 B  | 624     | 2040    | 44..51: reference row 4+k        |

The gaps are counted from the end of one stride to the start of the next.
Source gaps are in bytes (640 - 24). Destination gaps are in words
(2048 - 12): one 12-word stride fills a CRAM row, and the gap steps to the
same offset in the next CRAM. Each 16-bit word holds two pixels, the
left-hand one in the upper byte.

### (b) FE-GA: re-allocation (6 sequences)

Each sequence runs on all eight lanes at once. Lane k reads CRAM k on port A
at `t + r`. It keeps the upper byte (first sequence of a phase) or the lower
byte (second sequence), zero-extends it, and writes it on port B of the same
CRAM at `4t + w`:

| phase | read `r` | steps | write `w` (upper / lower) | what lands where                         |
|-------|----------|-------|---------------------------|------------------------------------------|
| 1     | 0        | 24    | A / A+2                   | rows k (even slots), k+8 (A+48.., even)  |
| 2     | 12       | 32    | A+1 / A+3                 | rows k+8, k+16 (odd slots), ref row 12+k |
| 3     | 44       | 8     | A+96 / A+98               | ref row 4+k (even slots)                 |

A (`ALPHA`, 128 in the test programs) separates the packed source area from
the re-allocated area. After the six sequences, CRAM k holds, one pixel per
word:

| words           | even word 2j / 2i                  | odd word 2j+1 / 2i+1               |
|-----------------|------------------------------------|------------------------------------|
| A+0 .. A+47     | search row k,   column j           | search row k+8,  column j          |
| A+48 .. A+95    | search row k+8, column j           | search row k+16, column j          |
| A+96 .. A+127   | reference row k (block-relative), column i | reference row k+8, column i |

Search rows k+8 exist twice. This small duplication is what lets every
candidate be read with one linear address stream per lane.

### (c) FE-GA: 81 SAD sequences

The candidates are visited left to right and top to bottom. Inside a
candidate, the pixels go column by column, and the pixels of one column are
read in parallel from the eight CRAMs. Candidate (dy, dx), with 0 <= dy, dx <= 8,
is one 32-step sequence:

* Lane k, port A (candidate) reads from base `A + 2*dx`, plus 48 if `k < dy`,
  with m = 1 and 32 iterations. Step 2c reads column dx+c of one block row and
  step 2c+1 reads the row 8 below it. For `k < dy` the lane's row k has
  scrolled out of the candidate, so the lane uses the second copy (rows k+8
  and k+16).
* Lane k, port B (reference) reads from base `A + 96` with m = 1, the same in
  every sequence.
* The crossbar gives candidate lane k the reference lane `(k - dy) mod 8`.
  Lane k then holds candidate rows that are `k - dy` (mod 8) and that plus 8
  inside the block, which are the rows reference lane `(k - dy) mod 8` holds.
  This is easy to get wrong, and `tb_fega` checks it for all 81 offsets.
* The SAD datapath adds the eight absolute differences each step. After the
  last step, LS cell 8 writes the total to CRAM 8 at word `9*dy + dx`. Its
  port-B AGU has base `9*dy + dx`.

The last SAD context has `last` set, so contexts 0..86 run as one chain from
a single `start`.

### (d) Read-back and minimum search

A sixth DTU command with the `to_uram` flag copies the 81 words of CRAM 8 into
the URAM. The CPU then searches them for the minimum. The minimum search is
software, and the testbenches model it. CRAM words can also be read directly
through `host_rd_*` while the FE-GA is idle.

## Programming interface

**DTU command** (`dtu_pkg`): eight 32-bit URAM words.

| word | contents |
|------|----------|
| +0 | `{last, to_uram, 28'b0, type}` |
| +1 | source |
| +2 | destination |
| +3 | stride width |
| +4 | number of strides |
| +5 | source gap |
| +6 | destination gap |
| +7 | next command pointer |

`type` is one of:

* `CONT`: both sides contiguous.
* `STRIDE`: both gaps applied.
* `GATHER`: source gap only.
* `SCATTER`: destination gap only.

`dtu.start` with `cmd_ptr` runs the list until a command with `last` set has
finished. External reads use `src_req/src_addr/src_gnt`, with bytes returned
in order on `src_rvalid/src_rdata`, any number outstanding. The DTU issues one
byte per cycle when granted.

**Context** (`fega_pkg::ctx_t`), one per sequence:

* `mode`: `NOP`, `REALLOC` or `SAD`.
* `sel_lo`: which byte `REALLOC` takes.
* `steps`: number of control steps.
* `xb_sel[8]`: crossbar selects.
* Per LS cell: `a_en`, `b_en`, `b_we`, and an AGU setting `{m, c, iters}` for
  each port.
* `last`: the chain ends after this context.

`bm_tb_pkg.sv` (in `tb/`) has functions that build every command and context
used above: `dtu_cmd_word`, `readback_cmd_word`, `realloc_ctx`, `sad_ctx` and
`prog_ctx`.

## Timing

* **AGU**: advances each time its port is accessed, not on every clock.
* **CRAM**: synchronous read, one cycle.
* **Re-allocation**: stores one cycle after the load.
* **SAD datapath**: two pipeline stages (difference and tree, then
  accumulate).
* **SEQM**: each sequence costs FETCH + LOAD + INIT (3 cycles), then `steps`,
  then DRAIN (3), plus one STORE cycle in SAD mode. Starting takes one more
  cycle. One block therefore takes 1 + 6*6 + 128 = 165 cycles to re-allocate
  and 81 * 39 = 3159 cycles for the SADs: 3324 in total, checked exactly by
  the testbenches.
* **DTU**: 832 bytes per block at one byte per granted cycle, plus 9 cycles to
  fetch each command. That is about 890 cycles without stalls and 1170-1210
  with the 15-30 % random stalls of the test memory model. The read-back of
  81 words takes about 100 cycles.

The paper's cycle counts per block (about 31 k) were measured on silicon.
They include CPU work and a real bus, so they are not comparable with these
figures.

## How this RTL relates to the paper

The following come from the paper:

* the flow of DTU copy, re-allocation, SAD and read-back;
* the CRAM count, size and word width, and the 256 sequences;
* the linear AGU function with its iteration count;
* the four DTU command types and command-list chaining;
* command 1's stride fields;
* the initial and re-allocated memory layouts and the re-allocation address
  equations;
* the SAD mapping: 8 absolute differences, 7 adders, accumulation, result in
  CRAM 8;
* four pairs working on separate blocks.

These are this design's own choices:

* **PE array.** The paper's array has 24 ALU cells and 8 multiply cells whose
  instruction set is not published. Here the two mappings it uses are fixed
  datapaths (`realloc_unit`, `sad_unit`), selected by the context mode.
  Nothing else can be mapped onto them.
* **CRAM ports.** Each CRAM has two ports, and each LS cell has one AGU per
  port. A lane can therefore read and write its CRAM in the same step
  (re-allocation) or read two pixels in the same step (SAD).
* **Widening.** The re-allocation widens pixels with zeros. Pixels are
  unsigned, so sign extension would corrupt values of 128 and above.
* **One context per candidate.** The order of the 81 SAD computations is the
  paper's, but it does not say how the array steps between candidates. Here
  each candidate is its own context with its own AGU bases and crossbar
  rotation.
* **DTU details.** The command word layout, the `to_uram` read-back flag, the
  byte-level read handshake, and the meaning of gather and scatter (a strided
  side on one end only) are this design's own. The paper's DTU latency and
  throughput (50 cycles, 0.67 B/cycle over a 128-bit bus) are not modelled.
* **Context loading.** Contexts are loaded through a plain write port.
* **Bus sharing.** DTU, CPU and FE-GA take turns on the shared memory ports.
  Assertions check this.

These parts are left out:

* the CPU cores and their software (command and context set-up, minimum
  search);
* the DDR3 memory and controller;
* the on-chip system bus, and any arbitration between the four pairs for
  external memory. Each pair brings out its own read port.

## Simulating

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The end-to-end test runs the full-size top:
four pairs, four VGA reference blocks, 4 x 81 SADs compared with an
independent model, and minimum positions at a known motion.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fega_pkg.sv rtl/dtu_pkg.sv tb/bm_tb_pkg.sv tb/tb_bm_top.sv --top-module tb_bm_top
./obj_dir/Vtb_bm_top
```

For another testbench, replace `tb_bm_top` with its name:

* `tb_agu`, `tb_cram`, `tb_ls_cell`, `tb_realloc_unit`, `tb_xbar`,
  `tb_sad_unit`, `tb_cfgm`, `tb_seqm`, `tb_uram`: one block each.
* `tb_dtu`: all command types, chaining and read-back, with random memory
  stalls.
* `tb_fega`: checks every re-allocated word and all 81 SADs, with exact cycle
  counts.
* `tb_bm_pair`: two blocks in a row, including the bottom-right corner of the
  frame.

The test images come from `tb/bm_tb_pkg.sv`: a hashed candidate frame, and a
reference frame that is the candidate moved by (1, -2) pixels. Each block's
best candidate is therefore (dy, dx) = (5, 2), with SAD 0.
`tb/ddr_model.sv` is the behavioural external memory, with configurable
latency and random stalls.

To program a different block size or search range, change the sizes in
`bm_tb_pkg.sv`. A 24x24 area, 16x16 blocks and 8 lanes fix the constants 12,
24, 48 and 96 above. The RTL has no block-matching constants in it: every
address comes from the contexts and commands.
