// bm_tb_pkg: reference model and programming helpers for the block-matching
// testbenches.
//
// Image model: a 640x480 candidate image (time t + dt) at external bytes
// 0..307199 and a reference image (time t) at 307200..614399, both stored
// line by line. Candidate pixels come from a hash of (y, x); the reference
// image is the candidate image moved by (MOT_Y, MOT_X), so the best match of
// every reference block is known in advance.
//
// Programming: the five stride commands that copy one 24x24 search area and
// its 16x16 reference block into CRAM 0..7, the six re-allocation contexts
// (three phases, upper then lower byte), the 81 SAD contexts, the SAD
// read-back command, and the independent SAD reference.
package bm_tb_pkg;
  import fega_pkg::*;

  localparam int IMG_W    = 640;
  localparam int IMG_H    = 480;
  localparam int REF_BASE = IMG_W * IMG_H;
  localparam int ALPHA    = 128;   // start of the re-allocated data in a CRAM
  localparam int MOT_Y    = 1;
  localparam int MOT_X    = -2;
  localparam int N_CAND   = 81;
  localparam int N_RE_CTX = 6;

  function automatic logic [7:0] cand_pix(int y, int x);
    logic [31:0] h;
    if (y < 0) y = 0;
    if (x < 0) x = 0;
    if (y >= IMG_H) y = IMG_H - 1;
    if (x >= IMG_W) x = IMG_W - 1;
    h = 32'(x * 73 + y * 151 + 7);
    h = h ^ (h >> 3);
    h = h * 32'd2654435761;
    return h[23:16];
  endfunction

  function automatic logic [7:0] ref_pix(int y, int x);
    return cand_pix(y + MOT_Y, x + MOT_X);
  endfunction

  function automatic logic [7:0] ddr_byte(int unsigned a);
    if (a < REF_BASE) return cand_pix(int'(a) / IMG_W, int'(a) % IMG_W);
    a = a - REF_BASE;
    return ref_pix(int'(a) / IMG_W, int'(a) % IMG_W);
  endfunction

  // SAD of candidate offset (dy, dx) for the search area at (sy, sx)
  function automatic int ref_sad(int sy, int sx, int dy, int dx);
    int s = 0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        int a = cand_pix(sy + dy + r, sx + dx + c);
        int b = ref_pix(sy + 4 + r, sx + 4 + c);
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  // word 'w' of DTU command 'n' (0..4) for the search area at (sy, sx)
  function automatic logic [31:0] dtu_cmd_word(int n, int w, int sy, int sx, int base);
    int src, dst, width, sgap, dgap;
    if (n < 3) begin
      src = (sy + 8 * n) * IMG_W + sx; dst = 12 * n; width = 24; sgap = IMG_W - 24; dgap = CRAM_WORDS - 12;
    end else begin
      src = REF_BASE + (sy + 4 + (n == 3 ? 8 : 0)) * IMG_W + sx + 4;
      dst = (n == 3) ? 36 : 44; width = 16; sgap = IMG_W - 16; dgap = CRAM_WORDS - 8;
    end
    case (w)
      0: return {(n == 4), 29'd0, 2'd1};   // stride command
      1: return 32'(src);
      2: return 32'(dst);
      3: return 32'(width);
      4: return 32'd8;
      5: return 32'(sgap);
      6: return 32'(dgap);
      default: return 32'(base + 8 * (n + 1));
    endcase
  endfunction

  // URAM word where the SADs are brought back, and the read-back command:
  // 81 words from CRAM 8 to the URAM in one continuous, CRAM-to-URAM command
  localparam int SAD_URAM = 512;

  function automatic logic [31:0] readback_cmd_word(int w);
    case (w)
      0: return {1'b1, 1'b1, 28'd0, 2'd0};
      1: return 32'(SAD_CRAM * CRAM_WORDS);
      2: return 32'(SAD_URAM);
      3: return 32'(N_CAND);
      4: return 32'd1;
      default: return 32'd0;
    endcase
  endfunction

  function automatic agu_cfg_t agu_c(int m, int c, int n);
    agu_cfg_t a;
    a.m = MW'(m); a.c = CRAM_AW'(c); a.iters = NW'(n);
    return a;
  endfunction

  // re-allocation context i = 2 * phase + byte (byte 0 upper, 1 lower)
  function automatic ctx_t realloc_ctx(int i);
    ctx_t x = '0;
    int ph = i / 2, lo = i % 2;
    int rd_c, wr_c, n;
    case (ph)
      0: begin rd_c = 0;  wr_c = ALPHA;      n = 24; end
      1: begin rd_c = 12; wr_c = ALPHA + 1;  n = 32; end
      default: begin rd_c = 44; wr_c = ALPHA + 96; n = 8; end
    endcase
    x.mode = MODE_REALLOC; x.sel_lo = 1'(lo); x.steps = 12'(n);
    for (int k = 0; k < LANES; k++) begin
      x.ls[k].a_en = 1; x.ls[k].b_en = 1; x.ls[k].b_we = 1;
      x.ls[k].a = agu_c(1, rd_c, n);
      x.ls[k].b = agu_c(4, wr_c + 2 * lo, n);
    end
    return x;
  endfunction

  // SAD context of candidate n = 9 * dy + dx
  function automatic ctx_t sad_ctx(int n, bit last);
    ctx_t x = '0;
    int dy = n / 9, dx = n % 9;
    x.mode = MODE_SAD; x.steps = 12'd32; x.last = last;
    for (int k = 0; k < LANES; k++) begin
      x.ls[k].a_en = 1; x.ls[k].b_en = 1; x.ls[k].b_we = 0;
      x.ls[k].a = agu_c(1, ALPHA + (k < dy ? 48 : 0) + 2 * dx, 32);
      x.ls[k].b = agu_c(1, ALPHA + 96, 32);
      x.xb_sel[k] = 3'((k - dy + 8) % 8);
    end
    x.ls[SAD_CRAM].b_en = 1; x.ls[SAD_CRAM].b_we = 1;
    x.ls[SAD_CRAM].b = agu_c(1, n, 1);
    return x;
  endfunction

  // whole program: contexts 0..5 re-allocate, 6..86 compute the 81 SADs
  function automatic ctx_t prog_ctx(int i);
    if (i < N_RE_CTX) return realloc_ctx(i);
    return sad_ctx(i - N_RE_CTX, (i == N_RE_CTX + N_CAND - 1));
  endfunction

endpackage
