// tcam_pkg: sizes, encodings and shared types of the 256-word x 128-bit
// ternary CAM for IPv6 address lookup.
//
// The word is 128 bits wide and split into two 64-bit halves ("sides"):
// side 0 (left sub-array) holds address bits 63..0, where the don't-care
// bits of a routing prefix gather, and side 1 (right sub-array) holds address
// bits 127..64, the start of the prefix. Each side is an AND-type match line
// cut into 11 segments: one 4-cell segment followed by ten 6-cell segments,
// grouped into 6 stages (stage 1 = the 4-cell segment, stages 2..6 = two
// 6-cell segments each). The 256 words are grouped into 5 search-line blocks
// of 64, 64, 64, 32 and 32 words. All of these numbers follow the design
// this RTL models; the command encoding is this implementation's own.
package tcam_pkg;

  localparam int unsigned WORDS      = 256;  // table entries
  localparam int unsigned BITS       = 128;  // IPv6 address width
  localparam int unsigned ADDR_W     = $clog2(WORDS);
  localparam int unsigned SIDES      = 2;    // left / right sub-array
  localparam int unsigned SIDE_BITS  = BITS / SIDES;
  localparam int unsigned FIRST_SEG  = 4;    // cells in the stage-1 segment
  localparam int unsigned SEG_CELLS  = 6;    // cells in every later segment
  localparam int unsigned STAGES     = 6;    // stages per side
  localparam int unsigned SEGS_SIDE  = 1 + 2 * (STAGES - 1);  // 11
  localparam int unsigned SEGS_WORD  = SIDES * SEGS_SIDE;     // 22

  // Search-line blocks: first word of each block, plus the end marker.
  localparam int unsigned NBLK = 5;
  localparam int unsigned BLK_START [NBLK+1] = '{0, 64, 128, 192, 224, 256};

  // Count widths for the activity statistics.
  localparam int unsigned ARRCNT_W  = $clog2(WORDS * SEGS_WORD + 1);
  localparam int unsigned LSLCNT_W  = $clog2(NBLK * BITS + 1);

  // Operation requested on the command port, one per clock cycle.
  typedef enum logic [1:0] {
    OP_NOP    = 2'd0,
    OP_WRITE  = 2'd1,
    OP_READ   = 2'd2,
    OP_SEARCH = 2'd3
  } tcam_op_e;

  typedef logic [BITS-1:0]   word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Start bit (within the word) of segment `seg` of side `side`.
  // Segment 0 is the 4-cell stage-1 segment; segments 2k-1 and 2k form
  // stage k+1. Each side's chain starts at its low-order end.
  function automatic int unsigned seg_lo(int unsigned side, int unsigned seg);
    return side * SIDE_BITS + ((seg == 0) ? 0 : FIRST_SEG + (seg - 1) * SEG_CELLS);
  endfunction

  function automatic int unsigned seg_len(int unsigned seg);
    return (seg == 0) ? FIRST_SEG : SEG_CELLS;
  endfunction

  // Search-line block holding word w.
  function automatic int unsigned blk_of(int unsigned w);
    int unsigned b;
    b = 0;
    for (int unsigned i = 1; i < NBLK; i++)
      if (w >= BLK_START[i]) b = i;
    return b;
  endfunction

  // True when a don't-care mask suits the segment power gating: in every
  // segment whose top cell is don't-care, all cells are don't-care (always
  // so for a routing prefix).
  function automatic logic gating_safe(word_t dc);
    logic ok;
    ok = 1'b1;
    for (int unsigned s = 0; s < SIDES; s++)
      for (int unsigned g = 0; g < SEGS_SIDE; g++)
        for (int unsigned i = 0; i < seg_len(g); i++)
          if (dc[seg_lo(s, g) + seg_len(g) - 1] && !dc[seg_lo(s, g) + i]) ok = 1'b0;
    return ok;
  endfunction

endpackage
