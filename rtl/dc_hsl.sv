// dc_hsl: don't-care based hierarchical search-lines.
//
// The search-lines are split into global search-lines (GSL, one bundle of
// BITS lines across the whole array) and local search-lines (LSL, one bundle
// per word block). Between the GSL and each block's LSL sits a GSL-to-LSL
// buffer per bit column. Its control flip-flop is 1 when at least one word of
// the block stores a 0 or 1 (not a don't-care) in that column; a column whose
// cells are all don't-care matches whatever is searched, so its LSL is not
// driven and stays low, saving the search-line switching.
//
// The control flip-flops are updated in the write cycle, from the stored
// don't-care bits of the block's other words and the don't-care bits being
// written, so they are already correct for a search in the very next cycle
// and add nothing to the search path. Block boundaries come from
// tcam_pkg::BLK_START (64, 64, 64, 32 and 32 words).
//
// Interface: `we`/`waddr`/`wdc` mirror the array's write port; `word_dc`
// is the stored don't-care word of every entry; `gsl` is the search word;
// `lsl[b]` is block b's local search-line bundle and `lsl_en[b]` its buffer
// enables. LSLs are combinational from `gsl`. Reset clears all enables,
// matching the all-don't-care reset state of the cells.
module dc_hsl
  import tcam_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  we,
  input  addr_t waddr,
  input  word_t wdc,
  input  word_t word_dc [WORDS],
  input  word_t gsl,
  output word_t lsl     [NBLK],
  output word_t lsl_en  [NBLK]
);

  word_t en_next [NBLK];

  // Care columns of each block, with the word being written replaced by the
  // new data.
  always_comb begin
    for (int unsigned b = 0; b < NBLK; b++) begin
      en_next[b] = '0;
      for (int unsigned w = BLK_START[b]; w < BLK_START[b+1]; w++) begin
        if (32'(waddr) == w) en_next[b] |= ~wdc;
        else                 en_next[b] |= ~word_dc[w];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < NBLK; b++) lsl_en[b] <= '0;
    end else if (we) begin
      for (int unsigned b = 0; b < NBLK; b++)
        if (32'(waddr) >= BLK_START[b] && 32'(waddr) < BLK_START[b+1])
          lsl_en[b] <= en_next[b];
    end
  end

  always_comb begin
    for (int unsigned b = 0; b < NBLK; b++) lsl[b] = gsl & lsl_en[b];
  end

endmodule
