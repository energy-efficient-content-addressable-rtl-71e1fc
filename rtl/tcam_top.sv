// tcam_top: 256-word x 128-bit energy-efficient ternary CAM for IPv6
// longest-prefix lookup.
//
// Datapath: the command port takes one operation per clock cycle.
//   OP_WRITE : the address decoder raises one word-line and the word stores
//              `data` (Q bits) and `dc` (Qd bits, 1 = don't-care); the
//              don't-care search-line controls of the word's block are
//              updated in the same cycle.
//   OP_READ  : returns the stored Q/Qd bits and valid flag of word `addr`.
//   OP_SEARCH: `data` is driven on the global search-lines, passed to each
//              block's local search-lines through the don't-care based
//              GSL-to-LSL buffers, compared in every word by the Type III
//              butterfly match-line, and the match-lines are priority
//              encoded (highest address = longest prefix wins).
// Every operation answers in the following cycle (rsp_* registered at the
// next rising edge): one-cycle latency, one search per cycle throughput.
//
// Search activity statistics are returned with each search result: the
// number of match-line segments whose floating node discharged (and will be
// precharged again), the number whose precharge was power-gated, and the
// number of local search-line columns driven. They model the switching
// activity that the low-power techniques remove; they are not part of the
// lookup function.
//
// Entries must be prefix-shaped at segment level (a segment whose top cell
// is don't-care must be all don't-care), because the power gating treats
// such a segment as matching; the assertion a_prefix_shape checks writes.
//
// Sizes and the block, segment and butterfly structure follow the modeled
// design; the command/response protocol, the valid flags and the statistics
// are this implementation's own.
module tcam_top
  import tcam_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  tcam_op_e             op,
  input  addr_t                addr,
  input  word_t                data,     // write data or search key
  input  word_t                dc,       // write don't-care mask
  output logic                 rsp_valid,
  output tcam_op_e             rsp_op,
  output logic                 hit,
  output logic                 multi,
  output addr_t                match_addr,
  output word_t                rd_q,
  output word_t                rd_dc,
  output logic                 rd_valid,
  output logic [ARRCNT_W-1:0]  stat_discharged,
  output logic [ARRCNT_W-1:0]  stat_gated,
  output logic [LSLCNT_W-1:0]  stat_lsl_active
);

  logic                 we, searching;
  logic [WORDS-1:0]     wl;
  logic [WORDS-1:0]     ml;
  logic [WORDS-1:0]     wvalid;
  word_t                wq_all  [WORDS];
  word_t                wdc_all [WORDS];
  word_t                gsl;
  word_t                lsl     [NBLK];
  word_t                lsl_en  [NBLK];
  logic [SEGS_WORD-1:0] sgated  [WORDS];
  logic [SEGS_WORD-1:0] sdis    [WORDS];

  assign we        = (op == OP_WRITE);
  assign searching = (op == OP_SEARCH);
  assign gsl       = searching ? data : '0;

  addr_decoder #(.WORDS(WORDS)) u_dec (
    .en   (we),
    .addr (addr),
    .wl   (wl)
  );

  dc_hsl u_hsl (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (we),
    .waddr   (addr),
    .wdc     (dc),
    .word_dc (wdc_all),
    .gsl     (gsl),
    .lsl     (lsl),
    .lsl_en  (lsl_en)
  );

  for (genvar w = 0; w < WORDS; w++) begin : g_word
    tcam_word u_word (
      .clk            (clk),
      .rst_n          (rst_n),
      .wl             (wl[w]),
      .wq             (data),
      .wdc            (dc),
      .sl             (lsl[blk_of(w)]),
      .rq             (wq_all[w]),
      .rdc            (wdc_all[w]),
      .valid          (wvalid[w]),
      .match          (ml[w]),
      .seg_gated      (sgated[w]),
      .seg_discharged (sdis[w])
    );
  end

  logic  pe_hit, pe_multi;
  addr_t pe_addr;

  priority_encoder #(.WORDS(WORDS), .HIGH_WINS(1'b1)) u_pe (
    .ml    (ml),
    .hit   (pe_hit),
    .multi (pe_multi),
    .addr  (pe_addr)
  );

  // Activity counts of the current search.
  logic [ARRCNT_W-1:0] n_dis, n_gated;
  logic [LSLCNT_W-1:0] n_lsl;
  always_comb begin
    n_dis   = '0;
    n_gated = '0;
    n_lsl   = '0;
    for (int unsigned w = 0; w < WORDS; w++) begin
      n_dis   += ARRCNT_W'($countones(sdis[w]));
      n_gated += ARRCNT_W'($countones(sgated[w]));
    end
    for (int unsigned b = 0; b < NBLK; b++)
      n_lsl += LSLCNT_W'($countones(lsl_en[b]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid       <= 1'b0;
      rsp_op          <= OP_NOP;
      hit             <= 1'b0;
      multi           <= 1'b0;
      match_addr      <= '0;
      rd_q            <= '0;
      rd_dc           <= '0;
      rd_valid        <= 1'b0;
      stat_discharged <= '0;
      stat_gated      <= '0;
      stat_lsl_active <= '0;
    end else begin
      rsp_valid <= (op != OP_NOP);
      rsp_op    <= op;
      if (searching) begin
        hit             <= pe_hit;
        multi           <= pe_multi;
        match_addr      <= pe_addr;
        stat_discharged <= n_dis;
        stat_gated      <= n_gated;
        stat_lsl_active <= n_lsl;
      end
      if (op == OP_READ) begin
        rd_q     <= wq_all[addr];
        rd_dc    <= wdc_all[addr];
        rd_valid <= wvalid[addr];
      end
    end
  end

  // One operation per cycle: a write must target an existing word.
  a_addr_range: assert property (@(posedge clk) disable iff (!rst_n)
    (op == OP_WRITE || op == OP_READ) |-> (32'(addr) < WORDS));

  // Power gating reads a segment as all don't-care when its top cell is;
  // entries must respect that (routing prefixes always do).
  a_prefix_shape: assert property (@(posedge clk) disable iff (!rst_n)
    (op == OP_WRITE) |-> gating_safe(dc));

endmodule
