// tcam_word: one 128-bit TCAM word with the Type III butterfly AND-type
// match-line.
//
// Structure: each side (left = bits 63..0, right = bits 127..64) is a chain
// of 11 PF-CDPD segments in 6 stages. Stage 1 is one 4-cell segment; stages
// 2..6 hold two 6-cell segments each. Stage k of a side is "ok" when all its
// segments output match. The butterfly (Type III) enables are:
//   stage 1          : enabled when the word holds a valid entry
//   stage 2 of side s: ok(s,1) & ok(other,1)
//   stage k>=3 of s  : ok(s,k-1) & ok(other,k-2)
// so a miss in any segment stops its own side at the next stage and the
// other side one stage later. The word matches when the last stages of both
// sides are ok (the final AND gate) and the entry is valid. Each side's chain
// starts at its low-order end, so the all-don't-care, power-gated segments
// of a prefix entry sit at the start of the chain and cannot hide a miss.
//
// Interface: `wl` writes `wq`/`wdc` (Qd, 1 = don't-care) into all cells at
// the rising clock edge and sets the valid flag; `rq`/`rdc` return the stored
// word. `sl` is the local search-line bundle of the word's block; `match` and
// the per-segment activity flags are combinational from `sl`.
// Segment flag bit order: side*11 + segment, segment 0 = stage 1.
// The valid flag is this implementation's addition (entries are never
// removed except by reset; writing an all-don't-care word with a miss-only
// pattern is up to the user).
module tcam_word
  import tcam_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wl,
  input  word_t                wq,
  input  word_t                wdc,
  input  word_t                sl,
  output word_t                rq,
  output word_t                rdc,
  output logic                 valid,
  output logic                 match,
  output logic [SEGS_WORD-1:0] seg_gated,
  output logic [SEGS_WORD-1:0] seg_discharged
);

  logic [SEGS_SIDE-1:0] seg_en    [SIDES];
  logic [SEGS_SIDE-1:0] seg_match [SIDES];
  logic [STAGES:1]      ok        [SIDES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  valid <= 1'b0;
    else if (wl) valid <= 1'b1;
  end

  for (genvar s = 0; s < SIDES; s++) begin : g_side
    for (genvar g = 0; g < SEGS_SIDE; g++) begin : g_seg
      localparam int unsigned LO = seg_lo(s, g);
      localparam int unsigned N  = seg_len(g);
      cam_segment #(.N(N)) u_seg (
        .clk        (clk),
        .rst_n      (rst_n),
        .wl         (wl),
        .bl_q       (wq[LO +: N]),
        .bl_qd      (wdc[LO +: N]),
        .sl         (sl[LO +: N]),
        .en         (seg_en[s][g]),
        .q          (rq[LO +: N]),
        .qd         (rdc[LO +: N]),
        .match      (seg_match[s][g]),
        .gated      (seg_gated[s*SEGS_SIDE + g]),
        .discharged (seg_discharged[s*SEGS_SIDE + g])
      );
    end

    // Stage results of this side.
    assign ok[s][1] = seg_match[s][0];
    for (genvar k = 2; k <= STAGES; k++) begin : g_ok
      assign ok[s][k] = seg_match[s][2*k-3] & seg_match[s][2*k-2];
    end

    // Butterfly enables.
    assign seg_en[s][0] = valid;
    for (genvar k = 2; k <= STAGES; k++) begin : g_en
      localparam int unsigned KX = (k == 2) ? 1 : k - 2;
      assign seg_en[s][2*k-3] = ok[s][k-1] & ok[1-s][KX];
      assign seg_en[s][2*k-2] = ok[s][k-1] & ok[1-s][KX];
    end
  end

  assign match = valid & ok[0][STAGES] & ok[1][STAGES];

endmodule
