// cam_segment: one PF-CDPD match-line segment ("CAM segment") of N cells,
// with don't-care based power gating.
//
// Function: in a pseudo-footless clock-and-data precharge dynamic segment the
// floating node is precharged every cycle and discharges during evaluation
// only when the segment is enabled by the previous stage and all N series
// cells conduct. The segment output (the inverted floating node) is then 1
// ("match") and enables the next stage; a disabled or mismatching segment
// keeps its output at 0, so a miss stops the chain.
//
// Power gating: when the most significant cell of the segment (index N-1) is
// don't-care, the whole segment is taken to be don't-care (routing prefixes
// put their X bits at the low-order end), the precharge supply is gated off,
// the floating node stays discharged and the output reads 1 regardless of
// the enable and the search data. This is the behaviour of the gated circuit
// and is correct for prefix-shaped entries.
//
// Activity outputs (for power accounting, not part of the circuit):
// `gated` = precharge disabled this cycle; `discharged` = floating node
// discharged in this evaluation (the event that costs precharge energy next
// cycle). All outputs are combinational from `en`, `sl` and the stored cells.
// The XOR-based conditional keeper of the circuit only affects noise margin
// and speed, so it has no counterpart here.
module cam_segment #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wl,
  input  logic [N-1:0] bl_q,
  input  logic [N-1:0] bl_qd,
  input  logic [N-1:0] sl,
  input  logic         en,          // output of the previous stage
  output logic [N-1:0] q,
  output logic [N-1:0] qd,
  output logic         match,       // segment output, enables next stage
  output logic         gated,
  output logic         discharged
);

  logic [N-1:0] cell_match;

  for (genvar i = 0; i < N; i++) begin : g_cell
    tcam_cell u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .wl    (wl),
      .bl_q  (bl_q[i]),
      .bl_qd (bl_qd[i]),
      .sl    (sl[i]),
      .q     (q[i]),
      .qd    (qd[i]),
      .match (cell_match[i])
    );
  end

  assign gated      = qd[N-1];
  assign discharged = !gated && en && (&cell_match);
  assign match      = gated || discharged;

endmodule
