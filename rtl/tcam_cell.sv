// tcam_cell: one AND-type ternary CAM cell with separate bit-lines and
// search-lines.
//
// The cell stores two bits, Q and Qd (two SRAM cells). Qd = 1 marks the
// cell as don't-care (X); otherwise Q is the stored 0 or 1. In the match-line
// the cell is a series pass device that conducts ("match") when it is
// don't-care or when the search-line bit equals Q, as in the state table of
// the design: (Q,Qd)=(0,0) conducts for SL=0, (1,0) conducts for SL=1, and
// Qd=1 conducts for any SL.
//
// Interface: the word-line `wl` writes `bl_q`/`bl_qd` at the rising clock
// edge (write-through of the bit-line pair); `q`/`qd` are the stored bits for
// the read path; `sl` is the local search-line; `match` is the cell's
// comparison result, combinational from `sl` and the stored bits.
// Reset puts the cell in the don't-care state; the reset value is this
// implementation's choice.
module tcam_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic wl,      // word-line: write this cell
  input  logic bl_q,    // bit-line: data bit to store
  input  logic bl_qd,   // bit-line: 1 = store don't-care
  input  logic sl,      // search-line bit
  output logic q,
  output logic qd,
  output logic match
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q  <= 1'b0;
      qd <= 1'b1;
    end else if (wl) begin
      q  <= bl_q;
      qd <= bl_qd;
    end
  end

  assign match = qd | (q ~^ sl);

endmodule
