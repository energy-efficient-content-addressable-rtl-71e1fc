// tb_cam_segment: self-checking test of a PF-CDPD match-line segment with
// don't-care power gating (N = 6 cells).
// For many random stored patterns (including prefix-shaped don't-care runs
// from the low end and all-don't-care segments) and random search words and
// enables, it checks the segment output, the gating flag and the discharge
// flag against a reference: gated when the top cell is X; otherwise
// discharged = en & all cells match; output = gated | discharged.
module tb_cam_segment;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  logic wl = 0, en = 0;
  logic [N-1:0] bl_q = '0, bl_qd = '0, sl = '0, q, qd;
  logic match, gated, discharged;
  int checks = 0, failures = 0;
  int n_gated = 0, n_dis = 0, n_blocked = 0;

  cam_segment #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    logic [N-1:0] sq, sd;
    logic allm, e_g, e_d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int nx;
      sq = N'($urandom);
      case (t % 4)
        0: sd = '0;
        1: begin nx = $urandom_range(0, N); sd = (nx == 0) ? '0 : N'((1 << nx) - 1); end
        2: sd = '1;
        default: sd = N'($urandom);
      endcase
      @(negedge clk);
      wl = 1; bl_q = sq; bl_qd = sd;
      @(negedge clk);
      wl = 0;
      check(q == sq && qd == sd, 1'b1, "readback");
      for (int k = 0; k < 8; k++) begin
        // half the searches hit the stored word exactly
        sl = (k[0]) ? sq : N'($urandom);
        en = (k < 6);
        #1;
        allm = &(sd | ~(sq ^ sl));
        e_g  = sd[N-1];
        e_d  = !e_g && en && allm;
        check(gated, e_g, "gated");
        check(discharged, e_d, "discharged");
        check(match, e_g | e_d, "match");
        if (e_g) n_gated++;
        if (e_d) n_dis++;
        if (!en && allm && !e_g) n_blocked++;
      end
    end
    $display("gated=%0d discharged=%0d blocked_by_enable=%0d", n_gated, n_dis, n_blocked);
    if (n_gated == 0 || n_dis == 0 || n_blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
