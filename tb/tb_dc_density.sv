// tb_dc_density: workload test of the full 256 x 128 TCAM at the four
// don't-care densities used to evaluate the low-power techniques
// (0 %, 25 %, 50 % and 75 % of all cells don't-care).
//
// For density x every word holds a random prefix of length 128*(1-x), so the
// don't-care cells sit at the low-order end as in a routing table. For each
// density the table is filled, then 256 searches run back to back (half of
// them inside a stored prefix). Checked per search: hit and winning address
// against a reference table search, the number of power-gated segments
// (every segment whose top cell lies below the prefix: exact count) and the
// number of driven local search-line columns (5 blocks x prefix length).
// Printed per density: average discharged segments per search, gated
// segments and active search-line columns, i.e. the activity that the
// power gating and hierarchical search-lines remove.
module tb_dc_density;
  import tcam_pkg::*;
  logic clk = 0, rst_n = 0;
  tcam_op_e op = OP_NOP;
  addr_t addr = '0;
  word_t data = '0, dc = '0;
  logic rsp_valid, hit, multi, rd_valid;
  tcam_op_e rsp_op;
  addr_t match_addr;
  word_t rd_q, rd_dc;
  logic [ARRCNT_W-1:0] stat_discharged, stat_gated;
  logic [LSLCNT_W-1:0] stat_lsl_active;
  int checks = 0, failures = 0;

  tcam_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t ref_q [WORDS];
  word_t ref_d [WORDS];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic word_t rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Segments of one word whose most significant cell is below the prefix.
  function automatic int gated_per_word(int len);
    int n;
    n = 0;
    for (int s = 0; s < 2; s++)
      for (int g = 0; g < 11; g++) begin
        int hi;
        hi = s*64 + ((g == 0) ? 3 : 4 + (g-1)*6 + 5);
        if (hi < 128 - len) n++;
      end
    return n;
  endfunction

  initial begin
    int dens [4] = '{0, 25, 50, 75};
    int prev_gated, prev_lsl;
    prev_gated = -1;
    prev_lsl = 1 << 20;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int di = 0; di < 4; di++) begin
      int len, sum_dis, eg;
      word_t m;
      len = 128 * (100 - dens[di]) / 100;
      m = (len >= 128) ? '0 : ({BITS{1'b1}} >> len);
      for (int w = 0; w < WORDS; w++) begin
        ref_q[w] = rnd128() & ~m;
        ref_d[w] = m;
        @(negedge clk);
        op = OP_WRITE; addr = addr_t'(w); data = ref_q[w]; dc = m;
      end
      eg = gated_per_word(len) * WORDS;
      sum_dis = 0;
      for (int t = 0; t < 256; t++) begin
        word_t k;
        int n, last;
        k = rnd128();
        if (t % 2 == 0) k = ref_q[$urandom_range(0, WORDS-1)] | (k & m);
        n = 0; last = 0;
        for (int w = 0; w < WORDS; w++)
          if (((ref_q[w] ^ k) & ~ref_d[w]) == '0) begin n++; last = w; end
        @(negedge clk);
        op = OP_SEARCH; data = k; dc = '0;
        @(posedge clk);
        #1;
        check(rsp_valid && rsp_op == OP_SEARCH, "response latency");
        check(hit == (n > 0) && multi == (n > 1), $sformatf("hit/multi d=%0d", dens[di]));
        if (n > 0) check(int'(match_addr) == last, $sformatf("addr got %0d exp %0d", match_addr, last));
        check(int'(stat_gated) == eg, $sformatf("gated got %0d exp %0d", stat_gated, eg));
        check(int'(stat_lsl_active) == NBLK * len, $sformatf("lsl got %0d exp %0d", stat_lsl_active, NBLK * len));
        sum_dis += int'(stat_discharged);
      end
      @(negedge clk);
      op = OP_NOP;
      $display("density %0d%%: prefix /%0d  gated segments %0d of %0d  active LSL columns %0d of %0d  avg discharged segments per search %0d.%02d",
               dens[di], len, eg, WORDS * SEGS_WORD, NBLK * len, NBLK * BITS, sum_dis / 256, (sum_dis % 256) * 100 / 256);
      check(eg > prev_gated || dens[di] == 0, "gating grows with density");
      check(NBLK * len < prev_lsl, "active search-lines shrink with density");
      prev_gated = eg;
      prev_lsl = NBLK * len;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
