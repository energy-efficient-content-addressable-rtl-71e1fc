// tb_tcam_top: end-to-end, full-size test of the 256 x 128 ternary CAM.
//
// Builds an IPv6 routing table of 256 prefixes whose lengths follow a
// 6Bone-like distribution (mostly /32, then /48, /35, /24, /28 and a few
// others between /16 and /48), some nested inside shorter ones, stored
// sorted by prefix length with the shortest at address 0. Then:
//   - reads every entry back;
//   - searches, one per cycle back to back, for addresses inside random
//     entries and random addresses, checking hit, the longest-prefix winner
//     (highest matching address), the multiple-match flag and the one-cycle
//     response latency against a reference table search;
//   - checks the activity statistics: power-gated segments, discharged
//     segments (from a model of the butterfly stage chain) and driven local
//     search-line columns;
//   - overwrites entries (including a write immediately followed by a search
//     for the new entry) and replaces the long prefixes of the last block
//     with /16 prefixes so that local search-line columns switch off.
// Every mechanism (write, read, hit, miss, multiple match, power gating,
// cross-side stop, search-line column disabled, column switched off by a
// write, write-then-search) must occur at least once.
module tb_tcam_top;
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

  // mechanism counters
  int n_write = 0, n_read = 0, n_hit = 0, n_miss = 0, n_multi = 0;
  int n_gated = 0, n_xstop = 0, n_lsl_off = 0, n_col_switch_off = 0, n_wr_then_search = 0;

  tcam_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference copy of the table.
  word_t ref_q [WORDS];
  word_t ref_d [WORDS];
  logic  ref_v [WORDS];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic word_t pmask(int len);   // 1 = don't-care
    return (len >= 128) ? '0 : ({BITS{1'b1}} >> len);
  endfunction

  // Model of one word's segment chain: discharged segment count and
  // whether a side was stopped by the other side.
  function automatic void word_model(input word_t q, input word_t d, input word_t k, input logic v,
                            output int ndis, output int ngat, output logic xs);
    logic sm [2][11];
    logic okk [2][7];
    logic en, own, allm;
    ndis = 0; ngat = 0; xs = 0;
    for (int st = 1; st <= 6; st++) begin
      for (int s = 0; s < 2; s++) begin
        int first, last;
        first = (st == 1) ? 0 : 2*st - 3;
        last  = (st == 1) ? 0 : 2*st - 2;
        for (int g = first; g <= last; g++) begin
          int lo, n;
          n  = (g == 0) ? 4 : 6;
          lo = s*64 + ((g == 0) ? 0 : 4 + (g-1)*6);
          allm = 1;
          for (int i = lo; i < lo + n; i++) allm &= d[i] | (q[i] == k[i]);
          if (st == 1)      en = v;
          else if (st == 2) en = okk[s][1] & okk[1-s][1];
          else              en = okk[s][st-1] & okk[1-s][st-2];
          own = (st == 1) ? v : okk[s][st-1];
          if (own && !en) xs = 1;
          if (d[lo+n-1]) begin
            ngat++;
            sm[s][g] = 1;
          end else begin
            sm[s][g] = en && allm;
            if (sm[s][g]) ndis++;
          end
        end
      end
      for (int s = 0; s < 2; s++)
        okk[s][st] = (st == 1) ? sm[s][0] : (sm[s][2*st-3] & sm[s][2*st-2]);
    end
  endfunction

  function automatic int blk(int w);
    if (w < 64) return 0;
    if (w < 128) return 1;
    if (w < 192) return 2;
    if (w < 224) return 3;
    return 4;
  endfunction

  // Expected search result and statistics for key k on the reference table.
  typedef struct {
    logic hit; logic multi; int addr; int ndis; int ngat; int nlsl; logic xs;
  } exp_t;

  function automatic exp_t expect_search(word_t k);
    exp_t e;
    int n;
    word_t care [NBLK];
    e = '{default: 0};
    n = 0;
    for (int b = 0; b < NBLK; b++) care[b] = '0;
    for (int w = 0; w < WORDS; w++) begin
      int nd, ng;
      logic xs;
      care[blk(w)] |= ~ref_d[w];
      if (ref_v[w] && (((ref_q[w] ^ k) & ~ref_d[w]) == '0)) begin
        n++;
        e.addr = w;
      end
      word_model(ref_q[w], ref_d[w], k, ref_v[w], nd, ng, xs);
      e.ndis += nd;
      e.ngat += ng;
      e.xs |= xs;
    end
    for (int b = 0; b < NBLK; b++) e.nlsl += $countones(care[b]);
    e.hit = (n > 0);
    e.multi = (n > 1);
    return e;
  endfunction

  // Issue one command in the next cycle.
  task automatic issue(input tcam_op_e o, input int a, input word_t dd, input word_t m);
    @(negedge clk);
    op = o; addr = addr_t'(a); data = dd; dc = m;
  endtask

  task automatic write_entry(input int a, input word_t q, input word_t d);
    issue(OP_WRITE, a, q & ~d, d);
    ref_q[a] = q & ~d; ref_d[a] = d; ref_v[a] = 1;
    n_write++;
  endtask

  // Expected result of the search in flight, checked right after the edge
  // that registers it; the next command is issued at the following falling
  // edge, so searches still run back to back, one per cycle.
  exp_t  pend_e;
  logic  pend = 0;
  word_t pend_k;

  task automatic check_pending();
    if (pend) begin
      check(rsp_valid && rsp_op == OP_SEARCH, "search response one cycle later");
      check(hit == pend_e.hit, $sformatf("hit key=%h got %0b", pend_k, hit));
      check(multi == pend_e.multi, "multi");
      if (pend_e.hit) check(int'(match_addr) == pend_e.addr,
                            $sformatf("addr got %0d exp %0d", match_addr, pend_e.addr));
      check(int'(stat_gated) == pend_e.ngat, $sformatf("gated got %0d exp %0d", stat_gated, pend_e.ngat));
      check(int'(stat_discharged) == pend_e.ndis, $sformatf("discharged got %0d exp %0d", stat_discharged, pend_e.ndis));
      check(int'(stat_lsl_active) == pend_e.nlsl, $sformatf("lsl got %0d exp %0d", stat_lsl_active, pend_e.nlsl));
      if (pend_e.hit) n_hit++; else n_miss++;
      if (pend_e.multi) n_multi++;
      if (pend_e.ngat > 0) n_gated++;
      if (pend_e.xs) n_xstop++;
      if (pend_e.nlsl < NBLK * BITS) n_lsl_off++;
      pend = 0;
    end
  endtask

  task automatic search(input word_t k);
    exp_t e;
    e = expect_search(k);
    issue(OP_SEARCH, 0, k, '0);
    pend = 1; pend_e = e; pend_k = k;
    @(posedge clk);
    #1;
    check_pending();
  endtask

  task automatic idle();
    issue(OP_NOP, 0, '0, '0);
    @(posedge clk);
    #1;
    check_pending();
  endtask

  function automatic word_t rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic int pick_len();
    int r;
    r = $urandom_range(0, 999);
    if (r < 862) return 32;
    if (r < 910) return 48;
    if (r < 948) return 35;
    if (r < 961) return 24;
    if (r < 974) return 28;
    case (r % 8)
      0: return 16; 1: return 19; 2: return 20; 3: return 21;
      4: return 27; 5: return 29; 6: return 33; default: return 34;
    endcase
  endfunction

  initial begin
    int lens [WORDS];
    word_t pfx [WORDS];
    for (int w = 0; w < WORDS; w++) begin ref_q[w] = '0; ref_d[w] = '1; ref_v[w] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // empty table: every search misses
    search(rnd128());
    search('0);
    idle();

    // build a sorted routing table
    for (int w = 0; w < WORDS; w++) lens[w] = pick_len();
    lens.sort();
    for (int w = 0; w < WORDS; w++) begin
      pfx[w] = rnd128();
      // every fourth longer prefix nests inside an earlier shorter one
      if (w > 0 && (w % 4 == 0)) begin
        int p;
        p = $urandom_range(0, w - 1);
        if (lens[p] < lens[w]) pfx[w] = (pfx[p] & ~pmask(lens[p])) | (pfx[w] & pmask(lens[p]));
      end
      write_entry(w, pfx[w], pmask(lens[w]));
    end
    idle();

    // read back everything
    for (int w = 0; w < WORDS; w++) begin
      issue(OP_READ, w, '0, '0);
      @(posedge clk);
      #1;
      check(rsp_valid && rsp_op == OP_READ && rd_valid && rd_q == ref_q[w] && rd_dc == ref_d[w],
            $sformatf("read %0d", w));
      n_read++;
    end
    idle();

    // back-to-back searches
    for (int t = 0; t < 600; t++) begin
      word_t k;
      int w;
      w = $urandom_range(0, WORDS - 1);
      k = (t % 5 == 4) ? rnd128() : ((ref_q[w] & ~ref_d[w]) | (rnd128() & ref_d[w]));
      search(k);
    end
    idle();

    // write then search the new entry in the very next cycle (a /64 in block 0)
    begin
      word_t q;
      q = rnd128();
      write_entry(5, q, pmask(64));
      search((q & ~pmask(64)) | (rnd128() & pmask(64)));
      n_wr_then_search++;
      idle();
    end

    // replace block 4's long prefixes by /16 prefixes one by one: columns
    // below bit 112 switch off when the last long prefix goes
    for (int w = 224; w < WORDS; w++) begin
      int nlsl_before;
      idle();
      search(rnd128());
      idle();
      nlsl_before = pend_e.nlsl;
      write_entry(w, rnd128(), pmask(16));
      search(rnd128());
      if (pend_e.nlsl < nlsl_before) n_col_switch_off++;
    end
    idle();
    for (int t = 0; t < 100; t++) begin
      int w;
      w = $urandom_range(0, 223);
      search((ref_q[w] & ~ref_d[w]) | (rnd128() & ref_d[w]));
    end
    idle();

    $display("writes=%0d reads=%0d hits=%0d misses=%0d multi=%0d gated=%0d cross_stop=%0d lsl_off=%0d col_switch_off=%0d write_then_search=%0d",
             n_write, n_read, n_hit, n_miss, n_multi, n_gated, n_xstop, n_lsl_off, n_col_switch_off, n_wr_then_search);
    if (n_write == 0) begin failures++; $display("mechanism never seen: write"); end
    if (n_read == 0) begin failures++; $display("mechanism never seen: read"); end
    if (n_hit == 0) begin failures++; $display("mechanism never seen: hit"); end
    if (n_miss == 0) begin failures++; $display("mechanism never seen: miss"); end
    if (n_multi == 0) begin failures++; $display("mechanism never seen: multiple match"); end
    if (n_gated == 0) begin failures++; $display("mechanism never seen: power gating"); end
    if (n_xstop == 0) begin failures++; $display("mechanism never seen: cross-side stop"); end
    if (n_lsl_off == 0) begin failures++; $display("mechanism never seen: LSL column off"); end
    if (n_col_switch_off == 0) begin failures++; $display("mechanism never seen: column switched off"); end
    if (n_wr_then_search == 0) begin failures++; $display("mechanism never seen: write then search"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
