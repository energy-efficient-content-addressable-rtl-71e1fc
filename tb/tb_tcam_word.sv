// tb_tcam_word: self-checking test of one 128-bit word with the Type III
// butterfly match-line.
// Stores prefix-shaped entries (a /L prefix: address bits 127..128-L are
// cared, the rest don't-care) and fully specified words, and searches with
// the stored key, keys with one flipped bit at a chosen place, and random
// keys. The match output is checked against the ternary rule on all 128
// bits; the per-segment gating and discharge flags are checked against a
// reference model of the stage chain written here from the connection rule
// (stage 2 needs both stage-1 segments, stage k>=3 needs its own side's
// stage k-1 and the other side's stage k-2). It counts searches in which a
// side was stopped by a miss on the other side.
module tb_tcam_word;
  import tcam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wl = 0;
  word_t wq = '0, wdc = '0, sl = '0, rq, rdc;
  logic valid, match;
  logic [SEGS_WORD-1:0] seg_gated, seg_discharged;
  int checks = 0, failures = 0;
  int n_hit = 0, n_cross_stop = 0, n_gated_any = 0;

  tcam_word dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // Reference model of the segment flags.
  task automatic reference(input word_t q, input word_t d, input word_t k, input logic v,
                           output logic [SEGS_WORD-1:0] eg, output logic [SEGS_WORD-1:0] ed,
                           output logic m, output logic xstop);
    logic sm [2][11];
    logic okk [2][7];
    logic en [2][11];
    logic own_ok;
    xstop = 0;
    for (int st = 1; st <= 6; st++) begin
      for (int s = 0; s < 2; s++) begin
        int first, last;
        first = (st == 1) ? 0 : 2*st - 3;
        last  = (st == 1) ? 0 : 2*st - 2;
        for (int g = first; g <= last; g++) begin
          int lo, n;
          logic allm;
          n  = (g == 0) ? 4 : 6;
          lo = s*64 + ((g == 0) ? 0 : 4 + (g-1)*6);
          allm = 1;
          for (int i = lo; i < lo + n; i++) allm &= d[i] | (q[i] == k[i]);
          if (st == 1)      en[s][g] = v;
          else if (st == 2) en[s][g] = okk[s][1] & okk[1-s][1];
          else              en[s][g] = okk[s][st-1] & okk[1-s][st-2];
          own_ok = (st == 1) ? v : okk[s][st-1];
          if (own_ok && !en[s][g]) xstop = 1;
          eg[s*11+g] = d[lo+n-1];
          ed[s*11+g] = !d[lo+n-1] && en[s][g] && allm;
          sm[s][g]   = eg[s*11+g] | ed[s*11+g];
        end
      end
      for (int s = 0; s < 2; s++)
        okk[s][st] = (st == 1) ? sm[s][0] : (sm[s][2*st-3] & sm[s][2*st-2]);
    end
    m = v & okk[0][6] & okk[1][6];
  endtask

  function automatic logic tern(input word_t q, input word_t d, input word_t k);
    return ((q ^ k) & ~d) == '0;
  endfunction

  initial begin
    word_t q, d, k;
    logic [SEGS_WORD-1:0] eg, ed;
    logic em, xstop;
    repeat (2) @(posedge clk);
    // invalid word after reset never matches
    #1 check(match, 1'b0, "empty word");
    check(valid, 1'b0, "reset valid");
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      int len;
      q = {$urandom, $urandom, $urandom, $urandom};
      if (t % 5 == 4) d = '0;
      else begin
        len = (t % 5 == 0) ? 32 : $urandom_range(1, 128);
        d = (len == 128) ? '0 : ({BITS{1'b1}} >> len);
      end
      @(negedge clk);
      wl = 1; wq = q; wdc = d;
      @(negedge clk);
      wl = 0; wq = '0; wdc = '0;
      check(rq == q && rdc == d && valid, 1'b1, "readback");
      for (int j = 0; j < 6; j++) begin
        case (j)
          0: k = q;
          1: begin k = q; k[$urandom_range(0, 127)] ^= 1'b1; end
          2: begin k = q; k[$urandom_range(64, 127)] ^= 1'b1; end
          3: begin k = q; k[$urandom_range(0, 63)] ^= 1'b1; end
          4: begin k = q; k[127 - $urandom_range(0, 15)] ^= 1'b1; end
          default: k = {$urandom, $urandom, $urandom, $urandom};
        endcase
        sl = k;
        #1;
        reference(q, d, k, 1'b1, eg, ed, em, xstop);
        check(match, tern(q, d, k), "match vs ternary rule");
        check(match, em, "match vs chain model");
        checks++;
        if (seg_gated !== eg || seg_discharged !== ed) begin
          failures++;
          if (failures < 20) $display("FAIL flags t=%0d j=%0d gated %h/%h dis %h/%h", t, j, seg_gated, eg, seg_discharged, ed);
        end
        if (match) n_hit++;
        if (xstop) n_cross_stop++;
        if (|seg_gated) n_gated_any++;
      end
    end
    $display("hits=%0d cross_side_stops=%0d searches_with_gating=%0d", n_hit, n_cross_stop, n_gated_any);
    if (n_hit == 0 || n_cross_stop == 0 || n_gated_any == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
