// tb_dc_hsl: self-checking test of the don't-care based hierarchical
// search-lines.
// Keeps its own copy of the stored don't-care bits of all 256 words, writes
// random entries (prefix-shaped and fully specified) to random addresses,
// including overwrites that remove the last cared cell of a column, and after
// each write checks every block's buffer enables and local search-lines for a
// random global search word: lsl_en[b][i] must be 1 exactly when some word of
// block b cares about bit i, and lsl[b] = gsl & lsl_en[b]. Counts writes that
// disabled a previously enabled column.
module tb_dc_hsl;
  import tcam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we = 0;
  addr_t waddr = '0;
  word_t wdc = '0, gsl = '0;
  word_t word_dc [WORDS];
  word_t lsl [NBLK];
  word_t lsl_en [NBLK];
  int checks = 0, failures = 0, n_disable = 0;

  dc_hsl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned block_of(int unsigned w);
    if (w < 64) return 0;
    if (w < 128) return 1;
    if (w < 192) return 2;
    if (w < 224) return 3;
    return 4;
  endfunction

  task automatic check_all();
    word_t exp [NBLK];
    for (int b = 0; b < NBLK; b++) exp[b] = '0;
    for (int w = 0; w < WORDS; w++) exp[block_of(w)] |= ~word_dc[w];
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (lsl_en[b] !== exp[b] || lsl[b] !== (gsl & exp[b])) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d en %h exp %h", b, lsl_en[b], exp[b]);
      end
    end
  endtask

  initial begin
    for (int w = 0; w < WORDS; w++) word_dc[w] = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    for (int t = 0; t < 1500; t++) begin
      int a, len;
      word_t d, en_before;
      a = (t < 300) ? $urandom_range(0, WORDS-1) : ((t % 2) ? $urandom_range(192, 255) : $urandom_range(0, 15));
      len = $urandom_range(0, 128);
      case (t % 4)
        0: d = '1;                                   // erase to all don't-care
        1: d = '0;
        default: d = (len == 128) ? '0 : ({BITS{1'b1}} >> len);
      endcase
      en_before = lsl_en[block_of(a)];
      @(negedge clk);
      we = 1; waddr = addr_t'(a); wdc = d;
      @(posedge clk);
      word_dc[a] = d;        // the array stores the word at this edge
      @(negedge clk);
      we = 0;
      gsl = {$urandom, $urandom, $urandom, $urandom};
      #1;
      if ((en_before & ~lsl_en[block_of(a)]) != '0) n_disable++;
      check_all();
    end
    // erase every word of the last block: its columns must switch off
    for (int a = 224; a < WORDS; a++) begin
      word_t en_before;
      en_before = lsl_en[4];
      @(negedge clk);
      we = 1; waddr = addr_t'(a); wdc = '1;
      @(posedge clk);
      word_dc[a] = '1;
      @(negedge clk);
      we = 0;
      #1;
      if ((en_before & ~lsl_en[4]) != '0) n_disable++;
      check_all();
    end
    checks++;
    if (lsl_en[4] != '0) failures++;
    $display("writes that disabled a column: %0d", n_disable);
    if (n_disable == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
