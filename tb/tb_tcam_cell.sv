// tb_tcam_cell: self-checking test of one ternary CAM cell.
// Writes each of the three states (0, 1, X) plus the second X encoding,
// checks the read-back bits and the match output for both search-line
// values against the ternary rule (X matches anything, else SL == Q), and
// checks that the stored value holds while the word-line is low.
module tb_tcam_cell;
  logic clk = 0, rst_n = 0;
  logic wl = 0, bl_q = 0, bl_qd = 0, sl = 0;
  logic q, qd, match;
  int checks = 0, failures = 0;

  tcam_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    // reset state is don't-care
    check(qd, 1'b1, "reset qd");
    rst_n = 1;
    for (int st = 0; st < 4; st++) begin
      logic eq, ed;
      eq = st[0];
      ed = st[1];
      @(negedge clk);
      wl = 1; bl_q = eq; bl_qd = ed;
      @(negedge clk);
      wl = 0; bl_q = ~eq; bl_qd = ~ed;   // bit-lines change, word-line low
      @(negedge clk);
      check(q, eq, "read q");
      check(qd, ed, "read qd");
      for (int s = 0; s < 2; s++) begin
        sl = s[0];
        #1;
        check(match, ed | (eq == s[0]), $sformatf("match st=%0d sl=%0d", st, s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
