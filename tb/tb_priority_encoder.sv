// tb_priority_encoder: self-checking test of the match-line priority encoder
// with the default order (highest matching address wins) and with the
// lowest-first order. Drives no match, every single match, and random sets
// of matches, and compares hit, multi and the address with a reference
// computed by scanning the vector here.
module tb_priority_encoder;
  localparam int WORDS = 256;
  logic [WORDS-1:0] ml = '0;
  logic hit_h, multi_h, hit_l, multi_l;
  logic [7:0] addr_h, addr_l;
  int checks = 0, failures = 0;

  priority_encoder #(.WORDS(WORDS)) dut_h (.ml(ml), .hit(hit_h), .multi(multi_h), .addr(addr_h));
  priority_encoder #(.WORDS(WORDS), .HIGH_WINS(1'b0)) dut_l (.ml(ml), .hit(hit_l), .multi(multi_l), .addr(addr_l));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    int n, hi, lo;
    n = 0; hi = 0; lo = 0;
    for (int i = 0; i < WORDS; i++) if (ml[i]) begin
      if (n == 0) lo = i;
      hi = i;
      n++;
    end
    #1;
    checks++;
    if (hit_h !== (n > 0) || multi_h !== (n > 1) || (n > 0 && addr_h !== 8'(hi))) begin
      failures++;
      if (failures < 10) $display("FAIL high: n=%0d hi=%0d got hit=%0b multi=%0b addr=%0d", n, hi, hit_h, multi_h, addr_h);
    end
    checks++;
    if (hit_l !== (n > 0) || multi_l !== (n > 1) || (n > 0 && addr_l !== 8'(lo))) begin
      failures++;
      if (failures < 10) $display("FAIL low: n=%0d lo=%0d got addr=%0d", n, lo, addr_l);
    end
  endtask

  initial begin
    ml = '0;
    run_one();
    for (int i = 0; i < WORDS; i++) begin
      ml = '0;
      ml[i] = 1'b1;
      run_one();
    end
    for (int t = 0; t < 2000; t++) begin
      ml = '0;
      for (int k = 0; k < $urandom_range(1, 6); k++) ml[$urandom_range(0, WORDS-1)] = 1'b1;
      if (t % 3 == 0) ml = {8{$urandom}};
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
