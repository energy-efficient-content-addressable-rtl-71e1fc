// tb_addr_decoder: exhaustive self-checking test of the word-line decoder.
// For every address with the enable high, exactly the addressed word-line
// must be set; with the enable low no word-line may be set.
module tb_addr_decoder;
  localparam int WORDS = 256;
  logic en = 0;
  logic [7:0] addr = '0;
  logic [WORDS-1:0] wl;
  int checks = 0, failures = 0;

  addr_decoder #(.WORDS(WORDS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WORDS-1:0] exp;
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < WORDS; a++) begin
        en = e[0];
        addr = 8'(a);
        #1;
        exp = '0;
        if (e == 1) exp[a] = 1'b1;
        checks++;
        if (wl !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL en=%0d addr=%0d wl=%h", e, a, wl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
