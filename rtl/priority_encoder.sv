// priority_encoder: match-line priority encoder of the TCAM.
//
// Reduces the WORDS match lines to a hit flag, the address of the winning
// match and a flag for more than one match. Routing prefixes are stored in
// order of prefix length with the longest prefixes at the highest addresses,
// so by default the highest matching address wins (HIGH_WINS = 1), which
// yields the longest-prefix match. HIGH_WINS = 0 gives the classic
// lowest-address-first order. Purely combinational.
module priority_encoder #(
  parameter int unsigned WORDS     = 256,
  parameter int unsigned ADDR_W    = $clog2(WORDS),
  parameter bit          HIGH_WINS = 1'b1
) (
  input  logic [WORDS-1:0]  ml,
  output logic              hit,
  output logic              multi,
  output logic [ADDR_W-1:0] addr
);

  always_comb begin
    addr = '0;
    if (HIGH_WINS) begin
      for (int unsigned i = 0; i < WORDS; i++)
        if (ml[i]) addr = ADDR_W'(i);
    end else begin
      for (int i = int'(WORDS) - 1; i >= 0; i--)
        if (ml[i]) addr = ADDR_W'(i);
    end
  end

  assign hit   = |ml;
  assign multi = (ml & (ml - WORDS'(1))) != '0;

endmodule
