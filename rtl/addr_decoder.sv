// addr_decoder: word-line address decoder of the TCAM array.
//
// Turns a binary word address into a one-hot word-line vector, asserted only
// while `en` is high (a write cycle). Purely combinational. The decoder is a
// standard part of a CAM array; its plain one-hot form is this
// implementation's choice.
module addr_decoder #(
  parameter int unsigned WORDS  = 256,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [WORDS-1:0]  wl
);

  always_comb begin
    wl = '0;
    if (en && (32'(addr) < WORDS)) wl[addr] = 1'b1;
  end

endmodule
