// char_matcher: recognises one character on the 8-bit byte bus.
//
// Following the document, the byte is split into its two nibbles and each
// nibble addresses a 4-input look-up table; the character is present when both
// tables answer 1. By default each table holds a single 1, at the position of
// the character's nibble, so the matcher recognises exactly CHAR. The two
// truth tables are parameters of their own (LUT_HI, LUT_LO), so a rule-set
// compiler may load other contents, e.g. a set of characters that differ only
// in one nibble; that override is this design's choice.
//
// Interface: data (the bus byte) in, hit out. Purely combinational.
module char_matcher
  import nids_pkg::*;
#(
  parameter byte_t       CHAR   = 8'h61,
  parameter logic [15:0] LUT_HI = 16'(1) << CHAR[7:4],
  parameter logic [15:0] LUT_LO = 16'(1) << CHAR[3:0]
) (
  input  byte_t data,
  output logic  hit
);

  logic hi_hit, lo_hit;

  always_comb begin
    hi_hit = LUT_HI[data[7:4]];
    lo_hit = LUT_LO[data[3:0]];
    hit    = hi_hit & lo_hit;
  end

endmodule
