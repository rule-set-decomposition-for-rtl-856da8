// state_cell: one state of the pattern-matching automaton.
//
// A state is a flip-flop and a character matcher. The flip-flop records that
// the previous state matched on the previous byte (its D input is the cell's
// enable); the cell matches when that flip-flop is set and the byte now on
// the bus is the cell's character. The match output is combinational from the
// bus, and it feeds the enable of the next state, so a pattern of L characters
// reports its match in the cycle its last character is on the bus.
//
// Interface and timing (this design's choices, the document shows only clk,
// enable, bus and match):
//   valid    - the bus carries a byte this cycle; the flip-flop advances and
//              match can be 1 only when valid is 1. With valid low the state
//              is held, so the byte stream may have gaps.
//   restart  - the byte on the bus is the first of a packet: the flip-flop's
//              content is replaced by INIT for this byte, so no match runs
//              across a packet boundary and the first byte is not lost.
//   INIT     - reset/restart value of the state. Cells that begin a pattern
//              use 1 (their enable is tied to 1, as the first flip-flop of the
//              document's "abc" circuit is); all others use 0.
module state_cell
  import nids_pkg::*;
#(
  parameter byte_t CHAR = 8'h61,
  parameter bit    INIT = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  logic  restart,
  input  byte_t data,
  input  logic  enable,
  output logic  match
);

  logic state_q;
  logic active;
  logic char_hit;

  char_matcher #(.CHAR(CHAR)) u_char (
    .data (data),
    .hit  (char_hit)
  );

  always_comb begin
    active = restart ? INIT : state_q;
    match  = valid & active & char_hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= INIT;
    end else if (valid) begin
      state_q <= enable;
    end
  end

endmodule
