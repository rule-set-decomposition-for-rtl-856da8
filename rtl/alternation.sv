// alternation: the 'or' construct of the automaton.
//
// One incoming state signal i enables N state cells side by side; branch b
// recognises character CHARS[b]. Each branch's match is brought out on its own
// so that longer patterns can continue from it (the branch outputs of the
// document's mid-level schematic), and match is the OR of all branches, the
// merge of the branches into one accepting state.
//
// In the pattern-tree matcher every state that has children drives one
// alternation whose branches are those children; a state with a single child
// gives an alternation of one branch, which is plain catenation.
//
// Interface: byte bus (data, valid, restart) as in state_cell; i in;
// branch_match[N], match out, both combinational from the bus byte.
module alternation
  import nids_pkg::*;
#(
  parameter int unsigned        N     = 2,
  parameter byte_t [N-1:0]      CHARS = {8'h62, 8'h61},
  parameter bit                 INIT  = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic         restart,
  input  byte_t        data,
  input  logic         i,
  output logic [N-1:0] branch_match,
  output logic         match
);

  for (genvar b = 0; b < N; b++) begin : g_branch
    state_cell #(.CHAR(CHARS[b]), .INIT(INIT)) u_state (
      .clk     (clk),
      .rst_n   (rst_n),
      .valid   (valid),
      .restart (restart),
      .data    (data),
      .enable  (i),
      .match   (branch_match[b])
    );
  end

  assign match = |branch_match;

endmodule
