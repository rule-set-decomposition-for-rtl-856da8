// prefix_tree_matcher: one automaton that searches a byte stream for a set of
// patterns, with states shared between patterns wherever they can be.
//
// How it works. Every pattern character is an automaton state (a flip-flop
// and a character matcher). Patterns that begin with the same characters
// share the states of their longest common prefix, so the set becomes a tree:
// the "this"/"that" pair needs six states (t, h, i, s, a, t) instead of eight.
// This covers all three reductions of the rule set: a repeated pattern adds no
// state, patterns with a common first character share that state, and longer
// common prefixes share all their states. Each state that has successors
// drives one alternation of its child states; the first characters of all
// patterns form the root alternation, whose enable is tied to 1 so that a
// pattern may start at any byte of the payload.
//
// The tree is worked out while elaborating, from the parameters: pattern p is
// the low 8*LENGTHS[p] bits of PATTERNS[p], first character in the highest of
// those bytes. State (p,k), character k of pattern p, exists only when no
// selected pattern q < p has the same first k+1 characters; otherwise
// pattern p uses the state of the lowest such q. SELECT[p] = 0 leaves pattern
// p out of this matcher altogether (used to split a rule set over devices).
// The localparams NAIVE_STATES, UNIQUE_STATES, FIRST_CHAR_STATES and
// NUM_STATES give the state count after each reduction step.
//
// Interface and timing: one byte per clock on data while valid is 1; restart
// marks the first byte of a packet. hit[p] is 1, combinationally, in the cycle
// the last character of pattern p is on the bus and the LENGTHS[p] bytes up to
// it (within the current packet) spell the pattern. Overlapping and repeated
// occurrences are all reported. Byte-bus handling (valid, restart) is this
// design's choice; the state structure follows the document.
module prefix_tree_matcher
  import nids_pkg::*;
#(
  parameter int unsigned             NP       = 2,
  parameter int unsigned             MAX_LEN  = 4,
  parameter logic [8*MAX_LEN-1:0]    PATTERNS [NP] = '{"this", "that"},
  parameter int unsigned             LENGTHS  [NP] = '{4, 4},
  parameter logic [NP-1:0]           SELECT   = '1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  logic          restart,
  input  byte_t         data,
  output logic [NP-1:0] hit
);

  // ---------------------------------------------------------------------------
  // Elaboration-time construction of the pattern tree
  // ---------------------------------------------------------------------------

  // Character k (0 = first) of pattern p.
  function automatic byte_t ch(input int p, input int k);
    return PATTERNS[p][8*(int'(LENGTHS[p])-1-k) +: 8];
  endfunction

  // Patterns p and q agree on their first n characters.
  function automatic bit same_prefix(input int p, input int q, input int n);
    if (int'(LENGTHS[p]) < n || int'(LENGTHS[q]) < n) return 1'b0;
    for (int j = 0; j < n; j++)
      if (ch(p, j) != ch(q, j)) return 1'b0;
    return 1'b1;
  endfunction

  // Pattern whose state (.,k) pattern p uses at character k.
  function automatic int owner(input int p, input int k);
    for (int q = 0; q < p; q++)
      if (SELECT[q] && same_prefix(p, q, k + 1)) return q;
    return p;
  endfunction

  // State (p,k) is built: p is selected, long enough, and owns it.
  function automatic bit is_state(input int p, input int k);
    return SELECT[p] && (k < int'(LENGTHS[p])) && (owner(p, k) == p);
  endfunction

  // Pattern p's state at depth k hangs below state (q,k-1); k = 0 is the root.
  function automatic bit is_child(input int q, input int k, input int p);
    return is_state(p, k) && ((k == 0) || (owner(p, k - 1) == q));
  endfunction

  function automatic int num_children(input int q, input int k);
    int n = 0;
    for (int p = 0; p < int'(NP); p++)
      if (is_child(q, k, p)) n++;
    return n;
  endfunction

  // Pattern index of the j-th child of state (q,k-1).
  function automatic int child_pat(input int q, input int k, input int j);
    int n = 0;
    for (int p = 0; p < int'(NP); p++)
      if (is_child(q, k, p)) begin
        if (n == j) return p;
        n++;
      end
    return 0;
  endfunction

  // Characters of the children of state (q,k-1), child j in byte j.
  function automatic logic [8*NP-1:0] child_chars(input int q, input int k);
    logic [8*NP-1:0] v = '0;
    int n = 0;
    for (int p = 0; p < int'(NP); p++)
      if (is_child(q, k, p)) begin
        v[8*n +: 8] = ch(p, k);
        n++;
      end
    return v;
  endfunction

  // State counts of the reductions, for reports and checks.
  function automatic int count_states();
    int n = 0;
    for (int p = 0; p < int'(NP); p++)
      for (int k = 0; k < int'(MAX_LEN); k++)
        if (is_state(p, k)) n++;
    return n;
  endfunction

  function automatic int count_naive();
    int n = 0;
    for (int p = 0; p < int'(NP); p++)
      if (SELECT[p]) n += int'(LENGTHS[p]);
    return n;
  endfunction

  // Pattern p repeats an earlier selected pattern exactly.
  function automatic bit is_repeat(input int p);
    for (int q = 0; q < p; q++)
      if (SELECT[q] && LENGTHS[q] == LENGTHS[p] && same_prefix(p, q, int'(LENGTHS[p])))
        return 1'b1;
    return 1'b0;
  endfunction

  // One state per character of the selected patterns, repeats left out.
  function automatic int count_unique();
    int n = 0;
    for (int p = 0; p < int'(NP); p++)
      if (SELECT[p] && !is_repeat(p)) n += int'(LENGTHS[p]);
    return n;
  endfunction

  // As count_unique, with one first-character state per group of patterns
  // that begin with the same character.
  function automatic int count_first_char();
    int n = 0;
    for (int p = 0; p < int'(NP); p++)
      if (SELECT[p] && !is_repeat(p) && LENGTHS[p] > 0)
        n += int'(LENGTHS[p]) - ((owner(p, 0) == p) ? 0 : 1);
    return n;
  endfunction

  // State counts after each reduction, for reports and checks:
  //   NAIVE_STATES      one state per character of every selected pattern
  //   UNIQUE_STATES     repeated patterns removed
  //   FIRST_CHAR_STATES plus one shared state per first character
  //   NUM_STATES        longest common prefixes shared: what is built
  localparam int NAIVE_STATES      = count_naive();
  localparam int UNIQUE_STATES     = count_unique();
  localparam int FIRST_CHAR_STATES = count_first_char();
  localparam int NUM_STATES        = count_states();
  localparam int ROOT_N       = num_children(0, 0);

  // ---------------------------------------------------------------------------
  // Automaton
  // ---------------------------------------------------------------------------

  // node_match[p][k]: state (p,k) matches this cycle (0 where not built).
  logic [MAX_LEN-1:0] node_match [NP];

  // Root alternation: distinct first characters, always enabled.
  if (ROOT_N > 0) begin : g_root
    localparam logic [8*NP-1:0] RC = child_chars(0, 0);
    logic [ROOT_N-1:0] br;
    logic              any_unused;

    alternation #(.N(ROOT_N), .CHARS(RC[8*ROOT_N-1:0]), .INIT(1'b1)) u_alt (
      .clk          (clk),
      .rst_n        (rst_n),
      .valid        (valid),
      .restart      (restart),
      .data         (data),
      .i            (1'b1),
      .branch_match (br),
      .match        (any_unused)
    );

    for (genvar j = 0; j < ROOT_N; j++) begin : g_out
      assign node_match[child_pat(0, 0, j)][0] = br[j];
    end
  end

  // One alternation below every built state that has children.
  for (genvar p = 0; p < NP; p++) begin : g_pat
    for (genvar k = 0; k < MAX_LEN; k++) begin : g_chr
      if (!is_state(p, k)) begin : g_none
        assign node_match[p][k] = 1'b0;
      end
      if (k + 1 < MAX_LEN) begin : g_next
        localparam int NC = is_state(p, k) ? num_children(p, k + 1) : 0;
        if (NC > 0) begin : g_alt
          localparam logic [8*NP-1:0] CC = child_chars(p, k + 1);
          logic [NC-1:0] br;
          logic          any_unused;

          alternation #(.N(NC), .CHARS(CC[8*NC-1:0]), .INIT(1'b0)) u_alt (
            .clk          (clk),
            .rst_n        (rst_n),
            .valid        (valid),
            .restart      (restart),
            .data         (data),
            .i            (node_match[p][k]),
            .branch_match (br),
            .match        (any_unused)
          );

          for (genvar j = 0; j < NC; j++) begin : g_out
            assign node_match[child_pat(p, k + 1, j)][k + 1] = br[j];
          end
        end
      end
    end
  end

  // A pattern is found when the state of its last character matches.
  for (genvar p = 0; p < NP; p++) begin : g_hit
    if (SELECT[p] && LENGTHS[p] > 0) begin : g_sel
      assign hit[p] = node_match[owner(p, int'(LENGTHS[p]) - 1)][LENGTHS[p] - 1];
    end else begin : g_off
      assign hit[p] = 1'b0;
    end
  end

endmodule
