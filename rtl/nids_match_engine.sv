// nids_match_engine: hardware payload matcher for a network intrusion
// detection rule set.
//
// The content patterns of the rule set are decomposed before they become
// logic. Patterns are grouped by their first character; a group keeps
// everything that can share states (equal patterns, a common first character,
// longer common prefixes), and the groups are dealt out round-robin, in order
// of first appearance, to NUM_PARTS partitions, one per device. Each partition
// is a prefix_tree_matcher in which every pattern character not shared with an
// earlier pattern is one state. All partitions see the same byte bus, so the
// whole rule set is searched at one byte per clock, in time linear in the
// payload length.
//
// Interface:
//   in_valid/in_data - payload byte stream, one byte per cycle when valid.
//   in_sop/in_eop    - qualify the first/last byte of a packet (both may be 1
//                      for a one-byte packet).
//   pattern_hit[p]   - pattern p ends on the current byte (combinational).
//   part_hit[d]      - some pattern of partition d ends on the current byte.
//   pkt_done         - one-cycle pulse the clock after a packet's last byte,
//                      with pkt_malicious (some pattern occurred in the
//                      packet) and pkt_hits (which patterns did).
//
// An assertion checks that no pattern is reported by two partitions.
//
// The state structure and the reductions follow the document. The byte-bus
// framing, the round-robin assignment of groups to partitions and the
// per-packet verdict timing are this design's choices. The default rule set
// is the document's own examples ("this", "that", "abc") on two partitions.
module nids_match_engine
  import nids_pkg::*;
#(
  parameter int unsigned          NP        = 3,
  parameter int unsigned          MAX_LEN   = 4,
  parameter logic [8*MAX_LEN-1:0] PATTERNS [NP] = '{"this", "that", "abc"},
  parameter int unsigned          LENGTHS  [NP] = '{4, 4, 3},
  parameter int unsigned          NUM_PARTS = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  byte_t                in_data,
  input  logic                 in_sop,
  input  logic                 in_eop,
  output logic [NP-1:0]        pattern_hit,
  output logic [NUM_PARTS-1:0] part_hit,
  output logic                 pkt_done,
  output logic                 pkt_malicious,
  output logic [NP-1:0]        pkt_hits
);

  // First character of pattern p (patterns of length 0 are never built).
  function automatic byte_t first_ch(input int p);
    if (LENGTHS[p] == 0) return '0;
    return PATTERNS[p][8*(int'(LENGTHS[p])-1) +: 8];
  endfunction

  // Index of pattern p's first-character group, in order of first appearance.
  function automatic int group_of(input int p);
    int g = 0;
    for (int q = 0; q < p; q++) begin
      bit fresh = 1'b1;
      if (first_ch(q) == first_ch(p)) return g;
      for (int r = 0; r < q; r++)
        if (first_ch(r) == first_ch(q)) fresh = 1'b0;
      if (fresh) g++;
    end
    return g;
  endfunction

  // Patterns placed in partition d.
  function automatic logic [NP-1:0] part_select(input int d);
    logic [NP-1:0] s = '0;
    for (int p = 0; p < int'(NP); p++)
      s[p] = (LENGTHS[p] > 0) && ((group_of(p) % int'(NUM_PARTS)) == d);
    return s;
  endfunction

  logic [NP-1:0] part_hits [NUM_PARTS];

  for (genvar d = 0; d < NUM_PARTS; d++) begin : g_part
    prefix_tree_matcher #(
      .NP       (NP),
      .MAX_LEN  (MAX_LEN),
      .PATTERNS (PATTERNS),
      .LENGTHS  (LENGTHS),
      .SELECT   (part_select(d))
    ) u_match (
      .clk     (clk),
      .rst_n   (rst_n),
      .valid   (in_valid),
      .restart (in_sop),
      .data    (in_data),
      .hit     (part_hits[d])
    );
  end

  // Each pattern lives in exactly one partition, so the merge is an OR.
  always_comb begin
    pattern_hit = '0;
    for (int d = 0; d < int'(NUM_PARTS); d++) begin
      pattern_hit |= part_hits[d];
      part_hit[d]  = |part_hits[d];
    end
  end

  // Rule of the partitioning: a pattern is held by one partition only, so at
  // most one partition can report it.
  for (genvar p = 0; p < NP; p++) begin : g_one_owner
    logic [NUM_PARTS-1:0] owners;
    for (genvar d = 0; d < NUM_PARTS; d++) begin : g_d
      assign owners[d] = part_hits[d][p];
    end
    a_one_owner : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(owners))
      else $error("pattern %0d reported by more than one partition", p);
  end

  packet_classifier #(.NP(NP)) u_classify (
    .clk           (clk),
    .rst_n         (rst_n),
    .valid         (in_valid),
    .sop           (in_sop),
    .eop           (in_eop),
    .hit           (pattern_hit),
    .pkt_done      (pkt_done),
    .pkt_malicious (pkt_malicious),
    .pkt_hits      (pkt_hits)
  );

endmodule
