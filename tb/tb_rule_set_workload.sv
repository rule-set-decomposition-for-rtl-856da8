// tb_rule_set_workload: the engine with a 16-pattern rule set of attack-like
// content strings (shell commands, password files, a NOP sled, URL-encoding
// tricks, repeats and a pattern that is a prefix of another), on three
// partitions.
//
// First the state counts of each reduction are checked against counts worked
// out by hand from the list: 116 states at one per character, 102 with
// repeats removed, 96 with shared first characters, 78 with shared prefixes;
// the partitions hold 29, 36 and 13 states. Then packets made of pattern
// pieces, whole patterns and random bytes are streamed with idle gaps and
// compared, byte by byte and packet by packet, with a model that compares the
// tail of the current packet with every pattern. Every pattern and every
// partition must be hit at least once.
module tb_rule_set_workload;
  import nids_pkg::*;

  localparam int NP = 16, ML = 11, PARTS = 3;
  localparam logic [8*ML-1:0] PAT [NP] = '{
    "cmd.exe", "cmd.com", "/bin/sh", "/bin/ls", "/etc/passwd", "/etc/shadow",
    "root", "rootkit", "GET /cgi", "GET /msadc", "cmd.exe", 32'h90909090,
    "passwd", "/bin/sh", "%c0%af", "..%255c"};
  localparam int unsigned LEN [NP] = '{7, 7, 7, 7, 11, 11, 4, 7, 8, 10, 7, 4, 6, 7, 6, 7};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sop = 0, in_eop = 0;
  byte_t in_data = '0;
  logic [NP-1:0] pattern_hit, pkt_hits, all_hit;
  logic [PARTS-1:0] part_hit;
  logic pkt_done, pkt_malicious;

  nids_match_engine #(.NP(NP), .MAX_LEN(ML), .PATTERNS(PAT), .LENGTHS(LEN),
    .NUM_PARTS(PARTS)) dut (.*);

  // The whole rule set in one matcher, for the reduction counts.
  prefix_tree_matcher #(.NP(NP), .MAX_LEN(ML), .PATTERNS(PAT), .LENGTHS(LEN))
    u_all (.clk, .rst_n, .valid(in_valid), .restart(in_sop), .data(in_data),
           .hit(all_hit));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_pat [NP], n_part [PARTS], n_mal = 0, n_ben = 0;
  byte_t hist [$];
  logic [NP-1:0] acc;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s t=%0t got=%0h exp=%0h", what, $time, got, exp);
    end
  endtask

  function automatic byte_t pch(input int p, input int j);
    return PAT[p][8*(LEN[p]-1-j) +: 8];
  endfunction

  function automatic bit ends_with(input int p);
    if (hist.size() < LEN[p]) return 1'b0;
    for (int j = 0; j < LEN[p]; j++)
      if (hist[hist.size() - LEN[p] + j] != pch(p, j)) return 1'b0;
    return 1'b1;
  endfunction

  // Partition of each pattern: its first-character group, round-robin.
  // Groups in order of appearance: c / r G 90 p % . -> 0 1 2 0 1 2 0 1
  localparam int PART_OF [NP] = '{0, 0, 1, 1, 1, 1, 2, 2, 0, 0, 0, 1, 2, 1, 0, 1};

  task automatic send_packet(input byte_t bytes [$]);
    logic [NP-1:0] exp;
    logic [PARTS-1:0] pexp;
    hist.delete(); acc = '0;
    for (int b = 0; b < bytes.size(); b++) begin
      while ($urandom_range(0, 4) == 0) begin
        @(negedge clk);
        in_valid = 0; in_data = byte_t'($urandom());
        #1 check("idle", pattern_hit, 0);
      end
      @(negedge clk);
      in_valid = 1; in_sop = (b == 0); in_eop = (b == bytes.size() - 1);
      in_data = bytes[b];
      hist.push_back(bytes[b]);
      #1;
      pexp = '0;
      for (int p = 0; p < NP; p++) begin
        exp[p] = ends_with(p);
        if (exp[p]) begin n_pat[p]++; pexp[PART_OF[p]] = 1'b1; end
      end
      check("pattern_hit", pattern_hit, exp);
      check("single matcher", all_hit, exp);
      check("part_hit", part_hit, pexp);
      for (int d = 0; d < PARTS; d++) if (pexp[d]) n_part[d]++;
      acc |= exp;
    end
    @(negedge clk);
    in_valid = 0; in_sop = 0; in_eop = 0;
    #1;
    check("pkt_done", pkt_done, 1);
    check("pkt_malicious", pkt_malicious, |acc);
    check("pkt_hits", pkt_hits, acc);
    if (|acc) n_mal++; else n_ben++;
  endtask

  initial begin
    byte_t pk [$];
    check("naive states",      u_all.NAIVE_STATES, 116);
    check("unique states",     u_all.UNIQUE_STATES, 102);
    check("first-char states", u_all.FIRST_CHAR_STATES, 96);
    check("prefix states",     u_all.NUM_STATES, 78);
    check("partition 0 states", dut.g_part[0].u_match.NUM_STATES, 29);
    check("partition 1 states", dut.g_part[1].u_match.NUM_STATES, 36);
    check("partition 2 states", dut.g_part[2].u_match.NUM_STATES, 13);
    foreach (n_pat[p]) n_pat[p] = 0;
    foreach (n_part[d]) n_part[d] = 0;

    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int n = 0; n < 1500; n++) begin
      int pieces;
      pk.delete();
      pieces = $urandom_range(1, 5);
      for (int i = 0; i < pieces; i++) begin
        int p, kind;
        p = $urandom_range(0, NP - 1);
        kind = $urandom_range(0, 3);
        if (kind == 0) begin
          // random bytes, partly from the pattern alphabet
          repeat ($urandom_range(1, 6))
            pk.push_back(($urandom_range(0, 1) == 1) ? pch(p, $urandom_range(0, LEN[p]-1))
                                                     : byte_t'($urandom()));
        end else if (kind == 1) begin
          // a prefix of a pattern only
          for (int j = 0; j < $urandom_range(1, LEN[p] - 1); j++) pk.push_back(pch(p, j));
        end else begin
          for (int j = 0; j < LEN[p]; j++) pk.push_back(pch(p, j));
        end
      end
      send_packet(pk);
    end

    for (int p = 0; p < NP; p++) check($sformatf("pattern %0d seen", p), n_pat[p] > 0, 1);
    for (int d = 0; d < PARTS; d++) check($sformatf("partition %0d hit", d), n_part[d] > 0, 1);
    check("malicious packets", n_mal > 0, 1);
    check("benign packets", n_ben > 0, 1);
    $display("packets: malicious=%0d benign=%0d", n_mal, n_ben);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
