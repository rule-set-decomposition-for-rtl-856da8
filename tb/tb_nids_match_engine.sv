// tb_nids_match_engine: end-to-end test of the matching engine with its
// default rule set ("this", "that", "abc" on two partitions).
//
// Packets are built from directed cases and from random bytes biased towards
// the pattern characters, sent with random idle gaps. A reference model keeps
// the bytes of the current packet and expects pattern p to hit whenever they
// end with pattern p; it also expects each packet's verdict the clock after
// its last byte. The mechanisms of the design are counted and each must occur:
// hits of the two patterns that share the "th" states, hits in each
// partition, a match that survives idle cycles, two overlapping matches, a
// match suppressed by a packet boundary, one-byte packets, malicious and
// benign verdicts.
module tb_nids_match_engine;
  import nids_pkg::*;

  localparam int NP = 3;
  localparam logic [31:0] PAT [NP] = '{"this", "that", "abc"};
  localparam int LEN [NP] = '{4, 4, 3};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sop = 0, in_eop = 0;
  byte_t in_data = '0;
  logic [NP-1:0] pattern_hit, pkt_hits;
  logic [1:0] part_hit;
  logic pkt_done, pkt_malicious;

  nids_match_engine dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_shared_this = 0, n_shared_that = 0, n_part [2] = '{0, 0};
  int n_gap_match = 0, n_overlap = 0, n_boundary = 0, n_one_byte = 0;
  int n_mal = 0, n_ben = 0;

  byte_t hist [$];        // bytes of the current packet
  int    gap_at [$];      // history index of bytes preceded by an idle cycle
  byte_t prev_tail [$];   // last bytes of the previous packet
  logic [NP-1:0] acc;
  int last_hit_pos [NP];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s t=%0t got=%0d exp=%0d", what, $time, got, exp);
    end
  endtask

  function automatic bit ends_with(input byte_t q [$], input int p);
    if (q.size() < LEN[p]) return 1'b0;
    for (int j = 0; j < LEN[p]; j++)
      if (q[q.size() - LEN[p] + j] != PAT[p][8*(LEN[p]-1-j) +: 8]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 0; in_sop = $urandom_range(0, 1); in_eop = $urandom_range(0, 1);
      in_data = byte_t'($urandom());
      #1;
      check("no hit when idle", int'(pattern_hit), 0);
    end
  endtask

  // Send one packet; gaps between bytes when gappy.
  task automatic send_packet(input byte_t bytes [$], input bit gappy);
    logic [NP-1:0] exp;
    byte_t joined [$];
    hist.delete(); gap_at.delete(); acc = '0;
    foreach (last_hit_pos[p]) last_hit_pos[p] = -100;
    for (int b = 0; b < bytes.size(); b++) begin
      if (gappy && $urandom_range(0, 2) == 0) begin
        idle($urandom_range(1, 3));
        gap_at.push_back(b);
      end
      @(negedge clk);
      in_valid = 1; in_sop = (b == 0); in_eop = (b == bytes.size() - 1);
      in_data = bytes[b];
      hist.push_back(bytes[b]);
      #1;
      for (int p = 0; p < NP; p++) begin
        exp[p] = ends_with(hist, p);
        // a match the previous packet's tail would have completed
        joined = {prev_tail, hist};
        if (!exp[p] && ends_with(joined, p) && b < LEN[p] - 1) n_boundary++;
      end
      check("pattern_hit", int'(pattern_hit), int'(exp));
      check("part_hit", int'(part_hit), int'({exp[2], exp[1] | exp[0]}));
      for (int p = 0; p < NP; p++) if (exp[p]) begin
        foreach (gap_at[g]) if (gap_at[g] > b - LEN[p] + 1 && gap_at[g] <= b) begin
          n_gap_match++;
          break;
        end
        for (int q = 0; q < NP; q++)
          if (q != p && last_hit_pos[q] > b - LEN[p] && last_hit_pos[q] < b) n_overlap++;
        last_hit_pos[p] = b;
      end
      if (exp[0]) n_shared_this++;
      if (exp[1]) n_shared_that++;
      if (exp[0] | exp[1]) n_part[0]++;
      if (exp[2]) n_part[1]++;
      acc |= exp;
    end
    @(negedge clk);
    in_valid = 0; in_sop = 0; in_eop = 0;
    #1;
    // The verdict was registered at the clock edge after the last byte.
    check("pkt_done", pkt_done, 1);
    check("pkt_malicious", pkt_malicious, |acc);
    check("pkt_hits", int'(pkt_hits), int'(acc));
    if (|acc) n_mal++; else n_ben++;
    if (bytes.size() == 1) n_one_byte++;
    prev_tail = hist;
  endtask


  initial begin
    byte_t pk [$];
    byte_t alpha [8] = '{"t", "h", "i", "s", "a", "c", "b", "x"};
    repeat (2) @(posedge clk);
    rst_n = 1;
    idle(2);

    // Directed packets.
    pk = '{"t", "h", "i", "s"};                     send_packet(pk, 0);
    pk = '{"x", "t", "h", "a", "t", "h", "i", "s"}; send_packet(pk, 0);  // overlap
    pk = '{"a", "b"};                               send_packet(pk, 0);
    pk = '{"c", "x"};                               send_packet(pk, 0);  // "ab|c" split
    pk = '{"a", "b", "c"};                          send_packet(pk, 1);
    pk = '{"t"};                                    send_packet(pk, 0);  // one byte
    pk = '{"q", "u", "i", "e", "t"};                send_packet(pk, 0);  // benign

    // Random packets.
    for (int n = 0; n < 600; n++) begin
      int len;
      pk.delete();
      len = $urandom_range(1, 24);
      for (int b = 0; b < len; b++) pk.push_back(alpha[$urandom_range(0, 7)]);
      send_packet(pk, $urandom_range(0, 1));
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 4));
    end

    pk = '{"a", "b", "c"};                          send_packet(pk, 0);
    @(posedge clk); #1;
    check("done cleared", pkt_done, 0);

    $display("mechanisms: this=%0d that=%0d part0=%0d part1=%0d gap=%0d overlap=%0d boundary=%0d one_byte=%0d malicious=%0d benign=%0d",
             n_shared_this, n_shared_that, n_part[0], n_part[1], n_gap_match,
             n_overlap, n_boundary, n_one_byte, n_mal, n_ben);
    check("shared prefix: this", n_shared_this > 0, 1);
    check("shared prefix: that", n_shared_that > 0, 1);
    check("partition 0 hit", n_part[0] > 0, 1);
    check("partition 1 hit", n_part[1] > 0, 1);
    check("match across idle cycles", n_gap_match > 0, 1);
    check("overlapping matches", n_overlap > 0, 1);
    check("match cut by packet boundary", n_boundary > 0, 1);
    check("one-byte packet", n_one_byte > 0, 1);
    check("malicious packet", n_mal > 0, 1);
    check("benign packet", n_ben > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
