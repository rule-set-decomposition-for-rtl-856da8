// tb_prefix_tree_matcher: checks the shared-prefix automaton three ways.
//   uA - the "this"/"that" pair: 6 states instead of 8.
//   uB - the single pattern "abc": a chain of three states; the hit must come
//        in the cycle 'c' is on the bus, two valid bytes after 'a'.
//   uC - a mixed set with a duplicate, a pattern that is a prefix of others,
//        a one-byte pattern, a pattern of two 8'h00 bytes and one pattern left out
//        by SELECT; 10 states where one per character needs 21.
// A random byte stream from a small alphabet, with gaps and packet starts,
// is compared cycle by cycle with a model that simply looks at the last
// LENGTHS[p] bytes of the current packet.
module tb_prefix_tree_matcher;
  import nids_pkg::*;

  localparam int NPC = 8, MLC = 4;
  localparam logic [8*MLC-1:0] PC [NPC] =
    '{"abcd", "abce", "abc", "abcd", "b", "xyz", 16'h0000, "bab"};
  localparam int unsigned LC [NPC] = '{4, 4, 3, 4, 1, 3, 2, 3};
  localparam logic [NPC-1:0] SELC = 8'b1101_1111;   // "xyz" left out

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid = 0, restart = 0;
  byte_t data = '0;
  logic [1:0]     hitA;
  logic [0:0]     hitB;
  logic [NPC-1:0] hitC;
  byte_t hist [$];
  int n_hitC [NPC];

  prefix_tree_matcher uA (.clk, .rst_n, .valid, .restart, .data, .hit(hitA));
  localparam logic [23:0] PB [1] = '{"abc"};
  localparam int unsigned LB [1] = '{3};
  prefix_tree_matcher #(.NP(1), .MAX_LEN(3), .PATTERNS(PB), .LENGTHS(LB))
    uB (.clk, .rst_n, .valid, .restart, .data, .hit(hitB));
  prefix_tree_matcher #(.NP(NPC), .MAX_LEN(MLC), .PATTERNS(PC), .LENGTHS(LC),
    .SELECT(SELC)) uC (.clk, .rst_n, .valid, .restart, .data, .hit(hitC));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s t=%0t got=%0d exp=%0d", what, $time, got, exp);
    end
  endtask

  // Does the packet history end with the pattern?
  function automatic bit ends_with(input logic [8*MLC-1:0] pat, input int len);
    if (len == 0 || hist.size() < len) return 1'b0;
    for (int j = 0; j < len; j++)
      if (hist[hist.size() - len + j] != pat[8*(len-1-j) +: 8]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic drive(input logic v, input logic r, input byte_t d);
    @(negedge clk);
    valid = v; restart = r; data = d;
    #1;
    if (v) begin
      if (r) hist.delete();
      hist.push_back(d);
    end
    check("A this", hitA[0], v && ends_with("this", 4));
    check("A that", hitA[1], v && ends_with("that", 4));
    check("B abc",  hitB[0], v && ends_with("abc", 3));
    for (int p = 0; p < NPC; p++) begin
      check($sformatf("C %0d", p), hitC[p], v && SELC[p] && ends_with(PC[p], LC[p]));
      if (hitC[p]) n_hitC[p]++;
    end
  endtask

  initial begin
    byte_t alpha [10] = '{"a", "b", "c", "d", "e", "x", "y", "z", 8'h00, "t"};
    // State counts worked out by hand from the pattern lists.
    check("A states", uA.NUM_STATES, 6);
    check("A naive",  uA.NAIVE_STATES, 8);
    check("B states", uB.NUM_STATES, 3);
    check("C states", uC.NUM_STATES, 10);
    check("C naive",  uC.NAIVE_STATES, 21);
    check("C unique", uC.UNIQUE_STATES, 17);
    check("C first",  uC.FIRST_CHAR_STATES, 14);
    foreach (n_hitC[p]) n_hitC[p] = 0;

    repeat (2) @(posedge clk);
    rst_n = 1;

    // "abc" latency: hit exactly on the 'c' byte, gaps do not break a match.
    drive(1, 1, "a");
    check("B not on a", hitB[0], 0);
    drive(1, 0, "b");
    check("B not on b", hitB[0], 0);
    drive(0, 0, "c");
    check("B not on idle", hitB[0], 0);
    drive(1, 0, "c");
    check("B on c", hitB[0], 1);
    // The first byte of a packet can start a match; a match cannot run across
    // a packet boundary.
    drive(1, 1, "a");
    drive(1, 0, "b");
    drive(1, 1, "c");
    check("B across packets", hitB[0], 0);
    drive(1, 0, "t"); drive(1, 0, "h"); drive(1, 0, "i"); drive(1, 0, "s");
    check("A this", hitA[0], 1);
    drive(1, 0, "t"); drive(1, 0, "h"); drive(1, 0, "a"); drive(1, 0, "t");
    check("A that", hitA[1], 1);

    for (int c = 0; c < 6000; c++) begin
      byte_t d;
      d = alpha[$urandom_range(0, 9)];
      if (c % 500 < 200) begin
        // bias towards the patterns of set A
        byte_t th [6] = '{"t", "h", "i", "s", "a", "t"};
        d = th[$urandom_range(0, 5)];
      end
      drive($urandom_range(0, 4) != 0, $urandom_range(0, 30) == 0, d);
    end
    // Directed: the overlapping "abcd"/"abce"/"abc" family, "bab" over "b",
    // two zero bytes, and the excluded "xyz".
    drive(1, 1, "a"); drive(1, 0, "b"); drive(1, 0, "c"); drive(1, 0, "d");
    check("C abcd", hitC[0] && hitC[3], 1);
    drive(1, 0, "a"); drive(1, 0, "b"); drive(1, 0, "c"); drive(1, 0, "e");
    check("C abce", hitC[1], 1);
    drive(1, 0, "b"); drive(1, 0, "a"); drive(1, 0, "b");
    check("C bab", hitC[7] && hitC[4], 1);
    drive(1, 0, 8'h00); drive(1, 0, 8'h00);
    check("C 00 00", hitC[6], 1);
    drive(1, 0, "x"); drive(1, 0, "y"); drive(1, 0, "z");
    check("C xyz excluded", hitC[5], 0);
    for (int p = 0; p < NPC; p++)
      if (SELC[p]) check($sformatf("C %0d seen", p), n_hitC[p] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
