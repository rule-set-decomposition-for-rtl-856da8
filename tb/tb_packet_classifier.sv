// tb_packet_classifier: random packets of random length with random pattern
// hits. The model ORs the hits of each packet and expects the verdict, the
// hit vector and a one-cycle done pulse the clock after the last byte.
module tb_packet_classifier;
  localparam int NP = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid = 0, sop = 0, eop = 0;
  logic [NP-1:0] hit = '0;
  logic pkt_done, pkt_malicious;
  logic [NP-1:0] pkt_hits;
  int n_mal = 0, n_ben = 0;

  packet_classifier #(.NP(NP)) dut (.clk, .rst_n, .valid, .sop, .eop, .hit,
    .pkt_done, .pkt_malicious, .pkt_hits);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t got=%0h exp=%0h", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pk = 0; pk < 300; pk++) begin
      int len;
      logic [NP-1:0] acc;
      len = $urandom_range(1, 12);
      acc = '0;
      for (int b = 0; b < len; b++) begin
        // idle cycles between bytes, with garbage on hit
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          valid = 0; sop = $urandom_range(0,1); eop = $urandom_range(0,1);
          hit = NP'($urandom());
          @(posedge clk); #1;
          check("no done while idle", {31'b0, pkt_done}, 0);
        end
        @(negedge clk);
        valid = 1;
        sop = (b == 0);
        eop = (b == len - 1);
        hit = ($urandom_range(0, 5) == 0) ? NP'($urandom()) : '0;
        acc |= hit;
        @(posedge clk); #1;
        if (b == len - 1) begin
          check("done", {31'b0, pkt_done}, 1);
          check("malicious", {31'b0, pkt_malicious}, {31'b0, |acc});
          check("hits", {28'b0, pkt_hits}, {28'b0, acc});
          if (|acc) n_mal++; else n_ben++;
        end else begin
          check("no done mid-packet", {31'b0, pkt_done}, 0);
        end
      end
      @(negedge clk);
      valid = 0; hit = '0;
      @(posedge clk); #1;
      check("done is a pulse", {31'b0, pkt_done}, 0);
    end
    check("saw malicious", {31'b0, n_mal > 0}, 1);
    check("saw benign", {31'b0, n_ben > 0}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
