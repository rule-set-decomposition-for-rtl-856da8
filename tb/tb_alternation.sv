// tb_alternation: three-branch alternation under random stimulus, compared
// with a model of three independent states sharing one enable; the merged
// match must be the OR of the branches.
module tb_alternation;
  import nids_pkg::*;

  localparam byte_t C0 = 8'h61, C1 = 8'h62, C2 = 8'h63;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid = 0, restart = 0, i = 0;
  byte_t data = '0;
  logic [2:0] br;
  logic match;
  logic st;          // model: all branches share the enable, so one state bit
  int n_branch [3] = '{0, 0, 0};

  alternation #(.N(3), .CHARS({C2, C1, C0}), .INIT(1'b0)) dut (
    .clk, .rst_n, .valid, .restart, .data, .i, .branch_match(br), .match);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t got=%b exp=%b", what, $time, got, exp);
    end
  endtask

  initial begin
    st = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      valid   = ($urandom_range(0, 3) != 0);
      restart = ($urandom_range(0, 15) == 0);
      i       = ($urandom_range(0, 1) == 1);
      data    = byte_t'(8'h60 + $urandom_range(0, 4));
      #1;
      begin
        logic a;
        logic [2:0] e;
        a = restart ? 1'b0 : st;
        e = {valid && a && data == C2, valid && a && data == C1, valid && a && data == C0};
        check("branch", br, e);
        check("or", {2'b0, match}, {2'b0, |e});
        for (int b = 0; b < 3; b++) if (br[b]) n_branch[b]++;
      end
      @(posedge clk);
      if (valid) st = i;
    end
    for (int b = 0; b < 3; b++) check("branch used", {2'b0, n_branch[b] > 0}, 3'b001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
