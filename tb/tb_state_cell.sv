// tb_state_cell: random stimulus against a cycle model of one automaton state.
// The model keeps the state bit: it is loaded from enable on every valid byte,
// replaced by INIT on a restart byte, and the cell matches when the state is
// active, the byte is valid and equals the cell's character.
module tb_state_cell;
  import nids_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid = 0, restart = 0, enable = 0;
  byte_t data = '0;
  logic m0, m1;
  logic s0, s1;     // model states for INIT=0 and INIT=1
  int n_match0 = 0, n_match1 = 0;

  state_cell #(.CHAR(8'h62), .INIT(1'b0)) u0 (.clk, .rst_n, .valid, .restart,
    .data, .enable, .match(m0));
  state_cell #(.CHAR(8'h62), .INIT(1'b1)) u1 (.clk, .rst_n, .valid, .restart,
    .data, .enable, .match(m1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t got=%0b exp=%0b", what, $time, got, exp);
    end
  endtask

  initial begin
    s0 = 0; s1 = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      valid   = ($urandom_range(0, 3) != 0);
      restart = ($urandom_range(0, 15) == 0);
      enable  = ($urandom_range(0, 1) == 1);
      data    = ($urandom_range(0, 2) == 0) ? 8'h62 : byte_t'($urandom_range(0, 255));
      #1;
      begin
        logic a0, a1;
        a0 = restart ? 1'b0 : s0;
        a1 = restart ? 1'b1 : s1;
        check("m0", m0, valid && a0 && data == 8'h62);
        check("m1", m1, valid && a1 && data == 8'h62);
        if (m0) n_match0++;
        if (m1) n_match1++;
      end
      @(posedge clk);
      if (valid) begin s0 = enable; s1 = enable; end
    end
    // Both cells must have matched at some point for the test to mean much.
    check("some m0", n_match0 > 0, 1'b1);
    check("some m1", n_match1 > 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
