// tb_char_matcher: exhaustive check of the nibble-LUT character matcher.
// Every byte value is applied to matchers for several characters (printable,
// 8'h00, 8'hFF) and to one with loaded truth tables that accept 'A' and 'a';
// the expected answer is a plain byte comparison.
module tb_char_matcher;
  import nids_pkg::*;

  int checks = 0, failures = 0;
  byte_t data;
  logic hit_a, hit_t, hit_00, hit_ff, hit_case;

  char_matcher #(.CHAR(8'h61)) u_a  (.data(data), .hit(hit_a));
  char_matcher #(.CHAR(8'h74)) u_t  (.data(data), .hit(hit_t));
  char_matcher #(.CHAR(8'h00)) u_00 (.data(data), .hit(hit_00));
  char_matcher #(.CHAR(8'hFF)) u_ff (.data(data), .hit(hit_ff));
  // High nibble 4 or 6, low nibble 1: 'A' (8'h41) or 'a' (8'h61).
  char_matcher #(.CHAR(8'h61), .LUT_HI(16'h0050), .LUT_LO(16'h0002)) u_case
    (.data(data), .hit(hit_case));

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s data=%02h got=%0b exp=%0b", what, data, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      data = byte_t'(v);
      #1;
      expect_bit("a",    hit_a,    v == 'h61);
      expect_bit("t",    hit_t,    v == 'h74);
      expect_bit("00",   hit_00,   v == 'h00);
      expect_bit("ff",   hit_ff,   v == 'hFF);
      expect_bit("case", hit_case, (v == 'h41) || (v == 'h61));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
