// tb_score_lut: checks the match/mismatch look-up.  Runs two instances, one
// with the default scores (2/0) and one with a negative mismatch (1/-1), over
// every pair of 4-bit characters, pairs differing in a single bit and
// random 8-bit pairs, and compares with
// the reference rule.
module tb_score_lut;
  import sw_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0] a, b;
  logic signed [18:0] s_def;
  logic signed [11:0] s_neg;

  score_lut u_def (.a(a), .b(b), .score(s_def));
  score_lut #(.CHAR_W(8), .W(12), .MATCH_SCORE(1), .MISMATCH_SCORE(-1))
    u_neg (.a(a), .b(b), .score(s_neg));

  task automatic check_pair(input logic [7:0] x, input logic [7:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (int'(s_def) != score(x, y, 2, 0)) begin
      failures++;
      $display("FAIL default a=%0d b=%0d got %0d", x, y, s_def);
    end
    checks++;
    if (int'(s_neg) != score(x, y, 1, -1)) begin
      failures++;
      $display("FAIL neg a=%0d b=%0d got %0d", x, y, s_neg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        check_pair(8'(x), 8'(y));
    // Pairs that differ in exactly one bit, for every bit position.
    for (int k = 0; k < 50; k++) begin
      logic [7:0] x;
      x = 8'($urandom);
      for (int bitpos = 0; bitpos < 8; bitpos++)
        check_pair(x, x ^ (8'd1 << bitpos));
    end
    for (int k = 0; k < 500; k++) begin
      logic [7:0] x;
      x = 8'($urandom);
      check_pair(x, ($urandom % 2) ? x : 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
