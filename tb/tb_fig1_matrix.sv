// tb_fig1_matrix: the 5 x 5 sample alignment of GATTA (columns) against
// GACTC (rows), filled by a 3 x 3 block array (6 x 6 matrix, the sixth row
// and column padded with 'N', which cannot change the first five since
// cells only depend on cells above and to the left).  Scoring is match 1,
// mismatch -1, gap penalty 2.  The expected matrix is
//        G  A  T  T  A
//     G  1  0  0  0  0
//     A  0  2  0  0  1
//     C  0  0  1  0  0
//     T  0  0  1  2  0
//     C  0  0  0  0  1
// The fill must take 3 + 3 - 1 = 5 steps, against the 9 anti-diagonal steps
// of a one-cell-per-step wavefront over the same 5 x 5 cells.
module tb_fig1_matrix;
  int checks = 0, failures = 0;

  localparam int EXP [5][5] = '{
    '{1, 0, 0, 0, 0},
    '{0, 2, 0, 0, 1},
    '{0, 0, 1, 0, 0},
    '{0, 0, 1, 2, 0},
    '{0, 0, 0, 0, 1}};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0]  s_seq [6];
  logic [7:0]  t_seq [6];
  logic [15:0] gap;
  logic        busy, done;
  logic [15:0] h [6][6];

  rve_array #(.BR(3), .BC(3), .MATCH_SCORE(1), .MISMATCH_SCORE(-1)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .s_seq(s_seq), .t_seq(t_seq),
    .gap_penalty(gap), .busy(busy), .done(done), .h(h));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    string s_str, t_str;
    s_str = "GACTCN";
    t_str = "GATTAN";
    for (int k = 0; k < 6; k++) begin
      s_seq[k] = s_str[k];
      t_seq[k] = t_str[k];
    end
    gap = 16'd2;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 0;
    while (busy && cyc < 20) begin
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (cyc != 5 || !done) begin
      failures++;
      $display("FAIL fill took %0d steps (expected 5)", cyc);
    end
    for (int r = 0; r < 5; r++) begin
      $display("%s: %0d %0d %0d %0d %0d", s_str.substr(r, r), h[r][0], h[r][1], h[r][2], h[r][3], h[r][4]);
      for (int c = 0; c < 5; c++) begin
        checks++;
        if (int'(h[r][c]) != EXP[r][c]) begin
          failures++;
          $display("FAIL cell (%0d,%0d) got %0d expected %0d", r, c, h[r][c], EXP[r][c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
