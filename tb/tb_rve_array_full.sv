// tb_rve_array_full: the array at its default size and scores, one b = 2
// block filling a 2 x 2 matrix (match 2, mismatch 0).  First the case-study
// alignment: rows S = "GG", columns T = "AG", gap penalty 0, whose filled
// matrix is
//        A  G
//     G  0  2
//     G  0  2
// Then every pairing of 2-letter DNA sequences with gap penalties 0..3
// against a cell-by-cell reference.  Each run must take exactly one busy
// cycle, the single step of a b = 2 block.
module tb_rve_array_full;
  import sw_ref_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0]  s_seq [2];
  logic [7:0]  t_seq [2];
  logic [15:0] gap;
  logic        busy, done;
  logic [15:0] h [2][2];

  rve_array dut (
    .clk(clk), .rst_n(rst_n), .start(start), .s_seq(s_seq), .t_seq(t_seq),
    .gap_penalty(gap), .busy(busy), .done(done), .h(h));

  always #5 clk = ~clk;

  // Runs one fill; returns the number of busy cycles.
  task automatic run(output int cycles);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 0;
    while (busy && cycles < 10) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (cycles != 1 || !done) begin
      failures++;
      $display("FAIL latency: %0d busy cycles, done=%0d (expected 1, 1)", cycles, done);
    end
  endtask

  function automatic logic [7:0] base(int k);
    case (k % 4)
      0: return "A";
      1: return "C";
      2: return "G";
      default: return "T";
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    int r [3][3];
    s_seq[0] = "G"; s_seq[1] = "G";
    t_seq[0] = "A"; t_seq[1] = "G";
    gap = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    run(cyc);
    checks++;
    if (!(h[0][0] == 0 && h[0][1] == 2 && h[1][0] == 0 && h[1][1] == 2)) begin
      failures++;
      $display("FAIL case study: %0d %0d / %0d %0d", h[0][0], h[0][1], h[1][0], h[1][1]);
    end else
      $display("case study matrix: %0d %0d / %0d %0d", h[0][0], h[0][1], h[1][0], h[1][1]);

    for (int k = 0; k < 256 * 4; k++) begin
      s_seq[0] = base(k); s_seq[1] = base(k / 4);
      t_seq[0] = base(k / 16); t_seq[1] = base(k / 64);
      gap = 16'(k / 256);
      for (int i = 0; i < 3; i++) begin r[i][0] = 0; r[0][i] = 0; end
      for (int i = 1; i < 3; i++)
        for (int j = 1; j < 3; j++)
          r[i][j] = sw_cell(r[i-1][j-1], r[i-1][j], r[i][j-1],
                            score(int'(s_seq[i-1]), int'(t_seq[j-1]), 2, 0), int'(gap));
      run(cyc);
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) begin
          checks++;
          if (int'(h[i][j]) != r[i+1][j+1]) begin
            failures++;
            $display("FAIL k=%0d cell (%0d,%0d) got %0d expected %0d", k, i, j, h[i][j], r[i+1][j+1]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
