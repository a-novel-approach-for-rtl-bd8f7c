// tb_rve_array: end-to-end test of the RVE matrix-fill array at 3 x 4
// blocks (a 6 x 8 matrix) with a negative mismatch score (match 1,
// mismatch -1).  Each run draws random DNA sequences and a gap penalty,
// pulses start and then checks, every cycle:
//   - wavefront: after step k every tile on anti-diagonals 0..k already
//     holds its final value (checked against a cell-by-cell reference fill),
//   - latency: busy lasts exactly BR+BC-1 = 6 cycles and done pulses once,
//     in the last of them,
//   - the complete matrix when done rises, and that it holds while idle.
// Some runs pulse start again while busy (must be ignored) and some start a
// new run in the cycle right after done (back to back).  Each mechanism is
// counted and one that never happened counts as a failure.
module tb_rve_array;
  import sw_ref_pkg::*;

  localparam int BR = 3, BC = 4, NR = 2 * BR, NC = 2 * BC;
  localparam int MS = 1, MM = -1;
  localparam int RUNS = 300;

  int checks = 0, failures = 0;
  int n_runs = 0, n_wave = 0, n_edge_tiles = 0, n_ignored_start = 0, n_back_to_back = 0;
  int n_latency_ok = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0]  s_seq [NR];
  logic [7:0]  t_seq [NC];
  logic [15:0] gap;
  logic        busy, done;
  logic [15:0] h [NR][NC];

  rve_array #(.BR(BR), .BC(BC), .MATCH_SCORE(MS), .MISMATCH_SCORE(MM)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .s_seq(s_seq), .t_seq(t_seq),
    .gap_penalty(gap), .busy(busy), .done(done), .h(h));

  always #5 clk = ~clk;

  int ref_h [NR+1][NC+1];

  function automatic logic [7:0] base();
    case ($urandom % 4)
      0: return "A";
      1: return "C";
      2: return "G";
      default: return "T";
    endcase
  endfunction

  task automatic fill_ref(int d);
    for (int r = 0; r <= NR; r++) ref_h[r][0] = 0;
    for (int c = 0; c <= NC; c++) ref_h[0][c] = 0;
    for (int r = 1; r <= NR; r++)
      for (int c = 1; c <= NC; c++)
        ref_h[r][c] = sw_cell(ref_h[r-1][c-1], ref_h[r-1][c], ref_h[r][c-1],
                              score(int'(s_seq[r-1]), int'(t_seq[c-1]), MS, MM), d);
  endtask

  // Compare the tiles on anti-diagonals 0..upto; returns mismatches.
  function automatic int compare_upto(int upto);
    int bad = 0;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++)
        if (r / 2 + c / 2 <= upto && int'(h[r][c]) != ref_h[r+1][c+1]) bad++;
    return bad;
  endfunction

  task automatic run_once(bit poke_while_busy, bit back_to_back);
    int d, cyc, bad;
    bit seen_done;
    logic [7:0] s_keep [NR];
    logic [7:0] t_keep [NC];
    foreach (s_seq[r]) s_seq[r] = base();
    foreach (t_seq[c]) t_seq[c] = base();
    d = ($urandom % 3 == 0) ? 0 : int'($urandom % 4);
    gap = 16'(d);
    fill_ref(d);
    s_keep = s_seq; t_keep = t_seq;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    // Change the inputs: the array must work from the sampled copy.
    foreach (s_seq[r]) s_seq[r] = base();
    foreach (t_seq[c]) t_seq[c] = base();
    cyc = 0;
    seen_done = 0;
    while (busy) begin
      if (poke_while_busy && cyc == 2) begin
        start = 1'b1;
        n_ignored_start++;
      end
      @(posedge clk); #1;
      start = 1'b0;
      cyc++;
      // Wavefront: tiles of anti-diagonals 0..cyc-1 are final.
      bad = compare_upto(cyc - 1);
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL run %0d: %0d cells wrong after step %0d", n_runs, bad, cyc - 1);
      end else if (cyc - 1 < BR + BC - 1) n_wave++;
      if (done) begin
        checks++;
        if (seen_done || busy) begin
          failures++;
          $display("FAIL run %0d: done pulse malformed", n_runs);
        end
        seen_done = 1;
      end
      if (cyc > 50) break;
    end
    checks++;
    if (cyc != BR + BC - 1 || !seen_done) begin
      failures++;
      $display("FAIL run %0d: busy %0d cycles (expected %0d), done seen %0d",
               n_runs, cyc, BR + BC - 1, seen_done);
    end else n_latency_ok++;
    // Full matrix and the zero-boundary tiles.
    checks++;
    bad = compare_upto(NR + NC);
    if (bad != 0) begin
      failures++;
      $display("FAIL run %0d: final matrix has %0d wrong cells", n_runs, bad);
    end else n_edge_tiles += BR + BC - 1;
    s_seq = s_keep; t_seq = t_keep;
    n_runs++;
    if (back_to_back) begin
      n_back_to_back++;
      return;
    end
    // Idle: the matrix must hold.
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (compare_upto(NR + NC) != 0 || busy || done) begin
      failures++;
      $display("FAIL run %0d: matrix or status changed while idle", n_runs);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (s_seq[r]) s_seq[r] = "A";
    foreach (t_seq[c]) t_seq[c] = "A";
    gap = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (busy || done || h[NR-1][NC-1] != 0) begin
      failures++;
      $display("FAIL reset state");
    end
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int k = 0; k < RUNS; k++)
      run_once(k % 5 == 1, k % 7 == 3);

    $display("runs=%0d wavefront_steps=%0d latency_ok=%0d boundary_tiles=%0d ignored_starts=%0d back_to_back=%0d",
             n_runs, n_wave, n_latency_ok, n_edge_tiles, n_ignored_start, n_back_to_back);
    checks += 5;
    if (n_wave == 0)          begin failures++; $display("FAIL no wavefront step observed"); end
    if (n_latency_ok == 0)    begin failures++; $display("FAIL no run with correct latency"); end
    if (n_edge_tiles == 0)    begin failures++; $display("FAIL no zero-boundary tile checked"); end
    if (n_ignored_start == 0) begin failures++; $display("FAIL start while busy never exercised"); end
    if (n_back_to_back == 0)  begin failures++; $display("FAIL back-to-back runs never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
