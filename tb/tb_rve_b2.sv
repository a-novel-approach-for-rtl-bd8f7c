// tb_rve_b2: checks the expanded 2x2 tile against the cell-by-cell
// recurrence.  For random boundary cells, gap penalties, characters from a
// 4-letter alphabet, and both the default scores (2/0) and a negative
// mismatch (1/-1), the reference computes H(i-1,j-1), then H(i-1,j) and
// H(i,j-1), then H(i,j) one after the other; all four block outputs must
// match.  Also replays the 2x2 case-study matrix (S = "GG", T = "AG", d = 0).
module tb_rve_b2;
  import sw_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] h00, h01, h02, h10, h20, d;
  logic [7:0]  s_i, s_im1, t_j, t_jm1;
  logic [15:0] o_def [4], o_neg [4];

  rve_b2 u_def (
    .h_im2_jm2(h00), .h_im2_jm1(h01), .h_im2_j(h02), .h_im1_jm2(h10), .h_i_jm2(h20),
    .gap_penalty(d), .s_i(s_i), .s_im1(s_im1), .t_j(t_j), .t_jm1(t_jm1),
    .o1(o_def[0]), .o2(o_def[1]), .o3(o_def[2]), .o4(o_def[3]));

  rve_b2 #(.MATCH_SCORE(1), .MISMATCH_SCORE(-1)) u_neg (
    .h_im2_jm2(h00), .h_im2_jm1(h01), .h_im2_j(h02), .h_im1_jm2(h10), .h_i_jm2(h20),
    .gap_penalty(d), .s_i(s_i), .s_im1(s_im1), .t_j(t_j), .t_jm1(t_jm1),
    .o1(o_neg[0]), .o2(o_neg[1]), .o3(o_neg[2]), .o4(o_neg[3]));

  // Cell-by-cell reference for the tile.
  function automatic void ref_tile(int ms, int mm, output int r[4]);
    int dd;
    dd = int'(d);
    r[0] = sw_cell(int'(h00), int'(h01), int'(h10), score(s_im1, t_jm1, ms, mm), dd);
    r[1] = sw_cell(int'(h01), int'(h02), r[0],      score(s_im1, t_j,   ms, mm), dd);
    r[2] = sw_cell(int'(h10), r[0],      int'(h20), score(s_i,   t_jm1, ms, mm), dd);
    r[3] = sw_cell(r[0],      r[1],      r[2],      score(s_i,   t_j,   ms, mm), dd);
  endfunction

  task automatic check_now(string tag);
    int rd[4], rn[4];
    #1;
    ref_tile(2, 0, rd);
    ref_tile(1, -1, rn);
    for (int k = 0; k < 4; k++) begin
      checks += 2;
      if (int'(o_def[k]) != rd[k]) begin
        failures++;
        $display("FAIL %s default o%0d got %0d expected %0d", tag, k + 1, o_def[k], rd[k]);
      end
      if (int'(o_neg[k]) != rn[k]) begin
        failures++;
        $display("FAIL %s neg o%0d got %0d expected %0d", tag, k + 1, o_neg[k], rn[k]);
      end
    end
  endtask

  function automatic logic [7:0] base();
    case ($urandom % 4)
      0: return "A";
      1: return "C";
      2: return "G";
      default: return "T";
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Case study: rows "GG", columns "AG", zero boundary, d = 0.
    h00 = 0; h01 = 0; h02 = 0; h10 = 0; h20 = 0; d = 0;
    s_im1 = "G"; s_i = "G"; t_jm1 = "A"; t_j = "G";
    check_now("case-study");
    checks++;
    if (!(o_def[0] == 0 && o_def[1] == 2 && o_def[2] == 0 && o_def[3] == 2)) begin
      failures++;
      $display("FAIL case-study matrix %0d %0d / %0d %0d", o_def[0], o_def[1], o_def[2], o_def[3]);
    end
    for (int k = 0; k < 5000; k++) begin
      int range;
      range = (k % 3 == 0) ? 8 : ((k % 3 == 1) ? 64 : 30000);
      h00 = 16'($urandom % range); h01 = 16'($urandom % range); h02 = 16'($urandom % range);
      h10 = 16'($urandom % range); h20 = 16'($urandom % range);
      d   = 16'($urandom % ((k % 2) ? 4 : range));
      s_i = base(); s_im1 = base(); t_j = base(); t_jm1 = base();
      check_now("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
