// rve_b2: Recursive Variable Expansion block with blocking factor b = 2.
//
// Computes a 2x2 tile of the Smith-Waterman matrix H in one combinational
// step.  The four cells are
//   o1 = H(i-1,j-1)   o2 = H(i-1,j)
//   o3 = H(i,  j-1)   o4 = H(i,  j)
// where row index i runs along sequence S and column index j along sequence
// T.  The inputs are the five boundary cells above and to the left of the
// tile (H(i-2,j-2), H(i-2,j-1), H(i-2,j), H(i-1,j-2), H(i,j-2)), the gap
// penalty d and the characters S(i-1), S(i), T(j-1), T(j).  Port names follow
// the block symbol of the design.
//
// The recurrence H = max(0, Hdiag + s, Hup - d, Hleft - d) makes o2, o3
// wait for o1 and o4 wait for all three.  Here every reference to a cell of
// the tile is replaced by that cell's own expression, recursively, and since
// max distributes over addition the result is one flat max over sums of
// block inputs only (terms equal to -d or -2d are left out because the zero
// term dominates them, d being unsigned):
//   o1 = max(0, H00+a, H01-d, H10-d)
//   o2 = max(0, H01+b, H02-d, H00+a-d, H01-2d, H10-2d)
//   o3 = max(0, H10+c, H20-d, H00+a-d, H01-2d, H10-2d)
//   o4 = max(0, e, H00+a+e, H01+e-d, H10+e-d, H01+b-d, H10+c-d,
//            H02-2d, H20-2d, H00+a-2d, H01-3d, H10-3d)
// with H00 = H(i-2,j-2), H01 = H(i-2,j-1), H02 = H(i-2,j), H10 = H(i-1,j-2),
// H20 = H(i,j-2) and the scores a = s(S(i-1),T(j-1)), b = s(S(i-1),T(j)),
// c = s(S(i),T(j-1)), e = s(S(i),T(j)).  All terms are formed in parallel and
// each output is a binary max tree (max_tree), so no output depends on
// another.  The dependency sets follow the document's expansion equations;
// the explicit term lists, widths and the block being purely combinational
// (the enclosing array registers the outputs) are this design's choices.
// Scores are unsigned SCORE_W bits; a result above 2^SCORE_W-1 wraps, so
// SCORE_W must hold the largest score of the matrices aligned.
module rve_b2 #(
  parameter int unsigned CHAR_W         = sw_pkg::DEF_CHAR_W,
  parameter int unsigned SCORE_W        = sw_pkg::DEF_SCORE_W,
  parameter int          MATCH_SCORE    = sw_pkg::DEF_MATCH,
  parameter int          MISMATCH_SCORE = sw_pkg::DEF_MISMATCH
) (
  input  logic [SCORE_W-1:0] h_im2_jm2,    // H(i-2,j-2)
  input  logic [SCORE_W-1:0] h_im2_jm1,    // H(i-2,j-1)
  input  logic [SCORE_W-1:0] h_im2_j,      // H(i-2,j)
  input  logic [SCORE_W-1:0] h_im1_jm2,    // H(i-1,j-2)
  input  logic [SCORE_W-1:0] h_i_jm2,      // H(i,j-2)
  input  logic [SCORE_W-1:0] gap_penalty,  // d
  input  logic [CHAR_W-1:0]  s_i,          // S(i)
  input  logic [CHAR_W-1:0]  s_im1,        // S(i-1)
  input  logic [CHAR_W-1:0]  t_j,          // T(j)
  input  logic [CHAR_W-1:0]  t_jm1,        // T(j-1)
  output logic [SCORE_W-1:0] o1,           // H(i-1,j-1)
  output logic [SCORE_W-1:0] o2,           // H(i-1,j)
  output logic [SCORE_W-1:0] o3,           // H(i,j-1)
  output logic [SCORE_W-1:0] o4            // H(i,j)
);

  localparam int unsigned W = SCORE_W + sw_pkg::EXTRA_BITS;
  typedef logic signed [W-1:0] term_t;

  // Boundary cells, gap penalty multiples and scores in the signed term width.
  term_t h00, h01, h02, h10, h20, d1, d2, d3;
  term_t sa, sb, sc, se;

  always_comb begin
    h00 = term_t'({1'b0, h_im2_jm2});
    h01 = term_t'({1'b0, h_im2_jm1});
    h02 = term_t'({1'b0, h_im2_j});
    h10 = term_t'({1'b0, h_im1_jm2});
    h20 = term_t'({1'b0, h_i_jm2});
    d1  = term_t'({1'b0, gap_penalty});
    d2  = d1 + d1;
    d3  = d2 + d1;
  end

  score_lut #(.CHAR_W(CHAR_W), .W(W), .MATCH_SCORE(MATCH_SCORE), .MISMATCH_SCORE(MISMATCH_SCORE))
    u_score_a (.a(s_im1), .b(t_jm1), .score(sa));
  score_lut #(.CHAR_W(CHAR_W), .W(W), .MATCH_SCORE(MATCH_SCORE), .MISMATCH_SCORE(MISMATCH_SCORE))
    u_score_b (.a(s_im1), .b(t_j),   .score(sb));
  score_lut #(.CHAR_W(CHAR_W), .W(W), .MATCH_SCORE(MATCH_SCORE), .MISMATCH_SCORE(MISMATCH_SCORE))
    u_score_c (.a(s_i),   .b(t_jm1), .score(sc));
  score_lut #(.CHAR_W(CHAR_W), .W(W), .MATCH_SCORE(MATCH_SCORE), .MISMATCH_SCORE(MISMATCH_SCORE))
    u_score_e (.a(s_i),   .b(t_j),   .score(se));

  // Expanded terms of each cell.
  term_t t1 [4];
  term_t t2 [6];
  term_t t3 [6];
  term_t t4 [12];

  always_comb begin
    t1[0]  = '0;
    t1[1]  = h00 + sa;
    t1[2]  = h01 - d1;
    t1[3]  = h10 - d1;

    t2[0]  = '0;
    t2[1]  = h01 + sb;
    t2[2]  = h02 - d1;
    t2[3]  = h00 + sa - d1;
    t2[4]  = h01 - d2;
    t2[5]  = h10 - d2;

    t3[0]  = '0;
    t3[1]  = h10 + sc;
    t3[2]  = h20 - d1;
    t3[3]  = h00 + sa - d1;
    t3[4]  = h01 - d2;
    t3[5]  = h10 - d2;

    t4[0]  = '0;
    t4[1]  = se;
    t4[2]  = h00 + sa + se;
    t4[3]  = h01 + se - d1;
    t4[4]  = h10 + se - d1;
    t4[5]  = h01 + sb - d1;
    t4[6]  = h10 + sc - d1;
    t4[7]  = h02 - d2;
    t4[8]  = h20 - d2;
    t4[9]  = h00 + sa - d2;
    t4[10] = h01 - d3;
    t4[11] = h10 - d3;
  end

  term_t m1, m2, m3, m4;

  max_tree #(.N(4),  .W(W)) u_max1 (.terms(t1), .result(m1));
  max_tree #(.N(6),  .W(W)) u_max2 (.terms(t2), .result(m2));
  max_tree #(.N(6),  .W(W)) u_max3 (.terms(t3), .result(m3));
  max_tree #(.N(12), .W(W)) u_max4 (.terms(t4), .result(m4));

  // Every tree contains the zero term, so the results are non-negative; the
  // EXTRA_BITS above the score width are dropped (they are zero whenever the
  // score fits in SCORE_W bits).
  assign o1 = m1[SCORE_W-1:0];
  assign o2 = m2[SCORE_W-1:0];
  assign o3 = m3[SCORE_W-1:0];
  assign o4 = m4[SCORE_W-1:0];

endmodule
