// score_lut: similarity score of one pair of sequence characters.
//
// Returns MATCH_SCORE when the two characters are equal and MISMATCH_SCORE
// otherwise, as a signed word of width W.  This is the match/mismatch look-up
// of the Smith-Waterman cell: one equality comparator selecting one of two
// constants.  Purely combinational; the scores are parameters, so a mismatch
// may be negative.  The defaults (2 and 0) are the scoring scheme of the 2x2
// case study; character width and W are this design's choice.
module score_lut #(
  parameter int unsigned CHAR_W         = sw_pkg::DEF_CHAR_W,
  parameter int unsigned W              = sw_pkg::DEF_SCORE_W + sw_pkg::EXTRA_BITS,
  parameter int          MATCH_SCORE    = sw_pkg::DEF_MATCH,
  parameter int          MISMATCH_SCORE = sw_pkg::DEF_MISMATCH
) (
  input  logic [CHAR_W-1:0]   a,      // character of the row sequence S
  input  logic [CHAR_W-1:0]   b,      // character of the column sequence T
  output logic signed [W-1:0] score   // S(a,b)
);

  localparam logic signed [W-1:0] MATCH_W    = W'(MATCH_SCORE);
  localparam logic signed [W-1:0] MISMATCH_W = W'(MISMATCH_SCORE);

  always_comb score = (a == b) ? MATCH_W : MISMATCH_W;

endmodule
