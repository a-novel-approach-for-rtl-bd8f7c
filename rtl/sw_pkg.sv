// sw_pkg: constants shared by the Smith-Waterman RVE datapath.
//
// The default scoring scheme is the one of the 2x2 case study this design
// reproduces: a match scores 2, a mismatch scores 0 and the gap penalty is an
// input (0 in that case study).  The character and score widths are this
// design's own choice: 8-bit characters (ASCII letters work directly) and
// 16-bit unsigned matrix scores.  Inside the datapath every expanded term is
// formed in a signed word EXTRA_BITS wider than a score, which holds a score
// minus three gap penalties (the deepest term of a 2x2 tile) without overflow.
package sw_pkg;

  localparam int unsigned DEF_CHAR_W     = 8;
  localparam int unsigned DEF_SCORE_W    = 16;
  localparam int          DEF_MATCH      = 2;
  localparam int          DEF_MISMATCH   = 0;
  localparam int unsigned EXTRA_BITS     = 3;

  // State of the matrix-fill controller of rve_array.
  typedef enum logic {
    FILL_IDLE = 1'b0,
    FILL_RUN  = 1'b1
  } fill_state_e;

endpackage
