// sw_ref_pkg: reference model of the Smith-Waterman recurrence for the
// testbenches.  sw_cell() applies H = max(0, Hdiag + s, Hup - d, Hleft - d)
// to one cell in plain integer arithmetic, one cell at a time, with no
// expansion; score() is the match/mismatch rule.  Testbenches fill whole
// matrices with these in row-major order.
package sw_ref_pkg;

  function automatic int score(int a, int b, int match_s, int mismatch_s);
    return (a == b) ? match_s : mismatch_s;
  endfunction

  function automatic int sw_cell(int diag, int up, int left, int s, int d);
    int m;
    m = 0;
    if (diag + s > m) m = diag + s;
    if (up - d > m)   m = up - d;
    if (left - d > m) m = left - d;
    return m;
  endfunction

endpackage
