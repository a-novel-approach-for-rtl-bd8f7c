// max_tree: maximum of N signed terms through a balanced binary tree.
//
// An expanded (dependency-free) expression is evaluated as a binary tree of
// two-input operators, so N terms take ceil(log2 N) operator delays instead
// of N-1.  This module builds that tree for the max operator.  The terms are
// padded to the next power of two with the most negative value, which never
// wins a comparison; level l then holds 2^(LEVELS-l) partial maxima, each the
// larger of two neighbours of level l-1, and the single value of the last
// level is the result.  Purely combinational.  N and W are set by the
// instantiating module.
module max_tree #(
  parameter int unsigned N = 4,
  parameter int unsigned W = sw_pkg::DEF_SCORE_W + sw_pkg::EXTRA_BITS
) (
  input  logic signed [W-1:0] terms [N],
  output logic signed [W-1:0] result
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned LEAVES = 1 << LEVELS;
  localparam logic signed [W-1:0] MOST_NEGATIVE = {1'b1, {(W-1){1'b0}}};

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic signed [W-1:0] v [LEAVES >> l];
    for (genvar k = 0; k < (LEAVES >> l); k++) begin : g_node
      if (l == 0) begin : g_leaf
        if (k < N) begin : g_term
          assign v[k] = terms[k];
        end else begin : g_pad
          assign v[k] = MOST_NEGATIVE;
        end
      end else begin : g_max
        assign v[k] = (g_lvl[l-1].v[2*k] > g_lvl[l-1].v[2*k+1])
                      ? g_lvl[l-1].v[2*k] : g_lvl[l-1].v[2*k+1];
      end
    end
  end

  assign result = g_lvl[LEVELS].v[0];

endmodule
