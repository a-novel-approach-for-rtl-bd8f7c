// rve_array: Smith-Waterman matrix fill built from RVE b=2 blocks.
//
// Fills the local-alignment score matrix H of a row sequence S (2*BR
// characters) against a column sequence T (2*BC characters).  The matrix is
// cut into 2x2 tiles and each tile has its own rve_b2 block, so the array is
// BR x BC blocks wired like a systolic array: a block takes its five
// boundary cells from the registered outputs of the blocks above, to the
// left and diagonally above-left, and zero where the tile touches the top
// row or left column of the matrix (the initialization step H(0,j) =
// H(i,0) = 0).  Inside a block the four cells need no ordering, so a whole
// tile is one step; across blocks the tiles of one anti-diagonal p+q are
// loaded in the same clock, giving BR+BC-1 steps for the matrix.  With the
// default BR = BC = 1 the array is the single b = 2 block of the reference
// design, computing a 2x2 matrix in one clock.
//
// Interface: pulse start for one cycle while busy is low; the sequences and
// gap penalty are sampled on that clock edge and must hold only then.  busy
// is high for exactly BR+BC-1 cycles after that edge; done pulses for one
// cycle together with the last load and h is then complete and stays valid
// until the next start.  start while busy is ignored.  h[r][c] is H(r+1,c+1);
// s_seq[r] is S(r+1) and t_seq[c] is T(c+1).  Reset (rst_n low, synchronous)
// clears h and the controller.  The wavefront schedule, the handshake and
// the reset are this design's choices: the reference design only states that
// the b = 2 block can be used as a macro to build arrays of any size.
module rve_array #(
  parameter int unsigned BR             = 1,   // block rows: matrix has 2*BR rows
  parameter int unsigned BC             = 1,   // block columns: matrix has 2*BC columns
  parameter int unsigned CHAR_W         = sw_pkg::DEF_CHAR_W,
  parameter int unsigned SCORE_W        = sw_pkg::DEF_SCORE_W,
  parameter int          MATCH_SCORE    = sw_pkg::DEF_MATCH,
  parameter int          MISMATCH_SCORE = sw_pkg::DEF_MISMATCH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [CHAR_W-1:0]  s_seq [2*BR],
  input  logic [CHAR_W-1:0]  t_seq [2*BC],
  input  logic [SCORE_W-1:0] gap_penalty,
  output logic               busy,
  output logic               done,
  output logic [SCORE_W-1:0] h [2*BR][2*BC]
);

  import sw_pkg::*;

  localparam int unsigned NR    = 2 * BR;
  localparam int unsigned NC    = 2 * BC;
  localparam int unsigned STEPS = BR + BC - 1;
  localparam int unsigned STEP_W = (STEPS > 1) ? $clog2(STEPS) : 1;

  fill_state_e         state;
  logic [STEP_W-1:0]   step;      // tile anti-diagonal being loaded
  logic [CHAR_W-1:0]   s_q [NR];
  logic [CHAR_W-1:0]   t_q [NC];
  logic [SCORE_W-1:0]  d_q;
  logic [SCORE_W-1:0]  tile_out [NR][NC];

  // One RVE block per tile; boundary cells come from the registered matrix.
  for (genvar p = 0; p < BR; p++) begin : g_row
    for (genvar q = 0; q < BC; q++) begin : g_col
      logic [SCORE_W-1:0] b00, b01, b02, b10, b20;

      if (p > 0 && q > 0) begin : g_corner
        assign b00 = h[2*p-1][2*q-1];
      end else begin : g_corner_zero
        assign b00 = '0;
      end

      if (p > 0) begin : g_top
        assign b01 = h[2*p-1][2*q];
        assign b02 = h[2*p-1][2*q+1];
      end else begin : g_top_zero
        assign b01 = '0;
        assign b02 = '0;
      end

      if (q > 0) begin : g_left
        assign b10 = h[2*p][2*q-1];
        assign b20 = h[2*p+1][2*q-1];
      end else begin : g_left_zero
        assign b10 = '0;
        assign b20 = '0;
      end

      rve_b2 #(
        .CHAR_W(CHAR_W), .SCORE_W(SCORE_W),
        .MATCH_SCORE(MATCH_SCORE), .MISMATCH_SCORE(MISMATCH_SCORE)
      ) u_rve (
        .h_im2_jm2  (b00),
        .h_im2_jm1  (b01),
        .h_im2_j    (b02),
        .h_im1_jm2  (b10),
        .h_i_jm2    (b20),
        .gap_penalty(d_q),
        .s_i        (s_q[2*p+1]),
        .s_im1      (s_q[2*p]),
        .t_j        (t_q[2*q+1]),
        .t_jm1      (t_q[2*q]),
        .o1         (tile_out[2*p][2*q]),
        .o2         (tile_out[2*p][2*q+1]),
        .o3         (tile_out[2*p+1][2*q]),
        .o4         (tile_out[2*p+1][2*q+1])
      );
    end
  end

  // Controller: sample the operands, then walk the tile anti-diagonals.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= FILL_IDLE;
      step  <= '0;
      done  <= 1'b0;
      d_q   <= '0;
      for (int r = 0; r < NR; r++) s_q[r] <= '0;
      for (int c = 0; c < NC; c++) t_q[c] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        FILL_IDLE: begin
          if (start) begin
            for (int r = 0; r < NR; r++) s_q[r] <= s_seq[r];
            for (int c = 0; c < NC; c++) t_q[c] <= t_seq[c];
            d_q   <= gap_penalty;
            step  <= '0;
            state <= FILL_RUN;
          end
        end
        FILL_RUN: begin
          if (32'(step) == STEPS - 1) begin
            state <= FILL_IDLE;
            done  <= 1'b1;
          end else begin
            step <= step + 1'b1;
          end
        end
        default: state <= FILL_IDLE;
      endcase
    end
  end

  // Matrix registers: a tile is loaded in the step of its anti-diagonal.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NC; c++)
          h[r][c] <= '0;
    end else if (state == FILL_RUN) begin
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NC; c++)
          if (32'(step) == r / 2 + c / 2)
            h[r][c] <= tile_out[r][c];
    end
  end

  assign busy = (state == FILL_RUN);

  // The step counter never passes the last anti-diagonal.
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> 32'(step) < STEPS);

endmodule
