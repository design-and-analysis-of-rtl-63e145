// traceback_cell: trace back and reconstruction sub-module for one cell zK.
//
// There is one such sub-module per cell of the N x N Smith-Waterman score
// matrix. Rows belong to the sample s (row r holds s_r) and columns to the
// target t (column c holds t_c); cell zK sits at row (K-1)/N + 1, column
// (K-1)%N + 1. When its enable is high (comparator 1 chose zK as the highest
// cell) the sub-module walks back from zK towards the origin:
//
//   * at each cell it looks at the three neighbours the alignment can come
//     from: up (r-1, c), diagonal (r-1, c-1) and left (r, c-1); cells
//     outside the matrix count as zero;
//   * it steps to the largest neighbour; equal values are resolved in the
//     order up, diagonal, left;
//   * when all three are zero the path ends (the first zero reached).
//
// The score is the sum of the cell values on the path. Each visited cell
// also gives one aligned pair, chosen by the step taken out of it:
// diagonal or end of path -> (s_r, t_c); up -> (s_r, gap); left -> (gap, t_c).
// The pair of the start cell zK becomes the last base of snew/tnew, the next
// pair the one before it, and so on: the outputs are right-aligned with 000
// in unused leading fields. A path can visit up to 2N-1 cells; only the
// OUT_LEN pairs nearest to zK fit the outputs (the path mask still shows the
// whole path). path has one bit per cell, bit K-1 for zK.
//
// When the enable is low, or zK itself is zero, every output is zero.
//
// Timing: with REG_OUT = 1 the outputs are registered, one clock after the
// inputs (the block latency of the original design). With REG_OUT = 0 the
// block is combinational, and clk and rst are then left unused (lint
// reports them) so that registered and combinational builds share one port
// list. rst is synchronous, active high.
//
// What follows the original design: one sub-module per cell, its inputs
// (s, t, the whole matrix, its enable) and outputs (score, snew, tnew,
// path), the sum-of-cells score, the 3-bit base codes and right-aligned
// 12-bit outputs. Own choices: the greedy largest-neighbour walk and its
// tie order (picked so that the published worked examples are reproduced),
// the path mask format and the truncation of paths longer than OUT_LEN.
module traceback_cell
  import dna_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned ZW      = 4,
  parameter int unsigned SCW     = 8,
  parameter int unsigned OUT_LEN = 4,
  parameter int unsigned K       = N*N,
  parameter bit          REG_OUT = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       en,
  input  logic [N*N-1:0][ZW-1:0]     z,
  input  logic [N*CHAR_W-1:0]        s,
  input  logic [N*CHAR_W-1:0]        t,
  output logic [SCW-1:0]             score,
  output logic [OUT_LEN*CHAR_W-1:0]  snew,
  output logic [OUT_LEN*CHAR_W-1:0]  tnew,
  output logic [N*N-1:0]             path
);

  localparam int unsigned START_R = (K-1) / N;  // 0-based row of zK
  localparam int unsigned START_C = (K-1) % N;  // 0-based column of zK
  localparam int unsigned MAX_STEPS = 2*N - 1;

  initial begin
    assert (K >= 1 && K <= N*N) else $fatal(1, "traceback_cell: K out of range");
  end

  logic [SCW-1:0]            score_c;
  logic [OUT_LEN*CHAR_W-1:0] snew_c, tnew_c;
  logic [N*N-1:0]            path_c;

  always_comb begin
    int unsigned r, c;
    logic        live;
    logic [ZW-1:0] v_up, v_dg, v_lf;
    move_t       mv;
    base_t       sb, tb;

    score_c = '0;
    snew_c  = '0;
    tnew_c  = '0;
    path_c  = '0;
    v_up    = '0;
    v_dg    = '0;
    v_lf    = '0;
    mv      = MV_STOP;
    sb      = '0;
    tb      = '0;
    r       = START_R;
    c       = START_C;
    live    = en && (z[K-1] != '0);

    for (int unsigned step = 0; step < MAX_STEPS; step++) begin
      if (live) begin
        score_c            = score_c + SCW'(z[r*N + c]);
        path_c[r*N + c]    = 1'b1;

        v_up = (r > 0)          ? z[(r-1)*N + c]     : '0;
        v_dg = (r > 0 && c > 0) ? z[(r-1)*N + c - 1] : '0;
        v_lf = (c > 0)          ? z[r*N + c - 1]     : '0;

        if (v_up == '0 && v_dg == '0 && v_lf == '0) mv = MV_STOP;
        else if (v_up >= v_dg && v_up >= v_lf)      mv = MV_UP;
        else if (v_dg >= v_lf)                      mv = MV_DIAG;
        else                                        mv = MV_LEFT;

        sb = s[(N-1-r)*CHAR_W +: CHAR_W];
        tb = t[(N-1-c)*CHAR_W +: CHAR_W];
        if (mv == MV_UP)   tb = BASE_GAP;
        if (mv == MV_LEFT) sb = BASE_GAP;

        if (step < OUT_LEN) begin
          snew_c[step*CHAR_W +: CHAR_W] = sb;
          tnew_c[step*CHAR_W +: CHAR_W] = tb;
        end

        unique case (mv)
          MV_UP:   r = r - 1;
          MV_LEFT: c = c - 1;
          MV_DIAG: begin r = r - 1; c = c - 1; end
          MV_STOP: live = 1'b0;
        endcase
      end
    end
  end

  if (REG_OUT) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst) begin
        score <= '0;
        snew  <= '0;
        tnew  <= '0;
        path  <= '0;
      end else begin
        score <= score_c;
        snew  <= snew_c;
        tnew  <= tnew_c;
        path  <= path_c;
      end
    end
  end else begin : g_comb
    assign score = score_c;
    assign snew  = snew_c;
    assign tnew  = tnew_c;
    assign path  = path_c;
  end

endmodule
