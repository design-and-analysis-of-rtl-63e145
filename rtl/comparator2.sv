// comparator2: selects the optimal reconstructed alignment.
//
// Receives score, snew and tnew of all trace back sub-modules z1..zN*N and
// outputs those of the highest score as score_out, sout and tout (the
// total path score and the reconstructed sample and target with gaps).
// In the full engine only the enabled sub-module presents a non-zero score,
// so this picks its result; on equal scores the lowest-numbered sub-module
// wins, and when every score is zero all outputs are zero. path_out is the
// cell mask of the selected path, passed along for inspection.
//
// Timing: with REG_OUT = 1 (default) the outputs are registered one clock
// after the inputs, as reported for the block in the original design; rst
// is synchronous, active high. The selection by highest score follows the
// original design; the tie rule and the zero-score rule are this design's.
module comparator2
  import dna_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned SCW     = 8,
  parameter int unsigned OUT_LEN = 4,
  parameter bit          REG_OUT = 1'b1
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic [N*N-1:0][SCW-1:0]              score,
  input  logic [N*N-1:0][OUT_LEN*CHAR_W-1:0]   snew,
  input  logic [N*N-1:0][OUT_LEN*CHAR_W-1:0]   tnew,
  input  logic [N*N-1:0][N*N-1:0]              path,
  output logic [SCW-1:0]                       score_out,
  output logic [OUT_LEN*CHAR_W-1:0]            sout,
  output logic [OUT_LEN*CHAR_W-1:0]            tout,
  output logic [N*N-1:0]                       path_out
);

  logic [SCW-1:0]            score_c;
  logic [OUT_LEN*CHAR_W-1:0] sout_c, tout_c;
  logic [N*N-1:0]            path_c;

  always_comb begin
    score_c = '0;
    sout_c  = '0;
    tout_c  = '0;
    path_c  = '0;
    for (int unsigned k = 0; k < N*N; k++) begin
      if (score[k] > score_c) begin
        score_c = score[k];
        sout_c  = snew[k];
        tout_c  = tnew[k];
        path_c  = path[k];
      end
    end
  end

  if (REG_OUT) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst) begin
        score_out <= '0;
        sout      <= '0;
        tout      <= '0;
        path_out  <= '0;
      end else begin
        score_out <= score_c;
        sout      <= sout_c;
        tout      <= tout_c;
        path_out  <= path_c;
      end
    end
  end else begin : g_comb
    assign score_out = score_c;
    assign sout      = sout_c;
    assign tout      = tout_c;
    assign path_out  = path_c;
  end

endmodule
