// traceback_recon: the trace back and reconstruction array.
//
// Holds one traceback_cell per matrix cell, z1..zN*N (16 for the 4x4
// matrix). Every sub-module sees the whole score matrix and both sequences;
// sub-module zk is enabled by en[k-1], the enable comparator 1 raises for
// the highest cell. The sub-modules that are not enabled output zeros, so
// only the chosen one presents a score, a reconstructed sample/target pair
// and a path to comparator 2.
//
// Outputs are packed per cell: score[k-1], snew[k-1], tnew[k-1] and
// path[k-1] belong to sub-module zk.
//
// Timing: REG_OUT is passed to every sub-module (1 = one clock of latency,
// 0 = combinational). The split into one sub-module per cell follows the
// original design.
module traceback_recon
  import dna_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned ZW      = 4,
  parameter int unsigned SCW     = 8,
  parameter int unsigned OUT_LEN = 4,
  parameter bit          REG_OUT = 1'b1
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic [N*N-1:0]                       en,
  input  logic [N*N-1:0][ZW-1:0]               z,
  input  logic [N*CHAR_W-1:0]                  s,
  input  logic [N*CHAR_W-1:0]                  t,
  output logic [N*N-1:0][SCW-1:0]              score,
  output logic [N*N-1:0][OUT_LEN*CHAR_W-1:0]   snew,
  output logic [N*N-1:0][OUT_LEN*CHAR_W-1:0]   tnew,
  output logic [N*N-1:0][N*N-1:0]              path
);

  for (genvar k = 0; k < N*N; k++) begin : g_z
    traceback_cell #(
      .N      (N),
      .ZW     (ZW),
      .SCW    (SCW),
      .OUT_LEN(OUT_LEN),
      .K      (k + 1),
      .REG_OUT(REG_OUT)
    ) u_cell (
      .clk  (clk),
      .rst  (rst),
      .en   (en[k]),
      .z    (z),
      .s    (s),
      .t    (t),
      .score(score[k]),
      .snew (snew[k]),
      .tnew (tnew[k]),
      .path (path[k])
    );
  end

endmodule
