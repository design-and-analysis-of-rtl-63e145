// sw_traceback_top: Smith-Waterman trace back and reconstruction engine.
//
// Given a filled N x N local-alignment score matrix (cells z1..zN*N,
// row-major: rows follow the sample s, columns the target t) and the two
// sequences, the engine returns in one clock the score of the traced path
// (score_out), the reconstructed sample and target with gaps (sout, tout)
// and the cells of the path (path_out).
//
// Structure, as in the original design: comparator 1 finds the highest
// cell and enables its trace back sub-module; the array of N*N sub-modules
// (one per cell) traces back and reconstructs; comparator 2 picks the
// result with the highest score. Comparator 1 and the sub-modules are
// instantiated combinational here and comparator 2 registers the result,
// so a new matrix can be presented every clock and its answer appears at
// the next rising edge (the one-clock latency reported for the top).
// max_out is the value of the highest cell, the start of the path.
//
// Ports: z (N*N x ZW bits, z[0] = z1), s and t (N bases of 3 bits, first
// base in the top field), score_out (SCW bits), sout/tout (OUT_LEN bases,
// right-aligned, unused leading fields 000). rst is synchronous, active high.
module sw_traceback_top
  import dna_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned ZW      = 4,
  parameter int unsigned SCW     = 8,
  parameter int unsigned OUT_LEN = 4
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [N*N-1:0][ZW-1:0]      z,
  input  logic [N*CHAR_W-1:0]         s,
  input  logic [N*CHAR_W-1:0]         t,
  output logic [SCW-1:0]              score_out,
  output logic [OUT_LEN*CHAR_W-1:0]   sout,
  output logic [OUT_LEN*CHAR_W-1:0]   tout,
  output logic [N*N-1:0]              path_out,
  output logic [ZW-1:0]               max_out
);

  logic [N*N-1:0]                      en;
  logic [ZW-1:0]                       max_c;
  logic [N*N-1:0][SCW-1:0]             score;
  logic [N*N-1:0][OUT_LEN*CHAR_W-1:0]  snew, tnew;
  logic [N*N-1:0][N*N-1:0]             path;

  comparator1 #(
    .N(N), .ZW(ZW), .REG_OUT(1'b0)
  ) u_cmp1 (
    .clk    (clk),
    .rst    (rst),
    .z      (z),
    .out_en (en),
    .max_val(max_c)
  );

  traceback_recon #(
    .N(N), .ZW(ZW), .SCW(SCW), .OUT_LEN(OUT_LEN), .REG_OUT(1'b0)
  ) u_tbr (
    .clk  (clk),
    .rst  (rst),
    .en   (en),
    .z    (z),
    .s    (s),
    .t    (t),
    .score(score),
    .snew (snew),
    .tnew (tnew),
    .path (path)
  );

  comparator2 #(
    .N(N), .SCW(SCW), .OUT_LEN(OUT_LEN), .REG_OUT(1'b1)
  ) u_cmp2 (
    .clk      (clk),
    .rst      (rst),
    .score    (score),
    .snew     (snew),
    .tnew     (tnew),
    .path     (path),
    .score_out(score_out),
    .sout     (sout),
    .tout     (tout),
    .path_out (path_out)
  );

  always_ff @(posedge clk) begin
    if (rst) max_out <= '0;
    else     max_out <= max_c;
  end

endmodule
