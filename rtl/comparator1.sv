// comparator1: finds the highest cell of the N x N score matrix.
//
// The 16 cells z1..z16 of the 4x4 matrix (row-major, z[0] = z1) are compared
// and the enable of the winning cell, out_en[k-1] for cell zk, is raised.
// The enables are one-hot: on a tie the lowest-numbered cell wins, and when
// every cell is zero no enable is raised (there is nothing to trace back).
// max_val carries the winning value.
//
// Timing: with REG_OUT = 1 the outputs are registered and appear one clock
// after the inputs, which is the block latency reported for the original
// design. With REG_OUT = 0 the block is purely combinational; the top uses
// that so the whole engine answers in one clock. rst is synchronous and
// active high and clears the registered outputs.
//
// The comparison itself follows the description of the block; the tie rule,
// the all-zero rule and the optional output register are choices of this
// design.
module comparator1 #(
  parameter int unsigned N       = 4,
  parameter int unsigned ZW      = 4,
  parameter bit          REG_OUT = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [N*N-1:0][ZW-1:0]   z,
  output logic [N*N-1:0]           out_en,
  output logic [ZW-1:0]            max_val
);

  localparam int unsigned IDX_W = $clog2(N*N);

  logic [N*N-1:0] en_c;
  logic [ZW-1:0]  max_c;

  always_comb begin
    logic [IDX_W-1:0] best;
    best  = '0;
    max_c = z[0];
    for (int unsigned k = 1; k < N*N; k++) begin
      if (z[k] > max_c) begin
        max_c = z[k];
        best  = IDX_W'(k);
      end
    end
    en_c = '0;
    if (max_c != '0) en_c[best] = 1'b1;
  end

  if (REG_OUT) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst) begin
        out_en  <= '0;
        max_val <= '0;
      end else begin
        out_en  <= en_c;
        max_val <= max_c;
      end
    end
  end else begin : g_comb
    assign out_en  = en_c;
    assign max_val = max_c;
  end

  a_onehot : assert property (@(posedge clk) disable iff (rst) $onehot0(out_en))
    else $error("comparator1: more than one enable raised");

endmodule
