// dna_pkg: shared constants and types of the Smith-Waterman trace back and
// reconstruction engine.
//
// DNA bases travel as 3-bit codes. The codes for A, C, G, T and the gap
// symbol follow the base assignment used throughout this design:
//   A = 000, C = 001, G = 010, T = 100, gap = 101.
// A sequence of L bases is packed into L*3 bits with the first base in the
// most significant field (bits [L*3-1 -: 3]). A reconstructed sequence is
// right-aligned: its last base sits in bits [2:0] and unused leading
// fields stay 000.
//
// The move type names the step the trace back takes out of a cell. MV_STOP
// ends the path (every neighbour is zero or outside the matrix).
package dna_pkg;

  localparam int unsigned CHAR_W = 3;

  typedef logic [CHAR_W-1:0] base_t;

  localparam base_t BASE_A   = 3'b000;
  localparam base_t BASE_C   = 3'b001;
  localparam base_t BASE_G   = 3'b010;
  localparam base_t BASE_T   = 3'b100;
  localparam base_t BASE_GAP = 3'b101;

  typedef enum logic [1:0] {
    MV_STOP = 2'd0,
    MV_DIAG = 2'd1,
    MV_UP   = 2'd2,
    MV_LEFT = 2'd3
  } move_t;

endpackage
