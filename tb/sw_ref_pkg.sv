// sw_ref_pkg: reference model and test vectors for the trace back testbenches.
//
// The model works on a plain 4x4 integer matrix m[row][col] (row = sample
// base, column = target base, both 0-based) and rebuilds the expected
// outputs of the hardware: the start cell chosen by comparator 1 (first
// largest cell, none when all are zero) and the greedy walk back (largest of
// up / diagonal / left, equal values resolved in that order, end when all
// three are zero). Pairs are collected in a queue from the start cell
// backwards and then packed right-aligned into 12-bit fields.
//
// It also holds the four worked examples of the original design, with the
// sample on the matrix rows, and generators for random matrices and for
// proper Smith-Waterman matrices (match +2, mismatch -1, gap -1).
package sw_ref_pkg;

  localparam int RN = 4;   // matrix size
  localparam int RL = 4;   // bases in a reconstructed sequence

  typedef int mat_t [RN][RN];

  typedef struct {
    int          score;
    logic [11:0] sn;
    logic [11:0] tn;
    logic [15:0] path;
    int          len;        // cells on the path
    int          n_up;       // steps up (gap in target)
    int          n_left;     // steps left (gap in sample)
    int          n_tie_ud;   // steps where up and diagonal tied and up won
    bit          edge_stop;  // path ended on row 1 or column 1
  } res_t;

  function automatic int base_of(logic [11:0] seq, int i);
    return int'(seq[11-3*i -: 3]);
  endfunction

  function automatic int at(mat_t m, int r, int c);
    if (r < 0 || c < 0) return 0;
    return m[r][c];
  endfunction

  // Start cell of comparator 1: index 0..15, or -1 when all cells are zero.
  function automatic int argmax(mat_t m);
    int best = -1;
    int bv = 0;
    for (int i = 0; i < RN*RN; i++)
      if (m[i/RN][i%RN] > bv) begin bv = m[i/RN][i%RN]; best = i; end
    return best;
  endfunction

  function automatic res_t trace(mat_t m, logic [11:0] s, logic [11:0] t, int k0);
    res_t res;
    int r, c, u, d, l, best;
    int qs[$];
    int qt[$];
    res = '{default: 0};
    if (k0 < 0) return res;
    r = k0 / RN;
    c = k0 % RN;
    if (m[r][c] == 0) return res;
    forever begin
      res.score += m[r][c];
      res.path[r*RN+c] = 1'b1;
      res.len++;
      u = at(m, r-1, c);
      d = at(m, r-1, c-1);
      l = at(m, r, c-1);
      best = u;
      if (d > best) best = d;
      if (l > best) best = l;
      if (best == 0) begin
        qs.push_back(base_of(s, r));
        qt.push_back(base_of(t, c));
        res.edge_stop = (r == 0 || c == 0);
        break;
      end else if (u == best) begin
        if (d == best) res.n_tie_ud++;
        qs.push_back(base_of(s, r));
        qt.push_back(5);
        res.n_up++;
        r--;
      end else if (d == best) begin
        qs.push_back(base_of(s, r));
        qt.push_back(base_of(t, c));
        r--; c--;
      end else begin
        qs.push_back(5);
        qt.push_back(base_of(t, c));
        res.n_left++;
        c--;
      end
    end
    for (int i = 0; i < RL && i < qs.size(); i++) begin
      res.sn[3*i +: 3] = 3'(qs[i]);
      res.tn[3*i +: 3] = 3'(qt[i]);
    end
    return res;
  endfunction

  // Worked examples: matrix, sample, target, expected start cell (0-based),
  // expected sample / target reconstruction and score.
  typedef struct {
    int          z[16];
    logic [11:0] s;
    logic [11:0] t;
    int          start;
    logic [11:0] sout;
    logic [11:0] tout;
    int          score;
  } vec_t;

  localparam int NVEC = 4;

  function automatic vec_t example_vec(int i);
    vec_t v;
    case (i)
      0: v = '{z: '{2,1,0,0, 1,4,3,2, 0,3,6,5, 0,2,5,8},
               s: 12'b000_001_010_100, t: 12'b000_001_010_100,
               start: 15, sout: 12'h054, tout: 12'h054, score: 20};
      1: v = '{z: '{2,1,0,0, 1,1,0,2, 0,3,2,1, 0,2,2,1},
               s: 12'b000_001_010_100, t: 12'b000_010_100_001,
               start: 9, sout: 12'h00A, tout: 12'h015, score: 6};
      2: v = '{z: '{0,2,1,0, 2,1,1,0, 1,1,0,3, 0,0,0,2},
               s: 12'b000_100_010_010, t: 12'b100_000_001_010,
               start: 11, sout: 12'h022, tout: 12'h00A, score: 6};
      default: v = '{z: '{0,2,1,0, 0,1,4,3, 0,0,3,3, 2,1,2,2},
               s: 12'b000_100_010_001, t: 12'b001_000_100_001,
               start: 6, sout: 12'h004, tout: 12'h004, score: 6};
    endcase
    return v;
  endfunction

  function automatic mat_t vec_mat(vec_t v);
    mat_t m;
    for (int i = 0; i < 16; i++) m[i/RN][i%RN] = v.z[i];
    return m;
  endfunction

  function automatic logic [11:0] rand_seq();
    logic [11:0] q;
    int codes[4] = '{0, 1, 2, 4};
    for (int i = 0; i < RN; i++) q[3*i +: 3] = 3'(codes[$urandom_range(3)]);
    return q;
  endfunction

  // Random 4-bit cells; a share of them forced to zero.
  function automatic mat_t rand_mat(int zero_pct);
    mat_t m;
    for (int r = 0; r < RN; r++)
      for (int c = 0; c < RN; c++)
        m[r][c] = ($urandom_range(99) < zero_pct) ? 0 : int'($urandom_range(15));
    return m;
  endfunction

  // Proper local-alignment matrix of s (rows) against t (columns).
  function automatic mat_t sw_mat(logic [11:0] s, logic [11:0] t);
    mat_t m;
    int h, dg;
    for (int r = 0; r < RN; r++)
      for (int c = 0; c < RN; c++) begin
        dg = at(m, r-1, c-1) + ((base_of(s, r) == base_of(t, c)) ? 2 : -1);
        h = 0;
        if (dg > h) h = dg;
        if (at(m, r-1, c) - 1 > h) h = at(m, r-1, c) - 1;
        if (at(m, r, c-1) - 1 > h) h = at(m, r, c-1) - 1;
        m[r][c] = h;
      end
    return m;
  endfunction

  function automatic logic [15:0][3:0] pack_mat(mat_t m);
    logic [15:0][3:0] p;
    for (int i = 0; i < 16; i++) p[i] = 4'(m[i/RN][i%RN]);
    return p;
  endfunction

endpackage
