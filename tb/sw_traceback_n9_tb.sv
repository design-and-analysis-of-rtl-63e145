// sw_traceback_n9_tb: the engine built for 9-base sequences (N = 9).
//
// Runs sw_traceback_top with a 9x9 matrix and outputs long enough for any
// path (OUT_LEN = 2N-1 = 17 bases). The first matrix is the classic
// illustration of local alignment of GTCTATCAC (rows) against ATCTCGTAT
// (columns) with match +2, mismatch -1 and gap -1, in its commonly listed
// form. Two listed cells differ from a fresh fill of those sequences
// (row 5 / column 2 is listed as 2, a fill gives 1; row 6 / column 8 is
// listed as 5, a fill gives 6), so the engine is run on both the listed and
// the recomputed matrix; the other 79 cells must agree. Each run is checked
// against a size-generic reference
// walk (largest of up / diagonal / left, ties in that order, stop when all
// three are zero). Further vectors are Smith-Waterman matrices of random
// 9-base sequences and random matrices. Latency is one clock.
module sw_traceback_n9_tb;
  localparam int N  = 9;
  localparam int OL = 2*N - 1;

  typedef int mat_t [N][N];

  logic                  clk;
  logic                  rst = 1'b1;
  logic [N*N-1:0][3:0]   z   = '0;
  logic [N*3-1:0]        s   = '0;
  logic [N*3-1:0]        t   = '0;
  logic [7:0]            score_out;
  logic [OL*3-1:0]       sout, tout;
  logic [N*N-1:0]        path_out;
  logic [3:0]            max_out;

  int checks = 0;
  int failures = 0;
  int n_long = 0;

  sw_traceback_top #(.N(N), .OUT_LEN(OL)) dut (
    .clk(clk), .rst(rst), .z(z), .s(s), .t(t),
    .score_out(score_out), .sout(sout), .tout(tout), .path_out(path_out), .max_out(max_out)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("sw_traceback_n9_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic int base(logic [N*3-1:0] q, int i);
    return int'(q[(N-1-i)*3 +: 3]);
  endfunction

  function automatic logic [N*3-1:0] seq_of(string txt);
    logic [N*3-1:0] q;
    for (int i = 0; i < N; i++)
      case (txt[i])
        "A": q[(N-1-i)*3 +: 3] = 3'b000;
        "C": q[(N-1-i)*3 +: 3] = 3'b001;
        "G": q[(N-1-i)*3 +: 3] = 3'b010;
        default: q[(N-1-i)*3 +: 3] = 3'b100;
      endcase
    return q;
  endfunction

  function automatic int at(mat_t m, int r, int c);
    return (r < 0 || c < 0) ? 0 : m[r][c];
  endfunction

  function automatic mat_t fill(logic [N*3-1:0] sv, logic [N*3-1:0] tv);
    mat_t m;
    int h;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        h = at(m, r-1, c-1) + ((base(sv, r) == base(tv, c)) ? 2 : -1);
        if (at(m, r-1, c) - 1 > h) h = at(m, r-1, c) - 1;
        if (at(m, r, c-1) - 1 > h) h = at(m, r, c-1) - 1;
        m[r][c] = (h > 0) ? h : 0;
      end
    return m;
  endfunction

  task automatic run(mat_t m, logic [N*3-1:0] sv, logic [N*3-1:0] tv);
    int best_r = -1, best_c = -1, bv = 0, r, c, u, d, l, step, sc;
    logic [OL*3-1:0] es, et;
    logic [N*N-1:0]  ep;
    es = '0; et = '0; ep = '0; sc = 0; step = 0;
    for (int i = 0; i < N*N; i++)
      if (m[i/N][i%N] > bv) begin bv = m[i/N][i%N]; best_r = i/N; best_c = i%N; end
    r = best_r;
    c = best_c;
    while (r >= 0) begin
      sc += m[r][c];
      ep[r*N+c] = 1'b1;
      u = at(m, r-1, c); d = at(m, r-1, c-1); l = at(m, r, c-1);
      es[step*3 +: 3] = 3'(base(sv, r));
      et[step*3 +: 3] = 3'(base(tv, c));
      if (u == 0 && d == 0 && l == 0) r = -1;
      else if (u >= d && u >= l) begin et[step*3 +: 3] = 3'b101; r--; end
      else if (d >= l) begin r--; c--; end
      else begin es[step*3 +: 3] = 3'b101; c--; end
      step++;
    end
    if (step > 4) n_long++;
    @(negedge clk);
    for (int i = 0; i < N*N; i++) z[i] = 4'(m[i/N][i%N]);
    s = sv;
    t = tv;
    @(posedge clk);
    #1;
    check("score_out", 128'(score_out), 128'(sc));
    check("sout", 128'(sout), 128'(es));
    check("tout", 128'(tout), 128'(et));
    check("path_out", 128'(path_out), 128'(ep));
    check("max_out", 128'(max_out), 128'(bv));
  endtask

  initial begin
    mat_t m;
    logic [N*3-1:0] sv, tv;
    static int listed [N][N] = '{
      '{0, 0, 0, 0, 0, 2, 1, 0, 0},
      '{0, 2, 1, 2, 1, 1, 4, 3, 2},
      '{0, 1, 4, 3, 4, 3, 3, 3, 2},
      '{0, 2, 3, 6, 5, 4, 5, 4, 5},
      '{2, 2, 2, 5, 5, 4, 4, 7, 6},
      '{1, 4, 3, 4, 4, 4, 6, 5, 9},
      '{0, 3, 6, 5, 6, 5, 5, 5, 8},
      '{2, 2, 5, 5, 5, 5, 4, 7, 7},
      '{1, 1, 4, 4, 7, 6, 5, 6, 6}};
    repeat (2) @(posedge clk);
    rst = 1'b0;

    sv = seq_of("GTCTATCAC");
    tv = seq_of("ATCTCGTAT");
    m = fill(sv, tv);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (!((r == 4 && c == 1) || (r == 5 && c == 7)))
          check("illustration matrix cell", 128'(m[r][c]), 128'(listed[r][c]));
    run(m, sv, tv);
    check("illustration start value", 128'(max_out), 9);
    run(listed, sv, tv);
    check("illustration start value, listed matrix", 128'(max_out), 9);

    for (int i = 0; i < 100; i++) begin
      for (int k = 0; k < N; k++) begin
        sv[k*3 +: 3] = 3'($urandom_range(3) == 3 ? 4 : $urandom_range(2));
        tv[k*3 +: 3] = 3'($urandom_range(3) == 3 ? 4 : $urandom_range(2));
      end
      run(fill(sv, tv), sv, tv);
    end
    for (int i = 0; i < 100; i++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          m[r][c] = ($urandom_range(99) < 40) ? 0 : int'($urandom_range(15));
      run(m, sv, tv);
    end

    checks++;
    if (n_long == 0) begin
      failures++;
      $display("FAIL no path longer than 4 bases was exercised");
    end
    $display("sw_traceback_n9_tb: %0d paths longer than 4 bases", n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
