// sw_traceback_top_tb: end-to-end test of the trace back engine at its
// default size (4x4 matrix, 4-base sequences).
//
// A new matrix and sequence pair is presented on every clock (falling
// edge); the answer must appear right after the next rising edge: one clock
// of latency, one alignment per clock. Expected values come from
// sw_ref_pkg: comparator 1's start cell, then the greedy walk back. The
// stream holds the four worked examples (checked against their published
// Score_out / Sout / Tout), proper Smith-Waterman matrices of random
// sequences, random matrices and small-valued matrices full of ties.
//
// Each mechanism of the engine is counted and must occur at least once:
// equal maxima in comparator 1, an all-zero matrix (no enable), an up step
// (gap in the target), a left step (gap in the sample), an up/diagonal tie,
// a path longer than the 4-base output, a path ending on an inner zero and
// one ending at the matrix edge, and a reset in the middle of the stream.
module sw_traceback_top_tb;
  import sw_ref_pkg::*;

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic [15:0][3:0] z   = '0;
  logic [11:0]      s   = '0;
  logic [11:0]      t   = '0;
  logic [7:0]       score_out;
  logic [11:0]      sout, tout;
  logic [15:0]      path_out;
  logic [3:0]       max_out;

  int checks = 0;
  int failures = 0;

  int c_tie_max = 0, c_all_zero = 0, c_up = 0, c_left = 0, c_tie_ud = 0;
  int c_trunc = 0, c_inner_stop = 0, c_edge_stop = 0, c_vectors = 0, c_reset = 0;

  sw_traceback_top dut (
    .clk(clk), .rst(rst), .z(z), .s(s), .t(t),
    .score_out(score_out), .sout(sout), .tout(tout), .path_out(path_out), .max_out(max_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("sw_traceback_top_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Presents one problem at the falling edge; checks it after the rising one.
  task automatic run(mat_t m, logic [11:0] sv, logic [11:0] tv);
    int k, nmax;
    res_t r;
    logic [7:0] prev;
    @(negedge clk);
    prev = score_out;
    z = pack_mat(m);
    s = sv;
    t = tv;
    k = argmax(m);
    r = trace(m, sv, tv, k);
    nmax = 0;
    if (k >= 0)
      for (int i = 0; i < 16; i++) if (m[i/RN][i%RN] == m[k/RN][k%RN]) nmax++;
    #1;
    check("score_out held until the clock edge", 32'(score_out), 32'(prev));
    @(posedge clk);
    #1;
    check("score_out", 32'(score_out), 32'(r.score));
    check("sout", 32'(sout), 32'(r.sn));
    check("tout", 32'(tout), 32'(r.tn));
    check("path_out", 32'(path_out), 32'(r.path));
    check("max_out", 32'(max_out), (k < 0) ? 0 : 32'(m[k/RN][k%RN]));
    c_vectors++;
    if (nmax > 1) c_tie_max++;
    if (k < 0) c_all_zero++;
    c_up     += (r.n_up > 0) ? 1 : 0;
    c_left   += (r.n_left > 0) ? 1 : 0;
    c_tie_ud += (r.n_tie_ud > 0) ? 1 : 0;
    c_trunc  += (r.len > RL) ? 1 : 0;
    if (k >= 0) begin
      if (r.edge_stop) c_edge_stop++;
      else             c_inner_stop++;
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    logic [11:0] sv, tv;
    repeat (2) @(posedge clk);
    #1;
    check("score_out in reset", 32'(score_out), 0);
    rst = 1'b0;

    for (int i = 0; i < NVEC; i++) begin
      vec_t v;
      v = example_vec(i);
      run(vec_mat(v), v.s, v.t);
      check("worked example Score_out", 32'(score_out), 32'(v.score));
      check("worked example Sout", 32'(sout), 32'(v.sout));
      check("worked example Tout", 32'(tout), 32'(v.tout));
    end
    run(rand_mat(100), rand_seq(), rand_seq());

    // a synchronous reset in the middle of the stream clears the result
    run(vec_mat(example_vec(0)), example_vec(0).s, example_vec(0).t);
    check("result before reset", 32'(score_out), 20);
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk);
    #1;
    check("score_out after reset", 32'(score_out), 0);
    check("sout after reset", 32'(sout), 0);
    c_reset++;
    rst = 1'b0;

    for (int i = 0; i < 300; i++) begin
      sv = rand_seq();
      tv = rand_seq();
      run(sw_mat(sv, tv), sv, tv);
    end
    for (int i = 0; i < 300; i++) run(rand_mat($urandom_range(70)), rand_seq(), rand_seq());
    for (int i = 0; i < 200; i++) begin
      mat_t m;
      m = rand_mat(25);
      for (int r = 0; r < RN; r++) for (int c = 0; c < RN; c++) m[r][c] = m[r][c] % 4;
      run(m, rand_seq(), rand_seq());
    end

    $display("sw_traceback_top_tb: %0d alignments, one per clock", c_vectors);
    need("equal maxima in comparator 1", c_tie_max);
    need("all-zero matrix, no enable", c_all_zero);
    need("up step, gap in target", c_up);
    need("left step, gap in sample", c_left);
    need("up/diagonal tie", c_tie_ud);
    need("path longer than output", c_trunc);
    need("path ends on an inner zero", c_inner_stop);
    need("path ends at the matrix edge", c_edge_stop);
    need("reset during operation", c_reset);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
