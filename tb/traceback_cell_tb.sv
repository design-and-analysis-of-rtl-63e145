// traceback_cell_tb: self-checking test of the trace back sub-module.
//
// One traceback_cell per start cell K = 1..16 (registered outputs) shares
// the matrix and the sequences. Each vector enables a random subset of the
// sub-modules; every enabled one must return the score, reconstruction and
// path mask of sw_ref_pkg::trace from its own cell, every disabled one
// zeros. The four worked examples are checked against their published
// results. Outputs must appear one clock after the inputs. Counts of up
// steps, left steps, up/diagonal ties and truncated paths are printed and
// each must have been exercised.
module traceback_cell_tb;
  import sw_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [15:0]       en  = '0;
  logic [15:0][3:0]  z   = '0;
  logic [11:0]       s   = '0;
  logic [11:0]       t   = '0;
  logic [15:0][7:0]  score;
  logic [15:0][11:0] snew, tnew;
  logic [15:0][15:0] path;

  int checks = 0;
  int failures = 0;
  int n_up = 0, n_left = 0, n_tie = 0, n_trunc = 0;

  for (genvar k = 0; k < 16; k++) begin : g_dut
    traceback_cell #(.K(k + 1)) dut (
      .clk(clk), .rst(rst), .en(en[k]), .z(z), .s(s), .t(t),
      .score(score[k]), .snew(snew[k]), .tnew(tnew[k]), .path(path[k])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("traceback_cell_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int k, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL z%0d %s: got %h expected %h", k + 1, what, got, exp);
    end
  endtask

  task automatic apply(mat_t m, logic [11:0] sv, logic [11:0] tv, logic [15:0] env);
    res_t r;
    logic [15:0][7:0] prev;
    @(negedge clk);
    prev = score;
    z  = pack_mat(m);
    s  = sv;
    t  = tv;
    en = env;
    #1;
    for (int k = 0; k < 16; k++) check("score held until the clock edge", k, 32'(score[k]), 32'(prev[k]));
    @(posedge clk);
    #1;
    for (int k = 0; k < 16; k++) begin
      r = env[k] ? trace(m, sv, tv, k) : '{default: 0};
      check("score", k, 32'(score[k]), 32'(r.score));
      check("snew", k, 32'(snew[k]), 32'(r.sn));
      check("tnew", k, 32'(tnew[k]), 32'(r.tn));
      check("path", k, 32'(path[k]), 32'(r.path));
      if (env[k]) begin
        n_up    += r.n_up;
        n_left  += r.n_left;
        n_tie   += r.n_tie_ud;
        n_trunc += (r.len > RL) ? 1 : 0;
      end
    end
  endtask

  initial begin
    logic [11:0] sv, tv;
    repeat (2) @(posedge clk);
    rst = 1'b0;

    for (int i = 0; i < NVEC; i++) begin
      vec_t v;
      v = example_vec(i);
      apply(vec_mat(v), v.s, v.t, 16'(1) << v.start);
      check("worked example score", v.start, 32'(score[v.start]), 32'(v.score));
      check("worked example sample", v.start, 32'(snew[v.start]), 32'(v.sout));
      check("worked example target", v.start, 32'(tnew[v.start]), 32'(v.tout));
    end

    for (int i = 0; i < 200; i++) begin
      sv = rand_seq();
      tv = rand_seq();
      apply(sw_mat(sv, tv), sv, tv, 16'($urandom));
    end
    for (int i = 0; i < 300; i++)
      apply(rand_mat($urandom_range(60)), rand_seq(), rand_seq(), 16'($urandom));
    // small values: many ties
    for (int i = 0; i < 200; i++) begin
      mat_t m;
      m = rand_mat(20);
      for (int r = 0; r < RN; r++) for (int c = 0; c < RN; c++) m[r][c] = m[r][c] % 3;
      apply(m, rand_seq(), rand_seq(), 16'hFFFF);
    end

    $display("traceback_cell_tb: up steps %0d, left steps %0d, up/diag ties %0d, truncated paths %0d",
             n_up, n_left, n_tie, n_trunc);
    checks++;
    if (n_up == 0 || n_left == 0 || n_tie == 0 || n_trunc == 0) begin
      failures++;
      $display("FAIL a trace back case was never exercised");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
