// traceback_recon_tb: self-checking test of the 16-cell trace back array.
//
// Drives the array with one-hot enables (as comparator 1 produces them),
// with no enable, and with random enable sets. Sub-module zk must return
// sw_ref_pkg::trace from cell k when en[k-1] is high and zeros otherwise.
// Includes the four worked examples and checks the one-clock latency.
module traceback_recon_tb;
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

  traceback_recon dut (
    .clk(clk), .rst(rst), .en(en), .z(z), .s(s), .t(t),
    .score(score), .snew(snew), .tnew(tnew), .path(path)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("traceback_recon_tb: watchdog expired");
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
    @(negedge clk);
    z  = pack_mat(m);
    s  = sv;
    t  = tv;
    en = env;
    @(posedge clk);
    #1;
    for (int k = 0; k < 16; k++) begin
      r = env[k] ? trace(m, sv, tv, k) : '{default: 0};
      check("score", k, 32'(score[k]), 32'(r.score));
      check("snew", k, 32'(snew[k]), 32'(r.sn));
      check("tnew", k, 32'(tnew[k]), 32'(r.tn));
      check("path", k, 32'(path[k]), 32'(r.path));
    end
  endtask

  initial begin
    mat_t m;
    repeat (2) @(posedge clk);
    #1;
    for (int k = 0; k < 16; k++) check("score in reset", k, 32'(score[k]), 0);
    rst = 1'b0;

    for (int i = 0; i < NVEC; i++) begin
      vec_t v;
      v = example_vec(i);
      apply(vec_mat(v), v.s, v.t, 16'(1) << v.start);
      check("worked example score", v.start, 32'(score[v.start]), 32'(v.score));
      check("worked example sample", v.start, 32'(snew[v.start]), 32'(v.sout));
      check("worked example target", v.start, 32'(tnew[v.start]), 32'(v.tout));
    end

    apply(rand_mat(0), rand_seq(), rand_seq(), 16'h0000);
    for (int i = 0; i < 300; i++) begin
      m = rand_mat($urandom_range(60));
      apply(m, rand_seq(), rand_seq(), 16'(1) << $urandom_range(15));
    end
    for (int i = 0; i < 100; i++)
      apply(rand_mat(30), rand_seq(), rand_seq(), 16'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
