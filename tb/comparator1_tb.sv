// comparator1_tb: self-checking test of comparator1 (4x4, registered).
//
// Applies the four worked-example matrices, matrices with ties, an all-zero
// matrix and random matrices. For each, the expected one-hot enable (first
// largest cell, none when all are zero) and maximum come from sw_ref_pkg.
// Inputs change on the falling edge; the outputs must still show the
// previous answer before the next rising edge and the new one right after
// it (one clock of latency).
module comparator1_tb;
  import sw_ref_pkg::*;

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic [15:0][3:0] z   = '0;
  logic [15:0]      out_en;
  logic [3:0]       max_val;

  int checks = 0;
  int failures = 0;

  comparator1 dut (.clk(clk), .rst(rst), .z(z), .out_en(out_en), .max_val(max_val));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("comparator1_tb: watchdog expired");
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

  task automatic apply(mat_t m);
    int k;
    logic [15:0] exp_en;
    logic [15:0] prev_en;
    @(negedge clk);
    prev_en = out_en;
    z = pack_mat(m);
    k = argmax(m);
    exp_en = (k < 0) ? 16'h0 : 16'(1) << k;
    #1;
    check("enable held until the clock edge", 32'(out_en), 32'(prev_en));
    @(posedge clk);
    #1;
    check("enable", 32'(out_en), 32'(exp_en));
    check("max", 32'(max_val), (k < 0) ? 0 : 32'(m[k/RN][k%RN]));
  endtask

  initial begin
    mat_t m;
    repeat (2) @(posedge clk);
    #1;
    check("enable in reset", 32'(out_en), 0);
    rst = 1'b0;

    for (int i = 0; i < NVEC; i++) begin
      vec_t v;
      v = example_vec(i);
      apply(vec_mat(v));
      check("worked example start cell", 32'(out_en), 32'(16'(1) << v.start));
    end

    // all zero: no enable
    m = rand_mat(100);
    apply(m);
    // ties: two equal maxima, the first must win
    for (int i = 0; i < 50; i++) begin
      int a, b;
      m = rand_mat(30);
      for (int r = 0; r < RN; r++) for (int c = 0; c < RN; c++) if (m[r][c] > 9) m[r][c] = 9;
      a = $urandom_range(15);
      b = $urandom_range(15);
      m[a/RN][a%RN] = 12;
      m[b/RN][b%RN] = 12;
      apply(m);
    end
    for (int i = 0; i < 300; i++) apply(rand_mat($urandom_range(80)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
