// comparator2_tb: self-checking test of comparator2 (registered).
//
// Presents 16 candidate (score, sample, target, path) sets and expects the
// set with the highest score, the lowest-numbered one on equal scores, and
// zeros when every score is zero. Covers the published case where only
// sub-module z16 carries a result (score 20, sample and target 12'h054),
// single non-zero candidates as in the full engine, random candidate sets
// with ties, and the one-clock latency.
module comparator2_tb;
  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [15:0][7:0]  score = '0;
  logic [15:0][11:0] snew  = '0;
  logic [15:0][11:0] tnew  = '0;
  logic [15:0][15:0] path  = '0;
  logic [7:0]        score_out;
  logic [11:0]       sout, tout;
  logic [15:0]       path_out;

  int checks = 0;
  int failures = 0;

  comparator2 dut (
    .clk(clk), .rst(rst), .score(score), .snew(snew), .tnew(tnew), .path(path),
    .score_out(score_out), .sout(sout), .tout(tout), .path_out(path_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("comparator2_tb: watchdog expired");
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

  // Drives the candidates and checks the output of the next clock.
  task automatic apply(logic [15:0][7:0] sc, logic [15:0][11:0] sn,
                       logic [15:0][11:0] tn, logic [15:0][15:0] pm);
    int best = -1;
    int bv = 0;
    logic [7:0] prev;
    for (int k = 0; k < 16; k++) if (int'(sc[k]) > bv) begin bv = int'(sc[k]); best = k; end
    @(negedge clk);
    prev  = score_out;
    score = sc;
    snew  = sn;
    tnew  = tn;
    path  = pm;
    #1;
    check("score held until the clock edge", 32'(score_out), 32'(prev));
    @(posedge clk);
    #1;
    check("score_out", 32'(score_out), 32'(bv));
    check("sout", 32'(sout), (best < 0) ? 0 : 32'(sn[best]));
    check("tout", 32'(tout), (best < 0) ? 0 : 32'(tn[best]));
    check("path_out", 32'(path_out), (best < 0) ? 0 : 32'(pm[best]));
  endtask

  initial begin
    logic [15:0][7:0]  sc;
    logic [15:0][11:0] sn, tn;
    logic [15:0][15:0] pm;
    repeat (2) @(posedge clk);
    #1;
    check("score_out in reset", 32'(score_out), 0);
    rst = 1'b0;

    // published case: only z16 has a result
    sc = '0; sn = '0; tn = '0; pm = '0;
    sc[15] = 8'd20; sn[15] = 12'h054; tn[15] = 12'h054; pm[15] = 16'h8421;
    apply(sc, sn, tn, pm);
    check("published Score_out", 32'(score_out), 20);
    check("published Sout", 32'(sout), 32'h054);
    check("published Tout", 32'(tout), 32'h054);

    apply('0, '0, '0, '0);
    for (int i = 0; i < 200; i++) begin
      int k;
      k = $urandom_range(15);
      sc = '0; sn = '0; tn = '0; pm = '0;
      sc[k] = 8'($urandom_range(105, 1));
      sn[k] = 12'($urandom); tn[k] = 12'($urandom); pm[k] = 16'($urandom);
      apply(sc, sn, tn, pm);
    end
    for (int i = 0; i < 300; i++) begin
      for (int k = 0; k < 16; k++) begin
        sc[k] = 8'($urandom_range(12));
        sn[k] = 12'($urandom); tn[k] = 12'($urandom); pm[k] = 16'($urandom);
      end
      apply(sc, sn, tn, pm);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
