// tb_sdf_synthetic: the synthetic speculative-loop workload on nodes with
// 2, 4 and 8 SPs and EPs (the 4-SP, 4-EP node is the default size).
//
// Each node runs the same loop (see tb_synth_harness) at three SP/EP load
// mixes -- SP-heavy (L=8, M=2), balanced (L=4, M=6) and EP-heavy (L=2,
// M=12) -- and three dependence patterns: none, every fourth iteration, and
// a chain through one location.  Every run must produce the results of a
// sequential execution, and every iteration must either commit or be retried
// exactly once.  Without dependences no iteration may be retried; with a
// chain at least one must be.  The cycle counts are printed as a table, the
// speculation success rate being commits / iterations; they are not checked,
// because the architecture gives no cycle counts for this loop.
module tb_sdf_synthetic;
  logic clk = 0;
  always #5 clk = ~clk;

  tb_synth_harness #(.NU(2)) h2 (.clk);
  tb_synth_harness #(.NU(4)) h4 (.clk);
  tb_synth_harness #(.NU(8)) h8 (.clk);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int Ls [3] = '{8, 4, 2};
  int Ms [3] = '{2, 6, 12};

  task automatic judge(int nu, int L, int M, int mode, int cyc, int com, int ret, int err);
    $display("NU=%0d L=%0d M=%0d deps=%0d: cycles=%0d commits=%0d retries=%0d", nu, L, M, mode, cyc, com, ret);
    check(err == 0, $sformatf("NU=%0d L=%0d M=%0d deps=%0d results match sequential execution", nu, L, M, mode));
    check(com + ret == 16, $sformatf("NU=%0d L=%0d M=%0d deps=%0d every iteration committed or retried", nu, L, M, mode));
    if (mode == 0) check(ret == 0, $sformatf("NU=%0d deps=none: no retries", nu));
    if (mode == 2) check(ret >= 1, $sformatf("NU=%0d deps=chain: violations caught", nu));
  endtask

  initial begin
    int cyc, com, ret, err;
    for (int w = 0; w < 3; w++)
      for (int mode = 0; mode < 3; mode++) begin
        h2.run(Ls[w], Ms[w], mode, cyc, com, ret, err); judge(2, Ls[w], Ms[w], mode, cyc, com, ret, err);
        h4.run(Ls[w], Ms[w], mode, cyc, com, ret, err); judge(4, Ls[w], Ms[w], mode, cyc, com, ret, err);
        h8.run(Ls[w], Ms[w], mode, cyc, com, ret, err); judge(8, Ls[w], Ms[w], mode, cyc, com, ret, err);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
