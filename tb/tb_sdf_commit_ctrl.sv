// tb_sdf_commit_ctrl: speculative continuations arrive in scrambled epoch
// order; some are marked violated.  Checks that they leave strictly in epoch
// order, that violated ones are retried at their RIP as non-speculative
// threads and the others committed unchanged, that each releases its ABI,
// and that the next epoch waits until the previous thread reports done.
module tb_sdf_commit_ctrl;
  import sdf_pkg::*;
  localparam int DEPTH = 8, NSETS = 8, N = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enq_valid, enq_ready; cont_t enq_cont;
  logic [NSETS-1:0] violated;
  logic commit_valid, commit_ready, retry_valid, retry_ready;
  cont_t commit_cont, retry_cont;
  logic abi_free_valid; logic [ABI_W-1:0] abi_free;
  logic done_valid; word_t done_fp;
  logic [EPN_W-1:0] next_epn; logic busy;

  sdf_commit_ctrl #(.DEPTH(DEPTH), .NSETS(NSETS)) dut (.*);

  int checks = 0, failures = 0;
  int expect_epn = 1, n_commit = 0, n_retry = 0, n_wait = 0;
  bit bad_of [N+1];
  cont_t outq [$];

  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end endtask

  // producer: epochs 1..N in blocks of 4, reversed inside each block
  initial begin
    int order [N];
    for (int b = 0; b < N; b += 4) for (int k = 0; k < 4; k++) order[b+k] = b + 4 - k;
    enq_valid = 0; enq_cont = '0; violated = '0;
    for (int e = 1; e <= N; e++) bad_of[e] = ($urandom_range(0, 2) == 0);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      enq_valid = 1;
      enq_cont = '0;
      enq_cont.epn = EPN_W'(order[i]);
      enq_cont.abi = ABI_W'(order[i] % NSETS);
      enq_cont.fp  = word_t'(32'h1000 + order[i]*16);
      enq_cont.ip  = IP_W'(100 + order[i]);
      enq_cont.rip = IP_W'(200 + order[i]);
      enq_cont.rs  = RS_W'(order[i]);
      do @(posedge clk); while (!enq_ready);
      @(negedge clk); enq_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  end

  // violation flags of the sets held by queued epochs
  always_comb begin
    violated = '0;
    for (int e = 1; e <= N; e++) if (bad_of[e] && e % NSETS < NSETS && e >= expect_epn && e < expect_epn + NSETS)
      violated[e % NSETS] = 1'b1;
  end

  // consumer: accepts, checks, then reports the thread done a few cycles later
  initial begin
    commit_ready = 0; retry_ready = 0; done_valid = 0; done_fp = '0;
    wait (rst_n);
    while (expect_epn <= N) begin
      @(negedge clk);
      commit_ready = $urandom_range(0, 1); retry_ready = $urandom_range(0, 1);
      #1;
      if (commit_valid || retry_valid) begin
        chk(!(commit_valid && retry_valid), "commit and retry at once");
        chk(commit_valid ? commit_cont.fp == word_t'(32'h1000 + expect_epn*16) : retry_cont.ip == IP_W'(200 + expect_epn),
            $sformatf("out of order, expected epoch %0d", expect_epn));
        chk(retry_valid == bad_of[expect_epn], $sformatf("epoch %0d violated=%0b", expect_epn, bad_of[expect_epn]));
        if (retry_valid) chk(retry_cont.epn == 0 && retry_cont.abi == 0 && retry_cont.rip == 0 &&
                             retry_cont.rs == RS_W'(expect_epn), "retry continuation fields");
        if (commit_valid) chk(commit_cont.ip == IP_W'(100 + expect_epn) && commit_cont.epn == 0 && commit_cont.abi == 0 &&
                              commit_cont.rs == RS_W'(expect_epn), "committed continuation is non-speculative");
      end
      if ((commit_valid && commit_ready) || (retry_valid && retry_ready)) begin
        chk(abi_free_valid && abi_free == ABI_W'(expect_epn % NSETS), "ABI released");
        n_commit += int'(commit_valid); n_retry += int'(retry_valid);
        @(negedge clk); commit_ready = 0; retry_ready = 0;
        // nothing else may leave before the done report
        repeat (3) begin
          #1 chk(!commit_valid && !retry_valid && busy, "waits for done"); n_wait++;
          @(negedge clk);
        end
        done_valid = 1; done_fp = word_t'(32'h1000 + expect_epn*16);
        @(negedge clk); done_valid = 0;
        expect_epn++;
        chk(next_epn == EPN_W'(expect_epn), "next_epn advanced");
      end
    end
    chk(n_commit > 0 && n_retry > 0, "both commits and retries happened");
    $display("commits=%0d retries=%0d", n_commit, n_retry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
