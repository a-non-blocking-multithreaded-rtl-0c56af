// tb_sdf_tsu: directed test of the thread schedule unit: frame allocation
// (normal and speculative, with epoch numbers and address-buffer IDs),
// synchronization-count decrement and thread enabling, register-set
// allocation and its exhaustion, routing of FORKEP/FORKSP/COMMIT messages,
// thread termination, ABI exhaustion, boot and round-robin service.
module tb_sdf_tsu;
  import sdf_pkg::*;
  localparam int NP = 2, NFRAMES = 4, NRS = 2, NSETS = 2, FW = 16;
  localparam word_t FB = 32'h0001_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic msg_valid [NP], msg_ready [NP]; msg_t msg [NP]; word_t alloc_fp;
  logic boot_valid, boot_ready; logic [IP_W-1:0] boot_ip; word_t boot_fp;
  logic pl_valid, pl_ready, ex_valid, ex_ready, ps_valid, ps_ready, sc_valid, sc_ready;
  cont_t pl_cont, ex_cont, ps_cont, sc_cont;
  logic abi_free_valid; logic [ABI_W-1:0] abi_free;
  logic ab_clear_valid; logic [ABI_W-1:0] ab_clear_abi;
  logic done_valid; word_t done_fp;
  logic [$clog2(NFRAMES+1)-1:0] live_threads;

  sdf_tsu #(.NP(NP), .NFRAMES(NFRAMES), .NRS(NRS), .NSETS(NSETS), .FRAME_WORDS(FW), .FRAME_BASE(FB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end endtask

  // captured in the cycle a message is accepted
  word_t got_fp; bit got_ex, got_ps, got_sc, got_clr, got_done; logic [ABI_W-1:0] got_clr_abi;
  cont_t got_cont;

  task automatic send(int p, msg_e k, cont_t c, int max_wait = 20, output bit ok);
    int w = 0;
    @(negedge clk);
    msg_valid[p] = 1; msg[p].kind = k; msg[p].cont = c;
    #1;
    while (!msg_ready[p] && w < max_wait) begin @(negedge clk); #1; w++; end
    ok = msg_ready[p];
    got_fp = alloc_fp; got_ex = ex_valid; got_ps = ps_valid; got_sc = sc_valid;
    got_clr = ab_clear_valid; got_clr_abi = ab_clear_abi; got_done = done_valid;
    got_cont = ex_valid ? ex_cont : ps_valid ? ps_cont : sc_cont;
    @(negedge clk); msg_valid[p] = 0;
  endtask

  // collect enabled threads
  cont_t enabled [$];
  always @(posedge clk) if (rst_n && pl_valid && pl_ready) enabled.push_back(pl_cont);

  initial begin
    cont_t c; bit ok; word_t fp0, fp1, fp2;
    for (int p = 0; p < NP; p++) begin msg_valid[p] = 0; msg[p] = '0; end
    boot_valid = 0; boot_ip = '0; pl_ready = 1; ex_ready = 1; ps_ready = 1; sc_ready = 1;
    abi_free_valid = 0; abi_free = '0;
    repeat (2) @(posedge clk); rst_n = 1;

    c = '0; c.ip = 5; c.sc = 2;
    send(0, MSG_FALLOC, c, 20, ok); fp0 = got_fp;
    chk(ok && fp0 == FB, "FALLOC gets frame 0");
    c = '0; c.ip = 7; c.sc = 1; c.rip = 9;
    send(1, MSG_SPFALLOC, c, 20, ok); fp1 = got_fp;
    chk(ok && fp1 == FB + FW, "SPFALLOC gets frame 1");
    chk(got_clr && got_clr_abi == 0, "address-buffer set 0 cleared");
    repeat (3) @(negedge clk);
    chk(enabled.size() == 0, "nothing enabled before inputs arrive");
    c = '0; c.fp = fp0;
    send(0, MSG_SYNC, c, 20, ok);
    repeat (3) @(negedge clk);
    chk(enabled.size() == 0, "SC 2 -> 1: not yet enabled");
    send(1, MSG_SYNC, c, 20, ok);
    repeat (2) @(negedge clk);
    chk(enabled.size() == 1 && enabled[0].ip == 5 && enabled[0].fp == fp0 && enabled[0].epn == 0 && enabled[0].rs == 0,
        "thread 0 enabled with register set 0");
    c = '0; c.fp = fp1;
    send(0, MSG_SYNC, c, 20, ok);
    repeat (2) @(negedge clk);
    chk(enabled.size() == 2 && enabled[1].epn == 1 && enabled[1].abi == 0 && enabled[1].rip == 9 && enabled[1].rs == 1,
        "speculative thread enabled: EPN 1, ABI 0, RIP kept, register set 1");
    // third thread needs no input but no register set is free
    c = '0; c.ip = 3; c.sc = 0;
    send(1, MSG_FALLOC, c, 20, ok); fp2 = got_fp;
    repeat (3) @(negedge clk);
    chk(fp2 == FB + 2*FW && enabled.size() == 2, "waits for a register set");
    chk(live_threads == 3, "three live threads");
    // routing
    send(0, MSG_FORKEP, enabled[0], 20, ok);
    chk(got_ex && !got_ps && !got_sc && got_cont.ip == 5, "FORKEP -> execution queue");
    send(1, MSG_FORKSP, enabled[0], 20, ok);
    chk(got_ps && !got_ex && !got_sc, "FORKSP -> post-store queue");
    send(0, MSG_COMMIT, enabled[1], 20, ok);
    chk(got_sc && !got_ps, "COMMIT of speculative thread -> commit queue");
    send(0, MSG_COMMIT, enabled[0], 20, ok);
    chk(got_ps && !got_sc, "COMMIT of non-speculative thread -> post-store queue");
    // a full queue holds the message back
    ex_ready = 0;
    send(0, MSG_FORKEP, enabled[0], 4, ok);
    chk(!ok, "FORKEP waits while the execution queue is full");
    ex_ready = 1;
    // STOP frees register set 0: the third thread is enabled with it
    send(1, MSG_STOP, enabled[0], 20, ok);
    chk(got_done, "STOP reported done");
    repeat (2) @(negedge clk);
    chk(enabled.size() == 3 && enabled[2].ip == 3 && enabled[2].rs == 0 && enabled[2].fp == fp2, "third thread gets the freed set");
    // ABIs: set 0 in use, set 1 free, then none
    c = '0; c.ip = 1; c.sc = 1;
    send(0, MSG_SPFALLOC, c, 20, ok);
    chk(ok && got_clr_abi == 1, "second speculative thread gets ABI 1");
    send(1, MSG_SPFALLOC, c, 4, ok);
    chk(!ok, "no ABI left: SPFALLOC waits");
    @(negedge clk); abi_free_valid = 1; abi_free = 0; @(negedge clk); abi_free_valid = 0;
    send(1, MSG_SPFALLOC, c, 20, ok);
    chk(ok && got_clr_abi == 0, "freed ABI 0 reused");
    // all four frames are now in use: a further FALLOC waits
    send(0, MSG_FALLOC, c, 4, ok);
    chk(!ok, "no frame left: FALLOC waits");
    // boot: free a frame first
    c = '0; c.fp = fp0 + FW*0; c.fp = fp1; c.rs = 1;
    send(0, MSG_STOP, c, 20, ok);
    @(negedge clk);
    boot_valid = 1; boot_ip = 12;
    #1 while (!boot_ready) begin @(negedge clk); #1; end
    chk(boot_fp == fp1, "boot takes the freed frame");
    @(negedge clk); boot_valid = 0;
    repeat (3) @(negedge clk);
    chk(enabled[enabled.size()-1].ip == 12, "booted thread enabled");
    // round robin: both ports at once are both served
    @(negedge clk);
    msg_valid[0] = 1; msg[0].kind = MSG_FORKEP; msg[0].cont = enabled[0];
    msg_valid[1] = 1; msg[1].kind = MSG_FORKSP; msg[1].cont = enabled[0];
    begin
      int served = 0;
      repeat (2) begin
        #1 if (msg_ready[0]) begin served |= 1; @(negedge clk); msg_valid[0] = 0; end
        else if (msg_ready[1]) begin served |= 2; @(negedge clk); msg_valid[1] = 0; end
        else @(negedge clk);
      end
      chk(served == 3, "two requesters served in two cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
