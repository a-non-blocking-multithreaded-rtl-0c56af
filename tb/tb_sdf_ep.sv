// tb_sdf_ep: runs a thread body on one EP with a testbench register set and
// TSU.  Checks the arithmetic, FALLOC/SPFALLOC messages and the frame
// pointer written back, COMMIT and FORKSP continuations, the 4-cycle fork and
// the STOP behaviour after and without a fork, then 200 random arithmetic
// bodies (ADD, SUB, MUL, ADDI with a sign-extended immediate) against a
// sequential reference.
module tb_sdf_ep;
  import sdf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start_valid, idle; cont_t start_cont;
  logic [IP_W-1:0] imem_addr; instr_t imem_data;
  logic [RS_W-1:0] rf_set; logic [REG_AW-1:0] rf_a_reg, rf_b_reg, rf_w_reg; word_t rf_a_data, rf_b_data, rf_w_data; logic rf_we;
  logic msg_valid, msg_ready; msg_t msg; word_t alloc_fp;

  sdf_ep dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end endtask

  instr_t prog [64];
  word_t regs [32];
  assign imem_data = prog[imem_addr[5:0]];
  assign rf_a_data = (rf_a_reg == 0) ? '0 : regs[rf_a_reg];
  assign rf_b_data = (rf_b_reg == 0) ? '0 : regs[rf_b_reg];
  always_ff @(posedge clk) if (rf_we && rf_w_reg != 0) regs[rf_w_reg] <= rf_w_data;

  msg_t msgs [$]; int msg_cyc [$];
  int cyc = 0, fp_ctr = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  // the TSU accepts after a random delay
  always_ff @(posedge clk) msg_ready <= msg_valid && !msg_ready && ($urandom_range(0, 2) == 0);
  assign alloc_fp = 32'h8000 + fp_ctr * 16;
  always_ff @(posedge clk) if (msg_valid && msg_ready) begin
    msgs.push_back(msg); msg_cyc.push_back(cyc);
    if (msg.kind inside {MSG_FALLOC, MSG_SPFALLOC}) fp_ctr <= fp_ctr + 1;
  end

  int fork_exec_cyc = -1, fork_msg_first = -1;
  always_ff @(posedge clk) begin
    if (dut.state == dut.E_EXEC && imem_data.op inside {OP_FORKSP, OP_COMMIT}) fork_exec_cyc = cyc;
    if (msg_valid && fork_exec_cyc >= 0 && fork_msg_first < 0) fork_msg_first = cyc;
  end

  task automatic run(cont_t c);
    @(negedge clk); start_valid = 1; start_cont = c;
    @(negedge clk); start_valid = 0;
    while (!idle) @(negedge clk);
  endtask

  initial begin
    cont_t c;
    start_valid = 0; start_cont = '0;
    for (int r = 0; r < 32; r++) regs[r] = '0;
    for (int k = 0; k < 64; k++) prog[k] = mk_instr(OP_STOP, 0, 0, 0, 0);
    regs[8] = 7; regs[9] = 6; regs[10] = 100;
    prog[0] = mk_instr(OP_MUL,  11, 8, 9, 0);         // 42
    prog[1] = mk_instr(OP_ADD,  10, 10, 11, 0);       // 142
    prog[2] = mk_instr(OP_SUB,  12, 10, 8, 0);        // 135
    prog[3] = mk_instr(OP_ADDI, 13, 0, 0, -3);        // -3
    prog[4] = mk_instr(OP_ADDI, 14, 0, 0, 2);         // SC
    prog[5] = mk_instr(OP_ADDI, 15, 0, 0, 33);        // RIP
    prog[6] = mk_instr(OP_FALLOC,   16, 14, 0, 20);
    prog[7] = mk_instr(OP_SPFALLOC, 17, 14, 15, 21);
    prog[8] = mk_instr(OP_IFETCH,   18, 0, 0, 0);     // ignored on an EP
    prog[9] = mk_instr(OP_COMMIT,    0, 0, 0, 40);
    prog[10]= mk_instr(OP_STOP,      0, 0, 0, 0);
    prog[11]= mk_instr(OP_FORKSP,    0, 0, 0, 50);
    prog[12]= mk_instr(OP_STOP,      0, 0, 0, 0);
    repeat (2) @(posedge clk); rst_n = 1;

    c = '0; c.fp = 32'h3000; c.ip = 0; c.rs = 5; c.epn = 9; c.abi = 2; c.rip = 1;
    run(c);
    chk(rf_set == 5, "register set");
    chk(regs[11] == 42 && regs[10] == 142 && regs[12] == 135 && regs[13] == 32'hFFFF_FFFD, "arithmetic");
    chk(regs[16] == 32'h8000 && regs[17] == 32'h8010, "frame pointers of the new threads");
    chk(msgs.size() == 3, "three messages");
    chk(msgs[0].kind == MSG_FALLOC && msgs[0].cont.ip == 20 && msgs[0].cont.sc == 2, "FALLOC message");
    chk(msgs[1].kind == MSG_SPFALLOC && msgs[1].cont.ip == 21 && msgs[1].cont.sc == 2 && msgs[1].cont.rip == 33, "SPFALLOC message");
    chk(msgs[2].kind == MSG_COMMIT && msgs[2].cont.ip == 40 && msgs[2].cont.epn == 9 && msgs[2].cont.fp == 32'h3000,
        "COMMIT continuation");
    chk(fork_msg_first - fork_exec_cyc == 4, $sformatf("COMMIT takes 4 cycles (%0d)", fork_msg_first - fork_exec_cyc));
    chk(regs[18] == 0, "memory instruction ignored");

    msgs.delete(); fork_exec_cyc = -1; fork_msg_first = -1;
    c = '0; c.fp = 32'h3100; c.ip = 11; c.rs = 1;
    run(c);
    chk(msgs.size() == 1 && msgs[0].kind == MSG_FORKSP && msgs[0].cont.ip == 50 && msgs[0].cont.fp == 32'h3100, "FORKSP");
    chk(fork_msg_first - fork_exec_cyc == 4, "FORKSP takes 4 cycles");

    msgs.delete();
    c = '0; c.fp = 32'h3200; c.ip = 12; c.rs = 1;
    run(c);
    chk(msgs.size() == 1 && msgs[0].kind == MSG_STOP && msgs[0].cont.fp == 32'h3200, "STOP without fork ends the thread");

    // random arithmetic bodies against a sequential reference
    for (int t = 0; t < 200; t++) begin
      word_t ref_r [32];
      for (int r = 1; r < 32; r++) begin regs[r] = word_t'($urandom); ref_r[r] = regs[r]; end
      ref_r[0] = '0;
      for (int k = 0; k < 8; k++) begin
        automatic int rd = $urandom_range(1, 31), ra = $urandom_range(0, 31), rb = $urandom_range(0, 31);
        automatic int imm = $urandom_range(0, 4095);
        automatic int kind = $urandom_range(0, 3);
        word_t sx;
        sx = word_t'(signed'(12'(imm)));
        unique case (kind)
          0: begin prog[20+k] = mk_instr(OP_ADD,  rd, ra, rb, 0);   ref_r[rd] = ref_r[ra] + ref_r[rb]; end
          1: begin prog[20+k] = mk_instr(OP_SUB,  rd, ra, rb, 0);   ref_r[rd] = ref_r[ra] - ref_r[rb]; end
          2: begin prog[20+k] = mk_instr(OP_MUL,  rd, ra, rb, 0);   ref_r[rd] = ref_r[ra] * ref_r[rb]; end
          default: begin prog[20+k] = mk_instr(OP_ADDI, rd, ra, 0, imm); ref_r[rd] = ref_r[ra] + sx; end
        endcase
      end
      prog[28] = mk_instr(OP_STOP, 0, 0, 0, 0);
      msgs.delete();
      c = '0; c.fp = 32'h3300; c.ip = 20; c.rs = 3;
      run(c);
      for (int r = 1; r < 32; r++)
        chk(regs[r] == ref_r[r], $sformatf("random body %0d: R%0d=%0h expected %0h", t, r, regs[r], ref_r[r]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
