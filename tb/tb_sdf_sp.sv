// tb_sdf_sp: runs small preload/post-store programs on one SP with a
// testbench register set, memory (answering after a random delay) and TSU.
// Checks frame loads, I-structure fetch/store, STORE plus its SYNC message,
// speculative reads (recorded in the address buffer only for speculative
// threads), dropped writes of speculative threads, write invalidations, the
// 4-cycle FORKEP and the STOP behaviour after and without a fork.
module tb_sdf_sp;
  import sdf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start_valid, idle; cont_t start_cont;
  logic [IP_W-1:0] imem_addr; instr_t imem_data;
  logic [RS_W-1:0] rf_set; logic [REG_AW-1:0] rf_a_reg, rf_b_reg, rf_w_reg; word_t rf_a_data, rf_b_data, rf_w_data; logic rf_we;
  logic mem_valid, mem_done; creq_e mem_cmd; word_t mem_addr, mem_wdata, mem_rdata;
  logic ins_valid, inv_valid; logic [ABI_W-1:0] ins_abi; word_t ins_addr, inv_addr;
  logic msg_valid, msg_ready; msg_t msg; logic spec_wr_blocked;

  sdf_sp dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end endtask

  instr_t prog [64];
  word_t regs [32];
  word_t mem [int];
  assign imem_data = prog[imem_addr[5:0]];
  assign rf_a_data = (rf_a_reg == 0) ? '0 : regs[rf_a_reg];
  assign rf_b_data = (rf_b_reg == 0) ? '0 : regs[rf_b_reg];
  always_ff @(posedge clk) if (rf_we && rf_w_reg != 0) regs[rf_w_reg] <= rf_w_data;

  int wait_n = 0;
  always_ff @(posedge clk) begin
    mem_done <= 1'b0;
    if (mem_valid && !mem_done) begin
      if (wait_n == 0) begin
        mem_done  <= 1'b1;
        mem_rdata <= mem.exists(int'(mem_addr)) ? mem[int'(mem_addr)] : '0;
        if (mem_cmd == CREQ_WRITE) mem[int'(mem_addr)] = mem_wdata;
        wait_n <= $urandom_range(0, 3);
      end else wait_n <= wait_n - 1;
    end
  end

  msg_t msgs [$]; int msg_cyc [$];
  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  always_ff @(posedge clk) if (msg_valid && msg_ready) begin msgs.push_back(msg); msg_cyc.push_back(cyc); end
  assign msg_ready = msg_valid;
  int n_ins = 0, n_inv = 0, n_blk = 0, n_spread_cmd = 0; word_t last_ins, last_inv;
  always_ff @(posedge clk) begin
    if (ins_valid) begin n_ins++; last_ins = ins_addr; chk(ins_abi == 3, "insert ABI"); end
    if (inv_valid) begin n_inv++; last_inv = inv_addr; end
    if (spec_wr_blocked) n_blk++;
    if (mem_valid && mem_done && mem_cmd == CREQ_SPREAD) n_spread_cmd++;
  end

  int fork_exec_cyc = -1;
  always_ff @(posedge clk) if (dut.state == dut.P_EXEC && imem_data.op == OP_FORKEP) fork_exec_cyc = cyc;

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
    mem[32'h2000 + 1] = 111;  // frame word 1
    mem['h105] = 222;         // a[5]
    mem['h40]  = 333;
    prog[0] = mk_instr(OP_LOAD,   2, 0, 0, 1);       // R2 = frame[1]
    prog[1] = mk_instr(OP_ADDI,   3, 0, 0, 'h100);   // R3 = 0x100
    prog[2] = mk_instr(OP_ADDI,   4, 0, 0, 5);       // R4 = 5
    prog[3] = mk_instr(OP_IFETCH, 5, 3, 4, 0);       // R5 = mem[0x105]
    prog[4] = mk_instr(OP_ADD,    6, 2, 5, 0);       // R6 = R2 + R5
    prog[5] = mk_instr(OP_ISTORE, 6, 3, 4, 16);      // mem[0x105] = R6 (rd = data)
    prog[6] = mk_instr(OP_ADDI,   7, 0, 0, 'h40);
    prog[7] = mk_instr(OP_SPREAD, 8, 7, 0, 0);       // R8 = mem[0x40]
    prog[8] = mk_instr(OP_ADDI,   9, 0, 0, 'h300);
    prog[9] = mk_instr(OP_STORE,  6, 9, 0, 2);       // mem[0x302] = R6, SYNC frame 0x300
    prog[10]= mk_instr(OP_FORKEP, 0, 0, 0, 44);
    prog[11]= mk_instr(OP_STOP,   0, 0, 0, 0);
    repeat (2) @(posedge clk); rst_n = 1;

    // non-speculative thread
    c = '0; c.fp = 32'h2000; c.ip = 0; c.rs = 2;
    run(c);
    chk(rf_set == 2, "register set of the thread");
    chk(regs[2] == 111 && regs[5] == 222 && regs[6] == 333 && regs[8] == 333, "loads, fetch, add, speculative read");
    chk(mem['h105] == 333 && mem['h302] == 333, "ISTORE and STORE wrote memory");
    chk(n_ins == 0 && n_spread_cmd == 0, "non-speculative SPREAD is a plain read");
    chk(n_inv == 2 && last_inv == 'h302, "writes sent to the address buffer");
    chk(msgs.size() == 2 && msgs[0].kind == MSG_SYNC && msgs[0].cont.fp == 'h300, "SYNC to the frame written");
    chk(msgs[1].kind == MSG_FORKEP && msgs[1].cont.ip == 44 && msgs[1].cont.fp == 32'h2000 && msgs[1].cont.rs == 2,
        "FORKEP continuation");
    chk(msg_cyc[1] - fork_exec_cyc == 4, $sformatf("FORKEP takes 4 cycles (%0d)", msg_cyc[1] - fork_exec_cyc));

    // speculative thread: writes dropped, speculative read recorded
    msgs.delete(); n_inv = 0;
    mem['h105] = 222;
    c = '0; c.fp = 32'h2000; c.ip = 0; c.rs = 1; c.epn = 4; c.abi = 3; c.rip = 7;
    run(c);
    chk(mem['h105] == 222 && mem['h302] == 333 && n_inv == 0 && n_blk == 2, "speculative writes dropped");
    chk(n_ins == 1 && last_ins == 'h40 && n_spread_cmd == 1, "speculative read recorded");
    chk(msgs.size() == 1 && msgs[0].kind == MSG_FORKEP && msgs[0].cont.epn == 4 && msgs[0].cont.rip == 7,
        "no SYNC; FORKEP keeps the speculation fields");

    // post-store ending the thread
    msgs.delete();
    c = '0; c.fp = 32'h2000; c.ip = 11; c.rs = 2;
    run(c);
    chk(msgs.size() == 1 && msgs[0].kind == MSG_STOP && msgs[0].cont.fp == 32'h2000, "STOP without fork ends the thread");
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
