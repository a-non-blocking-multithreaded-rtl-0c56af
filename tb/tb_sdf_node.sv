// tb_sdf_node: end-to-end test of one SDF node with thread-level speculation.
//
// Workload: a control thread (booted from outside) spawns NCH speculative
// child threads, one per loop iteration, in epoch order, and hands each its
// iteration number i through its frame.  Child i computes
//     x[idx[i]] = x[idx[i]] + a[i]*b[i];   c[i] = x[idx[i]]
// reading x[idx[i]] speculatively in its preload and writing x and c in its
// post-store.  Iterations that share an idx value are true dependences that
// the hardware must catch (violation, retry at RIP) when a later iteration
// read x before an earlier one wrote it.  Each child also tries a write in
// its speculative preload, which the node must drop.  While the last child is
// waiting to commit, the testbench plays another node and writes its x entry
// over the bus (a snooped write miss), which must violate that child too.
//
// The testbench is the shared memory: it answers the node's bus requests
// after MEM_LAT cycles.  At the end it reads every result over the bus (a
// snooped read miss makes the node write dirty data back) and compares with
// a sequential execution of the loop computed here.  It also counts each
// mechanism (commit, retry, speculative read, external invalidation, blocked
// speculative write, write-back, write miss) and fails if one never happened.
module tb_sdf_node;
  import sdf_pkg::*;

  localparam int NCH     = 8;
  localparam int MEM_LAT = 3;
  localparam int A = 'h100, B = 'h200, C = 'h300, X = 'h400, IDX = 'h500, SCR = 'h600;
  localparam int EXT_K = 5;          // x entry written by the other node
  localparam int EXT_DELTA = 1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic imem_we; logic [IP_W-1:0] imem_waddr; instr_t imem_wdata;
  logic boot_valid, boot_ready; logic [IP_W-1:0] boot_ip; word_t boot_fp;
  logic bus_valid, bus_ready; bus_cmd_e bus_cmd; word_t bus_addr, bus_wdata, bus_rdata;
  logic snp_valid, snp_ready, snp_wb; bus_cmd_e snp_cmd; word_t snp_addr, snp_wb_data;
  logic ev_commit, ev_retry, ev_spec_read, ev_ext_inval, ev_thread_done, ev_spec_wr_blocked;
  logic [EPN_W-1:0] next_epn; logic quiet;

  sdf_node dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- memory model ----------------
  word_t mem [int];
  function automatic word_t rd(int a); return mem.exists(a) ? mem[a] : '0; endfunction
  int lat = 0;
  int n_wb = 0, n_wm = 0, n_rm = 0;
  always_ff @(posedge clk) begin
    bus_ready <= 1'b0;
    if (bus_valid && !bus_ready) begin
      if (lat == MEM_LAT) begin
        lat <= 0;
        bus_ready <= 1'b1;
        bus_rdata <= rd(int'(bus_addr));
        unique case (bus_cmd)
          BUS_WRITEBACK:  begin mem[int'(bus_addr)] = bus_wdata; n_wb++; end
          BUS_WRITE_MISS: n_wm++;
          default:        n_rm++;
        endcase
      end else lat <= lat + 1;
    end
    if (snp_wb) mem[int'(snp_addr)] = snp_wb_data;
  end

  // ---------------- event counters ----------------
  int n_commit = 0, n_retry = 0, n_spread = 0, n_ext = 0, n_done = 0, n_blk = 0;
  always @(posedge clk) if (rst_n) begin
    n_commit += int'(ev_commit);
    n_retry  += int'(ev_retry);
    n_spread += int'(ev_spec_read);
    n_ext    += int'(ev_ext_inval);
    n_done   += int'(ev_thread_done);
    n_blk    += int'(ev_spec_wr_blocked);
  end

  // ---------------- program ----------------
  localparam int CTL_BODY = 4, CTL_POST = 22, CH_PRE = 32, CH_RETRY = 42, CH_BODY = 45, CH_POST = 49;
  instr_t prog [64];
  initial begin
    for (int k = 0; k < 64; k++) prog[k] = mk_instr(OP_NOP, 0, 0, 0, 0);
    // control thread: preload
    prog[0] = mk_instr(OP_ADDI, 1, 0, 0, 1);          // SC of each child
    prog[1] = mk_instr(OP_ADDI, 2, 0, 0, CH_RETRY);   // RIP of each child
    prog[2] = mk_instr(OP_FORKEP, 0, 0, 0, CTL_BODY);
    prog[3] = mk_instr(OP_STOP, 0, 0, 0, 0);
    // control thread: body spawns the children in iteration order
    for (int k = 0; k < NCH; k++) prog[CTL_BODY+k]     = mk_instr(OP_SPFALLOC, 10+k, 1, 2, CH_PRE);
    for (int k = 0; k < NCH; k++) prog[CTL_BODY+8+k]   = mk_instr(OP_ADDI, 20+k, 0, 0, k);
    prog[CTL_BODY+16] = mk_instr(OP_FORKSP, 0, 0, 0, CTL_POST);
    prog[CTL_BODY+17] = mk_instr(OP_STOP, 0, 0, 0, 0);
    // control thread: post-store sends i to child i
    for (int k = 0; k < NCH; k++) prog[CTL_POST+k] = mk_instr(OP_STORE, 20+k, 10+k, 0, 0);
    prog[CTL_POST+8] = mk_instr(OP_STOP, 0, 0, 0, 0);
    // child: preload
    prog[32] = mk_instr(OP_LOAD,   2, 0, 0, 0);        // i
    prog[33] = mk_instr(OP_ADDI,   3, 0, 0, A);
    prog[34] = mk_instr(OP_IFETCH, 4, 3, 2, 0);        // a[i]
    prog[35] = mk_instr(OP_ADDI,   5, 0, 0, B);
    prog[36] = mk_instr(OP_IFETCH, 6, 5, 2, 0);        // b[i]
    prog[37] = mk_instr(OP_ADDI,  13, 0, 0, IDX);
    prog[38] = mk_instr(OP_IFETCH,12, 13, 2, 0);       // k = idx[i]
    prog[39] = mk_instr(OP_ADDI,   7, 0, 0, X);
    prog[40] = mk_instr(OP_ADDI,  14, 0, 0, SCR);
    prog[41] = mk_instr(OP_ISTORE, 2, 14, 2, 0);       // must be dropped
    prog[42] = mk_instr(OP_SPREAD, 8, 7, 12, 0);       // x[k], speculative
    prog[43] = mk_instr(OP_FORKEP, 0, 0, 0, CH_BODY);
    prog[44] = mk_instr(OP_STOP, 0, 0, 0, 0);
    // child: body
    prog[45] = mk_instr(OP_MUL,    9, 4, 6, 0);
    prog[46] = mk_instr(OP_ADD,   10, 9, 8, 0);
    prog[47] = mk_instr(OP_COMMIT, 0, 0, 0, CH_POST);
    prog[48] = mk_instr(OP_STOP, 0, 0, 0, 0);
    // child: post-store
    prog[49] = mk_instr(OP_ADDI,  11, 0, 0, C);
    prog[50] = mk_instr(OP_ISTORE,10, 11, 2, 0);       // c[i]
    prog[51] = mk_instr(OP_ISTORE,10, 7, 12, 0);       // x[k]
    prog[52] = mk_instr(OP_STOP, 0, 0, 0, 0);
  end

  // ---------------- other node: write x[EXT_K] while it is read speculatively
  bit ext_done = 0;
  always @(posedge clk) begin
    if (rst_n && !ext_done) begin
      for (int p = 0; p < 4; p++)
        if (dut.ab_ins_v[p] && dut.ab_ins_a[p] == word_t'(X + EXT_K)) ext_done = 1;
    end
  end

  int idx_v [NCH] = '{0, 1, 0, 2, 3, 3, 1, EXT_K};
  word_t av [NCH], bv [NCH], x0 [8];

  initial begin
    int cyc;
    word_t xs [8];
    word_t cs [NCH];
    imem_we = 0; imem_waddr = '0; imem_wdata = '0;
    boot_valid = 0; boot_ip = '0;
    snp_valid = 0; snp_cmd = BUS_READ_MISS; snp_addr = '0;
    for (int i = 0; i < NCH; i++) begin
      av[i] = word_t'($urandom_range(1, 50));
      bv[i] = word_t'($urandom_range(1, 50));
      mem[A+i] = av[i]; mem[B+i] = bv[i]; mem[IDX+i] = word_t'(idx_v[i]);
    end
    for (int k = 0; k < 8; k++) begin x0[k] = word_t'($urandom_range(0, 99)); mem[X+k] = x0[k]; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk); imem_we = 1; imem_waddr = IP_W'(k); imem_wdata = prog[k];
    end
    @(negedge clk); imem_we = 0;
    // start the control thread
    boot_valid = 1; boot_ip = '0;
    do @(posedge clk); while (!boot_ready);
    @(negedge clk); boot_valid = 0;

    // the other node's write, as soon as x[EXT_K] has been read speculatively
    wait (ext_done);
    @(negedge clk);
    snp_valid = 1; snp_cmd = BUS_WRITE_MISS; snp_addr = word_t'(X + EXT_K);
    do @(posedge clk); while (!snp_ready);
    #1 mem[X+EXT_K] = rd(X+EXT_K) + EXT_DELTA;
    @(negedge clk); snp_valid = 0;

    // run to completion
    cyc = 0;
    while (!(quiet && next_epn == EPN_W'(NCH+1)) && cyc < 20000) begin @(posedge clk); cyc++; end
    check(quiet, "node went quiet");
    check(next_epn == EPN_W'(NCH+1), $sformatf("all epochs retired, next_epn=%0d", next_epn));

    // read the results over the bus: a snooped read miss returns dirty data
    for (int k = 0; k < 8; k++) begin
      snoop_read(X+k); xs[k] = rd(X+k);
    end
    for (int i = 0; i < NCH; i++) begin
      snoop_read(C+i); cs[i] = rd(C+i);
      snoop_read(SCR+i);
    end

    // sequential reference
    begin
      word_t xr [8];
      for (int k = 0; k < 8; k++) xr[k] = x0[k];
      xr[EXT_K] += EXT_DELTA;   // the other node's write came before child NCH-1 committed
      for (int i = 0; i < NCH; i++) begin
        xr[idx_v[i]] += av[i] * bv[i];
        check(cs[i] == xr[idx_v[i]], $sformatf("c[%0d]=%0d expected %0d", i, cs[i], xr[idx_v[i]]));
      end
      for (int k = 0; k < 8; k++)
        check(xs[k] == xr[k], $sformatf("x[%0d]=%0d expected %0d", k, xs[k], xr[k]));
      for (int i = 0; i < NCH; i++)
        check(rd(SCR+i) == '0, $sformatf("speculative write to scratch[%0d] reached memory", i));
    end

    $display("mechanisms: commits=%0d retries=%0d spec_reads=%0d ext_inval=%0d blocked_writes=%0d done=%0d writebacks=%0d write_misses=%0d read_misses=%0d cycles=%0d",
             n_commit, n_retry, n_spread, n_ext, n_blk, n_done, n_wb, n_wm, n_rm, cyc);
    check(n_commit >= 1, "a speculative thread committed");
    check(n_retry  >= 2, "violated threads were retried (dependence and external write)");
    check(n_commit + n_retry == NCH, "every speculative thread committed or retried once");
    check(n_spread >= NCH, "speculative reads recorded");
    check(n_ext    >= 1, "bus write miss invalidated the address buffer");
    check(n_blk    == NCH, "speculative writes blocked");
    check(n_done   == NCH + 1, "all threads finished");
    check(n_wb     >= 1, "dirty line written back");
    check(n_wm     >= 1, "write miss placed on the bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic snoop_read(int a);
    @(negedge clk);
    snp_valid = 1; snp_cmd = BUS_READ_MISS; snp_addr = word_t'(a);
    do @(posedge clk); while (!snp_ready);
    @(negedge clk); snp_valid = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
