// tb_sdf_two_nodes: two SDF nodes (default size) sharing memory over one
// snooping bus, to exercise speculation across nodes.
//
// The bus model serves one transaction at a time, round-robin between the
// nodes.  A read or write miss of one node is first shown to the other
// node's snoop port; dirty data that node supplies is written to memory, and
// only then does memory answer the requester, MEM_LAT cycles later.  A
// write-back goes straight to memory.  This ordering is the bus's own choice,
// as is the arbitration.
//
// Node 0 runs a speculative loop: a control thread spawns NCH iterations,
// iteration i computing x[idx[i]] += a[i]*b[i] and c[i] = x[idx[i]] (idx
// values repeat, so there are dependences inside the node).  As soon as
// iteration NCH-1 has read x[K] speculatively, node 1 is booted with a
// non-speculative thread that writes V to x[K].  That write miss reaches node
// 0 through its snoop port and must invalidate the speculative read.  Both
// outcomes a bus may produce are legal: node 1's write either comes before
// iteration NCH-1 commits (then x[K] = V + a*b and c = x[K]) or after it
// (then x[K] = V and c = old x[K] + a*b).  All other results must equal a
// sequential execution.  The results are read at the end by snooping both
// nodes.
module tb_sdf_two_nodes;
  import sdf_pkg::*;

  localparam int NCH = 8, MEM_LAT = 3;
  localparam int A = 'h100, B = 'h200, C = 'h300, X = 'h400, IDX = 'h500;
  localparam int K = 5;
  localparam word_t V = 32'd900;   // fits the 12-bit immediate

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic imem_we [2]; logic [IP_W-1:0] imem_waddr [2]; instr_t imem_wdata [2];
  logic boot_valid [2], boot_ready [2]; logic [IP_W-1:0] boot_ip [2]; word_t boot_fp [2];
  logic bus_valid [2], bus_ready [2]; bus_cmd_e bus_cmd [2]; word_t bus_addr [2], bus_wdata [2], bus_rdata [2];
  logic snp_valid [2], snp_ready [2], snp_wb [2]; bus_cmd_e snp_cmd [2]; word_t snp_addr [2], snp_wb_data [2];
  logic ev_commit [2], ev_retry [2], ev_spec_read [2], ev_ext_inval [2], ev_thread_done [2], ev_spec_wr_blocked [2];
  logic [EPN_W-1:0] next_epn [2]; logic quiet [2];

  for (genvar n = 0; n < 2; n++) begin : g_node
    sdf_node node (
      .clk, .rst_n,
      .imem_we(imem_we[n]), .imem_waddr(imem_waddr[n]), .imem_wdata(imem_wdata[n]),
      .boot_valid(boot_valid[n]), .boot_ip(boot_ip[n]), .boot_ready(boot_ready[n]), .boot_fp(boot_fp[n]),
      .bus_valid(bus_valid[n]), .bus_cmd(bus_cmd[n]), .bus_addr(bus_addr[n]), .bus_wdata(bus_wdata[n]),
      .bus_ready(bus_ready[n]), .bus_rdata(bus_rdata[n]),
      .snp_valid(snp_valid[n]), .snp_cmd(snp_cmd[n]), .snp_addr(snp_addr[n]),
      .snp_ready(snp_ready[n]), .snp_wb(snp_wb[n]), .snp_wb_data(snp_wb_data[n]),
      .ev_commit(ev_commit[n]), .ev_retry(ev_retry[n]), .ev_spec_read(ev_spec_read[n]),
      .ev_ext_inval(ev_ext_inval[n]), .ev_thread_done(ev_thread_done[n]),
      .ev_spec_wr_blocked(ev_spec_wr_blocked[n]), .next_epn(next_epn[n]), .quiet(quiet[n]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- memory and bus ----------------
  word_t mem [int];
  function automatic word_t rd(int a); return mem.exists(a) ? mem[a] : '0; endfunction

  // show a request to node n's snoop port; take its dirty data
  task automatic snoop_node(int n, bus_cmd_e c, word_t a);
    @(negedge clk);
    snp_valid[n] = 1; snp_cmd[n] = c; snp_addr[n] = a;
    #1 while (!snp_ready[n]) begin @(negedge clk); #1; end
    if (snp_wb[n]) mem[int'(a)] = snp_wb_data[n];
    @(negedge clk); snp_valid[n] = 0;
  endtask

  bit final_phase = 0, bus_idle = 1;
  int n_snooped_by [2] = '{0, 0};
  int last = 1;
  initial begin
    for (int n = 0; n < 2; n++) begin
      bus_ready[n] = 0; bus_rdata[n] = '0; snp_valid[n] = 0; snp_cmd[n] = BUS_READ_MISS; snp_addr[n] = '0;
    end
    forever begin
      int r;
      @(negedge clk);
      r = -1;
      for (int k = 1; k <= 2; k++) if (r < 0 && bus_valid[(last + k) % 2]) r = (last + k) % 2;
      if (r >= 0 && !final_phase) begin
        bus_idle = 0;
        last = r;
        if (bus_cmd[r] != BUS_WRITEBACK) begin
          snoop_node(1 - r, bus_cmd[r], bus_addr[r]);
          n_snooped_by[1 - r]++;
        end
        repeat (MEM_LAT) @(negedge clk);
        if (bus_cmd[r] == BUS_WRITEBACK) mem[int'(bus_addr[r])] = bus_wdata[r];
        bus_rdata[r] = rd(int'(bus_addr[r])); bus_ready[r] = 1;
        @(negedge clk); bus_ready[r] = 0;
        bus_idle = 1;
      end
    end
  end

  // ---------------- programs ----------------
  localparam int CTL_BODY = 4, CTL_POST = 22, CH_PRE = 32, CH_RETRY = 40, CH_BODY = 43, CH_POST = 47;
  instr_t prog0 [64], prog1 [8];
  initial begin
    for (int k = 0; k < 64; k++) prog0[k] = mk_instr(OP_NOP, 0, 0, 0, 0);
    prog0[0] = mk_instr(OP_ADDI, 1, 0, 0, 1);
    prog0[1] = mk_instr(OP_ADDI, 2, 0, 0, CH_RETRY);
    prog0[2] = mk_instr(OP_FORKEP, 0, 0, 0, CTL_BODY);
    prog0[3] = mk_instr(OP_STOP, 0, 0, 0, 0);
    for (int k = 0; k < NCH; k++) prog0[CTL_BODY+k]   = mk_instr(OP_SPFALLOC, 10+k, 1, 2, CH_PRE);
    for (int k = 0; k < NCH; k++) prog0[CTL_BODY+8+k] = mk_instr(OP_ADDI, 20+k, 0, 0, k);
    prog0[CTL_BODY+16] = mk_instr(OP_FORKSP, 0, 0, 0, CTL_POST);
    prog0[CTL_BODY+17] = mk_instr(OP_STOP, 0, 0, 0, 0);
    for (int k = 0; k < NCH; k++) prog0[CTL_POST+k] = mk_instr(OP_STORE, 20+k, 10+k, 0, 0);
    prog0[CTL_POST+8] = mk_instr(OP_STOP, 0, 0, 0, 0);
    prog0[32] = mk_instr(OP_LOAD,   2, 0, 0, 0);         // i
    prog0[33] = mk_instr(OP_ADDI,   3, 0, 0, A);
    prog0[34] = mk_instr(OP_IFETCH, 4, 3, 2, 0);         // a[i]
    prog0[35] = mk_instr(OP_ADDI,   5, 0, 0, B);
    prog0[36] = mk_instr(OP_IFETCH, 6, 5, 2, 0);         // b[i]
    prog0[37] = mk_instr(OP_ADDI,  13, 0, 0, IDX);
    prog0[38] = mk_instr(OP_IFETCH,12, 13, 2, 0);        // k = idx[i]
    prog0[39] = mk_instr(OP_ADDI,   7, 0, 0, X);
    prog0[40] = mk_instr(OP_SPREAD, 8, 7, 12, 0);        // x[k], speculative
    prog0[41] = mk_instr(OP_FORKEP, 0, 0, 0, CH_BODY);
    prog0[42] = mk_instr(OP_STOP, 0, 0, 0, 0);
    prog0[43] = mk_instr(OP_MUL,    9, 4, 6, 0);
    prog0[44] = mk_instr(OP_ADD,   10, 9, 8, 0);
    prog0[45] = mk_instr(OP_COMMIT, 0, 0, 0, CH_POST);
    prog0[46] = mk_instr(OP_STOP, 0, 0, 0, 0);
    prog0[47] = mk_instr(OP_ADDI,  11, 0, 0, C);
    prog0[48] = mk_instr(OP_ISTORE,10, 11, 2, 0);        // c[i]
    prog0[49] = mk_instr(OP_ISTORE,10, 7, 12, 0);        // x[k]
    prog0[50] = mk_instr(OP_STOP, 0, 0, 0, 0);
    // node 1: one non-speculative thread writes V to x[K]
    for (int k = 0; k < 8; k++) prog1[k] = mk_instr(OP_NOP, 0, 0, 0, 0);
    prog1[0] = mk_instr(OP_ADDI, 1, 0, 0, int'(V));
    prog1[1] = mk_instr(OP_ADDI, 2, 0, 0, X + K);
    prog1[2] = mk_instr(OP_ISTORE, 1, 2, 0, 0);
    prog1[3] = mk_instr(OP_STOP, 0, 0, 0, 0);
  end

  // ---------------- counters ----------------
  int n_commit = 0, n_retry = 0, n_ext = 0, n_done1 = 0;
  always @(posedge clk) if (rst_n) begin
    n_commit += int'(ev_commit[0]);
    n_retry  += int'(ev_retry[0]);
    n_ext    += int'(ev_ext_inval[0]);
    n_done1  += int'(ev_thread_done[1]);
  end

  // boot node 1 once iteration NCH-1 has read x[K] speculatively
  bit trigger = 0;
  always @(posedge clk)
    if (rst_n && !trigger)
      for (int p = 0; p < 4; p++)
        if (g_node[0].node.ab_ins_v[p] && g_node[0].node.ab_ins_a[p] == word_t'(X + K)) trigger = 1;

  int idx_v [NCH] = '{0, 1, 0, 2, 3, 3, 1, K};
  word_t av [NCH], bv [NCH], x0 [8];

  task automatic load(int n, int k, instr_t w);
    @(negedge clk); imem_we[n] = 1; imem_waddr[n] = IP_W'(k); imem_wdata[n] = w;
    @(negedge clk); imem_we[n] = 0;
  endtask

  task automatic boot(int n, int ip);
    @(negedge clk); boot_valid[n] = 1; boot_ip[n] = IP_W'(ip);
    do @(posedge clk); while (!boot_ready[n]);
    @(negedge clk); boot_valid[n] = 0;
  endtask

  initial begin
    int cyc;
    word_t xs [8], cs [NCH], xr [8];
    for (int n = 0; n < 2; n++) begin
      imem_we[n] = 0; imem_waddr[n] = '0; imem_wdata[n] = '0; boot_valid[n] = 0; boot_ip[n] = '0;
    end
    for (int i = 0; i < NCH; i++) begin
      av[i] = word_t'($urandom_range(1, 50)); bv[i] = word_t'($urandom_range(1, 50));
      mem[A+i] = av[i]; mem[B+i] = bv[i]; mem[IDX+i] = word_t'(idx_v[i]);
    end
    for (int k = 0; k < 8; k++) begin x0[k] = word_t'($urandom_range(0, 99)); mem[X+k] = x0[k]; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 64; k++) load(0, k, prog0[k]);
    for (int k = 0; k < 8; k++)  load(1, k, prog1[k]);
    boot(0, 0);
    wait (trigger);
    boot(1, 0);
    cyc = 0;
    while (!(quiet[0] && quiet[1] && bus_idle && next_epn[0] == EPN_W'(NCH+1) && n_done1 == 1) && cyc < 20000) begin
      @(posedge clk); cyc++;
    end
    check(next_epn[0] == EPN_W'(NCH+1), "node 0 retired every epoch");
    check(n_done1 == 1, "node 1 thread finished");
    // collect the results: dirty data may sit in either cache
    final_phase = 1;
    repeat (2) @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      snoop_node(0, BUS_READ_MISS, word_t'(X+k)); snoop_node(1, BUS_READ_MISS, word_t'(X+k)); xs[k] = rd(X+k);
    end
    for (int i = 0; i < NCH; i++) begin
      snoop_node(0, BUS_READ_MISS, word_t'(C+i)); snoop_node(1, BUS_READ_MISS, word_t'(C+i)); cs[i] = rd(C+i);
    end
    // sequential reference for everything except the last iteration
    for (int k = 0; k < 8; k++) xr[k] = x0[k];
    for (int i = 0; i < NCH - 1; i++) begin
      xr[idx_v[i]] += av[i] * bv[i];
      check(cs[i] == xr[idx_v[i]], $sformatf("c[%0d]=%0d expected %0d", i, cs[i], xr[idx_v[i]]));
    end
    for (int k = 0; k < 8; k++)
      if (k != K) check(xs[k] == xr[k], $sformatf("x[%0d]=%0d expected %0d", k, xs[k], xr[k]));
    begin
      word_t ab;
      bit w_first, w_last;
      ab      = av[NCH-1] * bv[NCH-1];
      w_first = (xs[K] == V + ab) && (cs[NCH-1] == V + ab);
      w_last  = (xs[K] == V) && (cs[NCH-1] == xr[K] + ab);
      check(w_first || w_last, $sformatf("x[K]=%0d c=%0d: neither legal ordering of the other node's write", xs[K], cs[NCH-1]));
      $display("node 1's write ordered %s iteration %0d", w_first ? "before" : "after", NCH-1);
    end
    $display("mechanisms: commits=%0d retries=%0d ext_inval=%0d snooped_by_node0=%0d snooped_by_node1=%0d cycles=%0d",
             n_commit, n_retry, n_ext, n_snooped_by[0], n_snooped_by[1], cyc);
    check(n_commit + n_retry == NCH, "every speculative thread committed or retried");
    check(n_ext >= 1, "the other node's write miss reached node 0's address buffer");
    check(n_snooped_by[0] >= 1 && n_snooped_by[1] >= 1, "both nodes snooped the other's misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

