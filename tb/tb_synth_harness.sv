// tb_synth_harness: one SDF node with NU SPs and NU EPs, its memory, and a
// generator for the synthetic speculative loop; used by tb_sdf_synthetic.
//
// The task run(L, M, mode, ...) resets the node, writes a fresh program and
// data, boots a control thread and waits until every epoch has retired.  The
// control thread spawns NT speculative iterations at once (the "control
// thread spawning many iterations" scheme).  Iteration i:
//   preload   (SP): L reads of a[i], then a read of k = idx[i] and a
//                   speculative read of x[k];
//   body      (EP): r = a[i]*(M+1) by M additions, then v = x[k] + r;
//   post-store(SP): L writes of c[i] = v, then x[k] = v.
// L sets the SP load and M the EP load.  mode chooses idx: 0 = all distinct
// (no dependence, every speculation succeeds), 1 = i mod 4, 2 = all zero
// (every iteration depends on the previous one).  A failed iteration is
// retried from its speculative read, as the architecture prescribes: only
// the speculatively read data is read again.
//
// At the end the harness reads x and c back with snooped read misses and
// compares them with a sequential execution, reporting the mismatches, the
// cycle count and the commit and retry counts.  Memory answers a bus request
// after MEM_LAT cycles.
module tb_synth_harness #(parameter int NU = 4) (input logic clk);
  import sdf_pkg::*;

  localparam int NT = 16;
  localparam int MEM_LAT = 3;
  localparam int A = 'h100, C = 'h300, X = 'h400, IDX = 'h500;

  logic rst_n = 0;
  logic imem_we = 0; logic [IP_W-1:0] imem_waddr = '0; instr_t imem_wdata = '0;
  logic boot_valid = 0, boot_ready; logic [IP_W-1:0] boot_ip = '0; word_t boot_fp;
  logic bus_valid, bus_ready = 0; bus_cmd_e bus_cmd; word_t bus_addr, bus_wdata, bus_rdata = '0;
  logic snp_valid = 0, snp_ready, snp_wb; bus_cmd_e snp_cmd = BUS_READ_MISS; word_t snp_addr = '0, snp_wb_data;
  logic ev_commit, ev_retry, ev_spec_read, ev_ext_inval, ev_thread_done, ev_spec_wr_blocked;
  logic [EPN_W-1:0] next_epn; logic quiet;

  sdf_node #(.NSP(NU), .NEP(NU)) dut (.*);

  // memory
  word_t mem [int];
  function automatic word_t rd(int a); return mem.exists(a) ? mem[a] : '0; endfunction
  int lat = 0;
  always_ff @(posedge clk) begin
    bus_ready <= 1'b0;
    if (bus_valid && !bus_ready) begin
      if (lat == MEM_LAT) begin
        lat <= 0;
        bus_ready <= 1'b1;
        bus_rdata <= rd(int'(bus_addr));
        if (bus_cmd == BUS_WRITEBACK) mem[int'(bus_addr)] = bus_wdata;
      end else lat <= lat + 1;
    end
    if (snp_wb) mem[int'(snp_addr)] = snp_wb_data;
  end

  int n_commit, n_retry;
  always @(posedge clk) if (rst_n) begin
    n_commit += int'(ev_commit);
    n_retry  += int'(ev_retry);
  end

  instr_t prog [256];

  task automatic build(int L, int M);
    int pc, ctl_body, ctl_post, ch_pre, ch_retry, ch_body, ch_post;
    for (int k = 0; k < 256; k++) prog[k] = mk_instr(OP_NOP, 0, 0, 0, 0);
    ctl_body = 4;
    ctl_post = ctl_body + NT + 2;
    ch_pre   = ctl_post + 2*NT + 2;
    ch_retry = ch_pre + L + 5;
    ch_body  = ch_retry + 3;
    ch_post  = ch_body + M + 4;
    // control thread
    prog[0] = mk_instr(OP_ADDI, 1, 0, 0, 1);
    prog[1] = mk_instr(OP_ADDI, 2, 0, 0, ch_retry);
    prog[2] = mk_instr(OP_FORKEP, 0, 0, 0, ctl_body);
    prog[3] = mk_instr(OP_STOP, 0, 0, 0, 0);
    for (int k = 0; k < NT; k++) prog[ctl_body+k] = mk_instr(OP_SPFALLOC, 10+k, 1, 2, ch_pre);
    prog[ctl_body+NT]   = mk_instr(OP_FORKSP, 0, 0, 0, ctl_post);
    prog[ctl_body+NT+1] = mk_instr(OP_STOP, 0, 0, 0, 0);
    prog[ctl_post] = mk_instr(OP_ADDI, 3, 0, 0, 0);
    for (int k = 0; k < NT; k++) begin
      prog[ctl_post+1+2*k] = mk_instr(OP_STORE, 3, 10+k, 0, 0);     // send i
      prog[ctl_post+2+2*k] = mk_instr(OP_ADDI, 3, 3, 0, 1);
    end
    prog[ctl_post+1+2*NT] = mk_instr(OP_STOP, 0, 0, 0, 0);
    // iteration: preload
    pc = ch_pre;
    prog[pc++] = mk_instr(OP_LOAD, 2, 0, 0, 0);                     // i
    prog[pc++] = mk_instr(OP_ADDI, 3, 0, 0, A);
    for (int k = 0; k < L; k++) prog[pc++] = mk_instr(OP_IFETCH, 4, 3, 2, 0);
    prog[pc++] = mk_instr(OP_ADDI, 13, 0, 0, IDX);
    prog[pc++] = mk_instr(OP_IFETCH, 12, 13, 2, 0);                  // k
    prog[pc++] = mk_instr(OP_ADDI, 7, 0, 0, X);                      // pc is now ch_retry
    // retry entry: speculative read of x[k]
    prog[ch_retry]   = mk_instr(OP_SPREAD, 8, 7, 12, 0);
    prog[ch_retry+1] = mk_instr(OP_FORKEP, 0, 0, 0, ch_body);
    prog[ch_retry+2] = mk_instr(OP_STOP, 0, 0, 0, 0);
    // body
    pc = ch_body;
    prog[pc++] = mk_instr(OP_ADD, 9, 4, 0, 0);
    for (int k = 0; k < M; k++) prog[pc++] = mk_instr(OP_ADD, 9, 9, 4, 0);
    prog[pc++] = mk_instr(OP_ADD, 10, 8, 9, 0);
    prog[pc++] = mk_instr(OP_COMMIT, 0, 0, 0, ch_post);
    prog[pc++] = mk_instr(OP_STOP, 0, 0, 0, 0);
    // post-store
    pc = ch_post;
    prog[pc++] = mk_instr(OP_ADDI, 11, 0, 0, C);
    for (int k = 0; k < L; k++) prog[pc++] = mk_instr(OP_ISTORE, 10, 11, 2, 0);
    prog[pc++] = mk_instr(OP_ISTORE, 10, 7, 12, 0);
    prog[pc++] = mk_instr(OP_STOP, 0, 0, 0, 0);
  endtask

  task automatic snoop_read(int a);
    @(negedge clk);
    snp_valid = 1; snp_cmd = BUS_READ_MISS; snp_addr = word_t'(a);
    do @(posedge clk); while (!snp_ready);
    @(negedge clk); snp_valid = 0;
  endtask

  task automatic run(input int L, input int M, input int mode,
                     output int cycles, output int commits, output int retries, output int errors);
    word_t av [NT], xr [NT];
    int iv [NT];
    build(L, M);
    mem.delete();
    for (int i = 0; i < NT; i++) begin
      av[i] = word_t'($urandom_range(1, 100));
      iv[i] = (mode == 0) ? i : (mode == 1) ? i % 4 : 0;
      mem[A+i] = av[i]; mem[IDX+i] = word_t'(iv[i]);
      xr[i] = word_t'($urandom_range(0, 99)); mem[X+i] = xr[i];
    end
    @(negedge clk); rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1; n_commit = 0; n_retry = 0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk); imem_we = 1; imem_waddr = IP_W'(k); imem_wdata = prog[k];
    end
    @(negedge clk); imem_we = 0;
    boot_valid = 1; boot_ip = '0;
    do @(posedge clk); while (!boot_ready);
    @(negedge clk); boot_valid = 0;
    cycles = 0;
    while (!(quiet && next_epn == EPN_W'(NT+1)) && cycles < 40000) begin @(posedge clk); cycles++; end
    errors = (next_epn == EPN_W'(NT+1)) ? 0 : 1;
    // sequential reference
    for (int i = 0; i < NT; i++) begin
      word_t v;
      v = xr[iv[i]] + av[i] * word_t'(M + 1);
      xr[iv[i]] = v;
      snoop_read(C+i);
      if (rd(C+i) != v) begin
        errors++;
        $display("NU=%0d L=%0d M=%0d mode=%0d: c[%0d]=%0d expected %0d", NU, L, M, mode, i, rd(C+i), v);
      end
    end
    for (int k = 0; k < NT; k++) begin
      snoop_read(X+k);
      if (rd(X+k) != xr[k]) begin
        errors++;
        $display("NU=%0d L=%0d M=%0d mode=%0d: x[%0d]=%0d expected %0d", NU, L, M, mode, k, rd(X+k), xr[k]);
      end
    end
    commits = n_commit; retries = n_retry;
  endtask
endmodule
