// tb_sdf_spec_cache: random reads, speculative reads and writes from two SPs
// and snooped bus read/write misses, against a reference model of the line
// states ({SpRead, Valid, Dirty}) and of memory contents.  Checks read data
// (coherence with the other node's writes and write-backs), every line state
// after every operation, the bus transaction each miss or upgrade places, the
// write-back data on snoops, the address-buffer invalidation on bus write
// misses, the 2-cycle hit latency, and that two simultaneous requests are
// both served.  Some snoops arrive while a request is under way, to check
// that the cache takes them while it waits for its own bus transaction.
module tb_sdf_spec_cache;
  import sdf_pkg::*;
  localparam int NSP = 2, NLINES = 4, NADDR = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid [NSP], req_done [NSP]; creq_e req_cmd [NSP]; word_t req_addr [NSP], req_wdata [NSP];
  word_t rdata;
  logic bus_valid, bus_ready; bus_cmd_e bus_cmd; word_t bus_addr, bus_wdata, bus_rdata;
  logic snp_valid, snp_ready, snp_wb; bus_cmd_e snp_cmd; word_t snp_addr, snp_wb_data;
  logic ext_inv_valid; word_t ext_inv_addr;

  sdf_spec_cache #(.NSP(NSP), .NLINES(NLINES)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end endtask

  // memory seen by the bus, and the value a coherent read must return
  word_t mem [NADDR], golden [NADDR];
  bus_cmd_e seen [$];
  int lat = 0;
  always_ff @(posedge clk) begin
    bus_ready <= 1'b0;
    if (bus_valid && !bus_ready) begin
      if (lat == 2) begin
        lat <= 0; bus_ready <= 1'b1; bus_rdata <= mem[bus_addr % NADDR];
        if (bus_cmd == BUS_WRITEBACK) mem[bus_addr % NADDR] <= bus_wdata;
        seen.push_back(bus_cmd);
      end else lat <= lat + 1;
    end
  end

  // reference line states
  line_state_t r_st [NLINES]; int r_tag [NLINES];
  function automatic bit r_hit(int a); return r_st[a % NLINES].valid && r_tag[a % NLINES] == a / NLINES; endfunction

  int n_trans [string];
  task automatic note(string s); n_trans[s] = n_trans.exists(s) ? n_trans[s] + 1 : 1; endtask

  task automatic op(int p, creq_e c, int a, word_t wd);
    int l = a % NLINES, n = 0;
    bit hit = r_hit(a);
    line_state_t old = r_st[l];
    bus_cmd_e exp_bus [$];
    word_t got;
    // expected transactions and next state
    if (!hit && old.valid && old.dirty) exp_bus.push_back(BUS_WRITEBACK);
    if (!hit) exp_bus.push_back(c == CREQ_WRITE ? BUS_WRITE_MISS : BUS_READ_MISS);
    else if (c == CREQ_WRITE && !old.dirty) exp_bus.push_back(BUS_WRITE_MISS);
    seen.delete();
    @(negedge clk);
    req_valid[p] = 1; req_cmd[p] = c; req_addr[p] = word_t'(a); req_wdata[p] = wd;
    #1 while (!req_done[p]) begin @(negedge clk); #1; n++; end
    got = rdata;
    @(negedge clk); req_valid[p] = 0;
    if (c != CREQ_WRITE) chk(got == golden[a], $sformatf("read %0d: %0d expected %0d", a, got, golden[a]));
    else golden[a] = wd;
    if (hit && !(c == CREQ_WRITE && !old.dirty)) chk(n == 1, $sformatf("hit latency %0d", n + 1));
    chk(seen == exp_bus, $sformatf("bus transactions for %s on %0d", c.name(), a));
    // reference transition
    unique case (c)
      CREQ_READ:   if (!hit) r_st[l] = ST_S;
      CREQ_SPREAD: r_st[l] = (hit && old.dirty) ? ST_SPREX : ST_SPRSH;
      default:     r_st[l] = ST_E;
    endcase
    r_tag[l] = a / NLINES;
    note($sformatf("%s %s%s", c.name(), hit ? "hit " : "miss ", hit ? {old.spread ? "SpR-" : "", old.dirty ? "Ex" : "Sh"} : ""));
    chk(dut.st[l] == r_st[l], $sformatf("state after %s on %0d", c.name(), a));
  endtask

  int n_busy_snoops = 0;
  task automatic snoop(bus_cmd_e c, int a);
    int l = a % NLINES;
    bit hit = r_hit(a);
    line_state_t old = r_st[l];
    bit wb, inv; word_t wbd;
    @(negedge clk);
    snp_valid = 1; snp_cmd = c; snp_addr = word_t'(a);
    #1 while (!snp_ready) begin @(negedge clk); #1; end
    wb = snp_wb; wbd = snp_wb_data; inv = ext_inv_valid;
    if (int'(dut.fsm) != 0) n_busy_snoops++;
    @(negedge clk); snp_valid = 0;
    chk(wb == (hit && old.dirty), "write-back on snoop");
    if (wb) begin chk(wbd == golden[a], "write-back data"); mem[a] = wbd; end
    chk(inv == (c == BUS_WRITE_MISS && (!hit || old.spread)), "address-buffer invalidation");
    if (hit) begin
      if (c == BUS_WRITE_MISS) r_st[l] = ST_I;
      else r_st[l] = old.spread ? ST_SPRSH : ST_S;
    end
    if (c == BUS_WRITE_MISS) begin   // the other node writes the word
      golden[a] = word_t'($urandom); mem[a] = golden[a];
    end
    note($sformatf("snoop %s %s", c.name(), hit ? (old.spread ? "SpR" : (old.dirty ? "E" : "S")) : "absent"));
    chk(dut.st[l] == r_st[l], "state after snoop");
  endtask

  initial begin
    for (int p = 0; p < NSP; p++) begin req_valid[p] = 0; req_cmd[p] = CREQ_READ; req_addr[p] = '0; req_wdata[p] = '0; end
    snp_valid = 0; snp_cmd = BUS_READ_MISS; snp_addr = '0;
    for (int a = 0; a < NADDR; a++) begin mem[a] = word_t'($urandom); golden[a] = mem[a]; end
    for (int l = 0; l < NLINES; l++) begin r_st[l] = ST_I; r_tag[l] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      if ($urandom_range(0, 7) == 0) begin
        // a snoop to another line while a request is under way: the cache
        // must take it even while it waits for its own bus transaction
        automatic int a = $urandom_range(0, NADDR-1), b;
        do b = $urandom_range(0, NADDR-1); while (b % NLINES == a % NLINES);
        fork
          op($urandom_range(0, NSP-1), creq_e'($urandom_range(0, 2)), a, word_t'($urandom));
          begin repeat ($urandom_range(1, 3)) @(negedge clk); snoop($urandom_range(0, 1) ? BUS_WRITE_MISS : BUS_READ_MISS, b); end
        join
      end else if ($urandom_range(0, 5) == 0) snoop($urandom_range(0, 1) ? BUS_WRITE_MISS : BUS_READ_MISS, $urandom_range(0, NADDR-1));
      else op($urandom_range(0, NSP-1), creq_e'($urandom_range(0, 2)), $urandom_range(0, NADDR-1), word_t'($urandom));
    end
    // both ports at once
    @(negedge clk);
    for (int p = 0; p < NSP; p++) begin req_valid[p] = 1; req_cmd[p] = CREQ_READ; req_addr[p] = word_t'(p); end
    begin
      bit d [NSP]; int cyc = 0;
      for (int p = 0; p < NSP; p++) d[p] = 0;
      while (!(d[0] && d[1]) && cyc < 50) begin
        #1 for (int p = 0; p < NSP; p++) if (req_done[p]) begin
          chk(rdata == golden[p], "simultaneous read data"); d[p] = 1;
        end
        @(negedge clk); cyc++;
        for (int p = 0; p < NSP; p++) if (d[p]) req_valid[p] = 0;
      end
      chk(d[0] && d[1], "both simultaneous requests served");
    end
    foreach (n_trans[k]) $display("  %0d x %s", n_trans[k], k);
    chk(n_trans.size() >= 20, "most transitions exercised");
    $display("  %0d snoops taken while the cache waited for the bus", n_busy_snoops);
    chk(n_busy_snoops > 0, "snoops taken during a pending miss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
