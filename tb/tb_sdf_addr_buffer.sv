// tb_sdf_addr_buffer: random speculative-read inserts, SP write
// invalidations, bus invalidations and set clears against a reference model
// of the address buffer; checks the per-thread violation and overflow flags
// after every cycle.
module tb_sdf_addr_buffer;
  import sdf_pkg::*;
  localparam int NSETS = 8, NWAYS = 4, NSP = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear_valid; logic [ABI_W-1:0] clear_abi;
  logic ins_valid [NSP]; logic [ABI_W-1:0] ins_abi [NSP]; word_t ins_addr [NSP];
  logic inv_valid [NSP]; word_t inv_addr [NSP];
  logic ext_inv_valid; word_t ext_inv_addr;
  logic [NSETS-1:0] violated, overflowed;

  sdf_addr_buffer #(.NSETS(NSETS), .NWAYS(NWAYS), .NSP(NSP)) dut (.*);

  int checks = 0, failures = 0;
  word_t r_set [NSETS][$], r_old [NSETS][$];
  bit r_vio [NSETS], r_ovf [NSETS];
  int n_vio = 0, n_ovf = 0, n_ext = 0;

  function automatic bit inval_hits(word_t a);
    bit h = ext_inv_valid && ext_inv_addr == a;
    for (int p = 0; p < NSP; p++) h |= inv_valid[p] && inv_addr[p] == a;
    return h;
  endfunction

  initial begin
    clear_valid = 0; clear_abi = '0; ext_inv_valid = 0; ext_inv_addr = '0;
    for (int p = 0; p < NSP; p++) begin ins_valid[p] = 0; inv_valid[p] = 0; ins_abi[p] = '0; ins_addr[p] = '0; inv_addr[p] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      clear_valid = $urandom_range(0, 15) == 0;
      clear_abi = ABI_W'($urandom_range(0, NSETS-1));
      // two SPs never serve the same thread: distinct sets
      begin
        automatic int s0 = $urandom_range(0, NSETS-1);
        for (int p = 0; p < NSP; p++) begin
          ins_valid[p] = $urandom_range(0, 2) == 0;
          ins_abi[p]   = ABI_W'((s0 + p) % NSETS);
          ins_addr[p]  = word_t'($urandom_range(0, 23));
          inv_valid[p] = $urandom_range(0, 5) == 0;
          inv_addr[p]  = word_t'($urandom_range(0, 23));
        end
      end
      ext_inv_valid = $urandom_range(0, 7) == 0;
      ext_inv_addr  = word_t'($urandom_range(0, 23));
      n_ext += int'(ext_inv_valid);
      @(posedge clk);
      // reference update: inserts see the buffer as it was at the start of
      // the cycle, invalidations of that cycle act in parallel
      for (int s = 0; s < NSETS; s++) r_old[s] = r_set[s];
      for (int s = 0; s < NSETS; s++)
        for (int w = r_set[s].size() - 1; w >= 0; w--)
          if (inval_hits(r_set[s][w])) begin r_set[s].delete(w); r_vio[s] = 1; end
      for (int p = 0; p < NSP; p++) if (ins_valid[p]) begin
        automatic int s = int'(ins_abi[p]);
        automatic bit dup = 0;
        foreach (r_old[s][w]) if (r_old[s][w] == ins_addr[p]) dup = 1;
        if (inval_hits(ins_addr[p])) r_vio[s] = 1;
        else if (!dup) begin
          if (r_old[s].size() < NWAYS) r_set[s].push_back(ins_addr[p]);
          else begin r_vio[s] = 1; r_ovf[s] = 1; end
        end
      end
      if (clear_valid) begin r_set[clear_abi].delete(); r_vio[clear_abi] = 0; r_ovf[clear_abi] = 0; end
      #1;
      for (int s = 0; s < NSETS; s++) begin
        checks++;
        if (violated[s] != r_vio[s] || overflowed[s] != r_ovf[s]) begin
          failures++; $display("FAIL: t=%0d set %0d vio %b/%b ovf %b/%b", t, s, violated[s], r_vio[s], overflowed[s], r_ovf[s]);
        end
        n_vio += int'(r_vio[s]); n_ovf += int'(r_ovf[s]);
      end
    end
    checks++; if (n_vio == 0 || n_ovf == 0 || n_ext == 0) begin failures++; $display("FAIL: violation/overflow never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
