// sdf_addr_buffer: the address buffer that records which addresses each
// speculative thread has read speculatively.
//
// It is organised like a set-associative cache: one set per speculative
// thread (the set index is the thread's address-buffer ID, ABI) and NWAYS
// entries per set, the most speculative reads a thread may make.  Each SP
// has an insert port (address of a speculative read plus the reading thread's
// ABI, steered to that set) and an invalidate port (address of a write the SP
// made).  One more invalidate port takes addresses invalidated from outside
// the node (bus write misses).  Every invalidate address is compared with
// every entry of every set in the same cycle, so one write invalidates that
// address in all threads at once, while different SPs insert into different
// sets in parallel.
//
// A valid entry that is invalidated marks its set as violated; the commit
// control reads this flag (violated[abi]) and sends a violated thread back for
// a retry instead of committing it.  A speculative read that finds its set
// full also marks the set violated, so a thread is never committed with a
// read that was not recorded (a choice of this implementation; the
// architecture only says the associativity bounds a thread's speculative
// reads).  clear empties a set and clears its flag when a new speculative
// thread gets that ABI.  An insert and an invalidate of the same address in
// the same cycle count as a violation.
//
// Timing: inserts, invalidations and clears act at the rising clock edge;
// violated[] is a register output.
module sdf_addr_buffer
  import sdf_pkg::*;
#(
  parameter int unsigned NSETS = 64,
  parameter int unsigned NWAYS = 4,
  parameter int unsigned NSP   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear_valid,
  input  logic [ABI_W-1:0]  clear_abi,
  input  logic              ins_valid [NSP],
  input  logic [ABI_W-1:0]  ins_abi   [NSP],
  input  word_t             ins_addr  [NSP],
  input  logic              inv_valid [NSP],
  input  word_t             inv_addr  [NSP],
  input  logic              ext_inv_valid,
  input  word_t             ext_inv_addr,
  output logic [NSETS-1:0]  violated,
  output logic [NSETS-1:0]  overflowed
);
  localparam int unsigned SW = (NSETS > 1) ? $clog2(NSETS) : 1;

  logic  ent_v    [NSETS][NWAYS];
  word_t ent_addr [NSETS][NWAYS];

  // Does any invalidate port carry address a this cycle?
  function automatic logic hit_inval(word_t a,
                                     logic iv [NSP], word_t ia [NSP],
                                     logic ev, word_t ea);
    logic h;
    h = ev && (ea == a);
    for (int p = 0; p < NSP; p++) h |= iv[p] && (ia[p] == a);
    return h;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSETS; s++)
        for (int w = 0; w < NWAYS; w++) ent_v[s][w] <= 1'b0;
      violated   <= '0;
      overflowed <= '0;
    end else begin
      // Parallel search: every valid entry against every invalidate address.
      for (int s = 0; s < NSETS; s++) begin
        for (int w = 0; w < NWAYS; w++) begin
          if (ent_v[s][w] && hit_inval(ent_addr[s][w], inv_valid, inv_addr,
                                       ext_inv_valid, ext_inv_addr)) begin
            ent_v[s][w]  <= 1'b0;
            violated[s]  <= 1'b1;
          end
        end
      end
      // Inserts: each SP port writes the first free way of its set.
      for (int p = 0; p < NSP; p++) begin
        if (ins_valid[p]) begin
          automatic int  s    = int'(SW'(ins_abi[p]));
          automatic logic dup  = 1'b0;
          automatic int  free = -1;
          for (int w = 0; w < NWAYS; w++) begin
            if (ent_v[s][w] && ent_addr[s][w] == ins_addr[p]) dup = 1'b1;
            if (!ent_v[s][w] && free < 0) free = w;
          end
          if (hit_inval(ins_addr[p], inv_valid, inv_addr, ext_inv_valid, ext_inv_addr)) begin
            violated[s] <= 1'b1;
          end else if (!dup) begin
            if (free >= 0) begin
              ent_v[s][free]    <= 1'b1;
              ent_addr[s][free] <= ins_addr[p];
            end else begin
              violated[s]   <= 1'b1;
              overflowed[s] <= 1'b1;
            end
          end
        end
      end
      if (clear_valid) begin
        for (int w = 0; w < NWAYS; w++) ent_v[SW'(clear_abi)][w] <= 1'b0;
        violated[SW'(clear_abi)]   <= 1'b0;
        overflowed[SW'(clear_abi)] <= 1'b0;
      end
    end
  end
endmodule
