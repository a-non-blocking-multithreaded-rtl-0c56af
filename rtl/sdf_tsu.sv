// sdf_tsu: the thread schedule unit of an SDF node.
//
// It owns the continuations of all threads of the node and moves them
// between the queues:
//   * FALLOC / SPFALLOC from an EP allocate a frame (FP), record IP and the
//     synchronization count SC, and return the new FP.  SPFALLOC also gives
//     the thread the next epoch number (EPN, counting up from 1), an
//     address-buffer ID (ABI) from a free list, and its retry pointer RIP,
//     and clears that address-buffer set.  EPN = 0 marks a non-speculative
//     thread.
//   * SYNC from an SP (a STORE into a frame) decrements that frame's SC.
//     A thread whose SC has reached zero is enabled: it gets a free register
//     set and enters the preload queue.
//   * FORKEP puts the continuation in the execution queue, FORKSP in the
//     post-store queue.  COMMIT tests the epoch field: speculative threads go
//     to the speculative commit queue, non-speculative ones to post-store.
//   * STOP of a thread frees its frame and register set and is reported on
//     done_* (the commit control waits for it).
//   * boot_* creates a non-speculative thread with SC = 0 from outside.
//
// Messages from the NP processors are served one per clock cycle with a
// round-robin choice among those whose destination can take them; a message
// is accepted in the cycle its msg_ready is high, and alloc_fp is valid in
// that cycle.  The enable path works in parallel, one thread per cycle.
// The architecture gives the TSU's function and the continuation format;
// the frame pool, the one-message-per-cycle service and the arbitration
// are choices of this implementation.
module sdf_tsu
  import sdf_pkg::*;
#(
  parameter int unsigned NP          = 8,
  parameter int unsigned NFRAMES     = 64,
  parameter int unsigned NRS         = 16,
  parameter int unsigned NSETS       = 64,
  parameter int unsigned FRAME_WORDS = 16,
  parameter word_t       FRAME_BASE  = 32'h0001_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor messages
  input  logic              msg_valid [NP],
  input  msg_t              msg       [NP],
  output logic              msg_ready [NP],
  output word_t             alloc_fp,
  // external thread creation
  input  logic              boot_valid,
  input  logic [IP_W-1:0]   boot_ip,
  output logic              boot_ready,
  output word_t             boot_fp,
  // queue pushes
  output logic              pl_valid,
  input  logic              pl_ready,
  output cont_t             pl_cont,
  output logic              ex_valid,
  input  logic              ex_ready,
  output cont_t             ex_cont,
  output logic              ps_valid,
  input  logic              ps_ready,
  output cont_t             ps_cont,
  output logic              sc_valid,
  input  logic              sc_ready,
  output cont_t             sc_cont,
  // address-buffer sets
  input  logic              abi_free_valid,
  input  logic [ABI_W-1:0]  abi_free,
  output logic              ab_clear_valid,
  output logic [ABI_W-1:0]  ab_clear_abi,
  // thread completion
  output logic              done_valid,
  output word_t             done_fp,
  output logic [$clog2(NFRAMES+1)-1:0] live_threads
);
  localparam int unsigned FW  = (NFRAMES > 1) ? $clog2(NFRAMES) : 1;
  localparam int unsigned RW  = (NRS > 1) ? $clog2(NRS) : 1;
  localparam int unsigned SW  = (NSETS > 1) ? $clog2(NSETS) : 1;
  localparam int unsigned PW  = (NP > 1) ? $clog2(NP) : 1;
  localparam int unsigned FWS = $clog2(FRAME_WORDS);

  logic              f_alloc [NFRAMES];
  logic              f_wait  [NFRAMES];
  cont_t             f_cont  [NFRAMES];
  logic [NRS-1:0]    rs_busy;
  logic [NSETS-1:0]  abi_busy;
  logic [EPN_W-1:0]  epn_ctr;
  logic [PW-1:0]     rr_ptr;

  function automatic word_t fid2fp(logic [FW-1:0] f);
    return FRAME_BASE + (word_t'(f) << FWS);
  endfunction
  function automatic logic [FW-1:0] fp2fid(word_t fp);
    return FW'((fp - FRAME_BASE) >> FWS);
  endfunction

  // free resources
  logic          ff_found, rs_found, abi_found, en_found;
  logic [FW-1:0] ff_idx, en_idx;
  logic [RW-1:0] rs_idx;
  logic [SW-1:0] abi_idx;

  logic [NFRAMES-1:0] f_free, f_ready;
  logic [NRS-1:0]     rs_free;
  logic [NSETS-1:0]   abi_freev;
  logic [7:0]         ff_i, en_i, rs_i, abi_i;
  always_comb begin
    for (int f = 0; f < NFRAMES; f++) begin
      f_free[f]  = !f_alloc[f];
      f_ready[f] = f_alloc[f] && f_wait[f] && f_cont[f].sc == '0;
    end
    rs_free   = ~rs_busy;
    abi_freev = ~abi_busy;
    ff_i  = first_set(PRIO_W'(f_free));
    en_i  = first_set(PRIO_W'(f_ready));
    rs_i  = first_set(PRIO_W'(rs_free));
    abi_i = first_set(PRIO_W'(abi_freev));
    ff_found  = (f_free != '0);    ff_idx  = FW'(ff_i);
    en_found  = (f_ready != '0);   en_idx  = FW'(en_i);
    rs_found  = (rs_free != '0);   rs_idx  = RW'(rs_i);
    abi_found = (abi_freev != '0); abi_idx = SW'(abi_i);
  end

  // which messages can be served now
  logic          can   [NP];
  logic [NP-1:0] canv;
  logic          gnt_v;
  logic [PW-1:0] gnt;
  msg_t          m;

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      unique case (msg[p].kind)
        MSG_FORKEP:   can[p] = ex_ready;
        MSG_FORKSP:   can[p] = ps_ready;
        MSG_COMMIT:   can[p] = (msg[p].cont.epn != '0) ? sc_ready : ps_ready;
        MSG_FALLOC:   can[p] = ff_found;
        MSG_SPFALLOC: can[p] = ff_found && abi_found;
        default:      can[p] = 1'b1;
      endcase
      can[p] = can[p] && msg_valid[p];
    end
    for (int p = 0; p < NP; p++) canv[p] = can[p];
    gnt_v = (canv != '0);
    gnt   = PW'(rr_first(PRIO_W'(canv), 7'(rr_ptr)));
    m = msg[gnt];
    for (int p = 0; p < NP; p++) msg_ready[p] = gnt_v && (gnt == PW'(p));
    alloc_fp = fid2fp(ff_idx);

    ex_valid = gnt_v && m.kind == MSG_FORKEP;
    ex_cont  = m.cont;
    ps_valid = gnt_v && (m.kind == MSG_FORKSP || (m.kind == MSG_COMMIT && m.cont.epn == '0));
    ps_cont  = m.cont;
    sc_valid = gnt_v && m.kind == MSG_COMMIT && m.cont.epn != '0;
    sc_cont  = m.cont;

    ab_clear_valid = gnt_v && m.kind == MSG_SPFALLOC;
    ab_clear_abi   = ABI_W'(abi_idx);

    done_valid = gnt_v && m.kind == MSG_STOP;
    done_fp    = m.cont.fp;

    boot_ready = !gnt_v && ff_found;
    boot_fp    = fid2fp(ff_idx);

    pl_valid   = en_found && rs_found;
    pl_cont    = f_cont[en_idx];
    pl_cont.fp = fid2fp(en_idx);
    pl_cont.rs = RS_W'(rs_idx);
  end

  always_comb begin
    live_threads = '0;
    for (int f = 0; f < NFRAMES; f++) live_threads += $bits(live_threads)'(f_alloc[f]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NFRAMES; f++) begin
        f_alloc[f] <= 1'b0;
        f_wait[f]  <= 1'b0;
        f_cont[f]  <= '0;
      end
      rs_busy  <= '0;
      abi_busy <= '0;
      epn_ctr  <= EPN_W'(1);
      rr_ptr   <= '0;
    end else begin
      if (pl_valid && pl_ready) begin
        f_wait[en_idx]     <= 1'b0;
        rs_busy[rs_idx]    <= 1'b1;
        f_cont[en_idx].rs  <= RS_W'(rs_idx);
      end
      if (abi_free_valid) abi_busy[SW'(abi_free)] <= 1'b0;
      if (gnt_v) begin
        rr_ptr <= (gnt == PW'(NP-1)) ? '0 : gnt + 1'b1;
        unique case (m.kind)
          MSG_FALLOC, MSG_SPFALLOC: begin
            f_alloc[ff_idx]    <= 1'b1;
            f_wait[ff_idx]     <= 1'b1;
            f_cont[ff_idx]     <= '0;
            f_cont[ff_idx].fp  <= fid2fp(ff_idx);
            f_cont[ff_idx].ip  <= m.cont.ip;
            f_cont[ff_idx].sc  <= m.cont.sc;
            if (m.kind == MSG_SPFALLOC) begin
              f_cont[ff_idx].epn <= epn_ctr;
              f_cont[ff_idx].rip <= m.cont.rip;
              f_cont[ff_idx].abi <= ABI_W'(abi_idx);
              abi_busy[abi_idx]  <= 1'b1;
              epn_ctr            <= epn_ctr + 1'b1;
            end
          end
          MSG_SYNC: begin
            automatic logic [FW-1:0] t = fp2fid(m.cont.fp);
            if (f_alloc[t] && f_wait[t] && f_cont[t].sc != '0)
              f_cont[t].sc <= f_cont[t].sc - 1'b1;
          end
          MSG_STOP: begin
            f_alloc[fp2fid(m.cont.fp)] <= 1'b0;
            rs_busy[RW'(m.cont.rs)]    <= 1'b0;
          end
          default: ;
        endcase
      end else if (boot_valid && boot_ready) begin
        f_alloc[ff_idx]   <= 1'b1;
        f_wait[ff_idx]    <= 1'b1;
        f_cont[ff_idx]    <= '0;
        f_cont[ff_idx].fp <= fid2fp(ff_idx);
        f_cont[ff_idx].ip <= boot_ip;
      end
    end
  end
endmodule
