// sdf_node: one processing node of the Scheduled Dataflow (SDF) architecture
// with thread-level speculation.
//
// Threads are non-blocking: a thread is enabled only when all its inputs
// have arrived in its frame, and it then runs to completion.  Memory access
// is decoupled from computation: a Synchronization Processor (SP) preloads
// the thread's inputs into its register set, an Execution Processor (EP)
// computes on registers only, and an SP post-stores the results.  The thread
// schedule unit (TSU) moves continuations between the preload, execution and
// post-store queues.
//
// Speculative threads carry a non-zero epoch number (EPN).  Their
// speculative reads are recorded in the address buffer; a write by any SP,
// or a write miss snooped from the bus, to such an address marks the reading
// thread as violated.  A speculative thread that finishes its body enters the
// speculative commit queue; the commit control lets threads post-store in
// epoch order and sends violated ones back to preload at their retry pointer,
// as non-speculative threads.  Speculative threads never write memory.
//
// Block structure:
//   sdf_tsu  -> preload queue  (sdf_fifo) -> SPs (sdf_sp)  -> TSU
//            -> post-store queue (sdf_fifo) -> SPs
//            -> execution queue  (sdf_fifo) -> EPs (sdf_ep) -> TSU
//            -> speculative commit queue + commit control (sdf_commit_ctrl)
//                 -> SPs (commit) / preload queue (retry)
//   SPs -> data cache (sdf_spec_cache) -> bus;  SPs, cache -> sdf_addr_buffer
//   register sets (sdf_regfile) and code (sdf_imem) shared by SPs and EPs
//
// An idle SP takes, in this order of priority, a committed thread, the head
// of the post-store queue, or the head of the preload queue; an idle EP takes
// the head of the execution queue (lower-numbered processors first).  That
// priority is a choice of this implementation.
//
// Ports: imem_* loads code before a run; boot_* starts a thread with no
// inputs at boot_ip (boot_fp is its frame); bus_* is the node's side of the
// snooping bus to the shared memory and the other nodes (snp_* are requests
// of other nodes).  The remaining outputs report activity.
module sdf_node
  import sdf_pkg::*;
#(
  parameter int unsigned NSP        = 4,
  parameter int unsigned NEP        = 4,
  parameter int unsigned NRS        = 16,
  parameter int unsigned NFRAMES    = 64,
  parameter int unsigned NSETS      = 64,
  parameter int unsigned NWAYS      = 4,
  parameter int unsigned NLINES     = 256,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned FRAME_WORDS = 16,
  parameter word_t       FRAME_BASE = 32'h0001_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  // code loading
  input  logic              imem_we,
  input  logic [IP_W-1:0]   imem_waddr,
  input  instr_t            imem_wdata,
  // thread creation from outside
  input  logic              boot_valid,
  input  logic [IP_W-1:0]   boot_ip,
  output logic              boot_ready,
  output word_t             boot_fp,
  // bus master port
  output logic              bus_valid,
  output bus_cmd_e          bus_cmd,
  output word_t             bus_addr,
  output word_t             bus_wdata,
  input  logic              bus_ready,
  input  word_t             bus_rdata,
  // snooped bus requests
  input  logic              snp_valid,
  input  bus_cmd_e          snp_cmd,
  input  word_t             snp_addr,
  output logic              snp_ready,
  output logic              snp_wb,
  output word_t             snp_wb_data,
  // activity
  output logic              ev_commit,
  output logic              ev_retry,
  output logic              ev_spec_read,
  output logic              ev_ext_inval,
  output logic              ev_thread_done,
  output logic              ev_spec_wr_blocked,
  output logic [EPN_W-1:0]  next_epn,
  output logic              quiet
);
  localparam int unsigned NP = NSP + NEP;

  // ---------------- shared storage ----------------
  logic [IP_W-1:0]   im_addr [NP];
  instr_t            im_data [NP];
  logic [RS_W-1:0]   rf_set  [NP];
  logic [REG_AW-1:0] rf_ar   [NP], rf_br [NP], rf_wr [NP];
  word_t             rf_ad   [NP], rf_bd [NP], rf_wd [NP];
  logic              rf_we   [NP];

  sdf_imem #(.NPORTS(NP), .DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .raddr(im_addr), .rdata(im_data));

  sdf_regfile #(.NPORTS(NP), .NRS(NRS)) u_rf (
    .clk,
    .ra_set(rf_set), .ra_reg(rf_ar), .ra_data(rf_ad),
    .rb_set(rf_set), .rb_reg(rf_br), .rb_data(rf_bd),
    .we(rf_we), .w_set(rf_set), .w_reg(rf_wr), .w_data(rf_wd));

  // ---------------- TSU and queues ----------------
  logic  msg_valid [NP], msg_ready [NP];
  msg_t  msg       [NP];
  word_t alloc_fp;

  logic  tsu_pl_v, tsu_pl_r, tsu_ex_v, ex_push_r, tsu_ps_v, ps_push_r, tsu_sc_v, sc_r;
  cont_t tsu_pl_c, tsu_ex_c, tsu_ps_c, tsu_sc_c;
  logic  abi_free_v, ab_clr_v, done_v;
  logic [ABI_W-1:0] abi_free, ab_clr_abi;
  word_t done_fp;
  logic [$clog2(NFRAMES+1)-1:0] live;

  sdf_tsu #(.NP(NP), .NFRAMES(NFRAMES), .NRS(NRS), .NSETS(NSETS),
            .FRAME_WORDS(FRAME_WORDS), .FRAME_BASE(FRAME_BASE)) u_tsu (
    .clk, .rst_n,
    .msg_valid, .msg, .msg_ready, .alloc_fp,
    .boot_valid, .boot_ip, .boot_ready, .boot_fp,
    .pl_valid(tsu_pl_v), .pl_ready(tsu_pl_r), .pl_cont(tsu_pl_c),
    .ex_valid(tsu_ex_v), .ex_ready(ex_push_r), .ex_cont(tsu_ex_c),
    .ps_valid(tsu_ps_v), .ps_ready(ps_push_r), .ps_cont(tsu_ps_c),
    .sc_valid(tsu_sc_v), .sc_ready(sc_r),      .sc_cont(tsu_sc_c),
    .abi_free_valid(abi_free_v), .abi_free,
    .ab_clear_valid(ab_clr_v), .ab_clear_abi(ab_clr_abi),
    .done_valid(done_v), .done_fp, .live_threads(live));

  // commit control
  logic [NSETS-1:0] violated, overflowed;
  logic  cm_v, cm_r, rt_v, rt_r;
  cont_t cm_c, rt_c;
  logic  cc_busy;

  sdf_commit_ctrl #(.DEPTH(NSETS), .NSETS(NSETS)) u_commit (
    .clk, .rst_n,
    .enq_valid(tsu_sc_v), .enq_ready(sc_r), .enq_cont(tsu_sc_c),
    .violated,
    .commit_valid(cm_v), .commit_ready(cm_r), .commit_cont(cm_c),
    .retry_valid(rt_v), .retry_ready(rt_r), .retry_cont(rt_c),
    .abi_free_valid(abi_free_v), .abi_free,
    .done_valid(done_v), .done_fp, .next_epn, .busy(cc_busy));

  // preload queue: a retry from the commit control has priority over the TSU
  logic  pl_push_v, pl_push_r, pl_pop_v, pl_pop_r;
  cont_t pl_push_c, pl_pop_c;
  assign pl_push_v = rt_v || tsu_pl_v;
  assign pl_push_c = rt_v ? rt_c : tsu_pl_c;
  assign rt_r      = pl_push_r;
  assign tsu_pl_r  = pl_push_r && !rt_v;

  logic [$clog2(NFRAMES+1)-1:0] pl_cnt, ps_cnt, ex_cnt;
  sdf_fifo #(.T(cont_t), .DEPTH(NFRAMES)) u_preload_q (
    .clk, .rst_n, .push_valid(pl_push_v), .push_ready(pl_push_r), .push_data(pl_push_c),
    .pop_valid(pl_pop_v), .pop_ready(pl_pop_r), .pop_data(pl_pop_c), .count(pl_cnt));

  logic  ps_pop_v, ps_pop_r;
  cont_t ps_pop_c;
  sdf_fifo #(.T(cont_t), .DEPTH(NFRAMES)) u_poststore_q (
    .clk, .rst_n, .push_valid(tsu_ps_v), .push_ready(ps_push_r), .push_data(tsu_ps_c),
    .pop_valid(ps_pop_v), .pop_ready(ps_pop_r), .pop_data(ps_pop_c), .count(ps_cnt));

  logic  ex_pop_v, ex_pop_r;
  cont_t ex_pop_c;
  sdf_fifo #(.T(cont_t), .DEPTH(NFRAMES)) u_exec_q (
    .clk, .rst_n, .push_valid(tsu_ex_v), .push_ready(ex_push_r), .push_data(tsu_ex_c),
    .pop_valid(ex_pop_v), .pop_ready(ex_pop_r), .pop_data(ex_pop_c), .count(ex_cnt));

  // ---------------- dispatch to idle processors ----------------
  logic  sp_idle [NSP], sp_start [NSP];
  cont_t sp_cont [NSP];
  logic  ep_idle [NEP], ep_start [NEP];

  always_comb begin
    automatic logic took_cm = 1'b0, took_ps = 1'b0, took_pl = 1'b0, took_ex = 1'b0;
    for (int i = 0; i < NSP; i++) begin
      sp_start[i] = 1'b0;
      sp_cont[i]  = pl_pop_c;
      if (sp_idle[i]) begin
        if (cm_v && !took_cm) begin
          sp_start[i] = 1'b1; sp_cont[i] = cm_c; took_cm = 1'b1;
        end else if (ps_pop_v && !took_ps) begin
          sp_start[i] = 1'b1; sp_cont[i] = ps_pop_c; took_ps = 1'b1;
        end else if (pl_pop_v && !took_pl) begin
          sp_start[i] = 1'b1; sp_cont[i] = pl_pop_c; took_pl = 1'b1;
        end
      end
    end
    for (int j = 0; j < NEP; j++) begin
      ep_start[j] = ep_idle[j] && ex_pop_v && !took_ex;
      if (ep_start[j]) took_ex = 1'b1;
    end
    cm_r     = took_cm;
    ps_pop_r = took_ps;
    pl_pop_r = took_pl;
    ex_pop_r = took_ex;
  end

  // ---------------- data cache and address buffer ----------------
  logic  c_req_v [NSP], c_done [NSP];
  creq_e c_cmd   [NSP];
  word_t c_addr  [NSP], c_wdata [NSP];
  word_t c_rdata;
  logic  ext_inv_v;
  word_t ext_inv_a;

  sdf_spec_cache #(.NSP(NSP), .NLINES(NLINES)) u_cache (
    .clk, .rst_n,
    .req_valid(c_req_v), .req_cmd(c_cmd), .req_addr(c_addr), .req_wdata(c_wdata),
    .req_done(c_done), .rdata(c_rdata),
    .bus_valid, .bus_cmd, .bus_addr, .bus_wdata, .bus_ready, .bus_rdata,
    .snp_valid, .snp_cmd, .snp_addr, .snp_ready, .snp_wb, .snp_wb_data,
    .ext_inv_valid(ext_inv_v), .ext_inv_addr(ext_inv_a));

  logic             ab_ins_v [NSP], ab_inv_v [NSP];
  logic [ABI_W-1:0] ab_ins_abi [NSP];
  word_t            ab_ins_a [NSP], ab_inv_a [NSP];

  sdf_addr_buffer #(.NSETS(NSETS), .NWAYS(NWAYS), .NSP(NSP)) u_abuf (
    .clk, .rst_n,
    .clear_valid(ab_clr_v), .clear_abi(ab_clr_abi),
    .ins_valid(ab_ins_v), .ins_abi(ab_ins_abi), .ins_addr(ab_ins_a),
    .inv_valid(ab_inv_v), .inv_addr(ab_inv_a),
    .ext_inv_valid(ext_inv_v), .ext_inv_addr(ext_inv_a),
    .violated, .overflowed);

  // ---------------- processors ----------------
  logic sp_blk [NSP];

  for (genvar i = 0; i < NSP; i++) begin : g_sp
    sdf_sp u_sp (
      .clk, .rst_n,
      .start_valid(sp_start[i]), .start_cont(sp_cont[i]), .idle(sp_idle[i]),
      .imem_addr(im_addr[i]), .imem_data(im_data[i]),
      .rf_set(rf_set[i]), .rf_a_reg(rf_ar[i]), .rf_a_data(rf_ad[i]),
      .rf_b_reg(rf_br[i]), .rf_b_data(rf_bd[i]),
      .rf_we(rf_we[i]), .rf_w_reg(rf_wr[i]), .rf_w_data(rf_wd[i]),
      .mem_valid(c_req_v[i]), .mem_cmd(c_cmd[i]), .mem_addr(c_addr[i]),
      .mem_wdata(c_wdata[i]), .mem_done(c_done[i]), .mem_rdata(c_rdata),
      .ins_valid(ab_ins_v[i]), .ins_abi(ab_ins_abi[i]), .ins_addr(ab_ins_a[i]),
      .inv_valid(ab_inv_v[i]), .inv_addr(ab_inv_a[i]),
      .msg_valid(msg_valid[i]), .msg(msg[i]), .msg_ready(msg_ready[i]),
      .spec_wr_blocked(sp_blk[i]));
  end

  for (genvar j = 0; j < NEP; j++) begin : g_ep
    sdf_ep u_ep (
      .clk, .rst_n,
      .start_valid(ep_start[j]), .start_cont(ex_pop_c), .idle(ep_idle[j]),
      .imem_addr(im_addr[NSP+j]), .imem_data(im_data[NSP+j]),
      .rf_set(rf_set[NSP+j]), .rf_a_reg(rf_ar[NSP+j]), .rf_a_data(rf_ad[NSP+j]),
      .rf_b_reg(rf_br[NSP+j]), .rf_b_data(rf_bd[NSP+j]),
      .rf_we(rf_we[NSP+j]), .rf_w_reg(rf_wr[NSP+j]), .rf_w_data(rf_wd[NSP+j]),
      .msg_valid(msg_valid[NSP+j]), .msg(msg[NSP+j]), .msg_ready(msg_ready[NSP+j]),
      .alloc_fp);
  end

  // ---------------- activity ----------------
  always_comb begin
    automatic logic all_idle = 1'b1;
    ev_spec_read       = 1'b0;
    ev_spec_wr_blocked = 1'b0;
    for (int i = 0; i < NSP; i++) begin
      ev_spec_read       |= ab_ins_v[i];
      ev_spec_wr_blocked |= sp_blk[i];
      all_idle           &= sp_idle[i];
    end
    for (int j = 0; j < NEP; j++) all_idle &= ep_idle[j];
    ev_commit      = cm_v && cm_r;
    ev_retry       = rt_v && rt_r;
    ev_ext_inval   = ext_inv_v;
    ev_thread_done = done_v;
    quiet = all_idle && live == '0 && pl_cnt == '0 && ps_cnt == '0 && ex_cnt == '0 && !cc_busy;
  end
endmodule
