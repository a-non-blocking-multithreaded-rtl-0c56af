// sdf_commit_ctrl: the speculative commit queue and the commit control.
//
// A speculative thread that has finished its body executes COMMIT and its
// continuation is placed in the speculative commit queue.  The commit control
// keeps the epoch number of the next thread allowed to commit (next_epn,
// starting at 1, the first epoch the thread schedule unit hands out).  When a
// queued continuation carries that epoch number it is tested against the
// address buffer:
//   * no violation  -> the thread is scheduled on an SP for post-store
//                      (commit_* port) as a non-speculative thread
//                      (EPN = RIP = ABI = 0), so that it may write;
//   * violation     -> IP is set to RIP, the thread becomes non-speculative
//                      (EPN = ABI = 0) and goes back to the preload queue
//                      (retry_* port).
// Either way the thread's address-buffer set is released (abi_free_*).
//
// Choices of this implementation, where the architecture is silent:
//   * The queue is searched associatively for next_epn, so threads may reach
//     it in any order without blocking one another.
//   * next_epn advances only when the thread just committed (or retried)
//     has finished its post-store (done_* port, matched by frame pointer).
//     Until then no later epoch is tested, so a later thread's speculative
//     reads are checked against every write of all earlier threads.
//
// Timing: the decision is combinational from the queue and violated[];
// entries are written and removed at the rising clock edge.
module sdf_commit_ctrl
  import sdf_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned NSETS = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // speculative commit queue input (from the thread schedule unit)
  input  logic              enq_valid,
  output logic              enq_ready,
  input  cont_t             enq_cont,
  // address buffer state
  input  logic [NSETS-1:0]  violated,
  // committed thread to an SP for post-store
  output logic              commit_valid,
  input  logic              commit_ready,
  output cont_t             commit_cont,
  // violated thread back to the preload queue
  output logic              retry_valid,
  input  logic              retry_ready,
  output cont_t             retry_cont,
  // address-buffer set released
  output logic              abi_free_valid,
  output logic [ABI_W-1:0]  abi_free,
  // a thread finished (STOP reported to the thread schedule unit)
  input  logic              done_valid,
  input  word_t             done_fp,
  output logic [EPN_W-1:0]  next_epn,
  output logic              busy
);
  localparam int unsigned QW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned SW = (NSETS > 1) ? $clog2(NSETS) : 1;

  logic   q_v    [DEPTH];
  cont_t  q_cont [DEPTH];
  word_t  busy_fp;

  logic          found, free_found;
  logic [QW-1:0] sel, free_idx;
  cont_t         head;
  logic          bad, fire;

  logic [DEPTH-1:0] match, empty;
  logic [7:0]       sel_i, free_i;
  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      match[i] = q_v[i] && q_cont[i].epn == next_epn;
      empty[i] = !q_v[i];
    end
    sel_i      = first_set(PRIO_W'(match));
    free_i     = first_set(PRIO_W'(empty));
    found      = (match != '0);
    free_found = (empty != '0);
    sel        = QW'(sel_i);
    free_idx   = QW'(free_i);
    head = q_cont[sel];
    bad  = violated[SW'(head.abi)];

    commit_valid = found && !busy && !bad;
    commit_cont  = head;
    commit_cont.epn = '0;   // validated: from here on a non-speculative thread
    commit_cont.rip = '0;
    commit_cont.abi = '0;
    retry_valid  = found && !busy && bad;
    retry_cont   = head;
    retry_cont.ip  = head.rip;
    retry_cont.epn = '0;
    retry_cont.rip = '0;
    retry_cont.abi = '0;

    fire = (commit_valid && commit_ready) || (retry_valid && retry_ready);
    abi_free_valid = fire;
    abi_free       = head.abi;
    enq_ready      = free_found;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q_v[i] <= 1'b0;
      next_epn <= EPN_W'(1);
      busy     <= 1'b0;
      busy_fp  <= '0;
    end else begin
      if (enq_valid && enq_ready) begin
        q_v[free_idx]    <= 1'b1;
        q_cont[free_idx] <= enq_cont;
      end
      if (fire) begin
        q_v[sel] <= 1'b0;
        busy     <= 1'b1;
        busy_fp  <= head.fp;
      end else if (busy && done_valid && done_fp == busy_fp) begin
        busy     <= 1'b0;
        next_epn <= next_epn + 1'b1;
      end
    end
  end

  // Only the thread holding next_epn may leave the queue.
  assert property (@(posedge clk) disable iff (!rst_n) fire |-> head.epn == next_epn);
endmodule
