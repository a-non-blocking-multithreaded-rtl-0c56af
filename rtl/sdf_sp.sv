// sdf_sp: a Synchronization Processor (SP) of an SDF node.
//
// An SP runs the preload and post-store parts of threads.  It takes a
// continuation (start_*), then executes instructions from its IP in order,
// one at a time, on the thread's register set:
//   LOAD   rd <- mem[FP+imm]               frame read
//   STORE  mem[R[ra]+imm] <- R[rd]          frame write; then a SYNC message
//                                           tells the TSU the frame at R[ra]
//                                           received one input
//   IFETCH rd <- mem[R[ra]+R[rb]]           I-structure read (base, index)
//   ISTORE mem[R[ra]+R[rb]] <- R[rd]        I-structure write
//   SPREAD rd <- mem[R[ra]+R[rb]]           speculative read: for a
//                                           speculative thread the address is
//                                           entered in its address-buffer set
//                                           and the cache line marked SpRead;
//                                           for a non-speculative thread it
//                                           is a plain read
//   ADDI, ADD                               integer index/address arithmetic
//   FORKEP imm                              hand the thread to an EP at imm
//   STOP                                    end of this code portion; if the
//                                           thread was not handed on, it ends
//                                           and the TSU frees its resources
// A speculative thread may not write: its STORE and ISTORE are dropped and
// reported on spec_wr_blocked.  Every completed write is sent to the address
// buffer (inv_*), every speculative read of a speculative thread too (ins_*).
//
// Timing (choices of this implementation, except the fork): one cycle per
// register instruction; a memory instruction holds the cache request until
// the cache reports it done; FORKEP occupies the SP for 4 cycles, as the
// architecture states, and then offers the message to the TSU until taken.
module sdf_sp
  import sdf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // continuation in
  input  logic              start_valid,
  input  cont_t             start_cont,
  output logic              idle,
  // instruction fetch
  output logic [IP_W-1:0]   imem_addr,
  input  instr_t            imem_data,
  // register set
  output logic [RS_W-1:0]   rf_set,
  output logic [REG_AW-1:0] rf_a_reg,
  input  word_t             rf_a_data,
  output logic [REG_AW-1:0] rf_b_reg,
  input  word_t             rf_b_data,
  output logic              rf_we,
  output logic [REG_AW-1:0] rf_w_reg,
  output word_t             rf_w_data,
  // data cache
  output logic              mem_valid,
  output creq_e             mem_cmd,
  output word_t             mem_addr,
  output word_t             mem_wdata,
  input  logic              mem_done,
  input  word_t             mem_rdata,
  // address buffer
  output logic              ins_valid,
  output logic [ABI_W-1:0]  ins_abi,
  output word_t             ins_addr,
  output logic              inv_valid,
  output word_t             inv_addr,
  // messages to the TSU
  output logic              msg_valid,
  output msg_t              msg,
  input  logic              msg_ready,
  // status
  output logic              spec_wr_blocked
);
  typedef enum logic [2:0] {P_IDLE, P_EXEC, P_MEM, P_FORK, P_MSG} state_e;

  state_e          state;
  cont_t           cont;
  logic            forked;
  logic [1:0]      fork_cnt;
  instr_t          ir;
  word_t           maddr;
  creq_e           mcmd;
  msg_t            pend;
  logic            stop_after_msg;

  assign idle      = (state == P_IDLE);
  assign imem_addr = cont.ip;
  assign rf_set    = cont.rs;

  wire instr_t in = imem_data;
  wire logic   is_spec = (cont.epn != '0);

  // register read addresses
  always_comb begin
    rf_a_reg = in.ra;
    rf_b_reg = (in.op == OP_STORE) ? in.rd : in.rb;
    if (state == P_MEM) begin
      rf_a_reg = ir.rd;   // write data of STORE / ISTORE
      rf_b_reg = ir.rd;
    end
  end

  assign mem_valid = (state == P_MEM);
  assign mem_cmd   = mcmd;
  assign mem_addr  = maddr;
  assign mem_wdata = rf_a_data;

  wire logic mem_fin = (state == P_MEM) && mem_done;

  always_comb begin
    rf_we     = 1'b0;
    rf_w_reg  = in.rd;
    rf_w_data = '0;
    if (state == P_EXEC) begin
      unique case (in.op)
        OP_ADDI: begin rf_we = 1'b1; rf_w_data = rf_a_data + word_t'(signed'(in.imm)); end
        OP_ADD:  begin rf_we = 1'b1; rf_w_data = rf_a_data + rf_b_data; end
        default: ;
      endcase
    end else if (mem_fin && mcmd != CREQ_WRITE) begin
      rf_we     = 1'b1;
      rf_w_reg  = ir.rd;
      rf_w_data = mem_rdata;
    end
    ins_valid = mem_fin && ir.op == OP_SPREAD && is_spec;
    ins_abi   = cont.abi;
    ins_addr  = maddr;
    inv_valid = mem_fin && mcmd == CREQ_WRITE;
    inv_addr  = maddr;
  end

  assign msg_valid = (state == P_MSG);
  assign msg       = pend;

  always_comb begin
    spec_wr_blocked = (state == P_EXEC) && is_spec &&
                      (in.op == OP_STORE || in.op == OP_ISTORE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= P_IDLE;
      cont     <= '0;
      forked   <= 1'b0;
      fork_cnt <= '0;
      ir       <= '0;
      maddr    <= '0;
      mcmd     <= CREQ_READ;
      pend     <= '0;
      stop_after_msg <= 1'b0;
    end else begin
      unique case (state)
        P_IDLE: begin
          if (start_valid) begin
            cont   <= start_cont;
            forked <= 1'b0;
            state  <= P_EXEC;
          end
        end
        P_EXEC: begin
          ir <= in;
          unique case (in.op)
            OP_LOAD: begin
              maddr <= cont.fp + word_t'(in.imm);
              mcmd  <= CREQ_READ;
              state <= P_MEM;
            end
            OP_IFETCH, OP_SPREAD: begin
              maddr <= rf_a_data + rf_b_data;
              mcmd  <= (in.op == OP_SPREAD && is_spec) ? CREQ_SPREAD : CREQ_READ;
              state <= P_MEM;
            end
            OP_STORE, OP_ISTORE: begin
              if (is_spec) begin
                cont.ip <= cont.ip + 1'b1;
              end else begin
                maddr <= (in.op == OP_STORE) ? rf_a_data + word_t'(in.imm)
                                             : rf_a_data + rf_b_data;
                mcmd  <= CREQ_WRITE;
                // frame that receives the input of a STORE
                pend.kind    <= MSG_SYNC;
                pend.cont    <= '0;
                pend.cont.fp <= rf_a_data;
                state <= P_MEM;
              end
            end
            OP_FORKEP: begin
              pend.kind    <= MSG_FORKEP;
              pend.cont    <= cont;
              pend.cont.ip <= IP_W'(in.imm);
              fork_cnt     <= 2'd2;
              forked       <= 1'b1;
              state        <= P_FORK;
            end
            OP_STOP: begin
              if (forked) begin
                state <= P_IDLE;
              end else begin
                pend.kind <= MSG_STOP;
                pend.cont <= cont;
                stop_after_msg <= 1'b1;
                state <= P_MSG;
              end
            end
            default: cont.ip <= cont.ip + 1'b1;  // ADDI, ADD, NOP, EP-only ops
          endcase
        end
        P_MEM: begin
          if (mem_done) begin
            cont.ip <= cont.ip + 1'b1;
            if (ir.op == OP_STORE) begin
              stop_after_msg <= 1'b0;
              state <= P_MSG;
            end else begin
              state <= P_EXEC;
            end
          end
        end
        P_FORK: begin
          if (fork_cnt == '0) begin
            stop_after_msg <= 1'b0;
            cont.ip <= cont.ip + 1'b1;
            state   <= P_MSG;
          end else begin
            fork_cnt <= fork_cnt - 1'b1;
          end
        end
        P_MSG: begin
          if (msg_ready) state <= stop_after_msg ? P_IDLE : P_EXEC;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  // A memory request is held until the cache finishes it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_valid && !mem_done |=> mem_valid && $stable(maddr));
endmodule
