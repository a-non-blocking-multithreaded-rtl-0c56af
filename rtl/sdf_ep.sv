// sdf_ep: an Execution Processor (EP) of an SDF node.
//
// An EP runs thread bodies.  It never touches data memory: all operands are
// in the thread's register set, put there by an SP's preload.  It takes a
// continuation (start_*) and executes in order from its IP:
//   ADDI, ADD, SUB, MUL      integer arithmetic on registers
//   FALLOC   rd, ra, imm     spawn a thread at imm needing R[ra] inputs;
//                            rd <- its frame pointer
//   SPFALLOC rd, ra, rb, imm spawn a speculative thread (the TSU gives it an
//                            epoch number and an address-buffer ID) with
//                            retry pointer R[rb]; rd <- its frame pointer
//   FORKSP   imm             hand the thread to an SP for post-store at imm
//   COMMIT   imm             as FORKSP, but a speculative thread goes to the
//                            speculative commit queue and waits for its turn
//   STOP                     end of the body; a thread not handed on ends
// Memory instructions are treated as no-ops on an EP.
//
// Timing: one cycle per arithmetic instruction (a choice of this
// implementation: floating point is not modelled, MUL is a 32-bit integer
// multiply).  FORKSP and COMMIT occupy the EP for 4 cycles, as the
// architecture states for FORKSP, then offer the message to the TSU until it
// is taken.  FALLOC/SPFALLOC wait for the TSU, which answers with the frame
// pointer in the cycle it accepts.
module sdf_ep
  import sdf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_valid,
  input  cont_t             start_cont,
  output logic              idle,
  output logic [IP_W-1:0]   imem_addr,
  input  instr_t            imem_data,
  output logic [RS_W-1:0]   rf_set,
  output logic [REG_AW-1:0] rf_a_reg,
  input  word_t             rf_a_data,
  output logic [REG_AW-1:0] rf_b_reg,
  input  word_t             rf_b_data,
  output logic              rf_we,
  output logic [REG_AW-1:0] rf_w_reg,
  output word_t             rf_w_data,
  output logic              msg_valid,
  output msg_t              msg,
  input  logic              msg_ready,
  input  word_t             alloc_fp
);
  typedef enum logic [1:0] {E_IDLE, E_EXEC, E_FORK, E_MSG} state_e;

  state_e      state;
  cont_t       cont;
  logic        forked;
  logic [1:0]  fork_cnt;
  msg_t        pend;
  logic        stop_after_msg;
  logic        wr_fp;
  logic [REG_AW-1:0] fp_reg;

  assign idle      = (state == E_IDLE);
  assign imem_addr = cont.ip;
  assign rf_set    = cont.rs;

  wire instr_t in = imem_data;
  assign rf_a_reg = in.ra;
  assign rf_b_reg = in.rb;

  assign msg_valid = (state == E_MSG);
  assign msg       = pend;

  always_comb begin
    rf_we     = 1'b0;
    rf_w_reg  = in.rd;
    rf_w_data = '0;
    if (state == E_EXEC) begin
      unique case (in.op)
        OP_ADDI: begin rf_we = 1'b1; rf_w_data = rf_a_data + word_t'(signed'(in.imm)); end
        OP_ADD:  begin rf_we = 1'b1; rf_w_data = rf_a_data + rf_b_data; end
        OP_SUB:  begin rf_we = 1'b1; rf_w_data = rf_a_data - rf_b_data; end
        OP_MUL:  begin rf_we = 1'b1; rf_w_data = rf_a_data * rf_b_data; end
        default: ;
      endcase
    end else if (state == E_MSG && msg_ready && wr_fp) begin
      rf_we     = 1'b1;
      rf_w_reg  = fp_reg;
      rf_w_data = alloc_fp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= E_IDLE;
      cont     <= '0;
      forked   <= 1'b0;
      fork_cnt <= '0;
      pend     <= '0;
      stop_after_msg <= 1'b0;
      wr_fp    <= 1'b0;
      fp_reg   <= '0;
    end else begin
      unique case (state)
        E_IDLE: begin
          if (start_valid) begin
            cont   <= start_cont;
            forked <= 1'b0;
            state  <= E_EXEC;
          end
        end
        E_EXEC: begin
          stop_after_msg <= 1'b0;
          wr_fp          <= 1'b0;
          unique case (in.op)
            OP_FORKSP, OP_COMMIT: begin
              pend.kind    <= (in.op == OP_FORKSP) ? MSG_FORKSP : MSG_COMMIT;
              pend.cont    <= cont;
              pend.cont.ip <= IP_W'(in.imm);
              fork_cnt     <= 2'd2;
              forked       <= 1'b1;
              state        <= E_FORK;
            end
            OP_FALLOC, OP_SPFALLOC: begin
              pend.kind     <= (in.op == OP_FALLOC) ? MSG_FALLOC : MSG_SPFALLOC;
              pend.cont     <= '0;
              pend.cont.ip  <= IP_W'(in.imm);
              pend.cont.sc  <= SC_W'(rf_a_data);
              pend.cont.rip <= (in.op == OP_SPFALLOC) ? IP_W'(rf_b_data) : '0;
              wr_fp         <= 1'b1;
              fp_reg        <= in.rd;
              cont.ip       <= cont.ip + 1'b1;
              state         <= E_MSG;
            end
            OP_STOP: begin
              if (forked) begin
                state <= E_IDLE;
              end else begin
                pend.kind      <= MSG_STOP;
                pend.cont      <= cont;
                stop_after_msg <= 1'b1;
                state          <= E_MSG;
              end
            end
            default: cont.ip <= cont.ip + 1'b1;
          endcase
        end
        E_FORK: begin
          if (fork_cnt == '0) begin
            cont.ip <= cont.ip + 1'b1;
            state   <= E_MSG;
          end else begin
            fork_cnt <= fork_cnt - 1'b1;
          end
        end
        E_MSG: begin
          if (msg_ready) state <= stop_after_msg ? E_IDLE : E_EXEC;
        end
        default: state <= E_IDLE;
      endcase
    end
  end
endmodule
