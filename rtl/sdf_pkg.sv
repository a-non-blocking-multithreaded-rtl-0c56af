// sdf_pkg: types and constants shared by the blocks of a Scheduled Dataflow
// (SDF) node with thread-level speculation.
//
// A thread is named by its continuation <FP, IP, RS, SC, EPN, RIP, ABI>:
// frame pointer, instruction pointer, register set, synchronization count,
// epoch number, retry instruction pointer and address-buffer ID.  A thread
// whose epoch number is zero is non-speculative; its RIP and ABI are zero too.
// These seven fields follow the architecture; their widths are choices of
// this implementation.
//
// The instruction encoding below is this implementation's own.  The
// architecture names the instructions (LOAD, IFETCH, ISTORE, FORKEP, FORKSP,
// STOP, arithmetic, and three speculation instructions: speculative spawn,
// speculative read and commit) but gives no bit layout.
//
//   [31:27] opcode   [26:22] rd   [21:17] ra   [16:12] rb   [11:0] imm
//
// Register 0 of every register set reads as zero.
package sdf_pkg;

  localparam int unsigned XLEN     = 32;  // data and address width (word addresses)
  localparam int unsigned IMM_W    = 12;
  localparam int unsigned IP_W     = 12;  // instruction pointer width
  localparam int unsigned EPN_W    = 16;  // epoch number width
  localparam int unsigned SC_W     = 8;   // synchronization count width
  localparam int unsigned REG_AW   = 5;   // 32 registers per set
  localparam int unsigned RS_W     = 8;   // register-set id field width
  localparam int unsigned ABI_W    = 8;   // address-buffer id field width

  typedef logic [XLEN-1:0] word_t;

  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,
    OP_STOP    = 5'd1,   // end of this code portion (ends the thread if it did not fork)
    OP_LOAD    = 5'd2,   // SP: rd <- mem[FP + imm]            (frame read)
    OP_STORE   = 5'd3,   // SP: mem[R[ra] + imm] <- R[rd]      (frame write, one input to that thread)
    OP_IFETCH  = 5'd4,   // SP: rd <- mem[R[ra] + R[rb]]       (I-structure read)
    OP_ISTORE  = 5'd5,   // SP: mem[R[ra] + R[rb]] <- R[rd]    (I-structure write)
    OP_SPREAD  = 5'd6,   // SP: rd <- mem[R[ra] + R[rb]], recorded in the address buffer
    OP_FORKEP  = 5'd7,   // SP: hand the thread to an EP at imm
    OP_ADDI    = 5'd8,   // SP/EP: rd <- R[ra] + sext(imm)
    OP_ADD     = 5'd9,   // SP/EP: rd <- R[ra] + R[rb]
    OP_SUB     = 5'd10,  // EP: rd <- R[ra] - R[rb]
    OP_MUL     = 5'd11,  // EP: rd <- R[ra] * R[rb]
    OP_FORKSP  = 5'd12,  // EP: hand the thread to an SP (post-store) at imm
    OP_FALLOC  = 5'd13,  // EP: new thread at imm, SC = R[ra]; rd <- its FP
    OP_SPFALLOC= 5'd14,  // EP: new speculative thread at imm, SC = R[ra], RIP = R[rb]; rd <- its FP
    OP_COMMIT  = 5'd15   // EP: post-store at imm, through the speculative commit queue
  } opcode_e;

  typedef struct packed {
    opcode_e             op;
    logic [REG_AW-1:0]   rd;
    logic [REG_AW-1:0]   ra;
    logic [REG_AW-1:0]   rb;
    logic [IMM_W-1:0]    imm;
  } instr_t;

  typedef struct packed {
    word_t               fp;
    logic [IP_W-1:0]     ip;
    logic [RS_W-1:0]     rs;
    logic [SC_W-1:0]     sc;
    logic [EPN_W-1:0]    epn;
    logic [IP_W-1:0]     rip;
    logic [ABI_W-1:0]    abi;
  } cont_t;

  // Messages from the SPs and EPs to the thread schedule unit.
  typedef enum logic [2:0] {
    MSG_FORKEP  = 3'd0,  // continuation goes to the execution queue
    MSG_FORKSP  = 3'd1,  // continuation goes to the post-store queue
    MSG_COMMIT  = 3'd2,  // speculative: commit queue; non-speculative: post-store queue
    MSG_STOP    = 3'd3,  // thread finished: free its frame and register set
    MSG_SYNC    = 3'd4,  // one input written to the frame at cont.fp
    MSG_FALLOC  = 3'd5,  // allocate a frame: cont.ip, cont.sc given
    MSG_SPFALLOC= 3'd6   // as FALLOC, plus epoch number and address-buffer id; cont.rip given
  } msg_e;

  typedef struct packed {
    msg_e   kind;
    cont_t  cont;
  } msg_t;

  // Requests of the SPs to the data cache.
  typedef enum logic [1:0] {
    CREQ_READ   = 2'd0,
    CREQ_SPREAD = 2'd1,
    CREQ_WRITE  = 2'd2
  } creq_e;

  // Cache line state bits, {SpRead, Valid, Dirty(Exclusive)}.
  typedef struct packed {
    logic spread;
    logic valid;
    logic dirty;
  } line_state_t;

  localparam line_state_t ST_I     = '{spread: 1'b0, valid: 1'b0, dirty: 1'b0};
  localparam line_state_t ST_E     = '{spread: 1'b0, valid: 1'b1, dirty: 1'b1};
  localparam line_state_t ST_S     = '{spread: 1'b0, valid: 1'b1, dirty: 1'b0};
  localparam line_state_t ST_SPREX = '{spread: 1'b1, valid: 1'b1, dirty: 1'b1};
  localparam line_state_t ST_SPRSH = '{spread: 1'b1, valid: 1'b1, dirty: 1'b0};

  // Bus transactions, both those the node places and those it snoops.
  typedef enum logic [1:0] {
    BUS_READ_MISS  = 2'd0,  // read a line, others keep shared copies
    BUS_WRITE_MISS = 2'd1,  // acquire exclusive ownership, others invalidate
    BUS_WRITEBACK  = 2'd2   // write a dirty line back to memory
  } bus_cmd_e;

  // Index of the lowest set bit of v, or 128 if v is zero.  Written as
  // vector arithmetic (isolate the lowest one, count the ones below it) so
  // that priority choices over many entries stay flat logic.
  localparam int unsigned PRIO_W = 128;
  function automatic logic [7:0] first_set(logic [PRIO_W-1:0] v);
    logic [PRIO_W-1:0] low;
    low = v & (~v + 1'b1);
    return 8'($countones(low - 1'b1));
  endfunction

  // Round-robin choice: the first set bit at or above ptr, else the first
  // set bit overall; 128 if v is zero.
  function automatic logic [7:0] rr_first(logic [PRIO_W-1:0] v, logic [6:0] ptr);
    logic [PRIO_W-1:0] hi;
    hi = v & ({PRIO_W{1'b1}} << ptr);
    return (hi != '0) ? first_set(hi) : first_set(v);
  endfunction

  function automatic instr_t mk_instr(opcode_e op, int rd, int ra, int rb, int imm);
    instr_t i;
    i.op  = op;
    i.rd  = REG_AW'(rd);
    i.ra  = REG_AW'(ra);
    i.rb  = REG_AW'(rb);
    i.imm = IMM_W'(imm);
    return i;
  endfunction

endpackage
