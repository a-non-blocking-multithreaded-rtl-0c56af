// sdf_spec_cache: the node's data cache with speculative line states.
//
// Only SPs reach data memory; this cache serves all NSP of them through a
// round-robin choice, one request at a time.  Each line carries three bits,
// {SpRead, Valid, Dirty}, that encode five states as in the architecture's
// state table:  I = x0x,  E/M = 011,  S = 010,  SpR-Ex = 111,  SpR-Sh = 110.
// The SpRead bit marks a line that a speculative thread has read.
//
// Requests from the node (SP side):
//   read    hit: state kept.       miss: place a read miss on the bus -> S
//   spread  hit: E->SpR-Ex, S->SpR-Sh, SpR-* kept.
//           miss: place a read miss on the bus -> SpR-Sh
//   write   hit in E or SpR-Ex: -> E.   hit in S or SpR-Sh: place a write
//           miss (invalidate) on the bus -> E.   miss: place a write miss -> E
//   A miss that evicts a dirty line (E or SpR-Ex) first writes it back.
// Requests snooped from the bus:
//   read miss : E -> S, SpR-Ex -> SpR-Sh (dirty data written back); S and
//               SpR-Sh kept.
//   write miss: any valid line -> I (dirty data written back).  If the line
//               was speculatively read (SpR-Ex/SpR-Sh) the address is passed
//               to the address buffer (ext_inv_*).  It is also passed when
//               the line is not in the cache, because a speculatively read
//               line may have been evicted; that is a conservative choice of
//               this implementation.
// The architecture gives the state encoding and the transition labels; the
// cache organisation (direct mapped, one word per line, write-back, write
// allocate), the bus handshake and the exact transitions above, which follow
// the usual MESI rules, are choices of this implementation.
//
// Timing: a request is taken in IDLE and looked up the next cycle; a hit
// answers in that cycle (req_done[p] high for one cycle, rdata valid then;
// on a read miss rdata is the bus data),
// so a hit takes 2 cycles.  Bus transactions use a valid/ready handshake; a
// read miss returns data with bus_ready.  A snoop is taken when the cache is
// idle (ahead of a new SP request) or while it waits for its own bus
// transaction (write-back, miss or upgrade), and is handled in the cycle
// snp_ready is high; snp_wb/snp_wb_data show the written-back data in that
// same cycle.  A snoop that hits the line of a pending upgrade invalidates
// it; the upgrade then completes as a write miss, which is correct because a
// line holds one word and the write replaces all of it.
module sdf_spec_cache
  import sdf_pkg::*;
#(
  parameter int unsigned NSP    = 4,
  parameter int unsigned NLINES = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  // SP ports
  input  logic          req_valid [NSP],
  input  creq_e         req_cmd   [NSP],
  input  word_t         req_addr  [NSP],
  input  word_t         req_wdata [NSP],
  output logic          req_done  [NSP],
  output word_t         rdata,
  // bus master port
  output logic          bus_valid,
  output bus_cmd_e      bus_cmd,
  output word_t         bus_addr,
  output word_t         bus_wdata,
  input  logic          bus_ready,
  input  word_t         bus_rdata,
  // snooped bus requests
  input  logic          snp_valid,
  input  bus_cmd_e      snp_cmd,
  input  word_t         snp_addr,
  output logic          snp_ready,
  output logic          snp_wb,
  output word_t         snp_wb_data,
  // invalidations forwarded to the address buffer
  output logic          ext_inv_valid,
  output word_t         ext_inv_addr
);
  localparam int unsigned IW = $clog2(NLINES);
  localparam int unsigned TW = XLEN - IW;
  localparam int unsigned PW = (NSP > 1) ? $clog2(NSP) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WB, S_MISS, S_UPG} fsm_e;

  line_state_t       st   [NLINES];
  logic [TW-1:0]     tag  [NLINES];
  word_t             data [NLINES];

  fsm_e          fsm;
  logic [PW-1:0] cur, rr_ptr;
  creq_e         c_cmd;
  word_t         c_addr, c_wdata;

  logic [IW-1:0] c_idx;
  logic [TW-1:0] c_tag;
  line_state_t   c_st;
  logic          c_hit;
  assign c_idx = c_addr[IW-1:0];
  assign c_tag = c_addr[XLEN-1:IW];
  assign c_st  = st[c_idx];
  assign c_hit = c_st.valid && tag[c_idx] == c_tag;

  // snoop lookup
  logic [IW-1:0] s_idx;
  line_state_t   s_st;
  logic          s_hit;
  assign s_idx = snp_addr[IW-1:0];
  assign s_st  = st[s_idx];
  assign s_hit = s_st.valid && tag[s_idx] == snp_addr[XLEN-1:IW];

  // arbitration
  logic          pick_v;
  logic [PW-1:0] pick;
  logic [NSP-1:0] reqv;
  always_comb begin
    for (int p = 0; p < NSP; p++) reqv[p] = req_valid[p];
    pick_v = (reqv != '0);
    pick   = PW'(rr_first(PRIO_W'(reqv), 7'(rr_ptr)));
  end

  // Snoops are taken when idle and also while this cache waits for its own
  // bus transaction, so that two nodes waiting on one bus cannot deadlock.
  assign snp_ready     = snp_valid && (fsm inside {S_IDLE, S_WB, S_MISS, S_UPG});
  assign snp_wb        = snp_ready && s_hit && s_st.dirty;
  assign snp_wb_data   = data[s_idx];
  assign ext_inv_valid = snp_ready && snp_cmd == BUS_WRITE_MISS && (!s_hit || s_st.spread);
  assign ext_inv_addr  = snp_addr;
  assign rdata         = (fsm == S_MISS) ? bus_rdata : data[c_idx];

  logic done;
  always_comb begin
    done = 1'b0;
    unique case (fsm)
      S_LOOKUP: done = c_hit && !(c_cmd == CREQ_WRITE && !c_st.dirty);
      S_MISS, S_UPG: done = bus_ready;
      default: ;
    endcase
    for (int p = 0; p < NSP; p++) req_done[p] = done && (cur == PW'(p));

    bus_valid = 1'b0;
    bus_cmd   = BUS_READ_MISS;
    bus_addr  = c_addr;
    bus_wdata = c_wdata;
    unique case (fsm)
      S_WB: begin
        bus_valid = 1'b1;
        bus_cmd   = BUS_WRITEBACK;
        bus_addr  = {tag[c_idx], c_idx};
        bus_wdata = data[c_idx];
      end
      S_MISS: begin
        bus_valid = 1'b1;
        bus_cmd   = (c_cmd == CREQ_WRITE) ? BUS_WRITE_MISS : BUS_READ_MISS;
      end
      S_UPG: begin
        bus_valid = 1'b1;
        bus_cmd   = BUS_WRITE_MISS;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm    <= S_IDLE;
      cur    <= '0;
      rr_ptr <= '0;
      c_cmd  <= CREQ_READ;
      c_addr <= '0;
      c_wdata<= '0;
      for (int i = 0; i < NLINES; i++) st[i] <= ST_I;
    end else begin
      // snoop first: a fill of this cache's own request in the same cycle
      // (below) is the later bus transaction and overrides it
      if (snp_ready && s_hit) begin
        if (snp_cmd == BUS_WRITE_MISS) st[s_idx] <= ST_I;
        else if (snp_cmd == BUS_READ_MISS)
          st[s_idx] <= s_st.spread ? ST_SPRSH : ST_S;
      end
      unique case (fsm)
        S_IDLE: begin
          if (!snp_valid && pick_v) begin
            cur     <= pick;
            rr_ptr  <= (pick == PW'(NSP-1)) ? '0 : pick + 1'b1;
            c_cmd   <= req_cmd[pick];
            c_addr  <= req_addr[pick];
            c_wdata <= req_wdata[pick];
            fsm     <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (c_hit) begin
            unique case (c_cmd)
              CREQ_READ:   fsm <= S_IDLE;
              CREQ_SPREAD: begin
                st[c_idx] <= c_st.dirty ? ST_SPREX : ST_SPRSH;
                fsm <= S_IDLE;
              end
              default: begin  // write
                if (c_st.dirty) begin
                  st[c_idx]   <= ST_E;
                  data[c_idx] <= c_wdata;
                  fsm <= S_IDLE;
                end else begin
                  fsm <= S_UPG;
                end
              end
            endcase
          end else begin
            fsm <= (c_st.valid && c_st.dirty) ? S_WB : S_MISS;
          end
        end
        S_WB: if (bus_ready) fsm <= S_MISS;
        S_MISS: begin
          if (bus_ready) begin
            tag[c_idx] <= c_tag;
            unique case (c_cmd)
              CREQ_READ:   begin st[c_idx] <= ST_S;     data[c_idx] <= bus_rdata; end
              CREQ_SPREAD: begin st[c_idx] <= ST_SPRSH; data[c_idx] <= bus_rdata; end
              default:     begin st[c_idx] <= ST_E;     data[c_idx] <= c_wdata;   end
            endcase
            fsm <= S_IDLE;
          end
        end
        S_UPG: begin
          if (bus_ready) begin
            st[c_idx]   <= ST_E;
            data[c_idx] <= c_wdata;
            fsm <= S_IDLE;
          end
        end
        default: fsm <= S_IDLE;
      endcase
    end
  end
endmodule
