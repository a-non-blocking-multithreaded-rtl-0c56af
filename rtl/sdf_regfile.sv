// sdf_regfile: the register sets (register contexts) of an SDF node.
//
// Each enabled thread owns one register set, allocated by the thread
// schedule unit, and that set travels with the thread between SPs and EPs.
// Every SP and EP therefore reaches every set: each of the NPORTS processor
// ports has two combinational read ports and one write port, all addressed by
// {register set, register}.  Register 0 of every set reads as zero.  Writes
// take effect at the rising clock edge.  At any time a set is in use by one
// processor only, so two ports never write the same set in one cycle; if they
// did, the highest-numbered port would win.
//
// The architecture gives the register set as part of a continuation but not
// the number of sets or registers; NRS and 32 registers are choices here.
module sdf_regfile
  import sdf_pkg::*;
#(
  parameter int unsigned NPORTS = 8,
  parameter int unsigned NRS    = 16
) (
  input  logic                 clk,
  input  logic [RS_W-1:0]      ra_set  [NPORTS],
  input  logic [REG_AW-1:0]    ra_reg  [NPORTS],
  output word_t                ra_data [NPORTS],
  input  logic [RS_W-1:0]      rb_set  [NPORTS],
  input  logic [REG_AW-1:0]    rb_reg  [NPORTS],
  output word_t                rb_data [NPORTS],
  input  logic                 we      [NPORTS],
  input  logic [RS_W-1:0]      w_set   [NPORTS],
  input  logic [REG_AW-1:0]    w_reg   [NPORTS],
  input  word_t                w_data  [NPORTS]
);
  localparam int unsigned NREGS = 2**REG_AW;
  localparam int unsigned SW    = (NRS > 1) ? $clog2(NRS) : 1;

  word_t regs [NRS][NREGS];

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      ra_data[p] = (ra_reg[p] == '0) ? '0 : regs[SW'(ra_set[p])][ra_reg[p]];
      rb_data[p] = (rb_reg[p] == '0) ? '0 : regs[SW'(rb_set[p])][rb_reg[p]];
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (we[p]) regs[SW'(w_set[p])][w_reg[p]] <= w_data[p];
    end
  end
endmodule
