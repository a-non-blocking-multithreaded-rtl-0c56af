// sdf_imem: instruction memory holding the threads' code.  A continuation's
// IP (and RIP) index it.  Each SP and EP has its own combinational read port;
// one write port loads the code before the node runs.  The architecture only
// says that IP points to the thread code; the size and the port structure are
// choices of this implementation.
module sdf_imem
  import sdf_pkg::*;
#(
  parameter int unsigned NPORTS = 8,
  parameter int unsigned DEPTH  = 1024
) (
  input  logic               clk,
  input  logic               we,
  input  logic [IP_W-1:0]    waddr,
  input  instr_t             wdata,
  input  logic [IP_W-1:0]    raddr [NPORTS],
  output instr_t             rdata [NPORTS]
);
  localparam int unsigned AW = $clog2(DEPTH);
  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[AW'(waddr)] <= wdata;
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) rdata[p] = mem[AW'(raddr[p])];
  end
endmodule
