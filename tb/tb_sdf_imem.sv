// tb_sdf_imem: loads random instructions and reads them back through all
// read ports at random addresses.
module tb_sdf_imem;
  import sdf_pkg::*;
  localparam int NP = 3, DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [IP_W-1:0] waddr; instr_t wdata;
  logic [IP_W-1:0] raddr [NP]; instr_t rdata [NP];
  sdf_imem #(.NPORTS(NP), .DEPTH(DEPTH)) dut (.*);
  int checks = 0, failures = 0;
  instr_t ref_m [DEPTH];
  initial begin
    we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = IP_W'(a); wdata = instr_t'($urandom); ref_m[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 200; t++) begin
      for (int p = 0; p < NP; p++) raddr[p] = IP_W'($urandom_range(0, DEPTH-1));
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (rdata[p] != ref_m[raddr[p]]) begin failures++; $display("FAIL: port %0d addr %0d", p, raddr[p]); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
