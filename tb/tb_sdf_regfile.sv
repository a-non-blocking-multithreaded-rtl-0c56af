// tb_sdf_regfile: writes random values into random registers of random
// register sets through every port and reads them back through every read
// port, against a reference array; register 0 must read as zero.
module tb_sdf_regfile;
  import sdf_pkg::*;
  localparam int NP = 3, NRS = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [RS_W-1:0] ra_set [NP], rb_set [NP], w_set [NP];
  logic [REG_AW-1:0] ra_reg [NP], rb_reg [NP], w_reg [NP];
  word_t ra_data [NP], rb_data [NP], w_data [NP];
  logic we [NP];

  sdf_regfile #(.NPORTS(NP), .NRS(NRS)) dut (.*);

  int checks = 0, failures = 0;
  word_t ref_rf [NRS][32];

  initial begin
    for (int p = 0; p < NP; p++) begin we[p] = 0; w_set[p] = '0; w_reg[p] = '0; w_data[p] = '0; end
    // initialise every register through port 0
    for (int s = 0; s < NRS; s++) for (int r = 0; r < 32; r++) begin
      @(negedge clk); we[0] = 1; w_set[0] = RS_W'(s); w_reg[0] = REG_AW'(r); w_data[0] = word_t'($urandom);
      ref_rf[s][r] = (r == 0) ? '0 : w_data[0];
    end
    @(negedge clk); we[0] = 0;
    for (int t = 0; t < 500; t++) begin
      // each port writes a different set, so no two ports write the same register
      for (int p = 0; p < NP; p++) begin
        we[p] = $urandom_range(0, 1) == 1;
        w_set[p] = RS_W'(p); w_reg[p] = REG_AW'($urandom_range(0, 31)); w_data[p] = word_t'($urandom);
        ra_set[p] = RS_W'($urandom_range(0, NRS-1)); ra_reg[p] = REG_AW'($urandom_range(0, 31));
        rb_set[p] = RS_W'($urandom_range(0, NRS-1)); rb_reg[p] = REG_AW'($urandom_range(0, 31));
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        checks += 2;
        if (ra_data[p] != ref_rf[ra_set[p]][ra_reg[p]]) begin failures++; $display("FAIL: port %0d a", p); end
        if (rb_data[p] != ref_rf[rb_set[p]][rb_reg[p]]) begin failures++; $display("FAIL: port %0d b", p); end
      end
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (we[p] && w_reg[p] != 0) ref_rf[w_set[p]][w_reg[p]] = w_data[p];
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
