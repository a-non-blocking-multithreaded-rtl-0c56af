// tb_sdf_fifo: checks a thread queue against a reference queue under random
// pushes and pops, including full and empty conditions and the one-cycle
// push-to-pop latency.
module tb_sdf_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push_valid, push_ready, pop_valid, pop_ready;
  logic [15:0] push_data, pop_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  sdf_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] ref_q [$];
  int n_full = 0, n_empty = 0;

  initial begin
    push_valid = 0; pop_ready = 0; push_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (pop_valid || count != 0) begin failures++; $display("FAIL: not empty after reset"); end
    // one push, popped on the next cycle
    push_valid = 1; push_data = 16'hBEEF;
    @(negedge clk); push_valid = 0;
    checks++; if (!pop_valid || pop_data != 16'hBEEF) begin failures++; $display("FAIL: push-to-pop latency"); end
    pop_ready = 1; @(negedge clk); pop_ready = 0;
    for (int t = 0; t < 2000; t++) begin
      push_valid = ($urandom_range(0, 3) != 0) && (t < 1000 || t % 7 == 0);
      pop_ready  = ($urandom_range(0, 2) == 0) || t >= 1000;
      push_data  = 16'($urandom);
      #1;
      checks++;
      if (push_ready != (ref_q.size() < DEPTH) || pop_valid != (ref_q.size() > 0) ||
          count != ref_q.size()) begin
        failures++; $display("FAIL: flags at t=%0d size=%0d", t, ref_q.size());
      end
      if (pop_valid) begin
        checks++;
        if (pop_data != ref_q[0]) begin failures++; $display("FAIL: data %h != %h", pop_data, ref_q[0]); end
      end
      if (ref_q.size() == DEPTH) n_full++;
      if (ref_q.size() == 0) n_empty++;
      @(posedge clk);
      if (pop_valid && pop_ready) void'(ref_q.pop_front());
      if (push_valid && push_ready) ref_q.push_back(push_data);
      @(negedge clk);
    end
    checks++; if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL: full/empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
