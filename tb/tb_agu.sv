// tb_agu: programs base, stride and circular length, then runs random
// accesses (some with restart) against a reference address sequence.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_agu;
  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [3:0] cfg_reg; logic [15:0] cfg_data; logic acc, restart;
  logic [9:0] addr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  agu dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wcfg(int r, int d);
    @(negedge clk); cfg_we = 1; cfg_reg = 4'(r); cfg_data = 16'(d); @(posedge clk); #1; cfg_we = 0;
  endtask
  initial begin
    cfg_we = 0; cfg_reg = 0; cfg_data = 0; acc = 0; restart = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int base, stride, len, off, cur, exp;
      base = $urandom_range(1023); stride = $urandom_range(1, 9); len = (t % 4 == 0) ? 0 : $urandom_range(stride, 200);
      wcfg(0, base); wcfg(1, stride); wcfg(2, len);
      off = 0;
      for (int n = 0; n < 100; n++) begin
        @(negedge clk);
        acc = $urandom_range(3) != 0; restart = ($urandom_range(15) == 0);
        if (restart) cur = 0; else cur = off;
        #1;
        exp = (base + cur) % 1024;
        checks++;
        if (int'(addr) != exp) begin failures++; if (failures < 5) $display("t%0d n%0d addr %0d exp %0d", t, n, addr, exp); end
        if (acc) begin off = cur + stride; if (len != 0 && off >= len) off -= len; off %= 1024; end
        @(posedge clk); #1;
      end
      acc = 0; restart = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
