// tb_deq_agu: streams writes into the circular delay buffer while reading
// at several finger delays and strides; expected write and read pointers
// are tracked with modulo arithmetic.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_deq_agu;
  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [3:0] cfg_reg; logic [15:0] cfg_data; logic acc, we, restart;
  logic [9:0] addr, len_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  deq_agu dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wcfg(int r, int d);
    @(negedge clk); cfg_we = 1; cfg_reg = 4'(r); cfg_data = 16'(d); @(posedge clk); #1; cfg_we = 0;
  endtask
  initial begin
    int len, wp, rp, mark, delay, rstride;
    cfg_we = 0; cfg_reg = 0; cfg_data = 0; acc = 0; we = 0; restart = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    wp = 0;
    for (int t = 0; t < 30; t++) begin
      len = 16 * $urandom_range(2, 60); delay = $urandom_range(len - 1); rstride = 4 * $urandom_range(1, 4);
      wcfg(0, len); wcfg(4, 0); wp = 0; wcfg(1, delay); wcfg(2, rstride);
      for (int n = 0; n < $urandom_range(0, 70); n++) begin
        @(negedge clk); acc = 1; we = 1; #1;
        checks++; if (int'(addr) != wp) begin failures++; if (failures < 5) $display("wr addr %0d exp %0d", addr, wp); end
        @(posedge clk); #1; wp = (wp + 1) % len;
      end
      acc = 0; we = 0;
      wcfg(3, 0); mark = wp;
      for (int n = 0; n < 50; n++) begin
        int exp;
        @(negedge clk); acc = 1; we = 0; restart = (n == 0);
        if (n == 0) rp = (mark + delay) % len;
        #1;
        exp = rp;
        checks++; if (int'(addr) != exp) begin failures++; if (failures < 5) $display("t%0d rd %0d addr %0d exp %0d", t, n, addr, exp); end
        @(posedge clk); #1; rp = (rp + rstride) % len;
      end
      acc = 0; restart = 0;
      checks++; if (int'(len_o) != len) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
