// tb_vlu: checks the lane operands in all four load modes: parallel,
// broadcast, sliding window (lane k = element n+k of the one-per-step
// stream, including the prefill) and feedback (lane k = stored value of lane
// k + step, modulo 4).
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_vlu;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] mode; logic rd_v; mem_rdata_t rdata; cplx_t [3:0] fb, x; logic [15:0] rot;
  cplx_t stream [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vlu dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic cplx_t rnd(); cplx_t v; v.re = 16'($urandom); v.im = 16'($urandom); return v; endfunction
  task automatic chk(int k, cplx_t exp);
    checks++; if (x[k] !== exp) begin failures++; if (failures < 6) $display("mode %0d lane %0d got %h exp %h", mode, k, x[k], exp); end
  endtask
  initial begin
    mode = LD_PAR; rd_v = 0; rdata = '0; fb = '0; rot = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk); mode = LD_PAR; rd_v = 1; for (int k = 0; k < 4; k++) rdata[k] = rnd(); #1;
      for (int k = 0; k < 4; k++) chk(k, rdata[k]);
      mode = LD_BCAST; #1; for (int k = 0; k < 4; k++) chk(k, rdata[0]);
      mode = LD_FB; rot = 16'($urandom); for (int k = 0; k < 4; k++) fb[k] = rnd(); #1; for (int k = 0; k < 4; k++) chk(k, fb[(k + int'(rot)) % 4]);
    end
    @(negedge clk); mode = LD_SLIDE; rd_v = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk); rd_v = ($urandom_range(3) != 0);
      for (int k = 0; k < 4; k++) rdata[k] = rnd();
      if (rd_v) stream.push_back(rdata[0]);
      #1;
      if (stream.size() >= 4) for (int k = 0; k < 4; k++) chk(k, stream[stream.size() - 4 + k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
