// tb_mem_bank: a normal bank and a delay equalizer bank side by side.
// Normal bank: random single and 4-wide direct writes, then 4-wide reads at
// random (unaligned) addresses and AGU-driven streaming reads, all checked
// against an element array.  Delay equalizer bank: samples are written one
// at a time through the write pointer, then 4-wide reads at a finger delay
// must return elements e, e+4, e+8, e+12 (modulo the buffer length) in one
// access, checked against the written samples.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_mem_bank;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [3:0] cfg_reg; logic [15:0] cfg_data;
  mem_req_t rq0, rq1; mem_rdata_t rd0, rd1;
  logic cfg0, cfg1;
  cplx_t model0 [1024];
  cplx_t model1 [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mem_bank #(.DEQ(1'b0)) u_n (.clk, .rst_n, .cfg_we(cfg_we && cfg0), .cfg_reg, .cfg_data, .req(rq0), .rdata(rd0));
  mem_bank #(.DEQ(1'b1)) u_d (.clk, .rst_n, .cfg_we(cfg_we && cfg1), .cfg_reg, .cfg_data, .req(rq1), .rdata(rd1));
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wcfg(bit which, int r, int d);
    @(negedge clk); cfg0 = !which; cfg1 = which; cfg_we = 1; cfg_reg = 4'(r); cfg_data = 16'(d);
    @(posedge clk); #1; cfg_we = 0;
  endtask
  function automatic cplx_t rnd(); cplx_t v; v.re = 16'($urandom); v.im = 16'($urandom); return v; endfunction
  task automatic chk(cplx_t got, cplx_t exp, string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 6) $display("%s: got %h exp %h", what, got, exp); end
  endtask
  initial begin
    int len, delay, mark, a, base, stride;
    cfg_we = 0; cfg0 = 0; cfg1 = 0; cfg_reg = 0; cfg_data = 0; rq0 = '0; rq1 = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    // fill the normal bank with 4-wide aligned direct writes
    for (int r = 0; r < 256; r++) begin
      @(negedge clk); rq0 = '0; rq0.en = 1; rq0.we = 1; rq0.dir = 1; rq0.addr = 10'(4 * r); rq0.wmask = 4'hf;
      for (int k = 0; k < 4; k++) begin rq0.wdata[k] = rnd(); model0[4*r+k] = rq0.wdata[k]; end
      @(posedge clk); #1;
    end
    // random partial unaligned writes
    for (int n = 0; n < 300; n++) begin
      @(negedge clk); rq0 = '0; rq0.en = 1; rq0.we = 1; rq0.dir = 1; a = $urandom_range(1023); rq0.addr = 10'(a);
      rq0.wmask = 4'($urandom);
      for (int k = 0; k < 4; k++) begin rq0.wdata[k] = rnd(); if (rq0.wmask[k]) model0[(a+k)%1024] = rq0.wdata[k]; end
      @(posedge clk); #1;
    end
    // unaligned direct reads
    for (int n = 0; n < 300; n++) begin
      @(negedge clk); rq0 = '0; rq0.en = 1; rq0.dir = 1; a = $urandom_range(1023); rq0.addr = 10'(a);
      @(posedge clk); #1; rq0 = '0;
      for (int k = 0; k < 4; k++) chk(rd0[k], model0[(a+k)%1024], "direct read");
    end
    // AGU streaming reads, one per cycle
    base = 100; stride = 4;
    wcfg(0, 0, base); wcfg(0, 1, stride); wcfg(0, 2, 0);
    @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      rq0 = '0; rq0.en = 1; rq0.restart = (n == 0);
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) chk(rd0[k], model0[(base + stride*n + k) % 1024], "agu read");
      @(negedge clk);
    end
    rq0 = '0;
    // delay equalizer bank
    for (int t = 0; t < 6; t++) begin
      len = 16 * $urandom_range(4, 64);
      wcfg(1, 0, len); wcfg(1, 4, 0); wcfg(1, 2, 16);
      for (int n = 0; n < len; n++) begin
        @(negedge clk); rq1 = '0; rq1.en = 1; rq1.we = 1; rq1.wmask = 4'b0001; rq1.wdata[0] = rnd(); model1[n] = rq1.wdata[0];
        @(posedge clk); #1;
      end
      rq1 = '0;
      wcfg(1, 3, 0); mark = 0;
      for (int f = 0; f < 4; f++) begin
        delay = $urandom_range(len - 1);
        wcfg(1, 1, delay);
        @(negedge clk);
        for (int n = 0; n < 20; n++) begin
          rq1 = '0; rq1.en = 1; rq1.restart = (n == 0);
          @(posedge clk); #1;
          for (int k = 0; k < 4; k++) chk(rd1[k], model1[(mark + delay + 16*n + 4*k) % len], "deq read");
          @(negedge clk);
        end
        rq1 = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
