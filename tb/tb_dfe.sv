// tb_dfe: loads random Q15 coefficients, streams random samples with gaps,
// and checks every DEC-th filter output (value, one-cycle latency and the
// crossbar write request) against a direct FIR sum over the input history.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_dfe;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [3:0] cfg_reg; logic [15:0] cfg_data;
  logic in_valid, out_valid; cplx_t in_sample, out_sample; mem_req_t wr_req;
  int h [8];
  cplx_t hist [$];
  int nin, nout, nexp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  dfe dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int sat(longint v); return v > 32767 ? 32767 : (v < -32768 ? -32768 : int'(v)); endfunction
  initial begin
    longint er, ei; bit pend;
    cfg_we = 0; cfg_reg = 0; cfg_data = 0; in_valid = 0; in_sample = '0; nin = 0; nout = 0; nexp = 0; pend = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      h[i] = $urandom_range(16000) - 8000;
      @(negedge clk); cfg_we = 1; cfg_reg = 4'(i); cfg_data = 16'(h[i]); @(posedge clk); #1; cfg_we = 0;
    end
    for (int i = 0; i < 8; i++) hist.push_front('0);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // output of the previous cycle's decimation input
      checks++;
      if (out_valid != pend) begin failures++; $display("out_valid %0d exp %0d at %0d", out_valid, pend, n); end
      if (pend) begin
        checks++; nout++;
        if (int'(out_sample.re) != sat(er >>> 15) || int'(out_sample.im) != sat(ei >>> 15) || !wr_req.en || !wr_req.we || wr_req.wmask != 4'b0001 || wr_req.wdata[0] != out_sample) begin
          failures++; if (failures < 6) $display("out %h exp %0d,%0d", out_sample, sat(er >>> 15), sat(ei >>> 15));
        end
      end
      pend = 0;
      in_valid = ($urandom_range(4) != 0);
      in_sample.re = 16'($urandom); in_sample.im = 16'($urandom);
      if (in_valid) begin
        hist.push_front(in_sample); void'(hist.pop_back()); nin++;
        if (nin % 2 == 0) begin
          er = 0; ei = 0;
          for (int i = 0; i < 8; i++) begin er += longint'(h[i]) * hist[i].re; ei += longint'(h[i]) * hist[i].im; end
          pend = 1; nexp++;
        end
      end
    end
    checks++; if (nout != nexp - int'(pend) || nout < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
