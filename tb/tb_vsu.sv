// tb_vsu: random accumulator values and shifts; checks the shifted and
// saturated store data, the write request fields and the feedback register.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_vsu;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0;
  logic st_en, st_restart; logic [3:0] shift;
  logic signed [3:0][31:0] acc_re, acc_im;
  mem_req_t req; cplx_t [3:0] fb;
  cplx_t last [4];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vsu dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int sat(longint v); return v > 32767 ? 32767 : (v < -32768 ? -32768 : int'(v)); endfunction
  initial begin
    st_en = 0; st_restart = 0; shift = 0; acc_re = '0; acc_im = '0;
    for (int k = 0; k < 4; k++) last[k] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      st_en = $urandom_range(1); st_restart = $urandom_range(1); shift = 4'($urandom);
      for (int k = 0; k < 4; k++) begin
        int sc; sc = $urandom_range(3);
        acc_re[k] = (sc == 0) ? 32'($urandom) : 32'($signed($urandom) >>> (8 + 4 * sc));
        acc_im[k] = (sc == 1) ? 32'($urandom) : 32'($signed($urandom) >>> (6 + 4 * sc));
      end
      #1;
      checks++;
      if (req.en != st_en || !req.we || req.dir || req.restart != st_restart || req.wmask != 4'hf) failures++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(req.wdata[k].re) != sat(longint'($signed(acc_re[k])) >>> shift) || int'(req.wdata[k].im) != sat(longint'($signed(acc_im[k])) >>> shift)) begin
          failures++; if (failures < 6) $display("lane %0d shift %0d acc %0d -> %0d", k, shift, acc_re[k], req.wdata[k].re); end
        if (st_en) begin last[k].re = 16'(sat(longint'($signed(acc_re[k])) >>> shift)); last[k].im = 16'(sat(longint'($signed(acc_im[k])) >>> shift)); end
      end
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) begin checks++; if (fb[k] !== last[k]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
