// tb_mem_xbar: every master drives a request tagged with its own number;
// after each random remapping the test checks that no bank sees the new
// master one cycle after the configuration write, that every bank sees it
// two cycles after, and that read data are returned to the owner of the bank
// (lowest bank wins) one cycle after the request.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_mem_xbar;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [3:0] cfg_reg; logic [15:0] cfg_data;
  mem_req_t [6:0] m_req; mem_rdata_t [6:0] m_rdata;
  mem_req_t [7:0] b_req; mem_rdata_t [7:0] b_rdata;
  logic [7:0][2:0] map_o;
  int map [8];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mem_xbar dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int owner_bank(int m);
    for (int b = 0; b < 8; b++) if (map[b] == m) return b;
    return -1;
  endfunction
  always_comb begin
    for (int m = 0; m < 7; m++) begin
      m_req[m] = '0; m_req[m].en = 1; m_req[m].addr = 10'(m + 1); m_req[m].wdata[0].re = 16'(100 + m);
    end
    for (int b = 0; b < 8; b++) for (int k = 0; k < 4; k++) begin b_rdata[b][k].re = 16'(1000 + b); b_rdata[b][k].im = 16'(k); end
  end
  initial begin
    cfg_we = 0; cfg_reg = 0; cfg_data = 0;
    for (int b = 0; b < 8; b++) map[b] = 7;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int b, m, old;
      b = $urandom_range(7); m = $urandom_range(7); old = map[b];
      @(negedge clk); cfg_we = 1; cfg_reg = 4'(b); cfg_data = 16'(m);
      @(posedge clk); #1; cfg_we = 0;
      // one cycle after the write: still the old connection
      checks++;
      if (old < 7 ? (int'(b_req[b].addr) != old + 1) : (b_req[b].en != 0)) begin failures++; $display("early switch bank %0d", b); end
      @(posedge clk); #1;
      map[b] = m;
      for (int bb = 0; bb < 8; bb++) begin
        checks++;
        if (map[bb] < 7) begin
          if (!b_req[bb].en || int'(b_req[bb].addr) != map[bb] + 1 || int'(b_req[bb].wdata[0].re) != 100 + map[bb]) begin
            failures++; if (failures < 6) $display("bank %0d routed wrong", bb); end
        end else if (b_req[bb].en) begin failures++; $display("bank %0d should be idle", bb); end
      end
      @(posedge clk); #1;
      for (int mm = 0; mm < 7; mm++) begin
        int ob; ob = owner_bank(mm);
        checks++;
        if (ob < 0 ? (m_rdata[mm] != '0) : (int'(m_rdata[mm][0].re) != 1000 + ob || int'(m_rdata[mm][3].im) != 3)) begin
          failures++; if (failures < 6) $display("master %0d read data wrong (owner %0d)", mm, ob); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
