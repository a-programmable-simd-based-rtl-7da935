// tb_vctrl: random vector instructions (length, repeat count, prefill,
// no-load, store policy).  Checks the number of loads, steps, vector
// boundaries and stores, the restart marks, the step index sequence, the
// one-cycle spacing load -> execute -> store, and the exact number of busy
// cycles: prefill + length*repeat + 2 (+1 without a store).
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_vctrl;
  logic clk = 0, rst_n = 0;
  logic start; logic [6:0] lenm1; logic [15:0] rep; logic prefill, noload, st_each, nostore;
  logic busy, ld_en, ld_restart, rd_v, ex_en, ex_first, ex_last, ex_istart, st_en, st_restart;
  logic [15:0] ex_idx;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vctrl dut (.*);
  initial begin repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 8) $display("%s", what); end
  endtask
  initial begin
    start = 0; lenm1 = 0; rep = 0; prefill = 0; noload = 0; st_each = 0; nostore = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      int L, R, P, nld, nex, nfirst, nlast, nst, nldr, nstr, cyc, lastidx, nrd; bit ldprev, exprev;
      L = (t < 4) ? 1 + t : $urandom_range(1, 128); R = (t % 5 == 0) ? 0 : $urandom_range(1, 4);
      @(negedge clk);
      start = 1; lenm1 = 7'(L - 1); rep = 16'(R); prefill = $urandom_range(1); noload = ($urandom_range(4) == 0);
      st_each = $urandom_range(1); nostore = ($urandom_range(4) == 0);
      if (R == 0) R = 1;
      P = (prefill && !noload) ? 3 : 0;
      nld = 0; nex = 0; nfirst = 0; nlast = 0; nst = 0; nldr = 0; nstr = 0; cyc = 0; lastidx = -1; nrd = 0;
      @(posedge clk); #1; start = 0;
      ldprev = 0; exprev = 0;
      while (busy) begin
        cyc++;
        nld += ld_en; nldr += ld_restart; nrd += rd_v; nst += st_en; nstr += st_restart;
        if (ex_en) begin
          nex++; nfirst += ex_first; nlast += ex_last;
          chk(int'(ex_idx) == lastidx + 1, "step index not consecutive");
          chk(ex_istart == (ex_idx == 0), "istart wrong");
          chk(ex_first == (int'(ex_idx) % L == 0), "first wrong");
          chk(ex_last == (int'(ex_idx) % L == L - 1), "last wrong");
          lastidx = ex_idx;
        end
        chk(rd_v == ldprev, "rd_v not one cycle after load");
        chk(!st_en || exprev, "store without a step in the previous cycle");
        ldprev = ld_en; exprev = ex_en;
        if (ld_restart) chk(nld == 1, "ld_restart not on first load");
        if (st_restart) chk(nst == 1, "st_restart not on first store");
        @(posedge clk); #1;
        if (cyc > 1000) break;
      end
      chk(nld == (noload ? 0 : P + L * R), $sformatf("loads %0d", nld));
      chk(nex == L * R, $sformatf("steps %0d exp %0d", nex, L * R));
      chk(nfirst == R && nlast == R, "vector boundaries");
      chk(nst == (nostore ? 0 : (st_each ? L * R : R)), $sformatf("stores %0d", nst));
      chk(nldr == (noload ? 0 : 1) && nstr == (nostore ? 0 : 1), "restart marks");
      chk(cyc == P + L * R + (nostore ? 1 : 2), $sformatf("busy %0d cycles exp %0d", cyc, P + L * R + 2));
      repeat ($urandom_range(2)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
