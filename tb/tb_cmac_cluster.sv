// tb_cmac_cluster: the vector CMAC cluster against behavioural memories for
// ports A, B and the store port.  Runs maximum ratio combining (MAC with
// conjugated channel estimates and a repeat count), channel weighting with
// a broadcast weight (MUL), radix-2 butterflies, a peak search and a
// feedback operation; expected values are computed with integer complex
// arithmetic, and each instruction's busy time is checked.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_cmac_cluster;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0;
  logic vi_valid, vi_ready, busy; vinstr_t vi;
  mem_req_t lda_req, ldb_req, st_req; mem_rdata_t lda_rdata, ldb_rdata;
  logic [31:0] max_val; logic [15:0] max_idx;
  cplx_t ma [512]; cplx_t mb [512];
  cplx_t out [256][2];
  int pa, pb, ps, sa, sb, nstores, nbreads;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cmac_cluster dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    if (lda_req.en) begin
      int p; p = lda_req.restart ? 0 : pa;
      for (int k = 0; k < 4; k++) lda_rdata[k] <= ma[(p + k) % 512];
      pa <= p + sa;
    end
    if (ldb_req.en) begin
      int p; p = ldb_req.restart ? 0 : pb;
      for (int k = 0; k < 4; k++) ldb_rdata[k] <= mb[(p + k) % 512];
      pb <= p + sb; nbreads <= nbreads + 1;
    end
    if (st_req.en) begin
      int p; p = st_req.restart ? 0 : ps;
      for (int k = 0; k < 2; k++) out[p][k] <= st_req.wdata[k];
      ps <= p + 1; nstores <= nstores + 1;
    end
  end

  task automatic run(vop_e op, ldmode_e m, bit cj, int len, int rep, int sh, int stepa, int stepb, int exp_cycles);
    int cyc;
    sa = stepa; sb = stepb;
    @(negedge clk);
    vi = '0; vi.op = op; vi.ldmode = m; vi.conj = cj; vi.lenm1 = 7'(len - 1); vi.rep = 16'(rep); vi.shift = 4'(sh);
    vi_valid = 1;
    @(posedge clk); #1; vi_valid = 0; cyc = 0;
    while (busy) begin @(posedge clk); #1; cyc++; end
    @(posedge clk); #1;
    checks++;
    if (cyc != exp_cycles) begin failures++; $display("op %0d: busy %0d cycles, expected %0d", op, cyc, exp_cycles); end
  endtask
  function automatic int sat(longint v); return v > 32767 ? 32767 : (v < -32768 ? -32768 : int'(v)); endfunction
  task automatic chk(int row, int k, longint er, longint ei, string what);
    checks++;
    if (int'(out[row][k].re) != sat(er) || int'(out[row][k].im) != sat(ei)) begin
      failures++; if (failures < 8) $display("%s row %0d lane %0d: got %h exp %0d,%0d", what, row, k, out[row][k], sat(er), sat(ei));
    end
  endtask
  function automatic void cmul(cplx_t u, cplx_t v, bit cj, output longint r, output longint i);
    longint vi_; vi_ = cj ? -longint'(v.im) : longint'(v.im);
    r = longint'(u.re) * v.re - longint'(u.im) * vi_;
    i = longint'(u.re) * vi_ + longint'(u.im) * v.re;
  endfunction

  initial begin
    for (int i = 0; i < 512; i++) begin
      ma[i].re = 16'($urandom_range(8000) - 4000); ma[i].im = 16'($urandom_range(8000) - 4000);
      mb[i].re = 16'($urandom_range(30000) - 15000); mb[i].im = 16'($urandom_range(30000) - 15000);
    end
    ma[77].re = 16'sd9000; ma[77].im = -16'sd9000;      // the peak
    vi_valid = 0; vi = '0; pa = 0; pb = 0; ps = 0; nstores = 0; nbreads = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    // 1. MRC: 3 symbols, each combining 8 steps x 2 lanes of finger data
    run(VOP_MAC, LD_PAR, 1'b1, 8, 3, 12, 2, 2, 24 + 2);
    for (int r = 0; r < 3; r++)
      for (int l = 0; l < 2; l++) begin
        longint ar, ai, pr, pi; ar = 0; ai = 0;
        for (int s = 0; s < 8; s++) begin cmul(ma[16*r + 2*s + l], mb[16*r + 2*s + l], 1'b1, pr, pi); ar += pr; ai += pi; end
        chk(r, l, ar >>> 12, ai >>> 12, "mrc");
      end
    // 2. weighting with a broadcast weight
    run(VOP_MUL, LD_BCAST, 1'b0, 10, 1, 15, 2, 1, 10 + 2);
    for (int s = 0; s < 10; s++)
      for (int l = 0; l < 2; l++) begin
        longint pr, pi; cmul(ma[2*s + l], mb[s], 1'b0, pr, pi); chk(s, l, pr >>> 15, pi >>> 15, "weight");
      end
    // 3. butterflies: pairs from A, twiddle from B
    run(VOP_BFLY, LD_PAR, 1'b0, 12, 1, 15, 2, 1, 12 + 2);
    for (int s = 0; s < 12; s++) begin
      longint tr, ti; cmul(ma[2*s + 1], mb[s], 1'b0, tr, ti);
      chk(s, 0, ((longint'(ma[2*s].re) << 15) + tr) >>> 15, ((longint'(ma[2*s].im) << 15) + ti) >>> 15, "bfly y0");
      chk(s, 1, ((longint'(ma[2*s].re) << 15) - tr) >>> 15, ((longint'(ma[2*s].im) << 15) - ti) >>> 15, "bfly y1");
    end
    // 4. peak search over 128 elements; port B must stay idle
    begin
      int nb0, ns0; nb0 = nbreads; ns0 = nstores;
      run(VOP_MAXS, LD_PAR, 1'b0, 64, 1, 0, 2, 2, 64 + 1);
      checks++;
      if (int'(max_idx) != 77 || max_val != 32'd162000000) begin failures++; $display("peak %0d at %0d", max_val, max_idx); end
      checks++; if (nbreads != nb0 || nstores != ns0) begin failures++; $display("peak search touched B or stored"); end
    end
    // 5. feedback: last stored pair times B
    begin
      cplx_t prev [2];
      prev[0] = out[11][0]; prev[1] = out[11][1];
      run(VOP_MUL, LD_FB, 1'b0, 1, 1, 15, 2, 2, 1 + 2);
      for (int l = 0; l < 2; l++) begin longint pr, pi; cmul(prev[l], mb[l], 1'b0, pr, pi); chk(0, l, pr >>> 15, pi >>> 15, "feedback"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
