// tb_valu_cluster: the vector ALU cluster against behavioural load and store
// memories (linear address generators).  Runs descrambling (parallel load,
// scrambling code, conjugate), de-spreading of four OVSF codes with a
// repeat count (broadcast load), a four-delay correlation (sliding window,
// immediate code) and a feedback operation, and checks every stored value
// against sequences and codes computed here from their definitions, plus the
// busy time of each instruction.  Also the instruction-word code and a lane
// reduction (sum of the four lanes) through the store unit's feedback.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_valu_cluster;
  import rake_pkg::*;
  localparam int N = 262143;
  logic clk = 0, rst_n = 0;
  logic vi_valid, vi_ready, busy, cfg_we; vinstr_t vi;
  logic [7:0] cfg_reg; logic [15:0] cfg_data;
  mem_req_t ld_req, st_req; mem_rdata_t ld_rdata;
  cplx_t mem [1024];
  cplx_t out [256][4];
  int lptr, sptr, lstep, nstores;
  int checks = 0, failures = 0;
  bit xs[], ys[];
  int tree [5][16][16];
  always #5 clk = ~clk;
  valu_cluster dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // behavioural memories
  always @(posedge clk) begin
    if (ld_req.en && rst_n) begin
      int p; p = ld_req.restart ? 0 : lptr;
      for (int k = 0; k < 4; k++) ld_rdata[k] <= mem[(p + k) % 1024];
      lptr <= p + lstep;
    end
    if (st_req.en && rst_n) begin
      int p; p = st_req.restart ? 0 : sptr;
      for (int k = 0; k < 4; k++) out[p][k] <= st_req.wdata[k];
      sptr <= p + 1; nstores <= nstores + 1;
    end
  end

  int wc = 0;
  task automatic wcfg(int r, int d);
    @(negedge clk); cfg_we = 1; cfg_reg = 8'(r); cfg_data = 16'(d); @(posedge clk); #1; cfg_we = 0;
  endtask
  task automatic run(vop_e op, ldmode_e m, csel_e cs, bit cj, int len, int rep, int sh, int step, int exp_cycles);
    int cyc;
    lstep = step;
    @(negedge clk);
    vi = '0; vi.op = op; vi.ldmode = m; vi.csel = cs; vi.conj = cj; vi.lenm1 = 7'(len - 1); vi.rep = 16'(rep); vi.shift = 4'(sh); vi.wcode = 2'(wc);
    vi_valid = 1;
    @(posedge clk); #1; vi_valid = 0; cyc = 0;
    while (busy) begin @(posedge clk); #1; cyc++; end
    @(posedge clk); #1;
    checks++;
    if (cyc != exp_cycles) begin failures++; $display("op %0d mode %0d: busy %0d cycles, expected %0d", op, m, cyc, exp_cycles); end
  endtask
  function automatic int sat(longint v); return v > 32767 ? 32767 : (v < -32768 ? -32768 : int'(v)); endfunction
  task automatic chk(int row, int k, longint er, longint ei, string what);
    checks++;
    if (int'(out[row][k].re) != sat(er) || int'(out[row][k].im) != sat(ei)) begin
      failures++; if (failures < 8) $display("%s row %0d lane %0d: got %h exp %0d,%0d", what, row, k, out[row][k], sat(er), sat(ei));
    end
  endtask

  initial begin
    int sr, si, cr, ci, codes[4];
    xs = new[N + 64]; ys = new[N + 64];
    for (int i = 0; i < 18; i++) begin xs[i] = (i == 0); ys[i] = 1; end
    for (int i = 0; i + 18 < N + 64; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i]; ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
    tree[0][0][0] = 1;
    for (int lv = 1; lv < 5; lv++)
      for (int k = 0; k < (1 << (lv-1)); k++)
        for (int i = 0; i < (1 << (lv-1)); i++) begin
          tree[lv][2*k][i] = tree[lv-1][k][i]; tree[lv][2*k][i + (1 << (lv-1))] = tree[lv-1][k][i];
          tree[lv][2*k+1][i] = tree[lv-1][k][i]; tree[lv][2*k+1][i + (1 << (lv-1))] = -tree[lv-1][k][i];
        end
    for (int i = 0; i < 1024; i++) begin mem[i].re = 16'($urandom_range(4000) - 2000); mem[i].im = 16'($urandom_range(4000) - 2000); end
    vi_valid = 0; vi = '0; cfg_we = 0; cfg_reg = 0; cfg_data = 0; lptr = 0; sptr = 0; lstep = 4; nstores = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    // 1. descramble 64 chips, 4 per step
    wcfg(4, 0);
    run(VOP_MUL, LD_PAR, CS_SCR, 1'b1, 16, 1, 0, 4, 16 + 2);
    for (int i = 0; i < 64; i++) begin
      cr = (xs[i] ^ ys[i]) ? -1 : 1; ci = (xs[(i + 131072) % N] ^ ys[(i + 131072) % N]) ? 1 : -1; // conjugate
      chk(i / 4, i % 4, longint'(cr) * mem[i].re - longint'(ci) * mem[i].im, longint'(cr) * mem[i].im + longint'(ci) * mem[i].re, "descramble");
    end

    // 2. de-spread four SF16 OVSF codes, 4 symbols
    codes = '{1, 5, 9, 15};
    wcfg(5, 4); for (int k = 0; k < 4; k++) wcfg(6 + k, codes[k]);
    run(VOP_MAC, LD_BCAST, CS_OVSF, 1'b0, 16, 4, 2, 1, 16 * 4 + 2);
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < 4; k++) begin
        longint ar, ai; ar = 0; ai = 0;
        for (int i = 0; i < 16; i++) begin ar += tree[4][codes[k]][i] * mem[16*s + i].re; ai += tree[4][codes[k]][i] * mem[16*s + i].im; end
        chk(s, k, ar >>> 2, ai >>> 2, "despread");
      end

    // 3. correlation at four consecutive delays, immediate code 1 - i, 2 x 20 steps
    wcfg(10, 4'b01_11);
    run(VOP_MAC, LD_SLIDE, CS_IMM, 1'b0, 20, 2, 0, 1, 3 + 40 + 2);
    for (int r = 0; r < 2; r++)
      for (int k = 0; k < 4; k++) begin
        longint ar, ai; ar = 0; ai = 0;
        for (int n = 20 * r; n < 20 * r + 20; n++) begin ar += mem[n+k].re + mem[n+k].im; ai += mem[n+k].im - mem[n+k].re; end
        chk(r, k, ar, ai, "correlate");
      end

    // 4. feedback: multiply the last stored values by i, without a load
    wcfg(10, 4'b00_01);
    begin
      cplx_t prev [4];
      for (int k = 0; k < 4; k++) prev[k] = out[1][k];
      run(VOP_MUL, LD_FB, CS_IMM, 1'b0, 1, 1, 0, 0, 1 + 2);
      for (int k = 0; k < 4; k++) chk(0, k, -longint'(prev[k].im), longint'(prev[k].re), "feedback");
    end
    // 5. code from the instruction word: i^n, with and without conjugation
    for (int n = 0; n < 8; n++) begin
      cplx_t prev [4]; longint pr, pi, t;
      for (int k = 0; k < 4; k++) prev[k] = out[0][k];
      wc = n % 4;
      run(VOP_MUL, LD_FB, CS_WORD, 1'(n / 4), 1, 1, 0, 0, 1 + 2);
      for (int k = 0; k < 4; k++) begin
        pr = prev[k].re; pi = prev[k].im;
        for (int j = 0; j < ((n / 4) ? (4 - n % 4) % 4 : n % 4); j++) begin t = pr; pr = -pi; pi = t; end
        chk(0, k, pr, pi, $sformatf("instruction-word code %0d", n));
      end
    end
    // 6. lane reduction through the feedback path: 4 accumulating steps, lane k
    //    takes the stored value of lane k + step, so every lane gets the sum
    begin
      cplx_t prev [4]; longint sr, si;
      for (int k = 0; k < 4; k++) prev[k] = out[0][k];
      sr = 0; si = 0; for (int k = 0; k < 4; k++) begin sr += prev[k].re; si += prev[k].im; end
      wc = 0;
      run(VOP_MAC, LD_FB, CS_WORD, 1'b0, 4, 1, 0, 0, 4 + 2);
      for (int k = 0; k < 4; k++) chk(0, k, sr, si, "lane reduction");
    end
    checks++; if (nstores != 16 + 4 + 2 + 1 + 8 + 1) begin failures++; $display("stores %0d", nstores); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
