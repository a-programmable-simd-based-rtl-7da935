// tb_rake_top: end-to-end run of the processor core at its default size.
//
// A set-up program configures the front-end filter, the delay equalizer
// buffer and the crossbar; the host then writes channel weights and streams
// 600 ADC samples, which the front end filters, decimates by two and writes
// into the delay equalizer bank.  The main program then runs one Rake
// finger: descrambling of 64 chips at a finger delay of 6 quarter chips
// (vector ALU, parallel load, scrambling code), de-spreading of four SF16
// OVSF codes over 4 symbols (broadcast load, hardware loop), a four-delay
// pilot correlation (sliding window) in parallel with a peak search on the
// CMAC cluster, weighted combining (CMAC MAC), butterflies and a feedback
// operation, remapping banks between steps.  Results are read back through
// the host port and compared with a model of the whole chain built here from
// the ADC samples and the code definitions.  Counters check that every
// mechanism occurred: vector stall, WAIT stall, crossbar remap, each load
// mode, operation and code source, repeat loops, RISC work overlapping
// vector work, both clusters busy at once, delay-buffer reads, decimation.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_rake_top;
  import rake_pkg::*;
  import rake_asm_pkg::*;
  localparam int N = 262143;
  logic clk = 0, rst_n = 0;
  logic start, done, imem_we, adc_valid; logic [7:0] imem_addr; logic [31:0] imem_wdata;
  cplx_t adc_sample; mem_req_t host_req; mem_rdata_t host_rdata; logic [1:0] cluster_busy;
  int checks = 0, failures = 0;
  bit xs[], ys[];
  int tree [5][16][16];
  always #5 clk = ~clk;
  rake_top dut (.*);
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------------------------------------------------------- counters
  int n_vstall, n_wstall, n_remap, n_overlap, n_both, n_deq, n_dfe, n_rep;
  int n_mode [4]; int n_op [4]; int n_cs [4];
  logic [7:0][2:0] map_prev;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.run && dut.u_ctrl.opc == 6'd24 && dut.u_ctrl.stall) n_vstall++;
    if (dut.u_ctrl.run && dut.u_ctrl.opc == 6'd25 && dut.u_ctrl.stall) n_wstall++;
    if (dut.u_ctrl.run && !dut.u_ctrl.stall && dut.u_ctrl.opc != 6'd24 && cluster_busy != 0) n_overlap++;
    if (cluster_busy == 2'b11) n_both++;
    if (dut.u_xbar.map != map_prev) n_remap++;
    map_prev <= dut.u_xbar.map;
    if (dut.b_req[0].en && !dut.b_req[0].we && dut.u_xbar.map[0] == 3'(M_ALU_LD)) n_deq++;
    if (dut.u_dfe.out_valid) n_dfe++;
    if (|(dut.u_ctrl.vi_valid & dut.u_ctrl.vi_ready)) begin
      n_mode[dut.u_ctrl.vi.ldmode]++; n_op[dut.u_ctrl.vi.op]++;
      if (dut.u_ctrl.vi_valid[0]) n_cs[dut.u_ctrl.vi.csel]++;
      if (dut.u_ctrl.vi.rep > 1) n_rep++;
    end
  end

  // ---------------------------------------------------------------- helpers
  task automatic run_prog(logic [31:0] p [$], output int cyc);
    foreach (p[i]) begin @(negedge clk); imem_we = 1; imem_addr = 8'(i); imem_wdata = p[i]; end
    @(negedge clk); imem_we = 0; start = 1; @(negedge clk); start = 0; cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; if (cyc > 20000) break; end
  endtask
  task automatic host_map(int bank, int prev);
    int c; logic [31:0] p [$];
    p = '{LI(1, 6), CFG('h800 + bank, 1), LI(2, 7), CFG('h800 + prev, 2), NOP_(), NOP_(), HALT()};
    if (prev < 0) p[3] = NOP_();
    run_prog(p, c);
  endtask
  function automatic logic [31:0] NOP_(); return 32'd0; endfunction
  task automatic host_write4(int addr, cplx_t d [4]);
    @(negedge clk); host_req = '0; host_req.en = 1; host_req.we = 1; host_req.dir = 1; host_req.addr = 10'(addr);
    host_req.wmask = 4'hf; for (int k = 0; k < 4; k++) host_req.wdata[k] = d[k];
    @(negedge clk); host_req = '0;
  endtask
  task automatic host_read(int addr, output cplx_t d [4]);
    @(negedge clk); host_req = '0; host_req.en = 1; host_req.dir = 1; host_req.addr = 10'(addr);
    @(posedge clk); #1; host_req = '0;
    for (int k = 0; k < 4; k++) d[k] = host_rdata[k];
  endtask
  function automatic int sat(longint v); return v > 32767 ? 32767 : (v < -32768 ? -32768 : int'(v)); endfunction
  task automatic chk(cplx_t got, longint er, longint ei, string what);
    checks++;
    if (int'(got.re) != sat(er) || int'(got.im) != sat(ei)) begin
      failures++; if (failures < 10) $display("%s: got %0d,%0d exp %0d,%0d", what, got.re, got.im, sat(er), sat(ei));
    end
  endtask
  task automatic cnt(int v, string what);
    checks++; if (v <= 0) begin failures++; $display("mechanism never happened: %s", what); end
  endtask

  // ---------------------------------------------------------------- model
  cplx_t adc [600]; longint s_re [300], s_im [300];
  longint dr [64], di [64];           // descrambled chips
  longint yr [16], yi [16];           // de-spread symbols (bank 3 element 4s+k)
  cplx_t w [16];
  int codes [4] = '{1, 5, 9, 15};

  initial begin
    int cyc; logic [31:0] p1 [$]; logic [31:0] p2 [$]; cplx_t d [4]; int busy_len [$]; int bl;
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
    for (int i = 0; i < 600; i++) begin adc[i].re = 16'($urandom_range(1000) - 500); adc[i].im = 16'($urandom_range(1000) - 500); end
    for (int i = 0; i < 16; i++) begin w[i].re = 16'($urandom_range(400) - 200); w[i].im = 16'($urandom_range(400) - 200); end

    start = 0; imem_we = 0; imem_addr = 0; imem_wdata = 0; adc_valid = 0; adc_sample = '0; host_req = '0;
    n_vstall = 0; n_wstall = 0; n_remap = 0; n_overlap = 0; n_both = 0; n_deq = 0; n_dfe = 0; n_rep = 0;
    n_mode = '{0, 0, 0, 0}; n_op = '{0, 0, 0, 0}; n_cs = '{0, 0, 0, 0};
    repeat (3) @(posedge clk); rst_n = 1; map_prev = dut.u_xbar.map;

    // set-up program
    p1 = '{LI(1, 16384), CFG('ha00, 1), CFG('ha01, 1),
           LI(2, 512), CFG('h000, 2), CFG('h004, 0), CFG('h003, 0),
           CFG('h800, 0), LI(4, 6), CFG('h804, 4), NOP_(), HALT()};
    run_prog(p1, cyc);
    for (int a = 0; a < 16; a += 4) begin
      cplx_t q [4]; for (int k = 0; k < 4; k++) q[k] = w[a + k]; host_write4(a, q);
    end
    for (int i = 0; i < 600; i++) begin
      @(negedge clk); adc_valid = 1; adc_sample = adc[i];
    end
    @(negedge clk); adc_valid = 0; repeat (3) @(negedge clk);

    // main program
    p2 = '{
      LI(1, 1), CFG('h800, 1), LI(2, 2), CFG('h802, 2),                 // 0-3   bank0 -> ALU load, bank2 -> ALU store
      LI(3, 6), CFG('h001, 3), LI(4, 16), CFG('h002, 4),                // 4-7   finger delay 6, read stride 16
      LI(5, 4), CFG('h021, 5), CFG('h904, 0),                           // 8-10  bank2 stride 4, load scrambling seeds
      VEC(0, VOP_MUL, LD_PAR, CS_SCR, 1, 16, 0, 0),                      // 11    descramble 64 chips
      LI(6, 4), CFG('h905, 6), LI(7, 1), CFG('h906, 7), LI(7, 5), CFG('h907, 7),   // 12-17 OVSF set-up meanwhile
      LI(7, 9), CFG('h908, 7), LI(7, 15), CFG('h909, 7),                // 18-21
      LI(8, 3), DBNZ(8, 23),                                            // 22-23 idle loop
      WAIT(0), LI(12, 7), CFG('h800, 12),                               // 24-26 bank0 disconnected
      CFG('h802, 1), LI(9, 2), CFG('h803, 9),                           //       bank2 -> ALU load, bank3 -> ALU store
      LI(10, 1), CFG('h021, 10), CFG('h020, 0), CFG('h031, 5),          // 28-31
      LI(11, 4), VEC(0, VOP_MAC, LD_BCAST, CS_OVSF, 0, 16, 11, 0),       //       de-spread 4 codes x 4 symbols
      WAIT(0),                                                          // 34
      LI(12, 2), CFG('h805, 12), CFG('h051, 5),                         //       bank5 -> ALU store
      LI(13, 3), CFG('h803, 13), LI(14, 7), CFG('h90a, 14),             //       bank3 -> CMAC A, code 1-j
      LI(15, 2), CFG('h031, 9),                                         // 42-43
      VEC(0, VOP_MAC, LD_SLIDE, CS_IMM, 0, 30, 15, 2),                   //       4-delay correlation
      VEC(1, VOP_MAXS, LD_PAR, 0, 0, 8, 0, 0),                           //       peak search (parallel)
      LI(3, 4), CFG('h804, 3), CFG('h041, 9),                           //       bank4 -> CMAC B
      LI(4, 5), CFG('h806, 4), CFG('h061, 9),                           //       bank6 -> CMAC store
      VEC(1, VOP_MAC, LD_PAR, 0, 1, 8, 0, 12),                           //       weighted combining (stalls)
      RDS(6, 3), RDS(7, 1), RDS(8, 2),                                  //       peak index / value
      WAIT(1), CFG('h041, 10), LI(2, 8), CFG('h060, 2),                 // 56-59
      VEC(1, VOP_BFLY, LD_PAR, 0, 0, 4, 0, 15),                          //       butterflies
      WAIT(0), CFG('h050, 2), 32'd0, 32'd0,                             // 61-64
      VECW(0, VOP_MUL, LD_FB, 0, 1, 0, 0, 1),                            //       feedback: times i (code from the instruction word)
      WAITALL(), HALT()                                                 // 66-67
    };
    fork
      run_prog(p2, cyc);
      begin
        // busy periods of the vector ALU cluster
        for (int b = 0; b < 4; b++) begin
          @(posedge cluster_busy[0]); bl = 0;
          while (cluster_busy[0]) begin @(posedge clk); #1; bl++; end
          busy_len.push_back(bl);
        end
      end
    join
    $display("main program: %0d cycles", cyc);
    checks++;
    if (busy_len.size() != 4 || busy_len[0] != 16 + 2 || busy_len[1] != 64 + 2 || busy_len[2] != 3 + 60 + 2 || busy_len[3] != 1 + 2) begin
      failures++; $display("vector ALU busy periods wrong: %p", busy_len);
    end

    // model
    for (int j = 0; j < 300; j++) begin
      s_re[j] = sat((longint'(16384) * adc[2*j+1].re + longint'(16384) * adc[2*j].re) >>> 15);
      s_im[j] = sat((longint'(16384) * adc[2*j+1].im + longint'(16384) * adc[2*j].im) >>> 15);
    end
    for (int i = 0; i < 64; i++) begin
      longint cr, ci, xr, xi;
      cr = (xs[i] ^ ys[i]) ? -1 : 1; ci = (xs[(i + 131072) % N] ^ ys[(i + 131072) % N]) ? 1 : -1;
      xr = s_re[6 + 4*i]; xi = s_im[6 + 4*i];
      dr[i] = sat(cr * xr - ci * xi); di[i] = sat(cr * xi + ci * xr);
    end
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < 4; k++) begin
        longint ar, ai; ar = 0; ai = 0;
        for (int i = 0; i < 16; i++) begin ar += tree[4][codes[k]][i] * dr[16*s+i]; ai += tree[4][codes[k]][i] * di[16*s+i]; end
        yr[4*s+k] = sat(ar); yi[4*s+k] = sat(ai);
      end

    // descrambled chips, bank 2
    host_map(2, -1);
    for (int a = 0; a < 64; a += 4) begin host_read(a, d); for (int k = 0; k < 4; k++) chk(d[k], dr[a+k], di[a+k], $sformatf("descramble %0d", a+k)); end
    // de-spread symbols, bank 3
    host_map(3, 2);
    for (int a = 0; a < 16; a += 4) begin host_read(a, d); for (int k = 0; k < 4; k++) chk(d[k], yr[a+k], yi[a+k], $sformatf("symbol %0d", a+k)); end
    // correlation and feedback, bank 5
    host_map(5, 3);
    begin
      longint cr [2][4], ci [2][4];
      for (int r = 0; r < 2; r++) begin
        host_read(4*r, d);
        for (int k = 0; k < 4; k++) begin
          longint ar, ai; ar = 0; ai = 0;
          for (int n = 30*r; n < 30*r + 30; n++) begin ar += dr[n+k] + di[n+k]; ai += di[n+k] - dr[n+k]; end
          cr[r][k] = sat(ar >>> 2); ci[r][k] = sat(ai >>> 2);
          chk(d[k], cr[r][k], ci[r][k], $sformatf("correlation %0d/%0d", r, k));
        end
      end
      host_read(8, d);
      for (int k = 0; k < 4; k++) chk(d[k], -ci[1][k], cr[1][k], "feedback");
    end
    // combining and butterflies, bank 6
    host_map(6, 5);
    begin
      longint mr [2], mi [2];
      mr = '{0, 0}; mi = '{0, 0};
      for (int s = 0; s < 8; s++) for (int l = 0; l < 2; l++) begin
        mr[l] += yr[2*s+l] * w[2*s+l].re + yi[2*s+l] * w[2*s+l].im;
        mi[l] += yi[2*s+l] * w[2*s+l].re - yr[2*s+l] * w[2*s+l].im;
      end
      host_read(0, d);
      chk(d[0], mr[0] >>> 12, mi[0] >>> 12, "combining lane 0");
      chk(d[1], mr[1] >>> 12, mi[1] >>> 12, "combining lane 1");
      for (int s = 0; s < 4; s += 2) begin
        host_read(8 + 2*s, d);
        for (int t = 0; t < 2; t++) begin
          longint tr, ti, a0r, a0i;
          tr = yr[2*(s+t)+1] * w[s+t].re - yi[2*(s+t)+1] * w[s+t].im;
          ti = yr[2*(s+t)+1] * w[s+t].im + yi[2*(s+t)+1] * w[s+t].re;
          a0r = yr[2*(s+t)] <<< 15; a0i = yi[2*(s+t)] <<< 15;
          chk(d[2*t],   (a0r + tr) >>> 15, (a0i + ti) >>> 15, "butterfly y0");
          chk(d[2*t+1], (a0r - tr) >>> 15, (a0i - ti) >>> 15, "butterfly y1");
        end
      end
    end
    // peak search result, read by the program into r6..r8
    begin
      longint best; int bi; best = -1; bi = 0;
      for (int e = 0; e < 16; e++) if (yr[e]*yr[e] + yi[e]*yi[e] > best) begin best = yr[e]*yr[e] + yi[e]*yi[e]; bi = e; end
      checks++;
      if (int'(dut.u_ctrl.rf[6]) != bi || {dut.u_ctrl.rf[8], dut.u_ctrl.rf[7]} != 32'(best)) begin
        failures++; $display("peak: got %0d at %0d, exp %0d at %0d", {dut.u_ctrl.rf[8], dut.u_ctrl.rf[7]}, dut.u_ctrl.rf[6], best, bi);
      end
    end

    $display("mechanisms: vstall=%0d wstall=%0d remap=%0d overlap=%0d both=%0d deq=%0d dfe=%0d rep=%0d modes=%p ops=%p codes=%p",
             n_vstall, n_wstall, n_remap, n_overlap, n_both, n_deq, n_dfe, n_rep, n_mode, n_op, n_cs);
    cnt(n_vstall, "vector issue stall"); cnt(n_wstall, "WAIT stall"); cnt(n_remap, "crossbar remap");
    cnt(n_overlap, "RISC work during vector work"); cnt(n_both, "both clusters busy");
    cnt(n_deq, "delay buffer read"); cnt(n_dfe - 299, "decimated samples"); cnt(n_rep, "hardware repeat loop");
    for (int m = 0; m < 4; m++) cnt(n_mode[m], $sformatf("load mode %0d", m));
    for (int o = 0; o < 4; o++) cnt(n_op[o], $sformatf("operation %0d", o));
    for (int c = 0; c < 4; c++) cnt(n_cs[c], $sformatf("code source %0d", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
