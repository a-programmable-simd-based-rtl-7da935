// tb_rake_workloads: receiver workloads on the full core at its default
// size, both built by one program generator (scenario task).
//   soft handover : six base stations, one path each with its own scrambling
//                   code and finger delay, four SF16 codes in one pass;
//   HSDPA         : one base station, four paths, sixteen SF16 codes in four
//                   passes of four.
// The front end fills the delay equalizer buffer from 600 ADC samples.  For
// each path the program sets the finger delay, loads the scrambling code,
// descrambles 64 chips (vector ALU, parallel load, 4 chips per step) and then,
// in a counted loop, de-spreads four OVSF codes per pass over 4 symbols
// (broadcast load, hardware repeat), storing the symbols of path p at element
// p*S of bank 3 (S = 16*passes + 2).  The CMAC cluster then combines the paths
// with conjugated channel weights (maximum ratio combining: one vector over
// the paths per lane pair; address generator stride S and circular length
// paths*S - 2, so that each repetition moves on by two symbols).  All finger
// symbols and combined symbols are read back through the host port and
// compared with a model built from the ADC samples and the code definitions.
// The cycle count of each program is printed; the soft handover program must
// stay within the budget of a 76 MHz clock at 3.84 Mcps (19.79 cycles per
// chip, 1266 cycles for 64 chips).
//
// Timing: stimulus is applied on the falling edge; results are read after
// the program has halted.  The run ends with a TB_RESULT line giving the
// number of checks and failures; a watchdog ends a run that hangs and counts
// it as a failure.  Station count, code count and clock budget follow the
// cases the architecture is rated for; paths per station, the number of
// HSDPA codes, delays, code numbers and weights are this testbench's own
// choice.
module tb_rake_workloads;
  import rake_pkg::*;
  import rake_asm_pkg::*;
  localparam int N  = 262143;
  localparam int NP = 6;
  logic clk = 0, rst_n = 0;
  logic start, done, imem_we, adc_valid; logic [7:0] imem_addr; logic [31:0] imem_wdata;
  cplx_t adc_sample; mem_req_t host_req; mem_rdata_t host_rdata; logic [1:0] cluster_busy;
  int checks = 0, failures = 0;
  bit xs[], ys[];
  int tree [5][16][16];
  always #5 clk = ~clk;
  rake_top dut (.*);
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run_prog(logic [31:0] p [$], output int cyc);
    foreach (p[i]) begin @(negedge clk); imem_we = 1; imem_addr = 8'(i); imem_wdata = p[i]; end
    @(negedge clk); imem_we = 0; start = 1; @(negedge clk); start = 0; cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; if (cyc > 20000) break; end
  endtask
  task automatic host_map(int bank, int prev);
    int c; logic [31:0] p [$];
    p = '{LI(1, 6), CFG('h800 + bank, 1), LI(2, 7), CFG('h800 + prev, 2), 32'd0, 32'd0, HALT()};
    if (prev < 0) p[3] = 32'd0;
    run_prog(p, c);
  endtask
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

  cplx_t adc [600]; longint s_re [300], s_im [300];
  cplx_t w [8];
  int delay [6] = '{0, 6, 13, 21, 30, 42};

  // One scenario: np paths, each with its own delay and scrambling code
  // number scode[p]; npass de-spread passes of four codes each, lane l of
  // pass q using code cbase + q*cstep + l*dl; maximum ratio combining of the
  // paths.  Returns the program's cycle count.
  task automatic scenario(string name, int np, int npass, int scode [6], int cbase, int cstep, int dl, output int cyc);
    logic [31:0] p2 [$]; cplx_t d [4];
    int S, lp;
    longint yr [6][64], yi [6][64];
    S = 16 * npass + 2;
    p2 = '{LI(1, 1), LI(4, 4), LI(9, 2), LI(10, 1), LI(11, 4), LI(12, 7),
           LI(13, dl), LI(14, cstep),
           LI(2, 16), CFG('h002, 2),                                   // delay buffer read stride: 4 chips
           CFG('h905, 11),                                             // SF 16
           LI(2, 'hffff), CFG('h902, 2), LI(2, 3), CFG('h903, 2),        // y seed
           CFG('h031, 11)};                                            // bank 3 store stride 4
    for (int p = 0; p < np; p++) begin
      logic [17:0] xseed;
      for (int j = 0; j < 18; j++) xseed[j] = xs[scode[p] + j];
      p2.push_back(CFG('h803, 12));                                     // bank 3 off
      p2.push_back(CFG('h800, 1)); p2.push_back(CFG('h802, 9));          // bank0 -> ALU load, bank2 -> ALU store
      p2.push_back(LI(3, delay[p])); p2.push_back(CFG('h001, 3));
      p2.push_back(CFG('h021, 4)); p2.push_back(CFG('h020, 0));
      p2.push_back(LI(2, int'(xseed[15:0]))); p2.push_back(CFG('h900, 2));
      p2.push_back(LI(2, int'(xseed[17:16]))); p2.push_back(CFG('h901, 2)); p2.push_back(CFG('h904, 0));
      p2.push_back(VEC(0, VOP_MUL, LD_PAR, CS_SCR, 1, 16, 0, 0));        // descramble 64 chips
      p2.push_back(LI(6, S * p)); p2.push_back(LI(5, cbase)); p2.push_back(LI(8, npass));
      p2.push_back(WAIT(0));
      p2.push_back(CFG('h800, 12)); p2.push_back(CFG('h802, 1)); p2.push_back(CFG('h803, 9));
      p2.push_back(CFG('h021, 10));
      lp = p2.size();                                                    // de-spread loop, one pass of 4 codes
      p2.push_back(CFG('h906, 5)); p2.push_back(ADD(15, 5, 13)); p2.push_back(CFG('h907, 15));
      p2.push_back(ADD(15, 15, 13)); p2.push_back(CFG('h908, 15));
      p2.push_back(ADD(15, 15, 13)); p2.push_back(CFG('h909, 15)); p2.push_back(CFG('h030, 6));
      p2.push_back(VEC(0, VOP_MAC, LD_BCAST, CS_OVSF, 0, 16, 11, 0));    // 4 codes x 4 symbols
      p2.push_back(ADD(5, 5, 14)); p2.push_back(ADDI(6, 6, 16));
      p2.push_back(WAIT(0)); p2.push_back(DBNZ(8, lp));
    end
    // maximum ratio combining on the CMAC cluster
    p2.push_back(CFG('h802, 12)); p2.push_back(LI(2, 3)); p2.push_back(CFG('h803, 2));
    p2.push_back(LI(2, 4)); p2.push_back(CFG('h804, 2)); p2.push_back(LI(2, 5)); p2.push_back(CFG('h805, 2));
    p2.push_back(CFG('h030, 0)); p2.push_back(LI(2, S)); p2.push_back(CFG('h031, 2)); p2.push_back(LI(2, np * S - 2)); p2.push_back(CFG('h032, 2));
    p2.push_back(CFG('h040, 0)); p2.push_back(CFG('h041, 10)); p2.push_back(LI(2, np)); p2.push_back(CFG('h042, 2));
    p2.push_back(CFG('h050, 0)); p2.push_back(CFG('h051, 9));
    p2.push_back(LI(7, 8 * npass));
    p2.push_back(VEC(1, VOP_MAC, LD_BCAST, 0, 1, np, 7, 12));
    p2.push_back(WAITALL());
    p2.push_back(CFG('h032, 0)); p2.push_back(CFG('h042, 0));           // leave the banks linear
    p2.push_back(HALT());
    checks++;
    if (p2.size() > 256) begin failures++; $display("%s: program too long: %0d words", name, p2.size()); end
    run_prog(p2, cyc);
    $display("%s: program %0d words, %0d cycles for 64 chips = %0d.%02d cycles per chip (76 MHz budget: 19.79)",
             name, p2.size(), cyc, cyc / 64, (cyc * 100 / 64) % 100);

    // model
    for (int p = 0; p < np; p++) begin
      longint dr [64], di [64];
      for (int i = 0; i < 64; i++) begin
        longint cr, ci, xr, xi;
        cr = (xs[(i + scode[p]) % N] ^ ys[i]) ? -1 : 1;
        ci = (xs[(i + scode[p] + 131072) % N] ^ ys[(i + 131072) % N]) ? 1 : -1;
        xr = s_re[delay[p] + 4*i]; xi = s_im[delay[p] + 4*i];
        dr[i] = sat(cr * xr - ci * xi); di[i] = sat(cr * xi + ci * xr);
      end
      for (int q = 0; q < npass; q++)
        for (int s = 0; s < 4; s++)
          for (int k = 0; k < 4; k++) begin
            longint ar, ai; int c; ar = 0; ai = 0; c = cbase + q * cstep + k * dl;
            for (int i = 0; i < 16; i++) begin ar += tree[4][c][i] * dr[16*s+i]; ai += tree[4][c][i] * di[16*s+i]; end
            yr[p][16*q+4*s+k] = sat(ar); yi[p][16*q+4*s+k] = sat(ai);
          end
    end

    // finger symbols, bank 3
    host_map(3, -1);
    for (int p = 0; p < np; p++)
      for (int a = 0; a < 16 * npass; a += 4) begin
        host_read(S * p + a, d);
        for (int k = 0; k < 4; k++) chk(d[k], yr[p][a+k], yi[p][a+k], $sformatf("%s: path %0d symbol %0d", name, p, a+k));
      end
    // combined symbols, bank 5
    host_map(5, 3);
    for (int a = 0; a < 16 * npass; a += 4) begin
      host_read(a, d);
      for (int k = 0; k < 4; k++) begin
        longint mr, mi; mr = 0; mi = 0;
        for (int p = 0; p < np; p++) begin
          mr += yr[p][a+k] * w[p].re + yi[p][a+k] * w[p].im;
          mi += yi[p][a+k] * w[p].re - yr[p][a+k] * w[p].im;
        end
        chk(d[k], mr >>> 12, mi >>> 12, $sformatf("%s: combined %0d", name, a+k));
      end
    end
    host_map(7, 5);                                                     // bank 5 off
  endtask

  initial begin
    int cyc; logic [31:0] p1 [$];
    xs = new[N + 200000]; ys = new[N + 64];
    for (int i = 0; i < 18; i++) begin xs[i] = (i == 0); ys[i] = 1; end
    for (int i = 0; i + 18 < N + 200000; i++) xs[i+18] = xs[i+7] ^ xs[i];
    for (int i = 0; i + 18 < N + 64; i++) ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    tree[0][0][0] = 1;
    for (int lv = 1; lv < 5; lv++)
      for (int k = 0; k < (1 << (lv-1)); k++)
        for (int i = 0; i < (1 << (lv-1)); i++) begin
          tree[lv][2*k][i] = tree[lv-1][k][i]; tree[lv][2*k][i + (1 << (lv-1))] = tree[lv-1][k][i];
          tree[lv][2*k+1][i] = tree[lv-1][k][i]; tree[lv][2*k+1][i + (1 << (lv-1))] = -tree[lv-1][k][i];
        end
    for (int i = 0; i < 600; i++) begin adc[i].re = 16'($urandom_range(1000) - 500); adc[i].im = 16'($urandom_range(1000) - 500); end
    for (int i = 0; i < 8; i++) begin w[i].re = 16'($urandom_range(400) - 200); w[i].im = 16'($urandom_range(400) - 200); end
    for (int j = 0; j < 300; j++) begin
      s_re[j] = sat((longint'(16384) * adc[2*j+1].re + longint'(16384) * adc[2*j].re) >>> 15);
      s_im[j] = sat((longint'(16384) * adc[2*j+1].im + longint'(16384) * adc[2*j].im) >>> 15);
    end

    start = 0; imem_we = 0; imem_addr = 0; imem_wdata = 0; adc_valid = 0; adc_sample = '0; host_req = '0;
    repeat (3) @(posedge clk); rst_n = 1;

    // set-up: filter taps, delay buffer, front end -> bank 0, host -> bank 4
    p1 = '{LI(1, 16384), CFG('ha00, 1), CFG('ha01, 1),
           LI(2, 512), CFG('h000, 2), CFG('h004, 0), CFG('h003, 0),
           CFG('h800, 0), LI(4, 6), CFG('h804, 4), 32'd0, HALT()};
    run_prog(p1, cyc);
    for (int a = 0; a < 8; a += 4) begin
      cplx_t q [4]; for (int k = 0; k < 4; k++) q[k] = w[a + k]; host_write4(a, q);
    end
    for (int i = 0; i < 600; i++) begin @(negedge clk); adc_valid = 1; adc_sample = adc[i]; end
    @(negedge clk); adc_valid = 0; repeat (3) @(negedge clk);

    // soft handover: 6 base stations (own scrambling codes), 3 codes + 1 spare
    scenario("soft handover", 6, 1, '{0, 16, 32, 48, 4000, 12345}, 3, 0, 4, cyc);
    checks++;
    if (cyc * 384 > 64 * 7600) begin failures++; $display("soft handover: 76 MHz cycle budget exceeded"); end
    // HSDPA: one base station, 4 paths, 16 SF16 codes in 4 passes
    scenario("HSDPA", 4, 4, '{0, 0, 0, 0, 0, 0}, 0, 4, 1, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
