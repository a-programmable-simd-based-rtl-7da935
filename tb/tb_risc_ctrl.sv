// tb_risc_ctrl: runs programs on the controller with two behavioural
// clusters that stay busy for a programmable number of cycles.  Checks the
// integer and MAC results (reported through configuration writes), a
// counted loop, branches, status reads, vector instruction fields, that a
// vector instruction to a busy cluster stalls until it is free while the
// other cluster can still be issued to, WAIT, and the total cycle count of
// the program (one instruction per cycle plus stalls).  A second, random
// program of 180 integer and MAC instructions is checked register by
// register against a model.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_risc_ctrl;
  import rake_pkg::*;
  import rake_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, done, imem_we; logic [7:0] imem_addr; logic [31:0] imem_wdata;
  logic cfg_we; logic [11:0] cfg_addr; logic [15:0] cfg_data;
  logic [1:0] vi_valid, vi_ready, busy; vinstr_t vi;
  logic [3:0][15:0] status;
  int bcnt [2];
  int nissue [2];
  int cfgs [$]; int cfga [$];
  vinstr_t issued [$];
  int checks = 0, failures = 0, cycles;
  always #5 clk = ~clk;
  risc_ctrl dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // behavioural clusters: busy for (length * repeat) cycles after an issue
  assign vi_ready = {bcnt[1] == 0, bcnt[0] == 0};
  assign busy     = ~vi_ready;
  assign status   = {16'h0333, 16'h0222, 16'h0111, 14'd0, busy};
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) begin
      if (vi_valid[c] && vi_ready[c]) begin
        bcnt[c] <= (int'(vi.lenm1) + 1) * int'(vi.rep); nissue[c] <= nissue[c] + 1; issued.push_back(vi);
      end else if (bcnt[c] > 0) bcnt[c] <= bcnt[c] - 1;
    end
    if (cfg_we) begin cfgs.push_back(int'(cfg_data)); cfga.push_back(int'(cfg_addr)); end
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] prog [$];
  initial begin
    bcnt = '{0, 0}; nissue = '{0, 0};
    start = 0; imem_we = 0; imem_addr = 0; imem_wdata = 0;
    prog = '{
      LI(1, 1234), LI(2, 66), ADD(3, 1, 2), SUB(4, 1, 2), MUL(5, 1, 2),          // 0..4
      CFG('h101, 3), CFG('h102, 4), CFG('h103, 5),                               // 5..7
      LI(6, 5), LI(7, 0),                                                       // 8..9
      ADDI(7, 7, 3), DBNZ(6, 10),                                               // 10..11 loop x5
      CFG('h104, 7),                                                            // 12
      CLRA(), LI(8, 300), LI(9, -7), MAC(8, 9), MAC(8, 8), MACR(10, 4), CFG('h105, 10), // 13..19
      LI(11, 3),                                                                // 20
      VEC(0, 1, 1, 2, 0, 20, 11, 3),                                            // 21 cluster 0: 60 cycles
      VEC(1, 0, 0, 0, 1, 10, 0, 15),                                            // 22 cluster 1: 10 cycles
      VECW(0, 0, 0, 1, 5, 0, 0, 2),                                             // 23 stalls until cluster 0 free
      RDS(12, 0), CFG('h106, 12), WAITALL(), RDS(12, 0), CFG('h107, 12),        // 24..28
      XOR_(13, 1, 2), AND_(14, 1, 2), OR_(15, 1, 2), SHL(13, 13, 11), SHR(15, 15, 11), // 29..33
      CFG('h108, 13), CFG('h109, 14), CFG('h10a, 15), RDS(12, 3), CFG('h10b, 12),  // 34..38
      BEQZ(0, 41), CFG('h1ff, 1), BNEZ(1, 43), CFG('h1ff, 1), HALT()            // 39..43
    };
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_addr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0; start = 1; @(negedge clk); start = 0; cycles = 0;
    while (!done) begin @(posedge clk); #1; cycles++; end
    chk(cfgs.size() == 11, $sformatf("config writes %0d", cfgs.size()));
    if (cfgs.size() == 11) begin
      chk(cfga[0] == 'h101 && cfgs[0] == 1300, "ADD");
      chk(cfgs[1] == 1168, "SUB");
      chk(cfgs[2] == ((1234 * 66) & 16'hffff), "MUL");
      chk(cfgs[3] == 15, "DBNZ loop");
      chk(cfgs[4] == ((300 * -7 + 300 * 300) >>> 4 & 16'hffff), $sformatf("MAC %0d", cfgs[4]));
      chk(cfgs[5] == 1, $sformatf("busy status %0d", cfgs[5]));
      chk(cfgs[6] == 0, "WAITALL");
      chk(cfgs[7] == (((1234 ^ 66) << 3) & 16'hffff) && cfgs[8] == (1234 & 66) && cfgs[9] == ((1234 | 66) >> 3), "logic and shift ops");
      chk(cfgs[10] == 'h333, "RDS");
      chk(cfga[10] == 'h10b, "branches skipped the fall-through writes");
    end
    chk(nissue[0] == 2 && nissue[1] == 1, "vector issues");
    if (issued.size() == 3) begin
      chk(issued[0].op == 1 && issued[0].ldmode == 1 && issued[0].csel == 2 && issued[0].lenm1 == 19 && issued[0].rep == 3 && issued[0].shift == 3, "VEC fields 0");
      chk(issued[1].conj && issued[1].rep == 1 && issued[1].shift == 15, "VEC fields 1");
      chk(issued[2].csel == 3 && issued[2].wcode == 2 && issued[2].lenm1 == 4, "VEC fields 2");
    end
    // 44 instructions, +8 for the loop (5 passes over 2), -2 skipped by branches, one cycle each;
    // instruction 23 stalls 60-1 cycles (cluster 0 busy 60 cycles from instruction 21, issued two
    // cycles before), WAITALL stalls 5-2 cycles (cluster 0 busy 5 cycles from instruction 23)
    chk(cycles == (44 + 8 - 2) + (60 - 1) + (5 - 2), $sformatf("cycles %0d", cycles));

    // random integer program: every register is set, then 180 random ALU and
    // MAC instructions run against a model, and every register is reported
    begin
      logic [15:0] m [16]; logic signed [31:0] macc; int op, rd, rs, rt, imm, base;
      prog = {};
      for (int r = 1; r < 16; r++) begin imm = $urandom_range(65535); prog.push_back(LI(r, imm)); m[r] = 16'(imm); end
      m[0] = 0; prog.push_back(CLRA()); macc = 0;
      for (int i = 0; i < 180; i++) begin
        op = $urandom_range(11); rd = $urandom_range(15); rs = $urandom_range(15); rt = $urandom_range(15);
        imm = $urandom_range(65535);
        case (op)
          0:  begin prog.push_back(ADD(rd, rs, rt));  if (rd != 0) m[rd] = m[rs] + m[rt]; end
          1:  begin prog.push_back(SUB(rd, rs, rt));  if (rd != 0) m[rd] = m[rs] - m[rt]; end
          2:  begin prog.push_back(AND_(rd, rs, rt)); if (rd != 0) m[rd] = m[rs] & m[rt]; end
          3:  begin prog.push_back(OR_(rd, rs, rt));  if (rd != 0) m[rd] = m[rs] | m[rt]; end
          4:  begin prog.push_back(XOR_(rd, rs, rt)); if (rd != 0) m[rd] = m[rs] ^ m[rt]; end
          5:  begin prog.push_back(SHL(rd, rs, rt));  if (rd != 0) m[rd] = m[rs] << m[rt][3:0]; end
          6:  begin prog.push_back(SHR(rd, rs, rt));  if (rd != 0) m[rd] = m[rs] >> m[rt][3:0]; end
          7:  begin prog.push_back(ADDI(rd, rs, imm)); if (rd != 0) m[rd] = m[rs] + 16'(imm); end
          8:  begin prog.push_back(MUL(rd, rs, rt));  if (rd != 0) m[rd] = 16'(32'($signed(m[rs])) * 32'($signed(m[rt]))); end
          9:  begin prog.push_back(MAC(rs, rt)); macc = macc + 32'($signed(m[rs])) * 32'($signed(m[rt])); end
          10: begin imm = $urandom_range(31); prog.push_back(MACR(rd, imm)); if (rd != 0) m[rd] = 16'(macc >>> imm); end
          default: begin prog.push_back(CLRA()); macc = 0; end
        endcase
      end
      for (int r = 0; r < 16; r++) prog.push_back(CFG('h200 + r, r));
      prog.push_back(HALT());
      foreach (prog[i]) begin
        @(negedge clk); imem_we = 1; imem_addr = 8'(i); imem_wdata = prog[i];
      end
      base = cfgs.size();
      @(negedge clk); imem_we = 0; start = 1; @(negedge clk); start = 0; cycles = 0;
      while (!done) begin @(posedge clk); #1; cycles++; end
      chk(cfgs.size() == base + 16, "random program: register reports");
      if (cfgs.size() == base + 16)
        for (int r = 0; r < 16; r++)
          chk(cfga[base + r] == 'h200 + r && cfgs[base + r] == int'(m[r]),
              $sformatf("random program: r%0d = %h, expected %h", r, cfgs[base + r], m[r]));
      chk(cycles == prog.size(), $sformatf("random program: %0d cycles for %0d instructions", cycles, prog.size()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
