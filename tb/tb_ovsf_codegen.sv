// tb_ovsf_codegen: compares the generator with OVSF codes built by the tree
// recursion C(2k) = [C(k) C(k)], C(2k+1) = [C(k) -C(k)], for several
// spreading factors, in per-lane and parallel-chip modes.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_ovsf_codegen;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] sf_log; logic [3:0][8:0] code; logic par, restart, step;
  scode_t [3:0] c;
  int checks = 0, failures = 0;
  int tree [10][512][512];   // [level][code][chip]
  always #5 clk = ~clk;
  ovsf_codegen dut (.*);
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic expect_code(int lane, int lv, int k, int chip);
    int e; e = tree[lv][k][chip];
    checks++;
    if (int'(c[lane].re) != e || c[lane].im != 0) begin
      failures++;
      if (failures < 5) $display("lane %0d L=%0d k=%0d chip %0d: got %0d exp %0d", lane, lv, k, chip, c[lane].re, e);
    end
  endtask
  initial begin
    tree[0][0][0] = 1;
    for (int lv = 1; lv < 10; lv++)
      for (int k = 0; k < (1 << (lv - 1)); k++)
        for (int i = 0; i < (1 << (lv - 1)); i++) begin
          tree[lv][2*k][i] = tree[lv-1][k][i];
          tree[lv][2*k][i + (1 << (lv-1))] = tree[lv-1][k][i];
          tree[lv][2*k+1][i] = tree[lv-1][k][i];
          tree[lv][2*k+1][i + (1 << (lv-1))] = -tree[lv-1][k][i];
        end
    par = 0; restart = 0; step = 0; sf_log = 2; code = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int lv = 2; lv <= 9; lv += 1) begin
      sf_log = 4'(lv);
      for (int j = 0; j < 4; j++) code[j] = 9'($urandom_range((1 << lv) - 1));
      for (int pm = 0; pm < 2; pm++) begin
        par = pm[0];
        restart = 1; @(posedge clk); #1; restart = 0; step = 1;
        for (int s = 0; s < 3 * (1 << lv) / 4 + 3; s++) begin
          for (int j = 0; j < 4; j++)
            if (par) expect_code(j, lv, int'(code[0]), (4 * s + j) % (1 << lv));
            else     expect_code(j, lv, int'(code[j]), s % (1 << lv));
          @(posedge clk); #1;
        end
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
