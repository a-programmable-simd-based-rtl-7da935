// tb_valu: random operand streams through the 4-way short ALU in MUL and
// MAC mode (with and without code conjugation); an integer model of each
// lane's accumulator gives the expected values one cycle after each step.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_valu;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en, first, conj; logic [2:0] op;
  cplx_t [3:0] x; scode_t [3:0] c;
  logic signed [3:0][31:0] acc_re, acc_im;
  longint mr[4], mi[4];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  valu dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    en = 0; first = 0; conj = 0; op = VOP_MUL; x = '0; c = '0;
    for (int l = 0; l < 4; l++) begin mr[l] = 0; mi[l] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom_range(9) != 0); first = (n % 37 == 0); conj = $urandom_range(1);
      op = (n < 1000) ? VOP_MUL : VOP_MAC;
      for (int l = 0; l < 4; l++) begin
        x[l].re = 16'($urandom); x[l].im = 16'($urandom);
        c[l].re = 2'($urandom_range(2) - 1); c[l].im = 2'($urandom_range(2) - 1);
      end
      if (en) for (int l = 0; l < 4; l++) begin
        longint cr, ci, pr, pi;
        cr = int'(c[l].re); ci = conj ? -int'(c[l].im) : int'(c[l].im);
        pr = cr * int'(x[l].re) - ci * int'(x[l].im);
        pi = cr * int'(x[l].im) + ci * int'(x[l].re);
        if (op == VOP_MAC && !first) begin mr[l] += pr; mi[l] += pi; end
        else begin mr[l] = pr; mi[l] = pi; end
      end
      @(posedge clk); #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (acc_re[l] != 32'(mr[l]) || acc_im[l] != 32'(mi[l])) begin
          failures++;
          if (failures < 5) $display("step %0d lane %0d got %0d,%0d exp %0d,%0d", n, l, acc_re[l], acc_im[l], mr[l], mi[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
