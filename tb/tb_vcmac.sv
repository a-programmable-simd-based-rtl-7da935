// tb_vcmac: random operands through the 2-way CMAC in MUL, MAC, BFLY and
// MAXS modes, with and without conjugation; expected values from 64-bit
// integer complex arithmetic and a running maximum of |a|^2.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_vcmac;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en, first, istart, conj; logic [15:0] step_idx; logic [2:0] op;
  cplx_t [1:0] a, b;
  logic signed [1:0][39:0] acc_re, acc_im;
  logic [31:0] max_val; logic [15:0] max_idx;
  longint mr[2], mi[2], mx; int mxi;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vcmac dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic void cmul(cplx_t u, cplx_t v, bit cj, output longint r, output longint i);
    longint vi; vi = cj ? -longint'(v.im) : longint'(v.im);
    r = longint'(u.re) * longint'(v.re) - longint'(u.im) * vi;
    i = longint'(u.re) * vi + longint'(u.im) * longint'(v.re);
  endfunction
  initial begin
    en = 0; first = 0; istart = 0; conj = 0; op = VOP_MUL; a = '0; b = '0; step_idx = 0;
    mr = '{0, 0}; mi = '{0, 0}; mx = 0; mxi = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      op = 3'(n / 1000);
      en = ($urandom_range(7) != 0); first = (n % 23 == 0); conj = $urandom_range(1);
      istart = (n % 1000 == 0) || (n % 250 == 0); step_idx = 16'(n % 1000);
      for (int l = 0; l < 2; l++) begin
        a[l].re = 16'($urandom); a[l].im = 16'($urandom); b[l].re = 16'($urandom); b[l].im = 16'($urandom);
      end
      if (en) begin
        if (op == VOP_BFLY) begin
          longint tr, ti; cmul(a[1], b[0], conj, tr, ti);
          mr[0] = (longint'(a[0].re) << 15) + tr; mi[0] = (longint'(a[0].im) << 15) + ti;
          mr[1] = (longint'(a[0].re) << 15) - tr; mi[1] = (longint'(a[0].im) << 15) - ti;
        end else if (op == VOP_MAXS) begin
          if (istart) begin mx = -1; end
          for (int l = 0; l < 2; l++) begin
            longint m; m = longint'(a[l].re) * a[l].re + longint'(a[l].im) * a[l].im;
            if (m > mx) begin mx = m; mxi = int'(step_idx) * 2 + l; end
          end
        end else
          for (int l = 0; l < 2; l++) begin
            longint pr, pi; cmul(a[l], b[l], conj, pr, pi);
            if (op == VOP_MAC && !first) begin mr[l] += pr; mi[l] += pi; end
            else begin mr[l] = pr; mi[l] = pi; end
          end
      end
      @(posedge clk); #1;
      if (op == VOP_MAXS) begin
        if (en || n > 3000) begin
          checks++;
          if (longint'(max_val) != mx || int'(max_idx) != mxi) begin
            failures++; if (failures < 5) $display("maxs %0d: got %0d@%0d exp %0d@%0d", n, max_val, max_idx, mx, mxi);
          end
        end
      end else
        for (int l = 0; l < 2; l++) begin
          checks++;
          if (acc_re[l] != 40'(mr[l]) || acc_im[l] != 40'(mi[l])) begin
            failures++;
            if (failures < 5) $display("op %0d step %0d lane %0d got %0d,%0d exp %0d,%0d", op, n, l, acc_re[l], acc_im[l], mr[l], mi[l]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
