// tb_short_cmul: exhaustive code values, random samples; the expected
// product is computed with integer complex arithmetic.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_short_cmul;
  import rake_pkg::*;
  cplx_t x; scode_t c; logic signed [DW:0] yr, yi;
  int checks = 0, failures = 0;
  short_cmul dut (.x, .c, .y_re(yr), .y_im(yi));
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 400; n++)
      for (int cr = -1; cr <= 1; cr++)
        for (int ci = -1; ci <= 1; ci++) begin
          int er, ei;
          x.re = (n == 0) ? -16'sd32768 : (n == 1 ? 16'sd32767 : 16'($urandom));
          x.im = (n == 0) ? 16'sd32767  : (n == 1 ? -16'sd32768 : 16'($urandom));
          c.re = 2'(cr); c.im = 2'(ci);
          #1;
          er = cr * int'(x.re) - ci * int'(x.im);
          ei = cr * int'(x.im) + ci * int'(x.re);
          checks++;
          if (int'(yr) != er || int'(yi) != ei) begin
            failures++;
            if (failures < 5) $display("mismatch x=%0d,%0d c=%0d,%0d got %0d,%0d exp %0d,%0d", x.re, x.im, cr, ci, yr, yi, er, ei);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
