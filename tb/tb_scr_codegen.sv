// tb_scr_codegen: builds the x and y m-sequences by their recursions over a
// whole period and checks the generator's I chips (x(i+n) xor y(i)) and Q
// chips (the same Gold sequence 131072 chips later), one chip per step and
// four chips per step, for code numbers 0 and 16.
//
// Timing: stimulus is applied just after the rising clock edge and results
// are compared at the edge where the block's documented latency makes them
// valid.  The run ends with a TB_RESULT line giving the number of checks and
// failures; a watchdog ends a run that hangs and counts it as a failure.
// The reference values come from the textbook definitions named above, not
// from the RTL; stimulus values and sizes are this testbench's own choice.
module tb_scr_codegen;
  import rake_pkg::*;
  localparam int N = 262143;
  logic clk = 0, rst_n = 0;
  logic [17:0] x_seed, y_seed; logic load, par, step;
  scode_t [3:0] c;
  int checks = 0, failures = 0;
  bit xs[], ys[];
  always #5 clk = ~clk;
  scr_codegen dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int chip_i(int n, int i); return (xs[(i + n) % N] ^ ys[i % N]) ? -1 : 1; endfunction
  function automatic int chip_q(int n, int i); return chip_i(n, i + 131072); endfunction
  initial begin
    xs = new[N + 32]; ys = new[N + 32];
    for (int i = 0; i < 18; i++) begin xs[i] = (i == 0); ys[i] = 1; end
    for (int i = 0; i + 18 < N + 32; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i];
      ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
    load = 0; par = 0; step = 0; x_seed = 0; y_seed = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (codes[ci]) begin
      int n; n = codes[ci];
      for (int pm = 0; pm < 2; pm++) begin
        for (int j = 0; j < 18; j++) begin x_seed[j] = xs[n + j]; y_seed[j] = ys[j]; end
        load = 1; par = pm[0]; @(posedge clk); #1; load = 0; step = 1;
        for (int s = 0; s < 300; s++) begin
          for (int k = 0; k < 4; k++) begin
            int i; i = par ? 4 * s + k : s;
            checks++;
            if (int'(c[k].re) != chip_i(n, i) || int'(c[k].im) != chip_q(n, i)) begin
              failures++;
              if (failures < 5) $display("n=%0d par=%0d chip %0d lane %0d: got %0d,%0d exp %0d,%0d", n, par, i, k, c[k].re, c[k].im, chip_i(n, i), chip_q(n, i));
            end
          end
          @(posedge clk); #1;
        end
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int codes[2] = '{0, 16};
endmodule
