// scr_codegen: configurable scrambling (Gold) code generator.
//
// Two 18-stage LFSRs, x and y, whose feedback taps and seeds are
// configurable, generate a complex scrambling chip c = I + jQ with
//   I = 1 - 2*(x(i) xor y(i)),
//   Q = 1 - 2*(parity(x_state & XQ_MASK) xor parity(y_state & YQ_MASK)).
// The Q masks select the tap combinations that equal the I sequence shifted
// by 131072 chips.  The default taps, masks and seeds are those of the
// WCDMA downlink scrambling code (x^18+x^7+1 and x^18+x^10+x^7+x^5+1);
// other Gold-code based standards are reached by other parameters and seeds.
// A code number n is selected by loading the x seed already advanced by n.
//
// The generator produces LANES consecutive chips per step, c[0] being the
// oldest; step advances the state by one chip (par = 0, every lane then gets
// the same chip c[0]) or by LANES chips (par = 1).  load copies the seed
// registers into the LFSRs.  State bit j holds x(i+j).
//
// Follows the architecture: a configurable scrambling code generator.  The
// Gold-code structure and its WCDMA defaults come from the WCDMA standard,
// not from the architecture description; four chips per step is this
// design's choice to match the four lanes.
module scr_codegen
  import rake_pkg::*;
#(
  parameter int          LANES   = ALU_LANES,
  parameter logic [17:0] X_TAPS  = 18'h00081,   // x(i)+x(i+7)
  parameter logic [17:0] Y_TAPS  = 18'h004A1,   // y(i)+y(i+5)+y(i+7)+y(i+10)
  parameter logic [17:0] XQ_MASK = 18'h08050,   // x(i+4)+x(i+6)+x(i+15)
  parameter logic [17:0] YQ_MASK = 18'h0FF60    // y(i+5),(i+6),(i+8)..(i+15)
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [17:0]        x_seed,
  input  logic [17:0]        y_seed,
  input  logic               load,
  input  logic               par,
  input  logic               step,
  output scode_t [LANES-1:0] c
);
  logic [17:0] xs, ys;
  logic [LANES:0][17:0] xa, ya;   // state advanced by 0..LANES chips

  function automatic logic [17:0] adv(input logic [17:0] s, input logic [17:0] taps);
    return {^(s & taps), s[17:1]};
  endfunction

  assign xa[0] = xs;
  assign ya[0] = ys;
  for (genvar k = 1; k <= LANES; k++) begin : g_adv
    assign xa[k] = adv(xa[k-1], X_TAPS);
    assign ya[k] = adv(ya[k-1], Y_TAPS);
  end

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      int unsigned s;
      s = par ? k : 0;
      c[k].re = (xa[s][0] ^ ya[s][0]) ? 2'sb11 : 2'sb01;
      c[k].im = ((^(xa[s] & XQ_MASK)) ^ (^(ya[s] & YQ_MASK))) ? 2'sb11 : 2'sb01;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      xs <= 18'h00001;
      ys <= 18'h3ffff;
    end else if (load) begin
      xs <= x_seed;
      ys <= y_seed;
    end else if (step) begin
      xs <= par ? xa[LANES] : xa[1];
      ys <= par ? ya[LANES] : ya[1];
    end
endmodule
