// ovsf_codegen: Orthogonal Variable Spreading Factor code generator.
//
// Produces one OVSF chip for each of the four vector ALU lanes, so that the
// four accumulators can de-spread four different channelisation codes from
// the same descrambled chip stream.  Chip i of code k at spreading factor
// SF = 2^L is +1 when the parity of (i AND bitreverse_L(k)) is even and -1
// otherwise, which is the row of the OVSF code tree.
//
// Two modes: per-lane codes (lane j uses code number code[j], all lanes at the
// same chip index, the chip index advances by one per step), or parallel
// chips (every lane uses code[0] at chip indices i..i+3, the index advances
// by four per step).  restart sets the chip index to 0; step advances it.
// Configuration (sf_log, code numbers) is held by the enclosing cluster.
// Output is combinational from the chip counter register.
//
// Follows the architecture: an OVSF generator feeds the short multipliers so
// that four codes are de-spread at once.  The parity formula, the parallel-
// chip mode and the maximum SF of 512 are this design's choice.  OVSF chips
// are real, so the imaginary part of every output is constant zero.
module ovsf_codegen
  import rake_pkg::*;
#(
  parameter int LANES  = ALU_LANES,
  parameter int MAXLOG = 9            // SF up to 512
)(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [3:0]                    sf_log,
  input  logic [LANES-1:0][MAXLOG-1:0]  code,
  input  logic                          par,      // parallel-chip mode
  input  logic                          restart,
  input  logic                          step,
  output scode_t [LANES-1:0]            c
);
  logic [MAXLOG-1:0] idx;
  logic [MAXLOG-1:0] sf_mask;

  assign sf_mask = MAXLOG'((1 << sf_log) - 1);

  function automatic logic [MAXLOG-1:0] bitrev(input logic [MAXLOG-1:0] k,
                                               input logic [3:0] l);
    logic [MAXLOG-1:0] r;
    r = '0;
    for (int b = 0; b < MAXLOG; b++)
      if (b < int'(l)) r[int'(l) - 1 - b] = k[b];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        idx <= '0;
    else if (restart)  idx <= '0;
    else if (step)     idx <= (idx + (par ? MAXLOG'(LANES) : MAXLOG'(1))) & sf_mask;

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      logic [MAXLOG-1:0] ci, kk;
      ci = par ? ((idx + MAXLOG'(j)) & sf_mask) : idx;
      kk = bitrev(par ? code[0] : code[j], sf_log);
      c[j].re = (^(ci & kk)) ? 2'sb11 : 2'sb01;
      c[j].im = 2'sb00;
    end
  end
endmodule
