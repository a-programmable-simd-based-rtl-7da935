// valu: 4-way complex short ALU with accumulators (vector ALU datapath).
//
// Each of the LANES lanes multiplies its complex operand x by a short code
// c (parts in {-1,0,+1}) in a short_cmul and either stores the product in
// its accumulator register (VOP_MUL, used for descrambling) or adds it to
// the accumulator (VOP_MAC, used for de-spreading and correlation).  With
// four lanes the unit runs four correlations, or de-spreads four codes, in
// parallel.  conj negates the code's imaginary part (multiplication by the
// conjugate code, as descrambling needs).  first starts a new accumulation:
// the accumulator is loaded with the product instead of adding to it.
// Operands are forced to zero when en is low so that an idle unit does not
// toggle its internal logic.
//
// Timing: operands and controls are sampled on the rising clock edge when
// en is high; acc_re/acc_im hold the result from the next cycle on.
//
// Follows the architecture: 4-way complex ALU with accumulators, short
// multipliers, inputs masked when idle.  Accumulator width (32 bits) and the
// MUL/MAC operation set are this design's choice.
module valu
  import rake_pkg::*;
#(
  parameter int LANES = ALU_LANES,
  parameter int ACC_W = 32
)(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              en,
  input  logic                              first,
  input  logic [2:0]                        op,
  input  logic                              conj,
  input  cplx_t  [LANES-1:0]                x,
  input  scode_t [LANES-1:0]                c,
  output logic signed [LANES-1:0][ACC_W-1:0] acc_re,
  output logic signed [LANES-1:0][ACC_W-1:0] acc_im
);
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    cplx_t                xg;
    scode_t               cg;
    logic signed [DW:0]   p_re, p_im;

    assign xg    = en ? x[l] : '0;          // operand isolation
    assign cg.re = c[l].re;
    assign cg.im = conj ? -c[l].im : c[l].im;

    short_cmul u_mul (.x(xg), .c(cg), .y_re(p_re), .y_im(p_im));

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        acc_re[l] <= '0;
        acc_im[l] <= '0;
      end else if (en) begin
        if (op == VOP_MAC && !first) begin
          acc_re[l] <= acc_re[l] + ACC_W'(p_re);
          acc_im[l] <= acc_im[l] + ACC_W'(p_im);
        end else begin
          acc_re[l] <= ACC_W'(p_re);
          acc_im[l] <= ACC_W'(p_im);
        end
      end
  end
endmodule
