// vcmac: 2-way complex multiply-accumulate datapath (vector CMAC).
//
// Two full complex multipliers, each followed by an accumulator, that run
// separately (VOP_MUL: product, VOP_MAC: accumulate, used for channel
// weighting and maximum ratio combining) or together as a radix-2 FFT
// butterfly (VOP_BFLY).  conj multiplies by the conjugate of b.
//   MUL/MAC lane l : p = a[l] * b[l]          (full precision, 33 bits/part)
//   BFLY           : t = b[0] * a[1];  y0 = a[0]*2^15 + t,  y1 = a[0]*2^15 - t
//                    (b[0] is a Q15 twiddle factor; the store unit shifts by
//                    15 to get back to sample scale)
//   MAXS           : peak search: |a[l]|^2 is compared with the running
//                    maximum; the largest value and its element index
//                    (2*step + lane) are kept in max_val / max_idx.
// first starts an accumulation, istart clears the peak search.  Inputs are
// masked when en is low.  Results are registered (one cycle latency).
//
// Follows the architecture: two full complex data paths, separately or as
// a radix-2 butterfly, and peak search on the CMAC.  Widths, Q15 twiddle
// scaling and the |a|^2 peak criterion are this design's choice.
module vcmac
  import rake_pkg::*;
#(
  parameter int LANES = MAC_LANES,
  parameter int ACC_W = 40
)(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               en,
  input  logic                               first,
  input  logic                               istart,
  input  logic [15:0]                        step_idx,
  input  logic [2:0]                         op,
  input  logic                               conj,
  input  cplx_t [LANES-1:0]                  a,
  input  cplx_t [LANES-1:0]                  b,
  output logic signed [LANES-1:0][ACC_W-1:0] acc_re,
  output logic signed [LANES-1:0][ACC_W-1:0] acc_im,
  output logic [31:0]                        max_val,
  output logic [15:0]                        max_idx
);
  cplx_t [LANES-1:0] ag, bg;
  logic signed [LANES-1:0][ACC_W-1:0] p_re, p_im;
  logic [LANES-1:0][32:0] mag;

  function automatic logic signed [ACC_W-1:0] mulre(input cplx_t u, input cplx_t v,
                                                    input logic cj);
    logic signed [31:0] rr, ii;
    rr = u.re * v.re;
    ii = u.im * v.im;
    return cj ? ACC_W'(rr) + ACC_W'(ii) : ACC_W'(rr) - ACC_W'(ii);
  endfunction

  function automatic logic signed [ACC_W-1:0] mulim(input cplx_t u, input cplx_t v,
                                                    input logic cj);
    logic signed [31:0] ri, ir;
    ri = u.re * v.im;
    ir = u.im * v.re;
    return cj ? ACC_W'(ir) - ACC_W'(ri) : ACC_W'(ir) + ACC_W'(ri);
  endfunction

  always_comb begin
    ag = en ? a : '0;                       // operand isolation
    bg = en ? b : '0;
    for (int l = 0; l < LANES; l++) begin
      logic signed [31:0] sr, si;
      p_re[l] = mulre(ag[l], bg[l], conj);
      p_im[l] = mulim(ag[l], bg[l], conj);
      sr = ag[l].re * ag[l].re;
      si = ag[l].im * ag[l].im;
      mag[l] = {1'b0, sr} + {1'b0, si};
    end
  end

  // butterfly: twiddle b[0] times a[1]
  logic signed [ACC_W-1:0] t_re, t_im, a0_re, a0_im;
  assign t_re  = mulre(ag[1], bg[0], conj);
  assign t_im  = mulim(ag[1], bg[0], conj);
  assign a0_re = ACC_W'(ag[0].re) <<< 15;
  assign a0_im = ACC_W'(ag[0].im) <<< 15;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (en) begin
      case (op)
        VOP_BFLY: begin
          acc_re[0] <= a0_re + t_re;
          acc_im[0] <= a0_im + t_im;
          acc_re[1] <= a0_re - t_re;
          acc_im[1] <= a0_im - t_im;
        end
        VOP_MAC:
          for (int l = 0; l < LANES; l++) begin
            acc_re[l] <= (first ? '0 : acc_re[l]) + p_re[l];
            acc_im[l] <= (first ? '0 : acc_im[l]) + p_im[l];
          end
        default:
          for (int l = 0; l < LANES; l++) begin
            acc_re[l] <= p_re[l];
            acc_im[l] <= p_im[l];
          end
      endcase
    end

  // peak search over all elements of the instruction
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      max_val <= '0;
      max_idx <= '0;
    end else if (en && op == VOP_MAXS) begin
      logic [32:0] best;
      logic [15:0] bidx;
      best = istart ? 33'd0 : {1'b0, max_val};
      bidx = istart ? 16'd0 : max_idx;
      for (int l = 0; l < LANES; l++)
        if (mag[l] > best || (istart && l == 0)) begin
          best = mag[l];
          bidx = 16'(step_idx * LANES + l);
        end
      max_val <= (best > 33'h0ffffffff) ? 32'hffffffff : best[31:0];
      max_idx <= bidx;
    end
endmodule
