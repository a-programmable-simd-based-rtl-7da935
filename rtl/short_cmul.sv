// short_cmul: "short" complex multiplier of the vector ALU.
//
// Multiplies a complex sample x by a code value c whose real and imaginary
// parts are each -1, 0 or +1, so that no real multiplier is needed: the
// product is built from selections, negations and one adder per output part,
//   re = c.re*x.re - c.im*x.im,   im = c.re*x.im + c.im*x.re.
// This covers multiplication by {0, +-1, +-i} named in the architecture as
// well as the QPSK scrambling chips (+-1 +-i) used in descrambling.  The
// output is one bit wider than the input so that no sum overflows.
// Purely combinational.
//
// Follows the architecture: a multiplier by {0, +-1, +-i} without a real
// multiplier.  Encoding the code as two 2-bit parts is this design's choice.
module short_cmul
  import rake_pkg::*;
(
  input  cplx_t                 x,
  input  scode_t                c,
  output logic signed [DW:0]    y_re,
  output logic signed [DW:0]    y_im
);
  function automatic logic signed [DW:0] sel(input logic signed [1:0] k,
                                             input logic signed [DW-1:0] v);
    case (k)
      2'sb01:  return  {v[DW-1], v};
      2'sb11:  return -{v[DW-1], v};
      default: return '0;
    endcase
  endfunction

  always_comb begin
    y_re = sel(c.re, x.re) - sel(c.im, x.im);
    y_im = sel(c.re, x.im) + sel(c.im, x.re);
  end
endmodule
