// dfe: digital front end: FIR filtering and decimation of the received
// complex baseband signal.
//
// Input samples arrive at DEC times the processing sample rate (DEC = 2:
// 30.72 MHz in, 15.36 MHz = 4 samples per 3.84 Mcps chip out).  Every input
// sample enters a NTAPS-long delay line; every DEC-th input the filter output
//   y = sat16( sum_{i} h[i] * x[n-i]  >>> 15 )      (h in Q15)
// is computed for I and Q and delivered one cycle later (out_valid).  The
// output is also presented as a single-element write request for the memory
// crossbar, so that the samples stream into the delay equalizer buffer.
// Coefficients are written through the configuration port (cfg_reg = tap);
// at reset the filter passes x[n] unchanged (h[0] = 1.0 - 2^-15).
//
// Follows the architecture: a front end filters and decimates the signal,
// and the output rate is four samples per chip.  Filter length, Q15 taps,
// DEC = 2 and the input rate are this design's choice.  The oldest delay-line
// entry is shifted out and never read.
// The write request fills only element 0 of the 4-wide request type; the
// other lanes' data and the fixed mode bits are constant output bits.
module dfe
  import rake_pkg::*;
#(
  parameter int NTAPS = 8,
  parameter int DEC   = 2
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [3:0]  cfg_reg,
  input  logic [15:0] cfg_data,
  input  logic        in_valid,
  input  cplx_t       in_sample,
  output logic        out_valid,
  output cplx_t       out_sample,
  output mem_req_t    wr_req
);
  logic signed [NTAPS-1:0][15:0] h;
  cplx_t [NTAPS-1:0]             dl;
  logic [$clog2(DEC+1)-1:0]      ph;
  logic signed [47:0]            sr, si;
  cplx_t [NTAPS-1:0]             dn;

  always_comb begin
    dn = {dl[NTAPS-2:0], in_sample};
    sr = '0;
    si = '0;
    for (int i = 0; i < NTAPS; i++) begin
      sr = sr + 48'($signed(h[i]) * dn[i].re);
      si = si + 48'($signed(h[i]) * dn[i].im);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      h         <= '0;
      h[0]      <= 16'sh7fff;
      dl        <= '0;
      ph        <= '0;
      out_valid <= 1'b0;
      out_sample <= '0;
    end else begin
      if (cfg_we && int'(cfg_reg) < NTAPS) h[cfg_reg] <= cfg_data;
      out_valid <= 1'b0;
      if (in_valid) begin
        dl <= dn;
        if (int'(ph) == DEC - 1) begin
          ph             <= '0;
          out_valid      <= 1'b1;
          out_sample.re  <= sat16(sr >>> 15);
          out_sample.im  <= sat16(si >>> 15);
        end else
          ph <= ph + 1'b1;
      end
    end

  always_comb begin
    wr_req          = '0;
    wr_req.en       = out_valid;
    wr_req.we       = 1'b1;
    wr_req.wmask[0] = 1'b1;
    wr_req.wdata[0] = out_sample;
  end
endmodule
