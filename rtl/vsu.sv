// vsu: vector store unit of a SIMD cluster.
//
// Turns the lanes' accumulator values into one memory write: each value is
// shifted right arithmetically by shift bits and saturated to a 16-bit
// complex sample; lane k is written to element k of the access (wmask has
// one bit per lane) at the address the store bank's AGU generates.  The
// stored values are also kept in a feedback register that the load unit can
// hand back to the datapath (LD_FB, rotated across the lanes step by step),
// so accumulator contents can be post-processed, and moved or summed between
// lanes, inside the cluster without a round trip through memory.
// The write request is combinational from st_en; fb updates on the clock
// edge of the store.
//
// Follows the architecture: the store unit gives local feedback between the
// data paths.  Shift-and-saturate on store is this design's choice.
// The request's fixed fields (write enable, direct bit, lane mask) are
// constants when a store is issued.
module vsu
  import rake_pkg::*;
#(
  parameter int LANES = ALU_LANES,
  parameter int ACC_W = 32
)(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               st_en,
  input  logic                               st_restart,
  input  logic [3:0]                         shift,
  input  logic signed [LANES-1:0][ACC_W-1:0] acc_re,
  input  logic signed [LANES-1:0][ACC_W-1:0] acc_im,
  output mem_req_t                           req,
  output cplx_t [LANES-1:0]                  fb
);
  cplx_t [LANES-1:0] v;

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      v[k].re = sat16(48'($signed(acc_re[k]) >>> shift));
      v[k].im = sat16(48'($signed(acc_im[k]) >>> shift));
    end
    req         = '0;
    req.en      = st_en;
    req.we      = 1'b1;
    req.restart = st_restart;
    for (int k = 0; k < LANES; k++) begin
      req.wmask[k] = 1'b1;
      req.wdata[k] = v[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     fb <= '0;
    else if (st_en) fb <= v;
endmodule
