// vlu: vector load unit of a SIMD cluster.
//
// Distributes the data read from a memory bank over the datapath lanes:
//   LD_PAR   : one 4-wide bank access gives every lane its own element;
//   LD_BCAST : one element is read and sent to every lane;
//   LD_SLIDE : one element is read per step and shifted into a window, lane
//              k receiving element n+k; four correlations over consecutive
//              data then need one fetch per step instead of four, a quarter
//              of the memory accesses;
//   LD_FB    : no memory access, the lanes take the store unit's feedback,
//              rotated by the step index: lane k gets the value stored by
//              lane (k + step) mod LANES, so data move between lanes; an
//              accumulation over LANES steps sums all lanes in every lane.
// rd_v marks a cycle in which rdata holds the data of an issued load; the
// window shifts on every such cycle, including the prefill loads.
// Combinational apart from the window register.  Only the low bits of rot
// (log2 LANES) are used.
//
// Follows the architecture: a parallel mode and a one-item-distributed mode
// that cuts fetches to a quarter.  The sliding-window reading of the second
// mode and the broadcast and feedback modes are this design's choice.
module vlu
  import rake_pkg::*;
#(
  parameter int LANES = ALU_LANES
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          mode,
  input  logic                rd_v,
  input  mem_rdata_t          rdata,
  input  cplx_t [LANES-1:0]   fb,
  input  logic [15:0]         rot,     // step index of the instruction (LD_FB)
  output cplx_t [LANES-1:0]   x
);
  cplx_t [LANES-1:0] win, nwin;

  always_comb begin
    nwin = win;
    if (rd_v) begin
      for (int k = 0; k < LANES - 1; k++) nwin[k] = win[k+1];
      nwin[LANES-1] = rdata[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                          win <= '0;
    else if (rd_v && mode == LD_SLIDE)   win <= nwin;

  always_comb
    for (int k = 0; k < LANES; k++)
      case (mode)
        LD_PAR:   x[k] = rdata[k % MEM_LANES];
        LD_BCAST: x[k] = rdata[0];
        LD_SLIDE: x[k] = nwin[k];
        default:  x[k] = fb[(k + int'(rot)) % LANES];
      endcase
endmodule
