// mem_bank: one memory bank: four small single-port memory blocks in
// parallel plus the bank's address generator.
//
// An access touches up to four elements at once, one per memory block, so
// the bank delivers four complex samples per clock cycle.  The element
// address A comes from the bank's AGU or, for direct accesses, from the
// request.  Lane k of the access addresses element e_k and the elements are
// spread over the blocks so that the four lanes never meet in one block:
//   normal bank (DEQ = 0): e_k = A + k,             block = e_k mod 4
//   delay equalizer bank (DEQ = 1, deq_agu):
//                          e_k = (A + OSR*k) mod len, block = (e_k + e_k/4) mod 4
//   and in both cases row = e_k / 4 inside the block.
// The skewed placement of the delay equalizer bank lets a 4-wide read fetch
// the same quarter-chip phase of four consecutive chips in one cycle.  The
// delay buffer length must be a multiple of 16 so that the four rows of a
// read that wraps around the end of the buffer still fall in four blocks.
//
// Timing: the request is sampled on the rising edge; read data appear on
// rdata in the following cycle.  A write stores wdata[k] where wmask[k] is
// set.  Configuration writes go to the AGU (see agu / deq_agu).  The memory
// contents are not reset.
//
// Follows the architecture: a bank is made of several small single-port
// memories working in parallel to give four complex samples per access, and
// the delay buffer has its own address generator.  Bank size, the element
// interleaving and the skewed placement are this design's choice.  Tools may
// call the modulo comparisons constant for some parameter values; they are
// kept so the code stays correct for every buffer length.  The block-clash
// assertion uses rst_n as a qualifier, which tools may report as a
// sync/async mix.
module mem_bank
  import rake_pkg::*;
#(
  parameter int ROWS = 256,          // rows per memory block
  parameter bit DEQ  = 1'b0          // delay equalizer buffer bank
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [3:0]  cfg_reg,
  input  logic [15:0] cfg_data,
  input  mem_req_t    req,
  output mem_rdata_t  rdata
);
  localparam int AW = BANK_AW;
  localparam int RW = $clog2(ROWS);

  logic [AW-1:0] agu_addr, a, dlen;
  logic [MEM_LANES-1:0][AW-1:0] e;
  logic [MEM_LANES-1:0][1:0]    blk;      // block used by lane k
  logic [MEM_LANES-1:0][1:0]    lane_of;  // lane using block s
  logic [MEM_LANES-1:0]         used;
  logic [MEM_LANES-1:0][1:0]    blk_q;

  if (DEQ) begin : g_deq
    deq_agu #(.AW(AW)) u_agu (
      .clk, .rst_n, .cfg_we, .cfg_reg, .cfg_data,
      .acc(req.en && !req.dir), .we(req.we), .restart(req.restart),
      .addr(agu_addr), .len_o(dlen));
  end else begin : g_lin
    agu #(.AW(AW)) u_agu (
      .clk, .rst_n, .cfg_we, .cfg_reg, .cfg_data,
      .acc(req.en && !req.dir), .restart(req.restart), .addr(agu_addr));
    assign dlen = '0;
  end

  assign a = req.dir ? req.addr : agu_addr;

  always_comb begin
    for (int k = 0; k < MEM_LANES; k++) begin
      if (DEQ) begin
        logic [AW:0] s;
        s = {1'b0, a} + (AW+1)'(OSR * k);
        if (dlen != '0) begin
          if (s >= {1'b0, dlen}) s = s - {1'b0, dlen};
          if (s >= {1'b0, dlen}) s = s - {1'b0, dlen};
        end
        e[k]   = s[AW-1:0];
        blk[k] = 2'(e[k] + (e[k] >> 2));
      end else begin
        e[k]   = a + AW'(k);
        blk[k] = e[k][1:0];
      end
    end
    lane_of = '0;
    used    = '0;
    for (int s = 0; s < MEM_LANES; s++)
      for (int k = 0; k < MEM_LANES; k++)
        if (blk[k] == 2'(s)) begin
          lane_of[s] = 2'(k);
          used[s]    = 1'b1;
        end
  end

  cplx_t [MEM_LANES-1:0] q;

  for (genvar s = 0; s < MEM_LANES; s++) begin : g_blk
    cplx_t             mem [ROWS];
    logic [RW-1:0]     row;
    assign row = RW'(e[lane_of[s]] >> 2);
    always_ff @(posedge clk)
      if (req.en && used[s]) begin
        if (req.we) begin
          if (req.wmask[lane_of[s]]) mem[row] <= req.wdata[lane_of[s]];
        end else
          q[s] <= mem[row];
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) blk_q <= '0;
    else if (req.en && !req.we) blk_q <= blk;

  always_comb
    for (int k = 0; k < MEM_LANES; k++) rdata[k] = q[blk_q[k]];

  // the four lanes of an access must fall in four different blocks
  a_no_block_clash: assert property (@(posedge clk) disable iff (!rst_n) req.en |-> &used);
endmodule
