// cmac_cluster: the Vector CMAC SIMD cluster.
//
// Same control and load/store structure as the vector ALU cluster (vctrl,
// two vlu load units, vsu) around the 2-way complex MAC datapath (vcmac).
// Operand A comes from load port A, operand B from load port B.
//   MUL  : y[l] = A[l] * B[l]   (B broadcast with LD_BCAST), stored each step
//   MAC  : acc[l] += A[l] * B[l], stored at the end of each vector
//          (maximum ratio combining: A = finger symbols, B = channel
//          estimates with conj)
//   BFLY : A gives the butterfly inputs (2 elements), B the twiddle
//          (broadcast); shift 15 returns to sample scale
//   MAXS : peak search over |A|^2; result in max_val / max_idx, no store,
//          port B is not read
// With LD_FB, A is taken from the store unit's feedback instead of memory.
// Timing as in valu_cluster.
//
// Follows the architecture: the CMAC cluster has the same control and
// load/store structure as the vector ALU cluster, runs as two lanes or as a
// butterfly, and does the peak search of the path searcher.  The two load
// ports and the opcode set are this design's choice.  Instruction fields the
// CMAC does not use (code select) and the step-end marker are left unread.
// rst_n is used both as the asynchronous reset and as a qualifier of the
// execute-stage assertion, which tools may report as a sync/async mix.
// Load requests use the common memory request type, so their write-data,
// write-enable and mask fields are tied to zero, and the store unit's lanes
// 2 and 3 (this cluster has two lanes) are zero: constant output bits.
module cmac_cluster
  import rake_pkg::*;
#(
  parameter int LANES = MAC_LANES,
  parameter int ACC_W = 40
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        vi_valid,
  input  vinstr_t     vi,
  output logic        vi_ready,
  output logic        busy,
  output mem_req_t    lda_req,
  input  mem_rdata_t  lda_rdata,
  output mem_req_t    ldb_req,
  input  mem_rdata_t  ldb_rdata,
  output mem_req_t    st_req,
  output logic [31:0] max_val,
  output logic [15:0] max_idx
);
  vinstr_t ins;
  logic    start;
  logic    ld_en, ld_restart, rd_v, ex_en, ex_first, ex_last, ex_istart, st_en, st_restart;
  logic [15:0] ex_idx;

  assign vi_ready = !busy;
  assign start    = vi_valid && vi_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     ins <= '0;
    else if (start) ins <= vi;

  vctrl u_ctrl (
    .clk, .rst_n, .start, .lenm1(vi.lenm1), .rep(vi.rep),
    .prefill(1'b0), .noload(1'b0),
    .st_each(vi.op != VOP_MAC), .nostore(vi.op == VOP_MAXS),
    .busy, .ld_en, .ld_restart, .rd_v, .ex_en, .ex_first, .ex_last, .ex_istart,
    .ex_idx, .st_en, .st_restart);

  always_comb begin
    lda_req         = '0;
    lda_req.en      = ld_en && ins.ldmode != LD_FB;
    lda_req.restart = ld_restart;
    ldb_req         = '0;
    ldb_req.en      = ld_en && ins.op != VOP_MAXS;
    ldb_req.restart = ld_restart;
  end

  cplx_t [LANES-1:0] a, b, fb;
  logic signed [LANES-1:0][ACC_W-1:0] acc_re, acc_im;
  logic [1:0] mode_a, mode_b;

  assign mode_a = (ins.ldmode == LD_FB) ? LD_FB : LD_PAR;
  assign mode_b = (ins.ldmode == LD_BCAST || ins.op == VOP_BFLY) ? LD_BCAST : LD_PAR;

  vlu #(.LANES(LANES)) u_vlu_a (
    .clk, .rst_n, .mode(mode_a), .rd_v, .rdata(lda_rdata), .fb, .rot(ex_idx), .x(a));
  vlu #(.LANES(LANES)) u_vlu_b (
    .clk, .rst_n, .mode(mode_b), .rd_v, .rdata(ldb_rdata), .fb, .rot(16'd0), .x(b));

  vcmac #(.LANES(LANES), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .en(ex_en), .first(ex_first), .istart(ex_istart), .step_idx(ex_idx),
    .op(ins.op), .conj(ins.conj), .a, .b, .acc_re, .acc_im, .max_val, .max_idx);

  vsu #(.LANES(LANES), .ACC_W(ACC_W)) u_vsu (
    .clk, .rst_n, .st_en, .st_restart, .shift(ins.shift), .acc_re, .acc_im,
    .req(st_req), .fb);
endmodule
