// valu_cluster: the Vector ALU SIMD cluster used for Rake finger processing.
//
// A vector controller (vctrl), a vector load unit (vlu), the 4-way complex
// short ALU (valu), a vector store unit (vsu), the scrambling code generator
// and the OVSF code generator.  One vector instruction (vinstr_t) runs a
// whole vector operation while the RISC controller continues with other
// instructions.  Typical uses:
//   descramble : op MUL, LD_PAR, CS_SCR, conj  -> four chips per step
//   de-spread  : op MAC, LD_BCAST, CS_OVSF     -> four OVSF codes in parallel
//   correlate  : op MAC, LD_SLIDE, CS_SCR/IMM  -> four delays in parallel
// The code comes from the immediate register (any value with parts in
// {-1,0,1}), the instruction word (CS_WORD: i^n, n in the instruction),
// the scrambling generator or the OVSF generator.
//
// Configuration registers (cfg_reg):
//   0/1 scrambling x seed [15:0] / [17:16]   2/3 y seed [15:0] / [17:16]
//   4   load the seeds into the generator    5   OVSF log2(SF)
//   6..9 OVSF code number of lane 0..3       10  immediate code {re[1:0],im[1:0]}
// Timing: vi is accepted when vi_valid && vi_ready; the first load request
// appears in the next cycle; load data are expected one cycle after the
// request (ld_rdata), results are written through st_req one cycle later.
//
// Follows the architecture: vector controller, load and store units, code
// from the instruction (here the immediate register), the scrambling or the
// OVSF generator.  Register map and field layout are this design's choice.
// The controller's last-step and instruction-start outputs are not needed
// by this datapath and stay unread.  rst_n also qualifies an
// assertion, which tools may report as a sync/async mix.
// The load request's write-data, write-enable and mask fields are tied to
// zero (common memory request type): constant output bits.
module valu_cluster
  import rake_pkg::*;
#(
  parameter int LANES = ALU_LANES,
  parameter int ACC_W = 32
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        vi_valid,
  input  vinstr_t     vi,
  output logic        vi_ready,
  output logic        busy,
  input  logic        cfg_we,
  input  logic [7:0]  cfg_reg,
  input  logic [15:0] cfg_data,
  output mem_req_t    ld_req,
  input  mem_rdata_t  ld_rdata,
  output mem_req_t    st_req
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
    .prefill(vi.ldmode == LD_SLIDE), .noload(vi.ldmode == LD_FB),
    .st_each(vi.op != VOP_MAC), .nostore(1'b0),
    .busy, .ld_en, .ld_restart, .rd_v, .ex_en, .ex_first, .ex_last, .ex_istart,
    .ex_idx, .st_en, .st_restart);

  // configuration registers
  logic [17:0] x_seed, y_seed;
  logic [3:0]  sf_log;
  logic [LANES-1:0][8:0] ocode;
  scode_t      imm;
  logic        scr_load;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      x_seed <= 18'h00001; y_seed <= 18'h3ffff; sf_log <= 4'd2; ocode <= '0;
      imm <= '{re: 2'sb01, im: 2'sb00};
    end else if (cfg_we)
      case (cfg_reg)
        8'd0: x_seed[15:0]  <= cfg_data;
        8'd1: x_seed[17:16] <= cfg_data[1:0];
        8'd2: y_seed[15:0]  <= cfg_data;
        8'd3: y_seed[17:16] <= cfg_data[1:0];
        8'd5: sf_log        <= cfg_data[3:0];
        8'd10: imm          <= cfg_data[3:0];
        default:
          if (cfg_reg >= 8'd6 && cfg_reg < 8'(6 + LANES)) ocode[cfg_reg - 8'd6] <= cfg_data[8:0];
      endcase
  assign scr_load = cfg_we && cfg_reg == 8'd4;

  // code generators
  scode_t [LANES-1:0] c_scr, c_ovsf, c;
  logic par;
  assign par = ins.ldmode == LD_PAR;

  scr_codegen #(.LANES(LANES)) u_scr (
    .clk, .rst_n, .x_seed, .y_seed, .load(scr_load), .par,
    .step(ex_en && ins.csel == CS_SCR), .c(c_scr));

  ovsf_codegen #(.LANES(LANES)) u_ovsf (
    .clk, .rst_n, .sf_log, .code(ocode), .par, .restart(start),
    .step(ex_en && ins.csel == CS_OVSF), .c(c_ovsf));

  // i^n: 1, i, -1, -i
  function automatic scode_t wcode(input logic [1:0] n);
    case (n)
      2'd0:    wcode = '{re: 2'b01, im: 2'b00};
      2'd1:    wcode = '{re: 2'b00, im: 2'b01};
      2'd2:    wcode = '{re: 2'b11, im: 2'b00};
      default: wcode = '{re: 2'b00, im: 2'b11};
    endcase
  endfunction

  always_comb
    for (int k = 0; k < LANES; k++)
      case (ins.csel)
        CS_SCR:  c[k] = c_scr[k];
        CS_OVSF: c[k] = c_ovsf[k];
        CS_WORD: c[k] = wcode(ins.wcode);
        default: c[k] = imm;
      endcase

  // load, compute, store
  cplx_t [LANES-1:0] x, fb;
  logic signed [LANES-1:0][ACC_W-1:0] acc_re, acc_im;

  always_comb begin
    ld_req         = '0;
    ld_req.en      = ld_en;
    ld_req.restart = ld_restart;
  end

  vlu #(.LANES(LANES)) u_vlu (
    .clk, .rst_n, .mode(ins.ldmode), .rd_v, .rdata(ld_rdata), .fb, .rot(ex_idx), .x);

  valu #(.LANES(LANES), .ACC_W(ACC_W)) u_alu (
    .clk, .rst_n, .en(ex_en), .first(ex_first), .op(ins.op), .conj(ins.conj),
    .x, .c, .acc_re, .acc_im);

  vsu #(.LANES(LANES), .ACC_W(ACC_W)) u_vsu (
    .clk, .rst_n, .st_en, .st_restart, .shift(ins.shift), .acc_re, .acc_im,
    .req(st_req), .fb);
endmodule
