// rake_top: programmable SIMD Rake receiver processor core.
//
// A single-issue RISC controller drives two SIMD clusters: the vector ALU
// cluster (4-way complex short ALU with scrambling and OVSF code generators,
// for descrambling, de-spreading and correlation) and the vector CMAC
// cluster (2-way complex MAC, for channel weighting, maximum ratio
// combining, FFT butterflies and peak search).  Both reach the data memory
// through a crossbar switch that connects each of NBANKS memory banks to one
// port at a time.  Banks 0 and 1 are delay equalizer buffers (deq_agu,
// skewed layout for OSR-strided reads), banks 2..7 are ordinary banks.  The
// digital front end filters and decimates the incoming samples and writes
// them, one per output sample, into the bank the crossbar gives it.
//
// Crossbar masters: 0 front end, 1 ALU load, 2 ALU store, 3 CMAC load A,
// 4 CMAC load B, 5 CMAC store, 6 host port (direct addressing).
// Configuration address map (CFG instruction, 12 bits):
//   0x0b0..0x0bf  bank b AGU registers          0x800..0x807  crossbar map
//   0x900..0x90a  vector ALU cluster registers  0xa00..0xa07  front-end taps
// Controller status (RDS): 0 busy {cmac, alu}, 1/2 peak value low/high,
// 3 peak index.
// The host loads the program through imem_* and pulses start; done is high
// while the controller is halted.  The host port reads and writes the banks
// the crossbar assigns to master 6, with direct element addresses.
//
// Follows the architecture: single-issue controller, two SIMD clusters,
// banked memory on a crossbar that reconnects within two cycles, special
// address generator for the delay buffer, front end.  Bank count, master
// list, address map and host port are this design's choice.  The crossbar
// map output and the front end's direct output are left open here (only the
// write request into the crossbar is used), and read-data ports of masters
// that only write (front end, store units) are unread.  rst_n also feeds
// assertions in the clusters, which tools may report as a sync/async mix.
module rake_top
  import rake_pkg::*;
#(
  parameter int ROWS  = 256,
  parameter int NTAPS = 8,
  parameter int DEC   = 2
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        done,
  input  logic        imem_we,
  input  logic [7:0]  imem_addr,
  input  logic [31:0] imem_wdata,
  input  logic        adc_valid,
  input  cplx_t       adc_sample,
  input  mem_req_t    host_req,
  output mem_rdata_t  host_rdata,
  output logic [1:0]  cluster_busy
);
  // configuration bus
  logic              cfg_we;
  logic [CFG_AW-1:0] cfg_addr;
  logic [CW-1:0]     cfg_data;
  logic [3:0]        cfg_unit;
  assign cfg_unit = cfg_addr[11:8];

  // controller
  logic [1:0]         vi_valid, vi_ready, busy;
  vinstr_t            vi;
  logic [3:0][CW-1:0] status;
  logic [31:0]        max_val;
  logic [15:0]        max_idx;

  assign status       = {max_idx, max_val[31:16], max_val[15:0], {14'd0, busy}};
  assign cluster_busy = busy;

  risc_ctrl u_ctrl (
    .clk, .rst_n, .start, .done, .imem_we, .imem_addr, .imem_wdata,
    .cfg_we, .cfg_addr, .cfg_data, .vi_valid, .vi, .vi_ready, .busy, .status);

  // crossbar and banks
  mem_req_t   [NMASTERS-1:0] m_req;
  mem_rdata_t [NMASTERS-1:0] m_rdata;
  mem_req_t   [NBANKS-1:0]   b_req;
  mem_rdata_t [NBANKS-1:0]   b_rdata;

  mem_xbar u_xbar (
    .clk, .rst_n, .cfg_we(cfg_we && cfg_unit == 4'h8), .cfg_reg(cfg_addr[3:0]),
    .cfg_data, .m_req, .m_rdata, .b_req, .b_rdata, .map_o());

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    mem_bank #(.ROWS(ROWS), .DEQ(b < 2)) u_bank (
      .clk, .rst_n, .cfg_we(cfg_we && cfg_addr[11:4] == 8'(b)), .cfg_reg(cfg_addr[3:0]),
      .cfg_data, .req(b_req[b]), .rdata(b_rdata[b]));
  end

  // vector ALU cluster
  valu_cluster u_alu (
    .clk, .rst_n, .vi_valid(vi_valid[0]), .vi, .vi_ready(vi_ready[0]), .busy(busy[0]),
    .cfg_we(cfg_we && cfg_unit == 4'h9), .cfg_reg(cfg_addr[7:0]), .cfg_data,
    .ld_req(m_req[M_ALU_LD]), .ld_rdata(m_rdata[M_ALU_LD]), .st_req(m_req[M_ALU_ST]));

  // vector CMAC cluster
  cmac_cluster u_mac (
    .clk, .rst_n, .vi_valid(vi_valid[1]), .vi, .vi_ready(vi_ready[1]), .busy(busy[1]),
    .lda_req(m_req[M_MAC_LDA]), .lda_rdata(m_rdata[M_MAC_LDA]),
    .ldb_req(m_req[M_MAC_LDB]), .ldb_rdata(m_rdata[M_MAC_LDB]),
    .st_req(m_req[M_MAC_ST]), .max_val, .max_idx);

  // digital front end
  dfe #(.NTAPS(NTAPS), .DEC(DEC)) u_dfe (
    .clk, .rst_n, .cfg_we(cfg_we && cfg_unit == 4'hA), .cfg_reg(cfg_addr[3:0]), .cfg_data,
    .in_valid(adc_valid), .in_sample(adc_sample), .out_valid(), .out_sample(),
    .wr_req(m_req[M_DFE]));

  // host port
  assign m_req[M_HOST] = host_req;
  assign host_rdata    = m_rdata[M_HOST];
endmodule
