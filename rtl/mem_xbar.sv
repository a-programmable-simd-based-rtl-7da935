// mem_xbar: memory crossbar switch between the memory banks and the
// computing-engine ports (masters).
//
// Each bank is connected to at most one master at a time, chosen by a
// per-bank map register; connections are statically scheduled by software,
// so there is no arbitration.  A master may own several banks; its requests
// then reach all of them (a write is broadcast) and its read data come from
// the lowest-numbered bank it owns.  Reconnecting banks moves whole buffers
// between engines without copying data.
//
// Configuration: cfg_we writes map[cfg_reg] = cfg_data[2:0] (a master
// number; NMASTERS or above disconnects the bank).  The new map takes effect
// two clock cycles after the write (one cycle for the write, one to switch),
// so that an access in flight completes on the old connection.  Requests
// pass through combinationally; read data are routed back with the map of
// the previous cycle, matching the bank's one-cycle read latency.
//
// Follows the architecture: static scheduling, no arbitration, reconnection
// within two clock cycles.  Port count, the lowest-bank read rule and the
// write broadcast are this design's choice.  Only cfg_data[2:0] is used.
module mem_xbar
  import rake_pkg::*;
#(
  parameter int NM = NMASTERS,
  parameter int NB = NBANKS
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_we,
  input  logic [3:0]          cfg_reg,
  input  logic [15:0]         cfg_data,
  input  mem_req_t   [NM-1:0] m_req,
  output mem_rdata_t [NM-1:0] m_rdata,
  output mem_req_t   [NB-1:0] b_req,
  input  mem_rdata_t [NB-1:0] b_rdata,
  output logic [NB-1:0][2:0]  map_o
);
  logic [NB-1:0][2:0] pend, map, map_q;
  logic               pend_v;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pend   <= '1;
      map    <= '1;
      map_q  <= '1;
      pend_v <= 1'b0;
    end else begin
      pend_v <= 1'b0;
      if (cfg_we && int'(cfg_reg) < NB) begin
        pend[cfg_reg] <= cfg_data[2:0];
        pend_v        <= 1'b1;
      end
      if (pend_v) map <= pend;
      map_q <= map;
    end

  assign map_o = map;

  always_comb begin
    for (int b = 0; b < NB; b++)
      b_req[b] = (int'(map[b]) < NM) ? m_req[map[b]] : '0;
    for (int m = 0; m < NM; m++) begin
      m_rdata[m] = '0;
      for (int b = NB - 1; b >= 0; b--)
        if (int'(map_q[b]) == m) m_rdata[m] = b_rdata[b];
    end
  end
endmodule
