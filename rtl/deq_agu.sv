// deq_agu: address generator for the delay equalizer buffer.
//
// The delay equalizer buffer is a circular buffer of len samples (quarter
// chips at an oversampling ratio of 4) written by the digital front end one
// sample at a time and read by the Rake finger processing at a finger
// dependent delay.  The unit keeps two pointers:
//   write pointer wp : every write goes to wp, then wp = (wp + 1) mod len;
//   read pointer  rp : a read marked restart starts at (mark + delay) mod len,
//                      every read then advances by rstride modulo len.
// mark is a copy of wp taken on command (e.g. at a slot boundary), so that
// all fingers read relative to the same point of the received signal, each
// with its own delay.  The irregular part of the access pattern, the
// lane-to-memory-block mapping of OSR-strided reads, is done by mem_bank.
//
// len must be a multiple of 16 (see mem_bank).  Pointers, delay and rstride
// must be below len (two conditional
// subtractions implement the modulo).
//
// Registers (cfg_reg): 0 len, 1 delay, 2 rstride, 3 mark := wp (any data),
// 4 wp := 0 (any data).  addr is combinational; pointers step on the edge
// that completes the access.
//
// Follows the architecture: a special address generator serves the delay
// equalizer buffer.  Its internal design (two pointers, mark, finger delay,
// read stride) is this design's choice.  Only cfg_data[9:0] is used.
module deq_agu
  import rake_pkg::*;
#(
  parameter int AW = BANK_AW
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [3:0]    cfg_reg,
  input  logic [15:0]   cfg_data,
  input  logic          acc,
  input  logic          we,
  input  logic          restart,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] len_o
);
  logic [AW-1:0] len, delay, rstride, wp, rp, mark, rcur;

  function automatic logic [AW-1:0] modadd(input logic [AW-1:0] a,
                                           input logic [AW-1:0] b,
                                           input logic [AW-1:0] m);
    logic [AW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (m == '0) return s[AW-1:0];
    if (s >= {1'b0, m}) s = s - {1'b0, m};
    if (s >= {1'b0, m}) s = s - {1'b0, m};
    return s[AW-1:0];
  endfunction

  assign rcur  = restart ? modadd(mark, delay, len) : rp;
  assign addr  = we ? wp : rcur;
  assign len_o = len;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      len     <= '0;
      delay   <= '0;
      rstride <= AW'(OSR);
      wp      <= '0;
      rp      <= '0;
      mark    <= '0;
    end else begin
      if (cfg_we)
        case (cfg_reg)
          4'd0: len     <= cfg_data[AW-1:0];
          4'd1: delay   <= cfg_data[AW-1:0];
          4'd2: rstride <= cfg_data[AW-1:0];
          4'd3: mark    <= wp;
          4'd4: wp      <= '0;
          default: ;
        endcase
      if (acc) begin
        if (we) wp <= modadd(wp, AW'(1), len);
        else    rp <= modadd(rcur, rstride, len);
      end
    end
endmodule
