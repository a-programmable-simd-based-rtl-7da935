// agu: address generator unit of one memory bank.
//
// Generates the element address of the bank's next access so that a SIMD
// cluster can stream a vector through the bank without computing addresses.
// The address is base + off, where off starts at 0 and advances by stride
// after every access, wrapping modulo len (a circular buffer of len elements
// starting at base; len = 0 means no wrap inside the bank).  An access marked
// restart uses base itself and restarts the sequence from there.
//
// Registers (cfg_reg): 0 base, 1 stride, 2 len.  Written with cfg_we.
// addr is combinational from the registers; the step happens on the clock
// edge that completes the access (acc high).
//
// Follows the architecture: every bank has its own address generator. The
// addressing modes (base, stride, circular length) are this design's choice.
// Only the low 10 bits of cfg_data are used (the bank's element address).
module agu
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
  input  logic          restart,
  output logic [AW-1:0] addr
);
  logic [AW-1:0] base, stride, len, off, cur, nxt;
  logic [AW:0]   sum;

  assign cur  = restart ? '0 : off;
  assign addr = base + cur;
  assign sum  = {1'b0, cur} + {1'b0, stride};
  assign nxt  = (len != '0 && sum >= {1'b0, len}) ? AW'(sum - {1'b0, len}) : sum[AW-1:0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      base   <= '0;
      stride <= AW'(1);
      len    <= '0;
      off    <= '0;
    end else begin
      if (cfg_we)
        case (cfg_reg)
          4'd0: begin base <= cfg_data[AW-1:0]; off <= '0; end
          4'd1: stride <= cfg_data[AW-1:0];
          4'd2: len    <= cfg_data[AW-1:0];
          default: ;
        endcase
      if (acc) off <= nxt;
    end
endmodule
