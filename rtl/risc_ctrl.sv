// risc_ctrl: single-issue RISC controller of the processor core.
//
// Executes the program: 16-bit integer (RISC) instructions on its own ALU
// and MAC unit, and vector instructions, which it hands to one of the SIMD
// clusters.  Exactly one instruction is issued per clock cycle.  A vector
// instruction keeps its cluster busy for many cycles while the controller
// goes on issuing RISC instructions (loop control, address and code set-up
// through the configuration bus), so control code is hidden behind vector
// work.  Issuing a vector instruction to a busy cluster, or WAIT, stalls
// the controller until the cluster is free.
//
// Instruction word (32 bit): [31:26] opcode, [25:22] rd, [21:18] rs,
// [17:14] rt, [15:0] imm (I-type; overlaps rt).
//   1 ADD  2 SUB  3 AND  4 OR  5 XOR  6 SHL  7 SHR (rd = rs op rt)
//   8 ADDI rd = rs + imm        9 MUL rd = low16(rs*rt)
//  10 MAC  acc += rs*rt        11 MACR rd = acc >>> imm[4:0]   12 CLRA
//  16 BEQZ rs,imm  17 BNEZ rs,imm  18 JMP imm  19 DBNZ rd,imm (rd--, taken if != 0)
//  20 CFG  config[imm[11:0]] = rs                21 RDS rd = status[imm[1:0]]
//  24 VEC  [25] cluster, [24:22] op, [21:20] load mode, [19:18] code select,
//          [17] conj, [16:10] length-1, [9:6] register holding the repeat
//          count, [5:2] store shift, [1:0] n of the code i^n used with
//          code select 3
//  25 WAIT [25] cluster, [24] both clusters         63 HALT
// Branch targets are absolute instruction addresses.  The program memory is
// written through the imem port while the controller is halted; start begins
// execution at address 0.  The opcode map and encoding are this design's
// own; the architecture fixes the three instruction classes, 16-bit
// integers and single issue.
module risc_ctrl
  import rake_pkg::*;
#(
  parameter int IMEM_DEPTH = 256
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  done,
  input  logic                  imem_we,
  input  logic [7:0]            imem_addr,
  input  logic [31:0]           imem_wdata,
  output logic                  cfg_we,
  output logic [CFG_AW-1:0]     cfg_addr,
  output logic [CW-1:0]         cfg_data,
  output logic [1:0]            vi_valid,
  output vinstr_t               vi,
  input  logic [1:0]            vi_ready,
  input  logic [1:0]            busy,
  input  logic [3:0][CW-1:0]    status
);
  localparam int PW = $clog2(IMEM_DEPTH);

  typedef enum logic [5:0] {
    OP_NOP = 6'd0, OP_ADD = 6'd1, OP_SUB = 6'd2, OP_AND = 6'd3, OP_OR = 6'd4,
    OP_XOR = 6'd5, OP_SHL = 6'd6, OP_SHR = 6'd7, OP_ADDI = 6'd8, OP_MUL = 6'd9,
    OP_MAC = 6'd10, OP_MACR = 6'd11, OP_CLRA = 6'd12, OP_BEQZ = 6'd16,
    OP_BNEZ = 6'd17, OP_JMP = 6'd18, OP_DBNZ = 6'd19, OP_CFG = 6'd20,
    OP_RDS = 6'd21, OP_VEC = 6'd24, OP_WAIT = 6'd25, OP_HALT = 6'd63
  } opc_e;

  logic [31:0]         imem [IMEM_DEPTH];
  logic [PW-1:0]       pc;
  logic                run;
  logic [31:0]         ir;
  logic [CW-1:0]       rf [16];
  logic signed [31:0]  acc;

  always_ff @(posedge clk)
    if (imem_we) imem[PW'(imem_addr)] <= imem_wdata;

  assign ir = imem[pc];

  opc_e        opc;
  logic [3:0]  rd, rs, rt;
  logic [15:0] imm;
  logic [CW-1:0] a, b, dec;
  logic        cl, stall;

  assign opc = opc_e'(ir[31:26]);
  assign rd  = ir[25:22];
  assign rs  = ir[21:18];
  assign rt  = ir[17:14];
  assign imm = ir[15:0];
  assign a   = (rs == 4'd0) ? '0 : rf[rs];
  assign b   = (rt == 4'd0) ? '0 : rf[rt];
  assign dec = rf[rd] - CW'(1);
  assign cl  = ir[25];

  // vector issue
  always_comb begin
    vi        = '0;
    vi.op     = ir[24:22];
    vi.ldmode = ir[21:20];
    vi.csel   = ir[19:18];
    vi.conj   = ir[17];
    vi.lenm1  = ir[16:10];
    vi.rep    = (ir[9:6] == 4'd0) ? 16'd1 : rf[ir[9:6]];
    vi.shift  = ir[5:2];
    vi.wcode  = ir[1:0];
    vi_valid  = '0;
    if (run && opc == OP_VEC) vi_valid[cl] = 1'b1;
  end

  always_comb begin
    stall = 1'b0;
    if (opc == OP_VEC && !vi_ready[cl]) stall = 1'b1;
    if (opc == OP_WAIT && (ir[24] ? (busy != '0) : busy[cl])) stall = 1'b1;
  end

  assign cfg_we   = run && opc == OP_CFG;
  assign cfg_addr = imm[CFG_AW-1:0];
  assign cfg_data = a;
  assign done     = !run;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pc  <= '0;
      run <= 1'b0;
      acc <= '0;
      for (int i = 0; i < 16; i++) rf[i] <= '0;
    end else if (!run) begin
      if (start) begin
        run <= 1'b1;
        pc  <= '0;
      end
    end else if (!stall) begin
      pc <= pc + PW'(1);
      case (opc)
        OP_ADD:  rf[rd] <= a + b;
        OP_SUB:  rf[rd] <= a - b;
        OP_AND:  rf[rd] <= a & b;
        OP_OR:   rf[rd] <= a | b;
        OP_XOR:  rf[rd] <= a ^ b;
        OP_SHL:  rf[rd] <= a << b[3:0];
        OP_SHR:  rf[rd] <= a >> b[3:0];
        OP_ADDI: rf[rd] <= a + imm;
        OP_MUL:  rf[rd] <= CW'($signed(a) * $signed(b));
        OP_MAC:  acc    <= acc + $signed(a) * $signed(b);
        OP_MACR: rf[rd] <= CW'(acc >>> imm[4:0]);
        OP_CLRA: acc    <= '0;
        OP_BEQZ: if (a == '0) pc <= PW'(imm);
        OP_BNEZ: if (a != '0) pc <= PW'(imm);
        OP_JMP:  pc <= PW'(imm);
        OP_DBNZ: begin
          rf[rd] <= dec;
          if (dec != '0) pc <= PW'(imm);
        end
        OP_RDS:  rf[rd] <= status[imm[1:0]];
        OP_HALT: run <= 1'b0;
        default: ;
      endcase
      rf[0] <= '0;
    end
endmodule
