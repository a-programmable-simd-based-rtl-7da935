// rake_asm_pkg: instruction encoders for the RISC controller, used by the
// testbenches to write programs (see risc_ctrl for the instruction format).
// Each function returns one 32-bit instruction word; the encoding is this
// design's own (no assembler format is given by the architecture).
package rake_asm_pkg;
  function automatic logic [31:0] r3(int opc, int rd, int rs, int rt);
    return {6'(opc), 4'(rd), 4'(rs), 4'(rt), 14'd0};
  endfunction
  function automatic logic [31:0] ri(int opc, int rd, int rs, int imm);
    return {6'(opc), 4'(rd), 4'(rs), 2'd0, 16'(imm)};
  endfunction
  function automatic logic [31:0] ADD (int rd, int rs, int rt); return r3(1, rd, rs, rt); endfunction
  function automatic logic [31:0] SUB (int rd, int rs, int rt); return r3(2, rd, rs, rt); endfunction
  function automatic logic [31:0] AND_(int rd, int rs, int rt); return r3(3, rd, rs, rt); endfunction
  function automatic logic [31:0] OR_ (int rd, int rs, int rt); return r3(4, rd, rs, rt); endfunction
  function automatic logic [31:0] XOR_(int rd, int rs, int rt); return r3(5, rd, rs, rt); endfunction
  function automatic logic [31:0] SHL (int rd, int rs, int rt); return r3(6, rd, rs, rt); endfunction
  function automatic logic [31:0] SHR (int rd, int rs, int rt); return r3(7, rd, rs, rt); endfunction
  function automatic logic [31:0] ADDI(int rd, int rs, int imm); return ri(8, rd, rs, imm); endfunction
  function automatic logic [31:0] LI  (int rd, int imm); return ri(8, rd, 0, imm); endfunction
  function automatic logic [31:0] MUL (int rd, int rs, int rt); return r3(9, rd, rs, rt); endfunction
  function automatic logic [31:0] MAC (int rs, int rt); return r3(10, 0, rs, rt); endfunction
  function automatic logic [31:0] MACR(int rd, int sh); return ri(11, rd, 0, sh); endfunction
  function automatic logic [31:0] CLRA(); return ri(12, 0, 0, 0); endfunction
  function automatic logic [31:0] BEQZ(int rs, int tgt); return ri(16, 0, rs, tgt); endfunction
  function automatic logic [31:0] BNEZ(int rs, int tgt); return ri(17, 0, rs, tgt); endfunction
  function automatic logic [31:0] JMP (int tgt); return ri(18, 0, 0, tgt); endfunction
  function automatic logic [31:0] DBNZ(int rd, int tgt); return ri(19, rd, 0, tgt); endfunction
  function automatic logic [31:0] CFG (int addr, int rs); return ri(20, 0, rs, addr); endfunction
  function automatic logic [31:0] RDS (int rd, int sel); return ri(21, rd, 0, sel); endfunction
  // VEC cluster, op, load mode, code select, conj, length, repeat register, shift
  function automatic logic [31:0] VEC(int cl, int op, int ld, int cs, int cj, int len, int rreg, int sh);
    return {6'd24, 1'(cl), 3'(op), 2'(ld), 2'(cs), 1'(cj), 7'(len - 1), 4'(rreg), 4'(sh), 2'd0};
  endfunction
  // VEC with the code i^n taken from the instruction word (code select 3)
  function automatic logic [31:0] VECW(int cl, int op, int ld, int cj, int len, int rreg, int sh, int n);
    return {6'd24, 1'(cl), 3'(op), 2'(ld), 2'd3, 1'(cj), 7'(len - 1), 4'(rreg), 4'(sh), 2'(n)};
  endfunction
  function automatic logic [31:0] WAIT(int cl); return {6'd25, 1'(cl), 25'd0}; endfunction
  function automatic logic [31:0] WAITALL(); return {6'd25, 1'b0, 1'b1, 24'd0}; endfunction
  function automatic logic [31:0] HALT(); return {6'd63, 26'd0}; endfunction
endpackage
