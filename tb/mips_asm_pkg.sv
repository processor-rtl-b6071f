// mips_asm_pkg: instruction encoders used by the testbenches to build
// programs without an external assembler. Each function returns the 32-bit
// word of one instruction in the standard MIPS field layout:
// R-type op|rs|rt|rd|shamt|func, I-type op|rs|rt|imm16, J-type op|target26.
package mips_asm_pkg;
  import mips_pkg::*;

  function automatic logic [31:0] r_type(logic [5:0] fn, int rd, int rs, int rt, int sh = 0);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] i_type(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] addu(int rd, int rs, int rt); return r_type(FN_ADDU, rd, rs, rt); endfunction
  function automatic logic [31:0] subu(int rd, int rs, int rt); return r_type(FN_SUBU, rd, rs, rt); endfunction
  function automatic logic [31:0] or_ (int rd, int rs, int rt); return r_type(FN_OR,   rd, rs, rt); endfunction
  function automatic logic [31:0] xor_(int rd, int rs, int rt); return r_type(FN_XOR,  rd, rs, rt); endfunction
  function automatic logic [31:0] nor_(int rd, int rs, int rt); return r_type(FN_NOR,  rd, rs, rt); endfunction
  function automatic logic [31:0] slt (int rd, int rs, int rt); return r_type(FN_SLT,  rd, rs, rt); endfunction
  function automatic logic [31:0] sll (int rd, int rt, int sh); return r_type(FN_SLL, rd, 0, rt, sh); endfunction
  function automatic logic [31:0] srl (int rd, int rt, int sh); return r_type(FN_SRL, rd, 0, rt, sh); endfunction
  function automatic logic [31:0] sra (int rd, int rt, int sh); return r_type(FN_SRA, rd, 0, rt, sh); endfunction
  function automatic logic [31:0] jr  (int rs);                 return r_type(FN_JR, 0, rs, 0); endfunction

  function automatic logic [31:0] addi (int rt, int rs, int imm); return i_type(OP_ADDI,  rt, rs, imm); endfunction
  function automatic logic [31:0] addiu(int rt, int rs, int imm); return i_type(OP_ADDIU, rt, rs, imm); endfunction
  function automatic logic [31:0] andi (int rt, int rs, int imm); return i_type(OP_ANDI,  rt, rs, imm); endfunction
  function automatic logic [31:0] ori  (int rt, int rs, int imm); return i_type(OP_ORI,   rt, rs, imm); endfunction
  function automatic logic [31:0] lui  (int rt, int imm);         return i_type(OP_LUI,   rt, 0, imm); endfunction

  function automatic logic [31:0] lb (int rt, int off, int rs); return i_type(OP_LB,  rt, rs, off); endfunction
  function automatic logic [31:0] lbu(int rt, int off, int rs); return i_type(OP_LBU, rt, rs, off); endfunction
  function automatic logic [31:0] lh (int rt, int off, int rs); return i_type(OP_LH,  rt, rs, off); endfunction
  function automatic logic [31:0] lhu(int rt, int off, int rs); return i_type(OP_LHU, rt, rs, off); endfunction
  function automatic logic [31:0] lw (int rt, int off, int rs); return i_type(OP_LW,  rt, rs, off); endfunction
  function automatic logic [31:0] sb (int rt, int off, int rs); return i_type(OP_SB,  rt, rs, off); endfunction
  function automatic logic [31:0] sh (int rt, int off, int rs); return i_type(OP_SH,  rt, rs, off); endfunction
  function automatic logic [31:0] sw (int rt, int off, int rs); return i_type(OP_SW,  rt, rs, off); endfunction

  function automatic logic [31:0] beq (int rs, int rt, int off); return i_type(OP_BEQ, rt, rs, off); endfunction
  function automatic logic [31:0] bne (int rs, int rt, int off); return i_type(OP_BNE, rt, rs, off); endfunction
  function automatic logic [31:0] bltz(int rs, int off); return i_type(OP_REGIMM, SUB_BLTZ, rs, off); endfunction
  function automatic logic [31:0] bgez(int rs, int off); return i_type(OP_REGIMM, SUB_BGEZ, rs, off); endfunction
  function automatic logic [31:0] blez(int rs, int off); return i_type(OP_BLEZ, 0, rs, off); endfunction
  function automatic logic [31:0] bgtz(int rs, int off); return i_type(OP_BGTZ, 0, rs, off); endfunction

  function automatic logic [31:0] j_  (logic [31:0] addr); return {OP_J,   addr[27:2]}; endfunction
  function automatic logic [31:0] jal (logic [31:0] addr); return {OP_JAL, addr[27:2]}; endfunction

endpackage
