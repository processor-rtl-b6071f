// control_tb: decodes one encoding of every supported instruction (with
// random register fields) and checks the control signals that matter for
// it against a table written here, plus a few illegal encodings that must
// do nothing (no register write, no memory access, sequential PC).
module control_tb;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  logic [31:0] instr;
  ctrl_t ctl;
  int checks = 0, failures = 0;

  control dut (.instr, .ctl);

  task automatic expect_ctl(string name, logic [31:0] ins, bit we, dst_e dst, bit imm,
                            bit sext, bit s16, alu_op_e aop, bit men, mc_e mc,
                            lsize_e ls, bit lsg, wb_e wb, br_e br, pcsel_e ps);
    instr = ins; #1;
    checks++;
    if (ctl.reg_we != we || (we && ctl.dst != dst) || ctl.mem_en != men || ctl.pcsel != ps ||
        ctl.br != br || ((we || men) && ctl.wb != wb && we) ||
        ((we && wb == WB_ALU) || men) && (ctl.alu_imm != imm || ctl.alu_op != aop) ||
        (imm && ctl.ext_sign != sext) || ((we && wb == WB_ALU) && ctl.sa_16 != s16) ||
        (men && ctl.mc != mc) || (we && wb == WB_MEM && (ctl.lsize != ls || ctl.lsign != lsg))) begin
      failures++;
      $display("FAIL %s: %p", name, ctl);
    end
  endtask

  initial begin
    for (int n = 0; n < 20; n++) begin
      int d = $urandom_range(1, 31), s = $urandom_range(0, 31), t = $urandom_range(0, 31);
      int im = $urandom_range(0, 65535), sa = $urandom_range(0, 31);
      expect_ctl("ADDU", addu(d,s,t), 1, DST_RD, 0, 0, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("SUBU", subu(d,s,t), 1, DST_RD, 0, 0, 0, ALU_SUB, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("OR",   or_(d,s,t),  1, DST_RD, 0, 0, 0, ALU_OR,  0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("XOR",  xor_(d,s,t), 1, DST_RD, 0, 0, 0, ALU_XOR, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("NOR",  nor_(d,s,t), 1, DST_RD, 0, 0, 0, ALU_NOR, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("SLT",  slt(d,s,t),  1, DST_RD, 0, 0, 0, ALU_SLT, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("SLL",  sll(d,t,sa), 1, DST_RD, 0, 0, 0, ALU_SLL, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("SRL",  srl(d,t,sa), 1, DST_RD, 0, 0, 0, ALU_SRL, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("SRA",  sra(d,t,sa), 1, DST_RD, 0, 0, 0, ALU_SRA, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("JR",   jr(s),       0, DST_RD, 0, 0, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_REG);
      expect_ctl("ADDI", addi(t,s,im),  1, DST_RT, 1, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("ADDIU",addiu(t,s,im), 1, DST_RT, 1, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("ANDI", andi(t,s,im),  1, DST_RT, 1, 0, 0, ALU_AND, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("ORI",  ori(t,s,im),   1, DST_RT, 1, 0, 0, ALU_OR,  0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("LUI",  lui(t,im),     1, DST_RT, 1, 0, 1, ALU_SLL, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("LB",   lb(t,im,s),  1, DST_RT, 1, 1, 0, ALU_ADD, 1, MC_READ_WORD, LS_BYTE, 1, WB_MEM, BR_NONE, PC_SEQ);
      expect_ctl("LBU",  lbu(t,im,s), 1, DST_RT, 1, 1, 0, ALU_ADD, 1, MC_READ_WORD, LS_BYTE, 0, WB_MEM, BR_NONE, PC_SEQ);
      expect_ctl("LH",   lh(t,im,s),  1, DST_RT, 1, 1, 0, ALU_ADD, 1, MC_READ_WORD, LS_HALF, 1, WB_MEM, BR_NONE, PC_SEQ);
      expect_ctl("LHU",  lhu(t,im,s), 1, DST_RT, 1, 1, 0, ALU_ADD, 1, MC_READ_WORD, LS_HALF, 0, WB_MEM, BR_NONE, PC_SEQ);
      expect_ctl("LW",   lw(t,im,s),  1, DST_RT, 1, 1, 0, ALU_ADD, 1, MC_READ_WORD, LS_WORD, 0, WB_MEM, BR_NONE, PC_SEQ);
      expect_ctl("SB",   sb(t,im,s),  0, DST_RT, 1, 1, 0, ALU_ADD, 1, MC_WRITE_BYTE, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("SH",   sh(t,im,s),  0, DST_RT, 1, 1, 0, ALU_ADD, 1, MC_WRITE_HALF, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("SW",   sw(t,im,s),  0, DST_RT, 1, 1, 0, ALU_ADD, 1, MC_WRITE_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("BEQ",  beq(s,t,im), 0, DST_RD, 0, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_EQ,  PC_BRANCH);
      expect_ctl("BNE",  bne(s,t,im), 0, DST_RD, 0, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NE,  PC_BRANCH);
      expect_ctl("BLTZ", bltz(s,im),  0, DST_RD, 0, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_LTZ, PC_BRANCH);
      expect_ctl("BGEZ", bgez(s,im),  0, DST_RD, 0, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_GEZ, PC_BRANCH);
      expect_ctl("BLEZ", blez(s,im),  0, DST_RD, 0, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_LEZ, PC_BRANCH);
      expect_ctl("BGTZ", bgtz(s,im),  0, DST_RD, 0, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_GTZ, PC_BRANCH);
      expect_ctl("J",    j_(32'($urandom)),  0, DST_RD, 0, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_JUMP);
      expect_ctl("JAL",  jal(32'($urandom)), 1, DST_RA, 0, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_LINK, BR_NONE, PC_JUMP);
      // encodings outside the supported set act as no-ops
      expect_ctl("ill-op", {6'h3f, 26'($urandom)}, 0, DST_RD, 0, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("ill-fn", r_type(6'h3e, d, s, t), 0, DST_RD, 0, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
      expect_ctl("ill-sub", i_type(OP_REGIMM, 5'h10, s, im), 0, DST_RD, 0, 1, 0, ALU_ADD, 0, MC_READ_WORD, LS_WORD, 0, WB_ALU, BR_NONE, PC_SEQ);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
