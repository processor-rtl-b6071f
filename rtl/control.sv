// control: instruction decoder of the single-cycle MIPS processor.
//
// Reads the opcode (bits 31:26), and for R-type the func field (bits 5:0)
// or for REGIMM the subop (bits 20:16), and produces the control bundle
// ctrl_t that steers the datapath for that one cycle: register write enable
// and destination field, ALU operation, whether ALU operand B is the
// extended immediate, sign or zero extension, shift amount shamt or 16,
// memory enable and mc code, load size and signedness, write-back source,
// branch condition and next-PC source. Combinational.
// Supported: ADDU SUBU OR XOR NOR SLT SLL SRL SRA JR (R-type), ADDI ADDIU
// ANDI ORI LUI, LB LBU LH LHU LW SB SH SW, BEQ BNE BLTZ BGEZ BLEZ BGTZ,
// J JAL. Opcode numbers follow the MIPS tables. ADDI behaves as ADDIU
// because no overflow trap exists in this design, and any other encoding
// is executed as a no-op; both are this design's choices. Loads read a
// whole word (mc=00) and load_ext picks the part.
module control
  import mips_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctl
);

  logic [5:0] op, fn;
  logic [4:0] sub;

  assign op  = instr[31:26];
  assign fn  = instr[5:0];
  assign sub = instr[20:16];

  always_comb begin
    ctl = '{reg_we: 1'b0, dst: DST_RD, alu_imm: 1'b0, ext_sign: 1'b1, sa_16: 1'b0,
            alu_op: ALU_ADD, mem_en: 1'b0, mc: MC_READ_WORD, lsize: LS_WORD,
            lsign: 1'b0, wb: WB_ALU, br: BR_NONE, pcsel: PC_SEQ};
    unique case (op)
      OP_RTYPE: begin
        ctl.reg_we = 1'b1;
        unique case (fn)
          FN_ADDU: ctl.alu_op = ALU_ADD;
          FN_SUBU: ctl.alu_op = ALU_SUB;
          FN_OR:   ctl.alu_op = ALU_OR;
          FN_XOR:  ctl.alu_op = ALU_XOR;
          FN_NOR:  ctl.alu_op = ALU_NOR;
          FN_SLT:  ctl.alu_op = ALU_SLT;
          FN_SLL:  ctl.alu_op = ALU_SLL;
          FN_SRL:  ctl.alu_op = ALU_SRL;
          FN_SRA:  ctl.alu_op = ALU_SRA;
          FN_JR: begin
            ctl.reg_we = 1'b0;
            ctl.pcsel  = PC_REG;
          end
          default: ctl.reg_we = 1'b0;
        endcase
      end
      OP_ADDI, OP_ADDIU: begin
        ctl.reg_we = 1'b1; ctl.dst = DST_RT; ctl.alu_imm = 1'b1;
        ctl.alu_op = ALU_ADD;
      end
      OP_ANDI, OP_ORI: begin
        ctl.reg_we = 1'b1; ctl.dst = DST_RT; ctl.alu_imm = 1'b1;
        ctl.ext_sign = 1'b0;
        ctl.alu_op = (op == OP_ANDI) ? ALU_AND : ALU_OR;
      end
      OP_LUI: begin
        ctl.reg_we = 1'b1; ctl.dst = DST_RT; ctl.alu_imm = 1'b1;
        ctl.ext_sign = 1'b0; ctl.sa_16 = 1'b1; ctl.alu_op = ALU_SLL;
      end
      OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW: begin
        ctl.reg_we = 1'b1; ctl.dst = DST_RT; ctl.alu_imm = 1'b1;
        ctl.mem_en = 1'b1; ctl.mc = MC_READ_WORD; ctl.wb = WB_MEM;
        ctl.lsize = (op == OP_LW) ? LS_WORD :
                    (op == OP_LH || op == OP_LHU) ? LS_HALF : LS_BYTE;
        ctl.lsign = (op == OP_LB || op == OP_LH);
      end
      OP_SB, OP_SH, OP_SW: begin
        ctl.alu_imm = 1'b1; ctl.mem_en = 1'b1;
        ctl.mc = (op == OP_SB) ? MC_WRITE_BYTE :
                 (op == OP_SH) ? MC_WRITE_HALF : MC_WRITE_WORD;
      end
      OP_BEQ:  begin ctl.br = BR_EQ;  ctl.pcsel = PC_BRANCH; end
      OP_BNE:  begin ctl.br = BR_NE;  ctl.pcsel = PC_BRANCH; end
      OP_BLEZ: begin ctl.br = BR_LEZ; ctl.pcsel = PC_BRANCH; end
      OP_BGTZ: begin ctl.br = BR_GTZ; ctl.pcsel = PC_BRANCH; end
      OP_REGIMM: begin
        if (sub == SUB_BLTZ) begin
          ctl.br = BR_LTZ; ctl.pcsel = PC_BRANCH;
        end else if (sub == SUB_BGEZ) begin
          ctl.br = BR_GEZ; ctl.pcsel = PC_BRANCH;
        end
      end
      OP_J: ctl.pcsel = PC_JUMP;
      OP_JAL: begin
        ctl.pcsel = PC_JUMP; ctl.reg_we = 1'b1; ctl.dst = DST_RA; ctl.wb = WB_LINK;
      end
      default: ;
    endcase
  end

endmodule
