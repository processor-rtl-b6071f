// mips_pkg: shared encodings of the single-cycle MIPS processor.
//
// Holds the opcode, func and subop numbers of the supported instructions
// (as listed in the MIPS instruction tables), the ALU operation set, the
// branch and next-PC selections, the memory-control (mc) code of the memory
// port and the control bundle that the decoder hands to the datapath.
// The instruction numbers follow the MIPS encoding; the internal enums and
// the layout of ctrl_t are this design's own.
package mips_pkg;

  // Primary opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_REGIMM = 6'h01;  // BLTZ / BGEZ, subop in bits 20:16
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_BLEZ  = 6'h06;
  localparam logic [5:0] OP_BGTZ  = 6'h07;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_ANDI  = 6'h0c;
  localparam logic [5:0] OP_ORI   = 6'h0d;
  localparam logic [5:0] OP_LUI   = 6'h0f;
  localparam logic [5:0] OP_LB    = 6'h20;
  localparam logic [5:0] OP_LH    = 6'h21;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_LBU   = 6'h24;
  localparam logic [5:0] OP_LHU   = 6'h25;
  localparam logic [5:0] OP_SB    = 6'h28;
  localparam logic [5:0] OP_SH    = 6'h29;
  localparam logic [5:0] OP_SW    = 6'h2b;

  // R-type func codes (instruction bits 5:0)
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2a;

  // REGIMM subops (instruction bits 20:16)
  localparam logic [4:0] SUB_BLTZ = 5'h00;
  localparam logic [4:0] SUB_BGEZ = 5'h01;

  // Register that JAL links into
  localparam logic [4:0] REG_RA = 5'd31;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLL, ALU_SRL, ALU_SRA
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LTZ, BR_GEZ, BR_LEZ, BR_GTZ
  } br_e;

  typedef enum logic [1:0] {
    PC_SEQ,     // PC + 4
    PC_BRANCH,  // PC + 4 + (offset << 2) when the branch is taken
    PC_JUMP,    // (PC + 4)[31:28] . target . 00
    PC_REG      // R[rs]
  } pcsel_e;

  // Memory control of the data port
  typedef enum logic [1:0] {
    MC_READ_WORD = 2'b00,
    MC_WRITE_BYTE = 2'b01,
    MC_WRITE_HALF = 2'b10,
    MC_WRITE_WORD = 2'b11
  } mc_e;

  typedef enum logic [1:0] {LS_WORD, LS_HALF, LS_BYTE} lsize_e;

  typedef enum logic [1:0] {DST_RD, DST_RT, DST_RA} dst_e;

  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_LINK} wb_e;

  typedef struct packed {
    logic    reg_we;     // write the register file
    dst_e    dst;        // which field names the destination
    logic    alu_imm;    // ALU operand B is the extended immediate
    logic    ext_sign;   // immediate is sign extended (else zero extended)
    logic    sa_16;      // shift amount is 16 (LUI) instead of shamt
    alu_op_e alu_op;
    logic    mem_en;     // data memory enable
    mc_e     mc;         // data memory control
    lsize_e  lsize;      // load size
    logic    lsign;      // load sign-extends
    wb_e     wb;         // write-back source
    br_e     br;         // branch condition
    pcsel_e  pcsel;      // next-PC source (PC_BRANCH only when taken)
  } ctrl_t;

endpackage
