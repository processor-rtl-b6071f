// mips_cpu: single-cycle MIPS processor with its memory.
//
// Every clock cycle executes one whole instruction through the five stages
// of the classic MIPS datapath:
//   Fetch     pc_unit addresses the instruction port of mips_memory.
//   Decode    control decodes the word; regfile reads R[rs] and R[rt];
//             imm_ext widens the 16-bit immediate.
//   Execute   alu works on R[rs] and either R[rt] or the immediate, with a
//             shift amount of shamt or 16 (LUI); branch_cmp evaluates the
//             branch condition.
//   Memory    loads and stores use the data port of mips_memory at the ALU
//             address; load_ext picks and extends bytes and halfwords.
//   Writeback the ALU result, the load value or PC+8 (JAL) is written to
//             rd, rt or r31 on the falling clock edge; the PC takes PC+4,
//             the branch target, the jump target or R[rs] on the rising
//             edge, as do memory writes.
// Instructions and data share one byte-addressed, big-endian address space
// and are accessed in parallel through two ports of one memory. Ports: clk,
// synchronous active-high rst (PC <- 0, registers cleared), and the current
// pc and instr for observation.
// The block structure, mux inputs and the PC+8 link follow the MIPS
// datapath drawings. No branch-delay slot is executed: a taken branch or
// jump redirects the very next instruction, while JAL still links PC+8 as
// the MIPS definition specifies. The edge assignment and the reset are
// this design's choices.
module mips_cpu
  import mips_pkg::*;
#(
  parameter int unsigned MEM_ADDR_BITS = 30
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] pc,
  output logic [31:0] instr
);

  ctrl_t       ctl;
  logic [31:0] pc_plus8;
  logic [31:0] rs_val, rt_val, imm32, alu_b, alu_y;
  logic [31:0] mem_word, load_val, wb_val;
  logic [4:0]  rs, rt, rd, shamt, sa, dst;
  logic        taken;
  pcsel_e      pcsel;

  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];
  assign shamt = instr[10:6];

  // Fetch
  assign pcsel = (ctl.pcsel == PC_BRANCH && !taken) ? PC_SEQ : ctl.pcsel;

  pc_unit u_pc (
    .clk, .rst, .sel(pcsel), .offset(instr[15:0]), .target(instr[25:0]),
    .rs_val, .pc, .pc_plus4(), .pc_plus8
  );

  // Decode
  control u_ctl (.instr, .ctl);

  always_comb begin
    unique case (ctl.dst)
      DST_RT:  dst = rt;
      DST_RA:  dst = REG_RA;
      default: dst = rd;
    endcase
  end

  regfile u_rf (
    .clk, .rst, .we(ctl.reg_we), .rw(dst), .w(wb_val),
    .ra(rs), .rb(rt), .a(rs_val), .b(rt_val)
  );

  imm_ext u_ext (.imm(instr[15:0]), .sign(ctl.ext_sign), .y(imm32));

  // Execute
  assign alu_b = ctl.alu_imm ? imm32 : rt_val;
  assign sa    = ctl.sa_16 ? 5'd16 : shamt;

  alu u_alu (.op(ctl.alu_op), .a(rs_val), .b(alu_b), .sa, .y(alu_y));

  branch_cmp u_br (.kind(ctl.br), .a(rs_val), .b(rt_val), .taken);

  // Memory
  mips_memory #(.ADDR_BITS(MEM_ADDR_BITS)) u_mem (
    .clk, .iaddr(pc), .idata(instr),
    .addr(alu_y), .din(rt_val), .en(ctl.mem_en), .mc(ctl.mc), .dout(mem_word)
  );

  load_ext u_lext (
    .word(mem_word), .addr_lo(alu_y[1:0]), .size(ctl.lsize), .sign(ctl.lsign),
    .y(load_val)
  );

  // Writeback
  always_comb begin
    unique case (ctl.wb)
      WB_MEM:  wb_val = load_val;
      WB_LINK: wb_val = pc_plus8;
      default: wb_val = alu_y;
    endcase
  end

endmodule
