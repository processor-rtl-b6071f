// pc_unit: program counter and next-PC selection of the fetch stage.
//
// Holds the PC, which addresses the program memory, and on every rising
// clock edge loads the next PC chosen by sel:
//   PC_SEQ    PC + 4
//   PC_BRANCH PC + 4 + (sign_extend(offset) << 2)   (taken branch)
//   PC_JUMP   (PC + 4)[31:28] . target . 00          (J, JAL)
//   PC_REG    rs_val                                 (JR)
// It also gives PC+4 and PC+8 (a second +4 adder) for the JAL link value.
// The adders, the concatenation and the four-way mux follow the MIPS
// datapath drawings; the reset value RESET_PC and synchronous reset are
// this design's choice.
module pc_unit
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  pcsel_e      sel,
  input  logic [15:0] offset,
  input  logic [25:0] target,
  input  logic [31:0] rs_val,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4,
  output logic [31:0] pc_plus8
);

  logic [31:0] next_pc, br_target, jmp_target;

  assign pc_plus4   = pc + 32'd4;
  assign pc_plus8   = pc_plus4 + 32'd4;
  assign br_target  = pc_plus4 + {{14{offset[15]}}, offset, 2'b00};
  assign jmp_target = {pc_plus4[31:28], target, 2'b00};

  always_comb begin
    unique case (sel)
      PC_SEQ:    next_pc = pc_plus4;
      PC_BRANCH: next_pc = br_target;
      PC_JUMP:   next_pc = jmp_target;
      PC_REG:    next_pc = rs_val;
      default:   next_pc = pc_plus4;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= next_pc;
  end

endmodule
