// alu: the 32-bit arithmetic logic unit of the execute stage.
//
// Computes y from operands a and b according to op: add and subtract
// (no overflow detection, as for the MIPS "unsigned" instructions), and,
// or, xor, nor, signed set-less-than, and shifts of operand b by sa bits
// (left logical, right logical with zero fill, right arithmetic with sign
// fill). Operand b is rt or the extended immediate, so the same shifter
// produces LUI (imm << 16) when sa is 16. Purely combinational.
// The operation set follows the instruction tables and the "comparison
// (slt)" of the execute stage; the op encoding is this design's own.
module alu
  import mips_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  sa,
  output logic [31:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOR: y = ~(a | b);
      ALU_SLT: y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLL: y = b << sa;
      ALU_SRL: y = b >> sa;
      ALU_SRA: y = $unsigned($signed(b) >>> sa);
      default: y = '0;
    endcase
  end

endmodule
