// branch_cmp: branch condition unit, the "=?" and "cmp" boxes of the datapath.
//
// For BEQ/BNE it compares R[rs] (a) with R[rt] (b) for equality; for
// BLTZ/BGEZ/BLEZ/BGTZ it tests the sign of R[rs] against zero. taken is 1
// when the condition named by kind holds, and 0 for BR_NONE. Combinational.
// The conditions follow the branch tables; merging both boxes into one
// module is this design's choice.
module branch_cmp
  import mips_pkg::*;
(
  input  br_e         kind,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        taken
);

  logic eq, neg, zero;

  assign eq   = (a == b);
  assign neg  = a[31];
  assign zero = (a == '0);

  always_comb begin
    unique case (kind)
      BR_EQ:   taken = eq;
      BR_NE:   taken = !eq;
      BR_LTZ:  taken = neg;
      BR_GEZ:  taken = !neg;
      BR_LEZ:  taken = neg | zero;
      BR_GTZ:  taken = !neg && !zero;
      default: taken = 1'b0;
    endcase
  end

endmodule
