// imm_ext: the immediate extender ("ext") of the decode stage.
//
// Widens the 16-bit immediate of an I-type instruction to 32 bits, by
// copying bit 15 into the upper half when sign=1 (ADDIU, loads, stores,
// branch offsets) or by filling it with zeros when sign=0 (ANDI, ORI, LUI).
// Combinational. The 16-in/32-out widths follow the datapath drawings;
// the name of the select input is this design's own.
module imm_ext (
  input  logic [15:0] imm,
  input  logic        sign,
  output logic [31:0] y
);

  assign y = {{16{sign & imm[15]}}, imm};

endmodule
