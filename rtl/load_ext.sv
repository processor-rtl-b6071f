// load_ext: byte and halfword selection for loads.
//
// The memory port only reads whole aligned words, so LB/LBU/LH/LHU pick
// their part of the word here. Memory is big endian: the byte at address
// offset 0 is bits 31:24 of the word and the halfword at offset 0 is bits
// 31:16. The selected part is sign-extended when sign=1 (LB, LH) and
// zero-extended otherwise (LBU, LHU); LW passes the word through.
// Combinational. The byte order follows the big-endian layout example;
// doing the selection after the memory is this design's choice.
module load_ext
  import mips_pkg::*;
(
  input  logic [31:0] word,
  input  logic [1:0]  addr_lo,
  input  lsize_e      size,
  input  logic        sign,
  output logic [31:0] y
);

  logic [7:0]  byte_v;
  logic [15:0] half_v;

  always_comb begin
    unique case (addr_lo)
      2'd0: byte_v = word[31:24];
      2'd1: byte_v = word[23:16];
      2'd2: byte_v = word[15:8];
      default: byte_v = word[7:0];
    endcase
    half_v = addr_lo[1] ? word[15:0] : word[31:16];
    unique case (size)
      LS_BYTE: y = {{24{sign & byte_v[7]}}, byte_v};
      LS_HALF: y = {{16{sign & half_v[15]}}, half_v};
      default: y = word;
    endcase
  end

endmodule
