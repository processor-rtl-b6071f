// mips_memory: byte-addressed, big-endian memory shared by instructions
// and data (a "modified Harvard" arrangement: one address space, two ports
// used in parallel).
//
// Instruction port: idata is the aligned word at iaddr, read
// combinationally. Data port: with en=1 the 2-bit memory control mc selects
//   00 read word      dout = word at addr (4-byte aligned)
//   01 write byte     byte at addr        <= din[7:0]
//   10 write halfword halfword at addr    <= din[15:0] (2-byte aligned)
//   11 write word     word at addr        <= din (4-byte aligned)
// Reads are combinational; writes happen on the rising clock edge. dout is
// zero unless a read is enabled. Byte 0 of a word is its most significant
// byte. The array holds 2**ADDR_BITS bytes; higher address bits are ignored
// and the low bits below the access size are ignored by the hardware.
// Assertions flag halfword and word writes that break the stated alignment
// (word reads use only the word index, so sub-word loads may present any
// byte address). The default of 30 address bits (1 GiB) is the largest
// array the simulator accepts; synthesis tools need a much smaller
// ADDR_BITS, a real chip would use RAM macros here.
// The port set, mc code and big-endian order follow the MIPS memory
// description; edge, alignment handling and read-enable gating are this
// design's choices. Contents are not reset.
module mips_memory
  import mips_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 30,
  localparam int unsigned WORDS = 2 ** (ADDR_BITS - 2)
) (
  input  logic        clk,
  input  logic [31:0] iaddr,
  output logic [31:0] idata,
  input  logic [31:0] addr,
  input  logic [31:0] din,
  input  logic        en,
  input  mc_e         mc,
  output logic [31:0] dout
);

  logic [31:0] mem [WORDS];

  logic [ADDR_BITS-3:0] iidx, didx;
  assign iidx = iaddr[ADDR_BITS-1:2];
  assign didx = addr[ADDR_BITS-1:2];

  assign idata = mem[iidx];
  assign dout  = (en && mc == MC_READ_WORD) ? mem[didx] : '0;

  always_ff @(posedge clk) begin
    if (en) begin
      unique case (mc)
        MC_WRITE_BYTE: begin
          unique case (addr[1:0])
            2'd0: mem[didx][31:24] <= din[7:0];
            2'd1: mem[didx][23:16] <= din[7:0];
            2'd2: mem[didx][15:8]  <= din[7:0];
            default: mem[didx][7:0] <= din[7:0];
          endcase
        end
        MC_WRITE_HALF: begin
          if (addr[1]) mem[didx][15:0]  <= din[15:0];
          else         mem[didx][31:16] <= din[15:0];
        end
        MC_WRITE_WORD: mem[didx] <= din;
        default: ;
      endcase
    end
  end

  // Alignment rules of the mc code: halfword writes 2-byte, word writes
  // 4-byte aligned.
  a_half_aligned: assert property (@(posedge clk) en && mc == MC_WRITE_HALF |-> addr[0] == 1'b0)
    else $error("halfword write to odd address %h", addr);
  a_word_aligned: assert property (@(posedge clk) en && mc == MC_WRITE_WORD |-> addr[1:0] == 2'b00)
    else $error("word write to unaligned address %h", addr);

endmodule
