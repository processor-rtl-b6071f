// mips_memory_tb: checks the two-port memory. Replays the big-endian layout
// example (store byte 5 at address 2, word 5 at address 8, then read bytes
// 2, 8 and 11), then runs random byte/halfword/word writes and word reads on
// the data port against a byte-array reference, and reads the same words
// through the instruction port. A small ADDR_BITS keeps the array short.
module mips_memory_tb;
  import mips_pkg::*;
  localparam int AB = 12;
  logic clk = 1'b0, en;
  logic [31:0] iaddr, idata, addr, din, dout;
  mc_e mc;
  logic [7:0] model [2**AB];
  int checks = 0, failures = 0;

  mips_memory #(.ADDR_BITS(AB)) dut (.clk, .iaddr, .idata, .addr, .din, .en, .mc, .dout);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write(mc_e m, logic [31:0] a, logic [31:0] d);
    @(negedge clk); en = 1'b1; mc = m; addr = a; din = d;
    @(posedge clk); #1; en = 1'b0;
    case (m)
      MC_WRITE_BYTE: model[a[AB-1:0]] = d[7:0];
      MC_WRITE_HALF: begin
        model[{a[AB-1:1], 1'b0}] = d[15:8]; model[{a[AB-1:1], 1'b1}] = d[7:0];
      end
      MC_WRITE_WORD: for (int k = 0; k < 4; k++) model[{a[AB-1:2], 2'(k)}] = d[31 - 8*k -: 8];
      default: ;
    endcase
  endtask

  function automatic logic [31:0] model_word(logic [31:0] a);
    return {model[{a[AB-1:2], 2'd0}], model[{a[AB-1:2], 2'd1}], model[{a[AB-1:2], 2'd2}], model[{a[AB-1:2], 2'd3}]};
  endfunction

  task automatic read_check(logic [31:0] a);
    @(negedge clk); en = 1'b1; mc = MC_READ_WORD; addr = a; iaddr = a ^ 32'h40; #1;
    check(dout == model_word(a), $sformatf("data read %h = %h want %h", a, dout, model_word(a)));
    check(idata == model_word(iaddr), $sformatf("insn read %h", iaddr));
    en = 1'b0; #1;
    check(dout == 0, "dout idle");
  endtask

  initial begin
    en = 1'b0; mc = MC_READ_WORD; addr = '0; din = '0; iaddr = '0;
    // start from a known memory image
    for (int i = 0; i < 2**AB; i += 4) write(MC_WRITE_WORD, i, 32'(i) * 32'h01010101);
    // big-endian example: r5 = 5
    write(MC_WRITE_WORD, 0, 0);
    write(MC_WRITE_BYTE, 2, 32'd5);
    read_check(0);
    @(negedge clk); en = 1'b1; mc = MC_READ_WORD; addr = 0; #1;
    check(dout == 32'h0000_0500, $sformatf("SB r5,2 gives word 0 = %h", dout));
    write(MC_WRITE_WORD, 8, 32'd5);
    @(negedge clk); en = 1'b1; mc = MC_READ_WORD; addr = 8; #1;
    check(dout[31:24] == 8'h00 && dout[7:0] == 8'h05, "SW r5,8: byte 8 = 0, byte 11 = 5");
    write(MC_WRITE_HALF, 16, 32'hffff_1234);
    @(negedge clk); en = 1'b1; mc = MC_READ_WORD; addr = 16; #1;
    check(dout[31:16] == 16'h1234, "halfword at 16 in bits 31:16");
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] a;
      a = $urandom_range(0, 2**AB - 1);
      case ($urandom_range(0, 3))
        0: write(MC_WRITE_BYTE, a, $urandom);
        1: write(MC_WRITE_HALF, a & ~32'h1, $urandom);
        2: write(MC_WRITE_WORD, a & ~32'h3, $urandom);
        default: read_check(a & ~32'h3);
      endcase
    end
    for (int i = 0; i < 2**AB; i += 4) read_check(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
