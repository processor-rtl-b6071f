// load_ext_tb: checks byte and halfword selection and extension on random
// words. The reference places byte k of the word at memory offset k in
// big-endian order by building the byte list explicitly.
module load_ext_tb;
  import mips_pkg::*;
  logic [31:0] word, y;
  logic [1:0] addr_lo;
  lsize_e size;
  logic sign;
  int checks = 0, failures = 0;

  load_ext dut (.word, .addr_lo, .size, .sign, .y);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] bytes [4];
      logic [31:0] expv;
      word = (n < 12) ? 32'h80ff_7f01 : $urandom;
      addr_lo = 2'(n);
      size = lsize_e'(n % 3);
      sign = 1'((n / 3) % 2);
      for (int k = 0; k < 4; k++) bytes[k] = word[31 - 8*k -: 8];
      case (size)
        LS_BYTE: expv = sign ? 32'($signed(bytes[addr_lo])) : 32'(bytes[addr_lo]);
        LS_HALF: begin
          logic [15:0] h;
          h = {bytes[{addr_lo[1], 1'b0}], bytes[{addr_lo[1], 1'b1}]};
          expv = sign ? 32'($signed(h)) : 32'(h);
        end
        default: expv = word;
      endcase
      #1;
      checks++;
      if (y !== expv) begin
        failures++;
        $display("FAIL word=%h lo=%0d size=%s sign=%0d y=%h want %h", word, addr_lo, size.name(), sign, y, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
