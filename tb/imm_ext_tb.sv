// imm_ext_tb: exhaustive test of the immediate extender over all 65536
// immediates in both modes, against integer arithmetic (a signed 16-bit
// value converted to 32 bits, or the unsigned value).
module imm_ext_tb;
  logic [15:0] imm;
  logic sign;
  logic [31:0] y;
  int checks = 0, failures = 0;

  imm_ext dut (.imm, .sign, .y);

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < 65536; i++) begin
        int expv;
        imm = 16'(i); sign = 1'(s); #1;
        expv = (s == 1 && i >= 32768) ? i - 65536 : i;
        checks++;
        if (y !== 32'(expv)) begin
          failures++;
          if (failures < 10) $display("FAIL imm=%h sign=%0d y=%h", imm, sign, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
