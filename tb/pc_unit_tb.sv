// pc_unit_tb: drives the PC through reset, sequential steps, taken-branch
// offsets (forward and backward), jumps into the current 256 MB region and
// register jumps, checking after each rising edge that the PC moved to
// the address worked out here, and that PC+4 / PC+8 follow the PC. One
// PC update per clock is checked by counting edges.
module pc_unit_tb;
  import mips_pkg::*;
  logic clk = 1'b0, rst;
  pcsel_e sel;
  logic [15:0] offset;
  logic [25:0] target;
  logic [31:0] rs_val, pc, pc_plus4, pc_plus8, expv;
  int checks = 0, failures = 0;

  pc_unit dut (.clk, .rst, .sel, .offset, .target, .rs_val, .pc, .pc_plus4, .pc_plus8);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1'b1; sel = PC_SEQ; offset = '0; target = '0; rs_val = '0;
    @(posedge clk); #1;
    check(pc == 32'h0, "reset PC");
    rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      sel = pcsel_e'($urandom_range(0, 3));
      if (n < 4) sel = pcsel_e'(n);
      offset = 16'($urandom); target = 26'($urandom); rs_val = $urandom & ~32'h3;
      if (n == 1) offset = 16'd3;   // BEQ r5, r1, 3 example: PC+4+12
      #1;
      check(pc_plus4 == pc + 4 && pc_plus8 == pc + 8, "PC+4/PC+8");
      case (sel)
        PC_SEQ:    expv = pc + 4;
        PC_BRANCH: expv = pc + 4 + 32'(int'($signed(offset)) * 4);
        PC_JUMP:   expv = ((pc + 4) & 32'hf000_0000) | (32'(target) * 4);
        default:   expv = rs_val;
      endcase
      @(posedge clk); #1;
      check(pc == expv, $sformatf("n=%0d sel=%s pc=%h want %h", n, sel.name(), pc, expv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
