// mips_examples_tb: runs the single-instruction examples of the MIPS
// instruction set on the processor at its default size and checks the
// outcome each example states:
//   ADDIU r5, r5, 5     r5 grows by 5
//   SW r1, 4(r5)        Mem[4 + r5] = r1
//   J 0x1000001         PC = (PC+4)[31:28] . 0x4000004
//   JR r3               PC = R[r3]
//   BEQ r5, r1, 3       PC = PC + 4 + 12 when R[r5] == R[r1]
//   BGEZ r5, 2          PC = PC + 4 + 8 when R[r5] >= 0
//   JAL 0x1000001       r31 = PC + 8, PC = (PC+4)[31:28] . 0x4000004
// The PC is compared with the expected address after every clock, so the
// test also confirms one instruction per cycle.
module mips_examples_tb;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic clk = 1'b0, rst;
  logic [31:0] pc, instr;
  int checks = 0, failures = 0;

  mips_cpu dut (.clk, .rst, .pc, .instr);

  always #5 clk = ~clk;

  task automatic put(logic [31:0] a, logic [31:0] w);
    dut.u_mem.mem[a[29:2]] = w;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] trace [$] = '{32'h04, 32'h08, 32'h0c, 32'h10, 32'h0400_0004, 32'h0400_0008,
                               32'h40, 32'h44, 32'h54, 32'h60, 32'h0400_0004, 32'h0400_0008, 32'h80};
    rst = 1'b1;
    put(32'h00, addiu(5, 0, 16'h1ffb));
    put(32'h04, addiu(5, 5, 5));            // ADDIU r5, r5, 5
    put(32'h08, addiu(1, 0, 16'h1234));
    put(32'h0c, sw(1, 4, 5));               // SW r1, 4(r5)
    put(32'h10, j_(32'h0400_0004));         // J 0x1000001
    put(32'h0400_0004, addiu(3, 3, 16'h40));
    put(32'h0400_0008, jr(3));              // JR r3
    put(32'h40, addiu(1, 0, 16'h2000));
    put(32'h44, beq(5, 1, 3));              // BEQ r5, r1, 3
    put(32'h54, bgez(5, 2));                // BGEZ r5, 2
    put(32'h60, jal(32'h0400_0004));        // JAL 0x1000001
    put(32'h80, j_(32'h80));                // halt
    put(32'h2004, 32'h0);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(pc == 0, "reset PC");
    foreach (trace[i]) begin
      @(posedge clk); #1;
      check(pc == trace[i], $sformatf("step %0d: pc %h, expected %h", i, pc, trace[i]));
      if (i == 1) check(dut.u_rf.regs[5] == 32'h2000, "ADDIU r5, r5, 5");
      if (i == 3) check(dut.u_mem.mem[32'h2004 >> 2] == 32'h1234, "SW r1, 4(r5)");
    end
    check(dut.u_rf.regs[31] == 32'h68, "JAL: r31 = PC + 8");
    check(dut.u_rf.regs[3] == 32'h80, "JR target register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
