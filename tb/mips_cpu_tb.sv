// mips_cpu_tb: end-to-end test of the single-cycle processor at its default
// size.
//
// The program is built here with the encoders of mips_asm_pkg and written
// into the processor's memory. It has two parts:
//  1. Directed code from the MIPS examples: LUI/ORI building 0xdeadbeef, the
//     "for (i = 0; i < 10; i++)" loop with SLT/BEQ/J, the big-endian
//     SB/LB/SW/LB sequence, XOR and SLL, a JAL/JR call and a counted
//     backward BGTZ loop. Results are checked against hand-computed values.
//  2. A few thousand random ALU, immediate, load, store and forward-branch
//     instructions.
// A reference instruction-set model in this file executes the same program.
// After every rising clock edge the processor's PC and all 32 registers
// must equal the model's, which also checks that each instruction takes
// exactly one clock. At the end the data region is compared byte by byte.
// Each instruction kind, each branch taken and not taken, a backward
// branch, a link, a write to r0 and negative sub-word loads are counted,
// and one that never happened counts as a failure.
module mips_cpu_tb;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  localparam logic [31:0] DATA_BASE = 32'h0001_0000;
  localparam int          DATA_BYTES = 4096;
  localparam logic [31:0] RAND_BASE = 32'h0000_0200;
  localparam int          NRAND = 3000;

  logic clk = 1'b0, rst;
  logic [31:0] pc, instr;
  int checks = 0, failures = 0;
  int cycles = 0;

  mips_cpu dut (.clk, .rst, .pc, .instr);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- model
  logic [31:0] m_reg [32];
  logic [31:0] m_pc;
  logic [7:0]  m_mem [logic [31:0]];
  int          seen  [string];

  function automatic logic [31:0] m_word(logic [31:0] a);
    logic [31:0] w;
    for (int k = 0; k < 4; k++) w[31 - 8*k -: 8] = m_mem.exists(a + k) ? m_mem[a + k] : 8'h00;
    return w;
  endfunction

  task automatic put_word(logic [31:0] a, logic [31:0] w);
    for (int k = 0; k < 4; k++) m_mem[a + k] = w[31 - 8*k -: 8];
    dut.u_mem.mem[a[31:2]] = w;
  endtask

  function automatic void note(string what);
    if (seen.exists(what)) seen[what]++;
    else seen[what] = 1;
  endfunction

  function automatic string br_name(logic [5:0] op, logic [4:0] rt);
    case (op)
      6'h01: return (rt == 0) ? "BLTZ" : "BGEZ";
      6'h04: return "BEQ";
      6'h05: return "BNE";
      6'h06: return "BLEZ";
      default: return "BGTZ";
    endcase
  endfunction

  function automatic void m_step();
    logic [31:0] w, a, b, imm_s, imm_z, res, ea, nxt;
    logic [5:0] op, fn;
    logic [4:0] rs, rt, rd, sh;
    int dst;
    bit wr, tk, isbr;
    w = m_word(m_pc);
    op = w[31:26]; rs = w[25:21]; rt = w[20:16]; rd = w[15:11]; sh = w[10:6]; fn = w[5:0];
    a = m_reg[rs]; b = m_reg[rt];
    imm_s = 32'(signed'(w[15:0])); imm_z = {16'h0, w[15:0]};
    ea = a + imm_s;
    nxt = m_pc + 4; wr = 0; dst = 0; res = 0; isbr = 0; tk = 0;
    case (op)
      6'h00: begin
        dst = rd; wr = 1;
        case (fn)
          6'h21: begin res = a + b; note("ADDU"); end
          6'h23: begin res = a - b; note("SUBU"); end
          6'h25: begin res = a | b; note("OR"); end
          6'h26: begin res = a ^ b; note("XOR"); end
          6'h27: begin res = ~(a | b); note("NOR"); end
          6'h2a: begin res = (signed'(a) < signed'(b)) ? 1 : 0; note("SLT"); end
          6'h00: begin res = b << sh; note("SLL"); end
          6'h02: begin res = b >> sh; note("SRL"); end
          6'h03: begin res = 32'(signed'(b) >>> sh); note("SRA"); end
          6'h08: begin wr = 0; nxt = a; note("JR"); end
          default: wr = 0;
        endcase
      end
      6'h08: begin dst = rt; wr = 1; res = a + imm_s; note("ADDI"); end
      6'h09: begin dst = rt; wr = 1; res = a + imm_s; note("ADDIU"); end
      6'h0c: begin dst = rt; wr = 1; res = a & imm_z; note("ANDI"); end
      6'h0d: begin dst = rt; wr = 1; res = a | imm_z; note("ORI"); end
      6'h0f: begin dst = rt; wr = 1; res = {w[15:0], 16'h0}; note("LUI"); end
      6'h20: begin dst = rt; wr = 1; res = 32'(signed'(m_mem[ea])); note("LB");
                   if (res[31]) note("negative LB"); end
      6'h24: begin dst = rt; wr = 1; res = 32'(m_mem[ea]); note("LBU"); end
      6'h21: begin dst = rt; wr = 1; res = 32'(signed'({m_mem[ea], m_mem[ea + 1]})); note("LH");
                   if (res[31]) note("negative LH"); end
      6'h25: begin dst = rt; wr = 1; res = 32'({m_mem[ea], m_mem[ea + 1]}); note("LHU"); end
      6'h23: begin dst = rt; wr = 1; res = m_word(ea); note("LW"); end
      6'h28: begin m_mem[ea] = b[7:0]; note("SB"); end
      6'h29: begin m_mem[ea] = b[15:8]; m_mem[ea + 1] = b[7:0]; note("SH"); end
      6'h2b: begin for (int k = 0; k < 4; k++) m_mem[ea + k] = b[31 - 8*k -: 8]; note("SW"); end
      6'h04: begin isbr = 1; tk = (a == b); note("BEQ"); end
      6'h05: begin isbr = 1; tk = (a != b); note("BNE"); end
      6'h06: begin isbr = 1; tk = (signed'(a) <= 0); note("BLEZ"); end
      6'h07: begin isbr = 1; tk = (signed'(a) > 0); note("BGTZ"); end
      6'h01: begin
        isbr = 1;
        if (rt == 0) begin tk = signed'(a) < 0; note("BLTZ"); end
        else begin tk = signed'(a) >= 0; note("BGEZ"); end
      end
      6'h02: begin nxt = {nxt[31:28], w[25:0], 2'b00}; note("J"); end
      6'h03: begin dst = 31; wr = 1; res = m_pc + 8; nxt = {nxt[31:28], w[25:0], 2'b00}; note("JAL"); end
      default: ;
    endcase
    if (isbr) begin
      if (tk) begin
        nxt = m_pc + 4 + (imm_s << 2);
        note({br_name(op, rt), " taken"});
        if (imm_s[31]) note("backward branch");
      end else
        note({br_name(op, rt), " not taken"});
    end
    if (wr && dst == 0) note("write to r0 ignored");
    if (wr && dst != 0) m_reg[dst] = res;
    m_pc = nxt;
  endfunction

  // ---------------------------------------------------------------- program
  logic [31:0] halt_pc;

  task automatic build_program();
    logic [31:0] p;
    // 1. directed examples
    p = 0;
    put_word(p, lui(5, 16'hdead));           p += 4;  // 0x00
    put_word(p, ori(5, 5, 16'hbeef));        p += 4;  // 0x04 r5 = 0xdeadbeef
    put_word(p, addi(2, 0, 10));             p += 4;  // 0x08 main: addi r2, r0, 10
    put_word(p, addi(1, 0, 0));              p += 4;  // 0x0c       addi r1, r0, 0
    put_word(p, slt(3, 1, 2));               p += 4;  // 0x10 loop: slt r3, r1, r2
    put_word(p, beq(3, 0, 2));               p += 4;  // 0x14       beq r3, r0, done
    put_word(p, addiu(1, 1, 1));             p += 4;  // 0x18       i++
    put_word(p, j_(32'h10));                 p += 4;  // 0x1c       j loop
    put_word(p, lui(9, 16'h0001));           p += 4;  // 0x20 done: r9 = data base
    put_word(p, addiu(10, 0, 5));            p += 4;  // 0x24 r10 contains 5
    put_word(p, sb(10, 2, 9));               p += 4;  // 0x28 SB r10, 2(r9)
    put_word(p, lb(6, 2, 9));                p += 4;  // 0x2c LB r6, 2(r9)   -> 5
    put_word(p, sw(10, 8, 9));               p += 4;  // 0x30 SW r10, 8(r9)
    put_word(p, lb(7, 8, 9));                p += 4;  // 0x34 LB r7, 8(r9)   -> 0
    put_word(p, lb(8, 11, 9));               p += 4;  // 0x38 LB r8, 11(r9)  -> 5
    put_word(p, xor_(4, 8, 5));              p += 4;  // 0x3c r4 = r8 ^ r5
    put_word(p, sll(11, 4, 6));              p += 4;  // 0x40 r11 = r4 << 6
    put_word(p, jal(32'h100));               p += 4;  // 0x44 call
    put_word(p, addiu(12, 0, 1));            p += 4;  // 0x48 passed over (link is PC+8)
    put_word(p, addiu(13, 0, 2));            p += 4;  // 0x4c return point
    put_word(p, addiu(15, 0, 3));            p += 4;  // 0x50 counter
    put_word(p, addiu(15, 15, -1));          p += 4;  // 0x54 L: counter--
    put_word(p, bgtz(15, -2));               p += 4;  // 0x58 bgtz r15, L
    put_word(p, addiu(16, 0, -1));           p += 4;  // 0x5c r16 = -1
    put_word(p, bltz(16, 1));                p += 4;  // 0x60 taken
    put_word(p, addiu(17, 0, 1));            p += 4;  // 0x64 skipped
    put_word(p, bgez(16, 1));                p += 4;  // 0x68 not taken
    put_word(p, blez(0, 1));                 p += 4;  // 0x6c taken
    put_word(p, addiu(0, 0, 7));             p += 4;  // 0x70 skipped
    put_word(p, addiu(0, 0, 7));             p += 4;  // 0x74 write to r0
    put_word(p, j_(RAND_BASE));              p += 4;  // 0x78
    // subroutine
    put_word(32'h100, addiu(14, 31, 0));              // r14 = return address
    put_word(32'h104, jr(31));
    // 2. random block
    p = RAND_BASE;
    for (int n = 0; n < NRAND; n++) begin
      put_word(p, rand_insn(NRAND - 1 - n));
      p += 4;
    end
    halt_pc = p;
    put_word(p, j_(p));                               // halt: j halt
  endtask

  function automatic int rreg_dst();
    int r;
    do r = $urandom_range(0, 31); while (r == 9);
    return r;
  endfunction

  function automatic logic [31:0] rand_insn(int left);
    int d = rreg_dst(), s = $urandom_range(0, 31), t = $urandom_range(0, 31);
    int im = $urandom_range(0, 65535);
    int off = $urandom_range(0, DATA_BYTES - 4);
    int boff = (left >= 3) ? $urandom_range(0, 2) : 0;
    case ($urandom_range(0, 25))
      0: return addu(d, s, t);
      1: return subu(d, s, t);
      2: return or_(d, s, t);
      3: return xor_(d, s, t);
      4: return nor_(d, s, t);
      5: return slt(d, s, t);
      6: return sll(d, t, $urandom_range(0, 31));
      7: return srl(d, t, $urandom_range(0, 31));
      8: return sra(d, t, $urandom_range(0, 31));
      9: return addi(d, s, im);
      10: return addiu(d, s, im);
      11: return andi(d, s, im);
      12: return ori(d, s, im);
      13: return lui(d, im);
      14: return lb(d, off, 9);
      15: return lbu(d, off, 9);
      16: return lh(d, off & ~1, 9);
      17: return lhu(d, off & ~1, 9);
      18: return lw(d, off & ~3, 9);
      19: return sb(t, off, 9);
      20: return sh(t, off & ~1, 9);
      21: return sw(t, off & ~3, 9);
      22: return beq(s, ($urandom_range(0, 1) != 0) ? s : t, boff);
      23: return bne(s, t, boff);
      24: case ($urandom_range(0, 3))
            0: return bltz(s, boff);
            1: return bgez(s, boff);
            2: return blez(s, boff);
            default: return bgtz(s, boff);
          endcase
      default: return addiu(d, s, im);
    endcase
  endfunction

  // ---------------------------------------------------------------- run
  task automatic compare(string where);
    checks++;
    if (pc !== m_pc) begin
      failures++;
      $display("FAIL %s: pc %h, model %h", where, pc, m_pc);
    end
    for (int i = 1; i < 32; i++) begin
      checks++;
      if (dut.u_rf.regs[i] !== m_reg[i]) begin
        failures++;
        $display("FAIL %s: r%0d = %h, model %h", where, i, dut.u_rf.regs[i], m_reg[i]);
      end
    end
  endtask

  task automatic hand(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, want);
    end
  endtask

  initial begin
    string need [$] = '{"ADDU","SUBU","OR","XOR","NOR","SLT","SLL","SRL","SRA","JR",
      "ADDI","ADDIU","ANDI","ORI","LUI","LB","LBU","LH","LHU","LW","SB","SH","SW",
      "BEQ taken","BEQ not taken","BNE taken","BNE not taken","BLTZ taken","BLTZ not taken",
      "BGEZ taken","BGEZ not taken","BLEZ taken","BLEZ not taken","BGTZ taken","BGTZ not taken",
      "J","JAL","backward branch","write to r0 ignored","negative LB","negative LH"};
    rst = 1'b1;
    foreach (m_reg[i]) m_reg[i] = '0;
    m_pc = '0;
    // known contents for the data region
    for (int i = 0; i < DATA_BYTES; i += 4) put_word(DATA_BASE + i, $urandom);
    build_program();
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    compare("after reset");
    while (m_pc != halt_pc) begin
      @(posedge clk); #1;
      cycles++;
      m_step();
      compare($sformatf("cycle %0d", cycles));
      if (failures > 20) break;
    end
    // hand-computed results of the directed examples
    for (int i = 0; i < DATA_BYTES; i++) begin
      logic [31:0] wd;
      wd = dut.u_mem.mem[(DATA_BASE + i) >> 2];
      checks++;
      if (wd[31 - 8*(i % 4) -: 8] !== m_mem[DATA_BASE + i]) begin
        failures++;
        if (failures < 30) $display("FAIL memory byte %h", DATA_BASE + i);
      end
    end
    foreach (need[k]) begin
      checks++;
      if (!seen.exists(need[k])) begin
        failures++;
        $display("FAIL never exercised: %s", need[k]);
      end
    end
    foreach (seen[k]) $display("  %-22s %0d", k, seen[k]);
    $display("cycles=%0d (one instruction per cycle)", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checks on the directed part, taken when the random block starts
  initial begin
    wait (rst == 1'b0);
    wait (pc == RAND_BASE);
    #1;
    hand("r5 = 0xdead<<16 | 0xbeef", dut.u_rf.regs[5], 32'hdeadbeef);
    hand("loop r1 = 10", dut.u_rf.regs[1], 32'd10);
    hand("LB r6, 2 -> 0x05", dut.u_rf.regs[6], 32'h05);
    hand("LB r7, 8 -> 0x00", dut.u_rf.regs[7], 32'h00);
    hand("LB r8, 11 -> 0x05", dut.u_rf.regs[8], 32'h05);
    hand("XOR r4", dut.u_rf.regs[4], 32'hdeadbeea);
    hand("SLL r11", dut.u_rf.regs[11], 32'hab6fba80);
    hand("instruction after JAL not run", dut.u_rf.regs[12], 32'h0);
    hand("returned to JAL+8", dut.u_rf.regs[13], 32'h2);
    hand("link r31 = PC+8", dut.u_rf.regs[31], 32'h4c);
    hand("countdown r15", dut.u_rf.regs[15], 32'h0);
    hand("BLTZ skipped r17", dut.u_rf.regs[17], 32'h0);
  end

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
