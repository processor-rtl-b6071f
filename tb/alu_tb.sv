// alu_tb: self-checking test of the ALU. Drives corner and random operands
// for every operation and compares with a reference written here with
// different formulas (subtraction by two's complement, shifts bit by bit,
// signed compare via the sign bits).
module alu_tb;
  import mips_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  logic [4:0] sa;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .sa, .y);

  function automatic logic [31:0] ref_y(alu_op_e o, logic [31:0] x, logic [31:0] z, int s);
    logic [31:0] r;
    case (o)
      ALU_ADD: r = x + z;
      ALU_SUB: r = x + (~z) + 32'd1;
      ALU_AND: r = x & z;
      ALU_OR:  r = x | z;
      ALU_XOR: r = (x & ~z) | (~x & z);
      ALU_NOR: r = ~x & ~z;
      ALU_SLT: begin
        if (x[31] != z[31]) r = {31'd0, x[31]};
        else r = {31'd0, x[30:0] < z[30:0]};
      end
      ALU_SLL: begin r = '0; for (int i = 0; i < 32; i++) if (i >= s) r[i] = z[i - s]; end
      ALU_SRL: begin r = '0; for (int i = 0; i < 32; i++) if (i + s < 32) r[i] = z[i + s]; end
      ALU_SRA: begin for (int i = 0; i < 32; i++) r[i] = (i + s < 32) ? z[i + s] : z[31]; end
      default: r = '0;
    endcase
    return r;
  endfunction

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'hdead_beef};
    for (int o = 0; o <= int'(ALU_SRA); o++) begin
      for (int n = 0; n < 600; n++) begin
        op = alu_op_e'(o);
        if (n < 36) begin a = corner[n / 6]; b = corner[n % 6]; end
        else begin a = $urandom; b = $urandom; end
        sa = 5'($urandom);
        if (n < 32) sa = 5'(n);
        #1;
        checks++;
        if (y !== ref_y(op, a, b, int'(sa))) begin
          failures++;
          $display("FAIL op=%s a=%h b=%h sa=%0d y=%h want %h", op.name(), a, b, sa, y, ref_y(op, a, b, int'(sa)));
        end
      end
    end
    // the LUI case of the document: 5 << 16 = 0x50000
    op = ALU_SLL; a = '0; b = 32'd5; sa = 5'd16; #1;
    checks++; if (y != 32'h0005_0000) failures++;
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
