// regfile_tb: self-checking test of the register file.
// Keeps a reference copy of the 32 registers, performs random writes with
// WE on and off, and checks both read ports for every index. It also checks
// that r0 stays zero, that reset clears the file, and that a write becomes
// visible on the falling edge and not before.
module regfile_tb;
  logic clk = 1'b0, rst, we;
  logic [4:0] rw, ra, rb;
  logic [31:0] w, a, b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .we, .rw, .w, .ra, .rb, .a, .b);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_all();
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1;
      check(a == model[i], $sformatf("A r%0d = %h, want %h", i, a, model[i]));
      check(b == model[31-i], $sformatf("B r%0d = %h, want %h", 31 - i, b, model[31-i]));
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; rw = '0; w = '0; ra = '0; rb = '0;
    @(negedge clk); @(posedge clk); rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    check_all();
    for (int n = 0; n < 400; n++) begin
      @(posedge clk); #1;
      we = 1'($urandom_range(0, 3) != 0);
      rw = 5'($urandom);
      if (n < 40) rw = 5'(n % 32);
      w  = $urandom;
      ra = rw; #1;
      // before the falling edge the old value must still be read
      check(a == model[rw], "write visible before falling edge");
      @(negedge clk); #1;
      if (we && rw != 0) model[rw] = w;
      check(a == model[rw], $sformatf("read-after-write r%0d", rw));
      if (n % 50 == 0) check_all();
    end
    we = 1'b0;
    check_all();
    check(model[0] == 0, "r0 model");
    // reset clears everything
    rst = 1'b1; @(negedge clk); #1; rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
