// branch_cmp_tb: checks every branch condition on corner and random values
// against signed integer comparisons.
module branch_cmp_tb;
  import mips_pkg::*;
  br_e kind;
  logic [31:0] a, b;
  logic taken;
  int checks = 0, failures = 0;

  branch_cmp dut (.kind, .a, .b, .taken);

  function automatic bit ref_t(br_e k, int x, int z);
    case (k)
      BR_EQ:  return x == z;
      BR_NE:  return x != z;
      BR_LTZ: return x < 0;
      BR_GEZ: return x >= 0;
      BR_LEZ: return x <= 0;
      BR_GTZ: return x > 0;
      default: return 0;
    endcase
  endfunction

  initial begin
    int vals [5] = '{0, 1, -1, 32'h7fffffff, 32'h80000000};
    for (int k = 0; k <= int'(BR_GTZ); k++) begin
      for (int n = 0; n < 300; n++) begin
        kind = br_e'(k);
        if (n < 25) begin a = vals[n / 5]; b = vals[n % 5]; end
        else begin a = $urandom; b = (n % 3 == 0) ? a : $urandom; end
        #1;
        checks++;
        if (taken !== ref_t(kind, a, b)) begin
          failures++;
          $display("FAIL %s a=%h b=%h taken=%b", kind.name(), a, b, taken);
        end
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
