// regfile: the MIPS register file, 32 registers of 32 bits.
//
// Two read ports (R_A -> A, R_B -> B) are combinational, so a value read in
// a cycle is available to the ALU in the same cycle. The single write port
// stores W into register R_W on the falling clock edge when WE=1, which lets
// a single-cycle datapath compute the result in the first half of the cycle
// and write it back in the middle. Register 0 is wired to zero: writes to it
// are dropped and it always reads 0. Port names, widths, the falling-edge
// write and r0 follow the MIPS register-file description; the synchronous
// reset (taken on the same falling edge, clearing every register) is this
// design's choice, so that simulation starts from known contents.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned IW = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [IW-1:0]    rw,
  input  logic [WIDTH-1:0] w,
  input  logic [IW-1:0]    ra,
  input  logic [IW-1:0]    rb,
  output logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] b
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(negedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= w;
    end
  end

  assign a = (ra == '0) ? '0 : regs[ra];
  assign b = (rb == '0) ? '0 : regs[rb];

endmodule
