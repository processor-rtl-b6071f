# A single-cycle MIPS processor

This is a small 32-bit MIPS processor that completes one instruction in
every clock cycle. There is no pipeline. In one cycle an instruction is
fetched, decoded, executed, given its memory access and written back, all
through combinational logic between two clock edges. The only state is the
program counter, the 32 general registers and the memory. The design is
meant for teaching and for study: every part of the classic MIPS datapath
(PC and +4 adder, register file, immediate extender, ALU, memory, branch
comparators, next-PC multiplexer, link adder) is its own small module,
with names that match the usual textbook drawing.

Instructions and data share one byte-addressed, big-endian address space.
A two-port memory lets the processor fetch an instruction and load or
store data in the same cycle. This is a "modified Harvard" arrangement:
separate paths, but a common address space.

## Instruction set

| Class | Instructions | Encoding |
|---|---|---|
| R-type arithmetic/logic | ADDU, SUBU, OR, XOR, NOR, SLT | op 0x00, func 0x21, 0x23, 0x25, 0x26, 0x27, 0x2a |
| R-type shifts | SLL, SRL, SRA (by shamt) | op 0x00, func 0x00, 0x02, 0x03 |
| R-type jump | JR rs | op 0x00, func 0x08 |
| Immediate arithmetic | ADDI, ADDIU (sign-extended), ANDI, ORI (zero-extended), LUI | op 0x08, 0x09, 0x0c, 0x0d, 0x0f |
| Loads | LB, LBU, LH, LHU, LW | op 0x20, 0x24, 0x21, 0x25, 0x23 |
| Stores | SB, SH, SW | op 0x28, 0x29, 0x2b |
| Branches | BEQ, BNE, BLEZ, BGTZ; BLTZ / BGEZ | op 0x04, 0x05, 0x06, 0x07; op 0x01 with subop 0 / 1 in bits 20:16 |
| Jumps | J, JAL | op 0x02, 0x03 |

Field layout: R-type `op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6]
func[5:0]`, I-type `op rs rt imm[15:0]`, J-type `op target[25:0]`.

- I-type instructions write the register in bits 20:16. Stores take their data from that register.
- Loads and stores address `R[rs] + sign_extend(offset)`.
- A taken branch goes to `PC + 4 + (sign_extend(offset) << 2)`.
- J and JAL go to `(PC + 4)[31:28] . target . 00`. JR goes to `R[rs]`.
- JAL writes `PC + 8` into r31.
- Adds and subtracts never trap on overflow. ADDI therefore behaves exactly
  like ADDIU.
- Any encoding not in the table runs as a no-op: no register write, no
  memory access, PC + 4.
- Multiply, divide, coprocessor and system instructions are not
  implemented.

## What happens inside one clock cycle

The hardest part to follow is the timing, because all five stages share
one cycle.

1. **Rising edge.** The PC takes its new value. The instruction port of
   the memory presents the word at the PC straight away, because reads are
   combinational.
2. **First half of the cycle.**
   - `control` decodes the word.
   - The register file reads `R[rs]` and `R[rt]`.
   - `imm_ext` widens the immediate.
   - The ALU computes its result. Operand B is either `R[rt]` or the
     immediate. The shift amount is either `shamt` or 16; 16 is used for
     LUI, which is `imm << 16` through the ordinary shifter.
   - For a load, the data port returns the addressed word, and `load_ext`
     picks out the byte or halfword and extends it.
   - `branch_cmp` decides whether a branch is taken. The next-PC
     multiplexer then selects PC+4, the branch target, the jump target or
     `R[rs]`.
3. **Falling edge.** The register file stores the write-back value: the
   ALU result, the load value or PC+8. The destination is rd, rt or r31.
4. **Second half of the cycle.** The register read ports may now show the
   new value, for example in `addu r1, r1, r2`. Only two things still
   depend on them before the next rising edge:
   - the store data of a store;
   - the operands of a branch or JR.

   None of those instructions writes a register, and JAL's target comes
   from the instruction word, not from a register. So nothing latched at
   the next edge can see a half-updated value.
5. **Next rising edge.** The PC loads the next address, and a store
   writes the memory.

So the clock period must cover:
- the path from the PC through instruction read, decode, register read,
  ALU and data read to the register file's setup time before the falling
  edge;
- the path from the PC through the next-PC logic to the PC's setup time
  before the rising edge.

## Datapath blocks

| Module | Role |
|---|---|
| `mips_cpu` | Top level: wires the blocks below into the datapath, adds the operand, shift-amount, destination and write-back multiplexers. Ports: `clk`, `rst`, and `pc` / `instr` for observation. |
| `pc_unit` | PC register, PC+4 and PC+8 adders, branch-target adder, jump-target concatenation, four-way next-PC mux. |
| `control` | Combinational decoder from op/func/subop to a `ctrl_t` bundle. |
| `regfile` | 32 x 32-bit registers, two combinational read ports, one write port written on the falling edge when `we`=1; r0 reads 0 and ignores writes. |
| `imm_ext` | 16 to 32-bit sign or zero extension. |
| `alu` | ADD, SUB, AND, OR, XOR, NOR, SLT (signed), SLL, SRL, SRA. Shifts act on operand B. |
| `branch_cmp` | Equality test for BEQ/BNE and sign tests against zero for BLTZ, BGEZ, BLEZ, BGTZ. |
| `mips_memory` | Byte-addressed big-endian memory with an instruction read port and a data port. |
| `load_ext` | Byte and halfword selection and extension for loads. |
| `mips_pkg` | Opcode and func numbers, the enums and the `ctrl_t` control bundle. |

## The memory and its `mc` code

The data port has an enable `en` and a 2-bit memory control `mc`:

| mc | Operation |
|---|---|
| 00 | read word (4-byte aligned) |
| 01 | write byte: the byte at `addr` gets `din[7:0]` |
| 10 | write halfword (2-byte aligned): `din[15:0]` |
| 11 | write word (4-byte aligned) |

- Only whole words are read, so LB/LH and their unsigned forms read the
  word and `load_ext` extracts the part.
- Byte 0 of a word is its most significant byte (big endian). For example,
  after `SW r5, 8(r0)` with r5 = 5, `LB` from address 8 gives 0 and from
  address 11 gives 5.
- Address bits below the access size are ignored, so misaligned accesses
  are silently aligned. No exception is raised. In simulation, assertions
  in `mips_memory` report a halfword or word write to a misaligned
  address.
- Reads are combinational. Writes happen on the rising edge.
- `dout` is zero unless a read is enabled.
- The contents are not reset.

**Size.** `ADDR_BITS` (`MEM_ADDR_BITS` on the top) sets how many address
bits are decoded. The default is 30, which gives 1 GiB as 2^28 words.
Higher address bits are ignored, so the top quarter-gigabyte regions
alias onto this space. Verilator refuses arrays of 2^29 or more elements,
so the full 4 GiB of a 32-bit address space cannot be held. A program that
jumps to, for example, 0xabcd1234 therefore lands at 0x2bcd1234.

For synthesis the memory would be replaced by real RAM. Yosys runs out of
memory on a flat array of the default size. Set `MEM_ADDR_BITS` to
something like 12-16 to synthesise the logic.

## Branches, jumps and the link register

Branches and jumps take effect at once: the instruction after a branch or
jump is **not** executed (there is no branch-delay slot). JAL still writes
`PC + 8` into r31, as the MIPS architecture defines it for a machine with a
delay slot. Consequences:

- `JR r31` returns to the second instruction after the JAL.
- The word right after a JAL is skipped both on the way out and on the way
  back.

Code written for a delay-slot MIPS must put a no-op in that slot.

## Reset

`rst` is synchronous and active high:
- the PC is set to `RESET_PC` (0) at a rising edge;
- the register file clears all registers at a falling edge while `rst` is
  high.

Hold `rst` for at least one full clock. Release it just after a rising
edge.

## Where the design makes its own choices

These points are not fixed by the MIPS description this design follows,
and were chosen here:

- Edges:
  - register writes on the falling edge follow the register-file
    description;
  - PC and memory writes on the rising edge, and the synchronous resets,
    are choices.
- No delay slot, with a PC+8 link (see above).
- ADDI without an overflow trap.
- SLT (func 0x2a) and ADDI (op 0x08) are included because the
  loop example `addi r2, r0, 10 / slt r3, r1, r2` uses them.
- Unknown instructions are no-ops.
- Misaligned addresses are aligned by dropping low bits.
- Sub-word loads are handled after the memory (`load_ext`).
- The memory is 1 GiB instead of 4 GiB.
- The `ctrl_t` encoding and the merging of the "=?" and "cmp" comparators
  into one `branch_cmp` module.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator
(5.x), list the package first:

```
verilator --binary --timing --assert -Irtl -Itb --top-module mips_cpu_tb \
    rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/mips_cpu_tb.sv -o sim
./obj_dir/sim
```

For a unit, for example the ALU:

```
verilator --binary --timing --assert -Irtl -Itb --top-module alu_tb \
    rtl/mips_pkg.sv tb/alu_tb.sv -o sim
```

`tb/mips_asm_pkg.sv` has one encoder function per instruction (`addu(rd, rs,
rt)`, `lw(rt, offset, rs)`, `beq(rs, rt, offset)`, `jal(address)`, ...). To
run your own program, write its words into `dut.u_mem.mem[address >> 2]`
before releasing reset, as the processor testbenches do.

The default-size processor needs about 1 GiB of host memory in simulation
and starts in a few seconds. To cut that, override `MEM_ADDR_BITS`.

## Verification

| Testbench | What it checks |
|---|---|
| `mips_cpu_tb` | End to end, at default size. A directed program and then 3000 random instructions, compared after **every clock** with an instruction-set model in the testbench (PC and all registers), then a byte-by-byte comparison of the data region. |
| `mips_examples_tb` | Runs the classic one-line examples (ADDIU r5,r5,5; SW r1,4(r5); J 0x1000001; JR r3; BEQ r5,r1,3; BGEZ r5,2; JAL 0x1000001) and checks the exact PC sequence and results. |
| `regfile_tb` | Random writes with WE on and off, both read ports, r0, reset, and that a write is not visible before the falling edge. |
| `alu_tb` | Every operation on corner and random operands against separately written reference formulas. |
| `imm_ext_tb` | All 65536 immediates in both modes. |
| `control_tb` | The control signals of every instruction and of illegal encodings. |
| `branch_cmp_tb` | Every condition against signed integer comparisons. |
| `pc_unit_tb` | Each next-PC source, including negative offsets. |
| `load_ext_tb` | Byte and halfword selection and extension in big-endian order. |
| `mips_memory_tb` | The big-endian store/load example, then random byte/halfword/word traffic against a byte-array reference on both ports. |

In `mips_cpu_tb`, the directed program is built from the textbook
examples:
- LUI/ORI building 0xdeadbeef;
- the `for (i = 0; i < 10; i++)` loop with SLT/BEQ/J;
- the big-endian SB/LB/SW/LB sequence;
- XOR and SLL;
- a JAL/JR call;
- a counted backward BGTZ loop;
- BLTZ/BGEZ/BLEZ.

The end-to-end test counts each instruction kind, each branch both taken
and not taken, a backward branch, a write to r0 and negative
sign-extended loads. It fails if any of them never happened.

Each unit testbench has also been shown to fail on a deliberately broken
copy of its module.
