# MIPS-lite single-cycle processor

This is a small 32-bit MIPS processor that runs each instruction in one long clock cycle. In that
cycle an instruction goes through all five steps of MIPS execution: fetch, decode and register read,
ALU, memory access, register write. Nothing is pipelined and nothing stalls. The clock period has
to cover the slowest instruction, `lw`, which is the only one that uses all five steps.

The design is built from a few parts: a program counter, an instruction memory, a 32 x 32-bit
register file, an immediate extender, an ALU, a data memory, and the multiplexers between them.
A purely combinational controller sets the control points of these parts from the opcode and funct
fields.

## Instruction set

| Instruction | Register transfer | Encoding |
|---|---|---|
| `addu rd, rs, rt` | R[rd] ← R[rs] + R[rt] | op 0x00, funct 0x21 |
| `subu rd, rs, rt` | R[rd] ← R[rs] − R[rt] | op 0x00, funct 0x23 |
| `ori rt, rs, imm16` | R[rt] ← R[rs] \| zero_ext(imm16) | op 0x0d |
| `lw rt, imm16(rs)` | R[rt] ← MEM[R[rs] + sign_ext(imm16)] | op 0x23 |
| `sw rt, imm16(rs)` | MEM[R[rs] + sign_ext(imm16)] ← R[rt] | op 0x2b |
| `beq rs, rt, imm16` | if R[rs] == R[rt]: PC ← PC + 4 + {sign_ext(imm16), 00} | op 0x04 |
| `slti rt, rs, imm16` | R[rt] ← (R[rs] < sign_ext(imm16), signed) ? 1 : 0 | op 0x0a |

Except for a taken `beq`, every instruction also does PC ← PC + 4. The first six form the classic
"MIPS-lite" teaching subset. `slti` is added because it needs nothing new in the datapath: it uses
the ALU's set-less-than operation with a sign-extended immediate.

The processor has no jumps, no trapping `add`/`sub`, no byte or halfword memory access, no shifts,
and no exceptions. An encoding it does not support runs as a no-op: nothing is written, the PC
advances by 4, and the `illegal` output goes high for that cycle. Opcode and funct values are the
standard MIPS ones.

Instruction fields: `op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]` for R-format,
and `op rs rt imm16[15:0]` for I-format. `mips_pkg` defines both as packed structs.

## One cycle through the datapath

Within one cycle, starting just after a rising clock edge:

1. **Fetch.** The PC addresses the instruction memory, which returns the word combinationally.
2. **Decode and read.** `rs` drives register-file port A and `rt` drives port B. The controller
   decodes `op` and `funct`. The RegDst mux picks the write register: `rd` for R-format, `rt` for
   I-format.
3. **Execute.** ALU input A is busA. The ALUSrc mux feeds input B with busB or with the extended
   immediate. For `beq`, the ALU subtracts and its `equal` output (result == 0) decides the branch.
4. **Memory.** The data memory is addressed by the ALU result. It reads combinationally, and `sw`
   writes busB to it on the closing edge.
5. **Write back.** The MemtoReg mux puts the ALU result or the loaded word on busW. The register
   file writes it on the closing edge if RegWr is set.

The same rising edge loads the PC, the written register and the written memory word. Every
register read, the ALU and the memory read must therefore settle within one period. The critical
path is that of `lw`:

clock-to-Q of the PC → instruction memory access → control and register-file read → ALU add →
data memory access → MemtoReg mux → register-file setup.

### Control settings

| | RegDst | RegWr | ExtOp | ALUSrc | ALUctr | MemWr | MemtoReg | nPC_sel |
|---|---|---|---|---|---|---|---|---|
| addu | rd | 1 | – | busB | ADD | 0 | ALU | 0 |
| subu | rd | 1 | – | busB | SUB | 0 | ALU | 0 |
| ori | rt | 1 | zero | imm | OR | 0 | ALU | 0 |
| lw | rt | 1 | sign | imm | ADD | 0 | mem | 0 |
| sw | – | 0 | sign | imm | ADD | 1 | – | 0 |
| beq | – | 0 | – | busB | SUB | 0 | – | Equal |
| slti | rt | 1 | sign | imm | SLT | 0 | ALU | 0 |

A dash marks a signal the instruction does not use; `control` drives it to 0. These settings follow
from the register transfers in the instruction table.

## Next-PC logic

The PC register holds only bits 31:2. Bits 1:0 are wired to 00, since instructions are word
aligned. Two adders sit in front of it:

- one computes PC + 4;
- the other adds the branch offset `{sign_ext(imm16), 2'b00}` to PC + 4.

So a branch offset counts instructions, measured from the instruction after the `beq`. A mux
controlled by `nPC_sel` picks the branch target, and the PC loads the mux output on every edge.
`nPC_sel` is high only for a `beq` whose operands are equal. For example, `beq r0, r0, -1` loops
on itself forever.

## Storage elements

- **Register file** (`regfile`): 32 registers of 32 bits. It has two combinational read ports
  (`ra`→`bus_a`, `rb`→`bus_b`) and one write port (`rw`, `bus_w`, `we`) clocked on the rising
  edge. A read of the register being written returns the old value until the edge. Register 0
  reads as zero and ignores writes.
- **Idealized memory** (`magic_memory`): one address, Data In, Data Out, Write Enable. Reads are
  combinational and writes happen on the rising edge. It is used twice, for the instruction memory
  and for the data memory, with 1024 words (4 KiB) each by default. Addresses are byte addresses:
  bits 1:0 are ignored, and bits above the memory size wrap around. A real processor would have a
  cache hierarchy here. This model stands for the ideal case, where every access completes within
  the cycle.
- **Register** (`register_en`): an N-bit register with a write enable, used for the PC.

## Interface of the top, `mips_lite_cpu`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all state changes on the rising edge |
| `rst_n` | in | 1 | active-low asynchronous reset: PC = 0, all registers 0, data memory writes blocked |
| `imem_we`, `imem_addr`, `imem_wdata` | in | 1, 32, 32 | program-load port into the instruction memory |
| `pc`, `instr` | out | 32, 32 | current fetch address and instruction |
| `dmem_we`, `dmem_addr`, `dmem_wdata` | out | 1, 32, 32 | this cycle's data-memory write |
| `reg_we`, `reg_waddr`, `reg_wdata` | out | 1, 5, 32 | this cycle's register write (register 0 excluded) |
| `illegal` | out | 1 | the current instruction is unsupported and runs as a no-op |

To load a program, hold `rst_n` low and write one word per clock through the load port, at byte
addresses 0, 4, 8, and so on. While `imem_we` is high, the instruction memory is addressed by
`imem_addr` rather than the PC. Then release `rst_n`, and execution starts at address 0. An
assertion in the top flags any use of the load port while the processor runs. The data
memory has no load port and is not reset. Testbenches fill it by writing `u_dmem.mem[]`
hierarchically.

Parameters: `IMEM_WORDS` and `DMEM_WORDS`, both 1024. Both should be powers of two.

## Where this design makes its own choices

The structure, the control-point names, the instruction formats, the register transfers, the
32 x 32 register file and the behaviour of the idealized memory and register follow the standard
textbook single-cycle datapath. The following are choices made here:

- the memory sizes (1024 words each);
- the reset (asynchronous, active low; PC and registers cleared);
- register 0 hard-wired to zero (the MIPS convention);
- the ALUctr encoding (`ADD, SUB, OR, AND, SLT`, in `mips_pkg`) and the ExtOp polarity
  (1 = sign);
- the logic `nPC_sel = beq & Equal`;
- unsupported encodings run as no-ops;
- the program-load port.

The ALU builds add, subtract and set-less-than from one shared adder. Subtraction feeds `~b` with
carry-in 1. Set-less-than takes the sign of `a − b` corrected for signed overflow. The ALU also
has AND, but no supported instruction selects it. The ALU's `equal` output is a zero test of its
result. It means a == b only when ALUctr is SUB, which is how `beq` uses it.

## Files

| File | Contents |
|---|---|
| `rtl/mips_pkg.sv` | instruction structs, opcode/funct constants, ALUctr enum, control struct |
| `rtl/mips_lite_cpu.sv` | top: the single-cycle datapath and its controller |
| `rtl/ifu.sv` | fetch unit: PC, two adders, branch-offset extension, next-PC mux, instruction memory |
| `rtl/control.sv` | main decoder |
| `rtl/regfile.sv` | 32 x 32 register file |
| `rtl/alu.sv` | ALU |
| `rtl/extender.sv` | sign/zero extender |
| `rtl/magic_memory.sv` | idealized memory |
| `rtl/register_en.sv` | register with write enable |
| `rtl/adder.sv`, `rtl/mux2.sv` | adder and 2:1 multiplexer building blocks |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench checks itself and ends by printing `TB_RESULT checks=N failures=M`. Each also has a
watchdog that fails the run if it hangs. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/mips_pkg.sv tb/tb_mips_lite_cpu.sv --top-module tb_mips_lite_cpu -o sim
./obj_dir/sim
```

For another testbench, replace `tb_mips_lite_cpu` with its name. `-y rtl` lets Verilator find the
sub-modules on its own.

`tb_mips_lite_cpu` runs the processor at its default sizes for 20,000 cycles:

- **Program.** It fills the whole instruction memory with a hand-written program followed by
  random instructions, including unsupported ones. The hand-written part contains the textbook
  examples `addu r3,r1,r2`, `slti r4,r1,17`, `sw r3,17(r1)` and `lw r7,17(r1)`, forward and
  backward branches, and writes to register 0. Random branches only go forward, so execution
  sweeps through the whole memory and wraps back to the start.
- **Reference model.** An instruction-level model in the testbench executes the same image, one
  instruction per cycle. Every cycle the testbench compares the PC, the register write and the
  memory write against it. At the end it compares all registers and all memory, and it also
  checks a set of results worked out by hand.
- **Coverage.** It counts how often each mechanism occurs, and a mechanism that never occurs is a
  failure. The mechanisms are: each instruction kind, beq taken and not taken, a backward branch,
  zero extension, a negative offset, slti true and false, a write to register 0, and an
  unsupported encoding.

The simulation takes well under a second.

The unit testbenches check each part against values computed independently: 33-bit sums,
SystemVerilog's signed compare, and a reference array for the register file and memory.
`tb_extender` tries every 16-bit immediate.

## Changing it

To add an R-format instruction that the ALU already supports, such as `and`: give its funct value
a name in `mips_pkg` and add a case in `control`. To add an I-format instruction, add an opcode to
`opcode_e` and set its control points in `control`. A new ALU operation goes into `aluctr_e` and
into the case statement in `alu`. Jumps would need a third source at the next-PC mux in `ifu`.
Add the new instruction to the reference model in `tb_mips_lite_cpu` (`model_eval`) as well.
