# MIPS-lite: a single-cycle CPU

This processor runs six MIPS instructions, `addu`, `subu`, `ori`, `lw`, `sw` and `beq`. Each one
finishes in a single clock cycle. Within that cycle, one combinational path fetches the instruction
at the PC, reads its two source registers, computes in the ALU, reads or writes data memory and
chooses the next PC. The rising clock edge then commits everything at once: the register write, the
memory store and the new PC. Nothing is pipelined and nothing is held between stages. The clock
period must therefore cover the longest path, which is `lw`: instruction memory → register file →
ALU → data memory → register file input.

The design follows the classic textbook teaching CPU. The datapath is built from a few components:
adder, multiplexer, ALU, register, register file and an idealized memory. A controller decodes the
opcode and funct fields into the settings of the datapath's control points.

## What each instruction does

Each instruction is defined by the state changes it makes. `R[]` is the register file, `MEM[]` the
data memory.

| instruction       | effect                                                        | PC                                      |
|-------------------|---------------------------------------------------------------|-----------------------------------------|
| `addu rd,rs,rt`   | `R[rd] ← R[rs] + R[rt]`                                       | PC+4                                    |
| `subu rd,rs,rt`   | `R[rd] ← R[rs] − R[rt]`                                       | PC+4                                    |
| `ori rt,rs,imm16` | `R[rt] ← R[rs] \| zero_ext(imm16)`                           | PC+4                                    |
| `lw rt,imm16(rs)` | `R[rt] ← MEM[R[rs] + sign_ext(imm16)]`                        | PC+4                                    |
| `sw rt,imm16(rs)` | `MEM[R[rs] + sign_ext(imm16)] ← R[rt]`                        | PC+4                                    |
| `beq rs,rt,imm16` | nothing written                                               | `R[rs]==R[rt]` ? PC+4+(sign_ext(imm16)<<2) : PC+4 |

Instruction fields use the standard MIPS layout:
`op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]` for the R-type and
`op rs rt imm16[15:0]` for the I-type. The encodings are the standard MIPS-I values:

| instruction | op     | funct  |
|-------------|--------|--------|
| addu        | `0x00` | `0x21` |
| subu        | `0x00` | `0x23` |
| ori         | `0x0D` | –      |
| lw          | `0x23` | –      |
| sw          | `0x2B` | –      |
| beq         | `0x04` | –      |

Every other op/funct combination is a no-op: nothing is written and the PC advances by 4. Real MIPS
would raise an exception here. This design has none.

## The datapath

```
            +-------------------- next_addr_logic ------------------+
            |  PC+4 adder -> branch adder (+ sext(imm16)<<2) -> mux  |<-- branch & zero
            +--------------------------^----------------------------+
                                       |
  [PC register] --pc--> [instruction memory] --instr--> control (op, funct)
                                       |   rs,rt,rd,imm16
                                       v
        rt/rd mux (reg_dst) --> rw   [register file]  ra=rs, rb=rt
                                      busA     busB ------------------+
                                       |        |                     |
           extender(imm16, ext_op) ----+--> mux (alu_src)             |
                                       v        v                     |
                                      [ ALU: add / sub / or ] --zero  |
                                               | result (address)     | store data
                                               v                      v
                                          [data memory]  <------------+
                                               | dout
                          mux (mem_to_reg): result or dout --> busW --> register file
```

Modules, bottom to top:

* `adder` is an N-bit adder with carry in and carry out.
* `mux2` is a two-input multiplexer. `sel = 1` selects input `b`.
* `alu` adds, subtracts or ORs. Subtraction reuses the adder as `a + ~b + 1`. Its `zero` output is 1
  when the result is 0. This is how `beq` tests equality: the controller asks for a subtraction and
  the branch is taken when `zero` is 1.
* `extender` zero-extends the immediate for `ori` and sign-extends it for `lw`, `sw` and `beq`.
* `register` is an N-bit register with a write enable and a synchronous reset value. The PC is one.
* `regfile` holds 32 × 32 bits, with two combinational read ports (busA, busB) and one write port
  (busW) that is written on the clock edge. Register 0 always reads 0, and writes to it are
  discarded.
* `ideal_mem` is a memory of 32-bit words with a single byte address. Reads are combinational and
  writes happen on the clock edge when `we` is 1. The instruction memory and the data memory are
  separate instances.
* `next_addr_logic` computes PC+4 and the branch target, and picks one of them.
* `ifetch` is the fetch unit: PC register, next-address logic and instruction memory.
* `control` is the main decoder (next section).
* `mips_lite_cpu` is the top level.

The shared types live in `mips_lite_pkg`: the opcode enum, the ALU operation enum `alu_ctr_e` and
the control-point struct `ctrl_t`.

## The controller

`control` is purely combinational. It sets the control points for each instruction:

| instr  | reg_dst | alu_src | mem_to_reg | reg_wr | mem_wr | branch | ext_op | alu_ctr |
|--------|:-------:|:-------:|:----------:|:------:|:------:|:------:|:------:|:-------:|
| addu   | 1 (rd)  | 0 (busB)| 0          | 1      | 0      | 0      | –      | ADD     |
| subu   | 1 (rd)  | 0       | 0          | 1      | 0      | 0      | –      | SUB     |
| ori    | 0 (rt)  | 1 (imm) | 0          | 1      | 0      | 0      | 0 zero | OR      |
| lw     | 0 (rt)  | 1       | 1 (memory) | 1      | 0      | 0      | 1 sign | ADD     |
| sw     | –       | 1       | –          | 0      | 1      | 0      | 1 sign | ADD     |
| beq    | –       | 0       | –          | 0      | 0      | 1      | 1 sign | SUB     |

`–` means "don't care". The RTL drives 0 there. `beq` passes its sign-extended offset straight to
`next_addr_logic`, so its `ext_op` value has no effect on the result.

## Timing within the cycle

All state sits in three places: the PC, the register file and the data memory. All three update
together on the rising edge of `clk`. Because register-file reads are combinational, an instruction
that reads a register gets the value written by the previous instruction. A register written in this
cycle shows its new value only after the edge. The same holds for data memory: a `lw` that follows a
`sw` to the same address reads the stored value. The CPU completes exactly one instruction per clock
cycle.

Reset is synchronous and active low. It clears the PC and all 32 registers. Memory contents are not
reset.

## Memories and addressing

Both memories have 1024 words by default, set by the `IMEM_WORDS` and `DMEM_WORDS` parameters of
`mips_lite_cpu`. Powers of two are expected. Addresses are byte addresses. Bits [1:0] are ignored,
because only whole words are accessed. The bits above the word index are also ignored, so addresses
wrap around the memory: with 1024 words, byte address `0x1000` is the same word as `0x0000`. The PC
is a full 32-bit register, but the instruction memory sees only its index bits.

Programs are loaded through the instruction memory's write port, which the top level brings out as
`imem_we / imem_waddr / imem_wdata`. While `imem_we` is 1, the instruction memory's address comes
from `imem_waddr` instead of the PC. The PC holds, and register-file and data-memory writes are
blocked. The usual sequence is to hold `rst_n` low, write the program word by word, drop `imem_we`
and then release reset. The data memory has no load port. A program fills it with `sw`.

## Top-level ports (`mips_lite_cpu`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1, 32, 32 | program load into the instruction memory |
| `pc`, `instr` | out | 32, 32 | current PC and the instruction being executed |
| `reg_we`, `reg_waddr`, `reg_wdata` | out | 1, 5, 32 | register write at the coming edge (a write to r0 is reported but discarded) |
| `mem_we`, `mem_addr`, `mem_wdata` | out | 1, 32, 32 | data-memory store at the coming edge |

The outputs exist only so the CPU can be observed. The CPU has no other I/O.

## Choices made beyond the textbook description

The source description defines the instruction set, the components and their ports, and the
datapath. It stops before the control logic. The following are this design's own choices:

* The numeric opcode and funct values: standard MIPS-I.
* The control table above, and the names of the control points other than `RegWr` and `ALUctr`.
* Undefined instructions behave as no-ops.
* The `ALUctr` encoding: add = 0, sub = 1, or = 2.
* Register 0 is hardwired to zero, as in MIPS.
* Reset behaviour, memory sizes, address wrap-around and the program-load port.
* PC+4 and the branch target each have their own adder, rather than going through the main ALU.

Not built: jumps and the J-type format, and `shamt` and shifts. These lie outside the six-instruction
subset, as do the AND and set-less-than operations a full MIPS ALU would add. There is also no
overflow detection, since only the unsigned add and subtract are included.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each compares the module's
outputs with values computed independently inside the testbench. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

`tb_mips_lite_cpu` runs the whole CPU at its default sizes:

1. **A hand-assembled program.** One loop stores 1…10 into data memory. A second loop reads them back
   with `lw` and sums them. The program then stores the sum at byte address 256, tries to write
   register 0, and ends in a `beq $0,$0,-1` self-loop. The testbench checks:
   * the sum is 55;
   * memory holds the expected words;
   * r0 is still 0;
   * the self-loop is reached after exactly 128 cycles, one cycle per instruction.
2. **Random programs.** Four rounds each fill all 1024 instruction words with random instructions:
   mostly valid ones, some undefined, and forward branches that are either always taken or depend on
   the data. Each round runs 3000 cycles in lockstep with an instruction-level model inside the
   testbench. Every cycle, the PC, the instruction and any register or memory write must match the
   model. At the end of each round, all registers and all data-memory words are compared.

The testbench counts each instruction kind, taken and not-taken branches, writes to r0 and undefined
instructions. Any that never occurs counts as a failure.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mips_lite_pkg.sv tb/tb_mips_lite_cpu.sv \
          --top-module tb_mips_lite_cpu -Mdir obj_cpu
./obj_cpu/Vtb_mips_lite_cpu
```

Swap in any other `tb_<module>` to test a single block. Verilator finds the other modules by file
name through `-Irtl`.

## Changing the design

* **Adding an ALU operation:** extend `alu_ctr_e` in `mips_lite_pkg` and the case statement in `alu`.
* **Adding an instruction:** add its opcode to `opcode_e` and a branch in `control`. Add a datapath
  multiplexer if it needs a new source. Then add the instruction to the reference model and the
  random generator in `tb_mips_lite_cpu`.
* **Resizing the memories:** change the top's parameters. The end-to-end testbench's `IW`/`DW`
  constants must match them.
