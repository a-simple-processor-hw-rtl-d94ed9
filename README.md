# HW ISA single-cycle processor

This is a small teaching processor: a 16-bit load/store machine where every
instruction finishes in exactly one clock cycle. On each rising edge it fetches
one instruction, decodes it, reads two registers, runs the ALU, touches data
memory if needed, and writes the result back. At the same time it loads the
next program counter. Nothing is pipelined, so the slowest instruction
(a load: instruction memory, then register file, then ALU, then data memory,
then register write) sets the clock period.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable and has been
linted with Verilator and elaborated with the slang front end of Yosys.

## The instruction set

The machine has sixteen 16-bit registers (R0-R15) and two separate memories.
The instruction memory holds the program. The data memory is byte-addressed
and little-endian: the word at address `a` is `{M[a+1], M[a]}`. Instructions
are one 16-bit word each. The PC holds a byte address and normally steps by 2.

| Instruction        | Meaning                                         | [15:12] | [11:8] | [7:4] | [3:0]  |
|--------------------|-------------------------------------------------|---------|--------|-------|--------|
| `LW Rt, off(Rs)`   | R[t] ← M[R[s] + off]                            | 0000    | s      | t     | off    |
| `SW Rt, off(Rs)`   | M[R[s] + off] ← R[t]                            | 0001    | s      | t     | off    |
| `ADD Rs, Rt, Rd`   | R[d] ← R[s] + R[t]                              | 0010    | s      | t     | d      |
| `SUB Rs, Rt, Rd`   | R[d] ← R[s] − R[t]                              | 0011    | s      | t     | d      |
| `AND Rs, Rt, Rd`   | R[d] ← R[s] & R[t]                              | 0100    | s      | t     | d      |
| `OR Rs, Rt, Rd`    | R[d] ← R[s] \| R[t]                             | 0101    | s      | t     | d      |
| `BEQ Rs, Rt, off`  | if R[s] == R[t]: PC ← PC + 2 + off·2            | 0111    | s      | t     | off    |
| `JMP off`          | PC ← off·2                                      | 1000    | off[11:0]       |||
| `HALT`             | stop                                            | 1111    | –               |||

The 4-bit offsets of LW, SW and BEQ are signed (−8…7). The 12-bit JMP offset is
unsigned. The destination is written **last** in the assembly syntax
(`ADD R3, R6, R8` writes R8). Some example encodings: `ADD R3,R6,R8` = `0x2368`,
`SW R6,-8(R3)` = `0x1368`, `BEQ R1,R2,-2` = `0x712E`.

Opcodes 0110 and 1001-1110 are not defined. This implementation runs them as
no-operations: nothing is written and the PC advances by 2.

## Datapath

The datapath is built from these units, in the order a signal passes through them:

- **Instruction fetch.** `pc_reg` holds the PC. `instr_mem` reads the word at
  that byte address combinationally. An `adder` forms PC + 2.
- **Decode.** `control_unit` is one truth table from the opcode to a
  control word (`ctrl_t` in `hw_isa_pkg`). The ALU operation is a separate
  2-bit code (ADD, SUB, AND, OR) that the control unit translates from the
  opcode. It is not the opcode itself.
- **Register access.** `reg_file` reads Rs and Rt combinationally. Its single
  write port writes at the clock edge. A `mux2` picks the write address: Rd for
  arithmetic, Rt for LW.
- **Execute.** A second `mux2` feeds the ALU either Read Data 2 or the
  sign-extended offset. The `alu` computes ADD/SUB/AND/OR. It also reports
  `zero` and signed `overflow`.
- **Memory.** The ALU result is the data-memory address for LW and SW.
  Read Data 2 is the store data. `data_mem` reads combinationally and writes
  both bytes at the clock edge when Mem Store is set.
- **Write-back.** A third `mux2` (the "Mem" bit) chooses the ALU result or the
  loaded word.
- **Next PC.** `next_pc` shifts the sign-extended offset left by 1 and adds it
  to PC + 2. It picks that target when Branch is set and the ALU (which
  subtracted the two registers) reports zero. For JMP a second mux then
  overrides everything with `{off, 0}`.

### Control word

| opcode | reg_write | mem_store | mem_to_reg | alu_src_imm | wr_addr_rt | branch | jump | halt | alu_op |
|--------|:-:|:-:|:-:|:-:|:-:|:-:|:-:|:-:|--------|
| ADD/SUB/AND/OR | 1 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | ADD/SUB/AND/OR |
| LW     | 1 | 0 | 1 | 1 | 1 | 0 | 0 | 0 | ADD |
| SW     | 0 | 1 | 0 | 1 | 0 | 0 | 0 | 0 | ADD |
| BEQ    | 0 | 0 | 0 | 0 | 0 | 1 | 0 | 0 | SUB |
| JMP    | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 0 | – |
| HALT   | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | – |
| other  | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | – |

## Halting

HALT sets a sticky `halted` flag in `pc_reg`. From then on the PC stays on the
HALT instruction. HALT writes neither registers nor memory, so the
architectural state is frozen until reset. This design does not gate the
clock; freezing the PC has the same effect.

## Reset, loading and observing

- `rst_n` is synchronous and active low. It sets PC = 0x0, clears `halted`,
  sets R1 = 0x0001 and clears every other register. Memories are not cleared.
  R1 = 1 gives programs the constant 1 (for example to decrement a counter).
  R0 is an ordinary writable register, not a hard-wired zero.
- `imem_load_we/addr/data` writes one instruction word per clock.
- `dmem_load_we/addr/data` writes one data word per clock. It has priority over
  the processor's own stores, so use it only while `rst_n` is low.
- `dbg_reg_addr → dbg_reg_data` and `dbg_mem_addr → dbg_mem_data` are
  combinational read ports onto the register file and data memory.
- `pc`, `instr`, `halted`, `alu_zero` and `alu_overflow` show the instruction
  executing in the current cycle.

Typical use: hold `rst_n` low, load the program and data, release `rst_n`,
clock until `halted` is high, then read results through the debug ports.

## Parameters and sizes

| Module | Parameter | Default | Note |
|--------|-----------|---------|------|
| `hw_cpu` | `IMEM_BYTES` | 65536 | full 16-bit byte address space |
| `hw_cpu` | `DMEM_BYTES` | 65536 | full 16-bit byte address space |
| `reg_file` | `NREGS`, `WIDTH` | 16, 16 | fixed by the ISA |

Word width, register count, field positions and opcodes come from the ISA.
The memory sizes are this design's choice. Since the addresses are 16 bits,
the defaults cover everything a program can address. After synthesis the
default configuration has 1 Mbit of memory (two 64 KiB arrays) plus the
256-bit register file.

## Choices this implementation makes

Everything below is left open by the ISA and the datapath description:

- Both memories read combinationally and write at the clock edge, as a
  single-cycle machine needs.
- Data-memory words need not be aligned. `addr + 1` wraps at the top of memory.
  Instruction fetch ignores PC bit 0.
- ALU overflow means two's-complement overflow of ADD or SUB. Nothing in the
  processor uses it; it is brought out as a port.
- The select encodings of the four muxes (which input is 0 and which is 1),
  and driving the ALU-source and write-address muxes from the control unit.
- JMP and HALT hardware (see above), the treatment of undefined opcodes,
  the reset values, the load ports and the debug ports.

## Files

| File | Contents |
|------|----------|
| `rtl/hw_isa_pkg.sv` | opcodes, ALU operation enum, control-word and instruction structs |
| `rtl/hw_cpu.sv` | top level: the complete single-cycle datapath |
| `rtl/pc_reg.sv` | program counter and halted flag |
| `rtl/instr_mem.sv`, `rtl/data_mem.sv` | instruction and data memories |
| `rtl/reg_file.sv` | 16 × 16 register file, 2 read + 1 write + debug read |
| `rtl/control_unit.sv` | opcode → control word |
| `rtl/alu.sv` | ADD/SUB/AND/OR with zero and overflow |
| `rtl/sign_extend.sv`, `rtl/adder.sv`, `rtl/mux2.sv` | small datapath parts |
| `rtl/next_pc.sv` | PC + 2, branch target, branch and jump selection |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each also has a watchdog. `tb_hw_cpu` runs
the processor at its default sizes:

- **Example programs with known results.** Three of them check final
  registers, memory and the cycle count (one instruction per clock):
  - ADD then SW of the sum;
  - LW, LW, AND, SW;
  - a loop that multiplies 3 × 2 with BEQ/ADD/SUB/JMP and leaves through a
    taken BEQ to HALT after 11 cycles.
- **More directed programs.** A short ADD/SUB/OR program, the three raw
  encodings listed above, and an ADD and a SUB that overflow.
- **Random programs (60 of them).** Each runs in lockstep with an
  instruction-level model of the ISA kept in the testbench. After every clock
  it compares the PC, `halted`, all 16 registers and the last stored word.
- **Mechanism coverage.** The test counts each opcode, taken and untaken
  branches, jumps, overflow, undefined opcodes and halts. A mechanism that
  never occurs is a failure.

The test runs in well under a second. To run it with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/hw_isa_pkg.sv tb/tb_hw_cpu.sv --top-module tb_hw_cpu -o sim
./obj_dir/sim
```

Replace `tb_hw_cpu` with any other `tb_*` name to test a single module.

Each block-level testbench has been checked against a deliberately broken
copy of its module, for example:

- a zero-extending sign extender;
- a big-endian data memory;
- a branch that ignores the zero flag;
- a PC that keeps running after HALT.

Every testbench reported failures against its broken copy.

## Limits

- HALT freezes the PC and does not stop the clock.
- The memories are plain arrays with combinational reads. On an FPGA or ASIC
  they would become distributed RAM or flops, not synchronous block RAM.
  Moving to synchronous-read memories would need a different (multi-cycle or
  pipelined) organisation.
- There is no interrupt, exception or I/O mechanism. The ISA defines none.
