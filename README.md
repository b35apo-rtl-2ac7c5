# Single-cycle RISC-V computer

This is a minimal processor of the simplest kind: every instruction is fetched, decoded
and executed within a single clock period. It runs a subset of the 32-bit RISC-V base
instruction set (RV32I), and it sits next to a separate instruction memory and data
memory. Nothing in it is pipelined and nothing is cached. In one clock period a signal
leaves the program counter, passes through the instruction memory, the register file,
the ALU and the data memory, and arrives back at the register file's write port. The
state changes only at the rising clock edge.

The design favours readability over speed. Each piece of the datapath is a small module
named after its role: `pc_register`, `regfile`, `imm_decode`, `alu`, `mux2`, `adder`,
`instr_mem` and `data_mem`. A purely combinational `control_unit` steers them. Beside
the computer, the top level also holds the storage elements that a register is built
from: a D latch (as RTL and as a NAND-gate timing model), and a D flip-flop made of the
latch and a clock-edge pulse generator.

## Instruction subset

| group | instructions | opcode | what the datapath does |
|---|---|---|---|
| load | `lw rd, imm(rs1)` | 0000011, funct3 010 | rd ← Mem[rs1 + imm] |
| store | `sw rs2, imm(rs1)` | 0100011, funct3 010 | Mem[rs1 + imm] ← rs2 |
| register ALU | `add sub slt or and` | 0110011 | rd ← rs1 op rs2 |
| immediate ALU | `addi slti ori andi` | 0010011 | rd ← rs1 op imm |
| branch | `beq rs1, rs2, off` | 1100011, funct3 000 | if rs1 = rs2: PC ← PC + off |
| call | `jal rd, off` | 1101111 | rd ← PC + 4; PC ← PC + off |
| register jump | `jalr rd, imm(rs1)` | 1100111, funct3 000 | rd ← PC + 4; PC ← (rs1 + imm) & ~1 |
| upper immediate | `lui rd, imm20` | 0110111 | rd ← imm20 << 12 |
| PC-relative | `auipc rd, imm20` | 0010111 | rd ← PC + (imm20 << 12) |

`slt` and `slti` compare as signed numbers. `jalr x0, 0(ra)` is the usual return from a
subroutine (`jr ra`).

Any other encoding is not implemented. This includes `bne`, the shifts, byte and
halfword loads and stores, and system instructions. Such an encoding:

- writes no register and no memory;
- advances the PC by 4;
- raises the `illegal` output for that cycle.

There are no exceptions or interrupts.

## The datapath

```
          +-------------------------------------------------------------+
          |                            PCBranch = PC + SignImm          |
          v                                                             |
 PC' -> [PC] --+--> instr_mem --Instr--+--[19:15]--> A1   RD1 --SrcA--+ |
   ^           |                       +--[24:20]--> A2   RD2 --+     | |
   |           +--> +4 = PCPlus4       +--[11:7]---> A3         |   [ALU]--AluOut--+--> dmem A
   |                                   |            WD3 <--Result  |  ^  |Zero     |    dmem WD <- RD2
   |                                   +--> imm_decode --SignImm---+--+  |         |
   |                                                  (ALUSrc selects SrcB)        |
   +-- PC' = Branch&Zero | jal ? PCBranch : PCPlus4;  jalr: AluOut & ~1            |
       Result = MemToReg ? ReadData : AluOut;  jal/jalr: PCPlus4      <------------+
```

Instruction fields always sit at the same places, so the register file is addressed
straight from the instruction word:

- `instr[19:15]` → rs1 on read port 1;
- `instr[24:20]` → rs2 on read port 2;
- `instr[11:7]` → rd on the write port.

The only per-instruction choices are the multiplexer selects and the write enables that
the control unit produces. Each instruction class uses the datapath as follows.

- **`lw`**: the ALU adds rs1 and the I-type immediate (ALUSrc = 1). The sum addresses
  the data memory. Its read data goes to the register file through the result
  multiplexer (MemToReg = 1) and is written at the clock edge (RegWrite = 1). This is
  the longest path in the design: PC → instruction memory → register read → ALU → data
  memory → multiplexer → register-file setup.
- **`sw`**: the address is computed the same way, but with the S-type immediate. Read
  port 2 (`WriteData`) feeds the data memory's write data, and MemWrite = 1. No register
  is written.
- **R-type**: ALUSrc = 0 sends rs2 to the ALU. The control unit picks the operation from
  funct3/funct7: `add` 000/0000000, `sub` 000/0100000, `slt` 010, `or` 110, `and` 111.
- **I-type ALU**: the same as R-type, with SrcB = the sign-extended I immediate.
- **`beq`**: the ALU subtracts rs2 from rs1. The `Zero` flag, ANDed with `Branch`,
  selects `PCBranch = PC + SignImm` as the next PC. The B-type immediate is an even byte
  offset from −4096 to +4094.
- **`jal` / `jalr`**: both write `PCPlus4` into rd (`link`).
  - `jal` takes `PCBranch` unconditionally.
  - `jalr` takes the ALU's `rs1 + imm` with bit 0 cleared.
- **`lui` / `auipc`**: the ALU adds the U-type immediate to zero (`lui`) or to the PC
  (`auipc`), as chosen by a three-way SrcA selector.

The core's paths for `jal`, `jalr`, `lui` and `auipc` are this design's own extension of
the basic single-cycle datapath. The basic datapath covers only loads, stores, ALU
operations and `beq`.

### Immediates

`imm_decode` collects the immediate bits of the format selected by the control unit and
sign-extends them from `instr[31]`:

| format | bits | used by |
|---|---|---|
| I | instr[31:20] | lw, addi, slti, ori, andi, jalr |
| S | instr[31:25], instr[11:7] | sw |
| B | instr[31], instr[7], instr[30:25], instr[11:8], 0 | beq |
| U | instr[31:12], 12 zeros | lui, auipc |
| J | instr[31], instr[19:12], instr[20], instr[30:21], 0 | jal |

### Control signals

`control_unit` decodes `opcode`, `funct3` and `funct7` into the `rv_pkg::ctrl_t` struct:

| instr | ALUControl | ALUSrc | RegWrite | MemWrite | MemToReg | Branch | extra |
|---|---|---|---|---|---|---|---|
| lw | add | 1 | 1 | 0 | 1 | 0 | |
| sw | add | 1 | 0 | 1 | 0 | 0 | imm S |
| add / sub / slt / or / and | op | 0 | 1 | 0 | 0 | 0 | |
| addi / slti / ori / andi | op | 1 | 1 | 0 | 0 | 0 | |
| beq | sub | 0 | 0 | 0 | 0 | 1 | imm B |
| jal | – | – | 1 | 0 | 0 | 0 | jump, link, imm J |
| jalr | add | 1 | 1 | 0 | 0 | 0 | jump_reg, link |
| lui | add | 1 | 1 | 0 | 0 | 0 | SrcA = 0, imm U |
| auipc | add | 1 | 1 | 0 | 0 | 0 | SrcA = PC, imm U |

ALUControl is a 3-bit code: add 000, sub 001, and 010, or 011, slt 101. The codes and
the enum for the immediate format are defined in `rv_pkg`.

## Timing

The CPI (clocks per instruction) is exactly 1. The clock period must cover the `lw`
path:

```
T_CLK = t_PC + t_Mem(instr) + t_RFread + t_ALU + t_Mem(data) + t_Mux + t_RFsetup
```

Take, for example, a 0.3 ns clock-to-output, 20 ns memories, a 1.5 ns register read, a
2 ns ALU, a 0.1 ns multiplexer and a 0.1 ns register setup. The period is then 44 ns,
about 22.7 MHz, or 22.7 million instructions per second. Everything else waits for that
one path, and removing the wait is the motivation for pipelining. The RTL models no
delays; the testbenches check only the one-instruction-per-clock behaviour.

## Memories, reset and program loading

- `instr_mem` and `data_mem` each hold `WORDS` = 1024 words of 32 bits (4 KiB).
- Both read combinationally. `data_mem` writes at the rising clock edge when `we` is high.
- Addresses are byte addresses. Bits [1:0] are ignored, so all accesses are whole words.
- The word index is taken modulo the memory size, so an address outside 4 KiB wraps around.
- `instr_mem` has a load port (`load_we`, `load_addr`, `load_data`). `sc_computer` brings
  it out as `prog_*`.
- To run a program:
  1. Hold `rst` high.
  2. Write one word per clock through `prog_*`.
  3. Release `rst`.
- While `rst` is high, the PC is held at `RESET_PC` (0x200), all registers are cleared,
  and the core writes no memory.
- Reset is synchronous and active high.
- Register `x0` always reads 0, and writes to it are discarded.
- A register written in a cycle shows its new value from the next cycle on. This is all a
  single-cycle machine needs.

## Storage elements

These four modules show how a clocked register is built from gates. They are not
connected to the CPU.

- **`d_latch`** is a level-sensitive latch. While `e` = 1, `q` follows `d`. When `e`
  falls, `q` and `q_n` keep their last values. The usual gate circuit is two NAND gates
  that gate `d` and `~d` with `e`, feeding a cross-coupled NAND pair. The module
  describes the same behaviour with `always_latch`, so synthesis infers one latch.
- **`nand_d_latch`** (behavioural timing model) is that gate circuit itself, with a
  delay on every gate:
  - `s_n = ~(d & e)` and `r_n = ~(~d & e)`;
  - `q = ~(s_n & q_n)` and `q_n = ~(r_n & q)`.

  With `e` = 1 the input gate on the side of the new value pulls one output of the
  cross-coupled pair to 1, and the other output follows a gate delay later. With `e` = 0
  both input gates give 1, and the pair holds its state through its own feedback loop.
  With 1 ns gates the latch settles 3 ns after `e` rises or `d` changes. Before the
  first enable its state is undefined and may oscillate in simulation.
- **`edge_pulse_gen`** (behavioural timing model) ANDs a signal with a copy of itself
  that is delayed and inverted by an odd chain of `INV_STAGES` inverters. With ideal
  gates the AND output is always 0. With real gate delays it goes high for the chain
  delay right after each rising edge. A longer chain makes the pulse wider.
- **`pulse_dff`** (behavioural timing model) enables the NAND-gate latch with that
  pulse. The result records `d` at the rising clock edge: an edge-triggered D
  flip-flop. The pulse must last longer than the latch needs to settle. With 1 ns
  gates a single inverter gives a 1 ns pulse, and the latch, which needs about 3 ns,
  never takes a new value. The default chain is therefore three inverters (3 ns
  pulse). `d` must stay stable from the edge until the pulse has ended and the latch
  has settled, about 6 ns: that is the flip-flop's hold time.

The three behavioural models rely on `#` delays. They are meant for event-driven
simulation (verilator `--timing`) and do not describe synthesizable logic.

## Files

| file | contents |
|---|---|
| `rtl/rv_pkg.sv` | opcodes, ALU and immediate-type enums, control struct |
| `rtl/sc_computer.sv` | top: CPU + memories, and the latch / flip-flop beside them |
| `rtl/riscv_sc_cpu.sv` | the single-cycle core (datapath and control) |
| `rtl/control_unit.sv`, `alu.sv`, `imm_decode.sv`, `regfile.sv` | decode and execute blocks |
| `rtl/pc_register.sv`, `mux2.sv`, `adder.sv` | PC register, multiplexer, adder |
| `rtl/instr_mem.sv`, `data_mem.sv` | memories |
| `rtl/d_latch.sv`, `nand_d_latch.sv`, `edge_pulse_gen.sv`, `pulse_dff.sv` | storage elements |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/rv_asm_pkg.sv` | instruction encoders and a random instruction generator |
| `tb/rv_iss_pkg.sv` | instruction-level reference model of the subset |

Parameters:

- `sc_computer`: `IMEM_WORDS`, `DMEM_WORDS`, `RESET_PC`;
- `riscv_sc_cpu`: `RESET_PC`;
- `edge_pulse_gen` and `pulse_dff`: `INV_STAGES`, `INV_DELAY`;
- `nand_d_latch`: `NAND_DELAY`, `INV_DELAY`.

## Verification

Every testbench checks the outputs against values computed independently. Each one ends
by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_sc_computer` runs the whole top level at its default parameters. It includes:
  - **A log2 program.** It computes y = ⌊log₂ 157⌋ = 7 in a subroutine: `jal` calls it,
    it loops using `slt`, `beq` and `add`, and `jalr` returns. The program then
    exercises `lui`/`ori`, `auipc`, `lw`, `sub`, `and`, `or` and `sw`. The stored
    results are checked, and so is the cycle count: the final instruction is reached
    after exactly 68 clocks for 68 instructions.
  - **40 random programs** that fill the instruction memory. They run in lockstep with
    the reference model `rv_iss_pkg`: the PC, the `illegal` flag and every data-memory
    write are compared each clock.
  - **Mechanism counts.** The test counts every instruction kind, taken and not-taken
    `beq`, discarded `x0` writes, illegal encodings, holds of both latches and flip-flop
    captures.
    One that never occurs is a failure.
- `tb_riscv_sc_cpu` runs the core with testbench memories. It uses the three textbook
  encodings `lw x2,0x400(x0)` = 0x40002103, `add x4,x2,x3` = 0x00310233 and
  `addi x7,x7,4` = 0x00438393, and then 20 random programs of 2000 cycles each against
  the reference model.
- The unit testbenches check each block over directed corner cases and random values.
  For example, `tb_control_unit` checks every row of the control table, and
  `tb_edge_pulse_gen` checks the pulse width for 1- and 3-inverter chains.
  `tb_pulse_dff` checks that the 3-inverter flip-flop captures every edge and that the
  1-inverter one misses changes of `d`.

To run a testbench with plain Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv rtl/rv_pkg.sv tb/tb_sc_computer.sv \
    --top-module tb_sc_computer -Mdir obj_tb
./obj_tb/Vtb_sc_computer +verilator+rand+reset+2
```

Replace `tb_sc_computer` with any other testbench name. Each one takes well under a
second. Lint one module with
`verilator --lint-only -Wall --timing -y rtl rtl/rv_pkg.sv rtl/<module>.sv --top-module <module>`.

## Limitations and departures

- **Instruction set.** Only the subset above is implemented. The classic "find the
  highest set bit" loop that uses `srli` and `bne` cannot run as written. The log2
  program in `tb_sc_computer` computes the same result with `slt` and repeated doubling.
- **`lui` opcode.** `lui` uses the standard RISC-V opcode 0110111, not 0000111, which
  RISC-V assigns to floating-point loads.
- **Memory access.** Loads and stores move whole words only. There is no
  misaligned-access detection.
- **Illegal encodings.** They execute as no-ops (see above) instead of trapping.
  Compressed 16-bit encodings (low bits other than `11`) fall in this class: every
  instruction is one 32-bit word, and the PC always advances by 4.
- **Processor state.** The only state is the PC, `x0`–`x31` and the memories. There is
  no status word, interrupt mask, floating-point register or control/status register.
- **Choices of this design.** The following are not prescribed by the basic single-cycle
  organisation:
  - memory sizes (1024 words each);
  - reset value (0x200) and synchronous reset;
  - register-file reset;
  - the program-load port;
  - the suppression of stores during reset;
  - the ALU and immediate-type codes.
- **Storage elements.** `d_latch` is the register-transfer-level latch, and
  `nand_d_latch` is its gate-level timing model. The flip-flop is built on the gate-level
  latch. The gate-level latch, the pulse generator and the flip-flop assume 1 ns gate delays.
