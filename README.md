# SCAT: a stored-program processor in SystemVerilog

SCAT (Small Computer Architecture for Teaching) is a toy machine that shows the
von Neumann idea in its plainest form: the hardware has no built-in algorithm.
Program and data both live as bits in one byte-addressed memory. The processor
loops forever: it fetches the word at its program counter, decodes it, executes
it, and moves on to the next word.

This RTL implements a SCAT processor, a memory, and a small top level that joins
them. It covers the whole instruction set defined so far: sixteen ALU
instructions in two formats. It is multi-cycle and deliberately simple, with one
clock cycle per step of the fetch/decode/execute loop.

## The machine seen by a program

- **Registers.** There are sixteen 32-bit registers, R0 to R15.
  - R0 always reads 0, and writes to it are dropped.
  - R15 is the program counter (PC). It holds the address of the instruction
    being executed.
  - R1 to R14 are free for the program.
- **Memory.** Memory is an array of bytes, each with its own address.
  - An instruction is one 32-bit word, so a fetch reads four bytes at once.
  - The PC advances by 4 after each instruction.
  - Words are big-endian: the word `20100006` at address 0 is stored as the
    bytes `20 10 00 06` at addresses 0 to 3.
- **Instructions.** Every instruction computes `rd = rs1 op operand2`.

```
 31   28 27   24 23   20 19   16 15   12 11            0
+-------+-------+-------+-------+-------+---------------+
| 0001  |  op   |  rd   |  rs1  |  rs2  |   (ignored)   |   type 1: operand2 = R[rs2]
+-------+-------+-------+-------+-------+---------------+
| 0010  |  op   |  rd   |  rs1  |      imm[15:0]        |   type 2: operand2 = sxt(imm)
+-------+-------+-------+-------+-----------------------+
```

| op | type 1 | type 2 | result |
|----|--------|--------|--------|
| 0 | `add` 0x10 | `addi` 0x20 | rs1 + x |
| 1 | `sub` 0x11 | `subi` 0x21 | rs1 - x |
| 2 | `mul` 0x12 | `muli` 0x22 | low 32 bits of rs1 * x |
| 3 | `div` 0x13 | `divi` 0x23 | signed quotient, truncated toward zero |
| 4 | `mod` 0x14 | `modi` 0x24 | signed remainder, sign of rs1 |
| 5 | `or`  0x15 | `ori`  0x25 | rs1 \| x |
| 6 | `and` 0x16 | `andi` 0x26 | rs1 & x |
| 7 | `xor` 0x17 | `xori` 0x27 | rs1 ^ x |

The immediate is a 16-bit two's complement number. It is sign-extended by
copying bit 15 into bits 31 to 16, so `ori r1, r0, 0xF0F0` gives
`0xFFFFF0F0`, not `0x0000F0F0`.

Examples: `addi r1, r2, 4` is `0x20120004`; `xor r3, r8, r1` is
`0x17381000`; `0x11261000` is `sub r2, r6, r1`.

## The instruction cycle, cycle by cycle

The sequencer (`scat_control`) has four states. An instruction takes exactly
**3 clock cycles**.

| state | what happens | strobes |
|-------|--------------|---------|
| FETCH (0) | The memory unit drives `addr = PC` with a read strobe. | `fetch` |
| DECODE (1) | The word arrives from memory and the decoder splits it into fields. At the clock edge the word goes into the instruction register and the fields go into `dec_q`. An unknown opcode sends the machine to HALT. | `ir_load` |
| EXECUTE (2) | The register file reads `rs1` and `rs2`; the ALU's second input is `rs2` or the immediate. At the clock edge `rd` is written and R15 advances by 4. | `execute` |
| HALT (3) | Nothing happens until reset. | – |

Memory reads are synchronous, with data one cycle after the strobe. That is why
decoding happens in the cycle after FETCH. The decoder looks at the memory's
read data directly during DECODE, so no cycle is spent waiting.

A program of *n* instructions ending in an unknown opcode runs in
`3n + 2` cycles from reset: 3 per instruction, plus FETCH and DECODE of the
word that halts it. `instr_count` counts instructions that completed EXECUTE.

### R15 as a register

- **Reading R15** gives the address of the instruction being executed. The
  increment happens only at the end of EXECUTE.
- **Writing R15** is treated as "write, then advance". The written value
  replaces the PC, and the end-of-cycle increment of 4 is applied to it. So
  `addi r15, r0, 0x80` continues at address `0x84`. This makes every write to
  R15 a jump. The instruction set does not spell this case out; the choice
  follows the rule that the PC is incremented at the end of every cycle.

### Ending a program

The instruction set defines no halt instruction. Any opcode byte other than
0x10–0x17 and 0x20–0x27 stops the processor: `halted` rises, the PC stays
on the offending word, and only reset restarts it. The word `0x00000000` is a
convenient end marker. This halting rule is this design's own.

### Division corner cases

These results are this design's own choices:

- Division by zero gives a quotient of `0xFFFFFFFF` and a remainder equal to
  the dividend.
- `-2^31 / -1` gives `-2^31`, with a remainder of 0.

## Blocks

```
scat_system
 ├─ scat_cpu
 │   ├─ scat_control      state machine, decoded-instruction register, instruction counter
 │   ├─ scat_memory_unit  address driver, instruction register
 │   ├─ scat_decoder      fields, sign extension, illegal-opcode flag
 │   ├─ scat_regfile      R0 = 0, R1..R14, R15 = PC; 2 read ports, 1 write port, debug port
 │   └─ scat_alu          the eight operations
 └─ scat_memory           byte array, big-endian word access, synchronous read
```

`scat_pkg` holds the shared types:
- `decoded_t`, the decoded instruction;
- `mem_req_t`, a memory request with read strobe, write strobe, byte address and
  write data;
- the enums for the instruction type, the ALU operation and the state.

The memory unit only fetches, because no load or store instruction exists yet.
The memory and the request struct already carry a write path, and the host
port uses it.

## Top-level interface (`scat_system`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; everything is on the rising edge |
| `rst_n` | in | 1 | synchronous, active low. It clears R1–R14, sets PC = `RESET_PC` and enters FETCH. Memory is not cleared. |
| `host_we`, `host_addr`, `host_wdata` | in | 1, 32, 32 | Writes one big-endian word into memory per cycle. It takes priority over the processor and is meant for loading a program while `rst_n` is low. |
| `dbg_reg_sel` / `dbg_reg_data` | in / out | 4 / 32 | combinational read of any register (R15 gives the PC) |
| `pc` | out | 32 | R15 |
| `state` | out | 2 | 0 fetch, 1 decode, 2 execute, 3 halted |
| `halted` | out | 1 | stopped on an unknown opcode |
| `instr_count` | out | 32 | instructions executed since reset |

| parameter | default | meaning |
|-----------|---------|---------|
| `MEM_BYTES` | 4096 | Memory size in bytes; must be a power of two. Addresses wrap modulo the size. |
| `RESET_PC` | 0 | address of the first instruction |

To run a program: hold `rst_n` low, write the words with `host_we`, then
release `rst_n`. Wait for `halted`, then read the results through the debug port.

## What is specified and what is chosen

Taken from the SCAT definition:
- the register set, with R0 = 0 and R15 = PC;
- the 32-bit word format and field positions;
- the sixteen opcodes and their operations;
- 16-bit sign-extended immediates;
- byte-addressed memory, word fetches and PC + 4;
- the fetch/decode/execute loop;
- the big-endian byte order, as shown by an assembler listing.

Chosen here, because the definition is silent:
- one cycle per step;
- synchronous memory read;
- signed division and its corner cases;
- what a write to R15 does;
- halting on unknown opcodes;
- reset values;
- a memory size of 4 KiB;
- the host loading port and the debug outputs.

The assembler and simulator that go with the machine are software and are not
part of this RTL; the testbenches assemble their programs with small helper
functions.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Example with
Verilator 5:

```
verilator --binary --timing --assert --top-module tb_scat_system \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/scat_pkg.sv tb/scat_asm_pkg.sv tb/tb_scat_system.sv
obj_dir/Vtb_scat_system
```

`tb/scat_asm_pkg.sv` has the testbench helpers:
- `rr()` and `ri()` assemble instructions;
- `ref_alu()` is a 64-bit reference ALU;
- `iss_step()` is an instruction-set model;
- a program loads the example register values R1 = 7, R2 = 0x1234, …,
  R14 = 0x100.

What the testbenches cover:

- `tb_scat_system` runs the full design at its default parameters, in lockstep
  with the instruction-set model. After every instruction it checks the PC and
  the register written, and at the end it checks the cycle count. It runs:
  - the three-instruction program `addi r1,r0,6; addi r2,r0,7; mul r3,r1,r2`,
    with R3 = 42 and its machine code checked against
    `20100006 20200007 12312000`;
  - the example register state, followed by the worked instructions;
  - a directed program that uses all sixteen opcodes, writes to R0, reads and
    writes R15, and divides by zero;
  - 600 random instructions.

  It counts how often each mechanism happens and fails if one never does.
- `tb_scat_cpu` runs the processor against a memory model in the testbench. It
  checks each worked instruction on the example state, jumps through R15, and
  20 random programs.
- Unit testbenches cover the ALU, the decoder, the register file, the memory,
  the memory unit and the sequencer. They check against values worked out by
  hand, corner cases and shadow models.

A Verilator warning about one unused bit of `dec_q` (the illegal flag in
`scat_cpu`) is expected. That bit is consumed only by the sequencer's
assertion.
