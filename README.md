# LC-3 processor in SystemVerilog

The LC-3 is a small teaching computer. It has 16-bit words, a 16-bit
word-addressed memory (65,536 words), eight general registers R0–R7, three
condition-code bits N, Z and P, and an instruction set of three kinds:

- operations on the ALU: ADD, AND and NOT;
- data movement between registers and memory, with four addressing modes:
  PC-relative (LD, ST), indirect (LDI, STI), base + offset (LDR, STR) and
  immediate (LEA);
- control flow: conditional branch BR, JMP and TRAP.

This RTL implements that machine as a multicycle processor. Its main idea is
that the datapath has a single 16-bit bus. Each clock cycle, exactly one
source drives the bus and any number of registers may load from it, so an
instruction is a short sequence of bus transfers. A finite state machine
steps through those transfers. The state machine, the memory handshake and
some encodings are this design's own choices; they are marked as such below.

## Instructions executed

`IR[15:12]` is the opcode. DR, SR and SR1 are 3-bit register fields.
`SEXT(x)` sign-extends a field to 16 bits. `PC` is always the address of the
instruction plus one, because the PC is incremented during fetch.

| opcode | instruction | format (bits 11..0) | effect | sets N/Z/P |
|---|---|---|---|---|
| 0001 | ADD | DR, SR1, 0 00 SR2 / 1 imm5 | DR ← SR1 + (SR2 or SEXT(imm5)) | yes |
| 0101 | AND | same as ADD | DR ← SR1 & (SR2 or SEXT(imm5)) | yes |
| 1001 | NOT | DR, SR1, 111111 | DR ← ~SR1 | yes |
| 0010 | LD  | DR, PCoffset9 | DR ← M[PC + SEXT(off9)] | yes |
| 1010 | LDI | DR, PCoffset9 | DR ← M[M[PC + SEXT(off9)]] | yes |
| 0110 | LDR | DR, BaseR, offset6 | DR ← M[BaseR + SEXT(off6)] | yes |
| 1110 | LEA | DR, PCoffset9 | DR ← PC + SEXT(off9) (no memory access) | yes |
| 0011 | ST  | SR, PCoffset9 | M[PC + SEXT(off9)] ← SR | no |
| 1011 | STI | SR, PCoffset9 | M[M[PC + SEXT(off9)]] ← SR | no |
| 0111 | STR | SR, BaseR, offset6 | M[BaseR + SEXT(off6)] ← SR | no |
| 0000 | BR  | n z p, PCoffset9 | if (nN + zZ + pP) PC ← PC + SEXT(off9) | no |
| 1100 | JMP | 000, BaseR, 000000 | PC ← BaseR | no |
| 1111 | TRAP | 0000, trapvect8 | R7 ← PC; PC ← M[ZEXT(trapvect8)] | no |

Bit 5 of ADD and AND picks the second operand: 0 selects register SR2 in
IR[2:0], and 1 selects the 5-bit immediate in IR[4:0] (−16 to +15). NOT should
have IR[5:0] all ones; the hardware ignores those bits. BR with all three of
n, z and p set always branches, so by convention plain `BR` means `BRnzp`.

Opcodes 0100 (JSR), 1000 (RTI) and 1101 are fetched and ignored. The only
change they make is PC ← PC + 1.

## The bus and its four drivers

Four gates can put a value on the bus:

| gate | source | used for |
|---|---|---|
| GatePC | PC | fetch address to the MAR; the R7 link of TRAP |
| GateMDR | MDR | instruction to the IR; load data to DR; pointer to the MAR (LDI/STI); trap vector to the PC |
| GateALU | ALU output | operate results to DR; store data to the MDR |
| GateMARMUX | MARMUX output | computed addresses to the MAR; LEA result to DR |

Each source reaches the bus through its own gate signal. `lc3_bus` builds
the bus as an AND-OR multiplexer. The bus reads zero when no gate is open. An
assertion checks that at most one gate is open in any cycle.

Registers that load from the bus are the IR, PC (through PCMUX), the register
file (DR), the MAR, the MDR and the condition codes. The condition codes are
computed from the value on the bus, so they always describe the value that
was just written to a register.

## Address generation

All memory addresses, branch targets and LEA results come from one adder
(`lc3_addr_gen`). The adder has two operand multiplexers:

- ADDR1MUX chooses the PC or the SR1 register output. SR1 is the base
  register for LDR, STR and JMP.
- ADDR2MUX chooses 0, SEXT(IR[5:0]), SEXT(IR[8:0]) or SEXT(IR[10:0]).

The sum goes to PCMUX, for branches and JMP. It also goes to MARMUX, which
passes either the sum or ZEXT(IR[7:0]) (a trap vector) to the bus.

| use | ADDR1 | ADDR2 | sum goes to |
|---|---|---|---|
| LD, ST, LDI, STI (first access) | PC | SEXT(IR[8:0]) | MAR, via MARMUX |
| LDR, STR | BaseR (IR[8:6]) | SEXT(IR[5:0]) | MAR, via MARMUX |
| LEA | PC | SEXT(IR[8:0]) | DR, via MARMUX |
| BR (taken) | PC | SEXT(IR[8:0]) | PC, via PCMUX |
| JMP | BaseR (IR[8:6]) | 0 | PC, via PCMUX |
| TRAP | – | – | MARMUX passes ZEXT(IR[7:0]) to the MAR |

PC-relative addresses use the incremented PC. The instruction `LD R3, x09` at
x1480 therefore reads x148A, not x1489. The end-to-end testbench runs exactly
this case.

Indirect mode makes two memory accesses. The first reads a pointer into the
MDR. That pointer goes over the bus into the MAR, and the second access uses
it. PC-relative and indirect modes reach only −256 to +255 words around the
instruction. Base + offset mode reaches any address held in a register.

The SEXT(IR[10:0]) input is part of the standard datapath. No instruction
built here uses it.

## Register file, SR2MUX and ALU

The register file (`lc3_regfile`) has two combinational read ports and one
write port. The write happens at the clock edge when LD.REG is high.

- SR2 is always IR[2:0].
- SR1 is IR[8:6], except for stores. For stores it is IR[11:9], the register
  being stored.
- DR is IR[11:9], or R7 during TRAP.

SR2MUX chooses the SR2 output or SEXT(IR[4:0]), using IR[5].

The ALU (`lc3_alu`) takes its function code ALUK from IR[15:14]: 00 ADD,
01 AND, 10 NOT. This design adds code 11, PASSA, which passes SR1 unchanged.
Stores use it to move the source register over the bus into the MDR.

## Memory and the R handshake

`lc3_memory` is a 2^ADDR_W × 16 array (ADDR_W = 16, so 1 Mbit). The
handshake is this design's own choice:

- The control unit raises `en` (and `we` for a write) and holds it, with the
  MAR and MDR steady, for the whole access.
- The memory raises `ready` (the LC-3 "R" signal) MEM_LATENCY cycles later.
  MEM_LATENCY is 1 by default and must be at least 1.
- Read data is registered. It is valid in the ready cycle, and the MDR
  captures it at the end of that cycle.
- A write takes effect at the end of the ready cycle.
- `en` drops for at least one cycle between accesses, because memory states
  never follow each other directly.
- An assertion checks that the address and direction stay fixed until
  `ready`, and that write data stays fixed too.

Memory contents are not reset. A simulation loads the program, its data and
the trap vector table by writing `u_mem.mem` before releasing reset.

## Control unit

`lc3_control` is a Moore-style FSM. Its outputs depend only on the state, the
opcode and BEN. Every state produces one `ctrl_t` control word, defined in
`lc3_pkg`. Each instruction starts with the same four states:

| state | transfer |
|---|---|
| FETCH1 | MAR ← PC, PC ← PC + 1 |
| FETCH2 | MDR ← M[MAR], waits for R |
| FETCH3 | IR ← MDR |
| DECODE | BEN ← nN + zZ + pP; jump to the opcode's first execute state |

The execute states follow, one bus transfer each:

| instruction | execute states |
|---|---|
| ADD/AND/NOT | OPERATE: DR ← ALU, set CC |
| LEA | LEA: DR ← PC + off9, set CC |
| LD | ADDR_PC; LD_READ (wait R); LD_WB: DR ← MDR, set CC |
| LDR | ADDR_BASE; LD_READ; LD_WB |
| LDI | ADDR_PC; IND_READ (wait R); IND_MAR: MAR ← MDR; LD_READ; LD_WB |
| ST / STR | ADDR_PC or ADDR_BASE; ST_MDR: MDR ← SR; ST_WRITE (wait R) |
| STI | ADDR_PC; IND_READ; IND_MAR; ST_MDR; ST_WRITE |
| BR | BR: PC ← PC + off9 if BEN |
| JMP | JMP: PC ← BaseR |
| TRAP | TRAP1: MAR ← ZEXT(vect8); TRAP2: MDR ← M[MAR] and R7 ← PC (wait R); TRAP3: PC ← MDR |

In TRAP2 the MDR loads from memory while the PC crosses the bus to R7. Both
happen in the same cycle.

A memory state lasts MEM_LATENCY + 1 cycles. With the default one-cycle
memory, the cycles per instruction are:

| instructions | cycles |
|---|---|
| ADD, AND, NOT, LEA, BR, JMP | 6 |
| LD, LDR, ST, STR, TRAP | 9 |
| LDI, STI | 12 |
| ignored opcodes | 5 |

Each extra cycle of memory latency adds one cycle per memory access. An
instruction makes one access for its fetch, plus one for LD, LDR, ST, STR and
TRAP, and two for LDI and STI.

## Condition codes and branches

`lc3_nzp` holds three bits. Exactly one is set: N for a negative value
(bit 15 = 1), Z for zero, and P for a positive value. Reset sets Z.

The codes are loaded whenever an operate instruction, a load or LEA writes a
register. The R7 link written by TRAP does not change them, and neither do
stores. Whether LEA should set the codes differs between descriptions of the
LC-3. Here it does, because it writes the register file.

`lc3_ben` computes the branch condition once, in DECODE, and keeps it in a
register. The BR state then loads the PC only if BEN is 1.

## TRAP and the operating system

TRAP saves the return address in R7 and jumps through a 256-entry vector table
at x0000–x00FF. Every TRAP therefore overwrites R7, so programs should not
keep data there.

The services themselves are software and are not part of this RTL. They are
GETC (x20, read a key into R0), OUT (x21, write R0 to the display) and HALT
(x25). The keyboard and display devices are not part of it either. The
processor has no halt state: after HALT it simply runs whatever code the
vector points to. The testbenches point x25 at a one-instruction loop.

## Reset

`rst_n` is synchronous and active low. It sets:

- PC to RESET_PC (default x3000, where LC-3 user programs usually start);
- the FSM to FETCH1;
- all registers, the IR, the MAR and the MDR to 0;
- N/Z/P to Z, and BEN to 0.

## Choices made in this design

These points are not fixed by the LC-3 description that this RTL follows:

- the state split, the number of states and the 5-bit state encoding;
- the memory handshake and its latency;
- ALUK code 11 as pass-A;
- the bus built as a multiplexer;
- the reset values;
- LEA setting the condition codes;
- the JMP encoding (the standard LC-3 code 1100);
- the TRAP sequence (the standard LC-3 behaviour: R7 ← PC, PC ← vector-table
  entry);
- JSR, RTI and opcode 1101 treated as no-ops;
- the debug outputs of `lc3_top`.

There are no interrupts, no privilege modes and no memory-mapped I/O.

## Files

| file | contents |
|---|---|
| `rtl/lc3_pkg.sv` | opcodes, ALUK, mux select codes, `ctrl_t` control word, `state_t` |
| `rtl/lc3_top.sv` | processor: control + datapath + memory; debug outputs |
| `rtl/lc3_control.sv` | FSM |
| `rtl/lc3_datapath.sv` | IR, bus, and the units below, wired together |
| `rtl/lc3_bus.sv` | bus multiplexer with the one-driver assertion |
| `rtl/lc3_pc.sv` | PC and PCMUX |
| `rtl/lc3_regfile.sv` | R0–R7 |
| `rtl/lc3_alu.sv` | ADD / AND / NOT / PASSA |
| `rtl/lc3_addr_gen.sv` | ADDR1MUX, ADDR2MUX, offset extension, adder, MARMUX |
| `rtl/lc3_sext.sv` | sign-extension helper |
| `rtl/lc3_mar_mdr.sv` | MAR and MDR |
| `rtl/lc3_nzp.sv` | condition codes |
| `rtl/lc3_ben.sv` | branch enable |
| `rtl/lc3_memory.sv` | 64K × 16 memory with the R handshake |

Parameters of `lc3_top`:

- `ADDR_W` (16): the memory has 2^ADDR_W words. Addresses above it wrap.
- `MEM_LATENCY` (1).
- `RESET_PC` (x3000).

## Verification

Each module except the `lc3_sext` helper has a self-checking testbench in
`tb/`; `lc3_sext` is exercised through `tb_lc3_addr_gen` and the datapath
tests. Each one prints
`TB_RESULT checks=N failures=M` and ends with a watchdog.

- **`tb_lc3_top`** tests the whole processor at default parameters. An
  instruction-level reference model runs in lock step with the processor.
  After every instruction it compares the PC, IR, all registers, N/Z/P, any
  stored word and the instruction's cycle count.
  - A directed program covers every instruction and addressing mode, a branch
    taken and one not taken, JMP to x1480, `LD R3, x09` reading x148A, and
    `TRAP x25`. It must take 21 instructions and 159 cycles.
  - Sixteen rounds then run 400 instructions each from fully random memory.
    These also reach the ignored opcodes and TRAPs through random vectors.
  - The test counts every mechanism and fails if one never occurs: each
    addressing mode, both branch outcomes, JMP, TRAP, memory wait cycles, and
    N, Z and P results.
- **`tb_lc3_top_slowmem`** repeats that test with a 3-cycle memory.
- **`tb_lc3_datapath`** plays the control unit itself, issuing the control
  words of 3,000 random instructions, and checks them against a shadow model.
- **`tb_lc3_control`** checks the state sequence, every control word, and the
  wait behaviour under random memory delays for all 16 opcodes.
- The leaf testbenches check their unit against values computed
  independently: random operands plus edge cases such as offset extremes,
  PC wrap-around and the zero and sign boundaries of the condition codes.

To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/lc3_pkg.sv \
    tb/tb_lc3_top.sv --top-module tb_lc3_top -Mdir obj
./obj/Vtb_lc3_top
```

For another testbench, replace `tb_lc3_top` with its name. Every testbench
builds in seconds and runs in well under a second.
