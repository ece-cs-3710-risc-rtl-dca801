# A 16-bit teaching RISC processor, two-stage pipeline

This is a small load/store processor with a 16-bit datapath. Every instruction is one 16-bit
word. Almost every instruction names registers in a 16-entry register file, and the memory is
addressed in whole 16-bit words (64 Ki words, i.e. 128 KiB). The instruction set is built around a
compare-then-branch style: `CMP`/`CMPI` set flags in a program status register (PSR), and `Bcond`,
`Jcond` and `Scond` test those flags through a 4-bit condition code.

The RTL implements the complete instruction set except the interrupt and exception instructions.
That covers all of the core subset that course projects must support, plus `ADDU`, `ADDC`, `SUBC`,
`MUL`, `ASHU`, `SNXB`, `ZRXB`, `Scond`, `TBIT`, `LPR`, `SPR` and `WAIT`. Instruction and data
memories are separate (a Harvard organisation). That split is what makes a simple two-stage
pipeline possible.

## Instruction word

```
 15     12 11      8 7       4 3       0
+---------+---------+---------+---------+
| opcode  |  Rdest  | ext/ImmHi| Rsrc/ImmLo|
+---------+---------+---------+---------+
```

* Opcode `0000` (register class), `0100` (special class) and `1000` (shift class) use bits [7:4]
  as an extended opcode. Bits [3:0] then hold a second register.
* Every other opcode is an immediate form, with the byte in bits [7:0]. `ADDI`, `ADDUI`,
  `ADDCI`, `SUBI`, `SUBCI`, `CMPI` and `MULI` sign-extend the byte. `ANDI`, `ORI`, `XORI` and
  `MOVI` zero-extend it. `LUI` puts it in the upper byte.
* The register fields are not always in the same place. `SPR Rproc, Rdest` writes the register
  in bits [3:0]. `STOR Rsrc, Raddr` stores the register in bits [11:8]. `Bcond` and `Jcond` carry
  the condition in bits [11:8]. `Scond` carries it in bits [3:0].

All encodings are in `rtl/risc_pkg.sv`:

* `opcode_e` holds the primary opcodes.
* `RX_*`, `SX_*` and `HX_*` hold the extended opcodes.
* `cond_e` holds the condition codes.

| opcode | class    | opcode | class |
|--------|----------|--------|-------|
| 0000   | register: WAIT AND OR XOR · ADD ADDU ADDC · SUB SUBC CMP · MOV MUL | 1000 | shift: LSHI(000s) ASHUI(001s) LSH(0100) ASHU(0110) |
| 0001–0011 | ANDI ORI XORI | 1001–1011 | SUBI SUBCI CMPI |
| 0100   | special: LOAD LPR SNXB DI · STOR SPR ZRXB EI · JAL RETX TBIT EXCP · Jcond Scond TBITI | 1100 | Bcond |
| 0101–0111 | ADDI ADDUI ADDCI | 1101–1111 | MOVI MULI LUI |

## Flags and conditions: the part to read carefully

The PSR is laid out, most significant bit first, as `r r r r I P E 0 N Z F 0 0 L T C`. That puts
C in bit 0, L in bit 2, F in bit 5, Z in bit 6, N in bit 7 and E in bit 9.

Each instruction group writes only its own flags:

| instructions | flags written | meaning |
|---|---|---|
| ADD, ADDI, ADDC, ADDCI, SUB, SUBI, SUBC, SUBCI | C, F | C = carry out (add) or borrow (subtract); F = two's complement overflow |
| CMP, CMPI | Z, L, N | Z = operands equal; L = Rsrc > Rdest unsigned; N = Rsrc > Rdest signed |
| TBIT, TBITI | F | F = bit `offset` of Rsrc |
| LPR | all | PSR ← register, with reserved and zero bits kept 0 |
| everything else | none | ADDU, MUL, logic, shifts, moves and loads leave the PSR alone |

A consequence catches many people: ADD does not set Z or N, and CMP does not set C or F. To
branch on the result of an add, compare it first.

The ordering of CMP is also easy to get backwards. `CMP Rsrc, Rdest` computes Rdest − Rsrc and
sets L and N when the **source** is the larger value. The conditions read the flags this way:

| code | name | true when | code | name | true when |
|---|---|---|---|---|---|
| 0000 | EQ | Z | 1000 | FS | F |
| 0001 | NE | !Z | 1001 | FC | !F |
| 0010 | CS | C | 1010 | LO | !L & !Z |
| 0011 | CC | !C | 1011 | HS | L \| Z |
| 0100 | HI | L | 1100 | LT | !N & !Z |
| 0101 | LS | !L | 1101 | GE | N \| Z |
| 0110 | GT | N | 1110 | UC | always |
| 0111 | LE | !N | 1111 | —  | never |

So after `CMP R1, R2`, `BGT` is taken when R1 > R2 (signed), and `BLT` is taken when R1 < R2. In
hardware, N is formed as `L ^ sign(Rsrc) ^ sign(Rdest)` from the borrow of the subtraction
(`rtl/risc_alu.sv`).

ADDC/ADDCI add the C flag in. SUBC/SUBCI subtract it, so C acts as a borrow-in for multi-word
subtraction.

## Shifts

`LSH` and `ASHU` take the shift count from a register. `LSHI` and `ASHUI` take a 5-bit count
`{s, ImmLo}` from bits [4:0] of the instruction. In both cases the count is two's complement:
positive counts shift left and negative counts shift right. `LSH` fills a right shift with zeros.
`ASHU` fills it with the sign bit. The count is meant to lie in −15..+15. The hardware uses the
low 5 bits of the register, so −16 is also accepted: it clears the word (LSH) or spreads the sign
bit over it (ASHU).

## Pipeline and timing

```
            fetch                          execute
  pc_f ──► instruction memory ──► IR ──► decode ─ regfile ─ ALU / shifter / cond ─► regfile, PSR
   ▲        (synchronous read)                         │
   └────────── next PC / branch target ◄───────────────┘          LOAD/STOR ─► data memory
```

* **Fetch.** `pc_f` addresses the instruction memory. Its registered output is the instruction
  register. `pc_x` and `valid_x` follow it into execute.
* **Execute.** Decode, register read, ALU, shifter and condition logic all run in one cycle.
  The result is written back at the clock edge that ends that cycle. The next instruction
  therefore reads it from the register file directly, so no bypass network is needed.
* **Taken jump.** `Bcond`, `Jcond` and `JAL` resolve in execute. When one is taken, the
  instruction fetched behind it is squashed (`valid_x` ← 0) and fetch restarts at the target.
  A taken jump costs 2 cycles and an untaken branch costs 1. There is no delay slot.
* **Load.** The data memory reads synchronously (block-RAM style), so `LOAD` stays in execute
  for 2 cycles. Fetch stalls in the first cycle, and the loaded word is written to Rdest in the
  second. `STOR` takes 1 cycle. A `LOAD` that follows a `STOR` to the same address returns the
  new value.
* **WAIT.** `WAIT` (`0x0000`) raises `halted` and freezes the core until reset. No interrupt
  logic exists, and that is how the instruction is defined when interrupts are not implemented.

From the release of reset to `halted`, the cycle count is:
`1 + (instructions executed) + (LOADs) + (taken jumps)`. The end-to-end testbench checks this
count for every program.

The branch and jump targets work as follows:

* `Bcond` goes to *its own address* + the sign-extended 8-bit displacement.
* `Jcond` goes to the address in Rtarget.
* `JAL Rlink, Rtarget` saves (its address + 1) in Rlink and goes to Rtarget.
* `JUC Rlink` (Jcond with UC) returns from a call.

## Using the core

`risc_cpu` is the top module. Its parameters `IMEM_AW` and `DMEM_AW` (default 16 and 16) set the
two memory sizes to 2^AW words each.

| port | direction | use |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset (PC, registers and PSR clear to 0) |
| `prog_we`, `prog_addr`, `prog_data` | in | write the instruction memory, normally while in reset |
| `host_en`, `host_we`, `host_addr`, `host_wdata`, `host_rdata` | in/out | second port of the data memory; read data arrives one cycle after `host_en` |
| `halted` | out | WAIT has executed |
| `psr` | out | current PSR, for an external interrupt controller or a debugger |
| `pc` | out | current fetch address |

The memories are not initialised. Load the program and any data through the two host ports
before releasing reset. When both ports write the same data word in the same cycle, the
processor port wins.

## Files

| file | content |
|---|---|
| `rtl/risc_pkg.sv` | encodings, PSR bit positions, internal enums, the `ctrl_t` control bundle |
| `rtl/risc_cpu.sv` | top: pipeline registers, stall/squash control, write-back multiplexer |
| `rtl/risc_decoder.sv` | instruction → `ctrl_t` |
| `rtl/risc_regfile.sv` | 16 × 16 registers, two read ports, one write port |
| `rtl/risc_alu.sv` | add/sub with carry, logic, move, multiply, LUI, byte extension, flags |
| `rtl/risc_shifter.sv` | signed-count logical/arithmetic shifter |
| `rtl/risc_cond.sv` | condition code → taken |
| `rtl/risc_psr.sv` | PSR with per-class flag updates, LPR, EI/DI |
| `rtl/risc_pc.sv` | fetch PC, relative/absolute target, link address |
| `rtl/risc_imem.sv`, `rtl/risc_dmem.sv` | instruction memory (1R + 1W), data memory (2 × RW) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## What is interpretation rather than specification

The instruction set fixes the encodings, the flag rules, the condition table and the PSR layout.
The following choices belong to this implementation:

* **Organisation.** The pipeline arrangement, the synchronous memories, the one-cycle load
  stall and the squash-on-taken-jump policy are all this implementation's.
* **Reset and host ports.** Everything resets to 0, including the registers, and execution
  starts at address 0. The program-load port and the host data port are additions.
* **`LUI`.** It writes `imm << 8`, clearing the low byte. It does not merge the immediate into
  the old low byte.
* **`Bcond`.** The displacement is counted from the branch instruction itself, not from the
  instruction after it.
* **`LPR`/`SPR`.** They ignore the Rproc field, because the PSR is the only processor register.
* **Interrupt instructions.** `EI`/`DI` set and clear PSR.E, but nothing reads E. `EXCP`, `RETX`
  and all unused opcodes execute as no-operations. The I, P and T bits can be written only by
  `LPR`. No tracing or interrupt behaviour is attached to them.
* **R0.** It is an ordinary register. `NOP` is simply `OR R0, R0`.

Not implemented:

* interrupt and exception handling: no request input, vector table or saving of PC/PSR is
  defined;
* application-specific I/O devices.

The `psr` output and the host data port are the natural places to attach either one.

## Verification

Each module has a self-checking testbench. Each one compares the module against values the
testbench computes itself, for example with integer arithmetic for the ALU or bit by bit for the
shifter. Each ends by printing `TB_RESULT checks=N failures=M`.

`tb/tb_risc_cpu.sv` runs the top at its default sizes. It contains an independent
instruction-level model of the machine and runs two kinds of program:

* A hand-written program: a counting loop with a backward branch, a subroutine called with
  `JAL` and left with `JUC`, then a store and a reload. Its result is also checked against the
  hand-computed value 110.
* 300 random programs of 160 instructions. They use every instruction kind, with forward-only
  branches and jumps so that they always reach `WAIT`.

After each program the testbench compares all registers, the PSR, data words 0–255 and the
cycle count with the model. It also counts how often each pipeline event happened: taken jumps
with their squashed fetches, untaken branches, load stalls, stores, JAL, halt, each flag class,
LPR/SPR, Scond and shifts. If any of them never happened, that counts as a failure. Assertions
in `risc_cpu` check that a load's second cycle always follows its first and that a redirect never
coincides with a stall.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/risc_pkg.sv rtl/risc_regfile.sv rtl/risc_alu.sv rtl/risc_shifter.sv rtl/risc_cond.sv \
  rtl/risc_psr.sv rtl/risc_decoder.sv rtl/risc_pc.sv rtl/risc_imem.sv rtl/risc_dmem.sv \
  rtl/risc_cpu.sv tb/tb_risc_cpu.sv --top-module tb_risc_cpu -o sim
./obj_dir/sim
```

A module's own test needs only `rtl/risc_pkg.sv`, the module and its testbench. The whole
end-to-end run takes well under a second.

## Extending it

New instructions should go in the unused encodings:

* register class: extended opcodes 0100, 1000, 1100 and 1111;
* special class: extended opcode 1111;
* shift class: extended opcodes 0101, 0111 and 1xxx.

Decode them in `risc_decoder.sv`. If they need a new result source, add it to `wbsel_e`. If a new
instruction needs more than one cycle, reuse the `stall`/`load_wait` pattern in `risc_cpu.sv`.
