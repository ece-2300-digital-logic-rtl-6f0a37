# A 16-bit teaching processor in four steps: state machine, control words, instructions, pipeline

This RTL builds one small 16-bit datapath and four ways of controlling it. Each
one is a step from fixed hardware towards a real processor:

0. **`fsm_mul`: a hard-wired state machine.** A ten-state controller
   (`fsm_mul_ctrl`) waits for Start and then issues the nine control words
   of a shift-and-add multiplication. It loops on the ALU zero flag. It can
   do nothing else.
1. **`cw_cpu`: control words in ROM.** A program counter steps through a ROM.
   Each word of the ROM is a complete *control word*: it gives every select
   and enable of the datapath for one clock cycle. A 3-bit branch select
   picks a condition flag. When that flag is set, the PC jumps by a signed
   offset. The ROM holds a shift-and-add multiplier.
2. **`sc_cpu`: single-cycle instruction-set processor.** The ROM becomes an
   instruction RAM. Its 16-bit instructions are shorter than control words
   and do not depend on the hardware. A combinational *instruction decoder*
   rebuilds the control word. Memory is addressed by byte, so the PC moves
   by 2 and branch offsets are doubled. Every instruction takes one cycle.
3. **`pipe_cpu`: five-stage pipeline.** The same instruction set runs on the
   datapath cut into IF, ID, EX, MEM and WB by four pipeline registers. Up to
   five instructions are in flight at once. A straight run of N instructions
   finishes in N + 4 cycles, so the cycle count per instruction approaches 1.

`lecture17_top` places all four side by side. They share only the clock.

## The shared datapath

Every machine has the same parts in the same order:

```
        SA,SB            MB                 FS                MW         MD
          |               |                  |                 |          |
PC -> program -> RF --DataA--------------> ALU --F (M_address)--> RAM --> mux --> RF D_in (if LD)
                    --DataB--+--> mux ----^   |       DataB --> Data_in    ^
                             |    ^ IMM       +-- V C Z N --> BS mux --> MP  (branch taken)
                             +------------------------------------------- F ---+
```

* **Register file** (`regfile`): eight 16-bit registers, R0 to R7. It has two
  combinational read ports, SA to DataA and SB to DataB, and one write port
  (DR, D_in) that writes at the clock edge when LD is 1. R0 is an ordinary
  register, not a constant zero. Programs clear it with `R0 <- R0 - R0`.
* **MB mux**: selects DataB or the immediate as the ALU's B operand.
* **ALU** (`alu`): ADD, SUB, SRA, SRL, SLL, AND and OR. The shifts move
  operand A by one place. SRL and SLL shift in a 0. SRA repeats the sign bit.
  - Z and N describe every result.
  - C is the carry out of the adder. SUB is computed as A + ~B + 1, so
    C = 1 means "no borrow".
  - V is signed overflow of ADD and SUB.
  - The other operations set C and V to 0.
* **Memory**: the ALU result is the address and DataB is the store data.
  The **MD mux** selects what is written back: the ALU result or the loaded
  value.
* **Branch condition mux** (`branch_mux`): the 3-bit BS field selects MP:

  | BS  | MP  | branch type      |
  |-----|-----|------------------|
  | 000 | 0   | never            |
  | 001 | 1   | always           |
  | 010 | Z   | if zero          |
  | 011 | Z'  | if not zero      |
  | 100 | N   | if < 0           |
  | 101 | N'  | if >= 0          |
  | 110 | C   | if carry out     |
  | 111 | V   | if overflow      |

  A branch tests the flags of the ALU operation in the same control word.
  For example, "if R4 = 0" is the word `R4 - 0` with BS = 010.

The control-word fields are DR, SA, SB, IMM, MB, FS, MD, LD, MW, BS and OFF.
The shared struct types are in `isa_pkg`.

## Step 0: the state-machine multiplier (`fsm_mul`, `fsm_mul_ctrl`)

The controller has states 0 to 9. State k drives control word Sk below. In
state 0 no register or memory is written, and `busy` is low.

| state | operation       | next state                  |
|-------|-----------------|-----------------------------|
| 0     | idle            | 1 on Start, else 0          |
| 1     | R0 <- R0 - R0   | 2                           |
| 2     | R1 <- M[R0]     | 3                           |
| 3     | R2 <- M[R0+1]   | 4                           |
| 4     | R3 <- R3 - R3   | 5                           |
| 5     | R4 <- R2 & 1    | 7 if Z (bit is 0), else 6   |
| 6     | R3 <- R3 + R1   | 7                           |
| 7     | R1 <- SLL(R1)   | 8                           |
| 8     | R2 <- SRL(R2)   | 9 if Z (R2 now 0), else 5   |
| 9     | M[R0+2] <- R3   | 0                           |

Z is the zero flag of the ALU operation in the same state. The datapath is
the one above without the PC and branch parts. The RAM is addressed by
word, and the IMM field is 4 bits, sign-extended. The machine is busy for
5 + Σ(3 + bit) cycles.

## Step 1: the control-word machine (`cw_cpu`, `cw_rom`, `cw_ram`)

Each cycle executes the ROM word at the PC:

* If MP = 1, the next PC is `PC + sext(OFF)`.
* Otherwise the next PC is `PC + 1`.

The offset counts from the branch word itself. The IMM field is
sign-extended before the MB mux. Data is 16 bits wide. The RAM holds 16-bit
words and is addressed by word.

The ROM (`cw_rom`) holds this program. It multiplies `M[0]` by `M[1]` into
`M[2]`, modulo 2^16:

| addr | operation          | addr | operation                      |
|------|--------------------|------|--------------------------------|
| 0    | R0 <- R0 - R0      | 6    | R3 <- R3 + R1                  |
| 1    | R1 <- M[R0]        | 7    | R1 <- SLL(R1)                  |
| 2    | R2 <- M[R0+1]      | 8    | R2 <- SRL(R2)                  |
| 3    | R3 <- R3 - R3      | 9    | if R2 != 0 goto 4 (OFF = -5)   |
| 4    | R4 <- R2 & 1       | 10   | M[R0+2] <- R3                  |
| 5    | if R4 = 0 goto 7 (OFF = +2) | 11.. | branch always by 0 (stop) |

The program stops at location 11 and the PC stays there. Fields marked as
"don't care" in the program are stored as 0.

Cycle count: 5 + Σ(5 + bit) cycles, taken over the bits of the multiplier
up to its highest 1, with at least one pass of the loop.

## Step 2: the instruction set and the single-cycle machine (`sc_cpu`)

### Formats

```
 15   12 11   9 8    6 5    3 2    0
+-------+------+------+------+------+
|  OP   |  RS  |  RT  |  RD  |FUNCT |   R format (register to register)
+-------+------+------+------+------+
|  OP   |  RS  |  RT  |     IMM     |   I format (immediate, memory, branch)
+-------+------+------+-------------+
```

| instruction         | OP   | FUNCT | meaning                                   |
|---------------------|------|-------|-------------------------------------------|
| ADD rd,rs,rt        | 1111 | 000   | R[rd] = R[rs] + R[rt]                     |
| SUB rd,rs,rt        | 1111 | 001   | R[rd] = R[rs] - R[rt]                     |
| SRA rd,rs           | 1111 | 010   | R[rd] = R[rs] >>> 1                       |
| SRL rd,rs           | 1111 | 011   | R[rd] = R[rs] >> 1                        |
| SLL rd,rs           | 1111 | 100   | R[rd] = R[rs] << 1                        |
| AND rd,rs,rt        | 1111 | 101   | R[rd] = R[rs] & R[rt]                     |
| OR rd,rs,rt         | 1111 | 110   | R[rd] = R[rs] \| R[rt]                    |
| NOP / HALT          | 0000 | 000 / 001 | nothing / stop                        |
| LW rt,imm(rs)       | 0001 |       | R[rt] = word at R[rs] + sext(imm)         |
| LB rt,imm(rs)       | 0010 |       | R[rt] = sext(byte at R[rs] + sext(imm))   |
| SW rt,imm(rs)       | 0011 |       | word at R[rs] + sext(imm) = R[rt]         |
| SB rt,imm(rs)       | 0100 |       | byte at R[rs] + sext(imm) = R[rt][7:0]    |
| ADDI rt,rs,imm      | 0101 |       | R[rt] = R[rs] + sext(imm)                 |
| ANDI rt,rs,imm      | 0110 |       | R[rt] = R[rs] & zext(imm)                 |
| ORI rt,rs,imm       | 0111 |       | R[rt] = R[rs] \| zext(imm)                |
| BEQ / BNE rt,rs,off | 1000 / 1001 | | if R[rs] ==/!= R[rt]: PC = PC + sext({off,0}) |
| BGEZ / BLTZ rs,off  | 1010 / 1011 | | if R[rs] >= 0 / < 0: PC = PC + sext({off,0})  |

### The decoder (`inst_decoder`)

The decoder is combinational. It produces the control word for each
instruction as follows:

* **R format**: DR = RD, SA = RS, SB = RT, MB = 0, FS = FUNCT, LD = 1. The
  ALU select codes are the FUNCT codes on purpose, so FUNCT passes straight
  through.
* **Loads**: MB = 1, FS = ADD, MD = 1, LD = 1, DR = RT.
* **Stores**: MB = 1, FS = ADD, MW = 1. The store data comes from RT.
* **BEQ and BNE**: compute `R[rs] - R[rt]` and test Z or Z'.
* **BGEZ and BLTZ**: compute `R[rs] - 0` (MB = 1 with an immediate of 0)
  and test N' or N.

The immediate leaves the decoder already extended: with zeros for ANDI and
ORI, with the sign bit for everything else.

Two extra bits go beyond the named control-word fields:

* `mbyte` selects a byte access (LB, SB) or a word access (LW, SW).
* `halt` marks HALT.

The following decode as NOP: FUNCT 111 of the R format, and opcodes 1100
to 1110.

### Memory

Memory is addressed by byte. A word at address A is the byte at A (bits
7:0) and the byte at A + 1 (bits 15:8). Any address is allowed, odd ones
included.

Instructions sit at even addresses. The PC advances by 2. A branch adds its
offset, shifted left by one, to its own address. So `BEQ` at instruction 5
with offset 2 continues at instruction 7.

Both RAMs cover the whole 16-bit address space (64 KiB each) and read
combinationally:

* `inst_ram` has a word-wide load port for placing a program.
* `data_ram` has a second read/write port for placing operands and reading
  results.

### Timing and HALT

The next state is computed combinationally from the current instruction,
so each instruction takes exactly one cycle. HALT holds the PC on itself,
and `halted` stays high while it does. Reset (synchronous, active high)
clears the PC and all registers. Hold reset while loading a program.

## Step 3: the pipeline (`pipe_cpu`)

### Stages

| stage | hardware                                                                 | register after it |
|-------|---------------------------------------------------------------------------|-------------------|
| IF    | PC addresses the instruction RAM; PC + 2                                  | IF/ID: valid, PC, instruction |
| ID    | decoder, register file read, immediate, branch adder `PC + sext({OFF,0})` | ID/EX: valid, control word, DataA, DataB, target |
| EX    | MB mux, ALU, CU (branch mux on V C Z N) gives PCJ                         | EX/MEM: ALU result, store data, DR, LD, MW, MD, size, halt |
| MEM   | data RAM; MD mux (LB sign-extends)                                        | MEM/WB: result, DR, LD, halt |
| WB    | register file writes DR when LD is 1                                      | (none) |

The PC register has two controls:

* **PCJ** loads the branch target carried in ID/EX. PCJ is MP from EX,
  gated by that stage's valid bit.
* **PCL** allows PC + 2. It drops once a HALT has been decoded.

DR, LD and the other control bits travel with their instruction, so the
register file writes back to the right register four cycles after decode.
A valid bit marks the bubbles that reset and HALT create. Without it, those
bubbles would look like real instructions.

### Throughput

```
cycle        1   2   3   4   5   6   7   8   9
instr 1      IF  ID  EX  MEM WB
instr 2          IF  ID  EX  MEM WB
instr 3              IF  ID  EX  MEM WB
instr 4                  IF  ID  EX  MEM WB
instr 5                      IF  ID  EX  MEM WB
```

N instructions take N + 4 cycles, so cycles per instruction = (N + 4) / N.
Each stage does one step of the single-cycle machine, so the clock period
can be about one step rather than the whole instruction. The RTL itself
carries no delays.

### What software must respect (no hazard hardware)

The pipeline detects no hazards: it has no forwarding, no stalls and no
flushes. Programs must follow two rules:

* **Data spacing.** An instruction can read a register written by an
  earlier instruction only if it comes at least **four** instructions later,
  so put three independent instructions or NOPs between them. The reason:
  the writer is in WB during the same cycle as the third instruction after
  it is in ID, and the register file has no write-through path. A load is
  no different from an ALU instruction here.
* **Two branch delay slots.** A branch is decided in EX. By then the two
  instructions after it have been fetched, and **they always execute**,
  taken or not. Put NOPs or useful independent work there.

HALT in ID stops the PC and fills IF/ID with bubbles from then on. The
instructions ahead of it complete. `halted` rises in the cycle HALT reaches
WB and stays high until reset. `retire` is high in each cycle an
instruction (NOPs included) is in WB.

### Branch offsets

The branch adder adds the offset to the branch's own PC. It does not use
PC + 2. The ID stage gets that PC through the IF/ID register. Both machines
therefore encode branches the same way: `PC = PC + sext({off,0})`.

### The multiplier on the pipeline

The testbenches use this version of the multiplier. The NOPs keep the
spacing rules, and the offsets are recomputed for the longer program:

```
 0 SUB R0,R0,R0     1-3 NOP            4 LB R1,0(R0)     5 LB R2,1(R0)
 6 SUB R3,R3,R3     7-8 NOP
 9 ANDI R4,R2,1    10-12 NOP          13 BEQ R4,R0,+4 (to 17)   14-15 NOP (delay slots)
16 ADD R3,R3,R1    17 SLL R1,R1       18 SRL R2,R2      19-21 NOP
22 BNE R2,R0,-13 (to 9)   23-24 NOP (delay slots)       25 SW R3,2(R0)   26 HALT
```

It takes 11 + Σ(15 + bit) instructions, plus 4 cycles to drain.

## Files

| file | contents |
|------|----------|
| `rtl/isa_pkg.sv` | widths, ALU and branch-select enums, opcodes, control-word structs |
| `rtl/alu.sv`, `rtl/regfile.sv`, `rtl/branch_mux.sv` | datapath parts |
| `rtl/inst_decoder.sv` | instruction to control word |
| `rtl/inst_ram.sv`, `rtl/data_ram.sv` | byte-addressed memories with their load/second ports |
| `rtl/fsm_mul_ctrl.sv`, `rtl/fsm_mul.sv` | state-machine multiplier |
| `rtl/cw_rom.sv`, `rtl/cw_ram.sv`, `rtl/cw_cpu.sv` | control-word machine |
| `rtl/sc_cpu.sv` | single-cycle machine |
| `rtl/pipe_cpu.sv` | pipelined machine |
| `rtl/lecture17_top.sv` | all four side by side |
| `tb/isa_ref_pkg.sv` | small assembler and an instruction-set interpreter used as the reference |
| `tb/*_tb.sv` | one self-checking testbench per module |

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `IAW`, `DAW` (`sc_cpu`, `pipe_cpu`, top) | 16 | instruction and data RAM address bits (bytes) |
| `cw_cpu.PCW` / top `CW_PCW` | 4 | PC and ROM address bits of the control-word machine |
| `cw_cpu.DAW`, `fsm_mul.DAW` / top `CW_DAW` | 8 | word-address bits of their RAMs |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/isa_pkg.sv tb/isa_ref_pkg.sv tb/lecture17_top_tb.sv \
  --top-module lecture17_top_tb -o sim
./obj_dir/sim
```

Replace the testbench name to run another one.

### What the tests cover

* **Module tests.** Each one compares its module with an independent
  model: integer arithmetic for the ALU, shadow arrays for the memories and
  the register file, the published tables for the decoder, the BS mux and
  the ROM.
* **`fsm_mul_ctrl_tb`.** Drives random Start and Z inputs and compares the
  state sequence and every control word with a table.
* **`fsm_mul_tb`.** Runs the multiplication on corner and random operands.
  It checks each product and the exact number of busy cycles.
* **`cw_cpu_tb`.** Runs the ROM multiplier on corner and random 16-bit
  operands. It checks each product and the exact cycle count.
* **`sc_cpu_tb`.**
  - Runs the multiplier from its listed binary encodings, checking the
    product of the sign-extended bytes and the cycle count.
  - Fills all 64 KiB of instruction memory with random instructions and
    data memory with random bytes. It then runs in lockstep with the
    interpreter in `isa_ref_pkg`, comparing the PC and all registers every
    cycle and all of memory at the end.
* **`pipe_cpu_tb`.**
  - Checks the N + 4 cycle count and the retire count for straight-line
    code.
  - Runs the pipelined multiplier with its exact cycle count.
  - Runs random programs in which every instruction is followed by three
    NOPs, so no hazard can occur. It compares the in-order stream of
    register writes (WB) and stores (MEM) with the interpreter's.
  - Counts taken and not-taken branches, delay-slot instructions, loads,
    stores, HALT and cycles with five instructions in flight. The test fails
    if any of these never happens.
* **`lecture17_top_tb`.** Runs at the default sizes. All four machines
  multiply the same operands at the same time and must agree with each
  other, with the expected product and with their expected cycle counts.

## Choices this RTL makes, and what it leaves out

Choices where the source material says nothing:

* 16-bit data on the state-machine and control-word machines as well.
* An idle state 0 that waits for Start, and Z taken from the ALU operation
  of the same state.
* Sizes of its ROM (16 words) and RAM (256 words), and the 4-bit IMM and
  OFF fields.
* The "branch always by 0" word that parks the control-word machine after
  its program.
* The ALU select encoding.
* The C and V flags outside ADD and SUB.
* Little-endian byte order.
* The memory load and second ports.
* Synchronous reset of the PC and registers.
* No write-through in the register file.
* What HALT does in each machine.
* Decoding unused codes as NOP.
* LW and SW decoding like LB and SB with a size bit.

Where the sources disagree:

* The multiplier's store is written `SW R3,2(R0)`, but its encoding row
  names R2. R3 is used, because it holds the product.
* The pipelined datapath drawing feeds the branch adder from PC + 2. The
  instruction definitions and the multiplier's offsets need the branch's
  own PC, so that is what is used.

Left out:

* **Hazard handling** (forwarding, stalls, flushing): the pipeline leaves
  it to software, as described above.
* **Jump and jump-register instructions**: they are described only in
  words, with no opcode or format, so they are not implemented.
* **Timing**: the RTL carries no delays, so the 1 ns step time behind the
  single-cycle versus pipelined comparison cannot be checked in
  simulation.
