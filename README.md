# A 32-bit single-bus RISC processor

This is a small 32-bit load/store processor. All of its units sit on one shared
32-bit data bus, and a state machine moves one value across that bus per clock.
It has 32 general-purpose registers of 32 bits and 32 fixed-format instructions
(data transfer, arithmetic, logic, one-bit shifts and rotates, and branches).
Each instruction runs as a short sequence of register transfers, so an
instruction takes 5 to 11 clocks. The design is meant for an FPGA and has no
pipeline. It trades speed for a very small, regular datapath.

The processor talks to a word-addressed memory through five signals. VMA says
the address is valid. R/W selects write (1) or read (0). There are the address
and data lines, and READY is the memory's answer. The system top, `risc`, joins
the processor to an on-chip memory.

## Datapath: everything goes over one bus

```
             32-bit data bus (one driver at a time)
   ┌──────────┬───────────┬────────────┬───────────┬──────────────┐
   │          │           │            │           │              │
 register   program    operand       output     address      instruction
 array      counter    register      register   register     register
 32 x 32    (busreg)   (busreg)      (busreg)   (dreg)       (dreg)
   │          │           │ private     ▲           │              │
   │          │           ▼ operand bus │           ▼              ▼
   │          │        ┌─────┐  ┌────────┐   address bus     decoder (control)
   │          │  bus ─►│ ALU │─►│shifter │                     │
   │          │        └─────┘  └────────┘                     ▼
   │          │           └──► comparator ──► COMPOUT ──► decoder
```

* **Bus drivers.** Four sources can drive the bus: the register array, the
  program counter, the output register and the memory's read data.
  `databus` ORs them together. Every driver presents zero when it is not
  enabled. This behaves like a tri-state bus without internal tri-states. An
  assertion in `databus` checks that no two drivers are enabled in the same
  clock.
* **ALU operands.** The ALU's A operand always comes from the operand register,
  on a private path. Its B operand is the data bus. The comparator sees the
  same two values. So a two-operand instruction first parks one register in
  the operand register. Then it puts the second register on the bus.
* **Shifter.** Every ALU result passes through the shifter (normally in "pass"
  mode) into the output register. The output register is the only way a
  result gets back onto the bus.
* **Program counter.** The PC has no incrementer of its own. It is copied into
  the operand register and incremented by the ALU (`A+1`), and the result comes
  back through the output register.
* **Address register.** It is loaded from the bus and drives the address lines
  all the time.

Module map:

| module | role |
|---|---|
| `risc_pkg` | opcodes, ALU/shift/compare select codes, control-word struct `ctrl_t` |
| `alu` | 10 functions, selected by a 4-bit SEL |
| `shifter` | pass, SHL, SHR, SAR, ROTL, ROTR, all by one bit |
| `comp` | EQ, NEQ, GT, GTE, LT, LTE, unsigned |
| `dreg` | plain register with write enable (address and instruction registers) |
| `busreg` | register with output enable (PC, operand and output registers) |
| `regarray` | 32 x 32 register bank, one select for read and write |
| `databus` | OR-combined shared bus with contention assertion |
| `control` | instruction decoder: the state machine |
| `cpu` | the processor: all of the above wired together |
| `memory` | on-chip word memory with the VMA/READY handshake |
| `risc` | system top: `cpu` + `memory` |

## Instruction set

Every instruction is one 32-bit word with the opcode in bits [31:27]. Register
numbers sit at the low end: **[14:10]**, **[9:5]** and **[4:0]**. Bits
[26:15] are ignored. Four instruction classes plus the direct conditional
branches take a second word, which follows in memory: LODI (the immediate
value), BRANCHI and the six direct conditional branches (the target address).

| opcode | mnemonic | fields | effect |
|---|---|---|---|
| 00000 | NOP | – | nothing |
| 00001 | LOAD | a=[9:5], d=[4:0] | Rd ← M[Ra] |
| 00010 | STORE | a=[9:5], s=[4:0] | M[Ra] ← Rs |
| 00011 | MOVE | s=[9:5], d=[4:0] | Rd ← Rs |
| 00100 | LODI | d=[4:0], + word | Rd ← next word |
| 01111 | ZERO | r=[4:0] | Rr ← 0 |
| 01101 | ADD | x=[14:10], y=[9:5], d=[4:0] | Rd ← Rx + Ry |
| 01110 | SUB | same | Rd ← Rx − Ry |
| 00111 | INC | r=[4:0] | Rr ← Rr + 1 |
| 01000 | DEC | r=[4:0] | Rr ← Rr − 1 |
| 01100 | NOT | r=[4:0] | Rr ← ~Rr |
| 01001 / 01010 / 01011 | AND / OR / XOR | x, y, d | Rd ← Rx op Ry |
| 11010 / 11011 | SHL / SHR | s=[9:5], d=[4:0] | Rd ← Rs shifted one bit (SHR is logical) |
| 11101 / 11100 | ROTL / ROTR | s, d | Rd ← Rs rotated one bit |
| 00101 | BRANCHI | + word | PC ← next word |
| 10101 | BRANCH | r=[4:0] | PC ← Rr |
| 00110 / 11110 / 10000 / 11000 / 10111 / 10011 | BRANCHGTI / GTEI / LTI / LTEI / EQI / NEQI | x=[9:5], y=[4:0], + word | if Rx ? Ry then PC ← next word, else skip it |
| 10100 / 11111 / 10001 / 11001 / 10110 / 10010 | BRANCHGT / GTE / LT / LTE / EQ / NEQ | t=[14:10], x=[9:5], y=[4:0] | if Rx ? Ry then PC ← Rt |

Comparisons are unsigned and arithmetic wraps. There are no flags, no
interrupts and no halt instruction (a program stops by jumping to itself). R0
is an ordinary register.

## How an instruction executes

This is the part that takes some study: each instruction is a fixed walk
through the states of `control`. Each state enables at most one bus driver
and some register writes. With a memory of latency L (READY comes L+1 clocks
after VMA rises):

* **Fetch (L+4 clocks).**
  * **F1:** PC → bus → address register and operand register.
  * **F2:** VMA=1 and R/W=0, held until READY. Meanwhile the ALU computes
    operand+1 into the output register. On READY the memory word on the bus
    is written into the instruction register.
  * **F3:** output register → bus → PC. The opcode is decoded.
* **Register operations (ADD … ROTR, MOVE): 3 clocks.**
  1. The first source goes to the operand register. This is Rx for two-operand
     instructions, Rr for INC/DEC/NOT/ZERO, and Rs for MOVE and the shifts.
  2. The ALU (with Ry on the bus for two-operand instructions) and then the
     shifter write the output register.
  3. The output register is written to the destination.
* **LOAD / STORE (L+3 clocks).** The address register is loaded from Ra. Then
  VMA is held until READY:
  * for a read, the bus value is written into Rd;
  * for a write, Rs drives the bus, which is the memory's write data.
* **LODI and BRANCHI (L+4 / L+3 clocks).** These repeat the fetch steps to read
  the second word.
  * LODI writes the word into Rd and then moves PC past it.
  * BRANCHI writes the word into the PC.
* **Conditional branches.** Two clocks compare Rx with Ry: Rx goes to the
  operand register, then Ry is put on the bus while the decoder looks at
  COMPOUT.
  * Register-indirect form: if the condition holds, one more clock copies Rt
    into the PC.
  * Direct form, taken: the target word is read as for BRANCHI.
  * Direct form, not taken: three clocks move the PC past the target word.

Total clocks per instruction at L=1:

| NOP | BRANCH | reg-op | LOAD/STORE/BRANCHI | LODI | indirect cond. (not/taken) | direct cond. (not/taken) |
|---|---|---|---|---|---|---|
| 5 | 6 | 8 | 9 | 10 | 7 / 8 | 10 / 11 |

Reset is synchronous and active high. It clears every register and the
register array. The first two states after reset then load 0 into the PC
through the ALU's "zero" function and the output register, so execution
starts at address 0.

## Memory interface

`memory` is a synchronous word array of WORDS entries (default 256; the upper
address bits are ignored).

* **Access.** While VMA is high it counts LATENCY clocks (default 1). Then it
  performs the read or write and pulses READY for one clock. For a read, the
  data stays on RDATA.
* **Next access.** VMA has to fall before the next access. The decoder always
  leaves at least one clock with VMA low between accesses.
* **Program load.** A program-load port (`prog_we`, `prog_addr`, `prog_wdata`,
  brought out on `risc`) writes words while the processor is held in reset.
* **Resets.** `risc` has two synchronous resets. `reset` (global) restarts the
  processor and the memory's handshake. `cpu_reset` restarts only the
  processor; an access in flight is abandoned, and its READY pulse, if it
  still comes, falls while the processor is in reset and is ignored.
* **Contents.** Neither reset clears the memory contents.

## Example program: block copy

The testbench `risc_tb` runs a short block-copy program:

```
0   LODI R1, 08H      ; 2 words
2   ADD  R1, R1, R1   ; R1 = 10H (source)
3   LODI R5, 00H      ; restart address
5   LODI R2, 10H
7   SHL  R2, R2       ; R2 = 20H (destination)
8   LODI R6, 1BH
10  DEC  R6           ; R6 = 1AH
11  LOAD  R4, (R1)    ; loop
12  STORE (R2), R4
13  BRANCHGT R5 if R1 > R6
14  INC R1
15  INC R2
16  BRANCHI 11
```

It copies words 10H–1BH to 20H–2BH and then jumps back to 0, which repeats the
copy forever. Note that words 10H and 11H of the "block" are the program's own
last instruction. At the default sizes one pass takes 646 clocks, and the
testbench checks that count.

## Where this design makes its own choices

The design follows a published description. That description gives the block
structure, the ALU, shift and comparison tables, the opcode table, the register
array, the bus registers and the fetch handshake. It leaves the points below
open, and they are this design's own:

* **Register fields.** Their positions, and which operand of LOAD/STORE is the
  address. The example program writes its loop branch as `BRANCHGTI R1,R6,R5`,
  a direct-branch name with a register target. It is encoded here as the
  register-indirect BRANCHGT (opcode 10100) with R5 as the target.
* **Decoder states.** The exact states and transfers, including PC increment
  through the ALU, and the reset sequence.
* **Comparator.** Select codes (EQ..LTE = 0..5) and unsigned comparison.
* **Shifter.** Select codes (pass, SHL, SHR, SAR, ROTL, ROTR = 0..5), taken
  from the order of the shift table. They agree with a simulation of the
  original shifter.
* **Plain and bus registers.** They get a write enable on the common clock
  (not a gated clock) and a synchronous reset.
* **Output enables.** Output enables drive zero instead of high impedance, and
  the bus is an OR.
* **Address register.** It always drives the address lines. No separate "address
  register read" control is built.
* **ALU.** Unused ALU codes (1010–1111) give 0.
* **Memory.** Its size, latency, READY pulse timing and program-load port.
* **Resets.** The specification names a global and a CPU reset without saying
  how they differ; the split described under "Memory interface" is this
  design's.

Not built: the FPGA-specific implementation and on-chip debug capture, which
have no logic of their own here.

## Simulating

The sources are SystemVerilog 2017. `risc_pkg.sv` has to be read first. Each
testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/risc_pkg.sv tb/risc_asm_pkg.sv tb/risc_tb.sv --top-module risc_tb
./obj_dir/Vrisc_tb
```

Testbenches:

* `alu_tb`, `comp_tb`, `shifter_tb`: exhaustive select codes against
  references written in the testbench, plus random operands. The ALU and
  shifter tests also replay the operand values of the original 8-bit
  simulations.
* `dreg_tb`, `busreg_tb`, `regarray_tb`, `databus_tb`, `memory_tb`: register
  behaviour, output release, and handshake timing at latencies 1 and 3.
* `control_tb`: the control word of every clock for each instruction class,
  with random memory waits.
* `cpu_tb`: runs a directed all-opcode program and twelve random programs. A
  behavioural memory with random wait states stands in for `memory`. Final
  registers, memory and instruction counts are compared with the instruction
  set model in `tb/risc_asm_pkg.sv`.
* `risc_tb`: the full system at default parameters. It runs the block copy,
  then an all-opcode program. It counts that every mechanism occurs: wait
  states, reads, writes, each kind of branch taken and not taken, every opcode
  and the program restart. It also resets only the processor in the middle
  of a copy and checks that execution restarts at address 0 with memory intact.

`tb/risc_asm_pkg.sv` has the encoders (`enc(op, hi, mid, lo)`) and the
reference model. Use them to write further programs.
