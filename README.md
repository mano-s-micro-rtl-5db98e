# Mano's basic computer in SystemVerilog

A small 16-bit accumulator computer. It is the textbook "basic computer" of
M. Morris Mano's *Computer System Architecture* (chapter 5), in the
classroom FPGA form where every part is built up from gates, flip-flops
and decoders. One 16-bit common bus connects the registers and memory.
A sequence counter steps each instruction through timing states T0, T1, and so on.
A hardwired controller turns the current timing state, the decoded opcode
and a few flags into the control lines for that clock cycle. Every
micro-operation of the machine (`AR <- PC`, `IR <- M[AR], PC <- PC+1`, ...)
is one product term in the controller.

The RTL keeps the original structure. Registers are chains of JK-flip-flop
bit cells, the adder ripples through full-adder cells, and the decoders
are trees of 1-to-2 decoders. So the netlist reads like the schematic
rather than like behavioural code. The controller covers the instructions
of the original design: the memory-reference set, CLA and INC, the I/O
instructions OUT, INP, ION and IOF, and the interrupt cycle. The machine
boots into a built-in program that counts in a RAM word and shows each
count on the output register.

## The machine

| item | size | notes |
|---|---|---|
| word | 16 bit | |
| address | 12 bit | AR and PC are 12-bit registers that read as 16 bits with zero upper nibble |
| registers on the bus | AR, PC, DR, AC, IR, TR, OTR | all load from the bus except AC, which loads from the ALU |
| flags | R (interrupt cycle), IEN, FGI, FGO, E | JK flip-flops |
| memory | 2 units × 64 words | unit 0 = ROM (addresses `$000-$03F`), unit 1 = RAM (`$040-$07F`) |

Every register has three control lines, `ld`, `inc` and `clr`. They act
on the rising clock edge with priority clear > load > increment.

**Bus source codes** (`mano_pkg::bus_sel_e`): AR 1, PC 2, DR 3, AC 4,
IR 5, TR 6, memory 7. Code 0 reads all ones.

**ALU** (`alu.sv`). D0 is DR and D1 is AC. The codes are PASS 0
(`q = DR`), AND 1, ADD 2 (carry out to E), COM 3, SHR 4 and SHL 5. The
controller uses only PASS, AND and ADD. COM, SHR and SHL exist in the ALU
and are unit-tested, but no instruction reaches them. The original names
these three functions without defining them. Here COM complements D0,
and SHR and SHL rotate D0 through E. Which operand they act on is this
RTL's choice.

**Memory decoding** (`mem.sv`). Address bit 6 selects the unit and bits
5..0 the word. Bits 11..7 are ignored, so the 128 words repeat through the
4096-word address space. Writes to the ROM unit are dropped. Putting the
ROM at address 0 makes start-up simple, because PC = 0 after reset is a
ROM address. The cost is that the interrupt cycle cannot save its return
address (see below).

## Instruction format and what is implemented

`IR[15]` is I, `IR[14:12]` the opcode and `IR[11:0]` the address.
Opcode 7 with I = 0 is a register-reference instruction. Opcode 7 with
I = 1 is an I/O instruction. For both, `IR[11:0]` holds one bit per
operation.

| instruction | encoding | steps after fetch (T3 onward) | cycles |
|---|---|---|---|
| AND / ADD / LDA | `0/1/2 aaa` (+`8` indirect) | T3 `AR <- M[AR]` if I; T4 `DR <- M[AR]`; T5 `AC <- AC∧DR / AC+DR, E <- carry / DR` | 6 |
| STA | `3aaa` | T4 `M[AR] <- AC` | 5 |
| BUN | `4aaa` | T4 `PC <- AR` | 5 |
| BSA | `5aaa` | T4 `M[AR] <- PC, AR <- AR+1`; T5 `PC <- AR` | 6 |
| ISZ | `6aaa` | T4 `DR <- M[AR]`; T5 `DR <- DR+1`; T6 `M[AR] <- DR`, skip if DR = 0 | 7 |
| CLA | `7800` | T3 `AC <- 0` | 4 |
| INC | `7020` | T3 `AC <- AC+1` | 4 |
| INP | `F800` | T3 `FGI <- 0` | 4 |
| OUT | `F400` | T3 `OTR <- bus (DR)`, `FGO <- 0` | 4 |
| ION / IOF | `F080` / `F040` | T3 `IEN <- 1 / 0` | 4 |

Every instruction starts with the same fetch: T0 `AR <- PC`,
T1 `IR <- M[AR], PC <- PC+1`, T2 `AR <- IR[11:0]`. The instruction ends
when the controller raises `sc_clr`. The next cycle is then T0. All
memory-reference instructions pass through T3, so indirection costs no
extra cycle.

Not implemented: the other register-reference instructions (CLE, CMA,
CME, CIR, CIL, SPA, SNA, SZA, SZE, HLT) and the skip-on-flag I/O
instructions. Nothing clears or complements E, because none of those
instructions exist. The input register INPR also does not exist: INP
only clears FGI.

## The control unit

`controller.sv` is the heart of the design. It has no state. It combines
the following signals with AND and OR gates:

* `t[15:0]`, the one-hot timing lines. They come from `timer16`, a 4-bit
  up-counter feeding a 4-to-16 decoder.
* `D0..D7`, the opcode `IR[14:12]` decoded by `dec3x8`.
* `I = IR[15]`.
* the flags R, IEN, FGI and FGO, and a zero test on DR (used by ISZ).

Two shorthands appear in many equations:

* `p = D7·I·T3` marks an I/O instruction.
* `r = D7·I'·T3` marks a register-reference instruction.

These two, and the last step of each memory-reference instruction, are
the terms of `sc_clr`.

Several sources may ask for the bus. A fixed priority resolves them: PC,
memory, TR, AC, IR, AR. When nothing asks, DR drives the bus. The
timing lines and the decoded opcode
are one-hot, so for the implemented instructions the requests never
overlap. The cases that rely on the DR default are ISZ's T6 write
and OUT.

Where this controller departs from the original equations:

* **Register-reference decode.** The original decodes it as `D7·R'·T3`.
  This RTL uses `D7·I'·T3`. Otherwise an INP instruction would also clear
  AC, because both use bit 11.
* **Indirect AR load.** The original lacks the T3 qualifier on the
  indirect `AR <- M[AR]` term. It is added here.
* **FGI and FGO clears.** The original has them the wrong way round.
  Here OUT (bit 10) clears FGO and INP (bit 11) clears FGI, matching the
  behaviour described for the flags.
* **Interrupt cycle.** The original was unfinished. This RTL adds the
  store `M[0] <- TR`, the final `PC <- PC+1` that makes PC = 1, and
  `IEN <- 0`.
* **BSA.** The original never loaded PC. This RTL adds `PC <- AR` at T5.
* **ADD and ISZ memory reads.** The original did not select memory onto
  the bus for ADD and ISZ. This RTL does.
* **AND and ADD.** The original ran the ALU in pass mode for every
  instruction. Here AND and ADD use the ALU's AND and ADD functions.
* **Dead term dropped.** The original's AC-load term for BUN at T5 can
  never occur, so it is left out.

OUT loads the output register from the bus while DR is on it. This is
kept from the original on purpose. It agrees with the original's
simulation, which shows the output equal to DR. So OUT shows the value
most recently read from memory, not AC.

## Interrupts and I/O

The input and output devices set FGI and FGO through the `fgi_set` and
`fgo_set` pins. In any cycle other than T0 to T2, IEN together with FGI
or FGO sets R. R takes effect at the next instruction boundary, where the
interrupt cycle replaces the fetch:

1. T0: `AR <- 0`, `TR <- PC`.
2. T1: `M[0] <- TR`, `PC <- 0`.
3. T2: `PC <- PC+1`, `IEN <- 0`, `R <- 0`.

Execution then continues at address 1, which normally holds a jump to the
service routine. Word 0 is ROM, so the store of the return address is
silently dropped. A service routine cannot return with `BUN I 0`. It must
jump back to a known place.

## The built-in program

By default the ROM holds:

```
000 LDA $40    001 INC    002 OUT    003 STA $40    004 CLA    005.. BUN 0
```

Call the power-up contents of RAM word `$40` v. Pass k of the loop
leaves v+k+1 in `$40`. It puts v+k on the output register, because OUT
copies DR, which holds the value just loaded. Each pass takes 28 clock
cycles: 6 + 4 + 4 + 5 + 4 + 5. The ROM contents are the parameter
`PROGRAM` (type `mano_pkg::rom_image_t`, 64 words). It is passed down from
`mano_top`, so a testbench can load any other program.

## Reset and timing

There is one clock, and everything changes on its rising edge. The
active-high synchronous `rst` is an addition of this RTL; the original
relied on the FPGA's power-up state. Hold it for at least one cycle. It
clears every register, every flag and the sequence counter, so the first
cycle after reset is T0 with PC = 0. It does not clear RAM. Memory reads
are combinational and writes happen on the clock edge. This matters: the
controller reads memory in the cycle right after loading AR (T1 after T0,
T3 after T2). A RAM with a registered read, such as the vendor RAM block
of the original FPGA build, would need an extra cycle in those places.

`mano_top` asserts two rules: exactly one timing line is active, and a
memory write never takes its data from memory.

## Module hierarchy

```
mano_top
├── timer16            sequence counter: regn(4) + dec4x16
├── controller         dec3x8 + control equations
└── mano_datapath      registers, flags, E, memory, bus, ALU
    ├── reg12 ×2 (AR, PC), reg16 ×5 (DR, AC, IR, TR, OTR)  → regn → reg1 → jkfflop → dfflop
    ├── jkfflop ×5 (R, IEN, FGI, FGO, E)
    ├── mem → rom, ram
    ├── buslines
    └── alu → fan (hadder, fa1), andnbit (and1bit)
```

`mano_pkg.sv` holds the widths and the enums for the ALU and bus codes.
It also holds the control bundle `ctrl_t` (controller to datapath), the
status bundle `status_t` (datapath to controller), the instruction
constants and the default ROM image. The decoders follow the same
composition as the original: `dec2x4e` is three `dec1x2e`, `dec3x8` is a
`dec1x2` plus two `dec2x4e`, and `dec4x16` is a `dec2x4` plus four
`dec2x4e`.

The E flip-flop is this RTL's addition; the original kept E as an
unconnected placeholder. It takes the ALU's carry or shift-out bit
whenever AC is loaded by ADD, SHR or SHL, and feeds the ALU's carry-in.
The output register is 16 bits wide, as in the original datapath,
although the machine's description speaks of 8-bit I/O registers.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself if it hangs. Put
the package first and let Verilator find the rest by module name:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mano_pkg.sv tb/tb_mano_top.sv --top-module tb_mano_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

* `tb_mano_full` runs the default computer through 40 passes of the
  built-in loop. It checks every output value, the 28-cycle pass length
  and the final RAM word.
* `tb_mano_top` runs two computers side by side. One has the default ROM.
  The other has a test program that exercises every implemented
  instruction: direct and indirect addressing, AND, ADD with a carry into
  E, BSA with a return through an indirect BUN, ISZ without and with a
  skip, ION, an interrupt raised on FGI, INP, OUT and IOF. It checks the
  length of every instruction and the final registers and memory. It
  reports how often each mechanism happened; one that never happened
  counts as a failure.
* `tb_mano_copy` runs a block-copy program. A pointer loop (LDA I,
  STA I, and ISZ on both pointers and on a count) copies a three-word
  subroutine from ROM into RAM. The program then calls the copy twice
  with BSA. The test checks the copied words, the pointers and the result.
  It also checks the total cycle count, which it derives from the
  per-instruction step counts.
* `tb_controller` compares every control line with a reference written
  per instruction and step. The reference covers all opcodes, T0 to T7,
  both values of R, and random flags.
* The remaining testbenches check the building blocks against
  behavioural models: decoders exhaustively, registers, adder, ALU, bus
  and memories with random stimulus.

The simulator's two-state random initialisation stands in for power-up.
The testbenches read the random starting value of RAM word `$40` and
predict from it.

To run another program, build a `mano_pkg::rom_image_t` and pass it as
`PROGRAM` to `mano_top`. `tb_mano_top` shows how, with `mano_pkg::mref()`
for memory-reference words. Data must live in words `$040-$07F` if the
program writes it.
