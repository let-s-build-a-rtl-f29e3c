# TOY-Lite: a 10-bit teaching CPU in SystemVerilog

TOY-Lite is the smallest computer you can build that still has everything a
real CPU has: a main memory, a few general registers, an ALU, a program
counter, an instruction register and a control unit that sequences them. Every
instruction runs in two clock cycles, a **fetch** cycle that copies
`Memory[PC]` into the instruction register and increments the PC, and an
**execute** cycle whose data movement depends on the opcode. The machine is
loaded and started through front-panel switches.

The design follows the TOY-Lite CPU of the lecture "Let's build a computer!"
(the scaled-down version of the 16-bit TOY machine). The lecture builds it
bottom-up from memory bits, registers, memory banks and multiplexers, and this
RTL keeps that structure: each of those pieces is its own module. Where the
lecture leaves something open (instruction semantics, reset, how the switches
connect, control-line encoding) this RTL makes its own choice; those choices
are collected in [Departures and choices](#departures-and-choices).

| Resource          | Size                    |
|-------------------|-------------------------|
| Main memory       | 16 words x 10 bits      |
| Registers         | 4 x 10 bits (R0-R3), two read ports |
| Program counter   | 4 bits                  |
| Instruction reg.  | 10 bits                 |
| Instructions      | 16, two formats         |
| Cycles per instr. | 2 (fetch, execute)      |

## Instruction set

Every instruction is one 10-bit word with a 4-bit opcode on top:

```
 9      6 5  4 3  2 1  0
+--------+----+----+----+
| opcode | Rs | Rd1| Rd2|   register format
+--------+----+----+----+
| opcode | Rs |  addr   |   address format (addr = bits 3:0)
+--------+----+---------+
```

Register fields are 2 bits (one of 4 registers), the address is 4 bits (one of
16 words). `Rs` names the register an instruction writes, or the one it
stores, tests or jumps through; `Rd1` and `Rd2` are the two ALU sources, and
`Rd2` is also the pointer register of the indirect accesses.

| Op | Name            | Effect                                   | Execute-cycle path |
|----|-----------------|------------------------------------------|--------------------|
| 0  | halt            | stop (clear RUN)                         | none |
| 1  | add             | R[Rs] <- R[Rd1] + R[Rd2]                 | registers -> ALU -> register MUX |
| 2  | subtract        | R[Rs] <- R[Rd1] - R[Rd2]                 | same |
| 3  | and             | R[Rs] <- R[Rd1] & R[Rd2]                 | same |
| 4  | xor             | R[Rs] <- R[Rd1] ^ R[Rd2]                 | same |
| 5  | shift left      | R[Rs] <- R[Rd1] << R[Rd2]                | same |
| 6  | shift right     | R[Rs] <- R[Rd1] >> R[Rd2] (arithmetic)   | same |
| 7  | load address    | R[Rs] <- addr (zero-extended)            | IR -> register MUX |
| 8  | load            | R[Rs] <- M[addr]                         | IR -> address MUX, memory -> register MUX |
| 9  | store           | M[addr] <- R[Rs]                         | IR -> address MUX, register -> memory |
| A  | load indirect   | R[Rs] <- M[R[Rd2]]                       | register -> address MUX, memory -> register MUX |
| B  | store indirect  | M[R[Rd2]] <- R[Rs]                       | register -> address MUX, register -> memory |
| C  | branch zero     | if R[Rs] == 0: PC <- addr                | IR -> PC input MUX |
| D  | branch positive | if R[Rs] > 0 (signed): PC <- addr        | IR -> PC input MUX |
| E  | jump register   | PC <- R[Rs] (low 4 bits)                 | register -> PC input MUX |
| F  | jump and link   | R[Rs] <- PC, PC <- addr                  | PC -> register MUX, IR -> PC input MUX |

Arithmetic is two's complement and wraps at 10 bits. Shift amounts are the
full unsigned value of `R[Rd2]`; a shift by 10 or more clears the word (left)
or fills it with the sign bit (right). Indirect addresses and jump-register
targets use the low 4 bits of the register. The PC wraps from 15 to 0.
Because the PC has already been incremented in the fetch cycle, jump and link
saves the address of the next instruction.

## Datapath

```
             sw_addr                              sw_data
                |                                    |
  PC ---------->+                                    |
  IR addr ----->+ address MUX --> MEMORY <-- memory input MUX <-- R[Rs]
  R[Rd2] ------>+                 16x10      |
                                    |        |
                                mem_out -----+--> IR (10 bits)
                                    |               |  opcode --> CONTROL
                                    v               |  Rs/Rd1/Rd2/addr
  ALU result ---------------------> register MUX <--+-- IR addr
  PC ----------------------------->      |
                                         v
                              REGISTERS 4x10 (write R[Rs])
                   read port 1: R[Rd1] or R[Rs]   read port 2: R[Rd2]
                              |                 |
                              +------> ALU <----+
  PC input MUX: IR addr | R[Rs] | sw_addr  --> PROGRAM COUNTER (register,
                                               incrementer, load/increment MUX)
```

Every multiplexer has one select line per input bus and exactly one of them is
hot; the control block drives all of them. The register write address is
always the `Rs` field; read port 2 always reads `Rd2`; read port 1 reads
`Rd1` for ALU instructions and `Rs` for store, branch and jump register (the
value to store, test or jump to). The memory output bus feeds both the IR (in
fetch) and the register MUX (in load). The memory input comes from read port
1, so a store writes `R[Rs]`.

## Two-cycle timing and control

A phase bit alternates between fetch (0) and execute (1) on every clock while
the machine runs. All control lines are combinational functions of the RUN
bit, the phase, the opcode and, for branches, the value on register read
port 1. They settle during the cycle, and every register, the PC, the IR and
memory write on the rising edge that ends it.

```
clk      _|‾|_|‾|_|‾|_|‾|_|‾|_
phase     | fetch | exec  | fetch | exec ...
edge at end of fetch : IR <- M[PC], PC <- PC+1
edge at end of exec  : the instruction's register, memory or PC write
```

The control word (`ctrl_t` in `toy_lite_pkg`) has 24 lines:

| Field         | Lines | Meaning |
|---------------|-------|---------|
| `addr_sel`    | 4 | address MUX: PC, IR addr, R[Rd2], switches |
| `mem_we`      | 1 | memory write |
| `mem_din_sel` | 2 | memory input: register, switches |
| `ir_we`       | 1 | IR write (fetch) |
| `pc_in_sel`   | 3 | PC input MUX: IR addr, register, switches |
| `pc_load`, `pc_inc` | 2 | PC internal MUX: load or increment |
| `pc_we`       | 1 | PC write |
| `rd1_sel`     | 2 | read port 1 address: Rd1 or Rs |
| `reg_we`      | 1 | register write |
| `reg_in_sel`  | 4 | register MUX: ALU, memory, IR addr, PC |
| `alu_op`      | 3 | ALU operation |

Concurrent assertions in `control` check that every select group is one-hot
in every cycle, and one in `program_counter` checks that a PC write picks
exactly one source.

## Front panel: loading and running a program

The switches are plain ports of `toy_lite_cpu`. All of them are sampled on the
rising clock edge, and each acts in every cycle it is high.

1. While `running` is 0, put an address on `sw_addr` and a word on `sw_data`
   and pulse `deposit` to write `M[sw_addr]`. `mem_out` always shows
   `M[sw_addr]` while the machine is stopped, so it doubles as the "examine"
   light.
2. Put the start address on `sw_addr` and pulse `load_pc`.
3. Pulse `run`. `running` goes to 1 at the next edge and the machine starts
   with a fetch. The switches are ignored while it runs.
4. A halt instruction clears `running` at the end of its execute cycle. `pc`
   then points past the halt.

`rst` (synchronous, active high) stops the machine at any time and clears the
PC, IR, phase and registers. It leaves memory alone, so a program's results can
still be examined after a reset.

Example: multiply `M[E]` by `M[F]` into `M[D]` by repeated addition.

```
0: 20E  load       R0 <- M[E]
1: 21F  load       R1 <- M[F]
2: 1E0  load addr  R2 <- 0
3: 1F1  load addr  R3 <- 1
4: 318  branch z   if R1 == 0 goto 8
5: 068  add        R2 <- R2 + R0
6: 097  subtract   R1 <- R1 - R3
7: 355  branch p   if R1 > 0 goto 5
8: 26D  store      M[D] <- R2
9: 000  halt
```

## Module hierarchy

```
toy_lite_cpu
 +- control ............ phase bit, decode, front-panel hand-over
 |   +- sr_flip_flop ... RUN state (set by run, reset by halt or rst)
 +- mux_onehot ......... address, memory-input, PC-input, register and read-select MUXes
 +- memory_bank ........ main memory: decoder + 16 processor_registers + one-hot output MUX
 +- processor_register . IR (K = 10)
 +- program_counter .... processor_register (K = 4) + incrementer + 2-way mux_onehot
 +- register_file ...... 3 decoders + 4 processor_registers + 2 output MUXes
 +- alu
processor_register = K x register_bit
toy_lite_pkg ......... widths, opcode and ALU enums, control-word struct, MUX input indices
```

`memory_bank` and `register_file` are built from addressed registers and
one-hot AND-OR output buses, as the memory-bank bit of the lecture is, rather
than as inferred RAM arrays. At 16 words this costs 160 flip-flops and keeps
the structure visible.

## Departures and choices

What comes from the TOY-Lite description: the sizes, the two instruction
formats and their field widths, the sixteen opcodes and their names, the
component list (memory, registers, ALU, PC, IR, address MUX, register MUX, PC
input MUX, control, clock), the data paths named for fetch, add and load, the
two-cycle fetch/execute clocking, the register, memory-bank, dual-port and
counter structures, and the one-hot multiplexer.

What this RTL adds or decides:

- **Instruction semantics.** The description names the opcodes only; their
  effects (table above) follow the larger TOY machine, including arithmetic
  shift right and a signed "positive" test.
- **Field roles.** `Rs` as destination/tested register and `Rd1`, `Rd2` as
  sources; `Rd2` as the pointer of indirect accesses.
- **Read-port-1 select.** A 2-way MUX on the first read address lets store,
  branch and jump register read `R[Rs]` through the same port the ALU uses.
- **Front panel.** The description lists the switch functions but not their
  wiring. Here the address MUX has a fourth input for `sw_addr`, a 2-way MUX
  chooses the memory input, the PC input MUX has a switch input, and the
  control hands these to the switches only while stopped.
- **Control-line count.** The original counts 27 control wires without listing
  them; this encoding has 24.
- **Clocking.** The original describes control lines that act in "fetch",
  "fetch and clock", "execute" and "execute and clock" epochs of a clock whose
  on/off levels mark the phases. Here each phase is one full cycle of an
  ordinary clock and the "and clock" moment is the rising edge that ends it.
- **Storage elements.** Bits that the original builds from switches and
  cross-coupled NOR gates are edge-triggered flip-flops. The SR flip-flop is
  clocked (set/reset sampled on the edge, reset wins).
- **Reset** is an addition; the original starts the machine only from the
  switches.
- **Halt** leaves the PC one past the halt instruction.

Not built: the clock generator (an external oscillator; `clk` is an input),
the physical switches and lights (brought out as ports), and the switch-level
insides of memory bits. The larger TOY machine (256 x 16 memory, 16 registers,
8-bit PC), which the same structure extends to, is not included.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/toy_lite_pkg.sv \
    tb/toy_lite_cpu_tb.sv --top-module toy_lite_cpu_tb -o sim
./obj_dir/sim
```

Replace `toy_lite_cpu_tb` by any other `<module>_tb` to test one block.

`toy_lite_cpu_tb` runs the CPU at its real size. It loads the multiply
program above and then 400 random 16-word programs through the switches, and
follows each one instruction by instruction against an instruction-level model
of TOY-Lite written in the testbench. After every fetch it checks IR and PC;
after every execute it checks PC, RUN and all four registers. It checks that
each instruction takes exactly two cycles. After a halt, or a reset after 60
instructions, it reads all of memory back through the switches. It also checks
the literal result 3 x 5 = 15. It counts every opcode, taken and untaken
branches of both kinds, deposits, PC loads, runs, halts and reset stops, and
fails if any of them never happened. It runs in well under a second.

The block testbenches check, against reference values computed in the
testbench:

- `register_bit`, `processor_register`, `sr_flip_flop`: random writes, clears
  and holds.
- `decoder`, `incrementer`: exhaustive.
- `mux_onehot`: each select, and no select.
- `memory_bank`, `register_file`: random traffic against a reference array,
  with both register read ports at once. The memory is also tested at four
  6-bit words, the small example size of the lecture.
- `program_counter`: load, increment, wrap and hold.
- `alu`: six operations on random and corner operands.
- `control`: the expected control lines for every phase and opcode, phase
  alternation, RUN/halt and front-panel hand-over.

## Changing the design

- Widths and sizes live in `toy_lite_pkg` (`WORD_W`, `ADDR_W`, `MEM_WORDS`,
  `NUM_REGS`, `REG_SEL_W`). The leaf modules are parameterized. The
  instruction-field split in `toy_lite_cpu` (`ir[5:0]`) and the opcode slice
  `ir[9:6]` assume the TOY-Lite format, so a TOY-sized machine needs those
  slices and the `instr_t` layout changed together.
- A new instruction needs a case in `control` and, if it moves data along a new
  path, a new input on one of the MUXes. The MUX input indices are
  `localparam`s in the package.
- The testbench model (`model_execute` in `toy_lite_cpu_tb`) must be changed
  with the control. It is written independently of the RTL, so keep it that
  way.
