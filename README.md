# M270: an 8-bit bus-oriented teaching computer

M270 is a small stored-program computer built around a single ALU and three
internal busses. Every instruction moves data across the busses one register
transfer at a time, and a controller sequences those transfers. The
instruction set, the datapath and the control signals come from the M270
specification, a university digital-design lab in which the datapath is given
and the controller is left to the student. This RTL supplies all three pieces
as synthesizable SystemVerilog: the datapath, a complete controller and a
memory model. It also has testbenches that run real M270 machine code,
including a sort program.

## Instruction set

An instruction is two bytes:

| byte | bits 7..4 | bits 3..2 | bits 1..0 |
|------|-----------|-----------|-----------|
| 1    | opcode    | Ra (destination) | Rb (source) |
| 2    | n, an 8-bit two's complement immediate |||

There are four 8-bit registers, R0 to R3, and 256 bytes of addressable memory.
Each instruction works on one of three source operands:

* `Yi = n` (immediate)
* `Yr = Rb + n` (register)
* `Ym = MEM[Rb + n]` (memory)

| op | mnemonic | effect | op | mnemonic | effect |
|----|----------|--------|----|----------|--------|
| 0 | HALT | stop, return to Idle | 8 | ADDR | Ra = Ra + Yr |
| 1 | BRU  | PC = Yr | 9 | ANDR | Ra = Ra & Yr |
| 2 | BRN  | PC = Yr if NF | A | INVR | Ra = ~Yr |
| 3 | BRZ  | PC = Yr if ZF | B | LDR  | Ra = Yr |
| 4 | STR  | MEM[Yr] = Ra | C | ADDM | Ra = Ra + Ym |
| 5 | INP  | Ra = DIP switches | D | ANDM | Ra = Ra & Ym |
| 6 | OUT  | OUTR = Ra | E | INVM | Ra = ~Ym |
| 7 | LDI  | Ra = n | F | LDM  | Ra = Ym |

There is no subtract and no compare instruction. Subtraction comes from
inversion plus addition: `~a + b = b - a - 1`. Absolute addresses need a
register that holds 0, because every address is `Rb + n`.

## Datapath

```
            XBUS  <- RF[Ra or Rb] | PC
            YBUS  <- NR | YR | MDR
   ALU:     ZBUS  =  X | Y | X+Y | X&Y | ~X
            ZBUS  -> IR, RF, PC, NR, YR, MDR, MAR, OUTR
   NF, ZF   <- sign / zero of ZBUS, loaded only on ALU_ADD
   RF       <- ZBUS or INBUS (DIP switches)
   MDR      <- ZBUS or DINBUS (memory read data);  MDR -> memory write data
   MAR      -> memory address (low byte of a 15-bit bus; high 7 bits tied to 0)
```

IR holds the first instruction byte and NR holds the second. YR holds the
source operand (Yr or Ym). MAR and MDR are the only path to memory. OUTR
drives a seven-segment display with its low seven bits. PC has its own
incrementer, so it can step alongside any bus transfer. The original
schematic drives the busses through tri-state buffers; here the busses are
multiplexers (`m270_buses`). Assertions check that at most one source drives
each bus in any cycle.

The controller addresses the datapath through a 25-bit control word
(`m270_pkg::ctrl_t`), with one bit per control signal of the specification:
ALU_PASSX/PASSY/ADD/AND/CMP, RF_ASEL/DSEL/READ/LOAD, PC_READ/LOAD/INC/CLEAR,
IR_LOAD, NR_READ/LOAD, YR_READ/LOAD, MAR_LOAD, MDR_SEL/READ/LOAD,
MEM_READ/WRITE and OUTR_LOAD.

## The controller and the instruction cycle

This part is the least obvious, and most of it is this design's own work. The
specification fixes only the outline:

* Reset puts the machine in Idle, with PC at 0.
* A one-cycle Start pulse begins execution.
* Each instruction then passes through Fetch, Generate Y and Decode/Execute.
* HALT returns the machine to Idle; every other instruction goes back to Fetch.

Each phase is split into single-cycle register transfers that the datapath
can perform. Two ALU transfers can never share a cycle, because they would
need the same busses. An ALU transfer can share a cycle with a memory read or
a PC increment.

| state | transfer | used by |
|-------|----------|---------|
| F0 | MAR = PC | all |
| F1 | MDR = MEM[MAR]; PC = PC + 1 | all |
| F2 | IR = MDR | all |
| F3 | MAR = PC | all |
| F4 | MDR = MEM[MAR]; PC = PC + 1 | all |
| F5 | NR = MDR | all |
| G0 | YR = RF[Rb] + NR (NF/ZF updated) | all |
| G1 | MAR = YR | ADDM ANDM INVM LDM |
| G2 | MDR = MEM[MAR] | ADDM ANDM INVM LDM |
| G3 | YR = MDR | ADDM ANDM INVM LDM |
| E0 | the instruction's transfer (see below) | all |
| E1 | INVR/INVM: Ra = ~Ra; STR: MDR = Ra | INVR INVM STR |
| E2 | MEM[MAR] = MDR | STR |

In E0:

* Branches load PC from YR when the condition holds.
* STR loads MAR from YR.
* INP loads Ra from the switches.
* OUT loads OUTR from Ra.
* LDI loads Ra from NR.
* ADD and AND combine Ra (on XBUS) with YR (on YBUS).
* The load instructions copy YR to Ra.

The ALU's invert works only on XBUS, and YR can only drive YBUS. So INVR and
INVM first copy Y into Ra and then invert Ra in place.

**Cycle counts.** Every instruction takes 6 fetch cycles and 1 Generate Y
cycle (4 for a memory operand), plus its execute cycles: 1 in general, 2 for
INVR/INVM and 3 for STR. Examples:

* LDI: 8 cycles
* LDM: 11 cycles
* STR: 10 cycles
* INVM: 12 cycles

From Start to the return to Idle, a program takes 1 cycle plus the sum of its
instruction counts.

### When branches look at the flags

NF and ZF are loaded whenever the ALU adds, and the Yr computation in G0 is
itself an addition. If a branch tested the flags after G0, it would be testing
the sign of its own target address. This controller therefore samples NF and
ZF during G0, before that cycle's addition updates them. BRN and BRZ thus test
the most recent addition of the previous instruction:

* After ADDR/ADDM, that is the sum the instruction wrote to Ra.
* After any other instruction, it is that instruction's `Rb + n`.

The idiom is to place BRN/BRZ immediately after the ADD that computes the
condition. The specification does not say when the condition is tested; this
timing is this design's reading.

## Memory and board I/O

`m270_mem` is a byte-wide RAM of `DEPTH` bytes, 32768 by default like the
board RAM. Reads are asynchronous, so MDR captures the data in the MEM_READ
cycle. Writes happen on the clock edge. Only the first 256 bytes are
reachable, because MAR is 8 bits. The top-level ports mirror the board:

| port | meaning |
|------|---------|
| `clk`, `rst` (synchronous), `start` | control inputs |
| `dipsw` | read by INP |
| `outr`, `led = outr[6:0]` | output register and display segments |
| `out_load` | high in the cycle OUTR is written |
| `mem_addr` (15 bits), `data_bus` | memory busses shown on the board LEDs |
| `idle` | controller is in Idle |

On the board, data bits 0-7 light the bar LED, and address bits 0-7 and
8-14 light the segments of the left and right seven-segment digits, so both
busses can be watched while single-stepping the clock. That wiring is outside
the RTL.

Programs are placed in the memory array before Start. The testbench writes
the array directly; on the board a download utility fills the RAM.

## Choices made where the specification is silent

* All registers, including RF, NF and ZF, are cleared by the synchronous
  reset. PC is cleared through PC_CLEAR, which the controller raises during
  reset.
* Start after HALT resumes at the instruction following the HALT. Only reset
  returns PC to 0.
* PC priority: clear, then load, then increment.
* An undriven bus reads 0. The ALU outputs 0 when no operation is selected,
  and memory outputs 0 when not reading.
* Memory has an asynchronous read and a clocked write.
* The complete micro-sequence above (only the first three fetch transfers are
  spelled out in the specification) and the timing of the branch condition
  are this design's own.
* Not modelled: the physical SRAM interface (the RAMPORT schematic, whose
  details are not given), the switches and LEDs themselves, and the host
  parallel port that supplies clock, reset and start.

## Files

| file | content |
|------|---------|
| `rtl/m270_pkg.sv` | opcodes, IR layout, control word, shared width |
| `rtl/m270_top.sv` | computer: controller + datapath + memory |
| `rtl/m270_ctrl.sv` | controller state machine |
| `rtl/m270_datapath.sv` | busses, ALU, flags and registers wired together |
| `rtl/m270_buses.sv`, `m270_alu.sv`, `m270_flags.sv` | bus selection, ALU, NF/ZF |
| `rtl/m270_regfile.sv`, `m270_pc.sv`, `m270_reg.sv`, `m270_mdr.sv` | registers |
| `rtl/m270_mem.sv` | primary memory |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

`tb/tb_m270_top.sv` runs the whole computer at its default size. It executes
two programs and checks them against an instruction-level reference model
written into the testbench. The model checks the OUT values, the final
registers, all 256 bytes of memory and the exact cycle count. The programs
are:

* **Instruction test.** It exercises all sixteen opcodes, taken and untaken
  BRN/BRZ, and INP. It prints 5A 8E 0A F5 F8 5A 6A 00 EF 05.
* **Bubble sort.** It sorts 7, -15, 4, -2, 25 in memory and prints
  -15 -2 4 7 25. It takes 1532 cycles, about 128 µs at a 12 MHz clock.

The machine code of both programs is listed with comments in the testbench,
so it also serves as an example of M270 programming.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/m270_pkg.sv tb/tb_m270_top.sv \
          --top-module tb_m270_top -o sim
./obj_dir/sim
```

Substitute any other `tb/tb_m270_*.sv` to test one module. The whole
computer simulates in well under a second.
