# μP1: a 16-bit accumulator computer with a register display

The μP1 is a teaching processor small enough to watch while it runs. It has
one 16-bit accumulator (AC), an 8-bit program counter and a single 256-word
address space shared by program and data. It runs a Fibonacci program that
counts up to the largest 16-bit signed value and back down, forever. Its
register state is shown live on a VGA monitor. Its output port PR is also
shown on four seven-segment digits. A switch slows the processor to about one
instruction step per second, so each register transfer can be followed on the
screen.

The RTL follows the μP1 lab specification ("LAB 5: μP1 Computer with Video
Display"): its instruction set, instruction format, block diagram, memory map,
output port, clock selection, register display contents and test program.
Where the specification leaves the design open, the choices made here are
marked below. They cover opcode values, cycle-by-cycle control, memory timing,
font, screen layout and VGA timing.

## Machine model

| Item | Value |
|---|---|
| Data path | 16 bit; AC is the only general register |
| Address | 8 bit; MAR drives the address bus |
| Instruction word | `opcode[15:8]`, `address[7:0]` |
| 0x00–0x7F | 128×16 ROM: the program |
| 0x80–0xFF | 128×16 RAM: data |
| 0xFF | also the output port PR: a store there writes RAM and PR; a load reads the RAM copy |
| Flags | N and Z, registered; changed only by ALU instructions, Lw and Ldi |

Instruction set, with the opcode values this implementation assigns (the
specification leaves them to each implementer):

| Op | Mnemonic | Effect | Cycles |
|---|---|---|---|
| 01 | `Add a`  | AC ← AC + M[a] | 3 |
| 02 | `Adds a` | AC ← AC + M[a], signed saturation to 0x7FFF / 0x8000 | 3 |
| 03 | `Sub a`  | AC ← AC − M[a] | 3 |
| 04 | `Subs a` | AC ← AC − M[a], signed saturation | 3 |
| 05 | `And a`  | AC ← AC AND M[a] | 3 |
| 06 | `Com`    | AC ← NOT AC | 3 |
| 07 | `Lw a`   | AC ← M[a] | 3 |
| 08 | `Ldi`    | AC ← next word after the instruction; skips that word | 3 |
| 09 | `Sw a`   | M[a] ← AC (a store to 0x00–0x7F is ignored) | 3 |
| 0A | `Jmp a`  | PC ← a | 2 |
| 0B | `Jmpz a` | PC ← a if Z = 1 | 2 |
| other | — | no operation | 2 |

**Jump semantics differ from one line of the specification.** Its
instruction table writes `Jmp: PC ← M[address]`, which would be an indirect
jump. Its prose says PC and MAR are loaded with "the target address specified
by the instruction". Its test program also uses `Jmp 0x8` to mean "go to
0x08". This design implements the direct jump.

## The instruction cycle

This is the part that needs the most care, because the specification gives
the register transfers but leaves their clock-by-clock schedule to the
implementer. `up1_control` is a three-state machine:

| State | Every instruction / per opcode | Register transfers |
|---|---|---|
| FETCH | all | IR ← M[MAR]; PC ← PC + 1 |
| DECODE | Add, Adds, Sub, Subs, And, Lw, Sw | MAR ← IR[7:0] |
| | Ldi | MAR ← PC (the immediate word); PC ← PC + 1 |
| | Com, Jmpz with Z = 0, unknown | MAR ← PC |
| | Jmp, Jmpz with Z = 1 | PC ← IR[7:0]; MAR ← IR[7:0] — done, next state FETCH |
| EXEC | ALU ops, Lw, Ldi | AC, N, Z ← ALU(AC, M[MAR]); MAR ← PC |
| | Com | AC, N, Z ← NOT AC; MAR ← PC |
| | Sw | M[MAR] ← AC; MAR ← PC |

Two things make this schedule work:

* **MAR always holds the next fetch address before FETCH.** Every
  instruction's last cycle loads MAR with PC. The memories read
  asynchronously from MAR, so the instruction word is on the data bus for a
  whole clock period before IR clocks it in. This is how the design meets the
  IR setup-time requirement the specification stresses. The same holds for
  operand reads in EXEC: MAR was loaded in DECODE.
* **Stores are one cycle.** The specification allows Sw to take several
  cycles to meet memory setup and hold times. Here, address (MAR) and data
  (AC) are registers that were stable for a full cycle before the write edge.
  The RAM samples them on that edge, so one cycle suffices. MAR is reloaded
  on the same edge; the RAM has already captured the old address.

Jumps complete in DECODE, as the specification suggests. Jmpz can do the same
because Z is a register, already settled when the jump is decoded.

In ASM-chart terms, the FETCH outputs are Moore outputs: they depend on the
state alone. The DECODE and EXEC outputs are Mealy outputs: they also depend
on the opcode, and for Jmpz on Z. Both the opcode and Z come from registers
(IR and the flag register), so no control output has a combinational path
from outside the processor.

The control word (`up1_pkg::ctrl_t`) is `ir_ld, pc_inc, pc_ld, mar_ld,
mar_sel, ac_ld, alu_op, mem_we`. Its outputs depend on the state, the
registered opcode and the registered Z flag. Two assertions in `up1_control`
check the control word's rules: PC never gets two sources at once, and a store
never coincides with an AC load.

## Clocking

All logic runs from the single 50 MHz board clock. The specification asks for
a divided "system clock". Here `clk_divider` produces a one-cycle clock
enable `ce` instead, and every processor register advances only on an edge
with `ce` high. This gives the same behaviour without a derived clock net.
`clk_divider` also produces `sys_clk`, a square wave at the processor rate,
which the screen shows as CLK.

* `sw7` = 0: `SLOW_HZ` (1 Hz), slow enough to read each step on the monitor.
* `sw7` = 1: `FAST_HZ` (100 Hz, this design's choice), so a new Fibonacci
  number appears roughly twice a second.
* `BYPASS_DIV` = 1 on `up1_system` makes the processor step on every clock.
  Use it in simulation.

`ce` is high in the cycle *before* the edge that moves the processor. A test
bench that samples processor registers after `ce` must wait for that edge.

## Display logic

The display logic only observes the processor; nothing there feeds back.

* `seg7_display` shows PR as four hex digits. It scans the digits with
  active-low digit enables `an_n` and active-low segments `seg_n` (bit 0 =
  a … bit 6 = g). Each digit is lit for 1 ms (`SCAN_HZ` = 1000).
* `vga_sync` generates 640×480 at 60 Hz: 25 MHz pixels (50 MHz / 2), 800
  pixels per line, 525 lines per frame, negative sync pulses.
* `video_display` draws a 40 × 30 grid of 16×16 cells, each an 8×8
  `char_rom` glyph at double size. White text on blue:

```
 row 0   NAME1            (parameter, 20 characters)
 row 1   NAME2
 row 3   PC   xx
 row 4   IR   xxxx
 row 5   MAR  xx
 row 6   MDR  xxxx        memory read-data bus
 row 7   AC   xxxx
 row 8   PR   xxxx
 row 9   Z    b
 row 10  CLK  b
```

The specification's block diagram has no MDR register: the ROM/RAM
multiplexer output feeds IR and the ALU directly. "MDR (data in)" on the
screen is therefore that bus. The colour and sync outputs are registered
together, one pixel after the raster counters. The screen layout, font and
colours are this design's own. The specification fixes only which items
appear, and that registers are shown in hex and Z and CLK in binary.

## Files

| File | Contents |
|---|---|
| `rtl/up1_pkg.sv` | widths, opcode / ALU-op / state enums, control-word struct, the Fibonacci program as a function |
| `rtl/up1_alu.sv` | ALU with saturating add/subtract, N and Z |
| `rtl/up1_datapath.sv` | PC, MAR and its MUX, IR, AC, N/Z flags, ALU |
| `rtl/up1_control.sv` | fetch/decode/execute state machine |
| `rtl/up1_rom.sv`, `rtl/up1_ram.sv` | 128×16 memories, asynchronous read, RAM written on the clock edge |
| `rtl/up1_memory.sv` | address map, read MUX, PR port |
| `rtl/up1_cpu.sv` | processor = control + datapath + memory |
| `rtl/clk_divider.sv` | processor clock enable, SW7 rate select, bypass |
| `rtl/seg7_display.sv` | multiplexed 4-digit hex display |
| `rtl/vga_sync.sv`, `rtl/char_rom.sv`, `rtl/video_display.sv` | VGA register display |
| `rtl/up1_system.sv` | board top |
| `tb/tb_*.sv` | one self-checking bench per module, plus `tb_up1_system_full` |
| `tb/up1_iss.svh` | instruction-level reference model used by the processor benches |

The ROM contents come from `up1_pkg::fib_program()`, which lists the test
program instruction by instruction. To run a different program, change that
function. Program words are `{opcode, address}`. Ldi is followed by its
immediate word.

## Simulating

Every bench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
          rtl/up1_pkg.sv tb/tb_up1_cpu.sv --top-module tb_up1_cpu -o sim
obj_dir/sim
```

Replace `tb_up1_cpu` with any other bench name.

* `tb_up1_cpu` runs the Fibonacci program for about 1400 instructions, then
  20 random programs. It compares PC, MAR, AC, N, Z and PR with the reference
  model before every instruction, and checks every instruction's cycle count.
  The clock enable is dropped at random.
* `tb_up1_system` is the end-to-end test. One instance with the divider
  bypassed runs two full up-and-down Fibonacci sweeps. It checks every PR
  value and decodes the seven-segment pins. A second instance, with a scaled
  4 MHz clock, checks both SW7 rates. It also reads a complete VGA frame back
  from the pins and verifies the register text against the processor state.
  It requires each of these events to occur at least once: saturation, taken
  and untaken Jmpz, Jmp, Ldi, PR store, restart, SW7 switch, VGA frame and
  full digit scan.
* `tb_up1_system_full` uses every default: a 50 MHz clock with SW7 = 1. It
  runs 25 million clocks (about 15 s of simulation) up to the third PR write
  (0, 1, 1). It checks the 500 000-clock processor period, the displayed
  digits and the VGA line and frame periods.

## Limits and departures

* Opcode values, the no-op behaviour of unused opcodes, and ignoring stores
  to ROM are this design's choices.
* Jumps are direct; see *Machine model*.
* The processor clock is a clock enable, not a divided clock; see *Clocking*.
* The RAM clears to zero at start-up, and reset does not clear it.
* Reset is synchronous and active high. It clears PC, MAR, IR, AC, the
  flags, PR and the display counters. Execution starts at address 0.
* Memory timing assumes FPGA distributed RAM/ROM behaviour: the write happens
  on the clock edge and reads are asynchronous. The specification refers to
  the setup and hold figures of one FPGA family's datasheet, which are not
  modelled.
* The name lines are parameters with placeholder text.
