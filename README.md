# SOAR: Smalltalk on a RISC, as a cycle-level SystemVerilog model

SOAR is a 32-bit NMOS RISC processor built to run compiled Smalltalk fast.
It avoids the usual cost of a dynamically typed language in four ways:

* **Tagged integers checked by hardware.** A word with bit 31 clear is a
  31-bit integer. A word with bit 31 set is an object pointer, and bits
  31:28 give its generation tag. An arithmetic instruction marked "tagged"
  (the `%` bit) runs at full speed. It traps only when an operand turns out
  not to be an integer, or when the 31-bit result overflows. Software then
  handles the general case.
* **Register windows with overlapping lows and highs, and no locals.** A
  call moves to a new window of eight registers. The caller's low registers
  become the callee's high registers, so arguments need no copying. A
  return with the N option fills the callee's registers with *nil*, so the
  garbage collector never sees stale pointers in them.
* **Single-cycle calls and jumps.** The target address sits inside the
  instruction word. An external latch ("fast shuffle") captures it while
  the instruction is being fetched. The next fetch can then use it
  directly, with no delay slot.
* **Traps that make software emulation cheap.** When a trap fires, the
  operands of the trapping instruction are kept in shadow registers (SHA,
  SHB, and a shadow opcode and destination). The trap vector is chosen by
  the trap reason and the trapping opcode together. A handler therefore
  starts out knowing what to emulate.

This repository models the processor at machine-cycle level. It does not
model the chip's three clock phases. Every register transfer of the chip
appears here as a register update at the end of a machine cycle. The
precharged buses become multiplexers.

## Pipeline

Each instruction takes three machine cycles, and up to three instructions
overlap:

| cycle | latch holding the instruction | work |
|---|---|---|
| fetch | CPIPE1m, SRC1m, SRC2m, DST1m, DIL | MAL (or the fast-shuffle latch) addresses memory. The word is latched at the end of the cycle. |
| execute | CPIPE1s, SRC1s, SRC2s, DST1s | Operands are read onto the A bus (S1, special registers, or zero), the B bus (S2) and the L bus (immediate). The ALU result goes to DST. PC and MAL are updated. Traps and skips are decided. |
| write | CPIPE2s, DST2s | The result is written to the register file or to a special register. It can be the ALU value, nil, load data, or the saved PC. |

A result in its write cycle is **forwarded** to the instruction in execute
when that instruction's S1 or S2 names the same register (register 16
excluded). Load data is forwarded from the LOADL latch in the same way.
These are the only two bypasses. With them, dependent instructions run back
to back.

Loads and stores add a **memory data cycle**. The word just fetched stays
in CPIPE1m. Meanwhile the control pipe is jammed with a pseudo-instruction:
`load0`/`store0`, or `loadN`/`storeN` for the multiple forms. `load` and
`store` take two cycles. `loadm d` takes one cycle plus one data cycle per
register. It loads registers d down to 1, and the address drops by the
immediate each cycle. `storem s` stores registers s down to 0 in the same
way. The counting is done by decrementing the DST1 or SRC2 field in the
pipe.

Control flow:

* **call / jmp** – the ALU adds 1 to the target field. The result goes to
  PC and to MAL. The target itself is fetched in the same cycle through the
  external latch, so there is no penalty. `call` also decrements the window
  pointer, and in its write cycle it saves the return address in the new
  window's r15 (the caller's r7).
* **ret0..ret7** – PC = S1 + S2/immediate. The instruction fetched during
  the return is squashed, so a return costs one bubble. The option bits
  are: W (bit 0) increments the window pointer; N (bit 1) fills registers
  0..5 of the window being left with nil; I (bit 2) sets the interrupt
  enable.
* **skip** – the ALU computes S1 − S2 and the DST field names a condition.
  If it holds, the next instruction is squashed (turned into SKIP).
* **trap1..trap7** – the same comparison. If the condition holds, the
  processor traps.

## Traps and interrupts

Ten causes can raise a trap, in this priority order:

| code | cause | code | cause |
|---|---|---|---|
| 0 | illegal opcode (bit 31 set or undefined) | 5 | data page fault |
| 1 | tag trap, or overflow of a tagged add/sub/sll | 6 | trapN condition true |
| 2 | software interrupt (call/jmp with the SI bit while PSW bit 0 is set) | 7 | generation-scavenging store check |
| 3 | window overflow | 8 | instruction page fault |
| 4 | window underflow | 9 | I/O interrupt (PSW bit 1 enables it) |

When a trap fires in a cycle, three things happen at the end of it:

1. The trapping instruction's write cycle is cancelled. Its window change
   is also dropped.
2. The next execute slot gets the forced `TRAP` instruction. TRAP sends
   MAL to the vector `{TB[27:10], reason[3:0], shadow opcode[5:0]}`. It
   clears the interrupt enable, and in its write cycle it saves the PC
   chain (lastPC) in r7 of the current window.
3. The instruction fetched during TRAP is squashed.

A trap cannot fire in the cycle directly after another one.

The vector table holds jumps (a jump table). The handler receives r7 equal
to the address of the instruction that was in execute plus one.
`ret r7, -1` re-executes that instruction, which is the right return after
a page fault, window overflow/underflow or an interrupt. `ret r7, 0` skips
it, which is the right return after emulating it. Use the I option to turn
interrupts back on. The shadow registers load only while interrupts are
enabled, so inside a handler they still describe the trapping instruction.

Window overflow is a call whose new window number equals SWP bits 6:4.
Underflow is a return-with-W whose new window number equals them. The
handler spills or refills a window and moves SWP.

### Tags and the generation check

In tagged instructions:

* arithmetic, logic, shift, skip and trapN need integer operands (the S2
  operand is not checked when an immediate is used);
* load/loadc need one object pointer and one integer;
* store needs an object-pointer base.

These raise the tag trap (code 1). A second group raises the
generation-scavenging trap (code 7) for the garbage collector:

* a tagged store whose data is a context (tag 1111);
* a tagged store where the tag comparison says the data is younger than
  the object stored into;
* a tagged ret whose return address is an object pointer (a non-LIFO
  return).

## Registers

There are 80 physical words: 8 windows × 8 registers plus 16 globals.

* r0–r7 are the current window's lows. r8–r15 are its highs, which are the
  lows of window CWP+1.
* r16–r31 are globals. r16 reads as zero.
* Through S1, numbers 17–23 read special registers instead:

| S1 number | reads |
|---|---|
| 17 | PC |
| 18 | SHB |
| 19 | SHA |
| 20 | SWP |
| 21 | TB |
| 22 | CWP << 4 |
| 23 | `{shadow opcode, PSW, shadow DST}` |

Writing one of those numbers updates the special register (and also the
global). A special-register write takes effect in the write cycle, so the
instruction right after it still sees the old value. For example, put one
instruction between a write of SWP or PSW and a call that depends on it.

**Pointer to register.** A Smalltalk context lives in a register window,
but its fields can still be reached through memory addresses. An address
in the eight 16-word blocks just below SWP, with bit 3 set, names a
register: bits 6:4 pick the window and bits 3:0 the register.
`load`/`loadc`/`store` to such an address read or write the register file
instead of memory.

## Instruction format

| bits | normal format | call / jmp |
|---|---|---|
| 31 | 0 | 0 |
| 30 | 1 | 0 |
| 29 | `%` (tagged) | SI (software interrupt) |
| 28:23 | opcode | 28 = 0 call, 1 jmp; 27:0 target |
| 22:18 | DST (condition for skip/trapN) | |
| 17:13 | S1 | |
| 12 | immediate flag | |
| 11:7 | S2 | |
| 11:0 | immediate: value 6:0, sign 7, tag 11:8 | |

Store and store-multiple keep their data register in S2. Their constant is
split: bits 22:18 are the upper five constant bits and bits 6:0 the lower
seven.

Opcodes are 7-bit values `{bit30, bits28:23}` (listed in octal in
`soar_pkg`): ret 110–117, skip 120, trapN 121–127, store 130, storem 132,
load 134, loadc 135, loadm 136, srl 140, sra 142, xor 144, and 146, or 147,
add 150, sll 151, sub 152, extract 154, insert 156. Shifts move by one bit.
`sll` is done by the adder, so give the same register twice.
extract/insert move a byte between byte position S2[1:0] and bits 7:0.

## Clocking, WAIT and RESET

`soar_clockgen` divides the master clock by six into phi1, phi1+, phi2,
phi2+, phi3 and phi3+. The core changes state once per machine cycle, on
the phi3+ tick (`cycle_end`).

* Memory is expected to return the addressed word within the same cycle.
* Stores write in the cycle where `rd_wr` is low.
* WAIT, RESET, the page-fault input and the interrupt request are sampled
  at the end of a cycle.
* A sampled WAIT freezes the whole processor, and the fast-shuffle latch,
  for the next cycle. `wait_ack` answers one cycle later.
* RESET starts fetching at 0x0FFFF0 with window 7, interrupts off and the
  pipe flushed.
* The register file, TB, SWP and the shadow registers are not reset.

## Files

| file | contents |
|---|---|
| `rtl/soar_pkg.sv` | opcodes, jam values, special register numbers, trap codes, window decode function, instruction encoders, control structs |
| `rtl/soar_system.sv` | top level: clock generator, core, fast-shuffle latch |
| `rtl/soar_core.sv` | pipeline, buses, forwarding, PC/MAL, special registers, trap and skip sequencing |
| `rtl/soar_ctrl_pla1.sv`, `rtl/soar_ctrl_pla2.sv` | execute-stage and write-stage control decode |
| `rtl/soar_alu.sv`, `rtl/soar_byte_exins.sv`, `rtl/soar_sxt.sv` | ALU, byte extract/insert, immediate sign extension |
| `rtl/soar_regfile.sv`, `rtl/soar_cwp.sv` | windowed register file with nil fill, window pointer with overflow/underflow |
| `rtl/soar_ptr_detect.sv`, `rtl/soar_condpla.sv`, `rtl/soar_tagtrap.sv`, `rtl/soar_trap_encoder.sv` | pointer-to-register detect, skip/trap conditions, tag checks, trap priority |
| `rtl/soar_clockgen.sv`, `rtl/soar_fastshuffle.sv` | phase generator, external call/jump address latch and mux |
| `tb/tb_soar_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -y rtl rtl/soar_pkg.sv tb/tb_soar_system.sv \
          --top-module tb_soar_system -Mdir obj_sys -o sim && obj_sys/sim
```

`tb_soar_system` is the end-to-end test at the default sizes. Its
testbench builds a SOAR program in memory with the encoder functions of
`soar_pkg`. The program exercises every mechanism above:

* forwarding of ALU results and of load data;
* loads, stores, load/store multiple and pointer-to-register access;
* calls, returns with nil fill, skips;
* all ten trap causes, with handlers that log and return;
* random WAIT stalls.

The testbench checks every stored result, the order of the trap log, the
zero-delay call target and the extra data cycle. It also counts how often
each mechanism happened. `tb_soar_core` checks the exact cycle on which
each store reaches memory for a short call/return program. The other
testbenches compare each block with an independent reference: random
operands, exhaustive opcodes or exhaustive cause combinations.

## How faithful the model is

The register transfers, control decode, condition, tag and trap equations
follow the original SOAR chip description. Where that description is
unclear or inconsistent, this model makes the following choices:

* Everything is one register update per machine cycle. The chip's
  phase-level behaviour inside a cycle is not modelled, so
  precharge/discharge timing, and the exact phase at which page faults or
  WAIT act, are this model's choices.
* Byte extract/insert uses the low byte of the destination/source. The
  original describes this one way in prose and the other way in its
  update rule; the update rule is followed.
* Nil fill covers registers 0–5, as the fill loop stops; its comment says
  0 through 6.
* A trap does not change the window pointer. Only call and ret-with-W do.
* The PC is 28 bits. lastPC, SWP, SHA and SHB are held as 32 bits.
* The reset address is 0x0FFFF0, the value in the PC update rule (one
  comment speaks of address 0).
* The second source operand reads only the register file. Special
  registers are reached through S1.
* The condition for skip/trapN is evaluated in the instruction's own
  execute cycle, which squashes the same next instruction as the original
  timing does.
* The tag-comparison equation for the generation check is read as one OR
  of the B bus bit 31, the inverted A bit 31, A bit 30, and a single AND
  term over the lower tag bits. The B bus is complemented on the chip, so
  the equation is applied to the complemented B tag.
* Memory, the I/O pads and their drivers, and the NMOS layout rules are not
  part of this RTL. The system testbench contains a simple word-addressed
  memory and a toy MMU/interrupt device.
