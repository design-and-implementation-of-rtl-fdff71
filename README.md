# A teaching CPU with 8-bit instructions and a 4-bit datapath

This is a small CPU meant to show, one clock at a time, how a processor fetches,
decodes and executes instructions. It was first built from discrete transistors,
logic ICs and DIP switches. The program sits in a 16-byte ROM. Each byte is one
instruction: a 4-bit opcode field and a 4-bit operand. The arithmetic is 4 bits
wide. A 4-bit ripple-carry adder does both addition and subtraction, and its
result goes into a 4-bit accumulator. The clock runs slowly enough to watch: it
is either free-running at an adjustable rate or stepped by a push button. A HALT
instruction stops the clock.

The SystemVerilog here is a synthesizable model of that machine, one module per
hardware block. All registers share a single reference clock. A clock-enable
pulse stands in for the board's slow CPU clock.

## Instruction set

| bits 6:4 | mnemonic | effect (execute phase)               | PC afterwards |
|----------|----------|--------------------------------------|---------------|
| 000      | (none)   | nothing                              | PC + 1        |
| 001      | LDA n    | A <= n                               | PC + 1        |
| 010      | ADD n    | A <= A + n (mod 16)                  | PC + 1        |
| 011      | SUB n    | A <= A - n (mod 16)                  | PC + 1        |
| 100      | JMP n    | –                                    | n             |
| 101      | CLR      | A <= 0                               | PC + 1        |
| 110      | HLT      | stop the CPU clock until reset       | unchanged     |
| 111      | (none)   | nothing                              | PC + 1        |

An instruction word is `{bit7, op[2:0], n[3:0]}`. Bit 7 is ignored, because the
decoder has exactly three input pairs. The original design names LOAD, ADD,
SUBTRACT, JUMP and HALT, and its decoder has six units. **The binary codes are
this design's own.** So is the sixth instruction, CLR, which drives the
accumulator-clear line (ACLR) that the original design has. `cpu8_pkg::instr(op, n)`
builds a word.

ADD and SUB wrap modulo 16. The ALU's carry out is visible on the `carry` port
during the execute phase of ADD and SUB, but no instruction stores it or tests
it. There is no flag register and no conditional branch.

## Timing: two CPU clocks per instruction

A one-bit ring counter alternates between two phases, **fetch** (0) and
**execute** (1). Each instruction takes one CPU clock of each.

* **Fetch.** The PC drives the ROM decoder. The decoder enables one ROM byte, and
  the instruction register (IR) loads the ROM bus.
* **Execute.** The opcode in the IR is decoded and acted on. The PC counts up at
  the end of this clock, except after JMP and HLT.

The jump is the least obvious part. The PC's flip-flops have direct CLEAR and
PRESET inputs, which act on the output at once. The original design uses them
for a two-cycle jump: in the first cycle every bit is cleared, and in the second
only the target's 1-bits are preset. The model does the same:

```
 CPU clock   phase    IR      PC clr  PC set  PC output     ROM byte read
 k           fetch    (prev)  0       0       p             JMP t  -> IR
 k+1         execute  JMP t   1       0       0             -
 k+2         fetch    JMP t   0       t       0 | t = t     ROM[t] -> IR
 k+3         execute  ROM[t]  ...
```

The PC register takes whatever its output shows at each CPU clock, so after
clock k+2 it holds t. Clearing first and then ORing in the target bits gives
exactly t with no adder. No clock is lost: the second jump cycle is also the
fetch of the target. The IR holds the whole word, operand included, so the
target is still there after the PC has been cleared. That makes a second
register for the target unnecessary. In the original block diagram only the
opcode goes to the IR and the operand runs straight from the ROM to the ALU.
During execute the two are the same value, because the PC only changes at the
end of the execute phase.

HLT sets a halt latch in its execute clock. The latch masks the clock source, so
nothing changes after that, and the PC keeps showing the HLT's address. Only
reset clears the latch.

## Clock source (`clock_gen`)

The board used two 555 timers. One ran as an astable oscillator at about
1–3.5 kHz. The other ran as a push-button monostable, to debounce the button.
`clock_gen` reproduces what they do, as a one-reference-cycle `step` pulse:

* `auto_mode = 1`: one pulse every `period` reference cycles (0 or 1 means every
  cycle). The CPU clock rate is f_ref / `period`. With a 1 MHz reference,
  `period` = 286 … 1000 gives 3.5 … 1 kHz.
* `auto_mode = 0`: the button passes through a two-flop synchroniser. A rising
  edge gives one pulse and then locks the button out for `MONO_CYCLES`
  reference cycles (default 1000). This absorbs contact bounce on press and
  release, as long as the bounce dies out within the lock-out time.
* `halt = 1` blocks the pulse in both modes.

The reference frequency and the lock-out time are not part of the original
design. Pick them for your board.

## Blocks

| module            | role |
|-------------------|------|
| `cpu8_pkg`        | widths, opcode enum, decoded-instruction and control structs |
| `clock_gen`       | automatic / manual CPU clock, halt gating |
| `program_counter` | 4-bit up counter with immediate CLEAR and PRESET |
| `rom_decoder`     | 4-to-16 one-hot decoder; each output is the AND of the true or inverted address bits |
| `dip_rom`         | 16 × 8 ROM. The bits are the `dip` input (the switches). The bus is the OR of the enabled bytes, so it reads 0 if none is enabled |
| `instr_reg`       | 8-bit instruction register |
| `instr_decoder`   | opcode bits 6:4 to six one-hot lines |
| `ring_counter`    | one-bit fetch/execute phase |
| `control_unit`    | ring counter, control matrix (signal table in the file's header) and halt latch |
| `alu`             | four full adders. B is XORed with `sub`, and `sub` is also the carry in, so subtraction is two's complement |
| `accumulator`     | register A: clear over ROM-operand load over ALU load |
| `cpu8_top`        | everything wired together |

Top-level ports of `cpu8_top`:

* Inputs:
  * `clk`, `rst_n`: asynchronous active-low reset.
  * `auto_mode`, `button`, `period[15:0]`: the clock source's controls.
  * `dip[16][8]`: the program.
* Outputs, which are what the board shows on LEDs plus a few internals:
  * `acc`, `pc`, `ir`, `phase`, `halted`, `carry`.
  * `cpu_step`, the CPU clock pulse.

Parameters: `MONO_CYCLES` (1000) and `PERIOD_W` (16). The package fixes the
widths: 4-bit datapath, 8-bit word, 16 bytes. These come from the original
design.

## Where this model departs from the original hardware

* **One clock.** The board clocks the PC, ring counter and registers from the
  555. Here every register samples `clk` and changes only when `cpu_step` is
  high. The board gates the clock with the halt signal; here the halt signal
  masks the enable.
* **Synchronous counter.** The board's PC is a ripple counter made of two dual
  D flip-flop ICs. This one is synchronous with the same count sequence. Its
  CLEAR and PRESET still act at once on the output, as the flip-flops' direct
  pins do.
* **Accumulator clear.** On the board, ACLR drives the register IC's
  asynchronous, active-low master reset through an inverter. Here ACLR is
  active high and acts at the CPU clock. The register IC's shift modes are not
  modelled, because no instruction uses them.
* **Operand path.** The operand comes from the IR rather than straight from the
  ROM (see the jump section above). Likewise, the decoder reads the IR rather
  than the ROM bus.
* **Things the original design leaves open, chosen here:**
  * the instruction codes and the CLR instruction;
  * the whole control-signal table;
  * the reset values (all zero, which is a no-op in the IR);
  * the priority among the accumulator's controls;
  * the clock source's divider and debounce.
* **Not modelled.** The analog timers, the transistor buffer stages and the
  LEDs. Conditional branching is also missing: the original mentions it in
  passing but describes no flags or conditional instruction for it.

## Simulating

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Here is the complete test at default
parameters:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cpu8_pkg.sv \
          tb/tb_cpu8_top.sv --top-module tb_cpu8_top -o sim
./obj_dir/sim
```

`tb_cpu8_top` contains a reference interpreter of the instruction set. It first
steps a 14-instruction program through by hand, with bouncing button presses.
That program covers forward and backward jumps, ADD carry, SUB borrow, CLR, a
no-op and HLT. It then runs the same program, and 30 random 16-byte programs,
in automatic mode at clock periods from 1 to 6. After every instruction it
compares the accumulator, PC, carry, halt and IR, and it checks that each
instruction took exactly two CPU clocks. At the end it prints how often each
mechanism occurred, and it fails if any of them never did. Assertions in
`cpu8_top`, active under `--assert`, add three checks. Exactly one ROM byte is
enabled at a time. At most one decoder line is high. The PC is never cleared
and preset in the same clock.

Verilator finds the other modules through `-Irtl` by their file names. The
package has to be named explicitly and first. The block testbenches,
`tb/tb_<module>.sv`, build the same way with their own `--top-module`. The
whole run takes well under a second.

To change the program, set `dip[i] = cpu8_pkg::instr(OP_xxx, n)` for each
address `i`.
