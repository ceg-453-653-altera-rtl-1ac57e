# Glue logic for an MC68008 teaching computer: ADDV and SWIM

A small MC68008 computer needs a fair amount of random logic between the processor and
its memories and peripherals. Something has to pick the chip that answers each address,
acknowledge the bus cycle, and run the slow 6800-family peripherals in step with the E
clock. It also needs to catch a bus cycle that no device answers, let a student step
through a program one bus cycle at a time, and turn interrupt requests into a priority
code. Here all of that fits in two small programmable-logic chips:

* **ADDV**: address decoder, DTACK* generator and VPA*/VMA generator.
* **SWIM**: single-step control, watchdog timer and interrupt module.

With both chips in place, the only other parts the computer needs are the CPU, two RAMs,
two EPROMs, an MC6850 ACIA, an MC6821 PIA, a reset circuit and the RS-232 line drivers.
The software is compatible with Motorola's MEX68KECB educational board, which runs the
TUTOR monitor.

This repository holds synthesizable SystemVerilog for both chips, their internal blocks,
and a top level `lab2_glue` that wires the two chips together. It also holds
self-checking testbenches, including one that runs a model of the whole computer.

## Memory map

The 68008 has a 20-bit address bus. The chips decode only A19–A14, A7, A6 and A0. The
other address lines are ignored, so the peripherals repeat throughout their window.

| Range | Device | Selected by | Acknowledge |
|---|---|---|---|
| `$00000–$03FFF` | RAM, 16 KiB (even and odd 8K×8) | DS*, reads and writes | DTACK*, no wait states |
| `$08000–$0BFFF` | ROM, 16 KiB (even and odd 8K×8) | AS*, reads only | DTACK*, after 0, 2 or 4 wait states |
| `$10000–$13FFF` | 6800-bus window | AS* | VPA* on the next falling edge of E |
| `$10040`, `$10042` (+ aliases, even) | ACIA | DS* while VMA is set | through VPA* |
| `$10081`–`$10087` (+ aliases, odd) | PIA | DS* while VMA is set | through VPA* |
| CPU space (FC = 111) | interrupt acknowledge | AS* | VPA*, so every interrupt is auto-vectored |
| anything else | none | — | the watchdog raises BERR* |

A0 selects the byte lane. The `…0*` enables drive the even-byte device and the `…1*`
enables drive the odd-byte device.

The two chips share the decoding because ADDV has too few pins. SWIM decodes
A19/A18/A17/A14 into one signal, `addr` (all four are 0). It also decodes FC2..FC0 into
`fc` (CPU space). ADDV finishes the job using A16, A15, A7, A6 and A0.

An address in the ACIA or PIA alias pattern gets VPA* and a device enable. Any other
address in the 6800 window, for example the MC68230 PI/T address `$10001` of the
original educational board, gets VPA* only.

## Booting: ROM over address 0 for eight bus cycles

After reset the 68008 reads its stack pointer and program counter from addresses 0–7,
where RAM normally sits. `addv_boot_counter` counts bus cycles on the rising edge of AS*
(the end of each cycle) and is cleared while RESET* is low. Until eight cycles have
ended, `boot_done` is low, and during that time:

* every data strobe enables the ROM of the addressed byte lane, whatever the address,
  the direction and the function code;
* the RAM is disabled, and so is its DTACK*.

The ROM enable makes the wait-state logic acknowledge these cycles. The vectors
therefore come from ROM offsets 0–7. From the end of the eighth cycle on, the normal map
applies.

## DTACK*, wait states and the single-step handshake

This is the least obvious part of the design, because the single-step facility reuses
the ROM wait-state straps.

`addv_dtack_gen` acknowledges RAM cycles combinationally. A read is acknowledged on DS*.
A write is acknowledged on AS*, which comes earlier than the write data strobe.

For ROM there is a three-stage shift register on the CPU clock. It is held clear while
neither ROM enable is asserted, and shifts in a 1 on each rising clock edge once a ROM is
enabled. The two strap inputs ROMWS1:ROMWS0 (`glue_pkg::romws_e`) choose the stage that
asserts DTACK*:

| ROMWS1:0 | DTACK* from | CPU clocks from AS* to DTACK* being sampled | 68000 wait states |
|---|---|---|---|
| 00 | stage 1 | 1 | 0 |
| 01 | stage 2 | 2 | 2 |
| 10 | stage 3 | 3 | 4 |
| 11 | never (RAM blocked too) | — | inhibited |

A 68000 wait state is half a clock, which is why one extra stage adds two wait states.

Code 11 is the single-step mechanism. SWIM's RUN* output is wired into the straps so
that RUN* high always forms code 11. `lab2_glue` picks the wiring with `ROM_WAIT_STATES`:

| `ROM_WAIT_STATES` | ROMWS1 | ROMWS0 | RUN* low | RUN* high |
|---|---|---|---|---|
| 0 (default) | RUN* | RUN* | 00 | 11 |
| 2 | RUN* | 1 | 01 | 11 |
| 4 | 1 | RUN* | 10 | 11 |

`swim_single_step` drives RUN* from two switches. In the RUN position RUN* is always low.
In the STEP position the sequence is:

1. At the falling edge of AS* (start of a cycle), RUN* goes high. DTACK* is now
   inhibited, so the CPU freezes in the middle of the bus cycle with the address and
   strobes visible.
2. Pressing the step switch pulls RUN* low. The cycle is acknowledged and completes.
3. The press only counts on its rising edge, so holding the switch down does not run
   further cycles. Each cycle needs a new press.
4. The step register is cleared while AS* is high, so the next cycle freezes again.

A move into STEP takes effect at the start of the next bus cycle. A move back into RUN
takes effect at once, which also frees a frozen cycle.

While the switch is in STEP position the watchdog is held cleared, so a frozen cycle
never ends in a bus error.

## 6800-family peripherals: VPA* and VMA

The ACIA and PIA transfer data in step with E (CPU clock ÷ 10: 6 clocks low, 4 high).
`addv_vpa_vma` does two things:

* **VPA flip-flop.** It is set on the first falling edge of E after a cycle starts in the
  6800 window or in CPU space, and it drives VPA*. The 68008 then runs its synchronous
  peripheral cycle.
* **VMA flip-flop.** Once VPA is set and the ACIA or PIA is addressed, it is set on the
  next rising CPU clock edge and releases ACIAEN* or PIAEN*.

Both flip-flops are cleared while AS* is high, so all three outputs go inactive when the
cycle ends.

Because an interrupt acknowledge also gets VPA*, every interrupt uses the processor's
auto-vector.

## Bus-error watchdog

`swim_watchdog` is a shift register clocked by the rising edge of E. It shifts in "AS*
is low" and is cleared while AS* is high or the mode switch is in STEP. When the fourth
stage is set, BERR* goes low. It returns high when AS* rises.

With a 10-clock E period, the fourth rising edge of E comes 31 to 40 CPU clocks after AS*
falls. An unmapped address or a write to ROM therefore ends in the bus-error trap
instead of hanging the machine. The number of E edges is the parameter `E_EDGES`
(default 4).

## Interrupt priority encoder

The 48-pin 68008 joins IPL2* and IPL0*, so only levels 0, 2, 5 and 7 can be requested.
`swim_interrupt` samples IRQ2*, IRQ5* and the debounced abort switch on the rising CPU
clock, encodes the highest request, and registers the result:

| Request | IPL2/0* | IPL1* | Level |
|---|---|---|---|
| abort switch pressed | 0 | 0 | 7 |
| IRQ5* low | 0 | 1 | 5 |
| IRQ2* low | 1 | 0 | 2 |
| none | 1 | 1 | 0 |

A change at the inputs appears on the outputs at the second rising clock edge after it.

## Switches, latches and asynchronous clocks

All three switches are single-pole double-throw types with pulled-up contacts: RUN/STEP,
the spring-loaded step switch, and the spring-loaded abort switch. Each is debounced by
`switch_latch`, a set/reset latch:

* the latch sets while the set contact is grounded;
* it clears while the other contact is grounded;
* it holds while the switch is between contacts or bouncing.

It is written as `always_latch`, so synthesis reports three latch bits (one per switch).
Holding state without a clock is the purpose of this circuit.

Like the original chips, the design uses several clocks:

* the CPU clock: wait states, VMA and the interrupt registers;
* the falling edge of E: VPA;
* the rising edge of E: watchdog;
* the rising edge of AS*: boot counter;
* the falling edge of AS*: step mode;
* the debounced step switch: step register.

AS* is also used as an asynchronous clear. This is a strobe-driven circuit, not a
single-clock synchronous design, and it should be timed as such if it is retargeted.

Asynchronous clears are written in the usual `always_ff @(posedge clk or posedge clr)`
style. In a two-state simulator, a register only takes its clear when the clear signal
has an edge. The testbenches therefore pulse RESET*, AS* and the ROM select once at time
zero. A new testbench needs the same pulses.

## Interpretations and departures

The original chips were specified by pin descriptions plus logic equations. Where the
two disagree or leave something open, this RTL does the following.

* **RAM enables cover reads and writes, from `$00000`.** The pin text speaks of read
  cycles from `$0001`. The logic equations have no R/W* term and cover `$0000`, and the
  DTACK* text covers all cycles from `$0000`.
* **Wait-state counts.** One passage says "zero, one or two wait states" and the strap
  table says 0, 2, 4. Both describe the same 1/2/3-clock register, counted in clocks or
  in half-clock wait states.
* **Boot counter.** The original is a three-flip-flop counter with a sticky top bit and
  a sticky BOOT flag. Here it is a saturating counter of width ⌈log2 BOOT_CYCLES⌉. The
  timing of `boot_done` is the same.
* **Debouncers.** The originals are cross-coupled NAND pairs; here they are latches with
  the set contact taking priority, which is what the NAND pair does when both contacts
  are closed. `q_n` is the plain complement. The NAND pair differs only in the both-closed
  state, which a break-before-make switch never produces.
* **Clock edges.** Every register triggers on the rising edge of the signal named as
  its clock in the original equations (AS*, AS, /E, E, the step signal or the clock),
  with an asynchronous active-high clear.
* **Block diagram.** The SWIM block diagram draws the step switch into the interrupt
  block. It belongs to the single-step logic, as the equations and the RUN* description
  show.
* **Pins left out.** Power pins are not modelled. Neither is ADDV pin 3, an internal
  feedback pin of the programmable device.
* **Default wait states.** `ROM_WAIT_STATES = 0` is a choice; 0, 2 and 4 are all
  supported.

## Modules

| File | Contents |
|---|---|
| `rtl/glue_pkg.sv` | strap encoding `romws_e`, memory-map constants, `BOOT_CYCLES` |
| `rtl/lab2_glue.sv` | top: SWIM + ADDV with the strap wiring (`ROM_WAIT_STATES`) |
| `rtl/addv.sv` | ADDV chip; assertions: RAM/ROM and ACIA/PIA enables exclusive, peripheral enables only under VPA* |
| `rtl/addv_boot_counter.sv` | eight-cycle boot mapping |
| `rtl/addv_select.sv` | chip selects, RAM acknowledge, ROM select, VPA request |
| `rtl/addv_dtack_gen.sv` | DTACK* with 0/2/4 ROM wait states and inhibit |
| `rtl/addv_vpa_vma.sv` | VPA* and VMA-gated ACIA/PIA enables |
| `rtl/swim.sv` | SWIM chip; assertion: no BERR* in STEP mode |
| `rtl/swim_single_step.sv` | RUN* generation |
| `rtl/swim_watchdog.sv` | BERR* watchdog |
| `rtl/swim_interrupt.sv` | IPL encoder with the abort switch |
| `rtl/swim_addr_decode.sv` | `addr`/`fc` predecode for ADDV |
| `rtl/switch_latch.sv` | SPDT debounce latch |

Ports use the chip pin names, with `*` (active low) written as `_n`.

## Simulation

The testbenches need `--timing`. The memory models and the MC68008 bus model live in
`tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/glue_pkg.sv tb/tb_lab2_glue.sv --top-module tb_lab2_glue -o sim
./obj_dir/sim
```

Use the same command for any other testbench, changing its name. Each testbench prints
`TB_RESULT checks=N failures=M`, and has a watchdog that ends the run with a failure if
it hangs.

`tb/m68008_bus.sv` is a behavioural bus model, not synthesizable. It generates E and runs
read and write cycles, then reports how each cycle ended (DTACK*, VPA*, BERR* or timeout)
and after how many clocks.

What the tests cover:

* **`tb_lab2_glue`** runs the whole computer at default parameters. It models ROM
  contents with the formula `x[7:0] ^ {x[13:8],2'b01} ^ 8'hA5`, RAM, an ACIA and a PIA,
  then checks, with real data:
  - the eight-cycle boot fetch from ROM;
  - RAM writes and read-back;
  - ROM reads;
  - ACIA and PIA access through VPA*/VMA, including aliases and the ignored PI/T address;
  - two watchdog bus errors;
  - interrupt levels 2, 5 and 7, each followed by an auto-vectored acknowledge;
  - single stepping of RAM and ROM cycles;
  - the return to RUN.

  It counts every mechanism and fails if one never occurred.
* **`tb_lab2_glue_romws`** builds the top three times (0, 2 and 4 wait states). It checks
  ROM cycles of 1, 2 and 3 clocks, zero-wait RAM, and the DTACK* inhibit while stepping.
* **Block testbenches** test each module on its own:
  - `tb_addv_select` and `tb_swim_addr_decode` are exhaustive, with expected values
    worked out from address ranges;
  - the others drive random cycle lengths and phases and check exact edge timing: VPA*
    on the falling E edge, BERR* in the 31–40 clock window, the two-edge interrupt
    latency, and the boot cycle count.
* **`tb_addv` and `tb_swim`** test each chip on its own.

Each testbench has been run against a deliberately broken copy of its module and catches
it.

What the tests do not cover: the real MC68008's exact strobe timing (the bus model is
simplified), and propagation delays or glitches of the programmable devices. A
simulation of zero-delay RTL says nothing about either.
