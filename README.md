# RePIC: a PIC16F84-compatible microcontroller that executes Esterel directly

Esterel programs are built from a small set of reactive statements:
- `emit` a signal;
- `await` a signal or a delay;
- `present` tests;
- nested `weak abort` blocks.

They all run in discrete logical instants called *ticks*. On an ordinary microcontroller these statements turn into polling loops, interrupt service routines and software priority logic. RePIC instead widens the PIC16F84 instruction word from 14 to 15 bits. Bit 14 selects a second opcode space that holds the reactive statements as instructions. Pure signals become pins and bits of registers.

This repository holds synthesizable SystemVerilog for the single-processor RePIC system: the core, program ROM and data RAM. Every original PIC16F84 instruction keeps its encoding, with bit 14 = 0, so plain PIC code also runs.

## The reactive instruction set

| Instruction | Encoding (bits 14..0) | Effect |
|---|---|---|
| `EMIT s`      | `100 ssssssssssss` | Set the output signals in the 12-bit field for the rest of the tick. |
| `SUSTAIN s`   | `101 ssssssssssss` | Set the output signals permanently. |
| `LDCADDR a`   | `1100 aaaaaaaaaaa` | Load the branch address used by the next `CAWAIT`. |
| `LDAADDR a`   | `1101 aaaaaaaaaaa` | Load the continuation address of the next abort level. |
| `SETINTMR t,k`| `11100 tt kkkkkkkk` | Start internal timer `t` with `k` instruction cycles. |
| `SAWAIT s`    | `1110100 xxxx ssss` | Wait until input signal `s` is present. |
| `TAWAIT d`    | `1110101 dddddddd` | Wait `d` instruction cycles. |
| `CAWAIT s1,s2`| `1111000 s2s2 s1s1` | Wait for `s1` (continue) or `s2` (branch to the `LDCADDR` address). |
| `ABORT s`     | `1111100 xxxx ssss` | Open a weak-abort level sensitive to signal `s`. |

Field bits:
- **EMIT and SUSTAIN:** bits 7:0 drive `signal_outA[7:0]` (SOA7..SOA0). Bits 11:8 drive `signal_outB[3:0]` (SOB3..SOB0). One instruction can emit any combination, so several signals start in the same instant.
- **Input codes** are 4 bits:
  - 0–7 are the `signal_inA` pins SIA0..SIA7.
  - 8–11 are the `signal_inB` pins SIB0..SIB3.
  - 12–15 are the internal signals SIB4..SIB7, raised by the four internal timers (or by software).
- **Decoding:** `sig_decoder` turns a code into a 9-bit mask. Bit 8 selects between the SIGINA and SIGINB registers, and bits 7:0 are one-hot.
- **Unused patterns:** a word with bit 14 set that matches no row decodes as NOP.

Esterel's `present S else goto L` needs no new instruction. SIGINA and SIGINB are file registers at 0x07 and 0x08, so `BTFSS SIGINA, n` followed by `GOTO L` does the job. `repic_asm_pkg` in `tb/` is a small function-per-instruction assembler for writing test programs.

## Timing: instruction cycles and the variable tick

The core runs one instruction cycle per four `clkin` periods (phases Q1–Q4; `clkout` = `clkin`/4):
- **Fetch:** a two-stage pipeline fetches the next word while the current one executes.
- **Operands:** are read in Q2–Q3 and results are written in Q4.
- **Register updates:** every architectural register updates on the last clock of the cycle.
- **Branch cost:** any change of flow costs one extra cycle, as on the PIC16F84. This covers GOTO, CALL, returns, a taken skip, a PCL write, a taken `CAWAIT` branch, an abort and an interrupt.

A tick has no fixed length. It lasts from one await instruction (`TAWAIT`, `SAWAIT`, `CAWAIT`) to the next.

Emitted signals:
- `EMIT` ORs its field into the SIGOUT register, so everything emitted during a tick stays high together.
- SIGOUT is cleared at the end of the first cycle of the next await.
- `SUSTAIN` writes a separate register that only reset clears. Each output pin is the OR of the two.

Example: `EMIT A; present S; EMIT B; TAWAIT 1; EMIT C`.
- A appears one cycle after `EMIT A`.
- B appears one cycle after `EMIT B`.
- A and B are high together during the `TAWAIT 1` cycle.
- Both drop when that cycle ends, and C then belongs to the next tick alone.

Every change is registered, so each edge comes one instruction cycle after the instruction that causes it.

## Waiting: `await_unit`

An await whose condition already holds finishes in its first cycle. Otherwise the unit stalls the pipeline: PC and instruction register hold, and one of three flags (DELAY_OP, SIGPOLL_OP, CSIGPOLL_OP) records what is pending.
- **TAWAIT d:** takes exactly `max(d,1)` instruction cycles, counted by the 8-bit DELAY_CNT.
- **SAWAIT:** compares its stored mask (SIGPOLLA) with the input registers every cycle.
- **CAWAIT:** also checks a second mask (SIGPOLLB). When both signals are present, signal 1 wins.

The first cycle of any await raises `tick`, which ends the logical instant. An abort or an interrupt cancels a wait in progress.
- **Abort:** the program continues at the abort target.
- **Interrupt:** the ISR returns to the await, which then starts again from the beginning.

## Nested weak aborts: `abort_handler`

This is the least conventional part of the design. The unit replaces what a PIC program would do with interrupt handlers and software priority checks.

There are four levels, 0 (outermost, highest priority) to 3. Each level holds:
- an activation flag AF*x*;
- an 11-bit continuation address AADDR*x*;
- a 16-bit one-hot signal register ASR*x* over {SIGINB, SIGINA}.

A 2-bit pointer PRN names the next free level:
- `LDAADDR a` writes AADDR[PRN].
- `ABORT s` writes the decoded mask into ASR[PRN], sets AF[PRN] and increments PRN.
- The level is live from the next cycle.

Each cycle in which AF0 is set:
- The ASRs are ORed into JASR and ANDed with the input registers.
- A non-zero result means some active level's signal is present.
- The lowest-numbered such level wins: outer aborts take precedence.
- Its AADDR, extended with PCLATH[4:3] like a GOTO target, becomes the next PC.
- That level and every inner one are cleared, and PRN falls back to the winning level.

The abort is *weak*: the instruction in execute completes normally, and only the prefetched word is thrown away, so the jump costs two cycles.

A body can also end without preemption, when control reaches the continuation address itself. The handler compares the address of the executing instruction with AADDR of each active level. On a match it closes that level and all inner ones without a jump. This is how the ATM example ends its normal path: the body finishes with `GOTO L0` to its own continuation address.

If a level terminates in the same cycle that an inner level's signal arrives, the termination wins. An outer level's signal still preempts. Nesting deeper than four levels wraps PRN; keeping within four levels is the compiler's job.

## Internal timers and internal signals

`SETINTMR t,k` loads 8-bit timer INTMR*t* with `k` and sets its enable bit ITE*t*.

While enabled, the timer counts down once per instruction cycle:
- In the cycle it reaches zero it disables itself and sets its overflow flag ITOF*t*.
- The flag is reported for one cycle, which raises internal signal SIB(4+*t*) in SIGINB.
- Counted from the SETINTMR cycle, SIB(4+*t*) is visible from cycle *k*+2.

The signal lasts until the next tick boundary. An await that starts just after it still sees it in its first cycle.

Software may also write SIGINB[7:4], for example with `MOVWF SIGINB`. This raises an internal signal for the current tick, which is how a program broadcasts its own pure signals.

## The PIC16F84 side

The core implements:
- the full 35-instruction PIC16F84 set, including OPTION and TRIS;
- the file map: INDF/FSR indirect addressing, TMR0/OPTION, PCL/PCLATH, STATUS with RP0/IRP banking, PORTA/TRISA, PORTB/TRISB, INTCON;
- the 8-level circular return stack (`pic_stack`);
- TMR0 with prescaler and RA4 clock input;
- RB0/INT edge and port-B change interrupts on the `Int[3:0]` inputs, with vector 0x004;
- SLEEP with wake-up on a pending interrupt, reported on `powerdown` and `startclkin`.

It does not model the watchdog timer or the data EEPROM: CLRWDT only sets the PD/TO bits, and address 0x09 reads as zero.

Memories:
- **Program ROM:** 4096 × 15 bits, with a synchronous read whose latency is hidden in the fetch phase. It has no write port: its contents come only from the `PROG_INIT` hex file. A synthesis run without that file sees a memory that is never written, and removes it. Such a run then reports only the RAM, stack and register bits.
- **Data RAM:** 128 bytes for the general-purpose registers at 0x0C and up. Both banks map onto the same RAM.

These sizes come from the memory use reported for the RePIC system. All reported RePIC benchmark programs fit; the largest is 282 words.

## Files

| File | Contents |
|---|---|
| `rtl/repic_pkg.sv` | Instruction types, opcode enum, file addresses, the decoder. |
| `rtl/repic_system.sv` | Top level: core + `prog_rom` + `data_ram`; parameters `PROG_DEPTH`, `DATA_DEPTH`, `PROG_INIT` (hex file, one 15-bit word per line). |
| `rtl/repic_core.sv` | Pipeline, PIC datapath and peripherals, and the wiring of the reactive units. |
| `rtl/await_unit.sv`, `rtl/abort_handler.sv`, `rtl/internal_timers.sv` | Reactive control units described above. |
| `rtl/sig_input.sv`, `rtl/sig_output.sv`, `rtl/sig_decoder.sv` | Signal registers and the signal-code decoder. |
| `rtl/pic_alu.sv`, `rtl/pic_stack.sv`, `rtl/prog_rom.sv`, `rtl/data_ram.sv` | PIC building blocks and memories. |
| `tb/tb_*.sv` | One self-checking testbench per module, plus `tb_repic_random` (random-program test of the core). |
| `tb/repic_asm_pkg.sv` | Assembler functions used by the program-level testbenches. |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself; a watchdog ends a hung run. To build and run one with Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_repic_system \
    -y rtl -y tb +libext+.sv rtl/repic_pkg.sv tb/repic_asm_pkg.sv tb/tb_repic_system.sv
./obj_dir/Vtb_repic_system
```

Substitute any other `tb_*` name. `tb_repic_core` accepts `+trace` to print every executed instruction.

- `tb_repic_system` is the end-to-end test. It runs at full default sizes and finishes in well under a second. It loads five programs behind a PORTA-selected jump table:
  - **ATM controller:** a card/PIN/withdraw/check-balance dialogue with two nested aborts. It runs four ways: withdraw, check balance, abort, and both abort signals at once. The testbench plays the customer and checks every prompt on the output pins.
  - **Tick example:** the emit/present/await sequence above, checked cycle by cycle with S present and with S absent.
  - **Nested aborts:** the inner level triggered by an internal timer after an exact number of cycles, then outer-beats-inner, then software-raised signals and SUSTAIN across ticks.
  - **TAWAIT 20,** measured with TMR0 from software.
  - **The ATM again, in plain PIC16F84 code:** polling loops, output pulses on port B, and the aborts as a port-B change interrupt. It shows that the core stays upward compatible. The test measures the abort reaction of both versions, from invalidCard to ejectCard: 5 instruction cycles for the native abort against 11 for the interrupt.
  
  At the end it checks that each mechanism happened at least once: emit, sustain, tick, stall, each await kind, CAWAIT branch and fall-through, preemption, termination, priority, timer signal, present test, SIGINB write and PCL write.
- `tb_repic_core` runs a plain PIC program covering:
  - arithmetic and flags;
  - loops, indirect addressing and CALL/RETLW;
  - rotates and bit tests;
  - banking and TMR0 timing;
  - TMR0, RB0/INT and port-B change interrupts;
  - SLEEP/wake-up.
- `tb_repic_random` runs 40 random straight-line programs of 120 PIC instructions each. They use byte, bit, skip and literal instructions on sixteen registers, INDF and the flags. The final registers, W and C/DC/Z are compared against an instruction-set model inside the testbench. The test also checks that each program took one instruction cycle per word.
- The unit testbenches compare each module against an independent model with random stimulus, or with directed scenarios for the abort and await units.

## Expected performance

The published RePIC system was clocked at 40.27 MHz, against 45.83 MHz for the unmodified PIC. At four clocks per instruction cycle, that gives the reported instruction rates of about 10 MHz and 11.46 MHz. This RTL has not been through an FPGA flow, so no clock figure is claimed for it.

The published benchmark timings assume each state of a program's state machine runs once. Under that measure, hand-written RePIC code ran about 2.7 times faster than hand-written PIC code, and about 3.2 times faster for the abort-heavy ATM and traffic-light programs. Only the ATM's code is available here, so those tables are not reproduced. The end-to-end test instead measures one figure directly on both versions of the ATM: the abort reaction time, 5 against 11 instruction cycles.

## Where this design makes its own choices

Points the source description leaves open, and how this RTL settles them:
- **Instruction cycle:** four clock periods. This is inferred from the reported clock frequency and instruction rate.
- **SIGINA/SIGINB addresses:** 0x07 and 0x08.
- **Output field:** the mapping of EMIT/SUSTAIN field bits to pins.
- **Output timing:** outputs are registered, so every signal edge lags its instruction by one cycle. The durations match the intended tick semantics.
- **TAWAIT 0:** takes one cycle.
- **CAWAIT priority:** signal 1 wins over signal 2.
- **Non-preemptive abort termination:** detected when the continuation address is executed.
- **Await interactions:**
  - an abort or interrupt cancels a pending await;
  - abort beats interrupt in the same cycle;
  - interrupts are deferred by one cycle beside CALL/RETURN/RETLW/RETFIE.
- **Internal timers:** their cycle-exact overflow timing, and that SIGINB[7:4] is software-writable.
- **Port pins:** bidirectional pins are split into `_in`, `_out` and `_dir` (TRIS) signals.
- **`rbpu`:** an output driven by OPTION.RBPU, the port-B pull-up enable of the PIC16F84. The original pin diagram draws it as an input, but gives no function for an input.

Not provided: the dual-processor RePIC variant. The description gives only its name, speed and size, not how two cores share signals and synchronise.
