# PDPG: a polynomial-driven time base and PN code generator

A radar echo from a planet comes back Doppler-shifted. The receiver removes the
carrier shift with a programmed local oscillator. The echo is also slightly
stretched or compressed in time. A pseudo-noise (PN) range code that should
line up with the echo chip for chip therefore drifts against a fixed station
clock. The PDPG coder makes a PN chip stream whose clock is *slewed*: over each
second, a programmed number of 20 ns clock periods is deleted (or added), so
the code follows the echo's time scale. The coder also measures where the code
actually is. It counts 50 MHz clocks from the station's 1PPS pulse to the
moment the code passes its all-ones state. The host reads that count and works
out the correction for the next second.

This repository holds synthesizable SystemVerilog for one coder
(`pdpg_coder`) and for the four-coder system (`pdpg_system`). In the system,
one coder drives the transmitter, three drive receiver correlators, and all
four share one 16-bit host port of the DEC DR11C kind. The block structure,
register map and arithmetic follow a published description of this hardware.
Where that description is silent, the choices made here are listed under
[Choices made here](#choices-made-here).

## Signal flow in one coder

```
 10 MHz ref ──► NCO (PRN / PRNC, B = 10^7) ──slew──► ÷4,5,6 ──10 MCK──► ÷(SPL+1) ──SMPL──► ÷(SPB+1) ──SHIFT──┐
 1PPS ──────────┘                                     ▲ PCNT6                                              │
 50 MHz clock ───────────────────────────────────────┘                                                    ▼
                                                    feedback tap PROM ──taps──► 24-bit parity shift register ──► PN
                                                    word length PROM ──word──►  A = B ──► word counter (50 MHz) ──► IRPT
```

Everything runs on the 50 MHz clock `clk`. The 10 MHz reference arrives as
`ref10_en`, a one-cycle strobe every fifth cycle, coherent with `clk`.
10 MCK, SMPL and SHIFT are one-cycle enables, not clocks.

## The slewed time base (the hard part)

### Divide by 4, 5, 6

The 50 MHz clock is divided by 5 to give 10 MCK. A *slew event* makes one
count of that divider last 6 cycles (`PCNT6 = 1`, one 50 MHz period deleted)
or 4 cycles (`PCNT6 = 0`, one added). Each event shifts every later edge of
10 MCK, SMPL, SHIFT and the PN code by exactly 20 ns. An event waits in a
one-bit pending flag (the DELAY stage) until the divider's next reload. So it
is applied within one 10 MCK period.

### Number controlled oscillator

The events come from an accumulator (the *feedback register*, 24 bits) that
is clocked by the 10 MHz reference:

* `PRN` is the increment, which is the number of events wanted per second.
* `PRNC` is `PRN - B` modulo 2^24, where `B` = 10,000,000 (`SET_B`, the
  fixed "B side" of the comparator, equal to the reference rate).
* Each tick, `SUM = acc + (selected register)`, and `acc <= SUM`.
* If `SUM > B`, a slew event is issued, and the *next* tick adds `PRNC`
  instead of `PRN`. That takes `B` off again (`acc + 2^24 - B + PRN` wraps
  modulo 2^24 to `acc - B + PRN`).

The accumulator therefore gains `PRN` per tick and loses `B` per event. Over
the 10^7 ticks of one second it gives `PRN` events (or `PRN + 1`, depending on
the start value). A full-second simulation with `PRN = 1,000,000` gives
exactly 1,000,000 six-cycle counts and 9,800,000 10 MCK counts in 50,000,000
clocks.

**At 1PPS** the new `PRN` and `PRNC` written by the host are copied into the
working registers, the feedback register is zeroed and `PRNC` is selected.
The first tick after the second therefore loads `0 + PRNC`, which is about
6.78 × 10^6 + `PRN`. This fixed start offset is part of the design. The
host computes `PRNC` as `(PRN - 10_000_000) mod 2^24` and writes both
values.

Limit: the start value `PRNC` must itself be below `B`. So `PRN` must stay
below 2·10^7 − 2^24 ≈ 3.2 million events per second, which is a 6.4 % rate
offset. Above that, the first ticks after 1PPS produce extra events.

### Sample and chip clocks

`SMPL` = 10 MCK ÷ (SPL + 1), with 12-bit SPL. SMPL is the oversampling strobe
for the demodulators. `SHIFT` = SMPL ÷ (SPB + 1), with 4-bit SPB, and is the
chip clock. With SPL = SPB = 0 the chip rate is the nominal 10 MHz.

## PN code and word detector

The code generator is a 24-bit shift register. On each SHIFT, the parity
(XOR) of the tapped stages enters stage 0 and every stage moves up one. The
*feedback tap PROM* is addressed by the 5-bit PROM register. Address `n`
(2..24) selects a primitive polynomial of degree `n`, so the low `n` stages
run through all 2^n - 1 non-zero states. The other addresses give no taps and
disable detection. The polynomials are standard maximal-length ones, for
example degree 10 has taps 10,7 and degree 24 has taps 24,23,22,17. They are
listed in `pdpg_pkg::lfsr_taps`.

The stages above `n` keep the last chips. The *word length PROM* holds the
24-bit image of the register at the code's all-ones state: `n` ones, then the
`24 - n` chips that came just before. The A = B comparator matches all 24
bits against that image, which makes the match unique per code period for any
`n`. The image is computed at elaboration by running the code backwards from
all ones:

```
p[k] = 1                                       for k < n
p[m] = p[m-n] XOR (XOR over taps j < n of p[m-n+j])   for m = n .. 23
```

Writing the PROM register reloads the shift register with all ones, so a new
code starts in a known state.

**Word counter.** At each 1PPS edge it clears and counts 50 MHz clocks. In
the first cycle in which the register *becomes* equal to the PROM word, it
stops and raises the coder's interrupt flag. WS is then the number of clock
edges from the 1PPS strobe to the detect, which is the code phase to 20 ns.
It stays frozen until the next 1PPS. The coder's request `irpt` is the flag
gated by its mask bit.

A degree-24 code at 10 MHz is 1.68 s long. So in some seconds no detect
happens before the next 1PPS restarts the counter. Codes up to degree 23
(0.84 s) are detected every second.

## Programming model

The host port has mode bits `csr[1:0]`, 16-bit write data `out_data` with a
strobe `ndrdy`, and 16-bit read data `in_data` with a strobe `dtrans` that
marks a completed read. The strobes may be asynchronous. Each passes a
two-flop synchroniser and an edge detector, so a write lands about 3 clocks
after `ndrdy` rises.

| `csr` | port reaches |
|---|---|
| `00` | the ICSR (internal control and status register) of every coder |
| `01` | the function register at the ICSR word pointer, in the coder named by coder select |
| `1x` | reserved: writes ignored, reads 0 |

ICSR bits:

| bits | field |
|---|---|
| 2:0 | word pointer |
| 4 | increment pointer after each read |
| 5 | increment pointer after each write |
| 7:6 | coder select (0..3) |
| 8 | clear interrupt of the selected coder. This is a strobe and is not stored. |
| 12:9 | interrupt mask. Bit 9+k enables coder k. |
| 3, 15:13 | unused, read 0 |

Function registers (word pointer):

| ptr | contents |
|---|---|
| 0 | PRN 15:0 |
| 1 | PRN 23:16 in bits 7:0 |
| 2 | PRNC 15:0 |
| 3 | PRNC 23:16 in bits 7:0 |
| 4 | SPL in 11:0, SPB in 15:12 |
| 5 | PROM address in 4:0, PCNT6 in bit 5, *clear counters* in bit 6 |
| 6 | WS 15:0 (read only) |
| 7 | WS 31:16 (read only) |

*Clear counters* holds the ÷4,5,6, ÷N and ÷M counters at zero while it is
set.

Every coder loads every ICSR write and steps its own copy of the pointer on
every function access. Only the selected coder stores a function write or
drives read data. On an ICSR read, each coder drives the common fields and
only its own mask bit. `pdpg_system` ORs the four read buses and the four
requests, which models the open-collector bus of the original hardware.

A typical second looks like this:

1. Set ICSR to `ptr 0, inc on write, coder k`.
2. Write PRN lo, PRN hi, PRNC lo, PRNC hi, SPL/SPB and PROM.
3. At 1PPS the new rate takes effect and the word counter starts.
4. When `irpt` rises, read the ICSR, then set `ptr 6, inc on read`.
5. Read WS lo and WS hi.
6. Write the ICSR with bit 8 set and coder select = k to clear the request.
7. Compute the new PRN/PRNC and write them before the next 1PPS.

## Top-level ports (`pdpg_system`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 50 MHz |
| `rst_n` | in | 1 | asynchronous active-low reset. Registers go to 0, PN registers to all ones. |
| `ref10_en` | in | 1 | coherent 10 MHz reference, one strobe every 5 clocks |
| `pps` | in | 1 | 1PPS level. Its rising edge marks the second. It is coherent with `clk` and is not synchronised. |
| `csr`, `out_data`, `ndrdy`, `dtrans` | in | 2, 16, 1, 1 | host port |
| `in_data`, `irpt` | out | 16, 1 | ORed read data, ORed interrupt request |
| `smpl`, `shift`, `pn` | out | 4 each | per-coder SMPL strobe, chip strobe, PN bit (stage 0) |
| `pn_state` | out | 4 × 24 | per-coder shift register |

Parameters: `NUM_CODERS` = 4 and `SET_B` = 10,000,000. The widths (24-bit
NCO and code register, 12/4-bit dividers, 32-bit word counter, 5-bit PROM
address) are in `pdpg_pkg`.

## Choices made here

The source description gives the block diagram, register formats and the NCO
arithmetic. It does not give the following, which are this design's own
choices:

* **PRNC convention.** PRNC is `PRN − B` modulo 2^24. The description says
  "two's complement of the increment plus the clock frequency". This is the
  reading under which the accumulator returns below `B`.
* **PROM contents.** The address equals the code degree. The tap polynomials
  are standard primitive ones, and the word PROM image is derived from them.
* **Register 101 bit positions.** PCNT6 is bit 5 and *clear counters* is bit
  6. The PROM field is bits 4:0.
* **Read auto-increment** needs a read-done strobe. `dtrans` (the DR11C's
  "data transmitted") was added for it.
* **Interrupt mask polarity.** 1 enables the request.
* **Divider ratios** are value + 1, so 0 means "every pulse".
* **Slew polarity.** `PCNT6 = 1` deletes a clock and `PCNT6 = 0` adds one.
* **The DELAY stage** is a pending flag. The 5 MHz clock shown on the
  original delay register is not used. The select register runs at 10 MHz.
* **The INITIAL block** is a strobe synchroniser and edge detector.
* **Word detect** counts only a new match. A register already equal to the
  word at 1PPS does not count. A new 1PPS restarts the counter even if the
  interrupt was not cleared.
* **Word buffer.** There is no separate word buffer register. WS is the
  frozen counter itself.
* **Code restart.** The shift register is reloaded with all ones when the
  PROM register is written.
* **Single clock.** The 10 MHz and 50 MHz inputs, coherent in the original,
  become one 50 MHz clock plus a 10 MHz enable.

The DR11C itself, the host computer and the analog receiver and transmitter
parts around the coders are not part of this RTL.

## Files

`rtl/`

| file | contents |
|---|---|
| `pdpg_pkg.sv` | widths, register-map types, PROM tables |
| `pdpg_system.sv` | four coders on one port (top) |
| `pdpg_coder.sv` | one coder |
| `pdpg_regs.sv` | host port, ICSR and function registers |
| `pdpg_nco.sv` | number controlled oscillator |
| `pdpg_div456.sv` | ÷4,5,6 with slew delay |
| `pdpg_divn.sv` | ÷N / ÷M |
| `pdpg_tap_prom.sv` | feedback tap PROM |
| `pdpg_word_prom.sv` | word length PROM |
| `pdpg_pn_gen.sv` | PN shift register |
| `pdpg_word_counter.sv` | comparator, word counter, interrupt |

`tb/`: there is one self-checking testbench per module (`tb_<module>.sv`).
`pdpg_coder_monitor.sv` is a cycle-level checking model shared by the coder
and system tests. Finally, `tb_pdpg_workloads.sv` sweeps code degrees 2..16
and runs one full second of slewing. Each testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pdpg_pkg.sv tb/tb_pdpg_system.sv \
          --top-module tb_pdpg_system -Mdir obj && obj/Vtb_pdpg_system
```

Replace the testbench name to run another test; the other files are found
through `-I`. How long the tests take:

* `tb_pdpg_system` runs all four coders at their default size through three
  1PPS intervals in well under a second. It checks every slew event, strobe
  interval, PN state and word count against the model. It also counts the
  mechanisms it exercised (both slew directions, counter clear, auto
  increment, interrupts and clears) and fails if one never happened.
* `tb_pdpg_workloads` needs about half a minute, for its 5 × 10^7-cycle
  second.
* `tb_pdpg_nco` also includes a full default-size second.

Verified so far:

* All testbenches pass.
* Each testbench was also shown to fail on a deliberately broken copy of its
  module.
* Lint is clean apart from unused-signal notes: the coder's internal
  `acc`, `nmal`, `running`, `hit` and `irq` are kept for observation.
* The only other notes are unused ICSR bits and unused package constants.
