# Counter-driven state machines for a small FPGA board

This is RAM and state-machine logic for four small designs on a 50 MHz
Spartan-3E teaching board. The board has eight LEDs, eight slide switches,
four push buttons, a four-digit 7-segment display and 6-pin I/O connectors.
The designs build on one idea: a counter that advances slowly can serve as
the state of a finite-state machine. You decode its value into outputs, and
you bend its next-value rule to react to inputs.

| design | what it does | module |
|---|---|---|
| fixed traffic signal | east/west and north/south lamps on an 8-second cycle | `traffic_light` |
| traffic signal with WALK | adds an 8-second all-red pedestrian phase, taken only when someone has asked for it | `traffic_light_walk` + `walk_request_latch` |
| RAM explorer | a 256 x 8 RAM that you step through, load and write by hand, with address and data shown on the display | `ram_explorer` |
| vending machine | takes nickels, dimes and quarters, and flashes the display and LEDs when 25 cents are in | `vending_machine` + `vending_fsm` |

`lab26_top` places all four side by side on one clock. On the real board only
one design is loaded at a time, because they share the same pins. In the top
each design has its own copy of those pins, with the prefix `p1_` to `p4_`.

## Clocking: one clock, slow enables

Every flip-flop runs on the 50 MHz board clock. Slow behaviour comes from
one-cycle *enable* pulses, not from divided clocks:

* `tick_gen` counts modulo `DIV` and pulses `tick` once every `DIV` cycles.
  With the default `DIV = 50_000_000`, it ticks once a second. The traffic
  signals step on this tick.
* `ram_explorer` and `vending_machine` each have a free-running counter of
  `TICK_BITS = 24` bits. Their step (`&count`) comes once every 2^24 cycles,
  about 3 Hz, slow enough to watch. Two lower bits of the same counter,
  `[SCAN_BIT+1:SCAN_BIT]` with `SCAN_BIT = 16`, pick the display digit.
  Each digit is lit for about 1.3 ms in turn.

All resets are synchronous and active high (`rst`). The board itself has no
reset button. On an FPGA the same state comes from configuration. The
`rst` input is there for simulation and for anyone who wants to wire one up.

## Traffic signals: the counter is the state

An 8-bit counter `count1Hz` advances once per tick. Its low bits are the
phase `ticks`, and `traffic_lamp_decode` turns the phase into lamps:

| ticks | east/west | north/south | walk (blue) |
|---|---|---|---|
| 0-2 | green | red | off |
| 3 | yellow | red | off |
| 4-6 | red | green | off |
| 7 | red | yellow | off |
| 8-15 | red | red | on |

**Fixed signal (`traffic_light`).** The phase is `count1Hz[2:0]`, so only
rows 0-7 are used and the cycle repeats every 8 seconds. The 8-bit counter
just keeps counting and wraps from 255 to 0, which does not disturb the low
bits.

**WALK signal (`traffic_light_walk`).** The phase is `count1Hz[3:0]`. The
interesting part is the next-count rule. It turns the plain counter into a
machine with a branch:

```
count1Hz_next = (count1Hz == 7 && !walk_req) || count1Hz == 15 ? 0 : count1Hz + 1
```

At north/south yellow (7), the counter goes on to 8 if a walk is requested.
That starts eight seconds of all-red with the blue lamp lit. Otherwise the
counter jumps back to 0, and the cycle is the same as the fixed signal.
After phase 15 it returns to 0. The counter therefore stays in 0..15, and
an assertion in the module checks this. `walk_req` matters only on the tick
at which the phase is 7.

**Walk request (`walk_request_latch`).** A push button is released long
before phase 7 comes around, so the request has to be remembered.
`walk_request_latch` is a set/reset flip-flop:

* the button sets it;
* `ticks[3]` clears it, because bit 3 is high exactly during the walk phase;
* clear wins if both happen at once, so a press during a walk counts as
  served by that walk.

In the top, `WALK_FROM_BUTTON = 1` (the default) takes the request from this
latch, driven by `p2_btn[3]`. `WALK_FROM_BUTTON = 0` takes it straight from
slide switch `p2_sw[7]`. While a walk is requested, the right-hand decimal
point is lit.

**Pins.** The north/south lamps go on connector pins jc[1..3] and the
east/west lamps on jd[1..3], in the order red, yellow, green. The blue WALK
lamp goes on jc[4]. All lamp outputs are active high: each drives an LED
through a series resistor to ground.

## RAM explorer

`ram256x8` is a 256-word by 8-bit RAM with separate input and output buses.
Reads are asynchronous: `dataout` always shows the word at `address`. A write
happens on the rising clock edge while `writeenable` is high. Its contents
start at zero.

`ram_explorer` lets a person drive it. On each ~3 Hz step, the buttons act
as follows:

| button held | effect at the step |
|---|---|
| btn[0] | address + 1 (wraps 255 → 0) |
| btn[1] | address − 1 (wraps 0 → 255) |
| btn[2] | address ← switches |
| btn[3] | RAM[address] ← switches |

Buttons 0-2 are tried in that order, and the first one held wins
(`ram_addr_ctrl`). Button 3 is independent. If it is held together with a
move, the write goes to the old address. A button held down acts again at
every step.

What the board shows:

* the LEDs show the word at the current address;
* the two left digits show the address in hex, and the two right digits
  show the word;
* the left-hand decimal point is lit during the second half of each step
  period, so it blinks once per step.

To try it, store the squares of 0-9 at addresses 00-09, then step back
through them. The testbenches do exactly this.

## Display driver

`seg7_mux` is combinational and shared by the RAM explorer and the vending
machine. From the 2-bit digit select, it:

* picks that digit's 4-bit value with a 4-to-1 multiplexer, and its decimal
  point with a 1-bit 4-to-1 multiplexer;
* looks up the segments in `hex7seg`, a 16 x 7 table for 0-9 and A-F;
* drives the anode of that digit only.

Digit 3 is the left-hand one. Segments, decimal point and anodes are active
low, as on a common-anode display. `seg[0]` is segment a and `seg[6]` is
segment g. A `blank` bit turns a digit off.

## Vending machine

`vending_fsm` has eight states (`lab26_pkg::vend_state_t`):

| # | state | meaning |
|---|---|---|
| 0-4 | GOT0, GOT5, GOT10, GOT15, GOT20 | cents inserted so far |
| 5 | ENOUGH | 25 cents or more: a can is dispensed |
| 6, 7 | VEND1, VEND2 | optional second flash (`VEND_FLASH = 1`) |

On each step:

* the clear input sends the machine to GOT0 from any state;
* in a GOT state, a coin adds its value. A total of 25 cents or more goes to
  ENOUGH, and the extra money is kept (no change is given). If several coins
  are offered in one step, the largest counts.
* ENOUGH goes to GOT0. With `VEND_FLASH = 1` it goes ENOUGH → VEND1 →
  VEND2 → GOT0 instead.

Coins offered outside the GOT states are ignored.

`vending_machine` wraps the state machine for the board. The buttons are:

* btn[0] (right-hand): nickel
* btn[1]: dime
* btn[2]: quarter
* btn[3] (left-hand): back to GOT0

Each button passes through a two-flip-flop synchronizer. A press (a rising
edge) is held until the next step and then counts once. A short press is
therefore not lost, and a held button inserts one coin, not one per step.

What it shows:

* ENOUGH and VEND2: 8888 on the display and all eight LEDs lit.
* VEND1: everything dark, so that `VEND_FLASH = 1` gives two distinct
  flashes.
* GOT states: the money inserted, in decimal cents, on the two right-hand
  digits.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `lab26_top` | `SEC_DIV` | 50,000,000 | clock cycles per traffic step (1 s) |
| | `TICK_BITS` | 24 | RAM/vending step every 2^TICK_BITS cycles (~3 Hz) |
| | `SCAN_BIT` | 16 | counter bits that scan the display |
| | `WALK_FROM_BUTTON` | 1 | walk request from the button latch (1) or sw[7] (0) |
| | `VEND_FLASH` | 0 | enable VEND1/VEND2 |
| `tick_gen` | `DIV` | 50,000,000 | cycles per tick |

The defaults are the real board rates. The testbenches shrink them to a few
cycles.

## Simulating

Every testbench in `tb/` checks itself. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/lab26_pkg.sv tb/tb_lab26_top.sv --top-module tb_lab26_top
./obj_dir/Vtb_lab26_top
```

Replace `tb_lab26_top` with the name of any other testbench:

* `tb_lab26_top`: all four designs end to end, at reduced rates. The traffic
  step is 4 cycles and the RAM/vending step 16 cycles. Both traffic signals
  are compared pin by pin with a model on every cycle. The testbench counts
  each mechanism and fails if one never happened: the walk phase taken and
  skipped, the request latched and cleared, the switch request, each address
  operation, RAM writes, each coin, clear, ENOUGH, VEND1 and VEND2.
* `tb_lab26_full`: the top at its default, real rates. It runs 17 simulated
  seconds (850 million clock cycles). It covers a whole fixed cycle and a
  whole cycle of the WALK signal, including its walk phase, plus a RAM write
  and readback and a purchase with a quarter. This takes about 5-6 minutes of
  Verilator run time.
* One testbench per module (`tb_<module>`). Each compares the module with an
  independent model, such as a phase table written as letters, a glyph
  table written as segment names, an array model of the RAM, or a
  cents-based model of the vending machine.

## Where the design makes its own choices

These points are not fixed by the lab description, so the RTL picks
something reasonable:

* **Clock enables instead of slow clocks.** The lab text speaks of a ~3 Hz
  clock. Here everything runs on 50 MHz with enables, which gives the same
  behaviour at the step edges.
* **Vending machine price and states.** The 25-cent price and the
  GOT0-GOT20 states are this design's reading of a machine with six base
  states, since the two extra states VEND1 and VEND2 are numbered 6 and 7.
  Overpayment handling, coin priority and the GOT-state display are also
  choices made here.
* **Button capture in the vending machine.** Presses are captured by edge,
  while the RAM explorer samples its buttons as levels. The RAM explorer
  matches the described "hold the button and it keeps stepping".
* **Walk request.** It is a clocked flip-flop, not a level-sensitive SR latch,
  and clear has priority over set.
* **Display.** The polarity, the blanking, the blink phase of the decimal
  point, and the digit used for the walk-requested indicator.
* **RAM explorer counter.** The counter is 24 bits wide. The original
  synthesis of this design reported a 26-bit counter, but its top two bits
  are not needed here.

## Not included

* **Pin placement.** The FPGA pin constraints and the breadboard LEDs and
  resistors are not part of the RTL.
* **LED bring-up wiring.** A test mode that ties the connector pins straight
  to the slide switches, used to check the breadboard LEDs before the signal
  logic is loaded, is not part of the traffic-signal designs here.
* **LED sweep pattern.** A longer "Knight Rider" LED sweep after a purchase is
  left as an open exercise. It is not specified well enough to build.
