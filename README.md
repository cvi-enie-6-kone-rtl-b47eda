# Two-digit countdown timer with buzzer

This is a small timer for a CPLD board. It has two seven-segment digits, three DIP switches, a
set input, a start button, a reset button and a piezo buzzer. You choose a start value of 00,
10, … 70 on the switches and press start. The display then counts down to 00 one step per tick.
At 00 the buzzer gives eight short beeps. After that the timer reloads the start value and waits
for the next start. It is written to fit a 64-macrocell MAX3000A-class device (EPM3064A,
44-pin TQFP). That is why the preset covers only the tens digit and stops at 7.

The design is a textbook example of a finite-state machine driving counters. Its core is one
five-state controller. Around it sit a clock prescaler, two display decoders and a buzzer driver.

```
 clk_50mhz ─► prescaler ──clk_out1 (≈1 kHz tone)────────────► buzzer ─► buzzer_plus / buzzer_minus
                   └──────clk_out2 (≈167 Hz step clock)─┐        ▲ buzzer_en
                                                       ▼        │
 start_btn_n, set_btn_n, set_switch_n ───────► countdown_sm ────┘
                                                 │ units (4 b)  │ tens (3 b)
                                                 ▼              ▼
                                              bcd2seg        bcd2seg ({0,tens})
                                                 ▼              ▼
                                              display1       display10
```

## The controller (`countdown_sm`)

| state | what it does | leaves to |
|---|---|---|
| `ST_WAIT_FOR_START` | shows the preset | `ST_SET_TIME` if `set_btn_n` = 0; otherwise `ST_RUN_DOWN` if `start_btn_n` = 0 |
| `ST_SET_TIME` | tens digit and stored preset follow `~set_switch_n`; units digit = 0 | `ST_WAIT_FOR_START` when `set_btn_n` returns to 1 |
| `ST_RUN_DOWN` | one step per clock: units − 1; at units 0 it reloads 9 and the tens digit borrows | `ST_FINISH` on the clock after 00 is reached |
| `ST_FINISH` | digits held at 00; a 4-bit counter runs 15 → 0; `buzzer_en` = counter bit 0 | `ST_REFRESH` after count 0 |
| `ST_REFRESH` | tens digit ← preset, units ← 0, re-arms the finish counter | `ST_WAIT_FOR_START` |

Points a user should know:

* **Set beats start.** If both are low in `ST_WAIT_FOR_START`, the machine enters set mode.
* **The switches are read only in set mode.** Moving them at any other time changes nothing.
* **Reset** (asynchronous, active low) shows 70 with preset 7 and returns to `ST_WAIT_FOR_START`.
  The reset value of the finish counter is all ones.
* **Step counts.** A start from T0 shows T0, T0−1, … 00, so it takes 10·T steps to reach 00.
  The machine stays on 00 for one more step, then 16 finish steps, then one reload step.
  So the display shows 00 for 18 steps in all.
* **The tone.** `buzzer_en` is high when the finish counter is odd (15, 13, … 1). That gives 8
  beeps of one step each, separated by one-step pauses. The first beep starts on the first
  finish step.
* **All inputs are active low** (a pressed button or an "on" switch reads 0). They are sampled
  directly on the slow step clock, with no synchroniser and no debouncer. The slow clock is what
  makes that work on the board. If you raise the step rate a lot, add debouncing.

## Clocks (`prescaler`)

There are two toggle dividers in cascade, both on the 50 MHz board clock:

* **Stage 1.** It counts 0 … `DIV_FACTOR_BUZ/2` and toggles `clk_out1` when it wraps. The half
  period is `DIV_FACTOR_BUZ/2 + 1` = 25,001 cycles, which gives a 999.96 Hz tone.
* **Stage 2.** It advances only on the cycles when stage 1 wraps. It counts
  0 … `DIV_FACTOR_SM/DIV_FACTOR_BUZ` and then toggles `clk_out2`. The half period is
  (5 + 1) × 25,001 = 150,006 cycles. One full step period is therefore 300,012 cycles: 6.0 ms,
  or 166.7 Hz.

Both divisions are integer divisions, and the "+1" comes from comparing with `<` before
wrapping. With the default factors, a countdown from 70 takes about 0.43 s. To get roughly
one-second steps, set `DIV_FACTOR_SM = 24_950_000`. Stage 2 then counts to 499, and the period
is 25,001,000 cycles, which is 1.00004 s. That value still fits a 9-bit second-stage counter.
The counters are sized from the parameters.

The state machine and the buzzer run on these flip-flop-generated clocks, not on clock enables.
This matches a CPLD flow where any macrocell output can drive a clock. The outputs are
registered, so they are glitch-free. `buzzer_en` is a small combination of state-machine
registers, and the tone is gated with it combinationally. A short glitch on the buzzer pins at a
step edge is harmless for a piezo.

**Reset caveat.** While `rst_n` is low the prescaler is held, so the step clock stops. The
state machine therefore relies on the asynchronous edge of `rst_n`, not on clock edges during
reset. In simulation, drive `rst_n` high first and then low. A reset that is low from time zero
has no edge, so a two-state simulator never resets the state machine.

## Display and buzzer

* **`bcd2seg`** decodes 0–F into the pattern `{a,b,c,d,e,f,g,dp}` (bit 7 … bit 0), active low,
  for a common-anode display. The decimal point is always dark.
  * 7 lights only a, b, c.
  * 9 includes the bottom segment d.
  * 10–15 show as A, b, c, d, E, F.
  * The tens digit is zero-extended to 4 bits.
* **`buzzer`** drives the piezo differentially. `buzzer_plus = enable & tone` and
  `buzzer_minus = ~buzzer_plus`. When enabled, the two terminals swing in antiphase. When idle,
  plus rests low and minus high.

## Files

| file | content |
|---|---|
| `rtl/stopwatch_pkg.sv` | state enum, digit types, segment type |
| `rtl/prescaler.sv` | two-stage clock divider |
| `rtl/countdown_sm.sv` | the controller |
| `rtl/bcd2seg.sv` | seven-segment decoder |
| `rtl/buzzer.sv` | differential buzzer driver |
| `rtl/state_demo.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level ports of `state_demo` and their pins in the reference board assignment:

| port | dir | pin(s) |
|---|---|---|
| `clk_50mhz` | in | 37 |
| `rst_n` | in | 28 |
| `start_btn_n` | in | 27 |
| `set_btn_n` | in | 35 |
| `set_switch_n[2:0]` | in | 34, 33, 31 |
| `display1[7:0]` | out | 2, 3, 5, 6, 42, 43, 44, 10 |
| `display10[7:0]` | out | 18, 19, 20, 21, 22, 23, 25, 8 |
| `buzzer_plus` / `buzzer_minus` | out | 13 / 12 |

The pin placement belongs to your device flow's constraint file. There is no RTL for it.

Parameters of `state_demo` and `prescaler`:

| parameter | default | notes |
|---|---|---|
| `DIV_FACTOR_SM` | 250000 | |
| `DIV_FACTOR_BUZ` | 50000 | |

Parameter of `countdown_sm`:

| parameter | default | notes |
|---|---|---|
| `FINISH_W` | 4 | gives 2^(FINISH_W−1) beeps |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog. For
example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_state_demo \
    rtl/stopwatch_pkg.sv tb/tb_state_demo.sv -Mdir obj_top -o sim && obj_top/sim
```

Replace `tb_state_demo` with `tb_countdown_sm`, `tb_prescaler`, `tb_bcd2seg` or `tb_buzzer` to
run the other testbenches. Because of `-Irtl`, verilator finds the modules by file name.

* **`tb_state_demo`** runs the whole timer at its default parameters, about 41 M board cycles
  (about 25 s of simulator time). It takes these steps:
  1. Reset.
  2. Set mode with preset 1, and a check that the switches are ignored afterwards.
  3. A countdown 10 → 00, checking every value and the 300,012-cycle spacing, including the
     borrow at 10 → 09.
  4. The 18-step hold at 00, with exactly 48 tone edges (8 beeps × 6 tone periods) and none
     outside the finish phase.
  5. The reload, a second reset and the full countdown from 70.

  It counts each mechanism (set, ignored switches, start, borrow, tone, reload, reset) and fails
  if one never happens.
* **`tb_countdown_sm`** clocks the controller directly. It checks the following:
  * set mode for all eight switch values;
  * a countdown from every preset 00 … 70 with exact step counts;
  * the finish beep pattern;
  * the reload;
  * set-over-start priority;
  * an asynchronous reset in the middle of a count.
* **`tb_prescaler`** predicts every toggle of both outputs from a cycle counter. It does this for
  a small instance and for the default one.
* **`tb_bcd2seg`** and **`tb_buzzer`** are exhaustive.

## Resource estimate

After synthesis the design has 39 register bits. It also has 18 combinational output pins. That
makes about 57 macrocells against the 64 of an EPM3064A, and it uses 25 user pins. This is an
estimate: it does not count product-term expanders.

## Departures from the reference design and open points

* **Counter widths.** The prescaler counters are sized to their largest value instead of 25 bits
  each. The behaviour is the same.
* **Unused constants.** Two constants of the reference top level, `LIMIT` = 12 and
  `INCREMENT` = 2, are used nowhere and are left out.
* **Conflicting ranges.** The reference gives two different allowed ranges for `DIV_FACTOR_SM`:
  10,000–2,500,000 at the top level and 100,000–25,000,000 in the prescaler. No range is
  enforced here. The default 250,000 is valid under both.
* **Set mode.** The written exercise describes the first DIP switch as the set-mode selector,
  with the remaining switches giving the value. The circuit instead has a separate set input
  (`set_btn_n`) and three value switches. This follows the reference circuit and pin list. On the
  board, `set_btn_n` may well be wired to that first switch.
* **Step rate.** At the default dividers a "count" step is 6 ms, not one second. See *Clocks*
  for one-second steps.
* **Port names.** They are lower-case, with `_n` marking active-low signals.
