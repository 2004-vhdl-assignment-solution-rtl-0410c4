# Two reaction timers for a small CPLD

A reaction timer measures how quickly someone responds to a cue. The user
presses **Start**, waits an unpredictable 4 to 8 seconds until the four-digit
display starts counting, and then presses **Stop** as fast as possible. The
display then holds the reaction time in milliseconds, from 0000 to 9999.
If nobody presses Stop, the count stops at 9999.

This repository holds two ways of building that timer from one 2.048 kHz
clock, two push buttons and four seven-segment displays. Both were sized for
a 64-macrocell CPLD.

* **Timer 1** (`react_timer1`) keeps two counters. A 14-bit counter runs
  freely and supplies the random delay. A separate four-digit decimal counter
  measures the reaction. It needs 32 flip-flops.
* **Timer 2** (`react_timer2`) uses a single four-digit counter for both jobs.
  The display is blanked while this counter makes the delay and is switched
  on when the counter wraps from 9999 to 0000. It needs 19 flip-flops.

`react_timer_top` places both timers side by side. Each has its own ports.
They share no logic.

## Common conventions

| Item | Convention |
|---|---|
| Clock | 2.048 kHz. Each display step takes 2 clocks, about 0.98 ms, so the display reads in milliseconds. |
| Buttons | `start_n` and `stop_n` are active low (0 = pressed). They are sampled on the rising clock edge. There is no debouncing or synchroniser. |
| Reset | `rst` is synchronous and active high. It clears every register to 0. |
| Segments | `seg[i]` drives digit `i`, and `seg[0]` is the least significant digit. Each value is 7 bits `{a,b,c,d,e,f,g}`: bit 6 is segment a and bit 0 is segment g. Segments are active low (0 = lit), so "0" is `7'b0000001`. |
| Digits | `digits_t` is four 4-bit digits, and `digits[0]` is the least significant. |

The shared types and constants are in `rtl/react_timer_pkg.sv`.

## Timer 1: a free-running counter as the source of randomness

### Where the delay comes from

`rt1_random_counter` is a 14-bit counter that advances on every clock from
power-up. At 2.048 kHz it rolls over every 2^14 / 2048 = 8 s. The timing of a
Start press against this counter is effectively random, and the circuit uses
that as its random source.

For as long as Start is held, the counter keeps advancing, but the top bit of
each new value is forced to 0. The other 13 bits are left alone. After the
last Start clock the counter holds a value between 0 and 8191, so the next
rollover is 8193 to 16384 clocks away (4 to 8 s). Where it lands in that
range depends on how long the board had been running when Start was pressed.

Bit 0 of the same counter is the divide-by-2 stage. The display advances only
on clocks where bit 0 is 1, which happens on every second clock (1.024 kHz).

The width is the parameter `COUNT_W` (default 14). Setting it to 7 gives a
short counter with a 64-clock period, which is useful for watching the
mechanism in a waveform viewer. For example, if Start is pressed while the
7-bit counter reads 84, the next value is 21: 84 + 1 = `1010101`, and
clearing the MSB leaves `0010101`.

### The two flags

`rt1_run_control` holds two flags:

* `wait_ran`: Start has armed the timer, and the next rollover ends the delay.
* `run`: the display counter is advancing.

On every clock edge it applies the first of these rules that matches:

| # | Condition | Effect |
|---|---|---|
| 1 | counter = 0 and `wait_ran` | `run` ← 1 (the delay is over) |
| 2 | Start pressed | `wait_ran` ← 1, `run` ← 0, display cleared, counter MSB cleared |
| 3 | Stop pressed | `run` ← 0, `wait_ran` ← 0 |
| 4 | `run`, tick, display = 9999 | `run` ← 0, `wait_ran` ← 0 (halt at 9999) |
| 5 | `run` and tick | display + 1 |

Some consequences of this order:

* **Early Stop:** Stop pressed during the delay clears `wait_ran`. The display
  then never starts, and the user has to press Start again.
* **Start at a rollover:** if Start is pressed on the exact clock of a
  rollover while the timer is armed, rule 1 wins and timing starts at once.
  The chance of this is one in 16384 clocks.
* **`wait_ran` after the delay:** rule 1 does not clear `wait_ran`. Rules 3
  and 4 clear it, and rule 4 always fires within 10 s, so a second rollover
  cannot restart a finished measurement.

### Display counter

The display counter is four `bcd_digit` decade counters in a chain. A digit
advances when the digits below it all read 9, and a 9 becomes 0. The chain is
formed by each digit's combinational carry (`inc & digit==9`). Start clears
all four digits.

`bcd_max_detect` raises `max` when the display reads 9999. Rule 4 uses this
flag, so the count never wraps.

Timing:

* `running` rises on the clock edge that follows the rollover.
* The first display step comes one clock after that.
* After `k` clocks of running, the display holds ⌊(k+1)/2⌋.
* The display reaches 9999 after 19997 clocks and stops two clocks later.

## Timer 2: one counter for the delay and the measurement

Timer 2 drops the 14-bit counter. While Start is held, the four display
digits are scrambled and the display is blanked. The digits then count up,
still hidden, until they wrap from 9999 to 0000. That wrap is the cue. The
display switches on and the same counter goes on to time the reaction from
0000.

### Scrambling (`rt2_display_counter`, `randomize` = 1)

While Start is held, each digit steps on its own at the full clock rate.
There are no carries between digits.

| Digit | Step | Cycle |
|---|---|---|
| 3 (thousands) | +1 while below 5, else reload 2 | 2, 3, 4, 5, 2, … |
| 2 (hundreds) | +1 while below 9, else 0 | 0 … 9 |
| 1 (tens) | +1, 4-bit wrap | 0 … F |
| 0 (units) | −1, 4-bit wrap | F … 0 |

Starting from 0000, one step gives 1,1,1,F and four steps give 4,4,4,C.
Digits 1 and 0 cycle at different rates, so the value left behind depends
only on how long Start was held. (The top digit may read 0 or 1 during the
first step or two after reset.)

### Counting the delay (`count_en` = 1)

After Start is released, the number is incremented as a decimal number once
every two clocks.

* A digit that reads 9 becomes 0 and carries into the next digit.
* Any other value simply increments. This includes the hex values A–F that
  scrambling can leave in digits 1 and 0, and such a digit wraps from F to 0
  without carrying. For example, `20A0` reaches `20F9` and then goes to
  `2000`.

The top digit starts between 2 and 5, so reaching 9999 takes roughly 4000 to
8000 steps (about 4 to 8 s). Hex digits add at most a few dozen steps.

### The controller (`rt2_control`)

The controller keeps three registers:

* `clk1` toggles on every clock. It is the divide-by-2 phase.
* `show` is 1 when the display is on.
* `halt` is 1 when the count is frozen.

On each clock edge it applies the first of these rules that matches:

| # | Condition | Effect |
|---|---|---|
| 1 | Start pressed, **or** Stop pressed while `show` = 0 | scramble; `halt` ← 0, `show` ← 0 |
| 2 | `halt` or `clk1` = 0 | hold |
| 3 | Stop pressed (display on) | `halt` ← 1 |
| 4 | display = 9999 and `show` | `halt` ← 1 |
| 5 | otherwise | decimal increment; if the value is 9999 (so `show` = 0 here), `show` ← 1 |

Some consequences:

* **Switch-on:** rule 5 is where the delay ends. The 9999 → 0000 wrap and the
  rise of `show` happen on the same edge, so the user first sees 0000.
* **Early Stop:** pressing Stop before the display is on counts as Start and
  scrambles again. The user cannot win by guessing.
* **Halting:** Stop takes effect on the next edge where `clk1` = 1, so within
  two clocks.

### Blanking

`seven_seg_blank` shows the digit when `show` = 1. When `show` = 0 it shows a
single dash (only segment g lit), so the blanked display reads `----`.

## Seven-segment decoding

`seven_seg` maps every 4-bit value to a glyph: 0–9, then A, b, C, d, E and F
for 10–15. Timer 1 uses it directly. Timer 2 uses it through
`seven_seg_blank`. The hex glyphs matter for timer 2, because the scrambled
digits 1 and 0 can hold A–F. Those values are normally hidden by the blanking.

## Module map

```
react_timer_top
├── react_timer1            timer 1
│   ├── rt1_random_counter  14-bit free-running counter, MSB clear, divide-by-2
│   ├── rt1_run_control     wait_ran / run flags
│   ├── bcd_digit ×4        chained decade counters
│   ├── bcd_max_detect      9999 detector
│   └── seven_seg ×4        decoders
└── react_timer2            timer 2
    ├── rt2_control         clk1, show, halt, mode select
    ├── rt2_display_counter scramble / decimal count
    ├── bcd_max_detect      9999 detector
    └── seven_seg_blank ×4  decoders with blanking (each uses seven_seg)
```

`react_timer_pkg` holds the shared types (`digit_t`, `digits_t`, `seg_t`),
`DIGIT_MAX` and the dash pattern `SEG_DASH`.

Observation outputs:

* `react_timer1` brings out `digits` and `running`.
* `react_timer2` brings out `digits`, `show` and `halt`.

A board build needs only the clock, reset, buttons and segments. The other
outputs can be left unconnected.

## Fidelity and design choices

These points follow the timers as originally specified:

* the 14-bit counter, the MSB-clear trick and the use of bit 0 as the
  divide-by-2;
* the priority order of both flag sets;
* the scrambling rules and the 9999 → 0000 switch-on;
* the decoder glyphs, the active-low segment order and the dash pattern;
* the 2.048 kHz clock.

These are choices of this implementation:

* **Reset.** Neither timer originally had a reset. Timer 1 relies on the
  counter's power-up state. A synchronous `rst` was added so that simulation
  and hardware start from a known state. Timer 1 still gets its randomness
  from when Start is pressed after reset.
* **Module split.** The partitioning into modules and the carry-enable
  interface between digits are this implementation's own. The cycle behaviour
  is the same as that of a single clocked process.
* **Top level.** Both timers sit in one top for convenience. On the board
  each timer is a separate CPLD design.
* **Buttons.** There is no debouncing, as originally specified. A bouncing
  Stop contact is harmless. Bounce on Start only re-scrambles or re-arms the
  timer.

## Resources

| | Flip-flops | Reference fit on a 64-macrocell CPLD |
|---|---|---|
| Timer 1 | 32 (14 counter + 16 display + 2 flags) | 64 of 64 macrocells |
| Timer 2 | 19 (16 digits + clk1 + show + halt) | 51 of 64 macrocells |

Both use 3 functional inputs and 28 segment outputs.

## Simulation

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
All of them run at the real sizes (14-bit counter, 2.048 kHz timing in
clocks) in a second or less.

The unit testbenches check the following:

| Testbench | What it checks |
|---|---|
| `tb_seven_seg`, `tb_seven_seg_blank` | Every input value against glyphs built from lists of lit segments. |
| `tb_bcd_max_detect` | All 65536 digit patterns. |
| `tb_bcd_digit` | Random clear and increment stimulus against a modulo-10 model. |
| `tb_rt1_random_counter` | The 8 s period, the 84 → 21 MSB clear on the 7-bit counter, the 4–8 s rollover window after a clear, and a random model comparison. |
| `tb_rt1_run_control`, `tb_rt2_control` | Random inputs against reference models of the rule tables. They also count that every rule fired. |
| `tb_rt2_display_counter` | The scramble sequence from 0000, counting through all 10000 values and the wrap, and hex digits stepping without carries. |

The end-to-end testbenches are these:

* `tb_react_timer1` and `tb_react_timer2` play several complete
  measurements. These include random Start and Stop times, runs to 9999 and
  early Stop presses. They check the delay windows, the held values and the
  segment outputs.
* `tb_react_timer_top` runs both timers in parallel through every mechanism.
  It counts each one and fails if any mechanism never happened.
* `tb_waveform_sequences` replays short reference sequences clock by clock.
  For timer 1 it uses the 7-bit counter: the display stops at 0438, and a
  Start press at count 84 gives 21, 22, 23, 24 and a 105-clock delay. For
  timer 2 it holds Start for 20 clocks from reset, which leaves 4,0,4,C.
  Digit 0 then steps D, E, F, 0, 1 every two clocks, and the display comes
  on at 0000 after the wrap.

Run a testbench with Verilator 5, listing the package first:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/react_timer_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/tb_react_timer_top.sv --top-module tb_react_timer_top
./obj_dir/Vtb_react_timer_top
```

Replace the testbench file and `--top-module` to run another one. The
package must come before the modules that import it.
