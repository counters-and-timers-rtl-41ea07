# Kitchen timer: counters and timers on one clock

A pushbutton kitchen timer that counts down from a few seconds to zero and
then lights an alarm. Its main idea is that everything runs from one fast
clock (50 MHz) and no signal made by logic is ever used as a clock. Slow
events are instead made by counters. A free-running down-counter marks each
second. Other registers act only on the cycle in which that counter is zero.
A pushbutton press is turned into a one-cycle pulse by comparing the
button's level with its value one clock earlier.

## What the timer does

- **Inputs:** `clk` (50 MHz), `reset_n` (a pushbutton, low when pressed) and
  `run_stop_in` (a raw pushbutton).
- **Outputs:** `seconds`, the 4-bit time remaining, shown on four LEDs, and
  `alarm`, shown on one LED.
- **Optional outputs:** `led`, a copy of `seconds` that blinks while the timer
  runs, and `seg`, the time remaining as one 7-segment digit.

Behaviour:

- **Reset** (`reset_n` low on a clock edge) loads the start time and stops
  the timer.
- **Each press of run/stop** toggles the timer between running and stopped.
  So the first press starts it, the second pauses it and the third resumes it.
- **While running,** `seconds` drops by one once per second until it reaches
  0. It never wraps below 0.
- **`alarm`** is on while the timer is running and `seconds` is 0. The next
  run/stop press stops the timer, which turns the alarm off.

The start time is `8 + (n mod 8)` seconds, where `n` is a per-unit digit.
This makes it 8 to 15 and always fits in 4 bits. The default is `n = 9`,
which gives 9 seconds. `kt_pkg::initial_seconds(n)` computes the value for
other digits.

## Block structure

```
run_stop_in ─► sync_debounce ─► run_state ──run──┬─────────────► alarm_logic ─► alarm
                (synchronizer)  (rising_edge_    │                   ▲
                                 detect inside)  ▼                   │
reset_n ───────────────────────────────────► second_timer ─count─► seconds_counter ─► seconds
                                                 │                   │
                                                 └─count─► display_blink ◄┘ ─► led
                                                           seg7_decoder ◄── seconds ─► seg
```

| Module | Kind | Role |
|---|---|---|
| `kitchen_timer` | top | Wires the blocks together. |
| `second_timer` | register | The `count` register. It is loaded with `CLK_HZ-1` on reset and at zero, and otherwise decremented while running. So `count == 0` happens once per second. |
| `seconds_counter` | register | The time remaining. It loads `INIT` on reset, and decrements when `run && count == 0 && seconds != 0`. |
| `run_state` | flip-flop | Cleared on reset. Inverted on each rising edge of the debounced button. |
| `rising_edge_detect` | flip-flop + gate | `sig_rising = sig && !sig_delayed`. |
| `alarm_logic` | combinational | `alarm = run && seconds == 0`. |
| `sync_debounce` | register + counter | Two-flip-flop synchronizer, then a stability counter. |
| `synchronizer` | flip-flops | A parameterised chain of flip-flops. The default is 2. |
| `display_blink` | combinational | Sets `led` to dark during the second half of each second while running. |
| `seg7_decoder` | combinational | Turns a hexadecimal digit into segments `{g,f,e,d,c,b,a}`. |
| `kt_pkg` | package | Clock rate, register width, start-time function and debounce length. |

## Making one second without a second clock

`second_timer` is the part of the design that creates time. It is an `N`-cycle
down-counter, with `N = CLK_HZ = 50,000,000`:

```
count_next = !reset_n       ? N-1
           : !run           ? count        (hold while stopped)
           : count == 0     ? N-1          (period over: reload)
           :                  count - 1
```

The counter steps `N-1, N-2, …, 1, 0, N-1, …`, so it is zero for exactly one
cycle in every `N`. It counts down to zero rather than up to a limit because
that needs no compare against a constant: reaching zero is the same as the
subtractor's borrow. With `N = 6` the sequence is `5 4 3 2 1 0 5 …`.
`second_timer_tb` checks that sequence.

The one-second event is then the condition `count == 0` in the next-state
logic of `seconds_counter`. It is never used as a clock. A clock made by
logic would arrive late and with more uncertainty than the board clock,
which limits speed. Dividing the clock down would only pay off for
battery-powered use, where a clock of about 100 Hz would still respond
quickly enough to a button press. This design keeps a single 50 MHz clock.

The counter **holds while the timer is stopped**, which is a choice of this
design. A paused timer therefore resumes part-way through the current second,
and the total running time adds up to exactly `INIT` seconds however often it
is paused. A free-running counter would also work. It would make the first
second after a resume anywhere from 0 to 1 s long.

## The run/stop button path

A raw pushbutton level is asynchronous to `clk`, and it bounces for a few
milliseconds when pressed or released. It passes through three stages before
it can toggle `run`:

1. **Synchronizer** (`synchronizer`, 2 flip-flops). The first flip-flop may
   go metastable. The second gives it a full clock period to settle.
2. **Debounce** (`sync_debounce`). A counter counts consecutive cycles on
   which the synchronised level differs from the output. Any cycle on which
   they agree clears it. When it reaches `DEBOUNCE_CYCLES` (default 500,000,
   which is 10 ms at 50 MHz), the output takes the new level. Bounce pulses
   shorter than that never reach the output.
3. **Edge detection** (`rising_edge_detect` inside `run_state`). The clean
   level is compared with its value one clock earlier. A "low then high"
   gives one pulse, which inverts `run`. Holding the button down gives only
   one toggle.

Cycle timing of a clean press applied just after clock edge `e`:

| Event | Clock edge |
|---|---|
| synchronised level changes | `e + 2` |
| debounced `run_stop` changes | `e + 2 + DEBOUNCE_CYCLES` |
| `run` toggles | `e + 3 + DEBOUNCE_CYCLES` |
| first decrement of `seconds` (after reset) | `e + 3 + DEBOUNCE_CYCLES + CLK_HZ` |
| each later decrement | `CLK_HZ` edges after the previous one |

`sync_debounce` has no reset, and neither does the edge detector's
flip-flop. After power-up their outputs are valid once the button has been
steady for `DEBOUNCE_CYCLES` cycles. A reset held that long covers this,
because reset forces `run` to 0 whatever the edge detector reports.

## Reset

Reset is **synchronous**. No register has an asynchronous set or clear.
`reset_n` only selects the value loaded on the next clock edge: `N-1` into
`count`, `INIT` into `seconds` and 0 into `run`. If reset and a button edge
arrive in the same cycle, reset wins. `reset_n` goes into the logic without a
synchronizer or debouncer. This is harmless for a level that only forces
registers to fixed values, but on a real board metastability is possible if
reset is released close to a clock edge.

## Optional displays

- **`led`** shows `seconds` steadily while the timer is stopped. While it
  runs, `led` is lit for the first half of each second (`count >= N/2`) and
  dark for the second half. This gives a 1 Hz, 50% duty-cycle blink made
  from the same counter, with no extra clock.
- **`seg`** shows `seconds` as one hexadecimal digit (`0–9`, `A b C d E F`).
  The start value can be up to 15, so one digit is enough. Bit 0 is segment
  `a` and bit 6 is segment `g`. `SEG_ACTIVE_LOW = 1` inverts the outputs for
  common-anode displays.

Both displays are extra outputs. `seconds` and `alarm` behave exactly as
specified whether or not the displays are connected.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 50,000,000 | Clock cycles per second, and so the period of `second_timer`. |
| `INIT_SECONDS` | 9 | Start time, `8 + (n mod 8)` with `n = 9`. |
| `DEBOUNCE_CYCLES` | 500,000 | Cycles the button must be steady (10 ms). This is a design choice. |
| `SEG_ACTIVE_LOW` | 0 | Polarity of `seg`. |

Changing the timer's rate means changing `CLK_HZ`. For example, `CLK_HZ/10`
counts tenths of a second. A different start time means changing
`INIT_SECONDS`. A falling-edge run/stop control would need `sig && !sig0` in
`rising_edge_detect` to become `!sig && sig0`. An active-high reset would
need the `!reset_n` tests to be inverted.

## What follows the specification and what was chosen here

These follow the specification:

- the run/toggle and reset rules;
- the decrement rule and the alarm equation;
- the reload-at-zero timer with period `N`;
- the 50 MHz clock, the 4-bit time remaining and the start-time formula;
- the edge detector;
- the synchronizer with two flip-flops;
- a single clock with synchronous reset.

These are choices of this design:

- The insides of the debouncer and its 10 ms interval. Only the
  debouncer's function and connections (switch in, clock, clean out) are
  specified.
- Holding the one-second counter while the timer is stopped.
- Reset taking priority over a simultaneous button edge.
- The blink rate and which half of each second is dark.
- The 7-segment digit shapes, bit order and polarity.
- Bringing the optional displays out as separate outputs.

Not included:

- Pin assignments and pull-up settings. They belong in the FPGA/CPLD
  constraints. The original board used these pins:

  | Signal | Pin |
  |---|---|
  | `clk` | 12 |
  | `run_stop` | 2 |
  | `reset_n` | 29 |
  | LEDs | 44, 48, 50 and 52 |
  | `alarm` | 77 |

  The two buttons use internal pull-ups.
- A design clocked from a divided-down clock.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each ends
with a `TB_RESULT checks=N failures=M` line and has a watchdog.

- **Leaf tests:**
  - `second_timer_tb` checks the period-6 sequence against a cycle-count
    reference, the hold while stopped, reload on reset and the default reload
    value.
  - `seconds_counter_tb` runs 2000 random cycles against a reference model.
  - `alarm_logic_tb`, `display_blink_tb` and `seg7_decoder_tb` are
    exhaustive. `seg7_decoder_tb` builds the expected result per segment,
    not per digit.
  - `sync_debounce_tb` checks that bounce is rejected and that the latency
    is exactly `2 + DEBOUNCE_CYCLES`.
  - `synchronizer_tb`, `rising_edge_detect_tb` and `run_state_tb` are also
    included.
- **`kitchen_timer_tb`** runs the whole timer with a 20-cycle second and a
  4-cycle debounce, pressing the buttons with bounce. It checks:
  - start value and no counting after reset;
  - bounce alone is ignored;
  - start, pause and resume;
  - reset while running;
  - countdown to zero with the alarm on;
  - the alarm turning off on the next press;
  - press-to-decrement latency and decrement spacing to the cycle;
  - `led` and `seg` against `seconds`.

  It counts every mechanism and fails if one never happened.
- **`kitchen_timer_full_tb`** runs one complete 9-second countdown at the
  default parameters: 50 MHz, 10 ms debounce, about 460 million cycles. It
  checks that each decrement is exactly 50,000,000 cycles after the previous
  one. It takes about 3 minutes in Verilator.

`seconds_counter` also has an assertion: outside reset, `seconds` only holds
or drops by one.

## Simulating

Package first, then the testbench; `-y rtl` finds the modules:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module kitchen_timer_tb \
    rtl/kt_pkg.sv tb/kitchen_timer_tb.sv
./obj_dir/Vkitchen_timer_tb
```

Replace `kitchen_timer_tb` with any other testbench name. Lint a module
with:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/kt_pkg.sv rtl/kitchen_timer.sv
```
