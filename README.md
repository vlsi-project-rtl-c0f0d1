# Stopwatch chip: a two-phase latch-based 00.00–99.99 s timer

This chip is a stopwatch. It counts the cycles of a clock whose rate is known
(500 kHz), turns them into hundredths, tenths, seconds and tens of seconds,
and drives four common seven-segment displays. It has two buttons. `startstop`
starts and pauses the count. `reset` clears it to 00.00.

The design splits into two parts:

* **The datapath**, the regular part. It is a row of five counter/comparator
  "slices" joined by a thin strip of gating logic, the *zipper*.
* **The controller**, the irregular part. It holds the run/pause mode
  register and the four seven-segment decoders.

All storage is built from level-sensitive latches clocked by two
non-overlapping phases, `ph1` and `ph2`. Edge-triggered flip-flops are not
used anywhere.

```
             +---------------------------- datapath ----------------------------+
 mode ------>| ticks (13b) -> hundredths -> tenths -> seconds -> tens (4b BCD)  |
             |  ==4999         ==9           ==9        ==9        ==9          |
             |  zipper: enable[i+1] = enable[i] & last[i];                      |
             |          clear[i]    = enable[i+1] | reset                       |
             +--------------------------------------------------------------------+
                     | 4 x BCD digit
             +-------v------- controller ------------------+
 startstop ->| press detect -> mode toggle     4 x sevenseg|--> hundredths, tenths,
 reset ----->|                                              |    secs, tens [6:0]
             +----------------------------------------------+
```

## How time is counted: slices and the zipper

Each slice is a counter plus an equality comparator against a constant
(`timeslice.sv`). The comparator marks the slice's last value:

| slice      | width | last value | advances every            |
|------------|-------|------------|---------------------------|
| ticks      | 13    | 4999       | clock cycle (while running) |
| hundredths | 4     | 9          | 5000 cycles = 0.01 s      |
| tenths     | 4     | 9          | 0.1 s                     |
| seconds    | 4     | 9          | 1 s                       |
| tens       | 4     | 9          | 10 s                      |

The slices have no carry logic of their own. The zipper supplies it as a
ripple of enables and clears (`datapath.sv`):

```
enable[0]   = mode                       // count only while running
enable[i+1] = enable[i] & last[i]        // carry into the next slice
clear[i]    = enable[i+1] | reset        // this slice rolls over to 0
```

Suppose that in some cycle the stopwatch is running and the tick counter
shows 4999. Then `enable[1]` is high. The tick slice clears and the
hundredths slice advances, both at the same clock edge. If hundredths also
shows 9, `enable[2]` is high as well, so hundredths clears and tenths
advances, and so on up the chain.

A clear always wins over that slice's own enable. The counter's register
has a reset multiplexer in front of it: the clear selects zero, and
otherwise the input is the count plus `enable`. So a slice at its last value
goes straight to 0.

When the stopwatch is paused, `enable[0]` is low, so every enable and every
clear is low and nothing moves. The hidden tick count is kept across a
pause. The next hundredth therefore arrives when the remaining ticks of the
interrupted hundredth have run out, not a full 5000 cycles after the resume.

After 99.99 the tens slice clears as well and the display wraps to 00.00,
then keeps counting. No overflow flag or stop is defined.

Each slice's counter adds its enable bit through a ripple chain of half
adders (`incrementer.sv`, `halfadd.sv`), one per bit. This matches the
one-bit register/adder cells of a hand-drawn counter.

## Two-phase clocking and latch registers

Every register is a `flop`: a master latch that is transparent while `ph2`
is high, followed by a slave latch that is transparent while `ph1` is high.
`flopr` adds the reset multiplexer in front of it.

One clock period runs: gap, `ph1` high, gap, `ph2` high. For an engineer
used to edge-triggered logic, this means:

* Inputs (`startstop`, `reset`, and internally the next-state logic) are
  sampled while `ph2` is high. The master closes when `ph2` falls.
* State, and so every output, changes when `ph1` rises. It then stays put
  for the rest of the period.
* **`ph1` and `ph2` must never be high together.** If they were, master and
  slave would both be transparent and a value could race through a register
  and around a counter loop. `flop.sv` asserts the rule at each rising edge.

Latency from the buttons:

* A press of `startstop` sampled in cycle *k* changes `mode` at the start of
  cycle *k*+1.
* The first counted tick lands at the start of cycle *k*+2.
* The display then shows *N* div 5000 hundredths, where *N* is the number of
  cycles in which `mode` was high when sampled.

Because each register is two latches, lint and synthesis tools report
combinational loops: counter → incrementer → reset mux → master → slave →
counter. Those loops are present in the netlist, but they never conduct. At
any instant at least one latch in each loop is opaque. The warnings are
expected, and the module headers say so.

A synthesized netlist of the full chip has 62 latch bits:

* 2 × (13 + 4 × 4) for the datapath;
* 2 × 2 for the mode and held-button registers.

It has no flip-flops.

## The start/pause button

`controller.sv` keeps two one-bit registers:

* `helddown` is the value `startstop` had in the previous cycle.
* `mode` is 1 while counting (`COUNTING`) and 0 while paused (`PAUSED`).

A *press* is `startstop & ~helddown`: the first cycle in which the button
reads high. Each press toggles `mode`. A button held down for a long time
therefore toggles once, not once per cycle.

`reset` clears both registers and wins over a press in the same cycle. A
button still held when reset is released counts as a fresh press and starts
the count.

Button bounce is not filtered on chip. Debounced buttons are assumed.

## Display outputs

Each output bus is 7 bits, ordered G..A:

| bit     | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---------|---|---|---|---|---|---|---|
| segment | A (top) | B (top right) | C (bottom right) | D (bottom) | E (bottom left) | F (top left) | G (middle) |

`sevenseg.sv` has a glyph for every hex value (0–9, A, b, c, d, E, F). The
stopwatch only ever shows 0–9.

**Polarity.** By default a lit segment is driven **low**
(`SEG_ACTIVE_LOW = 1`). This is the polarity of the original decoder tables.
A common-cathode display wired straight to the pins instead needs a high
level to light a segment. The chip is described as driving common-cathode
displays, so the two sources disagree. Set `SEG_ACTIVE_LOW = 0` on
`timerchip` (or `ACTIVE_LOW = 0` on `sevenseg`) for active-high outputs.

## Top-level interface (`timerchip`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `ph1`, `ph2` | in | 1 | non-overlapping two-phase clock, 500 kHz |
| `reset` | in | 1 | synchronous clear to 00.00 and pause, active high |
| `startstop` | in | 1 | start/pause button, active high |
| `hundredths`, `tenths`, `secs`, `tens` | out | 7 each | segment buses, G..A |

| parameter | default | meaning |
|-----------|---------|---------|
| `TICKS_PER_HUNDREDTH` | 5000 | clock cycles per 0.01 s; the tick slice's last value is this minus 1 |
| `TICK_W` | 13 | tick counter width; must hold `TICKS_PER_HUNDREDTH-1` |
| `SEG_ACTIVE_LOW` | 1 | segment polarity, see above |

The tick count is fixed for a 500 kHz clock, but other rates still work:

* **Slower clock.** At 50 kHz the display runs ten times slow, so the tenths
  digit steps once per real second. This is a handy check of the low digits
  by eye.
* **Other clock rates in real time.** Change `TICKS_PER_HUNDREDTH` (and
  `TICK_W` if needed) to clock rate / 100.

Not part of the RTL:

* the supply pins;
* the pad ring of the packaged part;
* the generator of the two clock phases, which the chip expects from outside.

## Files

Hierarchy:

```
timerchip
├── datapath
│   └── timeslice ×5 ── counter ── flopr ── flop ── latch ×2
│                    │          └─ incrementer ── halfadd ×WIDTH
│                    └─ comparator
└── controller
    ├── flopr ×2 (mode, helddown)
    └── sevenseg ×4
```

* `rtl/stopwatch_pkg.sv` holds the shared constants (clock rate, ticks per
  hundredth, widths) and the types: `digit_t`, `segs_t`, and the `mode_t`
  enum.
* Each module's file begins with a description of its function, interface
  and timing.

## Simulating

The testbenches use only `verilator`. Each one prints a line of the form
`TB_RESULT checks=N failures=M` and exits. For example, to run the
end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/stopwatch_pkg.sv tb/tb_seg_pkg.sv tb/tb_timerchip.sv \
    --top-module tb_timerchip
./obj_dir/Vtb_timerchip
```

Replace `tb_timerchip` to run another testbench. `-Wno-fatal` is needed
because of the latch-loop warnings described above.

The testbenches share two helpers:

* `tb/two_phase_clock.sv` generates the two phases: 200 ns gaps and 800 ns
  high times, so a 2 µs period.
* `tb/tb_seg_pkg.sv` builds the expected segment patterns from the letters
  of the segments each digit lights. It does not copy the decoder's table.

The testbenches:

* **`tb_timerchip_full`: the chip at its real size.**
  * It takes about 40 s of wall time.
  * It runs about 115 s of chip time at 500 kHz: start, readings at 5.43 s
    and 7.57 s, a pause held for 0.5 s, a resume held for 1 s, reset while
    `startstop` is held (reset wins, and toggling under reset does nothing),
    0.90 s after a restart, then on to 99.99 and past the wrap to 00.00.
* **`tb_timerchip_50khz`: the slow-clock bench test.**
  * The default chip is clocked at 50 kHz.
  * The tenths digit is checked to step once per simulated second, from
    0.55 s to 9.55 s.
* **`tb_timerchip`: end-to-end with 3 cycles per hundredth.**
  * It covers the full 00.00 → 99.99 → 00.00 range with random presses
    (some held for several cycles) and resets.
  * A reference model checks every cycle.
  * It counts each behaviour: start, pause, resume, held press, reset while
    running, reset together with a press, frozen display while paused, idle
    display after reset, rollover of each digit, and the wrap. One that never
    happened is a failure.
* **`tb_datapath`: the slice chain at 4 cycles per hundredth.**
  * It runs with random pauses and resets through a full wrap.
* **Per-module testbenches:**
  * `tb_timeslice`, `tb_counter`, `tb_incrementer` (exhaustive at 8 bits),
    `tb_halfadd`, and `tb_comparator` (all 8192 values against 4999).
  * `tb_flopr`, `tb_flop` (checks that `q` holds during `ph2` and ignores
    `d` changes after `ph2` closes), and `tb_latch`.
  * `tb_controller` (random press lengths and resets during presses),
    `tb_sevenseg` (both polarities), and `tb_stopwatch_pkg` (the constants
    are consistent).

Several testbenches shorten the hundredth through the parameters.
`tb_timerchip_full` and `tb_timerchip_50khz` run the chip at its defaults.

The simulator used has two states, so every register is reset before it is
read. After power-up the chip's state is undefined until `reset` has been
applied for at least one cycle.

## Design decisions and departures

* **Tick count as a parameter.** The chip itself has 5000 hard-wired. Here
  it is a parameter, with 5000 as the default.
* **Slices as modules.** Each counter/comparator pair is its own `timeslice`
  module. The datapath uses four identical digit slices and one tick slice.
* **Half-adder incrementer.** The incrementer is written as a half-adder
  ripple chain rather than a `+`. The behaviour is the same either way.
* **Unused datapath input.** The datapath has no `startstop` input, because
  it would not use it.
* **Wrap after 99.99.** Reaching 99.99 is not treated as an error; the count
  wraps to 00.00.
* **Segment polarity.** The default follows the original decoder tables
  (active low). See "Display outputs" for the conflict.
