# Reconfigurable-clock-rate 128-bit synchronous binary counter

A wide synchronous counter is hard to run fast. Every bit is clocked together,
but bit *i* may only toggle when all bits below it are ones, and that
"all lower bits are one" condition has to travel along the whole width in one
clock period. At 128 bits the carry path is long, it has a large fan-out, and
the counter burns power on every edge.

This design runs the 128-bit counter at a **selectable fraction of the input
clock**. A clock divider, set at run time by three select lines, decides how
often the counter advances; while `count` is high the counter adds one per
divided period. A slower rate gives the carry path several input clocks to
settle and cuts switching activity. The counter itself stays a plain
synchronous binary counter.

## Structure

```
            +-----------------+  tick   +------------------------+
 clk ------>|  clock_divider  |---+---->|                        |
 rst ------>|  (8-bit         |   |     |  sync_binary_counter   |---> out1 [127:0]
 sel1..3 -->|   prescaler)    |  AND--->|  en   (128 bits)       |---> out3 (carry out)
            +-----------------+   |     +------------------------+
                     |          count
                     +---------------------------------------------> out2 (divided clock)
```

| File | Content |
|---|---|
| `rtl/rcr_pkg.sv` | counter width, number of select lines, rate-code enum `rate_sel_e`, `div_ratio()` |
| `rtl/sync_binary_counter.sv` | the WIDTH-bit synchronous up counter |
| `rtl/clock_divider.sv` | prescaler, rate selection, strobe and divided clock |
| `rtl/rcr_counter_top.sv` | top level: divider driving the counter |

Everything is in one clock domain with a synchronous, active-high reset.

## The counter: toggle chain

`sync_binary_counter` uses the textbook toggle form of a synchronous counter:

* bit 0 toggles on every enabled edge;
* bit *i* toggles when the enable and bits *i-1 .. 0* are all high.

The toggle conditions are built as a running AND: `t[0] = en`,
`t[i] = t[i-1] & q[i-1]`, and `q <= q ^ t`. The last link of the chain,
`en & (&q)`, is `carry_out`. It is high in the one cycle where the count is
all ones and is about to wrap to zero, so it can also cascade a further
counter. The chain is written serially. A synthesis tool is free to rebuild
it as a tree, and at 128 bits it usually should.

## The clock divider and what "rate" means here

The divider is a free-running 8-bit prescaler `pre` that increments on every
input clock. Bit *k* of it is a square wave with period 2^(k+1) cycles. The
3-bit rate code `{sel3, sel2, sel1}` picks that bit:

| code | `rate_sel_e` | counter advances every |
|---|---|---|
| 0 | `DIV2` | 2 cycles |
| 1 | `DIV4` | 4 cycles |
| ... | ... | ... |
| 7 | `DIV256` | 256 cycles |

The counter is **not** clocked by the divided clock. Instead the divider
raises `tick` for one cycle whenever the low `code+1` prescaler bits are all
ones. That is the cycle right before each rising edge of the divided clock.
The counter uses `count & tick` as its clock enable. It therefore advances
exactly at the rising edges of the divided clock, but with no derived clock
and no clock-domain crossing. The divided clock itself comes out on `out2`,
so the selected rate can be observed.

Timing after reset (all counted in input clock edges, code *c*, P = 2^(c+1)):

* `out2` is low for P/2 cycles, then high for P/2 cycles, and so on.
* With `count` high, the first increment lands on edge P and then one every P
  edges.
* `count` low in a tick cycle simply skips that increment. The divider keeps
  running, so the phase of the rate is not disturbed.
* A new code takes effect immediately, without a reset. The prescaler is not
  restarted, so the period in progress can end early. The first increment at
  the new rate comes at the next point where `pre` mod P = P-1.

## Top-level ports (`rcr_counter_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | input clock |
| `rst` | in | 1 | synchronous active-high reset of counter and divider |
| `count` | in | 1 | count enable |
| `sel1`, `sel2`, `sel3` | in | 1 each | rate code, `sel1` is the LSB |
| `out1` | out | `WIDTH` | count value (registered) |
| `out2` | out | 1 | divided clock, 50 % duty (registered prescaler bit) |
| `out3` | out | 1 | carry out: count all ones and about to wrap (combinational) |

Parameters: `WIDTH` (default 128) and `SEL_W` (default 3). With `SEL_W = s`
there are 2^s rates, from divide-by-2 to divide-by-2^(2^s).

## What is specified and what is chosen here

Specified for this design: a 128-bit synchronous binary counter whose rate
comes from a clock divider; the port names `clk`, `rst`, `count`, `sel1..3`,
`out1..3`; and the toggle rule of the counter bits.

Chosen here, because nothing more precise was available:

* the widths and meanings of the ports: one bit per select line, the
  count on `out1`, the divided clock on `out2` and the carry out on `out3`;
* the rate encoding (power-of-two ratios 2..256) and the prescaler that
  makes them;
* the clock-enable form instead of clocking the counter from a divided clock;
* synchronous, active-high reset to zero;
* no up/down control and no parallel load. These are common counter
  features, but they are not part of this design's interface.

The intended benefit of the design is lower power and delay than an
existing 64-bit synchronous counter. That is a property of the silicon
implementation. RTL simulation neither shows nor checks it.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.
Each also has a watchdog.

| Testbench | What it does |
|---|---|
| `tb/tb_sync_binary_counter.sv` | 128-bit and 8-bit counters under a random enable, compared every cycle with integer addition; carry out, hold, wrap and reset checked |
| `tb/tb_clock_divider.sv` | every rate code from reset: `tick` and `clk_div` checked every cycle, plus tick period and first-tick cycle; then random code changes without reset |
| `tb/tb_rcr_counter_top.sv` | top at `WIDTH=8`: increments per window for all eight rates, then 30 000 cycles of random `count` and rate changes against a cycle-count model; it requires every rate, rate changes, held ticks and overflows to occur |
| `tb/tb_rcr_counter_top_full.sv` | top at default parameters (128 bits): reset, all eight rates in turn without reset, a pause, a final reset |

A 128-bit count cannot reach all ones in simulation. The overflow and
carry-out path is therefore checked at reduced widths, in the 8-bit instance
of the counter test and the 8-bit top test.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/rcr_pkg.sv rtl/sync_binary_counter.sv rtl/clock_divider.sv \
  rtl/rcr_counter_top.sv tb/tb_rcr_counter_top.sv \
  --top-module tb_rcr_counter_top -Mdir obj
./obj/Vtb_rcr_counter_top
```

Each test finishes in well under a second.
