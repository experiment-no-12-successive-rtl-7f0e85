# Ramp (counting) A/D converter for an FPGA with an external DAC and comparator

This design turns an analog voltage into a 4-bit number using almost no
analog hardware: an FPGA, a resistor network acting as a 4-bit DAC, and one
op-amp used as a comparator. The voltage to be measured is held on one input
of the comparator. The DAC, driven by the FPGA, feeds the other input. To
convert, the FPGA sets the DAC code to 0 and raises it by one step at a time.
It stops at the first code where the comparator reports that the DAC voltage
has reached the input. That code is the result.

```
             +--------------------- FPGA: adc -------------------------+
 start_in -->| debounce --> start                                      |
             |                 |                                       |
             |                 v                                       |
             |   IDLE/COUNT controller --r, c_en--> counter ---+--> da_out ---> resistor-net DAC
             |        ^    ^                   (4 bit, steps    |       |               |
             |        |    +------ tc ---------  at each tick)  +--> result_out         v
 comp ------>| 2-FF sync                          ^                    |        +---------------+
             |                                    | tick                |  v_in->|  comparator   |--> comp
             |                           selectable_clock (1 kHz)      |        +---------------+
             |   done = (state == IDLE)                                |
             +---------------------------------------------------------+
```

The design is a ramp converter. It is simple, but it has two drawbacks. It is
slow: the worst case takes as many steps as the DAC has levels, here 16. Its
conversion time also depends on the input: a result of k takes k+1 steps.
Successive approximation removes both drawbacks by changing the order in
which DAC codes are tried. That technique is what the converter is meant to
lead up to, but it is not part of this RTL. Only the ramp is built.

## Files

| file | what it is |
|---|---|
| `rtl/adc_pkg.sv` | controller state type, clock-select encoding |
| `rtl/adc.sv` | top: controller, comparator synchronizer, wiring |
| `rtl/counter.sv` | 4-bit ramp counter with its built-in clock divider |
| `rtl/selectable_clock.sv` | divider for 0.1 Hz, 1 Hz, 10 Hz and 1 kHz |
| `rtl/debounce.sv` | start-button filter |
| `tb/tb_adc.sv` | end-to-end test at the default sizes, with DAC and comparator models |
| `tb/tb_counter.sv`, `tb/tb_debounce.sv`, `tb/tb_selectable_clock.sv` | unit tests |
| `tb/resistor_dac_model.sv`, `tb/comparator_model.sv` | ideal analog models, simulation only |

## Top-level interface (`adc`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | board clock, 50 MHz by default (`CLK_HZ`) |
| `rst` | in | 1 | synchronous reset, active high |
| `start_in` | in | 1 | start push-button, raw |
| `comp` | in | 1 | comparator output: 1 when the DAC voltage is at or above the input |
| `da_out` | out | `WIDTH` | code to the resistor-net DAC |
| `result_out` | out | `WIDTH` | conversion result (same value as `da_out`) |
| `done` | out | 1 | high while no conversion is running; `result_out` is then valid |

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50,000,000 | clock frequency; sets the divider periods |
| `WIDTH` | 4 | DAC and result width |
| `DEBOUNCE_COUNT` | 1,000,000 | the button must be high for more than this many cycles (20 ms) |
| `CLK_SEL` | `2'b11` | ramp step rate `{s1,s0}`: 00 = 0.1 Hz, 01 = 1 Hz, 10 = 10 Hz, 11 = 1 kHz |

## How a conversion runs

Everything runs on `clk`. The slow step clock is not used as a clock. The
divider produces `tick`, a one-cycle pulse once per step period (every 50,000
cycles at 1 kHz). The counter and the controller's state register act only
in tick cycles.

The controller has two states:

* **IDLE**: `done` is high and the counter holds the last result. At a tick
  where the debounced start is high, the controller clears the counter and
  goes to COUNT.
* **COUNT**: the counter is enabled. At each tick the controller looks at the
  synchronized comparator and at the terminal-count flag `tc` (counter all
  ones):
  * If neither is set, the counter goes up by one.
  * If either is set, the enable is dropped in that same tick, so the code
    stays where it is. The state then returns to IDLE.

The comparator is therefore always judged against the code that has been on
the DAC for a whole step period. The result is the smallest code k for which
`V_DAC(k) >= V_in`. If no code qualifies, the result is 15, so an input above
full scale (3.3 V) reads as full scale.

Cycle-exact timing for a result k, where T is the step period:

* The tick at which start is seen clears the code. `done` falls one cycle
  after that tick.
* The code then reads 0, 1, …, k, one value per tick.
* `done` rises one cycle after tick k+1, so it is low for exactly (k+1)·T.
  That is 1 ms for code 0 and 16 ms for code 15 at the defaults.
* If the button is still held, the next conversion starts at the following
  tick. `done` is then high for exactly one period between conversions.

**Timing requirements on the analog side.** `comp` passes a two-flop
synchronizer before the controller uses it. `da_out` changes one cycle after
a tick, so the DAC and comparator must settle within T minus 3 cycles. At
1 kHz that is almost 1 ms, which is easy to meet. At much faster step rates,
settling becomes the limit.

## The start button

`debounce` counts consecutive cycles with the button high, and any low sample
resets the count. Its output goes high only after more than `DEBOUNCE_COUNT`
high samples, and drops at the first low sample. This rejects contact bounce
and short taps. It also adds a 20 ms delay before the first conversion.
Because the button is a level, holding it makes the converter run
continuously.

## The clock divider

`selectable_clock` has one free-running count. Each cycle the count goes up
by one. When it reaches the period N of the selected rate, it wraps to 0, so
the count runs from 0 to N−1.

* The period N is 10·`CLK_HZ`, `CLK_HZ`, `CLK_HZ`/10 or `CLK_HZ`/1000
  cycles.
* `out_clk` is high while the count is in 0…N/2, so it is high for N/2+1
  cycles of each period.
* `tick` is registered together with each rising edge of `out_clk`.
* All four rates share the one count. After a switch to a shorter period,
  a count already past the new N wraps at the next edge.

The counter instantiates the divider with its select inputs tied to
`CLK_SEL`. It also brings `out_clk` and `tick` out. The top uses only `tick`.

## The analog parts

The resistor-net DAC and the comparator are outside the FPGA. They exist here
only as ideal simulation models in `tb/`:

* The DAC model outputs 3.3 V · code / 15. One step is therefore 0.22 V, and
  the input range is 0 to 3.3 V.
* The comparator model outputs `v_dac >= v_sample`.

Real parts add an offset, a finite gain and resistor mismatch. None of these
is modelled. The input range can be moved to −1.65 … +1.65 V by shifting the
DAC output down by 1.65 V in the analog circuit. The logic needs no change
for that. An input above the op-amp's supply can damage it; that cannot be
handled in logic.

## Where this RTL departs from the original lab design

The original is a small VHDL design. The RTL follows its structure, states,
divider arithmetic, debounce threshold and counter behaviour, with these
changes:

* **Counter clear.** The original controller assigns its outputs only in some
  branches, which creates latches. As written, the counter clear would stay
  asserted for the whole ramp. Here the clear lasts one tick, and the
  controller is purely combinational logic from state and inputs.
* **`done`.** The original drives `done` combinationally. It rises as soon as
  comp or terminal count is seen, and it is held low in IDLE while start is
  pressed. Here `done` is `state == IDLE`. It is registered, cannot glitch,
  and stays high for one step period between back-to-back conversions.
* **Clocking.** The original clocks the counter and the state register from
  the divided clock. Here the divided clock is a clock enable (`tick`) in the
  single `clk` domain.
* **Additions.** The original has none of these:
  * a two-flop synchronizer on `comp`;
  * a synchronous reset `rst` (the original relies on power-up values);
  * a saturating debounce counter (the original uses an unbounded integer).
* **Removed.** The original's counter contains a second debouncer whose
  output drives nothing. It is left out.
* **Renamed ports.** The debouncer's ports are `input_i`/`output_o`, because
  `input` and `output` are SystemVerilog keywords.

## Verification

Each testbench checks against its own reference and prints
`TB_RESULT checks=N failures=M`. Each has a watchdog.

* `tb_selectable_clock` runs all four rates at `CLK_HZ` = 10,000. It checks
  the exact period, the high time, and that every tick coincides with a
  rising edge of `out_clk`. It also checks the wrap after a switch from the
  slowest rate to the fastest.
* `tb_debounce` uses a threshold of 20. It drives bounces, the exact
  threshold, long holds and random noise against a cycle-by-cycle reference.
  It also checks the press-to-output latency.
* `tb_counter` applies random enable and clear values at ticks. It compares
  `o`, `tc` and `done` every cycle, and checks the tick spacing and the wrap
  from 15 to 0.
* `tb_adc` runs the whole converter at its default parameters:
  * 50 MHz clock, 1 kHz steps, 1,000,000-cycle debounce.
  * The analog models close the loop.
  * It converts 14 input voltages from 0 V to 3.6 V back to back, two of
    them random.
  * For each conversion it checks the result against the ideal code, and
    checks that `done` is low for exactly (k+1) periods.
  * It checks that a 1000-cycle bounce is ignored and that the code restarts
    from 0.
  * It checks that both stop causes occur: comparator and terminal count.
  * It runs in a few seconds.

To run a test with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/adc_pkg.sv rtl/selectable_clock.sv rtl/debounce.sv rtl/counter.sv rtl/adc.sv \
  tb/resistor_dac_model.sv tb/comparator_model.sv tb/tb_adc.sv --top-module tb_adc
./obj_dir/Vtb_adc
```

The unit tests need only the files of their block, for example
`rtl/adc_pkg.sv rtl/selectable_clock.sv tb/tb_selectable_clock.sv`.

Verilator prints two warnings for `adc.sv`, both PINCONNECTEMPTY. They come
from the counter's `done` and `clk_out` outputs, which the top leaves
unconnected on purpose.

## Changing it

* **Faster or slower conversion:** set `CLK_SEL`, or change `CLK_HZ` to match
  the board clock.
* **Wider DAC:** set `WIDTH`. The ramp then takes up to 2^WIDTH steps.
* **Testing at reduced sizes:** a small `CLK_HZ` (such as 10,000, which makes
  the 1 kHz step period 10 cycles) together with a small `DEBOUNCE_COUNT`
  keeps simulations short.
