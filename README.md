# 32 x 32 ISFET pH array with in-pixel digitisation and column TDCs

An ISFET (ion-sensitive field-effect transistor) in plain CMOS is a
floating-gate transistor whose gate picks up the chemical potential of the
solution above it. This design reads a 32 x 32 array of such sensors without
any analog amplifier. Each pixel is an inverter whose floating gate is also
driven, through a 40 fF capacitor, by a triangle wave common to the whole
array. As the triangle sweeps down and back up, the inverter output is high
while the floating gate is below the inverter's switching point. That gives a
pulse whose width is linear in the chemical potential. The pH reading is thus
a time: a 15-bit time-to-digital converter (TDC) per column measures it, and
the results leave the chip on one serial line.

A sensor offset only shifts the pulse width, so the wide TDC range absorbs it.
No floating-gate reset or reference-electrode trim is needed. One row is read
per triangle period. With the defaults (160 MHz clock, 1024 clocks per row),
a frame takes 210 us, or about 4.9 k frames/s.

## Blocks

| module | role | kind |
|---|---|---|
| `isfet_array_top` | whole system: array, 32 TDCs, row scan, serial readout | RTL (contains the behavioural array and delay lines) |
| `sensor_array` | 32 x 32 pixels, shared triangle, joined column lines | behavioural model |
| `sensor_pixel` | floating-gate inverter + row transmission gate | behavioural model |
| `column_tdc` | one 15-bit coarse-fine TDC | RTL around the delay-line model |
| `tdc_controller` | edge detection and sequencing of a conversion | RTL |
| `tdc_delay_line` | 31-stage fine delay line | behavioural model (transport delays) |
| `tdc_t2b_coder` | 31-bit thermometer to 5-bit count | RTL |
| `tdc_lsb_accum` | +1/-1 sign stage, adder and fine register | RTL |
| `tdc_msb_counter` | 10-bit ripple coarse counter | RTL |
| `row_scanner` | row select, TDC start, end-of-row load | RTL |
| `piso_serializer` | 32 x 15 b parallel-in, serial-out register | RTL |
| `isfet_pkg` | shared sizes, TDC state type, no-result code | package |

The pixel, the array and the delay line are analog in silicon. Their models
exist so that the digital part can be simulated against realistic edge times.
Voltages cross module boundaries as signed integers in microvolts.

## The pixel: from chemistry to pulse width

The floating-gate voltage is the capacitive mix of its inputs:

    V_FG = (C_pass * V_chem + C_pg * V_pg) / C_tot + K

Here `V_chem` is the chemical potential, `V_pg` the triangle voltage on the
programmable gate (`C_pg` = 40 fF), and `K` collects trapped charge and the
reference. The inverter output is high while `V_FG < V_M`. The triangle starts
each period at its maximum `V_max`, falls linearly to `V_min` at mid-period and
rises back. The output is therefore high for

    T_high = T_trig * (V_x - V_min) / (V_max - V_min),
    V_x    = (V_M * C_tot - C_pass * V_chem - C_tot * K) / C_pg

with the pulse centred on mid-period. `C_pass` = 10 fF, the other
floating-gate capacitance (10 fF), `K` = 0 and `V_M` = 0.9 V (half of the
1.8 V supply) are this design's example values, all parameters. The coupling
from the output back onto the floating gate (gate-drain capacitance) is left
out. It acts as hysteresis, which only adds a constant to the pulse width.

A pixel drives its column line only while its row is selected. All pixels of
a column share one line, modelled as an OR of the gated outputs.

## The column TDC: measuring an unsynchronised pulse

The pulse edges come from a level crossing and have no relation to the clock.
A pure delay line long enough for a whole row period would be far too large.
So each TDC splits the pulse into three parts. Let `a` be the rising edge,
`b` the next rising clock edge, `c` the falling edge and `d` the next rising
clock edge after it:

1. **a to b (fine).** The controller passes the rising edge into the 31-stage
   delay line (`trig = pwm`). At `b` the taps show how many stages the edge
   has passed. The thermometer coder turns this into 0..31, and the value is
   added to the fine register.
2. **b to d (coarse).** From `b` the ripple counter counts every rising clock
   edge up to and including `d`. The count `N` is `(t_d - t_b) / T_clk`.
   Meanwhile the delay-line input is held low so that the line empties.
3. **c to d (fine).** The falling edge, inverted, is fed into the line again
   (`trig = ~pwm`). The snapshot taken at `d` is subtracted from the fine
   register.

The pulse width is `t_c - t_a = N*T_clk + T_ab - T_cd`. With the clock period
tuned to 32 stage delays, the result in stage delays (LSB) is

    out = 32 * N + (T_ab - T_cd)

The fine difference lies in -31..+31 and is held in a 6-bit signed register.
With `N` up to 1023, `out` is a 15-bit unsigned number (1..32767). The 10-bit
count and the 6-bit signed difference are folded into that single 15-bit word;
a design could instead send them as separate fields.

Interface: `start` (one cycle) clears the counter and register. The controller
then waits for the line to be low before arming, so a line already high when
its row was selected is never taken for a rising edge. `valid` rises on edge
`d`, one clock after the falling edge. `out` holds the no-result code, all
ones, until then. It keeps that code if the pulse never completes, or if the
counter wraps (`overflow`).

States (`isfet_pkg::tdc_state_e`): IDLE -> WAIT_LOW -> ARMED -> COUNT -> DONE.
Conversion starts on `start`, and `start` also restarts a conversion that is
running.

Calibration: the stage delay (`STAGE_DELAY_PS`, default 195 ps) stands for
the bias-controlled delay of current-starved inverters. In silicon it ranges
from about 190 ps to 9.5 ns. The "32 stages per clock" relation is kept by
tuning the bias current or the clock, so the default 195 ps pairs with a
160 MHz (6.25 ns) clock. The leftover mismatch (6.25 ns vs 32 x 195 ps) costs
well under one LSB; the testbench measures at most 0.93 LSB error over 300
random pulses.

## Row scan and serial output

`row_scanner` holds a cycle counter with a period of `ROW_CYCLES` (1024) clocks
and a row counter. In the first cycle of a row it raises `row_sync`. That
signal starts all 32 TDCs and is the reference an external triangle generator
must lock to: each triangle period starts at its maximum on `row_sync`. In
the last cycle of a row (`row_end`), the 32 results are loaded in parallel
into `piso_serializer`, and the next row is selected.

The serialiser shifts one bit per clock: column 0 first, each word MSB first.
It flags the first bit of each word (`sdo_word_start`) and of each row
(`sdo_row_first`), and tags the data with its row number (`sdo_row`). A row
is 480 bits, so it is shifted out while the next row converts. The first bit
of row r appears exactly `ROW_CYCLES` clocks after row r's `row_sync`.
Loading while bits are still pending is caught by an assertion. A generate
check rejects a `ROW_CYCLES` too short for 480 bits.

Throughput at the defaults: 32 x 32 x 15 b per 210 us is 73 Mb/s against
160 Mb/s of serial capacity. A pulse can last up to the full row period;
1024 clocks x 32 LSB = 32768 LSB, exactly the 15-bit range.

## What follows the source design and what is this design's own

Taken from the source design:

- 32 x 32 array; triangle wave common to all pixels; 40 fF programmable gate;
  1.8 V supply.
- Row-selected transmission gates onto shared column lines.
- 32 column TDCs: 10-bit asynchronous coarse counter, 31-stage delay line,
  31 b to 5 b coder, +1/-1 accumulation into an LSB register, and the a-b-c-d
  sequence.
- 15 b per column into a parallel-to-serial interface.
- 190 ps LSB order and 160 MHz clock.

This design's own choices:

- All timing of the row scan, and the `row_sync` contract with the triangle
  source.
- Folding the 10-bit count and the signed fine value into one 15-bit word.
- The wait-for-low guard, the no-result code and the overflow flag.
- Ones-counting in the coder, which tolerates single bubbles.
- Serial framing and bit order.
- The numeric pixel capacitances other than `C_pg`, and `V_M`.

Not built: the triangle source and the delay-line bias are analog parts
outside the array. The source design also shares its top-level block with
other, undescribed test circuits.

Limits to keep in mind:

- `pwm` is sampled without a synchroniser, as the fine snapshot and the state
  must see the same edge. In silicon this needs care with metastability.
- The ripple counter's value is read a clock after its last toggle.
- Pulses shorter than about two clocks are not measured.
- The pixel model switches instantly and has no noise or mismatch.

## Simulating

All files use `` `timescale 1ps/100fs``. Every module and testbench prints
`TB_RESULT checks=N failures=M` at the end. For example:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_column_tdc \
        rtl/isfet_pkg.sv tb/tb_column_tdc.sv
    ./obj_dir/Vtb_column_tdc

Testbenches, one per module in `tb/tb_<module>.sv`:

- The TDC tests drive pulses with random sub-clock phases. They compare
  results with width / (T_clk / 32), and check the latency, the overflow case
  and the high-line case.
- `tb_sensor_pixel` and `tb_sensor_array` (8 x 8) compare against the
  floating-gate equation.
- `tb_isfet_array_top` runs a 16 x 16 array with 512-clock rows through two
  frames plus one row, using `tb/triangle_gen.sv` as the triangle source. It
  decodes the serial stream, checks every word against the pulse-width
  formula (2.5 LSB tolerance), and checks that out-of-range pixels read as
  no-result.
- `tb_isfet_array_full` runs the same test on the default configuration
  (32 x 32 pixels, 1024-clock rows, no parameter overrides) for one frame plus
  one row. It takes about a minute to build and half a minute to run. Its
  tolerance is 3 LSB because the triangle moves in 150 ps steps.

In testbenches with many pixels, keep loop bounds in variables rather than
constants. Verilator unrolls loops with constant bounds, and at 1024 pixels
the unrolled C++ takes very long to compile.

Parameters to change: `ROWS`, `COLS`, `ROW_CYCLES`, `STAGE_DELAY_PS` and the
pixel values on `isfet_array_top`. The coarse width, stage count and word
width are in `isfet_pkg`.
