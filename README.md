# Ring-oscillator temperature-sensor network

This design maps the temperature of an FPGA die with many small soft sensors instead of the single
on-die thermal diode. Each sensor is a ring oscillator, a closed loop of inverting gates. Its
frequency falls as the silicon warms up. A binary counter clocked by the ring counts its edges
during a fixed sampling window. The count is the ring frequency times the window, and a
per-sensor calibration turns it into a temperature. The platform built here has 140 such sensors
and five banks of LUT-oscillator heaters that warm the die in a controlled way, from about 30 °C
to 60 °C. It also has a sampling timer on a 100 MHz system clock and a readout port for a
processor.

## The sensor

A sensor (`ro_sensor`) is a ring plus a counter.

* **Ring (`ring_oscillator`).** Stage 0 is a two-input NAND of the sensor enable and the ring
  output. It is followed by an even number of inverters, so the loop has an odd number of
  inversions. With `en` low the NAND output is forced high, the ring rests with its output high
  and it dissipates nothing. With `en` high it oscillates with period `2 x STAGES x tD(T)`. The
  default is 7 stages (one NAND, six inverters); 17 and 31 stages are the other lengths the
  design was explored with.
* **Counter (`ro_counter`).** A 15-bit binary counter clocked by the ring output, with its count
  enable tied to the same `en`. It counts rising ring edges only inside the window. The clear
  (`clr_n`) is asynchronous and active low: with the ring stopped there are no clock edges, so a
  synchronous clear could never take effect. The counter wraps at 2^15.

The ring is a **simulation model**. On silicon it is a few LUTs with hand-fixed routing, and its
delay comes from physics. The model gives each stage a delay that depends on a `temp` input (in
0.01 °C). That delay is interpolated linearly between 266.11 ps at 30 °C and 286.95 ps at 60 °C.
Those two values are calibrated so that the 7-stage ring runs at 268.425 MHz at 30 °C and
248.925 MHz at 60 °C, figures measured on a Virtex-6. Longer rings reuse the same per-stage
delay, which is a simplification: real longer rings differ by routing. The model has no
sensor-to-sensor process variation. On real silicon that variation is large enough that every
sensor needs its own calibration.

## Sizing the counter against the window

The counter has to hold the largest count of the shortest, hottest-running ring in the longest
window:

| window | cycles at 100 MHz | worst-case count (268.425 MHz) | 15-bit limit |
|-------:|------------------:|-------------------------------:|-------------:|
| 40 µs  | 4,000             | 10,737                         | 32,767       |
| 80 µs  | 8,000             | 21,474                         | 32,767       |
| 120 µs | 12,000            | 32,211                         | 32,767       |

The 120 µs window fits with about 550 counts to spare, so a longer window would need a wider
counter (`WIDTH` parameter).

## A measurement (`sample_timer`)

A pulse on `start` runs one sequence, all on the 100 MHz clock with registered outputs:

1. **CLEAR**: `clr_n` is held low for 2 cycles and every counter is cleared.
2. **RUN**: the sensor enable is high for exactly `sample_cycles` cycles. Use 4000, 8000 or 12000
   for 40, 80 or 120 µs. A value of 0 gives an empty window.
3. **SETTLE**: 4 cycles with the rings stopped. The counters run on their own ring clocks, and
   this wait ensures their values are frozen before the 100 MHz domain reads them.
4. `done` pulses for one cycle. `busy` is high from the cycle after `start` until `done`, which
   is `2 + sample_cycles + 4` cycles. A `start` while busy is ignored.

The enable reaches each ring and counter directly, asynchronously to the ring clock. Any
uncertainty at the window edges is at most one ring edge per sensor.

On the original platform this job is split between a timer core and processor software. Here it
is a small state machine. The clear and settle phases and the start/busy/done handshake are
choices of this design.

## The network and its readout

`sensor_network` instantiates `NUM` (140) sensors. Each has its own enable bit, and all share
one clear. In the top, the enable of sensor `i` is `sensor_mask[i] AND window`, so any subset can
be sampled. Masked sensors keep their rings stopped, which adds no self-heating, and they read 0
after the clear. `count_readout` is a registered multiplexer: `rd_count` shows the count of
sensor `rd_sel` one clock after `rd_sel` is applied. An index of `NUM` or more reads 0.

Floorplanning (one sensor per tile of a regular grid) is a placement constraint, not RTL, and
does not appear here.

## Heaters (`heat_generator`, `lut_heater_cell`)

Each heater cell is one 6-input LUT whose output feeds back to five of its inputs, with the
enable on the sixth. Its truth table is `64'h0000000100000000`: the output is 1 only when the
enable is high and the fed-back output is 0. An enabled cell therefore inverts itself as fast as
the loop allows, and a disabled cell settles to 0. The platform has 5 banks of 2,000 cells each,
10,000 LUTs in total, all switched by one `heater_en`. The heaters have no functional output.
`probe` brings out one cell per bank so that activity can be seen, and the cell vector carries a
`keep` attribute so that implementation tools do not remove it. For that reason lint reports the
other cell outputs as unused, which is intended. The cell is a simulation model with an assumed
500 ps loop delay. The cells of one bank are modelled as one vector driven by one process,
because a separate instance per cell makes elaboration of 10,000 cells impractically large.
The heaters do not change the modelled temperature: there is no thermal model, and the `temp`
inputs set the temperature.

## Top level (`ro_tsn_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | 100 MHz clock, asynchronous active-low reset |
| `start`, `sample_cycles[15:0]` | in | start a window of the given length in cycles |
| `busy`, `done` | out | window in progress, and a one-cycle pulse when the counts are ready |
| `sensor_mask[NUM-1:0]` | in | sensors taking part; hold it while busy |
| `heater_en` | in | enables all heater banks |
| `heater_probe[N_HG-1:0]` | out | one cell output per bank |
| `temp[NUM]` (16 bit each) | in | die temperature at each sensor in 0.01 °C; drives the ring models only |
| `rd_sel[7:0]`, `rd_count[14:0]` | in/out | read one sensor's count, one cycle of latency |

Parameters (defaults): `NUM=140`, `STAGES=7`, `WIDTH=15`, `N_HG=5`, `HG_LUTS=2000`. Shared
constants and types are in `tsn_pkg`.

## What is outside this RTL

The surrounding platform has a soft processor on a processor bus, an on-die ADC monitor of
temperature and core voltage (10-bit, 200 kSPS), and a UART that logs to a host PC. None of
these is included. Their interface to this logic is the top's ports. Converting counts to
temperature is done in software, per sensor, with a quadratic polynomial in frequency and core
voltage: `T = c1 f^2 + c2 V^2 + c3 f V + c4 f + c5 V + c6`, with coefficients fitted by
regression against the on-die monitor. No coefficients are known, so no converter is built. The
evaluation metrics are the heating caused by the sensors themselves, the RMSE of the measured
temperature and the spread across sensors. They are physical measurements, which a simulation
of this RTL cannot reproduce.

## Departures and assumptions, in short

* Period taken as `2 x STAGES x tD` (two trips round the ring).
* Per-stage delay linear in temperature, and equal for all ring lengths. No process variation.
* The heater count is read as 10,000 LUTs in total (2,000 per bank), not 10,000 per bank.
* 140 sensors are used. One description of the floorplan grid gives only 90 tiles.
* Clear/settle sequencing, the readout multiplexer, the per-sensor mask and the heater probes
  are this design's own choices.

## Simulating

Every file sets `timeunit 1ns; timeprecision 1fs`. The ring and heater models need Verilator's
timing support. Read the package first, for example:

    verilator --binary --timing --assert --top-module tb_ro_tsn_top \
        rtl/tsn_pkg.sv tb/tb_ro_tsn_top.sv -y rtl -o sim && obj_dir/sim

Each block has a self-checking testbench in `tb/`, named `tb_<module>`, that prints
`TB_RESULT checks=N failures=M`. The expected counts are computed in the testbench from the two
7-stage frequencies above.

* `tb_ro_tsn_top` runs three windows (40/80/120 µs) on a 12-sensor network. It covers masking,
  clearing, heater activity, near-full counts and out-of-range reads, and takes about 25 s.
* `tb_ro_tsn_top_full` runs one 40 µs measurement on the default 140-sensor, 10,000-cell design
  and takes about 4 minutes.

Simulation time grows with the number of ring edges: roughly sensors x stages x window.
