# Ring-oscillator temperature sensors for FPGAs

A ring oscillator slows down as the die gets hotter. Enable it for a fixed
number of system-clock cycles and count its oscillations, and the count works
as a thermometer. No analog parts are needed, so a sensor can go anywhere in
the fabric. This repository holds SystemVerilog for such a sensor array:

- 16 ring-oscillator sensors, meant to be placed as a 4x4 grid;
- one shared timebase that runs the measurement sequence;
- a daisy chain that collects the counts;
- a UART that sends each set of readings to a logging PC. Each set goes out
  with the FPGA system monitor's own temperature and core-voltage codes.

The design follows a published design-space study of ring-oscillator
temperature sensors on a Xilinx Virtex-5 (XC5VLX110T). The study compared ring
lengths, the use of latches as delay elements and measurement periods. Its best
sensor is the default here: a ring of **23 inverters and 24 held-open latches**,
measured over **2^16 cycles of a 100 MHz clock** (655 µs).

## One sensor: from ring to count

```
 enable ──►[gate]──►[inv]─[latch]─[inv]─[latch] … ──┬──► Q
             ▲                                      │
             └──────────────────────────────────────┘
 Q ──clk──►[toggle FF]── Q' ──┬───────────────── b ─┐
                              └──►[FF @ clk]── a ───┤ b & ~a ──► counter enable
 clk, rst ─────────────────────────────────────────────────────► counter ──► S
```

1. **Ring** (`ring_oscillator`). An enable gate is followed by an odd number
   of inverters, with latches held open in between as extra delay. With
   `enable` low the ring rests.
2. **Halving** (`ro_capture`). Q clocks a toggle flip-flop, and its output Q'
   runs at half the ring frequency with a 50 % duty cycle. Only this one
   flip-flop has to keep up with the ring.
3. **Edge capture** (`ro_capture`). A system-clock flip-flop keeps the last
   sample of Q' (`a`). The counter enable is `Q' & ~a`, one pulse per rising
   edge of Q'. This only works while Q' is slower than clk/2, that is while
   the ring runs below the system-clock frequency. The default ring runs at
   about 48 MHz, so Q' is about 24 MHz against the 100 MHz clock.
4. **Capture counter** (`capture_counter`). It counts those pulses, and `rst`
   clears it synchronously.

A count taken over `T_M` cycles is therefore

    S ≈ T_M · T_clk / (2 · T_ring),   T_ring = 2 · (loop delay)

It falls as the stage delays grow with temperature. The default ring gives
about 15,600 at 46 °C, and the count drops by about 0.077 % per °C.

Q' is taken into the edge detector directly, as in the reference schematic.
There is no second synchronizer flip-flop. A metastable sample can therefore
cost or add one count, which is about the size of the quantization error. Add a
synchronizer stage in `ro_capture` if that matters to you; it adds one cycle of
latency and nothing else.

## Measurement sequence (`measure_ctrl`)

All sensors are measured together. Cycle numbers count from the clock edge
that samples `run` high:

| phase   | cycles               | what happens                                              |
|---------|----------------------|-----------------------------------------------------------|
| settle  | `SETTLE_CYCLES` = 4096 | rings enabled, left to reach a steady frequency          |
| clear   | last settle cycle    | `cnt_clr` clears every capture counter                    |
| window  | `T_M` = 65536        | counters count (`window` output high)                     |
| drain   | 4                    | rings disabled; a last edge already in flight is counted  |
| load    | 1                    | counts copied into the daisy chain                        |
| readout | until frame sent     | controller waits for the readout's `done`                 |

While `run` stays high, a new measurement starts as soon as the previous frame
has been sent. The rings are off during the readout, which also limits
self-heating. A `run` pulse one cycle long gives a single measurement. Two
assertions in the controller check that the counters are cleared only while the
rings run, and that the rings run exactly during settle and window.

## Readout: daisy chain and frame

Every sensor has a `daisy_chain_cell`, a shift register that loads the count
in parallel. The cells are chained `sout → sin`, with sensor 0 nearest the
output, so the counts leave MSB first, sensor 0 first. `readout_ctrl` shifts
eight bits per byte out of the chain and offers the bytes to `uart_tx` (8N1,
115200 baud) over a valid/ready handshake. One frame is:

| byte(s)          | content                                           |
|------------------|---------------------------------------------------|
| 0                | header `0xA5`                                     |
| 1–2              | system-monitor temperature code, high byte first  |
| 3–4              | system-monitor core-voltage code, high byte first |
| 5 … 4+2·N        | sensor counts, 16 bits each, high byte first      |

With 16 sensors a frame is 37 bytes, which takes 3.2 ms at 115200 baud. One
reading every 3.9 ms, about 255 per second, is the rate with `run` held high.
The two system-monitor codes are sampled when the readout starts.

## Turning counts into temperatures

This part is done in PC software, not in this hardware:

- **Calibration.** The mapping from count to temperature is close to linear,
  but it differs from sensor to sensor, with process, routing and voltage. Heat
  and cool the chip while logging counts and the system monitor's temperature
  (accurate to ±4 °C). Then fit a straight line per sensor.
- **Voltage correction.** Core-voltage drift also shifts the counts, so that
  heating and cooling give different curves. The corrected count is
  `S' = S + a·V`, where V is the logged core voltage. Choose `a` so that S'
  against temperature is as close to a straight line as possible.
- **Figures of merit, for comparing sensor variants.**
  - Resolution: σ_v = (S_max − S_min)/(T_max − T_min).
  - Noise: σ_c, the standard deviation of S at constant temperature, never
    taken below 0.5 (quantization).
  - Performance: G = σ_v/σ_c.

  In the reference measurements the 23-inverter/24-latch ring scored G ≈ 9.4.
  The best all-inverter ring (47 stages) scored G ≈ 8.4.

## Choosing the ring and the period

- **Ring length** (`N_INV`, must be odd, and `N_LATCH`). Longer rings have
  less noise but also less resolution. Among all-inverter rings the best was
  47 inverters. Replacing inverters with slice latches helped further, by
  about 14 % at 24 latches and 23 inverters. The latches cost no extra
  resources, because each LUT already has one next to it.
- **Measurement period** (`T_M`). Noise falls from 2^13 to 2^16 cycles. That
  fall is mostly quantization, which is at least 0.012 % at 2^13. That figure
  is 0.5 count out of at most 2^12 counts: halving the ring and counting edges
  at the system clock caps the count at T_M/2. Longer
  periods did not help and cost counter width and self-heating. Keep
  `N_COUNTER ≥ log2(T_M)` if you raise `T_M`; the worst case is T_M/2 counts.

## The ring-oscillator model

On the FPGA a ring is built from directly instantiated LUT and latch
primitives, with placement constraints that fix every element to a slice.
Routing is left to the tools, and it varies from build to build. None of that
can be written as portable RTL. `ring_oscillator.sv` is therefore a
**behavioural model** with the real ring's ports (`enable`, `q`). It uses
transport delays, and simulators accept it. Synthesis ignores its delays, and
the netlist it yields is not a working ring. For an FPGA build, replace it with
a vendor-primitive netlist and its placement constraints.

The model's numbers are not measured delays; they are chosen to behave like the
reference measurements:

- gate plus loop routing 2226 ps, inverter 256 ps, latch 100 ps. With these, a
  17- and a 47-inverter ring reproduce the published counts (24913 and 11495)
  if the counts were taken over 2^16 cycles. The latch delay is a guess.
- temperature coefficient +767 ppm/°C of delay above 46 °C. This is the
  measured resolution of the 47-inverter ring divided by its count.
- voltage coefficient −600 ppm/mV above 1000 mV (a guess).

A testbench sets a ring's die conditions by writing its `temp_mc` (milli-°C)
and `vcc_mv` variables hierarchically. The inverter/latch chain is one lumped
transport delay. Delays in series add up, so the output is the same as with one
process per element, at far fewer simulation events.

## Parameters

| parameter       | default     | where it comes from                                     |
|-----------------|-------------|---------------------------------------------------------|
| `N_SENSORS`     | 16          | 16 instances (4x4 grid) in the reference setup          |
| `N_INV`/`N_LATCH` | 23 / 24   | best measured ring                                      |
| `SETTLE_CYCLES` | 4096        | 2^12-cycle settling wait of the reference procedure     |
| `T_M`           | 65536       | own choice: the longest period that still reduced noise |
| `N_COUNTER`     | 16          | own choice (holds T_M/2)                                |
| `CLK_HZ`        | 100 MHz     | reference clock                                         |
| `BAUD`          | 115200      | own choice                                              |

Shared defaults are in `rtl/ro_sensor_pkg.sv`.

## Where this design departs from the reference or fills gaps

Choices the reference setup does not fix:

- one timebase shared by all sensors;
- when the counter is cleared (on the last settle cycle);
- the 4-cycle drain;
- the 16-bit counter and the frame format;
- the UART rate;
- the reading of the schematic's unlabelled gates: AND for the ring enable,
  `b & ~a` for the edge detector.

What is not here:

- the FPGA system monitor, a hard block whose codes enter as the
  `sysmon_temp`/`sysmon_vccint` ports;
- the placement of the rings, a floorplanning matter;
- the PC-side calibration and voltage correction;
- the heater used in the experiments.

## Files

| file | content |
|------|---------|
| `rtl/ro_sensor_pkg.sv` | shared constants |
| `rtl/ring_oscillator.sv` | behavioural ring model |
| `rtl/ro_capture.sv` | toggle flip-flop and edge detector |
| `rtl/capture_counter.sv` | capture counter |
| `rtl/ro_sensor.sv` | one sensor (ring + capture + counter) |
| `rtl/measure_ctrl.sv` | timebase / measurement sequencer |
| `rtl/daisy_chain_cell.sv` | readout chain cell |
| `rtl/readout_ctrl.sv` | frame builder |
| `rtl/uart_tx.sv` | UART transmitter |
| `rtl/ro_temp_sensor_system.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_ro_temp_sensor_system_full.sv` | full-size run at default parameters |
| `tb/uart_rx_model.sv` | behavioural UART receiver for the testbenches |

## Simulating

Every testbench checks its block against values it computes itself. Expected
counts come from the ring delays, not from the RTL. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_ro_temp_sensor_system_full \
    rtl/ro_sensor_pkg.sv tb/tb_ro_temp_sensor_system_full.sv
./obj_dir/Vtb_ro_temp_sensor_system_full
```

Use the same command with any other `tb_*` module. The full-size run covers one
complete measurement of 16 sensors at temperatures from 40 °C to 100 °C, plus
its 37-byte frame. That is 4 ms of simulated time, about 4 s of wall time.
`tb_design_space_sweep` runs the configurations of the reference study
through one sensor each. It covers eight all-inverter rings from 17 to 111
stages, seven inverter/latch mixes of 47 elements, the 47-inverter resolution
between 40 °C and 100 °C, and measurement periods from 2^13 to 2^21 cycles. It
prints the counts next to the published averages; the model matches them
within 7 %. The model has no noise source, so only the quantization part of
the noise study can be reproduced.

`tb_ro_temp_sensor_system` is the quick version: 4 sensors, a 1024-cycle
window and a fast UART. It runs two back-to-back measurements, with a
temperature step on three rings and a voltage step on the fourth, and counts
that every phase of the sequence happened.
