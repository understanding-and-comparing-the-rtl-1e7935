# On-chip voltage sensors and power wasters for FPGAs

A tenant that shares an FPGA with others can watch the shared power
distribution network (PDN) with its own logic: when the supply drops, every
gate gets slower, and a circuit that measures delay becomes a voltmeter. This
design is a measurement testbed for comparing the two usual kinds of such
sensors:

* a **ring-oscillator (RO) sensor**: 16 free-running rings, each driving a
  counter; fewer oscillations per clock period means a lower supply;
* a **time-to-digital converter (TDC)**: a rising edge is sent down a delay
  line and a 256-tap carry chain once per clock; the number of taps it
  reaches before the next clock edge (the Hamming weight of the sampled taps)
  drops when the supply drops.

To produce controlled supply drops, the same FPGA holds two kinds of
**power wasters**: a flip-flop with a huge fanout (a short burst of current
on one clock edge) and up to 1,000 ring oscillators (a steady current set by
how many are running). The user drives everything over JTAG through a
JTAG-to-AXI bridge: configure the wasters and a sensor, start a *trial*, let
the wasters fire at a chosen cycle while the sensor output is written into a
FIFO every clock, and read the trace back afterwards.

The synthesizable parts (bus, registers, trial control, FIFO, counters,
sampling flip-flops, Hamming weight, clock gate) are ordinary RTL. The parts
whose whole function is a physical delay (ring oscillators, the adjustable
delays, the carry chain) are behavioural simulation models with timing; see
"Simulation models" below.

## Block diagram

```
 JTAG-to-AXI bridge (vendor IP, not included)
        | 32-bit AXI4-Lite   s_axil_req / s_axil_rsp
        v
 +-------------------+  addr[16]=0  +--------------------------------------+
 | axil_interconnect |------------->| power_waster                          |
 |  1 master,        |              |  axil_reg_port -> CTRL, RO_COUNT, INFO|
 |  2 slaves         |              |  ff_waster      (1 source FF,         |
 +-------------------+              |                  7,000 load FFs)      |
        | addr[16]=1                |  ro_waster_bank (1,000 x ring_osc)    |
        v                           +--------------------------------------+
 +--------------------------------------------+          ^ trigger
 | sensor_logger                              |----------+
 |  axil_reg_port -> CTRL, SAMPLES, TRIG_CYCLE,|
 |                   TDC_DELAY, STATUS, DATA   |
 |  trial controller -> sync_fifo (1,024 x 32) |
 |  ro_sensor  (16 x ro_sensor_unit)           |
 |  tdc_sensor (controller, coarse + fine      |
 |              delay, 64 x CARRY4, sampler)   |
 +--------------------------------------------+
```

`testbed_top` wires this together. Its ports are the AXI4-Lite slave port
(as the structs `axil_req_t` / `axil_rsp_t` from `axil_pkg`), `clk`,
`rst_n` (synchronous, active low), and four status outputs: `trial_busy`,
`waster_trigger`, `ff_waster_on` and `ro_wasters_on` (rings enabled now).

## The TDC sensor (`tdc_sensor`)

This is the most delicate part, because it only works when its delays are
matched to the clock.

1. **Launch** (`tdc_controller`). While enabled, the launch signal is the
   clock itself, gated by an enable flip-flop clocked on the falling edge
   (the structure of an integrated clock-gating cell, so the gate never cuts
   a clock pulse). A rising edge therefore enters the delay line at every
   rising clock edge.
2. **Initial delay** (`tdc_adj_delay`, two instances). A coarse stage
   (12 ns + 1 ns x setting) and a fine stage (100 ps x setting), both set
   from register `TDC_DELAY`. Calibration means choosing the settings so that
   the edge is part way along the chain at the next clock edge.
3. **Carry chain** (`tdc_carry_chain`). 64 CARRY4 primitives in series give
   256 taps, 24 ps apart in the model.
4. **Sampling** (`tdc_sampler`). 256 flip-flops capture the taps at the next
   rising clock edge; one cycle later their Hamming weight is registered as
   the sensor output.

With coarse 4 / fine 9 (the reset value) the initial delay is 16.9 ns. At
50 MHz the edge then has 3.1 ns left, reaching 129 taps. A supply slowdown
*s* stretches every delay by (1 + *s*); at about 18.3 % the initial delay
alone fills the 20 ns period and the output is 0. That is the end of the
TDC's range. One tap is 0.12 % of the period, which is the TDC's resolution.

The initial delay must be longer than half a clock period. The launch signal
falls at mid-period, and that falling edge must not reach the first tap
before the sample is taken. The reset calibration meets this at 50 MHz. At
other clock rates, `TDC_DELAY` must be recalibrated, and the models' delay
ranges may not reach: the coarse stage cannot go below 12 ns.

Timing: the edge launched at clock edge *k* is sampled at *k*+1. Its weight
appears after edge *k*+2, and `valid` follows the enable with the same
latency.

## The RO sensor (`ro_sensor`, `ro_sensor_unit`)

Each unit is a ring oscillator (`ring_osc`: a 2:1 multiplexer selected by
`enable`, with input 0 grounded and input 1 fed back, followed by three
inverters) clocking a 16-bit counter. At each rising edge of `clk`, the unit
reports how many oscillator edges occurred during the clock period that has
just ended. At the nominal 356 MHz ring frequency and a 10 MHz clock that is
about 35.6 counts. One count is therefore a 2.8 % change in delay, which is
the RO sensor's resolution at 10 MHz (14.9 % at 50 MHz).

The counter is never cleared. Instead, it runs freely in the oscillator's
clock domain, is captured at every `clk` edge, and the difference of the last
two captures is the count. This gives the same number as clearing the counter
after every capture, without sending a clear signal into the fast domain.
In hardware the captured counter value crosses clock domains, and a
Gray-coded counter would make that capture safe. The model does not need one,
so a binary counter is used.

`ro_sensor` adds the 16 unit counts into one 20-bit data point every cycle
(sum = 16 x average), registered one cycle after the counts. `valid` is high
from the third clock edge after `enable` rises.

## Power wasters (`power_waster`)

* **FF waster** (`ff_waster`). A flip-flop registers the enable step. Its
  output drives the D inputs of `FF_FANOUT` (7,000) load flip-flops. The
  current burst happens when the heavily loaded net rises, and the loads all
  switch one edge later. The fanout is fixed when the design is built. To
  sweep it, rebuild with another `FF_FANOUT`.
* **RO wasters** (`ro_waster_bank`). `N_RO` (1,000) rings, each with its own
  enable. `RO_COUNT` sets how many rings run (thermometer enable, saturating
  at `N_RO`), so the steady current can be swept at run time.

`CTRL` arms each kind of waster and selects the trigger mode. In mode 0 armed
wasters run at once. In mode 1 they run only while the trial controller's
`trigger` is high. Enables are registered, so the wasters start one cycle
after `trigger`. The FF waster's source flip-flop switches one cycle later
still.

## Trials and the FIFO (`sensor_logger`, `sync_fifo`)

Writing `CTRL.START` with `SAMPLES` > 0 does four things:

* It empties the FIFO.
* For `SAMPLES` cycles, it pushes one word per cycle from the selected sensor.
* From trial cycle `TRIG_CYCLE` to the end of the trial, it raises `trigger`.
* If a word arrives while the FIFO is full, the word is dropped and the
  overflow flag is set.

Reading `DATA` pops one word. `sync_fifo` is a first-word-fall-through FIFO of
`FIFO_DEPTH` (1,024) 32-bit words.

FIFO word: bit 31 = sensor (0 RO, 1 TDC), bit 30 = sensor output valid,
bits 19:0 = value (RO: sum of 16 counts; TDC: Hamming weight).

## Register map (`testbed_pkg`)

| Address | Register | Bits |
|---|---|---|
| 0x0000_0000 | waster CTRL | [0] FF armed, [1] RO armed, [2] trigger mode |
| 0x0000_0004 | waster RO_COUNT | [15:0] rings to enable |
| 0x0000_0008 | waster INFO (ro) | [31:16] N_RO, [15:0] FF_FANOUT |
| 0x0001_0000 | sensor CTRL | [0] START (w1), [1] log TDC, [2] RO sensor on, [3] TDC on |
| 0x0001_0004 | SAMPLES | samples per trial |
| 0x0001_0008 | TRIG_CYCLE | trial cycle at which the wasters fire |
| 0x0001_000C | TDC_DELAY | [3:0] coarse, [7:4] fine (reset 0x94) |
| 0x0001_0010 | STATUS (ro) | [0] busy, [1] empty, [2] full, [3] overflow, [31:16] words |
| 0x0001_0014 | DATA (ro) | pops the oldest FIFO word |

The bus is AXI4-Lite. `axil_interconnect` routes by address bit 16 and
carries one write and one read transaction at a time.
`axil_reg_port` accepts AW and W together and answers with OKAY. Assertions
in these modules check that responses are held until taken and that
addresses stay stable until accepted.

## Simulation models

Ring oscillators, the adjustable delays and the carry chain are physical
delays. On an FPGA they are placed LUTs and carry primitives, kept from
optimisation. Written as plain RTL they would be combinational loops or
plain wires. Here they are behavioural models (`ring_osc`, `tdc_adj_delay`,
`tdc_carry_chain`, each saying so in its first comment). Each element
schedules its output change after its delay, in picoseconds. Every ring
stage also re-evaluates its input when the enable changes, so a ring that
comes out of simulation start-up in an inconsistent state still starts
oscillating once enabled.

Supply droop is represented by one number, `pdn_sim_pkg::slowdown_ppm`, and
every modelled delay is stretched by it at the moment the element switches.
Testbenches set it. A real supply drop is local and depends on placement, the
board's shunt resistor and its decoupling. None of that is modelled.

The delay values come from the measured behaviour:

* 351 ps per ring stage gives the 356 MHz nominal ring frequency.
* 24 ps per tap is 0.12 % of a 20 ns period.
* The coarse and fine step sizes are this design's own choice.

Synthesis tools ignore the delays and `fork` blocks of these models, so they
are for simulation only.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `N_RO_WASTERS` | 1000 | largest RO waster count measured |
| `FF_FANOUT` | 7000 | largest FF waster fanout measured |
| `N_RO_SENSORS` | 16 | RO sensor size |
| `N_CARRY4` | 64 (256 taps) | TDC size on the 7-series part |
| `FIFO_DEPTH` | 1024 | own choice |
| RO counter width | 16 | own choice |
| `SLAVE_SEL_BIT` | 16 | own choice |

On an UltraScale+ part, the same 256 taps come from 32 CARRY8 primitives at
a 120 MHz clock. The sampler and the Hamming weight are unchanged. The
behavioural delay model's coarse stage, however, cannot be set below 12 ns,
which is longer than the 8.3 ns period, so that configuration is not
simulated.

## Own choices and departures

The measured system fixes the structure of the sensors and wasters. The
following are this design's own choices:

* the AXI4-Lite protocol, the address map and all registers;
* the single clock for bus and sensors;
* the trial controller and its trigger wire to the wasters, which fire the
  wasters at a known cycle of the trace;
* the FIFO depth and word format;
* the clock-gated launch of the TDC;
* the step sizes of the adjustable delays;
* registering the Hamming weight;
* summing the 16 RO counts in hardware;
* the free-running-counter form of the RO count;
* the per-ring enables and a build-time FF fanout.

Only one sensor is logged per trial. The measurements themselves are done in
software on the read-out traces:

* repeating each trial 100 times and averaging;
* taking the minimum of each trace;
* converting counts and Hamming weights to a common "slowdown" figure.

The JTAG-to-AXI bridge is vendor IP and is not included. Its AXI master
connects to the top's AXI4-Lite port.

## Simulating

All files are in `rtl/` (design, packages first) and `tb/` (testbenches). Every
testbench checks itself. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. Delays need Verilator's
timing support, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
  rtl/axil_pkg.sv rtl/testbed_pkg.sv rtl/pdn_sim_pkg.sv \
  tb/tb_testbed_top.sv --top-module tb_testbed_top -o sim
./obj_dir/sim
```

Block testbenches:

* `tb_ring_osc`, `tb_ro_waster_bank`, `tb_ff_waster`
* `tb_ro_sensor_unit`, `tb_ro_sensor`
* `tb_tdc_controller`, `tb_tdc_adj_delay`, `tb_tdc_carry_chain`,
  `tb_tdc_sampler`, `tb_tdc_sensor`
* `tb_sync_fifo`, `tb_axil_interconnect`
* `tb_power_waster`, `tb_sensor_logger`

Expected values are worked out in the testbenches from the element delays,
not read from the design. Examples are the Hamming weight for a given
slowdown and the ring count per period.

The end-to-end experiment is in `testbed_driver`. It plays the JTAG master
and stands in for the supply: each running ring adds 225,000 / `N_RO` ppm
of slowdown, and the FF burst adds 2.1 % for one clock period. Under that
model it does the following:

* sweeps the RO wasters in TDC trials at 50 MHz; the weight goes 129, 93, 60,
  30, 2, 0 as 0 to 100 % of the rings run;
* runs RO sensor trials at 10 MHz; the RO-derived slowdown matches the
  applied one within 1 %;
* shows the FF burst as a dip of about 14 taps in the TDC trace, while the RO
  sum stays within its quantisation;
* exercises immediate firing, recalibration and FIFO overflow, and fails if
  any of them never happened.

`tb_testbed_top` runs it at reduced waster and FIFO sizes (100 RO wasters,
a 700-load FF waster, a 64-word FIFO) and passes; the same run with the
full 1,024-word FIFO passes too. `tb_testbed_full` runs it with every
parameter at its default. Building that model takes about a minute and
running it a few minutes, mostly for the 1,000 modelled rings.
