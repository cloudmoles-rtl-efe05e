# CloudMoles: undercover voltage sensors for multi-tenant FPGAs

A tenant on a shared cloud FPGA can waste power on purpose: thousands of tiny
ring oscillators switching at once pull the core supply down. That can cause
timing faults in the shell or in other tenants, or reset the device. This
design lets the shell see such activity and locate it, without taking space
from the tenants and without telling them.

The idea has three parts:

* **Only the oscillator goes into the tenant's area.** Each sensor is a ring
  oscillator (RO) made of a handful of LUTs that the tenant's place-and-route
  left unused. It is inserted after the tenant design is routed. Its
  frequency drops when the local supply droops.
* **Everything else stays in the shell.** Every RO has a frequency counter in
  the shell. The shell also holds the control logic that enables the ROs and
  samples all counters together. There is one sensor per clock region,
  because clock regions are the unit in which FPGA area is handed out.
* **A robust figure per region.** The samples of each sensor are reduced to
  the *normalized deviation with respect to the trimean* (NDT). This is the
  spread of the samples about their trimean, divided by the trimean. Regions
  with a power waster show a much higher NDT than the others.

This repository holds the SystemVerilog for the sensor network. The shell
logic is synthesizable. The ring oscillator is a behavioural model.

## Structure

```
             tenant clock regions (13)                 shell
   +--------------------------------------+   +----------------------------------+
   | ro_sensor  (X0Y0) --ro_clk[0]--------+-->| freq_counter[0] --+              |
   | ro_sensor  (X1Y0) --ro_clk[1]--------+-->| freq_counter[1] --+--> sample    |
   |   ...                                |   |   ...             |    buffer -->| ndt_unit --> ndt_*
   | ro_sensor  (X1Y6) --ro_clk[12]-------+-->| freq_counter[12]--+    (512 rows)|
   |        ^ en                          |   |        ^ snap                    |
   +--------|-----------------------------+   |  acq_controller --> sample_* out |
            +---------------------------------+-- ro_en                          |
                                              +----------------------------------+
```

| Module | Kind | What it does |
|---|---|---|
| `cm_pkg` | package | Shared sizes: 13 sensors, 16-bit samples, 2^9-cycle sampling period, 512 samples, NDT format, default topology |
| `ro_sensor` | behavioural model | The undercover ring oscillator, with a supply-dependent delay |
| `freq_counter` | RTL | Counts one RO in its own clock domain and returns RO periods per sampling period |
| `acq_controller` | RTL | Enables the ROs, snaps all counters every 512 cycles, writes 512 rows |
| `sample_buffer` | RTL | 512 x (13 x 16 bit) simple dual-port RAM |
| `ndt_unit` | RTL | Trimean, deviation about the trimean and NDT for each sensor |
| `cloudmoles_top` | top | Wires 13 ROs and 13 counters to the shell logic |

The device assumed is a Virtex-7 (VC707 board). It has 14 clock regions,
X0Y0 to X1Y6. X0Y6 holds the shell controller, so 13 regions carry a sensor.
Sensor index `s` maps to a region as follows: 0 X0Y0, 1 X1Y0, 2 X0Y1,
3 X1Y1, 4 X0Y2, 5 X1Y2, 6 X0Y3, 7 X1Y3, 8 X0Y4, 9 X1Y4, 10 X0Y5, 11 X1Y5,
12 X1Y6.

## The sensor: a large, sparse ring oscillator

Most FPGA voltage sensors pack an RO into a few adjacent slices. That makes
them sensitive only to their immediate neighbourhood, so many of them are
needed. Here the loop is deliberately spread out. A few LUTs far apart are
joined by long routing. Routing delay also depends on the supply, so one
loop covers a large part of its clock region.

A topology is written as (N, S, H):

* **N** is the number of LUT columns. Each column has two LUTs, so there are
  2N LUTs in all.
* **S** (stride) is the horizontal distance between columns, in slices.
* **H** (height) is the vertical distance between the two LUTs of a column.

The loop starts at the top LUT of the leftmost column. It runs down that
column, right to the next column, up that column, right again, and so on. The
last LUT feeds back to the first.

Every LUT is a 2-input AND of the ring signal and an enable, so it acts as a
buffer. The only exception is the last LUT, a NAND, which is the loop's
single inversion. Having only one inversion keeps the sensor's own power low.
Pulling the enable low stops the loop with the output at 1. The loop is
centred on its clock region.

The default topology is (2, 20, 10): four LUTs and 60 slices of wire. The
other recommended setting is (3, 20, 20): six LUTs and 160 slices. Both
were used in the published hardware experiments and located the waster.
`tb_topology_sweep` (see below) runs all nine measured topologies.

**Timing model of `ro_sensor`.** One trip around the loop takes
`2N x 361 ps + L x 13 ps`, where `L` is the Manhattan wire length of the
loop. The output toggles once per trip. All delays scale with
`1000 mV / vccint_mv_i`. The two constants are a least-squares fit to the
mean frequencies measured on hardware for nine topologies, which range from
271.5 MHz down to 104.9 MHz. The fit is coarse:

* For (2, 20, 10) the model gives 224.8 MHz. The measured mean was
  198.1 MHz, with 175 to 218 MHz across clock regions.
* For (3, 20, 20) the model gives 117.8 MHz, against a measured 116.9 MHz.

The 1/V scaling is a first-order stand-in for the real supply dependence.
Treat absolute frequencies and NDT magnitudes from simulation as
illustrative only.

## Counting in the shell

`freq_counter` has one free-running 16-bit counter in the RO clock domain.
That counter keeps a registered Gray-code copy. The shell clock samples the
Gray code through two flip-flops and converts it back to binary. On each
`snap_i` it outputs the difference from the previous snap, modulo 2^16.

* Only one Gray bit changes per RO edge, so the synchronized value is always
  a value the counter actually held.
* The counter wraps freely. The fastest oscillator of interest gives fewer
  than 900 counts per sampling period, far below 2^16.
* Every snap sees the same three-cycle synchronizer latency, so every
  difference covers exactly one snap interval.

A counter that is cleared and gated per window would also work. The
free-running Gray counter was chosen because it needs no control signal
crossing into the RO domain.

`acq_controller` runs one measurement:

1. `start_i` raises the RO enable.
2. After 16 warm-up cycles, a *priming* snap sets every counter's reference
   value. It records nothing.
3. Then a snap comes every 2^9 = 512 cycles, which is 2.56 us at 200 MHz.
   Each snap's results are written one cycle later as row k of the sample
   buffer.
4. After 512 samples the enable falls and `done_o` pulses.

The 512 samples span exactly 2^18 cycles (1.31 ms) from the priming snap to
the last sample.

## The NDT metric and how `ndt_unit` computes it

For the n = 512 samples x_i of one sensor:

```
T   = (Q1 + 2*Q2 + Q3) / 4                   trimean
S_T = sqrt( sum_i (x_i - T)^2 / (n - 1) )    spread about the trimean
NDT = S_T / T
```

Q2 is the median. Q1 and Q3 are the medians of the lower and upper halves.
For n divisible by 4, with k = n/4 and s the sorted samples (0-based):

```
8*T = s[k-1] + s[k] + 2*(s[2k-1] + s[2k]) + s[3k-1] + s[3k]
```

So `T8 = 8*T` is an exact integer. It is reported on `res_trimean8_o`
(3 fraction bits). A few outlying samples, such as a sample taken during a
deep droop, barely move the trimean. Dividing by T makes sensors with
different nominal frequencies comparable.

The unit never sorts. For each sensor it does the following:

1. **Radix selection of six order statistics at once.** It runs one pass
   over the 512 samples per bit, from the most significant bit down. For each
   wanted rank, the pass counts the samples that match the bits already
   decided and have a 0 in the current bit. If the remaining rank is below
   that count, the bit is 0. Otherwise the bit is 1 and the count is
   subtracted from the rank. Sixteen passes fix all six values.
2. **One pass of exact squares.** It adds up `(8*x_i - T8)^2` into a 48-bit
   accumulator.
3. **Division and root.** An 88-step restoring divider forms
   `Q = floor(sum * 2^40 / (511 * T8^2))`. A 44-step digit-by-digit square
   root then gives `floor(sqrt(Q))`. The result equals `floor(NDT * 2^20)`
   exactly, because the factors of 8 cancel.

The NDT output is unsigned fixed point with 4 integer and 20 fraction bits,
and saturates. A sensor whose trimean is 0 (a stopped oscillator) reports
NDT = 0.

Each sensor takes `17 * (512 + 2) + 88 + 44 + 3 = 8,873` cycles. All 13
sensors take about 115k cycles, 0.58 ms at 200 MHz. The unit reads the
buffer one row per cycle and picks out the column of the current sensor.

## Top-level interface (`cloudmoles_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Shell clock (200 MHz intended), asynchronous active-low reset |
| `start_i` | in | 1 | Start a measurement (pulse; ignored while `busy_o`) |
| `vccint_mv_i` | in | 13 x 16 | Core supply seen by each sensor, in mV. It drives the RO models and stands for the physical supply |
| `busy_o` | out | 1 | High from an accepted start to the last NDT result |
| `ro_en_o` | out | 1 | The oscillators' enable |
| `sample_valid_o`, `sample_idx_o`, `sample_counts_o` | out | 1, 9, 13 x 16 | Every recorded row, for logging off chip |
| `ndt_valid_o`, `ndt_sensor_o`, `ndt_trimean8_o`, `ndt_o` | out | 1, 4, 19, 24 | One result per sensor, in sensor order |
| `done_o` | out | 1 | Pulses with the last result |

A full cycle (measurement plus NDT) takes about 2^18 + 18 + 13 x 8,873
cycles, roughly 2.0 ms at 200 MHz. The NDT unit starts by itself when the
last row is written.

Parameters of the top: `N_SENSORS` (13), `COUNT_W` (16),
`SAMPLE_PERIOD_LOG2` (9), `N_SAMPLES` (512, a multiple of 4), `NDT_FRAC` (20),
`NDT_INT` (4), `RO_N`/`RO_S`/`RO_H` (2/20/10) and `WARMUP_CYCLES` (16).

## Simulating

Every testbench checks its own results. Each prints one line,
`TB_RESULT checks=N failures=M`, and calls `$finish`. All of them run with
plain Verilator 5 (timing mode is needed for the oscillator models), for
example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/cm_pkg.sv \
          tb/tb_cloudmoles_top.sv --top-module tb_cloudmoles_top
./obj_dir/Vtb_cloudmoles_top
```

The simulator is two-state, so the testbenches ignore outputs until reset
has been released.

| Testbench | Checks | Run time |
|---|---|---|
| `tb_ro_sensor` | Period of (2,20,10) and (3,20,20), computed from LUT coordinates; slow-down at 950 mV; rest at 1 when disabled; restart | < 1 s |
| `tb_freq_counter` | Samples within one count of the true RO count at four frequencies (one faster than the shell clock); the sum over 200 samples equals the RO edges seen (spans wraps) | < 1 s |
| `tb_acq_controller` | Priming snap 17 cycles after start; snaps exactly 512 cycles apart; 2^18-cycle span; 512 ordered writes one cycle after each snap; done; start-while-busy ignored; two runs | < 1 s |
| `tb_sample_buffer` | Random fill and read-back, one-cycle latency, read-during-write returns old data | < 1 s |
| `tb_ndt_unit` | 13 kinds of data (constant, noise, switched load, outliers, full scale, zeros, ramp, bimodal, ...) against a sort-based floating-point model; T8 exact, NDT within 1 LSB; 8,873-cycle interval | < 1 s |
| `tb_cloudmoles_top` | Whole design at default size; four measurements (see below) | about 17 s |
| `tb_topology_sweep` | Nine copies of the whole design, one per tested topology, under the attacker scenario | about 75 s |

The end-to-end test `tb_cloudmoles_top` uses the default parameters. It
supplies per-region voltages and runs four measurements:

1. **Sensors alone.** Every region sits at 1000 mV with 1 mV noise. Every
   sample must match the model frequency, and all NDT values must be small.
2. **Attacker alone.** A power waster sits in X0Y3, X1Y3, X0Y4, X1Y4, X0Y5
   and X1Y5. It is on for 10 us and off for 40 us. While on, it droops its
   own regions by 40 mV and the rest of the device by 8 mV. The six highest
   NDT values must be exactly those six regions.
3. **Tenant alone.** An ordinary circuit in X0Y3 and X0Y4 adds a random
   droop of 0 to 6 mV to its regions, redrawn every microsecond. Its two
   regions must have the highest NDT values. Their NDT must also stay below
   half of what the attacker caused in the same regions. That margin is what
   separates a busy tenant from a power waster.
4. **Attacker and tenant side by side.** A smaller waster sits in X0Y1 to
   X0Y5, with droops scaled by 120/135. The ordinary tenant sits in X1Y4 and
   X1Y5. The five highest NDT values must be the attacker's five regions.

The testbench also recomputes every trimean and NDT from the streamed
samples. It checks the sample timing, and counts that the RO enable, the
priming snap, sampling, counter wrap, supply droops, NDT results and
waster location all occurred. The droop figures are this testbench's own
stand-in for the real supply. They are not measured data. With them, the
NDT values (x 10^-4) come out at about:

* 9.4 everywhere with the sensors alone;
* 170 in the waster's regions against 34 elsewhere;
* 14 in the tenant's regions against 9.4 elsewhere;
* 147 in the waster's regions against 29 to 32 elsewhere when the waster
  and the tenant run side by side.

`tb_topology_sweep` runs the attacker scenario for all nine topologies at
once: (2,10,10), (2,20,10), (2,40,10), (2,40,20), (2,80,10), (3,10,10),
(3,20,10), (3,20,20) and (3,40,10). It prints a region-by-topology NDT map.
For every topology it checks the median sample against the expected
frequency and that the attacker's regions rank highest.

## What is taken from the published design, and what is not

Taken from the design:

* One RO per clock region, with only the RO outside the shell.
* The (N, S, H) topology and its LUT order, AND/NAND LUTs and single
  inversion.
* The counters, control logic and sample collection in the shell.
* The 200 MHz clock, the 2^9-cycle sampling period, 512 samples per
  measurement and 13 sensors.
* The trimean, deviation-about-trimean and NDT equations.
* The two recommended topologies.

Choices made here, where the design gives no detail:

* **Where NDT is computed.** The published flow logs the raw samples with
  an on-chip logic analyzer and computes NDT offline. Here the sample buffer
  and `ndt_unit` do it in the shell, and the raw samples are also streamed
  out. Dropping `sample_buffer` and `ndt_unit` gives the logging-only
  variant.
* **Widths.** The 16-bit counter width and the NDT fixed-point format are
  this design's own. The reference sensors the design was compared with
  used 20-bit counters.
* **Counter mechanism.** The Gray-code clock-domain crossing, the 16-cycle
  warm-up and the priming snap are this design's own.
* **Quartile convention.** Q2 is the median and Q1/Q3 are half-medians. The
  trimean is defined on the median; a statement that Q2 is "the mean" was
  not followed.
* **Zero trimean.** NDT = 0 for a zero trimean.
* **Sensor numbering.** The sensor-to-region numbering is this design's own.
* **RO model.** The frequency model and its constants, and the 1/V supply
  dependence.

Not in this RTL:

* **Physical insertion.** Placing the ROs into free LUT sites is done by a
  post-route tool step. That step reads the routed tenant design. For each
  sensor LUT it searches for the nearest free LUT within a Manhattan radius
  of 2 (about 10 to 20% of the sensor height), places and connects the
  cells, and hands the design back for final routing. It works on netlists,
  not in hardware. Up to that radius the feasibility tests always succeeded,
  with a median displacement of 1.5 slices.
* **Shell platform IP and the logic analyzer** used for logging.
* **Alarm policy.** The design says the shell should flag excessive
  activity, but gives no threshold or decision rule. The RTL delivers the
  per-region NDT and leaves the decision to software.

## Using the RTL on an FPGA

Only `ro_sensor` is not synthesizable. For a real build, replace it with
2N LUT primitives. Use AND2 for the buffers and NAND2 for the last LUT, all
sharing the enable. Place them at the (N, S, H) coordinates with placement
constraints or a post-route tool, and keep the loop from being optimized
away. The counters' RO-domain flops must sit in the shell, clocked by the
routed RO output. Constrain the Gray bus between the two domains for a
maximum skew below one shell-clock period.
