# WR-PMU timing core

A phasor measurement unit (PMU) reports the amplitude, phase and frequency of
grid voltages and currents. The phase only means something relative to UTC:
a time error of Δt shows up as a phase error of 2π·f·Δt, so 1 µs at 50 Hz is
already 314 µrad. This core gives a PMU its UTC time from a **White Rabbit
(WR)** node. White Rabbit is a PTP-based Ethernet timing network that reaches
sub-nanosecond accuracy. The core also corrects the PMU's measurements for a
sampling clock that runs free of UTC.

Reading time from the WR node is awkward in three ways:

* the node can only be polled at 50 kHz, once per 20 µs;
* each reading arrives a fixed few microseconds after the instant it
  describes;
* the readings jitter by a few nanoseconds.

The core therefore keeps its own clock. That clock advances 25 ns on every
tick of the 40 MHz FPGA clock. A PI controller steers it towards the WR
readings with femtosecond-sized corrections. Between readings the local clock
gives the time, and its jitter is well below that of the readings.

The ADC sampling is not locked to this clock. The core does not adjust the
sampling. Instead it measures two errors and corrects the estimator's results
afterwards:

* how far the sampling rate is off (the drift f_D);
* how late the first sample of each window comes after its frame boundary
  (the offset).

All RTL is SystemVerilog-2017 in `rtl/`. The testbenches are in `tb/`.

## Block structure

```
            WR node (external)                      ADC (external)
   trig/freeze |  ^ ready, UTC time                    | sample strobe
               v  |                                    v
        +-------------------+                 +---------------------+
        | wr_time_retriever |                 | clock_drift_meter   |--f_D--+
        +-------------------+                 +---------------------+       |
               | T_WR                                  ^ T_PMU              v
        +-------------------+  eps  +---------------+  |           +------------------+
        | pmu_time_error    |------>| pi_controller |  |           | freq_compensator |<-- f (estimator)
        | (+T_delay, -T_PMU)|       +---------------+  |           +------------------+
        +-------------------+          | gamma          |                    | f_c
          | load (first/large error)   v                |                    v
          +----------------->+--------------------+     |          +-------------------+
                             | free_running_clock |-----+--------->| phase_compensator |<-- phi_0
                             | s / ns / fs        |  T_PMU         +-------------------+
                             +--------------------+     |                    | phi_c, f_c, frame time
                                                        v
                              +------------+  edge  +---------------------+
                              | subpps_gen |------->| subpps_offset_meter |--offset--> phase_compensator
                              +------------+        +---------------------+
                                   | subPPS (starts each estimation window)
                                   v
                          synchrophasor estimator (external)
```

`wr_pmu_timing` is the top. It wires the blocks above and brings out the
three external interfaces:

* the WR node;
* the ADC sample strobe;
* the synchrophasor estimator.

The estimator itself (an interpolated-DFT algorithm over 60 ms windows) is not
part of this core.

## Time format

`wr_pmu_pkg::pmu_time_t` is a packed struct `{sec[31:0], ns[29:0]}`, with
`0 ≤ ns < 10^9`. The WR node and the PMU clock both use this format. The
package also provides `time_diff_ns` (a − b, signed 64-bit ns) and
`time_add_ns` (adds an offset below one second and normalises the result).

## The disciplined clock

This is the heart of the design, and the part that needs the most care.

### Counters

`free_running_clock` holds a second counter, a nanosecond counter and a
femtosecond counter (0 … 999 999). On every tick it does the following:

```
fs  <- fs + gamma                 (gamma in fs, |gamma| < 10^6)
ns  <- ns + 25 + carry            carry = +1 on fs overflow, -1 on underflow
sec <- sec + 1 when ns reaches 10^9
```

So the published time (seconds and nanoseconds) always moves by 25 ns per
tick, except that every so often it moves by 24 or 26 ns. Those are the ticks
on which the femtosecond counter overflows or underflows. A correction of
γ fs per tick removes γ/25 ppb of frequency error. The counter widths are this
design's choice.

### Error and delay compensation

`pmu_time_error` runs when a reading differs from the one before it. It adds
the fixed read delay `T_DELAY_NS` to the reading and subtracts the PMU time of
the same cycle:

```
eps = (T_WR + T_DELAY_NS) - T_PMU        [ns]
```

`T_DELAY_NS` has to be calibrated. It is the full time from the instant the
node captures its time to the cycle in which the reading reaches
`pmu_time_error`:

* the node's own answer latency;
* 3 cycles in this core: START → WAIT, WAIT → READ, and the READ register.

The testbench node answers after 118 cycles, which makes the total exactly
3000 ns, the default. A wrong `T_DELAY_NS` does not break the loop. It turns
directly into a constant time offset of the PMU clock.

### PI controller

`pi_controller` computes the correction on every new error and holds it until
the next one:

```
gamma = Kp * eps + I,     I <- I + sign(eps)   (1 fs steps)
```

* **Kp** spreads an error over 10 ms of ticks. 1 ns = 10^6 fs spread over
  400 000 ticks gives 2.5 fs per tick per ns. It is stored as Q8 (`KP_Q8 = 640`)
  and derived from `PI_AVG_NS` and `TICK_NS`.
* **The integrator** is a counter that steps by ±1 fs per reading with the
  sign of the error. It absorbs a steady frequency offset: 1 ppm of the 25 ns
  tick is 25 fs per tick. With 20 µs between readings it builds up at
  50 fs/ms.
* **Clamping.** Both γ and I are clamped to ±999 999 fs. This keeps the
  femtosecond carry to one nanosecond per tick.

### Overwrite

The first reading after reset sets the clock directly. So does any reading
whose error exceeds `STEP_NS` (1 µs). This is a *load*: the integrator is
cleared and the drift window restarts. All other readings go only through the
PI path. The 1 µs threshold is this design's choice. It lets the clock
recover at once from a step in WR time, for example after the grand master
re-synchronises.

### Measured behaviour

These figures come from the testbench models described under Verification.

* With the WR time running 2 ppm fast and then 3 ppm slow against the FPGA
  clock, the PMU clock stays within 4 ns of true UTC once settled. The mean
  error is 0.1 ns.
* With ±3.5 ns of read jitter, the T_WR steps between triggers have a
  standard deviation of 2.85 ns. The T_PMU steps have 0.19 ns.
* Under the same jitter, the clock error at the ADC sample instants has a
  standard deviation of 0.83 ns. That is 0.25 to 0.27 µrad of phase error
  between 47.5 and 52.5 Hz. The complete original PMU measured about
  8 µrad, almost all of it from the estimator and the signal noise.

## Polling the WR node

`wr_time_retriever` runs one acquisition every `TRIG_PERIOD_CYC` = 800 cycles
(20 µs):

| state  | cycles      | outputs                | meaning                               |
|--------|-------------|------------------------|---------------------------------------|
| IDLE   | until period| –                      | node idle                             |
| NORMAL | 1           | `wr_normal`            | put the node in normal operation      |
| START  | 1           | `wr_normal`, `wr_trig` | trigger: node captures UTC now        |
| WAIT   | until ready | `wr_normal`, `wr_trig` | wait for `wr_node_ready`              |
| READ   | 1           | `wr_normal`, `wr_freeze` | latch `wr_time`, pulse `utc_wr_valid` |

If the node does not answer within `WAIT_TIMEOUT_CYC` (600) cycles, the
acquisition is dropped and `miss_count` is incremented. The clock then simply
coasts on its last correction. The state sequence and the period follow the
original design. The signal-level handshake is this core's choice. An
assertion checks that trigger and freeze are never high together.

## Frames, drift and compensation

**subPPS** (`subpps_gen`) is a square wave at the reporting rate
(`REPORT_RATE` = 50 frames/s). It is derived from the PMU time:

* it is high in the first half of each 20 ms period;
* its first rising edge in every second is at the second rollover.

`subpps_rise` starts an estimation window. `t_subpps` is the nominal frame
time: the second, plus the nanoseconds rounded down to a multiple of 20 ms.
The measurement is time-tagged with `t_subpps`.

**Offset** (`subpps_offset_meter`) is t0 − t_subPPS. Here t0 is the PMU time
of the first sample strobe at or after the edge. A sample in the same cycle
as the edge counts as first.

**Drift** (`clock_drift_meter`) is measured over consecutive windows of
`M` = 100 000 sample intervals (2 s at 50 kHz):

```
f_D = ((t_M - t_0) - M*Ts) / (M*Ts)           output as signed Q40 (fd_q40)
```

The window spans M intervals, that is M + 1 samples. An ideal sampling clock
then gives exactly zero. (Counting only M − 1 intervals against M·Ts would
give a bias of −1/M.)

**Frequency** (`freq_compensator`) corrects the DFT bin spacing,
Δf_c = Δf(1 − f_D) with Δf = 1/60 ms, and each frequency estimate,
f_c = f(1 − f_D). The result is in µHz. Because an interpolated-DFT
frequency is a bin position times Δf, correcting the finished estimate is
equivalent to correcting Δf inside the estimator.

**Phase** (`phase_compensator`) computes φ_c = φ_0 + 2π·f_c·(t0 − t_subPPS).

The sign is taken as the original design gives it. It fits an estimator
whose reported phase falls as time goes on. An estimator that reports φ_0 as
the phase of A·cos(2πft + φ) at t0 would need the opposite sign, because the
phase at the earlier subPPS edge is smaller. Such an estimator can negate its
phase before and after this block.

* Phases are unsigned Q32 fractions of a turn (2^32 = 2π), so the result
  wraps correctly by itself.
* The product f[µHz]·Δt[ns]·2^32/10^15 uses the constant
  K = round(2^92/10^15) and a 60-bit shift. It is exact to about 1e-13
  relative, plus rounding to 1 LSB.

The top pairs each estimate (`est_valid`) with three things:

* the most recent offset;
* the most recent drift;
* the most recent frame time.

It returns `meas_freq_uhz`, `meas_phase_q32` and `meas_time` with
`meas_valid`, two cycles after the estimate.

## Top-level interface (`wr_pmu_timing`)

| group      | ports |
|------------|-------|
| clock      | `clk` (40 MHz), `rst_n` (async, active low), `enable` (start polling) |
| WR node    | out `wr_normal`, `wr_trig`, `wr_freeze`; in `wr_node_ready`, `wr_time` |
| ADC        | in `sample_stb` (one-cycle pulse per sample, synchronous to `clk`) |
| estimator  | out `subpps`, `subpps_rise`, `t_subpps`; in `est_valid`, `est_freq_uhz`, `est_phase_q32`; out `meas_valid`, `meas_time`, `meas_freq_uhz`, `meas_phase_q32` |
| status     | `t_pmu`, `locked`, `gamma_fs`, `integ_fs`, `fs_cnt`, `fs_ovf`, `fs_unf`, `last_err_ns`, `miss_count`, `offset_valid`, `offset_ns`, `t0`, `frame_idx`, `fd_valid`, `fd_q40`, `span_err_ns`, `df_c_uhz` |

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `TICK_NS` | 25 | FPGA clock period |
| `TRIG_PERIOD_CYC` | 800 | WR polling period (20 µs) |
| `WAIT_TIMEOUT_CYC` | 600 | give-up time for a node answer (own choice) |
| `T_DELAY_NS` | 3000 | read delay to compensate (must be calibrated; see above) |
| `STEP_NS` | 1000 | error beyond which the clock is overwritten (own choice) |
| `PI_AVG_NS` | 10 000 000 | averaging time that sets Kp (10 ms) |
| `REPORT_RATE` | 50 | frames per second; must divide 10^9 |
| `DRIFT_M` | 100 000 | drift window in samples (2 s, own reading of "a few seconds") |
| `TS_NS` | 20 000 | nominal sample period (50 kHz) |
| `WINDOW_US` | 60 000 | estimation window length T (sets Δf) |

## Verification

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each compares
the block's outputs with values computed independently inside the testbench,
often in floating point. The system-level tests share `tb/wr_pmu_harness.sv`,
which contains:

* a behavioural WR node (`tb/wr_node_model.sv`), with a settable frequency
  offset, read jitter, a dropped answer and a time step;
* an ADC strobe running 500 ppm slow;
* a stand-in estimator.

The harness checks the following against the node's true UTC time:

* the PMU clock error;
* every offset;
* every drift value;
* every compensated measurement.

It also requires each mechanism to occur at least once: lock, overwrite on a
step, PI update, femtosecond overflow and underflow, missed trigger, subPPS
edge, offset, drift window and measurement.

| testbench | what it runs |
|-----------|--------------|
| `tb_wr_pmu_timing` | 120 ms end to end, drift window shortened to 200 samples |
| `tb_wr_pmu_timing_full` | 2.2 s end to end with every parameter at its default (about 90 M cycles, around a minute and a half) |
| `tb_wr_pmu_jitter` | 1000 trigger intervals with jittered WR readings; prints the step jitter of T_WR and T_PMU |
| `tb_wr_pmu_steady_state` | 2 ppm steady offset with jittered readings; turns the clock error at about 10,000 sample instants into the timing share of the phase error at 47.5, 50 and 52.5 Hz |
| `tb_wr_pmu_large_offset` | ±50 ppm WR frequency offset; the clock must stay within 1 µs of UTC without an overwrite |
| `tb_<block>` | unit tests of each block |

To run one with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/wr_pmu_pkg.sv \
          tb/tb_wr_pmu_timing.sv --top-module tb_wr_pmu_timing -Mdir obj
./obj/Vtb_wr_pmu_timing
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Where this core departs from, or adds to, the original design

* **Overwrite versus PI.** The original description says both that each
  reading overwrites the clock and that each reading feeds the PI controller.
  This core uses the PI path for every reading. It overwrites only the first
  reading and errors above `STEP_NS`.
* **Phase sign.** The phase correction keeps the original plus sign. See
  the note under "Frames, drift and compensation".
* **Own choices.** These were not specified and were chosen here:
  * the read-delay value;
  * the overwrite threshold;
  * the wait timeout;
  * all word widths and number formats (Q8 Kp, Q40 drift, Q32 phase, µHz);
  * the clamps on γ and on the integrator;
  * restarting the drift window on an overwrite;
  * the 50 % subPPS duty cycle;
  * the handshake signals to the node, ADC and estimator.
* **Drift window.** It counts M intervals rather than M − 1, as explained
  above.
* **Error resolution.** The PI error is taken in whole nanoseconds. The
  femtosecond residue of the PMU clock is not included.
* **PI dynamics.** Kp is small (a 10 ms averaging time), while the integrator
  moves only 1 fs every 20 µs. The loop therefore absorbs a frequency offset
  slowly and overshoots on the way. The largest |T_PMU − UTC| seen after the
  WR frequency offset flips sign:

  | offset change | largest error |
  |---------------|---------------|
  | +2 → −3 ppm   | 4 ns          |
  | ±10 ppm       | 63 ns         |
  | ±20 ppm       | 181 ns        |
  | ±50 ppm       | 636 ns        |

  The ±50 ppm case is `tb_wr_pmu_large_offset`. Every case stays below the
  1 µs overwrite threshold. A clean timing reference therefore needs an FPGA
  oscillator within a few ppm of nominal, or larger PI gains (`PI_AVG_NS`).
* **Not included.** The following are outside this core, and only their
  interfaces are provided:
  * the WR node, the WR switch network and the GPS/NTP reference;
  * the voltage and current converters;
  * the synchrophasor estimator.
