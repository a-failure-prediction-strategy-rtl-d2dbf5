# Aging failure prediction for an SoC: in-field delay measurement with adaptive test scheduling

Transistor aging (NBTI, HCI, TDDB, electromigration) slowly lengthens path delays, and some
mechanisms end in a sudden jump or an outright failure. A system that may not be interrupted,
such as a car controller, can still test itself while it is idle, at power-on and power-off.
This design uses those windows to predict failures before they happen. It does three things:

1. **Measures delay, not just pass/fail.** Each part under test (a core, or a group of paths in
   one) has a test pattern set (TPS). The TPS is applied with a launch-to-capture period (LCP)
   that can be set in steps. The controller searches for the shortest LCP at which the part
   still passes. As the part ages, that minimum LCP grows.
2. **Removes the effect of the environment.** Delay also depends on supply voltage and
   temperature, which cannot be controlled in the field. Ring-oscillator sensors measure both
   during each test. A per-core lookup table converts the measured minimum LCP into the delay
   the part would have at typical conditions. Only that converted delay is logged and compared
   over time.
3. **Tests the parts that age fastest most often.** A round-robin scheduling table serves every
   TPS. A TPS whose delay grows moves into one of several danger list tables. Each table is
   served more often the higher its danger level.

Everything in `rtl/` is synthesizable SystemVerilog except `ring_osc`, a behavioural model of
the analog sensor oscillator.

## Architecture

```
                    pwr_window, configuration              errors, session results
                               |                                   ^
                 +-------------v-----------------------------------+-------------+
                 | soc_test_ctrl                                                  |
                 |  sched_table  tps_info_table  danger_list_tables  log_memory    |
                 |  vt_translator (measured -> typical)   aging_analyzer          |
                 +------+-------------------------------+--------------------------+
                        | command / report              | ... one pair per core
                 +------v----------------------+  +-----v------------------+
                 | core_test_ctrl  (core 0)    |  | core_test_ctrl (core N) |
                 |  test_clock_gen             |  |                          |
                 |  ro_sensor x2 (V, T)        |  |                          |
                 |  vt_translator (typical ->  |  |                          |
                 |  measured, this core only)  |  |                          |
                 +--+----------+-----------+---+  +--------------------------+
                    |          |           |
        core scan logic   core_clk,    ring oscillators
        (cut_* ports)     launch/capture   (ro_v, ro_t ports)
```

`aging_test_top` holds one `soc_test_ctrl` and `NUM_CORES` instances of `core_test_ctrl`. The
following parts are outside the RTL and are reached through ports of the top:

* each core's scan chains, pattern source (ROM or NVM), decompressor and compactor;
* the test access mechanism that moves patterns;
* the ring oscillators themselves.

All logic runs on one clock, `clk`. Its period is the finest launch timing step the SoC can
produce, and every LCP is counted in periods of `clk`, called *ticks*.

## One test session (core_test_ctrl)

A session tests one TPS. The SoC test controller sends a command to the core's controller with
these fields:

* the TPS number;
* its LCP_max level;
* its test strategy TS;
* the newest logged delay of the TPS at typical conditions, if there is one.

While the session runs, the core is in aging test: `test_en` is high, and `core_clk` carries
only launch/capture pulses. The LCP of level `L` is `LCP_MIN_TICKS + L * LCP_STEP_TICKS`
ticks, for `L` from 0 to 15.

| step | what happens |
|------|--------------|
| 1 | Apply the TPS at LCP_max and measure V and T. A fail is a *sudden delay increase*: report `RES_FAIL` and stop. With TS = 0 a pass ends the session (`RES_MAX_PASS`). |
| 3 | Predict the starting level. The logged typical delay is scaled by this core's "typical -> measured" factor for the V/T bin just measured, and rounded up to a level. Pflag and Fflag are cleared. If there is no log entry, or the prediction is at or above LCP_max, the search continues down from the LCP_max pass already seen. |
| 4 | Apply the TPS at the current level and measure V and T. |
| 5, 6 | On a pass: after an earlier fail (Fflag), this level is the minimum. Otherwise set Pflag and go one level down. At level 0 the minimum is level 0. |
| 7, 8 | On a fail: after an earlier pass (Pflag), the level above is the minimum. Otherwise set Fflag and go one level up. A fail at LCP_max here counts as a sudden fail. |
| 9 | Report `RES_MIN_FOUND` with the minimum level, the V and T codes of the last application, and the number of applications. |

If the prediction is right, a session costs three applications: LCP_max, the predicted level
(pass), and one level lower (fail). The testbenches check this count.

**One application.** The controller pulses `cut_start` with `cut_tps` and starts both sensors.
The core scan logic shifts in a pattern and pulses `cut_lc_req`. `test_clock_gen` then gives
one `launch` strobe and, exactly LCP ticks later, one `capture` strobe. This repeats for each
pattern. At the end the scan logic returns `cut_done` with `cut_pass`, the AND over all
patterns. The application ends when `cut_done` and both sensor readings have arrived.

**Sensors.** `ro_sensor` passes the oscillator output through a two-flop synchroniser. It
then counts rising edges over `SENSOR_WINDOW` clock cycles. The oscillator must run below half
the `clk` frequency. The code is the edge count, which saturates at 255. Its top two bits are
the V or T *bin* used by the translation tables.

## Translation to typical conditions (vt_translator)

A table entry is one 8-bit factor per (core, V bin, T bin), with 6 fraction bits: 64 means 1.0.
The translation is `out = min(255, (in * factor + 32) >> 6)`. Two kinds of table exist:

* **measured -> typical**: one table in the SoC controller, indexed by core. It converts the
  reported minimum level, in ticks, into the delay that is logged.
* **typical -> measured**: one table per core controller. It predicts where the search should
  start.

Both tables read 1.0 after reset. They must be loaded from a characterisation of each core.
With 2-bit bins the correction is coarse: a real chip would choose the bin boundaries and
sensor window so that the bins split the operating range usefully. The top-level testbench
shows the intended use. The part's delay there is 1.00x, 1.20x or 1.44x its typical value,
depending on the environment, and the tables hold the inverse factors. The logged delay stays
within one tick of the true typical delay in every environment.

## Adaptive scheduling (soc_test_ctrl)

**Tables:**

* **TPS information table** (`tps_info_table`): one row per TPS, holding the core, LCP_max, TS
  and the danger flag DF.
* **Scheduling table** (`sched_table`): up to 128 rows of TPS numbers, served round robin. A
  TPS may appear in several rows so that it is tested more often. Rows whose TPS has DF = 1 are
  skipped; the search visits one row per cycle.
* **Danger list tables** (`danger_list_tables`): one FIFO per danger level, 1 to
  `NUM_LEVELS`. Each FIFO has a *period indicator*, a counter that goes up by one at every
  power window. Level `l` (counting from 1) is due every `BASE_PERIOD >> (l-1)` windows. With
  the defaults that is every 8, 4, 2 and 1 windows.
* **Log** (`log_memory`): the last 10 translated delays of every TPS, one byte each.

**Choosing the next TPS.** `pwr_window` first raises all period indicators. Then up to
`SESSIONS_PER_WINDOW` (10) sessions run. Each one takes the first available of:

1. the next TPS still owed by the danger list that was being served;
2. the head of the highest-level danger list whose period indicator is full. The indicator is
   cleared, and every TPS in that list at that moment will be served, in order, carrying over
   into later windows if needed;
3. the next scheduling-table TPS with DF = 0.

**After the report:**

* `RES_MIN_FOUND`: the level is turned into ticks, translated and logged. `aging_analyzer` then
  computes `shift = newest - oldest` over the log. The danger level is
  `min(NUM_LEVELS, shift / danger_step)`. If the translated delay is at or above `warn_point`,
  an `ERR_WARNING` is reported.
* `RES_FAIL`: an `ERR_SUDDEN` is reported. With TS = 1 the TPS goes to the highest level.
* `RES_MAX_PASS` (TS = 0): nothing is logged and the TPS stays where it is.

A TS = 1 TPS with a non-zero danger level is appended to that level's list and gets DF = 1.
This can promote it several levels at once, demote it, or keep it at the same level. At level
0, or when the target list is full, it returns to the scheduling table with DF = 0.

The danger level uses the growth of delay rather than the delay itself, because a part that
starts fast but ages quickly reaches its worst-case delay sooner than a slow part that ages
slowly. The NBTI model behind this is `d(t) = d(0) + S * t^0.16`. Two parts with the same
initial delay, one degrading 1.5 times faster, reach the limit after about 8 % of the other's
time. The shift is measured over the 10 logged values, so the level follows how fast a part is
aging now. A single bad reading raises the level once and is undone by the next good one.

## Top-level interface (aging_test_top)

* **Window control:** `pwr_window` (pulse), `busy`, `window_done`.
* **Configuration,** written while `busy` is low:
  * `info_*`: rows of the TPS information table;
  * `sched_*`: rows of the scheduling table, and `sched_len`, the number of rows in use;
  * `lut_*`: the measured -> typical factors, addressed `{core, v_bin, t_bin}`;
  * `inv_lut_*`: the typical -> measured factors of one core;
  * `danger_step` and `warn_point`: static settings.
* **Results:**
  * `err_valid`, with `err_kind` (`ERR_SUDDEN` or `ERR_WARNING`), `err_tps`, `err_core` and
    `err_delay`;
  * `sess_done` for each session, with `sess_tps`, `sess_from_level` (0 means the scheduling
    table), `sess_to_level`, `sess_status`, `sess_typ`, and the V and T codes
    `sess_v_code` and `sess_t_code`.
* **Per-core signals,** as arrays indexed by core:
  * `core_clk` and `test_en`;
  * `cut_start`, `cut_tps`, `cut_lc_req`, `cut_done` and `cut_pass`;
  * `launch` and `capture`;
  * `ro_v` and `ro_t` inputs;
  * `func_clk`, plus the shared `soc_test_clk` and `sys_mode`. These are what `core_clk`
    carries outside aging test.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `LCP_LEVELS` (package) | 16 | reference configuration |
| `LOG_DEPTH` | 10 delays of 1 byte per TPS | reference configuration |
| `SESSIONS_PER_WINDOW` | 10 | reference configuration (assumed minimum per window) |
| `NUM_CORES`, `NUM_TPS` | 32, 100 | the 32-core AMBA SoC (4 Leon3 and peripherals) split into 100 TPSs |
| `SCHED_DEPTH` | 128 | own choice (must be at least the number of TPSs) |
| `NUM_LEVELS`, `DLT_DEPTH`, `BASE_PERIOD` | 4, 16, 8 | own choice |
| `LCP_MIN_TICKS`, `LCP_STEP_TICKS` | 8, 1 | own choice (set by the SoC's clock resolution) |
| `SENSOR_WINDOW` | 256 cycles | own choice |
| translation format | 8-bit factor, 6 fraction bits, 2-bit V and T bins | own choice |

**Capacity.** The default build has 32 core controllers and room for 100 TPSs. It holds the
AMBA SoC configuration, and each of the ITC'02 SoCs with up to 32 cores and 79 TPSs. `a586710`
is the exception: its 1184 TPSs need `NUM_TPS` and `SCHED_DEPTH` of at least 1184. The log
size per TPS is fixed by `LOG_DEPTH` and the byte width. In this RTL the tables and the log
are flip-flop arrays. A product would put the log, and possibly the tables, in non-volatile
memory.

## What is this design's own, and known limits

The method fixes the session flow with its two flags, the V/T translation, the log, the
warning point, the tables with their flags and priorities, and the rule that a danger level
served more often has a shorter period. The following are choices made here:

* The danger level rule (log shift against multiples of `danger_step`).
* The handling of a sudden fail: the TPS goes to the top level.
* A full danger list sends the TPS back to the scheduling table.
* A period indicator is cleared when its list starts being served.
* Without a log entry, the search starts from the LCP_max result.
* The command/report handshake and the single clock.
* The form of the translation tables.

Not included:

* the scan, compression and pattern delivery of the cores;
* a state-saving shadow chain;
* storing the V and T codes in the log: the log keeps one byte of translated delay per entry.
  The codes of each session appear on `sess_v_code` and `sess_t_code`, where a system can
  record them next to the log;
* sharing one core controller among identical cores;
* any use of external memory when the log does not fit.

The clock multiplexer in `test_clock_gen` is a plain combinational one. Change `sys_mode` only
while the core is idle, or replace the multiplexer with a glitch-free cell.

## Simulation

Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
`tb_aging_test_top` runs the whole design at its default size. It has 32 cores, each with
`put_model`, a part-under-test model with a path delay, and two `ring_osc` models. It runs 40
power windows of 10 sessions in three environments, while some parts age, and it checks every
session. It also requires each mechanism to occur at least once:

* each selection priority, including service carried over to the next window;
* moves into the danger lists and back;
* searches that go up and searches that go down;
* sudden fails, warnings and TS = 0 sessions.

It runs in well under a minute.

`tb_itc02_workloads` runs the same default-size design with the core and TPS counts of three
ITC'02 benchmark SoCs, with a reset between them:

* t512505: 31 cores, 79 TPSs;
* p93791: 32 cores, 29 TPSs;
* d695: 10 cores, 10 TPSs.

It checks that only the workload's TPSs and cores are used and that every TPS gets tested. It
checks that aged TPSs, and only those, enter the danger lists. For d695 it also checks that a
window with no danger-list service tests every TPS in the scheduling table.

The danger list and scheduling behaviour is checked
cycle-exactly against a reference model in `tb_soc_test_ctrl`.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aging_test_top \
    rtl/aging_pkg.sv tb/tb_aging_test_top.sv -y rtl -y tb
./obj_dir/Vtb_aging_test_top
```

Replace the top module and file name for the others: `tb_itc02_workloads`, `tb_soc_test_ctrl`, `tb_core_test_ctrl`,
`tb_test_clock_gen`, `tb_ro_sensor`, `tb_ring_osc`, `tb_vt_translator`, `tb_log_memory`,
`tb_tps_info_table`, `tb_sched_table`, `tb_danger_list_tables` and `tb_aging_analyzer`.
`put_model` is a testbench helper.

## Files

* `rtl/aging_pkg.sv`: shared constants, the report record, result, error and clock-mode enums.
* `rtl/aging_test_top.sv`: the top level.
* `rtl/soc_test_ctrl.sv`, `rtl/sched_table.sv`, `rtl/tps_info_table.sv`,
  `rtl/danger_list_tables.sv`, `rtl/log_memory.sv`, `rtl/aging_analyzer.sv`: the SoC side.
* `rtl/core_test_ctrl.sv`, `rtl/test_clock_gen.sv`, `rtl/ro_sensor.sv`: the core side.
* `rtl/vt_translator.sv`: used on both sides.
* `rtl/ring_osc.sv`: behavioural sensor oscillator, for simulation only.
