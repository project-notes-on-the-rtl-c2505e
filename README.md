# FEA slave readout: half-sampled waveform readout of elefant front-end chips

A slave FPGA on an FEA front-end board sits between six *elefant* front-end
chips and an external FIFO that a master board drains. When a readout is
requested, the slave visits each chip in turn. It reads the chip's 8-bit
hitmap, which marks the channels that were hit. For a chip with at least one
hit it copies four header words from the chip's SRAM2. Then, for every hit
channel, it reads the 32-sample waveform from the chip's RO_RAM. Waveforms are
*half sampled*: of each pair of samples only one is written to the FIFO, so a
channel gives 16 words.

The slave runs on a 60 MHz `sysclk`. The chips run on a 15 MHz `clk15` derived
from it, with a phase that wanders by several nanoseconds. Most of the design
is about meeting the chips' timing from the faster clock. Every control is
registered and changes once per clk15 period, 1.5 sysclk before the clk15
edge that latches it. Every returned word is sampled at a fixed point 1.5
sysclk after the chips change it.

This RTL follows the phase structure, sizes and timing budget of the original
FEA slave firmware. Where that firmware's details were not available (signal
encodings, counter widths, how some signals are generated), the choices are
this design's own. Those choices are listed in
[Interpretations and departures](#interpretations-and-departures).

## Clocking: one clock, two enables

Everything is clocked by `sysclk`. `enable_gen` locks two one-cycle enables to
clk15, which comes in on the `sync` input:

* `en`: the phase enable. It is high in one sysclk cycle in four. The state
  machine advances, and all chip controls change, on the edge that ends this
  cycle. Call that edge E.
* `en_latch`: high in the cycle after `en`. The edge at E+1 sysclk samples
  `ele_dat`.

`sync` is registered twice. Its rising edge reloads a 4-bit one-hot ring,
synchronously. A synchronous reload matters: clearing the ring asynchronously
from `sync` gives a two-cycle-wide enable. The enable is also forced low in
the cycle after an enable. If clk15 jumps by a cycle, one period then becomes
shorter or longer, but the state machine never steps twice.

With clk15 rising half a sysclk after a sysclk edge, each edge E falls 1.5
sysclk (25 ns) before the clk15 rising edge on which the chips latch the
controls. `enable_gen` produces two identical copies of `en`, so that no single
net fans out to the whole state machine.

## The readout phases

`readout_fsm` spends one clk15 period (4 sysclk) in each phase. Controls for a
phase are set at its start. A word the chips return in answer is sampled one
period later, on `en_latch`.

| phase | controls driven | what happens |
|---|---|---|
| IDLE | none | wait for the request flip-flop (`myrs`, set by `rd_event`) |
| 1 | chip selects on | clear the request, chip counter `ele_num` := 0 |
| 2 | `ch_sel` (hitmap request) | the chip serves its hitmap on `ele_dat` |
| 2a | none | `hitmap_unit` latches the hitmap, or an empty one if `eleoff_in` marks the chip off |
| 2b | none | delay while the hitmap test settles (`more_channel`, `ch_num`). If no channel was hit, go to 10 |
| 3, 4, 5, 6 | `sramenb`, `ch_sel_num` = 0, 1, 2, 3 | SRAM2 header words (elefant address, tag bits, sysclk count, trigger tag). Each one is written to the FIFO in the next period |
| 7 | `data_start`, `ch_sel_num` = channel | point the chip at sample 0 of the channel |
| 8d | `data_inc` | first increment. Covers the two-period RO_RAM latency |
| 8 (×31) | `data_inc`, except in the last | sample *k* is latched in the *k*-th period (k = 0…30) |
| 9a | `data_inc` | latch sample 31. The 32nd increment wraps the chip's pointer back to sample 0 |
| 9 | none | `next` clears the channel just read. More hits: go to 7. Otherwise go to 10 |
| 10 | none | `ele_num` steps to the next chip and go to 2. After the last chip, go to 11 |
| 11 | chip selects off | `ro_done` pulse, `buf_wr` advances, return to IDLE |

### Timing of each phase

The three timing rules that fix the schedule are in the model
`tb/elefant_model.sv`:

* A `data_start` latched on clk15 rising edge *n* shows sample 0 from edge
  *n*+1.
* A `data_inc` latched on rising edge *n* shows the next sample from the
  *falling* edge of the following period.
* The slave samples 1.5 sysclk after that falling edge.

So the sample requested in phase *p* is sampled in phase *p*+2. The schedule
uses 1 `data_start` and 32 `data_inc` per channel: 31 to step through samples
1 to 31, and one more to return to sample 0. The table above gives the 35
periods per channel.

The hitmap request has a pitfall. As soon as the request is asserted, the chip
drives its *previous* hitmap. The real one arrives only with the clk15 edge
that latches the request. Sampling in phase 2a, one period later, always gets
the real one. The testbench's chip model drives the stale hitmap early to
prove this.

### Readout length

One readout takes

    periods = 2 + Σ over chips [ 4 + (hits > 0 ? 4 + 35·hits : 0) ]

clk15 periods (at 15 MHz, 66.7 ns each). All 48 channels hit gives 1730
periods (115 µs) and 792 FIFO words. A chip with no hit, or one switched off,
costs 4 periods.

## Half sampling

`half_sampler` applies this rule to samples 0…31, which bit 7 of each sample
flags as a TDC hit or not:

* even sample: keep it if it is a TDC hit, and remember that it was;
* odd sample: keep it only if the even sample before it was *not* a TDC hit.

Each pair therefore gives exactly one word: the even sample when it carries a
TDC hit, otherwise the odd sample. Half sampling halves the FIFO write rate.
That is why the chips are read at 15 MHz rather than 7.5 MHz. At 7.5 MHz the
FIFO would fill at only 3.75 MHz, and a master reading faster than that would
catch up with the slave and find the FIFO empty mid-event. At 15 MHz the
channel phase writes at 7.5 MHz, and the average over a channel is
16/35 × 15 MHz ≈ 6.9 MHz.

## FIFO write port

`fifo_out` registers every word into `fifo_dat` and raises `fifo_wr` on the
same edge, for 2 sysclk (33 ns). The external FIFO needs at least 25 ns.
`fifo_dat` then holds until the next write, at least 4 sysclk later. So the
data is stable 33 ns before the strobe's trailing edge (the FIFO needs 9 ns)
and 33 ns after it. `fifo_wr` is active high here. The FIFO model takes the
word on the falling edge.

## Timing budget

| path | budget | how this RTL meets it |
|---|---|---|
| `data_start`, `data_inc`, `sramenb`, `ch_sel`, `ch_sel_num` to the chip | 24 ns clock-to-pad | registered at E, latched by the chips at E + 1.5 sysclk = 25 ns |
| `chip_sel` | 48 ns clock-to-pad | `ele_num` steps in phase 10, `chip_sel` is registered one cycle later and latched at phase 2's clk15 edge: 58 ns of slack |
| `ele_dat` to `en_latch` | 24 ns pad-to-setup | sampled 1.5 sysclk after the clk15 falling edge |
| `fifo_wr` width, `fifo_dat` setup | ≥ 25 ns, 9 ns | 33 ns, 33 ns |
| hitmap → `more_channel` / `ch_num` | one clk15 period | registered. Phases 2b and 9 give it a whole period |

The long paths were handled in the original FPGA flow with timing-ignore
constraints (`dis_ele`, `hitmap`). Here they are short registered paths with a
whole phase to settle, so no such constraints are needed. Constraint files for
a particular FPGA are not part of this RTL.

## Modules

| file | role |
|---|---|
| `rtl/fea_pkg.sv` | sizes (6 chips, 8 channels, 32 samples, 8-bit data, 4 sysclk per clk15) and the `phase_t` enum |
| `rtl/fea_slave.sv` | top level. Wires the blocks below |
| `rtl/enable_gen.sv` | `en` / `en_latch` from `sync` |
| `rtl/edge_sync.sv` | two-flop synchroniser plus rising-edge pulse for `rd_event`, `ll_accept` |
| `rtl/myrs.sv` | set-dominant request flip-flop |
| `rtl/readout_fsm.sv` | phase sequencer, chip controls, sampling strobes |
| `rtl/cascaded_counter.sv` | counter built from 4-bit stages (the sample counter) |
| `rtl/hitmap_unit.sv` | hitmap register, priority encoder (`ch_num`), `more_channel`, `next` |
| `rtl/ele_select.sv` | chip counter, one-hot `chip_sel`, `dis_ele`, `last_ele` |
| `rtl/half_sampler.sv` | the half-sampling rule |
| `rtl/fifo_out.sv` | `fifo_dat` register and 2-cycle `fifo_wr` |
| `rtl/buf_counters.sv` | `buf_rd` (counts `ll_accept`), `buf_wr` (counts readouts), cleared by `clrout`. They change only on `en`, like the other chip controls |

The top level also brings out `phase`, `ele_num` and `hitmap` for monitoring.
After power-on, or after all front-end boards are reset, pulse `clrout`.
Glitches on `ll_accept` during power-up can advance `buf_rd`.

## Interpretations and departures

These follow the original design:

* the phase list and what each phase does;
* 6 chips, 8 channels and 32 samples;
* 60/15 MHz clocking with the synchronously cleared enable;
* duplicated enables;
* registered `fifo_dat` with a 2-cycle strobe and a 4-cycle hold;
* the half-sampling rule;
* the 1 + 31 + 1 `data_start`/`data_inc` count;
* counters split into 4-bit stages.

These are this design's own choices:

* **Sample encoding**: 8-bit samples with the TDC hit flag in bit 7. The
  original only says whether a sample "is a TDC hit".
* **Header words**: read as SRAM2 addresses 0–3 on `ch_sel_num` in phases 3–6.
* **Empty hitmaps**: a chip whose hitmap is empty (or that is switched off)
  writes no header and is skipped from phase 2b to phase 10.
* **Channel order**: lowest channel number first. `next` clears that channel's
  hitmap bit at the start of phase 9.
* **Sampling point**: the exact period in which each sample is latched comes
  from the chip latencies in the model above. Real chips with different
  latencies need the `data_inc` schedule in `readout_fsm` adjusted.
* **`ch_sel`** is used only as the hitmap request.
* **Chip selects** are one-hot, active high, and off outside a readout.
* **`rd_event`**: the original clocks a flip-flop directly with `rd_event`.
  Here it is synchronised and edge-detected, which keeps a single clock
  domain. `ll_accept` is treated the same way.
* **Buffer counters**: `buf_rd` and `buf_wr` are 2 bits wide. `buf_wr`
  advancing once per readout is an assumption. Pulses that arrive between two
  phase enables are held and applied on the next `en`.
* **Left out**: signals without a function in the original (`cmd_ph1`,
  `ele_datb`). The board- and vendor-level items are also left out: global
  clock buffers, fast-slew output pins, pull-ups on `eledatb`/`locksum`, and
  PROM configuration.
* **Tested only in simulation**: the chips and the FIFO exist only as
  behavioural models in `tb/`. The design was checked in simulation against
  those models, not against hardware.

## Simulating

Each `tb/tb_<module>.sv` is a self-checking testbench. It prints
`TB_RESULT checks=N failures=M` and stops. `tb_fea_slave` runs the whole design
at its default sizes. It runs 7 readouts:

* random hitmaps;
* chips switched off;
* a request that arrives during a readout;
* a readout with every channel hit.

The chips and the FIFO are models: `tb/elefant_model.sv` and
`tb/fifo_model.sv`, with test data from `tb/elefant_tb_pkg.sv`. clk15 wanders
between −8 ns and +4 ns of its nominal phase. The testbench compares the FIFO
word stream and the readout length with values it computes itself. It also
checks the chips' setup window, the FIFO strobe width and setup, and the
buffer counters.

```sh
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb \
  -y rtl -y tb +libext+.sv rtl/fea_pkg.sv tb/elefant_tb_pkg.sv \
  tb/tb_fea_slave.sv --top-module tb_fea_slave -o sim
./obj_dir/sim
```

For the unit testbenches, replace `tb_fea_slave` with the testbench's name. The
RTL has assertions for the enable width, the FIFO hold time and the
`data_start`/`data_inc` exclusion. `--assert` turns them on.
