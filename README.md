# Eight-channel multi-stop time-to-digital converter for LIDAR

A multi-stop LIDAR fires a laser pulse (START) and then registers every
photon a detector sees (STOPs), reflections and noise alike. The
time-of-flight distribution shows up once many STOP-minus-START times are
put into a histogram. This RTL gives the FPGA part of such an instrument:

* eight timing channels. Each is a flash TDC with a 512-stage tapped delay
  line and its own on-chip calibration. Each channel time-tags its input
  with a 1.95 ps LSB and an average bin of about 21.5 ps;
* one 28-bit coarse counter on the 125 MHz system clock, shared by all
  channels, so every tag lies on the same 2.147 s time axis;
* a tag correlator. It takes channel 0 as the START channel, keeps the
  latest START, and turns every STOP on channels 1 to 7 into a delta time;
* a result FIFO from which a host link, for example USB 3.0, reads the deltas.

Each channel takes one hit per 8 ns clock period, so the dead time is 8 ns.
Between two STARTs any number of STOPs can be measured, up to the
2.147 s range.

## Time format

| field | bits | meaning |
|---|---|---|
| channel | 47:40 | zero-based channel index (0 = START) |
| coarse | 39:12 | clock periods of 8 ns |
| fine | 11:0 | fraction of a period, LSB = 8 ns / 4096 = 1.953 ps |

Bits 39:0 together form one 40-bit time in 1.953 ps units. It is *not* the
coarse count with a fine field pasted beside it. A hit is sampled on a clock
edge, and the fine value says how long before that edge it arrived, so

    time = coarse_of_sampling_edge * 4096 - fine        (modulo 2^40)

A result word (`result_t`) has the same layout: the STOP channel, then
`delta = T_STOP - T_START` in the same units. To convert to picoseconds,
multiply by 8000/4096.

## Inside one channel

```
hit_in --mux--> tdc_delay_line --taps[511:0]--> sample reg --> tdc_priority_encoder
          ^                                     (every edge)     9-bit raw code
    cal_trigger (until calibrated)                                    |
                                                   tdc_calibration: histogram / LUT
                                                                      | 12-bit fine
                        coarse_counter ---------------------> tdc_tag_former --> tag
```

**Delay line.** In the FPGA the line is a carry chain of Carry4 primitives.
It cannot be written as portable RTL, so `tdc_delay_line` is a simulation
model. Three elements of every four are fast (17 ps). The fourth leaves the
slice through general routing and is slow (35 ps). That gives an average of
21.5 ps, so one 8 ns period covers about 372 of the 512 taps, and the bins
are uneven in a regular pattern. Each edge of the input walks along the
line on its own, so a falling edge can follow a rising edge closely.

**Sampling and hit detection.** All 512 taps are registered on every rising
edge. Tap 0 high at a sampling edge means the input is high. The encoder
looks for the first zero above tap 0; the length of that leading run tells
how long ago the most recent rising edge entered the line. A new hit is
counted when either

* tap 0 was low at the edge before, or
* tap 0 was high at the edge before as well, but the leading run is shorter
  than one clock period of line. The calibration records the largest code
  it saw (`max_code`), which is the length of line one period fills. A
  shorter run can only come from an edge that arrived after the previous
  sampling edge, so the input must have gone low and high again in between.

With this rule a channel takes back-to-back hits, one per clock period. A
pulse must be high across at least one sampling edge, and the low gap
between two pulses only has to be long enough for the line to carry it
(about 100 ps in the model). A run that ends past `max_code` is treated as
the same pulse still being high. Ones left in the line by the previous
pulse do not disturb the code, because only the leading run counts. A
longer run means the hit came earlier before the sampling edge.

**Pipeline.** A hit sampled at edge k leaves the channel as a tag three
edges later:

* k+1: the code is registered, with the coarse count of edge k;
* k+2: the look-up RAM returns the fine time;
* k+3: the tag register holds the tag.

The channel accepts one hit per clock.

## Calibration (code-density test)

The hardest part of a carry-chain TDC is that tap *i* does not stand for
*i* times 21.5 ps. `tdc_calibration` measures the real bin widths on chip.
While a channel is not calibrated, the top feeds `cal_trigger` into its
delay line instead of `hit_in`. This must be a pulse train that is
uncorrelated with `clk`. Its hits land at random phases, so each bin
collects hits in proportion to its width. The block then runs four phases:

| phase | cycles | what happens |
|---|---|---|
| CLEAR | 512 | writes zero to every bin of the histogram RAM |
| COLLECT | until 2^CAL_LOG2 hits | histogram[code] += 1. This is a read-modify-write with forwarding, so one code per cycle is accepted, repeats included |
| SUM | 513 | walks bins 0 to 511 and keeps a running total N_cum(i). Writes `fine[i] = min(4095, 4096 * N_cum(i) / 2^CAL_LOG2)` to the look-up RAM |
| RUN | — | `fine = LUT[code]`, one cycle after the code |

N_cum(i) includes bin i itself. The fine value is therefore the upper edge
of the bin's time interval, which matches the convention that the fine time
is counted back from the sampling edge. The total count is a power of two,
so the division is a shift. During COLLECT the block also keeps the
largest code it has seen and outputs it as `max_code`; the channel uses it
for back-to-back hit detection. Calibration runs after reset, and again when
`cal_start` pulses, for example after a temperature change.

When calibration ends, the line is switched over to the channel input. For
the first three cycles after that the channel ignores hits, because edges
of the calibration source may still be in the line.

The statistical error of a calibrated bin edge is about
8 ns · sqrt(0.25 / 2^CAL_LOG2):

* 16 ps at the default of 2^16 hits;
* 62 ps at 2^12 hits.

A shared cal_trigger reaches all eight lines, so all channels calibrate in
the same number of cycles. With a 20.9 ns trigger period that is about
172,600 cycles (1.4 ms) at the defaults.

## Serialising and correlating

**`tag_serialiser`.** Up to eight tags can appear in one clock cycle. The
serialiser stores each such cycle as one *batch* (a valid mask and all the
tags) in a 16-deep FIFO. It hands out the tags of the oldest batch one per
cycle over a valid/ready port, lowest channel first. Two things follow:

* tags from later clock periods never overtake earlier ones;
* a START is always handled before STOPs sampled in the same 8 ns period.

A batch that finds the FIFO full is dropped, and `tags_dropped` counts the
lost tags.

**`tag_correlator`** has five stages, each one clock long:

* `INIT` lasts until all channels are calibrated. Tags are taken and
  discarded, and nothing is written out.
* `IDLE` takes a tag and looks at its channel.
* `SET` handles a START: the tag replaces the reference. The stage takes 2 cycles per START.
* `CALC` handles a STOP: `delta = T_STOP - T_START`. If the STOP time is
  numerically smaller, the coarse counter has wrapped in between, and 2^40 is
  added. `wrap_fixed` pulses when this happens.
* `SEND` writes `{channel, delta}` to the result FIFO. It waits while the
  FIFO is full. A STOP takes 3 cycles in total.

A STOP that arrives before any START has nothing to be measured against. It
is dropped, and `stop_orphan` pulses. A recalibration sends the controller
back to `INIT` and clears the reference.

The correlator needs 3 cycles per STOP, but channels can produce 8 tags per
cycle. The batch FIFO absorbs bursts. Sustained STOP rates above one per
24 ns over all channels lose tags at the serialiser, and `tags_dropped`
reports this.

## Top-level interface (`lidar_tdc_top`)

| port | dir | width | use |
|---|---|---|---|
| `clk` | in | 1 | 125 MHz system clock |
| `rst_n` | in | 1 | asynchronous, active low; starts a calibration |
| `hit_in` | in | N_CHANNELS | asynchronous detector inputs; bit 0 = START |
| `cal_trigger` | in | 1 | calibration pulses, uncorrelated with `clk` |
| `cal_start` | in | 1 | one-cycle pulse: calibrate again |
| `cal_done` | out | 1 | every channel is calibrated |
| `fifo_rd_en` | in | 1 | take the oldest result |
| `fifo_dout` | out | 48 | oldest result, shown before it is read (first-word fall-through) |
| `fifo_empty`, `fifo_count` | out | 1, 11 | FIFO state |
| `tags_dropped` | out | 32 | tags lost at the serialiser |
| `corr_state` | out | 3 | correlator stage |
| `wrap_fixed`, `stop_orphan` | out | 1 | event pulses |

| parameter | default | note |
|---|---|---|
| `N_CHANNELS` | 8 | published channel count; the 8-bit channel field allows more |
| `N_TAPS` | 512 | delay-line length, gives 9-bit codes |
| `CAL_LOG2` | 16 | calibration hits per channel = 2^CAL_LOG2 |
| `BATCH_DEPTH` | 16 | serialiser FIFO depth (power of two) |
| `OUT_DEPTH` | 1024 | result FIFO depth (power of two) |
| `REF_CHANNEL` | 0 | START channel |
| `COARSE_RESET` | 0 | coarse counter value after reset (test aid) |

The delay lines are instantiated inside the top, so the top as written is
for simulation. For an FPGA build, replace `tdc_delay_line` with a carry
chain of the target device that has the same ports. Every other module is
synthesizable RTL: the memories are plain arrays that map onto block RAM,
and the assertions cover the FIFO and valid/ready rules.

## Where this RTL follows the architecture and where it chooses

These follow the published architecture:

* eight channels of 512 taps, a 125 MHz clock and a 28-bit coarse counter;
* the 9-bit raw code, the 12-bit fine time and the 48-bit tag;
* code-density calibration with a histogram, a cumulative sum and a
  block-RAM look-up table, run at start-up;
* a START reference channel, and a correlator with the five stages and the
  STOP − START subtraction with wrap handling;
* a FIFO towards the host.

These are this design's own choices:

* the number of calibration hits, and the fact that it is a power of two;
* the rule for detecting a hit (including the back-to-back rule based on
  `max_code`) and the minimum pulse widths;
* an encoder that searches for the first zero;
* the batch serialiser and the START-first order inside a clock period;
* one cycle per correlator stage;
* the result word format;
* dropping STOPs that come before any START;
* the three-cycle blanking after calibration;
* buffer depths, reset style and `COARSE_RESET`.

The following are not modelled:

* clock generation (the 125 MHz clock is an input);
* the USB 3.0 / host interface (the FIFO read port is brought out instead);
* a metastability stage after the tap register;
* any multi-hit-per-period encoder.

A STOP that arrives earlier than a START inside the same 8 ns period is
handled after that START, and it gives a wrapped (very large) delta.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_coarse_counter` | counting and wrap at 2^28 against a reference count |
| `tb_tdc_delay_line` | arrival time of the edge at each tap (±1 ps), about 372 taps per 8 ns, falling edges |
| `tb_tdc_priority_encoder` | every code 0 to 511 with random leftovers above the run; all-ones and empty line |
| `tb_tdc_calibration` | look-up values against a testbench histogram and cumulative sum, one-cycle latency, forwarding of repeated codes, CLEAR length, recalibration |
| `tb_tdc_tag_former` | `coarse*4096 - fine` modulo 2^40, channel id, latency |
| `tb_tdc_channel` | delay line and channel: no tags before calibration; 200 spaced hits and 100 back-to-back hits (one per clock period) at known times, each within 40 ps and exactly 3 edges after sampling |
| `tb_sync_fifo` | against a queue model, including full and empty |
| `tb_tag_serialiser` | order and completeness under random back-pressure; exact dropped count on overflow |
| `tb_tag_correlator` | deltas against a model, wrap, orphan STOP, FIFO-full stall, stage sequence and latency, INIT and recalibration |
| `tb_lidar_tdc_top` | end to end with a short calibration. Exercises and counts calibration, INIT, multi-stop runs, a run across the coarse-counter wrap, result-FIFO back-pressure, serialiser overflow (all eight channels hit every 8.4 ns), back-to-back hits on one channel and recalibration. Deltas must be within 50 ps |
| `tb_lidar_tdc_workloads` | 5, 43 and 120 STOPs per START at the STOP and START rates of the reference experiments, plus a jitter run with one trigger on two channels (1000 pulses). Deltas must be within 50 ps (observed ≤ 23 ps) |
| `tb_lidar_tdc_full` | all parameters at their defaults: a 2^16-hit calibration (its cycle count is checked), then two START periods of 5 STOPs. Deltas must be within 40 ps (observed ≤ 18 ps) |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/lidar_tdc_pkg.sv tb/tb_lidar_tdc_top.sv --top-module tb_lidar_tdc_top
    ./obj_dir/Vtb_lidar_tdc_top

Run times:

* the unit testbenches take well under a second;
* the top and workload testbenches take about 6 s each;
* the full-size testbench takes about a minute.

All files use `` `timescale 1ps/1ps ``.

In simulation, the calibration source is a pulse train with a period of
20,943 ps. Its phase against the clock moves on by 4,943 ps each pulse, so
the phases spread evenly over the period. This stands in for a truly
uncorrelated oscillator. Because of it the measured accuracy reflects the
bin structure, not counting noise. A real random source at 2^16 hits adds
the roughly 16 ps of statistical error given above.

## Files

* `rtl/lidar_tdc_pkg.sv`: widths, `tag_t`, `result_t`, state enums
* `rtl/coarse_counter.sv`, `rtl/tdc_delay_line.sv` (simulation model), `rtl/tdc_priority_encoder.sv`
* `rtl/sdp_ram.sv` (block-RAM-style memory), `rtl/tdc_calibration.sv`, `rtl/tdc_tag_former.sv`, `rtl/tdc_channel.sv`
* `rtl/sync_fifo.sv`, `rtl/tag_serialiser.sv`, `rtl/tag_correlator.sv`, `rtl/lidar_tdc_top.sv`
* `tb/`: the testbenches listed above
