# Tapped-delay-line TDC with coarse counter and histogram storage

This is a time-to-digital converter (TDC) for an FPGA. It measures the time between a
rising edge on `start` and a rising edge on `stop`. The resolution is one carry-chain tap,
a few picoseconds. The range is set by a 16-bit counter running at 400 MHz, about 164 µs.
Each result is a 32-bit number of picoseconds. It is streamed out and also added to a
histogram in block RAM, so a long run needs no more memory than a short one.

The idea is interpolation. A synchronous counter can only tell time to one clock period
(2.5 ns). Each signal therefore also runs down its own chain of fast carry-logic
elements. All taps of both chains are sampled on every clock edge. At the first clock
edge after a signal rises, the sample shows how far the edge has travelled, which is the
time between the signal and that clock edge.

## The measurement: T = T1 + T2 − T3

```
clk    _|‾‾|__|‾‾|__|‾‾|__|‾‾|__|‾‾|__
start  ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
stop   ____________________/‾‾‾‾‾‾‾‾‾‾
          |T1|     T2 = N·2500   |
                              |T3|
          Ea                     Eb
```

* **T1.** `start` rises, and the first clock edge that sees it is Ea. The start line's
  sample at Ea has `k1` ones, and T1 is `k1` tap delays: the time from start to Ea.
* **T2.** The coarse counter counts the clock edges from Ea to Eb, where Eb is the first
  edge that sees `stop`. With N = Eb − Ea, T2 = N × 2500 ps.
* **T3.** The stop line's sample at Eb has `k3` ones, and T3 is the time from stop to Eb.

The interval is then T = T1 + N·2500 − T3. A line only has to cover one clock period, so
it must be longer than 2.5 ns. At the nominal 6.4 ps per tap, 464 taps cover 2.97 ns. At
most 391 taps are ever used, which leaves a margin for slower taps.

If start and stop fall in the same clock period, then Ea = Eb, N = 0 and T = T1 − T3. A
signal that rises less than one tap before a clock edge is not yet on tap 0 at that edge.
It is first seen one edge later, with T1 (or T3) close to a full period. The result is
still correct to within one tap.

The ones are counted, not decoded as a thermometer code. On a real device, placement
makes some taps switch before taps that sit earlier in the chain ("bubbles"). A count of
ones does not depend on that order.

## Data path

```
start ─ carry_chain ─ delay_line ─ bit_counter ─ encoder_bram ─┐ T1
                        (sample)     (popcount)    (ps table)   │
                                                                ▼
            coarse_counter (16 b, 400 MHz) ── N ──► dsp_alu  LVL1: N·2500 + T1
                                                                │  LVL2: − T3
stop  ─ carry_chain ─ delay_line ─ bit_counter ─ encoder_bram ─┘ T3
                                                                │ meas (32 b ps + overflow)
                                                 mem_manager ◄──┘
                                                      │ read-modify-write
                                                  hist_mem (block RAM)
```

`tdc_channel` holds everything between the carry chains and the histogram: both delay
lines, both bit counters, both encoders, the coarse counter, the ALU and the control
logic. `tdc_top` adds the two carry chains, `mem_manager` and `hist_mem`.

### Control and timing

All control is synchronous to the 400 MHz clock. Tap 0 of each sampled line is used as
the synchronised level of `start` and `stop`.

* **Start.** A start is a rising edge of the start level. It is accepted only if the stop
  level was low at the previous edge, so a stop that rose before its start is ignored.
  Start and stop may rise at the same edge.
* **Stop.** A stop edge is used only after an accepted start. If the start drops before
  any stop, the channel goes back to idle and produces no result.
* **Re-arm.** After a result, the channel waits until both signals are low again. The
  input signals are assumed to stay high until the result has been taken, as in the
  timing diagram above.
* **Coarse counter.** It is held at zero while start is low. It counts while start is high
  and stop is low, and freezes while stop is high. At the top value it saturates and
  raises `overflow`. A result with `overflow` set is not a valid interval, and the
  histogram counts it as over range.
* **Latency.** `meas_valid` pulses in the cycle after the 4th edge following Eb. The four
  stages are bit counter, encoder, ALU level 1 and ALU level 2. The histogram write
  follows one cycle later.
* **Holding T1.** The start line's result goes through the same bit-counter and encoder
  stages, and is held until the stop result arrives.

### Encoder tables

Carry-chain taps are not equal. Block boundaries are slower than hops inside a block, and
routing differs from tap to tap and between placements. For that reason the ones-count is
not multiplied by a fixed tap delay. Each line instead has a 512 × 32 block-RAM table
from count to picoseconds, with a registered read (1 cycle).

* **Power-up table.** The table starts linear: `entry[i] = round(i × TAP_FS / 1000) +
  OFFSET_PS`.
* **Calibration.** Measured values are loaded through `cal_we` / `cal_line` / `cal_addr` /
  `cal_data`: line 0 is start and line 1 is stop. Each delay line has a fixed offset that
  depends on its routing (a few hundred ps), and that offset belongs in these tables. Each
  channel has to be calibrated on the board after place and route.

### Histogram storage

`mem_manager` maps each result to a bin:

  `bin = (T − cfg_min_ps) >> cfg_bin_shift`

* **Window.** The histogram covers `cfg_min_ps` to `cfg_min_ps + NUM_BINS · 2^shift` ps.
* **Out of range.** Results below the window are counted in `under_cnt`. Results above
  it, or with coarse overflow, are counted in `over_cnt`. `total_cnt` counts every result
  that reached the histogram.
* **Increment.** A bin is incremented by a two-stage read-modify-write. If the next
  result hits the bin written in the previous cycle, the written value is forwarded. The
  manager can therefore take one result per clock, although one channel produces at most
  one result every few cycles.
* **Saturation.** Bins and counters saturate instead of wrapping.
* **Reading.** Set `acq_en` low, then read bins with `rd_en` / `rd_addr`. The count
  appears on `rd_data` with `rd_valid` one cycle later.
* **Clearing.** A pulse on `clear` zeroes every bin and counter in `NUM_BINS` cycles,
  while `clear_busy` is high. Results that arrive during a clear are dropped.

## What is modelled and what is RTL

* `carry_chain` is a **behavioural timing model**, not synthesizable. On the FPGA the
  delay elements are CARRY8 primitives: 58 of them in one CLB column, in one clock
  region, giving 464 taps. Placement and routing decide their real delays. In the model,
  tap i follows the input after `(i+1) · TAP_PS`, with a default of 6.4 ps. Two parameters
  can add delay, and both default to 0:
  * `BLOCK_EXTRA_PS` adds delay for each carry-block boundary crossed.
  * `LAST_TAP_SKEW_PS` adds delay on the last tap of each block, which has extra fanout.
    With a large enough value this skew produces bubbles.

  On a device, the chains would be instantiated from vendor primitives with placement
  constraints, and `tdc_channel` would be fed their outputs.
* Everything from the sampling flip-flops on is synthesizable SystemVerilog.
  `tdc_channel`, without the carry chains, is the part to synthesize.
* `tap_reorder` is the optional register layer that permutes the sampled taps into their
  measured switching order. It is instantiated inside `delay_line` when `USE_REORDER = 1`
  and adds one cycle. It is off by default because the bit counter does not need it. The
  order is a `tdc_pkg::tap_order_t` parameter that comes from a measurement on the board.
  The identity order is the default.

## Parameters

| Where | Parameter | Default | Meaning |
|---|---|---|---|
| `tdc_top` | `N_BLOCKS` | 58 | CARRY8 blocks per line (8 taps each, 464 taps) |
| `tdc_top`, `coarse_counter` | `CNT_W` | 16 | coarse counter width (range 65535 × 2.5 ns) |
| `tdc_top`, `encoder_bram` | `TAP_FS` | 6400 | nominal tap delay in fs, for the model and the power-up tables |
| `tdc_top`, `mem_manager` | `NUM_BINS` | 4096 | histogram bins |
| `tdc_top`, `mem_manager` | `BIN_W` | 32 | bits per bin |
| `delay_line`, `tdc_channel` | `USE_REORDER` | 0 | add the reordering register layer |
| `tdc_pkg` | `CLK_PERIOD_PS` | 2500 | clock period, the ×2500 factor in the ALU |

The 464 taps, 400 MHz, 16-bit counter, ×2500 scaling, 32-bit data path, two-level ALU and
one-cycle block-RAM encoder follow the design as published. These are this design's own
choices:

* the 6.4 ps nominal tap, taken from a measured line length of about 3 ns over 464 taps;
* the histogram sizes and the power-of-two bin width;
* the control rules for arming and re-arming;
* the saturating coarse counter;
* the clear sweep and the read port.

## Departures and limits

* **One channel.** The intended system has many channels per FPGA. Each channel is a
  `tdc_channel` with its own carry chains, encoder tables and calibration.
* **No calibration procedure.** The encoder tables have to be filled from measurements
  on the board (code-density or delay sweeps). No procedure for that is included.
* **No readout link.** Results were sent to a PC over a UART during testing. No UART is
  included, because its format is not defined. Results are available on `meas_valid` /
  `meas` and on the histogram read port.
* **No metastability model.** A signal that arrives right at a clock edge can make the
  sampling flip-flops go metastable. The simulation does not model this. On hardware it
  can make a line report a tiny delay at the wrong edge. The first-tap level used for
  control should be checked against that case.
* **Not included.** Two earlier prototypes are not part of this RTL:
  * a shorter line (32 CARRY4 blocks) with a thermometer decoder that halves the code
    into ranges;
  * a latch-based line.

  That decoder produced jumps when taps switched out of order, which is why it was
  replaced by the bit counter.
* **Bit-counter timing.** The bit counter is a 464-input adder tree registered once. It
  will be the critical path at 400 MHz. Pipelining it would change the latency, and the
  hit flags in `tdc_channel` would need the same extra delay.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Expected values come from independent models: the
reference TDC model `tb/tdc_ref_pkg.sv` and simple software models of the bins and
counters.

* **End to end.** `tdc_top_tb` runs the full-size design with default parameters, in
  under a second. It covers:
  * intervals within one clock period and across many periods;
  * 500.6 ns and 2001.6 ns;
  * a 170 µs interval that overflows the counter;
  * a stop before its start;
  * results below, inside and above the histogram window;
  * recalibration of an encoder table;
  * readback of all 4096 bins, and clearing the histogram.

  Each result must match the reference bit for bit and lie within one tap of the true
  interval, and the 4-cycle latency is checked.
* **Channel.** `tdc_channel_tb` does the same for one channel without the histogram.
* **Delay sweep.** `delay_sweep_tb` sweeps the start edge across the line in 10 ps steps,
  from 3.3 ps to 3.2 ns. The carry-chain model is given block-boundary and fanout skew for
  this test, so the plain samples show bubbles. The test checks that:
  * the reordering layer turns every sample into a clean thermometer code;
  * the bit counter gives the same count with and without reordering;
  * the tap order measured from the sweep matches the order given to the layer.
* **Units.** The unit testbenches check the popcount, the table contents and writes,
  counter saturation, the ALU pipeline, read-modify-write forwarding, the permutation and
  the sampling latency.

To simulate with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/tdc_pkg.sv tb/tdc_ref_pkg.sv tb/tdc_top_tb.sv --top-module tdc_top_tb
./obj_dir/Vtdc_top_tb
```

Use the same command with another testbench for a unit test. Files are found by module
name through `-I`. `-Wno-fatal` is needed because the testbenches compute their delays at
run time, and Verilator warns about that (`ZERODLY`). The RTL itself lints cleanly under
`-Wall`, apart from unused package constants. All files use `` `timescale 1ps/1fs `` because the tap delays are
fractions of a picosecond.
