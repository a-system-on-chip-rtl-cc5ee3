# Carry-chain time-to-digital converter with in-system calibration

A time-to-digital converter (TDC) measures when a digital edge arrived, with
a resolution much finer than any clock period. This design does it in FPGA
fabric by combining two clocks' worth of information:

* a **coarse** time: a free-running counter on the reference clock (5 ns
  period, 200 MHz) counts whole periods;
* a **fine** time: the hit is sent down a chain of carry cells (a tapped
  delay line). Each cell adds about 62.5 ps. At the next clock edge all
  taps are sampled at once. The number of cells the edge has reached, N_f,
  tells how long before the clock edge the hit arrived.

A hit that is sampled at coarse count N_c therefore happened at

    t_hit = N_c * T0 - N_f * tau

An interval is the difference of two such stamps. Because the cells of a
real carry chain are not equal, tau is not known in advance. Each channel
measures it in the running system with a code-density histogram of random
hits. The result is a four-input TDC peripheral with an AXI4-Lite slave
port. A soft processor reads start/stop intervals from it with about
62.5 ps LSB and up to 81.92 us range at the default settings.

## One channel, hit to data word

`tdc_channel` chains five parts:

1. `hit_register`: a flip-flop clocked by the hit input with D tied to 1.
   Its output rises on the hit edge and stays high until the channel
   clears it. Only the first edge counts. The delay line sees a clean
   step that does not depend on the width of the input pulse.
2. `tdl_carry_chain`: NTAPS cells (a multiple of 4, as in a CARRY4
   column). Tap i goes high (i+1) cell delays after the step. This is a
   behavioural model with real-valued delays. In the FPGA it is a placed
   carry chain.
3. `tap_register`: NTAPS flip-flops on the reference clock. They give a
   thermometer code: ones up to where the step has reached, zeros beyond.
4. `code_converter`: counts the ones. Counting ones instead of searching
   for the 1-to-0 transition makes the result insensitive to "bubbles"
   (isolated wrong bits near the transition, which real chains produce).
5. `bit_latch_ctrl`: a three-state controller (armed, convert, reset).
   While armed, the tap register samples every cycle. The first non-zero
   code freezes it, and the shared coarse counter is copied into the
   channel's coarse register in the same cycle. Next cycle the ones count
   is ready and the data word {N_f, OF, N_c} is emitted. A local reset of
   RST_CYCLES cycles then clears the hit flip-flop and the taps.

Timing: if clock edge E samples the first non-zero code, the word is valid
after edge E+2. The channel accepts a new hit after edge E+2+RST_CYCLES.
That is 4 cycles (20 ns) at the defaults; hits inside this dead time are
ignored.

A hit that arrives less than one cell before a clock edge leaves the code
at zero. It is then taken one period later with N_f between T0/tau and
T0/tau + 1. So the line must be longer than one period. At 62.5 ps, 80
cells cover 5 ns; the default line has 96.

## Coarse counter and the overflow flag

The coarse counter (`coarse_counter`) is never reset between measurements.
Every hit simply takes a snapshot of it. That allows any number of stops
per start and overlapping measurements on several channels. The price is
wrap-around. The counter has COARSE_BITS = 14 bits plus one more bit, the
overflow flag OF, which toggles each time the 14-bit part wraps.

For two snapshots (reference and x), `interval_calc` looks at the two flags:

| case | OF_ref | OF_x | meaning                         | CC                      |
|------|--------|------|---------------------------------|-------------------------|
| I    | 0      | 0    | same half-turn                  | N_c_x - N_c_ref         |
| II   | 0      | 1    | counter wrapped between the hits | FS + N_c_x - N_c_ref    |
| III  | 1      | 0    | counter wrapped between the hits | FS + N_c_x - N_c_ref    |
| IV   | 1      | 1    | same half-turn                  | N_c_x - N_c_ref         |

Here FS = 2^14. The interval is then

    T = CC * T0 + t_f(ref) - t_f(x)

The result is correct for any interval up to FS * T0 = 81.92 us. Longer
ranges need a wider counter (COARSE_BITS = 32 gives about 21 s). The case
number travels with each result, so software can see which case applied.

## Calibration (code density)

`tdc_calibration` sits behind each channel and turns N_f into a fine time
in femtoseconds. Hits that are uncorrelated with the clock fall uniformly
within a period. So the number of hits that land in code k is
proportional to that bin's width. A calibration collects exactly
2^HIST_LOG2 (16384) hits into a histogram h, then builds a result in one
of two ways. The processor picks the way in CTRL[0].

* **Average bin width.** Kmax is the largest code seen, and
  tau = T0 / Kmax (computed by a sequential restoring divider). Then
  t_f = N_f * tau. This is cheap and robust, but it ignores the unequal
  widths of individual cells.
* **Bin-to-bin.** Each code k gets the time of the centre of its bin:

      t(k) = T0 * (2 * sum_{i<k} h_i + h_k) / 2^(HIST_LOG2+1)

  The division is a shift because the hit count is a power of two. The
  table is stored in a per-channel memory, one entry per code, built one
  entry per clock after the histogram is complete.

Until the first calibration finishes, the average mode uses
tau = T0 / NOMINAL_TAPS. If the histogram holds no hits, the old values
stay in use. During a calibration the channels keep producing results, so
the processor should empty the buffer afterwards (CTRL[2]). The
statistical spread of the running sum is about 24 ps near mid-range with
16384 hits, whatever the cell size. This limits the accuracy of
bin-to-bin calibration more than the cell size does at 16 ps. Raise
HIST_LOG2 for finer lines.

Lookup takes one clock cycle. The coarse stamp is delayed by one cycle
to stay aligned with it.

## Pairs, results and readout

`tdc_soc_top` has four inputs, `start1`, `stop1`, `start2`, `stop2`. Each
has its own channel and calibration engine, and all share one coarse
counter. Each pair works as a common-start TDC:

* a start hit stores its coarse stamp and fine time as the pair's
  reference;
* every later stop gives one interval against that reference, until the
  next start replaces it;
* a start and stop sampled by the same clock edge are paired with each
  other.

Results are 64-bit words:

    [63]    pair (0: start1/stop1, 1: start2/stop2)
    [62:61] overflow-flag case (0..3 = I..IV)
    [60:0]  signed interval in femtoseconds

They go into a 512-word first-word-fall-through buffer (`readout_fifo`).
When both pairs finish in the same cycle, pair 0 is written first. A
result that finds the buffer full is dropped and counted. `irq` is high
while the buffer is not empty. A hit sampled at edge E reaches the buffer
after edge E+5.

### Register map (`tdc_axi_ports`, AXI4-Lite, 32-bit, reference clock)

| offset | name    | access | content |
|--------|---------|--------|---------|
| 0x00   | CTRL    | rw | [0] calibration mode (0 average, 1 bin-to-bin); [1] write 1 to start a calibration on all channels; [2] write 1 to empty the buffer |
| 0x04   | STATUS  | ro | [0] buffer empty, [1] full, [2] calibration busy, [3] calibration done, [31:16] buffer level |
| 0x08   | DATA_LO | ro | bits 31:0 of the oldest result |
| 0x0C   | DATA_HI | ro | bits 63:32; reading it removes the result, so read DATA_LO first |
| 0x10   | DROPS   | ro | results lost to a full buffer |
| 0x14   | KMAX    | ro | Kmax of channel 0 [15:0] and channel 1 [31:16] |
| 0x18   | KMAX_HI | ro | Kmax of channels 2 and 3 |

Other addresses return SLVERR. A write completes one cycle after address
and data are both valid. A read completes one cycle after the address.
`aresetn` of the port is the inverse of the top-level `rst`.

A typical driver:

1. Write CTRL = 0x2 to calibrate in average mode (or 0x3 for bin-to-bin)
   while random hits reach the inputs.
2. Wait for STATUS[3] = 1 and STATUS[2] = 0.
3. Write CTRL with bit 2 set to empty the buffer, keeping bit 0.
4. On `irq`, read DATA_LO and then DATA_HI until STATUS[0] = 1.

## Parameters and the configurations they cover

| parameter    | default   | meaning |
|--------------|-----------|---------|
| NTAPS        | 96        | cells in each delay line (multiple of 4) |
| TAU_PS       | 62.5      | cell delay of the delay-line model |
| SLOW_EVERY, SLOW_PS | 0, 0.0 | model only: every SLOW_EVERY-th cell is SLOW_PS slower |
| T0_FS        | 5 000 000 | reference clock period in fs |
| COARSE_BITS  | 14        | coarse counter width, without OF |
| NOMINAL_TAPS | 80        | cells per period assumed before the first calibration |
| HIST_LOG2    | 14        | log2 of the hits per calibration |
| RST_CYCLES   | 2         | length of a channel's local reset |
| FIFO_DEPTH   | 512       | readout buffer depth |

The defaults are the 62.5 ps configuration. The same RTL covers the finer
and longer-range variants by parameters only:

| variant | NTAPS | TAU_PS | T0_FS | NOMINAL_TAPS | COARSE_BITS | expected Kmax |
|---------|-------|--------|-------|--------------|-------------|---------------|
| 62.5 ps, 200 MHz (default) | 96 | 62.5 | 5 000 000 | 80 | 14 | 80 |
| 31.6 ps, 200 MHz | 176 | 31.6 | 5 000 000 | 158 | 14 | 159 |
| 16.1 ps, 160 MHz | 400 | 16.1 | 6 250 000 | 388 | 14 | 389 |
| long range, 33 ps | 176 | 33.0 | 5 000 000 | 152 | 32 | 152 |

The long-range variant reaches 2^32 * 5 ns, about 21 s. In hardware its
single-shot precision is set by clock jitter and drift over the interval,
which the simulation does not model.

## What is a model and what is hardware

Everything in `rtl/` is synthesizable except `tdl_carry_chain`. That
module uses real-valued delays to stand in for a placed chain of CARRY4
primitives. To build for an FPGA, replace it with CARRY4 instances: the
CO outputs feed `tap_register`, and the chain is placed in one column.

Lint reports the hit flip-flop's clear as a reset driven by logic. That
is intended: the channel's local reset must clear the hit flip-flop
asynchronously, as in the original structure. The delay-line model has
no delays when read by a synthesis tool, so there its taps are plain
copies of the input.

## Departures from the original system and things not built

* The system this follows has a soft processor, AXI interconnect, interrupt
  controller, UART and clock generator around the TDC. Those are vendor IP
  and are not included. The TDC's AXI4-Lite slave port and `irq` output
  are where they connect.
* The register map, result word format, buffer, input pairing, dead time
  and calibration hit count are this design's own choices.
* Trigger-matching mode (collecting hits within a window around a
  trigger) is not implemented.
* Only four inputs (two start/stop pairs) are built. The original work also
  describes a 128-channel data-acquisition system.
* The original slides also show a sliding-scale variant of the delay line:
  a 320 MHz sampling clock, a 160 MHz auxiliary clock for the code
  converter, and a per-flip-flop enable input. Its operation is not
  described beyond that drawing. Here the taps, code converter and
  counter all run on one reference clock, and a single enable from the
  latch controller freezes the whole tap register.
* Pulse width (the difference of two stop times after one start) is left
  to software. The two results are read and subtracted.
* The coarse counter and the AXI port share the reference clock. No
  clock-domain crossing is provided for a separate bus clock.
* Calibration is started by software and covers all four channels
  together. Channels cannot be calibrated one at a time.

## Files

`rtl/`:

* `tdc_pkg.sv`: enums and register addresses
* `hit_register.sv`, `tdl_carry_chain.sv`, `tap_register.sv`,
  `code_converter.sv`, `bit_latch_ctrl.sv`: the parts of one channel
* `tdc_channel.sv`: one complete channel
* `coarse_counter.sv`: the shared coarse counter
* `tdc_calibration.sv`: the calibration engine
* `interval_calc.sv`: the interval arithmetic
* `readout_fifo.sv`: the readout buffer
* `tdc_axi_ports.sv`: the AXI4-Lite port
* `tdc_soc_top.sv`: the top level

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog. In addition:

* `tb_tdc_soc_top.sv` runs the top level at its defaults. It calibrates
  with random hits in both modes, reads Kmax, and sends groups of one to
  three stops per start with intervals from 0.3 ns to 80 us, hitting all
  four overflow cases. It fills the buffer until results drop, and checks
  every result against the applied interval within 100 ps.
* `tb_tdc_workloads.sv` runs the same sequence through `tdc_e2e_bench.sv`
  for three variants in parallel: the 31.6 ps and long-range variants
  from the table above, and the default chain with every fourth cell
  30 ps slower. Tolerances there are 100 to 150 ps; the file header explains
  why. The 16.1 ps variant has no kept testbench: in end-to-end runs
  some intervals were off by up to about 95 ps, more than its cell size
  would suggest. The cause has not been pinned down; a larger HIST_LOG2
  is the first thing to try.

## Simulating

With Verilator 5 (timing support needed for the delay-line model and the
testbenches):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_tdc_soc_top \
        -Irtl -Itb -y rtl -y tb +libext+.sv rtl/tdc_pkg.sv tb/tb_tdc_soc_top.sv
    ./obj_dir/Vtb_tdc_soc_top

Replace the module name to run any other testbench. The top-level test
takes about 20 s; `tb_tdc_workloads` takes about a minute. All files use
`timeunit 1ps; timeprecision 1fs;` so that fractional-picosecond hit times
are represented exactly.
