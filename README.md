# ColdADC QC engines for the WIB firmware

Quality control of the DUNE ColdADC needs two measurements that a plain
spy-buffer capture cannot deliver. One is a DC transfer curve: the mean
output code at about a thousand input voltages. The other is a code-density
histogram: more than 1.6 million consecutive samples of one channel while a
slow ramp sweeps the ADC range, so that DNL, INL and missing codes can be
found. The spy buffer holds about 2000 samples per channel. An average then
costs one capture per DAC step, and a gap-free 1.6-million-sample record
cannot be taken at all.

This RTL adds two engines to the Warm Interface Board (WIB) firmware. Both
work on the live, validated channel data:

* the **averager** sums a programmed number of samples on every channel at
  once. Software reads the 512 totals and divides them itself;
* the **histogram** counts, for one chosen channel, how often each of the
  16,384 codes occurs, straight into a block RAM. The processor copies the
  RAM over AXI when the run is done.

Both engines get their data from a copy of the validate-and-align stage of
the DAQ frame builder. Every sample therefore counts exactly once, and
corrupted frames never count.

```
 16 decoded      +---------------+ 64 ch x 14 b   +-------------------+
 COLDATA links ->| fbld_modified |---+----------->| accumulator_array |--> accum_ready, accum_ch_total
 (2 per chip)    |      x8       |   | rq_state   |  8 units x 64 ch  |
                 +---------------+   |            +-------------------+
                                     |            +-----------+ port A +-----------+ port B
                                     +----------->| histogram |<------>| hist_bram |<-----> AXI BRAM controller
                                                  |(chan_sel) |        | 8K x 32 b |        (0xA00C8000..FFFF)
                                                  +-----------+        +-----------+
                                                     | hist_ready, live peek
   AXI4-Lite (0xA00C0000) <--> reg_bank_64 <---------+  (config 0x70-0x7C, status 0xF0-0xF8)
```

## Channels and sample sets

The WIB reads four front-end boards through 16 COLDATA links, two links per
COLDATA chip and 32 channels per link. There are 8 chips and 512 channels.
A channel is named by 9 bits, `{chip[2:0], channel[5:0]}`. Link `2k`
carries channels 0-31 of chip `k` and link `2k+1` carries channels 32-63.
Samples are 14 bits wide.

Each link delivers a decoded frame as a `link_frame_t` (`wib_qc_pkg`). The
frame has a `valid` strobe, a decoder `err` flag, a 16-bit timestamp and
32 samples.

## Validation and alignment (`fbld_modified`)

One instance per chip turns the two link streams into 64-channel sample
sets. It holds each link's latest frame and releases a pair only when both
links hold a frame with the same timestamp. It then pulses `rq_state` for
one clock, and this strobe is what both engines count. Frames are discarded
(and `drop` pulses) when:

| situation | action |
|---|---|
| decoder flags `err` | frame discarded, `aligned` cleared |
| timestamp not newer than the last released pair (repeat or stale) | frame discarded |
| both links hold frames with different timestamps | older frame discarded, `aligned` cleared |
| a held frame is overwritten by a newer one on its link | old frame discarded |

Timestamps are compared modulo 2^16. The links may be skewed by any number
of clocks, as long as a link does not run a whole frame ahead. The pair is
released on the second clock edge after the later frame is presented.

This stage is this design's own reconstruction. The original states only
its purpose: validate and align so that every sample is counted once and
garbage is never counted. How the production frame builder does this is
not published, and neither is the decoder output format.

## The averager (`accumulator`, `accumulator_array`)

There is one unit per chip. Each unit has 64 channels, each with a 32-bit
adder and total, and one small state machine (idle, accumulate, done).

1. Software writes `accum_num_samples` and makes `accum_trig` go from 0 to 1.
   The rising edge clears all totals and the ready bits.
2. Each `rq_state` of the unit's builder adds all 64 samples. When the count
   reaches `accum_num_samples`, the unit stops, and its `accum_ready[Z]` bit
   rises on the next clock. The totals stay frozen until the next trigger.
3. Software writes a channel number to `accum_total_ch_sel` and reads
   `accum_ch_total`. The value appears one clock after the selector
   changes, and reads zero while that channel's unit is still busy.

Sample counts up to 262,144 are documented. 262,144 x 16,383 still fits in
32 bits. The 19-bit count field accepts up to 524,287, but totals can wrap
above 262,144 samples. A count of 0 finishes at once. When writing the
selector, keep `accum_trig` at 1: writing 0 and then 1 starts a new run.

## The histogram (`histogram`, `chan_select`, `hist_bram`)

This is the part with the most hidden timing. A run goes through four
states:

1. **CLEAR**: after a rising edge of `hist_trig`, the histogram writes zero
   to all 8192 memory words, one per clock. `hist_num_samples` and the
   channel are taken at the trigger.
2. **ARM**: it waits until the selected channel delivers code `0x0000`. With
   a ramp that starts below the ADC range, every run starts at the bottom
   of a sweep, and the samples before it are ignored.
3. **COUNT**: that zero sample and the samples after it are counted until
   `hist_num_samples` have been taken. Each count is a read-modify-write of
   port A: the read is issued on one clock, and the incremented word is
   written on the next. A sample that arrives during the write waits in a
   one-entry skid register. One channel delivers a sample every 500 ns
   (2 MHz), so the two-clock engine never falls behind at real rates.
   `overrun` flags a lost sample, which can only happen if strobes come on
   nearly every clock.
4. **DONE**: `hist_ready` rises once the last count has been written, a few
   clocks after the last sample. The memory is left to the processor.

Counters are 16 bits and saturate at 0xFFFF. Two counters share one 32-bit
word: code `2w` is in bits 15:0 of word `w`, and code `2w+1` is in bits
31:16. Read as little-endian 16-bit values from byte offset 0 of the BRAM
window, the memory is an array of counts indexed by code.

`chan_select` picks the selected channel's sample out of the eight builders'
outputs. It also holds the latest value, which is the live peek register
(`deframed_data_mon`). Software watches this register to see the ramp before
it triggers.

`hist_bram` is a true dual-port RAM of 2^13 x 32 bits. Port A (read/write,
fabric clock, read-first) belongs to the histogram. Port B is read-only and
runs on `hist_axi_clk`. It is brought out to the top-level ports
`hist_en`, `hist_addr[14:0]` (a byte address) and `hist_data_in[31:0]`,
which connect to a standard AXI BRAM controller mapped at
0xA00C8000-0xA00CFFFF. Both ports have one clock of read latency.

## Register map (`reg_bank_64`)

The AXI4-Lite bank holds 64 32-bit registers: 32 read/write configuration
registers at 0x00-0x7C and 32 read-only status registers at 0x80-0xFC. Only
address bits 7:2 are decoded. The QC fields are:

| offset | bits | field | meaning |
|---|---|---|---|
| 0x70 | 28:10 | accum_num_samples | samples per averager run |
| 0x70 | 9:1 | accum_total_ch_sel | channel whose total appears at 0xF4 |
| 0x70 | 0 | accum_trig | rising edge starts the averager |
| 0x74 | 0 | hist_trig | rising edge starts the histogram |
| 0x78 | 8:0 | hist_ch | channel to histogram / peek |
| 0x7C | 31:0 | hist_num_samples | samples to count |
| 0xF0 | 23:10 | deframed_data_mon | latest sample of `hist_ch` |
| 0xF0 | 9 | hist_ready | histogram finished |
| 0xF0 | 7:0 | accum_ready | bit Z: unit of chip Z finished |
| 0xF4 | 31:0 | accum_ch_total | total of the selected channel |
| 0xF8 | 31:0 | hist_out | retired, reads 0 |

The other registers of the production bank are present as plain storage
(config) or read as zero (status).

The software flow for a DNL/INL scan is: set `hist_ch`, wait for
`deframed_data_mon == 0`, set `hist_num_samples` (for example 1,639,000),
toggle `hist_trig`, poll `hist_ready`, copy 32 KB from 0xA00C8000, then move
to the next channel.

## Sizes against the QC tests

| test | needs | this RTL |
|---|---|---|
| DC sweep | 128 channels, <= 262,144 samples, 2^10 DAC steps | 512 accumulators, 32-bit totals (one run per step) |
| slow-ramp histogram | 16,384 codes, 1,639,000 samples, ~100-250 counts/code | 2^14 16-bit counters, 32-bit sample count |

A counter saturates only if the input stays on one code for more than
65,535 samples (about 33 ms at 2 MHz), for example a long clipped stretch
beyond the ADC range.

## How far this follows the published design

The following follow the original BNL firmware description: the block
structure (8 modified builders, 8 x 64 accumulators, one histogram with a
BRAM read over AXI), the register addresses and bit fields, the maximum
sample counts, the 2^13 x 32 / 2^14 x 16 BRAM, the start-at-code-zero rule,
and the division left to software.

The following are this design's own choices, because the source does not
give them:

* the frame format at the decoder boundary and the whole timestamp-pairing
  validation scheme;
* edge-triggered starts, and restart on a new trigger during a run;
* clearing the histogram memory in hardware at each trigger;
* which code sits in which half of a word, and counter saturation;
* the 32 + 32 register split and the AXI4-Lite handshake details;
* a single fabric clock for builders, engines and register bank (only BRAM
  port B has its own clock), and synchronous resets.

Not included: the production WIB blocks (COLDATA receivers and decoders,
DAQ frame builders, 10G Ethernet, spy buffers, I2C, FAST command, timing
endpoint), the processor and the AXI BRAM controller. Their connections are
top-level ports of `wib_qc_top`.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Mdir obj \
    rtl/wib_qc_pkg.sv -y rtl tb/tb_wib_qc_top.sv --top-module tb_wib_qc_top
./obj/Vtb_wib_qc_top +verilator+rand+reset+2
```

Replace `wib_qc_top` with `histogram`, `accumulator`, `accumulator_array`,
`chan_select`, `hist_bram`, `fbld_modified` or `reg_bank_64` to run a single
block.

`tb_wib_qc_top` runs the full-size design with default parameters. It
injects decoder errors and lost frames and runs an averager pass over all
512 channels. It then histograms two channels on a clipped ramp, compares
every BRAM word with its own reference, and counts each mechanism it
exercised. It finishes in about a second.

Two further testbenches run the QC measurements themselves at full length:

* `tb_workload_hist_ramp` histograms 1,639,000 samples of a slow ramp at
  100 samples per code, one sample every four clocks. It checks all 16,384
  counts, checks that no sample is lost, and checks that ready follows the
  last sample within four clocks. It runs in a few seconds.
* `tb_workload_dac_sweep` runs the averager over all 2^10 DAC levels on the
  128 channels of one test board, with 32 samples per level. It checks
  every total and the shape of the transfer curve, including both clipped
  ends. It then makes one run of 262,144 full-scale samples to show the
  32-bit totals do not overflow.

## Files

| file | contents |
|---|---|
| `rtl/wib_qc_pkg.sv` | sizes, register offsets, `link_frame_t` |
| `rtl/fbld_modified.sv` | validate and align one chip's two links |
| `rtl/accumulator.sv`, `rtl/accumulator_array.sv` | averager unit, eight units plus readout selector |
| `rtl/chan_select.sv` | channel selector and live peek value |
| `rtl/histogram.sv` | histogram state machine and read-modify-write engine |
| `rtl/hist_bram.sv` | dual-port histogram memory |
| `rtl/reg_bank_64.sv` | AXI4-Lite register bank |
| `rtl/wib_qc_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_workload_*.sv` | full-length histogram and DAC-sweep measurements |
