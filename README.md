# 128-channel spike sorting processor with a parallel-folding structure

This processor runs the first two stages of spike sorting in real time on 128
neural recording channels sampled at 40 k samples/s:

* **spike detection** with the nonlinear energy operator (NEO);
* **feature extraction**: a 32-tap filter that is both a band-pass filter and
  a derivative, followed by a max/min (MaxMin) detector.

Each detected spike leaves the chip as a 72-bit record with three 16-bit
feature scores, a 16-bit timestamp and an 8-bit channel number.

The main idea is a middle path between two obvious designs. One processing
pipeline per channel (fully parallel) costs a lot of area and leakage. One
pipeline time-shared by all 128 channels (fully folded) needs a 5.12 MHz clock,
and moving every channel's state around at that rate costs a lot of dynamic
power. Here, **16 channels are folded onto one pipeline, and 8 such pipelines
run side by side**. Each pipeline is an *N-channel folded spike sorting
processor* (NFSSP). The clock is 16 × 40 kHz = 640 kHz. At this folding level
the area × power per channel is lowest in a 90 nm process. The folding level
(`N_CH`) and the number of processors (`N_SSP`) are parameters. The same RTL
therefore also builds the 64-channel (4 × 16) and 256-channel (16 × 16)
systems, as well as the fully parallel and fully folded versions.

```
                 +--------------------- NFSSP #0 .. #N_SSP-1 ---------------------+
 sample_in[p] -->| SCB1 (16 rows x 31 samples) --> NEO spike detector --+         |
 (9 b, ch 0..15  |        ^        |                                     | spike   |
  interleaved)   |        +--------+--> 32-tap noise shaping FIR --+     v         |
                 |                                                 +--> MaxMin --> coder & packer --> rec
                 | SCB2 (16 rows x feature buffer) <--------------------+ extractor|
                 | coefficient register array, system control unit                |
                 +------------------------------------------------------------------+
 prog_in --> command decoder --(writes)--> every NFSSP's coefficient registers
 rec[0..N_SSP-1] --> 2nd coder & packer (arbiter + FIFO) --> 9-bit spike_word stream
```

## How one pipeline serves 16 channels: the systolic cache buffers

Samples reach each NFSSP interleaved: channel 0, channel 1, …, channel 15,
channel 0 again, one sample per clock. All per-channel state lives in two
**systolic cache buffers (SCBs)**. An SCB is a chain of 16 register rows that
shifts by one row on every sample clock.

* The **last row** always belongs to the channel whose sample is arriving now.
* The processing units combine that row with the new sample within the same
  clock. The updated row goes back into the **first row**.
* Sixteen clocks later the row reaches the end of the chain again, in the
  clock when the same channel's next sample arrives.

This needs no addresses, no read/write scheduling and no memory. The cost is
that every bit of state moves on every clock. That is the dynamic power that
grows with the folding level.

| buffer | row contents | bits per row |
|---|---|---|
| SCB1 | the previous 31 samples of the channel | 279 |
| SCB2 | feature buffer: active flag, sample count (6 b), filtered max (22 b), filtered min (22 b), raw max (9 b), event timestamp (16 b) | 76 |

In each clock the new sample `x[0]` and the SCB1 row `x[1..31]` make up the
channel's 32-sample window, with `x[k]` the sample taken k periods ago. The
window is used as follows:

* the spike detector uses `x[0..6]`;
* the filter uses all 32 samples;
* the MaxMin extractor watches the raw sample `x[3]`.

Everything from the SCB outputs to the SCB inputs is combinational logic
within one clock. At 640 kHz this is not a timing concern.

`in_valid` is a sample strobe. On a clock where it is low, nothing shifts,
counts or detects, so the input stream may have gaps.

## Processing units

**NEO spike detector** (`neo_spike_detector`). It works on the centre `c =
x[3]` of the 7-sample window:

* NEO energy: `psi = x[3]^2 − x[2]·x[4]` (19 bits, signed).
* A peak test: `c` is at least as large as each of the three newer samples and
  strictly larger than each of the three older ones. A flat top of equal
  samples therefore fires only once.
* A spike is reported when the centre is a peak **and** `psi` is above the
  programmed 16-bit threshold, taken as an unsigned value.

**Noise shaping filter** (`noise_shaping_fir`). `y = Σ coef[k]·x[k]` over 32
taps, with signed 9-bit samples and coefficients. The 32 products are summed by
a balanced adder tree. The exact sum can need 23 bits; it is saturated to the
22-bit output range ±2^21. Suitable coefficients make this filter a band-pass
filter and a first derivative at the same time. They are trained off-line and
written at configuration time.

**MaxMin feature extractor** (`maxmin_extractor`). It is event driven and
updates one SCB2 row.

* A spike on an idle channel does the following:
  * it resets the row to the initial values: filtered max −2097152, filtered
    min 2097151, raw max −255;
  * it stores the timestamp;
  * it starts the count.
* The clock of the detection counts as the first sample. From that clock on,
  the extractor keeps the running maximum and minimum of the filtered sample
  and the running maximum of the raw centre sample.
* After `spk_len` samples of that channel (default 32, programmable from 1 to
  32), `done` is raised and the channel becomes idle again.
* A spike on a channel that is still being extracted is ignored.

Because the raw sample watched is the detection centre `x[3]`, the detected
peak itself is inside the extraction window.

**Coder & packer** (`coder_packer`). It turns a finished feature row into a
record, one clock after the last sample:

| bits | field | coding |
|---|---|---|
| 71:56 | filtered maximum | the 16 most significant of its 22 bits (arithmetic shift right by 6) |
| 55:40 | filtered minimum | same |
| 39:24 | raw maximum | 9-bit value sign-extended |
| 23:8 | timestamp | sampling periods since reset at detection, 16 bits, wrapping |
| 7:0 | channel | `SSP_ID*N_CH + local channel`, 0..127 |

## Output stream: second coder & packer

`coder_packer2` merges the records of all processors into one 9-bit output
stream.

* Each processor has a one-record **pending slot**.
* A round-robin arbiter moves one pending record per clock into a
  16-record **FIFO**.
* A serializer sends the oldest record as **eight 9-bit words**, most
  significant first. `spike_word_valid` marks valid words, and
  `spike_word_sop` is high on the first word of each record. Records follow
  each other without gaps.

One record takes 8 clocks, so the output carries at most 80 k records/s at
640 kHz. That is about 625 spikes/s per channel when averaged over 128
channels, far above neural firing rates. Short bursts are absorbed by the FIFO.
If a processor finishes a second record while its pending slot is still
occupied, the new record is **dropped** and counted in `drop_count`. This
happens only under overload, for example when all channels fire at once.

## Configuration

The single serial input `prog_in` carries write commands, one bit per clock,
MSB first. The line idles at 0.

```
 1 | bcast | id[ID_W-1:0] | addr[5:0] | data[15:0]        (ID_W = 3 for 8 processors)
```

* With `bcast` = 1 the write goes to every processor; otherwise it goes to
  processor `id`.
* The write happens on the clock after the last data bit, and a new frame may
  start on that clock.

Each processor's coefficient register array has this address map:

| addr | register | reset value |
|---|---|---|
| 0..31 | FIR coefficient k (data[8:0], signed) | 0 |
| 32 | detection threshold (16 b, unsigned) | 0xFFFF |
| 33 | spike length (data[5:0]; 0 → 1, > 32 → 32) | 32 |

## Top-level interface (`ssp128_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (640 kHz for 40 k samples/s) and asynchronous active-low reset |
| `in_valid` | in | 1 | one sample per processor is present; hold high for continuous streams |
| `sample_in` | in | `N_SSP` × 9 | processor p's interleaved samples, channel 0..`N_CH`−1 counted from reset |
| `prog_in` | in | 1 | serial configuration |
| `spike_word`, `spike_word_valid`, `spike_word_sop` | out | 9, 1, 1 | record stream |
| `spike_event` | out | `N_SSP` | a spike started an extraction in processor p this clock (observation) |
| `drop_count` | out | 16 | records lost to output overload (observation) |

Parameters: `N_CH` = 16 channels per processor and `N_SSP` = 8 processors.
`N_CH × N_SSP` may be at most 256, because the channel field has 8 bits.
Widths and constants are in `ssp_pkg`.

## What is taken from the published design and what is not

These parts follow the published architecture:

* the partitioning: 8 processors × 16 channels, two SCBs per processor, and
  the three processing units;
* NEO detection with a threshold and a peak test over 7 samples;
* a 32-tap filter with 9-bit samples and coefficients and a 22-bit output;
* the MaxMin extractor with its three compare/select paths and their
  initial values (−255 for the raw maximum is kept as published, although
  −256 would be the 9-bit minimum);
* the programmable spike length of 32 samples;
* the 72-bit record content;
* the 9-bit output;
* the 640 kHz clock.

This design chose the following:

* the exact NEO centre and peak rule, and that the detection clock counts as
  the first extraction sample;
* the raw tap that the extractor watches, and ignoring re-triggers;
* saturating the filter sum;
* the 22 → 16-bit feature coding and the field order in the record;
* the timestamp, which counts sampling periods;
* the serial frame format and the register map;
* `in_valid`;
* the pending-slot / round-robin / FIFO structure of the output stage, its
  16-record depth and the drop policy.

Not included: the analog recording front end and ADC that produce the samples,
and the clustering stage of spike sorting, which the published design also
leaves off chip. Area, power and the folding-level trade-off depend on the
process and cannot be reproduced at RTL level. The RTL was checked by
simulation and lint only, not synthesized to gates.

## Files

* `rtl/ssp_pkg.sv`: widths, constants, record and configuration types.
* `rtl/ssp128_top.sv`: top level.
* `rtl/nfssp.sv`: one folded processor, built from `scb.sv`,
  `neo_spike_detector.sv`, `noise_shaping_fir.sv`, `maxmin_extractor.sv`,
  `coeff_reg_array.sv`, `sys_ctrl.sv` and `coder_packer.sv`.
* `rtl/cmd_decoder.sv`: serial configuration.
* `rtl/coder_packer2.sv` with `rtl/sync_fifo.sv`: output stream.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_ref_pkg.sv`: the integer reference model the testbenches compare
  against (NEO, filter, per-channel extraction, record packing).
* `tb/tb_ssp128_top.sv`: end to end at the full 128-channel size. It covers:
  * serial configuration;
  * 500 sampling periods of noisy spiking data on all channels, with every
    record matched against the model;
  * an overload burst that checks records received + dropped = records made;
  * coverage counters for every mechanism (broadcast and targeted writes,
    detections, ignored re-triggers, idle input clocks, simultaneous
    finishes, back-to-back records, drops).
* `tb/tb_ssp_scaling.sv` (with `tb/tb_ssp_sys.sv`): the same flow for four
  other sizes:
  * 64 channels (4 × 16);
  * 256 channels (16 × 16);
  * fully parallel (128 × 1);
  * fully folded (1 × 128).

  Compiling it takes about three minutes, because the fully parallel system
  has 128 processor instances.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/ssp_pkg.sv tb/tb_ref_pkg.sv tb/tb_ssp128_top.sv \
  --top-module tb_ssp128_top -o sim
./obj_dir/sim
```

Replace the testbench file and top-module name to run any other testbench.
The full-size end-to-end run takes well under a second after about 15 s of
compilation.

Lint a module with
`verilator --lint-only -Wall -y rtl rtl/ssp_pkg.sv rtl/<module>.sv`.
