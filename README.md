# Spike-based data reduction for 2560 neural recording channels

A multi-electrode array with thousands of electrodes produces a raw data stream
of more than a gigabit per second (2560 channels x 31.25 kS/s x 16 bit =
1.28 Gb/s), yet almost all of it is background noise between action
potentials. This design watches every channel for spikes and keeps only the
spikes. For each spike it outputs one 48-word record: the time stamp, the
channel ID and 46 samples of the action-potential (AP) waveform. These are 10
samples before the spike sample, the spike sample itself and 35 samples after
it. At typical firing rates this is a few percent of the input.

The main ideas are these:

* **Time-division multiplexed processing.** One sample arrives per clock (80 MHz
  for 2560 channels). It goes, in turn, to one of 20 identical *reduction
  units* of 128 channels each. So each unit has 20 clocks per sample, which is
  enough for its longest procedure.
* **A short per-channel history.** A unit keeps only the 16 most recent samples
  of each channel. When a spike is found, the first 16 samples of its waveform
  are copied to the output buffer in one burst. The other 30 samples are
  forwarded one by one as they arrive. Nothing waits in a queue for a whole
  waveform to build up. The input memory per channel stays at 16 words, not
  the 46 or more a whole waveform would need.
* **Autonomous per-channel thresholds.** After reset, each unit estimates each
  channel's noise level by itself. It uses the mean absolute value of the
  nonlinear energy operator (NEO) output, and sets the threshold at 16 times
  that value. No per-channel manual setting is needed.

## Data path

```
rx_valid/rx_data ──► bram_write_addr_gen ──► unit 0 ──► output FIFO 0 ──► ap_*[0]
   (aligned 16-bit     tags each sample:      unit 1 ──► output FIFO 1 ──► ap_*[1]
    TDM words)         unit, channel, slot,     ...
                       time stamp, chan. ID   unit 19 ─► output FIFO 19 ─► ap_*[19]
```

`nsd_top` contains the address generator and `NUM_UNITS` copies of
`spike_reduction_unit`. The input stream is ordered the way a TDM acquisition
system delivers it: channel 0 of every unit, then channel 1 of every unit, and
so on. The generator is three cascaded counters:

| counter | width | counts | steps |
|---|---|---|---|
| (a) unit / input BRAM ID | 5 | 0..19 | every sample |
| (b) channel within unit | 7 | 0..127 | when (a) wraps |
| (c) history slot | 4 | 0..15 | when (b) wraps |

`{a, b, c}` is the write address of the sample: (a) selects the unit's input
BRAM and `{b, c}` is the word address in it. The generator also produces a
16-bit **time stamp**. This is the number of complete rounds over all channels,
that is, the sample index of each channel; counter (c) is its low 4 bits. It
also produces a 12-bit **channel ID**, the sample's position in the round,
`b * 20 + a`. The first valid word after reset is taken as channel 0 of unit 0.

## Inside a reduction unit

```
            ┌──────────── input BRAM (128 ch x 16 samples) ◄── sample
            │                     │
            ▼                     ▼
   NEO: x[n]^2 - x[n-4]x[n+4]   16-sample copy / single samples
            │                     │
   threshold logic ◄─ threshold RAM      ▼
            │                   output FIFO (128 blocks x 48 words) ──► stream
            ▼                     ▲
   spike counter + base ROM ──────┘
            ▲
   bram_read_ctrl (FSM) reads / writes channel_status_ram
```

### The channel status and the four copy states

Every channel has a 15-bit status word. It holds 2 state bits and the 13-bit
output FIFO address of the channel's next record word. When a sample arrives,
the unit writes it into the channel's history slot in the input BRAM. The
controller then reads the status word and acts on the state:

| state | meaning | what the controller does with the incoming sample |
|---|---|---|
| `00` | no spike pending | reads x[n] and x[n-4] from the history (the new sample is x[n+4]) and computes NEO[n]. If NEO[n] is greater than the channel's threshold, it takes a 48-word block, writes the time stamp of x[n] and the channel ID to its first two words, and sets state `01` with the address of word 2 |
| `01` | header written | copies the whole 16-sample history, oldest first, to words 2..17: x[n-10]..x[n+5], where x[n+5] is the sample that just arrived. Then sets state `10` |
| `10` | AP samples 17..30 | writes the sample to the FIFO. Only the low 4 address bits step. After offset 15, the upper 9 bits step and the state becomes `11` |
| `11` | AP samples 31..46 | same. After the last sample the state returns to `00` and the block is *committed* to the output side |

The split into `10` and `11` works because every block starts at a multiple of
48, and 48 is a multiple of 16. So words 18..31 and words 32..47 of a block
each share their upper 9 address bits. While a record is being forwarded, the
channel is not tested for spikes. Spike detection resumes with the sample after
the record's last one, 32 sample periods after the detection.

The channel's history ring is exactly large enough for this. With x[n+4]
needed for the NEO, and one more sample arriving before the copy, the ring
holds x[n-10]..x[n+5] at the moment of the copy.

### Timing budget

Clocks from the arrival of a unit's sample until the controller is idle:

| procedure | clocks |
|---|---|
| warm-up sample | 2 |
| sample in state `10`/`11` | 2 |
| NEO test, no spike (training or detection) | 5 |
| NEO test with spike (header write) | 6 |
| 16-sample copy (state `01`) | 18 |

A unit receives a sample every 20 clocks, so the copy always ends in time.
This is the reason for 20 units of 128 channels. If a sample does arrive while
the controller is busy (only possible with fewer than 19 units), it is still
stored in the history but not processed. `ev_overrun` pulses, and an assertion
fires in simulation.

### Threshold training

The unit counts *rounds*; a round ends with the sample of its last channel.

1. **Warm-up**: 8 rounds. These fill the history so that x[n-4] and x[n-8] are
   real samples. They also clear every channel's status word, because the
   status memory is a plain RAM without reset.
2. **Training**: N = 2^`WIN_LOG2` rounds (default 128). Each channel's word in
   the threshold RAM holds the running sum of |NEO|. On the last round the word
   is replaced by `16 * (sum >> WIN_LOG2)`, that is, 16 x the mean deviation.
   Both the division and the multiplication are shifts.
3. **Detection**: a sample is a spike when NEO is strictly greater than the
   stored threshold.

`phase` shows which phase each unit is in. All channels of a unit go through
the phases together. The full-size platform is ready to detect
(8 + 128) x 2560 clocks after reset, about 4.4 ms at 80 MHz.

### Output FIFO and its emptying process

The output FIFO has 128 blocks of 48 16-bit words (6144 words, three 36-Kbit
block RAMs). This is enough for a record from every channel at once. The
*spike counter* names the next block to hand out, and a small ROM turns it into
the block's base address (block x 48). Blocks are handed out in detection
order. Every record takes the same 31 sample periods to complete, so records
also complete in that order. Each commit therefore simply raises the upper
limit of the emptying process by one block.

The emptying side reads committed words in address order, wrapping after block
127. It presents them on a valid/ready stream, one word per clock while
`ready` is high. `ap_first` marks a record's time-stamp word and `ap_last` its
last sample. A block is returned to the spike counter once its last word has
been read. If all 128 blocks are in use when a spike is detected, the spike is
dropped (`ev_drop`). The channel stays in state `00` and is tested again with
its next sample.

Record format (per output word):

| word | content |
|---|---|
| 0 | time stamp of the spike sample x[n] (16 bit) |
| 1 | channel ID (12 bit, zero-extended) |
| 2..11 | x[n-10] .. x[n-1] |
| 12 | x[n] |
| 13..47 | x[n+1] .. x[n+35] |

## Parameters

Defaults are in `rtl/nsd_pkg.sv` and on the modules.

| parameter | default | meaning |
|---|---|---|
| `NUM_UNITS` | 20 | reduction units. Must be at least 19 to meet the 18-clock copy |
| `CH` (`CH_PER_UNIT`) | 128 | channels per unit |
| `WIN_LOG2` (`MD_WIN_LOG2`) | 7 | training window N = 128 samples per channel |
| `FIFO_BLOCKS` | 128 | records per output FIFO (at most 170 with the 13-bit address) |
| `THR_MULT_LOG2` | 4 | threshold = 16 x mean deviation |
| `NEO_DELTA` | 4 | NEO offset |
| `SAMPLE_W`, `TS_W`, `CHID_W` | 16, 16, 12 | sample, time stamp and channel ID widths |

## What is fixed, and what this design chose

The following come from the architecture this RTL implements: the NEO with an
offset of 4; the 16-sample history; the four-state channel status with a
13-bit FIFO address split 9 + 4; the 46-sample waveform; the 48-word blocks;
128 blocks per FIFO; the spike counter with a base-address ROM; the
mean-deviation threshold with multiplier 16; the three-counter write address;
and the 16-bit time stamp and 12-bit channel ID. The architecture also calls
for 20 units of 128 channels, and a copy that takes about 19 clocks.

The following are this design's own choices:

* The training window length: N = 128.
* The 8 warm-up rounds, and clearing the status words during them.
* The time stamp is the per-channel sample index. The stored stamp is that of
  the spike sample x[n].
* The channel ID is the position in the TDM round.
* The first sample after reset is taken as channel 0.
* The threshold RAM holds the running sum during training.
* The valid/ready output stream with first/last flags. A block is released
  when it has been read.
* A spike found while the FIFO is full is dropped.
* The 18-clock copy, against the 19 clocks of the original design.
* The 33-bit NEO and the 39-bit threshold words.

Of the waveform's 35 post-spike samples, 5 travel in the 16-sample burst, so
only 30 are forwarded one at a time (states `10` and `11`).

## Not included

* **Multi-gigabit receiver.** This is the vendor transceiver: deserializer,
  8B/10B decoding, comma detection and word alignment. `nsd_top` expects its
  aligned 16-bit words on `rx_valid`/`rx_data`.
* **PCI Express bus-master DMA** to a host PC, or a spike sorter. The 20 output
  streams are where either one would connect. No arbitration between them is
  defined.
* The acquisition front end (amplifiers, ADC, multiplexer) and the host
  software.

## Files

| file | contents |
|---|---|
| `rtl/nsd_pkg.sv` | constants, channel-state and phase enums, status-word struct |
| `rtl/nsd_top.sv` | platform: address generator + `NUM_UNITS` units |
| `rtl/bram_write_addr_gen.sv` | three-counter address generator, time stamp, channel ID |
| `rtl/spike_reduction_unit.sv` | one 128-channel unit (wiring of the blocks below) |
| `rtl/bram_read_ctrl.sv` | the controller state machine |
| `rtl/input_bram.sv` | 128 x 16-sample history memory |
| `rtl/channel_status_ram.sv` | 128 x 15-bit status words |
| `rtl/threshold_ram.sv` | 128 per-channel sums / thresholds |
| `rtl/neo_preproc.sv` | two-multiplier NEO, 2-clock pipeline |
| `rtl/threshold_logic.sv` | comparator and mean-deviation threshold |
| `rtl/spike_counter_rom.sv` | block allocation: spike counter + base ROM + in-use count |
| `rtl/output_fifo.sv` | record memory and its emptying process |
| `tb/tb_nsd_model_pkg.sv` | reference model used by the unit and platform tests |
| `tb/tb_*.sv` | one self-checking testbench per module, plus platform tests |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_nsd_top_full rtl/nsd_pkg.sv tb/tb_nsd_model_pkg.sv tb/tb_nsd_top_full.sv
./obj_dir/Vtb_nsd_top_full
```

Replace the top module and file name for any other testbench. Leaf-block tests
need only `rtl/nsd_pkg.sv` and their own file.

| testbench | size | what it checks |
|---|---|---|
| `tb_nsd_top_full` | default platform, 20 x 128 channels | 260 rounds (about 700k clocks) of noise with spikes. Every record of all 20 streams is compared with the reference model; also thresholds, no drops, and each mechanism happening at least once. Runs in a few seconds |
| `tb_nsd_top_fr125` | default platform | the bench workload: each channel repeats a 160-sample window holding one spike (125 spikes/s at 20 kS/s). Every spike after training must lie inside a record of its channel, and the full output must match the model. Runs in about 10 s |
| `tb_nsd_top` | 20 x 8 channels, N = 8, 8-block FIFOs | as above, plus input gaps and back-pressure. Unit 0's output is left unread, so its FIFO fills and the drop count must match the model |
| `tb_spike_reduction_unit` | 8 channels | the unit against the model, with a 128-block and a 4-block FIFO; checks the 18-clock longest procedure |
| `tb_bram_read_ctrl` | 4 channels | each committed block; burst and single-sample write timing; address stepping |
| leaf tests | default sizes | memories, NEO (including extreme operands), threshold arithmetic, block allocation with wrap, FIFO order, flags, throughput, counters |

The reference model (`tb_nsd_model_pkg`) does not depend on clock timing. For
every channel it replays warm-up, training and detection on the whole sample
sequence, and predicts the exact sequence of output words for each unit.

## Limits of the verification

* Everything above has been simulated with Verilator (two-state) and
  elaborated with Yosys/slang. It has not been run on an FPGA or checked for
  timing. Whether it closes at 80 MHz is open. The NEO is registered after
  the multipliers and after the subtraction. In the following clock, the
  |NEO| sum or the threshold compare feeds the threshold-RAM write and the
  block allocation. That is the likely critical path.
* The stimulus is synthetic: uniform noise plus biphasic pulses. Behaviour on
  recorded neural data has not been evaluated.
* Detection quality (false and missed spikes) is not assessed. The tests show
  that the hardware matches the algorithm, not that the algorithm suits a
  given recording.
