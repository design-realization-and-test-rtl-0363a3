# CARLOSv3 readout chain: 2D zero suppression for silicon drift detectors

A silicon drift detector (SDD) half-module gives, per trigger, a picture of
256 anodes × up to 256 time samples of 8 bits: 64 KiB, nearly all noise. The
useful part is a few clusters, small groups of neighbouring pixels that stand
clearly above the noise. CARLOSv3 is a small radiation-tolerant chip that sits
next to the detector. It takes two such pictures at once, one per 8-bit
input channel and one sample per 40 MHz clock. It keeps only the pixels that
belong to clusters and packs them into 15-bit words. These go out as a 16-bit
word (15 data bits plus an enable bit) towards a serializer and an optical
link. A receiver card in the counting room controls the chip over a one-wire
**serial back-link** and a JTAG port. It also gathers the words of two chips
into a 32-bit stream for the data acquisition.

This repository holds synthesizable SystemVerilog for:

- the chip (`carlosv3`) and all its blocks;
- the receiver card's logic (`backlink_tx`, `rx_concentrator`);
- a top level, `daq_chain`, that wires two chips and one receiver card
  together.

The serializer, the optical link, the front-end hybrids and the DDL/DAQ
computer are outside the RTL. Their signals are ports of `daq_chain`.

```
 hybrids ──8b──┐                                                ┌── serializer/optical link ──┐
 (2 channels)  ├─► compressor_2d ─► event_encoder ─► FIFO ─┐    │                             │
           ──8b┘   (per channel, 2 row RAMs each)          ├─► output_mux ─► 15b + enable ─────┤
                                                           ┘                                  ▼
 trigger ─► event window per channel (gates the samples above)
 back-link bit ─► backlink_rx ─► RUN/JTAG mode, reset                              rx_concentrator ─► 32b
 JTAG ─► jtag_unit (config, BIST start/result) ─► jtag_switch ─► 3 downstream JTAG ports
                   bist_ctrl ◄──► the four row RAMs
```

## The two-threshold 2D compressor (`compressor_2d`)

This is the heart of the chip. Each sample is compared with two programmable
thresholds, low and high. A sample **survives** when:

- it is at or above the **high** threshold; or
- it is at or above the **low** threshold and at least one of its four
  neighbours is at or above the high threshold.

The four neighbours are the previous and next time sample on the same anode,
and the same time sample on the previous and next anode. Every other sample
becomes zero. Isolated noise spikes between the two thresholds are removed,
while the lower tails around a real peak are kept. The reset thresholds are
21 (low) and 26 (high). With these values, a published physics event of
256 × 200 samples shrank by a factor of about 26.

**Why it needs memory.** To decide sample (anode a−1, time t) the block needs
four values:

- the row before, a−2 at time t;
- the row after, a at time t;
- the samples just before and just after it on its own row.

Samples arrive anode by anode, so the block keeps the last two anodes in two
dual-port RAMs of 256 × 9 bits (`dpram_256x9`). Anode r is written into RAM
r mod 2. While anode a streams in, each step does three things:

- RAM (a−1) mod 2 gives the row being decided;
- RAM a mod 2 first gives anode a−2 at time t, then receives anode a at the
  same address (the RAM reads before it writes);
- a small register window holds the current and previous samples of row
  a−1.

Both RAMs share one read address. It is presented one clock ahead, because
the RAM output is registered.

**Timing.**

- The decision for (a−1, t−1) is made when sample (a, t) arrives.
- The last sample of an anode is decided when the next anode begins.
- The last anode has no successor. After its final sample, the block flushes
  it with zero input for `samples + 1` cycles, with `busy` high. Input that
  arrives during the flush is dropped and reported as `lost`.
- Decisions appear one cycle after the deciding step. They come in
  anode-major order, with their position (`dec_anode`, `dec_time`), a keep
  bit and the value.
- `ev_end` comes one cycle after the last decision.

The number of samples per anode is programmable (`samples_m1`, 1…255). The
number of anodes is the parameter `ANODES`.

**Parity.**

- Every RAM word holds the sample and an even-parity bit.
- Parity is checked on every RAM word that a decision uses. A mismatch
  pulses `parity_err`, which ends up in the event's trailer and on the chip's
  `err` pin.
- The BIST takes over the two RAMs through a side port. The testbench also
  uses this port to plant a bad parity bit.

## Trigger and event windows (`carlosv3`)

The chip follows an external trigger. A trigger pulse in RUN mode opens an
**event window** on each channel that has none open. The window lasts
exactly one event: `ANODES` × the programmed samples per anode.

- Samples outside a window are ignored.
- A trigger while a channel's window is still open changes nothing on that
  channel.
- Samples that arrive while a channel is still flushing its previous event
  go to the compressor, which drops them and reports them as lost. They do
  not use up the new window.
- The trigger must come at least one clock before the event's first sample.

A channel that received no samples for a trigger keeps its window open for
the next event.

## Packing into 15-bit words (`event_encoder`)

Only surviving samples are sent. A reader rebuilds the event by starting from
an all-zero picture and replaying the words. All words carry the channel
number in bit 14.

| bit 13 | bits 12:11 | payload | meaning |
|---|---|---|---|
| 0 | — | [12:8] run, [7:0] value | data: `run` zeros were skipped since the time pointer, then this value; the pointer moves past it |
| 1 | 00 ANODE | [7:0] anode | a new anode with surviving samples begins; time pointer := 0 |
| 1 | 01 JUMP | [7:0] time | the next sample is at this absolute time (used for gaps over 31) |
| 1 | 10 EVENT | [10:0] event number | start of an event |
| 1 | 11 TRAILER | [10:0] flags | end of an event; bit 0 RAM parity, 1 configuration parity, 2 FIFO overflow, 3 lost input |

One decision can need three words (ANODE, JUMP, DATA). The encoder therefore
writes 0–3 words per clock into the channel FIFO (`multi_write_fifo`, 64
words). The FIFO drops a write that does not fit whole, and signals
`overflow` in the same cycle. It keeps two places for EVENT and TRAILER words,
so an event is always closed even when data was lost. After a drop, the
encoder repeats the ANODE (and JUMP) words, so a reader loses only the
dropped samples and does not misplace the following ones.

## Output word (`output_mux`)

The two channel FIFOs share one registered output: 15 data bits and an enable
bit, at most one word per clock. When both FIFOs hold data they are served in
turn. Because each word carries its channel number, the two events can be
interleaved freely.

**Rate.** Each channel takes at most one sample per clock. At the compression
seen on physics data (about 1/26), a channel makes far less than one word per
sample, so the shared output has ample margin. An event with no zero
suppression at all makes one word per sample per channel. That is twice what
the output can carry, so the FIFO overflows, and the trailer says so.

Uniformly random 8-bit values are close to that worst case: about 90 % of
them pass the high threshold. One channel alone then needs about 0.96 output
words per input sample, which still fits. Two such channels at one sample per
clock do not fit.

## Control: the serial back-link (`backlink_rx`, `backlink_tx`)

The receiver card drives one bit per clock on the back-link. The words are
8-bit codes, sent MSB first:

| code | meaning |
|---|---|
| `BC` | IDLE |
| `53` | enter RUN mode |
| `35` | enter JTAG mode |
| `E1` | RESET |

Any other word is invalid.

The chip's synchronization state machine has three states.

**ACQ (acquire).** Entered at power-up, after RESET, or when the link is
lost. The receiver looks for IDLE at every bit position. The first IDLE fixes
the word boundary. Three more IDLEs in a row then enter SYNC. Any other word
restarts the hunt.

**SYNC.** Valid words keep the machine here. Instructions are obeyed only in
this state:

- RUN and JTAG set the mode.
- RESET pulses a reset of the whole chip logic except the link receiver, sets
  JTAG mode and returns the link to ACQ.

One invalid word moves the machine to CHECK.

**CHECK.** Four valid words in a row return to SYNC. Three invalid words
since entering CHECK, not necessarily in a row, count as a lost link and
return to ACQ. The mode is kept through a link loss.

`backlink_tx`, on the receiver card, sends IDLE whenever no command is
queued. It has a one-word queue.

## RUN and JTAG mode, configuration, switch and BIST

The chip is in exactly one mode at a time. It starts in JTAG mode.

- **RUN mode:** samples are processed. The JTAG TAP is held in
  Test-Logic-Reset.
- **JTAG mode:** the input channels ignore their inputs, and the TAP works.

**`jtag_unit`.** A standard 16-state TAP, clocked by the chip clock:

- TCK, TMS and TDI pass through two-flip-flop synchronizers, so TCK must be
  well below 40 MHz (the testbenches use clk/8).
- TDI is shifted on a rising TCK and TDO changes on a falling TCK.
- The 4-bit instruction register captures `0101`.

| IR | register | length | use |
|---|---|---|---|
| `2` CONFIG | configuration | 45 | five bytes, each `{parity, value}`, LSB first: ch0 low, ch0 high, ch1 low, ch1 high, samples per anode − 1 |
| `3` SWSEL | switch select | 2 | 0 = this chip only, 1/2/3 = chain the left hybrid / right hybrid / serializer after it |
| `4` BIST | BIST result | 8 | loading the instruction starts the BIST; the code reads back `00` never run, `33` running, `A5` pass, `E7` fail |
| `F` | bypass | 1 | |

Notes on the configuration register:

- The old contents shift out while new ones shift in, so every write is also
  a read.
- Parity bits are stored as written, not recomputed. A byte with a wrong
  parity bit raises `cfg_parity_err` for as long as it is stored. In RUN mode
  this error also goes into every trailer.
- Reset values are 21/26 on both channels and `SAMPLES − 1` samples.

**`jtag_switch`** (combinational) places the selected downstream port in
series after the chip's own TAP. Unselected ports see TCK low and TMS high.

**`bist_ctrl`** tests all four RAMs at once, in two passes. Each pass writes
every address, then reads every address back:

- pass 1 writes `55 ^ address`;
- pass 2 writes `AA ^ address`;
- every word is written with correct parity.

Every bit of every cell therefore holds both values. The result code is ready
`4·DEPTH + 3` clocks after the start, which is about 26 µs at 40 MHz.

## Receiver card (`rx_concentrator`) and the chain (`daq_chain`)

`rx_concentrator` takes the 15-bit streams of two chips and makes 32-bit
words:

- bit 31: card;
- bit 30: both halves valid;
- bits 29:15: first word;
- bits 14:0: second word.

A TRAILER word closes a half-full pair at once, so an event never waits for
the next one. Each card has a 16-word FIFO, and the two cards are served in
turn.

`daq_chain` holds two `backlink_tx` + `carlosv3` pairs and one
`rx_concentrator`. Each chip's output leaves on `card_out_*`. The receiver
takes words in on `link_in_*`. An ideal serializer and optical link is a
wire from one to the other, which is how the testbenches connect them. The
chips' JTAG ports and their downstream ports are top-level ports.

## Parameters

| name | default | where | meaning |
|---|---|---|---|
| `ANODES` | 256 | `compressor_2d`, `carlosv3`, `daq_chain` | anodes per half detector |
| `SAMPLES` | 256 | same | RAM depth = largest number of samples per anode; the actual number is a register |
| `FIFO_DEPTH` | 64 | `carlosv3`, `daq_chain` | per-channel output FIFO (power of two) |
| `FIFO_DEPTH` | 16 | `rx_concentrator` | per-card receiver FIFO |
| `DEPTH`, `WIDTH` | 256, 9 | `dpram_256x9` | RAM size |

Word layouts, codes and the configuration record are in `rtl/carlos_pkg.sv`.

## What follows the published chip, and what is this design's own

**Taken from the published description of the chip and chain:**

- two 8-bit input channels, one per half detector;
- 256 anodes × up to 256 samples per channel;
- 40 MHz operation;
- a 16-bit output made of 15 data bits and an enable bit;
- four dual-port 256 × 9 RAMs;
- two-threshold 2D compression, with thresholds 21/26 in the published test;
- parity checks on the configuration registers and the RAM data, reported
  as error flags;
- RUN and JTAG modes, exclusive of each other;
- a serial back-link that selects the mode and can reset the chip;
- the ACQ/SYNC/CHECK synchronization machine with its exact counts, with
  instructions decoded in SYNC;
- a JTAG switch to three downstream ports (left hybrid, right hybrid,
  serializer);
- a BIST started over JTAG whose result code appears on TDO;
- a receiver card serving two chips and giving 32-bit words;
- a chip that follows an external trigger.

**This design's own choices:**

- the exact neighbour rule (four neighbours, ≥ comparisons);
- the event window opened by the trigger;
- the row-buffer schedule and the flush at the end of an event;
- the 15-bit word format, and the restating of headers after an overflow;
- the FIFO depths and the reserved places;
- the back-link code values and the word length;
- the JTAG instruction codes, register layouts and oversampled TAP;
- the BIST patterns and result codes;
- the pairing format of the receiver's 32-bit word.

**Departures to know about:**

- The trigger's effect is this design's own: a fixed-size window of samples
  per channel. There is no trigger number and no busy handshake to the
  trigger system beyond the `busy` output.
- A whole event must arrive before the next one starts, as the flush needs
  `samples + 1` idle cycles.
- The input FIFOs and event buffering of a final system are not modelled.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/carlos_ref_pkg.sv` holds the independent software model used by the
testbenches:

- an event generator (noise plus random clusters);
- the 2D compression rule;
- an event reconstructor for the 15-bit word stream.

Plain verilator is enough. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/carlos_pkg.sv tb/carlos_ref_pkg.sv tb/tb_daq_chain.sv --top-module tb_daq_chain
./obj_dir/Vtb_daq_chain
```

(Verilator finds the other modules in `rtl/` by name.)

**`tb_daq_chain`** uses 16 anodes × 64 samples, with everything else at its
defaults. It drives every mechanism and fails if any of them never happened:

- link lock, CHECK and recovery, link loss, the RESET command;
- mode switches, samples without a trigger;
- configuration write and read-back, a configuration parity error;
- the JTAG switch, the BIST;
- four-channel events compared sample by sample with the model;
- a different anode length;
- a FIFO overflow and lost input.

**`tb_daq_chain_full`** runs at the full defaults (256 × 256), in about
15 seconds:

- one 256 × 256 event on all four channels;
- a reprogramming to 200 samples per anode;
- a 256 × 200 event on all four channels, the size of the published detector
  test;
- a 256 × 200 event of uniformly random values on one channel of each chip;
- a 256 × 200 event of gaussian-like values on all four channels.

Every event is checked against the model sample by sample.

**`tb_carlosv3`** tests one chip with a bit-level back-link driven by the
testbench itself.
