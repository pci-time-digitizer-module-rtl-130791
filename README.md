# Eight-channel 2.5 Gbit/s time digitizer: pulse processor RTL

This is a time-to-digital converter (TDC) that uses a multi-gigabit serial link as its time
base. It records when pulses arrive on eight detector inputs, to 0.4 ns, and does not lose
pulses on any channel at high rates. It was made for neutron time-of-flight measurements.

The idea: a 2.5 Gbit/s transmitter sends a known 40-bit frame every 16 ns. The frame goes
to eight fast logic gates, one per input channel. While a detector pulse is high, its gate
inverts the stream. Eight 2.5 Gbit/s receivers take back the stream, one per channel, and
each delivers one 40-bit word every 16 ns. Each bit of that word is the channel's input
sampled in one 0.4 ns slot. An FPGA undoes the known frame, finds every level change in the
words, and stores each one as a 64-bit time stamp. It then hands the time stamps to a DSP.

This repository holds that FPGA logic, written in SystemVerilog. It also holds the board's
small tag register. The analogue front end, the serial transceivers, the DSP and the
memories are not included; their signals are ports of the top module.

## How a time stamp is formed

```
time [55:0] (units of 0.4 ns) = frame_count x 40 + bit position in frame (0..39)
```

* `frame_count` is a 50-bit counter. It advances once per 16 ns frame and is shared by all
  channels (`time_counter`).
* `time_mult40` multiplies it by 40, using shifts and an add, to give 56 bits.
* The bit position is where the level changed inside the 40-bit frame. Bit 0 is the first
  bit in time.
* Each event gets a polarity bit: 1 for a rising level (the pulse's leading edge), 0 for a
  falling one.
* Each event gets a 7-bit tag: {channel number [2:0], external tag bits [3:0]}.

Event word, as read by the DSP:

| bits   | field                                   |
|--------|-----------------------------------------|
| 63:8   | time, 0.4 ns units                      |
| 7      | polarity (1 = rising / leading edge)    |
| 6:0    | tag: {channel[2:0], external tag[3:0]}  |

All channels refer to the same clock: the time at which the transmitter sent the frame.
A receiver's words can lag the transmitter by a different whole number of frames on each
channel, because each one's word boundary falls at a different point in the 16 ns cycle.
During the sync (see below) each channel measures that lag, and from then on it stamps a
frame with `frame_count x 40 - 40 x lag`. The rest of the pipeline delay (word aligner and
event detector) is the same everywhere. So differences between time stamps are exact to
one 0.4 ns step, within a channel and across channels. The absolute value carries a
constant offset of a few frames. The end-to-end testbench measures this offset once and
checks that every event on every channel has the same one.

The 50-bit counter wraps after 2^50 x 16 ns, about 208 days. The 56-bit field could hold
2^56 x 0.4 ns, about 333 days. The full span cannot be reached, because the counter is
50 bits wide.

## One channel

```
rx word (40b, every 16 ns)
  -> word_aligner         finds the frame boundary, output one clock later
  -> event_detector       XOR with the reference frame -> pulse level; prepend last bit of
                          previous frame -> 41 bits; if any level change: write
                          {time 56, level 41, tag 7} = 104 bits
  -> sync_fifo 511 x 104  receive queue, one write per frame at most
  -> edge_discriminator   one event per 125 MHz clock for each selected edge
  -> sync_fifo 511 x 64   EMIFA queue, read by the DSP
```

`tdc_channel` wires this chain together. The top module instantiates it eight times.

**Rates.** A frame holds at most 20 edges of one polarity: pulses 0.4 ns wide, 0.4 ns
apart. At one frame per 16 ns that is a peak of 1.25 Gevent/s per channel. The
discriminator emits one event per 8 ns clock, which is 125 Mevent/s. So during a burst the
backlog builds up in the receive queue, which holds 511 frames. A burst of 511 pulses at
the peak rate fits completely: it is 26 frames, and the EMIFA queue takes all 511 events.
At a steady 5 Mevent/s per channel the queues stay nearly empty, as long as the DSP keeps
reading.

**Back-pressure and loss.** When the EMIFA queue is full, the discriminator waits. Its
output is registered, so it counts its own pending write when it decides whether the queue
is full; this means the EMIFA queue never drops an event. Events are lost only when the
receive queue is full and another frame with an edge arrives. That whole frame (all of its
edges) is dropped, and the channel's overflow pulse fires. Dropped frames are always the
newest ones, and the events that are kept stay in order.

**Edge selection.** Control bits [5:4] choose what is stored: 01 leading edges, 10 trailing
edges, 11 both, 00 nothing. The receive queue takes every frame with a level change,
whatever this setting is. The selection is applied when the discriminator builds its mask.

## Finding the frame boundary

After power-up, a receiver's 40-bit words can start at any of 40 bit positions within the
transmitter's frames. Writing control bit 3 starts a sync, which `link_sync` runs:

1. It raises `override_inputs`. While this is high, the front end must pass the
   transmitter's stream through without pulses. It also switches `tx_word` to the sync
   frame `40'h3EB05AA955`, which no rotation other than zero reproduces.
2. Each `word_aligner` compares the 40 windows that end in its newest word against the
   sync frame. On a match it stores that offset and sets its `locked` bit.
3. When every enabled channel has locked, `tx_word` returns to the reference frame
   `40'hAAAAAAAAAA`. The override stays on for 8 more frames, so that sync frames still in
   flight are not taken for pulses.
4. If the channels have not all locked after 1024 frames, the sync gives up and sets the
   "sync failed" status bit.

While a sync is running, the channels write nothing.

**Receiver lag.** Each aligner also counts the frames from the start of the sync to its
first match and gives that count out as `latency`. All aligners start counting on the same
frame and the transmitter switches all channels to the sync frame at once, so the counts
differ only by how many frames each receiver lags. `tdc_channel` subtracts 40 x `latency`
from the time it stamps. Among the 40 offsets the aligner searches, it tries the one that
uses most of the newest word first, so a word that holds the whole sync frame is always
taken as such, never the older copy. This is what keeps time stamps comparable across
channels.

## DSP interface

The DSP's external memory interface (EMIFA, chip enable CE0) appears here as a synchronous
bus on the 125 MHz clock. A cycle is one clock with `emif_cs` and either `emif_rd` or
`emif_wr` high. Read data is on `emif_rdata` one clock later. Addresses count 64-bit words.

| address   | register              | access                                                 |
|-----------|-----------------------|--------------------------------------------------------|
| 0x00      | CONTROL               | read/write                                             |
| 0x01      | STATUS                | read; write 1 to a flag bit to clear it                |
| 0x02      | CURRENT TIME          | read; 56-bit time in 0.4 ns units                      |
| 0x03      | TEST                  | read/write scratch register                            |
| 0x08+n    | event queue, channel n | a read returns the oldest event and removes it        |
| 0x10+n    | fill count, channel n | read; number of events waiting                         |

CONTROL bits:

| bits | meaning |
|------|---------|
| [0]  | run: the time counter counts and enabled channels record |
| [1]  | clear the time counter; takes effect once, reads back 0 |
| [2]  | let the external start pulse clear the time counter |
| [3]  | start a receiver sync; takes effect once, reads back 0 |
| [5:4] | edge selection |
| [6]  | half-full interrupt enable |
| [7]  | overflow interrupt enable |
| [15:8] | channel enables |

STATUS bits:

| bits | meaning |
|------|---------|
| [7:0] | half-full flags |
| [15:8] | overflow flags |
| [23:16] | receivers locked |
| [24] | sync busy |
| [25] | sync failed |
| [31:26] | latched external tag |
| [39:32] | event queues not empty |

**Interrupts.** There are two interrupt lines, each gated by its enable bit.

* `irq_half` goes high when a channel's EMIFA queue reaches 256 of its 511 words. The
  flag is set on the rising edge of the half-full condition.
* `irq_ovf` goes high when a channel has dropped a frame.

Each line is the OR of sticky per-channel flags in STATUS. A suitable service routine:

1. Read STATUS.
2. Write the half-full bits back to clear them.
3. For each flagged channel, read its fill count, then read that many events (the test
   bench moves up to 256).

**Tag bits.** Six external tag inputs are captured by `tag_latch` on the rising edge of the
channel-8 input pulse. Inside the FPGA they pass through a two-flop synchroniser. Bits 3..0
go into every event's tag, and all six can be read in STATUS.

**External start.** With CONTROL[2] set, a rising edge on `ext_start` zeroes the time
counter at the next frame. This marks an absolute time reference. `ext_start` is
synchronised inside the design.

## Clocking and reset

There is one clock, the board's 125 MHz reference. The 62.5 MHz frame rate (one word per
16 ns) is a clock enable, `ce_word`, that is high on every second cycle. `clk_mgmt`
generates it. The board reset `rst_n` takes effect at once. It is released two clock edges
after it rises, through `clk_mgmt`'s synchroniser. The tag register is the one exception to
the single clock: it is clocked by the channel-8 pulse.

## Files

| file | contents |
|------|----------|
| `rtl/tdc_pkg.sv` | widths, frame patterns, queue entry and event structs, register map |
| `rtl/tdc_digitizer_top.sv` | top module: the eight channels, time base, sync, registers, interrupts |
| `rtl/tdc_channel.sv` | one channel's chain |
| `rtl/word_aligner.sv`, `rtl/event_detector.sv`, `rtl/edge_discriminator.sv`, `rtl/sync_fifo.sv` | the stages of a channel |
| `rtl/clk_mgmt.sv`, `rtl/time_counter.sv`, `rtl/time_mult40.sv` | the time base |
| `rtl/link_sync.sv` | transmitter frame choice and the receiver sync sequence |
| `rtl/emif_decoder.sv`, `rtl/emif_regs.sv`, `rtl/irq_logic.sv` | the DSP interface |
| `rtl/tag_latch.sv` | the board's 6-bit tag register |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |
| `tb/serial_link_model.sv` | word-level model of transmitter, gate and receiver, with a bit offset |
| `tb/bit_level_link_model.sv` | 2.5 Gbit/s bit-level model of the same path, with real pulse times in picoseconds |
| `tb/tb_timing_accuracy.sv` | whole design driven through the bit-level model; checks the 0.4 ns resolution |

Default parameters follow the numbers of the original design: 8 channels, 40-bit frames, a
50-bit counter, 56-bit time, 7 tag bits, 104- and 64-bit queue words, and a queue depth of
511. `tdc_digitizer_top` has `NCHAN` and `DEPTH` parameters if a smaller build is wanted.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. To build and
run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/tdc_pkg.sv tb/tb_tdc_digitizer_top.sv --top-module tb_tdc_digitizer_top -o sim
./obj_dir/sim
```

`tb_tdc_digitizer_top` runs the whole design at its default sizes in well under a second.
It checks about 34,000 events against a model built only from the stimulus. It covers:

* sync of eight channels, all with different bit offsets;
* both edges at random rates;
* a sustained 5 Mevent/s on every channel;
* leading edges only, then trailing edges only;
* a 511-pulse burst at 1.25 Gevent/s on every channel, with no loss;
* an overflow with its interrupt and flag clear;
* back-pressure from a full EMIFA queue;
* tag latching, counter clear, external start, and the test register.

The testbench counts each of these mechanisms and fails if one never happened.

`tb_timing_accuracy` drives the whole design through a bit-level model of the link. Each
channel's receiver starts its words at a different bit offset (0 to 39). Pulses come at
random picosecond times, with widths and gaps from 0.45 ns to 30 ns. The testbench checks
that every edge is found and that its time, relative to the first edge on channel 0, is
within one 0.4 ns step of the true value on every channel. The unit
testbenches check each module against its own reference model, for example:

* `tb_word_aligner` tries all 40 bit offsets;
* `tb_sync_fifo` runs at the full depth of 511;
* `tb_edge_discriminator` covers all four edge selections with random stalls, and
  measures the rate of one event per clock.

## Where this RTL makes its own choices

The original design gives the structure, the widths, the depths, the rates and the meaning
of the registers. The following are choices made here:

* **Bit order, frame patterns, sync sequence.** Bit 0 is the first bit in time. The frame
  contents were chosen here: the reference frame is 1010... and the sync frame is a
  rotation-unique 40-bit pattern. The sync state machine (request, lock, 8-frame guard,
  timeout) is also this design's.
* **Word alignment** is done in FPGA logic from the 40-bit words. In the original this is
  most likely done inside the serial receivers.
* **Undoing the reference frame.** The FPGA XORs each received word with the known frame.
  Only frames that contain a level change enter the receive queue.
* **Decode rate and back-pressure.** One edge is decoded per 125 MHz clock. When the
  EMIFA queue is full the discriminator waits, so loss happens only at the receive queue.
* **Tag layout.** The tag is {channel, external tag[3:0]}.
* **Register layout**, the fill-count registers, two separate interrupt lines, and
  write-one-to-clear flags.
* **Bus timing.** The EMIFA bus is modelled as a simple synchronous bus.

Not built:

* **Programmable resolution.** The original offers 16 steps from 0.4 to 2.0 ns, but does
  not say how; here the resolution is fixed at 0.4 ns.
* **Channel grouping** for finer resolution, for example eight channels at 0.4 ns giving
  50 ps.
* **Synchronisation of several boards.**
* **Everything outside the FPGA:** level converters, gates, transceivers, clock recovery,
  the DSP, SDRAM, flash and PCI.

## Known limits

* Time wraps after about 208 days (the 50-bit counter), not 333 days.
* The receive queue has no "almost full" warning. Its overflow interrupt only tells that
  loss has already happened.
* A read from an empty event queue returns whatever word is at the head; check the fill
  count or the not-empty bits first.
* The tag bits are captured in the channel-8 pulse's clock domain and brought across with
  a two-flop synchroniser. If a tag changes while it is being sampled, the 6 bits can be
  captured from different moments. Change tags only between pulses.
* The lag correction subtracts up to a few frames from the counter. A frame that arrives in
  the first frames after the counter is cleared therefore gets a time just below 2^56 (the
  subtraction wraps), not a small negative number. Treat times near 2^56 as negative.
