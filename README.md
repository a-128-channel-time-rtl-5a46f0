# 128-channel shifted-clock-sampling TDC with trigger matching

This is synthesizable SystemVerilog for a 128-channel time-to-digital converter (TDC)
of the kind built into a single Virtex-5 FPGA on the GANDALF VME module. Each input is
sampled 16 times per clock period by flip-flops running on 16 equidistant clock phases.
At 388.8 MHz that gives a 160 ps bin. Each edge gets a time stamp and goes into a
per-channel hit buffer. For every trigger, only the hits inside a programmable time
window around the trigger are passed on. Those hits are gathered by groups of eight
channels and sent out as one word stream.

The architecture follows the published GANDALF TDC:
- 16 phases made from eight phase-shifted clocks and their inverted edges
- four overlapping partitions per sampling register
- per-channel hit buffer RAM, trigger matching unit and output FIFO
- "F1-blocks" of eight channels that each feed one S-Link FIFO
- the 16 S-Link FIFOs read one after another

The word format, the buffer depths, the synchronisation clocking and all the handshakes
were not specified. They are this implementation's own choices, and each is named below
and in the header comment of its file.

## Time base

- One **bin** is 1/16 of the sampling clock period.
- Every channel and the trigger unit hold a copy of a 12-bit **clock counter**. All
  copies leave reset on the same clock edge, so they always agree.
- A **time stamp** is 16 bits: `16*coarse + fine`. It wraps every 65536 bins, which is
  10.5 µs at 388.8 MHz.
- Time stamps are compared by their signed difference modulo 2^16. This is correct while
  the times being compared are less than 2^15 bins (5.2 µs) apart. Trigger latency plus
  window width must therefore stay below that. The trigger matching must also keep up:
  a trigger must be processed, and an idle channel's old hits deleted, within about
  5 µs. If not, stale hits look like future ones.
- The time of an edge is the bin of the **first sample that shows the new level**. An
  edge between sample instants `t0 + (m-1)*160 ps` and `t0 + m*160 ps` gets time `m`.
  Here `t0` is the clock edge on which reset was last seen.
- A trigger is time-stamped with clock-period precision. Its time is 16 × the count of
  the first clock edge that sampled it, so its fine part is 0.

## Sampling and the four partitions

`tdc_register` holds the 16 sampling flip-flops. Clock `clk_ph[k]` lags clock 0 by k/16
of a period:

| bins  | flip-flops                     |
|-------|--------------------------------|
| 0–7   | rising edges of `clk_ph[0..7]` |
| 8–15  | falling edges of `clk_ph[0..7]`, standing for the slice-local clock inversion |

The 16 outputs change at 16 different instants, so they cannot go straight into one
register. `partition_sync` reads them in four overlapping groups of five:

| partition | bins    | read by                 | time of read (period = 16) |
|-----------|---------|-------------------------|----------------------------|
| 0         | 0..4    | falling edge `clk_ph[2]` | 10                         |
| 1         | 4..8    | rising edge `clk_ph[0]`  | 16                         |
| 2         | 8..12   | rising edge `clk_ph[4]`  | 20                         |
| 3         | 12..16  | falling edge `clk_ph[0]` | 24                         |

Bins 0, 4, 8 and 12 sit on partition borders and are read into both neighbours. Bin 16
is bin 0 of the next period. Each read comes 6/16 to 8/16 of a period after the last
sample it takes, and before that sample is overwritten. A second stage on `clk_ph[0]`
aligns all four partitions. The partitions of period n appear together after clock-0
edge n+2. In silicon these paths rely on placement and timing constraints. The RTL only
fixes which edge reads what; the clock assignment is this design's own.

## Hit finding

`hit_finder` looks for transitions inside each partition: 0→1 for leading edges, 1→0 for
trailing edges. Each kind can be enabled on its own. A change between bit j and j+1 of
partition p gives

    t = 16*coarse + 4*p + j + 1

Each channel passes on at most one hit per clock period: the earliest enabled edge. A
second edge in the same period is dropped and `hit_lost` pulses. That edge is the end of
a pulse, or of a gap, shorter than about 2.6 ns. This one-hit-per-period rule is this
design's own. The hit is valid one clock after the partitions, and is written into the
hit buffer one clock later.

## Hit buffer and trigger matching

Each channel has a `hit_buffer`: a circular buffer of 512 hits (17 bits each) with a
one-clock synchronous read. The trigger matching unit owns its read side and its
head pointer. A hit that arrives while the buffer is full is dropped, and `overflow`
pulses.

`trigger_matching` works on the trigger at the head of the trigger FIFO, which has time
T. Its window is

    [T - latency, T - latency + width)

`latency` and `width` are in bins. For each trigger the unit does this:

1. It waits until the window has closed: `now - window_end > 64` bins. Here `now` is the
   time of the period the hit finder is looking at. The window may reach past the
   trigger when `width > latency`.
2. It walks the buffer from its oldest entry, at two clocks per entry:
   - hits older than the window start are **deleted** (head moves on);
   - hits inside the window are **copied** to the channel's output FIFO;
   - the first hit at or beyond the window end, or the end of the buffer, stops the walk.
3. Copied hits stay in the buffer, so a later trigger with an overlapping window sees
   them again.
4. It writes an end-of-event marker carrying T and raises `done`.

With no trigger waiting, the unit deletes hits older than `now - latency - 256`. The
256-bin margin covers the few clocks a trigger needs to reach the trigger FIFO. A full
output FIFO stalls the unit without losing data.

All 128 units work on the same head trigger. The top pops the trigger FIFO when every
channel is done and the readout has room for the event.

## F1-blocks and readout

`f1_block` holds eight channels, each with its own trigger matching unit and output FIFO
(256 × 18 bits). A merger copies each event into the block's S-Link FIFO (1024 × 32 bits):
an F1 header, then the data of channels 0..7 (each up to its marker), then an F1 trailer
with the count of data words.

`slink_readout` keeps a FIFO of triggers that have left the trigger FIFO. For each one it
sends an event header, then the S-Link FIFO of block 0 up to its F1 trailer, then block 1,
and so on up to block 15, then an event trailer. The output is a 32-bit stream with
`out_valid` and `out_ready`. `out_ready` plays the role of the link-full flag of a real
S-Link card.

Output words (bits 31:29 give the type). This layout is this design's own; a TDC-F1
compatible format would need its specification:

| type | word          | fields |
|------|---------------|--------|
| 000  | data          | channel [28:22], leading [21], time [15:0] |
| 001  | F1 header     | block [28:25], event [24:13] |
| 010  | F1 trailer    | block [28:25], event [24:13], data words [12:0] |
| 100  | event header  | event [28:17], trigger time [15:0] |
| 101  | event trailer | event [28:17], words in the event including header and trailer [16:0] |

Event numbers count accepted triggers from 0 after reset. A trigger that arrives while
the trigger FIFO (16 entries) is full is dropped and `trig_lost` pulses.

## Files

| file | contents |
|------|----------|
| `rtl/tdc_pkg.sv` | time and word types, word-building functions |
| `rtl/tdc_register.sv` | 16 sampling flip-flops |
| `rtl/partition_sync.sv` | four-partition read-out into the clock-0 domain |
| `rtl/hit_finder.sv` | edge search and time calculation |
| `rtl/clock_counter.sv` | coarse counter |
| `rtl/hit_buffer.sv` | per-channel hit buffer RAM |
| `rtl/tdc_channel.sv` | one channel: the five blocks above |
| `rtl/trigger_unit.sv` | trigger synchroniser, time stamp, trigger FIFO |
| `rtl/trigger_matching.sv` | window selection and hit deletion |
| `rtl/sync_fifo.sv` | FIFO used for the trigger, output, S-Link and event FIFOs |
| `rtl/f1_block.sv` | eight channels, matching, output FIFOs, merger, S-Link FIFO |
| `rtl/slink_readout.sv` | event builder over the 16 S-Link FIFOs |
| `rtl/tdc128_top.sv` | the complete 128-channel TDC |
| `tb/phase_clock_gen.sv` | simulation model of the PLLs: eight phase-shifted clocks |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level parameters: `N_BLK` = 16 blocks, `N_CH_BLK` = 8 channels per block,
`HB_DEPTH` = 512, `OUT_DEPTH` = 256, `SLINK_DEPTH` = 1024, `TRIG_DEPTH` = 16.
Configuration (`lead_en`, `trail_en`, `latency`, `width`) comes in on ports. In the real
module these would be registers written over VME.

The top's ports:
- **Clocks and reset:** `clk_ph[7:0]` (phase k lags by k/16 of a period; `clk_ph[0]` runs
  all logic after the sampling) and `rst` (synchronous to `clk_ph[0]`).
- **Inputs:** `din[127:0]` and `trig_in`.
- **Configuration:** `lead_en`, `trail_en`, `latency[15:0]` and `width[15:0]`.
- **Output stream:** `out_data[31:0]`, `out_valid` and `out_ready`.
- **Status pulses:** `hb_overflow_any`, `hit_lost_any` and `trig_lost`.
- **Activity:** `stall_any`, `hit_any`, `match_any` and `delete_any`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself after a fixed
time. The testbenches use a 2560 ps period, so a bin is exactly 160 ps. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_tdc128_top \
      -y rtl -y tb +libext+.sv -Irtl -Itb rtl/tdc_pkg.sv tb/tb_tdc128_top.sv
    obj_dir/Vtb_tdc128_top

Replace `tb_tdc128_top` with any other `tb_<module>` to test one block.

`tb_tdc128_top` runs the complete design at its default size: all 128 channels and 16
blocks. It builds in about two minutes and runs in about ten seconds. Random edges go to
every channel and triggers come at random phases. Every output event is checked word by
word against one built from the edges the testbench applied. The run goes through:
- both edge kinds, then leading only, then trailing only;
- overlapping windows;
- a burst of triggers that fills the trigger FIFO while the link is blocked;
- a hit buffer overflow under a long latency, then recovery.

It checks that each of these happened, along with partition-border hits and dropped
second edges. Output-FIFO stalls of the matching units are covered by `tb_f1_block` and
`tb_trigger_matching`. Those two use smaller FIFOs so the stalls come quickly.

## How far it can be trusted

- All blocks pass their testbenches, and each testbench fails on a deliberately broken
  copy of its block.
- The sampling and partition logic is checked in a two-state, zero-delay simulation.
  Metastability, routing skew and the bin-width non-linearity of real silicon are out of
  its reach. Placement and relative placement macros have no counterpart here.
- Generic synthesis gives about 27,600 flip-flop bits outside memories and 2.2 Mbit of
  memory. The published implementation used 43% of the flip-flops of an SX95T; the
  device has 8.7 Mbit of block RAM.

## Departures and open points

- **Data format.** The output format is not the TDC-F1 format. The F1-block / S-Link
  structure is kept, but the word layouts are this design's own.
- **One hit per period.** Each channel records at most one hit per clock period.
- **Matching speed.** Matching takes two clocks per hit and deletion two clocks per old
  hit. Under very high hit rates with long back-pressure, the time stamps can wrap
  before the hits are processed (see *Time base*).
- **Outside this code.** The PLLs, the LVDS mezzanine cards, the S-Link/Ethernet link
  card, VME access, the trigger-distribution receiver and the memory FPGA are not part
  of this code. The phase clocks come in as ports and the link is a valid/ready stream.
- **Clock domains.** One clock domain is assumed from the partition read-out onward,
  including the readout.
