# AMBER MicroMegas readout ASIC — digital back-end

This is synthesizable SystemVerilog for the digital back-end of a 64-channel, trigger-less
readout chip for MicroMegas (and possibly straw) detectors. Each analog channel reports a
hit as three on/off signals:

- a timing discriminator (`out_t`, low threshold);
- a validation discriminator (`out_e`, high threshold);
- a peak detector (`peak`).

The back-end measures when the timing discriminator rises (time of arrival), when the
peak occurs and when the timing discriminator falls (time over threshold). It uses one
12-bit time stamp counter at 200 MHz that is shared by all channels. It keeps only hits
that crossed the validation threshold. It sends them off the chip as 32-bit words over one
or two 200 Mb/s serial links. There is no trigger and no time ordering inside a frame.
Order is restored only at frame level: a frame is one full turn of the time stamp counter
(4096 × 5 ns = 20.48 µs). Every hit is sent in the frame that its leading edge belongs to.

A 100 Mb/s command port reaches the channel, region and global configuration registers.
A reset input decodes commands from the length of its pulses.

```
 out_t/out_e/peak x64
        |
  channel x8 ──► region FIFO (8) ─┐        (x 8 regions)
        ▲                          ├─► round robin ─► 2 x 32 parity queues ─► frame builder ─► tx_unit ─► link[1:0]
        │ ts (12 bit)              ┘                                         ▲ ts, frame
  ts_counter ─────────────────────────────────────────────────────────────────┘
  control_unit  ◄── cmd_in / cmd_out ──►  cfg_req bus to regions, global registers
  reset_manager ◄── pon_rst_b, rst_sync ──► rst_n, tx_rst, glob_rst
```

The analog front-end sits outside this RTL. Its outputs and inputs are ports of `amber_top`:

- discriminators and peak detector: `out_t`, `out_e` and `peak`;
- per-channel trim DACs, mask and calibration enable: `ch_cfg`;
- region and global registers: `rcr` and `gcr`.

The CSA, shaper, DACs and pads are not modelled.

## Time base: time stamp and frames

`ts_counter` counts from 0 to 4095 at the master clock. An 8-bit frame number steps each
time the counter wraps. Both clear on the short synchronous reset (see below), so many chips
can be aligned at system level. The channels read `ts` directly. Because of the input
synchroniser, every stored time is the true edge time plus 2 cycles. This offset is the
same for the leading edge, the peak and the trailing edge, so it cancels in Pk and Te.

The time bin is 5 ns. A flat error over one bin has an r.m.s. of 5 ns/√12 ≈ 1.44 ns.

## Channel: one hit at a time

`channel` synchronises the three inputs with two flip-flops and runs a three-state
controller:

| state | event | action |
|---|---|---|
| IDLE | rising `out_t`, channel not masked | Leading edge ← ts, go to LEAD |
| LEAD | first rising `peak` | Peak found ← ts |
| LEAD | `out_e` high at any time | mark validated |
| LEAD | falling `out_t` | Trailing edge ← ts (Peak too if no peak came); validated → READY, else pulse `hit_discard` → IDLE |
| READY | `rd_ack` from region | → IDLE |
| READY | rising `out_t` | pulse `hit_lost` (channel is dead until read) |

The channel has two 12-bit configuration registers:

- Config 0 = `{cal_en, mask, DAC_ThE[4:0], DAC_ThT[4:0]}`;
- Config 1 = `{7'b0, DAC_If[4:0]}`.

Their decoded fields go out as the `ch_cfg_t` struct. The bit layout is this design's own.
The three 5-bit trims and the 2-bit mask/calibration-enable group are the chip's.

## Region: readout unit and data words

A `region` holds 8 channels. Every cycle, a round-robin arbiter moves one waiting hit into
the region FIFO, which has 8 entries by default. It acknowledges the channel in the same
cycle. The hit becomes the 31-bit data payload:

```
 30:28 Region | 27:25 Channel | 24:13 Le | 12:7 Pk | 6:0 Te
```

- `Le` is the 12-bit leading-edge time stamp.
- `Pk` is the peak time minus `Le`, and `Te` is the trailing-edge time minus `Le`. Both are
  in clock cycles, saturated at 63 and 127 (315 ns and 635 ns). The chip prints only the
  field widths. Sending differences is this design's reading of them.

Each word also gets an 8-bit frame tag. It is the current frame if `Le <= ts` at readout,
and the previous frame otherwise. This is correct while a hit is read out within 4096
cycles of its leading edge.

The region's configuration unit holds 16 region registers, and it forwards channel-register
writes to the right channel. Reads are combinational.

## Frames on the links (global readout)

`global_ro` takes one hit per clock from the 8 region FIFOs, in round-robin order, into the
64-cell global buffer. The buffer is two 32-cell queues, one for even and one for odd frame
numbers (see below). `frame_builder` turns the buffer output into a continuous word stream,
and `tx_unit` serialises it.

| word | bit 31 | 30:28 | 27:0 |
|---|---|---|---|
| header | 1 | 010 | ChipId[6:0], 13 zero bits, FrameN[7:0] |
| trailer | 1 | 101 | DataCnt[11:0], CRC[15:0] |
| sync | 1 | 000 | 1100 1100 1100 1100 1100 1100 1111 (word 0x8CCCCCCF) |
| data | 0 | payload above | |

For every frame number, the stream is: a header, then data words of that frame with sync
words wherever nothing is ready, then a trailer. Frames are never skipped. An empty frame is
a header, sync words and a trailer.

- `DataCnt` counts the data words of the frame.
- The CRC is CRC-16-CCITT (polynomial 0x1021, preset 0xFFFF). It covers the header and the
  data words, bit 31 first.

**Closing a frame.** This is the hardest part of the design. Hits arrive in the order
their pulses end, not in time order. A hit of frame F can still be inside a channel, or in
a region FIFO, after the counter has started frame F+1. Meanwhile, short pulses of frame
F+1 are already arriving. Two mechanisms deal with this.

- **Parity queues.** The global unit stores each hit in the queue of its frame tag's parity.
  The frame builder reads only the queue of the frame it is sending (`tx_frame`). Hits of
  frame F+1 therefore wait in the other queue. They never stand in front of a late hit of
  frame F. A full queue holds back only the regions whose next hit belongs to it.
- **Guard time.** The frame builder keeps frame F open until the counter is at least `GUARD`
  cycles (default 256 = 1.28 µs) into frame F+1, or further, and the head of F's queue is
  not a hit of F. Then it sends the trailer and moves to the other queue.

A hit of an already closed frame is dropped without being sent (`late_drop`) when it
reaches the head of its queue. That queue is read again two frames later. Such a hit is one
whose pulse stayed over threshold for more than `GUARD` cycles past the frame boundary, or
one held up by a long overload. At the detector rates below, no hit was dropped.

The end-to-end test forces one late hit with a 520-cycle pulse. It requires every missing
hit to be explained by a late drop. A larger `GUARD` trades latency for fewer drops.

**Links.** `tx_unit` sends one bit per clock, most significant bit first. In one-link mode,
it asks for a word every 32 cycles and `link[1]` stays low. In two-link mode, it asks again
16 cycles later for link 1, so consecutive words alternate between the links. A receiver
finds word boundaries from the sync word. The link mode is bit 0 of global register 0.

Throughput at the defaults:

- one link: 128 words per frame, which is about 6.15 M hits/s after the header and trailer;
- two links: 256 words per frame, about 12.4 M hits/s.

## Slow control

`control_unit` runs both serial lines at half the clock rate, one bit every 2 cycles. A
frame is a start bit `1` followed by 16 bits, MSB first. The line idles at 0. Bits [15:12]
are the command code and bits [11:0] the operand:

| code | command | operand |
|---|---|---|
| 1101 | chip select | `01 aB a6..a0 00`: selected if aB (broadcast) or the address matches; any other address deselects |
| 0000 | chip deselect | — |
| 0100 | register select | `0000 r2r1r0 0 c2c1c0 a0` channel register a0 of channel c, region r; `0000 r2r1r0 1 a3..a0` region register; `0001 0 a6..a0` global register |
| 0101 | register write | d11..d0 |
| 0110 | register read | answers `1000 d11..d0` on `cmd_out` |
| 1111 | no operation | — |

Commands other than chip select and deselect act only while the chip is selected. There are
8 global registers by default (`N_GCR`). Only bit 0 of register 0 (two links) has a meaning
inside the back-end. The rest go out on `gcr` for the analog side.

## Resets

- `pon_rst_b` is an asynchronous, active-low power-on reset. It is released through a
  2-flop synchroniser.
- `rst_sync` is sampled on the clock, and its pulse length selects the action. It takes
  effect in the cycle after the pulse ends.

| pulse length | action |
|---|---|
| 1 cycle | ignored |
| 2 cycles | reset the time stamp and frame counters, the frame builder and the link serialisers; buffered hits stay |
| 3 cycles | ignored |
| 4 or more cycles | global reset of all digital state, configuration included (time stamp reset too) |

After a 2-cycle pulse, the counter restarts from 0 a fixed number of cycles after the end
of the pulse. All chips given the same pulse therefore restart their time stamps together.

## What follows the chip and what is this design's own

These parts follow the published description of the chip:

- 64 channels in 8 regions of 8;
- a 64-cell global buffer;
- a 12-bit time stamp at 200 MHz, with frames of one counter turn;
- the four word formats;
- one or two 200 Mb/s links;
- the command codes and operand fields;
- three data and two configuration registers per channel, with 5/5/5/2-bit trim fields;
- the pulse-length reset.

These are choices of this design:

- the channel state sequence and the rule for a missing peak;
- Pk and Te as saturated differences from Le;
- round-robin arbitration in the regions and in the global unit;
- an 8-entry region FIFO;
- the split of the global buffer into two frame-parity queues;
- frame tagging and the frame-closing rule with `GUARD`;
- the CRC polynomial and its coverage;
- the link word dealing and bit order;
- the serial framing of the command port;
- the number and meaning of region and global registers;
- the Config 0/1 bit layout;
- the 2-flop synchronisers.

Known limits:

- A channel is dead from its leading edge until it is read out.
- A hit whose pulse outlasts `GUARD` past a frame boundary is dropped.
- With one link, a frame holding more than about 126 hits makes the transmitted frame
  number fall behind the counter. The following frames catch up once the rate drops.
- The optional delay-line interpolator for sub-clock resolution is not included.

## Files

`rtl/` holds one module or package per file:

- `amber_pkg` — constants, structs and the CRC function;
- `sync_fifo` — a generic show-ahead FIFO;
- `ts_counter`, `reset_manager`, `channel`, `region`, `frame_builder`, `tx_unit`,
  `global_ro` and `control_unit`;
- `amber_top`.

Parameters of `amber_top` are `REGION_FIFO_DEPTH=8`, `GLOBAL_FIFO_DEPTH=64`, `N_RCR=16`,
`N_GCR=8` and `GUARD=256`.

`tb/` holds a self-checking testbench per module (`tb_<module>`). Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog. `link_rx` is a helper receiver
that locks to the sync word. `tb_amber_top` runs the whole chip at default parameters. It:

- configures it over the command port;
- drives random pulses on all 64 channels;
- decodes both links;
- checks every word against a model of the expected hits;
- switches between one and two links;
- exercises both reset lengths.

It counts every mechanism that occurs: data, discarded and masked hits, lost hits, full
region and global FIFOs, late drops and register read-backs. It fails any mechanism that
never occurred.

`tb_workload_rate` runs the whole chip at the rates of the detector specifications, with
Poisson arrivals and 40 to 100-cycle pulses. It decodes both links and checks every frame's
numbering, count and CRC.

| scenario | offered | links | result |
|---|---|---|---|
| MicroMegas, 2 MHz per chip | 2 M hits/s | 1 | every hit received, none lost or dropped |
| straw tubes, 0.18 MHz per channel | 11.5 M hits/s | 2 | ~235 data words per frame, every hit received |
| MicroMegas, 2 MHz per channel | 127 M hits/s | 2 | links saturated at 254 data words per frame (12.4 M hits/s); ~90 % lost in busy channels |

The test accounts for every generated hit. Each one is received, lost in a busy channel,
or dropped late.

Simulate with Verilator 5 from the project root, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_amber_top \
  -y rtl -y tb +libext+.sv rtl/amber_pkg.sv tb/tb_amber_top.sv -o sim
./obj_dir/sim
```

Substitute any other `tb_<module>` for the other tests. Each runs in seconds. The
testbenches read no files.
