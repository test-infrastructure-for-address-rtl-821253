# AER test instruments: sequencer, monitor and mapper logic

Neuromorphic chips talk to each other with Address-Event Representation
(AER): every time a neuron or pixel fires, its address is put on a parallel
bus and handed over with a request/acknowledge handshake. Information lives
in *how often* and *when* each address appears, so the intervals between
events matter as much as the addresses themselves.

Building and debugging multi-chip AER systems needs three instruments:

* a **sequencer** that produces controlled synthetic event streams,
* a **monitor** that records what a chip emits, and
* a **mapper** that rewrites the stream between an emitter and a receiver.

This repository holds synthesizable SystemVerilog for the FPGA logic of two
such instruments, modelled on the CAVIAR PCI-AER and USB-AER boards:

* `usb_aer_core`: a stand-alone board with one AER input, one AER output, a
  512K x 32 SRAM bank and a microcontroller. It works as mapper (one event
  to one or to several events), as frame grabber (events counted per pixel
  over a frame period, shown on VGA or read by the host), as frame-to-AER
  sequencer (exhaustive or random method), and as recorder/player of
  timestamped event sequences.
* `pci_aer_core`: a host-attached board that timestamps every incoming event
  for the host and plays host-supplied timed events onto the AER bus.

`aer_tools_top` places both side by side. In a lab set-up they are chained by
AER cables, for example PCI sequencer -> chip -> USB mapper -> chip -> USB
monitor, and that is how the end-to-end testbench wires them.

## The AER port: handshake, synchronisation, back-pressure

Both directions use a four-phase handshake with active-high `req` and `ack`.
`aer_rx` and `aer_tx` sit between the handshake and an internal valid/ready
stream.

```
 data  ==X== address ==============X====
 req   ___/‾‾‾‾‾‾‾‾‾‾‾‾\________________
 ack   ________/‾‾‾‾‾‾‾‾‾‾‾‾‾\__________
```

* The handshake is asynchronous but the logic is synchronous. Every incoming
  protocol line (`req` at a receiver, `ack` at a transmitter) goes through two
  cascaded flip-flops (`aer_sync`) before it is used.
* The receiver samples the address when it sees the synchronised `req`. The
  emitter must have set the data up before raising `req`.
* The receiver has a single holding register. If the logic behind it has not
  taken the previous event, `ack` is simply not raised. The emitter is then
  blocked: it sees a slower receiver, and no event is ever dropped. The same
  holds along every path in the design: a full FIFO, a busy SRAM or a slow
  receiver downstream all end up delaying the emitter's `ack`.
* The transmitter drives the data one clock before it raises `req`. It keeps
  the data stable until `ack` is seen, and starts the next event only after
  `ack` has fallen.

**Cost per event.** With a partner that answers within a clock, an event
takes 6 clocks at a receiver and 8 at a transmitter, because of the
synchroniser latency on both edges. A target rate therefore sets the clock.
15 Mevents/s through both ports needs about 120 MHz on the AER-facing logic.

## Event words and the time base

A monitored or recorded event is a 32-bit word, `ts_event_t` in `aer_pkg`:

| bits  | field  | meaning                                          |
|-------|--------|--------------------------------------------------|
| 31:16 | `dt`   | time-base ticks since the previous event         |
| 15:0  | `addr` | AER address                                      |

The time is relative: each word holds an inter-event interval, not an
absolute time. A recorded stream can then be replayed without its clock
wrapping around. An interval longer than 65535 ticks saturates. A tick is a
one-clock strobe every `TICK+1` clocks (`tick_div` on the PCI side).

* `event_timestamper` counts ticks since the last event it accepted. It
  emits `{count, addr}` and restarts the count. The tick of the accepting
  clock counts toward the next interval.
* `event_player` does the reverse. Its output is not registered: it offers
  the head word's address once `dt` ticks have passed since the previous
  event was *taken* downstream. If the receiver holds an event back, the
  following intervals are measured from when that event actually left, so
  no interval is ever shortened.

So a stream recorded by one instrument and played by another reaches the
receiver with the same intervals, within one tick, as long as the receiver
keeps up. The end-to-end test checks this for a PCI sequencer feeding a USB
recorder whose playback feeds the PCI monitor.

## USB-AER logic (`usb_aer_core`)

### Functions and routing

The `CTRL` register selects one function at a time. The original board
loaded a different FPGA configuration for each function. Here they share one
netlist behind a mode register.

| mode      | AER in ->                                | -> AER out                             |
|-----------|------------------------------------------|----------------------------------------|
| `IDLE`    | blocked                                  | idle                                   |
| `MAPPER`  | `aer_mapper`                             | mapped events                          |
| `MONITOR` | `frame_monitor` (+ `vga_frame_out`)      | idle                                   |
| `SEQ`     | blocked                                  | `frame_sequencer`                      |
| `CAPTURE` | `event_timestamper` -> `event_store`     | idle                                   |
| `PLAY`    | blocked                                  | `event_store` -> `event_player`        |

When a function is not selected, its enable is low and its sequencing state
is reset. Counters and the stored data are kept.

### SRAM access

Every block reaches the SRAM through a `mem_req_t`/`mem_rsp_t` pair. A
request is accepted in a clock where `gnt` is high, and read data return with
`rvalid` exactly one clock later. The core registers the SRAM pins: the chip
sees the address during the clock after the request, and the data are taken
at the end of that clock. With the 12 ns part and board delays, this allows
a clock period down to about 15 ns.

Priority goes to the host first, then the VGA line fetch, then the active
function, which just waits.

Default memory areas (the functions are exclusive, so the areas may
overlap):

| words                 | use                                                    |
|-----------------------|--------------------------------------------------------|
| 0 .. 65535            | mapping table, first level (indexed by input address)  |
| any                   | mapping lists (pointed to by the table)                |
| 0 .. 16383            | sequencer frame (grey level in bits 7:0)               |
| 0x40000 / 0x60000 ... | monitor frame banks 0 and 1 (count in bits 7:0)        |
| 0 .. 524287           | recorded `{dt, addr}` words                            |

### Host bus (microcontroller side)

A request is `host_valid` with `host_we`, `host_reg` (1 = register,
0 = SRAM word), `host_addr` and `host_wdata`. It is always taken at once, and
read data come back on `host_rdata` with `host_rvalid` one clock later.

| reg | name   | access | content                                                       |
|-----|--------|--------|---------------------------------------------------------------|
| 0   | CTRL   | rw     | [2:0] mode, [3] one-to-several map, [4] random sequencer, [5] loop playback |
| 1   | TICK   | rw     | clocks per tick minus one                                     |
| 2   | FRAME  | rw     | monitor frame period in clocks (reset 1 000 000)              |
| 3   | SLICE  | rw     | minimum clocks per sequencer slice                            |
| 4   | CMD    | w      | [0] clear recording, [1] rewind playback                      |
| 5/6 | RXCNT/TXCNT | r | events through the AER input/output port                    |
| 7   | STATUS | r      | [0] playback done, [1] recording full, [2] displayed bank     |
| 8   | RECCNT | r      | words recorded                                                |
| 9   | MONFRM | r      | frames completed by the monitor                               |
| 10  | SEQFRM | r      | frames completed by the sequencer                             |
| 11/12 | MAPOUT/MAPIN | r | events produced/taken by the mapper                      |
| 13  | MONSAT | r      | pixel increments that hit the maximum level                   |
| 14  | SEQEVT | r      | events produced by the sequencer                              |

Load the SRAM (tables, frames) in `IDLE` mode. Give CMD clear/rewind
before you switch to `CAPTURE`/`PLAY`.

### Mapper (`aer_mapper`)

The input address indexes a table word at `TBL_BASE + addr`.

* **One-to-one** (`CTRL[3]=0`): the word is `[31] valid, [15:0] output
  address`.
* **One-to-several** (`CTRL[3]=1`): the word is `[31] valid, [26:19] n,
  [18:0] pointer`. The `n` words from the pointer onward hold the output
  addresses in bits 15:0, and they leave in order.

An input address with no valid entry, or with `n = 0`, produces nothing,
which also makes the mapper a filter. The mapper takes a new input event only
after the previous one is fully expanded. In one-to-one mode each event costs one SRAM read. In one-to-several mode
it costs the table read plus one read per output event.

### Frame monitor (`frame_monitor`): AER to frame

An AER stream turns into a frame by counting events per address over a frame
period. The pixel index is the low `PIX_W` bits of the address (14 bits:
128 x 128). One SRAM word holds one pixel, with a count that saturates at
255. Each event costs a read-modify-write of its word, three clocks in all.

There are two banks. One is counted into, while the other holds the last
complete frame, for the host (`STATUS[2]`) or the VGA output. When the frame
period ends:

1. the banks swap;
2. `mon_frame_done` pulses;
3. the new counting bank is cleared, one word per clock.

Events arriving during the clear are held off, which blocks the emitter for
16384 clocks at the default size. This is the one place where the monitor
disturbs the event timing on purpose.

### Frame-to-AER sequencer (`frame_sequencer`)

The goal: over one frame period, each pixel emits as many events as its
grey level `g`, spread as evenly as possible over the period. With `L`-bit
levels (`NLEV = 2^L`, 256 by default), the period is split into `NLEV`
slices, and each slice makes `NPIX` trials, each reading one pixel from
SRAM.

* **Exhaustive method.** In slice `k`, every pixel `p` is visited in address
  order. The pixel emits when
  `(k * g(p) mod NLEV) + g(p) >= NLEV`, that is, when the low `L` bits of
  `k*g` plus `g` carry. This is the carry sequence of a running sum that
  grows by `g` per slice. Over the `NLEV` slices it carries exactly
  `g(p)` times, at almost equal spacing. The hardware is one `L x L`
  multiplier and one `L+1`-bit adder.
  *Example (L = 4, g = 5):* the carries fall in slices 3, 6, 9, 12 and 15.
* **Random method.** Each trial draws a 32-bit maximal-length Galois LFSR
  (taps 32, 22, 2, 1). The low `PIX_W` bits give the pixel and the top `L`
  bits a threshold `r`. The pixel emits when `r < g(p)`. A pixel is drawn
  about once per slice and fires with probability `g/NLEV`, so it emits
  `g` events per frame *on average*. A pixel at 0 never fires. The events
  fall at random times, which is closer to a biological spike train.

A slice lasts at least `SLICE` clocks. This sets the frame rate:
`frame period >= NLEV * max(SLICE, 2*NPIX + stalls)`. Each trial costs two
clocks (read, evaluate), so at the default size a frame takes at least
8.4 M clocks. A slow receiver stretches the frame.

### Recorder and player (`event_store`)

In `CAPTURE` mode, incoming events are timestamped and written to
consecutive SRAM words. The 512K-word bank holds 524 288 events. When it is
full, `STATUS[1]` rises and the input blocks. In `PLAY` mode the words are
read back in order, one per two clocks at most, and paced by
`event_player`. `CTRL[5]` repeats the sequence. Without it, `STATUS[0]`
rises after the last word.

### VGA output (`vga_frame_out`)

In `MONITOR` mode the displayed bank is shown as a grey image, 2x zoomed,
in the top-left corner of a 640 x 480 screen. The timing is 800 x 525 pixel
clocks with active-low syncs, and one pixel every `PIX_DIV` (2) clocks,
that is, a 50 MHz core clock for a 25 MHz pixel clock. During the
horizontal blanking before each new frame row, the row's 128 pixels are
fetched into a line buffer (129 clocks out of 160 pixel clocks of blanking).
The visible line reads only that buffer.

## PCI-AER logic (`pci_aer_core`)

There are two independent paths, each with a 512-word FIFO toward the host
bus:

* monitor: `aer_rx` -> `event_timestamper` -> FIFO -> `mon_*` (host reads
  `{dt, addr}` words);
* sequencer: `seq_*` (host writes `{dt, addr}` words) -> FIFO ->
  `event_player` -> `aer_tx`.

The PCI target, its registers and the bus-mastering DMA are not included. The
FIFO ends, `mon_en`, `seq_en` and `tick_div` are the ports where they would
connect. If the host falls behind, the monitor FIFO fills and the AER input
stops acknowledging. Events are delayed but none is lost.

## Sizes and what fits

| parameter | default | meaning |
|-----------|---------|---------|
| `PIX_W` | 14 | pixel address bits (128 x 128) |
| `LVL_W` | 8 | grey-level bits (256 levels) |
| `REC_DEPTH` | 524288 | recorded events (the whole 512K x 32 SRAM) |
| `FIFO_DEPTH` | 512 | PCI-side FIFOs |

* A 128 x 128, 256-level frame fits in both the monitor and the sequencer.
  A 512K-event recording fits the SRAM.
* The event rate depends on the clock, at 6 to 8 clocks per event. 15
  Mevents/s needs about 120 MHz.
* A worst-case 128 x 128 imager at full brightness and 25 frames/s
  (~105 Mevents/s) or a chip above 40 Mevents/s cannot be followed at
  practical FPGA clocks. The instruments then slow the emitter instead of
  losing events.

## Choices made here

The original boards are described by their functions. The following are
choices made in this design:

* active-high `req`/`ack` and a four-phase handshake;
* a 16-bit address and a 16-bit relative timestamp, with saturation;
* all USB-board functions in one netlist with a mode register;
* the SRAM pin timing, the memory map and the host bus with its registers;
* the mapping table format and the dropping of unmapped addresses;
* double-buffered monitor banks with clear-on-swap, and 255 saturation;
* the exact exhaustive and random rules;
* the VGA mode, the zoom and the line buffer;
* the FIFO depth.

Not included:

* the PCI interface and bus mastering;
* the microcontroller, USB and MMC/SD (its bus is brought out as ports);
* the level shifters;
* the SRAM chip itself (a behavioural model is in `tb/sram_model.sv`).
* loading the FPGA configuration from MMC/SD or USB;
* frame-to-AER and AER-to-frame conversion on the PCI board. The original
  added these to that board as a final step. Here they exist only on the
  USB board, which has the SRAM they need.

The "uniform" frame-to-AER method, mentioned as another attractive method
in the original, is not built: the board offered only random and
exhaustive.

## Files

`rtl/` holds one module or package per file:

* `aer_pkg`: types, the `usb_mode_e` enum, the memory port structs;
* `aer_sync`, `aer_rx`, `aer_tx`: the AER ports;
* `event_timestamper`, `event_player`, `event_store`, `sync_fifo`: timed
  events;
* `aer_mapper`, `frame_monitor`, `frame_sequencer`, `vga_frame_out`: the
  USB-board functions;
* `usb_aer_core`, `pci_aer_core`, `aer_tools_top`: the instruments and the
  top level.

`tb/` holds a self-checking testbench `tb_<module>.sv` for each block, plus
these behavioural models:

* `sram_model`;
* `mem_port_model`, a memory behind one `mem_req_t` port that withholds its
  grant at random;
* `aer_emitter_model` and `aer_receiver_model`.

Each testbench prints `TB_RESULT checks=N failures=M`. `tb_aer_tools_top`
runs both instruments end to end at full size. It covers one-to-several
mapping, FIFO back-pressure, pixel saturation, frame swap, VGA display,
both sequencer methods, capture and playback, and counts each mechanism. It
takes about 20 s. `tb_demo_scenario` chains three instruments, each on its
own clock: a USB sequencer plays an image, a USB mapper rotates it by 90
degrees, and the PCI logic monitors the result. It checks that the host
receives the rotated exhaustive sequence event for event.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aer_tools_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/aer_pkg.sv tb/tb_aer_tools_top.sv
./obj_dir/Vtb_aer_tools_top
```

Replace the top module and file to run any other testbench. Block
testbenches override parameters to small frames (8 to 64 pixels) to stay
short. The simulator is two-state: everything the logic reads is reset, and
the models initialise their memories to zero.
