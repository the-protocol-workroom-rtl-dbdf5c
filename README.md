# Protocol Workroom: a channel emulator and 32 programmable network controllers

This is the RTL of an experimental 10 Mb/s network built for protocol research. There are no
real cables, transceivers or line codes. Each of 32 node emulators plugs into a central,
all-digital **channel emulator**. The emulator decides, under program control, who hears whom,
how long each signal takes to arrive, and which links are faulty. So one set of hardware can be
rewired in software as a bus, a folded bus, a ring, a double ring, a star, a tree, a radio
network or point-to-point links. Its delays are long enough to stand for hundreds of kilometres
of cable.

Each node emulator has an **intelligent network controller**. It does every bit-level job of a
link-layer protocol in hardware, so that the controller's processor does not have to:

- DMA with CRC insertion and checking;
- pattern recognition;
- cut-through forwarding with on-the-fly editing;
- timers;
- a table-driven state machine that steps once per bit;
- time-stamped event records for monitoring;
- a TDMA port that joins up to eight controllers into one multi-port switch.

The processors are not part of this RTL. That covers the controller's 68020, the 68010 host
board, and the workstations that configure the emulator. Their sides appear as plain register
and memory ports.

## One clock, one bit

Everything runs on a single clock, and **one clock period is one bit time** (100 ns at
10 Mb/s). Each serial stream between a node and the emulator is a 4-field symbol per clock
(`pw_pkg::sym_t`):

| field     | meaning                                                        |
|-----------|----------------------------------------------------------------|
| `timing`  | a bit is present in this clock (the transmit/receive timing line, modelled as a strobe) |
| `carrier` | the sender is actively transmitting                            |
| `cv`      | code violation: an out-of-band symbol, as Manchester violations are used |
| `data`    | the data bit                                                   |

In this model, one bit time of propagation is 20 m of cable. A delay setting `d` therefore
stands for `(d+1) × 20 m`.

## The channel emulator

```
 node p ──► tap block p ──► tap outputs 2p, 2p+1 ──► 64 × (64:1 mux) ──► delay cell i
        ◄── (clock arbitration,                                            │
             feedback, collision                                    fault injector i
             detection, global time)                                       │
 node p ◄── tap block p ◄── tap inputs 2p, 2p+1 ◄── 64 × (64:1 masked OR) ◄┘
```

*Tap blocks* (`ce_tap_block`). Each node port has one tap block with two directions, 0 and 1,
for example the "right" and "left" of a bus. Each direction has an output into the fabric and
an input from it. Per direction, a tap can:

- **pass** what arrives on its input on to its output, like a repeater on a bus;
- **inject** the node's own transmission onto that output;
- **receive** that input.

A **feedback** bit lets the node hear itself. These four switches are enough to build the
topologies:

- *Bus.* Every tap passes and injects both ways, and the links run between neighbours.
- *Unidirectional ring.* Each tap injects on one direction only. Passing is left to the node,
  through its cut-through path.
- *Folded bus.* Links run from the end of one direction back into the other.

The received data, code violation and carrier are the OR of everything the node hears. Each
direction's carrier is reported separately (two carrier pins), which is what directional sense
needs.

- *Clock arbitration.* The receive timing is taken from direction 0 if it has carrier, else
  from direction 1, else from the node's own feedback.
- *Collision detection.* Two schemes run at once:
  - `cd_carrier`: the node transmits while hearing carrier, or carrier arrives from both
    directions;
  - `cd_data`: the node sends a 0 while hearing a 1, which is bit-wise arbitration.

*Mux array* (`ce_mux_array`). Any of the 64 delay cells can take its input from any of the
64 tap outputs.

*Delay cells* (`ce_delay_cell`). Each cell is a 1024-entry circular buffer. Setting `d` delays
the stream by `d+1` clocks, from 20 m to 20,480 m in 20 m steps. After a reset, or a change of
setting, the output stays idle until the buffer holds enough history. So a fresh setting never
replays stale bits.

*Fault injectors* (`ce_fault_injector`). Each delay cell output passes through one fault
injector, with one register stage. The modes are `pw_pkg::fault_t`:

- none;
- open (nothing arrives);
- jam (carrier and data stuck at 1);
- invert data;
- random bit errors at `rate/256` per bit, from a 16-bit LFSR;
- every bit a code violation.

Faults can be changed while traffic flows.

*Masked-OR array* (`ce_masked_or`). Each of the 64 tap inputs is the OR of any set of delay
cells, chosen by a 64-bit mask:

- One bit set makes a plain switch.
- Several bits set give a broadcast medium in which simultaneous senders corrupt each other:
  the radio topologies.

*Global time* (`ce_global_time`). The emulator sends every port a global time clock, one
strobe every `GT_DIV` = 10 bit times. It also sends a reset pulse whenever the host writes the
sync register. This time base is independent of the receive timing.

**Link latency.** From a node's transmit port to another node's receive port, a link takes
`setting + 2` clocks: the delay cell plus the fault register. The tap and OR logic are
combinational.

**Configuration map** (`channel_emulator`, word addresses on `cfg_*`):

| address          | contents                                                      |
|------------------|---------------------------------------------------------------|
| `0x000 + i`      | source of delay cell i (tap output number 2p+d)                |
| `0x040 + i`      | delay setting of cell i                                        |
| `0x080 + i`      | fault of cell i: [2:0] mode, [15:8] error rate                 |
| `0x100 + 2o + w` | mask bits 32w..32w+31 of tap input o                           |
| `0x180 + p`      | tap block p: `tap_cfg_t` {pass[2], inject[2], rx_en[2], feedback} |
| `0x1FF`          | any write: global time reset to all nodes                      |

After reset, all ports are isolated.

## The network controller

`network_controller` is one node's controller, minus its processor. Its parts:

- **Dual-port RAM** (`nc_dpram`, 8 KB). One port goes to the host (the `hp_*` pins, which
  stand for the P2 bus). The other goes to the DMA.
- **DMA** (`nc_dma`). It has one transmit channel and one receive channel. Each channel is
  programmed with a start pointer and an inclusive end pointer, and then started. It reports
  completion and can be aborted at any time without damaging the RAM. The receive channel
  records:
  - the byte count;
  - the CRC result;
  - overflow, when a frame is longer than the buffer.
- **Transmitter and receiver** (`nc_transmitter`, `nc_receiver`). Bytes go out MSB first, one
  bit per clock, under carrier. Each side has its own CRC generator (`nc_crc32`), which:
  - uses the Ethernet polynomial 0x04C11DB7;
  - is preset to all ones;
  - shifts MSB first, without final inversion.

  The transmitter appends the CRC. The receiver accepts a frame whose residue is zero, whose
  length is a whole number of bytes, and which has at least 32 bits. When it has no packet,
  the transmitter can forward a cut-through stream instead. It can also send single
  code-violation symbols.
- **Pattern recognizer** (`nc_pattern_recognizer`). It watches 4 patterns at once. Each is up
  to 32 bits long, with a mask that sets the length. A pattern is either *free-running* (tested
  at every bit) or *anchored* (tested only when the bit index reaches its programmed end
  position). Anchored patterns let one recognizer pick out several known fields, such as
  aliases or group addresses, in the same frame. There are two banks of pattern settings.
  Each state of the state machine names the bank to search while it is in that state, so a
  conditional branch of the table changes the patterns from the next bit on. Bank 0 is used
  while the state machine is stopped.
- **Delay line and editor** (`nc_delay_editor`). The received stream is delayed by a
  programmable number of bits, up to 1024. While it is delayed, the editor may overwrite
  masked bits of a 16-bit window at a programmable bit offset. The result feeds the
  transmitter, which gives ring repeaters, forwarding with field rewriting, and cut-through.
  The latency is `setting + 2` clocks.
- **Timers** (`nc_timers`). Four 16-bit down-counters at the bit rate. A timer expires
  `load + 1` clocks after it is started, and raises an interrupt.
- **Time clock** (`nc_time_clock`). It counts global time strobes and clears on the global
  reset, so every controller holds the same value.
- **Event FIFO** (`nc_event_fifo`, 64 records). A record is {32-bit time stamp, 16 event
  bits}. Events that happen in the same clock share a record. A suppress mask drops event
  classes, and a record with no unsuppressed bit is not written. A record that arrives when the
  FIFO is full is lost and sets an overflow flag. The event bits (`pw_pkg::EV_*`) are:
  - transmit start and done;
  - receive start and end;
  - CRC error;
  - collision;
  - the four pattern matches;
  - timer expiry;
  - state machine event;
  - receive overflow;
  - code violation;
  - two events written by software.
- **State machine** (`nc_state_machine`). It has 64 states, and each state has one table entry
  `sm_entry_t {sel, next_t, next_f, resp_t, resp_f}`. Every clock, the machine:
  1. tests the one stimulus that `sel` names, out of 16 (carrier, collision, end of frame,
     CRC good, each pattern, transmit done, timer, a host flag, code violation, each direction's
     carrier, constant one);
  2. moves to `next_t` or `next_f`;
  3. pulses the matching response lines.

  The response lines are: start transmit, abort transmit, arm receive, abort receive, start
  timer 0, send a code violation, post an event, interrupt. The state machine makes decisions
  but does no arithmetic.
- **P3 port** (`nc_p3_port`). See the next section.

**Register map** (`cpu_*`; the read data is combinational):

| address | contents |
|---|---|
| `0x00` | command pulses: [0] transmit go, [1] transmit abort, [2] arm receive, [3] receive abort, [4] state machine to start state, [5] pop event record, [6] clear event overflow, [7] send code violation, [11:8] start timer k, [15:12] stop timer k, [19:16] acknowledge timer k, [21] clear state-machine interrupt, [22] clear DMA done flags |
| `0x01` | mode: [0] append CRC (default on), [2:1] cut-through source (0 none, 1 delay-line editor, 2 P3), [3] editor on, [4] state machine run, [5] host flag, [11:6] start state |
| `0x02`–`0x05` | transmit start/end, receive start/end pointers |
| `0x06` | status: [0] tx DMA active, [1] transmitter busy, [2] rx DMA active, [3] rx overflow, [4] rx CRC ok, [5] event FIFO empty, [6] event overflow, [11:8] timers expired, [15:12] patterns seen, [21:16] state, [22] state-machine interrupt, [23] tx done, [24] rx done, [25] pattern bank in use |
| `0x07` | bytes received |
| `0x08+k`, `0x0C+k`, `0x10+k` | pattern k: value; mask; [15:0] end index, [16] enable, [17] anchored |
| `0x14`, `0x15`, `0x16` | delay-line setting; edit offset; edit mask [31:16] and value [15:0] |
| `0x18+k` | timer k load value |
| `0x1C`–`0x1F` | event suppress mask; oldest record's time stamp; its event bits ([31] = not empty); record count |
| `0x20` | write: software events |
| `0x21`–`0x27` | P3 transmit routes, receive routes, receive lane selects (2 words), RAM-side byte out, RAM-side byte in, global time now |
| `0x28+k`, `0x2C+k`, `0x30+k` | pattern k of the second bank, laid out as `0x08`–`0x13` |
| `0x100+s` | state machine table entry s |
| `0x140+s` | [0] pattern bank searched in state s |

`cpu_irq` is raised by a timer expiry, by a state-machine interrupt response, or by a finished
DMA transfer.

## Multi-port nodes and the P3 bus

Up to eight controllers can be joined into one multi-port node emulator, which can work as a
switch or a gateway. They share a 64-bit P3 bus, and each controller owns one 8-bit lane of it.

Each controller's 10 Mb/s stream is cut into 8-bit frames. Bit k of each frame is *slot k*, a
1.25 Mb/s channel. Once per frame, a controller puts its eight outgoing slot bits onto its lane.
So the bus changes at 1.25 MHz but is sampled at the bit rate, for 8 × 10 = 80 Mb/s in all.

Each slot has its own routing, which is the time-slot interchange:

- **Transmit route:** ignore, from the message RAM, or from the transceiver (the received
  stream).
- **Receive route:** ignore, to the message RAM, or to the transceiver (forwarded into the
  transmitter).
- **Lane select:** which of the 64 bus bits the slot takes on receive.

These settings give circuit switching at multiples of 1.25 Mb/s, and cut-through packet
switching, over the same bus. Data crossing the bus takes one frame (8 clocks) of latency.

The message-RAM side of a slot is a byte register: the host writes it at `0x25` and reads it
at `0x26`. It is not a DMA channel.

In `protocol_workroom_top`, each P3 bus joins a group of 8 controllers: nodes 0–7, 8–15, and
so on. While no slot is routed, which is the reset state, every controller is an independent
single-port node.

## How far it follows the source design, and where it departs

Taken from the source design:

- 32 node ports, each with the signal set of its port connector;
- the emulator's fabric, with its sizes: 64 (64:1) muxes, 64 delay cells and 64 (64:1) masked
  ORs;
- delays in 20 m steps over about 20 km;
- real-time fault insertion;
- several collision-detection schemes;
- global time distribution;
- the list of controller functions;
- two separate CRC generators;
- DMA driven by start pointer, end pointer and an initiate command;
- 4 patterns searched at once, both free-running and anchored, and patterns that change
  with the state machine's conditional branches;
- a delay line and editor between receiver and transmitter;
- time-stamped event records with suppression, and several events in one record;
- a per-bit stimulus/response state machine;
- the 64-bit P3 bus with one byte lane per controller and per-slot routing, for up to 8
  controllers.

Choices of this design, where the source gives only the function:

- the symbol encoding and the timing strobe;
- the tap switches and the clock-arbitration priority;
- the two collision rules;
- the fault kinds;
- the CRC polynomial and bit order;
- RAM, delay-line, FIFO, timer and state-table sizes;
- the state-machine table format and its stimulus and response lists;
- the editor's window form;
- two pattern banks, with one bank bit per state;
- every register map and reset value;
- the P3 slot numbering and lane order;
- the grouping of 32 controllers into four P3 groups.

Departures and omissions:

- The shortest link is 20 m (one bit time), not 10 m. Delays are whole bit times.
- The processors, the host and master computers, the Multibus/P2 attachment and the P4 bus
  between controllers are not built. The source only names the P4 bus.
- The P3 message-RAM side is a register, not a DMA channel.
- There is no preamble or start delimiter: a frame is the interval during which carrier is on.

Verilator reports `rst_n` as used both synchronously and asynchronously. The only
"synchronous" use is the `disable iff` of the event FIFO's occupancy assertion. All flops reset
asynchronously.

## Simulating

Each block in `rtl/` has a self-checking testbench, `tb/tb_<module>.sv`. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog. With plain Verilator 5, from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb -Irtl --top-module tb_nc_dma \
          rtl/pw_pkg.sv tb/tb_nc_dma.sv -o sim
./obj_dir/sim
```

Most block testbenches use small parameters, such as a 16-deep delay cell or a 4-port
emulator. **`tb_protocol_workroom_top` runs the whole design at its default size**: 32
controllers, 64 delay cells of 1024 steps, and P3 groups of 8. It takes about two minutes to
build and run. It builds a 4-node bidirectional bus and checks the following:

1. **Delivery.** A packet arrives with a good CRC and the right byte count at every other
   node.
2. **Latency.** The carrier reaches node k exactly 7k clocks after it leaves node 0
   (setting 5, plus 2, per hop).
3. **Collisions.** Two simultaneous senders collide. Both see the collision, the receivers
   report CRC errors, and a collision record appears in the event FIFO.
4. **Faults.** A random-error fault on one link corrupts the packet only for the nodes behind
   that link.
5. **Radio receiver.** It ORs two senders' cells. It hears one sender cleanly, and both at
   once as a corrupted frame.
6. **Node 1's own hardware.**
   - Its anchored pattern matches. The pattern is held only in the second bank, which its
     waiting state selects.
   - Its state machine waits for the end of the frame, then posts an event and an interrupt.
   - Its timer expires.
   - The records appear in its FIFO.
7. **P3 circuit.** A byte crosses from one controller's message-RAM slot to another
   controller.
8. **Global time.** After a sync, all 32 controllers read the same time.

It counts each of these mechanisms and fails if one never happened. The controller testbench
(`tb_network_controller`) covers what needs a loop-back: the DMA, CRC, editor cut-through,
and state-machine-driven transmission. Event suppression and FIFO overflow are
tested in `tb_nc_event_fifo`.
