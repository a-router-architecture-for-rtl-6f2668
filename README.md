# PRC: a router whose routing and switching are programs

Routers for multicomputer networks usually hard-wire one routing algorithm and one
switching scheme: wormhole, virtual cut-through or store-and-forward. No single choice
suits every traffic mix. Short messages want low latency. Long transfers want
throughput. Real-time traffic wants predictable delays.

The Programmable Routing Controller (PRC) separates the work into two parts:

- **Data movement is in hardware.** Word-wide datapaths move the packets, keep the
  flow control and allocate output channels.
- **Decisions are in software.** Each incoming physical link has its own small 8-bit
  microcontroller, the *routing engine*. It reads the packet header, picks output
  channels and decides how the packet is switched: cut through, wait in the network
  (wormhole), or be copied to buffer memory (virtual cut-through or packet switching).
  It can choose differently for every packet, including multicast.

This repository is a synthesizable SystemVerilog model of that router. The
configuration is four bidirectional links with three virtual channels each, a 32-bit
internal bus, and an off-chip buffer memory reached through a page-based host
interface.

## Contents

- [Block structure](#block-structure)
- [The CTBUS](#the-ctbus-bus-switch-and-channel-allocator-in-one)
- [The routing engine](#the-routing-engine)
- [Incoming channels (NIRX) and routing primitives](#incoming-channels-nirx-and-routing-primitives)
- [Links](#links)
- [Host side](#host-side-pages-tags-events)
- [Where this RTL departs from the original PRC](#where-this-rtl-departs-from-the-original-prc)
- [Verification](#verification)
- [Simulating with Verilator](#simulating-with-verilator)
- [Changing the design](#changing-the-design)

## Block structure

```
 link rx 0..3 ──► receiver_module ×4 ─────────┐
                   ├─ 3 channel buffers       │
                   ├─ 3 × nirx                │    CTBUS (32-bit, 1 transaction/cycle)
                   └─ routing_engine          ├──► ctbus = ctbus_arbiter + reservation_status_unit
                                              │         │ broadcast to all slaves
 host ◄──► host_interface ────────────────────┤         ▼
            ├─ 12 × tfu (transmit fetch)      │    transmitter_module ×4 (3 NITX queues each) ──► link tx 0..3
            ├─ receive path to memory         │    host_interface receive path (memory slave)
            ├─ event queue, page queues       │
            ├─ crc_unit ×2, timestamp_unit    │
 memory ◄──┘                                  │
```

Every block that sends on the bus is a **master** (29 in all). Masters are numbered
as follows:

| Master | Index |
|---|---|
| Routing engine of link *l* | *l* |
| NIRX (channel *c* of link *l*) | 4 + 3*l* + *c* |
| TFU *k* | 16 + *k* |
| Host command port | 28 |

Every block that receives from the bus is a **slave**. A bus transaction carries a
13-bit slave mask, so one transaction can go to several slaves at once. This is how
multicast works.

| Slave | Mask bit |
|---|---|
| NITX (channel *c* of outgoing link *l*) | 3*l* + *c* |
| Memory interface | 12 |

Some names used throughout:

- **NIRX** is a network interface receiver. There is one per incoming virtual channel.
- **NITX** is a network interface transmitter. There is one per outgoing virtual channel.
- **O*lc*** names the NITX of outgoing link *l*, channel *c*. The routing program uses
  these names.
- A **page** is the unit in which the host exchanges packets with the router (see
  [Host side](#host-side-pages-tags-events)).

The whole design runs on one clock, the core clock (40 MHz in the original chip).
Parts that ran slower in the original are paced by enables:

- A link sends one symbol every second cycle.
- Buffer memory takes one access every second cycle.

## The CTBUS: bus, switch and channel allocator in one

The CTBUS is the switch fabric. A master asks for the bus. When granted, it puts one
transaction on the bus. A transaction is a command, a slave mask, an *all* flag, a
*crc* flag and a 32-bit data word. There are seven commands:

| Cmd | Code | Meaning |
|---|---|---|
| DTX | 0 | data word |
| MARK | 1 | data word, last of a page |
| EOP | 2 | data word, last of the packet (carries the CRC) |
| FREE | 3 | release the addressed NITXs; NITXs pass it down the link |
| RESV | 4 | reserve the addressed NITXs |
| HOLD | 5 | hold NITXs for the issuer: all later RESVs fail |
| CHECK | 6 | reserve NITXs that the issuer holds |

### Pipeline

The bus has a fixed three-step pipeline:

1. **Cycle t: arbitration.** `ctbus_arbiter` decides combinationally and grants one
   master.
2. **Cycle t+1: broadcast.** The granted transaction is registered and seen by every
   slave (`bus_valid`, `bus_txn`, `bus_mid`).
3. **Cycle t+2: response.** `reservation_status_unit` answers the issuing master with
   ok/fail and the mask it actually reserved.

### Why allocation is race-free

All allocation commands pass through the same bus, so they happen one at a time. The
reservation state is therefore a plain register, with no locking.

Because of the pipeline, a master that saw a channel free in cycle t can still lose
it to a RESV that was already in flight. That master must look at the response, not
only at the status bits.

### Reservation modes

A RESV has two modes, chosen by the *all* flag:

- **all = 1:** the RESV succeeds only if every addressed NITX is free and not held.
- **all = 0 ("as many of"):** the RESV takes whichever addressed NITXs are free. It
  fails only if none is free.

HOLD and CHECK let one master override the arbitration:

- HOLD marks channels as held for the issuer, even while they are busy. Every later
  RESV then fails, whoever issues it.
- The issuer's CHECK reserves the channels once they are free.

For holds, the whole host interface counts as one master: its twelve TFUs and its
host command port (masters 16–28). So the host can HOLD an NITX through the command
register, and the TFU that sends on that NITX then claims it with CHECK, ahead of
every routing engine and NIRX. This is the host's override of the bus's first-come
allocation: it guarantees the host the next use of a channel, even one that is busy
when the HOLD is placed. A TFU whose NITX is
held by someone else keeps retrying the CHECK until the holder frees it.

### Arbiter

The arbiter is a binary tree over the 29 requests. Every inner node stores one
priority bit. The grant follows the priority bits from the root down to a requesting
leaf.

A node flips its bit only when the grant passes through it and both of its subtrees
were requesting. The effect is that active masters share the bus evenly, and a slot
is never given to a master that is not requesting.

### Backpressure

A master must not send a data word to a slave that is full. Each slave exports a
`slv_space` bit. A master sends a data word only when every addressed slave has
space.

Each NITX queue reports space while at least two of its entries are free. The second
entry covers the word that may already be in the bus pipeline.

## The routing engine

One engine serves the three incoming virtual channels of a link. It is an 8-bit
processor with:

- a 256 × 24-bit control store, which the host loads;
- 16 general registers;
- an accumulator with zero and carry flags;
- four user flags;
- a one-level link register for subroutine calls.

Each instruction takes one cycle. A taken jump, a return, or a `wait` that branches
to a trap address costs one extra cycle.

### Special registers

The special registers are numbered above the 16 general registers:

| No. | Name | Use |
|---|---|---|
| 16 | acc | ALU result |
| 17–20 | nid0–nid3 | header word latched by `wait`. nid3 is the most significant byte. Read-only. |
| 21–24 | ctd0–ctd3 | next word to send: the rewritten header |
| 25 | ctaddr0 | slave mask bits 5:0 (O00..O12) |
| 26 | ctaddr1 | slave mask bits 12:6 (O20..O32, bit 6 = memory) |
| 27 | ctctl | [2:0] CTBUS command, [4:3] primitive mode, [5] all, [6] crc |
| 28, 29 | trap0, trap1 | `wait` branch targets |
| 30 | nfifo | reading pops the host→engine FIFO; writing pushes the engine→host FIFO |
| 31 | uflags | user flags, read-only |

### Instructions

Instructions are 24 bits. The opcode is in bits [23:20]. `rtl/re_isa_pkg.sv` holds
the field layout and one helper function per instruction, which acts as an
assembler.

- **alu op, A, B|imm**: `acc = A op B`. The operations are pass, add, sub, and, or,
  xor, not, shl and shr. The instruction sets the zero and carry flags.
- **ldc imm → dst [go]** and **xfer src → dst [go]**: load a constant or copy a
  register. The optional *go* field starts an action after the move:
  - `go rtp` hands {ctd, ctaddr, ctctl} to the NIRX of the last `wait` as its routing
    primitive.
  - `go ctbus` issues the command in ctctl on the CTBUS, with the engine as master.
    If it is a RESV or CHECK that succeeds, the mask that was granted is written back
    into ctaddr.
- **flag op**: set, clear or copy a condition into a user flag. It also provides the
  two mask operations:
  - **conflict** sets the *conflict* flag if any NITX in ctaddr is busy.
  - **as-many-of** removes the busy NITXs from ctaddr and sets *amonull* if nothing is
    left.
- **jump [not] cond, target [link] [indirect]**: with *indirect*, the target is acc.
  This lets a routing table live in the control store as a list of jumps.
- **return [not] cond**: conditional return through the link register.
- **wait**: blocks until one of the three NIRXs offers a header word. It latches that
  word into nid, remembers the channel, and branches:
  - channel 2 falls through;
  - channel 1 goes to trap0;
  - channel 0 goes to trap1.

  If several channels wait, the priority is 2 > 1 > 0. So one program can run a
  different routing policy per virtual channel.

  Between a `wait` and the `go rtp` that ends it, the header stays open. A second
  `wait` then takes the next word of the same packet and falls through, with no
  dispatch. A program walks a header of several words this way, skipping the words
  meant for other routers until it finds its own.

### Conditions

| Code | Condition |
|---|---|
| 0 | true |
| 1 | zero |
| 2 | carry |
| 3 | ack (the last `go ctbus` succeeded) |
| 4 | conflict |
| 5 | amonull |
| 6 | notify (host→engine FIFO not empty) |
| 8–11 | user flags |
| 16 + *i* | NITX *i* reserved or held |

### Stalls

An instruction that tests *ack*, or issues a second `go ctbus`, waits until the
previous bus command has been answered. Writing to a full engine→host FIFO waits
until the host has read it. While the run bit is low, the engine stays at address 0
so the host can load it.

### A typical program

1. `wait` for a header and dispatch on the channel.
2. Compute the route from nid into ctaddr.
3. Either reserve a channel directly (`go ctbus` with RESV, then test *ack*), or test
   the busy conditions of the candidates in order of preference.
4. Write the new header into ctd.
5. Load ctctl with the primitive mode.
6. `go rtp`, then jump back to `wait`.

The routing-engine, receiver and end-to-end testbenches contain such programs.

## Incoming channels (NIRX) and routing primitives

The routing engine only decides. The NIRX moves the words. For each packet, an NIRX:

1. offers the header words to the engine until the engine has sent it a routing
   primitive;
2. sends ctd as the first word;
3. streams the packet body from its input buffer to the slave mask as DTX, MARK and
   EOP words;
4. sends FREE to the same mask after EOP, which releases the channels here and
   downstream.

The primitive mode decides what happens before streaming starts:

| Mode | Code | NIRX behaviour |
|---|---|---|
| reserved | 0 | the engine already reserved the slaves; start at once |
| wait-for-one | 1 | watch the addressed NITXs. When one is free, RESV (as many of) and forward to what was granted. This is wormhole blocking in the network, with no engine involvement. |
| wait-for-all | 2 | RESV with all = 1 only when every addressed NITX is free. This gives multicast without partial reservations. |
| discard | 3 | drop the packet up to EOP |

The memory interface is a slave that never needs a reservation. How a packet is
switched therefore follows from the slave mask the program chooses:

- **Cut-through:** an NITX.
- **Virtual cut-through or store-and-forward:** the memory bit. The host later
  re-sends the packet from memory.
- **Wormhole:** an NITX in wait mode.
- **Multicast:** several bits, possibly including memory.

## Links

A link carries 10-bit symbols with a strobe, one symbol every second cycle. Each
symbol is 8 data bits plus 2 tag bits. Four symbols make a word, sent most
significant byte first, so a word takes 8 cycles.

The 8 tag bits of a word carry its 3-bit CTBUS command and 2-bit virtual channel:

| Symbol | Tag bits [9:8] |
|---|---|
| 0 | cmd[2], cmd[1] |
| 1 | cmd[0], vc[1] |
| 2 | vc[0], 0 |
| 3 | 0, 0 |

Flow control uses credits, one credit per word and per virtual channel:

- Each receiver has a 4-word buffer per virtual channel.
- When a word leaves that buffer, the receiver pulses `rx_ack[c]` for one cycle.
- The transmitter starts with 4 credits per channel and spends one per word.

Each transmitter keeps one queue per NITX (8 words). It serves them round-robin among
the queues that have both a word and a credit. So a channel blocked downstream never
holds up the other two channels of the same link.

## Host side: pages, tags, events

The host never feeds packets through registers. It places them in buffer memory and
exchanges **pages** with the router. A page is 64 words (256 bytes) or 256 words
(1 KiB), chosen by a configuration bit.

### Control interface

The control interface is a synchronous register port. Read data is valid one cycle
after `h_re`.

| Address | Access | Function |
|---|---|---|
| 0x000–0x3FF | W | control store word: link = addr[9:8], index = addr[7:0] |
| 0x400 + k | W | page tag for TFU k (sends on NITX k) |
| 0x440 + k | W | free page address for reception channel k = 3·link + vc |
| 0x480 | R | pop the event queue (0 if empty) |
| 0x481 | R | number of queued events |
| 0x482 | R/W | config: [0] 256-word pages, [1] run engines |
| 0x483 | R/W | time stamp; a write loads it |
| 0x484 | R | [7:4] host→engine FIFO full, [3:0] engine→host FIFO empty (one bit per link) |
| 0x485 | W | host command: [18:16] CTBUS command, [13] all, [12:0] slave mask. Ignored while one is pending. |
| 0x485 | R | [31] command pending, [30] last answer ok, [12:0] mask returned |
| 0x486 | R | [27:16] reception page queue full, [11:0] TFU tag queue full |
| 0x490 + l | R/W | notification FIFO of link l's routing engine |

`irq` is high while events are queued. Several pages can complete before the host
services the interrupt.

### Page tags

A page tag is written for a TFU and has this layout:

| Bits | Field |
|---|---|
| [31] | last page of the packet |
| [30] | page not covered by the CRC (use it for a header page) |
| [29] | keep the connection: on the last page, no FREE after the packet |
| [28:20] | length − 1, in words |
| [19:0] | word address |

### Sending a packet

The TFU sends a packet in these steps:

1. Wait until its NITX is not reserved, then reserve it: RESV, or CHECK if the NITX is
   held. Retry if the answer is a refusal.
2. Read each page word by word.
3. Send the words as DTX, with the last word of each page as MARK.
4. After the last page, send the running CRC as EOP, then send FREE.

If the last page's tag has the keep bit, step 4 sends no FREE. The NITX and the
channels downstream then stay allocated, so the next packet of the same TFU skips
step 1 and travels the same path. The connection lasts until a packet without the
keep bit ends with FREE. The receiving NIRXs need no configuration for this: an NIRX
keeps forwarding words to its mask until a FREE arrives.

### Receiving a packet

Words sent to the memory slave go to the open page of the NIRX that sent them. A new
page is taken from that channel's reception queue when needed.

A page closes on MARK, on EOP, or when full. On EOP the received word is compared with
the CRC of the words marked *crc*.

### Events

Each completed page, sent or received, adds an event:

| Bits | Field |
|---|---|
| [31] | 1 = receive |
| [30:27] | channel |
| [26] | end of packet |
| [25] | CRC error |
| [24:16] | words − 1 |
| [15:0] | time stamp |

### CRC and memory

The CRC is CRC-32 with polynomial 0x04C11DB7. It starts at all ones, processes a
32-bit word per cycle most significant bit first, and has no final inversion.

Memory accesses from the twelve TFUs and the receive path share the memory port
through a tree arbiter.

## Where this RTL departs from the original PRC

- **Transmit queues.** The original moves words to a link in plain FIFO order across
  its three virtual channels. Here each NITX has its own queue, and the link is
  scheduled round-robin among queues that have credit. With one shared FIFO and
  per-channel credits, a word for a blocked channel at the head of the FIFO stops the
  other channels too, and the network can deadlock.
- **Acknowledgments.** The original piggy-backs flow-control acknowledgments on the
  tag bits of the reverse link. Here they are separate per-channel wires (`rx_ack`,
  `tx_ack`), so credits return even when no data flows the other way.
- **Ports.** The original shares each physical output port between two links to save
  pins. Here every link has its own port.
- **Clocking.** The original has a 20 MHz link clock, a 20 MHz memory interface and a
  10 MHz asynchronous control interface. All of them become strobes on the single
  core clock, and the control port is synchronous. Crossing into another clock domain
  is left to the system.
- **Own choices.** The following are this design's own, because none are given for
  the original:
  - instruction encoding, register numbers and condition codes;
  - ctctl layout and the four primitive modes;
  - tag, event and register formats;
  - the CRC parameters;
  - buffer depths;
  - the order of the `wait` priority;
  - the rule by which the arbiter's node bits flip.
- **Not built.**
  - the external memory chip, serial link chips and host processor;
  - scan chains and test access of the fabricated chip.

  The memory, link and host ports are brought out instead.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_crc_unit` | against a bit-serial CRC model |
| `tb_ctbus_arbiter` | one-hot grants to requesters only, strict alternation between two busy masters, bounded wait under random load |
| `tb_reservation_status_unit` | directed cases (including a host hold claimed by a TFU) and a random command stream against a reference model |
| `tb_ctbus` | pipeline timing, a race of two masters for one NITX, HOLD / CHECK / FREE through the bus |
| `tb_routing_engine` | a minimal-path routing program: dimension order on one channel and adaptive routing on the others, with linked subroutines, engine RESVs tested through *ack*, as-many-of masks and the wait dispatch |
| `tb_nirx` | each primitive mode |
| `tb_receiver_module` | three packets on interleaved channels through the deserializer, buffers, NIRXs and engine; credits |
| `tb_transmitter_module` | symbol format, credits and round-robin scheduling |
| `tb_tfu` | page fetch, MARK/EOP/FREE, events, kept connections, CHECK of a held NITX |
| `tb_host_interface` | register map, page handling, CRC check and error flag, host command port |
| `tb_timestamp_unit` | counting and loading |

### End-to-end test

`tb_prc_top` runs the whole router at its default size, with each output link looped
back to the input link of the same number. It loads one routing program into all four
engines. In that program, the header word is {flags, ctaddr1, ctaddr0, hops}:

- A packet with hops = 0 is buffered to memory.
- Any other packet is forwarded to the given mask with hops − 1.
- Flag bits choose between an engine RESV with fallback, wait-for-one, and
  wait-for-all. Another flag bit marks a header word meant for another router, which
  the program skips.

Twelve packets then take these paths:

- cut-through;
- a 120-word two-page packet;
- a refused engine reservation followed by wormhole waiting;
- two packets competing for one channel;
- a multicast to two NITXs plus memory;
- a packet with a deliberate CRC error;
- a packet buffered because the host told the engine to buffer everything;
- a host HOLD on one NITX: an NIRX packet for it must wait although the NITX is
  unreserved, while the TFU of that NITX claims it with CHECK and goes first;
- two packets from one TFU over a kept connection: the second reaches memory
  without being routed;
- a packet with a two-word header, whose first word the engine skips.

The test checks:

- every delivered copy word for word, including the rewritten header and the CRC;
- every page event;
- that all reservations are released at the end.

It also counts how often each mechanism happened:

- cut-through words;
- buffered pages;
- multicast words;
- wormhole wait cycles;
- refused RESVs;
- link credit stalls;
- receive page stalls;
- forwarded FREEs;
- bus contention;
- notifications;
- TFU pages;
- host HOLDs;
- CHECKs;
- kept connections;
- skipped header words.

A mechanism that never happened counts as a failure.

## Simulating with Verilator

Packages must come first. A testbench builds and runs like this:

```
verilator --binary --timing --assert -Irtl --top-module tb_prc_top \
    rtl/prc_pkg.sv rtl/re_isa_pkg.sv \
    $(ls rtl/*.sv | grep -v _pkg.sv) tb/tb_prc_top.sv
./obj_dir/Vtb_prc_top
```

Replace `tb_prc_top` with any other testbench name. The full end-to-end run takes
about 50 µs of simulated time and about 12 seconds to build and run.

## Changing the design

- **Routing policy.** Routing policy is software: write a program with the `i_*`
  helpers from `re_isa_pkg` and load it through the control interface. `tb_prc_top`
  shows a complete one.
- **Sizes.** `NUM_LINKS`, `NUM_VC` and the derived counts are in `prc_pkg`. The
  master/slave numbering and the tag layout assume 3 virtual channels and at most 4
  links: 2 bits of channel number and a 13-bit slave mask.
- **Buffer depths.** Buffer depths are parameters of `receiver_module` (`RX_DEPTH`),
  `transmitter_module` (`DEPTH`, `RX_DEPTH`), `tfu` (`TAG_DEPTH`) and
  `host_interface`. A transmitter's `RX_DEPTH` must equal the depth of the receiver
  it feeds.
