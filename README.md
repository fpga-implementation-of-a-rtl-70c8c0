# Configurable cache/scratchpad with an integrated user-level RDMA network interface

Each processor tile of this design has one 64 KB SRAM that does two jobs. Part of it
is an ordinary 4-way, write-back L2 cache in front of a shared DRAM. The rest is
software-managed scratchpad that other tiles can write into directly. Software chooses
the split one cache line at a time by setting a lock bit in that line's tag.

The network interface (NI) is built into the L2 cache controller. It shares the tag and
data arrays, the datapath and the packet engine with the cache. So one engine handles
four kinds of traffic:

- cache fills and write-backs,
- user-level RDMA copies,
- short messages,
- single remote stores.

User code starts a transfer by writing a small descriptor into a special line of its own
scratchpad. No system call is needed. Completion is reported in memory:

- a counter line counts down the bytes that have arrived and writes a notification word
  when it reaches zero;
- a queue line turns a scratchpad region into a bounded circular mailbox.

Four tiles and a DRAM port are joined by a 5-port, 32-bit crossbar.

The RTL is SystemVerilog-2017. Every module has a self-checking testbench. The whole
system has an end-to-end test at its default sizes.

## System

```
        tile 0      tile 1      tile 2      tile 3          DRAM controller
          |           |           |           |            (outside the design,
          +-----------+-----+-----+-----------+             ports brought out)
                            |                                      |
                     5-port crossbar  ------------ port 4 ---------+
```

`ccsp_top` holds four `tile`s and the `xbar`. It brings out:

- each processor's data bus (`cpu_*`, one array element per tile);
- the crossbar's port 4 (`ddr_in_*` / `ddr_out_*`), where a DRAM node must answer
  READ and WRITE packets. The testbench puts a behavioural model there.

The tiles run on `clk`. The crossbar runs on `clk_noc`. The two may be unrelated.

Inside a tile:

| part | module | what it is |
|---|---|---|
| address region table | `art` | classifies every processor address: cacheable DRAM, local scratchpad, remote scratchpad, local tag space, or illegal |
| L1 | `l1_cache` | 4 KB direct-mapped data cache, 32-byte lines, write-through, no allocate on store miss; routes every access |
| way predictor | `way_pred` | 8-bit signature per L2 line; gives the L2 the set of ways worth probing |
| L2 arrays | `l2_mem` | 8192 x 64-bit data, 2048 tags, three masters with fixed priority, self-clearing tags after reset |
| L2 controller | `l2_ctrl` | cache lookups, victim choice, deferred-write buffer, hit under one miss, scratchpad and tag accesses |
| completion monitor | `cmd_monitor` | watches stores into command lines and releases a finished descriptor to the NI |
| remote-store buffer | `rs_buf` | collects stores to other tiles' scratchpads, merging adjacent words |
| outgoing NI | `out_ni` | picks the next job by strict priority and streams packets with CRC |
| incoming NI | `in_ni` | delivers packets according to the tag of the target line |
| FIFOs | `async_fifo`, `pkt_rx`, `sync_fifo` | 4 KB outgoing NoC buffer (clock crossing), CRC-checking store-and-forward receive buffer, small internal queues |
| CRC | `crc32` | one 32-bit word per step |

`ccsp_pkg` holds the shared constants, types and address helpers.

## Address map

| address | region |
|---|---|
| `0x0xxx_xxxx` | DRAM: cacheable, home is crossbar port 4 |
| `0x8?nn_xxxx` | scratchpad data of node `nn` (bits 25:24) |
| `0x9?nn_xxxx` | L2 tags of node `nn`; only the local node's are reachable |

Inside a node's data or tag space the low 16 bits name an L2 location directly:

- way = bits 15:14;
- set = bits 13:5;
- word = bits 4:2.

So "scratchpad line (way *w*, set *s*)" is simply the L2 line in way *w* of set *s*.
Lock it and the cache will never use it.

The ART never allows loads from a remote scratchpad: they return 0 with `cpu_err`.
Stores to a remote scratchpad are allowed; they become remote stores.

## L2 tag word and line states

```
bit   19     18     17    16       15:14        13:0
     valid  dirty  lock  pending  state        DRAM tag (addr[27:14])
```

- `lock = 1` takes the line away from the cache: it is scratchpad.
- `state` tells the incoming NI how to treat writes into a locked line:

| state | meaning | line layout (32-bit words) |
|---|---|---|
| 0 plain | ordinary scratchpad | data |
| 1 command | NI command buffer | descriptor (below) |
| 2 counter | completion counter | w0 count, w1 notification address, w2 notification value |
| 3 queue | message queue header | w0 base address, w1 number of 32-byte slots, w2 head, w3 tail |

Software writes a tag with an ordinary store to the tag space. For example,
`0x0002_0000 | state << 14` makes a locked line of that state. After reset the tag array
spends 2048 cycles clearing itself. The tile holds processor requests off during that
time (`init_busy`).

## Cache side

An L1 miss or a cacheable store goes to the L2 with the way predictor's mask:

- **Probe.** Only the ways in the mask are probed, one tag per cycle.
- **Miss.** An empty mask, or no matching tag, is a miss. The controller reads all four
  tags of the set and picks a victim among the unlocked ways: an invalid way if there is
  one, otherwise round robin. It marks the victim `pending` with the new tag and teaches
  the way predictor the new signature. It then hands the NI a fill, or a write-back plus
  fill if the victim is dirty.
- **Fill.** A fill is a READ packet to DRAM whose return address is the L2 line itself.
  When the data comes back, the incoming NI sees the `pending` tag, writes the line,
  marks it valid and tells the controller, which retries the access.
- **Deferred writes.** Cacheable and scratchpad stores enter a single-entry deferred-write
  buffer and are acknowledged at once. Reads go ahead of the buffered store. They take
  its bytes where they overlap ("bypass"), both in line reads and in whole-word
  scratchpad reads.
- **Hit under miss.** A buffered store that misses releases the controller while its fill
  is outstanding, so later hits are served under that one miss. A second miss waits.
- **Every way locked.** If every way of a set is locked, a cacheable access gets
  `no_way_err` and is dropped.

The way predictor folds the 14-bit tag into an 8-bit signature by XOR: bit *i* of the tag
goes into signature bit *i* mod 8. A valid signature that matches means "maybe here". No
valid match means "certainly not here", so the L2 does not probe at all. The predictor
learns a signature when a line is allocated or when software writes a tag, so it stays
exact for "not here".

## Network interface

### Posting a command

A command line holds a descriptor:

```
w0  {opcode[31:28], 12'b0, size in bytes[15:0]}   opcode 1 = copy, 2 = message
w1  destination address
w2  acknowledgement address (0: none)
w3  source address (copy)        |  w3..w7 message data (up to 20 bytes)
```

Software may write the words in any order. The L2 controller passes every store into a
command line to the completion monitor as well as to memory. The monitor keeps its own
copy of the line and a mask of the words written:

- a copy is complete when w0..w3 are written;
- a message is complete when w0..w2 and the data words are written.

The complete command goes straight to the outgoing NI, so the descriptor is never read
back from memory. When the last packet of the command has left, the NI writes 0 into w0.
Software polls w0 to know the line can be reused.

### Outgoing NI

When the NI is idle it takes the highest-priority source that is ready:

1. cache fill or write-back from the L2 controller,
2. acknowledgement or counter notification from the incoming NI,
3. remote-store buffer,
4. command from the completion monitor,
5. pending command queue: read requests received from other tiles, served as local copies.

Each packet is built as it streams into the 4 KB outgoing FIFO (cut-through). The packet
format, one 32-bit word per line:

```
header   {type[31:30] (01 WRITE, 10 READ), dst port[29:27], src port[26:24], payload words[23:16], 16'b0}
dst      destination address
ack      acknowledgement address (0: none)
payload  0..64 words
crc      CRC-32 (poly 04C11DB7, init FFFFFFFF, MSB first, no final inversion) of all words above
```

How each kind of work becomes packets:

- **Local copy.** A copy whose source is in this tile's scratchpad is read from the L2
  64 bits at a time. It is cut into packets of at most 256 bytes, each to the next part
  of the destination.
- **Remote copy.** A copy whose source is anywhere else becomes a single READ packet to
  the source's owner. Its payload is {return address, size}.
- **Messages and remote stores.** These carry their words in registers.
- **Write-back then fill.** A write-back is followed by its fill READ.

### Incoming NI

The incoming FIFO holds a whole packet, checks its CRC, and drops a bad packet. The
incoming NI then reads the tag of the destination line and acts:

- **pending line:** cache fill, written in place; the tag becomes valid and `fill_done`
  goes to the L2 controller;
- **locked counter line:** the first payload word is subtracted from the count. When the
  count reaches zero, the notification value (w2) is sent as a write to the notification
  address (w1);
- **locked queue line:** the payload goes to slot `tail` at `base + 32*tail`, and the tail
  advances with wrap-around. If advancing would make `tail == head`, the queue is full and
  the message is dropped. The queue therefore holds `slots - 1` messages;
- **anything else:** plain scratchpad write.
- **WRITE packets outside the scratchpad region:** discarded.

A write with a non-zero ack address then sends an acknowledgement of the payload size in
bytes. Acknowledgements are ordinary one-word WRITE packets, so pointing them at a remote
counter line makes that counter count delivered bytes.

A READ packet becomes a copy command (source = its dst, destination = its return
address). The command goes through the pending command queue to the outgoing NI.

### Remote stores

A processor store to another tile's scratchpad goes to the remote-store buffer:

- A store to the next word after the buffered ones is appended, up to the end of the
  32-byte line.
- Any other store waits until the buffer has left as one WRITE packet.

## Latency

The end-to-end test (default sizes, tile clock 100 MHz, NoC clock 125 MHz in simulation)
measures from the processor's store to the write at the receiving tile:

| operation | this RTL | reference prototype |
|---|---|---|
| remote store, 4 bytes | 25 cycles | 27 |
| message, 4 bytes | 31 cycles | 30 |
| RDMA write, 4 bytes | 33 cycles | 30 |
| RDMA write, 8 bytes | 35 cycles | 31 |
| RDMA write, 16 bytes | 41 cycles | 34 |
| RDMA write, 32 bytes | 53 cycles | 40 |
| RDMA write, 64 bytes | 77 cycles | 52 |
| RDMA write, 128 bytes | 125 cycles | 76 |

The crossbar's no-load latency is exactly 3 cycles. `tb_xbar` checks it.

Short transfers come within a few cycles of the prototype. Longer RDMA writes cost about
3 cycles per extra word here, against about 1.5 in the prototype. There are two reasons:

- the sending NI reads the source 64 bits at a time without fetching ahead;
- the receiving NI stores a whole packet and checks its CRC before it writes anything.
  It then writes one 32-bit word per cycle.

`tb_ccsp_top` checks that latency grows with size and that a 128-byte write stays within
three times the prototype's figure.

## Where this departs from the reference design, and what is assumed

The reference is an FPGA prototype with MicroBlaze processors and a DDR2 controller.
Neither of these is part of this RTL. Their interfaces are brought out instead:

- a simple request/acknowledge data bus, one access outstanding;
- a crossbar port that speaks the packet format above.

Things the reference does not specify, and which are therefore choices of this design:

- the layout of the descriptor, counter and queue lines;
- the packet header and the CRC convention;
- the tag-word layout;
- the victim policy;
- the handshake of every internal interface;
- the depths of the small internal queues (4 entries);
- the receive FIFO (1024 words);
- the drop-when-full queue policy;
- the notification sent as a write of w2 to w1.

Known differences:

- **Fills arrive in address order.** Critical-word-first delivery is not done.
- **Read requests use a hardware FIFO.** They wait in a 4-entry hardware FIFO, not in a
  pool kept in scratchpad.
- **One outstanding miss per tile.** A second miss waits for the first, as in the
  reference.
- **No cache coherence.** The reference has none either.
- **Whole-word remote stores.** Only whole 32-bit remote stores coalesce.
- **Dropped packets are not counted.** A CRC failure only pulses `ev.crc_drop`.
- **Silent queue drops.** A message dropped by a full queue sends no acknowledgement.

## Simulating

Any testbench builds with plain verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ccsp_pkg.sv tb/tb_ccsp_top.sv --top-module tb_ccsp_top
obj_dir/Vtb_ccsp_top
```

Each testbench prints one line `TB_RESULT checks=N failures=M`.

| testbench | what it exercises |
|---|---|
| `tb_ccsp_top` | the whole system at default sizes, all in one run |
| `tb_tile` | one tile with its NoC output looped back to its input: copy, counter, queue, remote stores |
| `tb_l2_ctrl` | random cacheable traffic with evictions against a reference memory, scratchpad and tag accesses, monitor hand-off, bypass, hit under miss |
| `tb_out_ni` | every packet kind, CRC, 256-byte segmentation, descriptor release, priority order |
| `tb_in_ni` | each delivery mode, including the queue wrap and the drop when full |
| `tb_l1_cache` | front end against a behavioural L2 |
| `tb_xbar`, `tb_pkt_rx`, `tb_async_fifo`, `tb_sync_fifo`, `tb_rs_buf`, `tb_cmd_monitor`, `tb_l2_mem`, `tb_way_pred`, `tb_art`, `tb_crc32` | the smaller blocks on their own |

In the end-to-end test:

- `tb/ddr_model.sv` is the DRAM node. Its memory starts as a fixed function of the
  address.
- The test goes through caching, evictions, scratchpad set-up, a 320-byte copy between
  tiles with counter notification, remote stores, messages into a queue until it is
  full, a copy with a remote source, and a corrupted packet.
- It counts 21 mechanisms, and fails if any of them never happened.

Every testbench starts uninitialised state at random values. Sample DUT outputs away
from the clock edge (the testbenches drive and sample on the falling edge).

## Changing sizes

The main parameters:

| parameter | where | default |
|---|---|---|
| `NODES`, `L2_WAYS`, `L2_SETS` | `ccsp_pkg` | 4, 4, 512 |
| `LINES` (L1 lines) | `l1_cache` | 128 |
| `OFIFO_DEPTH`, `IFIFO_DEPTH` (words) | `tile` | 1024, 1024 |
| `MAX_PKT_BYTES` | `out_ni` | 256 |
| `QDEPTH` (per input) | `xbar` | 16 |

The address helpers in `ccsp_pkg` (`sp_daddr`, `sp_taddr`, `line_addr`) hard-code the
16-bit field layout of a 64 KB L2. Change them together with `L2_SETS` / `L2_WAYS`.
