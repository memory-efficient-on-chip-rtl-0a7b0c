# A mesh NoC with a shared reorder buffer and order-aware memory controllers

Processors on a network-on-chip issue AXI transactions to many DRAM memories at once. Their
responses come back out of order, because each memory controller reorders its queue to get
row hits, and because packets take different paths. AXI still requires responses with the same
transaction ID (T-ID) to arrive in issue order. A network interface therefore needs a reorder
buffer. If that buffer is split into fixed slots per outstanding transaction, it is either
large or it limits the number of reads in flight.

This design shares one 48-word reorder buffer among all transactions of a processor. A
transaction is admitted only if room for its response is reserved, and only for the part of the
response that may actually need to wait. Two further mechanisms reduce how often responses
arrive out of order at all:

- the routers give priority to the packets the reorder logic is waiting for;
- the memory controllers favour older sequence numbers while still preferring row hits.

The default configuration is a 5x5 mesh:

- rows 0, 2 and 4 hold 15 memory tiles (DDR2, 256 MB, 4 banks, 32 bit, tRP-tRCD-tCL = 2-2-2);
- rows 1 and 3 hold 10 processor tiles.

A second configuration puts a processor and a memory into every tile, behind a *hybrid* NI.

## Building blocks

| file | role |
|---|---|
| `noc_pkg.sv` | sizes, flit/header/AXI/DRAM types, address maps, priority formula |
| `sync_fifo.sv` | generic FIFO used for all queues |
| `router.sv` | 5-port, 2-VC wormhole router with priority switch allocation |
| `pr_arbiter.sv` | highest-value-wins arbiter used by the router |
| `master_ni.sv` | processor-side NI: AXI queues, packetizer, reorder unit, depacketizer |
| `status_table.sv` | per-T-ID bookkeeping, sequence numbers, admission and reservation |
| `reorder_buffer.sv` | shared linked-list storage for early responses |
| `slave_ni.sv` | memory-side NI with the memory controller inside |
| `mem_ctrl.sv` | bank queues, bank arbiters, command scheduler, DDR2 command generator |
| `bank_arbiter.sv` | row-hit-first, highest-priority request selection in one bank |
| `hybrid_ni.sv` | processor + memory tile sharing one router port (configuration B) |
| `noc_top.sv` | the mesh |

## Packets

A flit is 32 data bits plus head and tail marks. It travels on virtual channel 0 if it belongs
to a request and on virtual channel 1 if it belongs to a response.

The header flit (MSB first):

| bits | field |
|---|---|
| 31:29 | spare |
| 28:26 | destination x |
| 25:23 | destination y |
| 22:20 | source x |
| 19:17 | source y |
| 16:13 | T-ID |
| 12:10 | sequence number (SN) |
| 9:5 | router priority |
| 4 | response |
| 3 | write |
| 2:0 | burst length − 1 |

Packet layouts:

- A read request is a header and an address flit.
- A write request is a header, an address flit and 1 to 8 data flits.
- A read response is a header and its data flits.
- A write response is a header only.

Address map:

- In configuration A, address bits [31:28] = m select memory m at x = m % 5, y = 2·(m / 5).
  Values above 14 fold to memory 0.
- In configuration B, bits [31:27] name tile 5·y + x.
- Inside a memory: column = [11:2], bank = [13:12], row = [27:14].

## Keeping responses in order with little buffer (master NI)

This is the core of the design.

**Sequence numbers.** For every T-ID, the status table keeps three values:

- NM, the number of messages outstanding;
- ES, the SN expected next;
- LMS, the size of the last message sent.

A new request of that T-ID gets SN = ES + NM (3 bits, wrapping). A response can be handed to the
processor directly only if its SN equals ES. ES then advances.

**Reservation.** A global counter, RsrvSize, holds the number of reorder-buffer words promised to
responses that may arrive early. The rules:

- When a request is sent while its T-ID already has messages outstanding, the previous message's
  size (LMS) is added to RsrvSize. The first outstanding message of a T-ID can never be early,
  so it reserves nothing.
- A request is admitted only if its T-ID has no outstanding message, or if NM < 8 and
  RsrvSize + size ≤ 48.
- When a response is delivered, its reservation is returned.

An additional bit U per T-ID records that the reservation of the newest message has already been
returned. Without it, that reservation could be released twice when only one message is left.
This bit is an addition of this design.

Example: a processor issues reads of 8 words on one T-ID. Each response occupies 9 words
(header + 8 data). The buffer admits up to six such reads. A statically split buffer of the
same size admits at most six in every case. With shorter bursts this design admits more, up to
48 outstanding messages in total.

**Reorder buffer.** A response whose SN is not the expected one goes into the shared buffer.
A table row holds valid, T-ID, SN and the first-word pointer. Each data word carries a pointer to
the next word of the same packet, so packets can occupy any free words. A row is marked
complete when its tail arrives. A complete packet whose SN has become the expected one is
released to the depacketizer. Releases take precedence over direct traffic, so order chains
unwind quickly. Admission guarantees space, so the buffer never overflows. If it fills, the
writer stalls.

**Timing.** A direct response reaches the AXI R/B channel two cycles after its flit leaves the
router.

## Router priority

Each router has 5 ports (N, E, S, W, local) and a 5-flit buffer per virtual channel per input.
It uses XY routing (x first; y grows southward), wormhole switching and credit flow control.

The header's priority field is MaxSeqNum − SN + hop distance, with MaxSeqNum = 7. Packets with
small sequence numbers and long paths are favoured, because the reorder logic is most likely
waiting for them.

A buffered head flit loads this value into an 8-bit waiting-priority counter. Each cycle:

1. Every input picks the virtual channel with the higher counter.
2. Every output grants the input with the highest counter; ties go to the lower port index.
3. Losers increment their counters, so nothing starves.

An output stays locked to a packet until its tail has passed. A flit crosses the router in one
cycle once it is at the head of its buffer.

## Order-aware memory controller

The controller sits inside the memory-side NI.

**Queues.** Each of the four banks has an 8-entry request queue. An entry starts with priority
MaxSeqNum − SN. Every waiting entry of that bank gains one point whenever a new request
arrives.

**Selection.** For each bank, `bank_arbiter` picks:

- the highest-priority row hit, if there is one;
- otherwise the highest-priority entry, which is a row conflict or a row empty.

**Command bus.** The controller tracks each bank's state itself and issues PRE, ACT and RD/WR
with tRP = tRCD = tCL = 2. A round-robin scheduler shares the command bus among the banks. A bank
keeps the bus for the remaining beats of a burst it has started. While one bank waits for its
activation delay or for its next request, other banks can precharge and activate (bank
interleaving).

**Buffers and responses.**

- Write data waits in an 8-word linked list.
- Read data waits in an 8-word buffer. A read burst starts only when room is guaranteed.
- The response header is the request header with source and destination swapped, the
  response bit set and the priority recomputed.

Rows stay open after an access (open page).

## Hybrid tile (configuration B)

`hybrid_ni` puts a `master_ni` and a `slave_ni` behind one router port:

- Incoming flits are split by virtual channel, which is the same as splitting by the
  request/response bit.
- Requests for the tile's own memory, and responses to its own processor, never enter the
  network.
- A packet-level round-robin arbiter merges local packets with packets from the network.
- The two sides share the outgoing link flit by flit.

Select it with `noc_top #(.CONFIG_B(1))`.

## Where this RTL departs from, or adds to, the source description

- The U bit in the status table, the complete bit in the reorder table, and the exact response
  sizes that are reserved (read: length + 2 words; write: 1 word).
- Virtual channels are fixed by packet type, so VC allocation is trivial.
- Tie rules and the widths of the priority counters are this design's choice.
- The memory controller keeps no check for a read overtaking an earlier write to the same
  address in the same bank queue. A processor must wait for the write response before reading
  such an address. The testbenches follow this rule.
- Open-page policy, the address maps, write data sent along with each WR command, and an 8-word
  read buffer.
- All tiles run on one clock. The bi-synchronous FIFOs that a multi-clock system needs between
  cores and NIs are not included.
- The AXI side supports INCR bursts of 1–8 beats and 16 IDs. Write data follows AW order.
- In configuration B, address bit 27 both names the tile and serves as the row MSB. Each tile
  therefore sees 128 MB of its memory.
- The statically partitioned baseline NI, used only for comparison, is not included.

## Simulating

Every testbench is self-checking, prints `TB_RESULT checks=N failures=M` and has a watchdog.
They need a DDR2 behavioural model, `tb/ddr2_model.sv`. The model checks tRP/tRCD and open-row
rules and returns a defined pattern for memory that was never written.

```
verilator --binary --timing --assert -Wno-fatal rtl/noc_pkg.sv rtl/*.sv \
    tb/ddr2_model.sv tb/tb_noc_top.sv --top-module tb_noc_top
./obj_dir/Vtb_noc_top
```

Replace `tb_noc_top` with any other testbench:

| testbench | checks |
|---|---|
| `tb_pr_arbiter` | arbiter against a reference model |
| `tb_bank_arbiter` | arbiter against a reference model |
| `tb_status_table` | against a reference model of admission and SN |
| `tb_reorder_buffer` | out-of-order rounds and a full-buffer stall |
| `tb_router` | one-cycle hop, priority wins, random packets with credit accounting |
| `tb_master_ni` | reversed responses, admission limit of 6 for 9-word responses |
| `tb_mem_ctrl` | DRAM timing, hit-first order, write/read-back |
| `tb_slave_ni` | response headers and data |
| `tb_noc_top` | whole configuration-A mesh at default sizes |
| `tb_noc_top_b` | configuration B |

The two mesh tests run random reads and writes from every processor to every memory. They check
every data word, the response order per T-ID and DRAM timing. They also count, and require to
happen at least once:

- reorder-buffer stores and releases;
- admission refusals;
- router conflicts won by priority;
- row hits, row conflicts and row empties;
- bank interleaving;
- in configuration B, local requests and responses and local/global contention.

Each runs in about a second.
