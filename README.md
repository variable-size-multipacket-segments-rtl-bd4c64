# CICQ switch with variable-size multipacket segments

A buffered-crossbar switch (combined input-crosspoint queueing, CICQ) puts a
small buffer at every crosspoint of an N x N crossbar. Inputs and outputs are
then scheduled independently: an input sends to any crosspoint that has room,
an output drains any crosspoint that holds data. The catch is what travels
through the crossbar. Whole variable-size packets make the crosspoint buffers
and the egress simple, but the crossbar must then handle every packet size
down to 40 bytes at full rate. Fixed-size cells ease the crossbar, but a
packet one byte longer than a cell costs two cells, so the fabric needs a lot
of internal speedup.

This design sends **variable-size multipacket segments** instead. Each
ingress keeps a virtual output queue (VOQ) per output, and the bytes in a
VOQ are treated as one continuous stream, with no regard for packet
boundaries. Whenever the scheduler serves a VOQ, it cuts the next segment off
the front of that stream:

* a segment carries at most `MAX_SEG` bytes (512) and, as far as possible,
  at least `MIN_SEG` bytes (40, the smallest IP packet);
* a segment may hold the tail of one packet, several whole small packets and
  the head of another;
* a segment never waits for more data to fill it: whatever is queued leaves
  at once, so light traffic sees no padding delay.

Because segments are never padded and are mostly full, the link and the
crossbar carry almost no overhead beyond a 4-byte segment header. The
ingress memory can also use fixed 512-byte blocks, because a block is exactly
one maximum segment.

The RTL is one synthesizable top, `cicq_switch`, built from:

| module | role |
|---|---|
| `ingress_datapath` | one per input: VOQs, segment sizing, credits, input scheduling, segment transmission |
| `voq_buffer` | the VOQ memory of an ingress: block lists in on-chip SRAM, head blocks of long queues moved to off-chip DRAM |
| `seg_size_calc` | size of the next segment from a queue's backlog |
| `buffered_crossbar` | N x N crosspoint buffers, output schedulers, credit return |
| `crosspoint_buffer` | one crosspoint: byte buffer plus a FIFO of segment lengths |
| `egress_datapath` | one per output: reassembles packets from segments and sends them |
| `rr_arbiter` | round-robin arbiter used at every contention point |
| `cicq_pkg` | segment header type and shared constants |

Everything moves one byte per clock: a clock is one byte time of a port.

## Segment sizing

`seg_size_calc` turns the backlog `B` of a queue (complete packets waiting,
in bytes) into the payload length of the next segment:

| backlog | segment |
|---|---|
| `B >= MAX_SEG + MIN_SEG` | `MAX_SEG` |
| `MAX_SEG < B < MAX_SEG + MIN_SEG` | `B - MIN_SEG` |
| `B <= MAX_SEG` | `B` |

So all segments of a long backlog are full, and the last `MAX_SEG + MIN_SEG`
or fewer bytes are split so that the final piece is never below `MIN_SEG`.
Examples with `MAX_SEG = 256`: a backlog of 280 leaves as 240 + 40; a backlog
of 580 as 256 + 256 + 68. A queue whose backlog is 1..39 bytes (possible only
when packets shorter than 40 bytes are fed in) sends that short segment rather
than waiting. `MAX_SEG` must be greater than `2 * MIN_SEG`.

## Segment format on the links

Every segment on an ingress-to-crossbar link and on a crossbar-to-egress link
is a 4-byte header followed by the payload, one byte per clock:

| byte | ingress -> crossbar | crossbar -> egress |
|---|---|---|
| 0 | output port | source input port |
| 1 | 0 | 0 |
| 2 | payload length, high byte | same |
| 3 | payload length, low byte | same |

The crossbar rewrites byte 0, since the egress must know which reassembly
queue a segment belongs to. The header layout is this design's choice.

Packets themselves must carry their own length in bytes 2..3 (as the IP total
length field does). The egress needs this to find packet boundaries, because
segments do not mark them.

## The ingress datapath

### VOQ memory: blocks, SRAM and DRAM

`voq_buffer` stores all VOQs of one ingress in `BLK = MAX_SEG` byte blocks.
Each queue is a linked list of blocks, and packets are packed back to back
with no gaps, so a block can hold pieces of several packets. Block numbers
`0 .. SRAM_BLKS-1` are in an on-chip SRAM and the numbers above them are in
an off-chip DRAM. The DRAM itself is not part of the RTL: its byte-wide read
and write ports (`dram_*`, read data `RD_LAT` clocks after the address) are
ports of `cicq_switch`.

The fast SRAM absorbs short queues. A long queue only needs its last few
blocks in SRAM, because those are being written, while its older blocks wait
for a long time anyway. The rule is as follows:

* A queue's SRAM blocks always form the **tail** of its list, and its DRAM
  blocks the head.
* When a queue holds more than `TAIL_SRAM` (2) SRAM blocks, its oldest SRAM
  block is **migrated**. The block is copied byte by byte into a free DRAM
  block, linked in after the queue's last DRAM block, and its SRAM block is
  freed. Only one migration runs at a time. A round-robin arbiter picks the
  queue.
* Segments are read from wherever the head block is, so a long queue sends
  its data **straight from DRAM** to the crossbar. It never goes back through
  the SRAM.
* A queue being migrated is locked against segment reads (`q_lock`). In turn,
  the ingress holds off a migration on a queue it is about to read
  (`mig_hold`).

Free SRAM and DRAM blocks are kept in bitmaps, and the lowest free number is
taken first. When no SRAM block is free, `in_ready` drops. A packet is
counted in its queue's backlog only once its last byte is stored, so a
segment never runs into bytes that have not arrived.

### Credits and input scheduling

Every crosspoint buffer holds `XP_BUF` (512) bytes. For each output, the
ingress keeps a credit counter that starts at `XP_BUF`. A segment takes its
payload length from the counter when it is granted. The crossbar returns one
credit for each byte that leaves the crosspoint (`credit_ret`). The header is
not stored in the crosspoint, so it costs no credit.

A queue is eligible when:

* it has backlog;
* it is not being migrated;
* its credit covers the whole next segment.

A round-robin arbiter chooses among the eligible queues. A queue that has
data but lacks credit waits (`ev_credit_stall`). Because credit must cover a
whole segment, the buffer never overflows. An assertion in
`crosspoint_buffer` checks this.

### Segment timing

The grant happens in cycle t0. The header is on the link in t0+1..t0+4, and
the payload follows right after it, because the read starts `RD_LAT` clocks
ahead. One idle clock separates consecutive segments. With `RD_LAT < 4` the
read starts later in the header. With `RD_LAT > 4` there are `RD_LAT - 4`
idle clocks between the header and the payload.

## The buffered crossbar

For each input, `buffered_crossbar` parses the header, pushes the segment
length into the descriptor FIFO of crosspoint (input, output), and writes the
payload into that crosspoint's byte buffer. The crossbar never looks inside a
payload.

Each output has a round-robin scheduler over the crosspoints of its column.
It forwards one whole segment at a time, with the rewritten 4-byte header
first. Forwarding is **cut-through** at segment level: an output may start a
segment as soon as the segment's header and first payload byte are in the
crosspoint. The input writes one byte per clock and the output reads one byte
per clock, so the output never overtakes it.

Output timing: the grant comes in t0, the header in t0+1..t0+4, and the
payload from t0+5 with no gaps. The next header can follow the last payload
byte directly. The descriptor FIFO holds `XP_BUF / MIN_SEG + 2` entries. That
is enough for a buffer full of minimum-size segments.

## The egress datapath

### Reassembly

`egress_datapath` receives the segments of one crossbar output. It writes
each payload byte into the reassembly region of the segment's source input, a
ring of `REGION` bytes. It then follows the packets inside the byte stream:

* at byte 0 of a packet it records the start address;
* at bytes 2..3 it learns the packet's length;
* from then on it knows where the packet ends, and so where the next one
  starts.

### Early release

A packet is released for transmission as soon as the segment now arriving is
known to contain its last byte. That is either:

* at the segment header, if the packet length is already known and the
  remaining bytes fit in this segment; or
* at the packet's length bytes, if those come in this same segment.

The packet therefore starts to leave while its last segment is still coming
in. Both sides move one byte per clock, so transmission never overtakes
reception.

Released packets queue in a ready FIFO of `RDY_DEPTH` entries. They are sent
one at a time, with `out_sop`/`out_eop`, one byte per clock. Packets leave
back to back, with no idle clock between them. That matters: segments
arrive at up to 512/516 of a byte per clock, and a gap after every 40-byte
packet would lower the egress rate to 40/41, so the regions would slowly
fill.

### Region size and overflow

The regions are fixed: one per source. `cicq_switch` makes each region
`2 * MAX_PKT` bytes. A region must hold one packet still being assembled and
one complete packet waiting for the port. There is no back-pressure from the
egress to the crossbar. A region or ready-FIFO overflow sets the sticky
`reasm_overflow` flag, and the testbenches require it to stay low.

## Where this RTL departs from the reference design, and what it leaves out

* **Reassembly memory.** The reference sizes the egress reassembly memory at
  N x MaxPktSize, shared among the N sources. Here each source has a fixed
  region of 2 x MaxPktSize (2 x 32 x 1500 B = 96 KB per egress). That is
  simpler, and it is safe without egress flow control.
* **No link delay.** The links between ingress, crossbar and egress are wired
  directly, so the credit round trip is a few clocks rather than the 500 byte
  times assumed in the reference evaluation. With a longer round trip,
  `XP_BUF` must cover it to keep full rate.
* **DRAM.** The DRAM has a byte-wide port with a fixed read latency. The
  reference's wide, banked DDR interface, with blocks striped over banks in
  128-byte sub-blocks, is not modelled. Migration copies whole blocks.
* **Sizes not given by the reference**: `SRAM_BLKS = 96`, `DRAM_BLKS = 256`
  and `RD_LAT = 4`. 96 SRAM blocks allow two tail blocks for each of the 32
  queues, plus room for short queues.
* **One priority level** and no egress sub-ports.
* **Packet size.** Packets longer than `MAX_PKT` (1500 B), such as 64 KB
  jumbo frames, need a larger `MAX_PKT`. The length field also limits a
  packet to 65535 bytes.
* **Header processing** (choosing each packet's output) happens outside. Its
  result enters on `in_dest` with the first byte of the packet.
* Whole-packet store before a packet's bytes may leave the ingress, and one
  idle clock between segments, are choices of this RTL.

## Parameters of `cicq_switch`

| parameter | default | meaning |
|---|---|---|
| `N` | 32 | ports |
| `MAX_SEG` | 512 | maximum segment payload; also the VOQ block size |
| `MIN_SEG` | 40 | minimum segment payload (minimum packet size) |
| `XP_BUF` | 512 | bytes per crosspoint buffer, and initial credits |
| `SRAM_BLKS` | 96 | on-chip VOQ blocks per ingress |
| `DRAM_BLKS` | 256 | off-chip VOQ blocks per ingress |
| `TAIL_SRAM` | 2 | SRAM blocks a queue keeps before migrating to DRAM |
| `RD_LAT` | 4 | read latency of SRAM and DRAM, in clocks |
| `MAX_PKT` | 1500 | largest packet, in bytes |

Constraints:

* `MAX_SEG > 2 * MIN_SEG`;
* `XP_BUF >= MAX_SEG`;
* packets between `MIN_SEG` and `MAX_PKT` bytes.

Reset is asynchronous and active low.

## Testbenches and simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. `tb/dram_model.sv` is
a behavioural DRAM used by the testbenches.

| testbench | what it checks |
|---|---|
| `tb_seg_size_calc` | every backlog from 0 to 4 x MAX_SEG against the rule, and the 280 and 580 examples |
| `tb_rr_arbiter` | grants against a reference round-robin model |
| `tb_crosspoint_buffer` | byte order, length FIFO and occupancy, with the buffer driven to full |
| `tb_voq_buffer` | contents of random segment reads against per-queue reference queues, with migrations, DRAM reads and SRAM-full back-pressure |
| `tb_ingress_datapath` | segment headers, sizes and payload bytes against reference queues; credit limits and stalls; multipacket and split segments; DRAM reads |
| `tb_buffered_crossbar` | segment contents per output, source rewrite, credits, output contention, cut-through |
| `tb_egress_datapath` | reassembled packets against sent ones; early release; no overflow |
| `tb_cicq_switch` | end to end at N=4 with small sizes. Every packet must come out unchanged at its output, in order per input/output pair. It counts, and requires at least once: multipacket segments, split packets, maximum-size segments, credit stalls, migrations, DRAM reads, output contention and early release |
| `tb_cicq_switch_full` | end to end with all defaults (32 ports), random traffic with a hot-spot output |
| `tb_cicq_workloads` | 4 ports, all other parameters at their defaults, under the traffic models the design was evaluated with (see below) |

### Behaviour under load

`tb_cicq_workloads` feeds two traffic mixes, with uniform destinations and
exponential gaps:

* **MinPkt**: all packets are 40 bytes.
* **Synthetic1500Max**: 64 % 40-byte, 9 % 552-byte, 9 % 576-byte and 18 %
  1500-byte packets.

It checks that every packet arrives intact and that the segment size adapts
to load. One run gave these figures (delays run from first byte in to first
byte out, and include storing the whole packet at the ingress):

| traffic | load | mean segment payload | mean delay |
|---|---|---|---|
| MinPkt | 0.3 | 40 B | 67 clocks |
| MinPkt | 0.9 | 45 B | 422 clocks |
| MinPkt | 1.0, last quarter of 300k clocks | 459 B | (queues growing) |
| Synthetic1500Max | 0.3 | 280 B | 1050 clocks |
| Synthetic1500Max | 0.9 | 351 B | 4439 clocks |

At light load a segment is a single packet, so the 4-byte header costs 10 %
on 40-byte packets, but the links are mostly idle then. As inputs approach
line rate, the queues lengthen and segments merge many packets. The header
cost then falls below 1 % at the full segment size. The input links have no
speedup, so at a load of exactly 1.0 the header and the idle clock between
segments make the queues grow slowly without bound. The Synthetic1500Max
delays are dominated by the 1500-byte packets. These are stored whole at the
ingress, and released at the egress only when their last segment starts to
arrive.

With plain Verilator (5.x), for example:

```
verilator --binary --timing -Irtl -Itb rtl/cicq_pkg.sv tb/tb_cicq_switch.sv \
    --top-module tb_cicq_switch -o sim && ./obj_dir/sim
```

Verilator finds the other modules by file name through `-Irtl -Itb`. The
full-size testbench takes a few minutes to build and under a minute to run.
