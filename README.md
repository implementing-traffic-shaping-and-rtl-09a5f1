# Traffic shaping and link scheduling in a network interface

A streaming server may serve hundreds of flows at once, such as video to
remote players. Each flow needs its data to leave at a steady pace: a burst of
S packets every T time units, for D bursts. If the host CPU paces every flow
in software, it must wake up for every burst of every flow, and any delay in
getting the CPU turns into jitter at the client. This design moves both jobs
into the network interface card (NIC):

* **traffic shaping**: releasing each flow's bursts no faster than its
  contract allows;
* **link scheduling**: choosing which released burst goes on the link next.

The host describes each flow once, as a short chain of *schedule segments*.
It leaves the flow's packets in a ring buffer in its own memory. From then on
the NIC fetches the packets by DMA, releases one burst per interval and
sends the most urgent released burst first. When no paced burst is due, it
fills the link with best-effort traffic. The host hears back only when a flow
has finished.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). Everything sits in
`rtl/`, with one module or package per file. Self-checking testbenches are
in `tb/`.

## Time is counted in chunks

All traffic moves in *chunks* of 128 bytes, which is the fixed packet size.
Larger packets are sent as several chunks. The NIC's notion of time, `now`,
is not wall-clock time: it is **the number of chunks scheduled for
transmission so far**. A flow with T = 10 and S = 2 is therefore entitled to
2 chunks out of every 10 chunks the link carries, whatever the link speed.

`now` is 32 bits wide and wraps. All time comparisons in the design use the
sign of the difference (`nic_pkg::time_before`). They stay correct as long as
the times being compared lie less than 2^31 chunks apart.

## Schedule segments

A segment (`nic_pkg::seg_t`) holds:

| field      | width | meaning |
|------------|-------|---------|
| `more`     | 1     | another segment of this flow follows |
| `infinite` | 1     | repeat this segment's bursts until the flow is stopped |
| `t`        | 16    | burst interval T, in chunk times |
| `d`        | 16    | duration D: number of bursts in this segment |
| `s`        | 8     | burst size S, in chunks |

A flow whose rate changes over time, such as a video with scene changes, is
a list of segments. The segments live in a schedule-segment SRAM, one per
line, linked per flow (`segment_store`):
* a pointer memory indexed by flow id holds each flow's first and last line;
* a free-line FIFO hands out lines and takes them back when a segment is
  finished or a flow ends;
* lines never used yet come from a counter, so nothing has to be initialised
  after reset.

## Two tags per flow, two priority queues

The heart of the control block is a pair of sorted queues
(`priority_queue`).

* **Shaper queue, sorted by start time.** Every active flow owns exactly one
  shaper tag `{flow, start, finish}`, which describes its next burst. The
  queue is as deep as there are flows.
* **Scheduler queue, sorted by finish time.** It holds the bursts that are
  already allowed out. Each entry is `{flow, finish, S, last}`.

The timing rules are:
* **First burst:** it starts at the moment the flow is started: `start = now`.
* **Every burst:** `finish = start + T`.
* **Next burst:** it starts when the previous one finishes, so
  `next start = previous finish`.
* **Eligibility:** a burst becomes eligible once `now` has reached its start
  time.

The finish time is the deadline of a burst. It is also the earliest moment
the flow's next burst may begin.

### Shaper (`traffic_shaper`)

The shaper is the control state machine of the NIC. When it is idle, it first
checks the head of the shaper queue. If that tag is eligible and the
scheduler queue has room, it *moves* the tag:
1. It pops the shaper tag and reads the flow's current segment.
2. It inserts a scheduler tag: key = finish, with the segment's S and a
   `last` flag if this is the flow's final burst.
3. If bursts remain, it inserts the flow's next shaper tag with start = the
   old finish and finish = start + T. T comes from the current segment, or
   from the next segment when the current one is used up; the used-up line
   is then freed.
4. After the final burst, it frees the flow's lines and posts an end-of-flow
   request.

When nothing is eligible, it executes one host command:

| command     | effect |
|-------------|--------|
| `CMD_SEG`   | append a segment to a flow's list (an error request if the SRAM is full) |
| `CMD_START` | read the flow's first segment, open the flow in the buffer manager with its host ring (address, length in chunks), insert its first shaper tag |
| `CMD_STOP`  | mark an active flow as stopping; its next move frees its segments and posts a *stopped* request |
| `CMD_BE`    | pass a best-effort chunk's host address to the buffer manager |

A stopped flow still needs its buffered chunks returned. The shaper
therefore sends the scheduler a *release tag*: zero chunks with `last` set.
Because that tag passes through the same queues, the release happens after
every burst already scheduled for that flow.

The shaper raises `settled` whenever no eligible tag could be moved right now.

### Scheduler and clock (`link_scheduler`)

Once the shaper has settled and the transmit FIFO has room, the scheduler
makes one decision per cycle:

1. **A scheduler tag is waiting.** It pops the tag with the smallest finish
   time, writes a data tag (flow, S, last) into the transmit FIFO, and
   advances `now` by S.
2. **Otherwise, a best-effort chunk is already in NIC memory.** It writes a
   best-effort data tag and advances `now` by 1.
3. **Otherwise, the link has just spent one chunk time idle.** It advances
   `now` by 1.

The scheduler waits for `settled` so that a burst which has only just become
eligible takes part in the same decision. Rule 3 keeps time moving while the
link is empty; without it, a flow waiting for its start time would wait
forever. A tag popped after its finish time counts as *late*. This happens
when the flows together ask for more than the link can carry.

## Buffer manager: the hardest part

`buffer_manager` holds the packet memory, 1024 chunks by default. It
stitches the chunks into one linked list per flow plus one list for
best-effort chunks, and keeps a free list. Per flow it records:
* the host ring (base address and length in chunks);
* the read offset into that ring;
* the chunk count;
* an active bit and a refill-pending bit.

Two sides run at once.

* **Download.** The manager queues a flow for a refill in three cases: when
  it is set up, when sending leaves it with fewer than BATCH (4) chunks, and
  when a finished download still left it short. One DMA command at a time
  fetches up to BATCH chunks from the ring, which wraps at its end. Each chunk
  is appended to the flow's list when its last word lands. Best-effort
  chunks are fetched one at a time from their own address FIFO.
* **Transmit.** For each data tag, the manager unlinks S chunks from the
  head of the flow's list. It copies each one, as 16 words of 64 bits, into
  the physical interface FIFO, then returns the chunk to the free list. A
  tag with `last` set then releases the flow:
  1. it waits for a download already in flight for the flow;
  2. it clears the flow's active bit;
  3. it returns every chunk the flow still holds.

The subtle point is **running out of memory**. Suppose the memory is full of
chunks belonging to flows that are not at the head of the schedule. The
scheduled flow's refill then waits for free chunks, and none will come. Two
rules rule this out:

1. **A reserve.** Refill and best-effort downloads start only if at least
   BATCH chunks stay free afterwards.
2. **An urgent fetch.** When the transmit side stalls because the scheduled
   flow has no chunk, that flow is fetched ahead of every queued refill. This
   fetch may dip into the reserve, but it fetches *only the chunks the
   current tag still needs*.

Everything taken from the reserve is therefore sent at once and freed again.
Between tags at least BATCH chunks are always free, so a stalled tag can
always make progress. A refill still queued for a flow that has been
released is dropped when it reaches the head of the refill queue. A flow id
can be set up again once nothing is pending for it.

Only one list operation happens per cycle: append, unlink or set up.
Appends win, because DMA data is never stalled.

## Data path and interfaces

`nic_top` wires the blocks together:

```
host --> command FIFO --> control block --> request FIFO --> host
                          (segment store, shaper, scheduler, 2 queues)
control block --data tags--> transmit FIFO --> buffer manager
buffer manager --64-bit words--> physical interface FIFO --> link
buffer manager <--> DMA engine <-- DMA FIFO <-- host memory read channel
```

Top-level ports:

| group | signals | protocol |
|-------|---------|----------|
| commands | `cmd_push`, `cmd_data` (`cmd_t`), `cmd_full` | write into the 16-entry command FIFO |
| requests | `req_pop`, `req_data` (`req_t`: end of flow / stopped / error + flow id), `req_empty` | read from the 16-entry request FIFO; `req_data` shows the head |
| host memory | `hr_valid`, `hr_ready`, `hr_addr` (byte address, 32 bits), `hr_rvalid`, `hr_rdata` (64 bits) | one word per request; read data returns in request order with any latency |
| link | `link_valid`, `link_ready`, `link_word` (`link_word_t`: data, flow, best-effort bit, end-of-chunk) | one word per cycle, valid/ready |
| time | `now` | the chunk clock |
| statistics | `stat_*` | counts of moves, segment switches, scheduled tags, best-effort releases, idle slots, late tags, chunks sent, downloads, stalls, releases, and a scheduler-queue-full flag |

`dma_engine` turns one command (address, number of chunks) into a stream of
word reads. It issues one read per cycle when the host is ready. Returning
words pass a small FIFO at the host side and then go straight to the buffer
manager, one per cycle.

All blocks share one clock and an active-low asynchronous reset.

## Timing

| operation | cycles |
|-----------|--------|
| priority queue insert and/or pop | 1 (both together in one cycle) |
| shaper move | 2 (4 more when a new segment is opened) |
| host command | 2 to 4 |
| scheduling decision | 1, once the shaper has settled |
| chunk copy to the link | 17 (16 words plus one to unlink), at one word per cycle |

A 128-byte chunk lasts 1.02 µs on a 1 Gbit/s link, which is about 100 cycles
at 100 MHz. The control and data paths therefore have ample slack at the
link speeds this design targets (100 Mbit/s to 1 Gbit/s).

## Parameters

| parameter | default | notes |
|-----------|---------|-------|
| `NUM_FLOWS` (package) | 1024 | flow ids; sized for about a thousand simultaneous streams at 1 Gbit/s |
| `SEG_LINES` | 2048 | schedule-segment SRAM lines |
| `SCHED_PQ_DEPTH` | 256 | scheduler queue; 256 is enough when long bursts are split (below) |
| shaper queue depth | `NUM_FLOWS` | one tag per flow, so it cannot overflow |
| `PKT_CHUNKS` | 1024 | packet memory (128 KiB) |
| `BATCH` | 4 | chunks per refill, and the free-chunk reserve |
| `CMD_DEPTH`, `REQ_DEPTH`, `TX_DEPTH`, `PHY_DEPTH`, `DMA_DEPTH` | 16, 16, 16, 32, 4 | FIFO depths |
| `CHUNK_BYTES`, `WORD_W` (package) | 128, 64 | chunk size and datapath width |

**Long bursts and queue size.** A flow that sends 25 KB every 33 ms blocks
the link for a long time when its burst goes out. Shorter-period flows queued
behind it miss their deadlines, and a deeper scheduler queue helps only up to
a point. Splitting the period is what works: for example 6 chunks every 1 ms
instead of 200 chunks every 33 ms. With split periods, a 256-entry queue
performs about as well as one of more than 8000 entries without them. The
host does the splitting by choosing S and T; the hardware needs nothing
extra.

## Where this design makes its own choices

These points follow the source description of the architecture:
* the block structure;
* the 128-byte chunk and the chunk-count clock;
* segments with T, S, D and the more/infinite flags;
* start time = current time for a flow's first burst, finish = start + T;
* the two queues sorted by start and by finish;
* per-flow packet lists plus a best-effort list, with downloads of several
  packets at a time;
* end-of-flow requests;
* best-effort traffic when nothing is eligible.

These are choices of this design:

* **Next start time.** The next burst starts at the previous finish time,
  not one more interval later. This keeps a flow at exactly S chunks per T
  chunk times.
* **Priority queue.** It is a sorted shift register: every entry compares
  itself with the new key in parallel. This gives one insert and one removal
  per cycle at any depth, at a cost in flip-flops that grows linearly with
  depth. Equal keys leave in arrival order.
* **Idle-slot clock advance and wrap-safe time comparison.** See above.
* **Host rings.** The ring layout of each flow's packets in host memory, and
  the host read channel.
* **Sizes and formats.** All widths, FIFO depths, memory sizes, the refill
  threshold and batch size, and the request codes.
* **Stops and memory pressure.** The release tag for stopped flows, and the
  reserve and urgent fetch in the buffer manager.
* **Statistics counters.** Status is read from the `stat_*` ports. The
  request FIFO carries only end-of-flow, stopped and error requests, not
  status reports.

Not part of the RTL:
* the host (CPU, operating system, memory);
* the physical link;
* an alternative where the same shaping runs as software on a programmable
  NIC processor.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. All data is random,
from `$urandom`.

| testbench | what it checks |
|-----------|----------------|
| `tb_sync_fifo` | against a queue model, with random push/pop including push-while-full-with-pop |
| `tb_priority_queue` | against an unsorted reference list: the head is always the smallest key, equal keys leave first-in first-out, keys cross the 32-bit wrap, inserts and pops happen in the same cycle |
| `tb_segment_store` | per-flow segment lists against a model, free-line accounting, a full SRAM |
| `tb_dma_engine` | addresses and data against a host model with latency and stalls |
| `tb_link_scheduler` | decision order, best-effort fallback, idle advance, the clock value and the late count, against a model |
| `tb_traffic_shaper` | every scheduler tag against a timetable computed from the segments alone; never settled with an eligible tag waiting; end-of-flow, stopped and error requests; all lines freed |
| `tb_control_block` | shaper and scheduler together: each data tag is the flow's next burst, not before its start, with the earliest finish among eligible bursts; best effort only when nothing is eligible; the clock equals chunks scheduled plus idle slots |
| `tb_buffer_manager` | with the real DMA engine and a small memory (32 chunks): every word on the link against host memory, ring wrap, release and reuse of a flow id, all memory free at the end |
| `tb_nic_top` | end to end at reduced sizes (16 flows, 64 chunks, 4-entry scheduler queue); see below |
| `tb_nic_top_full` | the same end-to-end test with every parameter at its default; flow ids span 0 to 1023 |
| `tb_period_division` | a workload: four long-burst flows and twenty short-period flows at about 60 % load, once with 200-chunk bursts every 2000 chunk times and once with the period divided by 25; all data must arrive, and the divided run must show fewer late bursts and a smaller average deviation of the short flows' period |

The end-to-end tests play the server:
* they download segment chains for 12 finite flows and one infinite flow;
* they start the flows, post best-effort chunks and later stop the infinite
  flow;
* they serve DMA reads with latency and stalls, and apply random
  back-pressure on the link.

Every link word is compared with the host memory word it came from. Every
scheduling decision is checked against an independent timetable. Each
flow's chunk total and request are checked, and all memory must be free at
the end.

In `tb_period_division` the short-period flows deviate from their period
by 38.8 % on average with the long bursts (320 late bursts), and by 12.5 %
with divided periods (no late bursts).

The tests also count how often each mechanism happened and fail if one never
did: segment switch, scheduler queue full, best-effort release, idle link
slot, late burst, stop, stall on missing data, refill, release, host ring
wrap, transmit FIFO full and link back-pressure. The full-size run has only
13 flows, so its 256-entry scheduler queue never fills; the reduced test
covers that case.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_nic_top \
    rtl/nic_pkg.sv rtl/*.sv tb/tb_nic_top.sv
./obj_dir/Vtb_nic_top
```

The full-size test takes a few minutes to compile. It simulates in well under
a second.

## Limits

* **Queue area.** The shift-register queues cost about 60 flip-flops per
  entry. At the defaults (1024 + 256 entries) they dominate the area, and
  synthesis of the full top level is slow.
* **Decision rate.** One scheduling decision per cycle, and a move takes 2
  cycles. Thousands of flows on a much faster link would need a pipelined
  shaper.
* **Address width.** Host addresses are physical, 32 bits; there is no
  address translation.
* **Host error handling.** None beyond the error request. A command for an
  out-of-range ring is not checked.
