# SPAMeR routing device: hardware message queues with speculative push

Message queues between threads usually live in shared memory. Every enqueue
and dequeue then fights over the cache lines that hold the queue, and a
consumer that asks for data waits for a round trip through the coherence
protocol. This design moves the queue into a small device on the on-chip
network, the **routing device**:

* A producer core writes a whole 64-byte cache line to a device address that
  names a queue. This is a *push*.
* A consumer core writes the address of one of its own cache lines to the
  same queue's device address. This is a *fetch*. It also marks the line in
  its private cache as willing to accept an injection.
* The device pairs lines with requests, per queue and in arrival order. It
  then writes (injects) each line straight into the requesting consumer's
  cache line.
* The consumer's cache answers every injection with *hit* (written) or
  *miss* (the line was evicted, or still holds unread data).

The **speculative push** extension (SPAMeR) removes the wait for a request.
A consumer registers runs of its cache lines once. From then on, a line that
finds no waiting request can be sent to one of those registered lines
anyway, after a delay chosen by a **delay predictor**. The predictor learns
how fast each consumer drains its lines.

The top module is `srd` (SPAMeR routing device). It contains the plain
routing-device structures (link table, consumer buffer, producer buffer, a
three-stage address mapping pipeline) plus the speculation buffer and the
delay predictor.

## Queues, addresses and packets

Queues are named by a **shared queue identifier (SQI)**. A core reaches the
device through ordinary physical addresses of a device-memory window:

| bits     | field                                                            |
|----------|------------------------------------------------------------------|
| 51       | device-memory tag: must be 1 (parameter `SPACE_TAG`)             |
| 27:24    | router id: must equal `RD_ID`; packets for other devices are ignored |
| 23:18    | SQI (`NUM_SQI` = 64 queues)                                      |
| 17       | 0: normal queue page, 1: registration range for speculative targets |
| 16:12    | rest of the page number (free for software)                      |
| 11:0     | offset in the 4 KiB page (free for software; 64-byte endpoints)  |

The positions of the SQI, router-id and page fields come from the original
layout. The width of the router id, the value of the tag and the use of
bit 17 for the registration range are this design's choices.

Every packet arrives on the `in_*` port, one per cycle, and is always taken.
What the payload means depends on the operation and the range:

| `in_op_i` | bit 17 | request kind     | `in_data_i`                                                     |
|-----------|--------|------------------|-----------------------------------------------------------------|
| push      | 0      | push (line)      | the 64-byte line                                                |
| fetch     | 0      | fetch (request)  | [51:0] consumer cache line address                              |
| fetch     | 1      | register targets | [51:6] first line of a run, [5:0] number of lines (0 means 64)  |
| push      | 1      | invalid          | ignored                                                         |

One cycle later `ack_*` returns a status for the issuing core (`in_src_i`),
which a core would put in the result register of its push or fetch
instruction:
* `ST_OK` (0): the packet was taken.
* `ST_FULL` (1): no free slot. Software retries later.
* `ST_INVALID` (2): the request is malformed, or the SQI is at or above `NUM_SQI`.

## The storage: one table, three buffers, many linked lists

All queues share the buffers. A slot is taken by whichever queue needs it, so
a queue's contents are not contiguous. Each queue is kept as a **linked
list threaded through the shared slots**. Slot index 0 means NULL, so
every buffer numbers its slots 1..64.

**Link table** (`vlrd_link_tab`). One row per SQI with five pointers:
* `prodHead`/`prodTail`: the lines that are waiting for a consumer.
* `consHead`/`consTail`: the requests that are waiting for a line.
* `specHead`: the next speculation entry to use.

At most one of the first two lists is non-empty at any time. A line and a
request of the same SQI never both wait.

**Consumer buffer** (`vlrd_cons_buf`). Each slot holds one request: the
target line address (`consTgt`), the requesting core, the SQI, and two
links:
* `nextIn` keeps *arrival order*. The list head `CIHR` is the next request
  to enter the mapping pipeline, and `CITR` is its tail.
* `nextL` chains the requests of one SQI that are waiting.

The free-slot register `CIFR` always points at a free slot. After each
allocation it moves on by a round-robin search that starts after the slot
just taken, and wraps around the end.

**Producer buffer** (`vlrd_prod_buf`). Each slot holds a line and moves
through these states:

```
        push                    map: no request, no free target
 FREE ───────► IN ─── pipeline ──────────────────────────────────► LINK
                ▲          │ map: request found        │ later request
                │          ▼                           ▼
                │         OUT (sending queue) ◄────────┘
                │          │
                │          │ map: speculative target   SPEC (speculative queue)
                │          ▼                               │ send time reached
                │        SENT ◄────────────────────────────┘
                │          │ answer
                └── miss ──┴── hit ──► FREE
```

* **IN**: a linked list in arrival order (`PIHR`/`PITR`, free register
  `PIFR`), like the consumer buffer's input list.
* **LINK**: the per-SQI waiting lists (through `nextL`). They are headed
  from the link table.
* **OUT**: the sending queue (`POHR`/`POTR`), which is strictly FIFO. Each
  slot records its target address and the consumer slot it was matched with
  (`mapped`).
* **SPEC**: the speculative push queue. Each slot records its target line,
  the speculation entry that gave it, and the earliest time it may leave.
* **SENT**: the injection is out and the slot waits for the cache's answer.
  On a miss the slot is appended to the IN list again and goes through
  mapping once more.

The injection port `out_*` offers the OUT head first. Otherwise it offers the
lowest-numbered SPEC slot whose send time has come. The slot number travels
as `out_tag_o`, and the answer `pr_tag_i` names the slot again. `out_dst_o`
names the consumer core: the core that fetched the line, or the core that
registered the speculative line range.

**Speculation buffer** (`srd_spec_buf`). Each entry describes a run of
consumer lines registered for one SQI:
* `base`, `len` and `offset`. The target is `base + offset × 64`. A hit
  advances `offset`, which wraps to 0 at `len`, so the lines of a run are
  filled in turn.
* `next`: the entries of one SQI form a **circular list**. The link table's
  `specHead` walks around it.
* `on_fly`: set while the entry has a line in the SPEC queue or in flight.
  Such an entry offers no new target, which throttles speculation to one
  outstanding push per entry.
* The delay predictor's history for the entry.

Registration takes the lowest free entry. Entries stay registered until
reset.

## The address mapping pipeline

`srd_map_pipeline` is the heart of the design. Every request (head of the
consumer input list) and every line (head of the producer IN list) passes
through three stages, one item per cycle:

1. **Stage 1**: pick the item and read its SQI's link-table row.
2. **Stage 2**: decide, and read the buffer slot that the decision needs.
3. **Stage 3**: write back. This covers the link-table row, the `nextL`
   links, the producer slot's new state and target, the speculation loop,
   and `on_fly`.

| item    | condition in Stage 2                                  | decision     | Stage 3 effect                                      |
|---------|--------------------------------------------------------|--------------|-----------------------------------------------------|
| request | lines wait (`prodHead`≠0)                               | CONS_HIT     | oldest line → OUT with this request's target; `prodHead` ← its `nextL` |
| request | no line waits                                           | CONS_MISS    | request appended to the SQI's request list          |
| line    | requests wait (`consHead`≠0)                            | PROD_HIT     | line → OUT with the oldest request's target; `consHead` ← its `nextL` |
| line    | no request, `specHead` entry registered and not on_fly  | PROD_SPEC    | line → SPEC with the entry's target and send time; `specHead` ← next |
| line    | otherwise                                               | PROD_MISS    | line appended to the SQI's line list (busy entry: `specHead` still rotates) |
| retry   | lines wait and `specHead` entry is free                 | RETRY_SPEC   | oldest waiting line → SPEC                          |
| retry   | otherwise                                               | RETRY_ROT    | `specHead` ← next                                   |
| register| —                                                       | SREG         | new entry linked into the SQI's loop after `specHead` |

Two kinds of items do not come from the buffers:
* A **registration** (SREG) links a newly registered speculation entry into
  its SQI's loop. Because only Stage 3 writes the loop, the loop can never
  be changed under a Stage 2 read.
* A **retry** is queued for an SQI whenever one of its speculative pushes is
  answered. It lets a line that waited only because every entry was
  `on_fly` try again once an entry is free.

Registrations go first, then retries. Requests and lines alternate.

**Hazards.** A Stage 3 write to a link-table row is forwarded to a Stage 1
read of the same row in the same cycle. An item whose SQI is still in
Stage 2 waits one cycle (`ev_stall_o`). If the other buffer's head has a
different SQI, that item takes the slot instead, so no cycle is lost.
Same-SQI items are therefore at least two cycles apart, and every Stage 2
buffer read sees all earlier writes. This is the original cycle-by-cycle
example, reproduced by `tb_srd_map_pipeline`:

| cycle | Stage 1                 | Stage 2                       | Stage 3                          |
|-------|-------------------------|-------------------------------|----------------------------------|
| 1     | request A (SQI 1)       |                               |                                  |
| 2     | request B (SQI 0)       | A: miss                       |                                  |
| 3     | line 1 (SQI 1)          | B: miss                       | A queued; `consHead[1]`=A, forwarded to Stage 1 |
| 4     | line 2 (SQI 2)          | line 1: hit on A              | B queued                         |
| 5     | line 3 (SQI 1)          | line 2: miss                  | line 1 → OUT, target of A        |

**Latency.** A line pushed to an SQI with a waiting request is offered on
`out_*` 4 cycles after the push is taken: 1 cycle to enter the IN list,
then Stages 1 to 3, then the sending queue. The status comes back 1 cycle
after the packet.

## Answers from the consumer caches

| answer to      | hit                                                           | miss                                                   |
|----------------|---------------------------------------------------------------|--------------------------------------------------------|
| on-demand push | line slot freed; consumer slot freed                          | line back to IN for mapping again; consumer slot freed |
| speculative push | line slot freed; entry `offset` advances; history updated; `on_fly` cleared; retry queued | line back to IN; history updated; `on_fly` cleared; retry queued |

A request slot is held until the injection it caused is answered, not just
until it is matched. On a miss the request is dropped. The consumer's line
has lost its "willing" mark (eviction or a context switch), so the consumer
must fetch again.

## Delay prediction

`srd_delay_predictor` is combinational. For an entry's history and the
current time stamp it returns when a speculative push may leave. For an
answer it returns the updated history. `cfg_alg_i` picks one of three
algorithms at run time:

* **Odelay** (0): send at once. Fastest, but each entry keeps retrying and
  costs network bandwidth.
* **Adapt** (1): wait `delay`. A hit halves `delay` and a miss doubles it.
  A miss with a delay below `DELTA` starts at `DELTA`, because doubling zero
  would never grow. Shifts saturate.
* **Tuned** (2): the interval between the last two hits on the entry is the
  reference. On a hit, `delay = interval − TAU` and a deadline
  `ddl = interval + ZETA` are set. A miss before the deadline adds `DELTA`;
  past it, the delay is shifted left by `ALPHA`. The lookup tries, in order:
  1. half the delay (a one-bit hash decides whether to halve);
  2. the planned delay;
  3. at once if nothing failed yet;
  4. `DELTA` later while the deadline holds;
  5. the full delay after that.

  During the first `BETA` hits it sends at once, or `DELTA` later after a
  miss.

The parameter defaults are `ZETA=128`, `TAU=48`, `DELTA=32`, `ALPHA=1` and
`BETA=2` cycles or shifts. History per entry: `delay`, `ddl`, `last` (time of
the last hit), `nfills` (hits, saturating 8 bits), and `failed`. The time
stamp is a free-running 32-bit cycle counter, and comparisons are modulo
2^32.

## Top-level interface (`srd`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `cfg_alg_i` | in | 2 | delay algorithm: 0 Odelay, 1 adapt, 2 tuned |
| `in_valid_i` / `in_ready_o` | in/out | 1 | packet from the network; ready is always 1 |
| `in_op_i` | in | 1 | 0 push, 1 fetch |
| `in_addr_i` | in | 52 | device address (see above) |
| `in_data_i` | in | 512 | line, request address or registration |
| `in_src_i` | in | 4 | issuing core |
| `ack_valid_o`, `ack_dst_o`, `ack_kind_o`, `ack_status_o` | out | 1, 4, 2, 2 | status, one cycle after a packet for this device |
| `out_valid_o` / `out_ready_i` | out/in | 1 | injection offered / taken |
| `out_addr_o`, `out_data_o`, `out_tag_o`, `out_spec_o` | out | 52, 512, 7, 1 | target line, data, slot tag, speculative flag |
| `out_dst_o` | out | 4 | consumer core that registered the target line |
| `pr_valid_i`, `pr_tag_i`, `pr_hit_i` | in | 1, 7, 1 | answer from the target cache |
| `tsc_o` | out | 32 | time stamp counter |
| `ev_stall_o`, `ev_valid_o`, `ev_dec_o`, `idle_o` | out | 1, 1, 4, 1 | observation: interlock stall, Stage 3 decision, nothing in flight |

Parameters: `NUM_SQI`, `PROD_DEPTH`, `CONS_DEPTH` and `SPEC_DEPTH` default
to 64 each, the size of the evaluated configuration. `RD_BITS=4` and
`RD_ID=0` set the router id. `ZETA`, `TAU`, `DELTA`, `ALPHA` and `BETA`
configure the tuned predictor. Slot indices are 7 bits, so a buffer holds
up to 127 slots. Synthesis of the default size gives about 2,800 word-level
cells, 567 flip-flops, and about 118 kbit of memory arrays (the three
buffers and the link table).

## Where this design makes its own choices

The structures, the pipeline split, the mapping decisions, the
speculation loop with `offset`/`on_fly`, and the three delay algorithms
follow the original description. The following were not specified there
and are choices of this design:

* **Interface.** Packet formats, the registration payload, the status codes,
  and the tag/answer handshake. One packet is taken per cycle, with no
  back-pressure.
* **Core id.** The core id registered with a fetch is taken from the
  packet source field (`in_src_i`). It is kept in the consumer buffer or
  the speculation buffer and is output as `out_dst_o`.
* **Pipeline control.** The same-SQI interlock replaces full forwarding
  between Stages 2/3 and 1. The issue order, and the SREG and RETRY items,
  are also this design's.
* **Speculation rotation.** `specHead` also rotates past a busy entry.
  The SPEC queue sends the lowest ready slot first, and the sending queue
  has priority over it.
* **Predictor details.** The hash that halves the tuned delay is the parity
  of `delay[3:0] XOR tsc[3:0]`. "Initialising" means fewer than `BETA` hits.
  A hit interval shorter than `TAU` gives a delay of 0.
* **Missing operations.** There is no way to deregister a speculation
  entry.
* **Request on a miss.** An on-demand push that misses drops its request.

Outside this RTL: the cores and their push/fetch instructions, the
"willing" bit in the private caches that decides hit or miss, the network,
the memory hierarchy, and the software library that formats lines and
endpoints. The testbenches model the caches' answers.

## Simulating

Everything is plain SystemVerilog-2017. The package must be read first:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/vl_pkg.sv tb/tb_srd.sv --top-module tb_srd -Mdir obj_tb_srd
./obj_tb_srd/Vtb_srd
```

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_srd` | whole device at default size. Latency of 4 cycles, data before request, interlock stalls, full prodBuf and full consBuf (status and FIFO order afterwards), rejected on-demand push, invalid and foreign packets, and speculation with each algorithm under random back-pressure, including offset wrap. Every injection must name the core that asked for its line. Each pipeline decision and mechanism is counted and must occur. |
| `tb_srd_workloads` | whole device at default size running the communication patterns of eight message-queue benchmarks (below), each once on demand and once speculatively: exactly-once delivery to the right queue and core, order on 1:1 queues, idle at the end |
| `tb_srd_map_pipeline` | the pipeline with real link table and modelled buffers: the cycle example above, 600 cycles of random traffic against a per-SQI FIFO model, speculation and retry; the core id carried to each mapping |
| `tb_vlrd_link_tab` | reads/writes against an array, forwarding, reset |
| `tb_vlrd_cons_buf`, `tb_vlrd_prod_buf`, `tb_srd_spec_buf` | random traffic against reference models (8-slot instances) |
| `tb_srd_delay_predictor` | all three algorithms against a reference model, random and directed |
| `tb_vlrd_addr_decode` | field extraction and classification for random addresses |

### Benchmark communication patterns

`tb_srd_workloads` models each thread as producer and consumer endpoints.
Producers push one line at a time and back off when told "full". Consumers
fetch a line again after consuming it, or register their lines once in the
speculative runs. The queue counts are those of the benchmarks. The thread
counts fit 16 cores. Each run used 12 or more messages per source:

| pattern | queues | deliveries | on demand (cycles) | speculative (cycles) |
|---------|--------|-----------|-----------|-------------|
| ping-pong (1:1)×2 | 2 | 24 | 200–380 | 150–300 (Odelay) |
| halo, 4×4 grid, (1:1)×48 | 48 | 576 | 1240 | 1330–1390 (adapt) |
| sweep, two wavefronts, (1:1)×48 | 48 | 576 | 1250–1260 | 1760–2580 (tuned) |
| incast (15:1)×1, 32 consumer lines | 1 | 180 | 820 | 1490–1510 (Odelay) |
| pipeline (1:4)+(4:4)+(4:1)+(1:1) | 4 | 192 | 930–1480 | 1590–2120 (adapt) |
| firewall (1:1)×3+(2:1)×1 | 4 | 60 | 340–390 | 390–550 (tuned) |
| FIR, 8 stages (1:1)×8 | 8 | 192 | 800–870 | 720–850 (Odelay) |
| bitonic (1:8)+(8:1) | 2 | 96 | 330–380 | 500–520 (adapt) |

Ranges are over six random seeds.

The testbench's consumers react at once and the answer latency is only 3
cycles, so these cycle counts show that the device works. They are not
benchmark performance. Incast in speculative mode is slower because a
single registered entry allows only one outstanding speculative push.

The unit testbenches use smaller buffers for speed. `tb_srd` uses every
default and runs in well under a minute.
