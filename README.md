# Dynamic Queue Management (DQM) chip

An ATM switch output port delivers 2.4 Gb/s of cells, one 53-byte cell every
14 clocks at 120 MHz. Behind it sit up to 16 slower links (OC-3, OC-12,
G-link, OC-48) on four UTOPIA-style interfaces. The DQM chip buffers those
cells in external SRAM and decides which cell goes to which link next.

Its central idea is **one queue per connection, assigned on demand**. A
connection only needs a queue while it has cells waiting. So a few thousand
queues can serve a much larger population of virtual circuits (VCs). A small
hash-like lookup structure maps each connection to its queue when the first
cell arrives. The queue is handed back when its last cell leaves. Per-connection
queues make per-connection scheduling possible:
- round robin;
- two priorities;
- power-of-two weights (Binary Scheduling Wheels);
- packet-level discard that is fair between connections (Weighted Fair Goodput).

This repository holds synthesizable SystemVerilog for the whole chip, except
the external SRAM. It also holds self-checking testbenches for every block and
for the full chip.

## Block overview

```
 switch OPP (32-bit, 14 words/cell)
        |
      imst ──info──> qsel ──qid──> qmgr <──slots──> fsmgr
        |                           |  ^               |
        | words               new_q |  | nxtqid        | free slot list blocks
        v                           v  |               v
      mctrl <──────── slot/ptr ─── oschl (+ bsw_ffc, link_credit)
        |  ^                                           
   SRAM |  | 160-bit, 3 words per cell                 wfg (discard decision,
        v  |                                                per-queue lengths)
      omst ──> 4 x UTOPIA transmit (16-bit), 16 links
```

| module | role |
|---|---|
| `dqm_pkg` | Shared constants, the cell-time phase schedule, and the extracted cell-information struct. |
| `imst` | Input Master. Checks that each cell arrives as 14 words aligned to the cell time, and extracts VPI, VCI, connection type, priority, weight, AAL5 flag, end-of-packet flag and output link. |
| `qsel` | Queue Selector. Maps (VPI,VCI) to a queue id (QID). VP connections get a static QID. VC connections get a dynamic QID through a set-associative memory (SAM) plus an overflow CAM, a free queue list and an address map. |
| `qmgr` | Queue Manager. Keeps FIRST/LAST pointers per queue, appends arrivals, unlinks departures, and detects "queue became non-empty" and "queue became empty". |
| `fsmgr` | Free Slot Manager. Keeps an on-chip cache of free cell slots, backed by a Free Slot List in the SRAM. |
| `mctrl` | Memory Controller. Converts 32-bit words to 160-bit SRAM words, maps slots to addresses, and runs three writes, three reads and the Free Slot List traffic each cell time. |
| `oschl` | Output Scheduler. Picks a link each cell time, then the next queue on that link. |
| `bsw_ffc` | Fast-forward pass counter of the Binary Scheduling Wheels (one per link, inside `oschl`). |
| `link_credit` | Credit-based link selection for links configured with more capacity than their share (inside `oschl`). |
| `wfg` | Weighted Fair Goodput. Keeps per-queue length counters and an active/inactive state, and discards whole AAL5 packets. |
| `omst` | Output Master. Four 8-cell FIFOs and the UTOPIA transmit side (16-bit data, start of cell, odd parity, PHY address, cell available). |
| `dqm_top` | Wires all of the above. |

`tb/ext_sram.sv` is a behavioural model of the external SRAM. It is used by
the testbenches only.

## The cell time

Everything runs on a fixed 14-clock schedule. `phase` counts 0..13, and
`ct_sync` is high in phase 13. A cell spends one cell time arriving, and its
queue is looked up at the end of that cell time. In the next cell time it is
appended to its queue and written to memory. Independently, one departure is
scheduled per cell time. The constants live in `dqm_pkg`.

| phase | arrival path | departure path |
|---|---|---|
| 0 | `qmgr` reads the queue entry | `oschl` picks the link and queue (`P_SEL`); `mctrl` turnaround |
| 1 | cell goes into slot LAST; a free slot from `fsmgr` becomes the new LAST; `wfg` keep/discard decision; new queue announced | `oschl` reads the successor |
| 2, 4, 6 | three 160-bit SRAM writes of the previous cell | |
| 3 | | `qmgr` reads FIRST of the scheduled queue |
| 5 | | `fsmgr` decides on a Free Slot List refill |
| 8, 10, 12 | | three SRAM reads of the departing cell; its next pointer arrives in phase 9 |
| 9 | | FIRST advances; the slot is returned to `fsmgr` |
| 10 | | queue empty? `oschl` unlinks it and `qsel` frees the QID |
| 11–13 | `qsel` reads the set and decides; `oschl` links in a new queue | |

Idle write or read cycles carry Free Slot List blocks. The list therefore
costs no memory bandwidth of its own. The chip runs an initialisation pass
after reset, about NVC + 256 clocks, and then raises `ready`. From then on the
sender must begin every cell in phase 0.

## Queues as linked lists of cell slots

The SRAM holds 2^20 cell slots. Each slot is three 160-bit words at
`3*slot .. 3*slot+2`, packed as {20-bit next pointer, 448-bit cell, 12 spare
bits}. A queue is a linked list of slots.

LAST always names an **empty** slot that is already reserved for the queue's
next cell. So a queue is empty exactly when FIRST == LAST. An append writes
the cell into LAST, with a fresh free slot as its next pointer, and makes that
fresh slot the new LAST. Queue q starts out owning empty slot q. The remaining
slots are free.

Free slots come from a 64-entry stack in `fsmgr`. The cache is refilled or
spilled in blocks of 8 slot numbers, one SRAM word per block:
- It spills when it rises above 48 and there is no arrival in the cell time.
- It refills when it drops below 16 and there is no departure.

At power-up the never-used slots are handed out from a counter ("fresh"
slots), so nothing has to write a million-entry list first.

## Finding a connection's queue (qsel)

- **VP connections** (type bit 0) use queue `NVC + VPI`.
- **VC connections** use a 24-bit key {VPI,VCI}:
  - set index = key mod SETS;
  - tag = key div SETS.

All WAYS entries of the set are compared, and so are all CAM entries. There
are four outcomes:
- **SAM hit:** use the stored QID.
- **CAM hit:** use the CAM's QID. If the set now has a free way, the entry
  moves into the SAM.
- **Miss:** pop a QID from the free queue list and store it in the first free
  way of the set. If the set is full, store it in a free CAM entry instead.
- **Set and CAM full, or no free QID:** the cell is lost.

An address map records where each QID's entry sits. When `qmgr` reports a
queue empty, the entry is invalidated and the QID goes back on the free list.

Default size: 8192 VC queues at a load factor of 0.8. That gives 10240 SAM
entries, arranged as 160 sets of 64 ways, plus a 64-entry CAM.

## Output scheduling (oschl)

**Link choice.** A 4-bit counter, read bit-reversed (0, 8, 4, 12, 2, …),
names a virtual port each cell time. Each virtual port carries 1/16 of the
chip bandwidth. `cfg_mask[port]` maps the port to a link:

| mask | link type | ports per link |
|---|---|---|
| 1111 | OC-3 | 1 |
| 1100 | OC-12 | 4 |
| 1000 | G-link | 8 |
| 0000 | OC-48 | 16 |

The link is `port & mask`. The bit-reversed order spreads a link's turns
evenly over the 16 cell times. A turn is idle when:
- the link has nothing queued; or
- its interface FIFO cannot take two more cells.

**Queue choice.** Each link has a set of circular lists of its non-empty
queues:
- All lists share one next-QID table indexed by QID.
- A per-link, per-list pointer holds the queue served last.
- The queue after the pointer is served, and the pointer advances to it.
- An emptied queue is unlinked behind the pointer.
- A queue that becomes non-empty is linked in **right after the pointer**,
  so it is served next.

That insertion rule has a property worth knowing. A connection whose queue
empties after every cell and refills before the link's next turn is
re-inserted in front each time. It is then served on every turn, ahead of
long queues on the same link. A slow link with such a connection can starve
its other queues for as long as the pattern lasts. The end-to-end test
exercises packet discard on an OC-3 link partly for this reason.

There are two disciplines over the same lists:
- **Two priorities** (default). List 1 is high priority and list 0 is low.
  The low list is served only while the high list is empty.
- **Binary Scheduling Wheels** (`cfg_wrr_en`). List w holds the queues whose
  5-bit weight code is w; each gets a 2^-w share. A per-link `bsw_ffc` keeps
  a 32-bit pass counter:
  - At the start of each pass it adds a one-hot carry at the lowest
    non-empty wheel.
  - Every non-empty wheel whose counter bit changed is visited in that pass,
    lowest first.
  - Wheel w is thus visited every 2^w passes, and passes are never wasted on
    empty wheels.
  - A visit serves each queue on the wheel once. It ends when the queue that
    was last served before the visit has been served again, or when the
    wheel empties.

**Credit mode** (`cfg_credit_en`, `link_credit`). Each virtual port gets
1 + `cfg_extra[port]` credits every 16 cell times. The port whose turn it is
sends if its link has a cell and FIFO room; its own unused turn still costs
its basic credit. Otherwise the turn goes to the next port in bit-reversed
ring order that still has credit and a ready link. A link configured above
its share can therefore soak up turns that other links leave unused. The
document describes a token-passing ring for this. Here the ring is a rotating
priority search that finds the same winner in one clock.

## Weighted Fair Goodput (wfg)

When the buffer is close to full, dropping single cells of AAL5 packets
wastes the link: every packet that lost a cell is useless. `wfg` only decides
at packet boundaries, so it drops whole packets, and it picks the connections
that hold more than their share. For each queue it keeps a length counter
and an active/inactive bit. At a boundary, i.e. the first cell after a cell
with the end-of-packet (U) bit:
- Buffer level above `cfg_bh`, queue active, length above `cfg_q0`: the
  queue becomes inactive.
- Buffer level above `cfg_bh`, queue inactive, length below `cfg_q0`: the
  queue becomes active.
- Buffer level at or below `cfg_bh`: the queue becomes active.

An inactive AAL5 connection loses every cell of the packet. Non-AAL5 cells
are never dropped by this rule. A queue that drains to zero returns to
active.

## Interfaces of dqm_top

- **Input:** `data_opp[31:0]`, `valid_opp`, `soc_opp`. Word k in phase k.
  - Word 0 is the switch control word: [31] VC (1) / VP (0), [30] high
    priority, [29] AAL5, [28:24] weight code.
  - Word 1 is the UNI header: GFC, VPI[7:0], VCI[15:0], PT, CLP. The low PT
    bit is the end-of-packet flag U.
  - Words 2..13 are the 48 payload bytes.
  - The output link is VPI[7:4], masked by `cfg_mask`.
- **SRAM:** `mem_addr` (SLOT_W+2 bits), `mem_we`, `mem_re`, `mem_wdata` and
  `mem_rdata` (160 bits). One access per clock, one-clock read latency.
- **Transmit (x4):**
  - `tdata[15:0]`, `tsoc`, `twren_n` (low while sending) and `txprty` (odd
    parity), plus `taddr[1:0]` as the PHY address = link[1:0], and
    `tca[3:0]` (cell available per PHY).
  - A cell is 27 words: two header words, a zero HEC/UDF word and 24 payload
    words. The control word is not sent.
- **Configuration:** `cfg_mask`, `cfg_wrr_en`, `cfg_credit_en`, `cfg_extra`,
  `cfg_wfg_en`, `cfg_bh`, `cfg_q0`. Change them only while idle.
- **Status:** `ready`, `ct_sync`, and `events[20:0]`, one-clock pulses per
  mechanism (the list is in the header of `rtl/dqm_top.sv`).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NVC` | 8192 | dynamically assigned VC queues (plus 256 VP queues) |
| `SETS` × `WAYS` | 160 × 64 | SAM geometry (load factor 0.8) |
| `CAM_N` | 64 | overflow CAM entries |
| `SLOT_W` | 20 | 2^20 cell slots |
| `CACHE_N` | 64 | free slot cache |
| `FIFO_CELLS` | 8 | cells per output FIFO |

## Where this design departs from, or adds to, the original description

- The per-phase schedule, the SRAM address map, the control-word bit layout
  and the UTOPIA word order are this design's own.
- The weight field is 5 bits, enough for 32 weights.
- The SAM set index is the key modulo 160, so that 160 sets can be used.
- CAM entries migrate back into the SAM: a CAM hit moves its entry into a
  free way of its set.
- Free Slot List block size (8) and cache thresholds (16/48) are chosen
  here. So are the "fresh slot" start-up counter and the circular-array
  Free Slot List.
- Wheel visits end when the pre-visit pointer queue is served again (own rule).
- The credit scheduler's token ring is a one-clock rotating search.
- The WFG thresholds are configuration inputs. A drained queue returns to
  active.
- **Not built:** an OC-48 link carried by two interfaces together (the other
  two disabled). With mask 0000 the scheduler gives all 16 turns to link 0,
  but `omst` sends link 0 on interface 0 only. One 16-bit interface moves a
  cell in 27 clocks, which is enough for a G-link (one cell per 28 clocks)
  but not for OC-48 (one per 14).
- The SRAM itself is a behavioural model (`tb/ext_sram.sv`).
- Synthesis of the full design completes. Timing at 120 MHz has not been
  checked. The 64-way SAM compare and the 64-entry CAM are the likely
  critical paths.

## Testbenches

Each `tb/tb_<block>.sv` checks its block against a reference model written
independently in the bench. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| bench | what it covers |
|---|---|
| `tb_imst` | field extraction, pass-through, framing errors |
| `tb_qsel` | at 16 queues / 4×2 SAM / 2 CAM: every lookup outcome |
| `tb_qmgr` | append, departure, new/empty detection against a queue model |
| `tb_fsmgr` | cache, spill, refill, fresh slots, slot conservation |
| `tb_mctrl` | memory phases, cell round trip, Free Slot List blocks |
| `tb_oschl` | bit-reversed link order, two-priority lists, insertion/removal, idle and blocked turns |
| `tb_bsw_ffc` | worked 4-wheel example, random masks, and measured rates 1/2/4/…/32 |
| `tb_link_credit` | random configurations against a model; 4 cells per round with 3 extra credits |
| `tb_wfg` | random AAL5 traffic against a model of the rules |
| `tb_omst` | UTOPIA framing, parity, PHY handshake, overflow drop |
| `tb_dqm_top` | the whole chip at reduced sizes (64 VC queues, 8×4 SAM, 4 CAM, 1024 slots) |
| `tb_dqm_full` | the whole chip at the default sizes |

`tb_dqm_top` drives eight traffic phases:
1. basic traffic;
2. random traffic;
3. set and CAM overflow with migration;
4. buffer-full overload with cache spill;
5. refill under back-pressure;
6. WFG packet discard;
7. credit mode;
8. weighted round robin (three weights, expects a 4:2:1 share).

It checks that every cell not reported dropped leaves exactly once, unchanged,
on the right link and in order. It counts every mechanism from `events` and
fails if one never occurs.

`tb_dqm_full` runs the same scoreboard at the default sizes. It leaves out the
buffer-full and overflow phases, which need far more traffic at that size.

Simulating with plain Verilator (5.x), from the repository root:

```
verilator --binary --timing -Wno-fatal --assert --top-module tb_dqm_top \
    -Irtl -y rtl -y tb +libext+.sv rtl/dqm_pkg.sv tb/tb_dqm_top.sv
./obj_dir/Vtb_dqm_top
```

Replace `tb_dqm_top` with any other bench name. `tb_dqm_top` runs in about a
second and `tb_dqm_full` in a few seconds.
