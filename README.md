# PHAT PE array: shared-memory fabric for heterogeneous processing elements

This RTL is the memory and interconnect fabric of a PHAT prototyping array
(PHAT: Parallel Heterogeneous Architecture Technology). One large FPGA holds up
to 18 processing elements (PEs): r-VEX VLIW soft processors, compiled
accelerators, or hand-written streaming IP blocks. They all share one large,
high-latency off-chip memory. That memory sits behind 8 memory controller
interfaces (MCIs) and answers reads **out of order**.

The fabric gives each PE a private front end, the *PE-local memory interface*
(PEMI). The PEMI hides the latency and the reordering. A 26-node double-ring
network-on-chip (NoC) carries every request to the MCI that owns its address,
and carries every read reply back to the PE that asked. A PE sees a plain
in-order read port and write port. Its slot can be re-targeted from one PE kind
to another without touching the network.

```
            PE slot 0 .. 17                              MCI 0 .. 7
  +------------------------------------+            +----------------+
  | PE (r-VEX / accelerator / stream)  |            | memory ctrl    |
  |   | client ports (phat_top ports)  |            |  (mc_* ports)  |
  | pemi: marc_cache [+ imem, loader]  |            |  mci_endpoint  |
  |       or reorder_buffer            |            +-------+--------+
  |       tech_module                  |                    |
  +-----------------+------------------+                    |
                    |            noc_double_ring            |
           noc_router  <->  noc_router  <-> ... <->  noc_router
           (two counter-rotating rings, 2 virtual channels)
```

## How one memory access travels

1. The PE puts a read on `rd_req_*` (or a write on `wr_req_*`). The
   PEMI accepts it when it can. A low `ready` is the PE's stall.
2. On a cache miss, the MARC cache makes one memory request for each
   line it needs. The reorder buffer makes one request for each read
   or write. Each request carries a **tag**: the burst position for the
   cache, the buffer slot for the reorder buffer.
3. The `tech_module` packs the request into one NoC packet:
   * The destination is the MCI `(address / 8) mod 8`. This is linear
     interleaving: successive 8-byte words go to successive controllers.
   * The 32-bit ID holds the source node in bits 31:24 and the tag in
     bits 23:0.
   * Requests use the lower half of the virtual channels (VC 0 with 2
     VCs). Replies use the upper half, so a reply is never stuck behind
     a request.
4. The ring takes the packet to the MCI node. `mci_endpoint` hands the
   packet to the memory controller unchanged, including the ID. Writes
   end here.
5. The controller returns read data with the ID, in any order. The
   endpoint queues the reply and sends it as a packet to node
   `ID[28:24]` on the reply VC.
6. At the PE's node, `tech_module` turns the packet back into a
   `{tag, data}` reply. The PEMI always has room for it, so ejection is
   never refused. The tag tells the PEMI where the data belongs.

Requests for the same 8-byte word always take the same path (same MCI, same
VC, same ring direction), and every hop is first-in first-out. So a write
reaches memory before any later read of the same word. This is also how a
cache write-back stays ahead of a later re-fetch of the same line.

### Packet layout (`phat_pkg::noc_flit_t`, 176 bits plus a separate valid)

| bits    | field |
|---------|-------|
| 31:0    | ID: source node (31:24) and client tag (23:0) |
| 95:32   | data, 64 bits |
| 159:96  | byte address, 64 bits |
| 167:160 | byte enables |
| 168     | 1 = write, 0 = read or read reply |
| 169     | virtual channel (`VC_W` bits; 1 bit for 2 VCs) |
| 174:170 | destination node |
| 175     | tail (always 1: every packet is a single flit) |

Valid is the handshake signal beside the flit, not a field in it.

## The double-ring NoC (`noc_router`, `noc_double_ring`)

Node *i* sends clockwise to *i+1* and counter-clockwise to *i−1*. The MCIs
sit evenly around the ring, MCI *m* at node ⌊*m*·26/8⌋ (nodes 0, 3, 6, 9,
13, 16, 19 and 22). The PE slots take the other nodes in order. A packet enters the ring with the
fewer hops to its destination (clockwise on a tie). It stays on that ring until
it is ejected, so it needs at most 13 hops.

Each router has one FIFO per ring input and per VC, four flits deep. With two
flits, the bubble rule below would let a node inject only every other cycle. A physical
link carries one flit per cycle. The VCs share the link round-robin, and so
does ejection: one flit per cycle per node.

**Flow control needs no ready wire between routers.** Each router tells its
upstream neighbour, from registers, whether each VC FIFO has at least one free
slot (`free1`) or at least two (`free2`). Rules for sending onto a link:

* A packet already on the ring may move if the next FIFO has one free slot.
  Ring traffic goes before new injections.
* A newly injected packet needs **two** free slots: the *bubble rule*. Every
  ring therefore keeps at least one empty slot per VC. A ring that can never
  fill up can never deadlock, whatever the traffic pattern.

Ejection can be refused (an MCI whose controller is stalled). This blocks only
the request VC. Replies drain because PEs always take them.

Timing: a packet offered for injection in cycle *t* is offered for ejection at
its destination in cycle *t + hops* if nothing is in its way.

## MARC cache (`marc_cache`)

This is the caching middle part of a MARC II memory system, in the
configuration the PHAT experiments use:

* one read port and one write port
* direct mapped and write-back
* 8-byte lines, 1024 lines (8 KB)
* a prefetch length of 32 lines

**Hits** take one cycle. A write merges its byte enables into the line and
marks the line dirty. A read returns the line on `rd_rsp_*` one cycle after it
is accepted. If both ports request in the same cycle, the write goes first.

**A miss starts a burst** over the 32 consecutive lines beginning at the
missing one. For each line in the burst:

* A line that is already cached is skipped. Its data may be dirty and newer
  than memory.
* Otherwise, a dirty victim at that index is first written back.
* Then a read is issued with the line's position in the burst as its tag.
  The line is marked invalid under its new tag.

Replies arrive in any order. Each reply is written to line
`base + tag`, and the line becomes valid and clean. When every read of the burst
has come back, the cache returns to idle. The stalled request is then retried
and hits.

The client is stalled for the whole burst. A write miss is handled as a read
miss (write-allocate) and then hits.

`stat_hit`, `stat_miss`, `stat_wb` and `stat_prefetch` are one-cycle event
pulses for performance counters.

## Reorder buffer (`reorder_buffer`)

Streaming PEs (the FFT blocks in PHAT) reuse no data and need no cache. They
still need their read data in order. The reorder buffer is a 512-slot circular
buffer, sized for one 36-kbit block RAM of 64-bit words:

* Each read takes the slot at the tail, and the slot number is its tag.
* A reply fills its slot, in any order.
* The PE receives data from the head slot as soon as that slot is full
  (`rd_rsp_valid`/`rd_rsp_ready`).
* Writes are posted and take no slot. Reads and writes share the memory
  port round-robin.

When 512 reads are outstanding, reads stall.

## r-VEX slot: IMEM and loader (`imem`, `imem_loader`)

An r-VEX core fetches instructions from its own on-chip IMEM, not through the
cache. This doubles the memory bandwidth available to the core. The IMEM holds
1024 bundles of 128 bits (four 32-bit syllables of a 4-issue core). It answers a
fetch in the next cycle, like a block RAM.

When the control side pulses `ctrl_start` with a program address and a length
in bundles, the loader does the following:

1. It takes the cache's read port and holds the core: `core_run` goes low
   and PE data reads are refused.
2. It reads the program two 8-byte words per bundle. The lower address
   goes into bits 63:0.
3. It writes each bundle into IMEM.
4. It pulses `ctrl_done` and raises `core_run`.

From then on the cache serves data only. The cache prefetch streams the program
in.

## Top level (`phat_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_PE` | 18 | PE slots (NoC nodes without an MCI) |
| `NUM_MCI` | 8 | memory controller interfaces (node ⌊m·26/8⌋) |
| `NUM_ACCEL` | 1 | cache-only slots, placed after the r-VEX slots |
| `NUM_STREAM` | 1 | reorder-buffer slots, the last ones |
| `NUM_VC` | 2 | virtual channels (also set `phat_pkg::VC_W` ≥ log2) |
| `LINES`, `PREFETCH` | 1024, 32 | cache size in lines, prefetch length |
| `IMEM_DEPTH` | 1024 | bundles per IMEM |
| `ROB_DEPTH` | 512 | reorder-buffer slots |

Every slot has the same client ports, arrays indexed by slot:

* `ctrl_*`: program load
* `fetch_*`: IMEM fetch
* `rd_req_*`, `rd_rsp_*`: the read port
* `wr_req_*`: the write port
* `stat_*`: cache event pulses

Ports that a slot's kind does not use are idle. A cache slot's read data is a
one-cycle pulse and must be taken; only a streaming slot obeys `rd_rsp_ready`.

The memory controllers attach at `mc_req_*` (valid/ready, `mc_req_t`) and
`mc_rsp_*` (valid/ready, `mc_rsp_t`), one each per MCI.

The default slot mix (16 r-VEX + 1 accelerator + 1 streaming) puts every PEMI
variant in one array. The homogeneous arrays are parameter settings:

* 18 r-VEX cores: `NUM_ACCEL = 0, NUM_STREAM = 0`
* 18 streaming FFT blocks: `NUM_STREAM = 18`
* 15 r-VEX cores and one SHA accelerator: `NUM_PE = 16, NUM_STREAM = 0`,
  or the default with spare slots

Four or eight virtual channels need `NUM_VC = 4` or `8` together with
`phat_pkg::VC_W = 2` or `3`. The package width cannot be changed per instance,
and only the 2-VC build has been simulated.

The processors, accelerators and memory controllers are not part of this RTL.
They connect at the ports above. The testbenches use a behavioural memory
controller, `tb/mc_model.sv`. It has a random latency, returns replies out of
order and stalls at random.

## Where this RTL departs from, or adds to, PHAT as published

* **NoC routers.** PHAT uses routers from the CONNECT NoC generator. The
  router here is this design's own: input-buffered, shortest-direction
  routing, bubble flow control. It keeps CONNECT's external view, a
  single-flit packet with VC and destination fields, but its timing and area
  differ.
* **Node order.** The MCIs are spread evenly around the ring. The published
  floorplan, with the MCIs in the chip centre, is not modelled. With all
  MCIs in one block of nodes, every memory packet would cross one of the
  two links at the block's edges. The FFT workload then reached only
  1.5 GB/s.
* **ID layout, VC assignment, interleaving function, reply-queue depth (4),
  router FIFO depth (4) and reorder-buffer depth (512)** are this design's
  choices.
* **Cache details** are this design's choices where PHAT gives only the
  configuration:
  * the burst starts at the missing line
  * the client waits for the whole burst
  * writes go first when both ports request
  * a write miss allocates the line
* **Loader control interface** (`ctrl_start`, address, length, `core_run`)
  is this design's own. The published system loads programs from a host
  control processor.
* **Cache coherence** is not built. MARC II supports it on buses, but PHAT
  did not use it on the NoC either.
* **Convey memory-controller signals** are abstracted to a generic
  request/reply pair with a 32-bit ID.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog. Reference values
come from a shadow memory in the testbench. Never-written memory reads as
`tb_pkg::mem_init(address)`, a closed formula, so no data files are needed.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_reorder_buffer` | in-order data under random out-of-order replies and read-data back-pressure; a full buffer stalls reads |
| `tb_marc_cache` | byte-exact data over 4× the cache size; one-cycle hits; misses, dirty write-backs, prefetches and out-of-order fills all occur |
| `tb_imem`, `tb_imem_loader` | contents and one-cycle fetch; word order, read count, the core held until `done` |
| `tb_tech_module` | every packet field and bit position, interleaving, reply conversion |
| `tb_noc_router` | every flit leaves once on the correct port; the flow-control rule is checked each cycle; injections blocked by the bubble rule |
| `tb_noc_double_ring` | 26 nodes under saturating random traffic with ejection back-pressure: all packets delivered exactly once, full drain (no deadlock), hop-count latency of a lone packet |
| `tb_mci_endpoint` | replies reach the right node with the right data; writes give no packet; a full reply queue stalls the controller |
| `tb_pemi` | one PEMI of each kind: program load, IMEM contents, data port refused during the load, random traffic |
| `tb_phat_top` | the whole array at default parameters, 18 slots and 8 MCIs. It loads 16 programs, then runs random traffic on every slot. It counts cache hits, misses, write-backs, prefetches, PE stalls, out-of-order replies, controller stalls, reorder-buffer deliveries and both ring directions, and fails if any count is zero |
| `tb_fft_stream_array` | the streaming-FFT workload: the array built with 18 streaming slots. 1, 2, 4, 9 and 18 blocks each stream 16 frames of 256 32-bit samples (128 64-bit words per frame) in and write them back transformed. Every written word is checked, and the throughput is reported |

`tb_phat_top` takes about a minute in Verilator.

In `tb_fft_stream_array` a behavioural model stands in for each FFT block
(`tb/stream_pe_model.sv`). It reads one 64-bit word per cycle when it can,
and writes a fixed transform of each word. With 150 MHz and 8-byte words,
memory traffic is the sum of reads and writes:

| FFT blocks | cycles | memory GB/s | NoC packets/cycle |
|-----------:|-------:|------------:|------------------:|
| 1  |  4106 | 1.20 | 1.50 |
| 2  |  4944 | 1.99 | 2.49 |
| 4  |  9486 | 2.07 | 2.59 |
| 9  | 15915 | 2.78 | 3.47 |
| 18 | 21480 | 4.12 | 5.15 |

One block is limited by its own port: one request per cycle, shared by reads
and writes. Larger arrays are limited by the ring links near the MCIs. PHAT
reports that its 18-block array was likewise limited by the NoC. The numbers
depend on the memory model's latency and are not a prediction for the
hardware.

To run one testbench, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    --top-module tb_phat_top -y rtl -y tb +libext+.sv -Irtl \
    rtl/phat_pkg.sv tb/tb_pkg.sv tb/tb_phat_top.sv -o sim
./obj_dir/sim
```

Replace `tb_phat_top` with any other testbench name. All RTL is synthesizable
SystemVerilog-2017 with an active-low asynchronous reset. Memory arrays (cache
data and tags, IMEM, buffers) are not reset; valid bits are.

## Files

* `rtl/phat_pkg.sv`: packet and request types, interleaving and node
  functions
* `rtl/phat_top.sv`: PE array top
* `rtl/pemi.sv`: per-slot memory interface; selects the kind
* `rtl/marc_cache.sv`, `rtl/reorder_buffer.sv`, `rtl/imem.sv`,
  `rtl/imem_loader.sv`, `rtl/tech_module.sv`: PEMI contents
* `rtl/noc_router.sv`, `rtl/noc_double_ring.sv`: the network
* `rtl/mci_endpoint.sv`: network-to-memory-controller endpoint
* `rtl/sync_fifo.sv`: small FIFO helper
* `tb/`: testbenches, plus:
  * `mc_model.sv`: memory controller model
  * `pemi_client.sv`: random PE traffic with shadow checking
  * `stream_pe_model.sv`: behavioural streaming (FFT-like) PE
  * `tb_pkg.sv`: the memory-contents formula
