# Stream prefetcher for a GPU L1 memory interface

GPU L1 data caches miss a lot: thousands of threads touch many distinct regions and most
lines are used once. Predictive prefetchers try to guess strides at run time and pay for
training, mispredictions and extra traffic. This design takes the opposite route. The access
pattern of each kernel is known before it runs, so it is written down as a small affine
*descriptor*. When a thread block (CTA) is launched on a streaming multiprocessor (SM), its
descriptors are sent to a prefetcher that sits beside the L1 cache. The prefetcher generates
the exact address stream, fetches those lines from global memory and parks them in a prefetch
buffer. The L1's misses are then served from that buffer, or merged with fetches already in
flight.

The RTL implements the SM-side hardware of the stream prefetcher described in the article
*Stream data prefetcher for the GPU memory interface*, at the sizes of its Fermi-class
(GTX480) configuration: 1 KB descriptor memory, 32 KB prefetch buffer, 32 MSHR entries and
128-byte lines. The SM core, the L1 cache, the L2, the interconnect and the DRAM are not
included. The article takes them from the existing GPU. This block's ports stand where they
attach.

## Block diagram

```
 block distribution engine                      SM / L1 data cache
        | issue_* (generic descriptor + CTA id)      | l1_miss_*        ^ l1_fill_*
        v                                            v                  |
 +----------------------- stream_prefetcher ---+  +-----------------+   |
 | prefetch_controller --(start)--> agu        |  | prefetch_buffer |---+ hit: line, 1 cycle later
 |   |  ^                            |  addr   |  |  256 x 128 B    |   |
 +---|--|----------------------------|---------+  +-----------------+   |
     v  |                            v               | miss    ^ fill   |
 descriptor_memory          prefetch_coalescer       v         |        |
   32 x 32 B slots                   | line      +--------------------+ |
                                     +---------->|  mshr (32 entries) |-+ line for a waiting miss
                                     prefetch    +--------------------+
                                                  mem_req_* | ^ mem_resp_*
                                                   (bypass_l2 on prefetch-only lines)
                                                            v |
                                                      L2 / global memory
```

Top module: `l1_prefetch_subsystem` (`rtl/l1_prefetch_subsystem.sv`). Shared types are in
`rtl/spf_pkg.sv`.

## The descriptor

A pattern is the tuple `{offset, hsize, stride, vsize, span, dsize}`. It stands for:

```
for d in 0 .. dsize-1            (patterns, span apart)
  for v in 0 .. vsize-1          (blocks, stride apart)
    for h in 0 .. hsize-1        (contiguous elements)
      address = offset + d*span + v*stride + h*element_size
```

The article defines the six fields and their meaning. The following encoding is this
design's own.

* **Generic descriptor** (`gen_desc_t`, issued with the kernel). Sizes and distances are in
  elements. The start is an array base address plus a linear function of the CTA index:
  `base + (coef_x*ctaid.x + coef_y*ctaid.y + coef_z*ctaid.z) * element_size`. A 2-bit
  `esize` field gives log2 of the element size in bytes.
* **Decoded descriptor** (`desc_t`, 194 bits). This is what the descriptor memory holds and
  the AGU walks. `offset`, `stride` and `span` are in bytes; `hsize`, `vsize` and `dsize` are
  element counts. Each field is 32 bits, plus `esize`.

Example: the 2D convolution kernel, with 4096 x 4096 floats and 32 x 8 thread blocks. A
CTA's generic descriptor is
`base=A, coef_x=32, coef_y=8*4096, coef_z=0, hsize=32, stride=4096, vsize=8, span=0, dsize=1, esize=2`.
For CTA (1,1) it decodes to offset `A + 4*(32 + 8*4096)`, stride 16384 B and span 0. That
gives 8 rows of 128 bytes, so 8 line requests.

Only the start address depends on the CTA. In the article's example, too, only the start
depends on the CTA index. A descriptor with a zero `hsize`, `vsize` or `dsize` generates
nothing.

## Controller and descriptor memory

`prefetch_controller` decodes each descriptor in the cycle it is accepted, using three
multipliers and a shifter. It writes the result into `descriptor_memory`, which it uses as a
circular queue. The memory is 1 KB, so it holds 32 slots of 32 bytes. The queue keeps
descriptors in issue order, so a kernel can ship a list of descriptors, one per execution
phase, and they are solved in sequence. Whenever the AGU is idle and the queue is not empty,
the controller reads the oldest descriptor and starts the AGU. That takes three cycles between
descriptors: read, launch and AGU load. `issue_ready` falls when all 32 slots are taken. One
more descriptor can wait at the AGU's input, outside the queue.

## Address generation unit (AGU)

`agu` emits one address per clock. It holds an iteration register bank: the current address,
row start, pattern start, the three counters and their limits. Three adder blocks do the work,
as in the article's AGU:

| block | adds | when |
|---|---|---|
| stride control | row start + stride, or pattern start + span | every cycle (result used at the end of a row or pattern) |
| offset control | address + element size, or passes the new row start | every cycle; its result is the next address |
| count control | +1 on the h, v or d counter, selected by the last-flags | every cycle |

The status flags `h_last`, `v_last` and `d_last` are equality compares against size-1, which
is captured at load. They choose the operands. `addr_last` is the AND of the three flags. The
interface is valid/ready: when `addr_ready` is low, the AGU holds its state.

## Request path: coalescer, MSHR, L2 bypass

`prefetch_coalescer` turns addresses into 128-byte line requests. A request is sent on the
first address that falls in a new line. Later addresses in the same line are absorbed, and
`merged` pulses for each one. The unit remembers only the previous line. That is enough for
the AGU's in-order stream, where a row of 32 floats collapses to one request. The memory is
cleared at the end of each descriptor.

`mshr` is the L1's miss status holding register file. The prefetcher shares it with the L1.
Each of its 32 entries holds a line address and three flags: *prefetch*, *demand* and
*issued*.

* A request whose line already has an entry is **merged**. An L1 miss that finds a prefetch
  in flight sets *demand* and waits for it. A prefetch that finds an L1 miss in flight is
  dropped.
* Any other request takes the lowest free entry. Entries go to memory in entry order, one per
  cycle, tagged with their entry number.
* `mem_req_bypass_l2` is set when an entry holds only prefetches. Stream traffic then goes
  straight to global memory and does not disturb the shared L2. The routing itself belongs to
  the memory side.
* When a response returns, the line goes to the L1 if *demand* is set. Otherwise it goes into
  the prefetch buffer. The entry is then freed.
* If both an L1 miss and a prefetch are pending, the L1 miss is taken first. No request is
  taken in a cycle in which a response is taken. This rule is what keeps merging safe: a
  request can never merge into an entry in the cycle that entry is released. The request is
  accepted the next cycle, and by then its line is in the prefetch buffer or the L1.
* When all 32 entries are busy, new lines are refused. The prefetch stream then stalls all
  the way back to the AGU (`ev_pf_stall`).

## Prefetch buffer and L1 misses

`prefetch_buffer` keeps prefetched lines out of the L1, so prefetching never evicts lines the
SM is using. It holds 256 lines (32 KB) and is fully associative. An indexed buffer would be
a poor fit: the rows of one descriptor are often a power-of-two stride apart and would all
fall in the same set.

Every L1 miss is first looked up in the buffer, which answers combinationally:

* **Hit.** The miss is accepted at once. One cycle later the line appears on `l1_fill_*` with
  `l1_fill_from_pbuf` set. The entry is released, because the L1 now holds the line.
* **Miss.** The request goes to the MSHR. There it merges with a prefetch in flight, or it is
  sent to memory through the L2.

A fill goes to the entry that already holds the same line, if there is one. Otherwise it goes
to the lowest free entry. If the buffer is full, it replaces the entry under a round-robin
pointer and pulses `ev_pbuf_evict`. This happens when a descriptor covers more than is read,
for example a larger region encoded for an irregular kernel.

Nothing paces the prefetch to the room left in the buffer. A descriptor runs to its end and
is held back only by a full MSHR. If a stream is more than 256 lines ahead of the warps that
read it, round-robin replacement drops lines before they are used, and those lines are fetched
again on demand. Short streams per CTA are unaffected: a convolution tile, a gemm tile, or a
region of a graph. A long stream consumed slowly is affected, such as one CTA walking 4096
rows of a matrix (see the `atax` run below). Keep each descriptor within about a buffer's
worth of lines ahead of its readers, or add a credit check against `pbuf_occupancy` before
the coalescer if the workload needs it.

The L1 fill port has no back-pressure. A buffer hit has priority on it, and in that cycle a
memory response is held off (`mem_resp_ready` is low).

## Interfaces of the top

| port group | protocol |
|---|---|
| `issue_valid/ready`, `issue_desc` (`gen_desc_t`), `issue_cta` (`cta_id_t`, 3 x 16 bits) | descriptor issue at CTA launch |
| `l1_miss_valid/ready`, `l1_miss_line` | one L1 miss per cycle, line address (byte address >> 7) |
| `l1_fill_valid`, `l1_fill_from_pbuf`, `l1_fill_line`, `l1_fill_data` (1024 bits) | lines for the L1; always accepted |
| `mem_req_valid/ready`, `mem_req_line`, `mem_req_tag` (5 bits), `mem_req_bypass_l2` | line requests |
| `mem_resp_valid/ready`, `mem_resp_tag`, `mem_resp_data` | responses, in any order, by tag |
| `prefetch_busy`, `desc_queued`, `pbuf_occupancy`, `ev_*` | status and one-cycle event pulses |

Reset is asynchronous and active low. It clears all control state. The descriptor and line
data arrays are not reset.

Parameters of the top are `DESC_MEM_BYTES=1024`, `PBUF_BYTES=32768` and `MSHR_ENTRIES=32`.
The line size (128 B), the address width (32 bits), the field width (32 bits) and the CTA
index width (16 bits) are constants in `spf_pkg`.

## Where this design departs from or adds to the article

The article gives the block structure, the descriptor tuple, the CTA-time decoding, the
adder-only AGU, the merging in the MSHR, the L2 bypass and the sizes above. Everything below
is this design's own choice:

* The CTA dependence is affine, and only the start address depends on the CTA.
* Descriptor fields are in elements, with an added element-size field. The article's example
  uses element units but does not say how they become bytes.
* The CTA offset of the convolution example is read as `32*blockIdx.x + 8*4096*blockIdx.y`
  elements, which is the product of block size and block index in each dimension.
* The descriptor list is solved in FIFO order. The article's alternative, one hierarchical
  descriptor for all phases, is not built.
* The coalescer compares each address only with the previous line.
* The prefetch buffer is fully associative, uses round-robin replacement and releases a line
  once it is used.
* A line returned for a waiting miss goes to the L1 only, not into the prefetch buffer as well.
* The MSHR details are new: the entry format, the priority order, the rule of no requests in a
  response cycle, and tagging by entry number.
* All handshakes are valid/ready, with the latencies given above.

The article evaluates the design in a cycle-level GPU simulator and reports hit-rate, speedup
and energy results. The testbenches here check function and cycle behaviour only. They do not
reproduce those results.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_agu`: addresses and `addr_last` are compared with a nested-loop model for the
  convolution pattern, a span pattern, single-element and empty descriptors, and random
  descriptors under back-pressure. The test checks a rate of one address per cycle, with the
  first address on the cycle after start.
* `tb_descriptor_memory`: every slot is read back; the test also checks one-cycle latency and
  read-before-write behaviour.
* `tb_prefetch_controller`: CTA decode against a reference, issue order, the full-queue stall
  and the idle state.
* `tb_stream_prefetcher`: the complete address stream for several convolution CTAs and random
  descriptors, and one address per cycle within a descriptor.
* `tb_prefetch_coalescer`: the requests and the merge count against a model, with and without
  output back-pressure.
* `tb_prefetch_buffer`: hits, release, refill, capacity, round-robin eviction and occupancy.
* `tb_mshr`: a random mix of misses and prefetches against an out-of-order memory. The test
  checks that each line is requested once, the merge pulses, the bypass flag, the routing of
  each response, and refusal when the MSHR is full.
* `tb_l1_prefetch_subsystem`: end to end at the default sizes. It runs convolution CTAs whose
  warps miss after the prefetch has finished; there every descriptor line must be a buffer
  hit, served one cycle later. It then runs CTAs whose warps miss concurrently, one of them in
  reverse warp order. Next it reads 96 buffered lines one per cycle while 30 demand misses
  return from memory, so buffer hits and responses meet at the fill port. Finally it runs 40
  column-walk descriptors, as in a matrix-vector product, back to back. Every miss must get
  exactly one fill with the right data. The test counts each mechanism and fails if any of
  them never happened: buffer hit, miss merge, prefetch merge, coalescing, stall on a full
  MSHR, eviction, full descriptor memory, L2 bypass, demand request, and a response held for
  a buffer hit.

`tb_workloads` runs four kernel-shaped streams through the top at the default sizes. Its L1
model has warps that block on each load, scheduled round robin, and an L1 that keeps what it
receives. The counts from one run:

| kernel | descriptors | lines | L1 misses | buffer hits | merged in flight | demand requests | evicted |
|---|---|---|---|---|---|---|---|
| 3D convolution 256^3, 4 CTAs, warps after prefetch | 4 x (32, 256, 8, 65536, 3) | 96 | 96 | 96 | 0 | 0 | 0 |
| gemm 512^2, 1 CTA, warps at once | A rows + B strip | 640 | 640 | 270 | 338 | 32 | 0 |
| atax/bicg/mvt/gesummv 4096^2, 1 CTA | (256, 4096, 4096, 0, 1) | 32768 | 32768 | 0 | 0 | 32768 | 32488 |
| bfs, region larger than read | (4096, 0, 1, 0, 1) | 128 | 64 | 64 | 0 | 0 | 0 |

It checks the data of every fill. It also checks that each descriptor line is requested at
most once, and that a miss goes to memory exactly when it neither hits nor merges. Every
prefetched line must be accounted for as read, merged, evicted or still buffered. The atax
row shows the pacing limitation described above.

To run one testbench with Verilator (the package first):

```
verilator --binary --timing --assert -Irtl rtl/spf_pkg.sv \
  $(ls rtl/*.sv | grep -v spf_pkg) tb/tb_l1_prefetch_subsystem.sv \
  --top-module tb_l1_prefetch_subsystem -Mdir obj
./obj/Vtb_l1_prefetch_subsystem
```

Every testbench runs in a few seconds. The end-to-end test runs at the default parameters.

## Size

At the defaults, coarse synthesis of the top gives about 6,000 word-level cells, 8,100
flip-flop bits and 268,352 memory bits (256 x 1024 for the buffer data and 32 x 194 for the
descriptors). Most of the logic is in the prefetch buffer's 256 tag comparators. A
set-associative buffer would shrink them, at the cost of the row-conflict problem described
above.
