// l1_prefetch_subsystem: the stream prefetcher integrated in the L1 memory
// sub-hierarchy of one streaming multiprocessor (SM).
//
// The kernel's memory access pattern is known ahead of time and shipped as
// data-pattern descriptors. When a CTA (thread block) is launched, its
// descriptors arrive on the issue port, are decoded for that CTA and stored in
// the descriptor memory; the stream prefetcher's AGU then generates the exact
// address stream, the prefetch coalescer reduces it to line requests and the
// MSHR sends them to global memory, bypassing the L2. Returned lines land in
// the prefetch buffer, beside the L1. L1 misses are checked against the
// prefetch buffer first: a hit is served from it at once; a miss goes to the
// MSHR, where it merges with an outstanding prefetch of the same line or is
// sent to memory through the L2 on its own.
// The set of blocks and their connections follow the prefetcher's
// integration in the SM. The L1 cache itself, its coalescer, the SM core, the
// L2 and global memory are outside this block: the L1 miss / L1 fill and
// memory request / response ports stand where they attach.
//
// Interface and timing:
//  * issue_*: descriptor issue handshake (generic descriptor + CTA id).
//  * l1_miss_*: line address of an L1 miss, valid/ready. A prefetch buffer hit
//    is accepted at once and delivered on l1_fill_* one cycle later; a buffer
//    miss is accepted when the MSHR can take it.
//  * l1_fill_*: lines for the L1, no back-pressure; l1_fill_from_pbuf tells a
//    prefetch-buffer hit from a line returned by memory. A buffer hit has
//    priority: a memory response is held off (mem_resp_ready low) in the cycle
//    a buffer line is delivered.
//  * mem_req_* / mem_resp_*: line requests to memory tagged with the MSHR
//    entry; bypass_l2 is set on prefetch-only requests.
//  * ev_*: one-cycle event pulses; prefetch_busy: descriptors left to solve;
//    desc_queued: decoded descriptors waiting in the descriptor memory.
module l1_prefetch_subsystem
  import spf_pkg::*;
#(
  parameter int unsigned DESC_MEM_BYTES = 1024,
  parameter int unsigned PBUF_BYTES     = 32768,
  parameter int unsigned MSHR_ENTRIES   = 32,
  localparam int unsigned DESC_DEPTH    = DESC_MEM_BYTES / 32,
  localparam int unsigned DAW           = $clog2(DESC_DEPTH),
  localparam int unsigned TW            = $clog2(MSHR_ENTRIES),
  localparam int unsigned PIW           = $clog2(PBUF_BYTES / LINE_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // descriptor issue at CTA launch
  input  logic          issue_valid,
  output logic          issue_ready,
  input  gen_desc_t     issue_desc,
  input  cta_id_t       issue_cta,
  // L1 data cache miss
  input  logic          l1_miss_valid,
  output logic          l1_miss_ready,
  input  line_addr_t    l1_miss_line,
  // line fill to the L1 data cache
  output logic          l1_fill_valid,
  output logic          l1_fill_from_pbuf,
  output line_addr_t    l1_fill_line,
  output line_data_t    l1_fill_data,
  // global memory request / response
  output logic          mem_req_valid,
  input  logic          mem_req_ready,
  output line_addr_t    mem_req_line,
  output logic [TW-1:0] mem_req_tag,
  output logic          mem_req_bypass_l2,
  input  logic          mem_resp_valid,
  output logic          mem_resp_ready,
  input  logic [TW-1:0] mem_resp_tag,
  input  line_data_t    mem_resp_data,
  // status and events
  output logic          prefetch_busy,
  output logic [DAW:0]  desc_queued,
  output logic          ev_pbuf_hit,
  output logic          ev_pbuf_evict,
  output logic          ev_miss_merged,
  output logic          ev_pf_merged,
  output logic          ev_pf_coalesced,
  output logic          ev_pf_stall,
  output logic [PIW:0]  pbuf_occupancy
);

  // descriptor memory
  logic           dm_wr_en, dm_rd_en;
  logic [DAW-1:0] dm_wr_addr, dm_rd_addr;
  desc_t          dm_wr_data, dm_rd_data;

  descriptor_memory #(.MEM_BYTES(DESC_MEM_BYTES), .SLOT_BYTES(32)) u_dmem (
    .clk, .wr_en(dm_wr_en), .wr_addr(dm_wr_addr), .wr_data(dm_wr_data),
    .rd_en(dm_rd_en), .rd_addr(dm_rd_addr), .rd_data(dm_rd_data)
  );

  // stream prefetcher: controller + AGU
  logic  a_valid, a_ready, a_last;
  addr_t a_addr;

  stream_prefetcher #(.DESC_DEPTH(DESC_DEPTH)) u_spf (
    .clk, .rst_n,
    .issue_valid, .issue_ready, .issue_desc, .issue_cta,
    .dm_wr_en, .dm_wr_addr, .dm_wr_data, .dm_rd_en, .dm_rd_addr, .dm_rd_data,
    .addr_valid(a_valid), .addr_ready(a_ready), .addr(a_addr), .addr_last(a_last),
    .busy(prefetch_busy), .queued(desc_queued)
  );

  // prefetch coalescing unit
  logic       pf_valid, pf_ready;
  line_addr_t pf_line;

  prefetch_coalescer u_coal (
    .clk, .rst_n,
    .in_valid(a_valid), .in_ready(a_ready), .in_addr(a_addr), .in_last(a_last),
    .out_valid(pf_valid), .out_ready(pf_ready), .out_line(pf_line),
    .merged(ev_pf_coalesced)
  );

  // prefetch buffer
  logic       pb_hit, pb_rd_valid, pb_fill_valid;
  line_addr_t pb_rd_line, m_fill_line;
  line_data_t pb_rd_data, m_fill_data;

  prefetch_buffer #(.BUF_BYTES(PBUF_BYTES)) u_pbuf (
    .clk, .rst_n,
    .lk_valid(l1_miss_valid), .lk_line(l1_miss_line), .lk_hit(pb_hit),
    .rd_valid(pb_rd_valid), .rd_line(pb_rd_line), .rd_data(pb_rd_data),
    .fill_valid(pb_fill_valid), .fill_line(m_fill_line), .fill_data(m_fill_data),
    .evicted(ev_pbuf_evict), .occupancy(pbuf_occupancy)
  );

  // MSHR
  logic dem_ready, m_l1_fill_valid, mshr_full;

  mshr #(.ENTRIES(MSHR_ENTRIES)) u_mshr (
    .clk, .rst_n,
    .dem_valid(l1_miss_valid && !pb_hit), .dem_ready, .dem_line(l1_miss_line),
    .pf_valid, .pf_ready, .pf_line,
    .mem_req_valid, .mem_req_ready, .mem_req_line, .mem_req_tag, .mem_req_bypass_l2,
    .mem_resp_valid, .mem_resp_ready, .mem_resp_tag, .mem_resp_data,
    .fill_ready(!pb_rd_valid),
    .pbuf_fill_valid(pb_fill_valid), .l1_fill_valid(m_l1_fill_valid),
    .fill_line(m_fill_line), .fill_data(m_fill_data),
    .dem_merged(ev_miss_merged), .pf_merged(ev_pf_merged), .full(mshr_full)
  );

  assign l1_miss_ready = pb_hit || dem_ready;
  assign ev_pbuf_hit   = pb_hit;
  assign ev_pf_stall   = pf_valid && !pf_ready && mshr_full;

  // L1 fill: prefetch buffer hit or line returned by memory
  assign l1_fill_valid     = pb_rd_valid || m_l1_fill_valid;
  assign l1_fill_from_pbuf = pb_rd_valid;
  assign l1_fill_line      = pb_rd_valid ? pb_rd_line : m_fill_line;
  assign l1_fill_data      = pb_rd_valid ? pb_rd_data : m_fill_data;

endmodule
