// stream_prefetcher: the prefetcher's controller together with its address
// generation unit.
//
// Descriptors issued at CTA launch enter the controller, which decodes them,
// parks them in the descriptor memory (outside this block, its ports are
// brought out) and feeds them one at a time to the AGU. The AGU emits the
// descriptor's byte addresses, one per cycle, towards the prefetch coalescing
// unit. The split into a controller and an AGU follows the prefetcher's
// architecture; the port list is this design's own.
//
// Interface: issue_* is the descriptor issue handshake; addr_valid/addr_ready
// carries the generated addresses, addr_last marking the last address of each
// descriptor. busy is high while any descriptor is queued or being solved.
module stream_prefetcher
  import spf_pkg::*;
#(
  parameter int unsigned DESC_DEPTH = 32,
  localparam int unsigned AW        = $clog2(DESC_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          issue_valid,
  output logic          issue_ready,
  input  gen_desc_t     issue_desc,
  input  cta_id_t       issue_cta,
  output logic          dm_wr_en,
  output logic [AW-1:0] dm_wr_addr,
  output desc_t         dm_wr_data,
  output logic          dm_rd_en,
  output logic [AW-1:0] dm_rd_addr,
  input  desc_t         dm_rd_data,
  output logic          addr_valid,
  input  logic          addr_ready,
  output addr_t         addr,
  output logic          addr_last,
  output logic          busy,
  output logic [AW:0]   queued
);

  logic  agu_start_valid, agu_start_ready, agu_busy;
  desc_t agu_start_desc;

  prefetch_controller #(.DEPTH(DESC_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .issue_valid, .issue_ready, .issue_desc, .issue_cta,
    .dm_wr_en, .dm_wr_addr, .dm_wr_data, .dm_rd_en, .dm_rd_addr, .dm_rd_data,
    .agu_start_valid, .agu_start_ready, .agu_start_desc, .agu_busy,
    .busy, .queued
  );

  agu u_agu (
    .clk, .rst_n,
    .start_valid (agu_start_valid),
    .start_ready (agu_start_ready),
    .start_desc  (agu_start_desc),
    .addr_valid, .addr_ready, .addr, .addr_last,
    .busy        (agu_busy)
  );

endmodule
