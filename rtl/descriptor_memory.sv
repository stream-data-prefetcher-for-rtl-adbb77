// descriptor_memory: scratchpad that holds the descriptors decoded for the
// CTAs running on the SM.
//
// The prefetcher's descriptor memory is 1 KB. Each decoded descriptor
// (six 32-bit fields plus a 2-bit element size, 194 bits) occupies one 32-byte
// slot, so the default depth is 1024 / 32 = 32 descriptors. The slot size,
// the single write port / single read port organisation and the one-cycle
// synchronous read are this design's choices.
//
// Interface: one write port (wr_en, wr_addr, wr_data) and one read port
// (rd_en, rd_addr). rd_data is valid on the clock edge after rd_en and holds
// until the next read. A read and a write of the same slot in one cycle return
// the old contents. The array itself is not reset; reads only ever target
// slots that were written first.
module descriptor_memory
  import spf_pkg::*;
#(
  parameter int unsigned MEM_BYTES  = 1024,
  parameter int unsigned SLOT_BYTES = 32,
  localparam int unsigned DEPTH     = MEM_BYTES / SLOT_BYTES,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  desc_t         wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output desc_t         rd_data
);

  desc_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

  initial begin
    assert (SLOT_BYTES * 8 >= $bits(desc_t))
      else $error("descriptor slot of %0d bytes cannot hold %0d bits", SLOT_BYTES, $bits(desc_t));
  end

endmodule
