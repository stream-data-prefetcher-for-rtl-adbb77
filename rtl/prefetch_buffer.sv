// prefetch_buffer: storage for prefetched lines, working beside the L1 data
// cache.
//
// Prefetched lines returned by memory are written here instead of into the
// L1, so prefetching never evicts lines the SM is using. Every L1 miss is
// first looked up here; on a hit the line is read out and copied to the L1 (and
// on to the SM), and its entry is released, since the L1 now holds it.
// The buffer is 32 KB, i.e. 256 lines of 128 bytes. It is fully associative:
// a descriptor's rows are typically a power-of-two stride apart and would all
// fall in one set of an indexed structure. A fill goes to the entry already
// holding that line, else to the lowest free entry, else it replaces the entry
// under a round-robin victim pointer (counted as an eviction). The 32 KB size,
// the placement beside the L1 and the hit-then-copy behaviour follow the
// prefetcher's description; associativity, replacement and release on hit
// are this design's choices.
//
// Interface and timing: lk_hit is a combinational answer for lk_line while
// lk_valid is high; a hit consumes the line and the data appear on rd_valid /
// rd_line / rd_data one cycle later. A fill (fill_valid, fill_line,
// fill_data) is always accepted and is visible to lookups from the next cycle.
// A lookup that hits the entry a fill overwrites in the same cycle reads the
// old contents. Tags and valid bits are reset; the data array is not.
module prefetch_buffer
  import spf_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 32768,
  localparam int unsigned LINES    = BUF_BYTES / LINE_BYTES,
  localparam int unsigned IW       = $clog2(LINES)
) (
  input  logic       clk,
  input  logic       rst_n,
  // lookup by an L1 miss
  input  logic       lk_valid,
  input  line_addr_t lk_line,
  output logic       lk_hit,
  // line read out on a hit
  output logic       rd_valid,
  output line_addr_t rd_line,
  output line_data_t rd_data,
  // fill from memory
  input  logic       fill_valid,
  input  line_addr_t fill_line,
  input  line_data_t fill_data,
  // events and status
  output logic       evicted,
  output logic [IW:0] occupancy
);

  logic       valid_q [LINES];
  line_addr_t tag_q   [LINES];
  line_data_t data_mem [LINES];
  logic [IW-1:0] victim_q;

  // lookup
  logic          lk_match;
  logic [IW-1:0] lk_idx;
  always_comb begin
    lk_match = 1'b0;
    lk_idx   = '0;
    for (int i = 0; i < LINES; i++) begin
      if (!lk_match && valid_q[i] && tag_q[i] == lk_line) begin
        lk_match = 1'b1;
        lk_idx   = IW'(i);
      end
    end
  end
  assign lk_hit = lk_valid && lk_match;

  // fill placement
  logic          f_match, f_free;
  logic [IW-1:0] f_match_idx, f_free_idx, f_idx;
  always_comb begin
    f_match     = 1'b0;
    f_match_idx = '0;
    f_free      = 1'b0;
    f_free_idx  = '0;
    for (int i = 0; i < LINES; i++) begin
      if (!f_match && valid_q[i] && tag_q[i] == fill_line) begin
        f_match     = 1'b1;
        f_match_idx = IW'(i);
      end
      if (!f_free && !valid_q[i]) begin
        f_free     = 1'b1;
        f_free_idx = IW'(i);
      end
    end
    if (f_match)     f_idx = f_match_idx;
    else if (f_free) f_idx = f_free_idx;
    else             f_idx = victim_q;
  end
  assign evicted = fill_valid && !f_match && !f_free;

  logic [IW:0] count_q;
  logic        inc, dec;
  assign inc = fill_valid && !f_match && f_free;
  assign dec = lk_hit && !(fill_valid && f_idx == lk_idx);
  assign occupancy = count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) begin
        valid_q[i] <= 1'b0;
        tag_q[i]   <= '0;
      end
      victim_q <= '0;
      count_q  <= '0;
      rd_valid <= 1'b0;
      rd_line  <= '0;
    end else begin
      rd_valid <= lk_hit;
      if (lk_hit) begin
        rd_line         <= lk_line;
        valid_q[lk_idx] <= 1'b0;
      end
      if (fill_valid) begin
        valid_q[f_idx] <= 1'b1;
        tag_q[f_idx]   <= fill_line;
      end
      if (evicted) victim_q <= victim_q + 1'b1;
      count_q <= count_q + (IW+1)'(inc) - (IW+1)'(dec);
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid) data_mem[f_idx] <= fill_data;
    if (lk_hit)     rd_data <= data_mem[lk_idx];
  end

endmodule
