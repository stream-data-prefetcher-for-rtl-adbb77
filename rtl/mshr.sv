// mshr: miss status holding registers shared by the L1 data cache and the
// stream prefetcher.
//
// Both L1 misses (that the prefetch buffer could not serve) and the
// prefetcher's coalesced line requests are registered here. A request for a
// line that already has an entry is merged into it instead of going to memory
// again: an L1 miss that finds an outstanding prefetch waits for it, and a
// prefetch that finds an outstanding miss is dropped. Other requests take a
// free entry, which is then sent to memory. Entries that hold only prefetch
// requests are sent with bypass_l2 set, so the stream traffic goes to global
// memory without passing through the shared L2. When the line returns, it is
// delivered to the L1 if any L1 miss is waiting on it, and otherwise written
// into the prefetch buffer; the entry is then released.
// The 32 entries, the merging of prefetch and miss requests and the L2
// bypass of stream requests follow the prefetcher's description. The entry
// format, the priority of L1 misses over prefetches, issue in entry order and
// the tagging of memory requests with the entry number are this design's
// choices.
//
// Interface and timing: dem_* (L1 miss) and pf_* (prefetch) are valid/ready
// inputs; at most one of them is accepted per cycle, the L1 miss first. No
// request is accepted in a cycle in which a response is taken, so a request
// never merges into an entry that is being released; it is accepted the next
// cycle, when the line has reached its destination. mem_req_* issues one line
// per cycle with the entry number as tag; mem_resp_* returns it by tag, taken
// when fill_ready is high. The fill outputs are combinational from the
// response. full is high when no entry is free.
module mshr
  import spf_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  localparam int unsigned TW     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // L1 miss not served by the prefetch buffer
  input  logic          dem_valid,
  output logic          dem_ready,
  input  line_addr_t    dem_line,
  // coalesced prefetch request
  input  logic          pf_valid,
  output logic          pf_ready,
  input  line_addr_t    pf_line,
  // to memory
  output logic          mem_req_valid,
  input  logic          mem_req_ready,
  output line_addr_t    mem_req_line,
  output logic [TW-1:0] mem_req_tag,
  output logic          mem_req_bypass_l2,
  // from memory
  input  logic          mem_resp_valid,
  output logic          mem_resp_ready,
  input  logic [TW-1:0] mem_resp_tag,
  input  line_data_t    mem_resp_data,
  input  logic          fill_ready,
  // line delivery
  output logic          pbuf_fill_valid,
  output logic          l1_fill_valid,
  output line_addr_t    fill_line,
  output line_data_t    fill_data,
  // events and status
  output logic          dem_merged,
  output logic          pf_merged,
  output logic          full
);

  typedef struct packed {
    logic       valid;
    logic       prefetch;
    logic       demand;
    logic       issued;
    line_addr_t line;
  } entry_t;

  entry_t e_q [ENTRIES];

  logic          dm_hit, pm_hit, free_any, iss_any;
  logic [TW-1:0] dm_idx, free_idx, iss_idx;
  always_comb begin
    dm_hit = 1'b0; dm_idx = '0;
    pm_hit = 1'b0;
    free_any = 1'b0; free_idx = '0;
    iss_any = 1'b0; iss_idx = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!dm_hit && e_q[i].valid && e_q[i].line == dem_line) begin
        dm_hit = 1'b1; dm_idx = TW'(i);
      end
      if (!pm_hit && e_q[i].valid && e_q[i].line == pf_line) begin
        pm_hit = 1'b1;
      end
      if (!free_any && !e_q[i].valid) begin
        free_any = 1'b1; free_idx = TW'(i);
      end
      if (!iss_any && e_q[i].valid && !e_q[i].issued) begin
        iss_any = 1'b1; iss_idx = TW'(i);
      end
    end
  end

  logic resp_fire, dem_fire, pf_fire;
  assign mem_resp_ready = fill_ready;
  assign resp_fire      = mem_resp_valid && fill_ready;
  assign dem_ready      = !resp_fire && (dm_hit || free_any);
  assign pf_ready       = !resp_fire && !dem_valid && (pm_hit || free_any);
  assign dem_fire       = dem_valid && dem_ready;
  assign pf_fire        = pf_valid && pf_ready;
  assign dem_merged     = dem_fire && dm_hit;
  assign pf_merged      = pf_fire && pm_hit;
  assign full           = !free_any;

  assign mem_req_valid     = iss_any;
  assign mem_req_line      = e_q[iss_idx].line;
  assign mem_req_tag       = iss_idx;
  assign mem_req_bypass_l2 = e_q[iss_idx].prefetch && !e_q[iss_idx].demand;

  // the entry a response names
  logic r_demand, r_prefetch;
  assign r_demand        = e_q[mem_resp_tag].demand;
  assign r_prefetch      = e_q[mem_resp_tag].prefetch;
  assign l1_fill_valid   = resp_fire && r_demand;
  assign pbuf_fill_valid = resp_fire && r_prefetch && !r_demand;
  assign fill_line       = e_q[mem_resp_tag].line;
  assign fill_data       = mem_resp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) e_q[i] <= '0;
    end else begin
      if (mem_req_valid && mem_req_ready) e_q[iss_idx].issued <= 1'b1;
      if (resp_fire) e_q[mem_resp_tag].valid <= 1'b0;
      if (dem_fire) begin
        if (dm_hit) begin
          e_q[dm_idx].demand <= 1'b1;
        end else begin
          e_q[free_idx] <= '{valid: 1'b1, prefetch: 1'b0, demand: 1'b1,
                             issued: 1'b0, line: dem_line};
        end
      end else if (pf_fire && !pm_hit) begin
        e_q[free_idx] <= '{valid: 1'b1, prefetch: 1'b1, demand: 1'b0,
                           issued: 1'b0, line: pf_line};
      end
    end
  end

endmodule
