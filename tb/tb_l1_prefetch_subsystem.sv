// tb_l1_prefetch_subsystem: end-to-end testbench of the stream prefetcher in
// the L1 memory sub-hierarchy, at the default sizes (1 KB descriptor memory,
// 32 KB prefetch buffer, 32 MSHR entries).
//
// Around the block it models the parts it attaches to: a block distribution
// engine issuing descriptors at CTA launch, the L1 side issuing the misses of
// the CTA's warps, and a global memory answering line requests out of order
// after 150-250 cycles (data = a function of the line address).
//
// Workload: the 2D-convolution kernel (4096 x 4096 floats, 32 x 8 CTAs), whose
// CTA descriptor is (A + 4*(32*bx + 8*4096*by), 32, 4096, 8, 0, 1). Each CTA's
// warps miss on the lines of rows 8*by-1 .. 8*by+8 and columns 32*bx-1 ..
// 32*bx+32, so the halo lines are not in the descriptor and must come from
// memory on demand.
//  Phase A: two CTAs, L1 misses start after the prefetch has completed: every
//           descriptor line must hit in the prefetch buffer, with its data one
//           cycle after the miss.
//  Phase B: two CTAs whose misses start at once, the second CTA's warps in
//           reverse order: misses merge with prefetches in flight and
//           prefetches merge with earlier misses.
//  Phase D: twelve more CTAs are prefetched, then 30 lines outside any
//           descriptor are missed and, as they return from memory, the 96
//           buffered lines are read one per cycle: a buffer hit and a memory
//           response for the L1 meet at the fill port, the hit goes first and
//           the response is held a cycle.
//  Phase C: 40 column-walk descriptors (one element per line, 64 rows, as in
//           a matrix-vector product) issued back to back: the descriptor
//           memory fills, the MSHR fills and stalls the prefetcher, and the
//           2560 unread lines overflow the prefetch buffer (evictions).
// Everywhere: each miss receives exactly one fill with the right data, no line
// is outstanding twice at memory, only prefetch-only requests bypass the L2,
// and each mechanism listed above is counted and must have occurred.
`timescale 1ns/1ps
module tb_l1_prefetch_subsystem;
  import spf_pkg::*;

  localparam int unsigned TW = 5;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          issue_valid, issue_ready;
  gen_desc_t     issue_desc;
  cta_id_t       issue_cta;
  logic          l1_miss_valid, l1_miss_ready;
  line_addr_t    l1_miss_line;
  logic          l1_fill_valid, l1_fill_from_pbuf;
  line_addr_t    l1_fill_line;
  line_data_t    l1_fill_data;
  logic          mem_req_valid, mem_req_ready, mem_req_bypass_l2;
  line_addr_t    mem_req_line;
  logic [TW-1:0] mem_req_tag, mem_resp_tag;
  logic          mem_resp_valid, mem_resp_ready;
  line_data_t    mem_resp_data;
  logic          prefetch_busy;
  logic [5:0]    desc_queued;
  logic          ev_pbuf_hit, ev_pbuf_evict, ev_miss_merged, ev_pf_merged;
  logic          ev_pf_coalesced, ev_pf_stall;
  logic [8:0]    pbuf_occupancy;

  l1_prefetch_subsystem dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic line_data_t mem_data(line_addr_t l);
    line_data_t d;
    for (int w = 0; w < LINE_BITS / 32; w++) d[w*32 +: 32] = {l[19:0], 12'(w * 7)};
    return d;
  endfunction

  // ---------------- global memory model ----------------
  typedef struct {int tag; line_addr_t line; longint due;} mreq_t;
  mreq_t      mq[$];
  bit         at_mem [line_addr_t];       // lines currently requested from memory
  bit         pattern [line_addr_t];      // lines some issued descriptor covers
  int         n_bypass = 0, n_demand_req = 0;
  int         r_idx;

  always @(negedge clk) begin
    mem_req_ready <= ($urandom_range(0, 4) != 0);
    mem_resp_valid <= 1'b0;
    for (int i = 0; i < mq.size(); i++)
      if (mq[i].due <= cycle) begin
        mem_resp_valid <= 1'b1;
        mem_resp_tag   <= TW'(mq[i].tag);
        mem_resp_data  <= mem_data(mq[i].line);
        r_idx <= i;
        break;
      end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (mem_resp_valid && mem_resp_ready) begin
        check(!l1_fill_from_pbuf, "no memory response taken while a buffer hit uses the fill port");
        at_mem.delete(mq[r_idx].line);
        mq.delete(r_idx);
      end
      if (mem_req_valid && mem_req_ready) begin
        check(!at_mem.exists(mem_req_line), $sformatf("line %h requested twice at memory", mem_req_line));
        at_mem[mem_req_line] = 1'b1;
        if (mem_req_bypass_l2) begin
          n_bypass++;
          check(pattern.exists(mem_req_line), "only descriptor lines bypass the L2");
        end else begin
          n_demand_req++;
        end
        mq.push_back('{tag: int'(mem_req_tag), line: mem_req_line, due: cycle + longint'($urandom_range(150, 250))});
      end
    end
  end

  // ---------------- L1 side model ----------------
  longint waiting [line_addr_t];   // outstanding misses: line -> cycle accepted
  int n_fills = 0, n_pbuf_fills = 0, n_fast = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (l1_fill_valid) begin
        n_fills++;
        if (l1_fill_from_pbuf) n_pbuf_fills++;
        if (!waiting.exists(l1_fill_line)) check(1'b0, $sformatf("fill of line %h nobody waits for", l1_fill_line));
        else begin
          check(l1_fill_data == mem_data(l1_fill_line), $sformatf("fill data of line %h", l1_fill_line));
          if (l1_fill_from_pbuf) begin
            check(cycle - waiting[l1_fill_line] == 1, "prefetch buffer hit delivered one cycle after the miss");
            n_fast++;
          end
          waiting.delete(l1_fill_line);
        end
      end
      if (l1_miss_valid && l1_miss_ready) waiting[l1_miss_line] = cycle;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_hit = 0, n_miss_merge = 0, n_pf_merge = 0, n_coal = 0, n_stall = 0, n_evict = 0, n_desc_full = 0;
  int n_resp_held = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      n_hit        += int'(ev_pbuf_hit);
      n_miss_merge += int'(ev_miss_merged);
      n_pf_merge   += int'(ev_pf_merged);
      n_coal       += int'(ev_pf_coalesced);
      n_stall      += int'(ev_pf_stall);
      n_evict      += int'(ev_pbuf_evict);
      n_desc_full  += int'(issue_valid && !issue_ready);
      n_resp_held  += int'(l1_fill_from_pbuf && mem_resp_valid && !mem_resp_ready);
    end
  end

  // ---------------- stimulus ----------------
  localparam int unsigned N = 4096;
  localparam addr_t A_BASE = 32'h1000_0000;
  localparam addr_t B_BASE = 32'h2000_0000;

  function automatic gen_desc_t conv_desc();
    return '{base: A_BASE, coef_x: 32, coef_y: 8 * N, coef_z: 0, hsize: 32,
             stride: N, vsize: 8, span: 0, dsize: 1, esize: 2};
  endfunction

  task automatic issue(gen_desc_t g, cta_id_t c);
    addr_t off;
    issue_valid = 1'b1;
    issue_desc  = g;
    issue_cta   = c;
    #1;
    while (!issue_ready) begin
      @(negedge clk);
      #1;
    end
    off = g.base + ((g.coef_x * c.x + g.coef_y * c.y + g.coef_z * c.z) << g.esize);
    for (int k = 0; k < int'(g.dsize); k++)
      for (int j = 0; j < int'(g.vsize); j++)
        for (int i = 0; i < int'(g.hsize); i++)
          pattern[line_of(off + ((addr_t'(k) * g.span + addr_t'(j) * g.stride + addr_t'(i)) << g.esize))] = 1'b1;
    @(negedge clk);
    issue_valid = 1'b0;
  endtask

  task automatic miss(line_addr_t l, int gap);
    l1_miss_valid = 1'b1;
    l1_miss_line  = l;
    #1;
    while (!l1_miss_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    l1_miss_valid = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  // the lines a convolution CTA's warps miss on, halo included
  task automatic cta_misses(int bx, int by, output line_addr_t q[$]);
    bit seen [line_addr_t];
    q = {};
    for (int r = 8 * by - 1; r <= 8 * by + 8; r++)
      for (int c = 32 * bx - 1; c <= 32 * bx + 32; c++) begin
        line_addr_t l;
        l = line_of(A_BASE + addr_t'((r * N + c) * 4));
        if (!seen.exists(l)) begin
          seen[l] = 1'b1;
          q.push_back(l);
        end
      end
  endtask

  initial begin
    line_addr_t q[$];
    int hits_before;
    rst_n = 1'b0;
    issue_valid = 1'b0; issue_desc = '0; issue_cta = '0;
    l1_miss_valid = 1'b0; l1_miss_line = '0;
    mem_resp_tag = '0; mem_resp_data = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Phase A: prefetch ahead of the warps
    issue(conv_desc(), '{x: 1, y: 1, z: 1});
    issue(conv_desc(), '{x: 2, y: 1, z: 1});
    wait (!prefetch_busy);
    wait (mq.size() == 0 && !mem_req_valid);
    repeat (5) @(negedge clk);
    check(pbuf_occupancy == 16, $sformatf("16 lines prefetched for two CTAs (%0d)", pbuf_occupancy));
    hits_before = n_hit;
    for (int bx = 1; bx <= 2; bx++) begin
      cta_misses(bx, 1, q);
      foreach (q[i]) begin
        miss(q[i], $urandom_range(0, 3));
      end
    end
    wait (waiting.size() == 0);
    @(negedge clk);
    check(n_hit - hits_before == 16,
          $sformatf("phase A: all 16 descriptor lines hit in the prefetch buffer (%0d hits)", n_hit - hits_before));
    check(pbuf_occupancy == 0, "phase A: prefetched lines released after use");

    // Phase B: warps start at once
    issue(conv_desc(), '{x: 3, y: 2, z: 1});
    issue(conv_desc(), '{x: 5, y: 2, z: 1});
    // the second CTA's warps run in reverse order, ahead of its prefetch
    cta_misses(3, 2, q);
    foreach (q[i]) miss(q[i], $urandom_range(0, 12));
    cta_misses(5, 2, q);
    for (int i = q.size() - 1; i >= 0; i--) miss(q[i], $urandom_range(0, 12));
    wait (waiting.size() == 0 && !prefetch_busy);
    repeat (300) @(negedge clk);

    // Phase D: buffer hits while demand lines return from memory, so that a
    // hit and a response for the L1 meet at the fill port
    for (int bx = 0; bx < 12; bx++) issue(conv_desc(), '{x: 16'(bx), y: 20, z: 0});
    wait (!prefetch_busy);
    wait (mq.size() == 0 && !mem_req_valid);
    repeat (5) @(negedge clk);
    hits_before = n_hit;
    for (int i = 0; i < 30; i++) miss(line_of(B_BASE + addr_t'(i * 2 * N * 4)), 0);
    repeat (140) @(negedge clk);
    for (int bx = 0; bx < 12; bx++)
      for (int r = 0; r < 8; r++) miss(line_of(A_BASE + addr_t'(((160 + r) * N + 32 * bx) * 4)), 0);
    wait (waiting.size() == 0);
    @(negedge clk);
    check(n_hit - hits_before == 96, $sformatf("phase D: 96 buffer hits (%0d)", n_hit - hits_before));

    // Phase C: column walks, issued back to back
    for (int col = 0; col < 40; col++) begin
      issue('{base: B_BASE, coef_x: 32, coef_y: 0, coef_z: 0, hsize: 1, stride: N,
              vsize: 64, span: 0, dsize: 1, esize: 2}, '{x: 16'(col), y: 0, z: 0});
    end
    // a few warps read some of the column lines while the stream is running
    repeat (2000) @(negedge clk);
    for (int i = 0; i < 20; i++) miss(line_of(B_BASE + addr_t'(($urandom_range(0, 63) * N + 32 * $urandom_range(0, 39)) * 4)), 5);
    wait (!prefetch_busy);
    wait (mq.size() == 0 && waiting.size() == 0 && !mem_req_valid);
    repeat (10) @(negedge clk);

    check(waiting.size() == 0, "every L1 miss was answered");
    check(pbuf_occupancy == 256, $sformatf("prefetch buffer full after the overflow (%0d)", pbuf_occupancy));
    $display("mechanisms: pbuf_hit=%0d miss_merged=%0d pf_merged=%0d coalesced=%0d mshr_stall=%0d evict=%0d desc_full=%0d l2_bypass=%0d demand_req=%0d resp_held=%0d fills=%0d (from buffer %0d)",
             n_hit, n_miss_merge, n_pf_merge, n_coal, n_stall, n_evict, n_desc_full, n_bypass, n_demand_req,
             n_resp_held, n_fills, n_pbuf_fills);
    check(n_hit > 0, "prefetch buffer hit seen");
    check(n_miss_merge > 0, "L1 miss merged with a prefetch seen");
    check(n_pf_merge > 0, "prefetch merged with an L1 miss seen");
    check(n_coal > 0, "prefetch coalescing seen");
    check(n_stall > 0, "prefetch stalled on a full MSHR seen");
    check(n_evict > 0, "prefetch buffer eviction seen");
    check(n_desc_full > 0, "descriptor memory full seen");
    check(n_bypass > 0, "L2 bypass of prefetch requests seen");
    check(n_demand_req > 0, "demand request through the L2 seen");
    check(n_resp_held > 0, "memory response held for a buffer hit on the fill port seen");
    check(n_fast == n_pbuf_fills && n_pbuf_fills == n_hit, "each buffer hit delivered once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
