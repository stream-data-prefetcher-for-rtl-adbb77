// tb_workloads: runs the access streams of four benchmark kernels through the
// whole L1 prefetch subsystem at its default sizes (1 KB descriptor memory,
// 32 KB prefetch buffer, 32 MSHR entries), with one CTA descriptor list per
// kernel as a compiler or programmer would write it for the CUDA code.
//
// The L1 side is modelled as warps that each walk a list of loads, blocking
// on each until its line is in the L1, and an L1 that keeps every line it
// receives (compulsory misses only). Warps take turns round robin. Global memory
// answers out of order after 150-250 cycles, with data computed from the line
// address. The subsystem is reset between kernels.
//
//  3dconv  3D convolution, 256^3 floats, CTAs of 32 x 8 threads: each CTA
//          reads 8 rows of 32 floats in three neighbouring planes, encoded as
//          one descriptor with dsize = 3 and span = one plane. Warps start
//          after the prefetch has completed: every miss must hit in the
//          prefetch buffer and memory must see no demand request.
//  gemm    512 x 512 matrix product, CTAs of 32 x 8 threads: one descriptor
//          for the CTA's 8 rows of A (8 x 16 lines), one for its 32-column
//          strip of B (512 lines, more than the buffer holds). Warps start at
//          once, so misses race the prefetch (hits, merges, demand misses).
//  atax    matrix-vector kernels on a 4096 x 4096 matrix (atax, bicg, mvt and
//          gesummv share this stream): a CTA of 256 threads walks all 4096
//          rows of a 256-column strip, 32768 lines in one descriptor. Its 8
//          warps consume lines more slowly than memory delivers them, and
//          nothing paces the prefetch to them: the stream runs more than a
//          buffer ahead and its lines are evicted unread. This limitation of
//          the design is what the test shows.
//  bfs     irregular graph traversal: the descriptor covers the CTA's 16 KB
//          slice of the edge array (128 lines), the warps read a random half
//          of it in random order after the prefetch: all hits, and the unread
//          half stays in the buffer.
// For every kernel: each miss gets exactly one fill with the right data, a
// line is never outstanding twice at memory, the prefetcher requests each
// descriptor line at most once, a miss goes to memory exactly when it neither
// hits in the buffer nor merges with a request in flight, and every
// prefetched line is read, merged, evicted or still buffered at the end. The line printed per
// kernel gives its buffer hit, merge, request and eviction counts.
`timescale 1ns/1ps
module tb_workloads;
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
    #20_000_000;
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
    for (int w = 0; w < LINE_BITS / 32; w++) d[w*32 +: 32] = {l[19:0], 12'(w * 5 + 1)};
    return d;
  endfunction

  // ---------------- global memory model ----------------
  typedef struct {int tag; line_addr_t line; longint due;} mreq_t;
  mreq_t mq[$];
  bit    at_mem [line_addr_t];
  int    n_bypass = 0, n_demand_req = 0;
  int    r_idx;

  always @(negedge clk) begin
    mem_req_ready  <= ($urandom_range(0, 4) != 0);
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
        at_mem.delete(mq[r_idx].line);
        mq.delete(r_idx);
      end
      if (mem_req_valid && mem_req_ready) begin
        check(!at_mem.exists(mem_req_line), $sformatf("line %h requested twice at memory", mem_req_line));
        at_mem[mem_req_line] = 1'b1;
        if (mem_req_bypass_l2) n_bypass++;
        else n_demand_req++;
        mq.push_back('{tag: int'(mem_req_tag), line: mem_req_line,
                       due: cycle + longint'($urandom_range(150, 250))});
      end
    end
  end

  // ---------------- L1 side model ----------------
  longint waiting [line_addr_t];   // misses accepted, not yet filled
  bit     have [line_addr_t];      // lines the L1 holds
  int n_misses = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (l1_fill_valid) begin
        if (!waiting.exists(l1_fill_line)) check(1'b0, $sformatf("fill of line %h nobody waits for", l1_fill_line));
        else begin
          check(l1_fill_data == mem_data(l1_fill_line), $sformatf("fill data of line %h", l1_fill_line));
          if (l1_fill_from_pbuf)
            check(cycle - waiting[l1_fill_line] == 1, "prefetch buffer hit delivered one cycle after the miss");
          waiting.delete(l1_fill_line);
          have[l1_fill_line] = 1'b1;
        end
      end
      if (l1_miss_valid && l1_miss_ready) begin
        waiting[l1_miss_line] = cycle;
        n_misses++;
      end
    end
  end

  int n_hit = 0, n_merge = 0, n_evict = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      n_hit   += int'(ev_pbuf_hit);
      n_merge += int'(ev_miss_merged);
      n_evict += int'(ev_pbuf_evict);
    end
  end

  // ---------------- warps ----------------
  // Each warp walks its own list of lines. A load blocks the warp until its
  // line is in the L1; a line the L1 already holds costs no miss, and a line
  // another warp is already waiting for is waited on without a second miss.
  // One miss per cycle is sent, warps taking turns round robin.
  localparam int unsigned MAX_WARPS = 32;
  line_addr_t wq [MAX_WARPS][$];
  bit         touched [line_addr_t];   // lines the descriptors or the warps touch
  bit         seen [line_addr_t];      // lines the warps touch
  int         n_pattern;               // line requests the descriptors generate

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
        for (int i = 0; i < int'(g.hsize); i += 32) begin
          touched[line_of(off + ((addr_t'(k) * g.span + addr_t'(j) * g.stride + addr_t'(i)) << g.esize))] = 1'b1;
          n_pattern++;
        end
    @(negedge clk);
    issue_valid = 1'b0;
  endtask

  // warp w loads the float at element index elem of the array at base
  function automatic void touch(int w, addr_t base, int elem);
    line_addr_t l;
    l = line_of(base + addr_t'(elem * 4));
    if (wq[w].size() == 0 || wq[w][$] != l) wq[w].push_back(l);
    seen[l] = 1'b1;
    touched[l] = 1'b1;
  endfunction

  task automatic run_warps(int nwarps, int max_gap);
    int     idx [MAX_WARPS];
    longint ready_at [MAX_WARPS];
    int     rr = 0, done;
    for (int w = 0; w < nwarps; w++) begin
      idx[w] = 0;
      ready_at[w] = cycle;
    end
    forever begin
      int pick;
      done = 0;
      pick = -1;
      // retire loads whose line the L1 now holds
      for (int w = 0; w < nwarps; w++) begin
        while (idx[w] < wq[w].size() && ready_at[w] <= cycle && have.exists(wq[w][idx[w]])) begin
          idx[w]++;
          ready_at[w] = cycle + longint'($urandom_range(0, max_gap));
        end
        if (idx[w] == wq[w].size()) done++;
      end
      if (done == nwarps) break;
      for (int k = 0; k < nwarps; k++) begin
        int w;
        w = (rr + k) % nwarps;
        if (idx[w] < wq[w].size() && ready_at[w] <= cycle && !waiting.exists(wq[w][idx[w]])) begin
          pick = w;
          break;
        end
      end
      if (pick >= 0) begin
        l1_miss_valid = 1'b1;
        l1_miss_line  = wq[pick][idx[pick]];
        #1;
        if (l1_miss_ready) rr = (pick + 1) % nwarps;
      end
      @(negedge clk);
      l1_miss_valid = 1'b0;
    end
  endtask

  task automatic drain();
    wait (!prefetch_busy);
    wait (mq.size() == 0 && waiting.size() == 0);
    @(negedge clk);
    wait (mq.size() == 0 && !mem_req_valid);
    repeat (5) @(negedge clk);
  endtask

  task automatic wait_prefetched();
    wait (!prefetch_busy);
    wait (mq.size() == 0 && !mem_req_valid);
    repeat (5) @(negedge clk);
  endtask

  task automatic start(string name);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    touched.delete(); seen.delete(); have.delete(); n_pattern = 0;
    foreach (wq[w]) wq[w] = {};
    n_hit = 0; n_merge = 0; n_evict = 0; n_bypass = 0; n_demand_req = 0; n_misses = 0;
  endtask

  task automatic finish_kernel(string name, longint t0);
    check(waiting.size() == 0, {name, ": every miss answered"});
    check(n_misses == seen.size(), $sformatf("%s: one miss per line the warps touch (%0d for %0d)",
                                             name, n_misses, seen.size()));
    check(n_bypass <= n_pattern, $sformatf("%s: at most one prefetch request per descriptor line (%0d for %0d)",
                                           name, n_bypass, n_pattern));
    check(n_demand_req == n_misses - n_hit - n_merge,
          $sformatf("%s: a demand request exactly for each miss neither buffered nor in flight", name));
    // each prefetched line was read from the buffer, handed to a miss that
    // merged with it in flight, evicted, or is still buffered
    check(n_bypass == n_hit + n_merge + n_evict + int'(pbuf_occupancy),
          $sformatf("%s: every prefetched line accounted for", name));
    $display("WORKLOAD %s lines=%0d misses=%0d pbuf_hits=%0d merged_in_flight=%0d demand_req=%0d prefetch_req=%0d evicted=%0d cycles=%0d",
             name, touched.size(), n_misses, n_hit, n_merge, n_demand_req, n_bypass, n_evict, cycle - t0);
  endtask

  localparam addr_t A_BASE = 32'h1000_0000;
  localparam addr_t B_BASE = 32'h3000_0000;

  initial begin
    longint t0;
    rst_n = 1'b0;
    issue_valid = 1'b0; issue_desc = '0; issue_cta = '0;
    l1_miss_valid = 1'b0; l1_miss_line = '0;
    mem_resp_tag = '0; mem_resp_data = '0;
    repeat (3) @(negedge clk);

    // ---- 3D convolution, 256^3: four CTAs of output plane 10 ----
    start("3dconv");
    t0 = cycle;
    for (int bx = 0; bx < 2; bx++)
      for (int by = 0; by < 2; by++) begin
        // planes 9 .. 11; the CTA's z index carries the first plane
        issue('{base: A_BASE, coef_x: 32, coef_y: 8 * 256, coef_z: 256 * 256, hsize: 32,
                stride: 256, vsize: 8, span: 256 * 256, dsize: 3, esize: 2},
              '{x: 16'(bx), y: 16'(by), z: 16'd9});
        for (int w = 0; w < 8; w++)
          for (int pl = 9; pl < 12; pl++)
            touch(16 * bx + 8 * by + w, A_BASE, pl * 65536 + (8 * by + w) * 256 + 32 * bx);
      end
    wait_prefetched();
    check(pbuf_occupancy == 96, $sformatf("3dconv: 96 lines prefetched (%0d)", pbuf_occupancy));
    run_warps(32, 3);
    drain();
    check(n_hit == 96 && n_demand_req == 0, "3dconv: every miss hit in the prefetch buffer");
    finish_kernel("3dconv", t0);

    // ---- gemm, 512 x 512, CTA (bx=3, by=5), warps start at once ----
    start("gemm");
    t0 = cycle;
    issue('{base: A_BASE, coef_x: 0, coef_y: 8 * 512, coef_z: 0, hsize: 512,
            stride: 512, vsize: 8, span: 0, dsize: 1, esize: 2}, '{x: 3, y: 5, z: 0});
    issue('{base: B_BASE, coef_x: 32, coef_y: 0, coef_z: 0, hsize: 32,
            stride: 512, vsize: 512, span: 0, dsize: 1, esize: 2}, '{x: 3, y: 5, z: 0});
    for (int w = 0; w < 8; w++)
      for (int k = 0; k < 512; k++) begin
        touch(w, A_BASE, (8 * 5 + w) * 512 + k);
        touch(w, B_BASE, k * 512 + 32 * 3);
      end
    run_warps(8, 4);
    drain();
    check(n_hit + n_merge > n_misses / 2, "gemm: the prefetch served most misses");
    finish_kernel("gemm", t0);

    // ---- atax / bicg / mvt / gesummv, 4096 x 4096, CTA bx=2 ----
    start("atax");
    t0 = cycle;
    issue('{base: A_BASE, coef_x: 256, coef_y: 0, coef_z: 0, hsize: 256,
            stride: 4096, vsize: 4096, span: 0, dsize: 1, esize: 2}, '{x: 2, y: 0, z: 0});
    for (int w = 0; w < 8; w++)
      for (int j = 0; j < 4096; j++)
        touch(w, A_BASE, j * 4096 + 256 * 2 + 32 * w);
    run_warps(8, 4);
    drain();
    // the stream is 128 times the buffer and nothing throttles the prefetch to
    // the warps' pace: it runs more than a buffer ahead, and round-robin
    // replacement drops the lines before they are read
    check(n_evict > n_bypass - 512, "atax: the prefetch outruns the buffer");
    finish_kernel("atax", t0);

    // ---- bfs: the descriptor covers more than the warps read ----
    start("bfs");
    t0 = cycle;
    issue('{base: B_BASE, coef_x: 4096, coef_y: 0, coef_z: 0, hsize: 4096,
            stride: 0, vsize: 1, span: 0, dsize: 1, esize: 2}, '{x: 7, y: 0, z: 0});
    begin
      int ord[$];
      for (int i = 0; i < 128; i++) ord.push_back(i);
      ord.shuffle();
      for (int i = 0; i < 64; i++) touch(i % 4, B_BASE, 7 * 4096 + ord[i] * 32);
    end
    wait_prefetched();
    run_warps(4, 3);
    drain();
    check(n_hit == 64 && n_demand_req == 0, "bfs: every miss inside the region hit");
    check(pbuf_occupancy == 64, $sformatf("bfs: the unread half stays buffered (%0d)", pbuf_occupancy));
    finish_kernel("bfs", t0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
