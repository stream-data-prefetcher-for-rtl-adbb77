// tb_stream_prefetcher: self-checking testbench for the controller + AGU pair
// with its descriptor memory.
//
// Issues the 2D-convolution descriptor for several CTAs plus random
// descriptors, and compares the complete address stream (and the per-
// descriptor last flags) with a model that decodes each descriptor for its
// CTA and walks it. It checks that each descriptor's addresses come out one
// per cycle when nothing stalls, and applies random back-pressure in a second
// phase.
`timescale 1ns/1ps
module tb_stream_prefetcher;
  import spf_pkg::*;

  localparam int unsigned DEPTH = 32;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          issue_valid, issue_ready;
  gen_desc_t     issue_desc;
  cta_id_t       issue_cta;
  logic          dm_wr_en, dm_rd_en;
  logic [AW-1:0] dm_wr_addr, dm_rd_addr;
  desc_t         dm_wr_data, dm_rd_data;
  logic          addr_valid, addr_ready, addr_last, busy;
  addr_t         addr;
  logic [AW:0]   queued;

  int checks = 0, failures = 0;
  addr_t exp_q[$];
  bit    last_q[$];
  bit    bp = 1'b0;
  int    run_len = 0, desc_len_q[$];

  stream_prefetcher dut (.*);
  descriptor_memory #(.MEM_BYTES(DEPTH * 32)) u_mem (
    .clk, .wr_en(dm_wr_en), .wr_addr(dm_wr_addr), .wr_data(dm_wr_data),
    .rd_en(dm_rd_en), .rd_addr(dm_rd_addr), .rd_data(dm_rd_data)
  );

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
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

  // model: decode for the CTA, then walk
  task automatic expect_desc(gen_desc_t g, cta_id_t c);
    addr_t off;
    int n;
    off = g.base + ((g.coef_x * c.x + g.coef_y * c.y + g.coef_z * c.z) << g.esize);
    n = 0;
    for (int k = 0; k < int'(g.dsize); k++)
      for (int j = 0; j < int'(g.vsize); j++)
        for (int i = 0; i < int'(g.hsize); i++) begin
          exp_q.push_back(off + ((addr_t'(k) * g.span + addr_t'(j) * g.stride + addr_t'(i)) << g.esize));
          n++;
          last_q.push_back(k == int'(g.dsize) - 1 && j == int'(g.vsize) - 1 && i == int'(g.hsize) - 1);
        end
    if (n > 0) desc_len_q.push_back(n);
  endtask

  // consumer
  always @(negedge clk) addr_ready <= bp ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) begin
    if (rst_n && addr_valid && addr_ready) begin
      if (exp_q.size() == 0) begin
        check(1'b0, "unexpected address");
      end else begin
        check(addr == exp_q[0] && addr_last == last_q[0],
              $sformatf("address %h (last %0d), expected %h (last %0d)", addr, addr_last, exp_q[0], last_q[0]));
        void'(exp_q.pop_front());
        void'(last_q.pop_front());
      end
      run_len++;
      if (addr_last) begin
        if (!bp && desc_len_q.size() > 0)
          check(run_len == desc_len_q[0], $sformatf("descriptor streamed in %0d cycles, %0d addresses", run_len, desc_len_q[0]));
        if (desc_len_q.size() > 0) void'(desc_len_q.pop_front());
        run_len = 0;
      end
    end else if (rst_n && run_len != 0) begin
      run_len++;
    end
  end

  task automatic issue(gen_desc_t g, cta_id_t c);
    issue_valid = 1'b1;
    issue_desc  = g;
    issue_cta   = c;
    #1;
    while (!issue_ready) begin
      @(negedge clk);
      #1;
    end
    expect_desc(g, c);
    @(negedge clk);
    issue_valid = 1'b0;
  endtask

  initial begin
    gen_desc_t conv, g;
    cta_id_t   c;
    rst_n = 1'b0;
    issue_valid = 1'b0;
    issue_desc = '0;
    issue_cta = '0;
    addr_ready = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    conv = '{base: 32'h2000_0000, coef_x: 32, coef_y: 8 * 4096, coef_z: 0, hsize: 32,
             stride: 4096, vsize: 8, span: 0, dsize: 1, esize: 2};
    for (int y = 0; y < 2; y++)
      for (int x = 0; x < 3; x++) begin
        c = '{x: 16'(x), y: 16'(y), z: 16'd1};
        issue(conv, c);
      end
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    check(!busy, "idle after the convolution CTAs");
    bp = 1'b1;
    for (int t = 0; t < 20; t++) begin
      g = '{base: $urandom, coef_x: $urandom_range(0, 64), coef_y: $urandom_range(0, 9999),
            coef_z: $urandom_range(0, 3), hsize: $urandom_range(0, 12), stride: $urandom_range(0, 5000),
            vsize: $urandom_range(1, 5), span: $urandom_range(0, 99999), dsize: $urandom_range(1, 3),
            esize: 2'($urandom)};
      c = '{x: 16'($urandom_range(0, 99)), y: 16'($urandom_range(0, 99)), z: 16'($urandom_range(0, 3))};
      issue(g, c);
    end
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    check(!busy && !addr_valid, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
