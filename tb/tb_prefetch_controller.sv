// tb_prefetch_controller: self-checking testbench for the prefetcher
// controller, connected to the descriptor memory and to a stand-in for the
// AGU that stays busy for a random number of cycles per descriptor.
//
// Checks: the CTA decode of each generic descriptor (the 2D-convolution
// descriptor of CTA {1,1,1} among them), that descriptors reach the AGU in
// issue order and only while it is idle, that issue_ready drops when the 32
// slots are full and that busy falls once everything is solved.
`timescale 1ns/1ps
module tb_prefetch_controller;
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
  logic          agu_start_valid, agu_start_ready, agu_busy;
  desc_t         agu_start_desc;
  logic          busy;
  logic [AW:0]   queued;

  int checks = 0, failures = 0;
  int agu_left = 0;
  bit hold_agu = 1'b0;
  desc_t exp_q[$];
  int started = 0;

  prefetch_controller dut (.*);
  descriptor_memory #(.MEM_BYTES(DEPTH * 32)) u_mem (
    .clk, .wr_en(dm_wr_en), .wr_addr(dm_wr_addr), .wr_data(dm_wr_data),
    .rd_en(dm_rd_en), .rd_addr(dm_rd_addr), .rd_data(dm_rd_data)
  );

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
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

  // AGU stand-in
  assign agu_busy        = (agu_left != 0);
  assign agu_start_ready = !agu_busy && !hold_agu;
  always @(posedge clk) begin
    if (!rst_n) begin
      agu_left <= 0;
    end else if (agu_start_valid && agu_start_ready) begin
      started++;
      if (exp_q.size() == 0) begin
        check(1'b0, "unexpected descriptor at the AGU");
      end else begin
        check(agu_start_desc == exp_q[0], $sformatf("descriptor %0d decoded and in order", started));
        void'(exp_q.pop_front());
      end
      agu_left <= $urandom_range(1, 6);
    end else if (agu_left != 0) begin
      agu_left <= agu_left - 1;
    end
  end

  function automatic desc_t decode(gen_desc_t g, cta_id_t c);
    desc_t d;
    longint e;
    e = longint'(g.coef_x) * c.x + longint'(g.coef_y) * c.y + longint'(g.coef_z) * c.z;
    d.offset = g.base + addr_t'(e * (longint'(1) << g.esize));
    d.hsize  = g.hsize;
    d.stride = addr_t'(longint'(g.stride) * (longint'(1) << g.esize));
    d.vsize  = g.vsize;
    d.span   = addr_t'(longint'(g.span) * (longint'(1) << g.esize));
    d.dsize  = g.dsize;
    d.esize  = g.esize;
    return d;
  endfunction

  task automatic issue(gen_desc_t g, cta_id_t c);
    issue_valid = 1'b1;
    issue_desc  = g;
    issue_cta   = c;
    #1;
    while (!issue_ready) begin
      @(negedge clk);
      #1;
    end
    exp_q.push_back(decode(g, c));
    @(negedge clk);
    issue_valid = 1'b0;
  endtask

  function automatic gen_desc_t rnd_gen();
    gen_desc_t g;
    g.base = $urandom; g.coef_x = $urandom_range(0, 4096); g.coef_y = $urandom;
    g.coef_z = $urandom_range(0, 3); g.hsize = $urandom; g.stride = $urandom;
    g.vsize = $urandom; g.span = $urandom; g.dsize = $urandom; g.esize = 2'($urandom);
    return g;
  endfunction

  initial begin
    gen_desc_t conv;
    cta_id_t   c;
    rst_n = 1'b0;
    issue_valid = 1'b0;
    issue_desc = '0;
    issue_cta = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && issue_ready, "idle after reset");

    // 2D convolution: (address_A + blockIdx.x*32 + blockIdx.y*8*4096, 32, 4096, 8, 0, 1)
    conv = '{base: 32'h2000_0000, coef_x: 32, coef_y: 8 * 4096, coef_z: 0, hsize: 32,
             stride: 4096, vsize: 8, span: 0, dsize: 1, esize: 2};
    c = '{x: 1, y: 1, z: 1};
    check(decode(conv, c).offset == 32'h2000_0000 + 4 * (32 + 8 * 4096), "reference decode");
    issue(conv, c);
    wait (exp_q.size() == 0);
    check(started == 1, "CTA {1,1,1} descriptor reached the AGU");

    // fill the memory while the AGU is held: one descriptor waits at the AGU
    // input, 32 more fill the memory, then issue_ready is low
    hold_agu = 1'b1;
    @(negedge clk);
    for (int i = 0; i < DEPTH + 1; i++) begin
      c = '{x: 16'($urandom), y: 16'($urandom), z: 16'($urandom_range(0, 3))};
      issue(rnd_gen(), c);
    end
    #1;
    check(queued == (AW+1)'(DEPTH), "32 descriptors queued");
    check(!issue_ready, "issue_ready low when the descriptor memory is full");
    hold_agu = 1'b0;
    // keep issuing while it drains
    for (int i = 0; i < 40; i++) begin
      c = '{x: 16'($urandom), y: 16'($urandom), z: 16'($urandom_range(0, 3))};
      issue(rnd_gen(), c);
    end
    wait (exp_q.size() == 0);
    repeat (10) @(negedge clk);
    check(started == 1 + DEPTH + 1 + 40, $sformatf("all descriptors started (%0d)", started));
    check(!busy, "idle when all descriptors are solved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
