// tb_agu: self-checking testbench for the address generation unit.
//
// Runs a set of descriptors (the 2D-convolution CTA pattern, patterns with a
// span, single-element and empty descriptors, random small ones) through the
// AGU and compares every address and the last flag with a nested-loop model.
// With addr_ready held high it also checks the rate: one address per cycle,
// the first one the cycle after start. Random back-pressure is used for the
// remaining descriptors.
`timescale 1ns/1ps
module tb_agu;
  import spf_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  start_valid, start_ready, addr_valid, addr_ready, addr_last, busy;
  desc_t start_desc;
  addr_t addr;

  int checks = 0, failures = 0;

  agu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
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

  function automatic desc_t mk(addr_t off, cnt_t h, addr_t st, cnt_t v, addr_t sp, cnt_t d, esize_t e);
    desc_t r;
    r.offset = off; r.hsize = h; r.stride = st; r.vsize = v; r.span = sp; r.dsize = d; r.esize = e;
    return r;
  endfunction

  // run one descriptor; bp = apply random back-pressure
  task automatic run(desc_t d, bit bp);
    addr_t exp_q[$];
    int n, cyc, first_cyc, last_cyc;
    for (int k = 0; k < int'(d.dsize); k++)
      for (int j = 0; j < int'(d.vsize); j++)
        for (int i = 0; i < int'(d.hsize); i++)
          exp_q.push_back(d.offset + addr_t'(k) * d.span + addr_t'(j) * d.stride +
                          (addr_t'(i) << d.esize));
    n = exp_q.size();
    @(negedge clk);
    check(start_ready, "AGU idle before start");
    start_valid = 1'b1;
    start_desc  = d;
    @(negedge clk);
    start_valid = 1'b0;
    cyc = 0; first_cyc = -1; last_cyc = -1;
    if (n == 0) begin
      repeat (3) begin
        check(!addr_valid && !busy, "empty descriptor produces no address");
        @(negedge clk);
      end
      return;
    end
    while (exp_q.size() > 0 && cyc < 100000) begin
      addr_ready = bp ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      if (addr_valid && addr_ready) begin
        if (first_cyc < 0) first_cyc = cyc;
        check(addr == exp_q[0], $sformatf("addr %h expected %h", addr, exp_q[0]));
        check(addr_last == (exp_q.size() == 1), "addr_last position");
        if (exp_q.size() == 1) last_cyc = cyc;
        void'(exp_q.pop_front());
      end
      @(negedge clk);
      cyc++;
    end
    addr_ready = 1'b1;
    check(exp_q.size() == 0, "all addresses produced");
    if (!bp) begin
      check(first_cyc == 0, $sformatf("first address on the cycle after start (got %0d)", first_cyc));
      check(last_cyc - first_cyc + 1 == n,
            $sformatf("one address per cycle: %0d addresses in %0d cycles", n, last_cyc - first_cyc + 1));
    end
    #1;
    check(!addr_valid && start_ready, "AGU idle after the descriptor");
  endtask

  initial begin
    rst_n = 1'b0;
    start_valid = 1'b0;
    start_desc = '0;
    addr_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // 2D convolution, CTA {1,1}: 32 floats x 8 rows, row pitch 4096 floats
    run(mk(32'h1000_0000 + 4 * (32 + 8 * 4096), 32, 4 * 4096, 8, 0, 1, 2), 1'b0);
    // three-dimensional pattern with span
    run(mk(32'h0000_4000, 5, 64, 3, 1024, 4, 2), 1'b0);
    // single element, 8-byte elements
    run(mk(32'h0000_0008, 1, 0, 1, 0, 1, 3), 1'b0);
    // empty descriptor
    run(mk(32'h0000_0100, 0, 16, 2, 0, 1, 2), 1'b0);
    // random ones with back-pressure
    for (int t = 0; t < 20; t++) begin
      run(mk($urandom, $urandom_range(1, 9), $urandom_range(0, 4096), $urandom_range(1, 6),
             $urandom_range(0, 65536), $urandom_range(1, 4), 2'($urandom_range(0, 3))), 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
