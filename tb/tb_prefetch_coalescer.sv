// tb_prefetch_coalescer: self-checking testbench for the prefetch coalescing
// unit.
//
// Feeds address streams (the 2D-convolution rows of 32 four-byte elements,
// 8-byte element rows that cross a line boundary, random addresses) with and
// without back-pressure on the output, and compares the line requests with a
// model: a request for every address whose line differs from the previous
// address's line, the memory of the previous line being cleared after a last
// address. Also counts the merged pulses and checks the one-cycle latency.
`timescale 1ns/1ps
module tb_prefetch_coalescer;
  import spf_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid, in_ready, in_last, out_valid, out_ready, merged;
  addr_t      in_addr;
  line_addr_t out_line;

  int checks = 0, failures = 0;
  line_addr_t exp_q[$];
  int exp_merged = 0, got_merged = 0;
  bit bp = 1'b0;
  bit         m_valid = 1'b0;
  line_addr_t m_line;

  prefetch_coalescer dut (.*);

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

  always @(negedge clk) out_ready <= bp ? ($urandom_range(0, 3) == 0) : 1'b1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (merged) got_merged++;
      if (out_valid && out_ready) begin
        if (exp_q.size() == 0) check(1'b0, "unexpected line request");
        else begin
          check(out_line == exp_q[0], $sformatf("line %h expected %h", out_line, exp_q[0]));
          void'(exp_q.pop_front());
        end
      end
    end
  end

  task automatic send(addr_t a, bit last);
    in_valid = 1'b1;
    in_addr  = a;
    in_last  = last;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    if (m_valid && line_of(a) == m_line) exp_merged++;
    else exp_q.push_back(line_of(a));
    m_valid = !last;
    m_line  = line_of(a);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic stream(addr_t base, int rows, addr_t stride, int cols, int esz);
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++)
        send(base + addr_t'(r) * stride + addr_t'(c * esz), r == rows - 1 && c == cols - 1);
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0; in_addr = '0; in_last = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // latency: one element, request visible the cycle after it is accepted
    in_valid = 1'b1; in_addr = 32'h0000_1234; in_last = 1'b1;
    exp_q.push_back(line_of(32'h0000_1234));
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid && out_line == line_of(32'h0000_1234), "request one cycle after the address");
    @(negedge clk);
    // 2D convolution CTA: 8 rows of 32 floats, 16 KB apart: 8 requests, 248 merged
    exp_merged = 0; got_merged = 0;
    stream(32'h2000_0000 + 4 * (32 + 8 * 4096), 8, 4 * 4096, 32, 4);
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "all convolution lines requested");
    check(got_merged == 248 && exp_merged == 248, $sformatf("merged %0d of 256 addresses", got_merged));
    // 8-byte elements, unaligned row start: each row spans two lines
    stream(32'h0000_0040, 4, 4096, 16, 8);
    // back-pressure and random addresses
    bp = 1'b1;
    stream(32'h1000_0000, 6, 200, 40, 4);
    for (int i = 0; i < 300; i++) send($urandom_range(0, 1023) << 3, $urandom_range(0, 9) == 0);
    send(32'h0, 1'b1);
    bp = 1'b0;
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, "all requests delivered");
    check(got_merged == exp_merged, $sformatf("merged count %0d expected %0d", got_merged, exp_merged));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
