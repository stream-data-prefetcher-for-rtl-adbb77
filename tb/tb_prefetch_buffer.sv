// tb_prefetch_buffer: self-checking testbench for the 32 KB prefetch buffer.
//
// Checks, against a reference model of the buffer's contents: fills and
// lookups with one-cycle read latency and the right data; release of a line
// when it hits (a second lookup misses); lookups of absent lines; a refill of
// a line already present taking the same entry; filling all 256 entries and
// then replacing in round-robin order with an eviction pulse each time; and the
// occupancy count.
`timescale 1ns/1ps
module tb_prefetch_buffer;
  import spf_pkg::*;

  localparam int unsigned LINES = 256;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       lk_valid, lk_hit, rd_valid, fill_valid, evicted;
  line_addr_t lk_line, rd_line, fill_line;
  line_data_t rd_data, fill_data;
  logic [8:0] occupancy;

  int checks = 0, failures = 0;
  line_data_t model [line_addr_t];
  int evictions = 0;

  prefetch_buffer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && evicted) evictions++;

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

  function automatic line_data_t pattern(line_addr_t l, int salt);
    line_data_t d;
    for (int w = 0; w < LINE_BITS / 32; w++) d[w*32 +: 32] = {l[15:0], 16'(w + salt)};
    return d;
  endfunction

  task automatic fill(line_addr_t l, line_data_t d);
    fill_valid = 1'b1; fill_line = l; fill_data = d;
    @(negedge clk);
    fill_valid = 1'b0;
    model[l] = d;
  endtask

  // lookup: expect hit (and data) if present in the model
  task automatic lookup(line_addr_t l);
    bit present;
    present = model.exists(l);
    lk_valid = 1'b1; lk_line = l;
    #1;
    check(lk_hit == present, $sformatf("line %h hit=%0d expected %0d", l, lk_hit, present));
    @(negedge clk);
    lk_valid = 1'b0;
    check(rd_valid == present, "read-out valid one cycle after a hit");
    if (present) begin
      check(rd_line == l && rd_data == model[l], $sformatf("line %h data", l));
      model.delete(l);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    lk_valid = 1'b0; lk_line = '0; fill_valid = 1'b0; fill_line = '0; fill_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(occupancy == 0, "empty after reset");
    // small scenario
    for (int i = 0; i < 10; i++) fill(line_addr_t'(32'h100 + i * 128), pattern(line_addr_t'(32'h100 + i * 128), 0));
    check(occupancy == 10, "occupancy 10");
    lookup(line_addr_t'(32'h100 + 3 * 128));
    lookup(line_addr_t'(32'h100 + 3 * 128));   // released: now a miss
    lookup(line_addr_t'(32'h7777));            // never filled
    fill(line_addr_t'(32'h100), pattern(line_addr_t'(32'h100), 5));  // refill same line
    check(occupancy == 9, "refill of a present line takes its entry");
    for (int i = 0; i < 10; i++) lookup(line_addr_t'(32'h100 + i * 128));
    check(occupancy == 0, "empty after all hits");
    // fill to capacity, then replace round robin
    for (int i = 0; i < LINES; i++) fill(line_addr_t'(32'h4000 + i), pattern(line_addr_t'(32'h4000 + i), 1));
    check(occupancy == LINES, "full");
    check(evictions == 0, "no eviction while filling free entries");
    for (int i = 0; i < 5; i++) begin
      fill(line_addr_t'(32'h9000 + i), pattern(line_addr_t'(32'h9000 + i), 2));
      model.delete(line_addr_t'(32'h4000 + i));  // round-robin victim i holds line 0x4000+i
    end
    check(evictions == 5, $sformatf("5 evictions (%0d)", evictions));
    check(occupancy == LINES, "still full");
    for (int i = 0; i < 8; i++) lookup(line_addr_t'(32'h4000 + i));
    for (int i = 0; i < 5; i++) lookup(line_addr_t'(32'h9000 + i));
    // random mix
    for (int t = 0; t < 2000; t++) begin
      line_addr_t l;
      l = line_addr_t'($urandom_range(0, 300));
      if ($urandom_range(0, 1) == 0 && occupancy < LINES) fill(l, pattern(l, t));
      else lookup(l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
