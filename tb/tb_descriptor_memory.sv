// tb_descriptor_memory: self-checking testbench for the descriptor scratchpad.
//
// Fills all 32 slots of the 1 KB memory with random descriptors, reads them
// back in a different order and checks the one-cycle read latency, that the
// output holds between reads, and that a read of a slot written in the same
// cycle returns the previous contents.
`timescale 1ns/1ps
module tb_descriptor_memory;
  import spf_pkg::*;

  localparam int unsigned DEPTH = 32;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  desc_t         wr_data, rd_data;
  desc_t         model [DEPTH];

  int checks = 0, failures = 0;

  descriptor_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100_000;
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

  function automatic desc_t rnd();
    desc_t r;
    r.offset = $urandom; r.hsize = $urandom; r.stride = $urandom;
    r.vsize = $urandom; r.span = $urandom; r.dsize = $urandom;
    r.esize = 2'($urandom);
    return r;
  endfunction

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      wr_en = 1; wr_addr = AW'(i); wr_data = rnd(); model[i] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      int a;
      a = (i * 7 + 3) % DEPTH;
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 0;
      check(rd_data == model[a], $sformatf("slot %0d read back", a));
      @(negedge clk);
      check(rd_data == model[a], $sformatf("slot %0d output held", a));
    end
    // same-cycle write and read of one slot: old data, then new
    for (int i = 0; i < 8; i++) begin
      int a;
      desc_t old;
      a = $urandom_range(0, DEPTH - 1);
      old = model[a];
      wr_en = 1; wr_addr = AW'(a); wr_data = rnd(); model[a] = wr_data;
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      wr_en = 0;
      check(rd_data == old, "read during write returns old contents");
      @(negedge clk);
      rd_en = 0;
      check(rd_data == model[a], "next read returns new contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
