// tb_mshr: self-checking testbench for the miss status holding registers.
//
// Drives L1 misses and prefetch requests over a small set of lines against a
// memory model that answers out of order after a random delay, and checks
// against a model of the outstanding lines:
//  * a line is sent to memory once, however many requests it receives;
//  * the merge pulses match the model (L1 miss onto prefetch and the reverse);
//  * bypass_l2 is set exactly for prefetch-only entries;
//  * a returned line goes to the L1 if an L1 miss is waiting on it and to the
//    prefetch buffer otherwise, with the returned data;
//  * with 32 lines outstanding, new lines are refused (full) until a response
//    frees an entry; no request is taken in a response cycle.
`timescale 1ns/1ps
module tb_mshr;
  import spf_pkg::*;

  localparam int unsigned ENTRIES = 32;
  localparam int unsigned TW      = $clog2(ENTRIES);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          dem_valid, dem_ready, pf_valid, pf_ready;
  line_addr_t    dem_line, pf_line;
  logic          mem_req_valid, mem_req_ready, mem_req_bypass_l2;
  line_addr_t    mem_req_line;
  logic [TW-1:0] mem_req_tag, mem_resp_tag;
  logic          mem_resp_valid, mem_resp_ready, fill_ready;
  line_data_t    mem_resp_data;
  logic          pbuf_fill_valid, l1_fill_valid;
  line_addr_t    fill_line;
  line_data_t    fill_data;
  logic          dem_merged, pf_merged, full;

  int checks = 0, failures = 0;

  mshr dut (.*);

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

  function automatic line_data_t mem_data(line_addr_t l);
    line_data_t d;
    for (int w = 0; w < LINE_BITS / 32; w++) d[w*32 +: 32] = {l[23:0], 8'(w)} ^ 32'h5a5a_0000;
    return d;
  endfunction

  // outstanding-line model
  typedef struct {bit pf; bit dem; bit issued; int tag;} ml_t;
  ml_t model [line_addr_t];
  int n_dem_merge = 0, n_pf_merge = 0, n_to_l1 = 0, n_to_pbuf = 0, n_full = 0, n_bypass = 0;

  // memory model: in-flight list
  typedef struct {int tag; line_addr_t line; int delay;} mf_t;
  mf_t inflight[$];
  bit mem_slow = 1'b0;
  int resp_idx;

  always @(negedge clk) begin
    mem_req_ready <= ($urandom_range(0, 3) != 0);
    fill_ready    <= ($urandom_range(0, 7) != 0);
    mem_resp_valid <= 1'b0;
    if (!mem_slow) begin
      for (int i = 0; i < inflight.size(); i++)
        if (inflight[i].delay > 0) inflight[i].delay--;
      for (int i = 0; i < inflight.size(); i++)
        if (inflight[i].delay == 0 && $urandom_range(0, 1) == 0) begin
          resp_idx <= i;
          mem_resp_valid <= 1'b1;
          mem_resp_tag <= TW'(inflight[i].tag);
          mem_resp_data <= mem_data(inflight[i].line);
          break;
        end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (full) n_full++;
      // response
      if (mem_resp_valid && mem_resp_ready) begin
        mf_t f;
        f = inflight[resp_idx];
        inflight.delete(resp_idx);
        check(fill_line == f.line && fill_data == mem_data(f.line), "returned line and data");
        check(!dem_ready && !pf_ready, "no request taken in a response cycle");
        if (model.exists(f.line)) begin
          check(l1_fill_valid == model[f.line].dem, "L1 fill when a miss waits");
          check(pbuf_fill_valid == (model[f.line].pf && !model[f.line].dem), "prefetch buffer fill when only prefetched");
          if (l1_fill_valid) n_to_l1++;
          if (pbuf_fill_valid) n_to_pbuf++;
          model.delete(f.line);
        end else check(1'b0, "response for a line not outstanding");
      end else begin
        check(!l1_fill_valid && !pbuf_fill_valid, "no fill without a response");
      end
      // memory request
      if (mem_req_valid && mem_req_ready) begin
        if (!model.exists(mem_req_line)) check(1'b0, "request for an unknown line");
        else begin
          check(!model[mem_req_line].issued, "line sent to memory once");
          check(mem_req_bypass_l2 == (model[mem_req_line].pf && !model[mem_req_line].dem), "bypass_l2 for prefetch-only lines");
          if (mem_req_bypass_l2) n_bypass++;
          model[mem_req_line].issued = 1'b1;
          inflight.push_back('{tag: int'(mem_req_tag), line: mem_req_line, delay: $urandom_range(2, 30)});
        end
      end
      // new requests (after the response handling above: never in the same cycle)
      if (dem_valid && dem_ready) begin
        check(dem_merged == model.exists(dem_line), "L1 miss merge pulse");
        if (dem_merged) n_dem_merge += model[dem_line].pf ? 1 : 0;
        if (model.exists(dem_line)) model[dem_line].dem = 1'b1;
        else model[dem_line] = '{pf: 1'b0, dem: 1'b1, issued: 1'b0, tag: 0};
      end else if (pf_valid && pf_ready) begin
        check(pf_merged == model.exists(pf_line), "prefetch merge pulse");
        if (pf_merged) n_pf_merge++;
        if (!model.exists(pf_line)) model[pf_line] = '{pf: 1'b1, dem: 1'b0, issued: 1'b0, tag: 0};
      end
      if (dem_valid && !dem_ready && !mem_resp_valid)
        check(full && !model.exists(dem_line), "L1 miss refused only when full");
    end
  end

  // requesters: hold each request until accepted
  initial begin
    rst_n = 1'b0;
    dem_valid = 1'b0; pf_valid = 1'b0; dem_line = '0; pf_line = '0;
    mem_resp_tag = '0; mem_resp_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      begin
        for (int i = 0; i < 1500; i++) begin
          @(negedge clk);
          if (!pf_valid || pf_ready) begin
            pf_valid = ($urandom_range(0, 1) == 0);
            pf_line  = line_addr_t'($urandom_range(0, 63));
          end
        end
        @(negedge clk);
        while (pf_valid && !pf_ready) @(negedge clk);
        pf_valid = 1'b0;
      end
      begin
        for (int i = 0; i < 1500; i++) begin
          @(negedge clk);
          if (!dem_valid || dem_ready) begin
            dem_valid = ($urandom_range(0, 2) == 0);
            dem_line  = line_addr_t'($urandom_range(0, 63));
          end
        end
        @(negedge clk);
        while (dem_valid && !dem_ready) @(negedge clk);
        dem_valid = 1'b0;
      end
    join
    // fill all entries while memory holds its answers
    repeat (400) @(negedge clk);
    check(model.size() == 0, "all random-phase lines answered");
    mem_slow = 1'b1;
    @(negedge clk);
    for (int i = 0; i < ENTRIES + 4; i++) begin
      pf_valid = 1'b1;
      pf_line = line_addr_t'(32'h1000 + i);
      @(negedge clk);
      if (i >= ENTRIES) check(!pf_ready && full, "new lines refused when all 32 entries are busy");
      while (!pf_ready && i < ENTRIES) @(negedge clk);
    end
    pf_valid = 1'b0;
    mem_slow = 1'b0;
    repeat (400) @(negedge clk);
    check(model.size() == 0, $sformatf("all lines answered (%0d left)", model.size()));
    check(n_dem_merge > 0 && n_pf_merge > 0 && n_to_l1 > 0 && n_to_pbuf > 0 && n_full > 0 && n_bypass > 0,
          $sformatf("all mechanisms seen: miss-merge %0d pf-merge %0d l1 %0d pbuf %0d full %0d bypass %0d",
                    n_dem_merge, n_pf_merge, n_to_l1, n_to_pbuf, n_full, n_bypass));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
