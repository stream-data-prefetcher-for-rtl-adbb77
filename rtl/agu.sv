// agu: address generation unit of the stream prefetcher.
//
// It walks one decoded descriptor {offset, hsize, stride, vsize, span, dsize}
// and produces its byte addresses in order, one per clock cycle:
//   for d < dsize, for v < vsize, for h < hsize:
//     addr = offset + d*span + v*stride + h*(1 << esize)
// As in the prefetcher's AGU, the datapath holds only adders, split into
// three blocks that each do one step per cycle, plus a register bank with the
// iteration state:
//  * stride control: next block start, row_q + stride, or, at the end of a
//    pattern, next pattern start, plane_q + span (operand selection);
//  * offset control: the current address, addr_q + element size, or the block
//    start from stride control when a block ends;
//  * count control: one incrementer applied to the h, v or d counter, and the
//    status flags (last element of block / pattern / descriptor).
// The operand multiplexers, the counter encoding (up counters compared with
// size-1 captured at start) and the handshake are this design's choices.
//
// Interface: start_valid/start_ready load a descriptor when the AGU is idle.
// The first address is presented on the next cycle. addr_valid/addr_ready is a
// valid/ready handshake; addr_last marks the descriptor's last address. A
// descriptor with hsize, vsize or dsize equal to zero yields no addresses.
// Throughput is one address per cycle while addr_ready is high.
module agu
  import spf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start_valid,
  output logic  start_ready,
  input  desc_t start_desc,
  output logic  addr_valid,
  input  logic  addr_ready,
  output addr_t addr,
  output logic  addr_last,
  output logic  busy
);

  // register bank
  logic  active_q;
  addr_t addr_q, row_q, plane_q;
  addr_t stride_q, span_q, step_q;
  cnt_t  hcnt_q, vcnt_q, dcnt_q;
  cnt_t  hlast_q, vlast_q, dlast_q;

  // status flags
  logic h_last, v_last, d_last;
  assign h_last = (hcnt_q == hlast_q);
  assign v_last = (vcnt_q == vlast_q);
  assign d_last = (dcnt_q == dlast_q);

  // stride control
  addr_t s_a, s_b, s_sum;
  always_comb begin
    if (h_last && v_last) begin
      s_a = plane_q;
      s_b = span_q;
    end else begin
      s_a = row_q;
      s_b = stride_q;
    end
    s_sum = s_a + s_b;
  end

  // offset control
  addr_t o_a, o_b, o_sum;
  always_comb begin
    if (h_last) begin
      o_a = s_sum;
      o_b = '0;
    end else begin
      o_a = addr_q;
      o_b = step_q;
    end
    o_sum = o_a + o_b;
  end

  // count control
  cnt_t c_sel, c_sum;
  always_comb begin
    if (!h_last)      c_sel = hcnt_q;
    else if (!v_last) c_sel = vcnt_q;
    else              c_sel = dcnt_q;
    c_sum = c_sel + 1'b1;
  end

  logic last_addr;
  assign last_addr = h_last && v_last && d_last;

  assign addr        = addr_q;
  assign addr_valid  = active_q;
  assign addr_last   = last_addr;
  assign start_ready = !active_q;
  assign busy        = active_q;

  logic empty_desc;
  assign empty_desc = (start_desc.hsize == '0) || (start_desc.vsize == '0) ||
                      (start_desc.dsize == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      addr_q   <= '0;
      row_q    <= '0;
      plane_q  <= '0;
      stride_q <= '0;
      span_q   <= '0;
      step_q   <= '0;
      hcnt_q   <= '0;
      vcnt_q   <= '0;
      dcnt_q   <= '0;
      hlast_q  <= '0;
      vlast_q  <= '0;
      dlast_q  <= '0;
    end else if (!active_q) begin
      if (start_valid && !empty_desc) begin
        active_q <= 1'b1;
        addr_q   <= start_desc.offset;
        row_q    <= start_desc.offset;
        plane_q  <= start_desc.offset;
        stride_q <= start_desc.stride;
        span_q   <= start_desc.span;
        step_q   <= addr_t'(1) << start_desc.esize;
        hcnt_q   <= '0;
        vcnt_q   <= '0;
        dcnt_q   <= '0;
        hlast_q  <= start_desc.hsize - 1'b1;
        vlast_q  <= start_desc.vsize - 1'b1;
        dlast_q  <= start_desc.dsize - 1'b1;
      end
    end else if (addr_ready) begin
      addr_q <= o_sum;
      if (last_addr) begin
        active_q <= 1'b0;
      end else if (!h_last) begin
        hcnt_q <= c_sum;
      end else if (!v_last) begin
        hcnt_q <= '0;
        vcnt_q <= c_sum;
        row_q  <= s_sum;
      end else begin
        hcnt_q  <= '0;
        vcnt_q  <= '0;
        dcnt_q  <= c_sum;
        row_q   <= s_sum;
        plane_q <= s_sum;
      end
    end
  end

endmodule
