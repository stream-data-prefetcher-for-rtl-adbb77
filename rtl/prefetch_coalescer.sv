// prefetch_coalescer: turns the AGU's per-element addresses into line
// requests for the memory system.
//
// Consecutive addresses that fall in the same 128-byte line are merged into a
// single request, as the L1's own coalescing unit does for a warp. A request
// is sent as soon as the first address of a new line arrives, so the fetch of
// a line starts as early as possible; following addresses of that line are
// absorbed without a request. The remembered line is forgotten after the last
// address of a descriptor. Comparing only with the previous line (instead of a
// window of addresses) and the early-issue policy are this design's choices.
//
// Interface and timing: in_valid/in_ready accept one address per cycle;
// out_valid/out_ready carry line addresses through a one-entry output
// register (one cycle latency). An address of the remembered line is accepted
// even while the output is stalled. merged pulses for each absorbed address.
module prefetch_coalescer
  import spf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  addr_t      in_addr,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output line_addr_t out_line,
  output logic       merged
);

  logic       last_valid_q;
  line_addr_t last_line_q;
  logic       out_valid_q;
  line_addr_t out_line_q;

  line_addr_t in_line;
  logic       same, out_free, accept, push;

  assign in_line  = line_of(in_addr);
  assign same     = last_valid_q && (in_line == last_line_q);
  assign out_free = !out_valid_q || out_ready;
  assign in_ready = same || out_free;
  assign accept   = in_valid && in_ready;
  assign push     = accept && !same;
  assign merged   = accept && same;

  assign out_valid = out_valid_q;
  assign out_line  = out_line_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_valid_q <= 1'b0;
      last_line_q  <= '0;
      out_valid_q  <= 1'b0;
      out_line_q   <= '0;
    end else begin
      if (accept) begin
        last_valid_q <= !in_last;
        last_line_q  <= in_line;
      end
      if (push) begin
        out_valid_q <= 1'b1;
        out_line_q  <= in_line;
      end else if (out_ready) begin
        out_valid_q <= 1'b0;
      end
    end
  end

endmodule
