// prefetch_controller: accepts descriptors issued with a CTA, decodes them for
// that CTA, keeps them in the descriptor memory and starts the AGU on each.
//
// When the block distribution engine launches a CTA on the SM it sends the
// kernel's generic descriptors together with the CTA identifier. The
// controller resolves each generic descriptor into the CTA's own descriptor:
//   offset = base + ((ctaid.x*coef_x + ctaid.y*coef_y + ctaid.z*coef_z) << esize)
//   stride = stride << esize,  span = span << esize   (bytes)
//   hsize, vsize, dsize unchanged (element counts)
// It writes the result into the descriptor memory, used as a circular queue,
// so descriptors are solved in the order they were issued (the list-of-
// descriptors form of the encoding). Whenever the AGU is idle and the queue
// holds a descriptor, it reads the oldest one and hands it to the AGU, which
// then runs on its own until the pattern is complete.
// Decoding descriptors with the CTA parameters, storing them in a scratchpad
// and managing the AGU follow the prefetcher's controller; the affine form of
// the CTA dependence, the queue discipline and the three-state launch
// sequence are this design's choices.
//
// Interface and timing: issue_valid/issue_ready handshake; issue_ready is low
// while the descriptor memory is full. Decoding is combinational and the
// decoded descriptor is written on the accepting edge. A queued descriptor
// reaches the AGU three cycles after the AGU becomes idle (read, launch,
// AGU load). The descriptor memory ports are brought out so that the memory
// sits beside the prefetcher as a block of its own.
module prefetch_controller
  import spf_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // descriptor issue from the block distribution engine
  input  logic          issue_valid,
  output logic          issue_ready,
  input  gen_desc_t     issue_desc,
  input  cta_id_t       issue_cta,
  // descriptor memory
  output logic          dm_wr_en,
  output logic [AW-1:0] dm_wr_addr,
  output desc_t         dm_wr_data,
  output logic          dm_rd_en,
  output logic [AW-1:0] dm_rd_addr,
  input  desc_t         dm_rd_data,
  // AGU control
  output logic          agu_start_valid,
  input  logic          agu_start_ready,
  output desc_t         agu_start_desc,
  input  logic          agu_busy,
  // status
  output logic          busy,
  output logic [AW:0]   queued
);

  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_RUN} state_e;
  state_e state_q;

  logic [AW-1:0] wr_ptr_q, rd_ptr_q;
  logic [AW:0]   count_q;

  // CTA decode
  cnt_t  elem_off;
  desc_t decoded;
  always_comb begin
    elem_off = issue_desc.coef_x * cnt_t'(issue_cta.x) +
               issue_desc.coef_y * cnt_t'(issue_cta.y) +
               issue_desc.coef_z * cnt_t'(issue_cta.z);
    decoded.offset = issue_desc.base + (addr_t'(elem_off) << issue_desc.esize);
    decoded.hsize  = issue_desc.hsize;
    decoded.stride = addr_t'(issue_desc.stride) << issue_desc.esize;
    decoded.vsize  = issue_desc.vsize;
    decoded.span   = addr_t'(issue_desc.span) << issue_desc.esize;
    decoded.dsize  = issue_desc.dsize;
    decoded.esize  = issue_desc.esize;
  end

  logic do_write, do_read;
  assign issue_ready = (count_q != (AW+1)'(DEPTH));
  assign do_write    = issue_valid && issue_ready;
  assign do_read     = (state_q == S_IDLE) && (count_q != '0) && !agu_busy;

  assign dm_wr_en   = do_write;
  assign dm_wr_addr = wr_ptr_q;
  assign dm_wr_data = decoded;
  assign dm_rd_en   = do_read;
  assign dm_rd_addr = rd_ptr_q;

  assign agu_start_valid = (state_q == S_LAUNCH);
  assign agu_start_desc  = dm_rd_data;

  assign busy   = (state_q != S_IDLE) || (count_q != '0) || agu_busy;
  assign queued = count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      wr_ptr_q <= '0;
      rd_ptr_q <= '0;
      count_q  <= '0;
    end else begin
      if (do_write) wr_ptr_q <= (wr_ptr_q == AW'(DEPTH-1)) ? '0 : wr_ptr_q + 1'b1;
      if (do_read)  rd_ptr_q <= (rd_ptr_q == AW'(DEPTH-1)) ? '0 : rd_ptr_q + 1'b1;
      count_q <= count_q + (AW+1)'(do_write) - (AW+1)'(do_read);
      unique case (state_q)
        S_IDLE:   if (do_read) state_q <= S_LAUNCH;
        S_LAUNCH: if (agu_start_ready) state_q <= S_RUN;
        S_RUN:    if (!agu_busy) state_q <= S_IDLE;
        default:  state_q <= S_IDLE;
      endcase
    end
  end

endmodule
