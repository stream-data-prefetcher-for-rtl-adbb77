// spf_pkg: types and constants shared by the stream prefetcher blocks.
//
// A data-pattern descriptor is the six-field tuple
//   {offset, hsize, stride, vsize, span, dsize}
// which enumerates the addresses
//   offset + d*span + v*stride + h      (h < hsize, v < vsize, d < dsize)
// with h innermost. The tuple and its field order follow the prefetcher's
// descriptor specification. Field widths (32 bits), the element-size field,
// the CTA identifier widths and the affine CTA dependence of the offset are
// this design's own choices.
//
// Two forms exist:
//  * gen_desc_t, the generic descriptor shipped with the kernel. All sizes are
//    in array elements; the offset is an array base byte address plus a linear
//    combination of the CTA index (ctaid.x*coef_x + ctaid.y*coef_y +
//    ctaid.z*coef_z elements).
//  * desc_t, the descriptor decoded for one CTA, in bytes (offset, stride,
//    span) and element counts (hsize, vsize, dsize). This is what the
//    descriptor memory stores and the AGU walks.
package spf_pkg;

  localparam int unsigned ADDR_W     = 32;   // byte address width
  localparam int unsigned CNT_W      = 32;   // width of the size fields
  localparam int unsigned CTA_W      = 16;   // width of one CTA index dimension
  localparam int unsigned LINE_BYTES = 128;  // L1 / L2 line size
  localparam int unsigned LINE_OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned LINE_W     = ADDR_W - LINE_OFF_W;  // line address width
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8;

  typedef logic [ADDR_W-1:0]    addr_t;
  typedef logic [CNT_W-1:0]     cnt_t;
  typedef logic [LINE_W-1:0]    line_addr_t;
  typedef logic [LINE_BITS-1:0] line_data_t;

  // log2 of the element size in bytes (0: 1 B, 1: 2 B, 2: 4 B, 3: 8 B)
  typedef logic [1:0] esize_t;

  typedef struct packed {
    logic [CTA_W-1:0] x;
    logic [CTA_W-1:0] y;
    logic [CTA_W-1:0] z;
  } cta_id_t;

  // Descriptor decoded for one CTA (stored in the descriptor memory).
  typedef struct packed {
    addr_t  offset;   // byte address of the first element
    cnt_t   hsize;    // elements per contiguous block
    addr_t  stride;   // bytes from one block start to the next
    cnt_t   vsize;    // blocks per pattern
    addr_t  span;     // bytes from one pattern start to the next
    cnt_t   dsize;    // repetitions of the pattern
    esize_t esize;    // log2 element size in bytes
  } desc_t;

  // Generic (CTA-independent) descriptor as issued with the kernel.
  typedef struct packed {
    addr_t  base;     // byte base address of the array
    cnt_t   coef_x;   // elements added per unit of ctaid.x
    cnt_t   coef_y;   // elements added per unit of ctaid.y
    cnt_t   coef_z;   // elements added per unit of ctaid.z
    cnt_t   hsize;    // elements
    cnt_t   stride;   // elements
    cnt_t   vsize;
    cnt_t   span;     // elements
    cnt_t   dsize;
    esize_t esize;
  } gen_desc_t;

  function automatic line_addr_t line_of(addr_t a);
    return line_addr_t'(a >> LINE_OFF_W);
  endfunction

endpackage
