// dbf_pkg: types and constants shared by the clock-gated de-blocking filter.
//
// Pixels are 8-bit luma samples. Memory and stream words are 32 bits and hold
// four pixels. A "line" word holds the four pixels on one side of a block
// edge, ordered by distance from the edge: bits [7:0] are the pixel next to
// the edge (p0 or q0), bits [31:24] the farthest one (p3 or q3). A block word
// holds four horizontally adjacent pixels of one row of the 8x8 block, bits
// [7:0] being the leftmost.
//
// The input stream of the filter actor carries, per 8x8 block, one header
// word, 8 left-neighbour line words (one per row), 8 top-neighbour line words
// (one per column) and 16 block words in raster order. The output stream
// returns the 8 + 8 + 16 filtered words in the same order, without header.
// This stream format is a choice of this design; the filtered neighbour words
// are meant to be written back to frame memory by the consumer.
package dbf_pkg;

  localparam int unsigned PIX_W   = 8;
  localparam int unsigned WORD_W  = 32;
  localparam int unsigned BLK     = 8;            // block is BLK x BLK pixels
  localparam int unsigned NB_WORDS  = BLK;        // line words per neighbour
  localparam int unsigned BLK_WORDS = BLK * BLK / 4;

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef pix_t [3:0]        line4_t;   // [0] is nearest the edge

  // Header word of a block: quantisation parameter and boundary strength.
  typedef struct packed {
    logic [21:0] rsvd;
    logic [1:0]  bs;      // 0: edge not filtered, 1 or 2: filtered
    logic [1:0]  rsvd2;
    logic [5:0]  qp;      // 0..51
  } hdr_t;

  // Filter thresholds derived from QP.
  typedef struct packed {
    logic       en;       // boundary strength above zero
    logic [6:0] beta;     // 0..64
    logic [4:0] tc;       // 0..24
  } thr_t;

endpackage
