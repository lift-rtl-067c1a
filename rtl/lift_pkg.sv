// Shared types and constants of the Lift GCN accelerator.
//
// Lift runs the sparse-dense matrix multiplication (SpMM) of a graph
// convolutional layer push-style: the sparse matrix is streamed in compressed
// sparse column (CSC) order, every column's input vector is fetched once and
// broadcast to multiply-accumulate (MAC) arrays, and each non-zero a(i,j)
// adds a(i,j) * x_j into the partial output vector of row i.
//
// Sizes that follow the hardware configuration of the design: hidden size 128
// (length of every input/output vector), 500 MHz single clock.  The element
// format (16-bit signed fixed point, 8 fraction bits), the number of MAC
// lanes per array (4, as drawn for the base-die unit) and the 64-bit
// non-zero record are this implementation's own choices.
package lift_pkg;

  // Feature element: signed fixed point Q8.8.
  localparam int unsigned DW        = 16;
  localparam int unsigned FRAC_BITS = 8;
  // Elements one MAC array handles per cycle (one MAC each).
  localparam int unsigned LANES     = 4;
  localparam int unsigned WORD_W    = DW * LANES;   // one chunk of a vector
  // Length of an input/output vector (GCN hidden size).
  localparam int unsigned VEC_LEN   = 128;
  localparam int unsigned NCHUNK    = VEC_LEN / LANES;
  localparam int unsigned CHUNK_W   = $clog2(NCHUNK);
  // Vertex / row / column index width.
  localparam int unsigned VID_W     = 22;

  typedef logic signed [DW-1:0] elem_t;
  typedef logic [WORD_W-1:0]    word_t;
  typedef logic [VID_W-1:0]     vid_t;

  // One non-zero of the CSC sparse matrix, 64 bits.  `last` marks the final
  // non-zero of its column; `row` is the unit-local output row (the index of
  // the output vector inside the LPU or APU it is mapped to); `col` selects
  // the input vector.
  typedef struct packed {
    logic       last;
    logic [2:0] rsvd;
    vid_t       col;
    vid_t       row;
    elem_t      val;
  } nz_t;

endpackage
