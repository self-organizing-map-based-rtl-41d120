// vq_pkg: constants and types shared by the self-organizing-map vector
// quantizer.
//
// The defaults describe the main configuration: 16-bit data words
// (sixteen-bit subtractor), 16-dimensional vectors handled by a 16-lane
// adder tree, and a codebook of 256 code vectors (a 512x512 8-bit image cut
// into 4x4 blocks gives 16-dimensional vectors and a 256x16 codebook).
// Number of partial vectors per input vector (1) and the learning-rate
// format (DW fractional bits) are this design's own choices.
package vq_pkg;

  localparam int unsigned VQ_DW     = 16;   // data word width (x and w)
  localparam int unsigned VQ_D      = 16;   // lanes = dimensions per partial vector
  localparam int unsigned VQ_N      = 256;  // code vectors (neurons)
  localparam int unsigned VQ_NPART  = 1;    // partial vectors per input vector

  // Operating modes of the quantizer.
  typedef enum logic [1:0] {
    MODE_ENCODE = 2'd0,  // find the winner, report its index
    MODE_LEARN  = 2'd1,  // find the winner, then move it towards x
    MODE_DECODE = 2'd2   // read the code vector for a given index
  } vq_mode_e;

  // Width of a full squared Euclidean distance for the given sizes.
  function automatic int unsigned sed_width(int unsigned dw, int unsigned d,
                                            int unsigned npart);
    return 2 * dw + $clog2(d) + $clog2(npart + 1) + 1;
  endfunction

endpackage
