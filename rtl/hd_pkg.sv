// hd_pkg: types, constants and small pure functions shared by the human
// detection pipeline.
//
// Pixels are 8-bit grey levels throughout; the negative transform
// (255 - pixel) fixes that width. The frame size the pipeline is built for
// is 256 x 256 after pre-processing; the LL band of the Haar transform is
// half of that in each direction (128 x 128). Both sizes are parameters of
// the modules, these constants are only their defaults.
package hd_pkg;

  localparam int PIX_W   = 8;

  typedef logic [PIX_W-1:0] pix_t;

  // Colour pixel as delivered by the frame source.
  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

  // Median of three values. The row medians and the median of the row
  // medians of the modified median filter are both built from this.
  function automatic pix_t med3(pix_t x, pix_t y, pix_t z);
    pix_t lo, hi;
    lo = (x < y) ? x : y;
    hi = (x < y) ? y : x;
    if (z <= lo)      return lo;
    else if (z >= hi) return hi;
    else              return z;
  endfunction

endpackage
