// ddfs_pkg: shared widths, number formats and constants of the ROM-less
// quadrature DDFS.
//
// The sine and cosine words are 16-bit two's complement numbers with 14
// fraction bits, so +1.0 is 16384 and the usable range is [-2, 2). The 16-bit
// width follows the published architecture, and so does 1.0 = 16384, the
// cosine value it shows right after reset. The frequency control word is a 16-bit unsigned
// number read as an angle increment theta = fctrl / 2^16 radians; that
// scaling is this design's own choice.
package ddfs_pkg;

  // Width of the sine/cosine registers, adders and multiplier sample input.
  localparam int unsigned SAMPLE_W = 16;
  // Width of the frequency control word.
  localparam int unsigned FCW_W = 16;
  // Fraction bits of theta held in the control word.
  localparam int unsigned FCW_FRAC = 16;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [FCW_W-1:0]    fcw_t;

endpackage
