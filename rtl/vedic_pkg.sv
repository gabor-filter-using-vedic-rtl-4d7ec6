// vedic_pkg: types shared by the 8-bit Vedic multiplier and the convolver
// built on it. Samples and filter taps are unsigned 8-bit words; the
// multiplier returns the full 16-bit product. The 8-bit sample width is a
// choice of this design: the source describes 2x2 and 4x4 multipliers and
// a convolution of eight samples with eight taps but gives no word width.
package vedic_pkg;
  localparam int unsigned SAMPLE_W  = 8;
  localparam int unsigned PRODUCT_W = 2 * SAMPLE_W;

  typedef logic [SAMPLE_W-1:0]  sample_t;
  typedef logic [PRODUCT_W-1:0] product_t;
endpackage
