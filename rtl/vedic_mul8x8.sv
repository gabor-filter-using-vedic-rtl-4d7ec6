// vedic_mul8x8: 8-bit by 8-bit unsigned Urdhva Triyakbhyam multiplier, the
// multiplier used by every tap of the convolver.
//
// It is the next level of the hierarchy: the operands are split into 4-bit
// digits and the three UT steps are run on them, each digit product coming
// from a vedic_mul4x4:
//   1. vertical:  aL*bL. Its low nibble is p[3:0]; the rest is carried.
//   2. crosswise: aH*bL + aL*bH + carry. Its low nibble is p[7:4]; the rest
//                 is carried.
//   3. vertical:  aH*bH + carry gives p[15:8].
// The source names the hierarchical scheme and larger sizes built from the
// smaller ones; the 8-bit size is this design's choice of sample width.
//
// Interface: a, b (8 bits, unsigned) -> p (16 bits). Purely combinational.
module vedic_mul8x8
  import vedic_pkg::*;
(
  input  sample_t  a,
  input  sample_t  b,
  output product_t p
);
  logic [7:0] q_ll, q_hl, q_lh, q_hh;  // digit products
  logic [8:0] cross_sum;               // step 2 column sum, at most 225+225+14
  logic [7:0] top_sum;                 // step 3 column sum, at most 225+29

  vedic_mul4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q_ll));
  vedic_mul4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q_hl));
  vedic_mul4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q_lh));
  vedic_mul4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q_hh));

  always_comb begin
    cross_sum = 9'(q_hl) + 9'(q_lh) + 9'(q_ll[7:4]);
    top_sum   = q_hh + 8'(cross_sum[8:4]);
    p         = {top_sum, cross_sum[3:0], q_ll[3:0]};
  end
endmodule
