// vedic_mul4x4: 4-bit by 4-bit unsigned Urdhva Triyakbhyam multiplier.
//
// Each operand is split into two 2-bit digits (aH:aL, bH:bL) and the
// vertical-and-crosswise procedure is run on those digits, with each digit
// product taken from a vedic_mul2x2:
//   1. vertical:  aL*bL. Its low two bits are p[1:0]; the rest is carried.
//   2. crosswise: aH*bL + aL*bH + carry. Its low two bits are p[3:2]; the
//                 rest is carried.
//   3. vertical:  aH*bH + carry gives p[7:4].
// At each step the low digit of the column sum becomes an output digit and
// the remainder is the carry into the next step, as the UT method states.
// Building the 4x4 from four 2x2 blocks is the hierarchical scheme the
// source proposes; its 4x4 figure shows the same method worked bit by bit
// in seven column steps, which gives the same product.
//
// Interface: a, b (4 bits, unsigned) -> p (8 bits). Purely combinational.
module vedic_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q_ll, q_hl, q_lh, q_hh;  // digit products
  logic [4:0] cross_sum;               // step 2 column sum, at most 9+9+2
  logic [3:0] top_sum;                 // step 3 column sum, at most 9+5

  vedic_mul2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q_ll));
  vedic_mul2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q_hl));
  vedic_mul2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q_lh));
  vedic_mul2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q_hh));

  always_comb begin
    cross_sum = 5'(q_hl) + 5'(q_lh) + 5'(q_ll[3:2]);
    top_sum   = q_hh + 4'(cross_sum[4:2]);
    p         = {top_sum, cross_sum[1:0], q_ll[1:0]};
  end
endmodule
