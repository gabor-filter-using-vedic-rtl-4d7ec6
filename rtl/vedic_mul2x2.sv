// vedic_mul2x2: 2-bit by 2-bit unsigned multiplier using the Urdhva
// Triyakbhyam ("vertically and crosswise") method.
//
// The product is formed in three steps, one per output column:
//   1. vertical:  a0*b0 is the least significant product bit.
//   2. crosswise: a1*b0 + a0*b1 in a half adder; its sum is p[1], its carry
//                 moves on to the next step.
//   3. vertical:  a1*b1 plus that carry in a second half adder gives p[2]
//                 (sum) and p[3] (carry).
// Each single-bit product is an AND gate. This is the method of the source's
// 2x2 example applied to binary digits; the half-adder form is this
// design's own rendering of it.
//
// Interface: a, b (2 bits, unsigned) -> p (4 bits). Purely combinational,
// no clock and no latency.
module vedic_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic cross0, cross1, vert_hi, carry1;

  always_comb begin
    // step 1: vertical on the right-hand column
    p[0]    = a[0] & b[0];
    // step 2: crosswise
    cross0  = a[1] & b[0];
    cross1  = a[0] & b[1];
    p[1]    = cross0 ^ cross1;
    carry1  = cross0 & cross1;
    // step 3: vertical on the left-hand column, plus the carry
    vert_hi = a[1] & b[1];
    p[2]    = vert_hi ^ carry1;
    p[3]    = vert_hi & carry1;
  end
endmodule
