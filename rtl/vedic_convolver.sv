// vedic_convolver: linear convolution of an N_X-sample input sequence x with
// an N_H-tap filter h, every product formed by a Vedic (Urdhva Triyakbhyam)
// multiplier. This is the filter datapath the multipliers are built for:
//
//   y[n] = sum over k of x[k] * h[n-k],   n = 0 .. N_X+N_H-2
//
// With the default eight samples and eight taps the block takes x0-x7 and
// h0-h7 and returns y0-y14, the inputs and outputs of the source's test.
//
// How it works: an N_X-by-N_H grid of vedic_mul8x8 instances forms every
// product x[i]*h[j] at once. Output y[n] then adds the products on the
// anti-diagonal i+j = n, the same "crosswise" grouping the UT method uses
// inside a multiplier, here applied to whole samples instead of bits and
// with no carry passed between outputs. The sums are kept at full
// precision: each output is wide enough for min(N_X,N_H) full-scale
// products, so no output can overflow. All outputs share that width, so
// the top bits of the edge outputs (y0, y14 and their neighbours, which
// add fewer products) are always zero and synthesis ties them off.
//
// Interface: x and h are packed arrays of unsigned 8-bit words (element 0
// is x0 / h0); y is a packed array of N_X+N_H-1 unsigned words of Y_W bits.
// The block is purely combinational, as in the source, which reports its
// speed as a propagation delay: y is valid one settling time after x and h
// change. Unsigned data, the 8-bit width and full-precision outputs are
// this design's choices; the source gives none of them.
module vedic_convolver
  import vedic_pkg::*;
#(
  parameter int unsigned N_X = 8,   // input samples x0..x(N_X-1)
  parameter int unsigned N_H = 8,   // filter taps   h0..h(N_H-1)
  parameter int unsigned N_Y = N_X + N_H - 1,
  parameter int unsigned Y_W = PRODUCT_W + $clog2((N_X < N_H) ? N_X : N_H)
)(
  input  sample_t [N_X-1:0]          x,
  input  sample_t [N_H-1:0]          h,
  output logic    [N_Y-1:0][Y_W-1:0] y
);
  product_t prod [N_X][N_H];

  for (genvar i = 0; i < N_X; i++) begin : g_row
    for (genvar j = 0; j < N_H; j++) begin : g_col
      vedic_mul8x8 u_mul (.a(x[i]), .b(h[j]), .p(prod[i][j]));
    end
  end

  // Anti-diagonal adder trees: y[n] collects every x[i]*h[j] with i+j = n.
  always_comb begin
    for (int n = 0; n < N_Y; n++) begin
      y[n] = '0;
      for (int i = 0; i < N_X; i++) begin
        if (n - i >= 0 && n - i < N_H)
          y[n] = y[n] + Y_W'(prod[i][n-i]);
      end
    end
  end
endmodule
