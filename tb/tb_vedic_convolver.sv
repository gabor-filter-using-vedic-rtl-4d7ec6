// tb_vedic_convolver: end-to-end self-check of the convolver at its default
// size, eight input samples x0-x7 by eight taps h0-h7 giving y0-y14.
//
// One test vector is applied per clock cycle. One settling delay later all
// fifteen outputs are compared with a convolution worked out in the
// testbench with the ordinary '*' operator, so the reference shares nothing
// with the Vedic multipliers. The block is combinational, so every vector
// must be right in the cycle it is applied (zero-cycle latency).
//
// Vectors: impulses (x = unit sample at each position, which must return h
// shifted), all-maximum inputs (the largest sums, wider than a 16-bit
// product), a few fixed patterns, then random data. Counted and required to
// happen at least once: impulse responses, outputs that need more than 16
// bits, and products whose Vedic crosswise step carries into the top digit.
module tb_vedic_convolver;
  import vedic_pkg::*;

  localparam int unsigned N_X = 8;
  localparam int unsigned N_H = 8;
  localparam int unsigned N_Y = N_X + N_H - 1;
  localparam int unsigned Y_W = PRODUCT_W + $clog2(N_X);
  localparam int unsigned N_RANDOM = 2000;

  logic clk = 1'b0;
  sample_t [N_X-1:0]          x;
  sample_t [N_H-1:0]          h;
  logic    [N_Y-1:0][Y_W-1:0] y;

  int checks = 0, failures = 0, cycles = 0;
  int impulses = 0, wide_outputs = 0, cross_carries = 0, vectors = 0;

  vedic_convolver dut (.x(x), .h(h), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (N_RANDOM + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one vector and compare all outputs in the same cycle.
  task automatic apply(input sample_t [N_X-1:0] xv, input sample_t [N_H-1:0] hv);
    longint expected;
    @(negedge clk);
    x = xv;
    h = hv;
    #1;
    vectors++;
    for (int i = 0; i < N_X; i++)
      for (int j = 0; j < N_H; j++)
        if ((int'(xv[i][7:4]) * int'(hv[j][3:0]) + int'(xv[i][3:0]) * int'(hv[j][7:4])
             + ((int'(xv[i][3:0]) * int'(hv[j][3:0])) >> 4)) >= 256)
          cross_carries++;
    for (int n = 0; n < N_Y; n++) begin
      expected = 0;
      for (int k = 0; k < N_X; k++)
        if (n - k >= 0 && n - k < N_H)
          expected += longint'(xv[k]) * longint'(hv[n-k]);
      checks++;
      if (longint'(y[n]) != expected) begin
        failures++;
        if (failures <= 10)
          $display("MISMATCH vector %0d y%0d=%0d expected %0d", vectors, n, y[n], expected);
      end
      if (expected > 65535) wide_outputs++;
    end
  endtask

  initial begin
    sample_t [N_X-1:0] xv;
    sample_t [N_H-1:0] hv;

    // impulse at each position: y must be h delayed by that position
    for (int p = 0; p < N_X; p++) begin
      xv = '0;
      xv[p] = 8'd1;
      for (int j = 0; j < N_H; j++) hv[j] = sample_t'(8'h11 * (j + 1));
      apply(xv, hv);
      for (int j = 0; j < N_H; j++) begin
        checks++;
        if (y[p + j] != Y_W'(hv[j])) failures++;
      end
      impulses++;
    end
    // largest sums
    apply('1, '1);
    // fixed patterns
    for (int i = 0; i < N_X; i++) xv[i] = sample_t'(i + 1);
    for (int j = 0; j < N_H; j++) hv[j] = sample_t'(N_H - j);
    apply(xv, hv);
    apply({N_X{8'hA5}}, {N_H{8'h5A}});
    apply('0, '1);
    // random data
    for (int r = 0; r < N_RANDOM; r++) begin
      for (int i = 0; i < N_X; i++) xv[i] = sample_t'($urandom);
      for (int j = 0; j < N_H; j++) hv[j] = sample_t'($urandom);
      apply(xv, hv);
    end

    checks++;
    if (impulses == 0)      begin failures++; $display("no impulse response tested"); end
    checks++;
    if (wide_outputs == 0)  begin failures++; $display("no output beyond 16 bits"); end
    checks++;
    if (cross_carries == 0) begin failures++; $display("no crosswise carry exercised"); end
    $display("vectors=%0d impulses=%0d wide_outputs=%0d cross_carries=%0d cycles=%0d",
             vectors, impulses, wide_outputs, cross_carries, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
