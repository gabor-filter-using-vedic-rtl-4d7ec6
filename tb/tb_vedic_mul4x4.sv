// tb_vedic_mul4x4: exhaustive self-check of vedic_mul4x4. Every pair of 4-bit operands is
// applied, one pair per clock cycle, and the product is compared one
// settling delay later with the arithmetic product a*b worked out in the
// testbench. The multiplier is combinational, so the product must be
// correct in the same cycle its operands are applied (zero-cycle latency).
// Also counted: operand pairs whose crosswise column produces a carry into
// the upper half, so the test is known to exercise that carry path.
module tb_vedic_mul4x4;
  localparam int unsigned W = 4;

  logic           clk = 1'b0;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0, cross_carries = 0, cycles = 0;

  vedic_mul4x4 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // watchdog
  initial begin
    repeat ((1 << (2*W)) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lo_half;
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        @(negedge clk);
        a = W'(i);
        b = W'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures <= 10)
            $display("MISMATCH a=%0d b=%0d p=%0d expected %0d", i, j, p, i * j);
        end
        // does the crosswise sum spill past the middle digit?
        lo_half = (i % (1 << (W/2))) * (j % (1 << (W/2)));
        if ((((i >> (W/2)) * (j % (1 << (W/2)))) + ((i % (1 << (W/2))) * (j >> (W/2)))
             + (lo_half >> (W/2))) >= (1 << (W/2)))
          cross_carries++;
      end
    end
    checks++;
    if (cross_carries == 0) begin
      failures++;
      $display("crosswise carry never exercised");
    end
    $display("operand pairs=%0d crosswise carries=%0d cycles=%0d", checks - 1, cross_carries, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
