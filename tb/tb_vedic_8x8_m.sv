// tb_vedic_8x8_m: end-to-end, exhaustive self-check of the 8x8 Vedic multiplier at
// its only configuration. All 65536 operand pairs are applied and the 16-bit
// product is compared with the integer product a * b.
//
// It also counts, over the run, each way the partial products combine: adder 1
// (middle products) carrying into the high adder, adder 2 (low product's upper
// nibble) carrying into it, and a product that uses all 16 bits. The carries are
// worked out from the operand nibbles, not read from the multiplier. Each must happen
// at least once. A few named operand pairs (zero, one, the maximum, and a pair
// where only adder 2 carries) are checked first on their own.
module tb_vedic_8x8_m;
  int checks = 0;
  int failures = 0;
  int n_c1 = 0;
  int n_c2 = 0;
  int n_top = 0;
  logic [7:0]  a, b;
  logic [15:0] p;

  vedic_8x8_m dut (.a(a), .b(b), .p(p));

  // Watchdog: the run needs about 66 us of simulated time.
  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int i, input int j);
    int mid;
    a = 8'(i); b = 8'(j);
    #1ns;
    checks++;
    if (p !== 16'(i * j)) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d * %0d = %0d, got %0d", i, j, i * j, p);
    end
    // Carries of the overlapping middle region, worked out from the nibbles.
    mid = (i % 16) * (j / 16) + (i / 16) * (j % 16);
    if (mid >= 256) n_c1++;
    if ((mid % 256) + ((i % 16) * (j % 16)) / 16 >= 256) n_c2++;
    if (p[15]) n_top++;
  endtask

  initial begin
    apply(0, 0);
    apply(1, 255);
    apply(255, 255);
    apply('h8F, 'h9F);   // 22737: adder 2 carries, adder 1 does not
    apply('hA5, 'h5A);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        apply(i, j);
    $display("adder-1 carries %0d, adder-2 carries %0d, full-width products %0d",
             n_c1, n_c2, n_top);
    checks++;
    if (n_c1 == 0) begin failures++; $display("FAIL: adder 1 never carried"); end
    checks++;
    if (n_c2 == 0) begin failures++; $display("FAIL: adder 2 never carried"); end
    checks++;
    if (n_top == 0) begin failures++; $display("FAIL: no full-width product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
