// tb_vedic_4x4_m: exhaustive self-check of the 4x4 Vedic multiplier. All 256 operand
// pairs are applied and the product is compared with the integer product a * b. It
// also counts how often each of the two middle adders carries into the high adder,
// (worked out from the operand halves), and fails if either never does.
module tb_vedic_4x4_m;
  int checks = 0;
  int failures = 0;
  int n_c1 = 0;
  int n_c2 = 0;
  logic [3:0] a, b;
  logic [7:0] p;

  vedic_4x4_m dut (.a(a), .b(b), .p(p));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mid;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1ns;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d * %0d = %0d, got %0d", i, j, i * j, p);
        end
        // Carries of the overlapping middle region, worked out from the halves.
        mid = (i % 4) * (j / 4) + (i / 4) * (j % 4);
        if (mid >= 16) n_c1++;
        if ((mid % 16) + ((i % 4) * (j % 4)) / 4 >= 16) n_c2++;
      end
    end
    $display("carries into the high adder: adder 1 %0d times, adder 2 %0d times", n_c1, n_c2);
    checks++;
    if (n_c1 == 0 || n_c2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
