// tb_vedic_2x2_m: exhaustive self-check of the 2x2 Vedic multiplier. All 16 operand
// pairs are applied and the product is compared with the integer product a * b.
module tb_vedic_2x2_m;
  int checks = 0;
  int failures = 0;
  logic [1:0] a, b;
  logic [3:0] p;

  vedic_2x2_m dut (.a(a), .b(b), .p(p));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1ns;
        checks++;
        if (p !== 4'(i * j)) begin
          failures++;
          $display("FAIL: %0d * %0d = %0d, got %0d", i, j, i * j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
