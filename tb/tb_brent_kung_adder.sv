// tb_brent_kung_adder: exhaustive self-check of the Brent-Kung adder at widths 8
// (the default) and 4, and a random check at width 16 to exercise a deeper tree.
// Every operand pair and both carry-in values are applied; the result is compared
// with the integer sum a + b + cin. Combinational: each vector settles for 1 ns.
module tb_brent_kung_adder;
  int checks = 0;
  int failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;

  brent_kung_adder                dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  brent_kung_adder #(.WIDTH(4))   dut4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));
  brent_kung_adder #(.WIDTH(16))  dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  // Watchdog: the whole run needs about 135 us of simulated time.
  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp;
    a16 = '0; b16 = '0; ci16 = 1'b0;
    a4 = '0; b4 = '0; ci4 = 1'b0;
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          a8 = 8'(i); b8 = 8'(j); ci8 = c[0];
          #1ns;
          exp = i + j + c;
          checks++;
          if ({co8, s8} !== 9'(exp)) begin
            failures++;
            if (failures < 10)
              $display("FAIL w8: %0d + %0d + %0d = %0d, got %0d", i, j, c, exp, {co8, s8});
          end
        end
      end
    end
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 16; i++) begin
        for (int j = 0; j < 16; j++) begin
          a4 = 4'(i); b4 = 4'(j); ci4 = c[0];
          #1ns;
          exp = i + j + c;
          checks++;
          if ({co4, s4} !== 5'(exp)) begin
            failures++;
            if (failures < 10)
              $display("FAIL w4: %0d + %0d + %0d = %0d, got %0d", i, j, c, exp, {co4, s4});
          end
        end
      end
    end
    for (int k = 0; k < 5000; k++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      if (k == 0) begin a16 = 16'hFFFF; b16 = 16'h0000; ci16 = 1'b1; end
      #1ns;
      exp = int'(a16) + int'(b16) + int'(ci16);
      checks++;
      if ({co16, s16} !== 17'(exp)) begin
        failures++;
        if (failures < 10)
          $display("FAIL w16: %0d + %0d + %0d = %0d, got %0d", a16, b16, ci16, exp, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
