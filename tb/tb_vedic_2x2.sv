// tb_vedic_2x2: exhaustive self-checking test of the 2x2 Vedic multiplier.
// All 16 operand pairs are applied and the 4-bit result is compared with
// the integer product.
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] s;
  int checks = 0;
  int failures = 0;

  vedic_2x2 dut (.a(a), .b(b), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (int'(s) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d gave %0d", i, j, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
