// tb_urdhva_multiplier: self-checking test of the Urdhva-Tiryagbhyam
// multiplier. The 8-bit instance (default parameters) is run over all
// 65,536 operand pairs; a 16-bit instance is run over corner cases and
// 20,000 random pairs. Every product is compared with the integer product.
module tb_urdhva_multiplier;
  int checks = 0;
  int failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;

  urdhva_multiplier dut8 (.a(a8), .b(b8), .p(p8));
  urdhva_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run16(input logic [15:0] x, input logic [15:0] y);
    a16 = x;
    b16 = y;
    #1;
    checks++;
    if (longint'(p16) != longint'(x) * longint'(y)) begin
      failures++;
      $display("FAIL 16-bit %0d*%0d gave %0d", x, y, p16);
    end
  endtask

  initial begin
    a16 = '0;
    b16 = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if (int'(p8) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit %0d*%0d gave %0d", i, j, p8);
        end
      end
    end
    run16(16'hFFFF, 16'hFFFF);
    run16(16'hFFFF, 16'h0001);
    run16(16'h0000, 16'hFFFF);
    run16(16'h8000, 16'h8000);
    for (int i = 0; i < 20000; i++) run16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
