// tb_product_terms: self-checking test of the AND array.
// For random and corner operands each partial-product word pp[j] must be
// a shifted left by j when b[j] is 1 and zero otherwise, and the words
// must add up to the full product a*b.
module tb_product_terms;
  localparam int N = 8;
  logic [N-1:0]          a, b;
  logic [N-1:0][2*N-1:0] pp;
  int checks = 0;
  int failures = 0;

  product_terms #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    longint total;
    a = ta;
    b = tb_;
    #1;
    total = 0;
    for (int j = 0; j < N; j++) begin
      longint expect_w;
      expect_w = b[j] ? (longint'(a) << j) : 0;
      checks++;
      if (longint'(pp[j]) != expect_w) begin
        failures++;
        $display("FAIL pp[%0d] a=%h b=%h got %h", j, a, b, pp[j]);
      end
      total += longint'(pp[j]);
    end
    checks++;
    if (total != longint'(a) * longint'(b)) begin
      failures++;
      $display("FAIL sum of words a=%h b=%h", a, b);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    for (int i = 0; i < 2000; i++) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
