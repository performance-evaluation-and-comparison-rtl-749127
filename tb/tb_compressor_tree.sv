// tb_compressor_tree: self-checking test of the 4:2 compressor tree.
// Four instances cover the word counts the multipliers use and two that
// need zero padding: 8 words of 16 bits (8-bit multiplier, two levels), 16
// words of 32 bits (16-bit multiplier, three levels), 4 words of 8 bits
// (one level) and 5 words of 12 bits (a padded group). For random and
// all-ones inputs sum_word + carry_word must equal the sum of the input
// words modulo 2^WIDTH.
module tb_compressor_tree;
  int checks = 0;
  int failures = 0;

  logic [7:0][15:0]  w8;
  logic [15:0]       s8, c8;
  logic [15:0][31:0] w16;
  logic [31:0]       s16, c16;
  logic [3:0][7:0]   w4;
  logic [7:0]        s4, c4;
  logic [4:0][11:0]  w5;
  logic [11:0]       s5, c5;

  compressor_tree dut8 (.words(w8), .sum_word(s8), .carry_word(c8));
  compressor_tree #(.WORDS(16), .WIDTH(32)) dut16 (.words(w16), .sum_word(s16), .carry_word(c16));
  compressor_tree #(.WORDS(4), .WIDTH(8)) dut4 (.words(w4), .sum_word(s4), .carry_word(c4));
  compressor_tree #(.WORDS(5), .WIDTH(12)) dut5 (.words(w5), .sum_word(s5), .carry_word(c5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, input longint expect_v, input int width,
                       input string what);
    longint mask;
    mask = (longint'(1) << width) - 1;
    checks++;
    if ((got & mask) != (expect_v & mask)) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got & mask, expect_v & mask);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint e8, e16, e4, e5;
      e8 = 0; e16 = 0; e4 = 0; e5 = 0;
      for (int i = 0; i < 8; i++) begin
        w8[i] = (t == 0) ? '1 : 16'($urandom);
        e8 += longint'(w8[i]);
      end
      for (int i = 0; i < 16; i++) begin
        w16[i] = (t == 0) ? '1 : $urandom;
        e16 += longint'(w16[i]);
      end
      for (int i = 0; i < 4; i++) begin
        w4[i] = (t == 0) ? '1 : 8'($urandom);
        e4 += longint'(w4[i]);
      end
      for (int i = 0; i < 5; i++) begin
        w5[i] = (t == 0) ? '1 : 12'($urandom);
        e5 += longint'(w5[i]);
      end
      #1;
      check(longint'(s8) + longint'(c8), e8, 16, "8 words");
      check(longint'(s16) + longint'(c16), e16, 32, "16 words");
      check(longint'(s4) + longint'(c4), e4, 8, "4 words");
      check(longint'(s5) + longint'(c5), e5, 12, "5 words");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
