// tb_vedic_multipliers_top: end-to-end test of the top at its default
// parameters (8-bit and 16-bit multipliers, 2x2 multiplier).
//
// The 2x2 multiplier and the 8-bit pair are swept over every operand pair;
// the 16-bit pair gets corner cases and 30,000 random pairs, half of them
// drawn from the upper half of the range, where Nikhilam is meant to be
// used. Each product from each method is compared with the integer
// product, and the two methods must agree. It also replays the operand
// pairs of the published 16-bit simulation (3*25664, 7*9256, 31*1325) and
// the two worked examples of the methods (8*7 and 1111*1111, here in
// binary).
//
// It also counts how often each case the design distinguishes occurs, and
// counts a failure for any case that never occurs:
//   - both operands above half range (small complements, Nikhilam's
//     intended region);
//   - an operand below half range (cross difference a - (2^N - b) is
//     negative);
//   - the product of the complements overflowing its half, so a surplus is
//     carried into the left half;
//   - a zero operand (complement equals the base, correction word used);
//   - the top product bit set in the 2x2 multiplier (second half adder
//     carries).
module tb_vedic_multipliers_top;
  int checks = 0;
  int failures = 0;

  logic [1:0]  a_2x2, b_2x2;
  logic [3:0]  p_2x2;
  logic [7:0]  a_small, b_small;
  logic [15:0] p_small_urdhva, p_small_nikhilam;
  logic [15:0] a_large, b_large;
  logic [31:0] p_large_urdhva, p_large_nikhilam;

  // Occurrence counters, indexed [0] = 8-bit, [1] = 16-bit.
  int n_upper_half [2];
  int n_lower_half [2];
  int n_surplus    [2];
  int n_zero_op    [2];
  int n_2x2_carry;

  vedic_multipliers_top dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record which cases an N-bit operand pair exercises.
  task automatic classify(input int idx, input int n, input longint x, input longint y);
    longint base, cx, cy;
    base = longint'(1) << n;
    cx = base - x;
    cy = base - y;
    if (2 * x > base && 2 * y > base) n_upper_half[idx]++;
    if (x + y < base) n_lower_half[idx]++;
    if ((cx % base) * (cy % base) >= base) n_surplus[idx]++;
    if (x == 0 || y == 0) n_zero_op[idx]++;
  endtask

  task automatic compare(input longint got, input longint expect_v, input string what);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, expect_v);
    end
  endtask

  task automatic run_large(input logic [15:0] x, input logic [15:0] y);
    a_large = x;
    b_large = y;
    #1;
    compare(longint'(p_large_urdhva), longint'(x) * longint'(y), "16-bit Urdhva");
    compare(longint'(p_large_nikhilam), longint'(x) * longint'(y), "16-bit Nikhilam");
    classify(1, 16, longint'(x), longint'(y));
  endtask

  initial begin
    n_upper_half = '{0, 0};
    n_lower_half = '{0, 0};
    n_surplus    = '{0, 0};
    n_zero_op    = '{0, 0};
    n_2x2_carry  = 0;
    a_small = '0; b_small = '0;
    a_large = '0; b_large = '0;

    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a_2x2 = 2'(i);
        b_2x2 = 2'(j);
        #1;
        compare(longint'(p_2x2), longint'(i * j), "2x2");
        if (p_2x2[3]) n_2x2_carry++;
      end
    end

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a_small = 8'(i);
        b_small = 8'(j);
        #1;
        compare(longint'(p_small_urdhva), longint'(i * j), "8-bit Urdhva");
        compare(longint'(p_small_nikhilam), longint'(i * j), "8-bit Nikhilam");
        compare(longint'(p_small_urdhva), longint'(p_small_nikhilam), "8-bit methods agree");
        classify(0, 8, longint'(i), longint'(j));
      end
    end

    // Published 16-bit simulation vectors and worked examples.
    run_large(16'd3, 16'd25664);
    compare(longint'(p_large_urdhva), 64'd76992, "16-bit vector 3*25664");
    run_large(16'd7, 16'd9256);
    compare(longint'(p_large_nikhilam), 64'd64792, "16-bit vector 7*9256");
    run_large(16'd31, 16'd1325);
    compare(longint'(p_large_nikhilam), 64'd41075, "16-bit vector 31*1325");
    run_large(16'd1111, 16'd1111);
    compare(longint'(p_large_urdhva), 64'd1234321, "1111*1111");
    a_small = 8'd8;
    b_small = 8'd7;
    #1;
    compare(longint'(p_small_nikhilam), 64'd56, "8*7 Nikhilam");
    compare(longint'(p_small_urdhva), 64'd56, "8*7 Urdhva");

    run_large(16'h0000, 16'h0000);
    run_large(16'h0000, 16'h1234);
    run_large(16'hFFFF, 16'h0000);
    run_large(16'hFFFF, 16'hFFFF);
    run_large(16'h8001, 16'h8001);
    run_large(16'h8000, 16'h8000);
    run_large(16'h0001, 16'h0001);
    for (int i = 0; i < 15000; i++) run_large(16'($urandom), 16'($urandom));
    for (int i = 0; i < 15000; i++) run_large(16'h8000 | 16'($urandom), 16'h8000 | 16'($urandom));

    for (int k = 0; k < 2; k++) begin
      $display("%0d-bit: upper half %0d, below half %0d, surplus carried %0d, zero operand %0d",
               k == 0 ? 8 : 16, n_upper_half[k], n_lower_half[k], n_surplus[k], n_zero_op[k]);
      checks++; if (n_upper_half[k] == 0) failures++;
      checks++; if (n_lower_half[k] == 0) failures++;
      checks++; if (n_surplus[k] == 0) failures++;
      checks++; if (n_zero_op[k] == 0) failures++;
    end
    $display("2x2: top bit set %0d", n_2x2_carry);
    checks++; if (n_2x2_carry == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
