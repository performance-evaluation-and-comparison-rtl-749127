// tb_compressor_4_2: exhaustive self-checking test of the 4:2 compressor.
// All 32 combinations of x1..x4 and cin are applied. For each, the test
// checks the arithmetic identity x1+x2+x3+x4+cin = sum + 2*(cout+carry),
// the parity sum, and the cout and carry select equations of the cell.
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin;
  logic sum, cout, carry;
  int checks = 0;
  int failures = 0;

  compressor_4_2 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b%b%b%b cin=%b -> sum=%b cout=%b carry=%b",
               what, x1, x2, x3, x4, cin, sum, cout, carry);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      check(int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin)
            == int'(sum) + 2 * (int'(cout) + int'(carry)), "total");
      check(sum == (x1 ^ x2 ^ x3 ^ x4 ^ cin), "sum parity");
      check(cout == ((x1 != x2) ? x3 : x1), "cout equation");
      check(carry == (((x1 + x2 + x3 + x4) % 2 == 1) ? cin : x4), "carry equation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
