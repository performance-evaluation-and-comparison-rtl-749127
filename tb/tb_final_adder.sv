// tb_final_adder: self-checking test of the ordinary adder.
// Random and corner operand pairs; the (WIDTH+1)-bit result {cout, y}
// must equal the integer sum.
module tb_final_adder;
  localparam int WIDTH = 16;
  logic [WIDTH-1:0] a, b, y;
  logic             cout;
  int checks = 0;
  int failures = 0;

  final_adder #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .y(y), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb_);
    a = ta;
    b = tb_;
    #1;
    checks++;
    if (longint'({cout, y}) != longint'(ta) + longint'(tb_)) begin
      failures++;
      $display("FAIL %h + %h gave %b %h", ta, tb_, cout, y);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, 1);
    apply('1, '1);
    for (int i = 0; i < 5000; i++) apply(WIDTH'($urandom), WIDTH'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
