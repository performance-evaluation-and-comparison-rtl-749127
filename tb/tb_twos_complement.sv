// tb_twos_complement: exhaustive self-checking test of the complement
// block at 8 bits: comp must equal 256 - x for every x, including 256 for
// x = 0.
module tb_twos_complement;
  localparam int N = 8;
  logic [N-1:0] x;
  logic [N:0]   comp;
  int checks = 0;
  int failures = 0;

  twos_complement #(.N(N)) dut (.x(x), .comp(comp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      x = N'(v);
      #1;
      checks++;
      if (int'(comp) != (1 << N) - v) begin
        failures++;
        $display("FAIL x=%0d comp=%0d", v, comp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
