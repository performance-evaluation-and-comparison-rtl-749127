// final_adder: ordinary two-operand adder, the last stage of both Vedic
// multipliers.
//
// It adds the two words the compressor tree leaves: y = a + b, with the
// carry out of the top bit on cout. The document calls for "an ordinary
// adder" and does not say which; it is written here as a plain addition
// and left to synthesis to map (on an FPGA, the carry chain).
//
// Parameter WIDTH: operand width. Purely combinational, no clock.
module final_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output logic             cout
);

  always_comb begin
    {cout, y} = {1'b0, a} + {1'b0, b};
  end

endmodule
