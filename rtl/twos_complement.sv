// twos_complement: complement of an N-bit operand with respect to the
// Nikhilam base 2^N.
//
// Nikhilam multiplication works with each operand's distance from the
// base. With the base 2^N (the smallest power of two above every N-bit
// number) that distance is 2^N - x, the two's complement of x, which the
// document's block diagram shows as a "2's complement" block per operand.
// The result needs N+1 bits: for x = 0 it is 2^N itself. comp[N-1:0] is
// the usual N-bit two's complement (~x + 1) and comp[N] is set only for
// x = 0. Carrying that top bit is this design's choice, so that the
// multiplier is exact for every operand, not only near the base.
//
// Parameter N: operand width. Purely combinational, no clock.
module twos_complement #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  output logic [N:0]   comp
);

  always_comb begin
    comp = {1'b0, ~x} + {{N{1'b0}}, 1'b1};
  end

endmodule
