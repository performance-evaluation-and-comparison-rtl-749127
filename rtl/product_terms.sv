// product_terms: the AND array of an N-bit by N-bit multiplier.
//
// Every bit product a[i] & b[j] is formed once. The products are handed on
// as N partial-product words, pp[j] = (a AND b[j]) shifted left by j, each
// 2N bits wide, so that the bit products a[i]&b[j] with i+j = k all sit in
// column k. Summing column k is the "vertical and crosswise" step of
// Urdhva-Tiryagbhyam: column 0 is the vertical product a0b0, the middle
// columns gather the crosswise products. The document names this stage
// and says it is a series of AND gates; arranging the products as shifted
// words for the compressor tree is this design's choice. Bits of a word
// outside columns j..j+N-1 are constant zero by construction; synthesis
// removes them and the compressors they feed simplify accordingly.
//
// Parameter N: operand width (document: 8 and 16 bits; default 8).
// Purely combinational, no clock.
module product_terms #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]             a,
  input  logic [N-1:0]             b,
  output logic [N-1:0][2*N-1:0]    pp
);

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      pp[j] = '0;
      for (int unsigned i = 0; i < N; i++) begin
        pp[j][i+j] = a[i] & b[j];
      end
    end
  end

endmodule
