// urdhva_multiplier: N-bit by N-bit unsigned multiplier after the
// Urdhva-Tiryagbhyam ("vertically and crosswise") method.
//
// The method forms all bit products at once and sums them column by
// column, column k holding the products a[i]&b[j] with i+j = k. In
// hardware this is three stages, as the document draws them:
//   1. product_terms: an AND array producing N shifted partial-product
//      words (2N bits each);
//   2. compressor_tree: rows of 4:2 compressors that bring the N words down
//      to two (8 words in two compressor levels, 16 words in three);
//   3. final_adder: an ordinary adder that adds the last two words.
// The three-stage structure and the use of 4:2 compressors in place of
// carry-save adders follow the document; how the compressors are grouped
// is this design's own (see compressor_tree).
//
// Parameter N: operand width (document: 8 and 16 bits; default 8).
// Interface: p = a * b, 2N bits, no overflow possible.
// Purely combinational: the product is valid one propagation delay after
// the operands, with no clock or handshake.
module urdhva_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [N-1:0][2*N-1:0] pp;
  logic [2*N-1:0]        sum_word;
  logic [2*N-1:0]        carry_word;
  logic                  unused_cout;   // a*b always fits in 2N bits

  product_terms #(.N(N)) u_terms (
    .a (a),
    .b (b),
    .pp(pp)
  );

  compressor_tree #(.WORDS(N), .WIDTH(2*N)) u_tree (
    .words     (pp),
    .sum_word  (sum_word),
    .carry_word(carry_word)
  );

  final_adder #(.WIDTH(2*N)) u_add (
    .a   (sum_word),
    .b   (carry_word),
    .y   (p),
    .cout(unused_cout)
  );

endmodule
