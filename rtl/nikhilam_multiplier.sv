// nikhilam_multiplier: N-bit by N-bit unsigned multiplier after the
// Nikhilam Sutra ("all from nine and the last from ten").
//
// Each operand is replaced by its distance from a base B; here B = 2^N.
// With ca = B - a and cb = B - b,
//     a * b = (a - cb) * B + ca * cb,
// so the product has a right half, the product of the two complements,
// and a left half, the cross subtraction a - cb (= b - ca = a + b - B).
// Whatever of ca*cb does not fit in the right half is carried into the
// left half. Modulo 2^N the "- B" in the left half vanishes, so the left
// half is a + b + (ca*cb >> N), taken modulo 2^N.
//
// Datapath, following the document's block diagram:
//   - two twos_complement blocks form ca and cb;
//   - a multiplier (the urdhva_multiplier, N bits) forms ca*cb; its low N
//     bits are the right half of the product;
//   - a 4:2 compressor tree takes the multiplicand, the multiplier, the
//     carried-over high half of ca*cb and a zero-operand correction word
//     and leaves two words, which an adder (final_adder) sums into the
//     left half.
// The correction word is this design's own: the complement of 0 is 2^N,
// one bit wider than the complement multiplier's inputs. When a = 0 the
// missing term ca*cb = 2^N*cb contributes cb to the left half (likewise ca
// when b = 0), and the correction word supplies it. The document instead
// notes that the method pays off only when both operands exceed half their
// range; with the correction the result is exact for all operands. Using
// the Urdhva multiplier for the complements and 4:2 compressors for the
// left half are also this design's reading of the diagram's "Multiplier"
// and "4:2 Compressor" boxes.
//
// Parameter N: operand width (document: 8 and 16 bits; default 8).
// Interface: p = a * b, 2N bits. Purely combinational, no clock.
module nikhilam_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [N:0]            ca;          // 2^N - a
  logic [N:0]            cb;          // 2^N - b
  logic [2*N-1:0]        comp_prod;   // ca[N-1:0] * cb[N-1:0]
  logic [N-1:0]          correction;  // left-half term for a zero operand
  logic [3:0][N-1:0]     lhs_words;
  logic [N-1:0]          lhs_sum;
  logic [N-1:0]          lhs_carry;
  logic [N-1:0]          lhs;
  logic                  unused_cout; // the left half is kept modulo 2^N

  twos_complement #(.N(N)) u_comp_a (.x(a), .comp(ca));
  twos_complement #(.N(N)) u_comp_b (.x(b), .comp(cb));

  // Right hand side: product of the complements.
  urdhva_multiplier #(.N(N)) u_rhs_mult (
    .a(ca[N-1:0]),
    .b(cb[N-1:0]),
    .p(comp_prod)
  );

  // Left hand side: cross subtraction plus the surplus of the right side.
  always_comb begin
    correction   = ({N{ca[N]}} & cb[N-1:0]) | ({N{cb[N]}} & ca[N-1:0]);
    lhs_words[0] = a;
    lhs_words[1] = b;
    lhs_words[2] = comp_prod[2*N-1:N];
    lhs_words[3] = correction;
  end

  compressor_tree #(.WORDS(4), .WIDTH(N)) u_lhs_cmp (
    .words     (lhs_words),
    .sum_word  (lhs_sum),
    .carry_word(lhs_carry)
  );

  final_adder #(.WIDTH(N)) u_lhs_add (
    .a   (lhs_sum),
    .b   (lhs_carry),
    .y   (lhs),
    .cout(unused_cout)
  );

  assign p = {lhs, comp_prod[N-1:0]};

endmodule
