// vedic_multipliers_top: the multipliers compared in this design, side by
// side.
//
// It holds the two N-bit multipliers, Urdhva-Tiryagbhyam and Nikhilam
// Sutra, each at the two operand widths the comparison uses (8 and 16
// bits), plus the 2x2 Vedic multiplier that shows the vertical and
// crosswise structure in its smallest form. Each width has its own pair of
// operands, fed to both methods, so the two products can be compared
// directly; the 2x2 multiplier has its own operands. Nothing is shared
// between the multipliers and nothing is registered.
//
// Parameters: SMALL_N and LARGE_N, the two operand widths (default 8 and
// 16, the widths the document reports).
// Interface: p_small_urdhva = p_small_nikhilam = a_small * b_small,
// p_large_urdhva = p_large_nikhilam = a_large * b_large, p_2x2 = a_2x2 *
// b_2x2. Purely combinational, no clock.
module vedic_multipliers_top
  import vedic_pkg::*;
#(
  parameter int unsigned SMALL_N = SMALL_WIDTH,
  parameter int unsigned LARGE_N = LARGE_WIDTH
) (
  input  logic [1:0]           a_2x2,
  input  logic [1:0]           b_2x2,
  output logic [3:0]           p_2x2,

  input  logic [SMALL_N-1:0]   a_small,
  input  logic [SMALL_N-1:0]   b_small,
  output logic [2*SMALL_N-1:0] p_small_urdhva,
  output logic [2*SMALL_N-1:0] p_small_nikhilam,

  input  logic [LARGE_N-1:0]   a_large,
  input  logic [LARGE_N-1:0]   b_large,
  output logic [2*LARGE_N-1:0] p_large_urdhva,
  output logic [2*LARGE_N-1:0] p_large_nikhilam
);

  vedic_2x2 u_2x2 (.a(a_2x2), .b(b_2x2), .s(p_2x2));

  urdhva_multiplier   #(.N(SMALL_N)) u_small_urdhva   (.a(a_small), .b(b_small), .p(p_small_urdhva));
  nikhilam_multiplier #(.N(SMALL_N)) u_small_nikhilam (.a(a_small), .b(b_small), .p(p_small_nikhilam));

  urdhva_multiplier   #(.N(LARGE_N)) u_large_urdhva   (.a(a_large), .b(b_large), .p(p_large_urdhva));
  nikhilam_multiplier #(.N(LARGE_N)) u_large_nikhilam (.a(a_large), .b(b_large), .p(p_large_nikhilam));

endmodule
