// compressor_row: one row of WIDTH 4:2 compressors that turns four words
// into two with the same total (modulo 2^WIDTH).
//
// Bit k of the four input words feeds compressor k; the cout of compressor
// k is the cin of compressor k+1 (cin of bit 0 is 0). The sum bits form the
// sum word; the carry bits, one place to the left, form the carry word.
// Because cout does not depend on cin, the row has no ripple path: its
// delay is that of one compressor. The carry and cout out of the top bit
// are dropped, so the identity holds modulo 2^WIDTH; callers size WIDTH so
// that nothing is lost. How compressors are chained within a row is this
// design's choice; the document gives only the compressor cell.
// Purely combinational, no clock.
module compressor_row #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] w0,
  input  logic [WIDTH-1:0] w1,
  input  logic [WIDTH-1:0] w2,
  input  logic [WIDTH-1:0] w3,
  output logic [WIDTH-1:0] sum_word,
  output logic [WIDTH-1:0] carry_word
);

  assign carry_word[0] = 1'b0;

  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    logic cin;
    logic cout;
    logic carry;

    if (k == 0) begin : g_first
      assign cin = 1'b0;
    end else begin : g_next
      assign cin = g_bit[k-1].cout;
    end

    compressor_4_2 u_cmp (
      .x1   (w0[k]),
      .x2   (w1[k]),
      .x3   (w2[k]),
      .x4   (w3[k]),
      .cin  (cin),
      .sum  (sum_word[k]),
      .cout (cout),
      .carry(carry)
    );

    // The top bit's cout and carry fall outside the word and are dropped.
    if (k < WIDTH - 1) begin : g_carry
      assign carry_word[k+1] = carry;
    end
  end

endmodule
