// compressor_tree: reduces WORDS words of WIDTH bits to two words with the
// same sum (modulo 2^WIDTH), using levels of 4:2 compressor rows.
//
// At each level the words are taken four at a time; a group short of four
// is padded with zero words. Every group goes through one compressor_row
// and leaves two words, so W words become 2*ceil(W/4). Levels repeat until
// two words are left (8 words: two levels, 16 words: three levels). The
// two results are added by an ordinary adder outside this block. The
// document states that a 4:2 compressor stage reduces the N product words
// to two; the grouping and the level schedule (vedic_pkg) are this
// design's own.
//
// Parameters: WORDS, number of input words (>= 1); WIDTH, word width.
// Interface: words[i] is input word i; sum_word + carry_word equals the sum
// of all input words modulo 2^WIDTH. Purely combinational, no clock.
module compressor_tree
  import vedic_pkg::*;
#(
  parameter int unsigned WORDS = 8,
  parameter int unsigned WIDTH = 16
) (
  input  logic [WORDS-1:0][WIDTH-1:0] words,
  output logic [WIDTH-1:0]            sum_word,
  output logic [WIDTH-1:0]            carry_word
);

  localparam int unsigned LEVELS = tree_levels(WORDS);
  // Room for the widest level, padded to a whole group of four.
  localparam int unsigned SLOTS  = 4 * ((WORDS + 3) / 4);

  // Level 0: the input words, zero beyond WORDS.
  logic [SLOTS-1:0][WIDTH-1:0] level_in;
  always_comb begin
    level_in = '0;
    level_in[WORDS-1:0] = words;
  end

  // Level l reads the words left by level l-1 (or the inputs) and leaves
  // its own in `out`; slots it does not fill are zero.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned WL     = words_at_level(WORDS, l);
    localparam int unsigned GROUPS = (WL + 3) / 4;
    logic [SLOTS-1:0][WIDTH-1:0] in;
    logic [SLOTS-1:0][WIDTH-1:0] out;

    if (l == 0) begin : g_first
      assign in = level_in;
    end else begin : g_next
      assign in = g_level[l-1].out;
    end

    for (genvar g = 0; g < GROUPS; g++) begin : g_group
      compressor_row #(.WIDTH(WIDTH)) u_row (
        .w0        (in[4*g]),
        .w1        (in[4*g+1]),
        .w2        (in[4*g+2]),
        .w3        (in[4*g+3]),
        .sum_word  (out[2*g]),
        .carry_word(out[2*g+1])
      );
    end
    if (2 * GROUPS < SLOTS) begin : g_zero
      assign out[SLOTS-1:2*GROUPS] = '0;
    end
  end

  if (LEVELS == 0) begin : g_pass
    // One or two input words: nothing to compress.
    assign sum_word   = level_in[0];
    assign carry_word = level_in[1];
  end else begin : g_result
    assign sum_word   = g_level[LEVELS-1].out[0];
    assign carry_word = g_level[LEVELS-1].out[1];
  end

endmodule
