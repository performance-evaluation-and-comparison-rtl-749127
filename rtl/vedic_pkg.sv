// vedic_pkg: shared constants and elaboration-time helpers for the Vedic
// multipliers.
//
// The Urdhva-Tiryagbhyam multiplier reduces its partial-product words with
// rows of 4:2 compressors. Each row turns up to four words into two, so a
// level holding W words hands 2*ceil(W/4) words to the next level, and the
// reduction stops once two words remain. The functions below compute that
// schedule so that the compressor tree can be generated for any word count.
// The schedule (groups of four, zero padding of a short group) is this
// design's own choice; the document only says that the compressors reduce
// the N words to two.
package vedic_pkg;

  // Word widths the document builds its multipliers for.
  localparam int unsigned SMALL_WIDTH = 8;
  localparam int unsigned LARGE_WIDTH = 16;

  // Number of words left after one level of 4:2 compressor rows.
  function automatic int unsigned words_after_level(input int unsigned words);
    if (words <= 2) return words;
    return 2 * ((words + 3) / 4);
  endfunction

  // Number of words present at a given level of the tree (level 0 = input).
  function automatic int unsigned words_at_level(input int unsigned words,
                                                 input int unsigned level);
    int unsigned w;
    w = words;
    for (int unsigned l = 0; l < level; l++) w = words_after_level(w);
    return w;
  endfunction

  // Number of compressor levels needed to bring `words` down to two.
  function automatic int unsigned tree_levels(input int unsigned words);
    int unsigned w;
    int unsigned n;
    w = words;
    n = 0;
    while (w > 2) begin
      w = words_after_level(w);
      n++;
    end
    return n;
  endfunction

endpackage
