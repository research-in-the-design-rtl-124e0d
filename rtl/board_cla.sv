// board_cla: carry look-ahead across the Stages of a board.
//
// After each Stage has added its own bytes through its ADD ROM, it reports a
// carry generate g (the ROM carry) and a carry propagate p (all eight sum
// bits are 1). This block turns them into the carry that enters every
// Stage, so that one further ROM addition (byte + carry) per Stage corrects
// the whole word in one cycle instead of one cycle per Stage. The board can
// hold several words: `lsb_i[i]` marks Stage i as the least significant
// Stage of a word, and the carry into such a Stage is `cin_i` (the word
// carry-in) rather than the carry out of Stage i-1. The carry into Stage 0,
// when it does not start a word, is `board_cin_i`, the carry rippled in from
// the previous board. `cout_o[i]` is the carry out of Stage i. The document
// places look-ahead at the board level with 8 Stages per board and rippling
// between boards; the word segmentation is this design's choice.
// Combinational: the carries settle in the same cycle.
module board_cla #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] p_i,
  input  logic [N-1:0] g_i,
  input  logic [N-1:0] lsb_i,
  input  logic         cin_i,
  input  logic         board_cin_i,
  output logic [N-1:0] c_o,      // carry into each Stage
  output logic [N-1:0] cout_o    // carry out of each Stage
);

  // Carry into Stage i = G(k..i-1) | P(k..i-1) & c(k), with k the first
  // Stage of its word: group generate/propagate over the Stages below it.
  always_comb begin
    logic gg, pp, found;
    for (int i = 0; i < N; i++) begin
      gg    = 1'b0;
      pp    = 1'b1;
      found = 1'b0;
      for (int j = i - 1; j >= 0; j--) begin
        if (!found) begin
          gg = gg | (pp & g_i[j]);
          pp = pp & p_i[j];
          found = lsb_i[j];
        end
      end
      if (lsb_i[i]) c_o[i] = cin_i;
      else          c_o[i] = gg | (pp & (found ? cin_i : board_cin_i));
    end
    for (int i = 0; i < N; i++)
      cout_o[i] = g_i[i] | (p_i[i] & c_o[i]);
  end

endmodule
