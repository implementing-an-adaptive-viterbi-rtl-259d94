// acs_alu: ALU carrying the add-compare-select operation for one trellis state.
//
// The four 16-bit inputs are two (path metric, branch metric) pairs: a/b for the branch
// from the upper source state S_i, c/d for the branch from S_i+1. out1 is the smaller
// sum, the survivor's new path metric; out2 bit 0 is the select flag, 1 when the path
// from S_i+1 survives. On a tie the path from S_i is kept. The unit is purely
// combinational, like the tile's ALUs. Taking compare-select into the ALU, so that it
// does not need the sequencer, follows the document; four inputs and two outputs match
// the tile ALU; the tie rule is this design's choice. Sums do not overflow because the
// decoder normalises path metrics every stage.
module acs_alu
  import vit_pkg::*;
(
  input  word_t a,     // path metric of S_i
  input  word_t b,     // branch metric S_i -> target
  input  word_t c,     // path metric of S_i+1
  input  word_t d,     // branch metric S_i+1 -> target
  output word_t out1,  // survivor path metric
  output word_t out2   // {15'b0, select}
);

  word_t sum_upper, sum_lower;
  logic  sel;

  always_comb begin
    sum_upper = a + b;
    sum_lower = c + d;
    sel       = sum_lower < sum_upper;
    out1      = sel ? sum_lower : sum_upper;
    out2      = {{(WORD_W-1){1'b0}}, sel};
  end

endmodule
