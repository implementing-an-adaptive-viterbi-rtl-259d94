// bmu: branch metric unit.
//
// A rate 1/n code has 2^n different codewords, so a trellis stage has at most 2^n
// different branch metrics. The unit computes them once per stage, four codewords per
// cycle: in a cycle with group index g it returns the metrics of codewords 4g .. 4g+3
// (code bit j of codeword c is bit j of c). The metric is the squared Euclidean distance
// sum_j (y_j - c_j)^2 over the n code bits in use, a code bit '1' placed at SOFT_MAX and
// '0' at zero. The rate is chosen at run time by n (2, 3 or 4 code bits): a stage takes
// 1, 2 or 4 cycles. Combinational; the results are kept in bm_regfile for the butterflies.
// The distance measure, the adjustable rate and computing the metrics before the
// add-compare-select step follow the document; four metrics per cycle and the soft-value
// scale are this design's choices.
module bmu
  import vit_pkg::*;
(
  input  logic [2:0]                      n,       // code bits per symbol
  input  logic [MAX_N-1:0][SOFT_W-1:0]    y,       // received soft code bits, y[0] first
  input  logic [1:0]                      group,   // codewords 4*group .. 4*group+3
  output logic [3:0][WORD_W-1:0]          bm
);

  logic [MAX_N-1:0]  cw;
  logic [WORD_W-1:0] cval, bit_dist, acc;

  always_comb begin
    for (int q = 0; q < 4; q++) begin
      cw  = {group, 2'(q)};
      acc = '0;
      for (int j = 0; j < MAX_N; j++) begin
        cval     = cw[j] ? WORD_W'(SOFT_MAX) : '0;
        bit_dist = (WORD_W'(y[j]) >= cval) ? WORD_W'(y[j]) - cval : cval - WORD_W'(y[j]);
        if (j < int'(n)) acc = acc + bit_dist * bit_dist;
      end
      bm[q] = acc;
    end
  end

endmodule
