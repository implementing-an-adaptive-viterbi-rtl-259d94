// bm_regfile: branch metric registers next to the add-compare-select ALUs.
//
// Holds the 2^MAX_N = 16 branch metrics of the current trellis stage, one per codeword.
// The branch metric unit writes four consecutive entries (4*wgroup .. 4*wgroup+3) per
// cycle when we is high; four read ports, indexed by codeword, return entries
// combinationally so a butterfly can fetch the metrics of its four branches in the same
// cycle. Keeping the metrics in registers local to the ALUs follows the document ("the
// values are stored in the local registers of the ALUs"); merging them into one file of
// 16 entries readable by both ACS ALUs is this design's choice.
module bm_regfile
  import vit_pkg::*;
(
  input  logic                        clk,
  input  logic                        we,
  input  logic [1:0]                  wgroup,
  input  logic [3:0][WORD_W-1:0]      wdata,
  input  logic [3:0][MAX_N-1:0]       rd_idx,
  output logic [3:0][WORD_W-1:0]      rd_data
);

  logic [WORD_W-1:0] regs [1 << MAX_N];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int q = 0; q < 4; q++) regs[{wgroup, 2'(q)}] <= wdata[q];
    end
  end

  always_comb begin
    for (int p = 0; p < 4; p++) rd_data[p] = regs[rd_idx[p]];
  end

endmodule
