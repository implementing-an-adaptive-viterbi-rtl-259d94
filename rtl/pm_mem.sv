// pm_mem: path metric memory unit, four local memories used as two ping-pong pairs.
//
// Each pair holds the path metrics of one trellis stage, split over two banks (see
// vit_pkg for the state-to-bank mapping), so a butterfly reads its two source metrics
// from the two memories of one pair in the same cycle and writes its two results into
// the two memories of the other pair. rd_pair selects the pair that is read; the other
// pair is written. The decoder flips rd_pair after every stage, so the memories swap
// roles from stage to stage and no in-place addressing is needed. Reads return data one
// cycle after rd_en; rd_data[b] is the word from bank b of the pair that was read.
// Four memories, two read and two written, with roles swapped every stage, follow the
// document; the bank mapping is this design's choice.
module pm_mem
  import vit_pkg::*;
(
  input  logic              clk,
  input  logic              rd_pair,
  input  logic              rd_en,
  input  addr_t             rd_addr,        // same address in both banks
  output word_t [1:0]       rd_data,
  input  logic  [1:0]       wr_en,          // per bank of the written pair
  input  addr_t [1:0]       wr_addr,
  input  word_t [1:0]       wr_data
);

  word_t [3:0] q;
  logic        rd_pair_q;

  for (genvar m = 0; m < 4; m++) begin : g_mem
    localparam int unsigned PAIR = m / 2;
    localparam int unsigned BANK = m % 2;
    local_mem #(.DEPTH(MEM_DEPTH), .WIDTH(WORD_W)) u_mem (
      .clk   (clk),
      .we    (wr_en[BANK] && (rd_pair != 1'(PAIR))),
      .waddr (wr_addr[BANK]),
      .wdata (wr_data[BANK]),
      .re    (rd_en && (rd_pair == 1'(PAIR))),
      .raddr (rd_addr),
      .rdata (q[m])
    );
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_pair_q <= rd_pair;
  end

  assign rd_data[0] = rd_pair_q ? q[2] : q[0];
  assign rd_data[1] = rd_pair_q ? q[3] : q[1];

endmodule
