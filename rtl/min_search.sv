// min_search: search for the state with the smallest path metric.
//
// The path metric memories deliver two (state, metric) candidates per cycle, one from
// each bank; in_valid qualifies them. The unit keeps the running minimum and its state
// in registers: clr starts a new search, and best_state/best_metric hold the result from
// the cycle after the last candidate. A candidate replaces the current best only when it
// is strictly smaller, and candidate 0 is considered before candidate 1, so ties keep the
// earliest candidate. For 64 states a search takes 32 cycles of candidates. The search
// step itself follows the document; scanning two banks at once is this design's choice.
module min_search
  import vit_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           in_valid,
  input  state_t [1:0]   in_state,
  input  word_t  [1:0]   in_metric,
  output state_t         best_state,
  output word_t          best_metric
);

  state_t s01;
  word_t  m01;

  always_comb begin
    if (in_metric[1] < in_metric[0]) begin
      s01 = in_state[1];  m01 = in_metric[1];
    end else begin
      s01 = in_state[0];  m01 = in_metric[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_state  <= '0;
      best_metric <= '1;
    end else if (clr) begin
      best_state  <= '0;
      best_metric <= '1;
    end else if (in_valid && (m01 < best_metric)) begin
      best_state  <= s01;
      best_metric <= m01;
    end
  end

endmodule
