// tb_min_search: streams 32 random pairs of (state, metric) candidates, the search of a
// 64-state trellis, and checks the best state and metric against a reference scan with
// the same order (candidate 0 before candidate 1, strictly smaller wins); includes
// searches with many equal metrics, and checks that clr starts a fresh search.
`timescale 1ns/1ps
module tb_min_search;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, in_valid = 0;
  state_t [1:0] in_state;
  word_t [1:0] in_metric;
  state_t best_state;
  word_t best_metric;
  int checks = 0, failures = 0;

  min_search dut (.*);

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      int bs, bm, range;
      range = (t % 3 == 0) ? 3 : 5000;
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      bs = 0; bm = 65535;
      for (int a = 0; a < 32; a++) begin
        in_valid = 1;
        for (int c = 0; c < 2; c++) begin
          in_state[c] = state_t'(2 * a + c);
          in_metric[c] = word_t'($urandom_range(range) + 10);
          if (int'(in_metric[c]) < bm) begin bm = int'(in_metric[c]); bs = 2 * a + c; end
        end
        @(negedge clk);
        in_valid = 0;
      end
      checks++;
      if (best_state !== state_t'(bs) || best_metric !== word_t'(bm)) begin
        failures++; $display("FAIL search %0d: got %0d/%0d exp %0d/%0d", t, best_state, best_metric, bs, bm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
