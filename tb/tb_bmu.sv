// tb_bmu: checks the branch metric unit for rates 1/2, 1/3 and 1/4: for random received
// soft values and every group of four codewords, each metric must equal the squared
// Euclidean distance sum_j (y_j - 7*c_j)^2 over the n code bits in use, computed in the
// testbench. It also checks the package's codeword function, which selects the metric of
// each branch, against a shift-register encoder written here, for the DAB code, a K = 5
// rate 1/3 code and the K = 3 rate 1/2 example code (state 00 with input 1 gives 11,
// state 10 with input 0 gives 01).
`timescale 1ns/1ps
module tb_bmu;
  import vit_pkg::*;
  logic [2:0] n;
  logic [MAX_N-1:0][SOFT_W-1:0] y;
  logic [1:0] group;
  logic [3:0][WORD_W-1:0] bm;
  int checks = 0, failures = 0;

  bmu dut (.*);

  localparam cfg_t CFG_K3 = '{k: 3'd3, n: 3'd2, gen: {7'o0, 7'o0, 7'o7, 7'o5}, seg_len: 4'd14};
  localparam cfg_t CFG_K5 = '{k: 3'd5, n: 3'd3, gen: {7'o0, 7'o37, 7'o33, 7'o25}, seg_len: 4'd12};

  // encoder: shift register of K bits, newest input first
  function automatic bit code_bit(input cfg_t c, input int state, input bit u, input int j);
    bit regs[MAX_K];
    bit acc;
    regs[0] = u;
    for (int p = 1; p < c.k; p++) regs[p] = state[c.k - 1 - p];
    acc = 0;
    for (int p = 0; p < c.k; p++) if (c.gen[j][c.k - 1 - p]) acc ^= regs[p];
    return acc;
  endfunction

  task automatic check_codewords(input cfg_t c);
    for (int s = 0; s < (1 << (c.k - 1)); s++)
      for (int u = 0; u < 2; u++) begin
        logic [MAX_N-1:0] cw, ref_cw;
        cw = codeword(c, state_t'(s), 1'(u));
        ref_cw = '0;
        for (int j = 0; j < c.n; j++) ref_cw[j] = code_bit(c, s, 1'(u), j);
        checks++;
        if (cw !== ref_cw) begin failures++; $display("FAIL codeword k=%0d s=%0d u=%0d: %b exp %b", c.k, s, u, cw, ref_cw); end
      end
  endtask

  initial begin
    checks++; if (!(code_bit(CFG_K3, 0, 1, 0) && code_bit(CFG_K3, 0, 1, 1))) begin failures++; $display("FAIL ref 00/1"); end
    checks++; if (!(!code_bit(CFG_K3, 2, 0, 0) && code_bit(CFG_K3, 2, 0, 1))) begin failures++; $display("FAIL ref 10/0"); end
    check_codewords(CFG_DAB);
    check_codewords(CFG_K5);
    check_codewords(CFG_K3);
    for (int t = 0; t < 300; t++) begin
      n = 3'($urandom_range(4, 2));
      for (int j = 0; j < MAX_N; j++) y[j] = SOFT_W'($urandom);
      for (int g = 0; g < 4; g++) begin
        group = 2'(g);
        #1;
        for (int q = 0; q < 4; q++) begin
          int c, exp_m;
          c = 4 * g + q;
          exp_m = 0;
          for (int j = 0; j < n; j++) begin
            int cv;
            cv = c[j] ? SOFT_MAX : 0;
            exp_m += (int'(y[j]) - cv) * (int'(y[j]) - cv);
          end
          checks++;
          if (bm[q] !== WORD_W'(exp_m)) begin
            failures++; $display("FAIL n=%0d codeword %0d: got %0d exp %0d", n, c, bm[q], exp_m);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
