// tb_acs_alu: checks the add-compare-select ALU on the worked butterfly example (path
// metrics 5 and 3; branch metrics 2/1 towards the upper and 1/2 towards the lower target,
// giving 4 and 5, both from the second source state), on ties, and on random operands
// against a reference computed in the testbench.
`timescale 1ns/1ps
module tb_acs_alu;
  import vit_pkg::*;
  word_t a, b, c, d, out1, out2;
  int checks = 0, failures = 0;

  acs_alu dut (.*);

  task automatic check(input int ea, eb, ec, ed);
    int s0, s1, m, sel;
    a = word_t'(ea); b = word_t'(eb); c = word_t'(ec); d = word_t'(ed);
    #1;
    s0 = ea + eb; s1 = ec + ed;
    sel = (s1 < s0) ? 1 : 0;
    m = sel ? s1 : s0;
    checks++;
    if (out1 !== word_t'(m) || out2 !== word_t'(sel)) begin
      failures++; $display("FAIL %0d+%0d vs %0d+%0d: got %0d sel %0d", ea, eb, ec, ed, out1, out2);
    end
  endtask

  initial begin
    // worked example: upper target
    a = 5; b = 2; c = 3; d = 1; #1;
    checks++; if (out1 !== 4 || out2 !== 1) begin failures++; $display("FAIL example upper"); end
    // lower target
    a = 5; b = 1; c = 3; d = 2; #1;
    checks++; if (out1 !== 5 || out2 !== 1) begin failures++; $display("FAIL example lower"); end
    check(10, 4, 7, 7);     // tie keeps the upper source
    for (int i = 0; i < 2000; i++)
      check($urandom_range(20000), $urandom_range(400), $urandom_range(20000), $urandom_range(400));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
