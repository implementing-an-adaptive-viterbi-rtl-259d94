// tb_agu: checks that the address generator produces base + n*stride after n steps, that
// clr restarts the sequence, that the offset holds without step, and that the address
// follows a change of base at once.
`timescale 1ns/1ps
module tb_agu;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, step = 0;
  logic [8:0] base = 0, stride = 1, offset, addr;
  int checks = 0, failures = 0;
  int n;

  agu #(.AW(9)) dut (.*);

  task automatic expect_addr(input int b, input int k, input int s);
    checks++;
    if (addr !== 9'(b + k * s) || offset !== 9'(k * s)) begin
      failures++; $display("FAIL base %0d n %0d stride %0d: addr %0d", b, k, s, addr);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int b, s, steps;
      b = $urandom_range(511); s = $urandom_range(5, 1); steps = $urandom_range(40);
      @(negedge clk); clr = 1; base = 9'(b); stride = 9'(s);
      @(negedge clk); clr = 0;
      expect_addr(b, 0, s);
      n = 0;
      for (int i = 0; i < steps; i++) begin
        step = ($urandom_range(3) != 0);
        @(negedge clk);
        if (step) n++;
        step = 0;
        expect_addr(b, n, s);
      end
      base = 9'(b + 3);
      #1 expect_addr(b + 3, n, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
