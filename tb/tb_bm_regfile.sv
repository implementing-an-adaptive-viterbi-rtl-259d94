// tb_bm_regfile: writes the 16 branch metric registers four at a time in random group
// order and checks all four read ports, with random codeword indices, against a model;
// then rewrites single groups and checks that the other entries keep their values.
`timescale 1ns/1ps
module tb_bm_regfile;
  import vit_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [1:0] wgroup = 0;
  logic [3:0][WORD_W-1:0] wdata = '0;
  logic [3:0][MAX_N-1:0] rd_idx = '0;
  logic [3:0][WORD_W-1:0] rd_data;
  word_t model [16];
  int checks = 0, failures = 0;

  bm_regfile dut (.*);

  task automatic write_group(input int g);
    @(negedge clk);
    we = 1; wgroup = 2'(g);
    for (int q = 0; q < 4; q++) begin wdata[q] = word_t'($urandom); model[4 * g + q] = wdata[q]; end
    @(negedge clk); we = 0;
  endtask

  task automatic check_reads(input int count);
    for (int t = 0; t < count; t++) begin
      for (int p = 0; p < 4; p++) rd_idx[p] = 4'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rd_data[p] !== model[rd_idx[p]]) begin failures++; $display("FAIL port %0d index %0d", p, rd_idx[p]); end
      end
    end
  endtask

  initial begin
    write_group(2); write_group(0); write_group(3); write_group(1);
    check_reads(50);
    for (int r = 0; r < 20; r++) begin
      write_group($urandom_range(3));
      check_reads(10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
