// tb_pm_mem: fills the pair that is not being read (two banks, two different addresses per
// cycle), flips rd_pair and reads everything back from both banks at once; then writes the
// other pair and checks that the first pair's contents are untouched, so the two pairs
// really swap roles.
`timescale 1ns/1ps
module tb_pm_mem;
  import vit_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_pair = 0, rd_en = 0;
  addr_t rd_addr = 0;
  word_t [1:0] rd_data;
  logic [1:0] wr_en = 0;
  addr_t [1:0] wr_addr = '0;
  word_t [1:0] wr_data = '0;
  word_t model [2][2][64];   // pair, bank, address
  int checks = 0, failures = 0;

  pm_mem dut (.*);

  task automatic fill(input int pair);
    rd_pair = ~1'(pair);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      wr_en = 2'b11;
      wr_addr[0] = addr_t'(a); wr_addr[1] = addr_t'(63 - a);
      wr_data[0] = word_t'($urandom); wr_data[1] = word_t'($urandom);
      model[pair][0][a] = wr_data[0]; model[pair][1][63 - a] = wr_data[1];
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic read_back(input int pair);
    rd_pair = 1'(pair);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); rd_en = 1; rd_addr = addr_t'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_data[0] !== model[pair][0][a] || rd_data[1] !== model[pair][1][a]) begin
        failures++; $display("FAIL pair %0d addr %0d", pair, a);
      end
    end
    @(negedge clk); rd_en = 0;
  endtask

  initial begin
    fill(1);
    read_back(1);
    fill(0);
    read_back(0);
    read_back(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
