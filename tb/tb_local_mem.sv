// tb_local_mem: writes random words to random addresses of a 512 x 16 local memory, then
// reads them back one cycle after the address and checks the data, that rdata holds while
// re is low, and that a write and a read to different addresses work in the same cycle.
`timescale 1ns/1ps
module tb_local_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [8:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [512];
  bit          written [512];
  int checks = 0, failures = 0;

  local_mem dut (.*);

  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; waddr = 9'(i); wdata = 16'($urandom); model[i] = wdata; written[i] = 1;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 600; i++) begin
      int a;
      a = $urandom_range(511);
      @(negedge clk); re = 1; raddr = 9'(a);
      // simultaneous write elsewhere
      we = 1; waddr = 9'(a ^ 1); wdata = 16'($urandom);
      @(posedge clk); #1;
      model[a ^ 1] = wdata;
      checks++; if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d", a); end
    end
    @(negedge clk); we = 0; re = 0; raddr = 9'd7;
    repeat (2) @(posedge clk); #1;
    begin
      logic [15:0] held;
      held = rdata;
      repeat (3) @(posedge clk); #1;
      checks++; if (rdata !== held) begin failures++; $display("FAIL rdata changed while re low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
