// tb_re_lookup: fills a model of the two RE memory banks with random words, plants a
// pointer chain from a start state back through 'hops' ring slots (wrapping around the
// ring), and checks that the look-up returns the decision field of the last word of the
// chain, masked to seg_len bits, and that it takes hops+2 cycles from start to done.
// Runs K = 7 with seg_len 10 and K = 4 with seg_len 13.
`timescale 1ns/1ps
module tb_re_lookup;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] k = 3'd7;
  logic [3:0] seg_len = 4'd10;
  logic start = 0;
  state_t start_state = 0;
  logic [3:0] ring_cur = 0, hops = 1;
  logic rd_en;
  addr_t rd_addr;
  word_t [1:0] rd_data;
  logic busy, done;
  word_t bits;
  int checks = 0, failures = 0;
  word_t bank_mem [2][512];

  re_lookup dut (.*);

  always @(posedge clk) if (rd_en) begin
    rd_data[0] <= bank_mem[0][rd_addr];
    rd_data[1] <= bank_mem[1][rd_addr];
  end

  function automatic int bank_ref(input int s, input int kk);
    return (s & 1) ^ ((s >> (kk - 2)) & 1);
  endfunction

  task automatic one(input int kk, input int l);
    int fw, s, rc, hp, slot, w, expect_bits, t0, t1;
    fw = 17 - kk;
    for (int b = 0; b < 2; b++) for (int a = 0; a < 512; a++) bank_mem[b][a] = word_t'($urandom);
    rc = $urandom_range(RING - 1);
    hp = $urandom_range(RING - 1, 1);
    s = $urandom_range((1 << (kk - 1)) - 1);
    @(negedge clk);
    k = 3'(kk); seg_len = 4'(l); ring_cur = 4'(rc); hops = 4'(hp); start_state = state_t'(s);
    for (int h = 0; h <= hp; h++) begin
      int nxt;
      slot = (rc - h + RING) % RING + 2;
      nxt = $urandom_range((1 << (kk - 1)) - 1);
      w = (nxt << fw) | $urandom_range((1 << fw) - 1);
      bank_mem[bank_ref(s, kk)][slot * SLOT_WORDS + (s >> 1)] = word_t'(w);
      if (h == hp) expect_bits = w & ((1 << l) - 1);
      s = nxt;
    end
    start = 1; t0 = $time;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    t1 = $time;
    checks++;
    if (bits !== word_t'(expect_bits)) begin failures++; $display("FAIL k=%0d hops %0d: %h exp %h", kk, hp, bits, expect_bits); end
    checks++;
    if ((t1 - t0) / 10 != hp + 2) begin failures++; $display("FAIL cycles %0d for %0d hops", (t1 - t0) / 10, hp); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 30; i++) one(7, 10);
    for (int i = 0; i < 20; i++) one(4, 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
