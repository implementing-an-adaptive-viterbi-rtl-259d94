// tb_survivor_mem: drives 12 trellis stages of butterfly updates with random select flags
// into the register-exchange memory (K = 7, then K = 5), alternating between two slots,
// and after each stage reads back the word of every state and compares it with a
// reference: {source state, decision bit} in the first stage, then the source's pointer
// kept and the decision bit shifted into the 17-K-bit field.
`timescale 1ns/1ps
module tb_survivor_mem;
  import vit_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] k = 3'd7;
  logic rd_en = 0;
  addr_t [1:0] rd_addr = '0;
  word_t [1:0] rd_data;
  logic upd_en = 0, upd_first = 0, upd_sel_up = 0, upd_sel_lo = 0;
  state_t upd_b = 0;
  addr_t upd_base = 0;
  int checks = 0, failures = 0;
  int model [64], next_model [64];

  survivor_mem dut (.*);

  function automatic int bank_ref(input int s, input int kk);
    return ((s >> 0) & 1) ^ ((s >> (kk - 2)) & 1);
  endfunction

  task automatic stage(input int kk, input bit first, input int rd_slot, input int wr_slot);
    int nstates, fw, mask;
    nstates = 1 << (kk - 1);
    fw = 17 - kk;
    mask = (1 << fw) - 1;
    for (int b = 0; b < nstates / 2; b++) begin
      bit su, sl;
      su = 1'($urandom); sl = 1'($urandom);
      @(negedge clk);
      rd_en = 1; rd_addr[0] = addr_t'(rd_slot * SLOT_WORDS + b); rd_addr[1] = rd_addr[0];
      @(negedge clk);
      rd_en = 0; upd_en = 1; upd_first = first; upd_b = state_t'(b);
      upd_sel_up = su; upd_sel_lo = sl; upd_base = addr_t'(wr_slot * SLOT_WORDS);
      for (int d = 0; d < 2; d++) begin
        int src, tgt, w;
        src = 2 * b + (d == 0 ? int'(su) : int'(sl));
        tgt = b + d * (nstates / 2);
        if (first) w = (src << fw) | d;
        else       w = (model[src] & ~mask & 16'hFFFF) | (((model[src] << 1) | d) & mask);
        next_model[tgt] = w;
      end
      @(negedge clk);
      upd_en = 0;
    end
    for (int s = 0; s < nstates; s++) model[s] = next_model[s];
    // read back
    for (int s = 0; s < nstates; s++) begin
      @(negedge clk);
      rd_en = 1; rd_addr[0] = addr_t'(wr_slot * SLOT_WORDS + (s >> 1)); rd_addr[1] = rd_addr[0];
      @(posedge clk); #1;
      checks++;
      if (rd_data[bank_ref(s, kk)] !== word_t'(model[s])) begin
        failures++; $display("FAIL k=%0d state %0d: got %h exp %h", kk, s, rd_data[bank_ref(s, kk)], model[s]);
      end
    end
    @(negedge clk); rd_en = 0;
  endtask

  initial begin
    k = 3'd7;
    for (int st = 0; st < 12; st++) stage(7, st == 0, (st + 1) % 2, st % 2);
    k = 3'd5;
    for (int st = 0; st < 6; st++) stage(5, st == 0, (st + 1) % 2 + 4, st % 2 + 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
