// tb_dab_workload: the DAB decoding workload at the decoder's reset configuration (rate
// 1/4, K = 7, generators 133/171/145/133 octal, decision depth 50). A behavioural encoder
// turns 2000 random message bits (plus a zero tail) into soft symbols with noise and about
// 1 % hard bit errors, which are offered back to back. The test checks that every decided
// bit matches the message, and that the average rate from the first symbol to the last
// decided bit is at most 47 cycles per bit (2.1 Mbit/s at 100 MHz), and in any case
// enough for the 1.8 Mbit/s DAB needs (at most 55 cycles per bit at 100 MHz).
`timescale 1ns/1ps
module tb_dab_workload;
  import vit_pkg::*;

  localparam int MSG_BITS = 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_load = 0;
  cfg_t        cfg_in = CFG_DAB;
  logic [7:0]  dec_depth = DEPTH_DAB;
  logic        sym_valid = 0, sym_ready;
  logic [MAX_N-1:0][SOFT_W-1:0] sym = '0;
  logic        out_valid;
  word_t       out_bits;
  logic [3:0]  out_len;
  phase_t      phase;

  viterbi_decoder dut (.*);

  int checks = 0, failures = 0, bit_errors = 0, decided = 0, flips = 0;
  bit msg[$];
  int cyc = 0, t_first = -1, t_last = 0, out_seg = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // decided bits arrive in message order, earliest in bit out_len-1
  always @(posedge clk) if (rst_n && out_valid) begin
    for (int p = int'(out_len) - 1; p >= 0; p--) begin
      int st;
      st = out_seg * int'(out_len) + (int'(out_len) - 1 - p);
      if (st < MSG_BITS) begin
        decided++;
        if (out_bits[p] != msg[st]) bit_errors++;
        if (st == MSG_BITS - 1) t_last = cyc;
      end
    end
    out_seg++;
  end

  initial begin
    int unsigned s;
    int total;
    total = MSG_BITS + 6 * 10;
    for (int i = 0; i < total; i++) msg.push_back(i < MSG_BITS ? 1'($urandom) : 1'b0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    s = 0;
    for (int i = 0; i < total; i++) begin
      logic [6:0] r;
      r = 7'((int'(msg[i]) << 6) | s);
      s = (int'(msg[i]) << 5) | (s >> 1);
      for (int j = 0; j < MAX_N; j++) begin
        int v;
        v = (^(r & CFG_DAB.gen[j])) ? SOFT_MAX : 0;
        if ($urandom_range(99) < 30) v = (v == 0) ? $urandom_range(3, 1) : SOFT_MAX - $urandom_range(3, 1);
        if ($urandom_range(999) < 10) begin v = SOFT_MAX - v; flips++; end
        sym[j] = SOFT_W'(v);
      end
      sym_valid = 1;
      do @(posedge clk); while (!sym_ready);
      if (t_first < 0) t_first = cyc;
      @(negedge clk);
    end
    sym_valid = 0;
    wait (decided == MSG_BITS);
    repeat (2) @(negedge clk);
    checks++;
    if (bit_errors != 0) begin failures++; $display("FAIL %0d bit errors", bit_errors); end
    checks++;
    if (flips == 0) begin failures++; $display("FAIL no channel errors injected"); end
    begin
      real cpb;
      cpb = real'(t_last - t_first + 1) / real'(MSG_BITS);
      $display("DAB workload: %0d bits, %0d channel bit errors corrected, %.1f cycles per bit, %.2f Mbit/s at 100 MHz",
               MSG_BITS, flips, cpb, 100.0 / cpb);
      checks++;
      if (cpb > 47.0) begin failures++; $display("FAIL slower than 47 cycles per bit"); end
      checks++;
      if (100.0 / cpb < 1.8) begin failures++; $display("FAIL below the DAB rate"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
