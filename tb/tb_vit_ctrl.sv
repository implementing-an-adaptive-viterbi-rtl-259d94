// tb_vit_ctrl: runs the sequencer alone, with symbols always offered and a look-up that
// answers three cycles after it is started. A monitor checks every butterfly sweep (N/2
// reads in order, N/2 updates, the scratch/ring slot addresses, the first-stage flags, the
// path-metric pair flipping every stage), the branch metric groups before each sweep
// (2^n/4 of them),, every search (N/2 valid cycles after one clear),
// the ring index advancing modulo the ring size, the number of hops ceil(depth/seg_len),
// output enable only after that many segments, and the cycle counts per stage and search.
// The DAB configuration from reset runs 20 segments (ring wrap included), then a
// reconfiguration to K = 4, seg_len 13, depth 20 runs 6 segments.
`timescale 1ns/1ps
module tb_vit_ctrl;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_load = 0;
  cfg_t cfg_in = CFG_DAB;
  logic [7:0] dec_depth = 8'd50;
  logic sym_valid = 1, sym_ready;
  cfg_t cfg;
  phase_t phase;
  logic bm_we;
  logic [1:0] bm_group;
  logic rd_issue, re_rd_en, upd_en, upd_first_seg, upd_first_run, pm_rd_pair, stage_end, restart;
  addr_t rd_addr, re_rd_addr, re_wr_base, srch_addr;
  state_t upd_b;
  logic srch_clr, srch_valid, lk_start, lk_done = 0, out_en;
  logic [3:0] ring_cur, hops;
  int checks = 0, failures = 0;

  vit_ctrl dut (.*);

  // look-up stand-in
  int lk_timer = -1;
  always @(posedge clk) begin
    lk_done <= 0;
    if (lk_start) lk_timer <= 2;
    else if (lk_timer > 0) lk_timer <= lk_timer - 1;
    else if (lk_timer == 0) begin lk_done <= 1; lk_timer <= -1; end
  end

  task automatic err(input string m);
    failures++; $display("FAIL %s", m);
  endtask

  // reference state of the sequencer
  int kk = 7, l = 10, depth = 50, n_bits = 4;
  int bm_n = 0, stage_i = 0, segs = 0, ring = 0, b_exp = 0, upd_exp = 0, srch_n = 0, cyc_stage = 0, cyc_srch = 0;
  bit first_run = 1, pair = 0;
  always @(negedge clk) if (rst_n && !cfg_load) begin
    int nb;
    nb = 1 << (kk - 2);
    if (phase == PH_WAIT || phase == PH_BMC || phase == PH_BFLY || phase == PH_DRAIN) cyc_stage++;
    if (bm_we) begin
      checks++;
      if (bm_group != 2'(bm_n)) err($sformatf("branch metric group %0d exp %0d", bm_group, bm_n));
      bm_n++;
    end
    if (phase == PH_SEARCH || phase == PH_SDRAIN) cyc_srch++;
    if (rd_issue && phase == PH_BFLY) begin
      checks++;
      if (rd_addr != addr_t'(b_exp)) err($sformatf("pm read addr %0d exp %0d", rd_addr, b_exp));
      if (stage_i > 0 && re_rd_addr != addr_t'(((stage_i - 1) % 2) * SLOT_WORDS + b_exp)) err("re read addr");
      b_exp++;
    end
    if (upd_en) begin
      checks++;
      if (upd_b != state_t'(upd_exp)) err($sformatf("upd_b %0d exp %0d", upd_b, upd_exp));
      if (upd_first_seg != (stage_i == 0)) err("first-of-segment flag");
      if (upd_first_run != first_run) err("first-run flag");
      if (pm_rd_pair != pair) err("pair");
      if (stage_i == l - 1) begin
        if (re_wr_base != addr_t'((ring + 2) * SLOT_WORDS)) err("ring write slot");
      end else if (re_wr_base != addr_t'((stage_i % 2) * SLOT_WORDS)) err("scratch write slot");
      upd_exp++;
    end
    if (stage_end) begin
      checks++;
      if (upd_exp != nb || b_exp != nb) err($sformatf("sweep of %0d/%0d butterflies, exp %0d", b_exp, upd_exp, nb));
      if (bm_n != ((1 << n_bits) + 3) / 4) err($sformatf("%0d branch metric groups", bm_n));
      if (cyc_stage != nb + 2 + bm_n) err($sformatf("stage took %0d cycles", cyc_stage));
      bm_n = 0; b_exp = 0; upd_exp = 0; cyc_stage = 0;
      first_run = 0; pair = ~pair;
      stage_i++;
    end
    if (srch_clr) srch_n = 0;
    if (srch_valid) begin
      checks++;
      if (srch_addr != addr_t'(srch_n)) err("search address");
      srch_n++;
    end
    if (lk_start) begin
      int h;
      h = (depth + l - 1) / l;
      checks++;
      if (stage_i != l) err("look-up before segment end");
      if (srch_n != nb) err($sformatf("search saw %0d pairs", srch_n));
      if (cyc_srch != nb + 1) err($sformatf("search took %0d cycles", cyc_srch));
      if (hops != 4'(h)) err($sformatf("hops %0d exp %0d", hops, h));
      if (ring_cur != 4'(ring)) err("ring index");
      if (out_en != (segs >= h)) err("output enable");
      cyc_srch = 0;
    end
    if (lk_done) begin
      segs++; ring = (ring + 1) % RING; stage_i = 0;
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wait (segs == 20);
    @(negedge clk);
    cfg_in = '{k: 3'd4, n: 3'd2, gen: {7'o0, 7'o0, 7'o17, 7'o13}, seg_len: 4'd13};
    dec_depth = 8'd20;
    cfg_load = 1;
    @(negedge clk); cfg_load = 0;
    kk = 4; l = 13; depth = 20; n_bits = 2; bm_n = 0; stage_i = 0; segs = 0; ring = 0; first_run = 1;
    b_exp = 0; upd_exp = 0; cyc_stage = 0; cyc_srch = 0;
    checks++; if (cfg.k != 3'd4 || cfg.seg_len != 4'd13) err("configuration not loaded");
    wait (segs == 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
