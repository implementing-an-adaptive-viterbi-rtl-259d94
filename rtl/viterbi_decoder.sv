// viterbi_decoder: adaptive Viterbi decoder built from the units of a coarse-grained tile.
//
// Received symbols (n soft code bits each) enter through a valid/ready handshake, one per
// trellis stage. For every stage the branch metric unit first computes the metric of
// every possible codeword into the branch metric registers; then the sequencer sweeps
// the N/2 butterflies of the trellis: each fetches its four branch metrics, two
// add-compare-select ALUs produce the new path metrics of the two target states and the
// select flags, the path metrics go from one pair of local memories to the other, and the
// survivor memory extends the register-exchange words of the two targets. Every seg_len
// stages (10 for DAB) the state with the smallest path metric is searched and the
// survivor's pointers are followed back ceil(dec_depth/seg_len) segments; the decision
// bits found there leave on out_bits (out_len of them, earliest decision in bit
// out_len-1) with a one-cycle out_valid.
//
// Code, rate and segment length are loaded with cfg_load (restarting the decoder from
// state 0); after reset the DAB code (rate 1/4, K = 7, generators 133/171/145/133 octal,
// seg_len 10) is active. dec_depth may change at any time and takes effect at the next
// look-up.
//
// Path metrics are normalised: the smallest metric of a stage is subtracted from every
// metric read in the next stage, so 16 bits never overflow. Before the first stage state 0
// starts at 0 and every other state at PM_INIT.
//
// Timing for the DAB code: 38 cycles per stage (1 handshake + 4 branch metric + 32
// butterflies + 1 drain), 33 for the search and hops+3 for the look-up, 421 cycles per 10
// decoded bits with dec_depth 50.
// The structure follows the document; the schedule, the normalisation and the soft-value
// format are this design's choices.
module viterbi_decoder
  import vit_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration
  input  logic                          cfg_load,
  input  cfg_t                          cfg_in,
  input  logic [7:0]                    dec_depth,
  // received symbols
  input  logic                          sym_valid,
  output logic                          sym_ready,
  input  logic [MAX_N-1:0][SOFT_W-1:0]  sym,
  // decided bits
  output logic                          out_valid,
  output word_t                         out_bits,
  output logic [3:0]                    out_len,
  // status
  output phase_t                        phase
);

  cfg_t        cfg;
  logic [MAX_N-1:0][SOFT_W-1:0] sym_q;

  logic        bm_we;
  logic [1:0]  bm_group;
  logic        rd_issue, re_rd_en, upd_en, upd_first_seg, upd_first_run;
  logic        pm_rd_pair, stage_end, restart;
  addr_t       rd_addr, re_rd_addr, re_wr_base, srch_addr;
  state_t      upd_b;
  logic        srch_clr, srch_valid, lk_start, lk_done, lk_busy, lk_rd_en, out_en;
  logic [3:0]  ring_cur, hops;
  addr_t       lk_rd_addr;
  word_t       lk_bits;

  vit_ctrl u_ctrl (
    .clk, .rst_n, .cfg_load, .cfg_in, .dec_depth, .sym_valid, .sym_ready,
    .cfg, .phase, .bm_we, .bm_group, .rd_issue, .rd_addr, .re_rd_en, .re_rd_addr, .upd_en, .upd_b,
    .upd_first_seg, .upd_first_run, .re_wr_base, .pm_rd_pair, .stage_end, .restart,
    .srch_clr, .srch_valid, .srch_addr, .lk_start, .ring_cur, .hops,
    .lk_done, .out_en
  );

  always_ff @(posedge clk) begin
    if (sym_valid && sym_ready) sym_q <= sym;
  end

  // ---------------- branch metrics ----------------
  // computed once per stage for every codeword and kept in registers; each butterfly
  // fetches the metrics of its four branches by codeword:
  // bm[0] 2b->b, bm[1] 2b->b+N/2, bm[2] 2b+1->b, bm[3] 2b+1->b+N/2
  state_t                  src_even;
  logic [3:0][WORD_W-1:0]  bm_new, bm;
  logic [3:0][MAX_N-1:0]   br_cw;

  assign src_even = {upd_b[MAX_K-3:0], 1'b0};

  always_comb begin
    for (int br = 0; br < 4; br++)
      br_cw[br] = codeword(cfg, src_even | state_t'(br / 2), 1'(br % 2));
  end

  bmu u_bmu (.n(cfg.n), .y(sym_q), .group(bm_group), .bm(bm_new));

  bm_regfile u_bmr (.clk, .we(bm_we), .wgroup(bm_group), .wdata(bm_new), .rd_idx(br_cw), .rd_data(bm));

  // ---------------- path metrics ----------------
  word_t [1:0] pm_rd_data;
  logic  [1:0] pm_wr_en;
  addr_t [1:0] pm_wr_addr;
  word_t [1:0] pm_wr_data;
  word_t       pm_even, pm_odd, pm_norm, stage_min;
  word_t       pm_up, pm_lo, sel_up_w, sel_lo_w, cycle_min, min_with_cycle;
  logic        bank_src;
  state_t      half_n;
  addr_t       addr_up, addr_lo;

  always_comb begin
    half_n   = state_t'(1) << (cfg.k - 3'd2);
    bank_src = bank_of(src_even, cfg.k);
    if (upd_first_run) begin
      pm_even = (src_even == '0) ? '0 : PM_INIT;
      pm_odd  = PM_INIT;
    end else begin
      pm_even = pm_rd_data[bank_src]  - pm_norm;
      pm_odd  = pm_rd_data[~bank_src] - pm_norm;
    end
  end

  acs_alu u_acs_up (.a(pm_even), .b(bm[0]), .c(pm_odd), .d(bm[2]), .out1(pm_up), .out2(sel_up_w));
  acs_alu u_acs_lo (.a(pm_even), .b(bm[1]), .c(pm_odd), .d(bm[3]), .out1(pm_lo), .out2(sel_lo_w));

  always_comb begin
    addr_up       = (addr_t'(upd_b) >> 1);
    addr_lo       = ((addr_t'(upd_b) + addr_t'(half_n)) >> 1);
    pm_wr_en      = {2{upd_en}};
    pm_wr_data[0] = upd_b[0] ? pm_lo : pm_up;
    pm_wr_data[1] = upd_b[0] ? pm_up : pm_lo;
    pm_wr_addr[0] = upd_b[0] ? addr_lo : addr_up;
    pm_wr_addr[1] = upd_b[0] ? addr_up : addr_lo;
    cycle_min      = (pm_lo < pm_up) ? pm_lo : pm_up;
    min_with_cycle = (cycle_min < stage_min) ? cycle_min : stage_min;
  end

  pm_mem u_pm (
    .clk, .rd_pair(pm_rd_pair), .rd_en(rd_issue), .rd_addr(rd_addr), .rd_data(pm_rd_data),
    .wr_en(pm_wr_en), .wr_addr(pm_wr_addr), .wr_data(pm_wr_data)
  );

  // normalisation: smallest metric of the finished stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_min <= '1;
      pm_norm   <= '0;
    end else if (restart) begin
      stage_min <= '1;
      pm_norm   <= '0;
    end else if (upd_en) begin
      if (stage_end) begin
        pm_norm   <= min_with_cycle;
        stage_min <= '1;
      end else begin
        stage_min <= min_with_cycle;
      end
    end
  end

  // ---------------- survivor memory ----------------
  word_t [1:0] re_rd_data;
  addr_t [1:0] re_rd_addr_b;

  assign re_rd_addr_b = lk_busy || lk_start ? {lk_rd_addr, lk_rd_addr} : {re_rd_addr, re_rd_addr};

  survivor_mem u_re (
    .clk, .k(cfg.k),
    .rd_en(re_rd_en || lk_rd_en), .rd_addr(re_rd_addr_b), .rd_data(re_rd_data),
    .upd_en(upd_en), .upd_first(upd_first_seg), .upd_b(upd_b),
    .upd_sel_up(sel_up_w[0]), .upd_sel_lo(sel_lo_w[0]), .upd_base(re_wr_base)
  );

  // ---------------- minimum search ----------------
  state_t [1:0] srch_state;
  state_t       best_state;
  word_t        best_metric;

  always_comb begin
    for (int bk = 0; bk < 2; bk++) begin
      // state at address a of bank bk: {a, bk ^ a[K-3]}
      srch_state[bk] = state_t'({srch_addr[MAX_K-3:0], 1'b0})
                     | state_t'({5'b0, 1'(bk) ^ srch_addr[4'(cfg.k) - 4'd3]});
    end
  end

  min_search u_srch (
    .clk, .rst_n, .clr(srch_clr), .in_valid(srch_valid), .in_state(srch_state),
    .in_metric(pm_rd_data), .best_state(best_state), .best_metric(best_metric)
  );

  // ---------------- survivor look-up ----------------
  re_lookup u_lk (
    .clk, .rst_n, .k(cfg.k), .seg_len(cfg.seg_len), .start(lk_start),
    .start_state(best_state), .ring_cur(ring_cur), .hops(hops),
    .rd_en(lk_rd_en), .rd_addr(lk_rd_addr), .rd_data(re_rd_data),
    .busy(lk_busy), .done(lk_done), .bits(lk_bits)
  );

  assign out_valid = lk_done && out_en;
  assign out_bits  = lk_bits;
  assign out_len   = cfg.seg_len;

endmodule
