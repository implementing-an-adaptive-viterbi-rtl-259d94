// vit_ctrl: sequencer of the Viterbi decoder.
//
// It runs the decoder loop: for seg_len stages, take one received symbol and sweep all
// N/2 butterflies of the trellis stage; then search the state with the smallest path
// metric and look up the survivor bits of that state's path; then start over. A stage
// begins with the symbol handshake (1 cycle) and the branch metrics of all 2^n codewords,
// four per cycle (2^n/4 cycles, bm_we/bm_group). Then one butterfly is issued per cycle:
// memory reads of butterfly b are issued in the cycle the AGU offset equals b and
// consumed one cycle later (upd_*), so the sweep takes N/2+1 cycles: a stage is 38 cycles
// for the DAB code (rate 1/4, K = 7). The search reads two
// metrics per cycle (N/2+1 cycles), the look-up takes hops+2 cycles.
//
// It also holds the active configuration. cfg_load (any time) loads a new code, rate and
// segment length and restarts decoding from state 0. dec_depth (the decision depth) is
// read at every look-up and may change during operation: the walk goes back
// ceil(dec_depth/seg_len) segments, at most RING-1. Decided bits are given out only once
// that many segments exist.
//
// The loop structure (per stage branch metrics, then path metrics and survivors; every
// seg_len stages search and look-up) follows the document; the
// one-butterfly-per-cycle schedule, handshakes and restart behaviour are this design's.
module vit_ctrl
  import vit_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_load,
  input  cfg_t       cfg_in,
  input  logic [7:0] dec_depth,
  input  logic       sym_valid,
  output logic       sym_ready,
  output cfg_t       cfg,            // active configuration
  output phase_t     phase,
  // branch metrics
  output logic       bm_we,
  output logic [1:0] bm_group,
  // butterfly sweep
  output logic       rd_issue,       // path-metric read (butterflies and search)
  output addr_t      rd_addr,        // path-metric read address
  output logic       re_rd_en,
  output addr_t      re_rd_addr,
  output logic       upd_en,         // butterfly data valid this cycle
  output state_t     upd_b,
  output logic       upd_first_seg,  // first stage of a segment (RE)
  output logic       upd_first_run,  // first stage after restart (path metrics)
  output addr_t      re_wr_base,
  output logic       pm_rd_pair,
  output logic       stage_end,
  output logic       restart,
  // search
  output logic       srch_clr,
  output logic       srch_valid,
  output addr_t      srch_addr,
  // look-up
  output logic       lk_start,
  output logic [3:0] ring_cur,
  output logic [3:0] hops,
  input  logic       lk_done,
  output logic       out_en
);

  logic [3:0]  stage_q;        // stage within segment
  logic [3:0]  segs_q;         // finished segments, saturating
  logic        first_run_q;
  logic        lk_started_q;
  addr_t       offset;
  addr_t       re_rd_base;
  logic        agu_clr;
  logic        agu_step;
  addr_t       nb_last;
  logic [7:0]  hops_calc;
  addr_t       grp_last;

  assign restart = cfg_load;

  // branch metric groups of four codewords per stage minus one: 2^n/4 - 1
  assign grp_last = (cfg.n <= 3'd2) ? addr_t'(0) : addr_t'((32'd1 << (cfg.n - 3'd2)) - 32'd1);

  // butterflies per stage minus one
  assign nb_last = addr_t'((32'd1 << (cfg.k - 3'd2)) - 32'd1);

  always_comb begin
    hops_calc = (dec_depth + 8'(cfg.seg_len) - 8'd1) / 8'(cfg.seg_len);
    if (hops_calc == 8'd0)            hops = 4'd1;
    else if (hops_calc > 8'(RING - 1)) hops = 4'(RING - 1);
    else                              hops = hops_calc[3:0];
  end

  assign re_rd_base = stage_q[0] ? addr_t'(0) : addr_t'(SLOT_WORDS);   // scratch slot of stage-1
  assign re_wr_base = (stage_q == cfg.seg_len - 4'd1)
                    ? addr_t'((32'(ring_cur) + 32'd2) * SLOT_WORDS)
                    : addr_t'(32'(stage_q[0]) * SLOT_WORDS);

  // one AGU scans path-metric addresses, a second one the RE scratch slot
  agu #(.AW(MEM_AW)) u_agu_pm (
    .clk(clk), .rst_n(rst_n), .clr(agu_clr), .step(agu_step),
    .base('0), .stride(addr_t'(1)), .offset(offset), .addr(rd_addr)
  );
  agu #(.AW(MEM_AW)) u_agu_re (
    .clk(clk), .rst_n(rst_n), .clr(agu_clr), .step(agu_step),
    .base(re_rd_base), .stride(addr_t'(1)), .offset(), .addr(re_rd_addr)
  );

  always_comb begin
    sym_ready = (phase == PH_WAIT) && !cfg_load;
    rd_issue  = (phase == PH_BFLY) || (phase == PH_SEARCH);
    re_rd_en  = (phase == PH_BFLY);
    bm_we     = (phase == PH_BMC);
    bm_group  = offset[1:0];
    agu_step  = rd_issue || bm_we;
    agu_clr   = ((phase == PH_WAIT) && sym_valid) || (phase == PH_DRAIN)
             || (bm_we && (offset == grp_last));
    stage_end = (phase == PH_DRAIN);
    lk_start  = (phase == PH_LOOKUP) && !lk_started_q;
    upd_first_seg = (stage_q == 4'd0);
    upd_first_run = first_run_q;
    out_en    = segs_q >= hops;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg          <= CFG_DAB;
      phase        <= PH_WAIT;
      stage_q      <= '0;
      segs_q       <= '0;
      ring_cur     <= '0;
      first_run_q  <= 1'b1;
      pm_rd_pair   <= 1'b0;
      lk_started_q <= 1'b0;
      upd_en       <= 1'b0;
      upd_b        <= '0;
      srch_valid   <= 1'b0;
      srch_addr    <= '0;
      srch_clr     <= 1'b0;
    end else if (cfg_load) begin
      cfg          <= cfg_in;
      phase        <= PH_WAIT;
      stage_q      <= '0;
      segs_q       <= '0;
      ring_cur     <= '0;
      first_run_q  <= 1'b1;
      lk_started_q <= 1'b0;
      upd_en       <= 1'b0;
      srch_valid   <= 1'b0;
      srch_clr     <= 1'b0;
    end else begin
      upd_en     <= (phase == PH_BFLY);
      upd_b      <= state_t'(offset);
      srch_valid <= (phase == PH_SEARCH);
      srch_addr  <= offset;
      srch_clr   <= 1'b0;
      unique case (phase)
        PH_WAIT:   if (sym_valid) phase <= PH_BMC;
        PH_BMC:    if (offset == grp_last) phase <= PH_BFLY;
        PH_BFLY:   if (offset == nb_last) phase <= PH_DRAIN;
        PH_DRAIN: begin
          first_run_q <= 1'b0;
          pm_rd_pair  <= ~pm_rd_pair;
          if (stage_q == cfg.seg_len - 4'd1) begin
            phase    <= PH_SEARCH;
            srch_clr <= 1'b1;
          end else begin
            phase    <= PH_WAIT;
            stage_q  <= stage_q + 4'd1;
          end
        end
        PH_SEARCH: if (offset == nb_last) phase <= PH_SDRAIN;
        PH_SDRAIN: phase <= PH_LOOKUP;
        PH_LOOKUP: begin
          lk_started_q <= 1'b1;
          if (lk_done) begin
            lk_started_q <= 1'b0;
            phase        <= PH_WAIT;
            stage_q      <= '0;
            ring_cur     <= (ring_cur == 4'(RING - 1)) ? '0 : ring_cur + 4'd1;
            if (segs_q != 4'hF) segs_q <= segs_q + 4'd1;
          end
        end
        default: phase <= PH_WAIT;
      endcase
    end
  end

  // a restart must bring a code the datapath can hold
  a_cfg_code: assert property (@(posedge clk) disable iff (!rst_n)
      cfg_load |-> (cfg_in.k >= 3'd3 && cfg_in.n >= 3'd2 && cfg_in.n <= 3'(MAX_N)))
    else $error("vit_ctrl: unsupported code k=%0d n=%0d", cfg_in.k, cfg_in.n);
  a_cfg_seg: assert property (@(posedge clk) disable iff (!rst_n)
      cfg_load |-> (cfg_in.seg_len >= 4'd1 && 5'(cfg_in.seg_len) <= field_w(cfg_in.k)))
    else $error("vit_ctrl: seg_len %0d does not fit the RE word", cfg_in.seg_len);

endmodule
