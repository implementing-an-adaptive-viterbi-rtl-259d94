// tb_viterbi_decoder: end-to-end test of the adaptive Viterbi decoder.
//
// A behavioural convolutional encoder inside the testbench encodes random messages,
// maps the code bits to soft values, adds noise and occasional hard bit errors, and feeds
// the decoder. Every decided segment that comes out is compared with the message bits of
// the segment it must belong to: segment (finished segments - 1 - ceil(depth/seg_len)).
// Four runs: the DAB code at reset defaults (rate 1/4, K = 7, depth 50) with stalls on
// the symbol input and a change of the decision depth in flight; the K = 3 rate 1/2 code
// (generators 5 and 7 octal) loaded by reconfiguration; a K = 5 rate 1/3 code; and the
// DAB code again. Cycle counts of the DAB configuration are checked against the budget
// of 42 cycles per stage, 35 for the search, 15 for the look-up and 470 per ten bits.
// Each mechanism (stage, search, look-up, suppressed warm-up output, reconfiguration,
// depth change, input stall, normalisation, corrected error) must occur at least once.
`timescale 1ns/1ps
module tb_viterbi_decoder;
  import vit_pkg::*;

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

  int checks = 0, failures = 0;
  int n_stage = 0, n_search = 0, n_lookup = 0, n_out = 0, n_suppressed = 0;
  int n_reconf = 0, n_depth_change = 0, n_stall = 0, n_norm = 0, n_hard_err = 0;
  int max_stage = 0, max_search = 0, max_lookup = 0, max_segment = 0;
  bit check_timing = 0;

  // ---------------- reference encoder ----------------
  cfg_t  ecfg;
  bit    msg[$];
  int    seg_count;       // segments finished (searches seen)

  function automatic logic [MAX_N-1:0] encode(input cfg_t c, input int unsigned s, input bit u);
    logic [MAX_N-1:0] cw;
    int unsigned r;
    r = (int'(u) << (c.k - 1)) | s;
    for (int j = 0; j < MAX_N; j++) cw[j] = ^(r[MAX_K-1:0] & c.gen[j] & MAX_K'((1 << c.k) - 1));
    return cw;
  endfunction

  function automatic int hops_of(input int depth, input int l);
    int h;
    h = (depth + l - 1) / l;
    if (h < 1) h = 1;
    if (h > RING - 1) h = RING - 1;
    return h;
  endfunction

  // ---------------- monitors ----------------
  phase_t prev_phase = PH_WAIT;
  int     ph_cnt = 0, seg_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    prev_phase <= phase;
    if (phase != prev_phase) ph_cnt <= 1; else ph_cnt <= ph_cnt + 1;
    seg_cyc <= seg_cyc + 1;
    if (dut.pm_norm != 0 && dut.upd_en) n_norm++;
    // stage: from symbol handshake through drain
    if (prev_phase == PH_DRAIN && phase != PH_DRAIN) n_stage++;
    if (phase == PH_SEARCH && prev_phase != PH_SEARCH) n_search++;
    if (phase == PH_BFLY && prev_phase == PH_WAIT && sym_valid == 0) ; // not reached
    if (dut.lk_done) n_lookup++;
    if (dut.lk_done && !out_valid) n_suppressed++;
  end

  // per-phase cycle counts (only measured with symbols always available)
  int t_stage_start, t_search_start, t_lookup_start, t_seg_start;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && check_timing) begin
    if (sym_valid && sym_ready) t_stage_start = cyc;
    if (phase == PH_DRAIN) begin
      if (cyc - t_stage_start + 1 > max_stage) max_stage = cyc - t_stage_start + 1;
    end
    if (phase == PH_SEARCH && prev_phase != PH_SEARCH) t_search_start = cyc;
    if (phase == PH_SDRAIN) begin
      if (cyc - t_search_start + 1 > max_search) max_search = cyc - t_search_start + 1;
    end
    if (phase == PH_LOOKUP && prev_phase != PH_LOOKUP) t_lookup_start = cyc;
    if (dut.lk_done) begin
      if (cyc - t_lookup_start + 1 > max_lookup) max_lookup = cyc - t_lookup_start + 1;
      if (t_seg_start > 0 && cyc - t_seg_start + 1 > max_segment) max_segment = cyc - t_seg_start + 1;
      t_seg_start = cyc + 1;
    end
  end

  function automatic string exp_str(input int sidx, input int l);
    string r;
    r = "";
    for (int p = l - 1; p >= 0; p--) begin
      int st;
      st = sidx * l + (l - 1 - p);
      r = {r, (st >= 0 && st < msg.size()) ? (msg[st] ? "1" : "0") : "?"};
    end
    return r;
  endfunction

  // output checker
  always @(posedge clk) if (rst_n) begin
    if (phase == PH_SEARCH && prev_phase != PH_SEARCH) seg_count <= seg_count + 1;
    if (out_valid) begin
      int sidx, l, bad;
      l = int'(ecfg.seg_len);
      sidx = seg_count - 1 - hops_of(int'(dec_depth), l);
      bad = 0;
      checks++;
      n_out++;
      if (out_len != ecfg.seg_len) bad = 1;
      for (int p = 0; p < l; p++) begin
        int st;
        st = sidx * l + (l - 1 - p);
        if (st < 0 || st >= msg.size() || out_bits[p] != msg[st]) bad = 1;
      end
      if (out_bits >> l != 0) bad = 1;
      if (bad) begin
        failures++;
        $display("FAIL segment %0d: got %b, expected %s", sidx, out_bits, exp_str(sidx, l));
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic run(input cfg_t c, input bit load, input int depth, input int nbits,
                     input int noise_pct, input int flip_permille, input bit stalls,
                     input int depth2, input int depth2_at_seg);
    int unsigned s;
    int l, h, total;
    logic [MAX_N-1:0] cw;
    l = int'(c.seg_len);
    h = hops_of(depth, l);
    if (depth2 > 0 && hops_of(depth2, l) > h) h = hops_of(depth2, l);
    total = ((nbits + (h + 1) * l + l - 1) / l) * l;
    msg.delete();
    for (int i = 0; i < total; i++) msg.push_back(i < nbits ? 1'($urandom) : 1'b0);
    @(negedge clk);
    ecfg = c;
    seg_count = 0;
    dec_depth = 8'(depth);
    if (load) begin
      cfg_in = c; cfg_load = 1; n_reconf++;
      @(negedge clk); cfg_load = 0;
    end
    s = 0;
    for (int i = 0; i < total; i++) begin
      cw = encode(c, s, msg[i]);
      s = (int'(msg[i]) << (c.k - 2)) | (s >> 1);
      for (int j = 0; j < MAX_N; j++) begin
        int v, e;
        v = cw[j] ? SOFT_MAX : 0;
        if ($urandom_range(99) < noise_pct) begin
          e = $urandom_range(3, 1);
          v = cw[j] ? v - e : v + e;
        end
        if (flip_permille > 0 && $urandom_range(999) < flip_permille) begin
          v = SOFT_MAX - v; n_hard_err++;
        end
        sym[j] = SOFT_W'(v);
      end
      if (stalls && $urandom_range(9) == 0) begin
        sym_valid = 0; n_stall++;
        repeat ($urandom_range(5, 1)) @(negedge clk);
      end
      sym_valid = 1;
      do @(posedge clk); while (!(sym_ready && sym_valid));
      @(negedge clk);
      sym_valid = 0;
      if (depth2 > 0 && i == depth2_at_seg * l) begin
        // wait until the pending look-ups are done, then change depth between segments
        wait (phase == PH_WAIT);
        dec_depth = 8'(depth2); n_depth_change++;
      end
    end
    // wait for the final segment's look-up
    wait (phase == PH_LOOKUP);
    wait (phase == PH_WAIT);
    repeat (3) @(negedge clk);
  endtask

  localparam cfg_t CFG_K3 = '{k: 3'd3, n: 3'd2, gen: {7'o0, 7'o0, 7'o7, 7'o5}, seg_len: 4'd14};
  localparam cfg_t CFG_K5 = '{k: 3'd5, n: 3'd3, gen: {7'o0, 7'o37, 7'o33, 7'o25}, seg_len: 4'd12};

  int n_out_before;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1) DAB at reset defaults, symbols always available: timing checked
    check_timing = 1;
    run(CFG_DAB, 0, 50, 200, 30, 15, 0, 0, 0);
    check_timing = 0;
    // 2) DAB with input stalls and a decision-depth change from 50 to 30 in flight
    run(CFG_DAB, 1, 50, 200, 30, 10, 1, 30, 10);
    // 3) K = 3, rate 1/2 (the example encoder), light noise
    run(CFG_K3, 1, 15, 150, 20, 0, 0, 0, 0);
    // 4) K = 5, rate 1/3
    n_out_before = n_out;
    run(CFG_K5, 1, 25, 150, 25, 5, 0, 0, 0);
    // 5) back to DAB
    run(CFG_DAB, 1, 50, 100, 30, 10, 0, 0, 0);

    // timing budget of the DAB configuration
    checks++; if (max_stage == 0 || max_stage > 42) begin failures++; $display("FAIL stage cycles %0d", max_stage); end
    checks++; if (max_search == 0 || max_search > 35) begin failures++; $display("FAIL search cycles %0d", max_search); end
    checks++; if (max_lookup == 0 || max_lookup > 15) begin failures++; $display("FAIL look-up cycles %0d", max_lookup); end
    checks++; if (max_segment == 0 || max_segment > 470) begin failures++; $display("FAIL segment cycles %0d", max_segment); end
    $display("DAB timing: stage %0d, search %0d, look-up %0d, segment %0d cycles",
             max_stage, max_search, max_lookup, max_segment);
    $display("events: stages %0d searches %0d look-ups %0d outputs %0d suppressed %0d reconf %0d depth-change %0d stalls %0d normalised %0d hard-errors %0d",
             n_stage, n_search, n_lookup, n_out, n_suppressed, n_reconf, n_depth_change, n_stall, n_norm, n_hard_err);
    checks++; if (n_stage == 0)        begin failures++; $display("FAIL no stage"); end
    checks++; if (n_search == 0)       begin failures++; $display("FAIL no search"); end
    checks++; if (n_out < 40)          begin failures++; $display("FAIL too few outputs"); end
    checks++; if (n_suppressed == 0)   begin failures++; $display("FAIL no warm-up"); end
    checks++; if (n_reconf < 3)        begin failures++; $display("FAIL no reconfiguration"); end
    checks++; if (n_depth_change == 0) begin failures++; $display("FAIL no depth change"); end
    checks++; if (n_stall == 0)        begin failures++; $display("FAIL no stall"); end
    checks++; if (n_norm == 0)         begin failures++; $display("FAIL no normalisation"); end
    checks++; if (n_hard_err == 0)     begin failures++; $display("FAIL no corrected error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
