// tb_pmac_env - core model, stimulus and checker for end-to-end tests of
// pmac_top. Used by tb_pmac_top (shortened probability-table period) and
// tb_pmac_full (all defaults); it drives every input of the top and reads
// every output.
//
// The core model fetches at most one instruction per cycle: a branch (30 %),
// a load or store (35 %) or another instruction. Branches come from 24 static
// branches with different behaviour (always taken, periodic, biased random)
// so that confidence buckets see different accuracy. After a branch whose
// prediction is wrong the model fetches down the wrong path until that branch
// resolves. Branches resolve oldest first after a random latency; a
// mispredicted one flushes every younger branch and memory instruction.
// Memory instructions enter the LSQ with the current BlockID, become ready
// after a few cycles and leave when the LSU picks them. The window occupancy
// is modelled as 4 entries per unresolved branch plus the LSQ occupancy.
//
// Phases (after the first probability-table rewrite): dynamic threshold with
// short latencies, dynamic threshold with long latencies (window fills,
// threshold falls and resets), static threshold 0.90, static 0 (baseline,
// throttling must stay off), then a drain. With MODE = 1 the phases are
// instead a sweep of static thresholds: 0 (baseline), 0.05, 0.10, ... 0.95,
// with medium latencies; it prints correct- and wrong-path memory requests
// per threshold and checks that the high thresholds let fewer wrong-path
// requests through than the baseline.
//
// Checks: the misprediction flag; BlockIDs; every pick is a live, ready entry
// not held by the throttle (stall bit = BlockID at or after the previous
// cycle's TBR, while TC is set); the stall vector and held count; no
// throttling in the baseline phase; PPR back to 0 and TC clear when drained.
// Counts, and fails if any is zero: throttle engaged, load held, held load
// released and issued, held wrong-path load flushed, forward walk, rollback,
// TBR stepped back after a threshold rise,
// probability-table rewrite, threshold raised, lowered and reset, static mode.
module tb_pmac_env
  import pmac_pkg::*;
#(
  parameter int unsigned PTAR_N = 500000,
  parameter int unsigned PHASE  = 20000,
  parameter int unsigned MODE   = 0        // 0: mechanism test, 1: static threshold sweep
)(
  output logic             clk,
  output logic             rst_n,
  input  logic             ready,
  output logic             br_fetch_valid,
  output logic [31:0]      br_fetch_pc,
  input  bid_t             br_fetch_bid,
  input  logic             br_pred_taken,
  input  conf_t            br_conf,
  input  bp_ckpt_t         br_ckpt,
  input  bid_t             cur_bid,
  output logic             br_res_valid,
  output logic [31:0]      br_res_pc,
  output bid_t             br_res_bid,
  output logic             br_res_taken,
  output bp_ckpt_t         br_res_ckpt,
  input  logic             br_res_mispred,
  output logic             lsq_alloc_valid,
  output logic [7:0]       lsq_alloc_idx,
  output bid_t             lsq_alloc_bid,
  output logic [255:0]     lsq_free_mask,
  output logic [255:0]     lsq_ready,
  input  logic             lsq_issue_valid,
  input  logic [7:0]       lsq_issue_idx,
  input  logic [8:0]       lsq_n_stalled,
  input  logic [255:0]     lsq_stall,
  output logic [8:0]       win_free,
  output logic             thr_static_en,
  output logic [6:0]       thr_static,
  input  logic [6:0]       thr_pct,
  input  bid_t             tbr,
  input  logic             tc,
  input  logic [63:0]      ppr,
  input  logic             walking,
  input  logic             rollback,
  input  logic             stepping_back,
  input  logic             cbpt_rewrite
);
  int checks = 0, failures = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit ge(int a, int b);
    return ((a - b + 256) % 256) < 128;
  endfunction

  // ---- clock ----
  initial clk = 0;
  always #5 clk = ~clk;

  // ---- static branches ----
  int sb_pc [24];
  int sb_kind [24];
  int sb_n [24];

  function automatic bit sb_outcome(int s);
    int n = sb_n[s];
    case (sb_kind[s])
      0: return 1'b1;
      1: return (n % 4) != 3;
      2: return (n % 2) == 0;
      3: return $urandom_range(0, 99) < 90;
      4: return $urandom_range(0, 99) < 70;
      default: return $urandom_range(0, 99) < 50;
    endcase
  endfunction

  // ---- in-flight branches (oldest first) ----
  typedef struct {
    int       seq;
    int       bid;
    int       pc;
    bp_ckpt_t ck;
    bit       actual;
    bit       wrong;     // fetched on the wrong path
    int       due;
  } br_t;
  br_t brq [$];

  // ---- LSQ model ----
  bit lv [256];
  int lbid [256], lseq [256], lrdy [256];
  bit lwrong [256];
  bit lheld [256];       // has been held at least once

  int seq = 0, now = 0, last_bid = 0, wrong_mode = 0;
  int lat_lo = 5, lat_hi = 40;
  localparam int NPH = (MODE == 1) ? 20 : 4;   // phases
  int ph_ok [NPH+1], ph_wrong [NPH+1], ph_held [NPH+1], ph_mis [NPH+1], ph_walloc [NPH+1], ph_full [NPH+1];
  int tbr_prev = 0;
  int phase = 0;
  int zero_age = 0;          // cycles the static threshold has been 0

  // mechanism counters
  int n_tc = 0, n_hold = 0, n_release = 0, n_flush_held = 0, n_walk = 0, n_rb = 0, n_back = 0;
  int n_rewrite = 0, n_up = 0, n_down = 0, n_reset = 0, n_static = 0, n_mis = 0;
  int n_issue_ok = 0, n_issue_wrong = 0, n_flush_wrong = 0;
  logic tc_d = 0, rw_d = 0;
  int thr_d = 1;
  bit full_d1 = 0, full_d2 = 0;

  function automatic int lsq_count();
    int c = 0;
    foreach (lv[i]) c += lv[i];
    return c;
  endfunction

  function automatic int occupancy();
    int o = 4 * brq.size() + lsq_count();
    return (o > 256) ? 256 : o;
  endfunction

  initial begin
    int t0, t_end;
    rst_n = 0;
    br_fetch_valid = 0; br_fetch_pc = 0; br_res_valid = 0; br_res_pc = 0; br_res_bid = 0;
    br_res_taken = 0; br_res_ckpt = '0; lsq_alloc_valid = 0; lsq_alloc_idx = 0; lsq_alloc_bid = 0;
    lsq_free_mask = '0; lsq_ready = '0; win_free = 9'd256; thr_static_en = 0; thr_static = 0;
    foreach (sb_pc[i]) begin sb_pc[i] = 32'h1000 + 64 * i + 4 * $urandom_range(0, 7); sb_kind[i] = i % 6; sb_n[i] = 0; end
    foreach (lv[i]) lv[i] = 0;
    foreach (ph_ok[i]) begin ph_ok[i] = 0; ph_wrong[i] = 0; ph_held[i] = 0; ph_mis[i] = 0; ph_walloc[i] = 0; ph_full[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (!ready) @(negedge clk);
    t0 = int'(PTAR_N) + 100;
    t_end = t0 + NPH * int'(PHASE);
    while (now < t_end + 3000) begin
      step();
    end
    // drained: nothing in flight
    check(brq.size() == 0, "all branches resolved");
    repeat (400) @(negedge clk);
    check(!tc && ppr == 0, $sformatf("drained: tc=%0d ppr=%0d", tc, ppr));
    if (MODE == 0) begin
      check(n_tc > 0,         "throttle engaged");
      check(n_hold > 0,       "load held");
      check(n_release > 0,    "held load released and issued");
      check(n_flush_held > 0, "held wrong-path load flushed");
      check(n_walk > 0,       "forward walk");
      check(n_rb > 0,         "rollback");
      check(n_back > 0,       "TBR stepped back after a threshold rise");
      check(n_rewrite > 0,    "probability table rewrite");
      check(n_up > 0,         "threshold raised");
      check(n_down > 0,       "threshold lowered");
      check(n_reset > 0,      "threshold reset on full window");
      check(n_static > 0,     "static threshold throttling");
    end else begin
      // memory requests per threshold; higher thresholds must let fewer
      // wrong-path requests through than the baseline
      real fb, fw;
      $display("threshold  correct-path  wrong-path  wrong %%  released-after-hold  mispredicts  wrong-allocated  window-full-cycles");
      for (int q = 1; q <= NPH; q++)
        $display("  %4.2f  %10d  %10d  %6.2f  %10d  %8d  %8d  %8d", real'(q == 1 ? 0 : 5 * (q - 1)) / 100.0,
                 ph_ok[q], ph_wrong[q], 100.0 * ph_wrong[q] / (ph_ok[q] + ph_wrong[q] + 1), ph_held[q], ph_mis[q], ph_walloc[q], ph_full[q]);
      fb = real'(ph_wrong[1]) / (ph_ok[1] + ph_wrong[1] + 1);
      fw = real'(ph_wrong[NPH]) / (ph_ok[NPH] + ph_wrong[NPH] + 1);
      check(ph_held[1] == 0, "nothing held at threshold 0");
      check(ph_held[NPH] > 0, "loads held at threshold 0.95");
      check(fw < fb, $sformatf("wrong-path share at 0.95 (%0.3f) below baseline (%0.3f)", fw, fb));
      check(ph_wrong[NPH] < ph_wrong[1], "fewer wrong-path requests at 0.95 than at 0");
      check(n_static > 0, "static threshold throttling");
    end
    $display("mechanisms: throttle-on %0d held-loads %0d released %0d flushed-while-held %0d walk-steps %0d rollback-cycles %0d back-steps %0d",
             n_tc, n_hold, n_release, n_flush_held, n_walk, n_rb, n_back);
    $display("            table-rewrites %0d thr-up %0d thr-down %0d thr-reset %0d static-throttle-cycles %0d mispredicts %0d",
             n_rewrite, n_up, n_down, n_reset, n_static, n_mis);
    $display("memory requests: correct path %0d, wrong path %0d; wrong-path entries flushed unissued %0d",
             n_issue_ok, n_issue_wrong, n_flush_wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cycle of the core model, starting and ending at a falling edge
  task automatic step();
    int t0, p;
    bit mis_now;
    t0 = int'(PTAR_N) + 100;
    p = (now < t0) ? 0 : 1 + (now - t0) / int'(PHASE);
    phase = p;
    // phase settings
    if (MODE == 1) begin
      // sweep: baseline 0, then 0.05, 0.10, ... 0.95
      thr_static_en = 1'b1;
      thr_static    = (p >= 2 && p <= NPH) ? 7'(5 * (p - 1)) : 7'd0;
      lat_lo = 20; lat_hi = 120;
    end else begin
      thr_static_en = (p == 3 || p == 4);
      thr_static    = (p == 3) ? 7'd90 : 7'd0;
      if (p == 2) begin lat_lo = 60; lat_hi = 300; end
      else        begin lat_lo = 5;  lat_hi = 40;  end
    end
    win_free = 9'(256 - occupancy());
    if (p >= 1 && p <= NPH && occupancy() >= 256) ph_full[p]++;

    // ---- resolution of the oldest branch ----
    br_res_valid = 0;
    mis_now = 0;
    if (brq.size() > 0 && brq[0].due <= now) begin
      br_t b = brq[0];
      check(!b.wrong, "oldest branch is on the correct path");
      br_res_valid = 1; br_res_pc = b.pc; br_res_bid = bid_t'(b.bid);
      br_res_taken = b.actual; br_res_ckpt = b.ck;
      mis_now = b.actual != b.ck.pred_taken;
    end

    // ---- fetch ----
    br_fetch_valid = 0;
    lsq_alloc_valid = 0;
    if (!mis_now && now < t0 + NPH * int'(PHASE) && occupancy() < 256 && $urandom_range(0, 9) < 9) begin
      int r = $urandom_range(0, 99);
      bit span_ok = brq.size() == 0 || (seq_bid_span() < 110);
      if (r < 30 && span_ok) begin
        int s = $urandom_range(0, 23);
        br_fetch_valid = 1; br_fetch_pc = sb_pc[s];
        #1;
        begin
          br_t nb;
          nb.seq = ++seq; nb.bid = br_fetch_bid; nb.pc = sb_pc[s]; nb.ck = br_ckpt;
          nb.wrong = wrong_mode != 0;
          nb.actual = nb.wrong ? br_pred_taken : sb_outcome(s);
          if (!nb.wrong) sb_n[s]++;
          nb.due = now + $urandom_range(lat_lo, lat_hi);
          if (brq.size() > 0 && nb.due < brq[$].due) nb.due = brq[$].due;
          check(br_fetch_bid == bid_t'(last_bid + 1), "fetched branch BlockID");
          check(br_conf <= 44, "confidence in range");
          last_bid = (last_bid + 1) % 256;
          brq.push_back(nb);
          if (!nb.wrong && nb.actual != br_pred_taken) wrong_mode = nb.seq;
        end
      end else if (r < 65) begin
        int idx = -1;
        for (int i = 0; i < 256; i++) if (!lv[i]) begin idx = i; break; end
        if (idx >= 0) begin
          lsq_alloc_valid = 1; lsq_alloc_idx = 8'(idx); lsq_alloc_bid = bid_t'(last_bid);
          #1 check(cur_bid == bid_t'(last_bid), "block of fetched instructions");
        end
      end
    end

    // ---- LSU: readiness, pick, checks ----
    for (int i = 0; i < 256; i++) lsq_ready[i] = lv[i] && (lrdy[i] <= now);
    lsq_free_mask = '0;
    #1;
    if (br_res_valid) begin
      check(br_res_mispred == mis_now, "misprediction flag");
    end
    begin
      int held = 0;
      for (int i = 0; i < 256; i++) begin
        bit st;
        st = ge(lbid[i], tbr_prev);
        if (lv[i] && lsq_stall[i] != st) begin check(0, $sformatf("stall bit %0d", i)); break; end
        if (lv[i] && st && tc) begin
          held++;
          if (lsq_ready[i] && !lheld[i]) begin lheld[i] = 1; n_hold++; end
        end
      end
      check(lsq_n_stalled == 9'(held), "held count");
    end
    if (lsq_issue_valid) begin
      int i = lsq_issue_idx;
      check(lv[i] && lsq_ready[i] && !(tc && ge(lbid[i], tbr_prev)), "pick is a live, ready, unheld entry");
      if (lheld[i]) n_release++;
      if (lwrong[i]) n_issue_wrong++; else n_issue_ok++;
      if (p >= 1 && p <= NPH) begin
        if (lwrong[i]) ph_wrong[p]++; else ph_ok[p]++;
        if (lheld[i]) ph_held[p]++;
      end
      lsq_free_mask[i] = 1'b1;
    end
    // a misprediction flushes every younger memory instruction
    if (br_res_valid && mis_now)
      for (int i = 0; i < 256; i++)
        if (lv[i] && lseq[i] > brq[0].seq) lsq_free_mask[i] = 1'b1;
    // PPTR and TC are both registered: TC follows a new threshold two cycles later
    if (thr_static_en && thr_static == 0) zero_age++; else zero_age = 0;
    if (zero_age > 2) check(!tc, "no throttling at threshold 0");
    if (thr_static_en && thr_static != 0 && tc) n_static++;

    // ---- clock edge ----
    @(posedge clk);
    tbr_prev = tbr;
    if (lsq_issue_valid) lv[lsq_issue_idx] = 0;
    if (lsq_alloc_valid) begin
      int i = lsq_alloc_idx;
      lv[i] = 1; lbid[i] = lsq_alloc_bid; lseq[i] = ++seq; lrdy[i] = now + $urandom_range(1, 6);
      lwrong[i] = wrong_mode != 0; lheld[i] = 0;
      if (phase >= 1 && phase <= NPH && wrong_mode != 0) ph_walloc[phase]++;
    end
    if (br_res_valid) begin
      br_t b = brq.pop_front();
      if (mis_now) begin
        n_mis++;
        if (phase >= 1 && phase <= NPH) ph_mis[phase]++;
        while (brq.size() > 0) void'(brq.pop_back());
        for (int i = 0; i < 256; i++)
          if (lv[i] && lseq[i] > b.seq) begin
            if (lheld[i]) n_flush_held++;
            n_flush_wrong++;
            lv[i] = 0;
          end
        wrong_mode = 0;
      end
    end
    now++;
    @(negedge clk);
  endtask

  function automatic int seq_bid_span();
    return (last_bid - brq[0].bid + 256) % 256;
  endfunction

  // mechanism observation
  always @(posedge clk) if (rst_n && ready) begin
    if (tc && !tc_d) n_tc++;
    tc_d <= tc;
    if (walking) n_walk++;
    if (rollback) n_rb++;
    if (stepping_back) n_back++;
    if (cbpt_rewrite && !rw_d) n_rewrite++;
    rw_d <= cbpt_rewrite;
    if (!thr_static_en) begin
      if (int'(thr_pct) > thr_d) n_up++;
      if (int'(thr_pct) < thr_d && !full_d2) n_down++;
      // a full window with held instructions sends the threshold to 0.01
      if (full_d2) begin
        n_reset++;
        check(thr_pct == 7'd1, "threshold 0.01 after a full window");
      end
    end
    thr_d <= int'(thr_pct);
    full_d2 = full_d1;
    full_d1 = (win_free == 0) && (lsq_n_stalled != 0) && !thr_static_en;
  end

  initial begin
    repeat (int'(PTAR_N) + NPH * int'(PHASE) + 400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
