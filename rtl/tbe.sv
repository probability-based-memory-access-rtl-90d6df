// tbe - throttling block estimator: finds the oldest in-flight program block
// whose path probability is at or below the threshold.
//
// The path probability of block j is the product of the correct-prediction
// rates of all unresolved branches up to and including branch j, so it can only
// fall from older to younger blocks. In the log code the product is a sum:
// the path probability register PPR holds the sum of the codes of the in-flight
// branches up to the block in the throttling block register TBR. The throttle
// control bit TC is set when PPR >= PPTR in code, that is when the probability
// of block TBR is at or below the threshold; the load-store unit then holds
// every memory instruction of block TBR and younger.
//
// Events, each as the document describes them, in the log domain:
//   * branch fetch (TC clear, TBR caught up with the BlockID counter): add the
//     branch's code to PPR, TBR <= its BlockID, re-evaluate TC;
//   * forward walk (TC clear, TBR behind the counter): one BlockID per cycle,
//     TBR+1 is looked up in the tracking table and, if still in flight, its
//     code is added; TBR advances and TC is re-evaluated, until TC sets or
//     TBR reaches the youngest branch;
//   * correct resolution of a branch at or before TBR: its code is subtracted
//     (the "division"), TC is re-evaluated and the walk resumes if it cleared;
//   * misprediction of a branch r at or before TBR: the codes of the in-flight
//     branches from TBR down to r are subtracted one per cycle (rollback), their
//     entries cleared; entries after TBR are cleared at once. TBR then jumps to
//     the youngest flushed BlockID and the forward walk resumes. A
//     misprediction after TBR only clears the flushed entries.
//   * backward step (TC set, no rollback): when the block before TBR is also at
//     or below the threshold, which happens after the threshold has risen, TBR
//     moves back one BlockID per cycle and drops that branch's code, so TBR is
//     again the oldest such block.
// This design's own choices: one fetch and one resolution per cycle; a fetch in
// the cycle of a misprediction is on the wrong path and ignored; codes are read
// from CBPT at resolution time, so a CBPT rewrite between fetch and resolution
// can leave a small error in PPR, which is clamped at zero and cleared whenever
// no branch is in flight; the subtraction on a correct resolution is done
// whether or not TC is set (the document states it for TC set); nested
// mispredictions during a rollback; the backward step, which keeps TBR the
// oldest block at or below a threshold that changes.
//
// Interface and timing: all inputs act at the next clock edge; tbr/tc/ppr are
// registers. Contains the in-flight branch tracking table (bbct).
module tbe
  import pmac_pkg::*;
#(
  parameter int unsigned PPR_W = 64
)(
  input  logic  clk,
  input  logic  rst_n,
  // fetch
  input  logic  fetch_valid,
  input  bid_t  fetch_bid,     // BlockID given to the fetched branch
  input  conf_t fetch_conf,
  input  bid_t  bidc,          // youngest BlockID handed out before this cycle
  // resolution
  input  logic  res_valid,
  input  bid_t  res_bid,
  input  logic  res_mispred,
  // probabilities and threshold
  input  enc_t  cbpt [NCONF],
  input  enc_t  pptr,
  input  logic  thr_en,
  // state
  output bid_t  tbr,
  output logic  tc,
  output logic [PPR_W-1:0] ppr,
  output logic  walking,       // forward walk step taken this cycle
  output logic  rollback,      // rollback step taken this cycle
  output logic  stepping_back, // backward step taken this cycle
  output conf_t res_conf       // confidence of the resolving branch (table read)
);
  bid_t tbr_q, rb_ptr_q, rb_low_q, ftop_q;
  logic tc_q, rb_q;
  logic [PPR_W-1:0] ppr_q;

  assign tbr = tbr_q;
  assign tc  = tc_q;
  assign ppr = ppr_q;

  // ---- tracking table ----
  logic  wr_en, clr0_en, clr1_en, rclr_en;
  bid_t  clr0_bid, clr1_bid, rclr_lo, rclr_hi, cand;
  logic  a_v, b_v, c_v, any_valid;
  conf_t a_c, b_c, c_c;

  bbct u_bbct (
    .clk, .rst_n,
    .wr_en, .wr_bid(fetch_bid), .wr_conf(fetch_conf),
    .clr0_en, .clr0_bid, .clr1_en, .clr1_bid,
    .rclr_en, .rclr_lo, .rclr_hi,
    .rd_a_bid(cand),     .rd_a_valid(a_v), .rd_a_conf(a_c),
    .rd_b_bid(res_bid),  .rd_b_valid(b_v), .rd_b_conf(b_c),
    .rd_c_bid(rb_ptr_q), .rd_c_valid(c_v), .rd_c_conf(c_c),
    .any_valid
  );

  // ---- next state ----
  logic mis, cor, fetch, walk_ok, caught, walk_mem, walk_fetch;
  bid_t rb_low_eff, ftop_eff;
  logic [PPR_W-1:0] add, sub, base, sum, ppr_n;
  bid_t tbr_n, rb_ptr_n, rb_low_n, ftop_n;
  logic rb_n, tc_n, walk_back;
  logic [PPR_W-1:0] back_code, pre;
  localparam bid_t BACK_MAX = bid_t'((1 << (BID_W - 1)) - 2);

  always_comb begin
    mis   = res_valid && res_mispred;
    cor   = res_valid && !res_mispred;
    fetch = fetch_valid && !mis;
    cand  = tc_q ? tbr_q : tbr_q + bid_t'(1);   // back step reads TBR, walk TBR+1

    wr_en    = fetch;
    clr0_en  = cor;
    clr0_bid = res_bid;
    clr1_en  = rb_q;
    clr1_bid = rb_ptr_q;
    rclr_en  = 1'b0;
    rclr_lo  = tbr_q;
    rclr_hi  = bidc;

    add = '0;
    sub = '0;
    tbr_n    = tbr_q;
    rb_n     = rb_q;
    rb_ptr_n = rb_ptr_q;
    rb_low_n = rb_low_q;
    ftop_n   = ftop_q;

    // correct resolution inside the PPR region
    if (cor && b_v && bid_le(res_bid, tbr_q))
      sub = PPR_W'(cbpt[b_c]);

    // misprediction
    rb_low_eff = rb_low_q;
    ftop_eff   = ftop_q;
    if (mis) begin
      rclr_en = 1'b1;
      if (rb_q && bid_in_range(res_bid, ftop_q, bidc)) begin
        // a branch fetched after the misprediction being rolled back: it is
        // beyond TBR, so only it and its younger branches are cleared
        rclr_lo  = res_bid - bid_t'(1);
      end else if (rb_q) begin
        // an older branch: the rollback now ends at it
        rclr_lo    = rb_ptr_q;
        rb_low_eff = res_bid;
        ftop_eff   = bidc;
      end else if (bid_le(res_bid, tbr_q)) begin
        rclr_lo  = tbr_q;
        rb_n     = 1'b1;
        rb_ptr_n = tbr_q;
        rb_low_n = res_bid;
        ftop_n   = bidc;
      end else begin
        rclr_lo  = res_bid - bid_t'(1);
      end
    end

    // rollback step
    if (rb_q) begin
      rb_low_n = rb_low_eff;
      ftop_n   = ftop_eff;
      if (c_v) sub = sub + PPR_W'(cbpt[c_c]);
      if (rb_ptr_q == rb_low_eff) begin
        rb_n    = 1'b0;
        tbr_n   = ftop_eff;
      end else begin
        rb_ptr_n = rb_ptr_q - bid_t'(1);
      end
    end

    // forward walk / fetch update
    walk_ok    = !rb_q && !tc_q && !mis;
    caught     = (tbr_q == bidc);
    walk_mem   = walk_ok && !caught;
    walk_fetch = walk_ok && caught && fetch;
    if (walk_mem) begin
      tbr_n = cand;
      if (a_v && !(cor && res_bid == cand)) add = PPR_W'(cbpt[a_c]);
    end else if (walk_fetch) begin
      tbr_n = fetch_bid;
      add   = PPR_W'(cbpt[fetch_conf]);
    end

    // backward step (TC set, e.g. after the threshold rose): if the block
    // before TBR is also at or below the threshold, TBR moves back one BlockID
    // and drops the code of its branch. Bounded to the BlockID distance limit.
    base      = any_valid ? ppr_q : '0;
    back_code = (a_v && !(cor && res_bid == tbr_q)) ? PPR_W'(cbpt[a_c]) : '0;
    pre       = (base > sub) ? base - sub : '0;
    walk_back = !rb_q && tc_q && !mis && thr_en && (bid_t'(bidc - tbr_q) < BACK_MAX) &&
                (pre >= back_code) && (pre - back_code >= PPR_W'(pptr));
    if (walk_back) begin
      tbr_n = tbr_q - bid_t'(1);
      sub   = sub + back_code;
    end

    sum  = base + add;
    if (sum < base) sum = '1;              // saturate
    ppr_n = (sum > sub) ? sum - sub : '0;  // probability never above 1
    tc_n  = thr_en && (ppr_n >= PPR_W'(pptr));
  end

  assign walking  = walk_mem;
  assign rollback = rb_q;
  assign stepping_back = walk_back;
  assign res_conf = b_c;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tbr_q    <= '0;
      tc_q     <= 1'b0;
      ppr_q    <= '0;
      rb_q     <= 1'b0;
      rb_ptr_q <= '0;
      rb_low_q <= '0;
      ftop_q   <= '0;
    end else begin
      tbr_q    <= tbr_n;
      tc_q     <= tc_n;
      ppr_q    <= ppr_n;
      rb_q     <= rb_n;
      rb_ptr_q <= rb_ptr_n;
      rb_low_q <= rb_low_n;
      ftop_q   <= ftop_n;
    end

  a_fetch_is_next: assert property (@(posedge clk) disable iff (!rst_n)
    fetch_valid |-> fetch_bid == bidc + bid_t'(1));
endmodule
