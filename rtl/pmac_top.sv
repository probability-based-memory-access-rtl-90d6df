// pmac_top - probability-based memory access controller beside an out-of-order
// core.
//
// PMAC holds back data memory requests of loads and stores that are unlikely to
// be on the correct program path. Every fetched branch gets a BlockID, a
// prediction and a confidence value; the confidence picks a bucket whose
// measured correct-prediction rate is the branch's probability. The product of
// these probabilities over the in-flight branches gives each program block a
// path probability, tracked in the log domain by the throttling block
// estimator. The oldest block at or below the threshold is the throttling block
// (TBR); with TC set, the LSQ holds every memory instruction from that block on,
// until older branches resolve correctly (release) or a misprediction flushes
// them. The threshold is static or varied with window occupancy and the number
// of held instructions.
//
// Units: bid_counter (BIDC), hybrid_bp (McFarling predictor), conf_est
// (composite confidence), pred_rate_est (BFCT/BCCT/CBPT/PTAR), tbe (PPR, TBR,
// TC, with the in-flight table bbct), thr_ctrl (PPTR), lsq_throttle (LSQ
// BlockID/stall bits and LSU pick filter). The core itself is outside: its
// fetch unit, branch units, instruction window and LSQ talk to the ports below.
//
// Interface and timing:
//   * ready rises once the predictor tables are cleared after reset (8K cycles).
//   * Fetch: br_fetch_valid with br_fetch_pc gives, in the same cycle,
//     br_pred_taken, br_conf, br_ckpt and br_fetch_bid; instructions fetched
//     after the branch carry cur_bid (from the next cycle). A fetch in the
//     cycle of a misprediction is ignored.
//   * Resolve: br_res_valid with the branch's PC, BlockID, outcome and
//     checkpoint; br_res_mispred tells the core whether it was mispredicted.
//   * LSQ: lsq_alloc_* when an entry is written, lsq_free_mask when entries
//     leave, lsq_ready for entries able to issue; lsq_issue_* is the pick.
//   * win_free: free instruction window entries, for the dynamic threshold.
//   * tbr, tc, ppr, walking, rollback, stepping_back, cbpt_rewrite: state and
//     activity of the estimator, for observation.
module pmac_top
  import pmac_pkg::*;
#(
  parameter int unsigned PC_W   = 32,
  parameter int unsigned LSQ_N  = 256,
  parameter int unsigned WIN_N  = 256,
  parameter int unsigned PTAR_N = 500000,
  parameter int unsigned K1     = 128,
  parameter int unsigned K2     = 32,
  parameter int unsigned C1     = 8,
  parameter int unsigned C2     = 8
)(
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     ready,
  // fetch
  input  logic                     br_fetch_valid,
  input  logic [PC_W-1:0]          br_fetch_pc,
  output bid_t                     br_fetch_bid,
  output logic                     br_pred_taken,
  output conf_t                    br_conf,
  output bp_ckpt_t                 br_ckpt,
  output bid_t                     cur_bid,
  // resolve
  input  logic                     br_res_valid,
  input  logic [PC_W-1:0]          br_res_pc,
  input  bid_t                     br_res_bid,
  input  logic                     br_res_taken,
  input  bp_ckpt_t                 br_res_ckpt,
  output logic                     br_res_mispred,
  // LSQ / LSU
  input  logic                     lsq_alloc_valid,
  input  logic [$clog2(LSQ_N)-1:0] lsq_alloc_idx,
  input  bid_t                     lsq_alloc_bid,
  input  logic [LSQ_N-1:0]         lsq_free_mask,
  input  logic [LSQ_N-1:0]         lsq_ready,
  output logic                     lsq_issue_valid,
  output logic [$clog2(LSQ_N)-1:0] lsq_issue_idx,
  output logic [$clog2(LSQ_N+1)-1:0] lsq_n_stalled,
  output logic [LSQ_N-1:0]         lsq_stall,      // per-entry stall bits
  // threshold
  input  logic [$clog2(WIN_N+1)-1:0] win_free,
  input  logic                     thr_static_en,
  input  logic [6:0]               thr_static,
  output logic [6:0]               thr_pct,
  // throttle state
  output bid_t                     tbr,
  output logic                     tc,
  output logic [63:0]              ppr,            // path probability code of block tbr
  output logic                     walking,
  output logic                     rollback,
  output logic                     stepping_back,
  output logic                     cbpt_rewrite   // probability table being rewritten
);
  localparam int unsigned M_W = $clog2(LSQ_N+1);

  logic bp_ready, ce_ready, fetch, res;
  logic [LCTR_W-1:0] lctr;
  enc_t cbpt [NCONF];
  enc_t pptr;
  logic thr_en;

  assign ready = bp_ready && ce_ready;
  assign res   = br_res_valid && ready;
  assign fetch = br_fetch_valid && ready && !br_res_mispred;

  bid_counter u_bidc (
    .clk, .rst_n, .inc(fetch), .new_bid(br_fetch_bid), .cur_bid
  );

  hybrid_bp #(.PC_W(PC_W)) u_bp (
    .clk, .rst_n, .ready(bp_ready),
    .fetch_valid(fetch), .fetch_pc(br_fetch_pc),
    .pred_taken(br_pred_taken), .ckpt(br_ckpt), .lctr,
    .res_valid(res), .res_pc(br_res_pc), .res_taken(br_res_taken),
    .res_ckpt(br_res_ckpt), .res_mispred(br_res_mispred)
  );

  conf_est u_ce (
    .clk, .rst_n, .ready(ce_ready),
    .f_ckpt(br_ckpt), .f_lctr(lctr), .conf(br_conf),
    .res_valid(res), .res_mispred(br_res_mispred), .res_ckpt(br_res_ckpt)
  );

  // confidence of the resolving branch, read from the in-flight table
  conf_t res_conf;

  pred_rate_est #(.PTAR_N(PTAR_N)) u_pre (
    .clk, .rst_n,
    .fetch_valid(fetch), .fetch_conf(br_conf),
    .commit_valid(res && !br_res_mispred), .commit_conf(res_conf),
    .cbpt, .sweep_busy(cbpt_rewrite)
  );

  tbe u_tbe (
    .clk, .rst_n,
    .fetch_valid(fetch), .fetch_bid(br_fetch_bid), .fetch_conf(br_conf), .bidc(cur_bid),
    .res_valid(res), .res_bid(br_res_bid), .res_mispred(br_res_mispred),
    .cbpt, .pptr, .thr_en,
    .tbr, .tc, .ppr, .walking, .rollback, .stepping_back, .res_conf
  );

  thr_ctrl #(.WIN_N(WIN_N), .M_W(M_W), .K1(K1), .K2(K2), .C1(C1), .C2(C2)) u_thr (
    .clk, .rst_n, .win_free, .n_stalled(lsq_n_stalled),
    .static_en(thr_static_en), .static_thr(thr_static),
    .thr_pct, .pptr, .thr_en
  );

  lsq_throttle #(.LSQ_N(LSQ_N)) u_lsq (
    .clk, .rst_n,
    .alloc_valid(lsq_alloc_valid), .alloc_idx(lsq_alloc_idx), .alloc_bid(lsq_alloc_bid),
    .free_mask(lsq_free_mask), .ready(lsq_ready), .tbr, .tc,
    .issue_valid(lsq_issue_valid), .issue_idx(lsq_issue_idx),
    .stall(lsq_stall), .n_stalled(lsq_n_stalled)
  );
endmodule
