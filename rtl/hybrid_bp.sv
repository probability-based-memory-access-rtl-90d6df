// hybrid_bp - McFarling hybrid branch predictor of the evaluated core.
//
// Three tables of saturating counters choose a direction for every fetched
// conditional branch:
//   * GAg: 8K 2-bit counters indexed by a 13-bit global history register (GHR);
//   * PAg: a 2K x 11-bit local history table indexed by the branch PC, whose
//     history indexes 2K 3-bit counters;
//   * chooser: 8K 2-bit counters indexed by the PC; >= 2 selects GAg.
// The table sizes are those of the document's evaluated core. How the chooser
// is indexed, the initial counter values and the history update policy are this
// design's own choices: the GHR is updated speculatively with the prediction
// and repaired from the branch's checkpoint on a misprediction; local histories
// and all counters are written when the branch resolves.
//
// Interface and timing: prediction is combinational from fetch_pc in the same
// cycle (pred_taken, ckpt, lctr). The core keeps ckpt with the branch and
// returns it on the resolve port, whose effect is visible from the next cycle.
// After reset the tables are cleared one index per cycle; ready rises when that
// is done (8K cycles) and no branch may be fetched or resolved before it.
module hybrid_bp
  import pmac_pkg::*;
#(
  parameter int unsigned PC_W   = 32,
  parameter int unsigned PC_LSB = 2     // instruction alignment
)(
  input  logic             clk,
  input  logic             rst_n,
  output logic             ready,
  // fetch
  input  logic             fetch_valid,
  input  logic [PC_W-1:0]  fetch_pc,
  output logic             pred_taken,
  output bp_ckpt_t         ckpt,
  output logic [LCTR_W-1:0] lctr,       // PAg counter read, for the self estimator
  // resolve
  input  logic             res_valid,
  input  logic [PC_W-1:0]  res_pc,
  input  logic             res_taken,
  input  bp_ckpt_t         res_ckpt,
  output logic             res_mispred
);
  localparam int unsigned GN = 1 << GHR_W;
  localparam int unsigned LN = 1 << LBHT_IW;
  localparam int unsigned PN = 1 << LHIST_W;

  logic [GCTR_W-1:0]  gpht   [GN];
  logic [GCTR_W-1:0]  choose [GN];
  logic [LHIST_W-1:0] lbht   [LN];
  logic [LCTR_W-1:0]  lpht   [PN];

  logic [GHR_W-1:0] ghr_q;
  logic [GHR_W:0]   init_q;            // sweep index, MSB set when done
  logic [GHR_W-1:0] init_idx;

  assign ready    = init_q[GHR_W];
  assign init_idx = init_q[GHR_W-1:0];

  // ---------------- prediction ----------------
  logic [GHR_W-1:0]   f_cidx;
  logic [LBHT_IW-1:0] f_lidx;
  logic [LHIST_W-1:0] f_lhist;
  logic [GCTR_W-1:0]  f_gctr, f_cctr;

  always_comb begin
    f_cidx  = fetch_pc[PC_LSB +: GHR_W];
    f_lidx  = fetch_pc[PC_LSB +: LBHT_IW];
    f_lhist = lbht[f_lidx];
    f_gctr  = gpht[ghr_q];
    f_cctr  = choose[f_cidx];
    lctr    = lpht[f_lhist];
    ckpt.ghr     = ghr_q;
    ckpt.lhist   = f_lhist;
    ckpt.g_taken = f_gctr[GCTR_W-1];
    ckpt.l_taken = lctr[LCTR_W-1];
    ckpt.pred_taken = f_cctr[GCTR_W-1] ? ckpt.g_taken : ckpt.l_taken;
    pred_taken   = ckpt.pred_taken;
  end

  // ---------------- resolution ----------------
  logic [GHR_W-1:0]   r_cidx;
  logic [LBHT_IW-1:0] r_lidx;
  logic [GCTR_W-1:0]  r_gctr, r_cctr;
  logic [LCTR_W-1:0]  r_lctr;

  assign res_mispred = res_valid && (res_taken != res_ckpt.pred_taken);

  always_comb begin
    r_cidx = res_pc[PC_LSB +: GHR_W];
    r_lidx = res_pc[PC_LSB +: LBHT_IW];
    r_gctr = gpht[res_ckpt.ghr];
    r_cctr = choose[r_cidx];
    r_lctr = lpht[res_ckpt.lhist];
  end

  function automatic logic [GCTR_W-1:0] sat2(logic [GCTR_W-1:0] c, logic up);
    if (up)  return (c == '1) ? c : c + 1'b1;
    else     return (c == '0) ? c : c - 1'b1;
  endfunction

  function automatic logic [LCTR_W-1:0] sat3(logic [LCTR_W-1:0] c, logic up);
    if (up)  return (c == '1) ? c : c + 1'b1;
    else     return (c == '0) ? c : c - 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  init_q <= '0;
    else if (!init_q[GHR_W])     init_q <= init_q + 1'b1;

  // tables: cleared by the sweep, then written at resolution
  always_ff @(posedge clk) begin
    if (!ready) begin
      gpht[init_idx]   <= GCTR_W'(1);   // weakly not taken
      choose[init_idx] <= GCTR_W'(2);   // weakly prefer global
      lbht[init_idx[LBHT_IW-1:0]] <= '0;
      lpht[init_idx[LHIST_W-1:0]] <= LCTR_W'(3);
    end else if (res_valid) begin
      gpht[res_ckpt.ghr]   <= sat2(r_gctr, res_taken);
      lpht[res_ckpt.lhist] <= sat3(r_lctr, res_taken);
      lbht[r_lidx]         <= {lbht[r_lidx][LHIST_W-2:0], res_taken};
      if (res_ckpt.g_taken != res_ckpt.l_taken)
        choose[r_cidx] <= sat2(r_cctr, res_ckpt.g_taken == res_taken);
    end
  end

  // speculative global history with repair on misprediction
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)               ghr_q <= '0;
    else if (res_mispred)     ghr_q <= {res_ckpt.ghr[GHR_W-2:0], res_taken};
    else if (fetch_valid)     ghr_q <= {ghr_q[GHR_W-2:0], pred_taken};

  a_no_fetch_before_ready: assert property (@(posedge clk) disable iff (!rst_n)
    !ready |-> !(fetch_valid || res_valid));
endmodule
