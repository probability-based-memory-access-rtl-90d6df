// conf_est - composite Up/Down + JRS + Self branch confidence estimator.
//
// The confidence of a fetched branch is the sum of three estimates:
//   * enhanced JRS: a 3-bit miss distance counter, from a 4K table indexed by the
//     low 12 bits of the global history after the new prediction has been
//     shifted in; it counts up on a correct prediction and is cleared on a
//     misprediction;
//   * Up/Down: a 5-bit counter, from a 1K table indexed by the low 10 bits of the
//     branch's local history; up on a correct prediction, down on a misprediction;
//   * Self: from the 3-bit PAg counter c, c when the prediction is taken and
//     7-c when it is not taken.
// The sum lies in 0..45; the document counts 45 buckets (0..44), so the single
// top value 45 is merged into bucket 44. The result is held in 6 bits.
// The table sizes, counter widths and counting rules follow the document. Which
// predictor counter feeds the Self estimate (the 3-bit local one, whatever
// component the chooser picked), the counters' start value of zero and the
// update at resolution time are this design's choices.
//
// Interface and timing: conf is combinational from the fetch-side inputs in the
// same cycle. The resolve port updates both tables at the next clock edge,
// using the indices recomputed from the branch's checkpoint. After reset the
// tables are cleared one index per cycle (4K cycles), flagged by ready.
module conf_est
  import pmac_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,
  // fetch side (from hybrid_bp in the same cycle)
  input  bp_ckpt_t          f_ckpt,
  input  logic [LCTR_W-1:0] f_lctr,
  output conf_t             conf,
  // resolve side
  input  logic              res_valid,
  input  logic              res_mispred,
  input  bp_ckpt_t          res_ckpt
);
  localparam int unsigned MN = 1 << MDC_IW;
  localparam int unsigned UN = 1 << UDC_IW;

  logic [MDC_W-1:0] mdc [MN];
  logic [UDC_W-1:0] udc [UN];
  logic [MDC_IW:0]  init_q;
  logic [MDC_IW-1:0] init_idx;

  assign ready    = init_q[MDC_IW];
  assign init_idx = init_q[MDC_IW-1:0];

  function automatic logic [MDC_IW-1:0] mdc_index(bp_ckpt_t c);
    logic [GHR_W-1:0] h;
    h = {c.ghr[GHR_W-2:0], c.pred_taken};
    return h[MDC_IW-1:0];
  endfunction

  function automatic logic [UDC_IW-1:0] udc_index(bp_ckpt_t c);
    return c.lhist[UDC_IW-1:0];
  endfunction

  logic [MDC_W-1:0]  c_jrs;
  logic [UDC_W-1:0]  c_ud;
  logic [LCTR_W-1:0] c_self;
  conf_t             sum;

  always_comb begin
    c_jrs  = mdc[mdc_index(f_ckpt)];
    c_ud   = udc[udc_index(f_ckpt)];
    c_self = f_ckpt.pred_taken ? f_lctr : ~f_lctr;   // 2^n - c - 1
    sum    = conf_t'(c_jrs) + conf_t'(c_ud) + conf_t'(c_self);
    conf   = (sum > conf_t'(NCONF - 1)) ? conf_t'(NCONF - 1) : sum;
  end

  logic [MDC_IW-1:0] r_m;
  logic [UDC_IW-1:0] r_u;
  logic [MDC_W-1:0]  r_mv;
  logic [UDC_W-1:0]  r_uv;

  always_comb begin
    r_m  = mdc_index(res_ckpt);
    r_u  = udc_index(res_ckpt);
    r_mv = mdc[r_m];
    r_uv = udc[r_u];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                init_q <= '0;
    else if (!init_q[MDC_IW])  init_q <= init_q + 1'b1;

  always_ff @(posedge clk) begin
    if (!ready) begin
      mdc[init_idx] <= '0;
      udc[init_idx[UDC_IW-1:0]] <= '0;
    end else if (res_valid) begin
      if (res_mispred) begin
        mdc[r_m] <= '0;
        udc[r_u] <= (r_uv == '0) ? r_uv : r_uv - 1'b1;
      end else begin
        mdc[r_m] <= (r_mv == '1) ? r_mv : r_mv + 1'b1;
        udc[r_u] <= (r_uv == '1) ? r_uv : r_uv + 1'b1;
      end
    end
  end
endmodule
