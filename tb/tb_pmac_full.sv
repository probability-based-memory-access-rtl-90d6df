// tb_pmac_full - end-to-end test of pmac_top with every parameter at its
// default: the first probability-table rewrite comes after 500000 cycles of
// traffic, followed by four 20000-cycle phases (dynamic, dynamic with a full
// window, static 0.90, static 0). Stimulus and checks are in tb_pmac_env.
module tb_pmac_full;
  import pmac_pkg::*;
  localparam int unsigned PTAR_N = 500000;   // the top's default, for the phase schedule

  logic clk, rst_n, ready;
  logic br_fetch_valid, br_pred_taken, br_res_valid, br_res_taken, br_res_mispred;
  logic [31:0] br_fetch_pc, br_res_pc;
  bid_t br_fetch_bid, cur_bid, br_res_bid, lsq_alloc_bid, tbr;
  conf_t br_conf;
  bp_ckpt_t br_ckpt, br_res_ckpt;
  logic lsq_alloc_valid, lsq_issue_valid, thr_static_en, tc, walking, rollback, stepping_back, cbpt_rewrite;
  logic [7:0] lsq_alloc_idx, lsq_issue_idx;
  logic [255:0] lsq_free_mask, lsq_ready, lsq_stall;
  logic [8:0] lsq_n_stalled, win_free;
  logic [6:0] thr_static, thr_pct;
  logic [63:0] ppr;

  pmac_top dut (.*);
  tb_pmac_env #(.PTAR_N(PTAR_N), .PHASE(20000)) env (.*);
endmodule
