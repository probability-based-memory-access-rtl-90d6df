// tb_pmac_sweep - static threshold sweep of pmac_top: the same synthetic
// program is run at thresholds 0 (baseline), 0.05, 0.10, ... 0.95 for 20000
// cycles each, the evaluation's set of static thresholds. The probability
// table is rewritten every 2000 cycles instead of 500000; everything else is
// at its default. It prints correct- and wrong-path memory requests per
// threshold and checks that the high thresholds let fewer wrong-path requests
// through than the baseline. Stimulus and checks are in tb_pmac_env (MODE 1).
module tb_pmac_sweep;
  import pmac_pkg::*;
  localparam int unsigned PTAR_N = 20000;

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

  pmac_top #(.PTAR_N(PTAR_N)) dut (.*);
  tb_pmac_env #(.PTAR_N(PTAR_N), .PHASE(20000), .MODE(1)) env (.*);

  // outer watchdog; the environment's own checks end the run long before
  initial begin
    repeat (int'(PTAR_N) + 20 * 20000 + 500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
