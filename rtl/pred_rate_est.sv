// pred_rate_est - prediction rate estimator: correct-prediction rate per
// confidence bucket.
//
// Branches are grouped by their confidence value (45 buckets of size one). Two
// tables of 16-bit saturating counters count, per bucket, the branches fetched
// (BFCT) and the branches that resolved with a correct prediction (BCCT). The
// probability table age register (PTAR) counts cycles; when it reaches N it is
// cleared and the probability table (CBPT) is rewritten with commits/fetches of
// every bucket, stored in the log code Enc(p) = -1024*log2(p).
// All of that follows the document. This design's own choices: the rewrite
// visits one bucket per cycle (NCONF cycles), clearing that bucket's two
// counters as it goes so each bucket restarts a fresh period; a bucket with no
// fetches keeps its previous rate; commits >= fetches gives probability 1;
// CBPT starts at code 0 (probability 1), so nothing is throttled before the
// first rewrite. The division is done as a difference of two logarithms
// (pmac_pkg::log2_q12), so CBPT never holds a plain fraction.
//
// Interface and timing: fetch_valid/fetch_conf and commit_valid/commit_conf
// count at the next clock edge. cbpt is the whole table, read combinationally
// by the throttling block estimator. sweep_busy is high while the rewrite runs.
module pred_rate_est
  import pmac_pkg::*;
#(
  parameter int unsigned PTAR_W = 24,
  parameter int unsigned PTAR_N = 500000,   // cycles between CBPT rewrites
  parameter int unsigned CNT_W  = 16
)(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fetch_valid,
  input  conf_t fetch_conf,
  input  logic  commit_valid,
  input  conf_t commit_conf,
  output enc_t  cbpt [NCONF],
  output logic  sweep_busy
);
  logic [CNT_W-1:0]  bfct [NCONF];
  logic [CNT_W-1:0]  bcct [NCONF];
  logic [PTAR_W-1:0] ptar_q;
  logic              sweep_q;
  conf_t             sidx_q;

  assign sweep_busy = sweep_q;

  // PTAR and the sweep over the buckets
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ptar_q  <= '0;
      sweep_q <= 1'b0;
      sidx_q  <= '0;
    end else begin
      if (ptar_q == PTAR_W'(PTAR_N - 1)) begin
        ptar_q  <= '0;
        sweep_q <= 1'b1;
        sidx_q  <= '0;
      end else begin
        ptar_q <= ptar_q + 1'b1;
        if (sweep_q) begin
          if (sidx_q == conf_t'(NCONF - 1)) sweep_q <= 1'b0;
          sidx_q <= sidx_q + 1'b1;
        end
      end
    end

  logic [CNT_W-1:0] s_f, s_c;
  enc_t             s_enc;

  always_comb begin
    s_f   = bfct[sidx_q];
    s_c   = bcct[sidx_q];
    s_enc = enc_ratio(s_c, s_f);
  end

  // counters
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < NCONF; i++) begin
        bfct[i] <= '0;
        bcct[i] <= '0;
        cbpt[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NCONF; i++) begin
        logic clr, f_inc, c_inc;
        clr   = sweep_q && (sidx_q == conf_t'(i));
        f_inc = fetch_valid  && (fetch_conf  == conf_t'(i));
        c_inc = commit_valid && (commit_conf == conf_t'(i));
        if (clr) begin
          bfct[i] <= CNT_W'(f_inc);
          bcct[i] <= CNT_W'(c_inc);
          if (s_f != '0) cbpt[i] <= s_enc;
        end else begin
          if (f_inc && bfct[i] != '1) bfct[i] <= bfct[i] + 1'b1;
          if (c_inc && bcct[i] != '1) bcct[i] <= bcct[i] + 1'b1;
        end
      end
    end

  a_conf_range: assert property (@(posedge clk) disable iff (!rst_n)
    (fetch_valid |-> fetch_conf < conf_t'(NCONF)) and (commit_valid |-> commit_conf < conf_t'(NCONF)));
endmodule
