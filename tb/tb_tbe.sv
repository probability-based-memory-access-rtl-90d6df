// tb_tbe - self-checking test of the throttling block estimator with its
// in-flight branch table.
// Bursts of random traffic (fetches, correct resolutions in any order,
// mispredictions that flush every younger branch) alternate with quiet
// periods. After each quiet period the estimator must have converged to the
// values computed from scratch over the branches still in flight: PPR is the
// sum of their probability codes up to the first branch whose running sum
// reaches PPTR, TBR is that branch and TC is set; if none reaches it, TC is
// clear, TBR is the youngest BlockID handed out and PPR is the whole sum.
// Each rollback after a misprediction at or before TBR must last exactly
// TBR - r + 1 cycles (one BlockID per cycle). Mispredictions also arrive
// during a rollback, of branches older than it and of branches fetched after
// it. Fetch-time updates, forward walks, rollbacks, nested mispredictions and
// mispredictions beyond TBR must all occur. The threshold code changes between
// rounds in both directions; after a drop TBR must step back to the oldest
// block at or below the new threshold, and such back steps must occur.
module tb_tbe;
  import pmac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fetch_valid = 0, res_valid = 0, res_mispred = 0, thr_en = 1;
  bid_t fetch_bid = 0, bidc = 0, res_bid = 0, tbr;
  conf_t fetch_conf = 0;
  enc_t cbpt [NCONF];
  enc_t pptr = 0;
  logic tc, walking, rollback, stepping_back;
  logic [63:0] ppr;
  int checks = 0, failures = 0;

  tbe dut (.clk, .rst_n, .fetch_valid, .fetch_bid, .fetch_conf, .bidc,
           .res_valid, .res_bid, .res_mispred, .cbpt, .pptr, .thr_en,
           .tbr, .tc, .ppr, .walking, .rollback, .stepping_back, .res_conf());

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // in-flight branches, oldest first (monotonic ids, BlockID = id % 256)
  int q_id [$];
  int q_cf [$];
  int nid = 0;
  int n_tc = 0, n_walk = 0, n_rb = 0, n_mis_after = 0, n_fetch_upd = 0, n_rel = 0;
  int rb_exp = -1, rb_len = 0, mis_hold = 0;
  int rb_first = 0;                 // youngest id when the last rollback began
  bit rb_pend = 0;                  // rollback requested or running
  int n_nest_young = 0, n_nest_old = 0, n_back = 0;
  logic tc_d = 0;

  function automatic bit le(int a, int b);   // a at or before b, modular
    return ((b - a + 256) % 256) < 128;
  endfunction

  task automatic converge_check();
    longint cum = 0;
    int j = -1;
    for (int k = 0; k < q_id.size(); k++) begin
      cum += cbpt[q_cf[k]];
      if (cum >= pptr) begin j = k; break; end
    end
    if (j >= 0) begin
      check(tc && tbr == bid_t'(q_id[j] % 256) && ppr == 64'(cum),
            $sformatf("converged, throttling: tc=%0d tbr=%0d ppr=%0d exp tbr=%0d ppr=%0d", tc, tbr, ppr, q_id[j] % 256, cum));
    end else begin
      check(!tc && tbr == bid_t'(nid % 256) && ppr == 64'(cum),
            $sformatf("converged, free: tc=%0d tbr=%0d ppr=%0d exp tbr=%0d ppr=%0d", tc, tbr, ppr, nid % 256, cum));
    end
  endtask

  initial begin
    enc_t ths [4];
    ths = '{16'd156, 16'd1024, 16'd3000, 16'd7000};
    foreach (cbpt[i]) cbpt[i] = enc_t'($urandom_range(0, 2500));
    cbpt[0] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int round = 0; round < 400; round++) begin
      if (round % 3 == 0) pptr = ths[$urandom_range(0, 3)];
      // burst
      for (int c = 0; c < 60; c++) begin
        bit do_mis;
        int k;
        fetch_valid = 0; res_valid = 0; res_mispred = 0; do_mis = 0;
        if ($urandom_range(0, 99) == 0) pptr = ths[$urandom_range(0, 3)];   // change under traffic
        if (q_id.size() > 0 && $urandom_range(0, 9) < 4) begin
          k = (nid - q_id[0] > 110) ? 0 : $urandom_range(0, q_id.size() - 1);
          do_mis = (mis_hold == 0) && $urandom_range(0, 5) == 0;
          res_valid = 1; res_mispred = do_mis; res_bid = bid_t'(q_id[k] % 256);
          if (do_mis && (rollback || rb_pend)) begin
            // nested: the rollback in progress changes length, so only the
            // converged state is checked for it
            if (q_id[k] > rb_first) n_nest_young++; else n_nest_old++;
            rb_exp = -1;
            mis_hold = 3;
            while (q_id.size() > k) begin void'(q_id.pop_back()); void'(q_cf.pop_back()); end
          end else if (do_mis) begin
            rb_first = nid;
            if (le(q_id[k] % 256, tbr)) begin
              rb_exp = ((tbr - res_bid) & 8'hff) + 1; rb_len = 0; rb_pend = 1;
            end else n_mis_after++;
            mis_hold = 3;
            while (q_id.size() > k) begin void'(q_id.pop_back()); void'(q_cf.pop_back()); end
          end else begin
            q_id.delete(k); q_cf.delete(k);
          end
        end
        if (!do_mis && $urandom_range(0, 1) == 1 && (q_id.size() == 0 || nid + 1 - q_id[0] < 110)) begin
          fetch_valid = 1;
          fetch_bid = bid_t'((nid + 1) % 256);
          fetch_conf = conf_t'($urandom_range(0, 44));
          if (!tc && tbr == bidc && !rollback) n_fetch_upd++;
        end
        @(posedge clk);
        if (fetch_valid) begin
          nid++;
          q_id.push_back(nid); q_cf.push_back(fetch_conf);
        end
        #1;
        bidc = bid_t'(nid % 256);
        if (mis_hold > 0) mis_hold--;
        @(negedge clk);
      end
      fetch_valid = 0; res_valid = 0; res_mispred = 0;
      // quiet period
      repeat (300) @(posedge clk);
      @(negedge clk);
      converge_check();
    end
    check(n_back > 10, $sformatf("back steps %0d", n_back));
    $display("TBR back steps after a threshold rise: %0d", n_back);
    check(n_nest_young > 5 && n_nest_old > 1,
          $sformatf("nested mispredictions: younger %0d older %0d", n_nest_young, n_nest_old));
    $display("nested mispredictions during a rollback: younger branch %0d, older branch %0d", n_nest_young, n_nest_old);
    check(n_tc > 20 && n_walk > 100 && n_rb > 20 && n_mis_after > 5 && n_fetch_upd > 50 && n_rel > 10,
          $sformatf("mechanisms: tc-set %0d walk %0d rollback %0d mis-after-tbr %0d fetch-update %0d release %0d",
                    n_tc, n_walk, n_rb, n_mis_after, n_fetch_upd, n_rel));
    $display("mechanisms: tc-set %0d walk-steps %0d rollbacks %0d mispredicts-after-TBR %0d fetch-updates %0d releases %0d",
             n_tc, n_walk, n_rb, n_mis_after, n_fetch_upd, n_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters and the rollback length check
  always @(posedge clk) if (rst_n) begin
    if (tc && !tc_d) n_tc++;
    if (!tc && tc_d) n_rel++;
    tc_d <= tc;
    if (walking) n_walk++;
    if (stepping_back) n_back++;
    if (rollback) rb_len++;
    if (!rollback && rb_len > 0) begin
      rb_pend = 0;
      if (rb_exp >= 0) begin
        check(rb_len == rb_exp, $sformatf("rollback took %0d cycles, expected %0d", rb_len, rb_exp));
        n_rb++;
      end
      rb_len = 0; rb_exp = -1;
    end
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
