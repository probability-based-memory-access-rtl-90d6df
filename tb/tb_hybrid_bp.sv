// tb_hybrid_bp - self-checking test of the McFarling hybrid predictor.
// A reference model with its own tables (same sizes, initial values and
// counter rules) predicts every branch. Branches are fetched in groups of one
// to four and resolved oldest first; a misprediction discards the younger
// branches of the group, so the speculative global history and its repair are
// exercised. Prediction, checkpoint and the misprediction flag are compared,
// and the 8K-cycle table clear after reset is timed.
module tb_hybrid_bp;
  import pmac_pkg::*;
  logic clk = 0, rst_n = 0, ready;
  logic fetch_valid = 0, res_valid = 0, res_taken = 0, pred_taken, res_mispred;
  logic [31:0] fetch_pc = 0, res_pc = 0;
  bp_ckpt_t ckpt, res_ckpt;
  logic [2:0] lctr;
  int checks = 0, failures = 0;

  hybrid_bp dut (.clk, .rst_n, .ready, .fetch_valid, .fetch_pc, .pred_taken, .ckpt, .lctr,
                 .res_valid, .res_pc, .res_taken, .res_ckpt, .res_mispred);

  always #5 clk = ~clk;

  // reference model
  int gp [8192], ch [8192], lb [2048], lp [2048];
  int ghr;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int satu(int c, int mx, bit up);
    if (up) return (c == mx) ? c : c + 1;
    return (c == 0) ? 0 : c - 1;
  endfunction

  // branch outcome rule: each PC has its own pattern
  function automatic bit outcome(int pc, int n);
    case (pc % 4)
      0: return 1'b1;
      1: return (n % 3) != 0;
      2: return (n % 2) == 0;
      default: return $urandom_range(0, 1);
    endcase
  endfunction

  int pcs [16];
  int cnt [16];
  int cyc;
  int nmis = 0;

  initial begin
    foreach (gp[i]) begin gp[i] = 1; ch[i] = 2; end
    foreach (lb[i]) begin lb[i] = 0; lp[i] = 3; end
    ghr = 0;
    foreach (pcs[i]) begin pcs[i] = $urandom & 32'h0000_fffc; cnt[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    while (!ready) begin @(posedge clk); cyc++; end
    check(cyc == 8192 || cyc == 8193, "table clear takes 8K cycles");
    for (int grp = 0; grp < 3000; grp++) begin
      int n;
      int gpc [4]; bp_ckpt_t gck [4]; bit gtk [4];
      n = $urandom_range(1, 4);
      for (int k = 0; k < n; k++) begin
        int p, pc;
        int li, lh, gi, ci; bit gt, lt, pt;
        p = $urandom_range(0, 15);
        pc = pcs[p];
        @(negedge clk);
        fetch_valid = 1; fetch_pc = pc;
        li = (pc >> 2) % 2048; lh = lb[li]; gi = ghr; ci = (pc >> 2) % 8192;
        gt = gp[gi] >= 2; lt = lp[lh] >= 4; pt = (ch[ci] >= 2) ? gt : lt;
        #1;
        check(pred_taken == pt, "prediction");
        check(ckpt.ghr == 13'(gi) && ckpt.lhist == 11'(lh) && ckpt.g_taken == gt && ckpt.l_taken == lt, "checkpoint");
        check(lctr == 3'(lp[lh]), "local counter");
        gpc[k] = pc; gck[k] = ckpt; gtk[k] = outcome(p, cnt[p]); cnt[p]++;
        @(posedge clk);
        ghr = ((ghr << 1) | pt) & 8191;
      end
      @(negedge clk); fetch_valid = 0;
      for (int k = 0; k < n; k++) begin
        bit mis; int li, ci;
        @(negedge clk);
        res_valid = 1; res_pc = gpc[k]; res_taken = gtk[k]; res_ckpt = gck[k];
        mis = gtk[k] != gck[k].pred_taken;
        #1 check(res_mispred == mis, "mispredict flag");
        @(posedge clk);
        li = (gpc[k] >> 2) % 2048; ci = (gpc[k] >> 2) % 8192;
        gp[gck[k].ghr] = satu(gp[gck[k].ghr], 3, gtk[k]);
        lp[gck[k].lhist] = satu(lp[gck[k].lhist], 7, gtk[k]);
        lb[li] = ((lb[li] << 1) | gtk[k]) & 2047;
        if (gck[k].g_taken != gck[k].l_taken) ch[ci] = satu(ch[ci], 3, gck[k].g_taken == gtk[k]);
        if (mis) begin
          nmis++;
          ghr = ((gck[k].ghr << 1) | gtk[k]) & 8191;
          break;
        end
      end
      @(negedge clk); res_valid = 0;
    end
    check(nmis > 100 && nmis < 9000, $sformatf("mispredictions seen: %0d", nmis));
    $display("mispredictions %0d", nmis);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
