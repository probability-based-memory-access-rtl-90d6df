// tb_conf_est - self-checking test of the composite confidence estimator.
// Random checkpoints and local counter values are offered on the fetch side
// and random resolutions on the resolve side; a model of the 4K miss distance
// and 1K up/down tables predicts the confidence, which must equal
// JRS + Up/Down + Self (the top value 45 merged into 44) and stay within the 45 buckets 0..44.
module tb_conf_est;
  import pmac_pkg::*;
  logic clk = 0, rst_n = 0, ready;
  bp_ckpt_t f_ckpt, res_ckpt;
  logic [2:0] f_lctr;
  conf_t conf;
  logic res_valid = 0, res_mispred = 0;
  int checks = 0, failures = 0;
  int mdc [4096], udc [1024];
  int maxc = 0;

  conf_est dut (.clk, .rst_n, .ready, .f_ckpt, .f_lctr, .conf, .res_valid, .res_mispred, .res_ckpt);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bp_ckpt_t rnd_ckpt();
    bp_ckpt_t c;
    c = bp_ckpt_t'({$urandom, $urandom});
    c.ghr[12:4] = '0;        // few histories so counters get reused
    c.lhist[10:4] = '0;
    return c;
  endfunction

  initial begin
    int cyc = 0;
    foreach (mdc[i]) mdc[i] = 0;
    foreach (udc[i]) udc[i] = 0;
    f_ckpt = '0; res_ckpt = '0; f_lctr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (!ready) begin @(posedge clk); cyc++; end
    check(cyc == 4096 || cyc == 4097, "table clear takes 4K cycles");
    for (int it = 0; it < 20000; it++) begin
      int mi, ui, self, exp;
      @(negedge clk);
      f_ckpt = rnd_ckpt();
      f_lctr = 3'($urandom);
      mi = ((f_ckpt.ghr << 1) | f_ckpt.pred_taken) & 4095;
      ui = f_ckpt.lhist & 1023;
      self = f_ckpt.pred_taken ? f_lctr : 7 - f_lctr;
      exp = mdc[mi] + udc[ui] + self;
      if (exp > 44) exp = 44;
      #1;
      check(conf == conf_t'(exp), "confidence sum");
      check(conf <= 44, "confidence range");
      if (conf > maxc) maxc = conf;
      res_valid = $urandom_range(0, 1);
      res_ckpt = rnd_ckpt();
      res_mispred = $urandom_range(0, 9) == 0;
      @(posedge clk);
      if (res_valid) begin
        mi = ((res_ckpt.ghr << 1) | res_ckpt.pred_taken) & 4095;
        ui = res_ckpt.lhist & 1023;
        if (res_mispred) begin
          mdc[mi] = 0;
          udc[ui] = (udc[ui] == 0) ? 0 : udc[ui] - 1;
        end else begin
          mdc[mi] = (mdc[mi] == 7) ? 7 : mdc[mi] + 1;
          udc[ui] = (udc[ui] == 31) ? 31 : udc[ui] + 1;
        end
      end
    end
    check(maxc >= 40, "high confidence values reached");
    $display("max confidence seen %0d", maxc);
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
