// tb_pred_rate_est - self-checking test of the prediction rate estimator.
// PTAR_N is shortened to 400 cycles. Random fetches and correct resolutions
// with a different commit ratio per bucket are counted by a model between
// rewrites; after each rewrite every CBPT entry must equal
// round(-1024*log2(commits/fetches)) within one code step (0 when
// commits >= fetches, all ones when there were no commits, unchanged when
// there were no fetches). The rewrite must start every PTAR_N cycles and take
// one cycle per bucket.
module tb_pred_rate_est;
  import pmac_pkg::*;
  localparam int N = 400;
  logic clk = 0, rst_n = 0;
  logic fetch_valid = 0, commit_valid = 0, sweep_busy;
  conf_t fetch_conf = 0, commit_conf = 0;
  enc_t cbpt [NCONF];
  int checks = 0, failures = 0;
  int F [NCONF], C [NCONF], prev [NCONF];
  real p [NCONF];

  pred_rate_est #(.PTAR_N(N)) dut (.clk, .rst_n, .fetch_valid, .fetch_conf,
                                   .commit_valid, .commit_conf, .cbpt, .sweep_busy);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int ref_enc(int c, int f);
    real r;
    if (c == 0) return 65535;
    if (c >= f) return 0;
    r = -1024.0 * $ln(real'(c) / real'(f)) / $ln(2.0);
    return int'(r + 0.5);
  endfunction

  initial begin
    int t;
    foreach (F[i]) begin F[i] = 0; C[i] = 0; prev[i] = 0; end
    foreach (p[i]) p[i] = (i == 7) ? 1.2 : ((i == 9) ? 0.0 : real'($urandom_range(5, 100)) / 100.0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    t = 0;
    while (t < 12 * N) begin
      int ph;
      ph = t % N;
      // drive inputs for cycle t
      fetch_valid = 0; commit_valid = 0;
      if (ph >= 50 && ph < N - 10) begin
        fetch_valid = $urandom_range(0, 9) < 8;
        fetch_conf  = conf_t'($urandom_range(0, 43));   // bucket 44 is never fetched
        commit_conf = conf_t'($urandom_range(0, 43));
        commit_valid = (real'($urandom_range(0, 999)) / 1000.0) < p[commit_conf] * 0.8;
      end
      #1;
      check(sweep_busy == (t >= N && ph < NCONF), "rewrite timing");
      if (t >= N && ph == 50) begin
        for (int b = 0; b < NCONF; b++) begin
          int e, d;
          e = (F[b] == 0) ? prev[b] : ref_enc(C[b], F[b]);
          d = int'(cbpt[b]) - e;
          check(d >= -1 && d <= 1, $sformatf("cbpt[%0d]=%0d expected %0d (C=%0d F=%0d)", b, cbpt[b], e, C[b], F[b]));
          prev[b] = int'(cbpt[b]);
          F[b] = 0; C[b] = 0;
        end
      end
      @(posedge clk);
      if (fetch_valid) F[fetch_conf]++;
      if (commit_valid) C[commit_conf]++;
      t++;
      @(negedge clk);
    end
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
