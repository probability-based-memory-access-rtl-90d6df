// tb_thr_ctrl - self-checking test of the threshold controller (PPTR).
// Directed phases, then random ones, drive the window occupancy and the
// number of stalled memory instructions. A model of the threshold rules
// (step sizes, zones and the interval n = K1*2^(m/C1) or K2/2^(m/C2)) gives the
// expected threshold every cycle; the register must match, and PPTR must equal
// round(-1024*log2(t/100)) within one step. Directed checks also time the
// intervals: with an empty window the first step comes after exactly 128
// cycles, and a full window with stalls returns to 0.01 in one cycle.
module tb_thr_ctrl;
  import pmac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [8:0] win_free = 256, n_stalled = 0;
  logic static_en = 0, thr_en;
  logic [6:0] static_thr = 0, thr_pct;
  enc_t pptr;
  int checks = 0, failures = 0;
  int t, cnt, cyc;
  int ups = 0, downs = 0, fulls = 0;

  thr_ctrl dut (.clk, .rst_n, .win_free, .n_stalled, .static_en, .static_thr, .thr_pct, .pptr, .thr_en);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (t=%0d dut=%0d)", what, $time, t, thr_pct);
    end
  endtask

  function automatic int ref_enc(int tt);
    if (tt == 0) return 65535;
    if (tt >= 100) return 0;
    return int'(-1024.0 * $ln(real'(tt) / 100.0) / $ln(2.0) + 0.5);
  endfunction

  // one model step with the inputs of this cycle
  task automatic model_step();
    bit up, dn, full, mv;
    longint nup, ndn, nsel;
    int m = n_stalled, f = win_free;
    up   = f * 100 >= 256 * 25;
    dn   = (f * 100 <= 256 * 15) && m > 0;
    full = (f == 0) && m > 0;
    nup  = (m / 8 >= 24) ? 64'h8000_0000 : (64'd128 << (m / 8));
    ndn  = (m / 8 >= 31) ? 1 : (32 >> (m / 8));
    if (ndn == 0) ndn = 1;
    nsel = up ? nup : ndn;
    mv   = (up || dn) && (cnt + 1 >= nsel);
    if (full) begin t = 1; fulls++; end
    else if (mv && up) begin
      if (t <= 50) t += 10; else if (t < 95) t += 1;
      ups++;
    end else if (mv && dn) begin
      t = (t > 11) ? t - 10 : 1;
      downs++;
    end
    cnt = (mv || !(up || dn)) ? 0 : cnt + 1;
  endtask

  task automatic run(int cycles, int f, int m);
    for (int i = 0; i < cycles; i++) begin
      int t_prev;
      win_free = 9'(f); n_stalled = 9'(m);
      t_prev = t;
      @(posedge clk);
      model_step();
      cyc++;
      #1;
      // thr_pct shows the threshold of the previous cycle
      check(int'(thr_pct) == t_prev, "threshold");
      @(negedge clk);
    end
  endtask

  initial begin
    int first;
    t = 1; cnt = 0; cyc = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // empty window, nothing stalled: first step after 128 cycles
    first = -1;
    for (int i = 0; i < 200; i++) begin
      run(1, 256, 0);
      if (first < 0 && thr_pct == 7'd11) first = i + 1;
    end
    check(first == 129, $sformatf("first raise seen after %0d cycles (128, plus one for the output register)", first));
    run(6500, 256, 0);
    check(thr_pct == 7'd95, "threshold saturates at 0.95");
    run(300, 100, 20);         // 39 % free: step every 128<<2 cycles
    run(300, 45, 3);           // 17.6 % free: hold
    run(200, 30, 16);          // 11.7 % free, stalls: down every 8 cycles
    run(20, 0, 4);             // full with stalls: back to 0.01
    check(thr_pct == 7'd1, "full window resets to 0.01");
    for (int ph = 0; ph < 60; ph++)
      run($urandom_range(10, 600), $urandom_range(0, 256), $urandom_range(0, 40));
    // PPTR code against the real logarithm
    for (int tt = 1; tt <= 100; tt++) begin
      int d;
      static_en = 1; static_thr = 7'(tt);
      @(posedge clk); #1;
      d = int'(pptr) - ref_enc(tt);
      check(d >= -1 && d <= 1 && thr_pct == 7'(tt) && thr_en, $sformatf("pptr for %0d: %0d vs %0d", tt, pptr, ref_enc(tt)));
      @(negedge clk);
    end
    static_thr = 0;
    @(posedge clk); #1 check(!thr_en, "static 0 disables throttling");
    check(ups > 20 && downs > 5 && fulls > 0, $sformatf("all moves seen: up %0d down %0d full %0d", ups, downs, fulls));
    $display("moves: up %0d down %0d full-reset %0d", ups, downs, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
