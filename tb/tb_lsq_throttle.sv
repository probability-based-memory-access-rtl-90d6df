// tb_lsq_throttle - self-checking test of the LSQ stall bits and the LSU pick
// filter (256 entries). Random allocations with BlockIDs near a moving TBR,
// random frees, ready vectors and TC values are applied; a model holds the
// entries and their stall bits (BlockID at or after the previous cycle's TBR)
// and predicts the picked entry, the stall vector and the count of held
// entries. It also checks that a held entry is released once TBR passes it.
module tb_lsq_throttle;
  import pmac_pkg::*;
  localparam int N = 256;
  logic clk = 0, rst_n = 0;
  logic alloc_valid = 0, tc = 0, issue_valid;
  logic [7:0] alloc_idx = 0, issue_idx;
  bid_t alloc_bid = 0, tbr = 0;
  logic [N-1:0] free_mask = '0, ready = '0, stall;
  logic [8:0] n_stalled;
  int checks = 0, failures = 0;
  bit mv [N], ms [N];
  int mb [N];
  int releases = 0, holds = 0;

  lsq_throttle dut (.clk, .rst_n, .alloc_valid, .alloc_idx, .alloc_bid, .free_mask, .ready,
                    .tbr, .tc, .issue_valid, .issue_idx, .stall, .n_stalled);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit ge(int a, int b);
    return ((a - b + 256) % 256) < 128;
  endfunction

  initial begin
    foreach (mv[i]) begin mv[i] = 0; ms[i] = 0; mb[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      int exp_idx, cnt;
      bit exp_v;
      // new inputs
      if ($urandom_range(0, 7) == 0) tbr = tbr + bid_t'($urandom_range(0, 3));
      tc = $urandom_range(0, 3) != 0;
      alloc_idx = 8'($urandom);
      alloc_valid = $urandom_range(0, 1) && !mv[alloc_idx];
      alloc_bid = tbr + bid_t'($urandom_range(0, 12)) - bid_t'(6);
      free_mask = '0;
      for (int k = 0; k < 4; k++) free_mask[$urandom_range(0, N - 1)] = 1'b1;
      free_mask[alloc_idx] = 1'b0;
      for (int i = 0; i < N; i++) ready[i] = $urandom_range(0, 1);
      #1;
      // expected outputs (combinational on the current state)
      exp_v = 0; exp_idx = 0; cnt = 0;
      for (int i = N - 1; i >= 0; i--)
        if (mv[i] && ready[i] && !(tc && ms[i])) begin exp_v = 1; exp_idx = i; end
      for (int i = 0; i < N; i++) if (mv[i] && ms[i] && tc) cnt++;
      check(issue_valid == exp_v && (!exp_v || issue_idx == 8'(exp_idx)), "pick");
      check(n_stalled == 9'(cnt), "held count");
      for (int i = 0; i < N; i++)
        if (mv[i] && stall[i] != ms[i]) begin check(0, $sformatf("stall bit %0d dut %0d model %0d bid %0d tbr %0d", i, stall[i], ms[i], mb[i], tbr)); break; end
      holds += cnt;
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (alloc_valid && alloc_idx == 8'(i)) begin
          mv[i] = 1; mb[i] = alloc_bid; ms[i] = ge(alloc_bid, tbr);
        end else begin
          bit ns;
          ns = mv[i] && ge(mb[i], tbr);
          if (ms[i] && !ns && mv[i]) releases++;
          ms[i] = ns;
          if (free_mask[i]) mv[i] = 0;
        end
      end
      @(negedge clk);
    end
    check(releases > 100 && holds > 1000, $sformatf("holds %0d releases %0d", holds, releases));
    $display("held entry-cycles %0d, releases %0d", holds, releases);
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
