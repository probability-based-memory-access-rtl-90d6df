// tb_bbct - self-checking test of the in-flight branch tracking table.
// Random writes, single clears, range clears (lo, hi] and reads on all three
// ports are compared with an array model; the write-over-clear priority and
// the modular range are exercised, including ranges that wrap past 255.
module tb_bbct;
  import pmac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, clr0_en, clr1_en, rclr_en;
  bid_t wr_bid, clr0_bid, clr1_bid, rclr_lo, rclr_hi, ra, rb, rc;
  conf_t wr_conf, ca, cb, cc;
  logic va, vb, vc, any_valid;
  int checks = 0, failures = 0;
  bit    mv [256];
  int    mc [256];

  bbct dut (.clk, .rst_n, .wr_en, .wr_bid, .wr_conf, .clr0_en, .clr0_bid,
            .clr1_en, .clr1_bid, .rclr_en, .rclr_lo, .rclr_hi,
            .rd_a_bid(ra), .rd_a_valid(va), .rd_a_conf(ca),
            .rd_b_bid(rb), .rd_b_valid(vb), .rd_b_conf(cb),
            .rd_c_bid(rc), .rd_c_valid(vc), .rd_c_conf(cc), .any_valid);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit in_rng(int a, int lo, int hi);
    int da = (a - lo + 256) % 256, dh = (hi - lo + 256) % 256;
    return da != 0 && da <= dh;
  endfunction

  initial begin
    {wr_en, clr0_en, clr1_en, rclr_en} = '0;
    {wr_bid, clr0_bid, clr1_bid, rclr_lo, rclr_hi, ra, rb, rc, wr_conf} = '0;
    foreach (mv[i]) mv[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      // reads against the model
      ra = bid_t'($urandom); rb = bid_t'($urandom); rc = bid_t'($urandom);
      #1;
      check(va == mv[ra] && (!mv[ra] || ca == conf_t'(mc[ra])), "port a");
      check(vb == mv[rb] && (!mv[rb] || cb == conf_t'(mc[rb])), "port b");
      check(vc == mv[rc] && (!mv[rc] || cc == conf_t'(mc[rc])), "port c");
      begin
        bit any = 0;
        foreach (mv[i]) any |= mv[i];
        check(any_valid == any, "any_valid");
      end
      wr_bid  = bid_t'($urandom);
      wr_en   = $urandom_range(0, 1) && !mv[wr_bid];   // live entries are never rewritten
      wr_conf = conf_t'($urandom_range(0, 44));
      clr0_en = $urandom_range(0, 2) == 0;
      clr0_bid = ($urandom_range(0, 3) == 0) ? wr_bid : bid_t'($urandom);
      clr1_en = $urandom_range(0, 2) == 0;
      clr1_bid = bid_t'($urandom);
      rclr_en = $urandom_range(0, 15) == 0;
      rclr_lo = bid_t'($urandom);
      rclr_hi = rclr_lo + bid_t'($urandom_range(0, 60));
      @(posedge clk);
      for (int i = 0; i < 256; i++) begin
        if (wr_en && wr_bid == bid_t'(i)) begin mv[i] = 1; mc[i] = wr_conf; end
        else if ((clr0_en && clr0_bid == bid_t'(i)) || (clr1_en && clr1_bid == bid_t'(i)) ||
                 (rclr_en && in_rng(i, rclr_lo, rclr_hi))) mv[i] = 0;
      end
    end
    // clear everything with one range and check empty
    @(negedge clk);
    {wr_en, clr0_en, clr1_en} = '0;
    rclr_en = 1; rclr_lo = 8'd10; rclr_hi = 8'd9;   // whole ring except entry 10
    clr0_en = 1; clr0_bid = 8'd10;
    @(posedge clk); @(negedge clk);
    rclr_en = 0; clr0_en = 0;
    #1 check(!any_valid, "range clear of the whole ring");
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
