// tb_bid_counter - self-checking test of the BlockID counter.
// Random increment requests over several wraps of the 8-bit counter; new_bid
// must always be cur_bid+1 and cur_bid must advance by one per increment,
// modulo 256. A watchdog ends the run if it hangs.
module tb_bid_counter;
  import pmac_pkg::*;
  logic clk = 0, rst_n = 0, inc = 0;
  bid_t new_bid, cur_bid;
  int checks = 0, failures = 0;
  int model;

  bid_counter dut (.clk, .rst_n, .inc, .new_bid, .cur_bid);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: cur=%0d new=%0d model=%0d", what, cur_bid, new_bid, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(cur_bid == bid_t'(model), "cur_bid");
      check(new_bid == bid_t'(model + 1), "new_bid");
      inc = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (inc) model = (model + 1) % 256;
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
