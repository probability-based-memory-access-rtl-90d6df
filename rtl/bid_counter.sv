// bid_counter - global BlockID counter (BIDC) at the fetch unit.
//
// A program block is a control instruction together with the instructions that
// depend on it, so the counter advances by one for every fetched control
// instruction and every instruction fetched afterwards carries the new value.
// The counter wraps modulo 2^BID_W; the rest of PMAC compares BlockIDs with
// modular arithmetic.
//
// Interface and timing: when inc is high, new_bid (combinational, = cur_bid+1)
// is the BlockID of the branch being fetched in this cycle, and cur_bid takes
// that value at the next clock edge. cur_bid is the block of the instructions
// currently being fetched. Reset clears the counter.
//
// The increment-per-branch rule and the 8-bit width follow the document; the
// counter is not rolled back after a misprediction (the document is silent), so
// IDs of flushed branches are simply never reused until the counter wraps.
module bid_counter
  import pmac_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic inc,
  output bid_t new_bid,
  output bid_t cur_bid
);
  bid_t bidc_q;

  assign new_bid = bidc_q + bid_t'(1);
  assign cur_bid = bidc_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   bidc_q <= '0;
    else if (inc) bidc_q <= new_bid;
endmodule
