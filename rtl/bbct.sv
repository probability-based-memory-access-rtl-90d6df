// bbct - in-flight branch tracking table (per-BlockID branch confidence table).
//
// One entry per BlockID value, direct mapped and without tags: a 6-bit
// confidence and a valid bit. A fetched branch writes its confidence and sets
// valid; a resolved branch clears its valid bit; a misprediction clears the valid
// bits of a whole range of younger BlockIDs at once. Entry count, width and
// direct mapping follow the document; the 256 entries are indexed by the full
// 8-bit BlockID (the document's table sizes; its text once mentions the lower
// 7 bits). Valid bits are flip-flops so that the range clear takes one cycle;
// the confidence values are a plain array with no reset.
//
// Interface and timing: three combinational read ports (a, b, c). Writes,
// single clears (two ports) and the range clear (lo, hi] take effect at the next
// clock edge; a write wins over a clear of the same entry. any_valid is high
// when some branch is in flight.
module bbct
  import pmac_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // fetch
  input  logic  wr_en,
  input  bid_t  wr_bid,
  input  conf_t wr_conf,
  // single clears
  input  logic  clr0_en,
  input  bid_t  clr0_bid,
  input  logic  clr1_en,
  input  bid_t  clr1_bid,
  // range clear (lo, hi]
  input  logic  rclr_en,
  input  bid_t  rclr_lo,
  input  bid_t  rclr_hi,
  // reads
  input  bid_t  rd_a_bid,
  output logic  rd_a_valid,
  output conf_t rd_a_conf,
  input  bid_t  rd_b_bid,
  output logic  rd_b_valid,
  output conf_t rd_b_conf,
  input  bid_t  rd_c_bid,
  output logic  rd_c_valid,
  output conf_t rd_c_conf,
  output logic  any_valid
);
  logic [BBCT_N-1:0] valid_q;
  conf_t             conf_q [BBCT_N];

  assign rd_a_valid = valid_q[rd_a_bid];
  assign rd_a_conf  = conf_q[rd_a_bid];
  assign rd_b_valid = valid_q[rd_b_bid];
  assign rd_b_conf  = conf_q[rd_b_bid];
  assign rd_c_valid = valid_q[rd_c_bid];
  assign rd_c_conf  = conf_q[rd_c_bid];
  assign any_valid  = |valid_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) valid_q <= '0;
    else
      for (int i = 0; i < BBCT_N; i++) begin
        if (wr_en && wr_bid == bid_t'(i))
          valid_q[i] <= 1'b1;
        else if ((clr0_en && clr0_bid == bid_t'(i)) ||
                 (clr1_en && clr1_bid == bid_t'(i)) ||
                 (rclr_en && bid_in_range(bid_t'(i), rclr_lo, rclr_hi)))
          valid_q[i] <= 1'b0;
      end

  always_ff @(posedge clk)
    if (wr_en) conf_q[wr_bid] <= wr_conf;

  // more than BBCT_N branches in flight would overwrite a live entry
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> !valid_q[wr_bid]);
endmodule
