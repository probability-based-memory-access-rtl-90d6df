// lsq_throttle - load-store queue extension and load-store unit issue filter.
//
// Every LSQ entry gains the BlockID of its memory instruction and a stall bit.
// The stall bit is set when the entry's BlockID is at or after the throttling
// block register TBR and cleared when it is before it; the bits follow TBR
// every cycle, so a TBR that advances releases the entries it passes. While the
// throttle control bit TC is set, the pick logic ignores ready entries whose
// stall bit is set. Both follow the document. This design's own choices: the
// pick is the lowest-index allowed ready entry (the core's real age-ordered
// pick would take its place); the stall bits are registered, so a new TBR acts
// one cycle after the estimator updates it; n_stalled counts the live entries
// held back by the throttle (stall bit and TC set), for the threshold controller.
//
// Interface and timing: alloc writes an entry (valid, BlockID) at the next edge;
// free_mask clears valid bits (issued, committed or flushed entries); ready is
// the core's per-entry "could issue now" vector. issue_valid/issue_idx are
// combinational from ready and the registered stall bits.
module lsq_throttle
  import pmac_pkg::*;
#(
  parameter int unsigned LSQ_N = 256
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     alloc_valid,
  input  logic [$clog2(LSQ_N)-1:0] alloc_idx,
  input  bid_t                     alloc_bid,
  input  logic [LSQ_N-1:0]         free_mask,
  input  logic [LSQ_N-1:0]         ready,
  input  bid_t                     tbr,
  input  logic                     tc,
  output logic                     issue_valid,
  output logic [$clog2(LSQ_N)-1:0] issue_idx,
  output logic [LSQ_N-1:0]         stall,
  output logic [$clog2(LSQ_N+1)-1:0] n_stalled
);
  localparam int unsigned IW = $clog2(LSQ_N);

  logic [LSQ_N-1:0] valid_q, stall_q;
  bid_t             bid_q [LSQ_N];

  assign stall = stall_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      valid_q <= '0;
      stall_q <= '0;
    end else
      for (int i = 0; i < LSQ_N; i++) begin
        if (alloc_valid && alloc_idx == IW'(i)) begin
          valid_q[i] <= 1'b1;
          stall_q[i] <= bid_ge(alloc_bid, tbr);
        end else begin
          if (free_mask[i]) valid_q[i] <= 1'b0;
          stall_q[i] <= valid_q[i] && bid_ge(bid_q[i], tbr);
        end
      end

  always_ff @(posedge clk)
    if (alloc_valid) bid_q[alloc_idx] <= alloc_bid;

  logic [LSQ_N-1:0] allowed, held;

  always_comb begin
    allowed     = ready & valid_q & ~(stall_q & {LSQ_N{tc}});
    held        = valid_q & stall_q & {LSQ_N{tc}};
    issue_valid = |allowed;
    issue_idx   = '0;
    for (int i = LSQ_N - 1; i >= 0; i--)
      if (allowed[i]) issue_idx = IW'(i);
    n_stalled = '0;
    for (int i = 0; i < LSQ_N; i++)
      n_stalled = n_stalled + ($clog2(LSQ_N+1))'(held[i]);
  end

  a_alloc_free_entry: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_valid |-> !valid_q[alloc_idx] || free_mask[alloc_idx]);
endmodule
