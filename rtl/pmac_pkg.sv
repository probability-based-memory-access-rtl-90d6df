// pmac_pkg - shared types, sizes and arithmetic helpers of the probability-based
// memory access controller (PMAC).
//
// PMAC works on branch "program blocks": every fetched control instruction opens a
// new block, numbered by an 8-bit BlockID. Probabilities are never stored as
// fractions. They are stored in the scaled logarithmic code Enc(p) = -1024*log2(p),
// so a product of probabilities becomes a sum of codes, a quotient a difference,
// and a larger code means a smaller probability (Enc(0.25) = 2048,
// Enc(0.75) = 425, Enc(1) = 0).
//
// The sizes below are those of the evaluated configuration: an 8K-entry GAg table
// with a 13-bit global history, a 2K x 11-bit local history table, 45 confidence
// buckets held as 6-bit values, and 16-bit probability codes.
//
// log2_q12() is this design's own way of producing the logarithm: the integer part
// is the position of the leading one, and twelve fraction bits come from repeated
// squaring of the normalised mantissa (one squarer per bit). It is used both at
// elaboration time and in logic.
package pmac_pkg;

  // ---- program blocks ----
  localparam int unsigned BID_W    = 8;             // BlockID counter width
  localparam int unsigned BBCT_N   = 1 << BID_W;    // in-flight table: one entry per BlockID

  // ---- confidence ----
  localparam int unsigned CONF_W   = 6;             // composite confidence 0..44
  localparam int unsigned NCONF    = 45;            // confidence buckets

  // ---- probability codes ----
  localparam int unsigned ENC_W    = 16;            // Enc(p) = -1024*log2(p)
  localparam int unsigned ENC_FRAC = 10;            // 1024 = 2^10
  localparam logic [ENC_W-1:0] ENC_MAX = '1;        // code used for probability 0

  // ---- branch predictor ----
  localparam int unsigned GHR_W    = 13;            // 8K-entry GAg PHT and chooser
  localparam int unsigned LHIST_W  = 11;            // 2K local histories of 11 bits
  localparam int unsigned LBHT_IW  = 11;            // 2K-entry local history table
  localparam int unsigned GCTR_W   = 2;             // GAg and chooser counters
  localparam int unsigned LCTR_W   = 3;             // PAg second-level counters
  localparam int unsigned MDC_IW   = 12;            // 4K JRS miss distance counters
  localparam int unsigned MDC_W    = 3;
  localparam int unsigned UDC_IW   = 10;            // 1K up/down counters
  localparam int unsigned UDC_W    = 5;

  typedef logic [BID_W-1:0]  bid_t;
  typedef logic [CONF_W-1:0] conf_t;
  typedef logic [ENC_W-1:0]  enc_t;

  // State a branch carries from prediction to resolution. The core keeps it with
  // the branch and hands it back when the branch resolves.
  typedef struct packed {
    logic [GHR_W-1:0]   ghr;        // global history before this branch
    logic [LHIST_W-1:0] lhist;      // local history used for the PAg lookup
    logic               g_taken;    // GAg component prediction
    logic               l_taken;    // PAg component prediction
    logic               pred_taken; // final hybrid prediction
  } bp_ckpt_t;

  // BlockIDs wrap around; a is at or after b when the modular distance from b to a
  // is below half the ID space.
  function automatic logic bid_ge(bid_t a, bid_t b);
    bid_t d;
    d = a - b;
    return ~d[BID_W-1];
  endfunction

  function automatic logic bid_le(bid_t a, bid_t b);
    return bid_ge(b, a);
  endfunction

  // a lies in the modular half-open range (lo, hi]
  function automatic logic bid_in_range(bid_t a, bid_t lo, bid_t hi);
    bid_t da, dh;
    da = a - lo;
    dh = hi - lo;
    return (da != '0) && (da <= dh);
  endfunction

  // log2(x) for x >= 1 with 4 integer and 12 fraction bits (x = 0 gives 0).
  function automatic logic [15:0] log2_q12(logic [15:0] x);
    logic [3:0]  ip;
    logic [16:0] m;        // mantissa, 1.0 = 2^15
    logic [33:0] sq;
    logic [11:0] fr;
    ip = '0;
    for (int i = 0; i < 16; i++)
      if (x[i]) ip = 4'(i);
    m  = {1'b0, x} << (15 - ip);
    fr = '0;
    for (int b = 11; b >= 0; b--) begin
      sq = m * m;                 // 2^30 scale
      m  = sq[31:15];             // back to 2^15 scale, value in [1,4)
      if (m[16]) begin
        fr[b] = 1'b1;
        m     = m >> 1;
      end
    end
    return {ip, fr};
  endfunction

  // Enc(num/den) rounded to the nearest code; 0 when num >= den.
  function automatic enc_t enc_ratio(logic [15:0] num, logic [15:0] den);
    logic [16:0] d;
    if (num == '0) return ENC_MAX;
    if (num >= den) return '0;
    d = {1'b0, log2_q12(den)} - {1'b0, log2_q12(num)};
    return enc_t'((d + 17'(1 << (11 - ENC_FRAC))) >> (12 - ENC_FRAC));   // 12 -> 10 fraction bits, rounded
  endfunction

endpackage
