// thr_ctrl - path probability threshold register (PPTR) and its controller.
//
// The threshold is kept in hundredths of a probability (1 = 0.01) and handed
// to the throttling block estimator as the log code Enc(t/100), registered.
// Two modes, both from the document:
//   * static: the threshold is the value on static_thr; 0 disables throttling
//     (the document's baseline);
//   * dynamic: it starts at 0.01 and moves once every n cycles with the
//     occupancy of the instruction window and the number m of stalled memory
//     instructions:
//       free >= 25 %, t <= 0.50          : t += 0.10,  n = K1 * 2^floor(m/C1)
//       free >= 25 %, 0.50 < t < 0.95    : t += 0.01,  n = K1 * 2^floor(m/C1)
//       free <= 15 %, m > 0               : t -= 0.10,  n = K2 / 2^floor(m/C2)
//       window full, m > 0                : t  = 0.01 at once
//       otherwise                          : t unchanged
// The defaults K1=128, K2=32, C1=C2=8 and the 256-entry window are the
// document's. Where its prose and its table differ, the table is followed
// (t = 0.50 steps by 0.10; the halving interval applies with <= 15 % free).
// This design's own choices: the decrement never goes below 0.01; n is at
// least 1 and saturates at 2^31; the interval counter restarts whenever the
// threshold does not move.
//
// Interface and timing: inputs are sampled every cycle; thr_pct, pptr and
// thr_en are registers.
module thr_ctrl
  import pmac_pkg::*;
#(
  parameter int unsigned WIN_N = 256,   // instruction window entries
  parameter int unsigned M_W   = 9,     // width of the stalled-instruction count
  parameter int unsigned K1    = 128,
  parameter int unsigned K2    = 32,
  parameter int unsigned C1    = 8,
  parameter int unsigned C2    = 8
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(WIN_N+1)-1:0] win_free,   // free instruction window entries
  input  logic [M_W-1:0]           n_stalled,  // stalled memory instructions
  input  logic                     static_en,
  input  logic [6:0]               static_thr, // hundredths, 0 = off
  output logic [6:0]               thr_pct,
  output enc_t                     pptr,
  output logic                     thr_en
);

  logic [6:0]  t_q, t_n;
  logic [31:0] cnt_q;
  logic [31:0] n_up, n_dn, n_sel;
  logic        up_zone, dn_zone, full_zone, move;
  logic [M_W-1:0] sh_up, sh_dn;

  always_comb begin
    up_zone   = 32'(win_free) * 100 >= 32'(WIN_N) * 25;
    dn_zone   = (32'(win_free) * 100 <= 32'(WIN_N) * 15) && (n_stalled != '0);
    full_zone = (win_free == '0) && (n_stalled != '0);

    sh_up = n_stalled / M_W'(C1);
    sh_dn = n_stalled / M_W'(C2);
    n_up  = (sh_up >= M_W'(24)) ? 32'h8000_0000 : 32'(K1) << sh_up;
    if (n_up > 32'h8000_0000 || n_up == '0) n_up = 32'h8000_0000;
    n_dn  = (sh_dn >= M_W'(31)) ? 32'd1 : 32'(K2) >> sh_dn;
    if (n_dn == '0) n_dn = 32'd1;
    n_sel = up_zone ? n_up : n_dn;

    move = (up_zone || dn_zone) && (cnt_q + 1 >= n_sel);

    t_n = t_q;
    if (full_zone)
      t_n = 7'd1;
    else if (move && up_zone) begin
      if (t_q <= 7'd50)      t_n = t_q + 7'd10;
      else if (t_q < 7'd95)  t_n = t_q + 7'd1;
    end else if (move && dn_zone)
      t_n = (t_q > 7'd11) ? t_q - 7'd10 : 7'd1;
  end

  // Enc(t/100) = 1024*(log2(100) - log2(t))
  function automatic enc_t enc_pct(logic [6:0] t);
    if (t == '0) return ENC_MAX;
    return enc_ratio(16'(t), 16'd100);
  endfunction

  logic [6:0] t_eff;
  assign t_eff = static_en ? static_thr : t_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      t_q     <= 7'd1;
      cnt_q   <= '0;
      thr_pct <= 7'd1;
      pptr    <= enc_pct(7'd1);
      thr_en  <= 1'b0;
    end else begin
      t_q     <= t_n;
      cnt_q   <= (move || !(up_zone || dn_zone)) ? '0 : cnt_q + 1;
      thr_pct <= t_eff;
      pptr    <= enc_pct(t_eff);
      thr_en  <= (t_eff != '0);
    end
endmodule
