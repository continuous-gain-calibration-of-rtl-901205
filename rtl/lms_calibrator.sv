// lms_calibrator: continuous LMS estimation of the channel gain corrections.
//
// The calibration channel is modulated with s_c = sum_r alpha_r s_r, so its
// decimated output is (up to noise) a linear function of the M channel outputs
// taken before demodulation:
//   w_c[m] = beta_0 + sum_r beta_r * w_r[m],  beta_r = alpha_r * a_c / a_r,
// where a_r is the gain of channel r. This block tracks beta_0..beta_M with the
// LMS algorithm and outputs the gain correction terms c_r = beta_r / alpha_r,
// which are proportional to 1/a_r.
//
// For each decimated sample (w_valid):
//   stage 1: e = w_c - beta_0 - sum_r beta_r * w_r        (registered with w_r)
//   stage 2: beta_r += 2^-MU_LOG2  * e * w_r   (r = 1..M)
//            beta_0 += 2^-MU0_LOG2 * e
// Coefficients are signed fixed point with B_FRAC fraction bits; beta_1..M
// saturate at their range, beta_0 is as wide as w plus its fraction bits and
// cannot leave that range for offsets within the range of w. Since
// |alpha_r| = 2^-ALPHA_SHIFT, c_r is beta_r with its sign set by alpha_r,
// read with B_FRAC - ALPHA_SHIFT fraction bits: no divider is needed. After reset every beta_r equals alpha_r (all c_r = 1.0, nominal
// equal gains) and beta_0 is 0. With adapt_en low the coefficients hold.
//
// Interface: w, w_c are sampled when w_valid is high; the coefficients change
// two clocks later, so w_valid must be at least two clocks apart (it comes
// once every D clocks). err is the last prediction error in units of w.
//
// The linear model, the use of LMS and c_r = beta_r / alpha_r are the
// calibration method; the pipeline, number formats, step sizes, the separate
// step for beta_0, saturation and the reset values are this design's choices.
module lms_calibrator
  import pids_pkg::*;
#(
  parameter int unsigned M           = M_DEFAULT,
  parameter int unsigned W_W         = 17,
  parameter int unsigned B_W         = 34,
  parameter int unsigned B_FRAC      = 30,
  parameter int unsigned MU_LOG2     = 29,
  parameter int unsigned MU0_LOG2    = 8,
  localparam int unsigned ALPHA_SH   = alpha_shift(M),
  localparam int unsigned C_FRAC     = B_FRAC - ALPHA_SH,
  localparam int unsigned E_W        = B_W + W_W + $clog2(M + 1) + 2,
  localparam int unsigned B0_W       = W_W + B_FRAC + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  adapt_en,
  input  logic signed [W_W-1:0] w [M],      // channel outputs before demodulation
  input  logic signed [W_W-1:0] w_c,        // calibration channel output
  input  logic                  w_valid,
  output logic signed [B_W-1:0] c [M],      // gain corrections, C_FRAC fraction bits
  output logic signed [B0_W-1:0] beta0,     // offset term, B_FRAC fraction bits
  output logic signed [W_W+1:0] err,
  output logic                  upd         // high in the clock the coefficients change
);

  localparam logic signed [B_W-1:0] B_MAX = {1'b0, {(B_W-1){1'b1}}};
  localparam logic signed [B_W-1:0] B_MIN = {1'b1, {(B_W-1){1'b0}}};

  logic signed [B_W-1:0] beta [M];
  logic signed [E_W-1:0] acc, e_now, e_q;
  logic signed [W_W-1:0] w_q [M];

  function automatic logic signed [B_W-1:0] sat_add(input logic signed [B_W-1:0] a,
                                                    input logic signed [E_W+W_W-1:0] d);
    logic signed [E_W+W_W:0] s;
    s = (E_W+W_W+1)'(a) + (E_W+W_W+1)'(d);
    if (s > (E_W+W_W+1)'(B_MAX)) return B_MAX;
    if (s < (E_W+W_W+1)'(B_MIN)) return B_MIN;
    return B_W'(s);
  endfunction

  // Stage 1: prediction error.
  always_comb begin
    acc = E_W'(beta0);
    for (int r = 0; r < M; r++) acc += E_W'(beta[r]) * E_W'(w[r]);
    e_now = (E_W'(w_c) <<< B_FRAC) - acc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_q <= '0;
      upd <= 1'b0;
      for (int r = 0; r < M; r++) w_q[r] <= '0;
    end else begin
      upd <= w_valid & adapt_en;
      if (w_valid) begin
        e_q <= e_now;
        for (int r = 0; r < M; r++) w_q[r] <= w[r];
      end
    end
  end

  // Stage 2: coefficient update.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beta0 <= '0;
      for (int r = 0; r < M; r++)
        beta[r] <= alpha_neg(r) ? -(B_W'(1) <<< C_FRAC) : (B_W'(1) <<< C_FRAC);
    end else if (upd) begin
      beta0 <= beta0 + B0_W'(e_q >>> MU0_LOG2);
      for (int r = 0; r < M; r++)
        beta[r] <= sat_add(beta[r], ((E_W+W_W)'(e_q) * (E_W+W_W)'(w_q[r])) >>> MU_LOG2);
    end
  end

  // The two-stage update needs a clock between samples.
  a_spacing: assert property (@(posedge clk) disable iff (!rst_n) w_valid |=> !w_valid)
    else $error("w_valid on consecutive clocks");

  always_comb begin
    for (int r = 0; r < M; r++) c[r] = alpha_neg(r) ? -beta[r] : beta[r];
    err = (W_W+2)'(e_q >>> B_FRAC);
  end

endmodule
