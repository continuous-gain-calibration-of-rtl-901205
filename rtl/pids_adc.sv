// pids_adc: M-channel parallel delta-sigma A/D converter with an extra
// calibration channel and continuous LMS gain calibration (simulation top).
//
// The input x[n] drives M + 1 identical analog channels (dsm_channel_model):
// channel r multiplies x by its Hadamard sign s_r[n], the extra channel by the
// calibration sign s_c[n] = sum_r alpha_r s_r[n]. Each channel has its own gain
// error; the digital back end (pids_backend) decimates, calibrates, demodulates,
// corrects and sums the channels into y.
//
// The analog channels are behavioural models with real-valued arithmetic, so
// this top simulates but does not synthesize; pids_backend is the synthesizable
// part. Channel r (1..M) gets gain 1 + GAIN_ERR * g(r) and the calibration
// channel 1 + GAIN_ERR * g(M + 1), where g(k) = (((5k + 2) mod 9) - 4) / 4 is a
// fixed spread over [-1, 1]; every channel gets offset OFFSET.
//
// Interface: x is sampled every clock; y is valid once every D clocks (y_valid)
// and, after calibration, approaches a_c * 2^(Q_BITS-1)/FULL_SCALE * M times
// the sum of x over the matching block of D samples (CIC_ORDER = 1), a_c
// being the calibration channel's gain. c holds the gain corrections.
//
// Sixteen channels, oversampling ratio 6, 4th-order modulators and +-1 % gain
// errors are the converter's evaluated configuration; the error pattern and
// all number formats are this design's choices.
module pids_adc
  import pids_pkg::*;
#(
  parameter int unsigned M         = M_DEFAULT,
  parameter int unsigned D         = D_DEFAULT,
  parameter int unsigned Q_BITS    = 10,
  parameter int unsigned CIC_ORDER = 1,
  parameter int unsigned B_W       = 34,
  parameter int unsigned B_FRAC    = 30,
  parameter int unsigned MU_LOG2   = 29,
  parameter int unsigned MU0_LOG2  = 8,
  parameter real         GAIN_ERR  = 0.01,
  parameter real         OFFSET    = 0.0,
  localparam int unsigned W_W      = Q_BITS + CIC_ORDER * $clog2(D * M),
  localparam int unsigned C_FRAC   = B_FRAC - alpha_shift(M),
  localparam int unsigned Y_W      = W_W + B_W - C_FRAC + 1 + $clog2(M)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  adapt_en,
  input  real                   x,
  output logic signed [Y_W-1:0] y,
  output logic                  y_valid,
  output logic signed [B_W-1:0] c [M],
  output logic signed [W_W+B_FRAC+1:0] beta0,
  output logic signed [W_W+1:0] err,
  output logic                  cal_upd
);

  function automatic real gain_pattern(input int k);
    return real'(((5 * k + 2) % 9) - 4) / 4.0;
  endfunction

  logic [M-1:0]             s_neg;
  logic                     sc_neg;
  logic signed [Q_BITS-1:0] code [M];
  logic signed [Q_BITS-1:0] code_c;

  for (genvar r = 0; r < M; r++) begin : g_ch
    dsm_channel_model #(
      .GAIN(1.0 + GAIN_ERR * gain_pattern(r + 1)), .OFFSET(OFFSET), .Q_BITS(Q_BITS)
    ) u_ch (
      .clk, .rst_n, .x, .s_neg(s_neg[r]), .code(code[r])
    );
  end

  dsm_channel_model #(
    .GAIN(1.0 + GAIN_ERR * gain_pattern(M + 1)), .OFFSET(OFFSET), .Q_BITS(Q_BITS)
  ) u_cal_ch (
    .clk, .rst_n, .x, .s_neg(sc_neg), .code(code_c)
  );

  pids_backend #(
    .M(M), .D(D), .Q_BITS(Q_BITS), .CIC_ORDER(CIC_ORDER), .LAT(1),
    .B_W(B_W), .B_FRAC(B_FRAC), .MU_LOG2(MU_LOG2), .MU0_LOG2(MU0_LOG2)
  ) u_be (
    .clk, .rst_n, .adapt_en, .code, .code_c, .s_neg, .sc_neg, .y, .y_valid, .c, .beta0, .err, .cal_upd
  );

endmodule
