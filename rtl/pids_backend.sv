// pids_backend: synthesizable digital part of the M-channel parallel
// delta-sigma converter with continuous gain calibration.
//
// Data flow for every channel r = 1..M: the modulator code is filtered and
// decimated by D (cic_decimator), giving w_r. Before demodulation all w_r and
// the calibration channel's w_c go to the LMS calibrator, which estimates the
// gain correction c_r of every channel. Each w_r is then demodulated by its
// sign p_r and scaled by c_r (channel_correct), and the M results are summed
// into y (output_combiner). hadamard_seq_gen supplies the modulation signs for
// the analog mixers (s_neg, sc_neg), the decimation strobe and p_r.
//
// Interface: code[r-1] is the modulator code of channel r and code_c the code
// of the calibration channel, LAT clocks after the signs that produced them
// (LAT = 1 for modulators that register their output). One sample per clock;
// y is valid (y_valid) once every D clocks, three clocks after the last code
// of its block. c is the current set of gain corrections (C_FRAC fraction
// bits, 1.0 = no correction); adapt_en enables the LMS updates.
//
// The channel structure, the extra calibration channel, calibration from the
// signals before demodulation and c_r = beta_r / alpha_r follow the converter;
// the filter type, number formats and pipeline are this design's choices.
module pids_backend
  import pids_pkg::*;
#(
  parameter int unsigned M         = M_DEFAULT,
  parameter int unsigned D         = D_DEFAULT,
  parameter int unsigned Q_BITS    = 10,
  parameter int unsigned CIC_ORDER = 1,
  parameter int unsigned LAT       = 1,
  parameter int unsigned B_W       = 34,
  parameter int unsigned B_FRAC    = 30,
  parameter int unsigned MU_LOG2   = 29,
  parameter int unsigned MU0_LOG2  = 8,
  localparam int unsigned W_W      = Q_BITS + CIC_ORDER * $clog2(D * M),
  localparam int unsigned C_FRAC   = B_FRAC - alpha_shift(M),
  localparam int unsigned Z_W      = W_W + B_W - C_FRAC + 1,
  localparam int unsigned Y_W      = Z_W + $clog2(M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adapt_en,
  input  logic signed [Q_BITS-1:0] code [M],
  input  logic signed [Q_BITS-1:0] code_c,
  output logic [M-1:0]             s_neg,
  output logic                     sc_neg,
  output logic signed [Y_W-1:0]    y,
  output logic                     y_valid,
  output logic signed [B_W-1:0]    c [M],
  output logic signed [W_W+B_FRAC+1:0] beta0,
  output logic signed [W_W+1:0]    err,
  output logic                     cal_upd
);

  logic                  dec_strobe;
  logic [M-1:0]          p_neg;
  logic signed [W_W-1:0] w [M];
  logic signed [W_W-1:0] w_c;
  logic [M:0]            w_valid;
  logic signed [Z_W-1:0] z [M];
  logic [M-1:0]          z_valid;

  hadamard_seq_gen #(.M(M), .D(D), .LAT(LAT)) u_seq (
    .clk, .rst_n, .s_neg, .sc_neg, .dec_strobe, .p_neg
  );

  for (genvar r = 0; r < M; r++) begin : g_ch
    cic_decimator #(.IN_W(Q_BITS), .R(D), .N_DIFF(M), .ORDER(CIC_ORDER)) u_dec (
      .clk, .rst_n, .in_code(code[r]), .dec_strobe, .w(w[r]), .w_valid(w_valid[r])
    );
    channel_correct #(.W_W(W_W), .C_W(B_W), .C_FRAC(C_FRAC)) u_corr (
      .clk, .rst_n, .w(w[r]), .w_valid(w_valid[r]), .p_neg(p_neg[r]), .c(c[r]),
      .z(z[r]), .z_valid(z_valid[r])
    );
  end

  cic_decimator #(.IN_W(Q_BITS), .R(D), .N_DIFF(M), .ORDER(CIC_ORDER)) u_dec_cal (
    .clk, .rst_n, .in_code(code_c), .dec_strobe, .w(w_c), .w_valid(w_valid[M])
  );

  lms_calibrator #(
    .M(M), .W_W(W_W), .B_W(B_W), .B_FRAC(B_FRAC), .MU_LOG2(MU_LOG2), .MU0_LOG2(MU0_LOG2)
  ) u_lms (
    .clk, .rst_n, .adapt_en, .w, .w_c, .w_valid(w_valid[M]), .c, .beta0, .err, .upd(cal_upd)
  );

  output_combiner #(.M(M), .Z_W(Z_W)) u_sum (
    .clk, .rst_n, .z, .z_valid(&z_valid), .y, .y_valid
  );

endmodule
