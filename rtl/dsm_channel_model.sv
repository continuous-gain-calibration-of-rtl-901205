// dsm_channel_model: behavioural model (not synthesizable) of the analog part
// of one converter channel: the input mixer that multiplies x[n] by the
// channel's +-1 modulation sign, the channel's gain and offset errors, and a
// 4th-order delta-sigma modulator.
//
// How it works, per clock (one sample):
//   u[n] = GAIN * s[n] * x[n] + OFFSET
//   v[n] = u[n] - 4 e[n-1] + 6 e[n-2] - 4 e[n-3] + e[n-4]
//   code[n] = round(v[n] / LSB), clipped to Q_BITS bits,   e[n] = code*LSB - v[n]
// so code*LSB = u[n] + (1 - z^-1)^4 e[n]: the signal passes with unit gain and
// no delay (signal transfer function 1) and the quantisation error is shaped by
// a 4th-order highpass noise transfer function. LSB = FULL_SCALE / 2^(Q_BITS-1);
// with |u| below FULL_SCALE minus 8 LSB the quantiser never clips.
//
// Interface: x is the analog input (a real number), s_neg the modulation sign
// (1 = -1) and code the quantiser output (two's complement, Q_BITS bits),
// registered on the rising clock edge. rst_n (synchronous, active low) clears
// the modulator state.
//
// The mixer, the gain a_r and offset b_r error model and the 4th order follow
// the converter; the error-feedback structure, the multi-bit quantiser and its
// full scale are this model's choices.
module dsm_channel_model #(
  parameter real         GAIN       = 1.0,
  parameter real         OFFSET     = 0.0,
  parameter int unsigned Q_BITS     = 10,
  parameter real         FULL_SCALE = 2.0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  real                      x,
  input  logic                     s_neg,
  output logic signed [Q_BITS-1:0] code
);

  localparam real LSB  = FULL_SCALE / real'(2 ** (Q_BITS - 1));
  localparam int  QMAX = 2 ** (Q_BITS - 1) - 1;
  localparam int  QMIN = -(2 ** (Q_BITS - 1));

  real e1, e2, e3, e4;

  always_ff @(posedge clk) begin
    real u, v, qe;
    int  q;
    if (!rst_n) begin
      e1   <= 0.0;
      e2   <= 0.0;
      e3   <= 0.0;
      e4   <= 0.0;
      code <= '0;
    end else begin
      u = GAIN * (s_neg ? -x : x) + OFFSET;
      v = u - 4.0 * e1 + 6.0 * e2 - 4.0 * e3 + e4;
      q = $rtoi((v >= 0.0) ? (v / LSB + 0.5) : (v / LSB - 0.5));
      if (q > QMAX) q = QMAX;
      if (q < QMIN) q = QMIN;
      qe = real'(q) * LSB - v;
      e1   <= qe;
      e2   <= e1;
      e3   <= e2;
      e4   <= e3;
      code <= Q_BITS'(q);
    end
  end

endmodule
