// channel_correct: demodulation and gain correction of one converter channel.
//
// Takes the decimated channel output w_r, multiplies it by its demodulation
// sign p_r (a sign flip) and by the channel's gain correction term c_r, and
// registers the result:
//   z_r = floor(p_r * w_r * c_r / 2^C_FRAC).
// c_r is a signed fixed-point number with C_FRAC fraction bits; c_r = 1.0
// leaves the channel unchanged. The product is kept at full width before the
// final shift, so the only rounding is the truncation of C_FRAC bits.
//
// Interface: w and p_neg (1 = -1) are sampled when w_valid is high; z and
// z_valid follow one clock later. c is sampled together with w.
//
// Demodulation followed by the gain term is the converter's channel output
// path; the number formats and the register are this design's.
module channel_correct #(
  parameter int unsigned W_W    = 17,
  parameter int unsigned C_W    = 33,
  parameter int unsigned C_FRAC = 28,
  localparam int unsigned Z_W   = W_W + C_W - C_FRAC + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [W_W-1:0] w,
  input  logic                  w_valid,
  input  logic                  p_neg,
  input  logic signed [C_W-1:0] c,
  output logic signed [Z_W-1:0] z,
  output logic                  z_valid
);

  logic signed [W_W:0]       w_dm;    // demodulated, one bit wider for -min
  logic signed [W_W+C_W:0]   prod;

  always_comb begin
    w_dm = p_neg ? -(W_W+1)'(w) : (W_W+1)'(w);
    prod = w_dm * c;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z       <= '0;
      z_valid <= 1'b0;
    end else begin
      z_valid <= w_valid;
      if (w_valid) z <= Z_W'(prod >>> C_FRAC);
    end
  end

endmodule
