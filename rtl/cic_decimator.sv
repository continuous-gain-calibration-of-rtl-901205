// cic_decimator: decimating lowpass filter H(z) followed by the D-fold
// downsampler of one converter channel.
//
// H(z) is a cascade of ORDER moving sums of length R*N_DIFF,
//   H(z) = ((1 - z^-(R*N_DIFF)) / (1 - z^-1))^ORDER,
// built as a cascaded integrator-comb (CIC) filter: ORDER integrators at the
// input rate, then downsampling by R, then ORDER combs with a differential
// delay of N_DIFF decimated samples. All arithmetic is two's complement of the
// full output width, so integrator wrap-around cancels in the combs and the
// result is exact (gain (R*N_DIFF)^ORDER, no rounding).
//
// With R = D and N_DIFF = M the filter is one Hadamard period (M*D samples)
// long. For ORDER = 1 this makes the demodulated and summed channels give back
// exactly M times the sum of the input over each block of D samples, which is
// why ORDER defaults to 1; higher orders filter the modulator noise harder.
//
// Interface: in_code is accepted every clock; dec_strobe marks the input
// sample that ends a decimation block. One clock later w holds H(z) applied
// to the input up to and including that sample, and w_valid is high for one
// clock. Samples before reset count as zero.
//
// The converter defines H(z) only as a decimating lowpass narrower than a
// conventional converter's; the CIC form and its parameters are this design's.
module cic_decimator #(
  parameter int unsigned IN_W   = 10,
  parameter int unsigned R      = 6,
  parameter int unsigned N_DIFF = 16,
  parameter int unsigned ORDER  = 1,
  localparam int unsigned OUT_W = IN_W + ORDER * $clog2(R * N_DIFF)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  in_code,
  input  logic                    dec_strobe,
  output logic signed [OUT_W-1:0] w,
  output logic                    w_valid
);

  initial assert (ORDER >= 1 && N_DIFF >= 1 && R >= 1) else $error("bad CIC parameters");

  logic signed [OUT_W-1:0] integ     [ORDER];
  logic signed [OUT_W-1:0] integ_nxt [ORDER];
  logic signed [OUT_W-1:0] comb_dl   [ORDER][N_DIFF];   // comb delay lines
  logic signed [OUT_W-1:0] comb_in   [ORDER+1];

  // Integrator cascade, including the sample entering this clock.
  always_comb begin
    integ_nxt[0] = integ[0] + OUT_W'(in_code);
    for (int i = 1; i < ORDER; i++) integ_nxt[i] = integ[i] + integ_nxt[i-1];
  end

  // Comb cascade at the decimated rate.
  always_comb begin
    comb_in[0] = integ_nxt[ORDER-1];
    for (int i = 0; i < ORDER; i++) comb_in[i+1] = comb_in[i] - comb_dl[i][N_DIFF-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ORDER; i++) begin
        integ[i] <= '0;
        for (int k = 0; k < N_DIFF; k++) comb_dl[i][k] <= '0;
      end
      w       <= '0;
      w_valid <= 1'b0;
    end else begin
      for (int i = 0; i < ORDER; i++) integ[i] <= integ_nxt[i];
      w_valid <= dec_strobe;
      if (dec_strobe) begin
        w <= comb_in[ORDER];
        for (int i = 0; i < ORDER; i++) begin
          comb_dl[i][0] <= comb_in[i];
          for (int k = 1; k < N_DIFF; k++) comb_dl[i][k] <= comb_dl[i][k-1];
        end
      end
    end
  end

endmodule
