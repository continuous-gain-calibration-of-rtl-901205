// hadamard_seq_gen: Hadamard modulation / demodulation sequence generator.
//
// Produces, for every full-rate sample, the modulation signs s_r[n] of the M
// converter channels and the sign s_c[n] of the calibration channel, and for
// every decimated sample the demodulation signs p_r of the M channels.
//
// How it works: a phase counter counts the D samples of one Hadamard element
// (each matrix element is repeated D times, D being the oversampling ratio) and
// a column counter steps through the M columns of the matrix. Channel r uses row
// r-1, so s_r[n] = H[r-1][col] and channel 1 sees all ones. The calibration
// sign is the bent-function sequence from pids_pkg, which equals
// sum_r alpha_r * s_r[n] with |alpha_r| = 1/4 for M = 16.
//
// The demodulation side is offset by LAT clocks, the latency between a sign
// leaving this block and the matching modulator code reaching the decimators.
// dec_strobe marks the code that ends a block of D samples (the sample the
// decimators output); p_neg is registered on that strobe, so it is valid, and
// holds the column of the block just finished, from the cycle after dec_strobe,
// which is when the decimators present their output.
//
// Bit 0 of s_neg and p_neg (channel 1, Hadamard row 0) is constant +1 by
// construction; it is kept so that every channel has the same interface.
//
// Interface: the sequences advance by one sample every clock (the converter
// takes one sample per clock). All sign outputs use 1 for -1. Synchronous
// active-low reset to column 0, phase 0.
//
// The Hadamard construction and the D-fold repetition follow the converter's
// definition; the counters, LAT and the bent calibration sequence are this
// design's choices.
module hadamard_seq_gen
  import pids_pkg::*;
#(
  parameter int unsigned M   = M_DEFAULT,
  parameter int unsigned D   = D_DEFAULT,
  parameter int unsigned LAT = 1,
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned PW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [M-1:0]  s_neg,       // modulation signs of channels 1..M (bit r-1)
  output logic          sc_neg,      // calibration-channel modulation sign
  output logic          dec_strobe,  // code now at the decimators ends a block
  output logic [M-1:0]  p_neg        // demodulation signs of the last block
);

  initial begin
    assert (M >= 4 && (M & (M - 1)) == 0 && ($clog2(M) % 2) == 0)
      else $error("M must be a power of 4 for a +-1 calibration sequence");
    assert (D >= 1) else $error("D must be at least 1");
  end

  logic [PW-1:0] phase;
  logic          blk_last;
  logic [CW-1:0] col;       // current Hadamard column (modulation side)

  assign blk_last = (phase == PW'(D - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      col   <= '0;
    end else begin
      if (blk_last) begin
        phase <= '0;
        col   <= (col == CW'(M - 1)) ? '0 : col + 1'b1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

  always_comb begin
    for (int r = 0; r < M; r++) s_neg[r] = hadamard_neg(r, int'(col));
    sc_neg = cal_neg(int'(col));
  end

  // Delay the block-end marker and the column to the decimator side.
  logic [LAT:0]   strobe_d;
  logic [CW-1:0]  col_d [LAT+1];

  assign strobe_d[0] = blk_last;
  assign col_d[0]    = col;

  for (genvar i = 1; i <= LAT; i++) begin : g_lat
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        strobe_d[i] <= 1'b0;
        col_d[i]    <= '0;
      end else begin
        strobe_d[i] <= strobe_d[i-1];
        col_d[i]    <= col_d[i-1];
      end
    end
  end

  assign dec_strobe = strobe_d[LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_neg <= '0;
    end else if (dec_strobe) begin
      for (int r = 0; r < M; r++) p_neg[r] <= hadamard_neg(r, int'(col_d[LAT]));
    end
  end

endmodule
