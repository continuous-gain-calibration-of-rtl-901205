// output_combiner: adds the M corrected channel outputs into the converter
// output y[n].
//
// The sum is a plain M-input adder at full precision (width grows by
// ceil(log2 M) bits), registered once.
//
// Interface: z (all channels) is sampled when z_valid is high; y and y_valid
// follow one clock later.
//
// The summation of all channels is the converter's output stage; the single
// registered adder is this design's choice.
module output_combiner #(
  parameter int unsigned M   = 16,
  parameter int unsigned Z_W = 19,
  localparam int unsigned Y_W = Z_W + $clog2(M)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [Z_W-1:0] z [M],
  input  logic                  z_valid,
  output logic signed [Y_W-1:0] y,
  output logic                  y_valid
);

  logic signed [Y_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int r = 0; r < M; r++) sum += Y_W'(z[r]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= z_valid;
      if (z_valid) y <= sum;
    end
  end

endmodule
