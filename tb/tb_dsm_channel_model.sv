// tb_dsm_channel_model: self-checking test of the analog channel model.
//
// Applies random inputs x in [-0.5, 0.5] and random modulation signs to a
// channel with gain 1.01 and offset 0.003. With u = 1.01 * s * x + 0.003 and
// q = code * LSB, a 4th-order modulator with unit signal transfer satisfies
// q - u = (1 - z^-1)^4 e with |e| <= LSB/2. The testbench runs four cascaded
// running sums over q - u and checks that the result never exceeds LSB/2,
// (over 5000 samples, before rounding in the
// running sums matters), which checks the mixer sign, the gain and offset, the unit-delay timing of
// the registered code and the 4th-order noise shaping at once. It also checks
// that the mean of q - u over the run is near zero.
module tb_dsm_channel_model;
  localparam int QB = 10;
  localparam real FS = 2.0;
  localparam real LSB = FS / 512.0;
  localparam real G = 1.01, B = 0.003;

  logic clk = 0, rst_n = 0;
  real x;
  logic s_neg;
  logic signed [QB-1:0] code;
  int checks = 0, failures = 0;

  dsm_channel_model #(.GAIN(G), .OFFSET(B), .Q_BITS(QB), .FULL_SCALE(FS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real u_prev, d, s1, s2, s3, s4, mean;
    int n_run;
    x = 0.0; s_neg = 0;
    s1 = 0.0; s2 = 0.0; s3 = 0.0; s4 = 0.0; mean = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    n_run = 5000;
    u_prev = 0.0;
    for (int n = 0; n < n_run; n++) begin
      // code now reflects the sample applied in the previous clock
      if (n > 0) begin
        d = real'(code) * LSB - u_prev;
        s1 += d; s2 += s1; s3 += s2; s4 += s3;
        mean += d;
        check(s4 <= LSB / 2.0 + 1e-6 && s4 >= -LSB / 2.0 - 1e-6,
              $sformatf("shaped error out of bound at n=%0d: %g", n, s4));
      end
      x = (real'($urandom % 100001) / 100000.0) - 0.5;
      s_neg = 1'($urandom);
      u_prev = G * (s_neg ? -x : x) + B;
      @(negedge clk);
    end
    mean = mean / real'(n_run - 1);
    check(mean < 1e-3 * LSB && mean > -1e-3 * LSB, $sformatf("mean error %g", mean));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
