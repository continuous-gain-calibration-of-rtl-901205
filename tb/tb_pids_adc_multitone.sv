// tb_pids_adc_multitone: multi-tone test of the calibrated converter at its
// default configuration (16 channels, oversampling ratio 6, +-1 % gains).
//
// Sequence, as in the converter's evaluation: first a three-tone input with
// the calibration frozen at its reset value (uncalibrated), then 4096 output
// samples of a random input with the LMS calibration running, then the same
// three tones again with the corrections frozen at the values found. For both
// tone phases the testbench computes the signal-to-error ratio of y against
// the ideal output (the block sums of the input times a fitted scale).
// Tones (this test's choice): 0.0625, 0.3125 and 0.4375 of the decimated
// sample rate, amplitude 0.15 each.
// Checks: the calibrated ratio exceeds the uncalibrated one by at least 3 dB
// and y_valid keeps its period of D clocks.
module tb_pids_adc_multitone;
  localparam int M = 16, D = 6;
  localparam int N_TONE = 1500, N_CAL = 4096;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, adapt_en = 0;
  real x;
  logic signed [27:0] y;
  logic y_valid;
  logic signed [33:0] c [M];
  logic signed [48:0] beta0;
  logic signed [18:0] err;
  logic cal_upd;
  int checks = 0, failures = 0;

  pids_adc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ref_q [$];

  initial begin
    real blk, yr, rr, syy, syr, srr, g, e2, snr_unc, snr_cal;
    int n_out, len, n_smp, last_y, nm;
    bit tones;
    x = 0.0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    blk = 0.0; n_smp = 0; last_y = -1;
    snr_unc = 0.0;
    for (int phase = 0; phase < 3; phase++) begin
      tones = (phase != 1);
      adapt_en = (phase == 1);
      len = tones ? N_TONE : N_CAL;
      syy = 0.0; syr = 0.0; srr = 0.0; nm = 0;
      n_out = 0;
      while (n_out < len) begin
        if (y_valid) begin
          rr = ref_q.pop_front();
          yr = real'(y);
          if (last_y >= 0) check(n_smp - last_y == D, "y_valid period");
          last_y = n_smp;
          if (tones && n_out >= 2 * M) begin
            syy += yr * yr; syr += yr * rr; srr += rr * rr; nm++;
          end
          n_out++;
        end
        if (tones) begin
          real t;
          t = real'(n_smp) / real'(D);   // time in decimated samples
          x = 0.15 * ($cos(2.0 * PI * 0.0625 * t) + $cos(2.0 * PI * 0.3125 * t + 1.0)
                      + $cos(2.0 * PI * 0.4375 * t + 2.0));
        end else begin
          x = (real'($urandom % 100001) / 100000.0) - 0.5;
        end
        blk += x;
        if (n_smp % D == D - 1) begin
          ref_q.push_back(blk);
          blk = 0.0;
        end
        n_smp++;
        @(negedge clk);
      end
      if (tones) begin
        g = syr / srr;
        e2 = (syy - 2.0 * g * syr + g * g * srr) / real'(nm);
        if (phase == 0) begin
          snr_unc = 10.0 * $log10(g * g * srr / real'(nm) / e2);
          $display("uncalibrated: signal-to-error %f dB", snr_unc);
        end else begin
          snr_cal = 10.0 * $log10(g * g * srr / real'(nm) / e2);
          $display("calibrated:   signal-to-error %f dB", snr_cal);
          check(snr_cal > snr_unc + 3.0, "calibration improves the multi-tone result");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
