// tb_pids_adc: end-to-end test of the calibrated parallel delta-sigma converter
// at its default configuration (16 channels, oversampling ratio 6, 4th-order
// modulators, +-1 % gain spread, no parameter overrides).
//
// A random input (uniform in [-0.5, 0.5], new value every clock) is applied.
// The reference for every output sample is the sum of the input over its block
// of D samples: with one-period CIC filters the ideal converter returns exactly
// that, scaled by M * 2^(Q_BITS-1) / FULL_SCALE times the calibration channel's
// gain. Phases:
//   1. calibration frozen (adapt_en low, all c_r = 1): the gain mismatch leaves
//      an error; the testbench measures its RMS after a least-squares scale fit.
//   2. calibration running for 4096 output samples (the calibration length of
//      the evaluation).
//   3. calibration still running; the RMS error is measured again.
// Checks: y_valid exactly every D clocks; every c_r within 1.5e-3 of a_c / a_r
// (gains recomputed here from the same spread formula); the overall scale
// within 0.2 % of its ideal value; the calibrated error below 60 % of the
// frozen one and below 12 output LSB. Mechanisms counted (each must occur):
// coefficient updates, outputs while frozen, outputs while adapting, and
// corrections that left their reset value 1.0.
module tb_pids_adc;
  localparam int M = 16, D = 6, QB = 10;
  localparam real SCALE = real'(M) * 512.0 / 2.0;
  localparam int N_FROZEN = 600, N_CAL = 4096, N_MEAS = 1500;

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

  function automatic real gain(input int k);
    return 1.0 + 0.01 * real'(((5 * k + 2) % 9) - 4) / 4.0;
  endfunction

  // Statistics of one measuring phase.
  real syy, syr, srr;
  int  nphase;
  real ref_q [$];

  int n_upd = 0, n_y_frozen = 0, n_y_adapt = 0, n_moved = 0;
  int last_y_clk = -1, clk_cnt = 0;
  bit measuring = 0;

  always @(posedge clk) begin
    clk_cnt <= clk_cnt + 1;
    if (rst_n && cal_upd) n_upd <= n_upd + 1;
  end

  function automatic real rms_resid(output real g);
    g = syr / srr;
    return $sqrt((syy - 2.0 * g * syr + g * g * srr) / real'(nphase));
  endfunction

  initial begin
    real blk, yr, rr, g_frz, g_cal, e_frz, e_cal;
    int n_out, phase_len, n_smp;
    x = 0.0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    blk = 0.0;
    n_out = 0;
    n_smp = 0;
    for (int phase = 0; phase < 3; phase++) begin
      adapt_en = (phase != 0);
      phase_len = (phase == 0) ? N_FROZEN : (phase == 1) ? N_CAL : N_MEAS;
      syy = 0.0; syr = 0.0; srr = 0.0; nphase = 0;
      measuring = (phase != 1);
      n_out = 0;
      while (n_out < phase_len) begin
        if (y_valid) begin
          check(ref_q.size() > 0, "output without input block");
          rr = ref_q.pop_front();
          yr = real'(y);
          if (last_y_clk >= 0) check(clk_cnt - last_y_clk == D, "y_valid period");
          last_y_clk = clk_cnt;
          // skip the first outputs of a phase (filter history from before)
          if (measuring && n_out >= M) begin
            syy += yr * yr; syr += yr * rr; srr += rr * rr; nphase++;
          end
          if (adapt_en) n_y_adapt++; else n_y_frozen++;
          n_out++;
        end
        x = (real'($urandom % 100001) / 100000.0) - 0.5;
        blk += x;
        // input sample n_smp ends a block of D when n_smp mod D = D - 1
        if (n_smp % D == D - 1) begin
          ref_q.push_back(blk);
          blk = 0.0;
        end
        n_smp++;
        @(negedge clk);
      end
      if (phase == 0) begin
        e_frz = rms_resid(g_frz);
        $display("frozen calibration: scale %f, rms error %f LSB", g_frz / SCALE, e_frz);
      end
      if (phase == 1) begin
        for (int r = 0; r < M; r++) begin
          real cr, ex;
          cr = real'(c[r]) / real'(longint'(1) <<< 28);
          ex = gain(M + 1) / gain(r + 1);
          if (c[r] != (34'sd1 <<< 28)) n_moved++;
          check(cr - ex < 1.5e-3 && ex - cr < 1.5e-3, $sformatf("c[%0d] = %f, expected %f", r, cr, ex));
        end
      end
      if (phase == 2) begin
        e_cal = rms_resid(g_cal);
        $display("running calibration: scale %f, rms error %f LSB", g_cal / SCALE, e_cal);
        check(e_cal < 0.6 * e_frz, "calibration reduces the error");
        check(e_cal < 12.0, "calibrated error below 12 LSB");
        check(g_cal / SCALE - gain(M + 1) < 2e-3 && gain(M + 1) - g_cal / SCALE < 2e-3,
              "overall scale is the calibration channel gain");
      end
    end
    $display("mechanisms: updates=%0d frozen_outputs=%0d adapting_outputs=%0d corrections_moved=%0d",
             n_upd, n_y_frozen, n_y_adapt, n_moved);
    check(n_upd > 0, "coefficient updates happened");
    check(n_y_frozen > 0, "outputs with frozen calibration");
    check(n_y_adapt > 0, "outputs with running calibration");
    check(n_moved > 0, "gain corrections adapted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
