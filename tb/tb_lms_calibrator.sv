// tb_lms_calibrator: self-checking test of the LMS gain calibrator.
//
// Synthetic channel data: 16 random channel outputs w_r per decimated sample
// (one every D = 6 clocks), channel gains a_r = 1 + 1 % * g_r with g_r spread
// over [-1, 1], calibration gain a_c, and a calibration output built from the
// linear model w_c = beta_0 + sum_r alpha_r a_c / a_r * w_r plus +-1 LSB of
// noise. Checks:
//  - the first prediction error equals w_c - sum_r alpha_r w_r exactly (reset
//    coefficients are alpha_r), with alpha_r = +-1/4 taken from the sequence
//    definition in the testbench (Walsh transform of the calibration sequence);
//  - upd follows every w_valid by one clock while adapt_en is high;
//  - with adapt_en low the corrections do not move;
//  - after 4096 samples (the calibration length of the evaluation) every c_r
//    is within 5e-4 of a_c / a_r and beta_0 within 2 LSB of the offset.
module tb_lms_calibrator;
  import pids_pkg::*;
  localparam int M = 16, D = 6, WW = 17, BW = 34, BF = 30;
  localparam int CF = BF - 2;
  localparam int NCAL = 4096;

  logic clk = 0, rst_n = 0, adapt_en = 0, w_valid = 0;
  logic signed [WW-1:0] w [M];
  logic signed [WW-1:0] w_c;
  logic signed [BW-1:0] c [M];
  logic signed [WW+BF+1:0] beta0;
  logic signed [WW+1:0] err;
  logic upd;
  int checks = 0, failures = 0;

  lms_calibrator #(.M(M), .W_W(WW), .B_W(BW), .B_FRAC(BF), .MU_LOG2(28), .MU0_LOG2(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real a [M];
  real a_c, b0;
  int  alpha4 [M];   // 4 * alpha_r

  task automatic drive_sample(input bit first);
    real wc_r;
    longint wsum4;
    wc_r = b0;
    wsum4 = 0;
    for (int r = 0; r < M; r++) begin
      w[r] = WW'(int'($urandom % 8001) - 4000);
      wc_r += real'(alpha4[r]) / 4.0 * a_c / a[r] * real'(w[r]);
      wsum4 += longint'(alpha4[r]) * longint'(w[r]);
    end
    wc_r += real'(int'($urandom % 3) - 1);
    w_c = WW'($rtoi(wc_r >= 0.0 ? wc_r + 0.5 : wc_r - 0.5));
    w_valid = 1;
    @(negedge clk);
    w_valid = 0;
    check(upd == adapt_en, "upd timing");
    if (first) begin
      // err = floor(w_c - wsum4/4)
      longint e4, ef;
      e4 = 4 * longint'(w_c) - wsum4;
      ef = (e4 >= 0) ? e4 / 4 : -((-e4 + 3) / 4);
      check(longint'(err) == ef, $sformatf("first error got %0d exp %0d", err, ef));
    end
    repeat (D - 1) @(negedge clk);
  endtask

  initial begin
    logic signed [BW-1:0] c_hold [M];
    int sc [M];
    // alpha from the calibration sequence: alpha_r = (1/M) sum_j H[r][j] s_c[j]
    for (int j = 0; j < M; j++) sc[j] = cal_neg(j) ? -1 : 1;
    for (int r = 0; r < M; r++) begin
      int acc;
      acc = 0;
      for (int j = 0; j < M; j++) acc += (($countones(r & j) % 2 == 1) ? -1 : 1) * sc[j];
      alpha4[r] = acc / (M / 4);
    end
    for (int r = 0; r < M; r++) a[r] = 1.0 + 0.01 * real'(((5 * r + 3) % 9) - 4) / 4.0;
    a_c = 1.004;
    b0 = 37.0;
    foreach (w[r]) w[r] = '0;
    w_c = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < M; r++) check(c[r] == (BW'(1) <<< CF), "reset c = 1.0");
    // Frozen: adapt_en low.
    drive_sample(1);
    for (int i = 0; i < 20; i++) drive_sample(0);
    for (int r = 0; r < M; r++) check(c[r] == (BW'(1) <<< CF), "frozen while adapt_en low");
    adapt_en = 1;
    for (int i = 0; i < NCAL; i++) drive_sample(0);
    for (int r = 0; r < M; r++) begin
      real cr, ex;
      cr = real'(c[r]) / real'(longint'(1) <<< CF);
      ex = a_c / a[r];
      check(cr - ex < 5e-4 && ex - cr < 5e-4, $sformatf("c[%0d] = %f, expected %f", r, cr, ex));
    end
    begin
      real b;
      b = real'(beta0) / real'(longint'(1) <<< BF);
      check(b - b0 < 2.0 && b0 - b < 2.0, $sformatf("beta0 = %f, expected %f", b, b0));
    end
    // Freeze again: coefficients hold.
    adapt_en = 0;
    @(negedge clk);
    c_hold = c;
    for (int i = 0; i < 50; i++) drive_sample(0);
    for (int r = 0; r < M; r++) check(c[r] == c_hold[r], "hold after freeze");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
