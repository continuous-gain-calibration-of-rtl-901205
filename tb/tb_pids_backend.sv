// tb_pids_backend: test of the synthesizable digital back end on its own.
//
// The analog channels are replaced by ideal quantisers written here:
// channel r returns round(2^(Q_BITS-1)/2 * a_r * s_r * x) one clock after the
// sample, using the modulation signs the back end puts out; the calibration
// channel does the same with s_c and a_c. Q_BITS is raised to 12 for finer
// codes, and the LMS step lowered by 2^-4 to match the 4x larger channel
// outputs. Checks:
//  - s_neg and sc_neg follow the Hadamard matrix (built here by the block
//    recursion) and the calibration sequence definition, every sample;
//  - with calibration frozen (all c_r = 1) every output is exactly
//    sum_r H[r][col] * (sum of the last M*D codes of channel r), col being the
//    column of the output's block: an exact integer check of filtering,
//    decimation, demodulation and summation;
//  - y_valid comes every D clocks;
//  - after 4096 outputs with calibration running every c_r is within 2e-3 of
//    a_c / a_r and the output's error against the ideal (the block sums of x,
//    scaled) is below 60 % of the error with calibration frozen.
module tb_pids_backend;
  localparam int M = 16, D = 6, QB = 12;
  localparam int WW = QB + $clog2(M * D);
  localparam int CF = 28;
  localparam int YW = WW + 34 - CF + 1 + $clog2(M);
  localparam real QS = 1024.0;   // codes per unit input
  localparam int NS_MAX = 60000;

  logic clk = 0, rst_n = 0, adapt_en = 0;
  logic signed [QB-1:0] code [M];
  logic signed [QB-1:0] code_c;
  logic [M-1:0] s_neg;
  logic sc_neg;
  logic signed [YW-1:0] y;
  logic y_valid;
  logic signed [33:0] c [M];
  logic signed [WW+30+1:0] beta0;
  logic signed [WW+1:0] err;
  logic cal_upd;
  int checks = 0, failures = 0;

  pids_backend #(.Q_BITS(QB), .MU_LOG2(33)) dut (.*);

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

  function automatic int qround(input real v);
    return $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
  endfunction

  int H [M][M];
  int sc_ref [M];
  int hist [M][NS_MAX];
  real xsum [$];
  int blk_col [$];
  int blk_end [$];

  initial begin
    real x, blk, syy, syr, srr, g, e_frz, e_cal, yr, rr;
    int n, n_out, last_y, pend [M], pend_c, col, nmeas;
    H[0][0] = 1;
    for (int sz = 1; sz < M; sz *= 2)
      for (int i = 0; i < sz; i++)
        for (int j = 0; j < sz; j++) begin
          H[i][j+sz] = H[i][j]; H[i+sz][j] = H[i][j]; H[i+sz][j+sz] = -H[i][j];
        end
    // calibration sequence: the +-1 sequence whose Walsh coefficients are +-M/4,
    // from the bent function j0 j1 xor j2 j3
    for (int j = 0; j < M; j++) sc_ref[j] = (((j & 1) & ((j >> 1) & 1)) ^ (((j >> 2) & 1) & ((j >> 3) & 1))) != 0 ? -1 : 1;
    foreach (code[r]) code[r] = '0;
    code_c = '0;
    foreach (pend[r]) pend[r] = 0;
    pend_c = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    n = 0; n_out = 0; last_y = -1; blk = 0.0;
    e_frz = 0.0;
    for (int phase = 0; phase < 3; phase++) begin
      int len;
      adapt_en = (phase != 0);
      len = (phase == 0) ? 600 : (phase == 1) ? 4096 : 1500;
      syy = 0.0; syr = 0.0; srr = 0.0; nmeas = 0;
      n_out = 0;
      while (n_out < len) begin
        // codes of the previous sample reach the back end now
        foreach (code[r]) code[r] = QB'(pend[r]);
        code_c = QB'(pend_c);
        if (y_valid) begin
          int bend, bcol;
          longint yref;
          rr = xsum.pop_front();
          bcol = blk_col.pop_front();
          bend = blk_end.pop_front();
          if (last_y >= 0) check(n - last_y == D, "y_valid period");
          last_y = n;
          if (phase == 0) begin
            yref = 0;
            for (int r = 0; r < M; r++) begin
              longint s;
              s = 0;
              for (int k = 0; k < M * D; k++) if (bend - k >= 0) s += longint'(hist[r][bend-k]);
              yref += longint'(H[r][bcol]) * s;
            end
            check(longint'(y) == yref, $sformatf("exact output, block end %0d: got %0d exp %0d", bend, y, yref));
          end
          if (phase != 1 && n_out >= M) begin
            yr = real'(y);
            syy += yr * yr; syr += yr * rr; srr += rr * rr; nmeas++;
          end
          n_out++;
        end
        // new sample n
        col = (n / D) % M;
        for (int r = 0; r < M; r++) check(s_neg[r] == (H[r][col] < 0), "s_neg");
        check(sc_neg == (sc_ref[col] < 0), "sc_neg");
        x = (real'($urandom % 100001) / 100000.0) - 0.5;
        for (int r = 0; r < M; r++) begin
          pend[r] = qround(QS * gain(r + 1) * (s_neg[r] ? -x : x));
          hist[r][n] = pend[r];
        end
        pend_c = qround(QS * gain(M + 1) * (sc_neg ? -x : x));
        blk += x;
        if (n % D == D - 1) begin
          xsum.push_back(blk); blk_col.push_back(col); blk_end.push_back(n);
          blk = 0.0;
        end
        n++;
        @(negedge clk);
      end
      if (phase == 0) begin
        g = syr / srr;
        e_frz = $sqrt((syy - 2.0 * g * syr + g * g * srr) / real'(nmeas));
        $display("frozen: rms error %f LSB", e_frz);
      end
      if (phase == 1)
        for (int r = 0; r < M; r++) begin
          real cr, ex;
          cr = real'(c[r]) / real'(longint'(1) <<< CF);
          ex = gain(M + 1) / gain(r + 1);
          check(cr - ex < 2e-3 && ex - cr < 2e-3, $sformatf("c[%0d] = %f, expected %f", r, cr, ex));
        end
      if (phase == 2) begin
        g = syr / srr;
        e_cal = $sqrt((syy - 2.0 * g * syr + g * g * srr) / real'(nmeas));
        $display("calibrated: rms error %f LSB", e_cal);
        check(e_cal < 0.6 * e_frz, "calibration reduces the error");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
