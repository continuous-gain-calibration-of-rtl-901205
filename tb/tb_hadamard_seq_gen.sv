// tb_hadamard_seq_gen: self-checking test of the Hadamard sequence generator.
//
// Builds the reference Hadamard matrix with the block recursion
// H_{k} = [H_{k-1} H_{k-1}; H_{k-1} -H_{k-1}] and checks, over three full
// sequence periods (3*M*D clocks):
//  - s_neg equals row r of the matrix in the current column, every column
//    lasting exactly D clocks and the columns running 0..M-1 in order;
//  - sc_neg is +-1 and equals sum_r alpha_r s_r with |alpha_r| = 1/4 and the
//    signs given by pids_pkg::alpha_neg (checked through the Walsh transform);
//  - dec_strobe comes every D clocks, LAT clocks after each block end, and
//    p_neg then holds the column of the block just ended.
module tb_hadamard_seq_gen;
  import pids_pkg::*;
  localparam int M = 16, D = 6, LAT = 1;

  logic clk = 0, rst_n = 0;
  logic [M-1:0] s_neg, p_neg;
  logic sc_neg, dec_strobe;
  int checks = 0, failures = 0;

  hadamard_seq_gen #(.M(M), .D(D), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  int H [M][M];
  int sc_seen [M];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, last_strobe, exp_col;
    // Reference matrix by the block recursion.
    H[0][0] = 1;
    for (int sz = 1; sz < M; sz *= 2)
      for (int i = 0; i < sz; i++)
        for (int j = 0; j < sz; j++) begin
          H[i][j+sz]    =  H[i][j];
          H[i+sz][j]    =  H[i][j];
          H[i+sz][j+sz] = -H[i][j];
        end

    repeat (3) @(negedge clk);
    rst_n = 1;
    last_strobe = -1;
    for (n = 0; n < 3 * M * D; n++) begin
      if (n > 0) @(negedge clk);
      exp_col = (n / D) % M;
      for (int r = 0; r < M; r++)
        check(s_neg[r] == (H[r][exp_col] < 0), $sformatf("s_neg n=%0d r=%0d", n, r));
      sc_seen[exp_col] = sc_neg ? -1 : 1;
      if (n >= LAT) begin
        check(dec_strobe == (((n - LAT) % D) == D - 1), $sformatf("dec_strobe n=%0d", n));
      end
      if (dec_strobe) begin
        if (last_strobe >= 0) check(n - last_strobe == D, "strobe period");
        last_strobe = n;
        @(negedge clk);
        n++;
        exp_col = ((n - LAT - 1) / D) % M;
        for (int r = 0; r < M; r++)
          check(p_neg[r] == (H[r][exp_col] < 0), $sformatf("p_neg n=%0d r=%0d", n, r));
        exp_col = (n / D) % M;
        for (int r = 0; r < M; r++)
          check(s_neg[r] == (H[r][exp_col] < 0), $sformatf("s_neg' n=%0d r=%0d", n, r));
        sc_seen[exp_col] = sc_neg ? -1 : 1;
      end
    end
    // Calibration sequence: Walsh coefficients must all be +-M/4 * ... i.e.
    // alpha_r = (1/M) sum_j H[r][j] s_c[j] must be +-1/4 with the package sign.
    for (int r = 0; r < M; r++) begin
      int acc;
      acc = 0;
      for (int j = 0; j < M; j++) acc += H[r][j] * sc_seen[j];
      // alpha_r = acc / M; |alpha_r| = 1/4  <=>  |acc| = M/4
      check(acc == (alpha_neg(r) ? -M/4 : M/4), $sformatf("alpha r=%0d acc=%0d", r, acc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
