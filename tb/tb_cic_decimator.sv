// tb_cic_decimator: self-checking test of the decimating CIC filter.
//
// Two instances: the converter's default (ORDER 1, R = 6, N_DIFF = 16, 10-bit
// input) and a third-order one (R = 3, N_DIFF = 2) that exercises the
// integrator wrap-around. Random full-scale codes are applied every clock and a
// decimation strobe every R clocks. The reference is a direct convolution with
// the impulse response of ((1 - z^-RN)/(1 - z^-1))^ORDER, built by repeated
// convolution of boxcars in the testbench. Each output must appear exactly one
// clock after its strobe.
module tb_cic_decimator;
  localparam int IW = 10;
  localparam int R1 = 6, N1 = 16, K1 = 1;
  localparam int R2 = 3, N2 = 2,  K2 = 3;
  localparam int OW1 = IW + K1 * $clog2(R1 * N1);
  localparam int OW2 = IW + K2 * $clog2(R2 * N2);
  localparam int NS = 2000;

  logic clk = 0, rst_n = 0;
  logic signed [IW-1:0] in_code;
  logic st1, st2, v1, v2;
  logic signed [OW1-1:0] w1;
  logic signed [OW2-1:0] w2;
  int checks = 0, failures = 0;

  cic_decimator #(.IN_W(IW), .R(R1), .N_DIFF(N1), .ORDER(K1)) d1 (
    .clk, .rst_n, .in_code, .dec_strobe(st1), .w(w1), .w_valid(v1));
  cic_decimator #(.IN_W(IW), .R(R2), .N_DIFF(N2), .ORDER(K2)) d2 (
    .clk, .rst_n, .in_code, .dec_strobe(st2), .w(w2), .w_valid(v2));

  always #5 clk = ~clk;

  longint x_hist [NS];
  longint h1 [], h2 [];

  function automatic void make_h(input int len, input int order, ref longint h []);
    longint t [];
    h = new [1];
    h[0] = 1;
    for (int o = 0; o < order; o++) begin
      t = new [h.size() + len - 1];
      foreach (t[i]) t[i] = 0;
      foreach (h[i]) for (int k = 0; k < len; k++) t[i+k] += h[i];
      h = t;
    end
  endfunction

  function automatic longint ref_out(input int n, ref longint h []);
    longint s;
    s = 0;
    foreach (h[k]) if (n - k >= 0) s += h[k] * x_hist[n-k];
    return s;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pend1, pend2;
    int n1, n2;
    make_h(R1 * N1, K1, h1);
    make_h(R2 * N2, K2, h2);
    in_code = '0; st1 = 0; st2 = 0;
    pend1 = 0; pend2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      // Outputs of the strobes of the previous clock.
      check(v1 == pend1, $sformatf("w_valid1 timing n=%0d", n));
      check(v2 == pend2, $sformatf("w_valid2 timing n=%0d", n));
      if (pend1) check(longint'(w1) == ref_out(n1, h1), $sformatf("w1 n=%0d got %0d exp %0d", n1, w1, ref_out(n1, h1)));
      if (pend2) check(longint'(w2) == ref_out(n2, h2), $sformatf("w2 n=%0d got %0d exp %0d", n2, w2, ref_out(n2, h2)));
      in_code = (n % 97 < 20) ? ((n % 2 == 1) ? 10'sd511 : -10'sd512) : IW'($urandom);
      x_hist[n] = longint'(in_code);
      st1 = (n % R1) == R1 - 1;
      st2 = (n % R2) == R2 - 1;
      pend1 = st1; n1 = n;
      pend2 = st2; n2 = n;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
