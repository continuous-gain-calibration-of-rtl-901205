// tb_channel_correct: self-checking test of demodulation and gain correction.
//
// Drives random channel outputs w, random signs p and correction terms c
// spread around 1.0 (and the extreme codes), and compares z with
// floor(p * w * c / 2^C_FRAC) computed in the testbench with 64-bit integers
// (the C_FRAC = 20 fraction bits keep the product within range). z must follow
// its w_valid by exactly one clock and hold otherwise.
module tb_channel_correct;
  localparam int WW = 17, CW = 24, CF = 20;
  localparam int ZW = WW + CW - CF + 1;

  logic clk = 0, rst_n = 0;
  logic signed [WW-1:0] w;
  logic w_valid, p_neg;
  logic signed [CW-1:0] c;
  logic signed [ZW-1:0] z;
  logic z_valid;
  int checks = 0, failures = 0;

  channel_correct #(.W_W(WW), .C_W(CW), .C_FRAC(CF)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint floor_div(input longint a, input int sh);
    longint d = longint'(1) << sh;
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_z, last_z;
    bit pend;
    w = '0; c = '0; p_neg = 0; w_valid = 0;
    pend = 0; last_z = 0; exp_z = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      check(z_valid == pend, "z_valid timing");
      if (pend) begin
        check(longint'(z) == exp_z, $sformatf("z got %0d exp %0d", z, exp_z));
        last_z = exp_z;
      end else if (n > 0) begin
        check(longint'(z) == last_z, "z holds between samples");
      end
      w_valid = ($urandom % 3) == 0;
      p_neg = 1'($urandom);
      case (n % 50)
        0: w = {1'b1, {(WW-1){1'b0}}};
        1: w = {1'b0, {(WW-1){1'b1}}};
        default: w = WW'($urandom);
      endcase
      // c in [0.98, 1.02] mostly, occasionally negative or large
      if (n % 37 == 0) c = CW'($urandom);
      else c = CW'((1 << CF) + int'($urandom % 41943) - 20971);
      exp_z = floor_div((p_neg ? -longint'(w) : longint'(w)) * longint'(c), CF);
      pend = w_valid;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
