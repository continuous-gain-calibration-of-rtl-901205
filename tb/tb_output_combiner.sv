// tb_output_combiner: self-checking test of the channel summation.
//
// Sixteen random signed channel values (including all-maximum and all-minimum
// vectors, which need the full log2(M) bits of growth) are summed in the
// testbench and compared with y one clock after z_valid.
module tb_output_combiner;
  localparam int M = 16, ZW = 19;
  localparam int YW = ZW + $clog2(M);

  logic clk = 0, rst_n = 0;
  logic signed [ZW-1:0] z [M];
  logic z_valid;
  logic signed [YW-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0;

  output_combiner #(.M(M), .Z_W(ZW)) dut (.*);

  always #5 clk = ~clk;

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
    longint exp_y;
    bit pend;
    z_valid = 0; pend = 0; exp_y = 0;
    foreach (z[r]) z[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      check(y_valid == pend, "y_valid timing");
      if (pend) check(longint'(y) == exp_y, $sformatf("y got %0d exp %0d", y, exp_y));
      z_valid = 1'($urandom);
      exp_y = 0;
      foreach (z[r]) begin
        case (n % 20)
          0: z[r] = {1'b0, {(ZW-1){1'b1}}};
          1: z[r] = {1'b1, {(ZW-1){1'b0}}};
          default: z[r] = ZW'($urandom);
        endcase
        exp_y += longint'(z[r]);
      end
      pend = z_valid;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
