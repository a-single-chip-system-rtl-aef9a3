// tb_zero_cross_detector: self-checking test of the zero-crossing detector.
//
// Random coefficients, a fifth of them exactly zero, are fed at one sample
// every 4 clocks.  The testbench predicts a crossing whenever the previous
// sample was negative and the new one is not, and checks every pulse, its
// timing (seen three clock edges after the edge that presented the sample)
// and the total count.
module tb_zero_cross_detector;
  import ecg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0;
  coef_t in_d = '0;
  logic  zc;

  zero_cross_detector dut (.clk, .rst_n, .in_valid, .in_d, .zc_detected(zc));

  int checks = 0, failures = 0, n_zc = 0, n_exp = 0;
  longint exp_t = -1;
  bit started = 1'b0;

  always @(posedge clk) begin
    if (started && zc) begin
      n_zc++;
      checks++;
      if ($time != exp_t) begin
        failures++;
        $display("FAIL crossing reported at %0t, expected %0t", $time, exp_t);
      end
    end
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev, v;
    prev = 0;
    @(posedge clk);
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    started = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      v = ($urandom_range(4) == 0) ? 0 : int'($urandom_range(4000)) - 2000;
      @(posedge clk);
      in_valid <= 1'b1;
      in_d <= coef_t'(v);
      if (prev < 0 && v >= 0) begin
        n_exp++;
        exp_t = $time + 30;
      end
      prev = v;
      @(posedge clk);
      in_valid <= 1'b0;
      repeat (2) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (n_zc != n_exp || n_exp < 100) begin
      failures++;
      $display("FAIL %0d crossings, expected %0d", n_zc, n_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
