// tb_level_qrs_detector: self-checking test of the per-level QRS detection
// sub-system (min/max/zero-cross detectors, state machine, pulse generator).
//
// A detail-coefficient stream is built the way a QRS complex shows in D_i: a
// negative lobe (down to -800), a zero crossing and a positive lobe (up to
// +800), repeated every 40 samples on top of +-3 noise.  Every fifth complex
// is a small one (peaks of +-200) that must stay below the adaptive
// thresholds.  With NC = 50 samples per second and CLK_HZ = 10 kHz the
// testbench checks that nothing is reported during the 5 s (250-sample)
// adaptation, that afterwards every large complex gives exactly one Pulse_i
// and small ones none, that Pulse_i lasts 30 ms (300 clocks) and rises three
// clocks after the clock edge that takes in the sample following the maximum,
// and that the thresholds settle between 5/8 of the small and of the large
// lobe peaks (a one-second window may hold only a small complex).
module tb_level_qrs_detector;
  import ecg_pkg::*;

  localparam int NC = 50;
  localparam int CLK_HZ = 10_000;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0;
  coef_t in_d = '0;
  logic  mn, zc, mx, qrs, en, pulse;
  coef_t t_p, t_n;

  level_qrs_detector #(.NC(NC), .CLK_HZ(CLK_HZ)) dut (
    .clk, .rst_n, .in_valid, .in_d,
    .min_detected(mn), .zc_detected(zc), .max_detected(mx),
    .qrs_detected(qrs), .enable_measuring(en), .pulse_i(pulse),
    .t_p, .t_n
  );

  int checks = 0, failures = 0;
  int n_pulse = 0, n_exp = 0, n_samp = 0;
  longint exp_rise = -1;
  bit started = 1'b0, prev_pulse = 1'b0;
  int width = 0;

  int shape [12] = '{0, -100, -400, -800, -400, -100, 100, 400, 800, 400, 100, 0};

  always @(posedge clk) if (started) begin
    if (pulse && !prev_pulse) begin
      n_pulse++;
      checks++;
      if ($time != exp_rise) begin
        failures++;
        $display("FAIL Pulse_i rose at %0t, expected %0t", $time, exp_rise);
      end
      if (!en) begin failures++; $display("FAIL pulse during adaptation"); end
      width = 0;
    end
    if (pulse) width++;
    if (!pulse && prev_pulse) begin
      checks++;
      if (width != 300) begin failures++; $display("FAIL Pulse_i %0d clocks long", width); end
    end
    prev_pulse = pulse;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    started = 1'b1;
    for (int beat = 0; beat < 30; beat++) begin
      bit tiny;
      tiny = (beat % 5 == 4);
      for (int k = 0; k < 40; k++) begin
        int v;
        v = (k < 12) ? shape[k] : 0;
        if (tiny) v = v / 4;
        v += int'($urandom_range(6)) - 3;
        if (k == 1 || k == 10) v = shape[k] / (tiny ? 4 : 1);   // clean lobe edges
        @(posedge clk);
        in_valid <= 1'b1;
        in_d <= coef_t'(v);
        n_samp++;
        // k == 9 is the sample after the maximum (k == 8)
        if (k == 9 && !tiny && n_samp > 5 * NC) begin
          n_exp++;
          exp_rise = $time + 10 * 5;
        end
        @(posedge clk);
        in_valid <= 1'b0;
        repeat (198) @(posedge clk);   // 200 clocks per sample: NC samples per second
      end
      if (beat == 10) begin
        checks++;
        if (int'(t_p) <= 250 || int'(t_p) > 502 || int'(t_n) >= -250 || int'(t_n) < -502) begin
          failures++;
          $display("FAIL thresholds %0d / %0d, expected 5/8 of the window peaks", t_p, t_n);
        end
      end
    end
    repeat (400) @(posedge clk);
    checks++;
    if (n_pulse != n_exp || n_exp < 15) begin
      failures++;
      $display("FAIL %0d pulses, expected %0d", n_pulse, n_exp);
    end
    $display("pulses %0d", n_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
