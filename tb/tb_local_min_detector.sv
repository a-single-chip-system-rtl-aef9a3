// tb_local_min_detector: self-checking test of the local minimum detector.
//
// A random detail stream (values in -700..700, with occasional large spikes)
// is fed at one sample every 3 clocks with a short 1 s window (NC = 10) so
// that the adaptive threshold changes often.  A reference model in the
// testbench keeps its own window extreme, four-deep history, threshold
// 5/8 * mean and REG5..REG7, and predicts every detection; each
// min_detected pulse is compared with the prediction (value and order),
// the threshold output is compared after every sample, and the latency
// (the pulse is seen three clock edges after the edge that presented the
// sample following the extremum) is checked.
module tb_local_min_detector;
  import ecg_pkg::*;

  localparam int NC = 10;
  localparam bit IS_MAX = 1'b0;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0;
  coef_t in_d = '0;
  logic  det;
  coef_t det_val, thr;

  local_min_detector #(.NC(NC)) dut (
    .clk, .rst_n, .in_valid, .in_d,
    .min_detected(det), .min_value(det_val), .threshold(thr)
  );

  int checks = 0, failures = 0, n_det = 0, n_exp = 0;
  int exp_q [$];
  int hist [4] = '{0, 0, 0, 0};
  int win_ext = 0, win_cnt = 0;
  int r5 = 0, r6 = 0, r7 = 0;
  int thr_m = 0;
  longint exp_t = -1;
  bit started = 1'b0;

  function automatic int fdiv(int v, int s);   // floor(v / 2^s)
    return v >>> s;
  endfunction

  task automatic model(int v);
    int e;
    e = IS_MAX ? ((v > win_ext) ? v : win_ext) : ((v < win_ext) ? v : win_ext);
    if (win_cnt == NC - 1) begin
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = e;
      win_cnt = 0; win_ext = 0;
    end else begin
      win_cnt++; win_ext = e;
    end
    thr_m = fdiv(5 * fdiv(hist[0] + hist[1] + hist[2] + hist[3], 2), 3);
    r7 = r6; r6 = r5; r5 = v;
    if (IS_MAX ? (r7 < r6 && r6 > thr_m && r5 < r6) : (r7 > r6 && r6 < thr_m && r5 > r6)) begin
      exp_q.push_back(r6);
      n_exp++;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && started && det) begin
      n_det++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected detection of %0d", det_val);
      end else begin
        int e;
        e = exp_q.pop_front();
        if (int'(det_val) != e) begin
          failures++;
          $display("FAIL detected %0d expected %0d", det_val, e);
        end
      end
      checks++;
      if ($time != exp_t) begin
        failures++;
        $display("FAIL detection at %0t, expected %0t", $time, exp_t);
      end
    end
  end

  initial begin
    #5_000_000;
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
    for (int k = 0; k < 3000; k++) begin
      int v;
      v = int'($urandom_range(1400)) - 700;
      if ($urandom_range(20) == 0) v = IS_MAX ? 1500 + int'($urandom_range(500)) : -1500 - int'($urandom_range(500));
      @(posedge clk);
      in_valid <= 1'b1;
      in_d <= coef_t'(v);
      model(v);
      exp_t = $time + 30;
      @(posedge clk);
      in_valid <= 1'b0;
      @(posedge clk);
      @(posedge clk);
      checks++;
      if (int'(thr) != thr_m) begin
        failures++;
        $display("FAIL threshold %0d expected %0d", thr, thr_m);
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (n_det != n_exp || n_exp < 50) begin
      failures++;
      $display("FAIL %0d detections, expected %0d (need >= 50)", n_det, n_exp);
    end
    $display("detections: %0d", n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
