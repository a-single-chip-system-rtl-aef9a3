// tb_ecg_noise: detection accuracy of the ECG feature extractor on a harder
// synthetic ECG - noise, baseline wander and a varying heart rate.
//
// 60 s of ECG at a reduced clock (200 kHz; all design timing scales with
// CLK_HZ): beats with RR intervals drawn at random between 600 and 1000 ms
// (60-100 beats/min), R amplitudes between 1000 and 1800 codes, a 0.3 Hz
// baseline wander of +-300 codes, a 0.05 Hz drift of +-150 codes, and
// uniform noise of +-15 codes.  Each Pulse_for_QRS is matched with the beat
// whose R peak lies 0..60 ms before it; beats after the 5 s adaptation with
// no match are missed (FN), pulses with no beat are false (FP).  The
// testbench reports ACC = 100 * (1 - (FP + FN) / beats) and fails below 95 %.
// Every RR value that follows two consecutive detected beats must match the
// true interval to within 12 ms.
//
// The accuracy measure is the usual one for QRS detectors; the signal and the
// 95 % limit are this testbench's own.  A beat much smaller than the ones
// before it can stay below the adaptive thresholds on every level, so a few
// misses are expected and 100 % is not required.
module tb_ecg_noise;
  localparam int unsigned CLK_HZ = 200_000;
  localparam int unsigned FS_HZ  = 800;
  localparam int unsigned BAUD   = 20_000;
  localparam int N_BEATS = 80;
  localparam real SIM_S  = 60.0;

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        adc_cs_n, adc_sclk, adc_din, adc_dout, adc_eoc;
  logic        pulse_for_qrs, enable_measuring, rr_valid, hr_valid, uart_txd;
  logic [2:0]  pulse_level;
  logic [10:0] rr_int;
  logic [8:0]  hr;
  logic [6:0]  hex0, hex1, hex2;

  always #5 clk = ~clk;

  ecg_feature_extractor #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .SCLK_HALF(2)) dut (.*);

  // ---------------- synthetic ECG ----------------
  int  beat_c [N_BEATS];      // R peak sample index
  real beat_a [N_BEATS];      // R amplitude
  int  beat_hit [N_BEATS];
  int  n_beats = 0;

  initial begin
    int c;
    c = 400;
    for (int k = 0; k < N_BEATS; k++) begin
      beat_c[k] = c;
      beat_a[k] = 1000.0 + real'($urandom_range(800));
      beat_hit[k] = 0;
      if (real'(c) / real'(FS_HZ) < SIM_S - 1.0) n_beats = k + 1;
      c += int'(FS_HZ) * (600 + int'($urandom_range(400))) / 1000;
    end
  end

  function automatic real gauss(real d, real s);
    return $exp(-(d * d) / (2.0 * s * s));
  endfunction

  function automatic logic [11:0] ecg_code(int n);
    real v, d, t;
    t = real'(n) / real'(FS_HZ);
    v = 2048.0 + 300.0 * $sin(2.0 * 3.14159265 * 0.3 * t) + 150.0 * $sin(2.0 * 3.14159265 * 0.05 * t);
    for (int k = 0; k < N_BEATS; k++) begin
      d = real'(n - beat_c[k]) / real'(FS_HZ);
      if (d > -0.2 && d < 0.6) begin
        v += beat_a[k] * gauss(d, 0.010);
        v -= 0.2 * beat_a[k] * gauss(d - 0.018, 0.006);
        v += 250.0 * gauss(d - 0.300, 0.050);
      end
    end
    v += real'($urandom_range(30)) - 15.0;
    if (v < 0.0) v = 0.0;
    if (v > 4095.0) v = 4095.0;
    return 12'(int'(v));
  endfunction

  logic [11:0] code;
  logic [7:0]  last_cmd;
  int          frames;
  int          samp_n = 0;

  always @(negedge adc_cs_n) begin
    code = ecg_code(samp_n);
    samp_n++;
  end

  tlc2543_model u_adc (
    .cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout), .eoc(adc_eoc),
    .analog_code(code), .last_cmd, .frames
  );

  // ---------------- scoring ----------------
  function automatic longint now();
    return longint'($time / 10);
  endfunction

  function automatic longint beat_cyc(int k);
    return (longint'(beat_c[k]) + 1) * CLK_HZ / FS_HZ;
  endfunction

  int checks = 0, failures = 0, fp = 0, fn = 0, tp = 0, n_rr_ok = 0;
  longint en_cyc = -1;
  int last_hit = -10;          // beat index of the previous accepted pulse
  int prev_match = -10;

  always @(posedge enable_measuring) en_cyc = now();

  always @(posedge pulse_for_qrs) begin
    int best;
    longint dt;
    best = -1;
    for (int k = 0; k < N_BEATS; k++) begin
      dt = now() - beat_cyc(k);
      if (dt >= 0 && dt < longint'(CLK_HZ) * 60 / 1000) best = k;
    end
    if (best < 0) begin
      fp++;
      $display("false detection at %0d ms", now() * 1000 / CLK_HZ);
    end else begin
      beat_hit[best]++;
    end
    prev_match = last_hit;
    last_hit = best;
  end

  always @(posedge rr_valid) begin
    #1;
    if (last_hit >= 0 && prev_match >= 0 && last_hit == prev_match + 1) begin
      int true_rr;
      true_rr = (beat_c[last_hit] - beat_c[prev_match]) * 1000 / int'(FS_HZ);
      checks++;
      n_rr_ok++;
      if (int'(rr_int) < true_rr - 12 || int'(rr_int) > true_rr + 12) begin
        failures++;
        $display("FAIL RR %0d ms, true %0d ms", rr_int, true_rr);
      end
    end
  end

  initial begin
    int tb_beats;
    real acc;
    @(posedge clk);
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (int'(SIM_S * real'(CLK_HZ))) @(posedge clk);
    tb_beats = 0;
    for (int k = 0; k < n_beats; k++) begin
      if (beat_cyc(k) > en_cyc + CLK_HZ / 20 && beat_cyc(k) + CLK_HZ / 10 < now()) begin
        tb_beats++;
        if (beat_hit[k] == 0) begin
          fn++;
          $display("missed beat at %0d ms", beat_c[k] * 1000 / int'(FS_HZ));
        end else tp++;
        if (beat_hit[k] > 1) fp += beat_hit[k] - 1;
      end
    end
    acc = 100.0 * (1.0 - real'(fp + fn) / real'(tb_beats));
    $display("beats=%0d detected=%0d FP=%0d FN=%0d ACC=%0.2f%% RR values checked=%0d",
             tb_beats, tp, fp, fn, acc, n_rr_ok);
    checks += 3;
    if (acc < 95.0) begin failures++; $display("FAIL accuracy below 95 %%"); end
    if (tb_beats < 40) begin failures++; $display("FAIL too few beats scored"); end
    if (n_rr_ok < 20) begin failures++; $display("FAIL too few RR values checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (int'((SIM_S + 5.0) * real'(CLK_HZ))) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
