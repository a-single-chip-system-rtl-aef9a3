// ecg_tb_checker: stimulus and checking for end-to-end tests of
// ecg_feature_extractor, shared by the reduced-clock and the full-size
// testbench.  Not synthesizable.
//
// It makes the clock and reset, holds the A/D converter model and feeds it a
// synthetic ECG: a baseline at mid-scale, and per beat a Gaussian R wave
// (+1500 codes, sigma 10 ms), an S dip and a broad T wave, plus +-2 codes of
// noise.  Beats come every 750 ms (80 beats/min); one premature beat is
// inserted 150 ms after a normal one, closer than the 200 ms limit.
//
// Checks, all against the known beat times:
//   - no Pulse_for_QRS before the 5 s adaptation ends;
//   - every normal beat after it gives exactly one Pulse_for_QRS, 20 ms long,
//     within 60 ms of the R peak, and no pulse appears without a beat;
//   - the premature beat is seen on some level but refused by the 200 ms rule;
//   - each RR value (after the first) is 750 ms to within 12 ms;
//   - HR after the first 15 s window is 80 +- 4 beats/min and the 7-segment
//     digits show it;
//   - every RR value is received on the serial line as two characters.
// It counts how often each mechanism happened (A/D frames, adaptation end,
// detections per level, overlap of level pulses in the OR gate, refusals by
// the 200 ms rule, RR and HR latching, serial frames, display updates) and
// counts a failure for any that never happened.  In a full run `done` rises
// when the first HR value has been checked and the next beat after it seen.
// A short run (FULL_RUN = 0) has no premature beat and ends once two RR values
// have been received on the serial line, about 0.9 s after adaptation;
// it checks adaptation, detection, RR, the serial line and the A/D frames.
module ecg_tb_checker #(
  parameter int unsigned CLK_HZ = 200_000,
  parameter int unsigned FS_HZ  = 800,
  parameter int unsigned BAUD   = 20_000,
  // full run: premature beat, first 15 s HR window, all mechanisms required.
  // short run (FULL_RUN = 0): ends after the second RR value.
  parameter bit          FULL_RUN = 1'b1,
  parameter int unsigned FIRST_BEAT_MS = 375
) (
  output logic        clk,
  output logic        rst_n,
  input  logic        adc_cs_n,
  input  logic        adc_sclk,
  input  logic        adc_din,
  output logic        adc_dout,
  output logic        adc_eoc,
  input  logic        pulse_for_qrs,
  input  logic [2:0]  pulse_level,
  input  logic        enable_measuring,
  input  logic [10:0] rr_int,
  input  logic        rr_valid,
  input  logic [8:0]  hr,
  input  logic        hr_valid,
  input  logic        uart_txd,
  input  logic [6:0]  hex0,
  input  logic [6:0]  hex1,
  input  logic [6:0]  hex2,
  output logic        done,
  output int          checks,
  output int          failures
);

  localparam int RR_SAMPLES = FS_HZ * 3 / 4;        // 750 ms
  localparam int FIRST_BEAT = FS_HZ * FIRST_BEAT_MS / 1000;
  localparam int PREMATURE_AFTER = 12;              // beat index
  localparam int PREMATURE_GAP = FS_HZ * 3 / 20;    // 150 ms
  localparam int N_BEATS = 40;
  localparam int BIT_CLKS = CLK_HZ / BAUD;

  initial begin
    clk = 1'b0; rst_n = 1'b1; done = 1'b0; checks = 0; failures = 0;
  end
  always #5 clk = ~clk;

  // ---------------- beat schedule and synthetic ECG ----------------
  int beat_c [N_BEATS + 1];        // centre sample of each beat
  bit beat_premature [N_BEATS + 1];
  int beat_hits [N_BEATS + 1];

  initial begin
    int k;
    k = 0;
    for (int b = 0; b < N_BEATS; b++) begin
      beat_c[k] = FIRST_BEAT + b * RR_SAMPLES;
      beat_premature[k] = 1'b0;
      beat_hits[k] = 0;
      k++;
      if (FULL_RUN && b == PREMATURE_AFTER) begin
        beat_c[k] = FIRST_BEAT + b * RR_SAMPLES + PREMATURE_GAP;
        beat_premature[k] = 1'b1;
        beat_hits[k] = 0;
        k++;
      end
    end
  end

  function automatic real gauss(real d, real s);
    return $exp(-(d * d) / (2.0 * s * s));
  endfunction

  function automatic logic [11:0] ecg_code(int n);
    real v, d, fs;
    fs = real'(FS_HZ);
    v = 2048.0;
    for (int k = 0; k <= N_BEATS; k++) begin
      d = real'(n - beat_c[k]) / fs;            // seconds from the R peak
      if (d > -0.2 && d < 0.6) begin
        v += 1500.0 * gauss(d, 0.010);
        v -= 300.0 * gauss(d - 0.018, 0.006);
        v += 250.0 * gauss(d - 0.300, 0.050);
      end
    end
    v += real'($urandom_range(4)) - 2.0;
    return 12'(int'(v));
  endfunction

  // one converter frame per sample: the code for sample n is presented for
  // frame n (the converter returns it one frame later)
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

  // time of sample n's R peak in clocks: frame n is read at about n/fs, and
  // the sample reaches the transform one frame later
  function automatic longint beat_cyc(int k);
    return (longint'(beat_c[k]) + 1) * CLK_HZ / FS_HZ;
  endfunction

  // ---------------- monitors ----------------
  // All monitors wake on signal edges rather than on every clock, which keeps
  // the full-size (50 MHz) run fast.
  longint en_cyc = -1;
  int n_adapt = 0, n_lvl [3] = '{0, 0, 0}, n_overlap = 0, n_reject = 0;
  int n_accept = 0, n_rr = 0, n_hr = 0, n_uart = 0, n_disp = 0;
  longint pfq_rise = -1;
  int rr_q [$];
  int delay_sum = 0;
  bit started = 1'b0;
  bit hr_checked = 1'b0;
  bit overlap_seen = 1'b0;
  int beats_after_hr = 0;
  logic or_pulse;

  assign or_pulse = |pulse_level;

  function automatic longint now();      // clock cycles since time 0
    return longint'($time / 10);
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d ms: %s", now() * 1000 / CLK_HZ, msg);
  endtask

  function automatic int seg_digit(logic [6:0] s);
    logic [6:0] t [10];
    t = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78, 7'h00, 7'h10};
    for (int i = 0; i < 10; i++) if (s == t[i]) return i;
    return -1;
  endfunction

  // adaptation
  always @(posedge enable_measuring) if (started) begin
    n_adapt++;
    en_cyc = now();
  end

  // per-level pulses and their overlap in the OR gate
  always @(posedge pulse_level[0]) if (started) n_lvl[0]++;
  always @(posedge pulse_level[1]) if (started) n_lvl[1]++;
  always @(posedge pulse_level[2]) if (started) n_lvl[2]++;
  always @(pulse_level) overlap_seen = overlap_seen || ($countones(pulse_level) >= 2);

  // each OR_gate_pulse: overlapped levels?  refused by the 200 ms rule?
  always @(posedge or_pulse) if (started) begin
    longint t0;
    t0 = now();
    overlap_seen = ($countones(pulse_level) >= 2);
    repeat (3) @(posedge clk);
    if (pfq_rise < t0) n_reject++;
    @(negedge or_pulse);
    if (overlap_seen) n_overlap++;
  end

  // Pulse_for_QRS
  always @(posedge pulse_for_qrs) if (started) begin
    int best;
    longint dt, c;
    c = now();
    n_accept++;
    pfq_rise = c;
    checks++;
    if (en_cyc < 0) fail("Pulse_for_QRS during adaptation");
    best = -1;
    for (int k = 0; k <= N_BEATS; k++) begin
      dt = c - beat_cyc(k);
      if (dt >= 0 && dt < longint'(CLK_HZ) * 60 / 1000) best = k;
    end
    checks++;
    if (best < 0) fail("Pulse_for_QRS with no beat in the 60 ms before it");
    else begin
      beat_hits[best]++;
      delay_sum += int'((c - beat_cyc(best)) * 1000 / CLK_HZ);
      if (beat_premature[best]) fail("premature beat passed the 200 ms rule");
      if (hr_checked) beats_after_hr++;
    end
  end

  always @(negedge pulse_for_qrs) if (started && pfq_rise >= 0) begin
    checks++;
    if (now() - pfq_rise != longint'(CLK_HZ) * 20 / 1000)
      fail($sformatf("Pulse_for_QRS lasted %0d clocks", now() - pfq_rise));
  end

  // RR
  always @(posedge rr_valid) if (started) begin
    #1;
    n_rr++;
    rr_q.push_back(int'(rr_int));
    if (n_rr > 1) begin
      checks++;
      if (int'(rr_int) < 738 || int'(rr_int) > 762) fail($sformatf("RR %0d ms", rr_int));
    end
  end

  // HR and the display, which follows HR one clock later
  always @(posedge hr_valid) if (started) begin
    int h;
    #1;
    h = int'(hr);
    n_hr++;
    checks++;
    if (h < 76 || h > 84) fail($sformatf("HR %0d", h));
    $display("HR %0d beats/min", h);
    repeat (3) @(posedge clk);
    n_disp++;
    checks++;
    if (seg_digit(hex2) != h / 100 || seg_digit(hex1) != (h / 10) % 10 || seg_digit(hex0) != h % 10)
      fail("7-segment digits do not show HR");
    hr_checked = 1'b1;
  end

  // serial receiver for RR values
  initial begin
    logic [7:0] b [2];
    int e;
    forever begin
      @(negedge uart_txd);
      if (started) begin
        for (int c = 0; c < 2; c++) begin
          if (c == 1) @(negedge uart_txd);
          repeat (BIT_CLKS / 2) @(posedge clk);
          for (int i = 0; i < 8; i++) begin
            repeat (BIT_CLKS) @(posedge clk);
            b[c][i] = uart_txd;
          end
          repeat (BIT_CLKS) @(posedge clk);
        end
        n_uart++;
        checks++;
        if (rr_q.size() == 0) fail("serial frame without an RR value");
        else begin
          e = rr_q.pop_front();
          if ({b[0], b[1]} != 16'(e)) fail($sformatf("serial frame %02x %02x for RR %0d", b[0], b[1], e));
        end
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    @(posedge clk);
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    started = 1'b1;
    if (FULL_RUN) wait (hr_checked && beats_after_hr >= 1);
    else          wait (n_uart >= 2);
    #(longint'(CLK_HZ) / 10);           // 10 ms

    // every normal beat from 100 ms after adaptation to the end is found once
    for (int k = 0; k <= N_BEATS; k++) begin
      if (!beat_premature[k] && beat_cyc(k) > en_cyc + CLK_HZ / 10 && beat_cyc(k) + CLK_HZ / 10 < now()) begin
        checks++;
        if (beat_hits[k] != 1) fail($sformatf("beat %0d found %0d times", k, beat_hits[k]));
      end
    end
    $display("mechanisms: adc_frames=%0d adaptation_end=%0d level1=%0d level2=%0d level3=%0d or_overlap=%0d refused_200ms=%0d accepted=%0d rr_latched=%0d hr_latched=%0d serial_frames=%0d display_updates=%0d",
             frames, n_adapt, n_lvl[0], n_lvl[1], n_lvl[2], n_overlap, n_reject, n_accept, n_rr, n_hr, n_uart, n_disp);
    if (n_accept > 0) $display("mean detection delay %0d ms", delay_sum / n_accept);
    checks += FULL_RUN ? 12 : 5;
    if (frames == 0)   fail("no A/D frame");
    if (n_adapt != 1)  fail("adaptation did not end once");
    if (n_accept == 0) fail("no Pulse_for_QRS");
    if (n_rr < 2)      fail("RR never latched twice");
    if (n_uart == 0)   fail("no serial frame");
    if (FULL_RUN) begin
      if (n_lvl[0] == 0) fail("level 1 never detected");
      if (n_lvl[1] == 0) fail("level 2 never detected");
      if (n_lvl[2] == 0) fail("level 3 never detected");
      if (n_overlap == 0) fail("level pulses never overlapped");
      if (n_reject == 0) fail("200 ms rule never refused an edge");
      if (n_hr == 0)     fail("HR never latched");
      if (n_disp == 0)   fail("display never updated");
    end
    done = 1'b1;
  end

endmodule
