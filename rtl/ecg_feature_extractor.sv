// ecg_feature_extractor: single-chip on-line ECG feature extractor - QRS
// detection, RR interval and heart rate.
//
// Signal path:
//   adc_controller      reads a 12-bit sample from the serial A/D converter
//                       every 1/fs (fs = 800 Hz).
//   haar_dwt            integer Haar wavelet transform, three levels; D_i at
//                       fs / 2^i (400, 200, 100 Hz).
//   level_qrs_detector  one per level: adaptive-threshold local min, zero
//                       crossing and local max, a state machine that wants
//                       them in that order, and a 30 ms Pulse_i.
//   OR gate             OR_gate_pulse = Pulse_1 | Pulse_2 | Pulse_3, i.e. a
//                       QRS seen on any level counts.
//   final_pulse_generator  20 ms Pulse_for_QRS (a chip output) and a
//                       one-clock Short_pulse, only if 200 ms have passed
//                       since the previous OR_gate_pulse.
//   rr_hr_calculator    RR interval in ms and heart rate in beats/min.
//   rs232_tx            RR intervals out on a serial line.
//   seven_seg_display   heart rate on three 7-segment digits.
// The RR/HR counters start when every level has finished its 5 s threshold
// adaptation (enable_measuring, the AND of the three levels' flags - a design
// choice, the levels finish together in practice).
//
// hr[1:0] are always zero (HR is a beat count shifted left by two) and the
// approximation outputs of the transform are only observed, so synthesis
// reports those bits as idle; the per-level events and thresholds are left
// unconnected at this level on purpose.
//
// Parameters: CLK_HZ and FS_HZ are the design's only two settings; BAUD and
// SCLK_HALF set the serial line and the converter clock.  FS_HZ must be a
// multiple of 8 so that each level has a whole number of samples per second.
module ecg_feature_extractor
  import ecg_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned FS_HZ     = 800,
  parameter int unsigned BAUD      = 115_200,
  parameter int unsigned SCLK_HALF = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // serial A/D converter
  output logic       adc_cs_n,
  output logic       adc_sclk,
  output logic       adc_din,
  input  logic       adc_dout,
  input  logic       adc_eoc,
  // QRS indication
  output logic       pulse_for_qrs,
  output logic [2:0] pulse_level,       // Pulse_1..Pulse_3 (bit 0 = level 1)
  output logic       enable_measuring,
  // features
  output logic [10:0] rr_int,
  output logic        rr_valid,
  output logic [8:0]  hr,
  output logic        hr_valid,
  output logic        uart_txd,
  output logic [6:0]  hex0,
  output logic [6:0]  hex1,
  output logic [6:0]  hex2
);

  sample_t             x;
  logic                x_valid;
  logic  [LEVELS-1:0]  d_valid;
  coef_t [LEVELS-1:0]  a_coef, d_coef;
  logic  [LEVELS-1:0]  lvl_enable;
  logic                or_gate_pulse;
  logic                short_pulse;
  logic                fp_rejected;
  logic                uart_busy;

  adc_controller #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ), .SCLK_HALF(SCLK_HALF)) u_adc (
    .clk, .rst_n,
    .adc_cs_n, .adc_sclk, .adc_din, .adc_dout, .adc_eoc,
    .sample(x), .sample_valid(x_valid)
  );

  haar_dwt #(.N_LEVELS(LEVELS)) u_dwt (
    .clk, .rst_n,
    .x_valid, .x,
    .valid(d_valid), .a(a_coef), .d(d_coef)
  );

  for (genvar i = 0; i < LEVELS; i++) begin : g_det
    logic  min_det, zc_det, max_det, qrs_det;
    coef_t t_p, t_n;
    level_qrs_detector #(.NC(FS_HZ >> (i + 1)), .CLK_HZ(CLK_HZ)) u_det (
      .clk, .rst_n,
      .in_valid        (d_valid[i]),
      .in_d            (d_coef[i]),
      .min_detected    (min_det),
      .zc_detected     (zc_det),
      .max_detected    (max_det),
      .qrs_detected    (qrs_det),
      .enable_measuring(lvl_enable[i]),
      .pulse_i         (pulse_level[i]),
      .t_p             (t_p),
      .t_n             (t_n)
    );
  end

  // OR gate: a QRS found on any level
  assign or_gate_pulse    = |pulse_level;
  assign enable_measuring = &lvl_enable;

  final_pulse_generator #(.CLK_HZ(CLK_HZ)) u_final (
    .clk, .rst_n,
    .or_pulse(or_gate_pulse),
    .pulse_for_qrs, .short_pulse, .rejected(fp_rejected)
  );

  rr_hr_calculator #(.CLK_HZ(CLK_HZ)) u_rrhr (
    .clk, .rst_n,
    .enable_measuring, .short_pulse,
    .rr_int, .rr_valid, .hr, .hr_valid
  );

  rs232_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n,
    .rr_valid, .rr_int,
    .txd(uart_txd), .busy(uart_busy)
  );

  seven_seg_display u_7seg (
    .clk, .rst_n, .hr, .hex0, .hex1, .hex2
  );

endmodule
