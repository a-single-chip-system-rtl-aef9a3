// level_qrs_detector: QRS detection on one wavelet level (the "Local min,
// Local max and Zero-cross" sub-system).
//
// It joins the document's five sub-modules for one level i: local minimum
// detector, local maximum detector, zero-crossing detector, the QRS state
// machine and the pulse generator.  A QRS complex in D_i shows up as a
// negative modulus maximum, a zero crossing and a positive modulus maximum in
// that order; when the state machine sees the three in sequence it reports a
// QRS and Pulse_i (30 ms) is produced.
//
// Parameters: NC, the number of D_i samples in one second (fs / 2^i);
// CLK_HZ, the clock rate that times the 30 ms pulse.  The adaptation lasts
// 5 * NC level samples, i.e. 5 s.
// Timing: pulse_i rises three clocks after the clock edge that takes in the
// sample following the local maximum (one clock each in the detector, the
// state machine and the pulse generator).
module level_qrs_detector
  import ecg_pkg::*;
#(
  parameter int unsigned NC       = 400,
  parameter int unsigned CLK_HZ   = 50_000_000,
  parameter int unsigned PULSE_MS = 30
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t in_d,
  output logic  min_detected,
  output logic  zc_detected,
  output logic  max_detected,
  output logic  qrs_detected,
  output logic  enable_measuring,
  output logic  pulse_i,
  output coef_t t_p,
  output coef_t t_n
);

  coef_t min_val, max_val;

  local_min_detector #(.NC(NC)) u_min (
    .clk, .rst_n, .in_valid, .in_d,
    .min_detected, .min_value(min_val), .threshold(t_n)
  );

  local_max_detector #(.NC(NC)) u_max (
    .clk, .rst_n, .in_valid, .in_d,
    .max_detected, .max_value(max_val), .threshold(t_p)
  );

  zero_cross_detector u_zc (
    .clk, .rst_n, .in_valid, .in_d, .zc_detected
  );

  qrs_fsm #(.INIT_SAMPLES(5 * NC)) u_fsm (
    .clk, .rst_n,
    .sample_valid(in_valid),
    .min_detected, .zc_detected, .max_detected,
    .qrs_detected, .enable_measuring
  );

  pulse_generator #(.LEN_CYCLES(ms_to_cycles(CLK_HZ, PULSE_MS))) u_pulse (
    .clk, .rst_n, .trig(qrs_detected), .pulse(pulse_i)
  );

endmodule
