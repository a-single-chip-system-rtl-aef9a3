// zero_cross_detector: finds where a level's detail signal D_i crosses zero
// from negative to positive.
//
// Only sign bits are compared, as the document describes: a crossing is
// flagged when D_i(n-1) is negative (sign bit 1) and D_i(n) is not (sign bit
// 0).  A coefficient of exactly zero therefore counts as the positive side.
//
// Interface: in_valid / in_d carry D_i; zc_detected pulses for one clock.
// Timing: zc_detected is output two clocks after the in_valid of D_i(n), the
// same latency as the local min/max detectors, so that events found on the
// same sample reach the QRS state machine in the same clock.
module zero_cross_detector
  import ecg_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t in_d,
  output logic  zc_detected
);

  logic prev_sign;   // sign bit of D_i(n-1)
  logic hit_q;       // crossing seen, delayed one clock to match the min/max path

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_sign   <= 1'b0;
      hit_q       <= 1'b0;
      zc_detected <= 1'b0;
    end else begin
      hit_q       <= in_valid && prev_sign && !in_d[COEF_W-1];
      zc_detected <= hit_q;
      if (in_valid) prev_sign <= in_d[COEF_W-1];
    end
  end

endmodule
